// maxmin_unit: the MAX/MIN circuit, a bit-serial Falkoff search over all
// PEs at once. Each PE has an 8-bit shift register holding its operand and
// a 1-bit MM register ("this item may still be the extreme value").
//   load      (LDMXMI)  shift register i <= data[i]
//   set_mm    (SETMXMI) MM[i] <= rpd[i] (Mask_W: the PE's responder bit
//                       decides which items take part)
//   step      (MAX/MIN, one per bit, MSB first) each PE ANDs its current
//                       bit, complemented when op_min is set, with MM[i];
//                       if at least one AND result is '1' (the wide OR),
//                       MM takes the AND results, otherwise MM is left as
//                       it is; the shift registers then shift left.
// After W steps, MM marks the maximum (or minimum); several bits set mean a
// tie. mm is sent back to the PEs' responder registers by STMXMI.
// The structure (shift registers, AND per PE, "not" switch, OR, MM mux) is
// the published circuit; clocking the search one bit per clock is this
// design's choice.
module maxmin_unit #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [N-1:0][W-1:0] data,
  input  logic              set_mm,
  input  logic [N-1:0]      rpd,
  input  logic              step,
  input  logic              op_min,
  output logic [N-1:0]      mm
);
  logic [N-1:0][W-1:0] sr;
  logic [N-1:0]        bits, ands;
  logic                any;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      bits[i] = sr[i][W-1] ^ op_min;
      ands[i] = bits[i] & mm[i];
    end
    any = |ands;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0;
      mm <= '0;
    end else begin
      if (load) sr <= data;
      else if (step) begin
        for (int i = 0; i < N; i++) sr[i] <= {sr[i][W-2:0], 1'b0};
      end
      if (set_mm) mm <= rpd;
      else if (step && any) mm <= ands;
    end
  end
endmodule
