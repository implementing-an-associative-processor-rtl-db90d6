// instr_mem: the ISCU's 32-bit instruction memory. One synchronous read port
// for instruction fetch (data one clock after the address) and one write
// port through which a host loads the program. Depth 256 matches the 8-bit
// branch target field of the instruction format (this design's choice).
module instr_mem #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned A    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [A-1:0]  raddr,
  output logic [W-1:0]  rdata,
  input  logic          we,
  input  logic [A-1:0]  waddr,
  input  logic [W-1:0]  wdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
