// logic_alu: the PE's 1-bit ALU working on the logical registers (and the
// responder register). Combinational: y = a AND/OR/XOR b, or NOT a.
// It is used, for example, to AND the two comparison flags of an
// associative search and write the result into the responder register.
module logic_alu
  import asc_pkg::*;
(
  input  lfn_e  fn,
  input  logic  a,
  input  logic  b,
  output logic  y
);
  always_comb begin
    unique case (fn)
      L_AND:   y = a & b;
      L_OR:    y = a | b;
      L_XOR:   y = a ^ b;
      L_NOT:   y = ~a;
      default: y = 1'b0;
    endcase
  end
endmodule
