// comparator: the PE's comparator for the set-on-condition instructions
// SLE, SGT, SGE, SEQ, SNE and SLT. Combinational; gives a 1-bit flag that
// the PE writes into a logical register or the responder register. Operands
// are compared as unsigned bytes (this design's choice; signedness is not
// published).
module comparator
  import asc_pkg::*;
#(
  parameter int unsigned W = DW
) (
  input  cmp_fn_e       fn,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  output logic          y
);
  always_comb begin
    unique case (fn)
      C_SLE:   y = (a <= b);
      C_SGT:   y = (a >  b);
      C_SGE:   y = (a >= b);
      C_SEQ:   y = (a == b);
      C_SNE:   y = (a != b);
      C_SLT:   y = (a <  b);
      default: y = 1'b0;
    endcase
  end
endmodule
