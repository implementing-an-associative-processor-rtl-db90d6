// alu8: the PE's (and ISCU's) 8-bit ALU. Combinational.
// Functions: ADD, SUB, AND, OR, XOR, NOT, SLL, SRL, as listed for the
// arithmetic and logical instructions. ADD and SUB produce a CarryOut that
// the caller stores; with use_carry set, the stored carry is fed back in, so
// wider numbers can be added one byte per instruction (the CarryOut feedback
// drawn next to the 8-bit ALU). The carry convention is this design's: SUB
// computes a + ~b + cin, where cin is 1 without use_carry, so CarryOut = 1
// means "no borrow". Shifts move a by b[2:0] places and fill with zeros;
// NOT complements a. Logic ops and shifts give CarryOut = 0.
module alu8
  import asc_pkg::*;
#(
  parameter int unsigned W = DW
) (
  input  alu_fn_e        fn,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic           use_carry,
  input  logic           carry_in,
  output logic [W-1:0]   y,
  output logic           carry_out
);
  logic [W:0] sum;
  logic       cin;

  always_comb begin
    sum       = '0;
    y         = '0;
    carry_out = 1'b0;
    cin       = 1'b0;
    unique case (fn)
      A_ADD: begin
        cin       = use_carry & carry_in;
        sum       = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
        y         = sum[W-1:0];
        carry_out = sum[W];
      end
      A_SUB: begin
        cin       = use_carry ? carry_in : 1'b1;
        sum       = {1'b0, a} + {1'b0, ~b} + {{W{1'b0}}, cin};
        y         = sum[W-1:0];
        carry_out = sum[W];
      end
      A_AND: y = a & b;
      A_OR:  y = a | b;
      A_XOR: y = a ^ b;
      A_NOT: y = ~a;
      A_SLL: y = a << b[2:0];
      A_SRL: y = a >> b[2:0];
      default: y = '0;
    endcase
  end
endmodule
