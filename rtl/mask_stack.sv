// mask_stack: the PE's 16-deep, 1-bit mask stack. Its top tells whether the
// PE takes part in masked instructions: a PE executes a masked instruction
// only when its top is '1'. Up to 16 nested levels of association can be
// saved, for example one per level of a nested search.
// Operations, one per clock (all synchronous):
//   MS_PUSH    push d; the bottom level falls off when all 16 are in use
//   MS_POP     pop; a '1' enters at the bottom (this design's choice)
//   MS_SETTOP  overwrite the top with d
//   MS_LOAD    load all 16 levels from ld (MEMTOSTK); bit 0 is the top
// The whole stack is visible on `levels` for STKTOMEM. Reset fills the stack
// with '1', so every PE is active after reset (this design's choice).
module mask_stack
  import asc_pkg::*;
#(
  parameter int unsigned DEPTH = MSK_D
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ms_op_e            op,
  input  logic              d,
  input  logic [DEPTH-1:0]  ld,
  output logic              top,
  output logic [DEPTH-1:0]  levels
);
  logic [DEPTH-1:0] s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s <= '1;
    else begin
      unique case (op)
        MS_PUSH:   s <= {s[DEPTH-2:0], d};
        MS_POP:    s <= {1'b1, s[DEPTH-1:1]};
        MS_SETTOP: s <= {s[DEPTH-1:1], d};
        MS_LOAD:   s <= ld;
        default:   s <= s;
      endcase
    end
  end

  assign top   = s[0];
  assign levels = s;
endmodule
