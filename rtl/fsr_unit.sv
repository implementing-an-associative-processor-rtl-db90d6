// fsr_unit: a PE's Find/Step/ResolveFirst unit. Combinational. From the PE's
// responder bit r and its Responder_Before_Me input (some lower-numbered PE
// is a responder) it decides whether this PE is the selected one: the first
// responder in PE order. For all three instructions the selected PE's mask
// top is set to sel (only it stays active for masked instructions); the
// three differ in what happens to the responder register:
//   FIND    responders kept (all remain identifiable)
//   STEP    the selected PE's responder bit is cleared, so the next STEP
//           picks the next one ("for" loop over the responders)
//   RESFST  every other responder bit is cleared, only the selected one
//           remains identifiable
// Which responder is "first" (lowest PE number) and the use of the mask top
// are this design's reading of the responder resolution circuit.
module fsr_unit
  import asc_pkg::*;
(
  input  opcode_e op,
  input  logic    en,        // a responder selection instruction is executing
  input  logic    r,         // responder register
  input  logic    before_me, // Responder_Before_Me
  output logic    sel,       // this PE is the selected responder
  output logic    set_top,   // write sel into the mask stack top
  output logic    clr        // clear the responder register
);
  always_comb begin
    sel     = r & ~before_me;
    set_top = 1'b0;
    clr     = 1'b0;
    if (en) begin
      unique case (op)
        OP_FIND:   set_top = 1'b1;
        OP_STEP:   begin set_top = 1'b1; clr = sel;  end
        OP_RESFST: begin set_top = 1'b1; clr = ~sel; end
        default: ;
      endcase
    end
  end
endmodule
