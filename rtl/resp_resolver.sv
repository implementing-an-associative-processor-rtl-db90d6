// resp_resolver: the responder resolution circuit. Combinational.
// Inputs R[i] come from the PEs' responder registers. Output V[i]
// (Responder_Before_Me) is '1' when any PE numbered below i is a responder;
// V[0] is tied to '0'. any_resp (At_Least_One_Responder, V4 in the 4-PE
// circuit) is the OR of all R and goes to the ISCU for the BNR/BRS branches.
// Written for any number of PEs as a prefix OR; with N = 4 it is the
// published 4-PE circuit: V1 = R0, V2 = R0|R1, V3 = R0|R1|R2.
// By construction V[0] is the constant '0' and V[1] is a copy of R[0]; a
// synthesis report lists both as idle outputs, which is expected.
module resp_resolver #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] r,
  output logic [N-1:0] before_me,
  output logic         any_resp
);
  always_comb begin
    logic seen;
    seen = 1'b0;
    for (int i = 0; i < N; i++) begin
      before_me[i] = seen;
      seen         = seen | r[i];
    end
  end
  assign any_resp = |r;
endmodule
