// responder_reg: the PE's 1-bit responder register. It marks the PE as a
// responder to the last associative search. It is loaded with `d` when `we`
// is set (search results, mask stack moves, MAX/MIN result) and cleared by
// `clr` from the Find/Step/ResolveFirst unit, which wins over a load. Its
// value goes to the responder resolution circuit and to the MAX/MIN
// circuit. Reset clears it.
module responder_reg (
  input  logic clk,
  input  logic rst_n,
  input  logic we,
  input  logic d,
  input  logic clr,
  output logic q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= 1'b0;
    else if (clr) q <= 1'b0;
    else if (we)  q <= d;
  end
endmodule
