// regfile: register file with two combinational read ports and one write
// port, written on the rising clock edge. Used as the 16 8-bit general
// purpose registers and the 16 1-bit logical registers of each PE, and as
// the 16 8-bit common registers of the ISCU. Reset clears every register
// (reset behaviour is this design's choice).
module regfile #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 16,
  localparam int unsigned A = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [A-1:0]  waddr,
  input  logic [W-1:0]  wdata,
  input  logic [A-1:0]  raddr1,
  output logic [W-1:0]  rdata1,
  input  logic [A-1:0]  raddr2,
  output logic [W-1:0]  rdata2
);
  logic [W-1:0] r [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) r[i] <= '0;
    end else if (we) begin
      r[waddr] <= wdata;
    end
  end

  assign rdata1 = r[raddr1];
  assign rdata2 = r[raddr2];
endmodule
