// sp_ram: single-port synchronous RAM, 8 bits wide. Used as the ISCU data
// memory and as each PE's local data memory. Each PE memory maps onto one
// embedded array block of the FPGA; at 2,048 bits per block that gives
// 256 x 8, which is the default. Read data appear one clock after the
// address (registered read, like the embedded array blocks); a write takes
// effect at the clock edge and the read port then shows the old contents.
module sp_ram #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned A    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [A-1:0]  addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
