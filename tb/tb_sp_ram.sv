// tb_sp_ram: fills the 256 x 8 RAM, then random reads and writes compared
// with a model; read data are checked one clock after the address.
module tb_sp_ram;
  logic clk = 0, we; logic [7:0] addr, wd, rd;
  logic [7:0] model [256];
  int checks = 0, failures = 0;
  sp_ram #(.W(8), .DEPTH(256)) dut (.clk, .we, .addr, .wdata(wd), .rdata(rd));
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    we = 0; addr = 0; wd = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; addr = 8'(i); wd = 8'(i * 7 + 3); model[i] = wd;
    end
    for (int n = 0; n < 3000; n++) begin
      logic [7:0] old;
      @(negedge clk); we = 1'($urandom); addr = 8'($urandom); wd = 8'($urandom);
      old = model[addr];
      @(posedge clk); if (we) model[addr] = wd;
      @(negedge clk); we = 0; checks++;
      if (rd !== old) begin failures++; if (failures < 10) $display("FAIL a=%h rd=%h exp=%h", addr, rd, old); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
