// tb_regfile: random writes and reads of the 16 x 8 register file compared
// with a model array; also checks that reset clears every register.
module tb_regfile;
  logic clk = 0, rst_n = 0, we; logic [3:0] wa, ra1, ra2; logic [7:0] wd, rd1, rd2;
  logic [7:0] model [16];
  int checks = 0, failures = 0;
  regfile #(.W(8), .N(16)) dut (.clk, .rst_n, .we, .waddr(wa), .wdata(wd),
    .raddr1(ra1), .rdata1(rd1), .raddr2(ra2), .rdata2(rd2));
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      model[i] = 0; ra1 = 4'(i); ra2 = 4'(15 - i); #1; checks++;
      if (rd1 !== 0 || rd2 !== 0) begin failures++; $display("FAIL reset r%0d", i); end
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 4'($urandom); wd = 8'($urandom);
      ra1 = 4'($urandom); ra2 = 4'($urandom);
      #1; checks++;
      if (rd1 !== model[ra1] || rd2 !== model[ra2]) begin
        failures++; if (failures < 10) $display("FAIL read %0d %0d", ra1, ra2);
      end
      @(posedge clk); if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
