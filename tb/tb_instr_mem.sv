// tb_instr_mem: loads 256 instruction words through the write port and reads
// them back through the fetch port, one clock after the address.
module tb_instr_mem;
  logic clk = 0, we; logic [7:0] ra, wa; logic [31:0] wd, rd;
  int checks = 0, failures = 0;
  function automatic logic [31:0] word(int i); return 32'(i) * 32'h9E3779B1 ^ 32'h1234_5678; endfunction
  instr_mem #(.W(32), .DEPTH(256)) dut (.clk, .raddr(ra), .rdata(rd), .we, .waddr(wa), .wdata(wd));
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    we = 0; ra = 0; wa = 0; wd = 0;
    for (int i = 0; i < 256; i++) begin @(negedge clk); we = 1; wa = 8'(i); wd = word(i); end
    @(negedge clk); we = 0;
    for (int n = 0; n < 1000; n++) begin
      int i; i = $urandom_range(0, 255);
      @(negedge clk); ra = 8'(i);
      @(negedge clk); checks++;
      if (rd !== word(i)) begin failures++; if (failures < 10) $display("FAIL %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
