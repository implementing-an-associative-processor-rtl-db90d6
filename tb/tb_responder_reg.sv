// tb_responder_reg: random load / clear / hold sequences against a model;
// clear wins over a simultaneous load.
module tb_responder_reg;
  logic clk = 0, rst_n = 0, we, d, clr, q, m;
  int checks = 0, failures = 0;
  responder_reg dut (.clk, .rst_n, .we, .d, .clr, .q);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    we = 0; d = 0; clr = 0; m = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    #1 checks++; if (q !== 0) begin failures++; $display("FAIL reset"); end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk); we = 1'($urandom); d = 1'($urandom); clr = ($urandom_range(0, 3) == 0);
      @(posedge clk); if (clr) m = 0; else if (we) m = d;
      #1 checks++; if (q !== m) begin failures++; if (failures < 10) $display("FAIL n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
