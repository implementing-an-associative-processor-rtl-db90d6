// tb_mask_stack: random push/pop/set-top/load sequences compared with a
// model kept as a list of levels; also checks the 16-level limit and the
// reset value.
module tb_mask_stack;
  import asc_pkg::*;
  logic clk = 0, rst_n = 0, d, top; ms_op_e op; logic [15:0] ld, levels;
  logic m [16];
  int checks = 0, failures = 0;
  mask_stack dut (.clk, .rst_n, .op, .d, .ld, .top, .levels);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic cmp();
    checks++;
    for (int i = 0; i < 16; i++)
      if (levels[i] !== m[i]) begin failures++; $display("FAIL level %0d", i); return; end
    if (top !== m[0]) begin failures++; $display("FAIL top"); end
  endtask
  initial begin
    op = MS_NONE; d = 0; ld = 0;
    for (int i = 0; i < 16; i++) m[i] = 1;
    repeat (2) @(posedge clk); rst_n = 1; #1 cmp();
    // 17 pushes of alternating bits: the oldest falls off
    for (int n = 0; n < 17; n++) begin
      @(negedge clk); op = MS_PUSH; d = n[0];
      @(posedge clk); for (int i = 15; i > 0; i--) m[i] = m[i-1]; m[0] = n[0];
      #1 cmp();
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk); op = ms_op_e'($urandom_range(0, 4)); d = 1'($urandom); ld = 16'($urandom);
      @(posedge clk);
      case (op)
        MS_PUSH:   begin for (int i = 15; i > 0; i--) m[i] = m[i-1]; m[0] = d; end
        MS_POP:    begin for (int i = 0; i < 15; i++) m[i] = m[i+1]; m[15] = 1; end
        MS_SETTOP: m[0] = d;
        MS_LOAD:   for (int i = 0; i < 16; i++) m[i] = ld[i];
        default: ;
      endcase
      #1 cmp();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
