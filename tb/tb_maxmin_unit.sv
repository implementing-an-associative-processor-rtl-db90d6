// tb_maxmin_unit: first replays the maximum-rebate example (rebates 170,
// 160, 190, 180): the MM bits after each bit slice must follow the published
// table, ending with only PE2 marked. Then random maximum and minimum
// searches, some with ties and some with PEs left out by RPD, are compared
// with a direct search. Each search takes 8 step clocks.
module tb_maxmin_unit;
  logic clk = 0, rst_n = 0, load, set_mm, step, op_min;
  logic [3:0][7:0] data; logic [3:0] rpd, mm;
  int checks = 0, failures = 0;
  maxmin_unit #(.N(4), .W(8)) dut (.clk, .rst_n, .load, .data, .set_mm, .rpd, .step, .op_min, .mm);
  always #5 clk = ~clk;
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // MM bits after bit 7, 6, ..., 0 for the rebate example, PE3..PE0
  logic [3:0] table_mm [8] = '{4'b1111, 4'b1111, 4'b1111, 4'b1100, 4'b0100, 4'b0100, 4'b0100, 4'b0100};

  task automatic setup(input logic [3:0][7:0] v, input logic [3:0] p);
    @(negedge clk); load = 1; data = v; set_mm = 1; rpd = p; step = 0;
    @(negedge clk); load = 0; set_mm = 0;
  endtask

  initial begin
    load = 0; set_mm = 0; step = 0; op_min = 0; data = '0; rpd = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    setup({8'd180, 8'd190, 8'd160, 8'd170}, 4'b1111);
    checks++; if (mm !== 4'b1111) begin failures++; $display("FAIL init mm=%b", mm); end
    for (int b = 0; b < 8; b++) begin
      step = 1; op_min = 0; @(negedge clk);
      checks++;
      if (mm !== table_mm[b]) begin failures++; $display("FAIL bit %0d mm=%b exp=%b", 7 - b, mm, table_mm[b]); end
    end
    step = 0;
    for (int n = 0; n < 400; n++) begin
      logic [3:0][7:0] v; logic [3:0] p, e; int best;
      for (int i = 0; i < 4; i++) v[i] = (n % 3 == 0) ? 8'($urandom_range(0, 3)) : 8'($urandom);
      p = 4'($urandom); if (p == 0) p = 4'b0001;
      op_min = 1'($urandom);
      setup(v, p);
      for (int b = 0; b < 8; b++) begin step = 1; @(negedge clk); end
      step = 0;
      best = op_min ? 256 : -1;
      for (int i = 0; i < 4; i++) if (p[i]) begin
        int vi; vi = int'(v[i]);
        if (!op_min && vi > best) best = vi;
        if (op_min && vi < best) best = vi;
      end
      for (int i = 0; i < 4; i++) e[i] = p[i] && (int'(v[i]) == best);
      checks++;
      if (mm !== e) begin failures++; if (failures < 10) $display("FAIL min=%b v=%h p=%b mm=%b exp=%b", op_min, v, p, mm, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
