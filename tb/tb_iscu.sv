// tb_iscu: runs a short program on the ISCU with model instruction and data
// memories and a modelled PE array (any_resp and spd_data driven here). It
// checks scalar results written to the data memory, the branch decisions,
// the parallel commands broadcast to the PEs (with the 8 phases of MAX) and
// the number of clocks: 3 per instruction, 4 for LD, 10 for MAX.
module tb_iscu;
  import asc_pkg::*;
  import asc_asm_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, halted, dwe, any_resp;
  logic [7:0] pc, iaddr, daddr, dwd, drd, spd;
  logic [31:0] imem [256]; logic [7:0] dmem [256]; logic [31:0] ird;
  pe_cmd_t cmd;
  int checks = 0, failures = 0, cycles = 0, max_phases = 0, par_cmds = 0;

  iscu dut (.clk, .rst_n, .start, .busy, .halted, .pc, .imem_addr(iaddr), .imem_rdata(ird),
            .dmem_we(dwe), .dmem_addr(daddr), .dmem_wdata(dwd), .dmem_rdata(drd),
            .cmd, .any_resp, .spd_data(spd));
  always #5 clk = ~clk;
  always @(posedge clk) begin
    ird <= imem[iaddr];
    if (dwe) dmem[daddr] <= dwd;
    drd <= dmem[daddr];
    if (busy) cycles++;
    if (cmd.valid && cmd.ins.op == OP_MAX) begin
      checks++; if (cmd.phase != 3'(max_phases)) begin failures++; $display("FAIL MAX phase"); end
      max_phases++;
    end
    if (cmd.valid && cmd.ins.op == OP_LDI && cmd.ins.p) begin
      par_cmds++; checks++;
      if (cmd.ins.imm != 8'h3C || cmd.c1 != 8'd5) begin failures++; $display("FAIL broadcast"); end
    end
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(logic [7:0] got, logic [7:0] e, string what);
    checks++; if (got !== e) begin failures++; $display("FAIL %s: got %h exp %h", what, got, e); end
  endtask

  initial begin
    int n, exp_cycles;
    for (int i = 0; i < 256; i++) begin imem[i] = ins(OP_HALT); dmem[i] = 8'(i); end
    n = 0;
    imem[n++] = ins(OP_LDI, 0, 0, 0, 1, 8'd5);          // 0: c1 = 5
    imem[n++] = ins(OP_LDI, 0, 0, 0, 2, 8'd7);          // 1: c2 = 7
    imem[n++] = ins(OP_ADD, 0, 1, 2, 3);                // 2: c3 = 12
    imem[n++] = ins(OP_ST, 0, 3, 0, 0, 8'h80);          // 3
    imem[n++] = ins(OP_LD, 0, 0, 0, 4, 8'h20);          // 4: c4 = 0x20
    imem[n++] = ins(OP_SUB, 0, 4, 1, 5);                // 5: c5 = 0x1B
    imem[n++] = ins(OP_ST, 0, 5, 0, 0, 8'h81);          // 6
    imem[n++] = ins(OP_SLT, 0, 1, 2, 6);                // 7: c6 = 1
    imem[n++] = ins(OP_ST, 0, 6, 0, 0, 8'h82);          // 8
    imem[n++] = ins(OP_LDI, 1, 1, 0, 0, 8'h3C);         // 9: parallel, c1 broadcast
    imem[n++] = ins(OP_BRS, 0, 0, 0, 0, 8'd13);         // 10: any_resp=0: not taken
    imem[n++] = ins(OP_BNR, 0, 0, 0, 0, 8'd13);         // 11: taken
    imem[n++] = ins(OP_ST, 0, 1, 0, 0, 8'h83);          // 12: skipped
    imem[n++] = ins(OP_LDRRSPD, 1, 2, 0, 7);            // 13: c7 = spd
    imem[n++] = ins(OP_ST, 0, 7, 0, 0, 8'h84);          // 14
    imem[n++] = ins(OP_MAX);                            // 15
    imem[n++] = ins(OP_J, 0, 0, 0, 0, 8'd18);           // 16
    imem[n++] = ins(OP_ST, 0, 1, 0, 0, 8'h85);          // 17: skipped
    imem[n++] = ins(OP_HALT);                           // 18
    exp_cycles = 3 * 15 + 4 + 10;                      // 17 executed, LD and MAX longer
    any_resp = 0; spd = 8'hAB;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (halted); @(negedge clk);
    chk(dmem[8'h80], 8'd12, "ADD"); chk(dmem[8'h81], 8'h1B, "LD/SUB");
    chk(dmem[8'h82], 8'd1, "SLT"); chk(dmem[8'h83], 8'h83, "BNR skipped store");
    chk(dmem[8'h84], 8'hAB, "LDRRSPD"); chk(dmem[8'h85], 8'h85, "J skipped store");
    chk(8'(max_phases), 8'd8, "MAX phases"); chk(8'(par_cmds), 8'd1, "parallel broadcast");
    chk(8'(cycles), 8'(exp_cycles), "cycle count"); chk(pc, 8'd18, "halt pc");
    // BRS taken with a responder
    imem[0] = ins(OP_BRS, 0, 0, 0, 0, 8'd2); imem[1] = ins(OP_ST, 0, 1, 0, 0, 8'h90); imem[2] = ins(OP_HALT);
    any_resp = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (halted); @(negedge clk);
    chk(dmem[8'h90], 8'h90, "BRS taken"); chk(pc, 8'd2, "BRS pc");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
