// tb_pe: drives one PE with broadcast commands as the ISCU would and checks
// its registers (read back through the rs1 port), responder, mask stack top
// and memory traffic against values worked out by hand: immediate and
// common-register loads, a two-byte add through CarryOut, compares into
// logical registers, logical AND into the responder, masked execution,
// mask stack moves, STKTOMEM/MEMTOSTK, LD/ST, FIND/STEP/RESFST and STMXMI.
module tb_pe;
  import asc_pkg::*;
  import asc_asm_pkg::*;
  logic clk = 0, rst_n = 0, bm, mm, resp, top, we;
  logic [7:0] gpr, addr, wd, rd;
  pe_cmd_t cmd;
  logic [7:0] mem [256];
  int checks = 0, failures = 0;

  pe dut (.clk, .rst_n, .cmd, .before_me(bm), .mm, .resp, .mask_top(top), .gpr_rs1(gpr),
          .mem_we(we), .mem_addr(addr), .mem_wdata(wd), .mem_rdata(rd));
  always #5 clk = ~clk;
  always @(posedge clk) begin if (we) mem[addr] <= wd; rd <= mem[addr]; end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run(logic [31:0] w, logic [7:0] c1 = 0, logic [7:0] c2 = 0);
    instr_t i; i = instr_t'(w);
    for (int ph = 0; ph < int'(exec_cycles(i.op)); ph++) begin
      @(negedge clk); cmd.valid = 1; cmd.ins = i; cmd.phase = 3'(ph); cmd.c1 = c1; cmd.c2 = c2;
    end
    @(negedge clk); cmd.valid = 0;
  endtask
  task automatic chk_gpr(int k, logic [7:0] e, string what);
    cmd.valid = 0; cmd.ins.rs1 = 4'(k); #1; checks++;
    if (gpr !== e) begin failures++; $display("FAIL %s: r%0d=%h exp %h", what, k, gpr, e); end
  endtask
  task automatic chk(logic got, logic e, string what);
    checks++; if (got !== e) begin failures++; $display("FAIL %s: got %b exp %b", what, got, e); end
  endtask

  initial begin
    cmd = '0; bm = 0; mm = 0;
    for (int i = 0; i < 256; i++) mem[i] = 8'(i ^ 8'h5A);
    repeat (2) @(posedge clk); rst_n = 1;
    chk(top, 1, "mask top after reset"); chk(resp, 0, "responder after reset");
    // loads
    run(ins(OP_LDI, 1, 0, 0, 1, 8'hF0));
    run(ins(OP_LDRR, 1, 3, 0, 2, 0, 0, 1), 8'h20);     // r2 <= common reg (0x20)
    run(ins(OP_LDI, 1, 0, 0, 3, 8'h01));
    run(ins(OP_LDI, 1, 0, 0, 4, 8'h02));
    chk_gpr(1, 8'hF0, "LDI"); chk_gpr(2, 8'h20, "LDRR common");
    // 16-bit add {r3,r1} + {r4,r2} = 0x01F0 + 0x0220 = 0x0410
    run(ins(OP_ADD, 1, 1, 2, 5));
    run(ins(OP_ADD, 1, 3, 4, 6, 8'h01));               // with carry
    chk_gpr(5, 8'h10, "ADD low"); chk_gpr(6, 8'h04, "ADD high with carry");
    run(ins(OP_SUB, 1, 2, 1, 7));                       // 0x20 - 0xF0 = 0x30
    chk_gpr(7, 8'h30, "SUB");
    run(ins(OP_SLL, 1, 3, 4, 8));                       // 1 << 2
    chk_gpr(8, 8'h04, "SLL");
    // compares into logical registers, AND into responder
    run(ins(OP_SEQ, 1, 1, 0, 1, 0, 0, 0, 1), 0, 8'hF0); // LR1 = (r1 == 0xF0) = 1
    run(ins(OP_SGT, 1, 3, 4, 2));                       // LR2 = (1 > 2) = 0
    run(ins(OP_AND, 1, 1, 2, 0, 0, 0, 0, 0, 1, 1));     // resp = LR1 & LR2
    chk(resp, 0, "AND LR1 LR2 -> responder");
    run(ins(OP_OR, 1, 1, 2, 0, 0, 0, 0, 0, 1, 1));
    chk(resp, 1, "OR LR1 LR2 -> responder");
    // mask: push responder & top (=1), then responder <- 0 via compare and push it
    run(ins(OP_PUSHMSKTHEM)); chk(top, 1, "PUSHMSKTHEM top"); chk(resp, 1, "PUSHMSKTHEM resp");
    run(ins(OP_SLT, 1, 4, 3, 0, 0, 0, 0, 0, 0, 1));     // resp = (2 < 1) = 0
    run(ins(OP_PUSHTHEM)); chk(top, 0, "PUSHTHEM top");
    run(ins(OP_LDI, 1, 0, 0, 9, 8'h77, 1));             // masked: skipped
    chk_gpr(9, 8'h00, "masked LDI skipped");
    run(ins(OP_LDI, 1, 0, 0, 9, 8'h66));                // unmasked: done
    chk_gpr(9, 8'h66, "unmasked LDI");
    // save the stack, pop twice, restore
    run(ins(OP_STKTOMEM, 0, 0, 0, 0, 8'h40));
    chk(mem[8'h40][0], 0, "STKTOMEM bit0"); chk(mem[8'h40][1], 1, "STKTOMEM bit1");
    run(ins(OP_POPMSK)); chk(top, 1, "POPMSK");
    run(ins(OP_POPTHEM)); chk(resp, 1, "POPTHEM resp");
    run(ins(OP_RPCMSK)); chk(top, 1, "RPCMSK");
    run(ins(OP_MEMTOSTK, 0, 0, 0, 0, 8'h40)); chk(top, 0, "MEMTOSTK top");
    run(ins(OP_TOPMSK)); chk(resp, 0, "TOPMSK");
    run(ins(OP_SETMSK)); chk(top, 1, "SETMSK");
    run(ins(OP_PUSHMSK)); chk(top, 1, "PUSHMSK");
    // memory
    run(ins(OP_ST, 1, 6, 0, 0, 8'h81)); checks++; if (mem[8'h81] !== 8'h04) begin failures++; $display("FAIL ST"); end
    run(ins(OP_LD, 1, 0, 0, 10, 8'h13)); chk_gpr(10, 8'h13 ^ 8'h5A, "LD");
    // responder selection: this PE is a responder
    run(ins(OP_SEQ, 1, 1, 1, 0, 0, 0, 0, 0, 0, 1)); chk(resp, 1, "responder set");
    bm = 1; run(ins(OP_FIND)); chk(top, 0, "FIND not first"); chk(resp, 1, "FIND keeps");
    bm = 0; run(ins(OP_FIND)); chk(top, 1, "FIND first");
    bm = 1; run(ins(OP_RESFST)); chk(resp, 0, "RESFST clears others");
    run(ins(OP_SEQ, 1, 1, 1, 0, 0, 0, 0, 0, 0, 1));
    bm = 0; run(ins(OP_STEP)); chk(resp, 0, "STEP clears selected"); chk(top, 1, "STEP top");
    run(ins(OP_STEP)); chk(top, 0, "STEP with no responder");
    mm = 1; run(ins(OP_STMXMI)); chk(resp, 1, "STMXMI");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
