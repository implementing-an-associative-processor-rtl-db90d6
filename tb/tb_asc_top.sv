// tb_asc_top: end-to-end test of the associative processor at its default
// size (4 PEs, 256-byte memories), running one assembled program.
// Each PE memory holds one car record: model at address 1, state at 2,
// rebate at 3 (the first trial uses the published example fleet, the others
// are random fleets). The program:
//   1. loads the record fields into GPRs in all PEs,
//   2. searches for "Focus cars in Ohio" (two compares into logical
//      registers, AND into the responder register), pushes the result onto
//      the mask stack and raises their rebate by 10 with masked ADD/ST,
//   3. saves and restores the mask stack through memory (STKTOMEM/MEMTOSTK),
//   4. steps through the responders (BNR/STEP/LDRRSPD loop), counting them
//      and summing their rebates in common registers,
//   5. finds the maximum and the minimum rebate with the Falkoff circuit,
//   6. picks the first Ohio car with RESFST and reads its rebate,
//   7. does a 16-bit add in every PE through CarryOut, takes a BRS branch
//      and halts.
// Results in the ISCU data memory and the PE memories are compared with a
// model of the fleet, and the mechanisms (masked skip, stack push/pop,
// FIND/STEP/RESFST, MAX/MIN, taken and untaken branches, LDRRSPD, stack
// save/restore, carry use) are counted; one that never happened is a failure.
module tb_asc_top;
  import asc_pkg::*;
  import asc_asm_pkg::*;
  localparam int NP = 4;
  localparam logic [7:0] FOCUS = 8'd1, TAURUS = 8'd2, OH = 8'd10, PA = 8'd11;

  logic clk = 0, rst_n = 0, start = 0, busy, halted, any;
  logic [NP-1:0] resp, top, mm; logic [7:0] pc;
  logic imem_we = 0; logic [7:0] imem_waddr = 0; logic [31:0] imem_wdata = 0;
  logic dmem_we = 0; logic [7:0] dmem_addr = 0, dmem_wdata = 0, dmem_rdata;
  logic [1:0] pmem_pe = 0; logic pmem_we = 0; logic [7:0] pmem_addr = 0, pmem_wdata = 0, pmem_rdata;
  int checks = 0, failures = 0;

  asc_top dut (.clk, .rst_n, .start, .busy, .halted, .any_resp(any), .resp, .mask_top(top),
    .mm, .pc, .imem_we, .imem_waddr, .imem_wdata, .dmem_we, .dmem_addr, .dmem_wdata,
    .dmem_rdata, .pmem_pe, .pmem_we, .pmem_addr, .pmem_wdata, .pmem_rdata);
  always #5 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // ---------------- mechanism counters ----------------
  typedef enum int {M_MASKED_SKIP, M_PUSH, M_POP, M_FIND, M_STEP, M_RESFST, M_MAX, M_MIN,
                    M_BNR_TAKEN, M_BNR_NOT, M_BRS_TAKEN, M_JUMP, M_LDRRSPD, M_STK_SAVE,
                    M_STK_LOAD, M_CARRY, M_NUM} mech_e;
  int mcount [M_NUM];
  pe_cmd_t c;
  assign c = dut.cmd;
  always @(posedge clk) if (c.valid && c.phase == 0) begin
    unique case (c.ins.op)
      OP_PUSHMSK, OP_PUSHTHEM, OP_PUSHMSKTHEM: mcount[M_PUSH]++;
      OP_POPMSK, OP_POPTHEM: mcount[M_POP]++;
      OP_FIND: mcount[M_FIND]++;
      OP_STEP: mcount[M_STEP]++;
      OP_RESFST: mcount[M_RESFST]++;
      OP_MAX: mcount[M_MAX]++;
      OP_MIN: mcount[M_MIN]++;
      OP_BNR: if (!any) mcount[M_BNR_TAKEN]++; else mcount[M_BNR_NOT]++;
      OP_BRS: if (any) mcount[M_BRS_TAKEN]++;
      OP_J: mcount[M_JUMP]++;
      OP_LDRRSPD: mcount[M_LDRRSPD]++;
      OP_STKTOMEM: mcount[M_STK_SAVE]++;
      OP_MEMTOSTK: mcount[M_STK_LOAD]++;
      OP_ADD, OP_SUB: if (c.ins.imm[0]) mcount[M_CARRY]++;
      default: ;
    endcase
    if (c.ins.m && c.ins.p && top != '1) mcount[M_MASKED_SKIP]++;
  end

  // ---------------- program ----------------
  logic [31:0] prog [64];
  int plen;
  task automatic assemble();
    int n; n = 0;
    prog[n++] = ins(OP_LD, 1, 0, 0, 1, 8'd1);                    // 0  r1 = model
    prog[n++] = ins(OP_LD, 1, 0, 0, 2, 8'd2);                    // 1  r2 = state
    prog[n++] = ins(OP_LD, 1, 0, 0, 3, 8'd3);                    // 2  r3 = rebate
    prog[n++] = ins(OP_LDI, 0, 0, 0, 1, FOCUS);                  // 3  c1
    prog[n++] = ins(OP_LDI, 0, 0, 0, 2, OH);                     // 4  c2
    prog[n++] = ins(OP_LDI, 0, 0, 0, 3, 8'd10);                  // 5  c3
    prog[n++] = ins(OP_SETMSK);                                  // 6
    prog[n++] = ins(OP_SEQ, 1, 1, 1, 1, 0, 0, 0, 1);             // 7  LR1 = r1 == c1
    prog[n++] = ins(OP_SEQ, 1, 2, 2, 2, 0, 0, 0, 1);             // 8  LR2 = r2 == c2
    prog[n++] = ins(OP_AND, 1, 1, 2, 0, 0, 0, 0, 0, 1, 1);       // 9  resp = LR1 & LR2
    prog[n++] = ins(OP_PUSHMSKTHEM);                             // 10
    prog[n++] = ins(OP_ADD, 1, 3, 3, 3, 0, 1, 0, 1);             // 11 masked r3 += c3
    prog[n++] = ins(OP_ST, 1, 3, 0, 0, 8'd3, 1);                 // 12 masked store
    prog[n++] = ins(OP_STKTOMEM, 0, 0, 0, 0, 8'h20);             // 13
    prog[n++] = ins(OP_POPMSK);                                  // 14
    prog[n++] = ins(OP_MEMTOSTK, 0, 0, 0, 0, 8'h20);             // 15 mask back
    prog[n++] = ins(OP_TOPMSK);                                  // 16 resp = mask top
    prog[n++] = ins(OP_LDI, 0, 0, 0, 4, 8'd0);                   // 17 c4 count
    prog[n++] = ins(OP_LDI, 0, 0, 0, 5, 8'd0);                   // 18 c5 sum
    prog[n++] = ins(OP_LDI, 0, 0, 0, 6, 8'd1);                   // 19 c6 = 1
    prog[n++] = ins(OP_BNR, 0, 0, 0, 0, 8'd26);                  // 20 loop head
    prog[n++] = ins(OP_LDRRSPD, 1, 3, 0, 7);                     // 21 c7 = rebate
    prog[n++] = ins(OP_ADD, 0, 5, 7, 5);                         // 22
    prog[n++] = ins(OP_ADD, 0, 4, 6, 4);                         // 23
    prog[n++] = ins(OP_STEP);                                    // 24
    prog[n++] = ins(OP_J, 0, 0, 0, 0, 8'd20);                    // 25
    prog[n++] = ins(OP_ST, 0, 4, 0, 0, 8'h40);                   // 26
    prog[n++] = ins(OP_ST, 0, 5, 0, 0, 8'h41);                   // 27
    prog[n++] = ins(OP_POPMSK);                                  // 28 mask back to all
    prog[n++] = ins(OP_SEQ, 1, 0, 0, 0, 0, 0, 0, 0, 0, 1);       // 29 all respond
    prog[n++] = ins(OP_SETMXMI);                                 // 30
    prog[n++] = ins(OP_LDMXMI, 1, 3);                            // 31
    prog[n++] = ins(OP_MAX);                                     // 32
    prog[n++] = ins(OP_STMXMI);                                  // 33
    prog[n++] = ins(OP_LDRRSPD, 1, 3, 0, 8);                     // 34
    prog[n++] = ins(OP_ST, 0, 8, 0, 0, 8'h42);                   // 35 max
    prog[n++] = ins(OP_SEQ, 1, 0, 0, 0, 0, 0, 0, 0, 0, 1);       // 36
    prog[n++] = ins(OP_SETMXMI);                                 // 37
    prog[n++] = ins(OP_LDMXMI, 1, 3);                            // 38
    prog[n++] = ins(OP_MIN);                                     // 39
    prog[n++] = ins(OP_STMXMI);                                  // 40
    prog[n++] = ins(OP_LDRRSPD, 1, 3, 0, 9);                     // 41
    prog[n++] = ins(OP_ST, 0, 9, 0, 0, 8'h43);                   // 42 min
    prog[n++] = ins(OP_LDI, 1, 0, 0, 10, 8'h00);                 // 43 r10 = 0 everywhere
    prog[n++] = ins(OP_SEQ, 1, 2, 2, 0, 0, 0, 0, 1, 0, 1);       // 44 resp = state == OH
    prog[n++] = ins(OP_RESFST);                                  // 45
    prog[n++] = ins(OP_FIND);                                    // 46
    prog[n++] = ins(OP_LDI, 1, 0, 0, 10, 8'h01, 1);              // 47 masked: only the first OH car
    prog[n++] = ins(OP_ST, 1, 10, 0, 0, 8'd4);                   // 48 flag to memory in every PE
    prog[n++] = ins(OP_SETMSK);                                  // 49
    prog[n++] = ins(OP_LDI, 1, 0, 0, 4, 8'hF0);                  // 50 r4 = 0xF0
    prog[n++] = ins(OP_ADD, 1, 3, 4, 5);                         // 51 r5 = rebate + 0xF0
    prog[n++] = ins(OP_ADD, 1, 0, 0, 6, 8'h01);                  // 52 r6 = 0 + 0 + carry
    prog[n++] = ins(OP_ST, 1, 5, 0, 0, 8'd5);                    // 53
    prog[n++] = ins(OP_ST, 1, 6, 0, 0, 8'd6);                    // 54
    prog[n++] = ins(OP_BRS, 0, 0, 0, 0, 8'd57);                  // 55 responders left: taken
    prog[n++] = ins(OP_ST, 0, 1, 0, 0, 8'h44);                   // 56 skipped
    prog[n++] = ins(OP_HALT);                                    // 57
    plen = n;
  endtask

  // ---------------- helpers ----------------
  task automatic chk(logic [7:0] got, logic [7:0] e, string what);
    checks++; if (got !== e) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, e); end
  endtask
  task automatic pwrite(int p, int a, logic [7:0] d);
    @(negedge clk); pmem_pe = 2'(p); pmem_addr = 8'(a); pmem_wdata = d; pmem_we = 1; @(negedge clk); pmem_we = 0;
  endtask
  task automatic pread(int p, int a, output logic [7:0] d);
    @(negedge clk); pmem_pe = 2'(p); pmem_addr = 8'(a); @(negedge clk); d = pmem_rdata;
  endtask
  task automatic dread(logic [7:0] a, output logic [7:0] d);
    @(negedge clk); dmem_addr = a; @(negedge clk); d = dmem_rdata;
  endtask

  task automatic trial(logic [7:0] model [NP], logic [7:0] state [NP], logic [7:0] reb [NP]);
    logic [7:0] nreb [NP]; logic [7:0] v, cnt, sum, mx, mn, first_oh;
    logic hit [NP]; logic any_oh; int cyc;
    for (int p = 0; p < NP; p++) begin
      pwrite(p, 1, model[p]); pwrite(p, 2, state[p]); pwrite(p, 3, reb[p]);
    end
    @(negedge clk); dmem_we = 1; dmem_addr = 8'h44; dmem_wdata = 8'h5A; @(negedge clk); dmem_we = 0;
    // reference
    cnt = 0; sum = 0; any_oh = 0; first_oh = 0;
    for (int p = 0; p < NP; p++) begin
      hit[p] = (model[p] == FOCUS) && (state[p] == OH);
      nreb[p] = hit[p] ? reb[p] + 8'd10 : reb[p];
      if (hit[p]) begin cnt++; sum += nreb[p]; end
    end
    mx = nreb[0]; mn = nreb[0];
    for (int p = 1; p < NP; p++) begin if (nreb[p] > mx) mx = nreb[p]; if (nreb[p] < mn) mn = nreb[p]; end
    // run
    @(negedge clk); start = 1; @(negedge clk); start = 0; cyc = 0;
    while (!halted) begin @(negedge clk); cyc++; end
    chk(pc, 8'd57, "halt address");
    dread(8'h40, v); chk(v, cnt, "responder count");
    dread(8'h41, v); chk(v, sum, "sum of new rebates");
    dread(8'h42, v); chk(v, mx, "max rebate");
    dread(8'h43, v); chk(v, mn, "min rebate");
    dread(8'h44, v); chk(v, 8'h5A, "BRS skipped store");
    for (int p = 0; p < NP; p++) begin
      logic [8:0] s; s = {1'b0, nreb[p]} + 9'h0F0;
      pread(p, 3, v); chk(v, nreb[p], "masked rebate update");
      pread(p, 4, v);
      chk(v, (state[p] == OH && !any_oh) ? 8'h01 : 8'h00, "RESFST first OH car");
      if (state[p] == OH) any_oh = 1;
      pread(p, 5, v); chk(v, s[7:0], "16-bit add low");
      pread(p, 6, v); chk(v, {7'b0, s[8]}, "16-bit add carry");
    end
  endtask

  initial begin
    logic [7:0] model [NP], state [NP], reb [NP];
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < M_NUM; i++) mcount[i] = 0;
    assemble();
    for (int i = 0; i < plen; i++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 8'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    // the published example fleet
    model = '{FOCUS, TAURUS, FOCUS, FOCUS}; state = '{OH, OH, OH, PA};
    reb = '{8'd170, 8'd160, 8'd190, 8'd180};
    trial(model, state, reb);
    // random fleets; one has no Ohio car, so BRS and the STEP loop see no responder
    for (int t = 0; t < 12; t++) begin
      for (int p = 0; p < NP; p++) begin
        model[p] = ($urandom_range(0, 1) == 0) ? FOCUS : TAURUS;
        state[p] = ($urandom_range(0, 2) != 0) ? OH : PA;
        reb[p]   = 8'($urandom_range(0, 240));
      end
      if (t == 0) state[3] = OH;
      trial(model, state, reb);
    end
    for (int i = 0; i < M_NUM; i++) begin
      checks++;
      if (mcount[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", mech_e'(i)); end
      else $display("mechanism %-14s %0d", mech_e'(i), mcount[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
