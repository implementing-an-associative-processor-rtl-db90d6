// tb_pe_array: a 4-PE array driven with broadcast commands. The PE memories
// are loaded through the host port with the car-rebate records (model,
// state, rebate per PE); the test then runs parallel loads and searches and
// checks the responder bits, At_Least_One_Responder, Responder_Before_Me
// through FIND/STEP, the first responder's data (LDRRSPD path), MAX and MIN
// searches of the rebates, RESFST breaking a tie for the maximum and the
// written-back memories.
module tb_pe_array;
  import asc_pkg::*;
  import asc_asm_pkg::*;
  localparam logic [7:0] FOCUS = 8'd1, TAURUS = 8'd2, OH = 8'd10, PA = 8'd11;
  logic clk = 0, rst_n = 0, any, hen, hwe;
  logic [1:0] hpe; logic [7:0] haddr, hwd, hrd, spd;
  logic [3:0] resp, top, mm;
  pe_cmd_t cmd;
  int checks = 0, failures = 0;

  pe_array #(.N_PE(4), .MEM_DEPTH(256)) dut (.clk, .rst_n, .cmd, .any_resp(any), .spd_data(spd),
    .resp, .mask_top(top), .mm, .host_en(hen), .host_pe(hpe), .host_we(hwe), .host_addr(haddr),
    .host_wdata(hwd), .host_rdata(hrd));
  always #5 clk = ~clk;
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run(logic [31:0] w, logic [7:0] c1 = 0, logic [7:0] c2 = 0);
    instr_t i; i = instr_t'(w);
    for (int ph = 0; ph < int'(exec_cycles(i.op)); ph++) begin
      @(negedge clk); cmd.valid = 1; cmd.ins = i; cmd.phase = 3'(ph); cmd.c1 = c1; cmd.c2 = c2;
    end
    @(negedge clk); cmd.valid = 0;
  endtask
  task automatic chk(logic [7:0] got, logic [7:0] e, string what);
    checks++; if (got !== e) begin failures++; $display("FAIL %s: got %h exp %h", what, got, e); end
  endtask
  task automatic hwrite(int p, int a, logic [7:0] d);
    @(negedge clk); hpe = 2'(p); haddr = 8'(a); hwd = d; hwe = 1; @(negedge clk); hwe = 0;
  endtask
  task automatic hread(int p, int a, output logic [7:0] d);
    @(negedge clk); hpe = 2'(p); haddr = 8'(a); @(negedge clk); d = hrd;
  endtask

  initial begin
    logic [7:0] models [4] = '{FOCUS, TAURUS, FOCUS, FOCUS};
    logic [7:0] states [4] = '{OH, OH, OH, PA};
    logic [7:0] rebate [4] = '{8'd170, 8'd160, 8'd190, 8'd180};
    logic [7:0] v;
    cmd = '0; hen = 1; hwe = 0; hpe = 0; haddr = 0; hwd = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int p = 0; p < 4; p++) begin hwrite(p, 1, models[p]); hwrite(p, 2, states[p]); hwrite(p, 3, rebate[p]); end
    hen = 0;
    run(ins(OP_LD, 1, 0, 0, 1, 8'd1));      // r1 = model
    run(ins(OP_LD, 1, 0, 0, 2, 8'd2));      // r2 = state
    run(ins(OP_LD, 1, 0, 0, 3, 8'd3));      // r3 = rebate
    chk(8'(any), 0, "no responders yet");
    // Focus cars in Ohio
    run(ins(OP_SEQ, 1, 1, 1, 1, 0, 0, 0, 1), 0, FOCUS);   // LR1
    run(ins(OP_SEQ, 1, 2, 2, 2, 0, 0, 0, 1), 0, OH);      // LR2
    run(ins(OP_AND, 1, 1, 2, 0, 0, 0, 0, 0, 1, 1));       // resp = LR1 & LR2
    chk(8'(resp), 8'b0101, "Focus in OH responders"); chk(8'(any), 1, "any responder");
    // masked rebate increase by 10
    run(ins(OP_PUSHMSKTHEM));
    chk(8'(top), 8'b0101, "mask after push");
    run(ins(OP_ADD, 1, 3, 4, 3, 0, 1, 0, 1), 0, 8'd10);  // masked r3 += common(10)
    run(ins(OP_ST, 1, 3, 0, 0, 8'd3, 1));
    run(ins(OP_POPMSK));
    // first responder's rebate
    cmd.ins.rs1 = 4'd3; #1 chk(spd, 8'd180, "first responder rebate");
    // STEP through the responders
    run(ins(OP_STEP)); chk(8'(top), 8'b0001, "STEP 1 top"); chk(8'(resp), 8'b0100, "STEP 1 resp");
    cmd.ins.rs1 = 4'd3; #1 chk(spd, 8'd200, "second responder rebate");
    run(ins(OP_STEP)); chk(8'(top), 8'b0100, "STEP 2 top"); chk(8'(any), 0, "STEP 2 none left");
    run(ins(OP_SETMSK));
    // maximum rebate among all PEs
    run(ins(OP_SEQ, 1, 0, 0, 0, 0, 0, 0, 0, 0, 1));       // everyone responds
    chk(8'(resp), 8'b1111, "all respond");
    run(ins(OP_SETMXMI)); run(ins(OP_LDMXMI, 1, 3)); run(ins(OP_MAX)); run(ins(OP_STMXMI));
    chk(8'(resp), 8'b0100, "MAX rebate in PE2 (200)");
    run(ins(OP_SEQ, 1, 0, 0, 0, 0, 0, 0, 0, 0, 1));
    run(ins(OP_SETMXMI)); run(ins(OP_LDMXMI, 1, 3)); run(ins(OP_MIN)); run(ins(OP_STMXMI));
    chk(8'(resp), 8'b0010, "MIN rebate in PE1 (160)");
    run(ins(OP_FIND)); chk(8'(top), 8'b0010, "FIND");
    // tie for the maximum among PEs 0, 1, 3 (180, 160, 180): RESFST keeps PE0
    run(ins(OP_SNE, 1, 3, 5, 0, 0, 0, 0, 1, 0, 1), 0, 8'd200);   // resp = rebate != 200
    chk(8'(resp), 8'b1011, "all but PE2");
    run(ins(OP_SETMXMI)); run(ins(OP_LDMXMI, 1, 3)); run(ins(OP_MAX)); run(ins(OP_STMXMI));
    chk(8'(resp), 8'b1001, "MAX tie PE0/PE3");
    run(ins(OP_RESFST)); chk(8'(resp), 8'b0001, "RESFST keeps first"); chk(8'(top), 8'b0001, "RESFST top");
    hen = 1;
    for (int p = 0; p < 4; p++) begin
      hread(p, 3, v); chk(v, (p == 0 || p == 2) ? rebate[p] + 8'd10 : rebate[p], "rebate in memory");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
