// pe: one processing element of the associative array. Every PE executes the
// same broadcast command on its own data, one byte at a time.
// Inside (following the PE overview): 16 8-bit general purpose registers;
// an 8-bit ALU whose operands come through multiplexers from a GPR or from a
// broadcast common register, with a CarryOut register fed back for
// multi-byte arithmetic; a comparator; 16 1-bit logical registers with a
// 1-bit ALU; the 1-bit responder register; the 16-deep mask stack; and the
// Find/Step/ResolveFirst unit.
// Masking: an instruction with the M bit set changes this PE's registers or
// memory only when the mask stack top is '1'; unmasked instructions act in
// every PE. Mask stack, responder selection and MAX/MIN instructions act in
// every PE.
// Interface: `cmd` is the ISCU broadcast (valid for one clock per execute
// phase). The PE drives its local memory port (the memory lives in the PE
// cell, see pe_array), reports its responder bit `resp` and the GPR named by
// rs1 on `gpr_rs1` (for LDMXMI and LDRRSPD), and takes Responder_Before_Me
// and its MM bit from the array.
// Timing: register results are written at the end of the execute cycle.
// LD reads memory in phase 0 and writes the GPR in phase 1; STKTOMEM writes
// two bytes in phases 0 and 1 (low byte at the address, high byte at
// address + 1); MEMTOSTK reads in phases 0 and 1 and loads the stack in
// phase 2. The instruction semantics of the mask stack instructions, the
// register/logical/responder operand selection and the timing are this
// design's reading of the instruction list.
module pe
  import asc_pkg::*;
#(
  parameter int unsigned MEM_AW = AW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  pe_cmd_t           cmd,
  input  logic              before_me,
  input  logic              mm,
  output logic              resp,
  output logic              mask_top,
  output logic [DW-1:0]     gpr_rs1,
  output logic              mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [DW-1:0]     mem_wdata,
  input  logic [DW-1:0]     mem_rdata
);
  instr_t ins;
  assign ins = cmd.ins;

  // ---------------- register files ----------------
  logic          gpr_we;
  logic [DW-1:0] gpr_wd, gpr_a, gpr_b;
  logic          lr_we, lr_wd, lr_a, lr_b;

  regfile #(.W(DW), .N(NREG)) u_gpr (
    .clk, .rst_n, .we(gpr_we), .waddr(ins.rd), .wdata(gpr_wd),
    .raddr1(ins.rs1), .rdata1(gpr_a), .raddr2(ins.rs2), .rdata2(gpr_b)
  );
  regfile #(.W(1), .N(NREG)) u_lr (
    .clk, .rst_n, .we(lr_we), .waddr(ins.rd), .wdata(lr_wd),
    .raddr1(ins.rs1), .rdata1(lr_a), .raddr2(ins.rs2), .rdata2(lr_b)
  );
  assign gpr_rs1 = gpr_a;

  // ---------------- operand multiplexers and ALUs ----------------
  logic [DW-1:0] src1, src2, alu_y;
  logic          alu_cout, carry_q, carry_we;
  logic          cmp_y, lalu_y;

  assign src1 = ins.s1c ? cmd.c1 : gpr_a;
  assign src2 = ins.s2c ? cmd.c2 : gpr_b;

  alu8 u_alu (
    .fn(alu_fn_of(ins.op)), .a(src1), .b(src2),
    .use_carry(ins.imm[0]), .carry_in(carry_q),
    .y(alu_y), .carry_out(alu_cout)
  );
  comparator u_cmp (.fn(cmp_fn_of(ins.op)), .a(src1), .b(src2), .y(cmp_y));
  logic_alu  u_lalu (.fn(lfn_of(ins.op)), .a(lr_a), .b(lr_b), .y(lalu_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        carry_q <= 1'b0;
    else if (carry_we) carry_q <= alu_cout;
  end

  // ---------------- mask stack, responder, FSR ----------------
  ms_op_e            ms_op;
  logic              ms_d;
  logic [MSK_D-1:0]  ms_ld, ms_stack;
  logic              top;
  logic              r_we, r_d, r_clr;
  logic              fsr_sel, fsr_set_top, fsr_clr;
  logic [DW-1:0]     stk_lo;

  mask_stack u_ms (
    .clk, .rst_n, .op(ms_op), .d(ms_d), .ld(ms_ld), .top, .levels(ms_stack)
  );
  responder_reg u_resp (
    .clk, .rst_n, .we(r_we), .d(r_d), .clr(r_clr), .q(resp)
  );
  fsr_unit u_fsr (
    .op(ins.op), .en(cmd.valid), .r(resp), .before_me,
    .sel(fsr_sel), .set_top(fsr_set_top), .clr(fsr_clr)
  );
  assign mask_top = top;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stk_lo <= '0;
    else if (cmd.valid && ins.op == OP_MEMTOSTK && cmd.phase == 3'd1) stk_lo <= mem_rdata;
  end

  // ---------------- execute ----------------
  logic par;     // a parallel data instruction for the PEs
  logic act;     // this PE takes part (mask)
  assign par = cmd.valid & ins.p;
  assign act = ~ins.m | top;

  always_comb begin
    gpr_we    = 1'b0;
    gpr_wd    = alu_y;
    lr_we     = 1'b0;
    lr_wd     = 1'b0;
    carry_we  = 1'b0;
    r_we      = 1'b0;
    r_d       = 1'b0;
    r_clr     = fsr_clr;
    ms_op     = MS_NONE;
    ms_d      = 1'b0;
    ms_ld     = {mem_rdata, stk_lo};
    mem_we    = 1'b0;
    mem_addr  = ins.imm[MEM_AW-1:0];
    mem_wdata = src1;

    if (par && act) begin
      unique case (ins.op)
        OP_LD:   if (cmd.phase == 3'd1) begin gpr_we = 1'b1; gpr_wd = mem_rdata; end
        OP_LDI:  begin gpr_we = 1'b1; gpr_wd = ins.imm; end
        OP_LDRR: begin gpr_we = 1'b1; gpr_wd = src1; end
        OP_ST:   mem_we = 1'b1;
        OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_NOT, OP_SLL, OP_SRL: begin
          if (ins.l && ins.op inside {OP_AND, OP_OR, OP_XOR, OP_NOT}) begin
            if (ins.dr) begin r_we = 1'b1; r_d = lalu_y; end
            else begin lr_we = 1'b1; lr_wd = lalu_y; end
          end else begin
            gpr_we   = 1'b1;
            gpr_wd   = alu_y;
            carry_we = ins.op inside {OP_ADD, OP_SUB};
          end
        end
        OP_SLE, OP_SGT, OP_SGE, OP_SEQ, OP_SNE, OP_SLT: begin
          if (ins.dr) begin r_we = 1'b1; r_d = cmp_y; end
          else begin lr_we = 1'b1; lr_wd = cmp_y; end
        end
        default: ;
      endcase
    end

    if (cmd.valid) begin
      unique case (ins.op)
        OP_SETMSK:      begin ms_op = MS_SETTOP; ms_d = 1'b1; end
        OP_TOPMSK:      begin r_we = 1'b1; r_d = top; end
        OP_POPMSK:      ms_op = MS_POP;
        OP_POPTHEM:     begin ms_op = MS_POP; r_we = 1'b1; r_d = top; end
        OP_RPCMSK:      begin ms_op = MS_SETTOP; ms_d = resp; end
        OP_PUSHMSK:     begin ms_op = MS_PUSH; ms_d = top; end
        OP_PUSHTHEM:    begin ms_op = MS_PUSH; ms_d = resp; end
        OP_PUSHMSKTHEM: begin ms_op = MS_PUSH; ms_d = resp & top; r_we = 1'b1; r_d = resp & top; end
        OP_STKTOMEM: begin
          mem_we = 1'b1;
          if (cmd.phase == 3'd0) mem_wdata = ms_stack[DW-1:0];
          else begin
            mem_wdata = ms_stack[2*DW-1:DW];
            mem_addr  = ins.imm[MEM_AW-1:0] + 1'b1;
          end
        end
        OP_MEMTOSTK: begin
          if (cmd.phase != 3'd0) mem_addr = ins.imm[MEM_AW-1:0] + 1'b1;
          if (cmd.phase == 3'd2) ms_op = MS_LOAD;
        end
        OP_FIND, OP_STEP, OP_RESFST: if (fsr_set_top) begin ms_op = MS_SETTOP; ms_d = fsr_sel; end
        OP_STMXMI:      begin r_we = 1'b1; r_d = mm; end
        default: ;
      endcase
    end
  end
endmodule
