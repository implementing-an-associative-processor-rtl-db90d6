// iscu: the instruction stream control unit. It fetches 32-bit instructions,
// executes the sequential (scalar) ones on its 16 8-bit common registers and
// its data memory, broadcasts the parallel ones to the PE array, and takes
// the branches BNR (no responder) and BRS (responders) on the array's
// At_Least_One_Responder signal.
// Sequencing (this design's choice; the published prototype gives none):
// start -> FETCH (instruction memory address = pc) -> DECODE (instruction
// latched) -> EXEC for exec_cycles() clocks, `cmd.valid` high and
// `cmd.phase` counting 0,1,.. -> FETCH. A plain instruction takes 3 clocks,
// LD and STKTOMEM 4, MEMTOSTK 5, MAX and MIN 10 (one clock per bit).
// HALT stops in HALTED until the next start.
// Scalar instructions (P bit clear): LD/ST move a byte between the data
// memory and a common register, LDI/LDRR load a common register, ALU ops and
// compares work on common registers (a compare writes 1 or 0). LDRRSPD
// copies the first responder's GPR rs1 into common register rd.
// The data memory port is synchronous (data one clock after the address).
module iscu
  import asc_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           halted,
  output logic [AW-1:0]  pc,
  // instruction memory read port
  output logic [AW-1:0]  imem_addr,
  input  logic [IW-1:0]  imem_rdata,
  // data memory port
  output logic           dmem_we,
  output logic [AW-1:0]  dmem_addr,
  output logic [DW-1:0]  dmem_wdata,
  input  logic [DW-1:0]  dmem_rdata,
  // PE array
  output pe_cmd_t        cmd,
  input  logic           any_resp,
  input  logic [DW-1:0]  spd_data
);
  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_DECODE, S_EXEC, S_HALTED} state_e;
  state_e        state;
  instr_t        ir;
  logic [2:0]    phase;
  logic          last;

  assign busy      = state inside {S_FETCH, S_DECODE, S_EXEC};
  assign halted    = (state == S_HALTED);
  assign imem_addr = pc;
  assign last      = ({1'b0, phase} == exec_cycles(ir.op) - 4'd1);

  // common registers and scalar datapath
  logic          cr_we;
  logic [DW-1:0] cr_wd, c1, c2, alu_y;
  logic          alu_cout, carry_q, carry_we, cmp_y;

  regfile #(.W(DW), .N(NREG)) u_cr (
    .clk, .rst_n, .we(cr_we), .waddr(ir.rd), .wdata(cr_wd),
    .raddr1(ir.rs1), .rdata1(c1), .raddr2(ir.rs2), .rdata2(c2)
  );
  alu8 u_alu (
    .fn(alu_fn_of(ir.op)), .a(c1), .b(c2), .use_carry(ir.imm[0]),
    .carry_in(carry_q), .y(alu_y), .carry_out(alu_cout)
  );
  comparator u_cmp (.fn(cmp_fn_of(ir.op)), .a(c1), .b(c2), .y(cmp_y));

  logic exec;
  assign exec = (state == S_EXEC);

  assign cmd.valid = exec;
  assign cmd.ins   = ir;
  assign cmd.phase = phase;
  assign cmd.c1    = c1;
  assign cmd.c2    = c2;

  always_comb begin
    cr_we      = 1'b0;
    cr_wd      = alu_y;
    carry_we   = 1'b0;
    dmem_we    = 1'b0;
    dmem_addr  = ir.imm;
    dmem_wdata = c1;
    if (exec && ir.op == OP_LDRRSPD) begin
      cr_we = 1'b1;
      cr_wd = spd_data;
    end else if (exec && !ir.p) begin
      if (is_alu(ir.op)) begin
        cr_we    = 1'b1;
        cr_wd    = alu_y;
        carry_we = ir.op inside {OP_ADD, OP_SUB};
      end else if (is_cmp(ir.op)) begin
        cr_we = 1'b1;
        cr_wd = {{(DW-1){1'b0}}, cmp_y};
      end else begin
        unique case (ir.op)
          OP_LD:   if (phase == 3'd1) begin cr_we = 1'b1; cr_wd = dmem_rdata; end
          OP_LDI:  begin cr_we = 1'b1; cr_wd = ir.imm; end
          OP_LDRR: begin cr_we = 1'b1; cr_wd = c1; end
          OP_ST:   dmem_we = 1'b1;
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        carry_q <= 1'b0;
    else if (carry_we) carry_q <= alu_cout;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pc    <= '0;
      ir    <= '0;
      phase <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_HALTED: if (start) begin
          pc    <= '0;
          state <= S_FETCH;
        end
        S_FETCH: state <= S_DECODE;
        S_DECODE: begin
          ir    <= instr_t'(imem_rdata);
          phase <= '0;
          state <= S_EXEC;
        end
        S_EXEC: begin
          if (!last) phase <= phase + 3'd1;
          else begin
            phase <= '0;
            state <= S_FETCH;
            unique case (ir.op)
              OP_HALT: state <= S_HALTED;
              OP_J:    pc <= ir.imm;
              OP_BNR:  pc <= any_resp ? pc + 1'b1 : ir.imm;
              OP_BRS:  pc <= any_resp ? ir.imm : pc + 1'b1;
              default: pc <= pc + 1'b1;
            endcase
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a multi-cycle instruction never runs past its last phase
  a_phase: assert property (@(posedge clk) disable iff (!rst_n)
    exec |-> ({1'b0, phase} < exec_cycles(ir.op)));
endmodule
