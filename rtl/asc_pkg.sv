// asc_pkg: types and constants shared by the byte-serial associative (ASC)
// processor. It holds the 32-bit instruction format, the opcode list and the
// command bundle the instruction stream control unit (ISCU) broadcasts to the
// PE array.
//
// The mnemonics are those of the ASC assembly language: data transfer,
// arithmetic/logic, mask stack and responder, MAX/MIN and branch
// instructions. NOP and HALT are added by this design. The binary encoding
// is this design's own, since none is published:
//   [31:26] opcode       [25] P   parallel (PE) instruction, else scalar (ISCU)
//   [24] M  masked       [23] S1C src1 is a common register
//   [22] S2C src2 is a common register
//   [21] L  operate on 1-bit logical registers (AND/OR/XOR/NOT, compares)
//   [20] DR destination is the responder register (logical ops, compares)
//   [19:16] rs1  [15:12] rs2  [11:8] rd  [7:0] immediate / address
// For ADD and SUB, imm[0] = 1 adds the stored CarryOut (byte-serial
// multi-byte arithmetic).
package asc_pkg;

  localparam int unsigned DW      = 8;   // byte-serial datapath width
  localparam int unsigned NREG    = 16;  // GPRs, logical and common registers
  localparam int unsigned RA      = 4;   // register address width
  localparam int unsigned MSK_D   = 16;  // mask stack depth
  localparam int unsigned IW      = 32;  // instruction width
  localparam int unsigned AW      = 8;   // data / instruction address width

  typedef enum logic [5:0] {
    OP_NOP      = 6'd0,
    // data transfer
    OP_LD       = 6'd1,
    OP_LDI      = 6'd2,
    OP_LDRR     = 6'd3,
    OP_LDRRSPD  = 6'd4,
    OP_ST       = 6'd5,
    // arithmetic and logic
    OP_ADD      = 6'd8,
    OP_SUB      = 6'd9,
    OP_AND      = 6'd10,
    OP_OR       = 6'd11,
    OP_XOR      = 6'd12,
    OP_NOT      = 6'd13,
    OP_SLL      = 6'd14,
    OP_SRL      = 6'd15,
    OP_SLE      = 6'd16,
    OP_SGT      = 6'd17,
    OP_SGE      = 6'd18,
    OP_SEQ      = 6'd19,
    OP_SNE      = 6'd20,
    OP_SLT      = 6'd21,
    // mask stack and responders
    OP_SETMSK   = 6'd24,
    OP_TOPMSK   = 6'd25,
    OP_POPMSK   = 6'd26,
    OP_POPTHEM  = 6'd27,
    OP_RPCMSK   = 6'd28,
    OP_PUSHMSK  = 6'd29,
    OP_PUSHTHEM = 6'd30,
    OP_PUSHMSKTHEM = 6'd31,
    OP_STKTOMEM = 6'd32,
    OP_MEMTOSTK = 6'd33,
    OP_FIND     = 6'd34,
    OP_STEP     = 6'd35,
    OP_RESFST   = 6'd36,
    // maximum / minimum search
    OP_SETMXMI  = 6'd40,
    OP_LDMXMI   = 6'd41,
    OP_STMXMI   = 6'd42,
    OP_MAX      = 6'd43,
    OP_MIN      = 6'd44,
    // branches
    OP_BNR      = 6'd48,
    OP_BRS      = 6'd49,
    OP_J        = 6'd50,
    OP_HALT     = 6'd63
  } opcode_e;

  typedef struct packed {
    opcode_e         op;
    logic            p;
    logic            m;
    logic            s1c;
    logic            s2c;
    logic            l;
    logic            dr;
    logic [RA-1:0]   rs1;
    logic [RA-1:0]   rs2;
    logic [RA-1:0]   rd;
    logic [AW-1:0]   imm;
  } instr_t;

  // 8-bit ALU functions
  typedef enum logic [2:0] {
    A_ADD = 3'd0, A_SUB = 3'd1, A_AND = 3'd2, A_OR = 3'd3,
    A_XOR = 3'd4, A_NOT = 3'd5, A_SLL = 3'd6, A_SRL = 3'd7
  } alu_fn_e;

  // comparator functions
  typedef enum logic [2:0] {
    C_SLE = 3'd0, C_SGT = 3'd1, C_SGE = 3'd2, C_SEQ = 3'd3,
    C_SNE = 3'd4, C_SLT = 3'd5
  } cmp_fn_e;

  // 1-bit logic ALU functions
  typedef enum logic [1:0] {
    L_AND = 2'd0, L_OR = 2'd1, L_XOR = 2'd2, L_NOT = 2'd3
  } lfn_e;

  // mask stack operations
  typedef enum logic [2:0] {
    MS_NONE = 3'd0, MS_PUSH = 3'd1, MS_POP = 3'd2, MS_SETTOP = 3'd3,
    MS_LOAD = 3'd4
  } ms_op_e;

  // Command broadcast by the ISCU to every PE. `phase` counts the cycles of a
  // multi-cycle instruction (LD, STKTOMEM, MEMTOSTK, MAX, MIN) from 0.
  typedef struct packed {
    logic            valid;
    instr_t          ins;
    logic [2:0]      phase;
    logic [DW-1:0]   c1;     // common register rs1, for S1C
    logic [DW-1:0]   c2;     // common register rs2, for S2C
  } pe_cmd_t;

  function automatic alu_fn_e alu_fn_of(opcode_e op);
    case (op)
      OP_SUB:  return A_SUB;
      OP_AND:  return A_AND;
      OP_OR:   return A_OR;
      OP_XOR:  return A_XOR;
      OP_NOT:  return A_NOT;
      OP_SLL:  return A_SLL;
      OP_SRL:  return A_SRL;
      default: return A_ADD;
    endcase
  endfunction

  function automatic cmp_fn_e cmp_fn_of(opcode_e op);
    case (op)
      OP_SGT:  return C_SGT;
      OP_SGE:  return C_SGE;
      OP_SEQ:  return C_SEQ;
      OP_SNE:  return C_SNE;
      OP_SLT:  return C_SLT;
      default: return C_SLE;
    endcase
  endfunction

  function automatic lfn_e lfn_of(opcode_e op);
    case (op)
      OP_OR:   return L_OR;
      OP_XOR:  return L_XOR;
      OP_NOT:  return L_NOT;
      default: return L_AND;
    endcase
  endfunction

  function automatic logic is_alu(opcode_e op);
    return op inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_NOT, OP_SLL, OP_SRL};
  endfunction

  function automatic logic is_cmp(opcode_e op);
    return op inside {OP_SLE, OP_SGT, OP_SGE, OP_SEQ, OP_SNE, OP_SLT};
  endfunction

  // Number of cycles an instruction spends in execute.
  function automatic logic [3:0] exec_cycles(opcode_e op);
    case (op)
      OP_LD:               return 4'd2;
      OP_STKTOMEM:         return 4'd2;
      OP_MEMTOSTK:         return 4'd3;
      OP_MAX, OP_MIN:      return 4'd8;
      default:             return 4'd1;
    endcase
  endfunction

endpackage
