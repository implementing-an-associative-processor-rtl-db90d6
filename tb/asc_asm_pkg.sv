// asc_asm_pkg: instruction builder for the testbenches, a tiny assembler for
// the 32-bit format of asc_pkg. ins() packs the fields; the P (parallel) bit
// decides whether the ISCU or the PEs execute a data instruction.
package asc_asm_pkg;
  import asc_pkg::*;

  function automatic logic [31:0] ins(opcode_e op, logic p = 1'b0, logic [3:0] rs1 = 4'd0,
                                      logic [3:0] rs2 = 4'd0, logic [3:0] rd = 4'd0,
                                      logic [7:0] imm = 8'd0, logic m = 1'b0,
                                      logic s1c = 1'b0, logic s2c = 1'b0,
                                      logic l = 1'b0, logic dr = 1'b0);
    instr_t i;
    i.op = op; i.p = p; i.m = m; i.s1c = s1c; i.s2c = s2c; i.l = l; i.dr = dr;
    i.rs1 = rs1; i.rs2 = rs2; i.rd = rd; i.imm = imm;
    return i;
  endfunction
endpackage
