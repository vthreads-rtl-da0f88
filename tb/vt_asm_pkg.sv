// vt_asm_pkg: small assembler helpers for the testbenches.
// Builds 32-bit syllables in the format of vt_pkg:
//   [31] stop, [30:25] opcode, [24:19] rd, [18:13] rs1, [12:7] rs2 or
//   [12:0] imm13, [18:0] imm19 for GOTO and LUI.
// A testbench keeps its program in a queue of words; `stop` marks the last
// syllable of a long instruction word. Addresses are byte addresses.
package vt_asm_pkg;
  import vt_pkg::*;

  function automatic logic [31:0] s_rrr(opcode_e op, int rd, int rs1, int rs2);
    return {1'b0, 6'(op), 6'(rd), 6'(rs1), 6'(rs2), 7'd0};
  endfunction

  function automatic logic [31:0] s_rri(opcode_e op, int rd, int rs1, int imm);
    return {1'b0, 6'(op), 6'(rd), 6'(rs1), 13'(imm)};
  endfunction

  function automatic logic [31:0] s_i19(opcode_e op, int rd, int imm);
    return {1'b0, 6'(op), 6'(rd), 19'(imm)};
  endfunction

  function automatic logic [31:0] stop(logic [31:0] s);
    return s | 32'h8000_0000;
  endfunction
endpackage
