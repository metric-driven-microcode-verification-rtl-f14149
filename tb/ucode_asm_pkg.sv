// ucode_asm_pkg: tiny assembler for the testbenches.
//
// Each function returns the 32-bit instruction word of one microcode
// instruction in the ucode_pkg encoding: [31:28] opcode, [27:24] rd or branch
// condition, [23:20] rs, [19:16] rt, [15:0] immediate or branch target.
package ucode_asm_pkg;
  import ucode_pkg::*;

  function automatic word_t a_r(opcode_e op, int rd, int rs, int rt);
    return {op, 4'(rd), 4'(rs), 4'(rt), 16'h0};
  endfunction
  function automatic word_t a_i(opcode_e op, int rd, int rs, int imm);
    return {op, 4'(rd), 4'(rs), 4'h0, 16'(imm)};
  endfunction
  function automatic word_t a_nop();             return {OP_NOP, 28'h0};                          endfunction
  function automatic word_t a_halt();            return {OP_HALT, 28'h0};                         endfunction
  function automatic word_t a_cmp(int rs, int rt); return {OP_CMP, 4'h0, 4'(rs), 4'(rt), 16'h0};  endfunction
  function automatic word_t a_br(cond_e cc, pc_t target); return {OP_BR, cc, 8'h0, target};   endfunction
  function automatic word_t a_in(int rd);        return {OP_IN, 4'(rd), 24'h0};                   endfunction
  function automatic word_t a_out(int rs);       return {OP_OUT, 4'h0, 4'(rs), 20'h0};            endfunction
  function automatic word_t a_movi(int rd, int imm); return a_i(OP_MOVI, rd, 0, imm);             endfunction
endpackage
