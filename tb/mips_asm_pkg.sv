// mips_asm_pkg: instruction encoders used by the testbenches to build
// programs for the SIMD MIPS processor. Each function returns one 32-bit
// instruction word; register arguments are register numbers, offsets of
// branches are in instructions relative to the delay slot, jump targets are
// instruction indices.
// The scalar encodings are the standard MIPS32 ones; the SIMD encodings are
// this design's own, as defined in mips_pkg.
package mips_asm_pkg;
  import mips_pkg::*;

  function automatic word_t enc_r(logic [5:0] op, int rs, int rt, int rd, int sa, logic [5:0] fn);
    return {op, 5'(rs), 5'(rt), 5'(rd), 5'(sa), fn};
  endfunction
  function automatic word_t enc_i(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  // scalar
  function automatic word_t a_rr(logic [5:0] fn, int rd, int rs, int rt); return enc_r(OP_SPECIAL, rs, rt, rd, 0, fn); endfunction
  function automatic word_t a_sh(logic [5:0] fn, int rd, int rt, int sa); return enc_r(OP_SPECIAL, 0, rt, rd, sa, fn); endfunction
  function automatic word_t a_ri(logic [5:0] op, int rt, int rs, int imm); return enc_i(op, rs, rt, imm); endfunction
  function automatic word_t a_addu(int rd, int rs, int rt); return a_rr(FN_ADDU, rd, rs, rt); endfunction
  function automatic word_t a_subu(int rd, int rs, int rt); return a_rr(FN_SUBU, rd, rs, rt); endfunction
  function automatic word_t a_and (int rd, int rs, int rt); return a_rr(FN_AND, rd, rs, rt); endfunction
  function automatic word_t a_or  (int rd, int rs, int rt); return a_rr(FN_OR, rd, rs, rt); endfunction
  function automatic word_t a_addiu(int rt, int rs, int imm); return enc_i(OP_ADDIU, rs, rt, imm); endfunction
  function automatic word_t a_ori (int rt, int rs, int imm); return enc_i(OP_ORI, rs, rt, imm); endfunction
  function automatic word_t a_xori(int rt, int rs, int imm); return enc_i(OP_XORI, rs, rt, imm); endfunction
  function automatic word_t a_andi(int rt, int rs, int imm); return enc_i(OP_ANDI, rs, rt, imm); endfunction
  function automatic word_t a_lui (int rt, int imm); return enc_i(OP_LUI, 0, rt, imm); endfunction
  function automatic word_t a_mul (int rd, int rs, int rt); return enc_r(OP_SPECIAL2, rs, rt, rd, 0, FN2_MUL); endfunction
  function automatic word_t a_lw  (int rt, int off, int base); return enc_i(OP_LW, base, rt, off); endfunction
  function automatic word_t a_sw  (int rt, int off, int base); return enc_i(OP_SW, base, rt, off); endfunction
  function automatic word_t a_beq (int rs, int rt, int off); return enc_i(OP_BEQ, rs, rt, off); endfunction
  function automatic word_t a_bne (int rs, int rt, int off); return enc_i(OP_BNE, rs, rt, off); endfunction
  function automatic word_t a_bltz(int rs, int off); return enc_i(OP_REGIMM, rs, RT_BLTZ, off); endfunction
  function automatic word_t a_bgez(int rs, int off); return enc_i(OP_REGIMM, rs, RT_BGEZ, off); endfunction
  function automatic word_t a_j   (int idx); return {OP_J, 26'(idx)}; endfunction
  function automatic word_t a_jal (int idx); return {OP_JAL, 26'(idx)}; endfunction
  function automatic word_t a_jr  (int rs); return enc_r(OP_SPECIAL, rs, 0, 0, 0, FN_JR); endfunction
  function automatic word_t a_break(); return enc_r(OP_SPECIAL, 0, 0, 0, 0, FN_BREAK); endfunction
  function automatic word_t a_nop(); return 32'h0; endfunction

  // SIMD
  function automatic word_t a_vrr(logic [5:0] fn, int rd, int rs, int rt); return enc_r(OP_MRTYPE, rs, rt, rd, 0, fn); endfunction
  function automatic word_t a_maddu(int rd, int rs, int rt); return a_vrr(FN_ADDU, rd, rs, rt); endfunction
  function automatic word_t a_mmul (int rd, int rs, int rt); return a_vrr(FN_MMUL, rd, rs, rt); endfunction
  function automatic word_t a_maddiu(int rt, int rs, int imm); return enc_i(OP_MADDIU, rs, rt, imm); endfunction
  function automatic word_t a_mandi(int rt, int rs, int imm); return enc_i(OP_MANDI, rs, rt, imm); endfunction
  function automatic word_t a_mori (int rt, int rs, int imm); return enc_i(OP_MORI, rs, rt, imm); endfunction
  function automatic word_t a_mxori(int rt, int rs, int imm); return enc_i(OP_MXORI, rs, rt, imm); endfunction
  function automatic word_t a_mlw  (int rt, int off, int base); return enc_i(OP_MLW, base, rt, off); endfunction
  function automatic word_t a_msw  (int rt, int off, int base); return enc_i(OP_MSW, base, rt, off); endfunction
endpackage
