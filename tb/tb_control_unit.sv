// tb_control_unit: decodes every supported instruction (random register and
// immediate fields) and compares the control word with the expected one
// written out per instruction; unknown encodings must decode to no action.
// Combinational. Signal names follow the document's control table; the
// opcode numbers and control codes checked are this design's.
`timescale 1ns / 1ps
module tb_control_unit;
  import mips_pkg::*;
  import mips_asm_pkg::*;
  word_t instr;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  control_unit dut (.instr(instr), .ctrl(ctrl));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected control words; fields: wr mtr mw mwr mmtr mmw isbj bj jal brk aluop src dst ext urs urt vrs vrt
  function automatic ctrl_t mk(logic wr, logic mtr, logic mw, logic vwr, logic vmtr, logic vmw,
                                bj_e bj, logic jal, logic brk, aluop_e aop, logic src, regdst_e dst,
                                ext_e ext, logic urs, logic urt, logic vrs, logic vrt);
    ctrl_t c;
    c.regwrite = wr; c.memtoreg = mtr; c.memwrite = mw;
    c.mregwrite = vwr; c.mmemtoreg = vmtr; c.mmemwrite = vmw;
    c.isbj = (bj != BJ_NONE); c.bjtype = bj; c.isjal = jal; c.breakpoint = brk;
    c.aluop = aop; c.alusrc = src; c.regdst = dst; c.extctrl = ext;
    c.use_rs = urs; c.use_rt = urt; c.rs_vec = vrs; c.rt_vec = vrt;
    return c;
  endfunction

  localparam int NI = 41;
  word_t insn [NI];
  ctrl_t expc [NI];
  string nm   [NI];

  task automatic build(int rs, int rt, int rd, int imm);
    int k = 0;
    // scalar ALU R-type
    insn[k] = a_addu(rd, rs, rt); nm[k] = "ADDU"; expc[k++] = mk(1,0,0,0,0,0,BJ_NONE,0,0,AOP_RTYPE,0,DST_RD,EXT_SIGN,1,1,0,0);
    insn[k] = a_subu(rd, rs, rt); nm[k] = "SUBU"; expc[k++] = mk(1,0,0,0,0,0,BJ_NONE,0,0,AOP_RTYPE,0,DST_RD,EXT_SIGN,1,1,0,0);
    insn[k] = a_and(rd, rs, rt);  nm[k] = "AND";  expc[k++] = mk(1,0,0,0,0,0,BJ_NONE,0,0,AOP_RTYPE,0,DST_RD,EXT_SIGN,1,1,0,0);
    insn[k] = a_or(rd, rs, rt);   nm[k] = "OR";   expc[k++] = mk(1,0,0,0,0,0,BJ_NONE,0,0,AOP_RTYPE,0,DST_RD,EXT_SIGN,1,1,0,0);
    insn[k] = a_rr(FN_XOR, rd, rs, rt);  nm[k] = "XOR";  expc[k++] = mk(1,0,0,0,0,0,BJ_NONE,0,0,AOP_RTYPE,0,DST_RD,EXT_SIGN,1,1,0,0);
    insn[k] = a_rr(FN_SLT, rd, rs, rt);  nm[k] = "SLT";  expc[k++] = mk(1,0,0,0,0,0,BJ_NONE,0,0,AOP_RTYPE,0,DST_RD,EXT_SIGN,1,1,0,0);
    insn[k] = a_rr(FN_SLTU, rd, rs, rt); nm[k] = "SLTU"; expc[k++] = mk(1,0,0,0,0,0,BJ_NONE,0,0,AOP_RTYPE,0,DST_RD,EXT_SIGN,1,1,0,0);
    insn[k] = a_sh(FN_SLL, rd, rt, imm % 32); nm[k] = "SLL"; expc[k++] = mk(1,0,0,0,0,0,BJ_NONE,0,0,AOP_RTYPE,0,DST_RD,EXT_SIGN,0,1,0,0);
    insn[k] = a_sh(FN_SRL, rd, rt, imm % 32); nm[k] = "SRL"; expc[k++] = mk(1,0,0,0,0,0,BJ_NONE,0,0,AOP_RTYPE,0,DST_RD,EXT_SIGN,0,1,0,0);
    insn[k] = a_sh(FN_SRA, rd, rt, imm % 32); nm[k] = "SRA"; expc[k++] = mk(1,0,0,0,0,0,BJ_NONE,0,0,AOP_RTYPE,0,DST_RD,EXT_SIGN,0,1,0,0);
    insn[k] = a_mul(rd, rs, rt);  nm[k] = "MUL";  expc[k++] = mk(1,0,0,0,0,0,BJ_NONE,0,0,AOP_MUL,0,DST_RD,EXT_SIGN,1,1,0,0);
    // immediates
    insn[k] = a_addiu(rt, rs, imm); nm[k] = "ADDIU"; expc[k++] = mk(1,0,0,0,0,0,BJ_NONE,0,0,AOP_ADD,1,DST_RT,EXT_SIGN,1,0,0,0);
    insn[k] = a_ri(OP_SLTI, rt, rs, imm);  nm[k] = "SLTI";  expc[k++] = mk(1,0,0,0,0,0,BJ_NONE,0,0,AOP_SLT,1,DST_RT,EXT_SIGN,1,0,0,0);
    insn[k] = a_ri(OP_SLTIU, rt, rs, imm); nm[k] = "SLTIU"; expc[k++] = mk(1,0,0,0,0,0,BJ_NONE,0,0,AOP_SLTU,1,DST_RT,EXT_SIGN,1,0,0,0);
    insn[k] = a_andi(rt, rs, imm); nm[k] = "ANDI"; expc[k++] = mk(1,0,0,0,0,0,BJ_NONE,0,0,AOP_AND,1,DST_RT,EXT_ZERO,1,0,0,0);
    insn[k] = a_ori(rt, rs, imm);  nm[k] = "ORI";  expc[k++] = mk(1,0,0,0,0,0,BJ_NONE,0,0,AOP_OR,1,DST_RT,EXT_ZERO,1,0,0,0);
    insn[k] = a_xori(rt, rs, imm); nm[k] = "XORI"; expc[k++] = mk(1,0,0,0,0,0,BJ_NONE,0,0,AOP_XOR,1,DST_RT,EXT_ZERO,1,0,0,0);
    insn[k] = a_lui(rt, imm);      nm[k] = "LUI";  expc[k++] = mk(1,0,0,0,0,0,BJ_NONE,0,0,AOP_LUI,1,DST_RT,EXT_SIGN,0,0,0,0);
    // memory
    insn[k] = a_lw(rt, imm, rs); nm[k] = "LW"; expc[k++] = mk(1,1,0,0,0,0,BJ_NONE,0,0,AOP_ADD,1,DST_RT,EXT_SIGN,1,0,0,0);
    insn[k] = a_sw(rt, imm, rs); nm[k] = "SW"; expc[k++] = mk(0,0,1,0,0,0,BJ_NONE,0,0,AOP_ADD,1,DST_RT,EXT_SIGN,1,1,0,0);
    // control transfer
    insn[k] = a_beq(rs, rt, imm); nm[k] = "BEQ"; expc[k++] = mk(0,0,0,0,0,0,BJ_BEQ,0,0,AOP_ADD,0,DST_RT,EXT_SIGN,1,1,0,0);
    insn[k] = a_bne(rs, rt, imm); nm[k] = "BNE"; expc[k++] = mk(0,0,0,0,0,0,BJ_BNE,0,0,AOP_ADD,0,DST_RT,EXT_SIGN,1,1,0,0);
    insn[k] = a_bltz(rs, imm);    nm[k] = "BLTZ"; expc[k++] = mk(0,0,0,0,0,0,BJ_BLTZ,0,0,AOP_ADD,0,DST_RT,EXT_SIGN,1,0,0,0);
    insn[k] = a_bgez(rs, imm);    nm[k] = "BGEZ"; expc[k++] = mk(0,0,0,0,0,0,BJ_BGEZ,0,0,AOP_ADD,0,DST_RT,EXT_SIGN,1,0,0,0);
    insn[k] = a_j(imm);           nm[k] = "J";    expc[k++] = mk(0,0,0,0,0,0,BJ_J,0,0,AOP_ADD,0,DST_RT,EXT_SIGN,0,0,0,0);
    insn[k] = a_jal(imm);         nm[k] = "JAL";  expc[k++] = mk(1,0,0,0,0,0,BJ_J,1,0,AOP_LINK,0,DST_R31,EXT_SIGN,0,0,0,0);
    insn[k] = a_jr(rs);           nm[k] = "JR";   expc[k++] = mk(0,0,0,0,0,0,BJ_JR,0,0,AOP_ADD,0,DST_RT,EXT_SIGN,1,0,0,0);
    insn[k] = a_break();          nm[k] = "BREAK"; expc[k++] = mk(0,0,0,0,0,0,BJ_NONE,0,1,AOP_ADD,0,DST_RT,EXT_SIGN,0,0,0,0);
    // SIMD
    insn[k] = a_maddu(rd, rs, rt); nm[k] = "MADDU"; expc[k++] = mk(0,0,0,1,0,0,BJ_NONE,0,0,AOP_RTYPE,0,DST_RD,EXT_SIGN,1,1,1,1);
    insn[k] = a_mmul(rd, rs, rt);  nm[k] = "MMUL";  expc[k++] = mk(0,0,0,1,0,0,BJ_NONE,0,0,AOP_RTYPE,0,DST_RD,EXT_SIGN,1,1,1,1);
    insn[k] = a_vrr(FN_AND, rd, rs, rt); nm[k] = "MAND"; expc[k++] = mk(0,0,0,1,0,0,BJ_NONE,0,0,AOP_RTYPE,0,DST_RD,EXT_SIGN,1,1,1,1);
    insn[k] = a_vrr(FN_OR, rd, rs, rt);  nm[k] = "MOR";  expc[k++] = mk(0,0,0,1,0,0,BJ_NONE,0,0,AOP_RTYPE,0,DST_RD,EXT_SIGN,1,1,1,1);
    insn[k] = a_vrr(FN_XOR, rd, rs, rt); nm[k] = "MXOR"; expc[k++] = mk(0,0,0,1,0,0,BJ_NONE,0,0,AOP_RTYPE,0,DST_RD,EXT_SIGN,1,1,1,1);
    insn[k] = a_maddiu(rt, rs, imm); nm[k] = "MADDIU"; expc[k++] = mk(0,0,0,1,0,0,BJ_NONE,0,0,AOP_ADD,1,DST_RT,EXT_SIGN,1,0,1,0);
    insn[k] = a_mandi(rt, rs, imm);  nm[k] = "MANDI";  expc[k++] = mk(0,0,0,1,0,0,BJ_NONE,0,0,AOP_AND,1,DST_RT,EXT_ZERO,1,0,1,0);
    insn[k] = a_mori(rt, rs, imm);   nm[k] = "MORI";   expc[k++] = mk(0,0,0,1,0,0,BJ_NONE,0,0,AOP_OR,1,DST_RT,EXT_ZERO,1,0,1,0);
    insn[k] = a_mxori(rt, rs, imm);  nm[k] = "MXORI";  expc[k++] = mk(0,0,0,1,0,0,BJ_NONE,0,0,AOP_XOR,1,DST_RT,EXT_ZERO,1,0,1,0);
    insn[k] = a_mlw(rt, imm, rs);    nm[k] = "MLW";    expc[k++] = mk(0,0,0,1,1,0,BJ_NONE,0,0,AOP_ADD,1,DST_RT,EXT_SIGN,1,0,0,0);
    insn[k] = a_msw(rt, imm, rs);    nm[k] = "MSW";    expc[k++] = mk(0,0,0,0,0,1,BJ_NONE,0,0,AOP_ADD,1,DST_RT,EXT_SIGN,1,1,0,1);
    // encodings that must do nothing
    insn[k] = enc_i(6'h3f, rs, rt, imm);   nm[k] = "undef-op";    expc[k++] = mk(0,0,0,0,0,0,BJ_NONE,0,0,AOP_ADD,0,DST_RT,EXT_SIGN,0,0,0,0);
    insn[k] = a_vrr(FN_SLT, rd, rs, rt);   nm[k] = "undef-vfunct"; expc[k++] = mk(0,0,0,0,0,0,BJ_NONE,0,0,AOP_ADD,0,DST_RT,EXT_SIGN,0,0,0,0);
  endtask

  initial begin
    for (int t = 0; t < 50; t++) begin
      build(int'($urandom % 32), int'($urandom % 32), int'($urandom % 32), int'($urandom % 65536));
      for (int i = 0; i < NI; i++) begin
        instr = insn[i];
        #1;
        checks++;
        if (ctrl !== expc[i]) begin
          failures++;
          $display("FAIL %s instr=%h ctrl=%h expected=%h", nm[i], instr, ctrl, expc[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
