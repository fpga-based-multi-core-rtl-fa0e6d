// control_unit: main control unit of the decode stage.
//
// Combinational. Decodes the opcode (bits 31:26), funct (bits 5:0) and, for
// BLTZ/BGEZ, the rt field (bits 20:16) into the control word CTRL: the
// scalar signals REGWRITE, MEMTOREG, MEMWRITE, ISBJ, ISJAL, BREAKPOINT,
// ALUOP, ALUSRC, REGDST and EXTCTRL; the SIMD signals MREGWRITE, MMEMTOREG
// and MMEMWRITE that steer the lanes; and, for the hazard unit, which of rs
// and rt are read and whether each names a scalar or a vector register.
// Unknown encodings decode to a NOP. The SIMD opcode numbers are listed in
// mips_pkg and are this design's choice.
module control_unit
  import mips_pkg::*;
(
  input  word_t instr,
  output ctrl_t ctrl
);
  logic [5:0] op, fn;
  logic [4:0] rt;
  assign op = instr[31:26];
  assign fn = instr[5:0];
  assign rt = instr[20:16];

  always_comb begin
    ctrl = '0;
    ctrl.bjtype  = BJ_NONE;
    ctrl.aluop   = AOP_ADD;
    ctrl.regdst  = DST_RT;
    ctrl.extctrl = EXT_SIGN;
    unique case (op)
      OP_SPECIAL: begin
        unique case (fn)
          FN_SLL, FN_SRL, FN_SRA: begin
            ctrl.regwrite = 1'b1; ctrl.regdst = DST_RD; ctrl.aluop = AOP_RTYPE;
            ctrl.use_rt = 1'b1;
          end
          FN_ADDU, FN_SUBU, FN_AND, FN_OR, FN_XOR, FN_SLT, FN_SLTU: begin
            ctrl.regwrite = 1'b1; ctrl.regdst = DST_RD; ctrl.aluop = AOP_RTYPE;
            ctrl.use_rs = 1'b1; ctrl.use_rt = 1'b1;
          end
          FN_JR: begin
            ctrl.isbj = 1'b1; ctrl.bjtype = BJ_JR; ctrl.use_rs = 1'b1;
          end
          FN_BREAK: ctrl.breakpoint = 1'b1;
          default: ;
        endcase
      end
      OP_SPECIAL2: begin
        if (fn == FN2_MUL) begin
          ctrl.regwrite = 1'b1; ctrl.regdst = DST_RD; ctrl.aluop = AOP_MUL;
          ctrl.use_rs = 1'b1; ctrl.use_rt = 1'b1;
        end
      end
      OP_REGIMM: begin
        if (rt == RT_BLTZ || rt == RT_BGEZ) begin
          ctrl.isbj   = 1'b1;
          ctrl.bjtype = (rt == RT_BLTZ) ? BJ_BLTZ : BJ_BGEZ;
          ctrl.use_rs = 1'b1;
        end
      end
      OP_J:   begin ctrl.isbj = 1'b1; ctrl.bjtype = BJ_J; end
      OP_JAL: begin
        ctrl.isbj = 1'b1; ctrl.bjtype = BJ_J; ctrl.isjal = 1'b1;
        ctrl.regwrite = 1'b1; ctrl.regdst = DST_R31; ctrl.aluop = AOP_LINK;
      end
      OP_BEQ, OP_BNE: begin
        ctrl.isbj   = 1'b1;
        ctrl.bjtype = (op == OP_BEQ) ? BJ_BEQ : BJ_BNE;
        ctrl.use_rs = 1'b1; ctrl.use_rt = 1'b1;
      end
      OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI: begin
        ctrl.regwrite = 1'b1; ctrl.alusrc = 1'b1; ctrl.use_rs = 1'b1;
        unique case (op)
          OP_SLTI:  ctrl.aluop = AOP_SLT;
          OP_SLTIU: ctrl.aluop = AOP_SLTU;
          OP_ANDI:  begin ctrl.aluop = AOP_AND; ctrl.extctrl = EXT_ZERO; end
          OP_ORI:   begin ctrl.aluop = AOP_OR;  ctrl.extctrl = EXT_ZERO; end
          OP_XORI:  begin ctrl.aluop = AOP_XOR; ctrl.extctrl = EXT_ZERO; end
          default:  ctrl.aluop = AOP_ADD;
        endcase
      end
      OP_LUI: begin
        ctrl.regwrite = 1'b1; ctrl.alusrc = 1'b1; ctrl.aluop = AOP_LUI;
      end
      OP_LW: begin
        ctrl.regwrite = 1'b1; ctrl.memtoreg = 1'b1; ctrl.alusrc = 1'b1;
        ctrl.use_rs = 1'b1;
      end
      OP_SW: begin
        ctrl.memwrite = 1'b1; ctrl.alusrc = 1'b1;
        ctrl.use_rs = 1'b1; ctrl.use_rt = 1'b1;
      end
      // ------------------------------------------------------------ SIMD
      OP_MRTYPE: begin
        if (fn == FN_ADDU || fn == FN_AND || fn == FN_OR || fn == FN_XOR || fn == FN_MMUL) begin
          ctrl.mregwrite = 1'b1; ctrl.regdst = DST_RD; ctrl.aluop = AOP_RTYPE;
          ctrl.use_rs = 1'b1; ctrl.use_rt = 1'b1;
          ctrl.rs_vec = 1'b1; ctrl.rt_vec = 1'b1;
        end
      end
      OP_MADDIU, OP_MANDI, OP_MORI, OP_MXORI: begin
        ctrl.mregwrite = 1'b1; ctrl.alusrc = 1'b1;
        ctrl.use_rs = 1'b1; ctrl.rs_vec = 1'b1;
        unique case (op)
          OP_MANDI: begin ctrl.aluop = AOP_AND; ctrl.extctrl = EXT_ZERO; end
          OP_MORI:  begin ctrl.aluop = AOP_OR;  ctrl.extctrl = EXT_ZERO; end
          OP_MXORI: begin ctrl.aluop = AOP_XOR; ctrl.extctrl = EXT_ZERO; end
          default:  ctrl.aluop = AOP_ADD;
        endcase
      end
      OP_MLW: begin   // base register is scalar, destination is a vector register
        ctrl.mregwrite = 1'b1; ctrl.mmemtoreg = 1'b1; ctrl.alusrc = 1'b1;
        ctrl.use_rs = 1'b1;
      end
      OP_MSW: begin   // base register is scalar, stored data is a vector register
        ctrl.mmemwrite = 1'b1; ctrl.alusrc = 1'b1;
        ctrl.use_rs = 1'b1; ctrl.use_rt = 1'b1; ctrl.rt_vec = 1'b1;
      end
      default: ;
    endcase
  end
endmodule
