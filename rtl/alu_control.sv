// alu_control: ALU control unit of the execute stage.
//
// Combinational. Turns the 5-bit ALUOP from the main control unit and the
// 6-bit funct field into the execute-stage controls: SHEXTMODE and SHDIR for
// the shifter, SIGNEDCOMP for the comparator, FSEL for the ALU and MSEL for
// the multiplexer that picks the EX result. Besides the shifter, comparator
// and ALU named for MSEL, this design also routes the multiplier and the JAL
// link address through MSEL.
module alu_control
  import mips_pkg::*;
(
  input  aluop_e     aluop,
  input  logic [5:0] funct,
  output logic       shextmode,
  output logic       shdir,
  output logic       signedcomp,
  output fsel_e      fsel,
  output msel_e      msel
);
  always_comb begin
    shextmode  = 1'b0;
    shdir      = 1'b0;
    signedcomp = 1'b0;
    fsel       = FSEL_ADD;
    msel       = MSEL_ALU;
    unique case (aluop)
      AOP_RTYPE: begin
        unique case (funct)
          FN_SLL:  msel = MSEL_SHIFT;
          FN_SRL:  begin msel = MSEL_SHIFT; shdir = 1'b1; end
          FN_SRA:  begin msel = MSEL_SHIFT; shdir = 1'b1; shextmode = 1'b1; end
          FN_SUBU: fsel = FSEL_SUB;
          FN_AND:  fsel = FSEL_AND;
          FN_OR:   fsel = FSEL_OR;
          FN_XOR:  fsel = FSEL_XOR;
          FN_SLT:  begin msel = MSEL_COMP; signedcomp = 1'b1; end
          FN_SLTU: msel = MSEL_COMP;
          FN_MMUL: msel = MSEL_MUL;
          default: fsel = FSEL_ADD;   // ADDU and anything else
        endcase
      end
      AOP_ADD:  fsel = FSEL_ADD;
      AOP_AND:  fsel = FSEL_AND;
      AOP_OR:   fsel = FSEL_OR;
      AOP_XOR:  fsel = FSEL_XOR;
      AOP_SLT:  begin msel = MSEL_COMP; signedcomp = 1'b1; end
      AOP_SLTU: msel = MSEL_COMP;
      AOP_LUI:  fsel = FSEL_LUI;
      AOP_MUL:  msel = MSEL_MUL;
      AOP_LINK: msel = MSEL_LINK;
      default:  fsel = FSEL_ADD;
    endcase
  end
endmodule
