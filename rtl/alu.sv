// alu: the arithmetic/logic unit of the execute stage.
//
// Combinational. FSEL picks one of: A+B, A-B, A&B, A|B, A^B, or B<<16 (load
// upper immediate). Add and subtract are the non-trapping (ADDU/SUBU) kind,
// so there is no overflow output. The same module is used in every SIMD lane.
// The set of functions follows the instruction list of the processor; the
// FSEL encoding and doing LUI here are this design's choices.
module alu
  import mips_pkg::*;
(
  input  word_t a,
  input  word_t b,
  input  fsel_e fsel,
  output word_t y
);
  always_comb begin
    unique case (fsel)
      FSEL_ADD: y = a + b;
      FSEL_SUB: y = a - b;
      FSEL_AND: y = a & b;
      FSEL_OR:  y = a | b;
      FSEL_XOR: y = a ^ b;
      FSEL_LUI: y = {b[15:0], 16'h0000};
      default:  y = a + b;
    endcase
  end
endmodule
