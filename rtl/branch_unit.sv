// branch_unit: branch condition logic of the decode stage.
//
// Combinational. A and B are the rs and rt values after the decode-stage
// forwarding multiplexers. TAKEN is set for BEQ when A == B, for BNE when
// A != B, for BLTZ when A < 0, for BGEZ when A >= 0, and always for the
// jumps (J, JAL, JR), so the next-PC logic needs only ISBJ and TAKEN.
// The four branch conditions and their place in decode, fed by the
// forwarding multiplexers, follow the document; folding the jumps into
// TAKEN is this design's choice.
module branch_unit
  import mips_pkg::*;
(
  input  bj_e   bjtype,
  input  word_t a,
  input  word_t b,
  output logic  taken
);
  always_comb begin
    unique case (bjtype)
      BJ_BEQ:  taken = (a == b);
      BJ_BNE:  taken = (a != b);
      BJ_BLTZ: taken = a[31];
      BJ_BGEZ: taken = !a[31];
      BJ_J,
      BJ_JR:   taken = 1'b1;
      default: taken = 1'b0;
    endcase
  end
endmodule
