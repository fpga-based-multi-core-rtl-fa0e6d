// comparator: set-on-less-than unit of the execute stage (SLT, SLTU, SLTI,
// SLTIU).
//
// Combinational. LT is 1 when A < B and 0 otherwise; SIGNEDCOMP = 1 compares
// two's-complement values, 0 compares unsigned values. B is either rt or the
// sign-extended immediate (MIPS SLTIU also sign-extends, then compares
// unsigned). The execute stage widens LT to a 32-bit 0/1 result in its
// result multiplexer. The signed/unsigned control comes from the document's
// control table; the single-bit output is this design's choice.
module comparator
  import mips_pkg::*;
(
  input  word_t a,
  input  word_t b,
  input  logic  signedcomp,
  output logic  lt
);
  always_comb begin
    if (signedcomp) lt = $signed(a) < $signed(b);
    else            lt = a < b;
  end
endmodule
