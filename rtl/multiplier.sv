// multiplier: signed 16 x 16 -> 32 multiplier of the execute stage (MUL and,
// in every SIMD lane, MMUL).
//
// Combinational. Only the 16 least significant bits of each operand are used,
// read as two's-complement numbers; the full 32-bit product is returned, so
// the result never overflows. The original used a vendor multiplier core; its
// pipeline latency is not known, so this one has none and the product is
// ready in the same EX cycle.
module multiplier
  import mips_pkg::*;
(
  input  word_t a,
  input  word_t b,
  output word_t y
);
  logic signed [15:0] a16, b16;
  assign a16 = a[15:0];
  assign b16 = b[15:0];
  assign y   = word_t'(a16 * b16);
endmodule
