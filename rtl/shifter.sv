// shifter: constant-amount shift unit of the execute stage (SLL, SRL, SRA).
//
// Combinational. Shifts the rt operand D by SHAMT (instruction bits 10:6).
// SHDIR = 0 shifts left, 1 shifts right; SHEXTMODE = 1 fills a right shift
// with copies of the sign bit (arithmetic), 0 fills with zeros (logical).
// The two control names are those of the ALU control unit; the bit polarity
// is this design's choice.
module shifter
  import mips_pkg::*;
(
  input  word_t      d,
  input  logic [4:0] shamt,
  input  logic       shdir,
  input  logic       shextmode,
  output word_t      y
);
  always_comb begin
    if (!shdir)         y = d << shamt;
    else if (shextmode) y = word_t'($signed(d) >>> shamt);
    else                y = d >> shamt;
  end
endmodule
