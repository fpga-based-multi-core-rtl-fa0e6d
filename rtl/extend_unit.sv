// extend_unit: immediate extension logic of the decode stage.
//
// Combinational. Widens the 16-bit immediate of an I-type instruction to 32
// bits: EXTCTRL = EXT_SIGN copies bit 15 upward, EXT_ZERO fills with zeros.
// Which instructions zero-extend (the logical immediates) is decided by the
// control unit.
// The EXTCTRL sign/zero select follows the document's control table; the
// choice of which instructions zero-extend is the standard MIPS one.
module extend_unit
  import mips_pkg::*;
(
  input  logic [15:0] imm,
  input  ext_e        extctrl,
  output word_t       y
);
  assign y = (extctrl == EXT_SIGN) ? {{16{imm[15]}}, imm} : {16'h0000, imm};
endmodule
