// tb_extend_unit: checks sign and zero extension of the 16-bit immediate.
// Combinational. The sign/zero select follows the document's EXTCTRL.
`timescale 1ns / 1ps
module tb_extend_unit;
  import mips_pkg::*;
  logic [15:0] imm;
  ext_e extctrl;
  word_t y;
  int checks = 0, failures = 0;
  extend_unit dut (.imm(imm), .extctrl(extctrl), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t e;
    for (int i = 0; i < 2000; i++) begin
      imm = (i < 4) ? 16'h8000 - 16'(i % 2) : 16'($urandom);
      extctrl = i[0] ? EXT_SIGN : EXT_ZERO;
      #1;
      e = (extctrl == EXT_SIGN) ? word_t'(int'($signed(imm))) : word_t'(int'(imm));
      checks++;
      if (y !== e) begin
        failures++;
        $display("FAIL imm=%h ext=%b y=%h", imm, extctrl, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
