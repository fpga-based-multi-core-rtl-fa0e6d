// tb_comparator: checks signed and unsigned less-than on random and
// sign-boundary operands.
// Combinational. The expected result is computed with 64-bit arithmetic;
// the signed/unsigned select follows the document's SIGNEDCOMP.
`timescale 1ns / 1ps
module tb_comparator;
  import mips_pkg::*;
  word_t a, b;
  logic  y;
  logic signedcomp;
  int checks = 0, failures = 0;
  comparator dut (.a(a), .b(b), .signedcomp(signedcomp), .lt(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sa, sb;
    logic exp_lt;
    for (int i = 0; i < 3000; i++) begin
      a = (i % 5 == 0) ? 32'h8000_0000 + (i % 3) : $urandom;
      b = (i % 7 == 0) ? a : ((i % 3 == 0) ? 32'h7fff_ffff : $urandom);
      signedcomp = i[0];
      #1;
      sa = signedcomp ? longint'($signed(a)) : longint'({32'b0, a});
      sb = signedcomp ? longint'($signed(b)) : longint'({32'b0, b});
      exp_lt = sa < sb;
      checks++;
      if (y !== exp_lt) begin
        failures++;
        $display("FAIL a=%h b=%h s=%b y=%h", a, b, signedcomp, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
