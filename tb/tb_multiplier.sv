// tb_multiplier: checks the signed 16 x 16 product of the operands' low
// halves, including the extreme values, with random upper halves that must
// be ignored.
// Combinational. The 16 x 16 -> 32 signed product follows the document.
`timescale 1ns / 1ps
module tb_multiplier;
  import mips_pkg::*;
  word_t a, b, y;
  int checks = 0, failures = 0;
  multiplier dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, z;
    int edge_v [5] = '{-32768, 32767, -1, 0, 1};
    for (int i = 0; i < 3000; i++) begin
      x = (i < 25) ? edge_v[i % 5] : int'($signed(16'($urandom)));
      z = (i < 25) ? edge_v[i / 5] : int'($signed(16'($urandom)));
      a = {16'($urandom), 16'(x)};
      b = {16'($urandom), 16'(z)};
      #1;
      checks++;
      if (y !== word_t'(x * z)) begin
        failures++;
        $display("FAIL a=%h b=%h y=%h exp=%h", a, b, y, word_t'(x * z));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
