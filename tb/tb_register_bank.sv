// tb_register_bank: random reads and writes against a shadow array; checks
// that register 0 stays zero, that a same-cycle read sees the value being
// written, and that reset clears every register.
// Clocked; checked just after each edge. 32 registers follow the document;
// write-through and reset clearing are this design's.
`timescale 1ns / 1ps
module tb_register_bank;
  import mips_pkg::*;
  logic clk = 0, rst_n = 0, we;
  regidx_t ra1, ra2, wa;
  word_t rd1, rd2, wd;
  int checks = 0, failures = 0;
  word_t shadow [32];
  register_bank dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t expect_rd(regidx_t ra);
    if (ra == 0) return '0;
    if (we && wa == ra) return wd;
    return shadow[ra];
  endfunction

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    for (int i = 0; i < 32; i++) shadow[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); ra2 = 5'(31 - i); #1;
      checks++;
      if (rd1 !== 0 || rd2 !== 0) begin failures++; $display("FAIL reset value r%0d", i); end
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      we  = ($urandom % 3) != 0;
      wa  = 5'($urandom);
      wd  = $urandom;
      ra1 = (i % 4 == 0) ? wa : 5'($urandom);
      ra2 = 5'($urandom);
      #1;
      checks++;
      if (rd1 !== expect_rd(ra1) || rd2 !== expect_rd(ra2)) begin
        failures++;
        $display("FAIL ra1=%0d rd1=%h ra2=%0d rd2=%h", ra1, rd1, ra2, rd2);
      end
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    @(negedge clk);
    we = 0;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); #1;
      checks++;
      if (rd1 !== 0) begin failures++; $display("FAIL reset clears r%0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
