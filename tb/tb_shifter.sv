// tb_shifter: checks SLL, SRL and SRA for every shift amount against a
// bit-by-bit reference.
// Combinational. SLL, SRL and SRA are the shifts the document lists.
`timescale 1ns / 1ps
module tb_shifter;
  import mips_pkg::*;
  word_t d, y;
  logic [4:0] shamt;
  logic shdir, shextmode;
  int checks = 0, failures = 0;
  shifter dut (.d(d), .shamt(shamt), .shdir(shdir), .shextmode(shextmode), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_y(word_t x, int s, logic dir, logic ext);
    word_t r;
    for (int k = 0; k < 32; k++) begin
      if (!dir)           r[k] = (k - s >= 0) ? x[k - s] : 1'b0;
      else if (k + s < 32) r[k] = x[k + s];
      else                 r[k] = ext ? x[31] : 1'b0;
    end
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 2000; i++) begin
      d = $urandom;
      shamt = 5'(i);
      shdir = i[5];
      shextmode = i[6];
      #1;
      checks++;
      if (y !== ref_y(d, int'(shamt), shdir, shextmode)) begin
        failures++;
        $display("FAIL d=%h sh=%0d dir=%b ext=%b y=%h", d, shamt, shdir, shextmode, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
