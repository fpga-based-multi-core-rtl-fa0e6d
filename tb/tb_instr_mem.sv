// tb_instr_mem: checks the one-cycle synchronous read, that the output holds
// while EN is low, and the reset value (a NOP).
// Clocked. The 32 x 1024 size follows the document; the read enable and
// NOP reset value are this design's.
`timescale 1ns / 1ps
module tb_instr_mem;
  import mips_pkg::*;
  localparam int DEPTH = 1024;
  logic clk = 0, rst_n = 0, en = 0;
  logic [9:0] addr = '0;
  word_t dout;
  word_t img [DEPTH];
  int checks = 0, failures = 0;
  instr_mem dut (.clk(clk), .rst_n(rst_n), .en(en), .addr(addr), .dout(dout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t held;
    for (int i = 0; i < DEPTH; i++) begin
      img[i] = $urandom;
      dut.mem[i] = img[i];
    end
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (dout !== NOP) begin failures++; $display("FAIL reset output %h", dout); end
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      en = ($urandom % 4) != 0;
      addr = 10'($urandom);
      held = dout;
      @(negedge clk);
      checks++;
      if (dout !== (en ? img[addr] : held)) begin
        failures++;
        $display("FAIL addr=%0d en=%b dout=%h", addr, en, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
