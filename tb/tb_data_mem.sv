// tb_data_mem: random reads and writes against a shadow array; checks the
// one-cycle read latency, read-first behaviour on a write, and that the
// output holds its last value while the read enable is low.
// Clocked; one access per cycle, checked just after the edge. The size
// follows the document; read-first and the output hold are this design's.
`timescale 1ns / 1ps
module tb_data_mem;
  import mips_pkg::*;
  localparam int DEPTH = 1024;
  logic clk = 0, we = 0, re = 0;
  logic [9:0] addr = '0;
  word_t din = '0, dout;
  word_t shadow [DEPTH];
  int checks = 0, failures = 0;
  data_mem dut (.clk(clk), .re(re), .we(we), .addr(addr), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t e, last;
    for (int i = 0; i < DEPTH; i++) begin
      shadow[i] = $urandom;
      dut.mem[i] = shadow[i];
    end
    @(negedge clk);
    re = 1; addr = '0;
    @(posedge clk);
    #1 last = dout;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      we   = ($urandom % 2) != 0;
      re   = ($urandom % 4) != 0;
      addr = (i % 3 == 0) ? 10'($urandom % 8) : 10'($urandom);
      din  = $urandom;
      e    = re ? shadow[addr] : last;
      @(posedge clk);
      if (we) shadow[addr] = din;
      #1 last = e;
      checks++;
      if (dout !== e) begin
        failures++;
        $display("FAIL addr=%0d re=%b we=%b dout=%h exp=%h", addr, re, we, dout, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
