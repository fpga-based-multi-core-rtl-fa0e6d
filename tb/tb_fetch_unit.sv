// tb_fetch_unit: checks reset to 0, sequential +4 advance, redirect to a
// target, and hold under stall.
// Clocked; checked just after each edge against a model of the PC. The
// reset value 0 is this design's choice.
`timescale 1ns / 1ps
module tb_fetch_unit;
  import mips_pkg::*;
  logic clk = 0, rst_n = 0, stall = 0, redirect = 0;
  word_t target = '0, pc, pc_plus4;
  int checks = 0, failures = 0;
  int n_stall = 0, n_redir = 0;
  fetch_unit dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t model;
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (pc !== 0) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst_n = 1;
    model = 0;
    for (int i = 0; i < 5000; i++) begin
      stall = ($urandom % 5) == 0;
      redirect = ($urandom % 4) == 0;
      target = $urandom & 32'hffff_fffc;
      checks++;
      if (pc_plus4 !== model + 4) begin failures++; $display("FAIL pc_plus4"); end
      @(negedge clk);
      if (stall) n_stall++;
      else if (redirect) begin model = target; n_redir++; end
      else model = model + 4;
      checks++;
      if (pc !== model) begin
        failures++;
        $display("FAIL pc=%h exp=%h", pc, model);
      end
    end
    checks++;
    if (n_stall == 0 || n_redir == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
