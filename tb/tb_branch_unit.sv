// tb_branch_unit: checks the branch decision for every branch/jump kind on
// random, equal and sign-boundary operands.
// Combinational. The four branch conditions are those the document lists;
// the expected values are the MIPS definitions.
`timescale 1ns / 1ps
module tb_branch_unit;
  import mips_pkg::*;
  bj_e bjtype;
  word_t a, b;
  logic taken;
  int checks = 0, failures = 0;
  branch_unit dut (.bjtype(bjtype), .a(a), .b(b), .taken(taken));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    bj_e kinds [7] = '{BJ_NONE, BJ_BEQ, BJ_BNE, BJ_BLTZ, BJ_BGEZ, BJ_J, BJ_JR};
    for (int i = 0; i < 2100; i++) begin
      bjtype = kinds[i % 7];
      a = (i % 3 == 0) ? 32'h0 : ((i % 3 == 1) ? 32'h8000_0000 : $urandom);
      b = (i % 4 == 0) ? a : $urandom;
      #1;
      case (bjtype)
        BJ_BEQ:  e = (a == b);
        BJ_BNE:  e = (a != b);
        BJ_BLTZ: e = $signed(a) < 0;
        BJ_BGEZ: e = $signed(a) >= 0;
        BJ_J, BJ_JR: e = 1'b1;
        default: e = 1'b0;
      endcase
      checks++;
      if (taken !== e) begin
        failures++;
        $display("FAIL %s a=%h b=%h taken=%b", bjtype.name(), a, b, taken);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
