// tb_alu_control: checks the execute-stage controls for each ALUOP and, for
// register-type ALUOP, each funct code the processor uses.
// Combinational. The control names follow the document's ALU control table;
// the expected codes are this design's encodings.
`timescale 1ns / 1ps
module tb_alu_control;
  import mips_pkg::*;
  aluop_e aluop;
  logic [5:0] funct;
  logic shextmode, shdir, signedcomp;
  fsel_e fsel;
  msel_e msel;
  int checks = 0, failures = 0;
  alu_control dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected {shextmode, shdir, signedcomp, fsel, msel}
  task automatic expect_out(string what, logic ex, logic dir, logic sc, fsel_e f, msel_e m);
    #1;
    checks++;
    // shifter controls matter only for the shifter, comparator sign only for the comparator,
    // and FSEL only when the ALU result is selected
    if (msel !== m || (m == MSEL_SHIFT && (shextmode !== ex || shdir !== dir)) ||
        (m == MSEL_COMP && signedcomp !== sc) || (m == MSEL_ALU && fsel !== f)) begin
      failures++;
      $display("FAIL %s: ex=%b dir=%b sc=%b fsel=%s msel=%s", what, shextmode, shdir, signedcomp, fsel.name(), msel.name());
    end
  endtask

  initial begin
    for (int t = 0; t < 20; t++) begin
      aluop = AOP_RTYPE;
      funct = FN_ADDU; expect_out("ADDU", 0, 0, 0, FSEL_ADD, MSEL_ALU);
      funct = FN_SUBU; expect_out("SUBU", 0, 0, 0, FSEL_SUB, MSEL_ALU);
      funct = FN_AND;  expect_out("AND",  0, 0, 0, FSEL_AND, MSEL_ALU);
      funct = FN_OR;   expect_out("OR",   0, 0, 0, FSEL_OR,  MSEL_ALU);
      funct = FN_XOR;  expect_out("XOR",  0, 0, 0, FSEL_XOR, MSEL_ALU);
      funct = FN_SLT;  expect_out("SLT",  0, 0, 1, FSEL_ADD, MSEL_COMP);
      funct = FN_SLTU; expect_out("SLTU", 0, 0, 0, FSEL_ADD, MSEL_COMP);
      funct = FN_SLL;  expect_out("SLL",  0, 0, 0, FSEL_ADD, MSEL_SHIFT);
      funct = FN_SRL;  expect_out("SRL",  0, 1, 0, FSEL_ADD, MSEL_SHIFT);
      funct = FN_SRA;  expect_out("SRA",  1, 1, 0, FSEL_ADD, MSEL_SHIFT);
      funct = FN_MMUL; expect_out("MMUL", 0, 0, 0, FSEL_ADD, MSEL_MUL);
      funct = 6'($urandom);
      aluop = AOP_ADD;  expect_out("AOP_ADD", 0, 0, 0, FSEL_ADD, MSEL_ALU);
      aluop = AOP_AND;  expect_out("AOP_AND", 0, 0, 0, FSEL_AND, MSEL_ALU);
      aluop = AOP_OR;   expect_out("AOP_OR",  0, 0, 0, FSEL_OR,  MSEL_ALU);
      aluop = AOP_XOR;  expect_out("AOP_XOR", 0, 0, 0, FSEL_XOR, MSEL_ALU);
      aluop = AOP_SLT;  expect_out("AOP_SLT", 0, 0, 1, FSEL_ADD, MSEL_COMP);
      aluop = AOP_SLTU; expect_out("AOP_SLTU", 0, 0, 0, FSEL_ADD, MSEL_COMP);
      aluop = AOP_LUI;  expect_out("AOP_LUI", 0, 0, 0, FSEL_LUI, MSEL_ALU);
      aluop = AOP_MUL;  expect_out("AOP_MUL", 0, 0, 0, FSEL_ADD, MSEL_MUL);
      aluop = AOP_LINK; expect_out("AOP_LINK", 0, 0, 0, FSEL_ADD, MSEL_LINK);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
