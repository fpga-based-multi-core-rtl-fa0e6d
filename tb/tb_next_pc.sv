// tb_next_pc: checks branch, jump and jump-register targets and the
// redirect request.
// Combinational. The targets are the standard MIPS ones with a delay slot,
// which the document describes but does not spell out.
`timescale 1ns / 1ps
module tb_next_pc;
  import mips_pkg::*;
  logic isbj, taken, redirect;
  bj_e bjtype;
  word_t pc_id, instr, rs_val, target;
  int checks = 0, failures = 0;
  next_pc dut (.isbj(isbj), .bjtype(bjtype), .taken(taken), .pc_id(pc_id), .instr(instr),
               .rs_val(rs_val), .redirect(redirect), .target(target));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t e;
    int off;
    bj_e kinds [6] = '{BJ_BEQ, BJ_BNE, BJ_BLTZ, BJ_BGEZ, BJ_J, BJ_JR};
    for (int i = 0; i < 2000; i++) begin
      isbj = (i % 5 != 0);
      taken = (i % 3 != 0);
      bjtype = kinds[i % 6];
      pc_id = {$urandom} & 32'hffff_fffc;
      instr = $urandom;
      rs_val = $urandom;
      #1;
      off = int'($signed(instr[15:0]));
      case (bjtype)
        BJ_J:    e = ((pc_id + 4) & 32'hf000_0000) | ({6'b0, instr[25:0]} * 4);
        BJ_JR:   e = rs_val;
        default: e = word_t'(longint'(pc_id) + 4 + 4 * off);
      endcase
      checks++;
      if (redirect !== (isbj && taken)) begin
        failures++;
        $display("FAIL redirect isbj=%b taken=%b", isbj, taken);
      end
      checks++;
      if (target !== e) begin
        failures++;
        $display("FAIL %s pc=%h instr=%h target=%h exp=%h", bjtype.name(), pc_id, instr, target, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
