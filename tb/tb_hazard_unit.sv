// tb_hazard_unit: random decode/EX/MEM situations, biased toward matching
// register numbers, compared with a reference that walks the two older
// instructions from youngest to oldest. Also checks the named cases of the
// forwarding and load-stall sequences and the breakpoint hold.
// Combinational. The forwarding and stall cases follow the document's
// hazard description; the branch-on-load stall is this design's.
`timescale 1ns / 1ps
module tb_hazard_unit;
  import mips_pkg::*;
  regidx_t id_rs, id_rt, ex_dest, mem_dest;
  logic id_use_rs, id_use_rt, id_rs_vec, id_rt_vec, id_needed_in_id, id_break, release_bp;
  logic ex_wr_s, ex_wr_v, ex_ld_s, ex_ld_v, mem_wr_s, mem_wr_v, mem_ld_s, mem_ld_v;
  fwd_e fwd_a, fwd_b;
  logic late_a, late_b, stall_data, stall_break, stall;
  int checks = 0, failures = 0;
  hazard_unit dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference for one operand: returns {stall, late, fwd}
  task automatic ref_op(input regidx_t r, input logic used, input logic vec,
                        output logic st, output logic lt, output fwd_e f);
    logic ex_writes, mem_writes, ex_loads, mem_loads;
    ex_writes  = vec ? ex_wr_v  : ex_wr_s;
    mem_writes = vec ? mem_wr_v : mem_wr_s;
    ex_loads   = vec ? ex_ld_v  : ex_ld_s;
    mem_loads  = vec ? mem_ld_v : mem_ld_s;
    st = 0; lt = 0; f = FWD_RF;
    if (!used || r == 0) return;
    // youngest older instruction first
    if (ex_writes && ex_dest == r) begin
      if (ex_loads) st = 1; else f = FWD_EX;
      return;
    end
    if (mem_writes && mem_dest == r) begin
      if (!mem_loads) f = FWD_MEM;
      else if (id_needed_in_id) st = 1;
      else lt = 1;
    end
  endtask

  function automatic regidx_t pick();
    return regidx_t'($urandom % 4);
  endfunction

  int n_ex = 0, n_mem = 0, n_late = 0, n_stall = 0;

  initial begin
    logic sa, la, sb, lb;
    fwd_e fa, fb;
    for (int i = 0; i < 20000; i++) begin
      id_rs = pick(); id_rt = pick(); ex_dest = pick(); mem_dest = pick();
      {id_use_rs, id_use_rt, id_rs_vec, id_rt_vec} = 4'($urandom);
      id_needed_in_id = ($urandom % 4) == 0;
      id_break = ($urandom % 8) == 0;
      release_bp = $urandom % 2;
      ex_wr_s = $urandom % 2; ex_wr_v = !ex_wr_s && ($urandom % 2);
      ex_ld_s = ex_wr_s && ($urandom % 2); ex_ld_v = ex_wr_v && ($urandom % 2);
      mem_wr_s = $urandom % 2; mem_wr_v = !mem_wr_s && ($urandom % 2);
      mem_ld_s = mem_wr_s && ($urandom % 2); mem_ld_v = mem_wr_v && ($urandom % 2);
      #1;
      ref_op(id_rs, id_use_rs, id_rs_vec, sa, la, fa);
      ref_op(id_rt, id_use_rt, id_rt_vec, sb, lb, fb);
      checks++;
      if (fwd_a !== fa || fwd_b !== fb || late_a !== la || late_b !== lb || stall_data !== (sa || sb) ||
          stall_break !== (id_break && !release_bp) || stall !== (sa || sb || (id_break && !release_bp))) begin
        failures++;
        if (failures < 10)
          $display("FAIL rs=%0d rt=%0d ex=%0d mem=%0d fwd=%s/%s late=%b%b stall=%b",
                   id_rs, id_rt, ex_dest, mem_dest, fwd_a.name(), fwd_b.name(), late_a, late_b, stall);
      end
      if (fwd_a == FWD_EX) n_ex++;
      if (fwd_a == FWD_MEM) n_mem++;
      if (late_a) n_late++;
      if (stall_data) n_stall++;
    end
    // named case: AND $12,$2,$5 in ID while SUBU $2 is in EX -> forward from EX
    id_rs = 2; id_rt = 5; id_use_rs = 1; id_use_rt = 1; id_rs_vec = 0; id_rt_vec = 0;
    id_needed_in_id = 0; id_break = 0; release_bp = 0;
    ex_dest = 2; ex_wr_s = 1; ex_wr_v = 0; ex_ld_s = 0; ex_ld_v = 0;
    mem_dest = 0; mem_wr_s = 0; mem_wr_v = 0; mem_ld_s = 0; mem_ld_v = 0;
    #1; checks++;
    if (fwd_a !== FWD_EX || fwd_b !== FWD_RF || stall) begin failures++; $display("FAIL EX forward case"); end
    // AND $5,$2,$4 in ID while LW $2 is in EX -> stall
    ex_ld_s = 1;
    #1; checks++;
    if (!stall || !stall_data) begin failures++; $display("FAIL load-use stall case"); end
    // one cycle later: LW in MEM -> late forward, no stall
    ex_wr_s = 0; ex_ld_s = 0; mem_dest = 2; mem_wr_s = 1; mem_ld_s = 1;
    #1; checks++;
    if (stall || !late_a) begin failures++; $display("FAIL late forward case"); end
    // a scalar load must not interlock a vector operand of the same number
    id_rs_vec = 1;
    #1; checks++;
    if (stall || late_a || fwd_a != FWD_RF) begin failures++; $display("FAIL register space separation"); end
    checks++;
    if (n_ex == 0 || n_mem == 0 || n_late == 0 || n_stall == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
