// tb_processor: end-to-end test of the SIMD MIPS processor at its default
// size (4 lanes, 1024-word memories).
//
// Each test loads a program into the instruction ROM and seeds the scalar
// and lane data memories, resets the processor, runs it until the program
// reaches its final self-loop and then compares every scalar register,
// every lane register and every data-memory word with an instruction-level
// reference model written here (sequential execution with one branch delay
// slot). Programs: the instruction sequences used to demonstrate the design
// (arithmetic, logic, memory, SIMD arithmetic/logic/memory, the forwarding
// and load-stall sequences), a directed branch/jump/call/breakpoint
// program, and random programs dense in register dependences. Some results
// are also checked against hand-computed values, and the load-use stall
// count and the cycle counts of a scalar sequence and its SIMD twin are
// checked. Each pipeline mechanism (both forwarding paths, load forwarding
// into EX, load-use and branch stalls, taken branches and jumps, breakpoint
// hold, SIMD writes, loads and stores) is counted and must occur.
// On every cycle the top-level ports are checked too: CURRENT_INSTR is the
// program word fetched at the previous PC_OUT, and both hold during a stall.
// The processor's only ports are clock, reset, RELEASE, PC_OUT and
// CURRENT_INSTR, so programs and data are written and results read through
// the hierarchy. The demonstration programs follow the document's examples;
// the random programs, reference model and checks are this testbench's own.
`timescale 1ns / 1ps
module tb_processor;
  import mips_pkg::*;
  import mips_asm_pkg::*;

  localparam int SIZE  = 4;
  localparam int IDEP  = 1024;
  localparam int DDEP  = 1024;
  localparam int NPROG = 1024;

  logic  clk = 1'b0;
  logic  rset = 1'b0;
  logic  release_bp = 1'b0;
  word_t pc_out, cur_instr;

  processor dut (
    .CLK(clk), .RSET(rset), .RELEASE(release_bp),
    .PC_OUT(pc_out), .CURRENT_INSTR(cur_instr)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- program
  word_t prog [NPROG];
  int    plen;
  word_t dm_init [DDEP];
  word_t vm_init [SIZE][DDEP];

  task automatic clear_prog();
    plen = 0;
    for (int i = 0; i < NPROG; i++) prog[i] = '0;
  endtask
  task automatic emit(input word_t w);
    prog[plen] = w;
    plen++;
  endtask
  // halt: branch to itself with a NOP in the delay slot
  int halt_idx;
  task automatic emit_halt();
    halt_idx = plen;
    emit(a_beq(0, 0, -1));
    emit(a_nop());
  endtask

  // -------------------------------------------------------- reference model
  word_t mR [32];
  word_t mV [SIZE][32];
  word_t mD [DDEP];
  word_t mVD [SIZE][DDEP];

  function automatic word_t sx16(logic [15:0] v); return {{16{v[15]}}, v}; endfunction
  function automatic word_t mul16(word_t a, word_t b);
    logic signed [31:0] p;
    p = $signed(a[15:0]) * $signed(b[15:0]);
    return word_t'(p);
  endfunction
  function automatic int widx(word_t addr); return int'(addr[11:2]) % DDEP; endfunction

  task automatic model_run();
    word_t pc, npc, nnpc, ins, simm, zimm, a;
    logic [5:0] op, fn;
    int rs, rt, rd, sa, steps;
    for (int i = 0; i < 32; i++) mR[i] = '0;
    for (int l = 0; l < SIZE; l++) for (int i = 0; i < 32; i++) mV[l][i] = '0;
    for (int i = 0; i < DDEP; i++) mD[i] = dm_init[i];
    for (int l = 0; l < SIZE; l++) for (int i = 0; i < DDEP; i++) mVD[l][i] = vm_init[l][i];
    pc = 0; npc = 4; steps = 0;
    while (pc != word_t'(halt_idx * 4) && steps < 100000) begin
      ins  = prog[pc[11:2]];
      op   = ins[31:26]; fn = ins[5:0];
      rs   = int'(ins[25:21]); rt = int'(ins[20:16]); rd = int'(ins[15:11]); sa = int'(ins[10:6]);
      simm = sx16(ins[15:0]); zimm = {16'h0, ins[15:0]};
      nnpc = npc + 4;
      case (op)
        OP_SPECIAL: case (fn)
          FN_SLL:  mR[rd] = mR[rt] << sa;
          FN_SRL:  mR[rd] = mR[rt] >> sa;
          FN_SRA:  mR[rd] = word_t'($signed(mR[rt]) >>> sa);
          FN_ADDU: mR[rd] = mR[rs] + mR[rt];
          FN_SUBU: mR[rd] = mR[rs] - mR[rt];
          FN_AND:  mR[rd] = mR[rs] & mR[rt];
          FN_OR:   mR[rd] = mR[rs] | mR[rt];
          FN_XOR:  mR[rd] = mR[rs] ^ mR[rt];
          FN_SLT:  mR[rd] = ($signed(mR[rs]) < $signed(mR[rt])) ? 1 : 0;
          FN_SLTU: mR[rd] = (mR[rs] < mR[rt]) ? 1 : 0;
          FN_JR:   nnpc = mR[rs];
          default: ;
        endcase
        OP_SPECIAL2: if (fn == FN2_MUL) mR[rd] = mul16(mR[rs], mR[rt]);
        OP_REGIMM: begin
          if (rt == 0 && mR[rs][31])  nnpc = npc + (simm << 2);
          if (rt == 1 && !mR[rs][31]) nnpc = npc + (simm << 2);
        end
        OP_J:   nnpc = {npc[31:28], ins[25:0], 2'b00};
        OP_JAL: begin nnpc = {npc[31:28], ins[25:0], 2'b00}; mR[31] = pc + 8; end
        OP_BEQ: if (mR[rs] == mR[rt]) nnpc = npc + (simm << 2);
        OP_BNE: if (mR[rs] != mR[rt]) nnpc = npc + (simm << 2);
        OP_ADDIU: mR[rt] = mR[rs] + simm;
        OP_SLTI:  mR[rt] = ($signed(mR[rs]) < $signed(simm)) ? 1 : 0;
        OP_SLTIU: mR[rt] = (mR[rs] < simm) ? 1 : 0;
        OP_ANDI:  mR[rt] = mR[rs] & zimm;
        OP_ORI:   mR[rt] = mR[rs] | zimm;
        OP_XORI:  mR[rt] = mR[rs] ^ zimm;
        OP_LUI:   mR[rt] = {ins[15:0], 16'h0};
        OP_LW:    mR[rt] = mD[widx(mR[rs] + simm)];
        OP_SW:    mD[widx(mR[rs] + simm)] = mR[rt];
        OP_MRTYPE: for (int l = 0; l < SIZE; l++) case (fn)
          FN_ADDU: mV[l][rd] = mV[l][rs] + mV[l][rt];
          FN_AND:  mV[l][rd] = mV[l][rs] & mV[l][rt];
          FN_OR:   mV[l][rd] = mV[l][rs] | mV[l][rt];
          FN_XOR:  mV[l][rd] = mV[l][rs] ^ mV[l][rt];
          FN_MMUL: mV[l][rd] = mul16(mV[l][rs], mV[l][rt]);
          default: ;
        endcase
        OP_MADDIU: for (int l = 0; l < SIZE; l++) mV[l][rt] = mV[l][rs] + simm;
        OP_MANDI:  for (int l = 0; l < SIZE; l++) mV[l][rt] = mV[l][rs] & zimm;
        OP_MORI:   for (int l = 0; l < SIZE; l++) mV[l][rt] = mV[l][rs] | zimm;
        OP_MXORI:  for (int l = 0; l < SIZE; l++) mV[l][rt] = mV[l][rs] ^ zimm;
        OP_MLW: begin a = mR[rs] + simm; for (int l = 0; l < SIZE; l++) mV[l][rt] = mVD[l][widx(a)]; end
        OP_MSW: begin a = mR[rs] + simm; for (int l = 0; l < SIZE; l++) mVD[l][widx(a)] = mV[l][rt]; end
        default: ;
      endcase
      mR[0] = '0;
      for (int l = 0; l < SIZE; l++) mV[l][0] = '0;
      pc = npc; npc = nnpc; steps++;
    end
    if (steps >= 100000) $display("model did not reach halt");
  endtask

  // --------------------------------------------- access to the lane memories
  event  load_ev, dump_ev;
  word_t dV  [SIZE][32];
  word_t dVD [SIZE][DDEP];

  for (genvar g = 0; g < SIZE; g++) begin : g_hook
    always @(load_ev) begin
      for (int k = 0; k < DDEP; k++) dut.g_lane[g].u_lane.u_dmem.mem[k] = vm_init[g][k];
    end
    always @(dump_ev) begin
      for (int k = 0; k < 32; k++)   dV[g][k]  = dut.g_lane[g].u_lane.u_rf.regs[k];
      for (int k = 0; k < DDEP; k++) dVD[g][k] = dut.g_lane[g].u_lane.u_dmem.mem[k];
    end
  end

  // ---------------------------------------------------- mechanism counters
  int n_fwd_ex, n_fwd_mem, n_late, n_stall_load, n_stall_branch, n_stall_break;
  int n_redirect, n_jal, n_jr, n_vwrite, n_vload, n_vstore, n_vfwd, n_mul, n_wt;
  bit counting = 0;

  always @(posedge clk) if (counting && rset) begin
    if (!dut.stall && (dut.fwd_a == FWD_EX  || dut.fwd_b == FWD_EX))  n_fwd_ex++;
    if (!dut.stall && (dut.fwd_a == FWD_MEM || dut.fwd_b == FWD_MEM)) n_fwd_mem++;
    if (!dut.stall && (dut.fwd_a != FWD_RF && dut.ctrl.rs_vec || dut.fwd_b != FWD_RF && dut.ctrl.rt_vec)) n_vfwd++;
    if (dut.idex_c.late_a || dut.idex_c.late_b) n_late++;
    if (dut.stall_data && !dut.ctrl.isbj) n_stall_load++;
    if (dut.stall_data && dut.ctrl.isbj)  n_stall_branch++;
    if (dut.stall_break) n_stall_break++;
    if (dut.redirect && !dut.stall) n_redirect++;
    if (dut.ctrl.isjal && !dut.stall) n_jal++;
    if (dut.ctrl.bjtype == BJ_JR && !dut.stall) n_jr++;
    if (dut.memwb_c.w.mregwrite) n_vwrite++;
    if (dut.memwb_c.w.mmemtoreg) n_vload++;
    if (dut.exmem_c.w.mmemwrite) n_vstore++;
    if (dut.msel == MSEL_MUL && (dut.idex_c.w.regwrite || dut.idex_c.w.mregwrite)) n_mul++;
    if (dut.wb_regwrite && dut.wb_dest != 0 && dut.wb_dest == dut.rs && dut.ctrl.use_rs && !dut.ctrl.rs_vec
        && dut.fwd_a == FWD_RF) n_wt++;
  end

  // top-level ports: CURRENT_INSTR must be the program word fetched at
  // PC_OUT one cycle earlier, and both must hold across a stall
  word_t prev_pc, prev_instr;
  bit    prev_stall, port_armed = 0;
  always @(negedge clk) begin
    if (counting && rset) begin
      if (port_armed) begin
        if (prev_stall)
          check(cur_instr == prev_instr && pc_out == prev_pc, "PC_OUT and CURRENT_INSTR hold during a stall");
        else
          check(cur_instr == prog[prev_pc[11:2]],
                $sformatf("CURRENT_INSTR %h is the word fetched at PC_OUT %h", cur_instr, prev_pc));
      end
      port_armed = 1;
    end else port_armed = 0;
    prev_pc = pc_out; prev_instr = cur_instr; prev_stall = dut.stall;
  end

  // breakpoint handling: hold RELEASE low for a few cycles, check the hold
  int bp_hold;
  word_t bp_pc;
  always @(posedge clk) begin
    release_bp <= 1'b0;
    if (rset && cur_instr == a_break()) begin
      if (bp_hold == 0) bp_pc = pc_out;
      else check(pc_out == bp_pc, "PC moved during breakpoint hold");
      bp_hold++;
      if (bp_hold >= 5) begin release_bp <= 1'b1; bp_hold = 0; end
    end else bp_hold = 0;
  end

  // ----------------------------------------------------------- run one test
  int last_cycles, last_stalls;

  task automatic run_test(input string name);
    longint t0;
    int stalls;
    // load memories
    for (int i = 0; i < IDEP; i++) dut.u_imem.mem[i] = (i < NPROG) ? prog[i] : '0;
    for (int i = 0; i < DDEP; i++) dut.u_dmem.mem[i] = dm_init[i];
    -> load_ev;
    #1;
    model_run();
    // reset
    @(negedge clk);
    rset = 1'b0;
    repeat (3) @(negedge clk);
    rset = 1'b1;
    counting = 1;
    t0 = cycle;
    stalls = 0;
    // run until the halt loop is in decode
    while (!(dut.ifid_pc == word_t'(halt_idx * 4) && cur_instr == a_beq(0, 0, -1)) && cycle - t0 < 100000) begin
      @(negedge clk);
      if (dut.stall_data) stalls++;
    end
    last_cycles = int'(cycle - t0);
    last_stalls = stalls;
    repeat (8) @(negedge clk);   // drain
    counting = 0;
    check(cycle - t0 < 100000, {name, ": reached halt"});
    -> dump_ev;
    #1;
    for (int r = 0; r < 32; r++)
      check(dut.u_rf.regs[r] == mR[r], $sformatf("%s: $%0d = %h, expected %h", name, r, dut.u_rf.regs[r], mR[r]));
    for (int l = 0; l < SIZE; l++) for (int r = 0; r < 32; r++)
      check(dV[l][r] == mV[l][r], $sformatf("%s: lane%0d $%0d = %h, expected %h", name, l, r, dV[l][r], mV[l][r]));
    for (int i = 0; i < DDEP; i++)
      check(dut.u_dmem.mem[i] == mD[i], $sformatf("%s: dmem[%0d] = %h, expected %h", name, i, dut.u_dmem.mem[i], mD[i]));
    for (int l = 0; l < SIZE; l++) for (int i = 0; i < DDEP; i++)
      check(dVD[l][i] == mVD[l][i], $sformatf("%s: lane%0d dmem[%0d] = %h, expected %h", name, l, i, dVD[l][i], mVD[l][i]));
  endtask

  task automatic seed_mems();
    for (int i = 0; i < DDEP; i++) dm_init[i] = $urandom;
    for (int l = 0; l < SIZE; l++) for (int i = 0; i < DDEP; i++) vm_init[l][i] = $urandom;
  endtask

  // ---------------------------------------------------------- random tests
  function automatic int rr(); return 1 + ($urandom % 6); endfunction

  task automatic gen_random(input int n);
    int k, r, off;
    clear_prog();
    // give registers non-trivial values first
    for (int i = 1; i <= 6; i++) emit(a_lui(i, $urandom));
    for (int i = 1; i <= 6; i++) emit(a_ori(i, i, $urandom));
    for (int i = 1; i <= 6; i++) emit(a_maddiu(i, 0, $urandom));
    k = 0;
    while (k < n) begin
      r = $urandom % 32;
      case (r)
        0:  emit(a_addu(rr(), rr(), rr()));
        1:  emit(a_subu(rr(), rr(), rr()));
        2:  emit(a_and(rr(), rr(), rr()));
        3:  emit(a_or(rr(), rr(), rr()));
        4:  emit(a_rr(FN_XOR, rr(), rr(), rr()));
        5:  emit(a_rr(FN_SLT, rr(), rr(), rr()));
        6:  emit(a_rr(FN_SLTU, rr(), rr(), rr()));
        7:  emit(a_sh(FN_SLL, rr(), rr(), $urandom % 32));
        8:  emit(a_sh(FN_SRL, rr(), rr(), $urandom % 32));
        9:  emit(a_sh(FN_SRA, rr(), rr(), $urandom % 32));
        10: emit(a_addiu(rr(), rr(), $urandom));
        11: emit(a_ri(OP_SLTI, rr(), rr(), $urandom));
        12: emit(a_ri(OP_SLTIU, rr(), rr(), $urandom));
        13: emit(a_andi(rr(), rr(), $urandom));
        14: emit(a_ori(rr(), rr(), $urandom));
        15: emit(a_xori(rr(), rr(), $urandom));
        16: emit(a_lui(rr(), $urandom));
        17: emit(a_mul(rr(), rr(), rr()));
        18, 19: emit(a_lw(rr(), 4 * ($urandom % 64), ($urandom % 2) ? 0 : rr()));
        20: emit(a_sw(rr(), 4 * ($urandom % 64), ($urandom % 2) ? 0 : rr()));
        21: emit(a_maddu(rr(), rr(), rr()));
        22: emit(a_mmul(rr(), rr(), rr()));
        23: emit(a_vrr(FN_AND + 6'($urandom % 3), rr(), rr(), rr()));
        24: emit(a_maddiu(rr(), rr(), $urandom));
        25: emit(enc_i(($urandom % 2) ? OP_MANDI : (($urandom % 2) ? OP_MORI : OP_MXORI), rr(), rr(), $urandom));
        26: emit(a_mlw(rr(), 4 * ($urandom % 64), ($urandom % 2) ? 0 : rr()));
        27: emit(a_msw(rr(), 4 * ($urandom % 64), ($urandom % 2) ? 0 : rr()));
        28, 29: begin  // forward conditional branch, non-branch delay slot
          off = 1 + $urandom % 3;
          case ($urandom % 4)
            0: emit(a_beq(rr(), rr(), off));
            1: emit(a_bne(rr(), rr(), off));
            2: emit(a_bltz(rr(), off));
            default: emit(a_bgez(rr(), off));
          endcase
          emit(a_addiu(rr(), rr(), $urandom));
          for (int j = 0; j < off; j++) emit(a_addu(rr(), rr(), rr()));
          k += off + 1;
        end
        30: emit(a_mlw(rr(), 4 * ($urandom % 64), 0));
        default: emit(a_lw(rr(), 4 * ($urandom % 8), 0));
      endcase
      k++;
    end
    // a breakpoint now and then
    if ($urandom % 2) emit(a_break());
    emit_halt();
  endtask

  // ------------------------------------------------------------------ main
  int c_scalar, c_simd;
  initial begin
    n_fwd_ex = 0; n_fwd_mem = 0; n_late = 0; n_stall_load = 0; n_stall_branch = 0;
    n_stall_break = 0; n_redirect = 0; n_jal = 0; n_jr = 0; n_vwrite = 0; n_vload = 0;
    n_vstore = 0; n_vfwd = 0; n_mul = 0; n_wt = 0; bp_hold = 0;
    for (int i = 0; i < DDEP; i++) dm_init[i] = '0;
    for (int l = 0; l < SIZE; l++) for (int i = 0; i < DDEP; i++) vm_init[l][i] = '0;
    repeat (2) @(posedge clk);

    // 1. arithmetic SISD sequence (ADDIU, ADDIU, SUBU, ADDU, MUL)
    seed_mems();
    clear_prog();
    emit(a_addiu(1, 0, 25)); emit(a_addiu(2, 0, 10));
    emit(a_subu(7, 1, 2)); emit(a_addu(8, 1, 2)); emit(a_mul(9, 1, 2));
    emit_halt();
    run_test("arith_sisd");
    c_scalar = last_cycles;
    check(dut.u_rf.regs[7] == 15 && dut.u_rf.regs[8] == 35 && dut.u_rf.regs[9] == 250, "arith_sisd hand values");

    // 2. arithmetic SIMD sequence (MADDIU, MADDIU, MMUL, MADDU)
    clear_prog();
    emit(a_maddiu(1, 0, 25)); emit(a_maddiu(2, 0, -3));
    emit(a_mmul(3, 1, 2)); emit(a_maddu(9, 1, 2)); emit(a_nop());
    emit_halt();
    run_test("arith_simd");
    c_simd = last_cycles;
    check(dV[0][3] == -75 && dV[3][3] == -75 && dV[2][9] == 22, "arith_simd hand values");
    check(c_scalar == c_simd, $sformatf("SIMD sequence takes as many cycles as the scalar one (%0d vs %0d)", c_simd, c_scalar));

    // 3. logic SISD sequence
    clear_prog();
    emit(a_ori(23, 0, 2)); emit(a_xori(24, 0, 3)); emit(a_and(25, 23, 24)); emit(a_andi(22, 23, 3));
    emit_halt();
    run_test("logic_sisd");
    check(dut.u_rf.regs[23] == 2 && dut.u_rf.regs[24] == 3 && dut.u_rf.regs[25] == 2 && dut.u_rf.regs[22] == 2,
          "logic_sisd hand values");

    // 4. logic SIMD sequence
    clear_prog();
    emit(a_maddiu(1, 0, 16'h0ff0)); emit(a_mandi(5, 1, 16'h00ff)); emit(a_mori(6, 0, 16'h1234));
    emit(a_mxori(7, 6, 16'h00ff)); emit(a_vrr(FN_OR, 8, 5, 7)); emit(a_vrr(FN_XOR, 10, 1, 6));
    emit_halt();
    run_test("logic_simd");
    check(dV[1][5] == 32'h00f0 && dV[2][6] == 32'h1234 && dV[3][7] == 32'h12cb, "logic_simd hand values");

    // 5. memory SISD sequence: ORI $1,$0,1; LW $4,0($0); SW $1,4($0)
    dm_init[0] = 32'h8888_8888;
    clear_prog();
    emit(a_ori(1, 0, 1)); emit(a_lw(4, 0, 0)); emit(a_sw(1, 4, 0));
    emit_halt();
    run_test("mem_sisd");
    check(dut.u_rf.regs[4] == 32'h8888_8888 && dut.u_dmem.mem[1] == 1, "mem_sisd hand values");

    // 6. memory SIMD sequence: MLW $1,4($0); MLW $2,8($0); MADDU $3; MSW $3,0($0)
    clear_prog();
    emit(a_mlw(1, 4, 0)); emit(a_mlw(2, 8, 0)); emit(a_maddu(3, 1, 2)); emit(a_msw(3, 0, 0));
    emit_halt();
    run_test("mem_simd");
    for (int l = 0; l < SIZE; l++)
      check(dVD[l][0] == vm_init[l][1] + vm_init[l][2], $sformatf("mem_simd lane %0d hand value", l));

    // 7. forwarding sequence
    clear_prog();
    emit(a_addiu(1, 0, 100)); emit(a_addiu(3, 0, 58)); emit(a_addiu(5, 0, 16'h00ff));
    emit(a_addiu(6, 0, 16'h0100)); emit(a_nop()); emit(a_nop()); emit(a_nop());
    emit(a_subu(2, 1, 3)); emit(a_and(12, 2, 5)); emit(a_or(13, 6, 2)); emit(a_addu(14, 2, 2));
    emit_halt();
    run_test("forwarding");
    check(dut.u_rf.regs[2] == 42 && dut.u_rf.regs[12] == 42 && dut.u_rf.regs[13] == 32'h12a
          && dut.u_rf.regs[14] == 84, "forwarding hand values");
    check(last_stalls == 0, "forwarding sequence needs no stall");

    // 8. load stall sequence
    dm_init[3] = 32'd1000;
    clear_prog();
    emit(a_addiu(3, 0, 12)); emit(a_addiu(4, 0, 16'h0ff0)); emit(a_addiu(8, 0, 1));
    emit(a_nop()); emit(a_nop()); emit(a_nop());
    emit(a_lw(2, 0, 3)); emit(a_and(5, 2, 4)); emit(a_subu(7, 2, 8)); emit(a_or(9, 2, 7));
    emit_halt();
    run_test("load_stall");
    check(dut.u_rf.regs[5] == (32'd1000 & 32'h0ff0) && dut.u_rf.regs[7] == 999 && dut.u_rf.regs[9] == (32'd1000 | 32'd999),
          "load_stall hand values");
    check(last_stalls == 1, $sformatf("load-use costs one stall cycle (saw %0d)", last_stalls));

    // 9. branches, jumps, call/return, breakpoint
    dm_init[0] = 32'h8000_0000;
    clear_prog();
    emit(a_addiu(1, 0, 5));        // 0
    emit(a_addu(2, 0, 0));         // 1
    emit(a_addu(2, 2, 1));         // 2  L:
    emit(a_addiu(1, 1, -1));       // 3
    emit(a_bne(1, 0, -3));         // 4  -> L
    emit(a_addiu(3, 3, 1));        // 5  delay slot
    emit(a_jal(20));               // 6  -> SUB
    emit(a_addiu(4, 0, 7));        // 7  delay slot
    emit(a_lw(6, 0, 0));           // 8
    emit(a_bltz(6, 2));            // 9  branch on a just-loaded value -> 12
    emit(a_addiu(7, 0, 1));        // 10 delay slot
    emit(a_addiu(7, 0, 99));       // 11 skipped
    emit(a_bgez(6, 2));            // 12 not taken
    emit(a_addiu(8, 0, 2));        // 13
    emit(a_break());               // 14
    emit(a_j(18));                 // 15
    emit(a_addiu(9, 0, 3));        // 16 delay slot
    emit(a_addiu(9, 0, 77));       // 17 skipped
    emit_halt();                   // 18, 19
    emit(a_addiu(10, 31, 0));      // 20 SUB:
    emit(a_jr(31));                // 21
    emit(a_addiu(11, 0, 4));       // 22 delay slot
    run_test("branches");
    check(dut.u_rf.regs[2] == 15 && dut.u_rf.regs[3] == 5 && dut.u_rf.regs[10] == 32 && dut.u_rf.regs[7] == 1
          && dut.u_rf.regs[9] == 3 && dut.u_rf.regs[11] == 4 && dut.u_rf.regs[8] == 2, "branches hand values");

    // 10. random programs
    for (int t = 0; t < 40; t++) begin
      seed_mems();
      gen_random(150);
      run_test($sformatf("random%0d", t));
    end

    // mechanisms
    $display("fwd_ex=%0d fwd_mem=%0d wb_writethrough=%0d late_load=%0d stall_load=%0d stall_branch=%0d stall_break=%0d",
             n_fwd_ex, n_fwd_mem, n_wt, n_late, n_stall_load, n_stall_branch, n_stall_break);
    $display("redirect=%0d jal=%0d jr=%0d simd_fwd=%0d simd_write=%0d simd_load=%0d simd_store=%0d mul=%0d",
             n_redirect, n_jal, n_jr, n_vfwd, n_vwrite, n_vload, n_vstore, n_mul);
    check(n_fwd_ex > 0, "forward from EX happened");
    check(n_fwd_mem > 0, "forward from MEM happened");
    check(n_wt > 0, "write-through from WB happened");
    check(n_late > 0, "load data forwarded into EX");
    check(n_stall_load > 0, "load-use stall happened");
    check(n_stall_branch > 0, "branch-on-load stall happened");
    check(n_stall_break > 0, "breakpoint hold happened");
    check(n_redirect > 0, "taken branch/jump happened");
    check(n_jal > 0, "JAL happened");
    check(n_jr > 0, "JR happened");
    check(n_vfwd > 0, "SIMD forwarding happened");
    check(n_vwrite > 0, "SIMD register write happened");
    check(n_vload > 0, "SIMD load happened");
    check(n_vstore > 0, "SIMD store happened");
    check(n_mul > 0, "multiplication happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
