// tb_simd_lane: runs one SIMD lane the way the processor pipeline does.
//
// The testbench plays the role of the shared decoder and hazard logic: it
// issues a random stream of lane operations (add, and, or, xor, multiply,
// their immediate forms, loads and stores), keeps the control of the
// instructions in EX, MEM and WB itself, computes the forwarding selects,
// inserts a bubble after a load whose value is needed next, and drives the
// lane's ports stage by stage. A sequential model gives the value each
// instruction must write back; at the end every register and memory word is
// compared with the model. Forwarding from EX and MEM, load forwarding into
// EX and load-use bubbles must all occur.
// The lane contents follow the document; the stage-by-stage control
// interface being checked is this design's.
`timescale 1ns / 1ps
module tb_simd_lane;
  import mips_pkg::*;
  localparam int DEPTH = 1024;

  logic clk = 0, rst_n = 0;
  regidx_t id_rs, id_rt, wb_dest;
  fwd_e id_fwd_a, id_fwd_b;
  word_t id_imm, wb_data;
  fsel_e ex_fsel;
  msel_e ex_msel;
  logic ex_alusrc, ex_late_a, ex_late_b, mem_re, mem_we, wb_we, wb_memtoreg;
  logic [9:0] mem_addr;
  int checks = 0, failures = 0;

  simd_lane dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    bit      valid;
    int      kind;   // 0 addu 1 and 2 or 3 xor 4 mul 5 addi 6 andi 7 ori 8 xori 9 load 10 store
    regidx_t rs, rt, dest;
    word_t   imm;
    bit      wr, ld, st;
    int      addr;
    word_t   expv;
    fsel_e   fsel;
    msel_e   msel;
    bit      alusrc, late_a, late_b;
  } op_t;

  word_t mreg [32];
  word_t mmem [DEPTH];
  op_t s_id, s_ex, s_mem, s_wb, bubble;
  int n_ex = 0, n_mem = 0, n_late = 0, n_stall = 0, n_wb = 0;

  function automatic op_t gen();
    op_t o;
    o = bubble;
    o.valid = 1;
    o.kind = $urandom % 11;
    o.rs = regidx_t'($urandom % 6);
    o.rt = regidx_t'($urandom % 6);
    o.imm = (o.kind inside {6, 7, 8}) ? {16'h0, 16'($urandom)} : word_t'(int'($signed(16'($urandom))));
    o.alusrc = o.kind >= 5;
    o.wr = o.kind != 10;
    o.ld = o.kind == 9;
    o.st = o.kind == 10;
    o.dest = (o.kind <= 4) ? regidx_t'($urandom % 6) : o.rt;
    o.addr = $urandom % 16;
    o.msel = (o.kind == 4) ? MSEL_MUL : MSEL_ALU;
    case (o.kind)
      1, 6: o.fsel = FSEL_AND;
      2, 7: o.fsel = FSEL_OR;
      3, 8: o.fsel = FSEL_XOR;
      default: o.fsel = FSEL_ADD;
    endcase
    return o;
  endfunction

  function automatic logic uses_rt(op_t o); return o.kind <= 4 || o.kind == 10; endfunction
  function automatic logic uses_rs(op_t o); return o.kind <= 8; endfunction

  function automatic word_t m16(word_t a, word_t b);
    return word_t'(int'($signed(a[15:0])) * int'($signed(b[15:0])));
  endfunction

  task automatic model(inout op_t o);
    word_t a, b;
    a = mreg[o.rs];
    b = o.alusrc ? o.imm : mreg[o.rt];
    case (o.kind)
      0, 5: o.expv = a + b;
      1, 6: o.expv = a & b;
      2, 7: o.expv = a | b;
      3, 8: o.expv = a ^ b;
      4:    o.expv = m16(a, mreg[o.rt]);
      9:    o.expv = mmem[o.addr];
      default: o.expv = '0;
    endcase
    if (o.st) mmem[o.addr] = mreg[o.rt];
    if (o.wr && o.dest != 0) mreg[o.dest] = o.expv;
  endtask

  // hazard resolution for one source register
  task automatic resolve(input regidx_t r, input logic used, output fwd_e f, output logic late, output logic st);
    f = FWD_RF; late = 0; st = 0;
    if (!used || r == 0) return;
    if (s_ex.valid && s_ex.wr && s_ex.dest == r) begin
      if (s_ex.ld) st = 1; else f = FWD_EX;
    end else if (s_mem.valid && s_mem.wr && s_mem.dest == r) begin
      if (s_mem.ld) late = 1; else f = FWD_MEM;
    end
  endtask

  initial begin
    op_t c;
    logic sa, sb, pending;
    bubble = '{valid: 0, kind: 0, rs: 0, rt: 0, dest: 0, imm: 0, wr: 0, ld: 0, st: 0, addr: 0,
               expv: 0, fsel: FSEL_ADD, msel: MSEL_ALU, alusrc: 0, late_a: 0, late_b: 0};
    s_id = bubble; s_ex = bubble; s_mem = bubble; s_wb = bubble;
    for (int i = 0; i < 32; i++) mreg[i] = '0;
    for (int i = 0; i < DEPTH; i++) begin
      mmem[i] = $urandom;
      dut.u_dmem.mem[i] = mmem[i];
    end
    {id_rs, id_rt, wb_dest} = '0; id_fwd_a = FWD_RF; id_fwd_b = FWD_RF; id_imm = '0;
    ex_fsel = FSEL_ADD; ex_msel = MSEL_ALU; {ex_alusrc, ex_late_a, ex_late_b, mem_re, mem_we, wb_we, wb_memtoreg} = '0;
    mem_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    pending = 0;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      // advance the pipeline
      s_wb = s_mem; s_mem = s_ex; s_ex = s_id;
      if (!pending) c = (cyc < 5900) ? gen() : bubble;
      resolve(c.rs, c.valid && uses_rs(c), id_fwd_a, c.late_a, sa);
      resolve(c.rt, c.valid && uses_rt(c), id_fwd_b, c.late_b, sb);
      if (id_fwd_a == FWD_EX || id_fwd_b == FWD_EX) n_ex++;
      if (id_fwd_a == FWD_MEM || id_fwd_b == FWD_MEM) n_mem++;
      if (c.late_a || c.late_b) n_late++;
      id_rs = c.rs; id_rt = c.rt; id_imm = c.imm;
      if (sa || sb) begin
        n_stall++;
        pending = 1;
        s_id = bubble;
      end else begin
        pending = 0;
        if (c.valid) model(c);
        s_id = c;
      end
      ex_fsel = s_ex.fsel; ex_msel = s_ex.msel; ex_alusrc = s_ex.alusrc;
      ex_late_a = s_ex.late_a; ex_late_b = s_ex.late_b;
      mem_addr = 10'(s_mem.addr); mem_we = s_mem.valid && s_mem.st; mem_re = s_mem.valid && s_mem.ld;
      wb_we = s_wb.valid && s_wb.wr; wb_dest = s_wb.dest; wb_memtoreg = s_wb.ld;
      #1;
      if (s_wb.valid && s_wb.wr && s_wb.dest != 0) begin
        n_wb++;
        checks++;
        if (wb_data !== s_wb.expv) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d kind %0d dest %0d: wb %h expected %h", cyc, s_wb.kind, s_wb.dest, wb_data, s_wb.expv);
        end
      end
    end
    repeat (2) @(negedge clk);
    for (int r = 0; r < 32; r++) begin
      checks++;
      if (dut.u_rf.regs[r] !== mreg[r]) begin failures++; $display("FAIL final reg %0d", r); end
    end
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (dut.u_dmem.mem[i] !== mmem[i]) begin failures++; $display("FAIL final mem %0d", i); end
    end
    $display("ex=%0d mem=%0d late=%0d stall=%0d wb=%0d", n_ex, n_mem, n_late, n_stall, n_wb);
    checks++;
    if (n_ex == 0 || n_mem == 0 || n_late == 0 || n_stall == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
