// tb_processor_lanes: runs the processor with a different number of SIMD
// lanes (SIZE = 8 and SIZE = 1) and loads its program and data from files.
//
// Both instances read the same program from tb/lanes_prog.hex through
// IMEM_INIT and the same data from tb/lanes_data.hex through DMEM_INIT (the
// data file fills the scalar memory and every lane memory). Before reset is
// released the testbench overwrites word 0 of each lane memory with a
// lane-specific value v. The program is
//   MLW $1,0($0); LW $4,0($0); MADDIU $2,$1,5; MMUL $3,$2,$2; MSW $3,4($0)
// followed by a jump-to-self, so every lane ends with (v+5)^2 in lane
// register 3 and in word 1 of its memory, and scalar $4 holds the file's
// word 0. The testbench first checks that the file holds exactly the words
// the assembler functions produce, then checks every lane of both
// instances, and finally that the two instances fetched the same address on
// every cycle: the lane count changes the width of the machine, not its
// timing.
// Adjustable lane count follows the document; the sizes 8 and 1 and the
// program are this testbench's own.
`timescale 1ns / 1ps
module tb_processor_lanes;
  import mips_pkg::*;
  import mips_asm_pkg::*;

  localparam int WIDE   = 8;
  localparam int NARROW = 1;

  logic  clk = 1'b0;
  logic  rset = 1'b0;
  word_t pc_w, pc_n, instr_w, instr_n;
  int    checks = 0, failures = 0;

  processor #(.SIZE(WIDE), .IMEM_INIT("tb/lanes_prog.hex"), .DMEM_INIT("tb/lanes_data.hex")) dut_w (
    .CLK(clk), .RSET(rset), .RELEASE(1'b1), .PC_OUT(pc_w), .CURRENT_INSTR(instr_w)
  );
  processor #(.SIZE(NARROW), .IMEM_INIT("tb/lanes_prog.hex"), .DMEM_INIT("tb/lanes_data.hex")) dut_n (
    .CLK(clk), .RSET(rset), .RELEASE(1'b1), .PC_OUT(pc_n), .CURRENT_INSTR(instr_n)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int lane_value(int lane);
    return lane * 3 - 4;
  endfunction

  function automatic word_t expected(int lane);
    int v = lane_value(lane) + 5;
    return word_t'(v * v);
  endfunction

  // lane-specific data, written after the files are read and before reset ends
  for (genvar i = 0; i < WIDE; i++) begin : g_seed_w
    initial begin
      #2 dut_w.g_lane[i].u_lane.u_dmem.mem[0] = word_t'(lane_value(i));
    end
  end
  for (genvar i = 0; i < NARROW; i++) begin : g_seed_n
    initial begin
      #2 dut_n.g_lane[i].u_lane.u_dmem.mem[0] = word_t'(lane_value(i));
    end
  end

  // final results, read from every lane of both instances
  word_t res_w [WIDE], mem_w [WIDE], res_n [NARROW], mem_n [NARROW];
  for (genvar i = 0; i < WIDE; i++) begin : g_peek_w
    assign res_w[i] = dut_w.g_lane[i].u_lane.u_rf.regs[3];
    assign mem_w[i] = dut_w.g_lane[i].u_lane.u_dmem.mem[1];
  end
  for (genvar i = 0; i < NARROW; i++) begin : g_peek_n
    assign res_n[i] = dut_n.g_lane[i].u_lane.u_rf.regs[3];
    assign mem_n[i] = dut_n.g_lane[i].u_lane.u_dmem.mem[1];
  end

  int pc_mismatch = 0;
  always @(posedge clk) if (rset && pc_w !== pc_n) pc_mismatch++;

  initial begin
    word_t prog [7];
    prog = '{a_mlw(1, 0, 0), a_lw(4, 0, 0), a_maddiu(2, 1, 5), a_mmul(3, 2, 2),
             a_msw(3, 4, 0), a_j(5), a_nop()};
    #1;
    for (int i = 0; i < 7; i++)
      check(dut_w.u_imem.mem[i] == prog[i] && dut_n.u_imem.mem[i] == prog[i],
            $sformatf("program word %0d read from file", i));

    repeat (3) @(posedge clk);
    @(negedge clk) rset = 1'b1;
    repeat (30) @(posedge clk);
    #1;

    check(pc_w == 32'd20 || pc_w == 32'd24, $sformatf("program reached its final loop (pc %h)", pc_w));
    check(pc_mismatch == 0, $sformatf("both sizes fetch the same address every cycle (%0d mismatches)", pc_mismatch));
    check(dut_w.u_rf.regs[4] == 32'd7 && dut_n.u_rf.regs[4] == 32'd7, "scalar load of the file's data");
    check(dut_w.u_dmem.mem[1] == 32'd0, "scalar memory untouched by MSW");
    for (int i = 0; i < WIDE; i++) begin
      check(res_w[i] == expected(i), $sformatf("8-lane instance lane %0d register: %h, expected %h", i, res_w[i], expected(i)));
      check(mem_w[i] == expected(i), $sformatf("8-lane instance lane %0d memory: %h, expected %h", i, mem_w[i], expected(i)));
    end
    for (int i = 0; i < NARROW; i++) begin
      check(res_n[i] == expected(i), $sformatf("1-lane instance lane %0d register", i));
      check(mem_n[i] == expected(i), $sformatf("1-lane instance lane %0d memory", i));
    end
    check($bits(dut_w.simd_wb_bus) == WIDE * 32 && $bits(dut_n.simd_wb_bus) == NARROW * 32,
          "lane write-back bus is SIZE x 32 bits wide");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
