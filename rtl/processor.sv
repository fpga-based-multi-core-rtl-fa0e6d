// processor: five-stage pipelined 32-bit MIPS core with SIZE SIMD lanes.
//
// A scalar (SISD) MIPS pipeline -- fetch, decode, execute, memory,
// write-back -- runs 28 MIPS32 instructions (ALU, shifts, set-less-than,
// LUI, MUL, LW/SW, BEQ/BNE/BLTZ/BGEZ, J/JAL/JR, BREAK). The same decoder
// also recognises 11 SIMD instructions (MADDIU, MADDU, MMUL, MAND, MANDI,
// MOR, MORI, MXOR, MXORI, MLW, MSW); for these it raises MREGWRITE,
// MMEMTOREG or MMEMWRITE instead of the scalar controls and every one of the
// SIZE lanes (simd_lane) does the operation on its own register bank and
// data memory. Instruction flow is the same for both kinds: one program
// counter, one decoder, one hazard unit.
//
// Pipeline details
//  * Fetch: the PC addresses a synchronous instruction ROM whose output
//    register is the instruction half of IF/ID.
//  * Decode: register bank read (write-through from WB), forwarding muxes
//    (EX result or EX/MEM result), branch condition and next-PC computation.
//    Branches and jumps resolve here and have one delay slot: the next
//    instruction always executes, nothing is flushed. JAL links PC+8 in $31.
//  * Execute: ALU control, ALU, shifter, comparator, 16x16 multiplier; the
//    MSEL mux picks the result. Load data from the instruction now in WB is
//    forwarded here (LATE) for a consumer that was one instruction behind.
//  * Memory: scalar data RAM, read-enabled by MEMTOREG (MMEMTOREG for the
//    lanes); lane RAMs get the same word address from the
//    scalar EX/MEM result (base register of MLW/MSW is scalar).
//  * Write-back: load data or result into the scalar bank (REGWRITE) or the
//    lane banks (MREGWRITE).
//  * Stalls hold PC and IF/ID and send a bubble into ID/EX: one cycle after a
//    load whose value is needed next (two for a branch on a just-loaded
//    value), and for as long as a BREAK sits in decode with RELEASE low.
//
// Ports: CLK; RSET (synchronous, active low; PC to 0, pipeline to bubbles,
// register banks cleared); RELEASE (lets a BREAK continue as a NOP);
// PC_OUT (fetch address); CURRENT_INSTR (instruction in decode).
// Memories are word addressed by byte address bits [11:2]. The port list,
// SIZE = 4 lanes and 1024-word memories follow the original design; the
// opcode numbers of the SIMD instructions, the RELEASE behaviour, reset
// clearing and the exact forwarding points are this design's choices.
module processor
  import mips_pkg::*;
#(
  parameter int    SIZE       = 4,
  parameter int    IMEM_DEPTH = 1024,
  parameter int    DMEM_DEPTH = 1024,
  parameter string IMEM_INIT  = "",
  parameter string DMEM_INIT  = ""
) (
  input  logic  CLK,
  input  logic  RSET,
  input  logic  RELEASE,
  output word_t PC_OUT,
  output word_t CURRENT_INSTR
);
  localparam int DATASIZE = SIZE * 32 - 1;   // width-1 of the SIMD data bus
  localparam int IAW = $clog2(IMEM_DEPTH);
  localparam int DAW = $clog2(DMEM_DEPTH);

  // control that travels down the pipeline
  typedef struct packed {
    logic   regwrite;
    logic   memtoreg;
    logic   memwrite;
    logic   mregwrite;
    logic   mmemtoreg;
    logic   mmemwrite;
  } wctrl_t;

  typedef struct packed {
    wctrl_t     w;
    aluop_e     aluop;
    logic       alusrc;
    logic       late_a;
    logic       late_b;
    logic [5:0] funct;
    logic [4:0] shamt;
    regidx_t    dest;
  } idex_ctrl_t;

  typedef struct packed {
    wctrl_t  w;
    regidx_t dest;
  } exmem_ctrl_t;

  logic rst_n;
  assign rst_n = RSET;

  // ================================================================ fetch
  word_t pc, pc_plus4, ifid_pc, id_instr;
  logic  stall, redirect;
  word_t target;

  fetch_unit u_fetch (
    .clk(CLK), .rst_n(rst_n), .stall(stall), .redirect(redirect),
    .target(target), .pc(pc), .pc_plus4(pc_plus4)
  );

  instr_mem #(.DEPTH(IMEM_DEPTH), .INIT_FILE(IMEM_INIT)) u_imem (
    .clk(CLK), .rst_n(rst_n), .en(!stall), .addr(pc[IAW+1:2]), .dout(id_instr)
  );

  always_ff @(posedge CLK) begin
    if (!rst_n)      ifid_pc <= '0;
    else if (!stall) ifid_pc <= pc;
  end

  // =============================================================== decode
  ctrl_t   ctrl;
  regidx_t rs, rt, rd, id_dest;
  word_t   rf_a, rf_b, id_a, id_b, id_imm;
  fwd_e    fwd_a, fwd_b;
  logic    late_a, late_b, stall_data, stall_break, taken;

  assign rs = id_instr[25:21];
  assign rt = id_instr[20:16];
  assign rd = id_instr[15:11];

  control_unit u_ctrl (.instr(id_instr), .ctrl(ctrl));

  // write-back signals (defined below)
  logic    wb_regwrite;
  regidx_t wb_dest;
  word_t   wb_data;

  register_bank u_rf (
    .clk(CLK), .rst_n(rst_n), .ra1(rs), .ra2(rt), .rd1(rf_a), .rd2(rf_b),
    .we(wb_regwrite), .wa(wb_dest), .wd(wb_data)
  );

  // pipeline registers further down (declared here for the hazard unit)
  idex_ctrl_t  idex_c;
  word_t       idex_a, idex_b, idex_imm, idex_pc8;
  exmem_ctrl_t exmem_c;
  word_t       exmem_result, exmem_store;
  word_t       ex_result;

  hazard_unit u_hazard (
    .id_rs(rs), .id_rt(rt),
    .id_use_rs(ctrl.use_rs), .id_use_rt(ctrl.use_rt),
    .id_rs_vec(ctrl.rs_vec), .id_rt_vec(ctrl.rt_vec),
    .id_needed_in_id(ctrl.isbj), .id_break(ctrl.breakpoint), .release_bp(RELEASE),
    .ex_dest(idex_c.dest), .ex_wr_s(idex_c.w.regwrite), .ex_wr_v(idex_c.w.mregwrite),
    .ex_ld_s(idex_c.w.memtoreg), .ex_ld_v(idex_c.w.mmemtoreg),
    .mem_dest(exmem_c.dest), .mem_wr_s(exmem_c.w.regwrite), .mem_wr_v(exmem_c.w.mregwrite),
    .mem_ld_s(exmem_c.w.memtoreg), .mem_ld_v(exmem_c.w.mmemtoreg),
    .fwd_a(fwd_a), .fwd_b(fwd_b), .late_a(late_a), .late_b(late_b),
    .stall_data(stall_data), .stall_break(stall_break), .stall(stall)
  );

  // decode-stage forwarding multiplexers
  always_comb begin
    unique case (fwd_a)
      FWD_EX:  id_a = ex_result;
      FWD_MEM: id_a = exmem_result;
      default: id_a = rf_a;
    endcase
    unique case (fwd_b)
      FWD_EX:  id_b = ex_result;
      FWD_MEM: id_b = exmem_result;
      default: id_b = rf_b;
    endcase
  end

  branch_unit u_branch (.bjtype(ctrl.bjtype), .a(id_a), .b(id_b), .taken(taken));

  next_pc u_npc (
    .isbj(ctrl.isbj), .bjtype(ctrl.bjtype), .taken(taken), .pc_id(ifid_pc),
    .instr(id_instr), .rs_val(id_a), .redirect(redirect), .target(target)
  );

  extend_unit u_ext (.imm(id_instr[15:0]), .extctrl(ctrl.extctrl), .y(id_imm));

  always_comb begin
    unique case (ctrl.regdst)
      DST_RD:  id_dest = rd;
      DST_R31: id_dest = 5'd31;
      default: id_dest = rt;
    endcase
  end

  // ID/EX register: a bubble on reset or stall
  always_ff @(posedge CLK) begin
    if (!rst_n || stall) begin
      idex_c <= '0;
    end else begin
      idex_c.w.regwrite  <= ctrl.regwrite;
      idex_c.w.memtoreg  <= ctrl.memtoreg;
      idex_c.w.memwrite  <= ctrl.memwrite;
      idex_c.w.mregwrite <= ctrl.mregwrite;
      idex_c.w.mmemtoreg <= ctrl.mmemtoreg;
      idex_c.w.mmemwrite <= ctrl.mmemwrite;
      idex_c.aluop       <= ctrl.aluop;
      idex_c.alusrc      <= ctrl.alusrc;
      idex_c.late_a      <= late_a;
      idex_c.late_b      <= late_b;
      idex_c.funct       <= id_instr[5:0];
      idex_c.shamt       <= id_instr[10:6];
      idex_c.dest        <= id_dest;
    end
    idex_a   <= id_a;
    idex_b   <= id_b;
    idex_imm <= id_imm;
    idex_pc8 <= ifid_pc + 32'd8;
  end

  // ============================================================== execute
  logic  shextmode, shdir, signedcomp;
  fsel_e fsel;
  msel_e msel;
  word_t a_eff, b_eff, op_b, alu_y, sh_y, mul_y, load_data;
  logic  cmp_lt;

  alu_control u_aluctl (
    .aluop(idex_c.aluop), .funct(idex_c.funct), .shextmode(shextmode),
    .shdir(shdir), .signedcomp(signedcomp), .fsel(fsel), .msel(msel)
  );

  assign a_eff = idex_c.late_a ? load_data : idex_a;
  assign b_eff = idex_c.late_b ? load_data : idex_b;
  assign op_b  = idex_c.alusrc ? idex_imm : b_eff;

  alu        u_alu (.a(a_eff), .b(op_b), .fsel(fsel), .y(alu_y));
  shifter    u_sh  (.d(b_eff), .shamt(idex_c.shamt), .shdir(shdir), .shextmode(shextmode), .y(sh_y));
  comparator u_cmp (.a(a_eff), .b(op_b), .signedcomp(signedcomp), .lt(cmp_lt));
  multiplier u_mul (.a(a_eff), .b(op_b), .y(mul_y));

  always_comb begin
    unique case (msel)
      MSEL_SHIFT: ex_result = sh_y;
      MSEL_COMP:  ex_result = {31'b0, cmp_lt};
      MSEL_MUL:   ex_result = mul_y;
      MSEL_LINK:  ex_result = idex_pc8;
      default:    ex_result = alu_y;
    endcase
  end

  always_ff @(posedge CLK) begin
    if (!rst_n) begin
      exmem_c <= '0;
    end else begin
      exmem_c.w    <= idex_c.w;
      exmem_c.dest <= idex_c.dest;
    end
    exmem_result <= ex_result;
    exmem_store  <= b_eff;
  end

  // =============================================================== memory
  exmem_ctrl_t memwb_c;
  word_t       memwb_result;

  data_mem #(.DEPTH(DMEM_DEPTH), .INIT_FILE(DMEM_INIT)) u_dmem (
    .clk(CLK), .re(exmem_c.w.memtoreg), .we(exmem_c.w.memwrite), .addr(exmem_result[DAW+1:2]),
    .din(exmem_store), .dout(load_data)
  );

  always_ff @(posedge CLK) begin
    if (!rst_n) memwb_c <= '0;
    else        memwb_c <= exmem_c;
    memwb_result <= exmem_result;
  end

  // =========================================================== write back
  assign wb_regwrite = memwb_c.w.regwrite;
  assign wb_dest     = memwb_c.dest;
  assign wb_data     = memwb_c.w.memtoreg ? load_data : memwb_result;

  // =========================================================== SIMD lanes
  logic [DATASIZE:0] simd_wb_bus;   // all lanes' write-back values side by side

  for (genvar i = 0; i < SIZE; i++) begin : g_lane
    word_t lane_wb;
    simd_lane #(.DMEM_DEPTH(DMEM_DEPTH), .DMEM_INIT(DMEM_INIT)) u_lane (
      .clk(CLK), .rst_n(rst_n),
      .id_rs(rs), .id_rt(rt), .id_fwd_a(fwd_a), .id_fwd_b(fwd_b), .id_imm(id_imm),
      .ex_fsel(fsel), .ex_msel(msel), .ex_alusrc(idex_c.alusrc),
      .ex_late_a(idex_c.late_a), .ex_late_b(idex_c.late_b),
      .mem_addr(exmem_result[DAW+1:2]), .mem_re(exmem_c.w.mmemtoreg), .mem_we(exmem_c.w.mmemwrite),
      .wb_we(memwb_c.w.mregwrite), .wb_dest(memwb_c.dest),
      .wb_memtoreg(memwb_c.w.mmemtoreg), .wb_data(lane_wb)
    );
    assign simd_wb_bus[i*32 +: 32] = lane_wb;
  end

  assign PC_OUT        = pc;
  assign CURRENT_INSTR = id_instr;

  // ============================================================ assertions
  // An instruction writes one register space at most and touches one kind
  // of data memory at most; JAL always links into $31; the breakpoint hold
  // happens only for a BREAK in decode with RELEASE low, and a BREAK (which
  // reads no register) never causes a data stall.
  always_ff @(posedge CLK) begin
    if (rst_n) begin
      assert (!(ctrl.regwrite && ctrl.mregwrite))
        else $error("instruction writes scalar and vector registers");
      assert (!ctrl.isjal || (ctrl.regwrite && ctrl.regdst == DST_R31))
        else $error("JAL does not link into $31");
      assert (stall_break == (ctrl.breakpoint && !RELEASE))
        else $error("breakpoint hold without a held BREAK");
      assert (!(stall_data && ctrl.breakpoint))
        else $error("data stall on a BREAK");
      assert (!(exmem_c.w.memwrite && exmem_c.w.mmemwrite))
        else $error("scalar and vector store in the same cycle");
      assert (!(idex_c.w.memtoreg && !idex_c.w.regwrite))
        else $error("load without register write");
    end
  end
endmodule
