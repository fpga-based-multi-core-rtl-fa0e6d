// simd_lane: one SIMD processing element ("core") of the multi-core
// processor.
//
// Each lane owns the data side of a pipeline: a 32 x 32 register bank, the
// decode-stage forwarding multiplexers, an ALU and a 16 x 16 multiplier in
// execute, a private data memory, the data halves of the ID/EX, EX/MEM and
// MEM/WB registers, and the write-back multiplexer. It has no control of
// its own: every lane receives the same decoded controls, forwarding
// selects and memory word address from the scalar pipeline, so all lanes do
// the same operation on their own registers and memories in the same cycle.
//
// Timing, relative to the instruction's position in the shared pipeline:
//   ID  - read ID_RS/ID_RT, pick register bank / EX result / EX-MEM result
//         per ID_FWD_A/B, latch with the extended immediate ID_IMM
//   EX  - optionally replace an operand by this lane's load data (EX_LATE_*),
//         compute the ALU (EX_FSEL) or multiplier (EX_MSEL == MSEL_MUL) result
//   MEM - the data memory reads MEM_ADDR when MEM_RE (MMEMTOREG) is high and
//         writes the stored operand when MEM_WE (MMEMWRITE) is high
//   WB  - write WB_DATA (load data when WB_MEMTOREG, else the result) to
//         register WB_DEST when WB_WE (MREGWRITE) is high
// The lanes have no shifter or comparator, because no SIMD instruction
// shifts or compares.
// The lane contents (register bank, ALU, multiplier, data memory,
// inter-stage registers, forwarding multiplexers) and the shared address
// follow the document; taking every control from the scalar pipeline
// rather than from per-lane copies is this design's choice.
module simd_lane
  import mips_pkg::*;
#(
  parameter int DMEM_DEPTH = 1024,
  parameter string DMEM_INIT = ""
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // decode
  input  regidx_t                       id_rs,
  input  regidx_t                       id_rt,
  input  fwd_e                          id_fwd_a,
  input  fwd_e                          id_fwd_b,
  input  word_t                         id_imm,
  // execute
  input  fsel_e                         ex_fsel,
  input  msel_e                         ex_msel,
  input  logic                          ex_alusrc,
  input  logic                          ex_late_a,
  input  logic                          ex_late_b,
  // memory
  input  logic [$clog2(DMEM_DEPTH)-1:0] mem_addr,
  input  logic                          mem_re,
  input  logic                          mem_we,
  // write back
  input  logic                          wb_we,
  input  regidx_t                       wb_dest,
  input  logic                          wb_memtoreg,
  output word_t                         wb_data
);
  word_t rf_a, rf_b, id_a, id_b;
  word_t idex_a, idex_b, idex_imm;
  word_t a_eff, b_eff, op_b, alu_y, mul_y, ex_result;
  word_t exmem_result, exmem_store;
  word_t memwb_result, load_data;

  register_bank u_rf (
    .clk(clk), .rst_n(rst_n),
    .ra1(id_rs), .ra2(id_rt), .rd1(rf_a), .rd2(rf_b),
    .we(wb_we), .wa(wb_dest), .wd(wb_data)
  );

  // decode-stage forwarding multiplexers
  always_comb begin
    unique case (id_fwd_a)
      FWD_EX:  id_a = ex_result;
      FWD_MEM: id_a = exmem_result;
      default: id_a = rf_a;
    endcase
    unique case (id_fwd_b)
      FWD_EX:  id_b = ex_result;
      FWD_MEM: id_b = exmem_result;
      default: id_b = rf_b;
    endcase
  end

  always_ff @(posedge clk) begin
    idex_a   <= id_a;
    idex_b   <= id_b;
    idex_imm <= id_imm;
  end

  // execute
  assign a_eff = ex_late_a ? load_data : idex_a;
  assign b_eff = ex_late_b ? load_data : idex_b;
  assign op_b  = ex_alusrc ? idex_imm : b_eff;

  alu        u_alu (.a(a_eff), .b(op_b), .fsel(ex_fsel), .y(alu_y));
  multiplier u_mul (.a(a_eff), .b(op_b), .y(mul_y));

  assign ex_result = (ex_msel == MSEL_MUL) ? mul_y : alu_y;

  always_ff @(posedge clk) begin
    exmem_result <= ex_result;
    exmem_store  <= b_eff;
  end

  // memory
  data_mem #(.DEPTH(DMEM_DEPTH), .INIT_FILE(DMEM_INIT)) u_dmem (
    .clk(clk), .re(mem_re), .we(mem_we), .addr(mem_addr), .din(exmem_store), .dout(load_data)
  );

  always_ff @(posedge clk) memwb_result <= exmem_result;

  // write back
  assign wb_data = wb_memtoreg ? load_data : memwb_result;
endmodule
