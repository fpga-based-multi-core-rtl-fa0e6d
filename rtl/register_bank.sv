// register_bank: 32 x 32-bit register file with two read ports and one write
// port, used by the scalar core and by every SIMD lane.
//
// Register 0 always reads as zero and ignores writes. Writes happen on the
// rising clock edge; a read of the register being written in the same cycle
// returns the new value (write-through), which is how the write-back stage
// hands its result to the decode stage without a separate bypass. Reads are
// combinational. A synchronous active-low reset clears all registers, so
// the bank is built from flip-flops; clearing at reset is this design's
// choice.
module register_bank
  import mips_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  regidx_t ra1,
  input  regidx_t ra2,
  output word_t   rd1,
  output word_t   rd2,
  input  logic    we,
  input  regidx_t wa,
  input  word_t   wd
);
  word_t regs [32];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    if (ra1 == 5'd0)            rd1 = '0;
    else if (we && wa == ra1)   rd1 = wd;
    else                        rd1 = regs[ra1];
    if (ra2 == 5'd0)            rd2 = '0;
    else if (we && wa == ra2)   rd2 = wd;
    else                        rd2 = regs[ra2];
  end
endmodule
