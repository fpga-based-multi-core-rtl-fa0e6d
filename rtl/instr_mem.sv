// instr_mem: instruction memory, a word-addressed read-only block RAM.
//
// DEPTH words of 32 bits (1024 by default). The read is synchronous: the
// word at ADDR appears on DOUT after the rising edge on which EN is high; with
// EN low DOUT holds, which is how a stalled fetch keeps its instruction. The
// output register is the instruction half of the IF/ID pipeline register and
// resets (synchronous, active low) to 0, the encoding of a NOP. Contents come
// from INIT_FILE (hex, one word per line) when it is given.
// The 32 x 1024 read-only organisation follows the document; the read
// enable used for stalls and the NOP reset value are this design's choices.
module instr_mem
  import mips_pkg::*;
#(
  parameter int    DEPTH     = 1024,
  parameter string INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output word_t                    dout
);
  word_t mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  dout <= NOP;
    else if (en) dout <= mem[addr];
  end
endmodule
