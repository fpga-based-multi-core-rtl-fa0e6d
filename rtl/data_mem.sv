// data_mem: single-port data RAM of the memory stage, used by the scalar
// core and by every SIMD lane.
//
// DEPTH words of 32 bits (1024 by default), word addressed. On each rising
// edge on which RE is high the word at ADDR is read into DOUT (so load data
// is available one cycle later, in the write-back stage); DOUT holds its
// value otherwise. When WE is high, DIN is written to that word; a read in
// the same cycle returns the old contents (read-first). The pipeline drives
// RE from the load control (MEMTOREG), as the document describes; the
// read-first order and the hold of DOUT are this design's choices. Optional
// initial contents come from INIT_FILE (hex, one word per line).
module data_mem
  import mips_pkg::*;
#(
  parameter int    DEPTH     = 1024,
  parameter string INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  word_t                    din,
  output word_t                    dout
);
  word_t mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (re) dout <= mem[addr];
    if (we) mem[addr] <= din;
  end
endmodule
