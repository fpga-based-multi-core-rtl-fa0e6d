// fetch_unit: program counter register, +4 adder and next-address
// multiplexer of the instruction fetch stage.
//
// PC holds the address being read from the instruction memory this cycle.
// On each rising edge it advances to PC + 4, or to TARGET when the decode
// stage requests a REDIRECT (taken branch or jump); while STALL is high it
// holds. A synchronous active-low reset sets PC to 0.
// The PC register, +4 adder and address multiplexer follow the document;
// the reset value 0 and the synchronous reset are this design's choices.
module fetch_unit
  import mips_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  stall,
  input  logic  redirect,
  input  word_t target,
  output word_t pc,
  output word_t pc_plus4
);
  assign pc_plus4 = pc + 32'd4;

  always_ff @(posedge clk) begin
    if (!rst_n)      pc <= '0;
    else if (!stall) pc <= redirect ? target : pc_plus4;
  end
endmodule
