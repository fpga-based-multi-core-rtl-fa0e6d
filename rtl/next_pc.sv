// next_pc: next-PC logic (NPC) of the decode stage.
//
// Combinational. For a branch or jump in decode (ISBJ) whose condition holds
// (TAKEN), asks the fetch unit to load TARGET. Because the processor has one
// branch delay slot, targets are relative to the delay-slot address
// PC_ID + 4: branches add the sign-extended 16-bit offset times four; J and
// JAL splice the 26-bit target into bits 27:2 below the top four bits; JR
// takes the forwarded rs value. These are the standard MIPS rules.
// That the NPC logic sits in decode and acts on ISBJ follows the
// document; the target arithmetic is the standard MIPS one, which the
// document does not spell out.
module next_pc
  import mips_pkg::*;
(
  input  logic  isbj,
  input  bj_e   bjtype,
  input  logic  taken,
  input  word_t pc_id,
  input  word_t instr,
  input  word_t rs_val,
  output logic  redirect,
  output word_t target
);
  word_t pc_ds;
  assign pc_ds    = pc_id + 32'd4;
  assign redirect = isbj && taken;

  always_comb begin
    unique case (bjtype)
      BJ_J:    target = {pc_ds[31:28], instr[25:0], 2'b00};
      BJ_JR:   target = rs_val;
      default: target = pc_ds + {{14{instr[15]}}, instr[15:0], 2'b00};
    endcase
  end
endmodule
