// hazard_unit: data-hazard detection and forwarding control.
//
// Combinational. For each source operand of the instruction in decode (rs
// and rt) it looks for the youngest older instruction that writes the same
// register in the same register space (scalar bank or the SIMD lane banks):
//  * the instruction in EX, not a load  -> FWD_EX  (EX result into ID)
//  * the instruction in MEM, not a load -> FWD_MEM (EX/MEM result into ID)
//  * a load in EX                       -> STALL one cycle
//  * a load in MEM                      -> LATE: the consumer moves on and the
//    loaded word, which leaves the data memory during write-back, is
//    forwarded into EX. If the operand is needed already in decode (branch
//    or JR, NEEDED_IN_ID) the unit stalls instead.
// Anything older is in write-back and comes through the write-through
// register bank. Register 0 never forwards or stalls. A BREAKPOINT in
// decode stalls until RELEASE is high. On a stall the fetch stage and IF/ID
// hold and a bubble enters ID/EX. WAW and WAR cannot occur in this
// in-order pipeline and are not checked.
// Forwarding into decode, the one-cycle load stall followed by returning
// the memory output to EX, and the absence of WAW/WAR checks follow the
// document. The stall for a branch on a just-loaded value, the separate
// scalar/vector register spaces and the RELEASE behaviour are this
// design's choices.
module hazard_unit
  import mips_pkg::*;
(
  input  regidx_t id_rs,
  input  regidx_t id_rt,
  input  logic    id_use_rs,
  input  logic    id_use_rt,
  input  logic    id_rs_vec,
  input  logic    id_rt_vec,
  input  logic    id_needed_in_id,
  input  logic    id_break,
  input  logic    release_bp,
  input  regidx_t ex_dest,
  input  logic    ex_wr_s,
  input  logic    ex_wr_v,
  input  logic    ex_ld_s,
  input  logic    ex_ld_v,
  input  regidx_t mem_dest,
  input  logic    mem_wr_s,
  input  logic    mem_wr_v,
  input  logic    mem_ld_s,
  input  logic    mem_ld_v,
  output fwd_e    fwd_a,
  output fwd_e    fwd_b,
  output logic    late_a,
  output logic    late_b,
  output logic    stall_data,
  output logic    stall_break,
  output logic    stall
);
  typedef struct packed {
    fwd_e fwd;
    logic late;
    logic stall;
  } opres_t;

  function automatic opres_t resolve(regidx_t src, logic used, logic vec);
    opres_t r;
    logic hit_ex, hit_mem, ld_ex, ld_mem;
    hit_ex  = used && src != 5'd0 && src == ex_dest  && (vec ? ex_wr_v  : ex_wr_s);
    hit_mem = used && src != 5'd0 && src == mem_dest && (vec ? mem_wr_v : mem_wr_s);
    ld_ex   = vec ? ex_ld_v  : ex_ld_s;
    ld_mem  = vec ? mem_ld_v : mem_ld_s;
    r = '{fwd: FWD_RF, late: 1'b0, stall: 1'b0};
    if (hit_ex) begin
      if (ld_ex) r.stall = 1'b1;
      else       r.fwd   = FWD_EX;
    end else if (hit_mem) begin
      if (ld_mem) begin
        if (id_needed_in_id) r.stall = 1'b1;
        else                 r.late  = 1'b1;
      end else begin
        r.fwd = FWD_MEM;
      end
    end
    return r;
  endfunction

  opres_t ra, rb;
  always_comb begin
    ra = resolve(id_rs, id_use_rs, id_rs_vec);
    rb = resolve(id_rt, id_use_rt, id_rt_vec);
  end

  assign fwd_a       = ra.fwd;
  assign fwd_b       = rb.fwd;
  assign late_a      = ra.late;
  assign late_b      = rb.late;
  assign stall_data  = ra.stall || rb.stall;
  assign stall_break = id_break && !release_bp;
  assign stall       = stall_data || stall_break;
endmodule
