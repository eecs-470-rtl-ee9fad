// hazard_unit: forwarding, stall and flush control of the pipeline.
//
// Forwarding (to EX only): an EX operand register (ra or rb of the
// instruction in ID/EX) takes the value of the youngest older instruction
// that writes it: EX/MEM first, then MEM/WB, else the value read in decode.
// $r31 is never forwarded. Forwarding is decided from the register indices
// carried in the pipeline registers; no separate hazard-detection registers.
//
// Load-use stall: when the instruction in ID reads the destination of a load
// now in EX, it waits one cycle in ID: PC and IF/ID hold and an invalid
// bubble enters ID/EX. The loaded value is then forwarded from MEM/WB.
//
// Structural hazard: when the memory stage uses the single memory port, the
// fetch waits (PC holds, IF delivers an invalid no-op) and the load or store
// proceeds.
//
// Control hazard: branches are predicted not taken. A taken branch in EX/MEM
// redirects the PC and turns the next contents of IF/ID, ID/EX and EX/MEM
// into bubbles. The flush has priority over every stall.
//
// Halt: once a halt (or an illegal instruction) is in flight, fetching stops
// so that nothing past it runs. This is this design's choice; a halt on a
// mispredicted path is flushed like any other instruction.
//
// The forwarding, stall, priority and flush rules follow the design's hazard
// description. Combinational.
module hazard_unit
  import alpha_pkg::*;
(
  // instruction in ID
  input  logic     if_id_valid,
  input  reg_idx_t id_ra_idx,
  input  reg_idx_t id_rb_idx,
  input  logic     id_uses_rega,
  input  logic     id_uses_regb,
  // instruction in EX
  input  logic     id_ex_valid,
  input  logic     id_ex_rd_mem,
  input  reg_idx_t id_ex_dest_idx,
  input  reg_idx_t id_ex_ra_idx,
  input  reg_idx_t id_ex_rb_idx,
  // instruction in MEM
  input  logic     ex_mem_valid,
  input  reg_idx_t ex_mem_dest_idx,
  input  logic     ex_mem_take_branch,
  input  logic     mem_used_by_mem,
  // instruction in WB
  input  logic     mem_wb_valid,
  input  reg_idx_t mem_wb_dest_idx,
  // a halt or illegal instruction is in flight or has retired
  input  logic     halt_in_flight,
  output fwd_sel_e fwd_a_sel,
  output fwd_sel_e fwd_b_sel,
  output logic     load_use_stall,
  output logic     fetch_hold,       // fetch could not use the memory port
  output logic     flush,
  output logic     pc_enable,
  output logic     fetch_valid,
  output logic     if_id_enable,
  output logic     if_id_bubble,
  output logic     id_ex_bubble,
  output logic     ex_mem_bubble
);

  function automatic fwd_sel_e pick(reg_idx_t src,
                                    logic exm_v, reg_idx_t exm_d,
                                    logic mwb_v, reg_idx_t mwb_d);
    if (src == ZERO_REG)                 return FWD_NONE;
    else if (exm_v && (exm_d == src))    return FWD_EX_MEM;
    else if (mwb_v && (mwb_d == src))    return FWD_MEM_WB;
    else                                 return FWD_NONE;
  endfunction

  assign fwd_a_sel = pick(id_ex_ra_idx, ex_mem_valid, ex_mem_dest_idx, mem_wb_valid, mem_wb_dest_idx);
  assign fwd_b_sel = pick(id_ex_rb_idx, ex_mem_valid, ex_mem_dest_idx, mem_wb_valid, mem_wb_dest_idx);

  assign load_use_stall = if_id_valid && id_ex_valid && id_ex_rd_mem &&
                          (id_ex_dest_idx != ZERO_REG) &&
                          ((id_uses_rega && (id_ra_idx == id_ex_dest_idx)) ||
                           (id_uses_regb && (id_rb_idx == id_ex_dest_idx)));

  assign flush        = ex_mem_take_branch;
  assign fetch_hold   = mem_used_by_mem;
  assign fetch_valid  = !mem_used_by_mem && !halt_in_flight;
  assign pc_enable    = flush || (fetch_valid && !load_use_stall);
  assign if_id_enable = flush || !load_use_stall;
  assign if_id_bubble = flush;
  assign id_ex_bubble = flush || load_use_stall;
  assign ex_mem_bubble = flush;

endmodule
