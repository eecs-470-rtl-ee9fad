// pipeline: the five-stage in-order Alpha-subset processor with hazard logic.
//
// Stages IF, ID, EX, MEM, WB are separated by the IF/ID, ID/EX, EX/MEM and
// MEM/WB registers. Every pipeline-register slot carries a valid bit; an
// inserted no-op is an invalid slot, so it never writes anything and is not
// counted as a retired instruction. Instructions overlap fully:
//   * results are forwarded from EX/MEM and MEM/WB into EX (ex_stage);
//   * a use of a loaded value right after the load stalls one cycle in ID;
//   * instruction fetch and data access share one memory port, data first;
//   * branches are predicted not taken and resolved when they reach MEM;
//     a taken branch flushes the three younger instructions.
// The control of all of this is in hazard_unit; arbitration in mem_arbiter.
//
// Interface: one memory port (command/address/store data out, read data in,
// answered in the same cycle) and a writeback trace of the instruction
// retiring this cycle (valid, PC, register write), plus halt and illegal
// flags. `halted` stays high from the cycle after call_pal 0x555 retires.
// Reset is synchronous and active high; the PC starts at 0.
module pipeline
  import alpha_pkg::*;
(
  input  logic     clock,
  input  logic     reset,
  // memory port
  input  word_t    mem2proc_data,
  output bus_cmd_e proc2mem_command,
  output word_t    proc2mem_addr,
  output word_t    proc2mem_data,
  // writeback trace
  output logic     wb_valid_inst,
  output word_t    wb_pc,
  output logic     wb_reg_wr_en,
  output reg_idx_t wb_reg_wr_idx,
  output word_t    wb_reg_wr_data,
  output logic     wb_halt,
  output logic     wb_illegal,
  output logic     halted
);

  // ------------------------------------------------------------------ wires
  if_id_t  if_id;
  id_ex_t  id_ex,  id_packet;
  ex_mem_t ex_mem, ex_packet;
  mem_wb_t mem_wb, mem_packet;

  word_t       proc2Imem_addr, Imem2proc_data, Dmem2proc_data;
  bus_cmd_e    proc2Dmem_command;
  word_t       proc2Dmem_addr, proc2Dmem_data;
  logic        mem_used_by_mem;

  word_t       if_PC, if_NPC;
  logic [31:0] if_IR;
  logic        if_valid;

  fwd_sel_e    fwd_a_sel, fwd_b_sel;
  logic        load_use_stall, fetch_hold, flush, pc_enable, fetch_valid;
  logic        if_id_enable, if_id_bubble, id_ex_bubble, ex_mem_bubble;
  logic        halt_in_flight, halted_q;

  logic        wb_wr_en;
  reg_idx_t    wb_wr_idx;
  word_t       wb_wr_data;

  // ----------------------------------------------------------------- stages
  if_stage if_stage_0 (
    .clock              (clock),
    .reset              (reset),
    .pc_enable          (pc_enable),
    .ex_mem_take_branch (ex_mem.take_branch),
    .ex_mem_target_pc   (ex_mem.alu_result),
    .Imem2proc_data     (Imem2proc_data),
    .fetch_valid        (fetch_valid),
    .proc2Imem_addr     (proc2Imem_addr),
    .if_PC_out          (if_PC),
    .if_NPC_out         (if_NPC),
    .if_IR_out          (if_IR),
    .if_valid_inst_out  (if_valid)
  );

  id_stage id_stage_0 (
    .clock          (clock),
    .if_id          (if_id),
    .wb_reg_wr_en   (wb_wr_en),
    .wb_reg_wr_idx  (wb_wr_idx),
    .wb_reg_wr_data (wb_wr_data),
    .id_packet      (id_packet)
  );

  ex_stage ex_stage_0 (
    .id_ex           (id_ex),
    .fwd_a_sel       (fwd_a_sel),
    .fwd_b_sel       (fwd_b_sel),
    // a taken branch or jump writes its link value, not its target
    .ex_mem_fwd_data (ex_mem.take_branch ? ex_mem.npc : ex_mem.alu_result),
    .mem_wb_fwd_data (wb_wr_data),
    .ex_packet       (ex_packet)
  );

  mem_stage mem_stage_0 (
    .ex_mem            (ex_mem),
    .Dmem2proc_data    (Dmem2proc_data),
    .proc2Dmem_command (proc2Dmem_command),
    .proc2Dmem_addr    (proc2Dmem_addr),
    .proc2Dmem_data    (proc2Dmem_data),
    .mem_packet        (mem_packet)
  );

  wb_stage wb_stage_0 (
    .mem_wb          (mem_wb),
    .reg_wr_en_out   (wb_wr_en),
    .reg_wr_idx_out  (wb_wr_idx),
    .reg_wr_data_out (wb_wr_data)
  );

  mem_arbiter mem_arbiter_0 (
    .proc2Dmem_command (proc2Dmem_command),
    .proc2Dmem_addr    (proc2Dmem_addr),
    .proc2Dmem_data    (proc2Dmem_data),
    .proc2Imem_addr    (proc2Imem_addr),
    .mem2proc_data     (mem2proc_data),
    .proc2mem_command  (proc2mem_command),
    .proc2mem_addr     (proc2mem_addr),
    .proc2mem_data     (proc2mem_data),
    .Dmem2proc_data    (Dmem2proc_data),
    .Imem2proc_data    (Imem2proc_data),
    .mem_used_by_mem   (mem_used_by_mem)
  );

  assign halt_in_flight = halted_q
                        || (id_packet.valid && (id_packet.dec.halt || id_packet.dec.illegal))
                        || (id_ex.valid  && (id_ex.dec.halt || id_ex.dec.illegal))
                        || (ex_mem.valid && (ex_mem.halt || ex_mem.illegal))
                        || (mem_wb.valid && (mem_wb.halt || mem_wb.illegal));

  hazard_unit hazard_unit_0 (
    .if_id_valid        (if_id.valid),
    .id_ra_idx          (id_packet.ra_idx),
    .id_rb_idx          (id_packet.rb_idx),
    .id_uses_rega       (id_packet.dec.uses_rega),
    .id_uses_regb       (id_packet.dec.uses_regb),
    .id_ex_valid        (id_ex.valid),
    .id_ex_rd_mem       (id_ex.dec.rd_mem),
    .id_ex_dest_idx     (id_ex.dest_idx),
    .id_ex_ra_idx       (id_ex.ra_idx),
    .id_ex_rb_idx       (id_ex.rb_idx),
    .ex_mem_valid       (ex_mem.valid),
    .ex_mem_dest_idx    (ex_mem.dest_idx),
    .ex_mem_take_branch (ex_mem.take_branch),
    .mem_used_by_mem    (mem_used_by_mem),
    .mem_wb_valid       (mem_wb.valid),
    .mem_wb_dest_idx    (mem_wb.dest_idx),
    .halt_in_flight     (halt_in_flight),
    .fwd_a_sel          (fwd_a_sel),
    .fwd_b_sel          (fwd_b_sel),
    .load_use_stall     (load_use_stall),
    .fetch_hold         (fetch_hold),
    .flush              (flush),
    .pc_enable          (pc_enable),
    .fetch_valid        (fetch_valid),
    .if_id_enable       (if_id_enable),
    .if_id_bubble       (if_id_bubble),
    .id_ex_bubble       (id_ex_bubble),
    .ex_mem_bubble      (ex_mem_bubble)
  );

  // ------------------------------------------------------ pipeline registers
  localparam if_id_t IF_ID_BUBBLE = '{valid: 1'b0, npc: '0, ir: NOOP_INST};

  function automatic id_ex_t id_ex_bubble_value();
    id_ex_t b;
    b          = '0;
    b.ir       = NOOP_INST;
    b.dest_idx = ZERO_REG;
    b.ra_idx   = ZERO_REG;
    b.rb_idx   = ZERO_REG;
    b.dec.dest_select = DEST_NONE;
    return b;
  endfunction

  function automatic ex_mem_t ex_mem_bubble_value();
    ex_mem_t b;
    b          = '0;
    b.ir       = NOOP_INST;
    b.dest_idx = ZERO_REG;
    return b;
  endfunction

  function automatic mem_wb_t mem_wb_bubble_value();
    mem_wb_t b;
    b          = '0;
    b.ir       = NOOP_INST;
    b.dest_idx = ZERO_REG;
    return b;
  endfunction

  always_ff @(posedge clock) begin
    if (reset || if_id_bubble) if_id <= IF_ID_BUBBLE;
    else if (if_id_enable)     if_id <= '{valid: if_valid, npc: if_NPC, ir: if_IR};
  end

  always_ff @(posedge clock) begin
    if (reset || id_ex_bubble) id_ex <= id_ex_bubble_value();
    else                       id_ex <= id_packet;
  end

  always_ff @(posedge clock) begin
    if (reset || ex_mem_bubble) ex_mem <= ex_mem_bubble_value();
    else                        ex_mem <= ex_packet;
  end

  always_ff @(posedge clock) begin
    if (reset) mem_wb <= mem_wb_bubble_value();
    else       mem_wb <= mem_packet;
  end

  always_ff @(posedge clock) begin
    if (reset)                            halted_q <= 1'b0;
    else if (mem_wb.valid && mem_wb.halt) halted_q <= 1'b1;
  end

  // ------------------------------------------------------------- trace out
  assign wb_valid_inst  = mem_wb.valid;
  assign wb_pc          = mem_wb.npc - 64'd4;
  assign wb_reg_wr_en   = wb_wr_en;
  assign wb_reg_wr_idx  = wb_wr_idx;
  assign wb_reg_wr_data = wb_wr_data;
  assign wb_halt        = mem_wb.valid && mem_wb.halt;
  assign wb_illegal     = mem_wb.valid && mem_wb.illegal;
  assign halted         = halted_q;

  // A flush must never coincide with a data access in MEM: the taken branch
  // occupies that stage.
  a_flush_no_mem: assert property (@(posedge clock) disable iff (reset)
                                   flush |-> !mem_used_by_mem);

endmodule
