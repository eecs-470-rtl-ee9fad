// verisimple_system: the complete machine, processor plus its memory.
//
// Connects the five-stage pipeline to a unified, single-ported memory that
// holds both the program (loaded from address 0) and its data. The machine
// runs from reset until call_pal 0x555 retires (halted) or an illegal
// instruction retires or memory is addressed out of range (error, sticky).
// The writeback trace of the pipeline is brought out so that a test bench can
// log every retired instruction and its register write.
// The pipeline/memory split and the single port follow the design; the memory
// size and the error reporting are this design's choices.
module verisimple_system
  import alpha_pkg::*;
#(
  parameter int unsigned MEM_SIZE_BYTES = 65536
) (
  input  logic     clock,
  input  logic     reset,
  output logic     wb_valid_inst,
  output word_t    wb_pc,
  output logic     wb_reg_wr_en,
  output reg_idx_t wb_reg_wr_idx,
  output word_t    wb_reg_wr_data,
  output logic     halted,
  output logic     error
);

  bus_cmd_e proc2mem_command;
  word_t    proc2mem_addr, proc2mem_data, mem2proc_data;
  logic     addr_error, wb_halt, wb_illegal, error_q;

  pipeline pipeline_0 (
    .clock            (clock),
    .reset            (reset),
    .mem2proc_data    (mem2proc_data),
    .proc2mem_command (proc2mem_command),
    .proc2mem_addr    (proc2mem_addr),
    .proc2mem_data    (proc2mem_data),
    .wb_valid_inst    (wb_valid_inst),
    .wb_pc            (wb_pc),
    .wb_reg_wr_en     (wb_reg_wr_en),
    .wb_reg_wr_idx    (wb_reg_wr_idx),
    .wb_reg_wr_data   (wb_reg_wr_data),
    .wb_halt          (wb_halt),
    .wb_illegal       (wb_illegal),
    .halted           (halted)
  );

  unified_memory #(.MEM_SIZE_BYTES(MEM_SIZE_BYTES)) memory_0 (
    .clock            (clock),
    .proc2mem_command (proc2mem_command),
    .proc2mem_addr    (proc2mem_addr),
    .proc2mem_data    (proc2mem_data),
    .mem2proc_data    (mem2proc_data),
    .addr_error       (addr_error)
  );

  always_ff @(posedge clock) begin
    if (reset)                        error_q <= 1'b0;
    else if (wb_illegal || addr_error) error_q <= 1'b1;
  end
  assign error = error_q;

endmodule
