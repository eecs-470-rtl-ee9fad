// regfile: the 32-entry, 64-bit architected register file of the pipeline.
//
// Two combinational read ports (ra, rb) serve the decode stage and one
// synchronous write port is driven by writeback. Register $r31 always reads
// as zero and writes to it are ignored, as the Alpha ISA requires. A read of
// the register being written in the same cycle returns the new value
// (write-through), so an instruction in decode sees the result of the
// instruction in writeback; this closes the one gap the EX-stage forwarding
// paths do not cover. The write-through and the absence of a reset (programs
// must write a register before reading it) are this design's choices.
//
// Timing: reads are combinational; a write takes effect at the rising edge.
module regfile
  import alpha_pkg::*;
#(
  parameter int NUM_REGS = 32
) (
  input  logic     clock,
  input  reg_idx_t rda_idx,
  input  reg_idx_t rdb_idx,
  input  logic     wr_en,
  input  reg_idx_t wr_idx,
  input  word_t    wr_data,
  output word_t    rda_out,
  output word_t    rdb_out
);

  word_t registers [NUM_REGS];

  function automatic word_t read_port(reg_idx_t idx, logic we, reg_idx_t widx,
                                      word_t wdata, word_t stored);
    if (idx == ZERO_REG)             return '0;
    else if (we && (widx == idx))    return wdata;
    else                             return stored;
  endfunction

  assign rda_out = read_port(rda_idx, wr_en, wr_idx, wr_data, registers[rda_idx]);
  assign rdb_out = read_port(rdb_idx, wr_en, wr_idx, wr_data, registers[rdb_idx]);

  always_ff @(posedge clock) begin
    if (wr_en && (wr_idx != ZERO_REG))
      registers[wr_idx] <= wr_data;
  end

endmodule
