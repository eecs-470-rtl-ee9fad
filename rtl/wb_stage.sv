// wb_stage: writeback.
//
// Chooses the value to write: NPC (the return address) for a taken branch or
// jump, otherwise the stage result. Every branch writes its link value; the
// ones that do not want it name $r31 as destination. The register write is
// enabled for a valid instruction whose destination is not $r31.
// The NPC/result mux and the write enable follow the writeback stage of the
// design; gating with valid is this design's choice. Combinational.
module wb_stage
  import alpha_pkg::*;
(
  input  mem_wb_t  mem_wb,
  output logic     reg_wr_en_out,
  output reg_idx_t reg_wr_idx_out,
  output word_t    reg_wr_data_out
);

  assign reg_wr_data_out = mem_wb.take_branch ? mem_wb.npc : mem_wb.result;
  assign reg_wr_idx_out  = mem_wb.dest_idx;
  assign reg_wr_en_out   = mem_wb.valid && (mem_wb.dest_idx != ZERO_REG);

endmodule
