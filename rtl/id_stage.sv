// id_stage: instruction decode and register read.
//
// Reads registers ra (bits 25:21) and rb (bits 20:16) of the instruction in
// IF/ID from the register file, decodes it, and picks the destination index
// (rc, ra, or $r31 for none) from the decoder's destination select. The
// result is the complete next content of the ID/EX register. The register
// file's write port is driven from writeback through this stage.
// Structure (register file + decoder + destination mux) follows the decode
// stage of the design. Combinational apart from the register-file write.
module id_stage
  import alpha_pkg::*;
(
  input  logic     clock,
  input  if_id_t   if_id,
  input  logic     wb_reg_wr_en,
  input  reg_idx_t wb_reg_wr_idx,
  input  word_t    wb_reg_wr_data,
  output id_ex_t   id_packet
);

  reg_idx_t ra_idx, rb_idx, rc_idx;
  word_t    rega, regb;
  decode_t  dec;

  assign ra_idx = if_id.ir[25:21];
  assign rb_idx = if_id.ir[20:16];
  assign rc_idx = if_id.ir[4:0];

  regfile regf_0 (
    .clock   (clock),
    .rda_idx (ra_idx),
    .rdb_idx (rb_idx),
    .wr_en   (wb_reg_wr_en),
    .wr_idx  (wb_reg_wr_idx),
    .wr_data (wb_reg_wr_data),
    .rda_out (rega),
    .rdb_out (regb)
  );

  decoder decoder_0 (
    .inst          (if_id.ir),
    .valid_inst_in (if_id.valid),
    .dec           (dec)
  );

  always_comb begin
    id_packet.valid  = if_id.valid;
    id_packet.npc    = if_id.npc;
    id_packet.ir     = if_id.ir;
    id_packet.rega   = rega;
    id_packet.regb   = regb;
    id_packet.ra_idx = ra_idx;
    id_packet.rb_idx = rb_idx;
    id_packet.dec    = dec;
    unique case (dec.dest_select)
      DEST_IS_REGC: id_packet.dest_idx = rc_idx;
      DEST_IS_REGA: id_packet.dest_idx = ra_idx;
      default:      id_packet.dest_idx = ZERO_REG;
    endcase
  end

endmodule
