// ex_stage: execute.
//
// First resolves each source operand through a forwarding mux: the value read
// in decode, the result waiting in EX/MEM, or the value being written back
// from MEM/WB, as chosen by the hazard unit. All forwarding ends here, so a
// store's data (regA) is forwarded in EX too even though it is used in MEM.
// Then the operand muxes feed the ALU:
//   opA: regA | sign-extended 16-bit memory displacement | NPC | ~3
//   opB: regB | zero-extended 8-bit literal | sign-extended 21-bit branch
//        displacement times 4
// and the branch-condition unit tests regA. take_branch is
// uncond_branch | (cond_branch & condition), gated by valid. The ALU result is
// the memory address, the branch/jump target or the arithmetic result.
// Muxes, ALU, brcond and the take-branch gate follow the execute stage of the
// design; the forwarding muxes are the hazard logic added to it.
// Combinational; the output is the next content of the EX/MEM register.
module ex_stage
  import alpha_pkg::*;
(
  input  id_ex_t   id_ex,
  input  fwd_sel_e fwd_a_sel,
  input  fwd_sel_e fwd_b_sel,
  input  word_t    ex_mem_fwd_data,
  input  word_t    mem_wb_fwd_data,
  output ex_mem_t  ex_packet
);

  word_t rega_fwd, regb_fwd, opa_mux_out, opb_mux_out, alu_result;
  word_t mem_disp, alu_imm, br_disp;
  logic  brcond_result;

  function automatic word_t fwd_mux(fwd_sel_e sel, word_t own, word_t exm, word_t mwb);
    unique case (sel)
      FWD_EX_MEM: return exm;
      FWD_MEM_WB: return mwb;
      default:    return own;
    endcase
  endfunction

  assign rega_fwd = fwd_mux(fwd_a_sel, id_ex.rega, ex_mem_fwd_data, mem_wb_fwd_data);
  assign regb_fwd = fwd_mux(fwd_b_sel, id_ex.regb, ex_mem_fwd_data, mem_wb_fwd_data);

  assign mem_disp = {{48{id_ex.ir[15]}}, id_ex.ir[15:0]};
  assign alu_imm  = {56'd0, id_ex.ir[20:13]};
  assign br_disp  = {{41{id_ex.ir[20]}}, id_ex.ir[20:0], 2'b00};

  always_comb begin
    unique case (id_ex.dec.opa_select)
      OPA_IS_REGA:     opa_mux_out = rega_fwd;
      OPA_IS_MEM_DISP: opa_mux_out = mem_disp;
      OPA_IS_NPC:      opa_mux_out = id_ex.npc;
      OPA_IS_NOT3:     opa_mux_out = ~64'h3;
    endcase
    unique case (id_ex.dec.opb_select)
      OPB_IS_REGB:    opb_mux_out = regb_fwd;
      OPB_IS_ALU_IMM: opb_mux_out = alu_imm;
      OPB_IS_BR_DISP: opb_mux_out = br_disp;
      default:        opb_mux_out = 64'hbaad_beef_dead_beef;
    endcase
  end

  alu alu_0 (
    .opa      (opa_mux_out),
    .opb      (opb_mux_out),
    .alu_func (id_ex.dec.alu_func),
    .result   (alu_result)
  );

  brcond brcond_0 (
    .rega (rega_fwd),
    .func (id_ex.ir[28:26]),
    .cond (brcond_result)
  );

  always_comb begin
    ex_packet.valid       = id_ex.valid;
    ex_packet.npc         = id_ex.npc;
    ex_packet.ir          = id_ex.ir;
    ex_packet.rega        = rega_fwd;
    ex_packet.alu_result  = alu_result;
    ex_packet.take_branch = id_ex.valid &
                            (id_ex.dec.uncond_branch | (id_ex.dec.cond_branch & brcond_result));
    ex_packet.dest_idx    = id_ex.dest_idx;
    ex_packet.rd_mem      = id_ex.dec.rd_mem;
    ex_packet.wr_mem      = id_ex.dec.wr_mem;
    ex_packet.halt        = id_ex.dec.halt;
    ex_packet.illegal     = id_ex.dec.illegal;
  end

endmodule
