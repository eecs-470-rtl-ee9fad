// decoder: instruction decoder for the Alpha subset run by the pipeline.
//
// Maps a 32-bit instruction to the control bundle decode_t:
//   * operate format (opcodes 0x10-0x13): opA = regA, opB = regB or the 8-bit
//     zero-extended literal when bit 12 is set, destination rc;
//   * lda / ldq / stq: opA = sign-extended 16-bit displacement, opB = regB
//     (base), ALU adds; ldq reads and stq writes memory; lda and ldq write ra;
//   * br / bsr: opA = NPC, opB = branch displacement, unconditional, link in ra;
//   * conditional branches (0x38-0x3f): same target, condition on regA, no dest;
//   * jmp / jsr / ret / jsr_coroutine (0x1a): opA = ~3, opB = regB, ALU ands,
//     unconditional, link in ra;
//   * call_pal 0x555 is halt; every other encoding is flagged illegal and made
//     harmless (no destination, no memory access).
// uses_rega/uses_regb say which source registers the instruction really reads;
// the hazard unit uses them instead of the operand selects.
// The instruction list and the select names follow the pipeline's description;
// the bit encodings are the standard Alpha ones. Combinational.
module decoder
  import alpha_pkg::*;
(
  input  logic [31:0] inst,
  input  logic        valid_inst_in,
  output decode_t     dec
);

  logic [5:0] opcode;
  logic [6:0] fn;
  assign opcode = inst[31:26];
  assign fn     = inst[11:5];

  always_comb begin
    dec = '{opa_select:    OPA_IS_REGA,
            opb_select:    OPB_IS_REGB,
            dest_select:   DEST_NONE,
            alu_func:      ALU_ADDQ,
            rd_mem:        1'b0,
            wr_mem:        1'b0,
            cond_branch:   1'b0,
            uncond_branch: 1'b0,
            uses_rega:     1'b0,
            uses_regb:     1'b0,
            halt:          1'b0,
            illegal:       1'b0};
    if (valid_inst_in) begin
      unique case (opcode)
        OP_PAL: begin
          if (inst[25:0] == PAL_HALT) dec.halt = 1'b1;
          else                        dec.illegal = 1'b1;
        end
        OP_LDA, OP_LDQ, OP_STQ: begin
          dec.opa_select = OPA_IS_MEM_DISP;
          dec.opb_select = OPB_IS_REGB;
          dec.alu_func   = ALU_ADDQ;
          dec.uses_regb  = 1'b1;
          if (opcode == OP_STQ) begin
            dec.wr_mem    = 1'b1;
            dec.uses_rega = 1'b1;
          end else begin
            dec.dest_select = DEST_IS_REGA;
            dec.rd_mem      = (opcode == OP_LDQ);
          end
        end
        OP_INTA, OP_INTL, OP_INTS, OP_INTM: begin
          dec.opa_select  = OPA_IS_REGA;
          dec.opb_select  = inst[12] ? OPB_IS_ALU_IMM : OPB_IS_REGB;
          dec.dest_select = DEST_IS_REGC;
          dec.uses_rega   = 1'b1;
          dec.uses_regb   = ~inst[12];
          case ({opcode[1:0], fn})
            {2'b00, FN_ADDQ}:   dec.alu_func = ALU_ADDQ;
            {2'b00, FN_SUBQ}:   dec.alu_func = ALU_SUBQ;
            {2'b00, FN_CMPEQ}:  dec.alu_func = ALU_CMPEQ;
            {2'b00, FN_CMPLT}:  dec.alu_func = ALU_CMPLT;
            {2'b00, FN_CMPLE}:  dec.alu_func = ALU_CMPLE;
            {2'b00, FN_CMPULT}: dec.alu_func = ALU_CMPULT;
            {2'b00, FN_CMPULE}: dec.alu_func = ALU_CMPULE;
            {2'b01, FN_AND}:    dec.alu_func = ALU_AND;
            {2'b01, FN_BIC}:    dec.alu_func = ALU_BIC;
            {2'b01, FN_BIS}:    dec.alu_func = ALU_BIS;
            {2'b01, FN_ORNOT}:  dec.alu_func = ALU_ORNOT;
            {2'b01, FN_EQV}:    dec.alu_func = ALU_EQV;
            {2'b10, FN_SRL}:    dec.alu_func = ALU_SRL;
            {2'b10, FN_SLL}:    dec.alu_func = ALU_SLL;
            {2'b10, FN_SRA}:    dec.alu_func = ALU_SRA;
            {2'b11, FN_MULQ}:   dec.alu_func = ALU_MULQ;
            default: begin
              dec.illegal     = 1'b1;
              dec.dest_select = DEST_NONE;
              dec.uses_rega   = 1'b0;
              dec.uses_regb   = 1'b0;
            end
          endcase
        end
        OP_JSR: begin
          dec.opa_select    = OPA_IS_NOT3;
          dec.opb_select    = OPB_IS_REGB;
          dec.alu_func      = ALU_AND;
          dec.dest_select   = DEST_IS_REGA;
          dec.uncond_branch = 1'b1;
          dec.uses_regb     = 1'b1;
        end
        OP_BR, OP_BSR: begin
          dec.opa_select    = OPA_IS_NPC;
          dec.opb_select    = OPB_IS_BR_DISP;
          dec.alu_func      = ALU_ADDQ;
          dec.dest_select   = DEST_IS_REGA;
          dec.uncond_branch = 1'b1;
        end
        default: begin
          if (opcode[5:3] == OP_BLBC[5:3]) begin
            dec.opa_select  = OPA_IS_NPC;
            dec.opb_select  = OPB_IS_BR_DISP;
            dec.alu_func    = ALU_ADDQ;
            dec.cond_branch = 1'b1;
            dec.uses_rega   = 1'b1;
          end else begin
            dec.illegal = 1'b1;
          end
        end
      endcase
    end
  end

endmodule
