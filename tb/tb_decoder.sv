// tb_decoder: decodes one instruction of every kind in the subset and
// compares the whole control bundle with hand-written expectations; also
// checks that invalid slots and unknown encodings decode to nothing harmful.
module tb_decoder;
  import alpha_pkg::*;
  import alpha_tb_pkg::*;

  logic [31:0] inst;
  logic valid;
  decode_t dec;
  int checks = 0, failures = 0;

  decoder dut (.inst, .valid_inst_in(valid), .dec);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic decode_t none();
    decode_t d;
    d = '0;
    d.dest_select = DEST_NONE;
    return d;
  endfunction

  task automatic expect_dec(string name, logic [31:0] i, decode_t e);
    inst = i; valid = 1'b1; #1;
    checks++;
    if (dec !== e) begin
      failures++;
      $display("FAIL: %s %h: got %p expected %p", name, i, dec, e);
    end
  endtask

  function automatic decode_t oper(alu_func_e f, bit lit);
    decode_t d;
    d = none();
    d.opa_select = OPA_IS_REGA;
    d.opb_select = lit ? OPB_IS_ALU_IMM : OPB_IS_REGB;
    d.dest_select = DEST_IS_REGC;
    d.alu_func = f;
    d.uses_rega = 1'b1;
    d.uses_regb = !lit;
    return d;
  endfunction

  initial begin
    decode_t e;
    alu_func_e fl [16] = '{ALU_ADDQ, ALU_SUBQ, ALU_AND, ALU_BIC, ALU_BIS, ALU_ORNOT, ALU_EQV,
                           ALU_SRL, ALU_SLL, ALU_SRA, ALU_MULQ, ALU_CMPEQ, ALU_CMPLT,
                           ALU_CMPLE, ALU_CMPULT, ALU_CMPULE};
    for (int k = 0; k < 16; k++) begin
      logic [12:0] o;
      o = op_table(k);
      expect_dec($sformatf("op %0d reg", k), op_r(o[12:7], o[6:0], 1, 2, 3), oper(fl[k], 0));
      expect_dec($sformatf("op %0d lit", k), op_i(o[12:7], o[6:0], 1, 8'h5, 3), oper(fl[k], 1));
    end
    // lda / ldq / stq
    e = none(); e.opa_select = OPA_IS_MEM_DISP; e.opb_select = OPB_IS_REGB; e.alu_func = ALU_ADDQ;
    e.uses_regb = 1; e.dest_select = DEST_IS_REGA;
    expect_dec("lda", lda(3, 16'h1000, 31), e);
    e.rd_mem = 1;
    expect_dec("ldq", ldq(3, 16'h10, 2), e);
    e.rd_mem = 0; e.wr_mem = 1; e.dest_select = DEST_NONE; e.uses_rega = 1;
    expect_dec("stq", stq(3, 16'h10, 2), e);
    // br / bsr
    e = none(); e.opa_select = OPA_IS_NPC; e.opb_select = OPB_IS_BR_DISP; e.alu_func = ALU_ADDQ;
    e.dest_select = DEST_IS_REGA; e.uncond_branch = 1;
    expect_dec("br", br_f(6'h30, 31, 21'd4), e);
    expect_dec("bsr", br_f(6'h34, 26, 21'd4), e);
    // conditional branches
    e = none(); e.opa_select = OPA_IS_NPC; e.opb_select = OPB_IS_BR_DISP; e.alu_func = ALU_ADDQ;
    e.cond_branch = 1; e.uses_rega = 1;
    for (int c = 0; c < 8; c++) expect_dec($sformatf("bcond %0d", c), br_f(6'h38 + 6'(c), 3, 21'h1ffffa), e);
    // jumps
    e = none(); e.opa_select = OPA_IS_NOT3; e.opb_select = OPB_IS_REGB; e.alu_func = ALU_AND;
    e.dest_select = DEST_IS_REGA; e.uncond_branch = 1; e.uses_regb = 1;
    for (int h = 0; h < 4; h++) expect_dec($sformatf("jump hint %0d", h), jmp_f(2'(h), 26, 3), e);
    // halt and illegal
    e = none(); e.halt = 1;
    expect_dec("halt", HALT, e);
    e = none(); e.illegal = 1;
    expect_dec("call_pal 0", 32'h0, e);
    expect_dec("ldah (not in subset)", mem_f(6'h09, 1, 2, 16'h1), e);
    expect_dec("unknown INTA function", op_r(6'h10, 7'h7f, 1, 2, 3), e);
    expect_dec("unknown opcode", {6'h05, 26'd0}, e);
    // invalid slot
    inst = op_r(6'h10, 7'h20, 1, 2, 3); valid = 0; #1;
    checks++;
    if (dec !== none()) begin failures++; $display("FAIL: invalid slot decoded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
