// tb_ex_stage: drives the execute stage with operate, lda, stq, branch and
// jump instructions, each operand coming from the ID/EX value or from one of
// the two forwarding sources at random, and compares the ALU result, the
// forwarded store data and the take-branch decision with values computed by
// the reference model's arithmetic.
module tb_ex_stage;
  import alpha_pkg::*;
  import alpha_tb_pkg::*;

  id_ex_t ie;
  fwd_sel_e fa, fb;
  word_t exm, mwb;
  ex_mem_t ep;
  int checks = 0, failures = 0;

  ex_stage dut (.id_ex(ie), .fwd_a_sel(fa), .fwd_b_sel(fb), .ex_mem_fwd_data(exm),
                .mem_wb_fwd_data(mwb), .ex_packet(ep));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic word_t src(fwd_sel_e s, word_t own);
    return (s == FWD_EX_MEM) ? exm : (s == FWD_MEM_WB) ? mwb : own;
  endfunction

  function automatic logic cond_of(logic [2:0] f, word_t v);
    longint sv;
    sv = longint'(v);
    case (f)
      0: return !v[0];  1: return sv == 0; 2: return sv < 0;  3: return sv <= 0;
      4: return v[0];   5: return sv != 0; 6: return sv >= 0; default: return sv > 0;
    endcase
  endfunction

  alu_func_e fl [16] = '{ALU_ADDQ, ALU_SUBQ, ALU_AND, ALU_BIC, ALU_BIS, ALU_ORNOT, ALU_EQV,
                         ALU_SRL, ALU_SLL, ALU_SRA, ALU_MULQ, ALU_CMPEQ, ALU_CMPLT,
                         ALU_CMPLE, ALU_CMPULT, ALU_CMPULE};

  initial begin
    for (int n = 0; n < 400; n++) begin
      int kind;
      word_t a, b, expv;
      ie = '0;
      ie.valid = 1'b1;
      ie.npc = {$urandom, $urandom[31:2], 2'b00};
      ie.rega = {$urandom, $urandom};
      ie.regb = (n % 4 == 0) ? 64'($urandom_range(0, 63)) : {$urandom, $urandom};
      ie.dest_idx = 5'($urandom);
      exm = {$urandom, $urandom}; mwb = {$urandom, $urandom};
      fa = fwd_sel_e'($urandom_range(0, 2)); fb = fwd_sel_e'($urandom_range(0, 2));
      a = src(fa, ie.rega); b = src(fb, ie.regb);
      kind = $urandom_range(0, 5);
      case (kind)
        0, 1: begin   // operate, register or literal
          logic [12:0] o;
          int k;
          k = $urandom_range(0, 15);
          o = op_table(k);
          ie.ir = (kind == 0) ? op_r(o[12:7], o[6:0], 1, 2, 3) : op_i(o[12:7], o[6:0], 1, 8'($urandom), 3);
          ie.dec.opa_select = OPA_IS_REGA;
          ie.dec.opb_select = (kind == 0) ? OPB_IS_REGB : OPB_IS_ALU_IMM;
          ie.dec.alu_func = fl[k];
          #1;
          expv = alpha_iss::alu(o[12:7], o[6:0], a, (kind == 0) ? b : {56'd0, ie.ir[20:13]});
          check(ep.alu_result == expv && !ep.take_branch, $sformatf("operate %s", fl[k].name()));
        end
        2: begin      // stq: address from rb, store data forwarded in EX
          ie.ir = stq(1, 16'($urandom), 2);
          ie.dec.opa_select = OPA_IS_MEM_DISP; ie.dec.opb_select = OPB_IS_REGB;
          ie.dec.alu_func = ALU_ADDQ; ie.dec.wr_mem = 1;
          #1;
          check(ep.alu_result == b + {{48{ie.ir[15]}}, ie.ir[15:0]} && ep.rega == a && ep.wr_mem,
                "stq address and data");
        end
        3: begin      // conditional branch
          logic [2:0] c;
          c = 3'($urandom);
          ie.ir = br_f(6'h38 + 6'(c), 1, 21'($urandom));
          ie.dec.opa_select = OPA_IS_NPC; ie.dec.opb_select = OPB_IS_BR_DISP;
          ie.dec.alu_func = ALU_ADDQ; ie.dec.cond_branch = 1;
          if (n % 5 == 0) ie.rega = 0;
          a = src(fa, ie.rega);
          #1;
          check(ep.alu_result == ie.npc + {{41{ie.ir[20]}}, ie.ir[20:0], 2'b00} &&
                ep.take_branch == cond_of(c, a), $sformatf("branch cond %0d", c));
        end
        4: begin      // jump
          ie.ir = jmp_f(2'($urandom), 26, 2);
          ie.dec.opa_select = OPA_IS_NOT3; ie.dec.opb_select = OPB_IS_REGB;
          ie.dec.alu_func = ALU_AND; ie.dec.uncond_branch = 1;
          ie.valid = $urandom_range(0, 3) != 0;
          #1;
          check(ep.alu_result == (b & ~64'h3) && ep.take_branch == ie.valid, "jump target");
        end
        default: begin // lda
          ie.ir = lda(1, 16'($urandom), 2);
          ie.dec.opa_select = OPA_IS_MEM_DISP; ie.dec.opb_select = OPB_IS_REGB;
          ie.dec.alu_func = ALU_ADDQ;
          #1;
          check(ep.alu_result == b + {{48{ie.ir[15]}}, ie.ir[15:0]}, "lda");
        end
      endcase
      check(ep.dest_idx == ie.dest_idx && ep.npc == ie.npc && ep.valid == ie.valid, "pass-through fields");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
