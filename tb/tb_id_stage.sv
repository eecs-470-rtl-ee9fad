// tb_id_stage: fills the register file through the writeback port, then
// decodes instructions and checks the register values read, the register
// indices and the destination chosen (rc, ra or $r31), and write-through.
module tb_id_stage;
  import alpha_pkg::*;
  import alpha_tb_pkg::*;

  logic clock = 0;
  if_id_t if_id;
  logic we;
  reg_idx_t widx;
  word_t wdata;
  id_ex_t pkt;
  word_t model [32];
  int checks = 0, failures = 0;

  id_stage dut (.clock, .if_id, .wb_reg_wr_en(we), .wb_reg_wr_idx(widx), .wb_reg_wr_data(wdata),
                .id_packet(pkt));

  always #5 clock = ~clock;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic present(logic [31:0] ir, word_t npc);
    if_id = '{valid: 1'b1, npc: npc, ir: ir}; #1;
  endtask

  initial begin
    we = 0; widx = 0; wdata = 0; if_id = '{valid: 1'b0, npc: '0, ir: NOOP_INST};
    for (int i = 0; i < 31; i++) begin
      @(negedge clock);
      we = 1; widx = reg_idx_t'(i); wdata = {$urandom, $urandom}; model[i] = wdata;
    end
    @(negedge clock); we = 0; model[31] = 0;
    for (int n = 0; n < 100; n++) begin
      reg_idx_t a, b, c;
      a = 5'($urandom); b = 5'($urandom); c = 5'($urandom);
      present(op_r(6'h10, 7'h20, a, b, c), 64'h40);
      check(pkt.rega == model[a] && pkt.regb == model[b] && pkt.ra_idx == a && pkt.rb_idx == b &&
            pkt.dest_idx == c && pkt.valid && pkt.npc == 64'h40 && pkt.dec.alu_func == ALU_ADDQ,
            "addq operands and rc destination");
      present(lda(a, 16'h10, b), 64'h44);
      check(pkt.dest_idx == a && pkt.regb == model[b], "lda writes ra");
      present(stq(a, 16'h10, b), 64'h48);
      check(pkt.dest_idx == ZERO_REG && pkt.rega == model[a] && pkt.dec.wr_mem, "stq has no destination");
    end
    // write-through: the value written this cycle is read this cycle
    @(negedge clock);
    present(op_r(6'h10, 7'h20, 4, 5, 6), 64'h50);
    we = 1; widx = 4; wdata = 64'habcd; #1;
    check(pkt.rega == 64'habcd, "write-through from writeback");
    @(negedge clock); we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
