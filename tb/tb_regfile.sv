// tb_regfile: writes random values, reads both ports and compares with a
// model; checks that $r31 reads zero and ignores writes, that a disabled write
// changes nothing, and that a read of the register being written returns the
// new value in the same cycle, both directed and in 400 random cycles.
module tb_regfile;
  import alpha_pkg::*;

  logic clock = 0;
  reg_idx_t rda_idx, rdb_idx, wr_idx;
  logic wr_en;
  word_t wr_data, rda_out, rdb_out;
  word_t model [32];
  int checks = 0, failures = 0;

  regfile dut (.clock, .rda_idx, .rdb_idx, .wr_en, .wr_idx, .wr_data, .rda_out, .rdb_out);

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

  task automatic write(reg_idx_t i, word_t d, logic en = 1'b1);
    @(negedge clock);
    wr_en = en; wr_idx = i; wr_data = d;
    if (en && i != 31) model[i] = d;
    @(posedge clock); #1;
    wr_en = 1'b0;
  endtask

  initial begin
    wr_en = 0; wr_idx = 0; wr_data = 0; rda_idx = 0; rdb_idx = 0;
    for (int i = 0; i < 32; i++) write(reg_idx_t'(i), {$urandom, $urandom});
    model[31] = '0;
    write(31, 64'h1234);
    for (int i = 0; i < 32; i++) begin
      rda_idx = reg_idx_t'(i); rdb_idx = reg_idx_t'(31 - i); #1;
      check(rda_out == model[i] && rdb_out == model[31 - i], $sformatf("read %0d/%0d", i, 31 - i));
    end
    // disabled write
    write(5, 64'hdead, 1'b0);
    rda_idx = 5; #1;
    check(rda_out == model[5], "disabled write changed r5");
    // write-through in the same cycle
    @(negedge clock);
    wr_en = 1; wr_idx = 7; wr_data = 64'hfeed_f00d; rda_idx = 7; rdb_idx = 8; #1;
    check(rda_out == 64'hfeed_f00d && rdb_out == model[8], "write-through");
    wr_idx = 31; rda_idx = 31; #1;
    check(rda_out == 0, "write-through to r31 must read zero");
    @(posedge clock); #1;
    for (int n = 0; n < 400; n++) begin
      // random write and random reads in the same cycle: a read of the
      // register being written must already see the new value
      @(negedge clock);
      wr_en = ($urandom % 4) != 0;
      wr_idx = reg_idx_t'($urandom_range(0, 31)); wr_data = {$urandom, $urandom};
      rda_idx = ($urandom % 3 == 0) ? wr_idx : reg_idx_t'($urandom_range(0, 31));
      rdb_idx = ($urandom % 3 == 0) ? wr_idx : reg_idx_t'($urandom_range(0, 31));
      #1;
      check(rda_out == ((wr_en && rda_idx == wr_idx && wr_idx != 31) ? wr_data : model[rda_idx]) &&
            rdb_out == ((wr_en && rdb_idx == wr_idx && wr_idx != 31) ? wr_data : model[rdb_idx]),
            $sformatf("random read %0d", n));
      if (wr_en && wr_idx != 31) model[wr_idx] = wr_data;
      @(posedge clock); #1;
    end
    wr_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
