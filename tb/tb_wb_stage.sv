// tb_wb_stage: checks the link-value/result mux and the write enable.
module tb_wb_stage;
  import alpha_pkg::*;

  mem_wb_t mw;
  logic en;
  reg_idx_t idx;
  word_t data;
  int checks = 0, failures = 0;

  wb_stage dut (.mem_wb(mw), .reg_wr_en_out(en), .reg_wr_idx_out(idx), .reg_wr_data_out(data));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      mw = '0;
      mw.valid = $urandom_range(0, 3) != 0;
      mw.npc = {$urandom, $urandom};
      mw.result = {$urandom, $urandom};
      mw.take_branch = $urandom_range(0, 1);
      mw.dest_idx = ($urandom_range(0, 3) == 0) ? 5'd31 : 5'($urandom);
      #1;
      checks++;
      if (data !== (mw.take_branch ? mw.npc : mw.result) || idx !== mw.dest_idx ||
          en !== (mw.valid && mw.dest_idx != 31)) begin
        failures++;
        $display("FAIL: v=%0d br=%0d d=%0d -> en=%0d data=%h", mw.valid, mw.take_branch, mw.dest_idx, en, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
