// tb_mem_stage: checks the bus command for loads, stores, other instructions
// and bubbles, the address/data driven, and the load-data/ALU-result mux.
module tb_mem_stage;
  import alpha_pkg::*;

  ex_mem_t em;
  word_t dmem, addr, data;
  bus_cmd_e cmd;
  mem_wb_t mw;
  int checks = 0, failures = 0;

  mem_stage dut (.ex_mem(em), .Dmem2proc_data(dmem), .proc2Dmem_command(cmd),
                 .proc2Dmem_addr(addr), .proc2Dmem_data(data), .mem_packet(mw));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      int kind;
      bus_cmd_e expc;
      kind = $urandom_range(0, 2);          // 0 other, 1 load, 2 store
      em = '0;
      em.valid = $urandom_range(0, 3) != 0;
      em.rd_mem = (kind == 1);
      em.wr_mem = (kind == 2);
      em.alu_result = {$urandom, $urandom};
      em.rega = {$urandom, $urandom};
      em.npc = {$urandom, $urandom};
      em.dest_idx = 5'($urandom);
      em.take_branch = $urandom_range(0, 1);
      dmem = {$urandom, $urandom};
      #1;
      expc = !em.valid ? BUS_NONE : (kind == 1) ? BUS_LOAD : (kind == 2) ? BUS_STORE : BUS_NONE;
      checks++;
      if (cmd !== expc || addr !== em.alu_result || data !== em.rega) begin
        failures++; $display("FAIL: request kind %0d valid %0d cmd %0d", kind, em.valid, cmd);
      end
      checks++;
      if (mw.result !== ((kind == 1) ? dmem : em.alu_result) || mw.valid !== em.valid ||
          mw.npc !== em.npc || mw.dest_idx !== em.dest_idx || mw.take_branch !== em.take_branch) begin
        failures++; $display("FAIL: result kind %0d", kind);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
