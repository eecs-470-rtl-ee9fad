// tb_hazard_unit: directed and random cases for forwarding priority, $r31,
// invalid producers, the load-use stall (only on registers really read),
// the fetch hold for a data access, halt, and the branch flush overriding
// every stall. Expected values come from a separate model of the rules.
module tb_hazard_unit;
  import alpha_pkg::*;

  logic if_id_valid, id_uses_rega, id_uses_regb, id_ex_valid, id_ex_rd_mem;
  logic ex_mem_valid, ex_mem_take_branch, mem_used_by_mem, mem_wb_valid, halt_in_flight;
  reg_idx_t id_ra_idx, id_rb_idx, id_ex_dest_idx, id_ex_ra_idx, id_ex_rb_idx;
  reg_idx_t ex_mem_dest_idx, mem_wb_dest_idx;
  fwd_sel_e fwd_a_sel, fwd_b_sel;
  logic load_use_stall, fetch_hold, flush, pc_enable, fetch_valid;
  logic if_id_enable, if_id_bubble, id_ex_bubble, ex_mem_bubble;
  int checks = 0, failures = 0;

  hazard_unit dut (.*);

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

  function automatic fwd_sel_e model_fwd(reg_idx_t s);
    if (s == 31) return FWD_NONE;
    if (ex_mem_valid && ex_mem_dest_idx == s) return FWD_EX_MEM;
    if (mem_wb_valid && mem_wb_dest_idx == s) return FWD_MEM_WB;
    return FWD_NONE;
  endfunction

  task automatic compare(string what);
    logic st, fl, fv;
    #1;
    st = if_id_valid && id_ex_valid && id_ex_rd_mem && id_ex_dest_idx != 31 &&
         ((id_uses_rega && id_ra_idx == id_ex_dest_idx) || (id_uses_regb && id_rb_idx == id_ex_dest_idx));
    fl = ex_mem_take_branch;
    fv = !mem_used_by_mem && !halt_in_flight;
    check(fwd_a_sel == model_fwd(id_ex_ra_idx) && fwd_b_sel == model_fwd(id_ex_rb_idx), {what, ": forwarding"});
    check(load_use_stall == st, {what, ": stall"});
    check(flush == fl && if_id_bubble == fl && ex_mem_bubble == fl && id_ex_bubble == (fl || st), {what, ": bubbles"});
    check(pc_enable == (fl || (fv && !st)) && if_id_enable == (fl || !st) && fetch_valid == fv &&
          fetch_hold == mem_used_by_mem, {what, ": enables"});
  endtask

  task automatic clear();
    {if_id_valid, id_uses_rega, id_uses_regb, id_ex_valid, id_ex_rd_mem, ex_mem_valid,
     ex_mem_take_branch, mem_used_by_mem, mem_wb_valid, halt_in_flight} = '0;
    {id_ra_idx, id_rb_idx, id_ex_dest_idx, id_ex_ra_idx, id_ex_rb_idx, ex_mem_dest_idx, mem_wb_dest_idx} = '1;
  endtask

  initial begin
    // EX/MEM has priority over MEM/WB for the same register
    clear(); ex_mem_valid = 1; mem_wb_valid = 1; ex_mem_dest_idx = 4; mem_wb_dest_idx = 4;
    id_ex_ra_idx = 4; id_ex_rb_idx = 4; #1;
    check(fwd_a_sel == FWD_EX_MEM && fwd_b_sel == FWD_EX_MEM, "EX/MEM wins");
    ex_mem_valid = 0; #1;
    check(fwd_a_sel == FWD_MEM_WB, "MEM/WB when EX/MEM is a bubble");
    ex_mem_dest_idx = 31; mem_wb_dest_idx = 31; id_ex_ra_idx = 31; ex_mem_valid = 1; #1;
    check(fwd_a_sel == FWD_NONE, "never forward $r31");
    // load-use stall only on a register actually read
    clear(); if_id_valid = 1; id_ex_valid = 1; id_ex_rd_mem = 1; id_ex_dest_idx = 7;
    id_ra_idx = 7; id_uses_rega = 0; id_uses_regb = 1; id_rb_idx = 2; #1;
    check(!load_use_stall && pc_enable, "no stall when ra is not read");
    id_uses_rega = 1; #1;
    check(load_use_stall && !pc_enable && !if_id_enable && id_ex_bubble, "load-use stall");
    ex_mem_take_branch = 1; #1;
    check(pc_enable && if_id_enable && if_id_bubble && id_ex_bubble && ex_mem_bubble, "flush beats stall");
    clear(); mem_used_by_mem = 1; #1;
    check(!pc_enable && !fetch_valid && if_id_enable, "fetch waits for the data access");
    clear(); halt_in_flight = 1; #1;
    check(!pc_enable && !fetch_valid, "no fetch after halt");
    for (int n = 0; n < 2000; n++) begin
      {if_id_valid, id_uses_rega, id_uses_regb, id_ex_valid, id_ex_rd_mem, ex_mem_valid,
       mem_used_by_mem, mem_wb_valid} = 8'($urandom);
      ex_mem_take_branch = ($urandom_range(0, 7) == 0);
      halt_in_flight = ($urandom_range(0, 7) == 0);
      id_ra_idx = 5'($urandom_range(29, 31)); id_rb_idx = 5'($urandom_range(29, 31));
      id_ex_dest_idx = 5'($urandom_range(29, 31)); id_ex_ra_idx = 5'($urandom_range(29, 31));
      id_ex_rb_idx = 5'($urandom_range(29, 31)); ex_mem_dest_idx = 5'($urandom_range(29, 31));
      mem_wb_dest_idx = 5'($urandom_range(29, 31));
      compare($sformatf("random %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
