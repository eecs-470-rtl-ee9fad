// tb_if_stage: runs the fetch stage against a small instruction memory model
// and checks sequential fetch (+4 per cycle, upper/lower word by PC[2]), PC
// hold when pc_enable is low, redirect to the branch target, and the invalid
// no-op when fetch_valid is low. A random phase then drives pc_enable,
// redirects, fetch_valid and reset for 2000 cycles and compares every output
// with a reference PC kept in the bench.
module tb_if_stage;
  import alpha_pkg::*;

  logic clock = 0, reset = 1, pc_enable, take, fetch_valid, valid;
  word_t target, imem, iaddr, pc, npc;
  logic [31:0] ir;
  int checks = 0, failures = 0;

  if_stage dut (.clock, .reset, .pc_enable, .ex_mem_take_branch(take), .ex_mem_target_pc(target),
                .Imem2proc_data(imem), .fetch_valid, .proc2Imem_addr(iaddr), .if_PC_out(pc),
                .if_NPC_out(npc), .if_IR_out(ir), .if_valid_inst_out(valid));

  always #5 clock = ~clock;
  // memory model: the word at byte address a holds instruction value a
  assign imem = {iaddr[31:0] + 32'd4, iaddr[31:0]};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (pc=%h ir=%h)", what, pc, ir); end
  endtask

  initial begin
    pc_enable = 1; take = 0; fetch_valid = 1; target = 0;
    repeat (2) @(posedge clock);
    @(negedge clock); reset = 0; #1;
    for (int i = 0; i < 6; i++) begin
      check(pc == 64'(4 * i) && ir == 32'(4 * i) && npc == pc + 4 && valid &&
            iaddr == {pc[63:3], 3'b0}, $sformatf("sequential %0d", i));
      @(negedge clock);
    end
    pc_enable = 0;
    repeat (3) @(negedge clock);
    check(pc == 24, "PC must hold");
    fetch_valid = 0; #1;
    check(!valid && ir == NOOP_INST, "fetch_valid low gives an invalid no-op");
    fetch_valid = 1; pc_enable = 1; take = 1; target = 64'h104;
    @(negedge clock); take = 0; #1;
    check(pc == 64'h104 && ir == 32'h104, "redirect to target");
    @(negedge clock);
    check(pc == 64'h108 && ir == 32'h108, "continue after target");
    // random phase against a reference PC
    begin
      word_t ref_pc = 64'h108;
      for (int i = 0; i < 2000; i++) begin
        pc_enable   = ($urandom % 4) != 0;
        take        = ($urandom % 5) == 0;
        target      = {48'd0, 14'($urandom), 2'b00};
        fetch_valid = ($urandom % 3) != 0;
        reset       = ($urandom % 97) == 0;
        #1;
        check(pc == ref_pc && npc == ref_pc + 4 && iaddr == {ref_pc[63:3], 3'b0} &&
              valid == fetch_valid &&
              ir == (fetch_valid ? 32'(ref_pc) : NOOP_INST), $sformatf("random %0d", i));
        if (reset)          ref_pc = 0;
        else if (pc_enable) ref_pc = take ? target : ref_pc + 4;
        @(negedge clock);
      end
      reset = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
