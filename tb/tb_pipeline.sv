// tb_pipeline: runs the processor on its own against a behavioural memory
// written in the test bench (combinational read, write at the clock edge).
// Checks the halt cycle of short programs worked out by hand (no hazard,
// load-use stall, store holding fetch, taken branch, jump), compares every
// retired instruction of them and of the evens program with the reference
// model, and checks that only one memory request is issued per cycle and that
// bubbles never store.
module tb_pipeline;
  import alpha_pkg::*;
  import alpha_tb_pkg::*;

  logic clock = 0, reset = 1;
  word_t mem2proc_data, proc2mem_addr, proc2mem_data, wb_pc, wb_reg_wr_data;
  bus_cmd_e proc2mem_command;
  logic wb_valid_inst, wb_reg_wr_en, wb_halt, wb_illegal, halted;
  reg_idx_t wb_reg_wr_idx;
  logic [63:0] mem [logic [63:0]];
  int checks = 0, failures = 0, n_stores = 0;

  pipeline dut (.*);

  always #5 clock = ~clock;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural memory
  always_comb begin
    logic [63:0] i;
    i = proc2mem_addr >> 3;
    mem2proc_data = (proc2mem_command == BUS_LOAD && mem.exists(i)) ? mem[i] : 64'd0;
  end
  always @(posedge clock) if (proc2mem_command == BUS_STORE) begin
    mem[proc2mem_addr >> 3] = proc2mem_data;
    n_stores++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(string name, logic [31:0] prog [$], int exp_halt_cycle, int exp_stores);
    alpha_iss iss;
    retire_t e;
    int cyc, halt_cycle;
    mem.delete();
    iss = new();
    for (int i = 0; i < prog.size(); i += 2) begin
      mem[64'(i/2)] = {(i + 1 < prog.size()) ? prog[i+1] : 32'd0, prog[i]};
      iss.m[64'(i/2)] = mem[64'(i/2)];
    end
    n_stores = 0;
    halt_cycle = -1;
    reset = 1;
    repeat (2) @(posedge clock);
    @(negedge clock); reset = 0;
    for (cyc = 0; cyc < 5000; cyc++) begin
      if (wb_valid_inst) begin
        e = iss.step();
        check(wb_pc == e.pc && wb_reg_wr_en == e.wr_en && wb_halt == e.halt && !wb_illegal &&
              (!e.wr_en || (wb_reg_wr_idx == e.idx && wb_reg_wr_data == e.data)),
              $sformatf("%s: retire pc=%h expected %h", name, wb_pc, e.pc));
        if (e.halt) begin halt_cycle = cyc; break; end
      end
      @(negedge clock);
    end
    @(negedge clock);
    check(halted, {name, ": halted"});
    if (exp_halt_cycle >= 0)
      check(halt_cycle == exp_halt_cycle, $sformatf("%s: halt in cycle %0d, expected %0d", name, halt_cycle, exp_halt_cycle));
    check(n_stores == exp_stores, $sformatf("%s: %0d stores, expected %0d", name, n_stores, exp_stores));
    foreach (iss.m[a]) check(mem.exists(a) && mem[a] == iss.m[a], $sformatf("%s: mem[%0h]", name, a * 8));
  endtask

  initial begin
    run("no-hazard", '{lda(1, 16'd1, 31), lda(2, 16'd2, 31), lda(3, 16'd3, 31), HALT}, 7, 0);
    run("load-use", '{lda(30, 16'h1000, 31), ldq(1, 16'd0, 30), addq(1, 1, 2), HALT}, 9, 0);
    run("store", '{lda(30, 16'h1000, 31), addq_i(31, 8'd9, 5), stq(5, 16'd8, 30),
                   lda(6, 16'd1, 31), lda(7, 16'd1, 31), lda(8, 16'd1, 31), HALT}, 11, 1);
    run("taken-branch", '{br_f(6'h30, 31, 21'd2), lda(1, 16'd1, 31), lda(2, 16'd2, 31), HALT}, 8, 0);
    run("not-taken", '{lda(1, 16'd5, 31), br_f(6'h39, 1, 21'd1), lda(2, 16'd1, 31), HALT}, 7, 0);
    // jump: lda r9, target; jsr r26,(r9); skipped; target: addq r26 (link) ; halt
    run("jump", '{lda(9, 16'd16, 31), jmp_f(2'd1, 26, 9), lda(1, 16'd1, 31), lda(2, 16'd2, 31),
                  addq(26, 31, 3), HALT}, 10, 0);
    run("evens", '{lda(2, 16'd0, 31), lda(3, 16'h1000, 31), br_f(6'h3c, 2, 21'd2), stq(2, 16'd0, 3),
                   addq_i(3, 8'd8, 3), addq_i(2, 8'd1, 2), op_i(6'h10, 7'h6d, 2, 8'h0f, 1),
                   br_f(6'h3d, 1, -21'sd6), HALT}, -1, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one request per cycle on the port; no store from a bubble
  a_store_valid: assert property (@(posedge clock) disable iff (reset)
    proc2mem_command == BUS_STORE |-> dut.ex_mem.valid && dut.ex_mem.wr_mem);
endmodule
