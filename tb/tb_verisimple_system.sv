// tb_verisimple_system: end-to-end test of the whole machine at its default
// size.
//
// Loads programs into the unified memory, releases reset and compares every
// instruction retired in writeback (PC, destination, value) with the
// instruction-set reference model alpha_iss, then compares the data memory.
// Programs:
//   1. short directed programs whose halt cycle is worked out by hand: no
//      hazard (CPI 1), forwarding chain, load-use stall (+1) with the load's
//      memory access holding fetch (+1), a store holding fetch (+1), and a
//      taken branch (3-cycle flush);
//   2. the "evens" program: stores 0,2,...,14 to 0x1000..0x1038. Its machine
//      words, its first 17 writeback records, the stored values and its 82
//      instructions are checked against known results, and it must take
//      fewer than 415 cycles, the count of the unpipelined machine that runs
//      one instruction at a time;
//   3. a directed program exercising every branch and jump kind;
//   4. random programs (operate, lda/ldq/stq, forward branches, jumps).
// Every hazard mechanism (load-use stall, EX/MEM and MEM/WB forwarding,
// register-file write-through, fetch held by a data access, branch flush,
// halt) is counted and must occur at least once.
module tb_verisimple_system;
  import alpha_pkg::*;
  import alpha_tb_pkg::*;

  localparam int WORDS = 65536 / 8;
  localparam int MAX_CYCLES = 400000;

  logic     clock = 1'b0;
  logic     reset = 1'b1;
  logic     wb_valid_inst, wb_reg_wr_en, halted, error;
  word_t    wb_pc, wb_reg_wr_data;
  reg_idx_t wb_reg_wr_idx;

  int checks = 0, failures = 0, total_cycles = 0;
  int n_load_use = 0, n_fwd_exmem = 0, n_fwd_memwb = 0, n_fetch_hold = 0;
  int n_flush = 0, n_rf_bypass = 0, n_halt = 0;

  verisimple_system dut (
    .clock, .reset, .wb_valid_inst, .wb_pc, .wb_reg_wr_en, .wb_reg_wr_idx,
    .wb_reg_wr_data, .halted, .error
  );

  always #5 clock = ~clock;

  initial begin
    repeat (MAX_CYCLES) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  always @(negedge clock) if (!reset) begin
    total_cycles++;
    if (dut.pipeline_0.load_use_stall) n_load_use++;
    if (dut.pipeline_0.id_ex.valid &&
        (dut.pipeline_0.fwd_a_sel == FWD_EX_MEM || dut.pipeline_0.fwd_b_sel == FWD_EX_MEM)) n_fwd_exmem++;
    if (dut.pipeline_0.id_ex.valid &&
        (dut.pipeline_0.fwd_a_sel == FWD_MEM_WB || dut.pipeline_0.fwd_b_sel == FWD_MEM_WB)) n_fwd_memwb++;
    if (dut.pipeline_0.fetch_hold && !dut.pipeline_0.halt_in_flight) n_fetch_hold++;
    if (dut.pipeline_0.flush) n_flush++;
    if (dut.pipeline_0.wb_wr_en && dut.pipeline_0.if_id.valid &&
        ((dut.pipeline_0.id_packet.dec.uses_rega && dut.pipeline_0.id_packet.ra_idx == dut.pipeline_0.wb_wr_idx) ||
         (dut.pipeline_0.id_packet.dec.uses_regb && dut.pipeline_0.id_packet.rb_idx == dut.pipeline_0.wb_wr_idx)))
      n_rf_bypass++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ program I/O
  logic [31:0] prog [$];
  logic [63:0] data_init [logic [63:0]];

  alpha_iss iss;

  task automatic load_program();
    for (int i = 0; i < WORDS; i++) dut.memory_0.mem[i] = '0;
    iss = new();
    for (int i = 0; i < prog.size(); i += 2) begin
      logic [63:0] w;
      w = {(i + 1 < prog.size()) ? prog[i+1] : 32'd0, prog[i]};
      dut.memory_0.mem[i/2] = w;
      iss.m[64'(i/2)] = w;
    end
    foreach (data_init[a]) begin
      dut.memory_0.mem[a] = data_init[a];
      iss.m[a] = data_init[a];
    end
  endtask

  // Runs the loaded program against the reference model. Returns the cycle
  // in which halt was in writeback (cycle 0 fetches address 0) and the number
  // of instructions retired before it. Records the trace in `trace`.
  retire_t trace [$];
  task automatic run(string name, output int halt_cycle, output int n_instr);
    retire_t e;
    int cyc;
    trace.delete();
    halt_cycle = -1; n_instr = 0;
    reset = 1'b1;
    repeat (2) @(posedge clock);
    @(negedge clock);
    reset = 1'b0;
    for (cyc = 0; cyc < 20000; cyc++) begin
      if (wb_valid_inst) begin
        e = iss.step();
        trace.push_back('{pc: wb_pc, wr_en: wb_reg_wr_en, idx: wb_reg_wr_idx,
                          data: wb_reg_wr_data, halt: e.halt});
        check(wb_pc == e.pc && wb_reg_wr_en == e.wr_en &&
              (!e.wr_en || (wb_reg_wr_idx == e.idx && wb_reg_wr_data == e.data)),
              $sformatf("%s: retire #%0d pc=%h wr=%0d r%0d=%h, expected pc=%h wr=%0d r%0d=%h",
                        name, n_instr, wb_pc, wb_reg_wr_en, wb_reg_wr_idx, wb_reg_wr_data,
                        e.pc, e.wr_en, e.idx, e.data));
        if (e.halt) begin
          halt_cycle = cyc;
          n_halt++;
          break;
        end
        n_instr++;
        if (wb_pc != e.pc) break;
      end
      @(negedge clock);
    end
    @(negedge clock);
    check(halted && !error, $sformatf("%s: halted=%0d error=%0d", name, halted, error));
    // data memory must match the reference model
    foreach (iss.m[a]) check(dut.memory_0.mem[a] == iss.m[a],
        $sformatf("%s: mem[%0h] = %h, expected %h", name, a*8, dut.memory_0.mem[a], iss.m[a]));
  endtask

  task automatic run_expect(string name, int exp_cycle);
    int hc, ni;
    load_program();
    run(name, hc, ni);
    check(hc == exp_cycle, $sformatf("%s: halt retired in cycle %0d, expected %0d", name, hc, exp_cycle));
  endtask

  // -------------------------------------------------------------- programs
  task automatic directed_timing();
    data_init.delete();
    data_init[64'h200] = 64'd5;   // address 0x1000
    // four independent instructions then halt: instruction k retires in cycle k+4
    prog = '{lda(1, 16'd1, 31), lda(2, 16'd2, 31), lda(3, 16'd3, 31), lda(4, 16'd4, 31), HALT};
    run_expect("no-hazard", 8);
    // dependent chain: forwarding from EX/MEM and MEM/WB, no stall
    prog = '{lda(1, 16'd7, 31), addq(1, 1, 2), addq(2, 1, 3), addq(3, 2, 4), HALT};
    run_expect("forward-chain", 8);
    // load-use: one stall cycle in ID plus one fetch cycle lost to the load
    prog = '{lda(30, 16'h1000, 31), ldq(1, 16'd0, 30), addq(1, 1, 2), HALT};
    run_expect("load-use", 9);
    // store: the fetch waits one cycle for the store's memory access
    prog = '{lda(30, 16'h1000, 31), addq_i(31, 8'd9, 5), stq(5, 16'd8, 30),
             lda(6, 16'd1, 31), lda(7, 16'd1, 31), lda(8, 16'd1, 31), HALT};
    run_expect("store-structural", 11);
    // taken branch resolved in MEM: three younger instructions flushed
    prog = '{br_f(6'h30, 31, 21'd2), lda(1, 16'd1, 31), lda(2, 16'd2, 31), HALT};
    run_expect("taken-branch", 8);   // 5 for br+halt, plus 3
  endtask

  task automatic evens();
    int hc, ni;
    logic [63:0] code [5];
    data_init.delete();
    prog = '{lda(2, 16'd0, 31),                 // 0x00 lda  $r2,0
             lda(3, 16'h1000, 31),              // 0x04 lda  $r3,data
             br_f(6'h3c, 2, 21'd2),             // 0x08 blbs $r2,loop2
             stq(2, 16'd0, 3),                  // 0x0c stq  $r2,0($r3)
             addq_i(3, 8'd8, 3),                // 0x10 addq $r3,0x8,$r3
             addq_i(2, 8'd1, 2),                // 0x14 addq $r2,0x1,$r2
             op_i(6'h10, 7'h6d, 2, 8'h0f, 1),   // 0x18 cmple $r2,0xf,$r1
             br_f(6'h3d, 1, -21'sd6),           // 0x1c bne  $r1,loop1
             HALT};                             // 0x20 call_pal 0x555
    load_program();
    code = '{64'h207f1000205f0000, 64'hb4430000f0400002, 64'h4040340240611403,
             64'hf43ffffa4041fda1, 64'h0000000000000555};
    for (int i = 0; i < 5; i++)
      check(dut.memory_0.mem[i] == code[i], $sformatf("evens: code word %0d = %h", i, dut.memory_0.mem[i]));
    run("evens", hc, ni);
    check(ni == 82, $sformatf("evens: %0d instructions retired, expected 82", ni));
    check(hc > 0 && hc + 1 < 415, $sformatf("evens: %0d cycles, not below 415", hc + 1));
    $display("evens: %0d cycles / %0d instrs", hc + 1, ni);
    begin
      // first writeback records: {pc, idx (31 = none), value}
      logic [63:0] exp_pc  [17] = '{'h0, 'h4, 'h8, 'hc, 'h10, 'h14, 'h18, 'h1c, 'h8,
                                     'h14, 'h18, 'h1c, 'h8, 'hc, 'h10, 'h14, 'h18};
      int          exp_idx [17] = '{2, 3, 31, 31, 3, 2, 1, 31, 31, 2, 1, 31, 31, 31, 3, 2, 1};
      logic [63:0] exp_val [17] = '{'h0, 'h1000, 0, 0, 'h1008, 'h1, 'h1, 0, 0,
                                     'h2, 'h1, 0, 0, 0, 'h1010, 'h3, 'h1};
      for (int i = 0; i < 17; i++)
        check(trace.size() > i && trace[i].pc == exp_pc[i] &&
              trace[i].wr_en == (exp_idx[i] != 31) &&
              (exp_idx[i] == 31 || (trace[i].idx == 5'(exp_idx[i]) && trace[i].data == exp_val[i])),
              $sformatf("evens: writeback record %0d", i));
    end
    for (int i = 0; i < 8; i++)
      check(dut.memory_0.mem[64'h200 + i] == 64'(2 * i),
            $sformatf("evens: mem[%0d] = %0d", 4096 + 8*i, dut.memory_0.mem[64'h200 + i]));
    check(dut.memory_0.mem[64'h208] == 0, "evens: nothing stored past 0x1038");
  endtask

  // every conditional branch both ways, br/bsr, and the four jump hints
  task automatic branches();
    int hc, ni;
    data_init.delete();
    prog.delete();
    prog.push_back(lda(1, 16'hffff, 31));       // r1 = -1
    prog.push_back(lda(2, 16'd0, 31));          // r2 = 0
    prog.push_back(lda(3, 16'd6, 31));          // r3 = 6
    for (int c = 0; c < 8; c++) begin
      for (int r = 1; r <= 3; r++) begin
        prog.push_back(br_f(6'h38 + 6'(c), 5'(r), 21'd1));  // skip next if taken
        prog.push_back(addq_i(5'(r), 8'(c), 10));
      end
    end
    prog.push_back(br_f(6'h34, 26, 21'd1));     // bsr $r26: skip one
    prog.push_back(lda(11, 16'd1, 31));
    prog.push_back(br_f(6'h30, 31, 21'd0));     // br to next
    for (int h = 0; h < 4; h++) begin
      int here;
      here = prog.size();
      prog.push_back(lda(9, 16'((here + 3) * 4 + 2), 31)); // low bits must be cleared
      prog.push_back(jmp_f(2'(h), (h == 2) ? 5'd31 : 5'd26, 9));
      prog.push_back(lda(12, 16'd1, 31));       // skipped
      prog.push_back(addq(26, 26, 13));         // uses the link value at once
    end
    prog.push_back(HALT);
    load_program();
    run("branches", hc, ni);
  endtask

  task automatic random_program(int seed_len);
    int n, k, halt_at;
    logic [31:0] body [$];
    data_init.delete();
    for (int i = 0; i < 16; i++) data_init[64'h200 + i] = {$urandom, $urandom};
    prog.delete();
    for (int r = 1; r <= 8; r++) prog.push_back(lda(5'(r), 16'($urandom), 31));
    prog.push_back(lda(26, 16'($urandom), 31));
    prog.push_back(lda(30, 16'h1000, 31));
    n = seed_len;
    halt_at = prog.size() + 1 + n;
    // jump register preset to the halt, in case a branch skips its setup
    prog.push_back(lda(9, 16'(halt_at * 4), 31));
    while (prog.size() < halt_at) begin
      int pick, here;
      logic [4:0] ra, rb, rc;
      here = prog.size();
      pick = $urandom_range(0, 99);
      ra = ($urandom_range(0, 9) == 0) ? 5'd26 : 5'($urandom_range(1, 8));
      rb = ($urandom_range(0, 9) == 0) ? 5'd31 : 5'($urandom_range(1, 8));
      rc = ($urandom_range(0, 19) == 0) ? 5'd31 : 5'($urandom_range(1, 8));
      if (pick < 40) begin
        logic [12:0] o;
        o = op_table($urandom_range(0, N_OPS - 1));
        if ($urandom_range(0, 1)) prog.push_back(op_i(o[12:7], o[6:0], ra, 8'($urandom), rc));
        else                      prog.push_back(op_r(o[12:7], o[6:0], ra, rb, rc));
      end else if (pick < 55) begin
        prog.push_back(ldq(rc, 16'(8 * $urandom_range(0, 15)), 30));
      end else if (pick < 65) begin
        prog.push_back(stq(ra, 16'(8 * $urandom_range(0, 15)), 30));
      end else if (pick < 77) begin
        k = $urandom_range(0, 3);
        if (here + 1 + k > halt_at) k = halt_at - here - 1;
        prog.push_back(br_f(6'h38 + 6'($urandom_range(0, 7)), ra, 21'(k)));
      end else if (pick < 83) begin
        k = $urandom_range(0, 2);
        if (here + 1 + k > halt_at) k = halt_at - here - 1;
        prog.push_back(br_f($urandom_range(0, 1) ? 6'h30 : 6'h34,
                            $urandom_range(0, 1) ? 5'd26 : 5'd31, 21'(k)));
      end else if (pick < 90 && here + 2 <= halt_at) begin
        k = $urandom_range(0, 2);
        if (here + 2 + k > halt_at) k = halt_at - here - 2;
        prog.push_back(lda(9, 16'((here + 2 + k) * 4), 31));
        prog.push_back(jmp_f(2'($urandom), $urandom_range(0, 1) ? 5'd26 : 5'd31, 9));
      end else begin
        prog.push_back(lda(rc, 16'($urandom), rb));
      end
    end
    prog.push_back(HALT);
    // A branch or jump that lands on a jump would skip that jump's setup of
    // $r9 and could go back to an old target: land on the setup instead.
    for (int i = 0; i < prog.size(); i++) begin
      int t;
      if (prog[i][31:30] == 2'b11) begin
        t = i + 1 + int'($signed(prog[i][20:0]));
        if (prog[t][31:26] == 6'h1a) prog[i][20:0] = prog[i][20:0] - 21'd1;
      end else if (prog[i][31:26] == 6'h08 && prog[i][25:21] == 5'd9 && i + 1 < prog.size() &&
                   prog[i+1][31:26] == 6'h1a) begin
        t = int'(prog[i][15:0]) / 4;
        if (prog[t][31:26] == 6'h1a) prog[i][15:0] = prog[i][15:0] - 16'd4;
      end
    end
    load_program();
    begin
      int hc, ni;
      run($sformatf("random(len %0d)", n), hc, ni);
    end
  endtask

  initial begin
    directed_timing();
    evens();
    branches();
    for (int p = 0; p < 200; p++) random_program(20 + (p % 60) * 3);
    check(n_load_use  > 0, "load-use stall never happened");
    check(n_fwd_exmem > 0, "forwarding from EX/MEM never happened");
    check(n_fwd_memwb > 0, "forwarding from MEM/WB never happened");
    check(n_rf_bypass > 0, "register-file write-through never happened");
    check(n_fetch_hold > 0, "fetch never waited for a data access");
    check(n_flush     > 0, "branch flush never happened");
    check(n_halt      > 0, "halt never retired");
    $display("mechanisms: load-use %0d, fwd EX/MEM %0d, fwd MEM/WB %0d, rf write-through %0d, fetch held %0d, flush %0d, halt %0d (%0d cycles)",
             n_load_use, n_fwd_exmem, n_fwd_memwb, n_rf_bypass, n_fetch_hold, n_flush, n_halt, total_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
