// tb_unified_memory: stores and loads random doublewords against a model,
// checks that the low three address bits are ignored, that only BUS_LOAD
// returns data, and that an out-of-range address raises addr_error and
// writes nothing.
module tb_unified_memory;
  import alpha_pkg::*;

  localparam int unsigned SIZE = 4096;
  logic clock = 0;
  bus_cmd_e cmd;
  word_t addr, wdata, rdata;
  logic addr_error;
  word_t model [SIZE/8];
  int checks = 0, failures = 0;

  unified_memory #(.MEM_SIZE_BYTES(SIZE)) dut (
    .clock, .proc2mem_command(cmd), .proc2mem_addr(addr), .proc2mem_data(wdata),
    .mem2proc_data(rdata), .addr_error);

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

  initial begin
    cmd = BUS_NONE; addr = 0; wdata = 0;
    for (int i = 0; i < SIZE/8; i++) begin
      @(negedge clock);
      cmd = BUS_STORE; addr = 64'(i * 8); wdata = {$urandom, $urandom}; model[i] = wdata;
      #1 check(!addr_error, "in-range store flagged");
    end
    @(negedge clock);
    for (int n = 0; n < 300; n++) begin
      int i;
      @(negedge clock);
      i = $urandom_range(0, SIZE/8 - 1);
      if ($urandom_range(0, 2) == 0) begin
        cmd = BUS_STORE; addr = 64'(i * 8); wdata = {$urandom, $urandom}; model[i] = wdata;
      end else begin
        cmd = BUS_LOAD; addr = 64'(i * 8 + $urandom_range(0, 7)); #1;
        check(rdata == model[i] && !addr_error, $sformatf("load %0h", addr));
      end
    end
    @(negedge clock);
    cmd = BUS_NONE; addr = 8; #1;
    check(rdata == 0 && !addr_error, "no command returns nothing");
    cmd = BUS_STORE; addr = 64'(SIZE); wdata = 64'h55; #1;
    check(addr_error, "out-of-range store not flagged");
    @(negedge clock);
    cmd = BUS_LOAD; addr = 0; #1;
    check(rdata == model[0], "out-of-range store wrapped onto word 0");
    addr = 64'h1_0000_0000; #1;
    check(addr_error && rdata == 0, "out-of-range load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
