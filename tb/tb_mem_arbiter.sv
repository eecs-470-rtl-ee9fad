// tb_mem_arbiter: checks that the memory stage wins the port, that the port
// fetches instructions otherwise, and that read data reaches both requesters.
module tb_mem_arbiter;
  import alpha_pkg::*;

  bus_cmd_e dcmd, cmd;
  word_t daddr, ddata, iaddr, mdata, addr, data, dout, iout;
  logic used;
  int checks = 0, failures = 0;

  mem_arbiter dut (
    .proc2Dmem_command(dcmd), .proc2Dmem_addr(daddr), .proc2Dmem_data(ddata),
    .proc2Imem_addr(iaddr), .mem2proc_data(mdata), .proc2mem_command(cmd),
    .proc2mem_addr(addr), .proc2mem_data(data), .Dmem2proc_data(dout),
    .Imem2proc_data(iout), .mem_used_by_mem(used));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      bus_cmd_e c;
      c = bus_cmd_e'($urandom_range(0, 2));
      dcmd = c; daddr = {$urandom, $urandom}; ddata = {$urandom, $urandom};
      iaddr = {$urandom, $urandom}; mdata = {$urandom, $urandom}; #1;
      checks++;
      if (c == BUS_NONE) begin
        if (!(cmd == BUS_LOAD && addr == iaddr && !used)) begin failures++; $display("FAIL fetch"); end
      end else begin
        if (!(cmd == c && addr == daddr && used && data == ddata)) begin failures++; $display("FAIL data access"); end
      end
      checks++;
      if (!(dout == mdata && iout == mdata)) begin failures++; $display("FAIL read data"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
