// mem_arbiter: sharing of the single memory port between fetch and the memory
// stage.
//
// The memory stage has priority: whenever it issues a load or a store, its
// command, address and data go to memory and mem_used_by_mem tells the fetch
// stage to wait. Otherwise the port performs an instruction fetch (BUS_LOAD at
// the fetch address). The returned doubleword goes to both requesters.
// Follows the memory arbitration of the design. Combinational.
module mem_arbiter
  import alpha_pkg::*;
(
  input  bus_cmd_e proc2Dmem_command,
  input  word_t    proc2Dmem_addr,
  input  word_t    proc2Dmem_data,
  input  word_t    proc2Imem_addr,
  input  word_t    mem2proc_data,
  output bus_cmd_e proc2mem_command,
  output word_t    proc2mem_addr,
  output word_t    proc2mem_data,
  output word_t    Dmem2proc_data,
  output word_t    Imem2proc_data,
  output logic     mem_used_by_mem
);

  assign mem_used_by_mem  = (proc2Dmem_command != BUS_NONE);
  assign proc2mem_command = mem_used_by_mem ? proc2Dmem_command : BUS_LOAD;
  assign proc2mem_addr    = mem_used_by_mem ? proc2Dmem_addr : proc2Imem_addr;
  assign proc2mem_data    = proc2Dmem_data;
  assign Dmem2proc_data   = mem2proc_data;
  assign Imem2proc_data   = mem2proc_data;

endmodule
