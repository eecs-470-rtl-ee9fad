// mem_stage: memory access.
//
// Turns the instruction in EX/MEM into a data-memory request: BUS_STORE for a
// store, BUS_LOAD for a load, BUS_NONE otherwise (and for an invalid slot).
// The address is the ALU result and the store data is regA. The stage result
// is the loaded doubleword for a load and the ALU result otherwise.
// Follows the memory stage of the design; gating the command with valid is
// this design's choice so that bubbles never touch memory. Combinational;
// the memory answers a load in the same cycle.
module mem_stage
  import alpha_pkg::*;
(
  input  ex_mem_t  ex_mem,
  input  word_t    Dmem2proc_data,
  output bus_cmd_e proc2Dmem_command,
  output word_t    proc2Dmem_addr,
  output word_t    proc2Dmem_data,
  output mem_wb_t  mem_packet
);

  assign proc2Dmem_command = !ex_mem.valid ? BUS_NONE
                           : ex_mem.wr_mem ? BUS_STORE
                           : ex_mem.rd_mem ? BUS_LOAD
                           :                 BUS_NONE;
  assign proc2Dmem_addr    = ex_mem.alu_result;
  assign proc2Dmem_data    = ex_mem.rega;

  always_comb begin
    mem_packet.valid       = ex_mem.valid;
    mem_packet.npc         = ex_mem.npc;
    mem_packet.ir          = ex_mem.ir;
    mem_packet.result      = ex_mem.rd_mem ? Dmem2proc_data : ex_mem.alu_result;
    mem_packet.take_branch = ex_mem.take_branch;
    mem_packet.dest_idx    = ex_mem.dest_idx;
    mem_packet.halt        = ex_mem.halt;
    mem_packet.illegal     = ex_mem.illegal;
  end

endmodule
