// unified_memory: the single-ported memory holding both instructions and data.
//
// An array of 64-bit doublewords addressed by byte address (bits 2:0 are
// ignored). One request per cycle: BUS_LOAD returns the addressed doubleword
// combinationally on mem2proc_data in the same cycle; BUS_STORE writes
// proc2mem_data at the rising edge. An address beyond the memory raises
// addr_error for that cycle and the access does nothing (a load returns 0).
// That there is one port shared by fetch and data accesses, and the 64-bit
// doubleword organisation, follow the design; the size (64 KiB), the
// zero-latency load and the error flag are this design's choices.
// Contents are not reset: the program is loaded into the array before reset.
module unified_memory
  import alpha_pkg::*;
#(
  parameter int unsigned MEM_SIZE_BYTES = 65536
) (
  input  logic     clock,
  input  bus_cmd_e proc2mem_command,
  input  word_t    proc2mem_addr,
  input  word_t    proc2mem_data,
  output word_t    mem2proc_data,
  output logic     addr_error
);

  localparam int unsigned WORDS  = MEM_SIZE_BYTES / 8;
  localparam int unsigned IDX_W  = $clog2(WORDS);

  word_t mem [WORDS];

  logic             in_range;
  logic [IDX_W-1:0] idx;

  assign in_range   = (proc2mem_addr < 64'(MEM_SIZE_BYTES));
  assign idx        = proc2mem_addr[IDX_W+2:3];
  assign addr_error = (proc2mem_command != BUS_NONE) && !in_range;
  assign mem2proc_data = (proc2mem_command == BUS_LOAD && in_range) ? mem[idx] : '0;

  always_ff @(posedge clock) begin
    if (proc2mem_command == BUS_STORE && in_range)
      mem[idx] <= proc2mem_data;
  end

endmodule
