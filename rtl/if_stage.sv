// if_stage: instruction fetch.
//
// Holds the PC (reset to 0). Each cycle it presents the doubleword-aligned
// address of the PC to the memory port and picks the 32-bit instruction out
// of the returned 64-bit word with PC[2] (little-endian: the instruction at
// a lower address sits in the low half). The next PC is PC+4, or the branch
// target held in EX/MEM when the instruction there is a taken branch: branches
// are predicted not taken and resolved in the memory stage. The PC advances
// only when pc_enable is high; the hazard unit drops it on a load-use stall,
// when the memory stage owns the memory port, and after a halt.
// fetch_valid says the fetched word really is this PC's instruction; when it
// is low the stage emits an invalid no-op.
// The PC, +4 adder, target mux and the outputs IR/NPC follow the fetch stage
// of the design; the valid handshake with the hazard unit is this design's own.
// Timing: outputs are combinational from the PC register and the memory data.
module if_stage
  import alpha_pkg::*;
(
  input  logic        clock,
  input  logic        reset,
  input  logic        pc_enable,
  input  logic        ex_mem_take_branch,
  input  word_t       ex_mem_target_pc,
  input  word_t       Imem2proc_data,
  input  logic        fetch_valid,
  output word_t       proc2Imem_addr,
  output word_t       if_PC_out,
  output word_t       if_NPC_out,
  output logic [31:0] if_IR_out,
  output logic        if_valid_inst_out
);

  word_t PC_reg, PC_plus_4, next_PC;

  assign PC_plus_4 = PC_reg + 64'd4;
  assign next_PC   = ex_mem_take_branch ? ex_mem_target_pc : PC_plus_4;

  always_ff @(posedge clock) begin
    if (reset)          PC_reg <= '0;
    else if (pc_enable) PC_reg <= next_PC;
  end

  assign proc2Imem_addr    = {PC_reg[63:3], 3'b000};
  assign if_PC_out         = PC_reg;
  assign if_NPC_out        = PC_plus_4;
  assign if_valid_inst_out = fetch_valid;
  assign if_IR_out         = !fetch_valid ? NOOP_INST
                           : (PC_reg[2] ? Imem2proc_data[63:32] : Imem2proc_data[31:0]);

endmodule
