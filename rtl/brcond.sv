// brcond: branch-condition evaluation for the Alpha conditional branches.
//
// The low three bits of the branch opcode (instruction bits 28:26) select the
// test applied to the value of register ra:
//   0 blbc ra[0]==0   1 beq ra==0   2 blt ra<0   3 ble ra<=0
//   4 blbs ra[0]==1   5 bne ra!=0   6 bge ra>=0  7 bgt ra>0
// The conditions are those of the instruction list; using the opcode bits as
// the selector is the standard Alpha encoding. Purely combinational.
module brcond
  import alpha_pkg::*;
(
  input  word_t       rega,
  input  logic [2:0]  func,
  output logic        cond
);

  logic is_zero, is_neg;
  assign is_zero = (rega == '0);
  assign is_neg  = rega[63];

  always_comb begin
    unique case (func)
      3'd0: cond = ~rega[0];
      3'd1: cond = is_zero;
      3'd2: cond = is_neg;
      3'd3: cond = is_neg | is_zero;
      3'd4: cond = rega[0];
      3'd5: cond = ~is_zero;
      3'd6: cond = ~is_neg;
      3'd7: cond = ~is_neg & ~is_zero;
    endcase
  end

endmodule
