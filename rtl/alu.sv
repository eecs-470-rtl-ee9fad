// alu: the 64-bit integer ALU of the execute stage.
//
// Computes one of sixteen functions of operands opa and opb, selected by
// alu_func: add, subtract, and, bic (opa & ~opb), bis (or), ornot (opa | ~opb),
// eqv (xnor), logical right/left shift and arithmetic right shift by opb[5:0],
// multiply (low 64 bits), and the compares cmpeq, cmplt, cmple (signed) and
// cmpult, cmpule (unsigned), which return 1 or 0. The function list is the
// instruction list of the pipeline; the shift amount taken from the low six
// bits of opb is the Alpha definition. Address, branch-target and jump-target
// arithmetic also go through this unit (add, and with ~3). Combinational.
module alu
  import alpha_pkg::*;
(
  input  word_t     opa,
  input  word_t     opb,
  input  alu_func_e alu_func,
  output word_t     result
);

  logic signed [63:0] sa, sb;
  assign sa = opa;
  assign sb = opb;

  always_comb begin
    unique case (alu_func)
      ALU_ADDQ:   result = opa + opb;
      ALU_SUBQ:   result = opa - opb;
      ALU_AND:    result = opa & opb;
      ALU_BIC:    result = opa & ~opb;
      ALU_BIS:    result = opa | opb;
      ALU_ORNOT:  result = opa | ~opb;
      ALU_EQV:    result = opa ~^ opb;
      ALU_SRL:    result = opa >> opb[5:0];
      ALU_SLL:    result = opa << opb[5:0];
      ALU_SRA:    result = word_t'(sa >>> opb[5:0]);
      ALU_MULQ:   result = opa * opb;
      ALU_CMPEQ:  result = {63'd0, opa == opb};
      ALU_CMPLT:  result = {63'd0, sa < sb};
      ALU_CMPLE:  result = {63'd0, sa <= sb};
      ALU_CMPULT: result = {63'd0, opa < opb};
      ALU_CMPULE: result = {63'd0, opa <= opb};
      default:    result = 64'hbaad_beef_dead_beef;
    endcase
  end

endmodule
