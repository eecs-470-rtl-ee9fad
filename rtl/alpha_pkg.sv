// alpha_pkg: types and constants shared by the five-stage Alpha-subset pipeline.
//
// Holds the 64-bit word type, register-index type, the memory bus command
// encoding, the operand/destination select encodings produced by the decoder,
// the ALU function codes, the Alpha opcodes and function codes of the
// supported instruction subset, and the contents of the four pipeline
// registers (IF/ID, ID/EX, EX/MEM, MEM/WB) as packed structs.
//
// The instruction subset, the select names (regA, mem_disp, NPC, ~3 for
// operand A; regB, ALU immediate, branch displacement for operand B) and the
// destination choices (rc, ra, none) follow the pipeline's description. The
// numeric Alpha encodings are the standard Alpha AXP ones; they reproduce the
// machine words of the evens example program (e.g. lda $r2,0 = 0x205f0000).
// The numeric values of the enums are this design's own choice.
package alpha_pkg;

  typedef logic [63:0] word_t;
  typedef logic [4:0]  reg_idx_t;

  localparam reg_idx_t    ZERO_REG  = 5'd31;
  // bis $r31,$r31,$r31: the canonical Alpha no-op
  localparam logic [31:0] NOOP_INST = 32'h47ff_041f;
  localparam logic [25:0] PAL_HALT  = 26'h555;

  // Memory bus command
  typedef enum logic [1:0] {
    BUS_NONE  = 2'd0,
    BUS_LOAD  = 2'd1,
    BUS_STORE = 2'd2
  } bus_cmd_e;

  // ALU operand A select
  typedef enum logic [1:0] {
    OPA_IS_REGA     = 2'd0,
    OPA_IS_MEM_DISP = 2'd1,
    OPA_IS_NPC      = 2'd2,
    OPA_IS_NOT3     = 2'd3
  } opa_sel_e;

  // ALU operand B select
  typedef enum logic [1:0] {
    OPB_IS_REGB    = 2'd0,
    OPB_IS_ALU_IMM = 2'd1,
    OPB_IS_BR_DISP = 2'd2
  } opb_sel_e;

  // Destination register select
  typedef enum logic [1:0] {
    DEST_IS_REGC = 2'd0,
    DEST_IS_REGA = 2'd1,
    DEST_NONE    = 2'd2
  } dest_sel_e;

  typedef enum logic [4:0] {
    ALU_ADDQ   = 5'd0,
    ALU_SUBQ   = 5'd1,
    ALU_AND    = 5'd2,
    ALU_BIC    = 5'd3,
    ALU_BIS    = 5'd4,
    ALU_ORNOT  = 5'd5,
    ALU_EQV    = 5'd6,
    ALU_SRL    = 5'd7,
    ALU_SLL    = 5'd8,
    ALU_SRA    = 5'd9,
    ALU_MULQ   = 5'd10,
    ALU_CMPEQ  = 5'd11,
    ALU_CMPLT  = 5'd12,
    ALU_CMPLE  = 5'd13,
    ALU_CMPULT = 5'd14,
    ALU_CMPULE = 5'd15
  } alu_func_e;

  // Forwarding source for an EX operand
  typedef enum logic [1:0] {
    FWD_NONE   = 2'd0,
    FWD_EX_MEM = 2'd1,
    FWD_MEM_WB = 2'd2
  } fwd_sel_e;

  // Primary opcodes (instruction bits 31:26)
  localparam logic [5:0] OP_PAL   = 6'h00;
  localparam logic [5:0] OP_LDA   = 6'h08;
  localparam logic [5:0] OP_INTA  = 6'h10;
  localparam logic [5:0] OP_INTL  = 6'h11;
  localparam logic [5:0] OP_INTS  = 6'h12;
  localparam logic [5:0] OP_INTM  = 6'h13;
  localparam logic [5:0] OP_JSR   = 6'h1a;
  localparam logic [5:0] OP_LDQ   = 6'h29;
  localparam logic [5:0] OP_STQ   = 6'h2d;
  localparam logic [5:0] OP_BR    = 6'h30;
  localparam logic [5:0] OP_BSR   = 6'h34;
  localparam logic [5:0] OP_BLBC  = 6'h38;  // 0x38..0x3f: conditional branches

  // Operate-format function codes (instruction bits 11:5)
  localparam logic [6:0] FN_ADDQ   = 7'h20;  // INTA
  localparam logic [6:0] FN_SUBQ   = 7'h29;
  localparam logic [6:0] FN_CMPEQ  = 7'h2d;
  localparam logic [6:0] FN_CMPLT  = 7'h4d;
  localparam logic [6:0] FN_CMPLE  = 7'h6d;
  localparam logic [6:0] FN_CMPULT = 7'h1d;
  localparam logic [6:0] FN_CMPULE = 7'h3d;
  localparam logic [6:0] FN_AND    = 7'h00;  // INTL
  localparam logic [6:0] FN_BIC    = 7'h08;
  localparam logic [6:0] FN_BIS    = 7'h20;
  localparam logic [6:0] FN_ORNOT  = 7'h28;
  localparam logic [6:0] FN_EQV    = 7'h48;
  localparam logic [6:0] FN_SRL    = 7'h34;  // INTS
  localparam logic [6:0] FN_SLL    = 7'h39;
  localparam logic [6:0] FN_SRA    = 7'h3c;
  localparam logic [6:0] FN_MULQ   = 7'h20;  // INTM

  // Decoder output
  typedef struct packed {
    opa_sel_e  opa_select;
    opb_sel_e  opb_select;
    dest_sel_e dest_select;
    alu_func_e alu_func;
    logic      rd_mem;
    logic      wr_mem;
    logic      cond_branch;
    logic      uncond_branch;
    logic      uses_rega;     // instruction reads ra (for hazard detection)
    logic      uses_regb;     // instruction reads rb
    logic      halt;
    logic      illegal;
  } decode_t;

  typedef struct packed {
    logic        valid;
    word_t       npc;
    logic [31:0] ir;
  } if_id_t;

  typedef struct packed {
    logic        valid;
    word_t       npc;
    logic [31:0] ir;
    word_t       rega;
    word_t       regb;
    reg_idx_t    ra_idx;
    reg_idx_t    rb_idx;
    reg_idx_t    dest_idx;
    decode_t     dec;
  } id_ex_t;

  typedef struct packed {
    logic        valid;
    word_t       npc;
    logic [31:0] ir;
    word_t       rega;         // store data, already forwarded in EX
    word_t       alu_result;   // also the branch target
    logic        take_branch;
    reg_idx_t    dest_idx;
    logic        rd_mem;
    logic        wr_mem;
    logic        halt;
    logic        illegal;
  } ex_mem_t;

  typedef struct packed {
    logic        valid;
    word_t       npc;
    logic [31:0] ir;
    word_t       result;
    logic        take_branch;
    reg_idx_t    dest_idx;
    logic        halt;
    logic        illegal;
  } mem_wb_t;

endpackage
