// alpha_tb_pkg: verification helpers for the Alpha-subset pipeline.
//
// Instruction encoders (operate, memory, branch, jump formats and halt) and
// an instruction-set reference model, alpha_iss, that executes a program one
// instruction at a time straight from the Alpha definitions, independently of
// the RTL decoder and datapath. Each executed instruction yields a retire
// record (PC, register write) that test benches compare with the pipeline's
// writeback trace; the model's memory is compared at the end of a run.
package alpha_tb_pkg;

  typedef struct {
    logic [63:0] pc;
    logic        wr_en;
    logic [4:0]  idx;
    logic [63:0] data;
    logic        halt;
  } retire_t;

  // ---------------------------------------------------------------- encoders
  function automatic logic [31:0] op_r(logic [5:0] op, logic [6:0] fn,
                                       logic [4:0] ra, logic [4:0] rb, logic [4:0] rc);
    return {op, ra, rb, 3'b000, 1'b0, fn, rc};
  endfunction
  function automatic logic [31:0] op_i(logic [5:0] op, logic [6:0] fn,
                                       logic [4:0] ra, logic [7:0] lit, logic [4:0] rc);
    return {op, ra, lit, 1'b1, fn, rc};
  endfunction
  function automatic logic [31:0] mem_f(logic [5:0] op, logic [4:0] ra, logic [4:0] rb,
                                        logic [15:0] disp);
    return {op, ra, rb, disp};
  endfunction
  function automatic logic [31:0] br_f(logic [5:0] op, logic [4:0] ra, logic [20:0] disp);
    return {op, ra, disp};
  endfunction
  function automatic logic [31:0] jmp_f(logic [1:0] hint, logic [4:0] ra, logic [4:0] rb);
    return {6'h1a, ra, rb, hint, 14'd0};
  endfunction
  localparam logic [31:0] HALT = 32'h0000_0555;

  // mnemonic helpers
  function automatic logic [31:0] addq_i(logic [4:0] ra, logic [7:0] lit, logic [4:0] rc);
    return op_i(6'h10, 7'h20, ra, lit, rc);
  endfunction
  function automatic logic [31:0] addq(logic [4:0] ra, logic [4:0] rb, logic [4:0] rc);
    return op_r(6'h10, 7'h20, ra, rb, rc);
  endfunction
  function automatic logic [31:0] lda(logic [4:0] ra, logic [15:0] disp, logic [4:0] rb);
    return mem_f(6'h08, ra, rb, disp);
  endfunction
  function automatic logic [31:0] ldq(logic [4:0] ra, logic [15:0] disp, logic [4:0] rb);
    return mem_f(6'h29, ra, rb, disp);
  endfunction
  function automatic logic [31:0] stq(logic [4:0] ra, logic [15:0] disp, logic [4:0] rb);
    return mem_f(6'h2d, ra, rb, disp);
  endfunction

  // operate functions used by random programs: {opcode, fn}
  localparam int N_OPS = 16;
  function automatic logic [12:0] op_table(int i);
    case (i)
      0:  return {6'h10, 7'h20};  // addq
      1:  return {6'h10, 7'h29};  // subq
      2:  return {6'h11, 7'h00};  // and
      3:  return {6'h11, 7'h08};  // bic
      4:  return {6'h11, 7'h20};  // bis
      5:  return {6'h11, 7'h28};  // ornot
      6:  return {6'h11, 7'h48};  // eqv
      7:  return {6'h12, 7'h34};  // srl
      8:  return {6'h12, 7'h39};  // sll
      9:  return {6'h12, 7'h3c};  // sra
      10: return {6'h13, 7'h20};  // mulq
      11: return {6'h10, 7'h2d};  // cmpeq
      12: return {6'h10, 7'h4d};  // cmplt
      13: return {6'h10, 7'h6d};  // cmple
      14: return {6'h10, 7'h1d};  // cmpult
      default: return {6'h10, 7'h3d};  // cmpule
    endcase
  endfunction

  // ----------------------------------------------------- reference model
  class alpha_iss;
    logic [63:0] r [32];
    logic [63:0] m [logic [63:0]];   // doubleword index -> value
    logic [63:0] pc;

    function new();
      foreach (r[i]) r[i] = '0;
      pc = '0;
    endfunction

    function logic [63:0] rd(logic [4:0] i);
      return (i == 5'd31) ? 64'd0 : r[i];
    endfunction

    function logic [63:0] load(logic [63:0] addr);
      return m.exists(addr >> 3) ? m[addr >> 3] : 64'd0;
    endfunction

    function logic [31:0] fetch(logic [63:0] a);
      logic [63:0] w;
      w = load(a);
      return a[2] ? w[63:32] : w[31:0];
    endfunction

    static function logic [63:0] alu(logic [5:0] op, logic [6:0] fn,
                                     logic [63:0] a, logic [63:0] b);
      logic signed [63:0] sa, sb;
      sa = a; sb = b;
      case ({op, fn})
        {6'h10, 7'h20}: return a + b;
        {6'h10, 7'h29}: return a - b;
        {6'h10, 7'h2d}: return (a == b) ? 64'd1 : 64'd0;
        {6'h10, 7'h4d}: return (sa <  sb) ? 64'd1 : 64'd0;
        {6'h10, 7'h6d}: return (sa <= sb) ? 64'd1 : 64'd0;
        {6'h10, 7'h1d}: return (a <  b) ? 64'd1 : 64'd0;
        {6'h10, 7'h3d}: return (a <= b) ? 64'd1 : 64'd0;
        {6'h11, 7'h00}: return a & b;
        {6'h11, 7'h08}: return a & ~b;
        {6'h11, 7'h20}: return a | b;
        {6'h11, 7'h28}: return a | ~b;
        {6'h11, 7'h48}: return ~(a ^ b);
        {6'h12, 7'h34}: return a >> b[5:0];
        {6'h12, 7'h39}: return a << b[5:0];
        {6'h12, 7'h3c}: return 64'(sa >>> b[5:0]);
        {6'h13, 7'h20}: return a * b;
        default:        return 64'hx;
      endcase
    endfunction

    // Execute one instruction; returns its retire record.
    function retire_t step();
      retire_t     t;
      logic [31:0] ir;
      logic [5:0]  op;
      logic [4:0]  ra, rb, rc;
      logic [63:0] npc, a, b, res, ea, disp_br;
      logic        cond;
      ir  = fetch(pc);
      op  = ir[31:26]; ra = ir[25:21]; rb = ir[20:16]; rc = ir[4:0];
      npc = pc + 4;
      t.pc = pc; t.wr_en = 1'b0; t.idx = 5'd31; t.data = '0; t.halt = 1'b0;
      ea      = rd(rb) + {{48{ir[15]}}, ir[15:0]};
      disp_br = {{41{ir[20]}}, ir[20:0], 2'b00};
      res     = '0;
      if (op == 6'h00) begin
        t.halt = 1'b1;
        return t;
      end else if (op >= 6'h10 && op <= 6'h13) begin
        a   = rd(ra);
        b   = ir[12] ? {56'd0, ir[20:13]} : rd(rb);
        res = alu(op, ir[11:5], a, b);
        t.idx = rc;
      end else if (op == 6'h08) begin
        res = ea; t.idx = ra;
      end else if (op == 6'h29) begin
        res = load(ea); t.idx = ra;
      end else if (op == 6'h2d) begin
        m[ea >> 3] = rd(ra);
      end else if (op == 6'h30 || op == 6'h34) begin
        res = npc; t.idx = ra; npc = npc + disp_br;
      end else if (op == 6'h1a) begin
        res = npc; t.idx = ra; npc = rd(rb) & ~64'h3;
      end else if (op[5:3] == 3'b111) begin
        a = rd(ra);
        case (op[2:0])
          3'd0: cond = ~a[0];
          3'd1: cond = (a == 0);
          3'd2: cond = a[63];
          3'd3: cond = a[63] || (a == 0);
          3'd4: cond = a[0];
          3'd5: cond = (a != 0);
          3'd6: cond = ~a[63];
          default: cond = ~a[63] && (a != 0);
        endcase
        if (cond) npc = npc + disp_br;
      end
      if (t.idx != 5'd31) begin
        t.wr_en = 1'b1; t.data = res; r[t.idx] = res;
      end
      pc = npc;
      return t;
    endfunction
  endclass

endpackage
