// tb_alu: checks every ALU function on corner and random operands against
// the arithmetic of the instruction-set reference model.
module tb_alu;
  import alpha_pkg::*;
  import alpha_tb_pkg::*;

  word_t opa, opb, result;
  alu_func_e func;
  int checks = 0, failures = 0;

  alu dut (.opa, .opb, .alu_func(func), .result);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ALU function -> {opcode, function code} of the instruction using it
  function automatic logic [12:0] enc(alu_func_e f);
    case (f)
      ALU_ADDQ:   return {6'h10, 7'h20};
      ALU_SUBQ:   return {6'h10, 7'h29};
      ALU_AND:    return {6'h11, 7'h00};
      ALU_BIC:    return {6'h11, 7'h08};
      ALU_BIS:    return {6'h11, 7'h20};
      ALU_ORNOT:  return {6'h11, 7'h28};
      ALU_EQV:    return {6'h11, 7'h48};
      ALU_SRL:    return {6'h12, 7'h34};
      ALU_SLL:    return {6'h12, 7'h39};
      ALU_SRA:    return {6'h12, 7'h3c};
      ALU_MULQ:   return {6'h13, 7'h20};
      ALU_CMPEQ:  return {6'h10, 7'h2d};
      ALU_CMPLT:  return {6'h10, 7'h4d};
      ALU_CMPLE:  return {6'h10, 7'h6d};
      ALU_CMPULT: return {6'h10, 7'h1d};
      default:    return {6'h10, 7'h3d};
    endcase
  endfunction

  task automatic try(word_t a, word_t b);
    logic [12:0] e;
    word_t expv;
    for (int f = 0; f < 16; f++) begin
      func = alu_func_e'(f);
      opa = a; opb = b;
      #1;
      e = enc(func);
      expv = alpha_iss::alu(e[12:7], e[6:0], a, b);
      checks++;
      if (result !== expv) begin
        failures++;
        $display("FAIL: %s %h %h -> %h, expected %h", func.name(), a, b, result, expv);
      end
    end
  endtask

  initial begin
    word_t corners [6] = '{64'd0, 64'd1, 64'hffff_ffff_ffff_ffff, 64'h8000_0000_0000_0000,
                           64'h7fff_ffff_ffff_ffff, 64'd63};
    foreach (corners[i]) foreach (corners[j]) try(corners[i], corners[j]);
    // a few hand-worked values
    func = ALU_SRA; opa = 64'h8000_0000_0000_0000; opb = 64'd4; #1;
    checks++; if (result !== 64'hf800_0000_0000_0000) begin failures++; $display("FAIL sra"); end
    func = ALU_CMPLT; opa = 64'hffff_ffff_ffff_ffff; opb = 64'd0; #1;   // -1 < 0 signed
    checks++; if (result !== 64'd1) begin failures++; $display("FAIL cmplt"); end
    func = ALU_CMPULT; #1;                                               // but not unsigned
    checks++; if (result !== 64'd0) begin failures++; $display("FAIL cmpult"); end
    func = ALU_MULQ; opa = 64'd123456789; opb = 64'd1000; #1;
    checks++; if (result !== 64'd123456789000) begin failures++; $display("FAIL mulq"); end
    for (int n = 0; n < 300; n++) try({$urandom, $urandom}, (n % 3 == 0) ? 64'($urandom_range(0, 70)) : {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
