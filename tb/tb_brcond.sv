// tb_brcond: checks the eight branch conditions on corner values, random
// values and small values around zero, against a model written with signed
// and unsigned comparisons.
module tb_brcond;
  import alpha_pkg::*;

  word_t rega;
  logic [2:0] func;
  logic cond;
  int checks = 0, failures = 0;

  brcond dut (.rega, .func, .cond);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic model(word_t v, logic [2:0] f);
    longint sv;
    sv = longint'(v);
    case (f)
      3'd0: return (v % 2) == 0;   // blbc
      3'd1: return sv == 0;        // beq
      3'd2: return sv < 0;         // blt
      3'd3: return sv <= 0;        // ble
      3'd4: return (v % 2) == 1;   // blbs
      3'd5: return sv != 0;        // bne
      3'd6: return sv >= 0;        // bge
      default: return sv > 0;      // bgt
    endcase
  endfunction

  task automatic try(word_t v);
    for (int f = 0; f < 8; f++) begin
      rega = v; func = 3'(f); #1;
      checks++;
      if (cond !== model(v, 3'(f))) begin
        failures++;
        $display("FAIL: func %0d value %h -> %0d", f, v, cond);
      end
    end
  endtask

  initial begin
    try(0); try(1); try(2); try(-64'sd1); try(-64'sd2);
    try(64'h8000_0000_0000_0000); try(64'h7fff_ffff_ffff_ffff);
    for (int n = 0; n < 200; n++) try({$urandom, $urandom});
    // small values around zero, where the signed tests differ
    for (int n = 0; n < 100; n++) try(64'($signed(int'($urandom_range(0, 6)) - 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
