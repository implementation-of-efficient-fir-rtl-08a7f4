// Exhaustive test of the control-word generator (L = 8): for every 7-bit
// magnitude r, t must be 6 - (position of the leading one), or 7 for r = 0,
// as in the decision list r6 -> 000, r5 -> 001, ..., r0 -> 110, else 111.
module tb_control_word_gen;
  localparam int L = 8;
  logic [L-2:0] r;
  logic [2:0] t;
  int checks = 0, failures = 0;

  control_word_gen #(.L(L), .TW(3)) dut (.r, .t);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int v = 0; v < 128; v++) begin
      r = 7'(v);
      #1;
      e = 7;
      if (v >= 64) e = 0;
      else if (v >= 32) e = 1;
      else if (v >= 16) e = 2;
      else if (v >= 8) e = 3;
      else if (v >= 4) e = 4;
      else if (v >= 2) e = 5;
      else if (v >= 1) e = 6;
      checks++;
      if (t != 3'(e)) begin
        failures++;
        if (failures < 5) $display("FAIL r=%0d t=%0d exp=%0d", v, t, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
