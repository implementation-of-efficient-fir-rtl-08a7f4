// Exhaustive test of the barrel shifter (L = 8): every sample value and shift
// count 0..7 against the arithmetic right shift x / 2^t rounded down.
module tb_barrel_shifter;
  localparam int L = 8;
  logic signed [L-1:0] x, y;
  logic [2:0] t;
  int checks = 0, failures = 0;

  barrel_shifter #(.L(L), .TW(3)) dut (.x, .t, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, e;
    for (v = -128; v < 128; v++)
      for (int s = 0; s < 8; s++) begin
        x = L'(v); t = 3'(s);
        #1;
        // floor division by 2^s
        e = (v >= 0) ? v / (1 << s) : -((-v + (1 << s) - 1) / (1 << s));
        checks++;
        if (y != L'(e)) begin
          failures++;
          if (failures < 5) $display("FAIL x=%0d t=%0d y=%0d exp=%0d", v, s, y, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
