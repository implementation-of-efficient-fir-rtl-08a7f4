// Exhaustive test of the sign-magnitude separator (L = 8): every mu*e value
// gives its sign bit and |mu*e|, with -128 saturated to 127.
module tb_sign_mag_separator;
  localparam int L = 8;
  logic signed [L-1:0] mu_e;
  logic sign;
  logic [L-2:0] mag;
  int checks = 0, failures = 0;

  sign_mag_separator #(.L(L)) dut (.mu_e, .sign, .mag);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m;
    for (int v = -128; v < 128; v++) begin
      mu_e = L'(v);
      #1;
      m = (v < 0) ? -v : v;
      if (m > 127) m = 127;
      checks++;
      if (sign != (v < 0) || mag != 7'(m)) begin
        failures++;
        if (failures < 5) $display("FAIL v=%0d sign=%b mag=%0d", v, sign, mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
