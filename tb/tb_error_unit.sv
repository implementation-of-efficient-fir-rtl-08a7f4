// Test of the output/error stage (L = 8, N = 16, 12-bit y and e): random sum
// and carry words and desired samples. Checks y = s + 2c + cin, e = d(prev)
// - y with d taken from the previous load, and mu_e = e >>> 4 (8 bits) held
// from the previous load; nothing may change on cycles without load.
module tb_error_unit;
  import da_lms_ref_pkg::*;
  localparam int L = 8, N = 16, WY = 12;
  logic clk = 0, rst_n = 0, load = 0, cin = 0;
  logic signed [WY-1:0] s_tot = '0, c_tot = '0, y, e;
  logic signed [L-1:0] d_in = '0, mu_e;
  int checks = 0, failures = 0;

  error_unit #(.L(L), .N(N)) dut (.clk, .rst_n, .load, .s_tot, .c_tot, .cin, .d_in, .y, .e, .mu_e);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint d_prev = 0, mue_prev = 0, ey, ee;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      s_tot = WY'($urandom); c_tot = WY'($urandom); cin = 1'($urandom);
      d_in = L'($urandom);
      load = (n % 3 != 2);
      #1;
      ey = sx(longint'(s_tot) + 2 * longint'(c_tot) + cin, WY);
      ee = sx(d_prev - ey, WY);
      checks++;
      if (y != WY'(ey) || e != WY'(ee) || mu_e != L'(mue_prev)) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d y=%0d/%0d e=%0d/%0d mue=%0d/%0d", n, y, ey, e, ee, mu_e, mue_prev);
      end
      @(negedge clk);
      if (load) begin
        d_prev = longint'(d_in);
        mue_prev = sx(ee >>> 4, L);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
