// Test of the carry-save shift accumulator (W = 10, 8 bit cycles per word).
// Each period feeds eight random partial products y_0..y_7 (LSB slice first,
// sign control in the last cycle). Checks: s + 2c + 1 lies within one LSB
// below the exact value -y_7 + sum_b y_b 2^(b-7) (scaled by 2^7), the words
// match a bit-level model, and s_word/c_word change only at the end of the
// last bit cycle (they hold during the next period).
module tb_csa_accumulator;
  import da_lms_ref_pkg::*;
  localparam int W = 10, L = 8;
  logic clk = 0, rst_n = 0, first = 0, sign_ctrl = 0;
  logic signed [W-1:0] y_in = '0, s_word, c_word;
  int checks = 0, failures = 0;

  csa_accumulator #(.W(W)) dut (.clk, .rst_n, .first, .sign_ctrl, .y_in, .s_word, .c_word);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ys [L];
    longint exact, got, s, c, a, b, cc, sn, cn;
    logic signed [W-1:0] hold_s, hold_c;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      hold_s = s_word; hold_c = c_word;
      for (int b2 = 0; b2 < L; b2++) begin
        // partial sums of four 8-bit samples fit in 10 bits
        ys[b2] = (n % 9 == 0) ? -512 : sx($urandom_range(1023), W);
        if (n % 9 == 1) ys[b2] = 511;
        y_in = W'(ys[b2]);
        first = (b2 == 0);
        sign_ctrl = (b2 == L - 1);
        if (b2 > 0) begin
          checks++;
          if (s_word != hold_s || c_word != hold_c) failures++;
        end
        @(negedge clk);
      end
      exact = -ys[L-1] * 128;
      for (int b2 = 0; b2 < L - 1; b2++) exact += ys[b2] * (1 << b2);
      got = longint'(s_word) + 2 * longint'(c_word) + 1;
      checks++;
      if (!(got * 128 <= exact && got * 128 > exact - 128)) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d got=%0d exact*128=%0d", n, got, exact);
      end
      s = 0; c = 0;
      for (int b2 = 0; b2 < L; b2++) begin
        a = (b2 == L - 1) ? ~ys[b2] : ys[b2];
        b = (b2 == 0) ? 0 : (s >>> 1);
        cc = (b2 == 0) ? 0 : c;
        sn = a ^ b ^ cc;
        cn = (a & b) | (a & cc) | (b & cc);
        s = sx(sn, W); c = sx(cn, W);
      end
      checks++;
      if (s_word != W'(s) || c_word != W'(c)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
