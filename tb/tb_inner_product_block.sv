// Test of one four-point DA inner-product block.
//
// Random samples are shifted into the DA table once per sample period and
// random weights are applied as bit slices, LSB first, one per bit cycle.
// After each period the block's sum and carry words must satisfy
// exact - 1 < s + 2c + 1 <= exact (weights read as fractions), and must equal
// a bit-level carry-save model. The result must appear exactly at the end of
// the L-th bit cycle (one sample period of latency).
module tb_inner_product_block;
  import da_lms_ref_pkg::*;
  localparam int P = 4, L = 8, W = L + 2;
  localparam int NS = 400;

  logic clk = 0, rst_n = 0, first = 0, last = 0;
  logic signed [L-1:0] x_in = '0;
  logic [P-1:0] A = '0;
  logic signed [W-1:0] s_word, c_word;
  logic signed [L-1:0] tap [P];

  inner_product_block #(.P(P), .L(L)) dut (.clk, .rst_n, .first, .last, .x_in, .A, .s_word, .c_word, .tap);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    #(10 * L * (NS + 20));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xs [] = new[P];
    longint ws [] = new[P];
    longint hist [$];
    longint s, c, ex, got;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) hist.push_front(0);
    for (int n = 0; n < NS; n++) begin
      // this period: table holds hist[0..P-1]; pick weights
      for (int k = 0; k < P; k++) begin
        ws[k] = (n % 7 == 3) ? ((k % 2) ? 127 : 128) : $urandom_range(255);
        xs[k] = hist[k];
      end
      for (int b = 0; b < L; b++) begin
        first = (b == 0);
        last  = (b == L - 1);
        for (int k = 0; k < P; k++) A[k] = ws[k][b];
        if (last) x_in = (n % 5 == 0) ? -128 : L'($urandom_range(255));
        @(negedge clk);
        if (b < L - 1) begin
          // outputs still hold the previous period's result
        end
      end
      hist.push_front(longint'(x_in));
      // result of this period is now in s_word/c_word
      csa_block(L, P, W, xs, ws, s, c);
      ex  = exact_dot(L, P, xs, ws);
      got = sx(longint'(s_word) + 2 * longint'(c_word) + 1, W);
      checks++;
      if (s_word != W'(s) || c_word != W'(c)) begin
        failures++;
        if (failures < 5) $display("FAIL csa n=%0d s=%0d/%0d c=%0d/%0d", n, s_word, s, c_word, c);
      end
      checks++;
      if (!(got * 128 <= ex && got * 128 > ex - 128)) begin
        failures++;
        if (failures < 5) $display("FAIL bound n=%0d got=%0d exact*128=%0d", n, got, ex);
      end
      for (int k = 0; k < P; k++) begin
        checks++;
        if (tap[k] != L'(hist[k])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
