// Test of the weight-increment block (P = 4, L = 8). Each sample period
// applies random delayed samples, shift count and error sign; at the load
// edge each weight must become w +- (x >>> t) (add for sign 0, subtract for
// sign 1, modulo 2^8), and during the following period the bit slices on A
// must be the new weights, LSB first. Weights must not change between loads.
module tb_weight_increment_block;
  import da_lms_ref_pkg::*;
  localparam int P = 4, L = 8;
  logic clk = 0, rst_n = 0, load = 0, sign = 0;
  logic signed [L-1:0] x_d [P];
  logic [2:0] t = '0;
  logic signed [L-1:0] w [P];
  logic [P-1:0] A;
  int checks = 0, failures = 0;

  weight_increment_block #(.P(P), .L(L), .TW(3)) dut (.clk, .rst_n, .load, .x_d, .t, .sign, .w, .A);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint wm [P] = '{0, 0, 0, 0};
    longint inc;
    foreach (x_d[k]) x_d[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      for (int l = 0; l < L; l++) begin
        // weights and slices of the current period
        for (int k = 0; k < P; k++) begin
          checks++;
          if (w[k] != L'(wm[k]) || A[k] != ((wm[k] >> l) & 1)) begin
            failures++;
            if (failures < 5) $display("FAIL n=%0d l=%0d k=%0d w=%0d exp=%0d A=%b", n, l, k, w[k], wm[k], A[k]);
          end
        end
        // inputs change freely; only the last cycle's values are used
        for (int k = 0; k < P; k++) x_d[k] = L'($urandom);
        t = 3'($urandom); sign = 1'($urandom);
        load = (l == L - 1);
        @(negedge clk);
      end
      // model of the load that just happened (inputs of the last cycle)
      for (int k = 0; k < P; k++) begin
        inc = sx(longint'(x_d[k]), L) >>> t;
        wm[k] = sx(sign ? wm[k] - inc : wm[k] + inc, L);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
