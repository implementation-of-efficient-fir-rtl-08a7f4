// End-to-end test of the DA LMS adaptive filter at its default size
// (N = 16, P = 4, L = 8).
//
// The filter identifies an unknown 16-tap FIR plant: x(n) is random, d(n) is
// the plant output. Every sample period the testbench compares y_out, e_out
// and all weights with a sample-level model of the delayed-LMS recursion
// (carry-save DA inner product per block, sum/carry trees with carry-ins,
// mu = 1/N by truncation, sign/leading-one weight update with adaptation
// delay 2). It also checks that every inner product is within the DA
// truncation bound of the exact product, that a sample period is L bit
// cycles, that the error shrinks and the weights approach the plant as the
// filter adapts, and that the update
// mechanisms (add, subtract, every shift count including the zero-error
// code) all occur. A late burst of constant full-scale input after the
// weights have grown produces errors large enough for the smallest shift
// counts.
module tb_da_lms_filter;
  import da_lms_ref_pkg::*;

  localparam int N  = 16;
  localparam int P  = 4;
  localparam int L  = 8;
  localparam int TH = N / P;
  localparam int WB = L + $clog2(P);
  localparam int WY = L + $clog2(N);
  localparam int NS = 3000;          // samples
  localparam int OFF = 64;           // index offset for negative times

  logic clk = 0, rst_n = 0;
  logic signed [L-1:0]  x_in = '0, d_in = '0;
  logic                 sample_en;
  logic signed [WY-1:0] y_out, e_out;
  logic signed [L-1:0]  w_out [N];

  da_lms_filter dut (.clk, .rst_n, .x_in, .d_in, .sample_en, .y_out, .e_out, .w_out);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint xh [NS+OFF+4];
  longint dh [NS+OFF+4];
  longint yh [NS+OFF+4];
  longint eh [NS+OFF+4];
  longint mh [NS+OFF+4];
  longint wh [NS+OFF+4][N];
  longint plant  [N];
  longint plant2 [N];
  int n_add = 0, n_sub = 0, n_zero = 0, n_sat = 0, n_trunc_err = 0;
  int t_seen [L];
  int cyc = 0, last_cyc = -1, bad_period = 0;

  function automatic int ix(int n); return n + OFF; endfunction

  task automatic check(string what, longint got, longint exp, int n);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s n=%0d got=%0d exp=%0d", what, n, got, exp);
    end
  endtask

  // model of one sample period n: y(n), e(n), mu*e(n), w(n+1)
  task automatic model_step(int n);
    longint xs [], ws [], s, c, ys = 0, yc = 0, ex = 0, inc;
    longint mag; bit sgn; int t;
    xs = new[P]; ws = new[P];
    for (int b = 0; b < TH; b++) begin
      for (int k = 0; k < P; k++) begin
        xs[k] = xh[ix(n - b*P - k)];
        ws[k] = wh[ix(n)][b*P + k];
      end
      csa_block(L, P, WB, xs, ws, s, c);
      ys += s; yc += c;
      ex += exact_dot(L, P, xs, ws);
    end
    yh[ix(n)] = sx(ys + 2 * (yc + TH / 2) + (TH == 1 ? 1 : 0), WY);
    // truncation bound: exact - TH < y <= exact (scaled by 2^(L-1))
    checks++;
    if (!(yh[ix(n)] * (longint'(1) << (L-1)) <= ex && yh[ix(n)] * (longint'(1) << (L-1)) > ex - longint'(TH) * (longint'(1) << (L-1)))) begin
      n_trunc_err++; failures++;
      if (n_trunc_err < 5) $display("FAIL DA bound n=%0d y=%0d exact*2^(L-1)=%0d", n, yh[ix(n)], ex);
    end
    eh[ix(n)] = sx(dh[ix(n)] - yh[ix(n)], WY);
    mh[ix(n)] = sx(eh[ix(n)] >>> $clog2(N), L);
    sign_mag(L, mh[ix(n-2)], sgn, mag);
    t = lead_zeros(L, mag);
    if (sx(mh[ix(n-2)], L) == -(longint'(1) << (L-1))) n_sat++;
    t_seen[t]++;
    if (mag == 0) n_zero++;
    for (int k = 0; k < N; k++) begin
      inc = sx(xh[ix(n - 2 - k)], L) >>> t;
      if (inc != 0) begin if (sgn) n_sub++; else n_add++; end
      wh[ix(n+1)][k] = sx(sgn ? wh[ix(n)][k] - inc : wh[ix(n)][k] + inc, L);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (sample_en && rst_n) begin
      if (last_cyc >= 0 && cyc - last_cyc != L) bad_period++;
      last_cyc <= cyc;
    end
  end

  initial begin
    #(10 * L * (NS + 50));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc, err_early, err_late, wdist, wdist0;
    int t_distinct;
    err_early = 0; err_late = 0; wdist = 0; wdist0 = 0; t_distinct = 0;
    foreach (xh[i]) begin xh[i] = 0; dh[i] = 0; yh[i] = 0; eh[i] = 0; mh[i] = 0; end
    foreach (wh[i, k]) wh[i][k] = 0;
    foreach (t_seen[i]) t_seen[i] = 0;
    // plant taps as fractions of 2^(L-1)
    plant  = '{40, -24, 16, 10, -8, 6, 4, -3, 2, 2, -1, 1, 0, 1, 0, 0};
    foreach (plant2[k]) plant2[k] = 64;
    foreach (plant[k]) wdist0 += (plant[k] < 0) ? -plant[k] : plant[k];
    // reset state: y(-1) from cleared sum/carry registers, d(-1) = 0
    yh[ix(-1)] = TH;
    eh[ix(-1)] = -TH;
    mh[ix(-1)] = sx(eh[ix(-1)] >>> $clog2(N), L);
    mh[ix(-2)] = 0;
    // phase 1 (n < 1200): small plant, full-scale random x
    // phase 2 (n < 2400): plant of sixteen 0.5 taps, x in [-16, 15]
    // phase 3 (n < 2440): constant full-scale x, d clipped: huge errors
    // phase 4: phase-1 plant again
    for (int n = 1; n <= NS + 1; n++) begin
      if (n < 1200)      xh[ix(n)] = $signed($urandom_range(255)) - 128;
      else if (n < 2400) xh[ix(n)] = $signed($urandom_range(31)) - 16;
      else if (n < 2440) xh[ix(n)] = 127;
      else               xh[ix(n)] = $signed($urandom_range(63)) - 32;
    end
    for (int n = 0; n <= NS; n++) begin
      acc = 0;
      for (int k = 0; k < N; k++)
        acc += ((n >= 1200 && n < 2440) ? plant2[k] : plant[k]) * xh[ix(n - k)];
      acc = acc >>> (L - 1);
      if (acc > 127) acc = 127;
      if (acc < -128) acc = -128;
      dh[ix(n)] = acc;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      // wait for the last bit cycle of period n
      do @(negedge clk); while (!sample_en);
      check("y", y_out, yh[ix(n-1)], n);
      check("e", e_out, eh[ix(n-1)], n);
      for (int k = 0; k < N; k++) check("w", w_out[k], wh[ix(n)][k], n);
      model_step(n);
      if (n < 50)               err_early += (eh[ix(n)] < 0) ? -eh[ix(n)] : eh[ix(n)];
      if (n >= 1150 && n < 1200) err_late  += (eh[ix(n)] < 0) ? -eh[ix(n)] : eh[ix(n)];
      if (n == 1199)
        for (int k = 0; k < N; k++)
          wdist += (wh[ix(n+1)][k] > plant[k]) ? wh[ix(n+1)][k] - plant[k] : plant[k] - wh[ix(n+1)][k];
      x_in = L'(xh[ix(n+1)]);
      d_in = L'(dh[ix(n)]);
    end
    checks++;
    if (bad_period != 0 || last_cyc < 0) begin failures++; $display("FAIL sample period not %0d cycles", L); end
    foreach (t_seen[i]) if (t_seen[i] > 0) t_distinct++;
    $display("mechanisms: add=%0d sub=%0d zero_err=%0d sat=%0d distinct_t=%0d", n_add, n_sub, n_zero, n_sat, t_distinct);
    $display("sum |e| over 50 samples: first=%0d after 1150=%0d; sum |w - plant| start=%0d n=1200=%0d",
             err_early, err_late, wdist0, wdist);
    checks++; if (n_add == 0)  begin failures++; $display("FAIL no weight add"); end
    checks++; if (n_sub == 0)  begin failures++; $display("FAIL no weight subtract"); end
    checks++; if (n_zero == 0) begin failures++; $display("FAIL no zero-error update"); end
    checks++; if (t_distinct < L) begin failures++; $display("FAIL only %0d shift counts", t_distinct); end
    checks++; if (!(err_late < err_early)) begin failures++; $display("FAIL error did not decrease"); end
    checks++; if (!(2 * wdist < wdist0)) begin failures++; $display("FAIL weights did not approach the plant"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
