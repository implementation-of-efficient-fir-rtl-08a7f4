// DA-based delayed-LMS adaptive FIR filter (top level).
//
// A length-N adaptive filter whose inner product is computed by distributed
// arithmetic instead of multipliers. The N taps are split into N/P blocks of
// P taps. Each block keeps a DA table of all 2**P-1 sums of its P samples,
// refreshed in parallel in one sample period, and reads it with the
// weight bit slices while a carry-save accumulator builds the inner product
// bit-serially in L cycles of the bit clock. The blocks' sum words and carry
// words are added by two adder trees (N/(2P) unit carry-ins on the carry
// tree restore the +1 of every block's MSB negation; a single block instead
// gets one carry-in at the final adder), the final adder forms y, and the
// error e = d - y is scaled by mu = 1/N by dropping log2(N) bits. The weight
// update keeps only the sign and the leading-one position of mu*e: a
// priority encoder gives the shift count t and every weight moves by
// +-(x >>> t). MU_I > 0 selects the smaller step mu = 2^-MU_I / N by
// pre-shifting the samples in front of the barrel shifters. Filtering and weight update run concurrently, so the update
// uses the error and input vector of two sample periods earlier
// (adaptation delay m = 2):
//   w_k(n+1) = w_k(n) + sign(mu*e(n-2)) * (x(n-2-k) >>> t(n-2))
//
// Clocking: clk is the bit clock. One sample period is L clock cycles;
// sample_en is high in the last of them, and the rising edge that ends it is
// the byte-clock edge where x_in and d_in are sampled. Following the
// published timing, the sample presented as x_in in period n is x(n+1) and
// the desired sample presented with it is d(n); in that period y_out is
// y(n-1) = sum_k w_k(n-1) x(n-1-k), e_out = d(n-1) - y(n-1), and w_out holds
// w(n). Samples are L-bit two's-complement integers, weights L-bit
// two's-complement fractions (LSB 2^-(L-1)), y and e have L + log2(N) bits.
// The DA inner product is truncated: y is at most one LSB per block below the
// exact value. Reset (active low, asynchronous) clears all state.
module da_lms_filter #(
  parameter int unsigned N = da_lms_pkg::DEF_N,
  parameter int unsigned P = da_lms_pkg::DEF_P,
  parameter int unsigned L = da_lms_pkg::DEF_L,
  parameter int unsigned MU_I = 0,                // mu = 2^-MU_I / N
  localparam int unsigned TH = N / P,             // number of blocks
  localparam int unsigned WY = L + $clog2(N),
  localparam int unsigned TW = $clog2(L)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [L-1:0]  x_in,       // x(n+1)
  input  logic signed [L-1:0]  d_in,       // d(n)
  output logic                 sample_en,  // last bit cycle of the sample period
  output logic signed [WY-1:0] y_out,      // y(n-1)
  output logic signed [WY-1:0] e_out,      // e(n-1)
  output logic signed [L-1:0]  w_out [N]   // w(n)
);
  localparam int unsigned WB = L + $clog2(P);

  initial begin
    assert (P >= 2 && N % P == 0 && (TH & (TH - 1)) == 0)
      else $error("N/P must be a power of two and P >= 2");
  end

  logic                 first, last;
  logic signed [WB-1:0] s_blk [TH];
  logic signed [WB-1:0] c_blk [TH];
  logic signed [L-1:0]  tap   [TH][P];
  logic        [P-1:0]  A     [TH];
  logic signed [L-1:0]  x_end [2];     // x(n-N), x(n-N-1)
  logic signed [WY-1:0] s_tot, c_tot;
  logic signed [L-1:0]  mu_e;
  logic                 err_sign;
  logic        [L-2:0]  err_mag;
  logic        [TW-1:0] t;

  da_bit_timing #(.L(L)) u_timing (.clk, .rst_n, .bit_idx(), .first, .last);
  assign sample_en = last;

  // inner-product blocks, DA tables chained through their oldest sample
  for (genvar b = 0; b < TH; b++) begin : g_ip
    logic signed [L-1:0] blk_x;
    logic signed [L-1:0] blk_tap [P];
    if (b == 0) begin : g_head
      assign blk_x = x_in;
    end else begin : g_chain
      assign blk_x = tap[b-1][P-1];
    end
    inner_product_block #(.P(P), .L(L)) u_ip (
      .clk, .rst_n, .first, .last, .x_in(blk_x), .A(A[b]),
      .s_word(s_blk[b]), .c_word(c_blk[b]), .tap(blk_tap)
    );
    for (genvar j = 0; j < P; j++) begin : g_tap
      assign tap[b][j] = blk_tap[j];
    end
  end

  // two samples beyond the last DA table, for the last update lanes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_end[0] <= '0;
      x_end[1] <= '0;
    end else if (last) begin
      x_end[0] <= tap[TH-1][P-1];
      x_end[1] <= x_end[0];
    end
  end

  // sum-word and carry-word adder trees
  adder_tree #(.NUM(TH), .WI(WB), .WO(WY), .CIN(0)) u_sum_tree (
    .in(s_blk), .sum(s_tot)
  );
  adder_tree #(.NUM(TH), .WI(WB), .WO(WY), .CIN(TH / 2)) u_carry_tree (
    .in(c_blk), .sum(c_tot)
  );

  error_unit #(.L(L), .N(N)) u_err (
    .clk, .rst_n, .load(last), .s_tot, .c_tot, .cin(TH == 1),
    .d_in, .y(y_out), .e(e_out), .mu_e
  );

  sign_mag_separator #(.L(L)) u_smag (.mu_e, .sign(err_sign), .mag(err_mag));
  control_word_gen   #(.L(L), .TW(TW)) u_cwg (.r(err_mag), .t);

  // weight-increment blocks: lane k of block b uses x(n-2-b*P-k)
  for (genvar b = 0; b < TH; b++) begin : g_wi
    logic signed [L-1:0] x_d [P];
    logic signed [L-1:0] w_b [P];
    for (genvar k = 0; k < P; k++) begin : g_lane
      if (k + 2 < P) begin : g_own
        assign x_d[k] = tap[b][k+2];
      end else if (b + 1 < TH) begin : g_next
        assign x_d[k] = tap[b+1][k+2-P];
      end else begin : g_end
        assign x_d[k] = x_end[k+2-P];
      end
      assign w_out[b*P+k] = w_b[k];
    end
    weight_increment_block #(.P(P), .L(L), .TW(TW), .MU_I(MU_I)) u_wi (
      .clk, .rst_n, .load(last), .x_d, .t, .sign(err_sign), .w(w_b), .A(A[b])
    );
  end
endmodule
