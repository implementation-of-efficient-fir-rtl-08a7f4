// Weight-increment block for P weights (four for P = 4).
//
// Implements the delayed-LMS update w_k(n+1) = w_k(n) + mu*e(n-2)*x(n-2-k)
// with the error reduced to sign and leading-one position: each of P barrel
// shifters forms x(n-2-k) >>> t, and each adder/subtractor cell adds that
// increment to weight register k when the error sign is 0 and subtracts it
// when the sign is 1. Weights are L-bit two's-complement fractions (LSB =
// 2^-(L-1)); the increment shares that LSB, so the sum wraps modulo 2^L on
// overflow (no saturation: this design's choice). With MU_I > 0 the step
// size becomes mu = 2^-MU_I / N: the samples are pre-shifted by MU_I places
// in front of the barrel shifters, which is the same as adding MU_I to t.
// The default MU_I = 0 is mu = 1/N.
//
// The new weights are written, at the byte-clock edge (`load`, end of the
// last bit cycle), both into the weight registers and into the word-parallel
// bit-serial converter, which then delivers their bit slices A, LSB first,
// during the following sample period. Weights reset to zero.
module weight_increment_block #(
  parameter int unsigned P  = da_lms_pkg::DEF_P,
  parameter int unsigned L  = da_lms_pkg::DEF_L,
  parameter int unsigned TW = $clog2(da_lms_pkg::DEF_L),
  parameter int unsigned MU_I = 0      // mu = 2^-MU_I / N: extra pre-shift
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic signed [L-1:0]  x_d [P],   // x(n-2-k), k = 0..P-1
  input  logic        [TW-1:0] t,         // shift count
  input  logic                 sign,      // sign of mu*e(n-2)
  output logic signed [L-1:0]  w   [P],   // current weights
  output logic        [P-1:0]  A          // weight bit slice of this bit cycle
);
  logic signed [L-1:0] x_pre  [P];
  logic signed [L-1:0] inc    [P];
  logic signed [L-1:0] w_next [P];
  logic        [L-1:0] w_next_u [P];

  for (genvar k = 0; k < P; k++) begin : g_lane
    assign x_pre[k] = x_d[k] >>> MU_I;
    barrel_shifter #(.L(L), .TW(TW)) u_bs (.x(x_pre[k]), .t, .y(inc[k]));
    assign w_next[k]   = sign ? (w[k] - inc[k]) : (w[k] + inc[k]);
    assign w_next_u[k] = w_next[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < P; k++) w[k] <= '0;
    end else if (load) begin
      for (int k = 0; k < P; k++) w[k] <= w_next[k];
    end
  end

  wpbs_converter #(.P(P), .L(L)) u_conv (
    .clk, .rst_n, .load, .w_in(w_next_u), .A
  );
endmodule
