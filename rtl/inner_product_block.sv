// P-point DA inner-product block (four-point for P = 4).
//
// Computes y = sum_k w_k * x(n-k), k = 0..P-1, without multipliers. The DA
// table holds every sum of the last P samples; each bit cycle the weight bit
// slice A selects one of them through the 2**P:1 multiplexer and the
// carry-save accumulator shift-accumulates the selected words, LSB slice
// first, negating the MSB slice. After L bit cycles the block delivers a sum
// word and a carry word of L + clog2(P) bits each; the true result is
// s_word + 2*c_word + 1 (the +1 is added by whoever consumes the words).
//
// Interface and timing (one sample period = L bit cycles):
//   - x_in (the next sample) is written into the DA table at the edge that
//     ends the last bit cycle (`last`), together with the new weights.
//   - A must carry bit l of each weight in bit cycle l (LSB first).
//   - s_word/c_word change at the same edge and then hold the inner product of
//     the weights and samples of the period that just ended.
//   - tap[j] = x(n-j), the plain samples held by the table, for the
//     weight-update path and for chaining blocks.
// The structure (table, 16:1 MUX, carry-save accumulator, S and C registers)
// is the published one; the bit-cycle timing above is this design's.
module inner_product_block #(
  parameter int unsigned P = da_lms_pkg::DEF_P,
  parameter int unsigned L = da_lms_pkg::DEF_L,
  localparam int unsigned W = L + $clog2(P)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                first,
  input  logic                last,
  input  logic signed [L-1:0] x_in,
  input  logic        [P-1:0] A,
  output logic signed [W-1:0] s_word,
  output logic signed [W-1:0] c_word,
  output logic signed [L-1:0] tap [P]
);
  logic signed [W-1:0] table_c [2**P];
  logic signed [W-1:0] y_l;

  da_table #(.P(P), .L(L)) u_table (
    .clk, .rst_n, .load(last), .x_in, .c(table_c), .tap
  );

  da_lut_mux #(.P(P), .W(W)) u_mux (
    .c(table_c), .sel(A), .y(y_l)
  );

  csa_accumulator #(.W(W)) u_csa (
    .clk, .rst_n, .first, .sign_ctrl(last), .y_in(y_l), .s_word, .c_word
  );
endmodule
