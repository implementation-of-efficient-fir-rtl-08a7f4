// Conditional signed carry-save shift accumulator.
//
// Accumulates L partial inner products y_l, applied LSB slice first, into
//   V = -y_(MSB) + sum_(b<L-1) 2^(b-(L-1)) * y_b        (weights read as
// fractions). V is kept redundantly as a sum word S and a carry word C of W
// bits each, V = S + 2*C (the carry word has twice the weight of the sum word).
// Each bit cycle one row of W full adders computes
//   S' + 2*C' = y' + (S >>> 1) + C
// so the bit-cycle delay is one LUT read plus one full adder, with no carry
// ripple. y' = y XOR {W{sign_ctrl}}: in the MSB cycle the XOR row gives the
// one's complement of the table word; the missing +1 of the two's complement
// is left to the carry input of the final adder that later forms S + 2*C + 1.
// In the first bit cycle the shifted feedback is forced to zero, so no clear
// cycle is needed between samples.
//
// The bits shifted out of S on the right are dropped, so the final result is
// truncated by less than one LSB of the sample word.
//
// Timing: y_in is consumed every clock. At the clock edge that ends the MSB
// cycle (sign_ctrl = 1) the completed words are copied into s_word/c_word,
// which hold them for the whole next sample period.
module csa_accumulator #(
  parameter int unsigned W = da_lms_pkg::DEF_L + $clog2(da_lms_pkg::DEF_P)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                first,      // first (LSB) bit cycle of a sample
  input  logic                sign_ctrl,  // last (MSB) bit cycle of a sample
  input  logic signed [W-1:0] y_in,
  output logic signed [W-1:0] s_word,
  output logic signed [W-1:0] c_word
);
  logic signed [W-1:0] s_acc, c_acc;     // running carry-save state
  logic signed [W-1:0] a, b, cc;         // full-adder row inputs
  logic signed [W-1:0] s_nxt, c_nxt;     // full-adder row outputs

  always_comb begin
    a     = y_in ^ {W{sign_ctrl}};
    b     = s_acc >>> 1;                // arithmetic: sign bit repeated
    cc    = c_acc;
    if (first) begin
      b  = '0;
      cc = '0;
    end
    s_nxt = a ^ b ^ cc;
    c_nxt = (a & b) | (a & cc) | (b & cc);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_acc  <= '0;
      c_acc  <= '0;
      s_word <= '0;
      c_word <= '0;
    end else begin
      s_acc <= s_nxt;
      c_acc <= c_nxt;
      if (sign_ctrl) begin
        s_word <= s_nxt;
        c_word <= c_nxt;
      end
    end
  end
endmodule
