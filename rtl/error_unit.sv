// Output and error stage of the filter.
//
// Final adder: y = s_tot + 2*c_tot + cin joins the (tree-summed) sum and
// carry words; the carry word is shifted one place left against the sum word
// because it carries twice the weight (the published data path draws this
// alignment as a one-place right shift of the other word; shifting the carry
// word left instead keeps the sum word's LSB and puts y on the scale of the
// samples). The error is e = d - y, where d is
// the desired sample delayed one sample period by a register so that it lines
// up with y. mu = 1/N is applied by dropping the clog2(N) LSBs of e, which
// leaves an L-bit word, mu*e, that a second register holds for the weight
// update. y and e wrap modulo 2^(L+clog2(N)).
//
// Timing: d_in is sampled at the byte-clock edge (`load`); in the period that
// follows, y and e are combinational from the inner-product output registers
// and that d register, and the mu_e register holds the value of the previous
// period. With the inner-product register in front, the weight update sees
// mu*e two sample periods old.
module error_unit #(
  parameter int unsigned L = da_lms_pkg::DEF_L,
  parameter int unsigned N = da_lms_pkg::DEF_N,
  localparam int unsigned WY = L + $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic signed [WY-1:0] s_tot,
  input  logic signed [WY-1:0] c_tot,
  input  logic                 cin,
  input  logic signed [L-1:0]  d_in,
  output logic signed [WY-1:0] y,
  output logic signed [WY-1:0] e,
  output logic signed [L-1:0]  mu_e      // registered mu*e, one period old
);
  logic signed [L-1:0]  d_q;
  logic signed [WY-1:0] c_sh;

  always_comb begin
    c_sh = c_tot <<< 1;
    y    = s_tot + c_sh + WY'(cin);
    e    = WY'(d_q) - y;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q  <= '0;
      mu_e <= '0;
    end else if (load) begin
      d_q  <= d_in;
      mu_e <= e[WY-1 -: L];
    end
  end
endmodule
