// DA table: the 2**P - 1 possible sums of the P most recent input samples.
//
// Entry k (1 <= k < 2**P) holds c_k = sum_j k_j * x(n-j), where k_j is bit j of
// k; entry 0 is the constant zero and is not a register. When a new sample
// x(n+1) arrives, every entry is refreshed in the same byte-clock edge:
//   k even : c_k <= c_{k>>1}              (a plain register move)
//   k odd  : c_k <= x(n+1) + c_{k>>1}     (one adder; for k = 1 no adder)
// so 2**(P-1) - 1 adders (7 for P = 4) produce all new sums in parallel. This
// recurrence is the update network of the published four-point table. All
// entries are stored sign-extended to L + clog2(P) bits (L+2 for P = 4), the
// width of the largest sum; the narrower L and L+1-bit registers of
// single- and two-term entries are this design's simplification.
//
// Interface: x_in is sampled on the rising clk edge when load is high.
// c[k] is registered (valid the cycle after the load). tap[j] = x(n-j).
module da_table #(
  parameter int unsigned P = da_lms_pkg::DEF_P,
  parameter int unsigned L = da_lms_pkg::DEF_L,
  localparam int unsigned W = L + $clog2(P)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic signed [L-1:0] x_in,
  output logic signed [W-1:0] c   [2**P],
  output logic signed [L-1:0] tap [P]
);
  logic signed [W-1:0] regs [1:2**P-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < 2**P; k++) regs[k] <= '0;
    end else if (load) begin
      for (int k = 1; k < 2**P; k++) begin
        if (k == 1)       regs[k] <= W'(x_in);
        else if (k % 2 == 1) regs[k] <= W'(x_in) + regs[k/2];
        else              regs[k] <= regs[k/2];
      end
    end
  end

  always_comb begin
    c[0] = '0;
    for (int k = 1; k < 2**P; k++) c[k] = regs[k];
    for (int j = 0; j < P; j++) tap[j] = L'(regs[2**j]);
  end
endmodule
