// DA-table read multiplexer (16:1 for P = 4).
//
// Selects one of the 2**P DA-table words using a weight bit slice
// A = {w_(P-1),l ... w_1,l w_0,l} as the select, so the output is the partial
// inner product y_l = sum_k x_k * w_k,l. Purely combinational. The select
// order (weight k drives select bit k) and the zero word at address 0 are
// those of the published four-point block.
module da_lut_mux #(
  parameter int unsigned P = da_lms_pkg::DEF_P,
  parameter int unsigned W = da_lms_pkg::DEF_L + $clog2(da_lms_pkg::DEF_P)
) (
  input  logic signed [W-1:0] c [2**P],
  input  logic        [P-1:0] sel,
  output logic signed [W-1:0] y
);
  assign y = c[sel];
endmodule
