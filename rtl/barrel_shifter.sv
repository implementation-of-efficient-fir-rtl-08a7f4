// Barrel shifter of the weight-increment block.
//
// Multiplying a sample by the power-of-two approximation of mu*e(n) is a right
// shift: the output is x >>> t (arithmetic, so the sign is kept), built as
// clog2(L) stages of fixed 2^i shifts selected by the bits of t.
// Combinational. The shift-by-t role is the published one; the arithmetic
// (floor) shift and the log-stage structure are this design's choices.
module barrel_shifter #(
  parameter int unsigned L  = da_lms_pkg::DEF_L,
  parameter int unsigned TW = $clog2(da_lms_pkg::DEF_L)
) (
  input  logic signed [L-1:0]  x,
  input  logic        [TW-1:0] t,
  output logic signed [L-1:0]  y
);
  logic signed [L-1:0] stage [TW+1];

  always_comb begin
    stage[0] = x;
    for (int i = 0; i < TW; i++)
      stage[i+1] = t[i] ? (stage[i] >>> (2**i)) : stage[i];
    y = stage[TW];
  end
endmodule
