// Control-word generator for the barrel shifters.
//
// t is the number of leading zeros of the (L-1)-bit error magnitude r: a one
// in the top bit r[L-2] gives t = 0, a one first found in r[0] gives t = L-2,
// and r = 0 gives t = L-1 (for L = 8: r[6] -> "000" ... r[0] -> "110", else
// "111"). Only the position of the most significant one of the error is used,
// so the update step is the error rounded down to a power of two. A priority
// encoder; combinational. The L = 8 decision list is the published one; the
// formula for other L is this design's generalisation.
module control_word_gen #(
  parameter int unsigned L  = da_lms_pkg::DEF_L,
  parameter int unsigned TW = $clog2(da_lms_pkg::DEF_L)
) (
  input  logic [L-2:0]  r,
  output logic [TW-1:0] t
);
  always_comb begin
    t = TW'(L - 1);
    for (int i = 0; i < L - 1; i++)            // lowest bit first, highest wins
      if (r[i]) t = TW'(L - 2 - i);
  end
endmodule
