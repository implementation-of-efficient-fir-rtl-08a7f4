// Sign-magnitude separator of the scaled error mu*e.
//
// Splits the L-bit two's-complement mu*e into its sign bit (which selects add
// or subtract in the weight update) and an (L-1)-bit magnitude (whose leading
// one sets the barrel-shift count). The one value whose magnitude does not fit
// in L-1 bits, -2^(L-1), is given the largest magnitude 2^(L-1)-1; that
// saturation is this design's choice. Combinational.
module sign_mag_separator #(
  parameter int unsigned L = da_lms_pkg::DEF_L
) (
  input  logic signed [L-1:0] mu_e,
  output logic                sign,
  output logic        [L-2:0] mag
);
  logic [L-1:0] neg;

  always_comb begin
    sign = mu_e[L-1];
    neg  = -mu_e;
    if (!sign)          mag = mu_e[L-2:0];
    else if (neg[L-1])  mag = '1;            // -2^(L-1)
    else                mag = neg[L-2:0];
  end
endmodule
