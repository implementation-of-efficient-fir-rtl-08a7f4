// Reference arithmetic for the DA LMS filter testbenches.
//
// Integer models written from the arithmetic definitions, not from the RTL
// structure: sign extension, a bit-level carry-save shift accumulation of one
// P-tap block, the leading-zero shift count, and the sign/power-of-two weight
// update. All word lengths are passed as arguments so one package serves
// every filter size.
package da_lms_ref_pkg;

  // sign-extend the low w bits of v
  function automatic longint sx(longint v, int w);
    longint m = (longint'(1) << w) - 1;
    longint u = v & m;
    if (u[w-1] == 1'b1) return u - (longint'(1) << w);
    return u;
  endfunction

  // Carry-save DA accumulation of one block: L bit slices, LSB first, MSB
  // slice complemented. Returns the sum and carry words (wb bits, signed).
  function automatic void csa_block(input int L, input int P, input int wb,
                                    input longint xs[], input longint ws[],
                                    output longint s, output longint c);
    longint a, b, cc, sn, cn;
    s = 0; c = 0;
    for (int bit_l = 0; bit_l < L; bit_l++) begin
      a = 0;
      for (int k = 0; k < P; k++)
        if (((ws[k] >> bit_l) & 1) != 0) a += xs[k];
      a = sx(a, wb);
      if (bit_l == L - 1) a = ~a;
      b  = (bit_l == 0) ? 0 : (s >>> 1);
      cc = (bit_l == 0) ? 0 : c;
      sn = a ^ b ^ cc;
      cn = (a & b) | (a & cc) | (b & cc);
      s = sx(sn, wb);
      c = sx(cn, wb);
    end
  endfunction

  // exact inner product sum_k w_k x_k, weights read as L-bit fractions,
  // returned scaled by 2^(L-1)
  function automatic longint exact_dot(input int L, input int P,
                                       input longint xs[], input longint ws[]);
    longint acc = 0;
    for (int k = 0; k < P; k++) acc += sx(ws[k], L) * xs[k];
    return acc;
  endfunction

  // number of leading zeros of an (L-1)-bit magnitude, L-1 for zero
  function automatic int lead_zeros(input int L, input longint r);
    for (int i = L - 2; i >= 0; i--)
      if (((r >> i) & 1) != 0) return L - 2 - i;
    return L - 1;
  endfunction

  // sign and saturated magnitude of an L-bit value
  function automatic void sign_mag(input int L, input longint v,
                                   output bit sgn, output longint mag);
    longint sv = sx(v, L);
    sgn = (sv < 0);
    mag = sgn ? -sv : sv;
    if (mag > (longint'(1) << (L - 1)) - 1) mag = (longint'(1) << (L - 1)) - 1;
  endfunction
endpackage
