// xcoeff: the "XCoeff" component of the 1D inverse transform.
//
// Multiplies one 16-bit coefficient by the most frequent transform constants
// 2, 4, 9, 18, 36, 64 and 90 with shifts and additions only:
//     X2 = x<<1, X4 = x<<2, X9 = (x<<3) + x, X18 = (x<<4) + X2,
//     X36 = X4 + (x<<5), X64 = x<<6, X90 = X64 + X18 + (x<<3).
// Purely combinational; x itself is passed on as x1 for the refinement
// blocks. The decomposition is the one the transform architecture gives.
module xcoeff
  import iqit_pkg::*;
(
  input  coef_t  x,
  output xbase_t xb
);

  prod_t xe;

  always_comb begin
    xe     = PW'(x);
    xb.x1  = xe;
    xb.x2  = xe <<< 1;
    xb.x4  = xe <<< 2;
    xb.x9  = (xe <<< 3) + xe;
    xb.x18 = (xe <<< 4) + xb.x2;
    xb.x36 = xb.x4 + (xe <<< 5);
    xb.x64 = xe <<< 6;
    xb.x90 = xb.x64 + xb.x18 + (xe <<< 3);
  end

endmodule
