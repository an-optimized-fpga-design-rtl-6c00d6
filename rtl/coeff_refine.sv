// coeff_refine: the refinement blocks that complete the constant
// multiplication of one coefficient.
//
// From the XCoeff multiples (x, X2, X4, X9, X18, X36, X64, X90) it forms
// every other HEVC transform constant with one or two additions or
// subtractions, e.g. X89 = X90 - x, X83 = X64 + X18 + x, X57 = X64 - X9 + X2,
// X43 = X36 + X9 - X2. The result is indexed by angle: prod[t] = x * C[t],
// where C[t] is the HEVC approximation of 64*sqrt(2)*cos(t*pi/64) (C[0] = 64
// is the DC weight, C[32] = 0).
//
// Combinational. The decompositions are those of the transform
// architecture; gathering all refinement adders of a lane into one module
// is a choice of this design.
module coeff_refine
  import iqit_pkg::*;
(
  input  xbase_t xb,
  input  coef_t  x,
  output prod_t  prod [33]
);

  prod_t xe;

  always_comb begin
    xe = PW'(x);
    prod[0]  = xb.x64;
    prod[1]  = xb.x90;
    prod[2]  = xb.x90;
    prod[3]  = xb.x90;
    prod[4]  = xb.x90 - xb.x1;               // 89
    prod[5]  = xb.x90 - xb.x2;               // 88
    prod[6]  = xb.x90 - xb.x4 + xb.x1;       // 87
    prod[7]  = xb.x90 - xb.x4 - xb.x1;       // 85
    prod[8]  = xb.x64 + xb.x18 + xb.x1;      // 83
    prod[9]  = xb.x64 + xb.x18;              // 82
    prod[10] = xb.x64 + (xe <<< 4);          // 80
    prod[11] = xb.x64 + xb.x18 - xb.x4;      // 78
    prod[12] = xb.x64 + xb.x9 + xb.x2;       // 75
    prod[13] = xb.x64 + xb.x9;               // 73
    prod[14] = xb.x64 + xb.x4 + xb.x2;       // 70
    prod[15] = xb.x64 + xb.x2 + xb.x1;       // 67
    prod[16] = xb.x64;                       // 64
    prod[17] = xb.x64 - xb.x2 - xb.x1;       // 61
    prod[18] = xb.x64 - xb.x9 + xb.x2;       // 57
    prod[19] = xb.x36 + xb.x18;              // 54
    prod[20] = xb.x18 + (xe <<< 5);          // 50
    prod[21] = xb.x64 - xb.x18;              // 46
    prod[22] = xb.x36 + xb.x9 - xb.x2;       // 43
    prod[23] = xb.x36 + xb.x2;               // 38
    prod[24] = xb.x36;                       // 36
    prod[25] = xb.x18 + xb.x9 + xb.x4;       // 31
    prod[26] = xb.x9 + (xe <<< 4);           // 25
    prod[27] = xb.x18 + xb.x4;               // 22
    prod[28] = xb.x18;                       // 18
    prod[29] = xb.x9 + xb.x4;                // 13
    prod[30] = xb.x9;                        // 9
    prod[31] = xb.x4;                        // 4
    prod[32] = '0;                           // cos(pi/2)
  end

endmodule
