// iqit_pkg: types, widths and constant functions shared by the HEVC inverse
// quantisation / inverse transform (IQ/IT) datapath.
//
// The transform constants are the HEVC integer DCT coefficients. Every entry
// of the 32-point matrix is, up to sign, one value of the table C[t]
// (t = 0..32), the integer approximation of 64*sqrt(2)*cos(t*pi/64); row 0
// of the matrix uses 64. The 4-, 8- and 16-point matrices are sub-sampled
// rows of the 32-point one (T_N[j][k] = T_32[j*32/N][k]), which is what lets
// the even part of each size be the next smaller transform. (The 4-point
// inverse DST, with its constants 29, 55, 74 and 84, lives in idst4.)
package iqit_pkg;

  // Sample / coefficient word, as stored in the transpose memory (8 x 16 bit
  // = 128 bit words).
  localparam int unsigned DW      = 16;
  localparam int unsigned MAXN    = 32;     // largest TU edge
  localparam int unsigned WORD_W  = 128;    // transpose memory word
  localparam int unsigned PER_WORD = WORD_W / DW;  // 8 coefficients per word

  typedef logic signed [DW-1:0] coef_t;

  // A 16-bit coefficient times a constant below 128.
  localparam int unsigned PW = 24;
  typedef logic signed [PW-1:0] prod_t;

  // The most redundant multiples, produced by xcoeff with shifts and adds.
  typedef struct packed {
    prod_t x1, x2, x4, x9, x18, x36, x64, x90;
  } xbase_t;

  // TU size select ("sel").
  typedef enum logic [1:0] {
    TU4  = 2'd0,
    TU8  = 2'd1,
    TU16 = 2'd2,
    TU32 = 2'd3
  } tu_size_e;

  function automatic int unsigned tu_n(tu_size_e s);
    return 4 << s;
  endfunction

  // log2(N)
  function automatic int unsigned tu_log2(tu_size_e s);
    return 2 + int'(s);
  endfunction

  // C[t] = round(64*sqrt(2)*cos(t*pi/64)) as fixed by HEVC; C[0] is the DC
  // weight 64.
  function automatic int hevc_cos(int t);
    case (t)
      0:  return 64;  1: return 90;  2: return 90;  3: return 90;
      4:  return 89;  5: return 88;  6: return 87;  7: return 85;
      8:  return 83;  9: return 82; 10: return 80; 11: return 78;
      12: return 75; 13: return 73; 14: return 70; 15: return 67;
      16: return 64; 17: return 61; 18: return 57; 19: return 54;
      20: return 50; 21: return 46; 22: return 43; 23: return 38;
      24: return 36; 25: return 31; 26: return 25; 27: return 22;
      28: return 18; 29: return 13; 30: return 9;  31: return 4;
      default: return 0;
    endcase
  endfunction

  // Index t and sign of the 32-point matrix entry T32[j][k] (basis j,
  // sample k): the angle is j*(2k+1)*pi/64, folded into 0..32.
  function automatic int t32_index(int j, int k);
    int a;
    if (j == 0) return 0;
    a = (j * (2*k + 1)) % 128;
    if (a <= 32)      return a;
    else if (a <= 64) return 64 - a;
    else if (a <= 96) return a - 64;
    else              return 128 - a;
  endfunction

  function automatic int t32_sign(int j, int k);
    int a;
    if (j == 0) return 1;
    a = (j * (2*k + 1)) % 128;
    if (a <= 32 || a > 96) return 1;
    else                   return -1;
  endfunction

  function automatic int t32(int j, int k);
    return t32_sign(j, k) * hevc_cos(t32_index(j, k));
  endfunction

  // Entry of the N-point inverse-transform matrix: sub-sampled 32-point row.
  function automatic int tn(int n, int j, int k);
    return t32(j * (32 / n), k);
  endfunction

  // Clip a wide signed value to the 16-bit coefficient range.
  function automatic coef_t clip16(logic signed [39:0] v);
    if (v > 40'sd32767)       return 16'sh7fff;
    else if (v < -40'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

endpackage
