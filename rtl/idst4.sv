// idst4: the 4-point inverse DST datapath of the 1D transform unit, used for
// intra-coded 4x4 luma TUs.
//
// It keeps the factored form of the HEVC reference decoder's inverse DST,
// with every constant multiplication replaced by shifts and adds:
//     c0 = x0 + x2,  c1 = x2 + x3,  c2 = x0 - x3,  c3 = 74*x1
//     y0 = 29*c0 + 55*c1 + c3        y1 = 55*c2 - 29*c1 + c3
//     y2 = 74*(x0 - x2 + x3)         y3 = 55*c0 + 29*c2 - c3
// where 29v = (v<<5) - (v<<1) - v, 55v = (v<<6) - (v<<3) - v and
// 74v = (v<<6) + (v<<3) + (v<<1). The outputs are the full-precision sums,
// before rounding; idct1d registers them and selects them instead of the
// 4-point IDCT core's sums through a multiplexer.
//
// Combinational. Keeping the DST apart from the IDCT core and reusing the
// reference decoder's equations follows the transform architecture; the
// particular shift-add forms are this design's.
module idst4
  import iqit_pkg::*;
(
  input  coef_t              x [4],
  output logic signed [31:0] y [4]
);

  typedef logic signed [31:0] acc_t;

  function automatic acc_t m29(acc_t v);
    return (v <<< 5) - (v <<< 1) - v;
  endfunction

  function automatic acc_t m55(acc_t v);
    return (v <<< 6) - (v <<< 3) - v;
  endfunction

  function automatic acc_t m74(acc_t v);
    return (v <<< 6) + (v <<< 3) + (v <<< 1);
  endfunction

  acc_t x0, x1, x2, x3, c0, c1, c2, c3;

  always_comb begin
    x0 = acc_t'(x[0]);
    x1 = acc_t'(x[1]);
    x2 = acc_t'(x[2]);
    x3 = acc_t'(x[3]);
    c0 = x0 + x2;
    c1 = x2 + x3;
    c2 = x0 - x3;
    c3 = m74(x1);
    y[0] = m29(c0) + m55(c1) + c3;
    y[1] = m55(c2) - m29(c1) + c3;
    y[2] = m74(x0 - x2 + x3);
    y[3] = m55(c0) + m29(c2) - c3;
  end

endmodule
