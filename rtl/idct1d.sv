// idct1d: the shared 1D inverse transform unit (IDCT of 4, 8, 16 or 32
// points, or the 4-point inverse DST).
//
// Even-odd decomposition: the N-point inverse DCT splits into the N/2-point
// inverse DCT of the even-indexed inputs (the even part) and an N/2 x N/2
// product of the odd-indexed inputs (the odd part), recombined by a
// butterfly y[k] = E[k] + O[k], y[N-1-k] = E[k] - O[k]. The 4-point core is
// the even part of the 8-point transform, which is the even part of the
// 16-point one, which is the even part of the 32-point one, so one datapath
// serves all sizes; input multiplexers route the N valid inputs to the cores
// the selected size uses. The 4-point inverse DST has its own datapath
// (idst4) on the 4-point core's inputs, and a multiplexer selects its sums
// instead of the IDCT core's. No multiplier is used: every input lane owns
// one xcoeff and one coeff_refine block that form all its constant multiples
// with shifts and adds.
//
// Pipeline (registers at the end of each step):
//   1 input routing             2 constant multiples (signed per matrix entry)
//   3 4-point sums, odd sums of 8/16/32 points, 8-point butterfly;
//     result for N = 4 and 8 is rounded and registered here
//   4 16-point butterfly        5 32-point butterfly, rounding (N = 16, 32)
// so out_valid follows in_valid by 3 cycles for N <= 8 and 5 cycles for
// N >= 16, the latencies of the transform architecture. Rounding is
// (v + 2^(shift-1)) >> shift with a 16-bit clip; shift is 7 after the column
// pass and 20 - bit depth after the row pass, as HEVC specifies.
//
// Interface: x[0..N-1] holds the N inputs (higher lanes are ignored), y[0..N-1]
// the N outputs (higher lanes are zero). The caller must not start a vector
// whose result would leave in the same cycle as an earlier one's; the 2D
// control unit issues one vector at a time.
module idct1d
  import iqit_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  tu_size_e size,
  input  logic     dst,        // 1: 4-point inverse DST (size TU4 only)
  input  logic [3:0] shift,
  input  coef_t    x [MAXN],
  output logic     out_valid,
  output coef_t    y [MAXN]
);

  typedef logic signed [31:0] acc_t;

  typedef struct packed {
    logic       v;
    tu_size_e   size;
    logic       dst;
    logic [3:0] shift;
  } ctl_t;

  function automatic coef_t rnd(acc_t v, logic [3:0] sh);
    logic signed [39:0] w;
    w = (40'(v) + (40'sd1 <<< (sh - 4'd1))) >>> sh;
    return clip16(w);
  endfunction

  // ---------------------------------------------------------------- stage 1
  coef_t v16 [16];
  coef_t v8  [8];
  coef_t a32_c [16], a16_c [8], a8_c [4], v4_c [4];
  coef_t a32 [16], a16 [8], a8 [4], v4 [4];
  ctl_t  c1, c2, c3, c4;
  logic     c5_v;       // stage 5 needs only valid and size
  tu_size_e c5_size;

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      a32_c[i] = x[2*i+1];
      v16[i]   = (size == TU32) ? x[2*i] : x[i];
    end
    for (int i = 0; i < 8; i++) begin
      a16_c[i] = v16[2*i+1];
      v8[i]    = (size == TU32 || size == TU16) ? v16[2*i] : x[i];
    end
    for (int i = 0; i < 4; i++) begin
      a8_c[i] = v8[2*i+1];
      v4_c[i] = (size == TU4) ? x[i] : v8[2*i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1 <= '0;
      a32 <= '{default: '0};
      a16 <= '{default: '0};
      a8  <= '{default: '0};
      v4  <= '{default: '0};
    end else begin
      c1  <= '{v: in_valid, size: size, dst: dst, shift: shift};
      if (in_valid) begin
        a32 <= a32_c;
        a16 <= a16_c;
        a8  <= a8_c;
        v4  <= v4_c;
      end
    end
  end

  // ---------------------------------------------------------------- stage 2
  // Constant multiples of every lane, signed as the matrix entry requires.
  prod_t p32 [16][16], p16 [8][8], p8 [4][4], p4 [4][4];

  for (genvar i = 0; i < 16; i++) begin : g_l32
    xbase_t xb;
    prod_t  pr [33];
    xcoeff       u_xc (.x(a32[i]), .xb(xb));
    coeff_refine u_rf (.xb(xb), .x(a32[i]), .prod(pr));
    for (genvar k = 0; k < 16; k++) begin : g_k
      localparam int T = t32_index(2*i+1, k);
      localparam int S = t32_sign(2*i+1, k);
      always_ff @(posedge clk) if (c1.v) p32[i][k] <= (S > 0) ? pr[T] : -pr[T];
    end
  end

  for (genvar i = 0; i < 8; i++) begin : g_l16
    xbase_t xb;
    prod_t  pr [33];
    xcoeff       u_xc (.x(a16[i]), .xb(xb));
    coeff_refine u_rf (.xb(xb), .x(a16[i]), .prod(pr));
    for (genvar k = 0; k < 8; k++) begin : g_k
      localparam int T = t32_index(2*(2*i+1), k);
      localparam int S = t32_sign(2*(2*i+1), k);
      always_ff @(posedge clk) if (c1.v) p16[i][k] <= (S > 0) ? pr[T] : -pr[T];
    end
  end

  for (genvar i = 0; i < 4; i++) begin : g_l8
    xbase_t xb;
    prod_t  pr [33];
    xcoeff       u_xc (.x(a8[i]), .xb(xb));
    coeff_refine u_rf (.xb(xb), .x(a8[i]), .prod(pr));
    for (genvar k = 0; k < 4; k++) begin : g_k
      localparam int T = t32_index(4*(2*i+1), k);
      localparam int S = t32_sign(4*(2*i+1), k);
      always_ff @(posedge clk) if (c1.v) p8[i][k] <= (S > 0) ? pr[T] : -pr[T];
    end
  end

  // 4-point core: IDCT products; the IDST has its own datapath (idst4)
  // whose sums are registered here and selected by a multiplexer in step 3.
  for (genvar i = 0; i < 4; i++) begin : g_l4
    xbase_t xb;
    prod_t  pr [33];
    xcoeff       u_xc (.x(v4[i]), .xb(xb));
    coeff_refine u_rf (.xb(xb), .x(v4[i]), .prod(pr));
    for (genvar k = 0; k < 4; k++) begin : g_k
      localparam int T = t32_index(8*i, k);
      localparam int S = t32_sign(8*i, k);
      always_ff @(posedge clk) if (c1.v) p4[i][k] <= (S > 0) ? pr[T] : -pr[T];
    end
  end

  acc_t dst_c [4], dst_q [4];
  idst4 u_dst (.x(v4), .y(dst_c));
  always_ff @(posedge clk) if (c1.v && c1.dst) dst_q <= dst_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c2 <= '0;
      c3 <= '0;
      c4 <= '0;
      c5_v <= 1'b0;
      c5_size <= TU4;
    end else begin
      c2 <= c1;
      c3 <= c2;
      c4 <= c3;
      c5_v <= c4.v;
      c5_size <= c4.size;
    end
  end

  // ---------------------------------------------------------------- stage 3
  acc_t y4_c [4], o8_c [4], y8_c [8], o16_c [8], o32_c [16];
  coef_t small_c [8];

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      y4_c[k] = '0;
      o8_c[k] = '0;
      for (int i = 0; i < 4; i++) begin
        y4_c[k] += acc_t'(p4[i][k]);
        o8_c[k] += acc_t'(p8[i][k]);
      end
      if (c2.dst) y4_c[k] = dst_q[k];
      y8_c[k]     = y4_c[k] + o8_c[k];
      y8_c[7 - k] = y4_c[k] - o8_c[k];
    end
    for (int k = 0; k < 8; k++) begin
      o16_c[k] = '0;
      for (int i = 0; i < 8; i++) o16_c[k] += acc_t'(p16[i][k]);
    end
    for (int k = 0; k < 16; k++) begin
      o32_c[k] = '0;
      for (int i = 0; i < 16; i++) o32_c[k] += acc_t'(p32[i][k]);
    end
    for (int k = 0; k < 8; k++)
      small_c[k] = (k < 4 && c2.size == TU4) ? rnd(y4_c[k], c2.shift)
                 : (c2.size == TU4)          ? coef_t'(0)
                 :                             rnd(y8_c[k], c2.shift);
  end

  coef_t small_q [8];
  acc_t  y8_q [8], o16_q [8], o32_q3 [16];

  always_ff @(posedge clk) begin
    if (c2.v) begin
      small_q <= small_c;
      y8_q    <= y8_c;
      o16_q   <= o16_c;
      o32_q3  <= o32_c;
    end
  end

  // ---------------------------------------------------------------- stage 4
  acc_t y16_q [16], o32_q4 [16];

  always_ff @(posedge clk) begin
    if (c3.v) begin
      for (int k = 0; k < 8; k++) begin
        y16_q[k]      <= y8_q[k] + o16_q[k];
        y16_q[15 - k] <= y8_q[k] - o16_q[k];
      end
      o32_q4 <= o32_q3;
    end
  end

  // ---------------------------------------------------------------- stage 5
  coef_t large_q [MAXN];

  always_ff @(posedge clk) begin
    if (c4.v) begin
      for (int k = 0; k < 16; k++) begin
        if (c4.size == TU16) begin
          large_q[k]      <= rnd(y16_q[k], c4.shift);
          large_q[16 + k] <= '0;
        end else begin
          large_q[k]      <= rnd(y16_q[k] + o32_q4[k], c4.shift);
          large_q[31 - k] <= rnd(y16_q[k] - o32_q4[k], c4.shift);
        end
      end
    end
  end

  // ---------------------------------------------------------------- output
  logic small_v, large_v;
  assign small_v = c3.v && (c3.size == TU4 || c3.size == TU8);
  assign large_v = c5_v && (c5_size == TU16 || c5_size == TU32);
  assign out_valid = small_v || large_v;

  always_comb begin
    for (int k = 0; k < MAXN; k++)
      y[k] = small_v ? ((k < 8) ? small_q[k] : coef_t'(0)) : large_q[k];
  end

  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(small_v && large_v));

endmodule
