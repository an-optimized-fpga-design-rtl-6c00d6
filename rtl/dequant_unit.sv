// dequant_unit: one "Dequant_i" processing unit of the inverse quantiser.
//
// Computes the HEVC flat-matrix de-quantisation
//     CoeffIQ = clip16(((level * IQstep) << (QP/6)) + offset) >> (M - 1 + (B - 8)))
// with offset = 1 << (M - 2 + (B - 8)), M = log2(N) of the TU and B the bit
// depth. IQstep and QP/6 come from the ROMs (iq_rom), so the unit only
// multiplies, shifts, adds and shifts again.
//
// Timing: two register stages. The level, TU size and QP are taken in the
// cycle in_valid is high; cycle 1 reads the ROMs and registers the level,
// cycle 2 does the arithmetic and registers the result, so out_valid and
// coeff follow in_valid by two cycles. One level per two cycles is the rate
// the IQ control unit uses, though the stages would accept one per cycle.
// The 16-bit clip of the result is HEVC's rule and a choice of this design.
module dequant_unit
  import iqit_pkg::*;
#(
  parameter int unsigned BIT_DEPTH = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  coef_t    level,
  input  logic [5:0] qp,
  input  tu_size_e size,
  output logic     out_valid,
  output coef_t    coeff
);

  logic [6:0] iqstep;
  logic [3:0] qp_div6;
  coef_t      level_q;
  tu_size_e   size_q;
  logic       v1;
  logic signed [39:0] prod, shifted, scaled;
  int unsigned        rshift;

  iq_rom u_rom (.clk(clk), .qp(qp), .iqstep(iqstep), .qp_div6(qp_div6));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      level_q   <= '0;
      size_q    <= TU4;
      coeff     <= '0;
    end else begin
      v1        <= in_valid;
      level_q   <= level;
      size_q    <= size;
      out_valid <= v1;
      if (v1) coeff <= clip16(scaled);
    end
  end

  // Stage 2 arithmetic: |level| < 2^15, IQstep < 2^7, QP/6 <= 8, so the
  // scaled product fits in 31 bits plus sign.
  always_comb begin
    rshift  = tu_log2(size_q) - 1 + (BIT_DEPTH - 8);
    prod    = 40'(level_q) * $signed({33'd0, iqstep});
    shifted = prod <<< qp_div6;
    scaled  = (shifted + (40'sd1 <<< (rshift - 1))) >>> rshift;
  end

endmodule
