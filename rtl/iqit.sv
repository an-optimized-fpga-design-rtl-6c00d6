// iqit: the inverse quantisation and inverse transform (IQ/IT) component of
// an HEVC decoder, for 4x4, 8x8, 16x16 and 32x32 transform units.
//
// Dataflow: quantised levels enter four at a time (column by column, top to
// bottom), inverse_quant scales them, column_buffer assembles each column,
// and idct2d transforms the columns, stores them in its transpose memory and
// transforms the rows, giving the residual block one row per row_valid
// strobe. The quantiser works on column c+1 while the 1D unit transforms
// column c, so for N >= 16 the column pass runs at the quantiser's rate (one
// group of four every two cycles) and for N <= 8 at the 1D unit's rate.
//
// Control unit: start (with qp, sel, dst) is accepted when busy is low; it
// starts the quantiser and the 2D transform on the same TU and clears the
// column buffer. dst selects the 4-point inverse DST (intra 4x4 luma); it is
// ignored for larger TUs. done is high with the last residual row. Row
// outputs have no back-pressure: the consumer must take one row whenever
// row_valid is high (at most one row per 3 cycles).
//
// Cycles from start to done inclusive, levels supplied without wait:
// 4x4 34, 8x8 64, 16x16 219, 32x32 685. Pipelining between quantiser and
// transform follows the IQ/IT architecture; the handshakes are this
// design's.
module iqit
  import iqit_pkg::*;
#(
  parameter int unsigned BIT_DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [5:0] qp,
  input  tu_size_e   sel,
  input  logic       dst,
  input  logic       level_valid,
  input  coef_t      level [4],
  output logic       level_ready,
  output logic       row_valid,
  output coef_t      row_out [MAXN],
  output logic [4:0] row_idx,
  output logic       done,
  output logic       busy
);

  logic       go;
  tu_size_e   size_q;
  logic       iq_busy, dct_busy;
  logic       issue_ok, done_iq, coeff_last;
  logic [1:0] inflight;
  coef_t      coeff [4];
  logic       col_valid, col_ready;
  coef_t      col [MAXN];

  assign busy = iq_busy || dct_busy;
  assign go   = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  size_q <= TU4;
    else if (go) size_q <= sel;
  end

  inverse_quant #(.BIT_DEPTH(BIT_DEPTH)) u_iq (
    .clk        (clk),
    .rst_n      (rst_n),
    .start_iq   (go),
    .qp         (qp),
    .sel        (sel),
    .level_valid(level_valid),
    .level      (level),
    .level_ready(level_ready),
    .issue_ok   (issue_ok),
    .done_iq    (done_iq),
    .coeff      (coeff),
    .coeff_last (coeff_last),
    .inflight   (inflight),
    .busy       (iq_busy)
  );

  column_buffer u_cb (
    .clk      (clk),
    .rst_n    (rst_n),
    .clr      (go),
    .size     (size_q),
    .in_valid (done_iq),
    .in_coef  (coeff),
    .inflight (inflight),
    .issue_ok (issue_ok),
    .col_valid(col_valid),
    .col_out  (col),
    .col_ready(col_ready)
  );

  idct2d #(.BIT_DEPTH(BIT_DEPTH)) u_2d (
    .clk       (clk),
    .rst_n     (rst_n),
    .start_idct(go),
    .sel       (sel),
    .dst       (dst),
    .col_valid (col_valid),
    .col_in    (col),
    .col_ready (col_ready),
    .row_valid (row_valid),
    .row_out   (row_out),
    .row_idx   (row_idx),
    .done_idct (done),
    .busy      (dct_busy)
  );

  // The quantiser finishes its TU before the transform does.
  a_iq_first: assert property (@(posedge clk) disable iff (!rst_n)
                               done |-> !iq_busy);
  // The last group of a TU is a delivered group.
  a_last_is_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                    coeff_last |-> done_iq);

endmodule
