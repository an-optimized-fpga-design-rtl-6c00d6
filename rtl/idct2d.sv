// idct2d: the 2D inverse DCT / DST of one TU (4x4 to 32x32) with its
// control unit.
//
// The 2D transform Y = A^T X A is done as two passes of the single idct1d
// unit: first every column of the de-quantised block (shift 7), then every
// row of the intermediate block (shift 20 - BIT_DEPTH). Between the passes
// the intermediate block sits in transpose_mem: the result of column c goes
// to FIFO c as N/8 words of 128 bits (one word for N = 4 and 8, two for 16,
// four for 32), and the row pass reads row r as element r%8 of the head word
// of every FIFO, popping the heads after every eighth row.
//
// Control unit: start_idct latches the TU size (sel) and the DST mode (dst,
// used only with TU4) and clears the transpose memory. Columns enter on
// col_in with a valid/ready handshake, column 0 first; lanes N..31 are
// ignored. The 1D unit works on one vector at a time: the next column (or
// row) is issued in the cycle the previous result leaves it, so a vector
// costs 3 cycles for N <= 8 and 5 cycles for N >= 16. The first word of a
// column result is written in the cycle it leaves the unit, the rest in the
// following cycles, in the shadow of the next column's computation. The row
// pass starts in the cycle after the last word is written. Each row result
// appears for one cycle on row_out with row_valid and its index row_idx
// (no back-pressure); done_idct is high with the last row.
//
// Cycles from start_idct to done_idct inclusive, columns supplied without
// wait: 28 (4x4), 52 (8x8), 165 (16x16), 327 (32x32). The sequential use of
// one 1D unit, the 3/5-cycle latencies and the FIFO organisation follow the
// 2D architecture; the handshakes and the exact overlap of writes are
// choices of this design.
module idct2d
  import iqit_pkg::*;
#(
  parameter int unsigned BIT_DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_idct,
  input  tu_size_e   sel,
  input  logic       dst,
  input  logic       col_valid,
  input  coef_t      col_in [MAXN],
  output logic       col_ready,
  output logic       row_valid,
  output coef_t      row_out [MAXN],
  output logic [4:0] row_idx,
  output logic       done_idct,
  output logic       busy
);

  typedef enum logic [1:0] {S_IDLE, S_COL, S_ROW} state_e;

  localparam logic [3:0] SHIFT_COL = 4'd7;
  localparam logic [3:0] SHIFT_ROW = 4'(20 - BIT_DEPTH);

  state_e     st;
  tu_size_e   size_q;
  logic       dst_q;
  logic [5:0] n_q;          // N
  logic [5:0] issued;       // vectors issued in this pass
  logic [5:0] returned;     // results received in this pass
  logic       unit_busy;
  logic       can_issue;

  // 1D unit
  logic       u_in_valid, u_out_valid;
  coef_t      u_x [MAXN];
  coef_t      u_y [MAXN];
  logic [3:0] u_shift;

  // transpose memory
  logic              tm_clr, tm_wr, tm_pop, tm_empty;
  logic [4:0]        tm_col;
  logic [WORD_W-1:0] tm_word;
  logic [2:0]        tm_elem;
  coef_t             tm_row [MAXN];

  // column result write-back
  logic [WORD_W-1:0] shadow [MAXN/PER_WORD];
  logic [2:0]        wr_left;      // words still to write from the shadow
  logic [1:0]        wr_idx;
  logic [4:0]        wr_col_q;
  logic [2:0]        n_words;

  always_comb begin
    case (size_q)
      TU16:    n_words = 3'd2;
      TU32:    n_words = 3'd4;
      default: n_words = 3'd1;
    endcase
  end

  assign can_issue  = (!unit_busy || u_out_valid) && (issued < n_q);
  assign col_ready  = (st == S_COL) && can_issue;
  assign u_in_valid = (st == S_COL) ? (col_valid && col_ready)
                    : (st == S_ROW) ? can_issue : 1'b0;
  assign u_shift    = (st == S_ROW) ? SHIFT_ROW : SHIFT_COL;
  assign tm_elem    = issued[2:0];
  assign tm_pop     = (st == S_ROW) && u_in_valid &&
                      ((issued[2:0] == 3'd7) || (issued == n_q - 6'd1));

  always_comb begin
    for (int i = 0; i < MAXN; i++) u_x[i] = (st == S_ROW) ? tm_row[i] : col_in[i];
  end

  idct1d u_1d (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (u_in_valid),
    .size     (size_q),
    .dst      (dst_q && (size_q == TU4)),
    .shift    (u_shift),
    .x        (u_x),
    .out_valid(u_out_valid),
    .y        (u_y)
  );

  // Word w of a result packs coefficients 8w..8w+7, lowest index in the
  // lowest bits.
  function automatic logic [WORD_W-1:0] pack_word(coef_t v [MAXN], int w);
    logic [WORD_W-1:0] r;
    for (int e = 0; e < PER_WORD; e++) r[DW*e +: DW] = v[PER_WORD*w + e];
    return r;
  endfunction

  logic col_result;
  assign col_result = (st == S_COL) && u_out_valid;
  assign tm_wr   = col_result || (wr_left != '0);
  assign tm_col  = col_result ? returned[4:0] : wr_col_q;
  assign tm_word = col_result ? pack_word(u_y, 0) : shadow[wr_idx];

  transpose_mem u_tm (
    .clk      (clk),
    .rst_n    (rst_n),
    .clr      (tm_clr),
    .size     (size_q),
    .wr_en    (tm_wr),
    .wr_col   (tm_col),
    .wr_word  (tm_word),
    .rd_pop   (tm_pop),
    .rd_elem  (tm_elem),
    .rd_row   (tm_row),
    .all_empty(tm_empty)
  );

  assign tm_clr = (st == S_IDLE) && start_idct;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      size_q    <= TU4;
      dst_q     <= 1'b0;
      n_q       <= 6'd4;
      issued    <= '0;
      returned  <= '0;
      unit_busy <= 1'b0;
      wr_left   <= '0;
      wr_idx    <= '0;
      wr_col_q  <= '0;
    end else begin
      if (u_in_valid)       unit_busy <= 1'b1;
      else if (u_out_valid) unit_busy <= 1'b0;
      if (u_in_valid) issued <= issued + 6'd1;

      // write-back of words 1..n_words-1 of a column result
      if (col_result) begin
        wr_left  <= n_words - 3'd1;
        wr_idx   <= 2'd1;
        wr_col_q <= returned[4:0];
        for (int w = 0; w < MAXN/PER_WORD; w++) shadow[w] <= pack_word(u_y, w);
      end else if (wr_left != '0) begin
        wr_left <= wr_left - 3'd1;
        wr_idx  <= wr_idx + 2'd1;
      end

      case (st)
        S_IDLE: if (start_idct) begin
          st       <= S_COL;
          size_q   <= sel;
          dst_q    <= dst;
          n_q      <= 6'(tu_n(sel));
          issued   <= '0;
          returned <= '0;
        end
        S_COL: begin
          if (u_out_valid) returned <= returned + 6'd1;
          // all columns returned and their last words written
          if (returned == n_q && wr_left == '0 && !col_result) begin
            st       <= S_ROW;
            issued   <= '0;
            returned <= '0;
          end
        end
        S_ROW: begin
          if (u_out_valid) begin
            returned <= returned + 6'd1;
            if (returned == n_q - 6'd1) st <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign row_valid = (st == S_ROW) && u_out_valid;
  assign row_out   = u_y;
  assign row_idx   = returned[4:0];
  assign done_idct = row_valid && (returned == n_q - 6'd1);
  assign busy      = (st != S_IDLE);

  a_empty_after_rows: assert property (@(posedge clk) disable iff (!rst_n)
                                       done_idct |=> tm_empty);

endmodule
