// column_buffer: assembles de-quantised columns for the 1D transform.
//
// The inverse quantiser delivers four coefficients of a column at a time;
// the 1D transform needs the whole column. A fill register (F) collects the
// N/4 groups of a column; when the last group arrives the column moves to a
// hold register (H), from which the 2D transform takes it with a
// valid/ready handshake. F can then collect the next column while H waits,
// which lets quantisation of one column overlap transformation of the
// previous one.
//
// Flow control: the quantiser's result is a strobe, so this block tells it
// through issue_ok whether a group issued now could be stored when it
// arrives two cycles later. With pend = groups in F plus groups in flight,
// a new group is safe if it does not complete a column
// ((pend+1) mod G != 0, G = N/4), or if it completes the only pending
// column (pend+1 = G) and H is empty now, since nothing else can fill H
// before it arrives. Registers are cleared by clr at the start of a TU.
// The two-register organisation and the rule are choices of this design.
module column_buffer
  import iqit_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  tu_size_e   size,
  input  logic       in_valid,
  input  coef_t      in_coef [4],
  input  logic [1:0] inflight,
  output logic       issue_ok,
  output logic       col_valid,
  output coef_t      col_out [MAXN],
  input  logic       col_ready
);

  coef_t      f [MAXN];
  logic [3:0] f_cnt;
  logic [3:0] g_cnt;       // G = N/4 groups per column
  logic       h_full;
  logic [3:0] pend, pend1;
  logic       complete, take;

  assign g_cnt    = 4'(tu_n(size) / 4);
  assign pend     = f_cnt + 4'(inflight);
  assign pend1    = pend + 4'd1;
  assign issue_ok = ((pend1 & (g_cnt - 4'd1)) != '0) || (pend1 == g_cnt && !h_full);
  assign complete = in_valid && (f_cnt == g_cnt - 4'd1);
  assign take     = col_valid && col_ready;
  assign col_valid = h_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_cnt  <= '0;
      h_full <= 1'b0;
      f      <= '{default: '0};
      col_out <= '{default: '0};
    end else if (clr) begin
      f_cnt  <= '0;
      h_full <= 1'b0;
    end else begin
      if (in_valid) begin
        for (int i = 0; i < 4; i++) f[4*f_cnt + i] <= in_coef[i];
        f_cnt <= complete ? '0 : f_cnt + 4'd1;
      end
      if (complete) begin
        for (int r = 0; r < MAXN; r++)
          col_out[r] <= (r < 4*int'(f_cnt)) ? f[r]
                      : (r < 4*int'(f_cnt) + 4) ? in_coef[r - 4*int'(f_cnt)]
                      : coef_t'(0);
        h_full <= 1'b1;
      end else if (take) begin
        h_full <= 1'b0;
      end
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n || clr)
                                 complete |-> (!h_full || take));

endmodule
