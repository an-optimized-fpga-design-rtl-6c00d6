// transpose_mem: the transpose memory between the column and row passes of
// the 2D inverse transform.
//
// 32 transpose_fifo instances, one per TU column. Column c of the column
// pass is written into FIFO c as 128-bit words of eight 16-bit coefficients
// (rows 0-7 in word 0, rows 8-15 in word 1, ...); the DEMUX steers wr_word to
// FIFO wr_col. For the row pass, the MUX de-concatenates the head words of
// FIFOs 0..N-1: rd_row[c] is element rd_elem of FIFO c's head word, i.e. the
// coefficient of row 8*w + rd_elem of column c while word w is at the head.
// rd_pop pops the head of FIFOs 0..N-1 together, once the eight rows of a
// word (all four rows for N = 4) have been read. Lanes c >= N read as zero.
//
// Writes and pops take effect at the clock edge; rd_row is combinational
// from the FIFO heads. 32 x 4 x 128 bits = 16 Kbit of storage, the size the
// transpose memory is given. clr empties every FIFO.
module transpose_mem
  import iqit_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  tu_size_e         size,
  input  logic             wr_en,
  input  logic [4:0]       wr_col,
  input  logic [WORD_W-1:0] wr_word,
  input  logic             rd_pop,
  input  logic [2:0]       rd_elem,
  output coef_t            rd_row [MAXN],
  output logic             all_empty
);

  logic [WORD_W-1:0] head [MAXN];
  logic [MAXN-1:0]   empty_v, full_v;
  logic [MAXN-1:0]   in_use;

  always_comb begin
    for (int c = 0; c < MAXN; c++) in_use[c] = (c < int'(tu_n(size)));
  end

  for (genvar c = 0; c < MAXN; c++) begin : g_fifo
    transpose_fifo #(.WIDTH(WORD_W), .DEPTH(MAXN / PER_WORD)) u_fifo (
      .clk    (clk),
      .rst_n  (rst_n),
      .clr    (clr),
      .wr_en  (wr_en && (wr_col == 5'(c))),
      .wr_data(wr_word),
      .rd_en  (rd_pop && in_use[c]),
      .rd_data(head[c]),
      .empty  (empty_v[c]),
      .full   (full_v[c])
    );
  end

  always_comb begin
    for (int c = 0; c < MAXN; c++)
      rd_row[c] = in_use[c] ? coef_t'(head[c][DW*rd_elem +: DW]) : coef_t'(0);
  end

  assign all_empty = &empty_v;

  a_write_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                                     wr_en |-> in_use[wr_col] && !full_v[wr_col]);

endmodule
