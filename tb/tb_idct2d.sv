// tb_idct2d: 2D inverse DCT of random blocks of every size and the 4x4
// inverse DST, compared with a direct matrix reference (16-bit clip between
// passes). Columns are offered without wait (cycle count from start_idct to
// done_idct checked: 28, 52, 165, 327 cycles for 4x4..32x32) and with random
// gaps (column-input stall exercised).
module tb_idct2d;
  import iqit_pkg::*;
  import iqit_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start_idct = 0;
  tu_size_e sel = TU4;
  logic dst = 0;
  logic col_valid = 0;
  coef_t col_in [MAXN];
  logic col_ready, row_valid, done_idct, busy;
  coef_t row_out [MAXN];
  logic [4:0] row_idx;
  int checks = 0, failures = 0;
  int cyc = 0;
  int blk [32][32], res [32][32];
  int rows_seen, t_done, n_gaps;
  int exp_cycles [4] = '{28, 52, 165, 327};

  idct2d dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && row_valid) begin
    checks++;
    if (int'(row_idx) != rows_seen) begin failures++; $display("row index %0d, expected %0d", row_idx, rows_seen); end
    for (int c = 0; c < 32; c++) begin
      checks++;
      if (int'(row_out[c]) != res[row_idx][c]) begin
        failures++;
        if (failures < 10) $display("row %0d col %0d got %0d exp %0d", row_idx, c, row_out[c], res[row_idx][c]);
      end
    end
    rows_seen++;
    if (done_idct) t_done = cyc;
  end

  task automatic run(int s, bit d, bit gaps, int range);
    int n, c, t0;
    n = 4 << s;
    for (int r = 0; r < 32; r++) for (int k = 0; k < 32; k++)
      blk[r][k] = (r < n && k < n) ? ((range == 0) ? int'($signed(16'($urandom)))
                                                   : $urandom_range(0, 2*range) - range) : 0;
    inv2d(n, d, 8, blk, res);
    rows_seen = 0;
    t_done = -1;
    @(negedge clk);
    start_idct = 1; sel = tu_size_e'(s); dst = d;
    t0 = cyc;
    @(negedge clk);
    start_idct = 0;
    c = 0;
    while (c < n) begin
      col_valid = gaps ? ($urandom_range(0, 3) == 0) : 1'b1;
      for (int r = 0; r < 32; r++) col_in[r] = coef_t'(blk[r][c]);
      #1;
      if (!col_valid) n_gaps++;
      if (col_valid && col_ready) c++;
      @(negedge clk);
    end
    col_valid = 0;
    while (busy) @(negedge clk);
    @(negedge clk);
    checks++;
    if (rows_seen != n) begin failures++; $display("N=%0d: %0d rows", n, rows_seen); end
    if (!gaps) begin
      checks++;
      if (t_done - t0 + 1 != exp_cycles[s]) begin
        failures++;
        $display("N=%0d: %0d cycles, expected %0d", n, t_done - t0 + 1, exp_cycles[s]);
      end
      $display("N=%0d dst=%0d: %0d cycles from start to done", n, d, t_done - t0 + 1);
    end
  endtask

  initial begin
    for (int i = 0; i < MAXN; i++) col_in[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) run(s, 1'b0, 1'b0, 255);
    run(0, 1'b1, 1'b0, 255);
    for (int s = 0; s < 4; s++) run(s, 1'b0, 1'b1, 0);
    run(0, 1'b1, 1'b1, 0);
    for (int s = 0; s < 4; s++) run(s, 1'b0, 1'b0, 2000);
    checks++;
    if (n_gaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
