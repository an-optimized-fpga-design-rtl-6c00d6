// tb_iqit: the IQ/IT component on TUs of every size, IDCT and 4x4 IDST,
// random QP and levels; every residual compared with de-quantisation by
// formula followed by a direct-matrix 2D inverse transform. With levels
// offered without wait the start-to-done cycle count is checked; with random
// input gaps the input stall path is exercised. Also counts cycles where the
// quantiser is held back by the column buffer (issue_ok low).
module tb_iqit;
  import iqit_pkg::*;
  import iqit_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [5:0] qp = '0;
  tu_size_e sel = TU4;
  logic dst = 0;
  logic level_valid = 0;
  coef_t level [4];
  logic level_ready, row_valid, done, busy;
  coef_t row_out [MAXN];
  logic [4:0] row_idx;
  int checks = 0, failures = 0;
  int cyc = 0;
  int lv [32][32], blk [32][32], res [32][32];
  int rows_seen, t_done, n_gaps = 0, n_hold = 0;
  int exp_cycles [4] = '{34, 64, 219, 685};
  // cycle, counted from start, of the first column's issue to the 1D unit
  int exp_first [4] = '{4, 6, 10, 18};
  int t_first;
  always @(negedge clk) if (rst_n && dut.col_valid && dut.col_ready && t_first < 0) t_first = cyc;

  iqit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n && dut.iq_busy && !dut.issue_ok) n_hold++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && row_valid) begin
    checks++;
    if (int'(row_idx) != rows_seen) failures++;
    for (int c = 0; c < 32; c++) begin
      checks++;
      if (int'(row_out[c]) != res[row_idx][c]) begin
        failures++;
        if (failures < 10) $display("row %0d col %0d got %0d exp %0d", row_idx, c, row_out[c], res[row_idx][c]);
      end
    end
    rows_seen++;
    if (done) t_done = cyc;
  end

  task automatic run(int s, bit d, int q, bit gaps, int range);
    int n, g, t0;
    n = 4 << s;
    for (int r = 0; r < 32; r++) for (int k = 0; k < 32; k++) begin
      lv[r][k] = (r < n && k < n) ? ($urandom_range(0, 2*range) - range) : 0;
      blk[r][k] = (r < n && k < n) ? dequant(lv[r][k], q, s + 2, 8) : 0;
    end
    inv2d(n, d, 8, blk, res);
    rows_seen = 0;
    t_done = -1;
    t_first = -1;
    @(negedge clk);
    start = 1; sel = tu_size_e'(s); dst = d; qp = 6'(q);
    t0 = cyc;
    @(negedge clk);
    start = 0;
    g = 0;
    while (g < n * n / 4) begin
      level_valid = gaps ? ($urandom_range(0, 2) == 0) : 1'b1;
      for (int i = 0; i < 4; i++) level[i] = coef_t'(lv[4*(g % (n/4)) + i][g / (n/4)]);
      #1;
      if (!level_valid) n_gaps++;
      if (level_valid && level_ready) g++;
      @(negedge clk);
    end
    level_valid = 0;
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
      checks++;
      if (t_first - t0 != exp_first[s]) begin
        failures++;
        $display("N=%0d: first column issued at cycle %0d, expected %0d", n, t_first - t0, exp_first[s]);
      end
      $display("N=%0d dst=%0d QP=%0d: %0d cycles from start to done, first column at cycle %0d",
               n, d, q, t_done - t0 + 1, t_first - t0);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) level[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) run(s, 1'b0, 22 + 5 * s, 1'b0, 40);
    run(0, 1'b1, 27, 1'b0, 40);
    for (int s = 0; s < 4; s++) run(s, 1'b0, $urandom_range(0, 51), 1'b1, 300);
    run(0, 1'b1, 37, 1'b1, 100);
    run(3, 1'b0, 51, 1'b0, 32767);
    checks += 2;
    if (n_gaps == 0) begin failures++; $display("no input gap"); end
    if (n_hold == 0) begin failures++; $display("quantiser never held back"); end
    $display("input gaps %0d, quantiser hold cycles %0d", n_gaps, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
