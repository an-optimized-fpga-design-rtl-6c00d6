// tb_transpose_mem: for every TU size writes N columns of random
// coefficients word by word into their FIFOs, then reads the block back row
// by row with the element select and group pops, and checks each row is the
// transposed column data (lanes >= N read as zero).
module tb_transpose_mem;
  import iqit_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clr = 0;
  tu_size_e size = TU4;
  logic wr_en = 0;
  logic [4:0] wr_col = '0;
  logic [WORD_W-1:0] wr_word = '0;
  logic rd_pop = 0;
  logic [2:0] rd_elem = '0;
  coef_t rd_row [MAXN];
  logic all_empty;
  int checks = 0, failures = 0;
  int blk [32][32];

  transpose_mem dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int s);
    int n, nw;
    n = 4 << s;
    nw = (n <= 8) ? 1 : n / 8;
    @(negedge clk);
    size = tu_size_e'(s);
    clr = 1;
    @(negedge clk);
    clr = 0;
    for (int r = 0; r < 32; r++) for (int c = 0; c < 32; c++)
      blk[r][c] = int'($signed(16'($urandom)));
    for (int c = 0; c < n; c++) begin
      for (int w = 0; w < nw; w++) begin
        wr_en = 1; wr_col = 5'(c);
        for (int e = 0; e < 8; e++)
          wr_word[16*e +: 16] = (8*w + e < n) ? 16'(blk[8*w + e][c]) : 16'h0;
        @(negedge clk);
      end
    end
    wr_en = 0;
    for (int r = 0; r < n; r++) begin
      rd_elem = 3'(r % 8);
      #1;
      for (int c = 0; c < 32; c++) begin
        checks++;
        if (int'(rd_row[c]) != ((c < n) ? blk[r][c] : 0)) begin
          failures++;
          if (failures < 10) $display("N=%0d row %0d col %0d got %0d exp %0d", n, r, c, rd_row[c], blk[r][c]);
        end
      end
      rd_pop = (r % 8 == 7) || (r == n - 1);
      @(negedge clk);
      rd_pop = 0;
    end
    checks++;
    if (!all_empty) begin failures++; $display("N=%0d not empty after read", n); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) run(s);
    run(3); run(0); run(2); run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
