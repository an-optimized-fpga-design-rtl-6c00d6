// tb_idct1d: random input vectors for every transform (4/8/16/32-point IDCT,
// 4-point IDST) with both pass shifts, compared with a direct matrix
// product. Checks the latency (3 cycles for N <= 8, 5 for N >= 16), issued
// one vector at a time, and also bursts of same-size vectors back to back.
module tb_idct1d;
  import iqit_pkg::*;
  import iqit_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  tu_size_e size = TU4;
  logic dst = 0;
  logic [3:0] shift = 4'd7;
  coef_t x [MAXN];
  logic out_valid;
  coef_t y [MAXN];
  int checks = 0, failures = 0;
  int cyc = 0;

  typedef struct {
    int n; int lat; int t; int y [32];
  } exp_t;
  exp_t exp_q [$];
  int per_kind [5];

  idct1d dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    if (exp_q.size() == 0) begin
      failures++;
      $display("unexpected output");
    end else begin
      e = exp_q.pop_front();
      checks++;
      if (cyc - e.t != e.lat) begin
        failures++;
        $display("N=%0d latency %0d, expected %0d", e.n, cyc - e.t, e.lat);
      end
      for (int k = 0; k < 32; k++) begin
        checks++;
        if (int'(y[k]) != e.y[k]) begin
          failures++;
          if (failures < 400 && e.n != 32) $display("N=%0d y[%0d] got %0d exp %0d", e.n, k, y[k], e.y[k]);
        end
      end
    end
  end

  // drive one vector in the current negedge slot
  task automatic drive(int s, bit d, int sh, int range);
    int xi [32];
    exp_t e;
    int n;
    n = 4 << s;
    for (int i = 0; i < 32; i++) begin
      if (range == 0) xi[i] = int'($signed(16'($urandom)));
      else            xi[i] = $urandom_range(0, 2 * range) - range;
      x[i] = coef_t'(xi[i]);
      if (i >= n) xi[i] = 0;       // lanes above N are ignored
    end
    in_valid = 1; size = tu_size_e'(s); dst = d; shift = 4'(sh);
    e.n = n;
    e.lat = (n <= 8) ? 3 : 5;
    e.t = cyc;
    inv1d(n, d, sh, xi, e.y);
    exp_q.push_back(e);
    per_kind[d ? 4 : s]++;
  endtask

  initial begin
    int s, lat;
    bit d;
    for (int i = 0; i < MAXN; i++) x[i] = '0;
    // the reference matrix against rows of the HEVC matrices
    begin
      int r8 [8]  = '{89, 75, 50, 18, -18, -50, -75, -89};
      int r16 [8] = '{90, 87, 80, 70, 57, 43, 25, 9};
      int r32 [8] = '{90, 90, 88, 85, 82, 78, 73, 67};
      int r4 [4]  = '{36, -83, 83, -36};
      for (int k = 0; k < 8; k++) begin
        checks += 3;
        if (dct_entry(8, 1, k) != r8[k])   failures++;
        if (dct_entry(16, 1, k) != r16[k]) failures++;
        if (dct_entry(32, 1, k) != r32[k]) failures++;
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (dct_entry(4, 3, k) != r4[k]) failures++;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // one vector at a time
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      s = $urandom_range(0, 3);
      d = (s == 0) && ($urandom_range(0, 1) == 1);
      drive(s, d, ($urandom_range(0, 1) == 1) ? 12 : 7, (i % 3 == 0) ? 0 : 300);
      lat = (s <= 1) ? 3 : 5;
      @(negedge clk) in_valid = 0;
      repeat (lat) @(negedge clk);
    end
    // bursts of one size, a new vector every cycle
    for (int b = 0; b < 20; b++) begin
      s = b % 4;
      for (int i = 0; i < 8; i++) begin
        @(negedge clk);
        drive(s, 1'b0, 7, 1000);
      end
      @(negedge clk) in_valid = 0;
      repeat (6) @(negedge clk);
    end
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (per_kind[k] == 0) begin failures++; $display("kind %0d never run", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
