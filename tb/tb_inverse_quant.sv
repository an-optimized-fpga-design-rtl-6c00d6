// tb_inverse_quant: one TU of every size with random levels and QP; checks
// every CoeffIQ, the group order, the rate (never two groups in consecutive
// cycles; with a free consumer exactly one every two cycles), done/last
// flags, and that issue_ok low holds the input back.
module tb_inverse_quant;
  import iqit_pkg::*;
  import iqit_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start_iq = 0;
  logic [5:0] qp = '0;
  tu_size_e sel = TU4;
  logic level_valid = 0;
  coef_t level [4];
  logic level_ready, issue_ok = 1, done_iq, coeff_last, busy;
  coef_t coeff [4];
  logic [1:0] inflight;
  int checks = 0, failures = 0;
  int cyc = 0;
  int exp_q [$];
  int n_groups_out, last_seen, stalls;

  inverse_quant dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && done_iq) begin
    n_groups_out++;
    for (int i = 0; i < 4; i++) begin
      int e;
      e = exp_q.pop_front();
      checks++;
      if (int'(coeff[i]) != e) begin
        failures++;
        $display("group %0d lane %0d got %0d exp %0d", n_groups_out - 1, i, coeff[i], e);
      end
    end
    if (coeff_last) last_seen++;
  end

  task automatic run_tu(int s, int q, bit throttle);
    int n, ng, t0, t1, taken;
    n = 4 << s;
    ng = n * n / 4;
    n_groups_out = 0;
    last_seen = 0;
    @(negedge clk);
    start_iq = 1; qp = 6'(q); sel = tu_size_e'(s);
    @(negedge clk);
    start_iq = 0;
    taken = 0;
    t0 = cyc;
    while (taken < ng) begin
      level_valid = 1;
      issue_ok = throttle ? ($urandom_range(0, 2) == 0) : 1'b1;
      for (int i = 0; i < 4; i++) level[i] = coef_t'($urandom_range(0, 400) - 200);
      #1;
      if (!issue_ok && level_ready) begin failures++; $display("ready without issue_ok"); end
      if (issue_ok && !level_ready) stalls++;
      if (level_ready) begin
        for (int i = 0; i < 4; i++) exp_q.push_back(dequant(int'(level[i]), q, s + 2, 8));
        taken++;
      end
      @(negedge clk);
    end
    t1 = cyc;
    level_valid = 0;
    issue_ok = 1;
    repeat (4) @(negedge clk);
    checks++;
    if (n_groups_out != ng || last_seen != 1 || busy) begin
      failures++;
      $display("size %0d: groups %0d/%0d last %0d busy %0d", n, n_groups_out, ng, last_seen, busy);
    end
    if (!throttle) begin
      // one group every two cycles: ng groups span 2*ng - 1 cycles
      checks++;
      if (t1 - t0 != 2 * ng - 1) begin
        failures++;
        $display("size %0d: %0d cycles for %0d groups", n, t1 - t0, ng);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) level[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) run_tu(s, $urandom_range(0, 51), 0);
    for (int s = 0; s < 4; s++) run_tu(s, $urandom_range(0, 51), 1);
    run_tu(3, 51, 0);
    run_tu(0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
