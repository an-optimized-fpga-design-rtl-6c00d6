// tb_dequant_unit: random levels, QPs and TU sizes at full rate; each result
// must equal the formula and appear exactly two cycles after its input.
module tb_dequant_unit;
  import iqit_pkg::*;
  import iqit_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  coef_t level = '0;
  logic [5:0] qp = '0;
  tu_size_e size = TU4;
  logic out_valid;
  coef_t coeff;
  int checks = 0, failures = 0;
  int exp_q [$];
  int lat_q [$];
  int cyc = 0;

  dequant_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result checker
  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
    end else begin
      int e, t;
      e = exp_q.pop_front();
      t = lat_q.pop_front();
      if (int'(coeff) != e || cyc - t != 2) begin
        failures++;
        $display("got %0d exp %0d latency %0d", coeff, e, cyc - t);
      end
    end
  end

  initial begin
    int lv, q, s;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 3))
        0: lv = int'($signed(16'($urandom)));
        1: lv = $urandom_range(0, 64) - 32;
        2: lv = (i % 2) ? 32767 : -32768;
        default: lv = $urandom_range(0, 2000) - 1000;
      endcase
      q = $urandom_range(0, 51);
      s = $urandom_range(0, 3);
      level = coef_t'(lv);
      qp = 6'(q);
      size = tu_size_e'(s);
      if (in_valid) begin
        exp_q.push_back(dequant(lv, q, s + 2, 8));
        lat_q.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
