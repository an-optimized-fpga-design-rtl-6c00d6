// tb_transpose_fifo: random pushes and pops against a queue model; checks
// the fall-through head, empty/full flags, simultaneous push and pop, and
// clear.
module tb_transpose_fifo;
  logic clk = 0, rst_n = 0;
  logic clr = 0, wr_en = 0, rd_en = 0;
  logic [127:0] wr_data = '0, rd_data;
  logic empty, full;
  int checks = 0, failures = 0;
  logic [127:0] model [$];
  int n_full = 0, n_both = 0;

  transpose_fifo dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // check state
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == 4)) begin
        failures++;
        $display("flags: empty %0d full %0d size %0d", empty, full, model.size());
      end
      if (model.size() != 0) begin
        checks++;
        if (rd_data != model[0]) begin failures++; $display("head mismatch"); end
      end
      if (model.size() == 4) n_full++;
      clr   = (i % 997 == 500);
      wr_en = !full && ($urandom_range(0, 1) == 1);
      rd_en = !empty && ($urandom_range(0, 1) == 1);
      wr_data = {$urandom, $urandom, $urandom, $urandom};
      if (wr_en && rd_en) n_both++;
      @(posedge clk);
      if (clr) model.delete();
      else begin
        if (rd_en) void'(model.pop_front());
        if (wr_en) model.push_back(wr_data);
      end
    end
    checks += 2;
    if (n_full == 0) begin failures++; $display("never full"); end
    if (n_both == 0) begin failures++; $display("never push+pop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
