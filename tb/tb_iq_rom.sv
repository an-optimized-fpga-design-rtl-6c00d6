// tb_iq_rom: checks both ROMs for every QP 0..63 (52..63 must read as 51)
// and their one-cycle read latency.
module tb_iq_rom;
  logic       clk = 0;
  logic [5:0] qp;
  logic [6:0] iqstep;
  logic [3:0] qp_div6;
  int checks = 0, failures = 0;

  iq_rom dut (.clk(clk), .qp(qp), .iqstep(iqstep), .qp_div6(qp_div6));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int steps [6] = '{40, 45, 51, 57, 64, 72};
    int q;
    qp = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk) qp = 6'(i);
      @(posedge clk);
      #1;
      q = (i > 51) ? 51 : i;
      checks++;
      if (iqstep != 7'(steps[q % 6]) || qp_div6 != 4'(q / 6)) begin
        failures++;
        $display("QP %0d: got step %0d div %0d", i, iqstep, qp_div6);
      end
    end
    // read latency: value changes only at the clock edge
    @(negedge clk) qp = 6'd0;
    #1;
    checks++;
    if (iqstep != 7'd57) begin failures++; $display("latency: early change %0d", iqstep); end
    @(posedge clk); #1;
    checks++;
    if (iqstep != 7'd40) begin failures++; $display("latency: late %0d", iqstep); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
