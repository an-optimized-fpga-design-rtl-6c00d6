// tb_validation_100tu: the hardware side of the processor/accelerator
// validation run: 100 TUs of sizes 4x4, 8x8 and 16x16 (4x4 partly as
// IDST), QP 22, 27, 32 and 37, streamed through the coprocessor with a
// sink that is always ready. Every output beat is checked against the
// reference model, and the mean start-to-done cycles per TU size are
// reported.
module tb_validation_100tu;
  import iqit_pkg::*;
  import iqit_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic s_axis_tvalid = 0, s_axis_tready, s_axis_tlast = 0;
  logic [63:0] s_axis_tdata = '0;
  logic m_axis_tvalid, m_axis_tready = 0, m_axis_tlast;
  logic [63:0] m_axis_tdata;
  int checks = 0, failures = 0;

  typedef struct { logic [63:0] d; logic last; } beat_t;
  beat_t in_q [$];
  beat_t out_q [$];
  int sink_mode = 0;   // 0: random 50%, 1: always ready, 2: very slow
  int src_gap_pct = 30;

  // mechanism counters
  int n_size [4], n_dst, n_in_gap, n_out_bp, n_hdr_busy, n_hdr_room, n_iq_hold, n_overlap;
  int n_tus = 0, n_beats_out = 0;

  iqit_axis dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // build one TU: its input beats and its expected output beats
  task automatic add_tu(int s, bit d, int q, int range);
    int n;
    int lv [32][32], blk [32][32], res [32][32];
    beat_t b;
    n = 4 << s;
    for (int r = 0; r < 32; r++) for (int k = 0; k < 32; k++) begin
      lv[r][k]  = (r < n && k < n) ? ((range == 0) ? int'($signed(16'($urandom)))
                                                   : $urandom_range(0, 2*range) - range) : 0;
      blk[r][k] = (r < n && k < n) ? dequant(lv[r][k], q, s + 2, 8) : 0;
    end
    inv2d(n, d, 8, blk, res);
    b.d = 64'({d, 2'(s), 6'(q)});
    b.last = 0;
    in_q.push_back(b);
    for (int g = 0; g < n * n / 4; g++) begin
      for (int i = 0; i < 4; i++) b.d[16*i +: 16] = 16'(lv[4*(g % (n/4)) + i][g / (n/4)]);
      b.last = (g == n * n / 4 - 1);
      in_q.push_back(b);
    end
    for (int r = 0; r < n; r++)
      for (int w = 0; w < n / 4; w++) begin
        for (int i = 0; i < 4; i++) b.d[16*i +: 16] = 16'(res[r][4*w + i]);
        b.last = (r == n - 1) && (w == n / 4 - 1);
        out_q.push_back(b);
      end
    n_size[s]++;
    if (d) n_dst++;
    n_tus++;
  endtask

  // source
  always @(negedge clk) if (rst_n) begin
    if (!s_axis_tvalid || s_axis_tready_q) begin
      if (in_q.size() != 0 && $urandom_range(0, 99) >= src_gap_pct) begin
        beat_t b;
        b = in_q.pop_front();
        s_axis_tvalid <= 1; s_axis_tdata <= b.d; s_axis_tlast <= b.last;
      end else begin
        if (in_q.size() != 0) n_in_gap++;
        s_axis_tvalid <= 0;
      end
    end
  end

  // handshake sampled at the rising edge
  logic s_axis_tready_q = 0;
  always @(posedge clk) s_axis_tready_q <= s_axis_tvalid && s_axis_tready;

  // sink and checker (at the rising edge, before the design updates)
  always @(posedge clk) if (rst_n) begin
    if (m_axis_tvalid && !m_axis_tready) n_out_bp++;
    if (m_axis_tvalid && m_axis_tready) begin
      beat_t e;
      checks++;
      if (out_q.size() == 0) begin
        failures++;
        $display("unexpected output beat");
      end else begin
        e = out_q.pop_front();
        if (m_axis_tdata != e.d || m_axis_tlast != e.last) begin
          failures++;
          if (failures < 10) $display("beat %0d: got %h/%0d exp %h/%0d", n_beats_out, m_axis_tdata, m_axis_tlast, e.d, e.last);
        end
      end
      n_beats_out++;
    end
    // mechanisms inside the design
    if (s_axis_tvalid && !dut.in_levels && dut.core_busy) n_hdr_busy++;
    if (s_axis_tvalid && !dut.in_levels && !dut.core_busy && !dut.room) n_hdr_room++;
    if (dut.u_core.iq_busy && !dut.u_core.issue_ok) n_iq_hold++;
    if (dut.u_core.iq_busy && dut.u_core.u_2d.unit_busy) n_overlap++;
  end

  always @(negedge clk) begin
    case (sink_mode)
      0: m_axis_tready <= ($urandom_range(0, 1) == 1);
      1: m_axis_tready <= 1'b1;
      default: m_axis_tready <= ($urandom_range(0, 19) == 0);
    endcase
  end

  task automatic drain();
    while (in_q.size() != 0 || out_q.size() != 0) @(negedge clk);
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  // cycle accounting per TU size at the core
  int tu_cycles [4], tu_count [4], t_start, cur_s;
  always @(posedge clk) if (rst_n) begin
    if (dut.start) begin t_start = cyc; cur_s = int'(dut.sel); end
    if (dut.done) begin tu_cycles[cur_s] += cyc - t_start + 1; tu_count[cur_s]++; end
  end
  initial begin
    int qps [4] = '{22, 27, 32, 37};
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    sink_mode = 1; src_gap_pct = 0;
    t0 = cyc;
    for (int i = 0; i < 100; i++) begin
      int s;
      s = i % 3;
      if (i % 7 == 3) s = $urandom_range(0, 2);
      add_tu(s, (s == 0) && (i % 2 == 0), qps[(i / 3) % 4], 60);
    end
    drain();
    repeat (20) @(negedge clk);
    checks++;
    if (n_tus != 100 || m_axis_tvalid || dut.core_busy) begin failures++; $display("not all TUs done"); end
    $display("100 TUs (4x4 %0d, 8x8 %0d, 16x16 %0d, IDST %0d) in %0d cycles",
             n_size[0], n_size[1], n_size[2], n_dst, cyc - t0);
    for (int s = 0; s < 3; s++) if (tu_count[s] != 0)
      $display("N=%0d: %0d TUs, mean %0d cycles start to done", 4 << s, tu_count[s], tu_cycles[s] / tu_count[s]);
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (tu_count[s] != n_size[s]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
