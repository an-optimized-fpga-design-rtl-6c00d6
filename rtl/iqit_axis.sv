// iqit_axis: the IQ/IT component as a stream coprocessor (AXI4-Stream in
// and out), as used behind a DMA engine next to an application processor.
//
// Input stream (s_axis, 64-bit beats). Each TU is one header beat followed
// by N*N/4 level beats:
//   header  tdata[5:0] = QP, tdata[7:6] = TU size (0: 4x4, 1: 8x8,
//           2: 16x16, 3: 32x32), tdata[8] = 1 for the 4x4 inverse DST
//   levels  four signed 16-bit levels per beat, level i in tdata[16i+15:16i],
//           column by column, top to bottom (beat b holds rows
//           4*(b%(N/4))..+3 of column b/(N/4)).
// s_axis_tlast is not interpreted; the header fixes the TU length.
//
// Output stream (m_axis, 64-bit beats): the residual block row by row, each
// row as N/4 beats of four signed 16-bit samples, column 0 in the low bits;
// m_axis_tlast marks the TU's last beat.
//
// The core has no back-pressure on its rows, so rows go into a 32-entry
// row FIFO (one 512-bit row and its size per entry) that m_axis drains. A
// header is accepted only when the core is idle and the FIFO has room for
// the N rows the TU will produce, so the FIFO can never overflow; a slow
// sink therefore stalls the input stream, not the core. The header format,
// beat packing and row FIFO are choices of this design: the architecture
// only states that the component is attached through AXI4-Stream and DMA.
module iqit_axis
  import iqit_pkg::*;
#(
  parameter int unsigned BIT_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // level stream in
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  input  logic [63:0] s_axis_tdata,
  input  logic        s_axis_tlast,
  // residual stream out
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic [63:0] m_axis_tdata,
  output logic        m_axis_tlast
);

  localparam int unsigned RDEPTH = MAXN;

  typedef struct packed {
    logic [MAXN*DW-1:0] data;
    tu_size_e           size;
    logic               last;
  } row_ent_t;

  // ---------------------------------------------------------------- core
  logic       start, dst, level_valid, level_ready;
  logic [5:0] qp;
  tu_size_e   sel;
  coef_t      level [4];
  logic       row_valid, done, core_busy;
  coef_t      row_out [MAXN];
  logic [4:0] row_idx;

  iqit #(.BIT_DEPTH(BIT_DEPTH)) u_core (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .qp         (qp),
    .sel        (sel),
    .dst        (dst),
    .level_valid(level_valid),
    .level      (level),
    .level_ready(level_ready),
    .row_valid  (row_valid),
    .row_out    (row_out),
    .row_idx    (row_idx),
    .done       (done),
    .busy       (core_busy)
  );

  // ---------------------------------------------------------------- input
  logic       in_levels;       // header seen, level beats follow
  logic [7:0] beats_left;
  tu_size_e   cur_size;
  logic [5:0] fifo_cnt;
  logic       room;

  assign qp   = s_axis_tdata[5:0];
  assign sel  = tu_size_e'(s_axis_tdata[7:6]);
  assign dst  = s_axis_tdata[8];
  assign room = (32'(fifo_cnt) + tu_n(sel)) <= RDEPTH;

  assign s_axis_tready = in_levels ? level_ready : (!core_busy && room);
  assign start         = !in_levels && s_axis_tvalid && s_axis_tready;
  assign level_valid   = in_levels && s_axis_tvalid;

  always_comb begin
    for (int i = 0; i < 4; i++) level[i] = coef_t'(s_axis_tdata[DW*i +: DW]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_levels  <= 1'b0;
      beats_left <= '0;
      cur_size   <= TU4;
    end else if (start) begin
      in_levels  <= 1'b1;
      cur_size   <= sel;
      beats_left <= 8'((tu_n(sel) * tu_n(sel) / 4) - 1);
    end else if (in_levels && s_axis_tvalid && s_axis_tready) begin
      if (beats_left == '0) in_levels <= 1'b0;
      beats_left <= beats_left - 8'd1;
    end
  end

  // ---------------------------------------------------------------- row FIFO
  row_ent_t   rmem [RDEPTH];
  logic [4:0] rwp, rrp;
  logic       push, pop;
  row_ent_t   head;
  logic [2:0] beat;
  logic [2:0] beats_m1;

  assign push = row_valid;
  assign head = rmem[rrp];

  always_comb begin
    case (head.size)
      TU4:     beats_m1 = 3'd0;
      TU8:     beats_m1 = 3'd1;
      TU16:    beats_m1 = 3'd3;
      default: beats_m1 = 3'd7;
    endcase
  end

  always_ff @(posedge clk) begin
    if (push) begin
      for (int c = 0; c < MAXN; c++) rmem[rwp].data[DW*c +: DW] <= row_out[c];
      rmem[rwp].size <= cur_size;
      rmem[rwp].last <= done;
    end
  end

  assign m_axis_tvalid = (fifo_cnt != '0);
  assign m_axis_tdata  = head.data[64*beat +: 64];
  assign m_axis_tlast  = head.last && (beat == beats_m1);
  assign pop           = m_axis_tvalid && m_axis_tready && (beat == beats_m1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rwp      <= '0;
      rrp      <= '0;
      fifo_cnt <= '0;
      beat     <= '0;
    end else begin
      if (push) rwp <= rwp + 5'd1;
      if (pop)  rrp <= rrp + 5'd1;
      fifo_cnt <= fifo_cnt + 6'(push) - 6'(pop);
      if (m_axis_tvalid && m_axis_tready) beat <= (beat == beats_m1) ? '0 : beat + 3'd1;
    end
  end

  a_fifo_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                       push |-> (fifo_cnt < 6'(RDEPTH) || pop));
  a_row_order: assert property (@(posedge clk) disable iff (!rst_n)
                                row_valid && row_idx == 5'd0 |-> !in_levels);
  a_tdata_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                   m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata));

  logic unused_tlast;
  assign unused_tlast = s_axis_tlast;

endmodule
