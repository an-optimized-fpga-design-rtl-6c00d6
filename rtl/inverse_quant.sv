// inverse_quant: the inverse quantisation block, four Dequant_i units and
// their control unit.
//
// A TU of N x N quantised levels enters as N*N/4 groups of four levels,
// column by column, top to bottom (group g holds rows 4*(g%(N/4))..+3 of
// column g/(N/4)). The four dequant_unit instances work on the four levels of
// a group in parallel.
//
// Control unit: start_iq latches QP and the TU size (sel) and starts a TU;
// the unit then takes one group every two cycles at most. A group is taken in
// a cycle where level_valid and level_ready are both high. level_ready is
// high only when the TU is running, no group was taken in the previous cycle,
// and the consumer allows it through issue_ok. done_iq marks, two cycles
// after a group is taken, the cycle its four CoeffIQ values are valid; it is
// a strobe, not a handshake, so issue_ok must only be high when the consumer
// can take the result two cycles later. coeff_last flags the TU's last group.
// inflight counts groups taken and not yet delivered.
//
// Four units at one level per two cycles follow the IQ architecture; the
// valid/ready input and the issue_ok rule are choices of this design.
module inverse_quant
  import iqit_pkg::*;
#(
  parameter int unsigned BIT_DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_iq,
  input  logic [5:0] qp,
  input  tu_size_e   sel,
  input  logic       level_valid,
  input  coef_t      level [4],
  output logic       level_ready,
  input  logic       issue_ok,
  output logic       done_iq,
  output coef_t      coeff [4],
  output logic       coeff_last,
  output logic [1:0] inflight,
  output logic       busy
);

  logic       running, cool;
  logic [5:0] qp_q;
  tu_size_e   sel_q;
  logic [7:0] grp, grp_last;
  logic       take;
  logic [1:0] last_pipe;
  logic [3:0] unit_valid;
  logic       v1;

  assign level_ready = running && !cool && issue_ok;
  assign take        = level_valid && level_ready;
  assign grp_last    = 8'((tu_n(sel_q) * tu_n(sel_q) / 4) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      cool      <= 1'b0;
      qp_q      <= '0;
      sel_q     <= TU4;
      grp       <= '0;
      last_pipe <= '0;
      v1        <= 1'b0;
    end else begin
      cool      <= take;
      v1        <= take;
      last_pipe <= {last_pipe[0], take && (grp == grp_last)};
      if (start_iq && !running) begin
        running <= 1'b1;
        qp_q    <= qp;
        sel_q   <= sel;
        grp     <= '0;
      end else if (take) begin
        if (grp == grp_last) running <= 1'b0;
        grp <= grp + 8'd1;
      end
    end
  end

  for (genvar i = 0; i < 4; i++) begin : g_unit
    dequant_unit #(.BIT_DEPTH(BIT_DEPTH)) u_dq (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (take),
      .level    (level[i]),
      .qp       (qp_q),
      .size     (sel_q),
      .out_valid(unit_valid[i]),
      .coeff    (coeff[i])
    );
  end

  assign done_iq    = unit_valid[0];
  assign coeff_last = last_pipe[1];
  assign inflight   = 2'(v1) + 2'(done_iq);
  assign busy       = running || v1 || done_iq;

  // All four units see the same valid.
  a_units_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                                     unit_valid == {4{unit_valid[0]}});
  a_rate: assert property (@(posedge clk) disable iff (!rst_n) take |=> !take);

endmodule
