// iq_rom: the two small ROMs of a de-quantisation unit, addressed by QP.
//
// ROM1 holds the inverse quantisation step IQstep = {40,45,51,57,64,72}[QP%6]
// and ROM2 holds QP/6, so the unit needs neither a divider nor a modulo. Both
// are 52-entry tables (QP = 0..51) read synchronously: the values for the QP
// presented in one cycle appear on the outputs in the next, as a block ROM
// would deliver them. An out-of-range QP (52..63) reads as QP 51.
//
// The table contents and the ROM split follow the IQ architecture; the
// registered read and the out-of-range rule are choices of this design.
module iq_rom (
  input  logic       clk,
  input  logic [5:0] qp,
  output logic [6:0] iqstep,   // ROM1
  output logic [3:0] qp_div6   // ROM2
);

  logic [5:0] qp_c;
  logic [6:0] step_c;
  logic [3:0] div_c;

  always_comb begin
    qp_c = (qp > 6'd51) ? 6'd51 : qp;
    div_c = 4'(qp_c / 6'd6);
    case (6'(qp_c % 6'd6))
      6'd0:    step_c = 7'd40;
      6'd1:    step_c = 7'd45;
      6'd2:    step_c = 7'd51;
      6'd3:    step_c = 7'd57;
      6'd4:    step_c = 7'd64;
      default: step_c = 7'd72;
    endcase
  end

  always_ff @(posedge clk) begin
    iqstep  <= step_c;
    qp_div6 <= div_c;
  end

endmodule
