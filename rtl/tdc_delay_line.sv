// tdc_delay_line: behavioural model of the delay-line time-to-digital
// converter (an analog timing structure, not synthesizable logic).
// START runs down a chain of STAGES delay stages of T_STAGE_PS each
// (176 ps, one inverter of the line); the rising edge of STOP clocks one
// flip-flop per stage, which captures that stage's output.  Stages the
// START edge has already passed read 1, the rest 0, so the thermometer
// code counts how many stage delays fit between START and STOP (up to
// 7 x 176 ps).  Stage delays are transport delays.  The flip-flops only
// capture while en (EN_TDC) is high and otherwise hold their value; that
// gating is this design's reading of the enable drawn into the TDC.
`timescale 1ps/1fs
module tdc_delay_line #(
  parameter int unsigned STAGES     = 7,
  parameter real         T_STAGE_PS = 176.0
) (
  input  logic              start,
  input  logic              stop,
  input  logic              en,
  output logic [STAGES-1:0] therm
);
  logic [STAGES-1:0] tap;   // output of each delay stage

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    logic d_in, d_out, q;
    if (i == 0) begin : g_first
      assign d_in = start;
    end else begin : g_next
      assign d_in = tap[i-1];
    end
    initial d_out = 1'b0;
    always @(d_in) d_out <= #(T_STAGE_PS) d_in;
    assign tap[i] = d_out;

    initial q = 1'b0;
    always @(posedge stop) if (en) q <= d_out;
    assign therm[i] = q;
  end
endmodule
