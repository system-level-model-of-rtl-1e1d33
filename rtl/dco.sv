// dco: behavioural model of the digitally-controlled oscillator (an
// analog oscillator, not synthesizable logic).
// Like the design's own lookup-table oscillator model, it maps its digital
// inputs to a frequency and toggles clk_out at half that period:
//   coarse index c = 8 * (rows on) + (column value), clamped to N_COARSE_STEPS
//   f = F_MIN_MHZ + c * (F_MAX_MHZ - F_MIN_MHZ) / N_COARSE_STEPS
//       + (integ - INT_MID) * F_FINE_MHZ
//       + (dsm ? +F_DSM_MHZ/2 : -F_DSM_MHZ/2)
// The column value decodes the Johnson code of column_control (111110 is
// 7, otherwise the number of lines on).  The range 5.252-6.344 GHz, the
// ~40 MHz coarse step and the 1 MHz integrator step are the design's; the
// index mapping, the clamp and the delta-sigma step are this design's
// choices.  A new frequency takes effect at the next half period.  While
// reset is high the output is held low.
`timescale 1ps/1fs
module dco #(
  parameter real         F_MIN_MHZ      = 5252.0,
  parameter real         F_MAX_MHZ      = 6344.0,
  parameter int unsigned N_COARSE_STEPS = 27,
  parameter real         F_FINE_MHZ     = 1.0,
  parameter real         F_DSM_MHZ      = 0.5,
  parameter int unsigned INT_MID        = 32
) (
  input  logic       reset,
  input  logic [2:0] row,
  input  logic [5:0] col,
  input  logic [5:0] integ,
  input  logic       dsm,
  output logic       clk_out,
  output real        f_mhz      // present frequency, for observation
);
  int unsigned rows_on, col_val, idx;

  always_comb begin
    rows_on = 32'($countones(row));
    col_val = (col == 6'b111110) ? 7 : 32'($countones(col));
    idx     = 8 * rows_on + col_val;
    if (idx > N_COARSE_STEPS) idx = N_COARSE_STEPS;
    f_mhz = F_MIN_MHZ + real'(idx) * (F_MAX_MHZ - F_MIN_MHZ) / real'(N_COARSE_STEPS)
          + (real'(integ) - real'(INT_MID)) * F_FINE_MHZ
          + (dsm ? F_DSM_MHZ / 2.0 : -F_DSM_MHZ / 2.0);
  end

  initial begin
    clk_out = 1'b0;
    forever begin
      if (reset) begin
        clk_out = 1'b0;
        wait (!reset);
      end
      #(0.5e6 / f_mhz);   // half period in ps
      if (!reset) clk_out = ~clk_out;
    end
  end
endmodule
