// coarse_control: coarse locking controller of the ADPLL.
// After RESET the bidirectional counter starts at the initial value init and follows SIGN
// once per delayed reference edge, so the DCO code ramps toward the target
// and then oscillates around it.  Each SIGN toggle is a turning point:
// the register clock stores it as a maximum or minimum.  When the last
// two maxima and the last two minima agree within TOL, the control check
// raises EN_TDC and computes their average; EN_TDC stops the counter,
// switches the MUX from the counter to AVG and enables fine locking.  The
// MUX output is split into 3 LSBs (column control, 6 lines) and 2 MSBs
// (row control, 3 lines) for the DCO.  Structure follows the published
// coarse control diagram; the counter direction, tolerance and converter
// codes are this design's choices (see the sub-blocks).
// Timing: all registers on the rising edge of clk (CLK_REF_delay); EN_TDC
// rises one clock after the fourth turning point is stored.
`timescale 1ps/1fs
module coarse_control
  import adpll_pkg::*;
#(
  parameter int unsigned N   = N_COARSE,
  parameter int unsigned TOL = 2
) (
  input  logic         clk,      // CLK_REF_delay
  input  logic         reset,    // RESET, active high
  input  logic         sign,     // SIGN from the PFD
  input  logic [N-1:0] init,     // counter value loaded in RESET
  output logic         en_tdc,   // EN_TDC
  output logic [N-1:0] code,     // MUX output
  output logic [2:0]   row,      // Row Ctrl
  output logic [5:0]   col,      // Col Ctrl
  output logic         clk_max,  // turning point events, for observation
  output logic         clk_min
);
  logic [N-1:0] count, avg, max1, max2, min1, min2;
  logic [1:0]   n_max, n_min;
  logic         run;

  assign run = !en_tdc;

  coarse_counter #(.N(N)) u_counter (
    .clk, .reset, .en(run), .sign, .init, .count);

  register_clock u_regclk (
    .clk, .reset, .en(run), .sign, .clk_max, .clk_min);

  minmax_register #(.N(N)) u_reg (
    .clk, .reset, .clk_max, .clk_min, .count,
    .max1, .max2, .min1, .min2, .n_max, .n_min);

  control_check #(.N(N), .TOL(TOL)) u_check (
    .clk, .reset, .max1, .max2, .min1, .min2, .n_max, .n_min, .en_tdc, .avg);

  assign code = en_tdc ? avg : count;   // MUX: 0 = counter, 1 = AVG

  row_control    u_row (.msb(code[N-1 -: 2]), .row);
  column_control u_col (.lsb(code[2:0]),      .col);
endmodule
