// control_check: decides that coarse locking is done.
// Once two maxima and two minima are stored and each pair differs by at
// most TOL, it sets EN_TDC and latches AVG = (MAX1+MAX2+MIN1+MIN2)/4,
// truncated.  EN_TDC then stays high until RESET; it switches the coarse
// MUX to AVG, stops the counter and enables fine locking.  The check
// and the average follow the design; the tolerance value and the exact
// averaging formula are this design's choices (the published example
// 15, 16, 23, 22 gives 19).
// Timing: EN_TDC and AVG are registered on CLK_REF_delay, one cycle after
// the fourth value is stored.
`timescale 1ps/1fs
module control_check #(
  parameter int unsigned N   = 5,
  parameter int unsigned TOL = 2
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [N-1:0] max1,
  input  logic [N-1:0] max2,
  input  logic [N-1:0] min1,
  input  logic [N-1:0] min2,
  input  logic [1:0]   n_max,
  input  logic [1:0]   n_min,
  output logic         en_tdc,
  output logic [N-1:0] avg
);
  logic [N-1:0] dmax, dmin;
  logic [N+1:0] sum;
  logic         ok;

  always_comb begin
    dmax = (max1 > max2) ? max1 - max2 : max2 - max1;
    dmin = (min1 > min2) ? min1 - min2 : min2 - min1;
    sum  = (N+2)'(max1) + (N+2)'(max2) + (N+2)'(min1) + (N+2)'(min2);
    ok   = n_max == 2'd2 && n_min == 2'd2 && dmax <= N'(TOL) && dmin <= N'(TOL);
  end

  always_ff @(posedge clk or posedge reset)
    if (reset) begin
      en_tdc <= 1'b0;
      avg    <= '0;
    end else if (!en_tdc && ok) begin
      en_tdc <= 1'b1;
      avg    <= sum[N+1:2];
    end
endmodule
