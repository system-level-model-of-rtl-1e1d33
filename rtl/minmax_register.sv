// minmax_register: keeps the last two maxima and minima of the counter.
// On a clk_max strobe the counter value is shifted into MAX1 and the old
// MAX1 into MAX2; clk_min does the same for MIN1/MIN2.  n_max and n_min
// count the stored values and saturate at 2, so the check can wait for a
// full set.  Cleared in RESET.  The two-deep shift registers follow the
// design; the fill counters are this design's addition.
// Timing: registers on the rising edge of CLK_REF_delay.
`timescale 1ps/1fs
module minmax_register #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         clk_max,
  input  logic         clk_min,
  input  logic [N-1:0] count,
  output logic [N-1:0] max1,
  output logic [N-1:0] max2,
  output logic [N-1:0] min1,
  output logic [N-1:0] min2,
  output logic [1:0]   n_max,
  output logic [1:0]   n_min
);
  always_ff @(posedge clk or posedge reset)
    if (reset) begin
      max1 <= '0; max2 <= '0; n_max <= '0;
    end else if (clk_max) begin
      max1 <= count;
      max2 <= max1;
      if (n_max != 2'd2) n_max <= n_max + 1'b1;
    end

  always_ff @(posedge clk or posedge reset)
    if (reset) begin
      min1 <= '0; min2 <= '0; n_min <= '0;
    end else if (clk_min) begin
      min1 <= count;
      min2 <= min1;
      if (n_min != 2'd2) n_min <= n_min + 1'b1;
    end
endmodule
