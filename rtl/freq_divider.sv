// freq_divider: programmable divide-by-N of the DCO output.
// A modulo-N counter runs on the DCO clock; CLK_DIV is high for the first
// floor(N/2) counts of each period and low for the rest, so its period is
// exactly N DCO cycles.  The design divides by 43..50 (125 MHz from
// 5.375..6.25 GHz); the counter structure is this design's choice.  The
// same module divides the DCO by 6 for the 1 GHz delta-sigma clock.
// Timing: CLK_DIV rises one DCO cycle after the counter wraps to 0.
`timescale 1ps/1fs
module freq_divider #(
  parameter int unsigned W = 6
) (
  input  logic         clk,      // CLK_OUT
  input  logic         reset,    // active high
  input  logic [W-1:0] n,        // division factor, >= 2
  output logic         clk_div
);
  logic [W-1:0] cnt;

  always_ff @(posedge clk or posedge reset)
    if (reset) begin
      cnt     <= '0;
      clk_div <= 1'b0;
    end else begin
      cnt     <= (cnt >= n - 1'b1) ? '0 : cnt + 1'b1;
      clk_div <= cnt < (n >> 1);
    end
endmodule
