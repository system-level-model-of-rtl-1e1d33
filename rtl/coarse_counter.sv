// coarse_counter: bidirectional counter of the coarse locking loop.
// In RESET it is loaded with the initial value init.  On each rising edge of the delayed
// reference clock, while en (NOT EN_TDC) is high, it counts up when SIGN
// is 1 (the divided clock is late, so the DCO must speed up) and down when
// SIGN is 0.  It saturates at 0 and at 2^N-1.  Counting direction follows
// the SIGN definition of the PFD; saturation is this design's choice.
// The gated clock of the schematic (CLK_REF_delay AND NOT EN_TDC) is
// written as a clock enable.
`timescale 1ps/1fs
module coarse_counter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,    // CLK_REF_delay
  input  logic         reset,  // RESET, active high, asynchronous
  input  logic         en,     // NOT EN_TDC
  input  logic         sign,   // SIGN
  input  logic [N-1:0] init,   // initial value, loaded in RESET
  output logic [N-1:0] count
);
  localparam logic [N-1:0] MAXV = '1;

  always_ff @(posedge clk or posedge reset)
    if (reset)
      count <= init;
    else if (en) begin
      if (sign && count != MAXV)      count <= count + 1'b1;
      else if (!sign && count != '0)  count <= count - 1'b1;
    end
endmodule
