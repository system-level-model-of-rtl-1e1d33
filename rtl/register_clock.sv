// register_clock: turns toggles of SIGN into capture strobes.
// The counter turns from counting up to counting down when SIGN falls, so
// a fall marks a maximum (clk_max); a rise marks a minimum (clk_min).  The
// strobes are one-cycle enables in the CLK_REF_delay domain, issued on the
// edge at which the counter still holds the turning value, and only while
// en (NOT EN_TDC) is high, i.e. during coarse locking.  The first SIGN
// sample after reset only primes the detector.  Using enables rather than
// derived clocks is this design's choice.
`timescale 1ps/1fs
module register_clock (
  input  logic clk,      // CLK_REF_delay
  input  logic reset,    // RESET, active high, asynchronous
  input  logic en,       // NOT EN_TDC
  input  logic sign,     // SIGN
  output logic clk_max,  // store a maximum this cycle
  output logic clk_min   // store a minimum this cycle
);
  logic sign_q, primed;

  always_ff @(posedge clk or posedge reset)
    if (reset) begin
      sign_q <= 1'b0;
      primed <= 1'b0;
    end else if (en) begin
      sign_q <= sign;
      primed <= 1'b1;
    end

  assign clk_max = en && primed &&  sign_q && !sign;
  assign clk_min = en && primed && !sign_q &&  sign;
endmodule
