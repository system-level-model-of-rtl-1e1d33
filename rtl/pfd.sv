// pfd: phase frequency detector with a SIGN output.
// UP (DFF2) is set by a rising reference edge and DOWN (DFF3) by a rising
// divided-clock edge; both have D tied high.  When both are high the
// reset request UP&DOWN clears them again.  START = UP | DOWN rises at the
// first of the two edges and STOP = UP & DOWN at the second, so the time
// from START to STOP is the phase difference; the TDCs measure it.  SIGN
// (DFF1) samples the reference at the divided-clock edge: it is 1 when the
// reference leads (the divided clock is late) and 0 when it lags.
// The reset request leaves the block on rst_req and returns on rst_fb: in
// silicon the two are wired together and the gate delay of that path sets
// the width of the STOP pulse; a simulation model inserts that delay
// between them.  This split, and the global reset, are this design's
// choices; gates and flip-flops follow the published PFD schematic.
// Timing: purely edge driven, no system clock.
`timescale 1ps/1fs
module pfd (
  input  logic clk_ref,   // CLK_REF
  input  logic clk_div,   // CLK_DIV
  input  logic reset,     // global reset, active high
  input  logic rst_fb,    // reset of DFF2/DFF3 (delayed rst_req)
  output logic up,
  output logic down,
  output logic rst_req,
  output logic start,
  output logic stop,
  output logic sign
);
  logic clr;
  assign clr = rst_fb | reset;

  always_ff @(posedge clk_ref or posedge clr)
    if (clr) up <= 1'b0;
    else     up <= 1'b1;

  always_ff @(posedge clk_div or posedge clr)
    if (clr) down <= 1'b0;
    else     down <= 1'b1;

  always_ff @(posedge clk_div or posedge reset)
    if (reset) sign <= 1'b0;
    else       sign <= clk_ref;

  assign rst_req = up & down;
  assign start   = up | down;
  assign stop    = up & down;
endmodule
