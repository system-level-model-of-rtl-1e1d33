// dlf: digital loop filter of the second fine-locking stage.
// The Vernier TDC code (0..15, 11 ps per LSB) is signed by SIGN into a
// phase error e, scaled by 8, and low-pass filtered by a first-order IIR:
//   y <= y + (8*e - y) >>> K
// y is an 8-bit two's-complement word that feeds the delta-sigma
// modulator.  Cleared while EN_TDC is low.  Only the filter's purpose is
// given by the design; this structure, the scaling and K are this
// design's choices.  Timing: one update per rising edge of CLK_INT.
`timescale 1ps/1fs
module dlf #(
  parameter int unsigned W_IN  = 4,
  parameter int unsigned W_OUT = 8,
  parameter int unsigned K     = 2
) (
  input  logic                    clk,    // CLK_INT
  input  logic                    reset,  // RESET, active high
  input  logic                    en,     // EN_TDC
  input  logic                    sign,   // SIGN
  input  logic [W_IN-1:0]         din,    // Vernier TDC code
  output logic signed [W_OUT-1:0] dout
);
  logic signed [W_OUT+1:0] x, d;

  always_comb begin
    x = sign ? (W_OUT+2)'(din) <<< 3 : -((W_OUT+2)'(din) <<< 3);
    d = x - (W_OUT+2)'(dout);
  end

  always_ff @(posedge clk or posedge reset)
    if (reset)    dout <= '0;
    else if (!en) dout <= '0;
    else          dout <= W_OUT'((W_OUT+2)'(dout) + (d >>> K));
endmodule
