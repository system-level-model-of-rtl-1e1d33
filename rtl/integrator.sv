// integrator: first fine-locking stage of the ADPLL.
// On every rising edge of CLK_INT (one per reference cycle, after the TDCs
// have captured) it adds the 3-bit delay-line TDC code to its 6-bit value
// when SIGN is 1 (reference leads, DCO too slow) and subtracts it when
// SIGN is 0.  The value drives the DCO directly, 1 MHz per LSB.  While
// EN_TDC is low it is held at mid-scale INIT; it saturates at 0 and 63.
// Add/subtract by SIGN and the widths follow the design; reset value and
// saturation are this design's choices.
`timescale 1ps/1fs
module integrator #(
  parameter int unsigned W_IN  = 3,
  parameter int unsigned W_OUT = 6,
  parameter int unsigned INIT  = 32
) (
  input  logic             clk_int,  // CLK_INT
  input  logic             reset,    // RESET, active high
  input  logic             en,       // EN_TDC
  input  logic             sign,     // SIGN
  input  logic [W_IN-1:0]  din,      // delay-line TDC code
  output logic [W_OUT-1:0] dout      // to the DCO
);
  localparam int MAXV = (1 << W_OUT) - 1;
  int next;

  always_comb
    next = sign ? int'(dout) + int'(din) : int'(dout) - int'(din);

  always_ff @(posedge clk_int or posedge reset)
    if (reset)        dout <= W_OUT'(INIT);
    else if (!en)     dout <= W_OUT'(INIT);
    else if (next > MAXV) dout <= W_OUT'(MAXV);
    else if (next < 0)    dout <= '0;
    else                  dout <= W_OUT'(next);
endmodule
