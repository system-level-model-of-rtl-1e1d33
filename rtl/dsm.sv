// dsm: first-order delta-sigma modulator for the fine DCO tuning.
// The signed input is offset to u = din + 2^(W-1) (0..2^W-1) and added to
// a W-bit accumulator each clock; the carry out is the output bit.  Its
// density is u/2^W, so a DCO step of one fraction of a MHz is dithered
// down to kHz average resolution, and the quantisation noise is pushed to
// high frequencies.  Cleared while EN_TDC is low.  The design gives only
// the purpose and a 1 GHz sampling rate; the order (1) and the word width
// are this design's choices.  Timing: one output bit per rising clk edge.
`timescale 1ps/1fs
module dsm #(
  parameter int unsigned W = 8
) (
  input  logic                clk,    // sampling clock, about 1 GHz
  input  logic                reset,  // RESET, active high
  input  logic                en,     // EN_TDC
  input  logic signed [W-1:0] din,
  output logic                dout
);
  logic [W-1:0] acc, u;
  logic [W:0]   s;

  always_comb begin
    u = din ^ {1'b1, {(W-1){1'b0}}};   // din + 2^(W-1)
    s = {1'b0, acc} + {1'b0, u};
  end

  always_ff @(posedge clk or posedge reset)
    if (reset) begin
      acc  <= '0;
      dout <= 1'b0;
    end else if (!en) begin
      acc  <= '0;
      dout <= 1'b0;
    end else begin
      acc  <= s[W-1:0];
      dout <= s[W];
    end
endmodule
