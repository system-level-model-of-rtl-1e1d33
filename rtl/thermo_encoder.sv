// thermo_encoder: thermometer-to-binary encoder of a TDC.
// Counts the HIGH taps of the captured delay line; for a clean thermometer
// word this is the position of the 1->0 transition, and a single bubble
// only moves the result by one.  Instantiated as the 7x3 encoder of the
// delay-line TDC and as the 15x4 encoder of the Vernier TDC.  Sizes follow
// the design; the ones-count structure is this design's choice.
// Timing: combinational.
`timescale 1ps/1fs
module thermo_encoder #(
  parameter int unsigned N_IN  = 7,
  parameter int unsigned N_OUT = $clog2(N_IN + 1)
) (
  input  logic [N_IN-1:0]  therm,
  output logic [N_OUT-1:0] bin
);
  always_comb begin
    bin = '0;
    for (int i = 0; i < N_IN; i++)
      bin = bin + N_OUT'(therm[i]);
  end
endmodule
