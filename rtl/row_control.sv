// row_control: 2-to-3 converter from the coarse code MSBs to DCO rows.
// Thermometer code: value k (0..3) turns on the k lowest of the three row
// lines.  The converter size is the design's; the code is this design's
// choice.  Combinational.
`timescale 1ps/1fs
module row_control (
  input  logic [1:0] msb,
  output logic [2:0] row
);
  always_comb
    for (int i = 0; i < 3; i++) row[i] = (32'(msb) > i);
endmodule
