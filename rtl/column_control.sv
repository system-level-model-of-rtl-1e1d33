// column_control: 3-to-6 converter from the coarse code LSBs to DCO columns.
// Six lines must carry eight values, so a Johnson (twisted-ring) code is
// used: 0..6 turn on the 0..6 lowest columns, 7 gives 111110.  Every
// value has its own pattern and neighbouring values differ in one line.
// The converter size is the design's; the code is this design's choice.
// Combinational.
`timescale 1ps/1fs
module column_control (
  input  logic [2:0] lsb,
  output logic [5:0] col
);
  always_comb
    if (lsb == 3'd7) col = 6'b111110;
    else for (int i = 0; i < 6; i++) col[i] = (32'(lsb) > i);
endmodule
