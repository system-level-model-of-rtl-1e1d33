// adpll_pkg: widths and constants shared by the all-digital PLL blocks.
// The coarse code is 5 bits wide: its 3 low bits drive the column
// converter and its 2 high bits the row converter.  The fine path uses a
// 3-bit delay-line TDC code, a 4-bit Vernier code and a 6-bit integrator.
// These widths are the bus widths drawn in the block diagram of the design;
// the integrator reset value 32 (mid-scale) is this design's choice.
`timescale 1ps/1fs
package adpll_pkg;
  localparam int unsigned N_COARSE     = 5;   // coarse code width
  localparam int unsigned DL_STAGES    = 7;   // delay-line TDC stages
  localparam int unsigned DL_BITS      = 3;   // 7x3 encoder
  localparam int unsigned VN_STAGES    = 15;  // Vernier TDC stages
  localparam int unsigned VN_BITS      = 4;   // 15x4 encoder
  localparam int unsigned INT_BITS     = 6;   // integrator to DCO
  localparam int unsigned INT_MID      = 32;  // integrator reset value
  localparam int unsigned DLF_BITS     = 8;   // loop filter word
endpackage
