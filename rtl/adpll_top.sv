// adpll_top: all-digital PLL with two-step (coarse, then fine) locking.
// The reference (125 MHz) and the DCO output divided by n_div meet in the
// PFD.  Its SIGN output says which edge came first; START and STOP mark
// the two edges.
// Coarse step: after reset, coarse_control starts from coarse_init (16
// puts the DCO near 5.9 GHz) and ramps a 5-bit code by SIGN once per
// reference cycle (about 40 MHz of DCO frequency per LSB).  It records the
// code at each SIGN toggle, and when two maxima and two minima agree it
// fixes the code at their average and raises EN_TDC.
// Fine step: EN_TDC enables both TDCs.  The delay-line TDC (7 x 176 ps)
// feeds the integrator, which moves the DCO in 1 MHz steps; the Vernier
// TDC (15 x 11 ps) feeds the loop filter and the first-order delta-sigma
// modulator, which dithers the DCO in sub-MHz steps.  The integrator and
// filter are clocked by CLK_INT from the Vernier TDC; the modulator by the
// DCO output divided by DSM_DIV (about 1 GHz).
// RESET is applied asynchronously but released on a rising reference
// edge, so the divider starts in phase with the reference: SIGN only
// detects phase within half a reference period, and a random start phase
// can alias it and end coarse locking on a wrong code.
// The TDCs and the DCO are behavioural models, so this top is a
// simulation model of the loop; every other block is synthesizable.  The
// coarse logic is clocked on the falling reference edge (a half-period
// delayed reference) so that SIGN has settled, and the PFD reset-path
// delay (PFD_RST_DLY_PS) is modelled here between rst_req and rst_fb.
// Those choices, the reset release and the 1 GHz modulator clock source
// are this design's; the block structure and bus widths follow the
// published block diagram.
`timescale 1ps/1fs
module adpll_top
  import adpll_pkg::*;
#(
  parameter int unsigned N_COARSE_P     = N_COARSE,
  parameter int unsigned TOL            = 2,
  parameter real         T_INV_PS       = 176.0,
  parameter real         T_START_PS     = 60.0,
  parameter real         T_STOP_PS      = 49.0,
  parameter real         PFD_RST_DLY_PS = 150.0,
  parameter int unsigned DSM_DIV        = 6
) (
  input  logic                    ref_clk,     // CLK_REF
  input  logic                    reset,       // RESET, active high
  input  logic [5:0]              n_div,       // division factor N
  input  logic [N_COARSE_P-1:0]   coarse_init, // counter value in RESET
  output logic                    clk_out,     // CLK_OUT
  output logic                    clk_div,     // CLK_DIV
  output logic                    sign,        // SIGN
  output logic                    en_tdc,      // EN_TDC
  output logic [N_COARSE_P-1:0]   coarse_code,
  output logic [INT_BITS-1:0]     integ,
  output logic                    dsm_out,
  output logic                    clk_max,     // coarse turning points
  output logic                    clk_min,
  output logic                    clk_int,     // CLK_INT
  output logic [DL_BITS-1:0]      dl_code,     // delay-line TDC code
  output logic [VN_BITS-1:0]      vn_code      // Vernier TDC code
);
  // RESET released on a rising reference edge
  logic rst;
  always_ff @(posedge ref_clk or posedge reset)
    if (reset) rst <= 1'b1;
    else       rst <= 1'b0;

  // PFD
  logic rst_req, rst_fb, start, stop;
  pfd u_pfd (.clk_ref(ref_clk), .clk_div, .reset(rst), .rst_fb,
             .up(), .down(), .rst_req, .start, .stop, .sign);
  assign #(PFD_RST_DLY_PS) rst_fb = rst_req;

  // TDCs and encoders
  logic [DL_STAGES-1:0] dl_therm;
  logic [VN_STAGES-1:0] vn_therm;
  tdc_delay_line #(.STAGES(DL_STAGES), .T_STAGE_PS(T_INV_PS)) u_tdc_dl (
    .start, .stop, .en(en_tdc), .therm(dl_therm));
  tdc_vernier #(.STAGES(VN_STAGES), .T_START_PS(T_START_PS), .T_STOP_PS(T_STOP_PS)) u_tdc_vn (
    .start, .stop, .en(en_tdc), .therm(vn_therm), .clk_int);
  thermo_encoder #(.N_IN(DL_STAGES), .N_OUT(DL_BITS)) u_enc7x3  (.therm(dl_therm), .bin(dl_code));
  thermo_encoder #(.N_IN(VN_STAGES), .N_OUT(VN_BITS)) u_enc15x4 (.therm(vn_therm), .bin(vn_code));

  // Coarse locking
  logic        clk_ref_dly;
  logic [2:0]  row;
  logic [5:0]  col;
  assign clk_ref_dly = ~ref_clk;
  coarse_control #(.N(N_COARSE_P), .TOL(TOL)) u_coarse (
    .clk(clk_ref_dly), .reset(rst), .sign, .init(coarse_init), .en_tdc, .code(coarse_code),
    .row, .col, .clk_max, .clk_min);

  // Fine locking
  logic signed [DLF_BITS-1:0] dlf_out;
  logic                       clk_dsm;
  integrator #(.W_IN(DL_BITS), .W_OUT(INT_BITS), .INIT(INT_MID)) u_int (
    .clk_int, .reset(rst), .en(en_tdc), .sign, .din(dl_code), .dout(integ));
  dlf #(.W_IN(VN_BITS), .W_OUT(DLF_BITS)) u_dlf (
    .clk(clk_int), .reset(rst), .en(en_tdc), .sign, .din(vn_code), .dout(dlf_out));
  freq_divider #(.W(6)) u_div_dsm (.clk(clk_out), .reset(rst), .n(6'(DSM_DIV)), .clk_div(clk_dsm));
  dsm #(.W(DLF_BITS)) u_dsm (.clk(clk_dsm), .reset(rst), .en(en_tdc), .din(dlf_out), .dout(dsm_out));

  // Oscillator and feedback divider
  dco #(.INT_MID(INT_MID)) u_dco (.reset(rst), .row, .col, .integ, .dsm(dsm_out), .clk_out, .f_mhz());
  freq_divider #(.W(6)) u_div (.clk(clk_out), .reset(rst), .n(n_div), .clk_div);
endmodule
