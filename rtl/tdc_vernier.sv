// tdc_vernier: behavioural model of the Vernier time-to-digital converter
// (analog delay lines, not synthesizable logic).
// START runs down a line of slow elements (T_START_PS) and STOP down a line
// of fast ones (T_STOP_PS).  Flip-flop i takes its D from START tap i and
// its clock from STOP tap i; it reads 1 while START still arrives first,
// i.e. while (i+1)*(T_START_PS-T_STOP_PS) < t(STOP)-t(START).  The
// thermometer code therefore resolves the START-to-STOP time in steps of
// T_START_PS-T_STOP_PS (11 ps by default) over 15 stages.  CLK_INT, the
// integrator and loop-filter clock, is STOP at the end of its line passed
// through one more slow element, so it rises after every flip-flop of
// both TDCs has captured.  The 11 ps resolution and 15 stages are the
// design's; the individual element delays are this design's choice.  The
// flip-flops capture only while en (EN_TDC) is high.
`timescale 1ps/1fs
module tdc_vernier #(
  parameter int unsigned STAGES     = 15,
  parameter real         T_START_PS = 60.0,
  parameter real         T_STOP_PS  = 49.0
) (
  input  logic              start,
  input  logic              stop,
  input  logic              en,
  output logic [STAGES-1:0] therm,
  output logic              clk_int
);
  logic [STAGES-1:0] s_tap, p_tap;   // START (slow) and STOP (fast) taps

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    logic s_in, p_in, s_out, p_out, q;
    if (i == 0) begin : g_first
      assign s_in = start;
      assign p_in = stop;
    end else begin : g_next
      assign s_in = s_tap[i-1];
      assign p_in = p_tap[i-1];
    end
    initial begin s_out = 1'b0; p_out = 1'b0; q = 1'b0; end
    always @(s_in) s_out <= #(T_START_PS) s_in;
    always @(p_in) p_out <= #(T_STOP_PS)  p_in;
    assign s_tap[i] = s_out;
    assign p_tap[i] = p_out;

    always @(posedge p_out) if (en) q <= s_out;
    assign therm[i] = q;
  end

  logic clk_int_q;
  initial clk_int_q = 1'b0;
  always @(p_tap[STAGES-1]) clk_int_q <= #(T_START_PS) p_tap[STAGES-1];
  assign clk_int = clk_int_q;
endmodule
