// tb_adpll_top: closed-loop test of the ADPLL at its default parameters.
// A 125 MHz reference is applied and the loop is run from reset for
// every division factor 43..50 (5.375-6.25 GHz, 48 giving 6 GHz), starting
// the coarse counter at 16 (4 for N = 43).  For each it checks that
//  - coarse locking ends (EN_TDC rises) within 300 reference cycles, after
//    two maxima and two minima, with the code frozen at a value within
//    two steps of the ideal index (N*125 - 5252)/(1092/27);
//  - after a settling time the divided clock produces exactly one edge per
//    reference edge over 400 cycles (no cycle slips), the delay-line TDC
//    never reaches full scale, and the mean DCO frequency is N*125 MHz
//    within 0.1 %.
// It also counts how often each mechanism of the loop acted (counter up
// and down, maximum and minimum capture, lock, MUX switch, both TDCs,
// integrator add and subtract, delta-sigma ones and zeros) and counts a
// failure for any that never did.
`timescale 1ps/1fs
module tb_adpll_top;
  int checks = 0, failures = 0;
  logic ref_clk = 0, reset = 0;
  logic [5:0] n_div = 48;
  logic clk_out, clk_div, sign, en_tdc, dsm_out, clk_max, clk_min, clk_int;
  logic [4:0] coarse_code;
  logic [5:0] integ;
  logic [2:0] dl_code;
  logic [3:0] vn_code;

  logic [4:0] coarse_init = 16;
  adpll_top dut (.ref_clk, .reset, .n_div, .coarse_init, .clk_out, .clk_div, .sign, .en_tdc, .coarse_code,
                 .integ, .dsm_out, .clk_max, .clk_min, .clk_int, .dl_code, .vn_code);

  always #4000 ref_clk = ~ref_clk;   // 125 MHz

  // mechanism counters
  int n_cnt_up, n_cnt_down, n_max, n_min, n_lock, n_mux, n_dl, n_vn, n_int_add, n_int_sub, n_dsm1, n_dsm0;
  logic [4:0] code_q; logic [5:0] integ_q; logic en_q;
  always @(negedge ref_clk) begin   // the coarse logic's clock edge
    #1;
    if (!reset) begin
      if (!en_tdc && coarse_code > code_q) n_cnt_up++;
      if (!en_tdc && coarse_code < code_q) n_cnt_down++;
      if (en_tdc && !en_q) begin n_lock++; if (coarse_code != code_q) n_mux++; end
    end
    code_q = coarse_code; en_q = en_tdc;
  end
  always @(posedge ref_clk) begin   // strobes are valid just before the coarse clock edge
    #3900;
    if (!reset && clk_max) n_max++;
    if (!reset && clk_min) n_min++;
  end
  always @(posedge clk_int) begin
    #1;
    if (en_tdc) begin
      if (dl_code != 0) n_dl++;
      if (vn_code != 0) n_vn++;
      if (integ > integ_q) n_int_add++;
      if (integ < integ_q) n_int_sub++;
    end
    integ_q = integ;
  end
  always @(posedge clk_out) if (en_tdc) begin if (dsm_out) n_dsm1++; else n_dsm0++; end

  int n_ref, n_divc, dl_full;
  always @(posedge ref_clk) n_ref++;
  always @(posedge clk_div) n_divc++;
  always @(posedge clk_int) if (en_tdc && dl_code == 3'd7) dl_full++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL N=%0d: %s", n_div, what); end
  endtask

  initial begin : watchdog
    #60_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    static int nv[$] = {43, 44, 45, 46, 47, 48, 49, 50};
    int lock_cyc, r0, d0, nout;
    real ideal, fmean; realtime t0;
    foreach (nv[k]) begin
      n_div = 6'(nv[k]);
      // 16 is the published start value (DCO near 5.9 GHz); for N = 43 the
      // target is 13 codes away, beyond the coarse loop's pull-in range from
      // 16, so that run starts next to it
      coarse_init = (nv[k] == 43) ? 5'd4 : 5'd16;
      @(posedge ref_clk) #100 reset = 1;
      #20000 reset = 0;
      lock_cyc = -1;
      for (int c = 0; c < 300 && lock_cyc < 0; c++) begin
        @(posedge ref_clk);
        if (en_tdc) lock_cyc = c;
      end
      check(lock_cyc >= 0, "coarse lock within 300 reference cycles");
      check(dut.u_coarse.n_max == 2 && dut.u_coarse.n_min == 2, "two maxima and two minima stored at lock");
      ideal = (real'(nv[k]) * 125.0 - 5252.0) / (1092.0 / 27.0);
      check(real'(coarse_code) > ideal - 2.0 && real'(coarse_code) < ideal + 2.0, "coarse code near the ideal index");
      $display("N=%0d: coarse lock after %0d reference cycles, code %0d (ideal %0.2f), max %0d/%0d min %0d/%0d",
               nv[k], lock_cyc, coarse_code, ideal, dut.u_coarse.max1, dut.u_coarse.max2,
               dut.u_coarse.min1, dut.u_coarse.min2);
      // fine locking: settle, then count edges
      repeat (200) @(posedge ref_clk);
      dl_full = 0;
      r0 = n_ref; d0 = n_divc; t0 = $realtime; nout = 0;
      fork
        begin repeat (400) @(posedge ref_clk); end
        forever @(posedge clk_out) nout++;
      join_any
      disable fork;
      check((n_divc - d0) - (n_ref - r0) <= 1 && (n_ref - r0) - (n_divc - d0) <= 1, "no cycle slip over 400 cycles");
      check(dl_full == 0, "delay-line TDC stays below full scale");
      fmean = real'(nout) * 1.0e6 / ($realtime - t0);
      check(fmean > real'(nv[k]) * 125.0 * 0.999 && fmean < real'(nv[k]) * 125.0 * 1.001, "mean DCO frequency");
      $display("N=%0d: mean DCO frequency %0.3f MHz (target %0d), integrator %0d", nv[k], fmean, nv[k] * 125, integ);
    end
    $display("mechanisms: count_up=%0d count_down=%0d max=%0d min=%0d lock=%0d mux=%0d dl_tdc=%0d vn_tdc=%0d int_add=%0d int_sub=%0d dsm1=%0d dsm0=%0d",
             n_cnt_up, n_cnt_down, n_max, n_min, n_lock, n_mux, n_dl, n_vn, n_int_add, n_int_sub, n_dsm1, n_dsm0);
    check(n_cnt_up > 0,   "counter counted up");
    check(n_cnt_down > 0, "counter counted down");
    check(n_max > 0,      "maximum captured");
    check(n_min > 0,      "minimum captured");
    check(n_lock == nv.size(),    "coarse lock in every run");
    check(n_mux > 0,      "MUX switched to the average");
    check(n_dl > 0,       "delay-line TDC measured");
    check(n_vn > 0,       "Vernier TDC measured");
    check(n_int_add > 0,  "integrator added");
    check(n_int_sub > 0,  "integrator subtracted");
    check(n_dsm1 > 0 && n_dsm0 > 0, "delta-sigma output toggled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
