// tb_coarse_control: coarse locking controller.
// 1) Directed: the SIGN sequence that produces the published coarse
//    waveform (16 -> 15 -> 23 -> 16 -> 22) must store minima 15, 16 and
//    maxima 23, 22, raise EN_TDC one clock after the fourth turning point
//    and switch the output to their average, 19.
// 2) Closed loop against a simple phase-accumulating plant, compared every
//    clock with a cycle-level reference model of the algorithm; the row
//    and column lines are checked against the code.
`timescale 1ps/1fs
module tb_coarse_control;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0, sign = 0;
  logic en_tdc, clk_max, clk_min;
  logic [4:0] code;
  logic [2:0] row;
  logic [5:0] col;
  logic [4:0] init = 16;
  coarse_control #(.N(5), .TOL(2)) dut (.clk, .reset, .sign, .init, .en_tdc, .code,
                                                   .row, .col, .clk_max, .clk_min);
  always #4000 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // reference model state
  int m_cnt, m_max[2], m_min[2], m_nmax, m_nmin, m_avg;
  bit m_prev, m_primed, m_en;
  task automatic model_reset();
    m_cnt = 16; m_prev = 0; m_primed = 0; m_max = '{0, 0}; m_min = '{0, 0};
    m_nmax = 0; m_nmin = 0; m_en = 0; m_avg = 0;
  endtask
  function automatic int absd(input int a, input int b); return a > b ? a - b : b - a; endfunction
  task automatic model_step(input bit s);
    int nc; bit ok;
    ok = (m_nmax == 2 && m_nmin == 2 && absd(m_max[0], m_max[1]) <= 2 && absd(m_min[0], m_min[1]) <= 2);
    if (!m_en) begin
      nc = s ? (m_cnt < 31 ? m_cnt + 1 : 31) : (m_cnt > 0 ? m_cnt - 1 : 0);
      if (m_primed && m_prev && !s) begin m_max[1] = m_max[0]; m_max[0] = m_cnt; if (m_nmax < 2) m_nmax++; end
      if (m_primed && !m_prev && s) begin m_min[1] = m_min[0]; m_min[0] = m_cnt; if (m_nmin < 2) m_nmin++; end
      m_prev = s; m_primed = 1; m_cnt = nc;
      if (ok) begin m_en = 1; m_avg = (m_max[0] + m_max[1] + m_min[0] + m_min[1]) / 4; end
    end
  endtask

  task automatic check_lines();
    int rows, cols;
    rows = $countones(row);
    cols = (col == 6'b111110) ? 7 : $countones(col);
    check(rows * 8 + cols, int'(code), "row/col lines encode the code");
  endtask

  initial begin : watchdog
    #100_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int seq[$], lock_cycle, n_max_seen, n_min_seen;
    real phase;
    // ---- 1) directed, published example
    seq = {0};
    repeat (8) seq.push_back(1);
    repeat (7) seq.push_back(0);
    repeat (6) seq.push_back(1);
    seq.push_back(0);
    #1 reset = 1;
    #1000; check(int'(code), 16, "reset code"); check(int'(en_tdc), 0, "reset en_tdc");
    @(negedge clk) reset = 0;
    foreach (seq[i]) begin
      sign = seq[i][0];
      @(posedge clk); #1;
      check(int'(en_tdc), 0, "no lock before the fourth turning point");
    end
    check(int'(dut.max1), 22, "MAX1"); check(int'(dut.max2), 23, "MAX2");
    check(int'(dut.min1), 16, "MIN1"); check(int'(dut.min2), 15, "MIN2");
    @(posedge clk); #1;
    check(int'(en_tdc), 1, "EN_TDC one clock later");
    check(int'(code), 19, "average 19");
    check_lines();
    repeat (5) begin @(negedge clk) sign = ~sign; @(posedge clk); #1 check(int'(code), 19, "code frozen"); end

    // ---- 2) closed loop with a plant and a reference model
    for (int run = 0; run < 20; run++) begin
      real target;
      @(negedge clk) reset = 1;
      model_reset();  // no clock edge passes before the loop
      target = 4.0 + real'($urandom % 2300) / 100.0;
      phase = real'(int'($urandom % 21) - 10);
      n_max_seen = 0; n_min_seen = 0; lock_cycle = -1;
      #1 reset = 0;
      for (int c = 0; c < 120; c++) begin
        // plant: phase error integrates the frequency error; SIGN = 1 when the
        // divided clock is late (phase < 0)
        phase += real'(code) - target;
        sign = phase < 0.0;
        @(posedge clk); #1;
        model_step(sign);
        if (clk_max) n_max_seen++;
        if (clk_min) n_min_seen++;
        check(int'(en_tdc), int'(m_en), "closed-loop en_tdc");
        check(int'(code), m_en ? m_avg : m_cnt, "closed-loop code");
        check_lines();
        if (en_tdc && lock_cycle < 0) lock_cycle = c;
        @(negedge clk);
      end
      checks++;
      if (lock_cycle < 0) begin failures++; $display("FAIL run %0d target %f: no lock", run, target); end
      else if (absd(int'(code) * 100, int'(target * 100.0)) > 250) begin
        failures++; $display("FAIL run %0d: locked code %0d far from target %f", run, code, target);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

