// tb_control_check: the published example (maxima 23, 22, minima 15, 16)
// must lock with average 19; random register contents must lock exactly
// when both pairs are full and within the tolerance, with the truncated
// mean of the four values; EN_TDC and AVG must then hold.
`timescale 1ps/1fs
module tb_control_check;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0;
  logic [4:0] max1, max2, min1, min2, avg;
  logic [1:0] n_max, n_min;
  logic en_tdc;
  control_check #(.N(5), .TOL(2)) dut (.clk, .reset, .max1, .max2, .min1, .min2,
                                       .n_max, .n_min, .en_tdc, .avg);
  always #4000 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  function automatic int absd(input int a, input int b);
    return a > b ? a - b : b - a;
  endfunction

  initial begin : watchdog
    #50_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int a, b, c, d, nm, nl; bit ok; int lock_avg;
    max1 = 23; max2 = 22; min1 = 16; min2 = 15; n_max = 1; n_min = 2;
    #1 reset = 1;
    #1000 @(negedge clk) reset = 0;
    @(posedge clk); #1 check(int'(en_tdc), 0, "no lock with one max");
    @(negedge clk) n_max = 2;
    @(posedge clk); #1 check(int'(en_tdc), 1, "lock on example");
    check(int'(avg), 19, "example average");
    @(negedge clk) max1 = 0; max2 = 31;
    @(posedge clk); #1 check(int'(avg), 19, "avg held"); check(int'(en_tdc), 1, "en held");

    for (int r = 0; r < 300; r++) begin
      @(negedge clk) reset = 1;
      a = $urandom % 32; b = (r % 2 != 0) ? a + int'($urandom % 5) - 2 : $urandom % 32;
      c = $urandom % 32; d = (r % 3 != 0) ? c + int'($urandom % 5) - 2 : $urandom % 32;
      if (b < 0) b = 0; if (b > 31) b = 31; if (d < 0) d = 0; if (d > 31) d = 31;
      nm = $urandom % 3; nl = ($urandom % 4 == 0) ? 1 : 2;
      max1 = 5'(a); max2 = 5'(b); min1 = 5'(c); min2 = 5'(d);
      n_max = 2'(nm); n_min = 2'(nl);
      #1 reset = 0;
      ok = nm == 2 && nl == 2 && absd(a, b) <= 2 && absd(c, d) <= 2;
      @(posedge clk); #1;
      check(int'(en_tdc), int'(ok), "random lock decision");
      if (ok) check(int'(avg), (a + b + c + d) / 4, "random average");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
