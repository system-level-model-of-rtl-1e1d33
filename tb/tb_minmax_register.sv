// tb_minmax_register: random strobe sequences; MAX1/MAX2 and MIN1/MIN2
// must hold the last two captured values and the fill counts must
// saturate at 2.
`timescale 1ps/1fs
module tb_minmax_register;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0, clk_max = 0, clk_min = 0;
  logic [4:0] count, max1, max2, min1, min2;
  logic [1:0] n_max, n_min;
  int m1 = 0, m2 = 0, l1 = 0, l2 = 0, nm = 0, nl = 0;
  minmax_register #(.N(5)) dut (.clk, .reset, .clk_max, .clk_min, .count,
                                .max1, .max2, .min1, .min2, .n_max, .n_min);
  always #4000 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin : watchdog
    #20_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    count = 0;
    #1 reset = 1;
    #1000 @(negedge clk) reset = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      count = 5'($urandom);
      case ($urandom % 4)
        0: begin clk_max = 1; clk_min = 0; end
        1: begin clk_max = 0; clk_min = 1; end
        default: begin clk_max = 0; clk_min = 0; end
      endcase
      @(posedge clk); #1;
      if (clk_max) begin m2 = m1; m1 = int'(count); if (nm < 2) nm++; end
      if (clk_min) begin l2 = l1; l1 = int'(count); if (nl < 2) nl++; end
      check(int'(max1), m1, "max1"); check(int'(max2), m2, "max2");
      check(int'(min1), l1, "min1"); check(int'(min2), l2, "min2");
      check(int'(n_max), nm, "n_max"); check(int'(n_min), nl, "n_min");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
