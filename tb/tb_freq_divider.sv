// tb_freq_divider: for N = 43..50 (and 6 for the modulator clock) the
// output period must be exactly N input cycles and the high time
// floor(N/2) cycles.
`timescale 1ps/1fs
module tb_freq_divider;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0;
  logic [5:0] n = 48;
  logic clk_div;
  int cyc = 0;
  freq_divider #(.W(6)) dut (.clk, .reset, .n, .clk_div);
  always #83 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin : watchdog
    #50_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    static int nv[$] = {43, 44, 45, 46, 47, 48, 49, 50, 6};
    int r0, f0, r1;
    foreach (nv[k]) begin
      n = 6'(nv[k]);
      #1 reset = 1; #200 reset = 0;
      @(posedge clk_div); @(posedge clk_div);
      repeat (3) begin
        r0 = cyc;
        @(negedge clk_div); f0 = cyc;
        @(posedge clk_div); r1 = cyc;
        check(r1 - r0, nv[k], "period in DCO cycles");
        check(f0 - r0, nv[k] / 2, "high time");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
