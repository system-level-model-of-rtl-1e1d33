// tb_coarse_counter: reset value, up/down counting by SIGN, hold when
// disabled and saturation at both ends, against a reference model.
`timescale 1ps/1fs
module tb_coarse_counter;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0, en = 0, sign = 0;
  logic [4:0] count;
  int model;
  logic [4:0] init = 16;
  coarse_counter #(.N(5)) dut (.clk, .reset, .en, .sign, .init, .count);
  always #4000 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin : watchdog
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 reset = 1;
    #1000; check(int'(count), 16, "reset value");
    @(negedge clk) reset = 0;
    model = 16;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      en = ($urandom % 8) != 0;
      // long runs in one direction reach both saturation limits
      if ((i / 40) % 2 == 0) sign = ($urandom % 4) != 0; else sign = ($urandom % 4) == 0;
      @(posedge clk); #1;
      if (en) model = sign ? (model < 31 ? model + 1 : 31) : (model > 0 ? model - 1 : 0);
      check(int'(count), model, "count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
