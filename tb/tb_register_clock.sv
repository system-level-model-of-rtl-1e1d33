// tb_register_clock: a SIGN fall gives one clk_max, a rise one clk_min,
// nothing without a toggle, nothing on the first sample after reset and
// nothing while disabled.
`timescale 1ps/1fs
module tb_register_clock;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0, en = 1, sign = 1;
  logic clk_max, clk_min;
  logic prev; bit primed;
  register_clock dut (.clk, .reset, .en, .sign, .clk_max, .clk_min);
  always #4000 clk = ~clk;

  initial begin : watchdog
    #20_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 reset = 1;
    #1000 @(negedge clk) reset = 0;
    primed = 1; prev = sign;   // one enabled clock edge passes before the loop
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      if ($urandom % 3 == 0) sign = ~sign;
      en = (i < 700) ? (($urandom % 10) != 0) : 1'b0;
      #1;
      checks++;
      if (clk_max !== (en && primed && prev && !sign) || clk_min !== (en && primed && !prev && sign)) begin
        failures++;
        $display("FAIL i=%0d prev=%b sign=%b en=%b max=%b min=%b", i, prev, sign, en, clk_max, clk_min);
      end
      checks++;
      if (clk_max && clk_min) begin failures++; $display("FAIL both strobes"); end
      @(posedge clk);
      if (en) begin prev = sign; primed = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
