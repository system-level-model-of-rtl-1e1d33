// tb_integrator: hold at mid-scale while disabled, add/subtract the TDC
// code by SIGN on every CLK_INT edge, saturation at 0 and 63, against a
// reference model.
`timescale 1ps/1fs
module tb_integrator;
  int checks = 0, failures = 0;
  logic clk_int = 0, reset = 0, en = 0, sign = 0;
  logic [2:0] din = 0;
  logic [5:0] dout;
  int model = 32;
  integrator #(.W_IN(3), .W_OUT(6), .INIT(32)) dut (.clk_int, .reset, .en, .sign, .din, .dout);

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin : watchdog
    #50_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 reset = 1; #10 reset = 0;
    check(int'(dout), 32, "reset value");
    for (int i = 0; i < 1000; i++) begin
      en   = (i % 200) > 10;
      // phases of mostly-up and mostly-down drive the value into both limits
      sign = ((i / 50) % 2 != 0) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      din  = 3'($urandom);
      #3000 clk_int = 1;
      if (!en) model = 32;
      else begin
        model = sign ? model + int'(din) : model - int'(din);
        if (model > 63) model = 63;
        if (model < 0)  model = 0;
      end
      #1 check(int'(dout), model, "integrator value");
      #3000 clk_int = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
