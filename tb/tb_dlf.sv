// tb_dlf: loop filter against a reference model of
// y <= y + (8*e - y) >>> 2 with e = +/-din, plus a step response: a
// constant input must settle to 8*e.
`timescale 1ps/1fs
module tb_dlf;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0, en = 0, sign = 0;
  logic [3:0] din = 0;
  logic signed [7:0] dout;
  int y = 0;
  dlf #(.W_IN(4), .W_OUT(8), .K(2)) dut (.clk, .reset, .en, .sign, .din, .dout);

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  function automatic int asr(input int v, input int k);  // arithmetic shift (floor)
    return v >>> k;
  endfunction

  task automatic tick();
    #3000 clk = 1;
    if (!en) y = 0;
    else y = y + asr((sign ? 8 : -8) * int'(din) - y, 2);
    #1 check(int'(dout), y, "filter output");
    #3000 clk = 0;
  endtask

  initial begin : watchdog
    #50_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 reset = 1; #10 reset = 0;
    check(int'(dout), 0, "reset value");
    en = 1;
    for (int i = 0; i < 500; i++) begin
      sign = 1'($urandom); din = 4'($urandom);
      if (i % 100 == 99) en = 0; else en = 1;
      tick();
    end
    // step response to +15 settles at 120 (within the truncation floor)
    en = 1; sign = 1; din = 15;
    repeat (40) tick();
    checks++;
    if (dout < 8'sd116) begin failures++; $display("FAIL step response %0d", dout); end
    sign = 0; din = 15;
    repeat (40) tick();
    checks++;
    if (dout > -8'sd116) begin failures++; $display("FAIL negative step response %0d", dout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
