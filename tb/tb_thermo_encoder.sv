// tb_thermo_encoder: exhaustive check of the 7x3 and 15x4 TDC encoders.
// Every clean thermometer word must give its number of HIGH taps, and
// random words (with bubbles) must give their population count.
`timescale 1ps/1fs
module tb_thermo_encoder;
  int checks = 0, failures = 0;
  logic [6:0]  t7;  logic [2:0] b7;
  logic [14:0] t15; logic [3:0] b15;
  thermo_encoder #(.N_IN(7),  .N_OUT(3)) dut7  (.therm(t7),  .bin(b7));
  thermo_encoder #(.N_IN(15), .N_OUT(4)) dut15 (.therm(t15), .bin(b15));

  function automatic int ones(input logic [14:0] v);
    int n = 0;
    for (int i = 0; i < 15; i++) n += int'(v[i]);
    return n;
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= 7; k++) begin
      t7 = 7'((1 << k) - 1); #1;
      check(int'(b7), k, "7x3 thermometer");
    end
    for (int k = 0; k <= 15; k++) begin
      t15 = 15'((1 << k) - 1); #1;
      check(int'(b15), k, "15x4 thermometer");
    end
    for (int r = 0; r < 200; r++) begin
      t7 = 7'($urandom); t15 = 15'($urandom); #1;
      check(int'(b7),  ones({8'd0, t7}), "7x3 random");
      check(int'(b15), ones(t15),        "15x4 random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
