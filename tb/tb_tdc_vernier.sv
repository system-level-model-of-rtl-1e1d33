// tb_tdc_vernier: START/STOP pairs with random spacing; the word must be
// a thermometer code with one 1 per 11 ps of spacing (stage i is 1 while
// (i+1)*11 ps < dt, at most 15), CLK_INT must rise 15*49+60 ps after STOP,
// and nothing is captured while the enable is low.
`timescale 1ps/1fs
module tb_tdc_vernier;
  int checks = 0, failures = 0;
  logic start = 0, stop = 0, en = 1;
  logic [14:0] therm;
  logic clk_int;
  realtime t_stop, t_int;
  tdc_vernier #(.STAGES(15), .T_START_PS(60.0), .T_STOP_PS(49.0)) dut (.start, .stop, .en, .therm, .clk_int);
  always @(posedge clk_int) t_int = $realtime;

  initial begin : watchdog
    #100_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic pulse(input int dt);
    start = 1;
    #(dt) stop = 1; t_stop = $realtime;
    #150 start = 0; stop = 0;
    #3000;
  endtask

  initial begin
    int dt, exp; logic [14:0] held;
    #100;
    for (int i = 0; i < 300; i++) begin
      dt = 1 + int'($urandom % 200);
      if (dt % 11 == 0) dt++;
      en = 1;
      pulse(dt);
      exp = 0;
      for (int k = 0; k < 15; k++) if ((k + 1) * 11 < dt) exp++;
      checks++;
      if (therm !== 15'((1 << exp) - 1)) begin
        failures++; $display("FAIL dt=%0d therm=%b expected %0d ones", dt, therm, exp);
      end
      checks++;
      if (int'(t_int - t_stop) != 15 * 49 + 60) begin
        failures++; $display("FAIL CLK_INT delay %0t", t_int - t_stop);
      end
      if (i % 10 == 9) begin
        held = therm; en = 0;
        pulse(1 + int'($urandom % 200));
        checks++;
        if (therm !== held) begin failures++; $display("FAIL capture while disabled"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
