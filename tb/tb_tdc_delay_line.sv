// tb_tdc_delay_line: START/STOP pairs with random spacing; the captured
// word must be a thermometer code with floor(dt/176 ps) ones (at most 7),
// and must hold while the enable is low.
`timescale 1ps/1fs
module tb_tdc_delay_line;
  int checks = 0, failures = 0;
  logic start = 0, stop = 0, en = 1;
  logic [6:0] therm;
  tdc_delay_line #(.STAGES(7), .T_STAGE_PS(176.0)) dut (.start, .stop, .en, .therm);

  initial begin : watchdog
    #100_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic pulse(input int dt);
    start = 1;
    #(dt) stop = 1;
    #150 start = 0; stop = 0;
    #3000;
  endtask

  initial begin
    int dt, exp; logic [6:0] held;
    #100;
    for (int i = 0; i < 300; i++) begin
      dt = 1 + int'($urandom % 1500);
      if (dt % 176 == 0) dt++;
      en = 1;
      pulse(dt);
      exp = dt / 176; if (exp > 7) exp = 7;
      checks++;
      if (therm !== 7'((1 << exp) - 1)) begin
        failures++; $display("FAIL dt=%0d therm=%b expected %0d ones", dt, therm, exp);
      end
      if (i % 10 == 9) begin
        held = therm; en = 0;
        pulse(1 + int'($urandom % 1500));
        checks++;
        if (therm !== held) begin failures++; $display("FAIL capture while disabled"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
