// tb_pfd: phase frequency detector with a modelled 150 ps reset path.
// For reference-leading and divided-clock-leading offsets it checks that
// START rises at the first edge, STOP at the second, UP/DOWN order, that
// both flip-flops clear after the reset delay, and the SIGN value.
`timescale 1ps/1fs
module tb_pfd;
  int checks = 0, failures = 0;
  logic clk_ref = 0, clk_div = 0, reset = 0;
  logic rst_fb, up, down, rst_req, start, stop, sign;
  realtime t_start, t_stop;
  pfd dut (.clk_ref, .clk_div, .reset, .rst_fb, .up, .down, .rst_req, .start, .stop, .sign);
  assign #150 rst_fb = rst_req;
  always @(posedge start) t_start = $realtime;
  always @(posedge stop)  t_stop  = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    #100_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int d;
    #1 reset = 1; #10 reset = 0;
    for (int i = 0; i < 200; i++) begin
      d = int'($urandom % 3000) - 1500;
      if (d == 0) d = 1;
      #2000;
      if (d > 0) begin            // reference leads by d ps
        clk_ref = 1; #1;
        check(up && !down && start && !stop, "UP first");
        #(d - 1) clk_div = 1; #1;
        check(stop, "STOP at second edge");
        check(sign == 1'b1, "SIGN high when reference leads");
      end else begin              // divided clock leads by -d ps
        clk_div = 1; #1;
        check(down && !up && start && !stop, "DOWN first");
        check(sign == 1'b0, "SIGN low when divided clock leads");
        #(-d - 1) clk_ref = 1; #1;
        check(stop, "STOP at second edge");
      end
      check(int'(t_stop - t_start) == (d > 0 ? d : -d), "START-to-STOP time equals the phase offset");
      #200;
      check(!up && !down && !start && !stop, "reset after the second edge");
      #2000 clk_ref = 0; clk_div = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
