// tb_dco: measures the oscillator period over 200 cycles for coarse,
// integrator and delta-sigma settings and compares the frequency with
// 5252 MHz + c*1092/27 MHz + (integ-32)*1 MHz +/- 0.25 MHz, c being the
// index the row and column lines encode (clamped at 27).  The row and
// column lines are driven by the real converters.
`timescale 1ps/1fs
module tb_dco;
  int checks = 0, failures = 0;
  logic reset = 1, dsm = 0;
  logic [4:0] code = 0;
  logic [2:0] row; logic [5:0] col;
  logic [5:0] integ = 32;
  logic clk_out; real f_mhz;
  row_control    u_row (.msb(code[4:3]), .row);
  column_control u_col (.lsb(code[2:0]), .col);
  dco dut (.reset, .row, .col, .integ, .dsm, .clk_out, .f_mhz);

  initial begin : watchdog
    #500_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic measure(input int c, input int it, input bit d);
    realtime t0, t1; real f, fexp; int idx;
    code = 5'(c); integ = 6'(it); dsm = d;
    repeat (3) @(posedge clk_out);
    t0 = $realtime;
    repeat (200) @(posedge clk_out);
    t1 = $realtime;
    f = 200.0 * 1.0e6 / (t1 - t0);
    idx = 8 * (c / 8) + (c % 8); if (idx > 27) idx = 27;
    fexp = 5252.0 + real'(idx) * 1092.0 / 27.0 + real'(it - 32) + (d ? 0.25 : -0.25);
    checks++;
    if (f - fexp > 0.05 || fexp - f > 0.05) begin
      failures++; $display("FAIL code=%0d integ=%0d dsm=%0d: %f MHz, expected %f", c, it, d, f, fexp);
    end
  endtask

  initial begin
    #100;
    checks++; if (clk_out !== 1'b0) begin failures++; $display("FAIL output not held in reset"); end
    reset = 0;
    for (int c = 0; c < 32; c++) measure(c, 32, 0);
    measure(19, 0, 0); measure(19, 63, 0); measure(19, 33, 1); measure(0, 0, 0); measure(31, 63, 1);
    for (int r = 0; r < 10; r++) measure(int'($urandom % 32), int'($urandom % 64), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
