// tb_dsm: first-order delta-sigma modulator.  For a set of constant
// inputs the density of ones over 256*k samples must equal
// (din+128)/256 to within one count, and the output must match an
// accumulator model bit for bit.  Disabled, the output stays 0.
`timescale 1ps/1fs
module tb_dsm;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0, en = 0;
  logic signed [7:0] din = 0;
  logic dout;
  dsm #(.W(8)) dut (.clk, .reset, .en, .din, .dout);
  always #500 clk = ~clk;   // 1 GHz

  initial begin : watchdog
    #100_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int acc, ones, bitm, mism;
    static int vals[$] = {-128, -100, -1, 0, 1, 37, 100, 127};
    #1 reset = 1; #10 reset = 0;
    @(negedge clk); en = 0;
    repeat (20) begin @(posedge clk); #1; checks++; if (dout) begin failures++; $display("FAIL output while disabled"); end end
    foreach (vals[v]) begin
      @(negedge clk) en = 0; din = 8'(vals[v]);
      @(negedge clk) en = 1;
      acc = 0; ones = 0; mism = 0;
      for (int s = 0; s < 1024; s++) begin
        @(posedge clk); #1;
        acc = acc + vals[v] + 128;
        bitm = int'(acc >= 256); acc = acc % 256;
        if (int'(dout) != bitm) mism++;
        ones += int'(dout);
      end
      checks++;
      if (mism != 0) begin failures++; $display("FAIL din=%0d %0d bit mismatches", vals[v], mism); end
      checks++;
      if (ones < (vals[v] + 128) * 4 - 1 || ones > (vals[v] + 128) * 4 + 1) begin
        failures++; $display("FAIL din=%0d density %0d/1024", vals[v], ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
