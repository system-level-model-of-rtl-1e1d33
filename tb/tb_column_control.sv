// tb_column_control: all eight inputs of the 3-to-6 column converter give
// the expected Johnson pattern, every pattern is distinct and neighbouring
// values differ in exactly one line.
`timescale 1ps/1fs
module tb_column_control;
  int checks = 0, failures = 0;
  logic [2:0] lsb; logic [5:0] col;
  logic [5:0] seen [8];
  column_control dut (.lsb, .col);
  const logic [5:0] EXP [8] = '{6'b000000, 6'b000001, 6'b000011, 6'b000111,
                                6'b001111, 6'b011111, 6'b111111, 6'b111110};
  initial begin : watchdog
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int k = 0; k < 8; k++) begin
      lsb = 3'(k); #1; checks++; seen[k] = col;
      if (col !== EXP[k]) begin failures++; $display("FAIL lsb=%0d col=%b", k, col); end
    end
    for (int k = 1; k < 8; k++) begin
      checks++;
      if ($countones(seen[k] ^ seen[k-1]) != 1) begin failures++; $display("FAIL step %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
