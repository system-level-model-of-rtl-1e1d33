// tb_row_control: all four inputs of the 2-to-3 row converter give the
// thermometer pattern with that many rows on.
`timescale 1ps/1fs
module tb_row_control;
  int checks = 0, failures = 0;
  logic [1:0] msb; logic [2:0] row;
  row_control dut (.msb, .row);
  const logic [2:0] EXP [4] = '{3'b000, 3'b001, 3'b011, 3'b111};
  initial begin : watchdog
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int k = 0; k < 4; k++) begin
      msb = 2'(k); #1; checks++;
      if (row !== EXP[k]) begin failures++; $display("FAIL msb=%0d row=%b", k, row); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
