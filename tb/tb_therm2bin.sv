// tb_therm2bin: applies all 128 7-bit input patterns to the encoder and checks
// that the output is the number of ones; the 8 clean thermometer codes are also
// checked against their expected binary value written out directly.
`timescale 1ns / 1ps
module tb_therm2bin;
  logic [6:0] therm;
  logic [2:0] bin;
  int checks = 0, failures = 0;
  therm2bin dut (.therm(therm), .bin(bin));
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k <= 7; k++) begin
      therm = 7'((1 << k) - 1);   // k ones from q1 upward
      #1;
      checks++;
      if (bin !== 3'(k)) begin failures++; $display("thermometer %b gave %0d, expected %0d", therm, bin, k); end
    end
    for (int v = 0; v < 128; v++) begin
      therm = 7'(v);
      #1;
      checks++;
      if (bin !== 3'($countones(therm))) begin failures++; $display("pattern %b gave %0d", therm, bin); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
