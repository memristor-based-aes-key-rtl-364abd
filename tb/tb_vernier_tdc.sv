// tb_vernier_tdc: launches Start and then Stop with leads from -17 ps to 423 ps
// and checks the thermometer code: with 100 ps Start cells and 50 ps Stop
// cells, flip-flop i reads 1 exactly when the lead exceeds i * 50 ps, so the
// expected code has min(7, number of i >= 1 with 50*i < lead) ones at the bottom.
`timescale 1ns / 1ps
module tb_vernier_tdc;
  logic       start = 1'b0, stop = 1'b0;
  logic [6:0] therm;
  logic [6:0] expected;
  int checks = 0, failures = 0;
  vernier_tdc dut (.start(start), .stop(stop), .therm(therm));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int lead_ps;
    #10;
    for (int j = 0; j <= 44; j++) begin
      lead_ps = -17 + 10 * j;   // never an exact multiple of 50 ps (no ties)
      // both edges launched from a common reference 100 ps ahead
      start <= #((100 + (lead_ps < 0 ? -lead_ps : 0)) * 1ps) 1'b1;
      stop  <= #((100 + (lead_ps > 0 ?  lead_ps : 0)) * 1ps) 1'b1;
      #2;
      expected = '0;
      for (int i = 1; i <= 7; i++) if (50 * i < lead_ps) expected[i-1] = 1'b1;
      checks++;
      if (therm !== expected) begin
        failures++; $display("lead %0d ps: therm %b expected %b", lead_ps, therm, expected);
      end
      start = 1'b0; stop = 1'b0;
      #2;
      checks++;
      if (therm !== expected) begin failures++; $display("code changed on falling edges"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
