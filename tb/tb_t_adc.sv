// tb_t_adc: converts every node-X voltage from 300 mV to 700 mV in 1 mV steps and
// checks the 3-bit code against the ADC ranges (code k from 385 + 25k mV,
// 000 below 385 mV, 111 from 560 mV), then the typical node-X voltage of each
// state (407, 425, 445, 467, 491, 517, 547, 580 mV -> 000 ... 111). It also
// checks that code_valid pulses for exactly one cycle, one cycle after conv.
`timescale 1ns / 1ps
module tb_t_adc;
  logic       clk = 1'b0, rst_n = 1'b0, conv = 1'b0;
  logic [9:0] vx_mv = '0;
  logic [2:0] code;
  logic       code_valid;
  int checks = 0, failures = 0;
  int expected;
  int seen [8];
  always #5 clk = ~clk;
  t_adc dut (.clk(clk), .rst_n(rst_n), .conv(conv), .vx_mv(vx_mv), .code(code), .code_valid(code_valid));

  task automatic convert(input int mv, output logic [2:0] result);
    vx_mv = 10'(mv);
    @(posedge clk);
    conv <= 1'b1;
    @(posedge clk);
    conv <= 1'b0;
    @(negedge clk);
    checks++;
    if (!code_valid) begin failures++; $display("code_valid missing at %0d mV", mv); end
    result = code;
    @(negedge clk);
    checks++;
    if (code_valid) begin failures++; $display("code_valid longer than one cycle"); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [2:0] r;
    static int typical [8] = '{407, 425, 445, 467, 491, 517, 547, 580};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int mv = 300; mv <= 700; mv++) begin
      convert(mv, r);
      if (mv < 385) expected = 0;
      else if (mv >= 560) expected = 7;
      else expected = (mv - 385) / 25;
      seen[expected]++;
      checks++;
      if (int'(r) != expected) begin failures++; $display("%0d mV -> %b, expected %0d", mv, r, expected); end
    end
    for (int s = 0; s < 8; s++) begin
      convert(typical[s], r);
      checks++;
      if (int'(r) != s) begin failures++; $display("typical %0d mV -> %b, expected %0d", typical[s], r, s); end
    end
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("code %0d never produced", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
