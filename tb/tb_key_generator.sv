// tb_key_generator: drives the key generator with a stand-in for the T-ADC that
// answers each conv pulse one cycle later with the code stored for the current
// sweep point (and checks that sampling is high then). Run 1 uses the 43 codes of the memristor example curve and checks
// the resulting key against FFFFFEB648DB6922400000000DDFFA29. Runs 2-4 use
// random codes and compare with the expected MSB-first concatenation built in the
// testbench. Every run checks 43 conversions, the point order, and the
// 214-cycle latency from start to key_ready.
`timescale 1ns / 1ps
module tb_key_generator;
  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic         conv, sampling, code_valid = 1'b0, key_ready;
  logic [5:0]   point;
  logic [2:0]   code = '0;
  logic [127:0] key, expected;
  logic [2:0]   codes [43];
  int checks = 0, failures = 0;
  int nconv, cycles;
  logic [128:0] bits;
  static logic [2:0] example [43] = '{7,7,7,7,7,7,7,6,5,5,4,4,4,3,3,3,3,2,2,2,1,1,
                                      0,0,0,0,0,0,0,0,0,0,0,3,3,5,7,7,7,2,1,2,2};
  always #5 clk = ~clk;
  key_generator dut (.clk(clk), .rst_n(rst_n), .start(start), .conv(conv), .point(point), .sampling(sampling),
                     .code(code), .code_valid(code_valid), .key(key), .key_ready(key_ready));
  // stand-in ADC: one cycle of conversion
  always @(posedge clk) begin
    code_valid <= conv;
    if (conv) begin
      code  <= codes[point];
      nconv <= nconv + 1;
      if (int'(point) != nconv) begin failures++; $display("point %0d out of order", point); end
      if (!sampling) begin failures++; $display("sampling low during conv"); end
    end
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 4; run++) begin
      for (int p = 0; p < 43; p++) codes[p] = (run == 0) ? example[p] : 3'($urandom);
      for (int p = 0; p < 43; p++) bits[128 - 3*p -: 3] = codes[p];
      expected = (run == 0) ? 128'hFFFFFEB648DB6922400000000DDFFA29 : bits[128:1];
      @(negedge clk);
      nconv = 0;
      start = 1'b1;
      @(posedge clk);
      start <= 1'b0;
      cycles = 0;
      do begin @(posedge clk); cycles++; #1; end while (!key_ready);
      checks++;
      if (key !== expected) begin failures++; $display("run %0d key %h expected %h", run, key, expected); end
      checks++;
      if (cycles != 214) begin failures++; $display("run %0d latency %0d cycles, expected 214", run, cycles); end
      checks++;
      if (nconv != 43) begin failures++; $display("run %0d: %0d conversions, expected 43", run, nconv); end
      repeat (3) @(posedge clk);
      checks++;
      if (!key_ready || key !== expected) begin failures++; $display("key not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
