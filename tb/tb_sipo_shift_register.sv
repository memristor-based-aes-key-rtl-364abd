// tb_sipo_shift_register: shifts 300 random bits through the 128-bit register,
// with shift_en randomly dropped, and compares all 128 outputs after every clock
// with a reference model kept as a queue of the bits shifted in (newest at Q1).
// Also checks that the asynchronous clear empties the register at once,
// without a clock edge.
`timescale 1ns / 1ps
module tb_sipo_shift_register;
  localparam int W = 128;
  logic         clk = 1'b0, clear_n = 1'b0, shift_en = 1'b0, din = 1'b0;
  logic [W-1:0] q, model;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  sipo_shift_register dut (.clk(clk), .clear_n(clear_n), .shift_en(shift_en), .din(din), .q(q));
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    model = '0;
    #12;
    checks++;
    if (q !== '0) begin failures++; $display("clear did not empty the register"); end
    clear_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      din      = 1'($urandom);
      shift_en = ($urandom % 4) != 0;
      @(posedge clk);
      if (shift_en) for (int i = W - 1; i > 0; i--) model[i] = model[i-1];
      if (shift_en) model[0] = din;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("step %0d: q=%h model=%h", n, q, model); end
    end
    // a 128-bit word in MSB-first order ends up as the parallel output
    for (int n = 0; n < W; n++) begin
      @(negedge clk);
      din = 1'(n % 5 == 0); shift_en = 1'b1;
    end
    @(negedge clk);
    shift_en = 1'b0;
    for (int n = 0; n < W; n++) begin
      checks++;
      if (q[W-1-n] !== 1'(n % 5 == 0)) begin failures++; $display("bit %0d of the word misplaced", n); end
    end
    #2;
    clear_n = 1'b0;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("asynchronous clear failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
