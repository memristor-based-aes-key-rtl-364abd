// tb_vtc: measures, for a set of node-X voltages, the time from the Vclk falling
// edge to the rising edge of start and compares it with the model's transfer law
// delay = 2000 ps - 2 ps/mV * (V - 385 mV), clamped at 0; also checks that start
// falls 2000 ps after Vclk rises and that a higher voltage gives a shorter delay.
`timescale 1ns / 1ps
module tb_vtc;
  logic       vclk = 1'b1;
  logic [9:0] vx_mv;
  logic       start;
  int checks = 0, failures = 0;
  realtime t_edge, t_start, d_ps, prev_ps;
  int exp_ps;
  vtc dut (.vclk(vclk), .vx_mv(vx_mv), .start(start));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    static int volts [10] = '{300, 385, 407, 425, 445, 467, 491, 547, 585, 1023};
    prev_ps = 1.0e9;
    #20;
    for (int i = 0; i < 10; i++) begin
      vx_mv = 10'(volts[i]);
      #5;
      vclk = 1'b0;
      t_edge = $realtime;
      @(posedge start);
      t_start = $realtime;
      d_ps = (t_start - t_edge) * 1000.0;
      exp_ps = 2000 - 2 * (volts[i] - 385);
      if (exp_ps < 0) exp_ps = 0;
      checks++;
      if (d_ps < real'(exp_ps) - 0.5 || d_ps > real'(exp_ps) + 0.5) begin
        failures++; $display("V=%0d mV: delay %0.1f ps, expected %0d ps", volts[i], d_ps, exp_ps);
      end
      checks++;
      if (d_ps > prev_ps) begin failures++; $display("delay grew with voltage at %0d mV", volts[i]); end
      prev_ps = d_ps;
      #5;
      vclk = 1'b1;
      t_edge = $realtime;
      @(negedge start);
      checks++;
      d_ps = ($realtime - t_edge) * 1000.0;
      if (d_ps < 1999.5 || d_ps > 2000.5) begin failures++; $display("start fall delay %0.1f ps", d_ps); end
      #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
