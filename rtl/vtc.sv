// vtc: behavioural model of the voltage-to-time converter (current-starved
// inverter) at the front of the time-based ADC. Not synthesizable logic: it
// models an analog circuit with transport delays.
//
// In the circuit, the node-X voltage (memristor voltage) biases the transistor
// that sinks the discharge current of an inverter clocked by Vclk, so the
// voltage sets how late the inverter output switches after the Vclk falling
// edge. The model: start = ~vclk, where the rising edge of start (Vclk falling)
// comes T_BASE_PS - GAIN_PS_PER_MV * (vx_mv - V_MIN_MV) picoseconds late
// (clamped at zero), i.e. a higher voltage gives a shorter delay, and the falling
// edge of start (Vclk rising) comes T_BASE_PS late. The voltage is taken as an
// unsigned integer in millivolts and is sampled at the Vclk falling edge.
// The inverting, voltage-controlled delay follows the document; the linear law
// and all numbers except V_MIN_MV (the bottom of the ADC range) are this model's
// own choices.
`timescale 1ns / 1ps
module vtc #(
  parameter int V_MIN_MV       = 385,
  parameter int GAIN_PS_PER_MV = 2,
  parameter int T_BASE_PS      = 2000
) (
  input  logic       vclk,
  input  logic [9:0] vx_mv,
  output logic       start
);

  int delay_ps;

  always_comb begin
    delay_ps = T_BASE_PS - GAIN_PS_PER_MV * (int'(vx_mv) - V_MIN_MV);
    if (delay_ps < 0) delay_ps = 0;
  end

  initial start = 1'b0;

  always @(negedge vclk) start <= #(delay_ps * 1ps) 1'b1;
  always @(posedge vclk) start <= #(T_BASE_PS * 1ps) 1'b0;

endmodule
