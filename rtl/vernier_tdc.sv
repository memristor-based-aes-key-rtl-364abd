// vernier_tdc: behavioural model of the Vernier delay-line time-to-digital
// converter. The delay cells are analog and modelled with transport delays; the
// sampling flip-flops are ordinary edge-triggered flip-flops.
//
// Start (from the VTC) runs down a chain of delay cells of T1_PS each, giving
// taps D1..Dn; the reference Stop runs down a parallel chain of faster cells of
// T2_PS, giving taps d1..dn. Flip-flop i takes D_i as data and d_i as clock, so
// q_i = 1 when Start is still ahead of Stop after i stages, i.e. when the
// Start-to-Stop lead exceeds i * (T1_PS - T2_PS). The outputs form a
// thermometer code with N_STAGES = 2^n - 1 flip-flops for an n-bit result;
// therm[i-1] is q_i. The structure and the 2^n - 1 count follow the document;
// the delay values are this model's choice, with T1_PS - T2_PS as the LSB.
// Each conversion is a rising edge on start and on stop; the falling edges that
// return both to 0 do not clock the flip-flops.
`timescale 1ns / 1ps
module vernier_tdc #(
  parameter int N_STAGES = 7,
  parameter int T1_PS    = 100,
  parameter int T2_PS    = 50
) (
  input  logic                start,
  input  logic                stop,
  output logic [N_STAGES-1:0] therm
);

  logic d_start [N_STAGES+1];   // D0 = start, D1..Dn taps
  logic d_stop  [N_STAGES+1];   // d0 = stop,  d1..dn taps

  assign d_start[0] = start;
  assign d_stop[0]  = stop;

  for (genvar i = 0; i < N_STAGES; i++) begin : g_stage
    // transport delays: every edge is passed on, T1 or T2 later
    always @(d_start[i]) d_start[i+1] <= #(T1_PS * 1ps) d_start[i];
    always @(d_stop[i])  d_stop[i+1]  <= #(T2_PS * 1ps) d_stop[i];
    // sense flip-flop q(i+1): which of the two edges reached stage i+1 first
    logic q;
    always_ff @(posedge d_stop[i+1]) q <= d_start[i+1];
    assign therm[i] = q;
  end

endmodule
