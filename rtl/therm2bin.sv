// therm2bin: thermometer-to-binary encoder of the time-based ADC.
//
// The Vernier TDC delivers 2^N_BITS - 1 flip-flop outputs q1..q7 that form a
// thermometer code (all ones below the point where Start and Stop aligned).
// The binary result is the number of ones, which equals the position of the
// top 1 for a clean code and moves by at most one step if a single bubble
// appears. Combinational. The document names this encoder but not its circuit;
// the ones counter is this design's choice.
`timescale 1ns / 1ps
module therm2bin #(
  parameter int unsigned N_BITS = 3
) (
  input  logic [(2**N_BITS)-2:0] therm,
  output logic [N_BITS-1:0]      bin
);

  always_comb begin
    bin = '0;
    for (int i = 0; i < (2**N_BITS) - 1; i++) bin = bin + N_BITS'(therm[i]);
  end

endmodule
