// sipo_shift_register: serial-in, parallel-out shift register of the key
// generator (WIDTH = 128 flip-flops FF1..FF128).
//
// The serial input feeds D1 of FF1 and every other flip-flop takes the output
// of the one before it, so on each enabled clock the stored bits move one place
// from FF1 towards FF128 (the "right shift" of the key generator). The parallel
// output q[i] is Q(i+1): q[0] = Q1 holds the newest bit and, after WIDTH shifts,
// q[WIDTH-1] = Q128 holds the first bit shifted in. clear_n is the common
// asynchronous clear of all flip-flops (active low).
// The chain, the width and the common clear follow the document; the shift
// enable, which holds the contents between ADC conversions, and the clear
// polarity are this design's choices.
`timescale 1ns / 1ps
module sipo_shift_register #(
  parameter int unsigned WIDTH = 128
) (
  input  logic             clk,
  input  logic             clear_n,
  input  logic             shift_en,
  input  logic             din,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge clear_n) begin
    if (!clear_n)      q <= '0;
    else if (shift_en) q <= {q[WIDTH-2:0], din};
  end

endmodule
