// key_generator: builds the 128-bit AES key from the digitized memristor curve.
//
// After a start pulse the controller walks through
// N_POINTS = ceil(KEY_BITS / ADC_BITS) = 43 points of the current sweep. For
// each point it shows the point index on `point`, requests one T-ADC conversion
// with a one-cycle conv pulse, waits for code_valid and then shifts the 3-bit
// code into the SIPO register serially, most significant bit first, one bit per
// clock. Shifting stops after exactly KEY_BITS bits, so only the two upper bits
// of the 43rd code are used; key_ready then rises and stays high until the next
// start. The first bit captured ends in key[127], so reading the key from bit 127
// down gives the codes in sweep order.
//
// Timing per point: 1 conv cycle, 1 cycle until code_valid, then ADC_BITS shift
// cycles (5 cycles), so a key takes 43*5 - 1 = 214 cycles after start with an
// ADC answering in one cycle. `point` names the sweep point whose voltage the
// ADC needs: it moves on to the next point as soon as a code is captured, so the
// sweep source has the ADC_BITS shift cycles to settle the voltage before the
// next conv pulse, and it is back at 0 while idle. `sampling` is high from the
// conv pulse until the code has been captured; the voltage must not change then.
// The 43 points, the 3-bit codes and the 128-bit serial-in register follow the
// document; the sequencing, the MSB-first order and the handshake are this
// design's choices.
`timescale 1ns / 1ps
module key_generator #(
  parameter int unsigned KEY_BITS = 128,
  parameter int unsigned ADC_BITS = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                conv,
  output logic [5:0]          point,
  output logic                sampling,
  input  logic [ADC_BITS-1:0] code,
  input  logic                code_valid,
  output logic [KEY_BITS-1:0] key,
  output logic                key_ready
);

  localparam int unsigned N_POINTS = (KEY_BITS + ADC_BITS - 1) / ADC_BITS;

  typedef enum logic [1:0] {IDLE, CONVERT, WAIT_CODE, SHIFT} state_e;

  state_e                        state_q;
  logic [ADC_BITS-1:0]           code_q;
  logic [$clog2(ADC_BITS+1)-1:0] bit_q;
  logic [$clog2(KEY_BITS+1)-1:0] nbits_q;
  logic                          clear_n, shift_en;

  // The SIPO register is cleared by reset only: a new key overwrites all
  // KEY_BITS flip-flops before key_ready rises again.
  assign clear_n  = rst_n;
  assign shift_en = (state_q == SHIFT);
  assign sampling = (state_q == CONVERT) || (state_q == WAIT_CODE);

  sipo_shift_register #(.WIDTH(KEY_BITS)) u_sipo (
    .clk     (clk),
    .clear_n (clear_n),
    .shift_en(shift_en),
    .din     (code_q[ADC_BITS-1]),
    .q       (key)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= IDLE;
      code_q    <= '0;
      bit_q     <= '0;
      nbits_q   <= '0;
      point     <= '0;
      conv      <= 1'b0;
      key_ready <= 1'b0;
    end else begin
      conv <= 1'b0;
      unique case (state_q)
        IDLE: if (start) begin
          key_ready <= 1'b0;
          nbits_q   <= '0;
          conv      <= 1'b1;
          state_q   <= CONVERT;
        end
        CONVERT: state_q <= WAIT_CODE;   // conv pulse is on the wire this cycle
        WAIT_CODE: if (code_valid) begin
          code_q  <= code;
          bit_q   <= '0;
          state_q <= SHIFT;
          // move the sweep on now, so the voltage settles during the shifts
          if (point != 6'(N_POINTS - 1)) point <= point + 6'd1;
        end
        SHIFT: begin
          code_q  <= {code_q[ADC_BITS-2:0], 1'b0};
          bit_q   <= bit_q + 1'b1;
          nbits_q <= nbits_q + 1'b1;
          if (nbits_q == ($bits(nbits_q))'(KEY_BITS - 1)) begin
            key_ready <= 1'b1;
            point     <= '0;
            state_q   <= IDLE;
          end else if (bit_q == ($bits(bit_q))'(ADC_BITS - 1)) begin
            conv    <= 1'b1;
            state_q <= CONVERT;
          end
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  a_point_range: assert property (@(posedge clk) disable iff (!rst_n) point < 6'(N_POINTS))
    else $error("key_generator: point index beyond the sweep");

endmodule
