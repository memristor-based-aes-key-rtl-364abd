// t_adc: 3-bit time-based ADC that digitizes the memristor voltage at node X.
// Behavioural model overall, because its voltage-to-time converter and delay
// lines are analog; the encoder and the output register are ordinary logic.
//
// Chain: vtc (voltage -> delay of the Start edge) -> vernier_tdc (Start against
// the reference Stop -> 7-bit thermometer code) -> therm2bin (-> 3-bit code).
// With the default delays one code step is 25 mV and code k is produced for
// V_MIN_MV + 25*k <= vx_mv < V_MIN_MV + 25*(k+1), saturating at 000 below
// 385 mV and at 111 from 560 mV up, as in the ADC's 385-585 mV range.
//
// Handshake (clk domain): a one-cycle conv pulse makes Vclk (= ~conv) fall,
// which launches one conversion; the Stop reference is Vclk's falling edge
// delayed by T_REF_PS. The result is registered on the clock edge that ends the
// conv cycle: code is valid and code_valid pulses for one cycle right after it.
// The whole analog conversion (about T_REF_PS + N_STAGES*T2_PS = 2.4 ns with the
// defaults) must fit in one clock period, and conv must return low between
// conversions so that Vclk has a new falling edge; an assertion checks the latter.
// vx_mv must be stable while conv is high. The two-stage VTC/TDC structure,
// the thermometer encoder, the 3-bit width and the voltage range follow the
// document; the delay values, the clocked handshake and the output register
// are this design's choices.
`timescale 1ns / 1ps
module t_adc #(
  parameter int N_BITS         = 3,
  parameter int V_MIN_MV       = 385,
  parameter int LSB_MV         = 25,
  parameter int GAIN_PS_PER_MV = 2,
  parameter int T_BASE_PS      = 2000,
  parameter int T2_PS          = 50,
  // derived: Start chain cell is slower by one LSB worth of VTC delay
  parameter int T1_PS          = T2_PS + GAIN_PS_PER_MV * LSB_MV,
  // Stop lags the zero-voltage Start edge by less than one millivolt of delay
  parameter int T_REF_PS       = T_BASE_PS + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              conv,
  input  logic [9:0]        vx_mv,
  output logic [N_BITS-1:0] code,
  output logic              code_valid
);

  localparam int N_STAGES = (2**N_BITS) - 1;

  logic                vclk, start, stop;
  logic [N_STAGES-1:0] therm;
  logic [N_BITS-1:0]   bin;

  assign vclk = ~conv;
  // reference Stop edge: Vclk falling edge, inverted and delayed by T_REF_PS
  initial stop = 1'b0;
  always @(vclk) stop <= #(T_REF_PS * 1ps) ~vclk;

  vtc #(
    .V_MIN_MV      (V_MIN_MV),
    .GAIN_PS_PER_MV(GAIN_PS_PER_MV),
    .T_BASE_PS     (T_BASE_PS)
  ) u_vtc (
    .vclk (vclk),
    .vx_mv(vx_mv),
    .start(start)
  );

  vernier_tdc #(
    .N_STAGES(N_STAGES),
    .T1_PS   (T1_PS),
    .T2_PS   (T2_PS)
  ) u_tdc (
    .start(start),
    .stop (stop),
    .therm(therm)
  );

  therm2bin #(.N_BITS(N_BITS)) u_enc (
    .therm(therm),
    .bin  (bin)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code       <= '0;
      code_valid <= 1'b0;
    end else begin
      code_valid <= conv;
      if (conv) code <= bin;
    end
  end

  // every conversion needs a fresh Vclk falling edge
  a_conv_gap: assert property (@(posedge clk) disable iff (!rst_n) conv |=> !conv)
    else $error("t_adc: conv held high for two cycles");

endmodule
