// memristor_hsm_top: two hardware security modules that derive a shared AES-128
// key from the I-V curve of their own memristor.
//
// Device A (encrypting side) and device B (decrypting side) each hold the same
// chain: the memristor's voltage at node X, as its input current is swept, is
// digitized by a 3-bit time-based ADC (t_adc) at 43 points; the key generator
// shifts the 43 3-bit codes serially into a 128-bit SIPO register, and the
// register's parallel output is the AES key. Device A encrypts plaintext blocks
// with it (aes_encrypt), device B decrypts ciphertext blocks with its own key
// (aes_decrypt). The two keys agree only when both curves digitize to the same
// codes; the pairing is done outside this logic by tuning device B's sweep
// current until its decryption of a known message succeeds.
//
// The memristor and its current source are analog and lie outside: for each
// side, <x>_sweep_point (with <x>_sweep_req during a conversion) tells the
// sweep which of the 43 points is being digitized and <x>_vx_mv returns the
// node-X voltage in millivolts. The point index moves on as soon as a code is
// captured, giving the sweep three cycles to settle before the next conversion,
// and <x>_sweep_req marks the cycles in which the voltage must hold still.
//
// Handshakes: a one-cycle <x>_keygen_start begins a new key; <x>_key_ready
// rises about 214 cycles later. A block is accepted when valid and ready are
// both high in one cycle; ready needs a finished key and an idle cipher core.
// The result appears with a one-cycle valid pulse, 10 cycles after acceptance
// for encryption and 20 for decryption. The clock period must exceed the
// ADC's analog conversion time (about 2.4 ns with the default model delays).
// The block structure follows the document's two-device diagram; the port
// protocol is this design's own.
`timescale 1ns / 1ps
module memristor_hsm_top
  import aes_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128,
  parameter int unsigned ADC_BITS = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  // device A: key generation
  input  logic       a_keygen_start,
  output logic [5:0] a_sweep_point,
  output logic       a_sweep_req,
  input  logic [9:0] a_vx_mv,
  output logic       a_key_ready,
  // device A: encryption
  input  logic       a_pt_valid,
  output logic       a_pt_ready,
  input  block_t     a_pt,
  output logic       a_ct_valid,
  output block_t     a_ct,
  // device B: key generation
  input  logic       b_keygen_start,
  output logic [5:0] b_sweep_point,
  output logic       b_sweep_req,
  input  logic [9:0] b_vx_mv,
  output logic       b_key_ready,
  // device B: decryption
  input  logic       b_ct_valid,
  output logic       b_ct_ready,
  input  block_t     b_ct,
  output logic       b_pt_valid,
  output block_t     b_pt
);

  // ---------------- device A ----------------
  logic                a_conv, a_code_valid, a_busy;
  logic [ADC_BITS-1:0] a_code;
  block_t              a_key;

  t_adc #(.N_BITS(ADC_BITS)) u_a_adc (
    .clk       (clk),
    .rst_n     (rst_n),
    .conv      (a_conv),
    .vx_mv     (a_vx_mv),
    .code      (a_code),
    .code_valid(a_code_valid)
  );

  key_generator #(.KEY_BITS(KEY_BITS), .ADC_BITS(ADC_BITS)) u_a_keygen (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (a_keygen_start),
    .conv      (a_conv),
    .point     (a_sweep_point),
    .sampling  (a_sweep_req),
    .code      (a_code),
    .code_valid(a_code_valid),
    .key       (a_key),
    .key_ready (a_key_ready)
  );

  assign a_pt_ready  = a_key_ready & ~a_busy;

  aes_encrypt u_a_enc (
    .clk  (clk),
    .rst_n(rst_n),
    .start(a_pt_valid & a_pt_ready),
    .key  (a_key),
    .din  (a_pt),
    .busy (a_busy),
    .done (a_ct_valid),
    .dout (a_ct)
  );

  // ---------------- device B ----------------
  logic                b_conv, b_code_valid, b_busy;
  logic [ADC_BITS-1:0] b_code;
  block_t              b_key;

  t_adc #(.N_BITS(ADC_BITS)) u_b_adc (
    .clk       (clk),
    .rst_n     (rst_n),
    .conv      (b_conv),
    .vx_mv     (b_vx_mv),
    .code      (b_code),
    .code_valid(b_code_valid)
  );

  key_generator #(.KEY_BITS(KEY_BITS), .ADC_BITS(ADC_BITS)) u_b_keygen (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (b_keygen_start),
    .conv      (b_conv),
    .point     (b_sweep_point),
    .sampling  (b_sweep_req),
    .code      (b_code),
    .code_valid(b_code_valid),
    .key       (b_key),
    .key_ready (b_key_ready)
  );

  assign b_ct_ready  = b_key_ready & ~b_busy;

  aes_decrypt u_b_dec (
    .clk  (clk),
    .rst_n(rst_n),
    .start(b_ct_valid & b_ct_ready),
    .key  (b_key),
    .din  (b_ct),
    .busy (b_busy),
    .done (b_pt_valid),
    .dout (b_pt)
  );

  // the sweep must hold the node voltage while a conversion is in progress
  a_a_vx_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                  a_sweep_req && $past(a_sweep_req) |-> $stable(a_vx_mv))
    else $error("device A: node-X voltage changed during a conversion");
  a_b_vx_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                  b_sweep_req && $past(b_sweep_req) |-> $stable(b_vx_mv))
    else $error("device B: node-X voltage changed during a conversion");

endmodule
