// aes_encrypt: iterative AES-128 encryptor, one round per clock.
//
// On a start pulse (accepted while not busy) the block is XORed with the cipher
// key (initial AddRoundKey with Key0) and the key is captured. Each following
// clock applies one round through a single aes_enc_round instance while
// aes_key_schedule derives the next round key on the fly: rounds 1..9 are
// standard rounds, round 10 is the final round without MixColumns.
//
// Timing: start is sampled on edge 0; done is a one-cycle pulse after edge
// N_ROUNDS (10 cycles later) and dout holds the ciphertext until the next start.
// Blocks and keys are FIPS-197 byte strings (first byte in bits 127:120).
// The round structure and the ten rounds follow AES-128; the one-round-per-clock
// architecture and the start/busy/done handshake are this design's choices.
`timescale 1ns / 1ps
module aes_encrypt
  import aes_pkg::*;
#(
  parameter int unsigned N_ROUNDS = NR
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t key,
  input  block_t din,
  output logic   busy,
  output logic   done,
  output block_t dout
);

  block_t     state_q, rkey_q, rkey_next, round_out, unused_bwd;
  logic [3:0] round_q;

  aes_key_schedule u_ks (
    .round_idx  (round_q),
    .key_in_fwd (rkey_q),
    .key_out_fwd(rkey_next),
    .key_in_bwd ('0),
    .key_out_bwd(unused_bwd)
  );

  aes_enc_round u_round (
    .state_in   (state_q),
    .round_key  (rkey_next),
    .final_round(round_q == 4'(N_ROUNDS)),
    .state_out  (round_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      rkey_q  <= '0;
      round_q <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state_q <= din ^ key;
          rkey_q  <= key;
          round_q <= 4'd1;
          busy    <= 1'b1;
        end
      end else begin
        state_q <= round_out;
        rkey_q  <= rkey_next;
        round_q <= round_q + 4'd1;
        if (round_q == 4'(N_ROUNDS)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign dout = state_q;

endmodule
