// aes_decrypt: iterative AES-128 decryptor, one step per clock.
//
// The decryptor receives the cipher key (Key0) but needs the round keys in
// reverse order. After a start pulse it first runs the key schedule forward for
// N_ROUNDS clocks to reach Key10; on the last of these clocks it also applies
// the initial AddRoundKey with Key10 to the captured ciphertext. It then runs
// N_ROUNDS inverse rounds (InvShiftRows, InvSubBytes, AddRoundKey,
// InvMixColumns; the last without InvMixColumns), deriving Key9..Key0 with the
// backward key-schedule step, so no round key is stored.
//
// Timing: start is sampled on edge 0; done is a one-cycle pulse after edge
// 2*N_ROUNDS (20 cycles later); dout holds the plaintext until the next start.
// The inverse cipher follows AES; the architecture and handshake are this
// design's choices.
`timescale 1ns / 1ps
module aes_decrypt
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

  typedef enum logic [1:0] {IDLE, EXPAND, ROUNDS} phase_e;

  phase_e     phase_q;
  block_t     state_q, rkey_q, rkey_fwd, rkey_bwd, round_out;
  logic [3:0] round_q;

  aes_key_schedule u_ks (
    .round_idx  (round_q),
    .key_in_fwd (rkey_q),
    .key_out_fwd(rkey_fwd),
    .key_in_bwd (rkey_q),
    .key_out_bwd(rkey_bwd)
  );

  aes_dec_round u_round (
    .state_in   (state_q),
    .round_key  (rkey_bwd),
    .final_round(round_q == 4'd1),
    .state_out  (round_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= IDLE;
      state_q <= '0;
      rkey_q  <= '0;
      round_q <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase_q)
        IDLE: if (start) begin
          state_q <= din;
          rkey_q  <= key;
          round_q <= 4'd1;
          phase_q <= EXPAND;
        end
        EXPAND: begin
          rkey_q <= rkey_fwd;
          if (round_q == 4'(N_ROUNDS)) begin
            state_q <= state_q ^ rkey_fwd;   // AddRoundKey with Key10
            phase_q <= ROUNDS;               // round_q stays at 10
          end else begin
            round_q <= round_q + 4'd1;
          end
        end
        ROUNDS: begin
          state_q <= round_out;
          rkey_q  <= rkey_bwd;
          round_q <= round_q - 4'd1;
          if (round_q == 4'd1) begin
            phase_q <= IDLE;
            done    <= 1'b1;
          end
        end
        default: phase_q <= IDLE;
      endcase
    end
  end

  assign busy = (phase_q != IDLE);
  assign dout = state_q;

endmodule
