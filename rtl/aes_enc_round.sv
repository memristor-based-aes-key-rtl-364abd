// aes_enc_round: one AES encryption round, combinational.
//
// state_out = AddRoundKey(MixColumns(ShiftRows(SubBytes(state_in))), round_key),
// the order of the standard round. With final_round set, MixColumns is left out,
// which is the last of the ten AES-128 rounds. The iterative encryptor reuses
// this one circuit for all ten rounds.
`timescale 1ns / 1ps
module aes_enc_round
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  input  logic   final_round,
  output block_t state_out
);

  block_t shifted;

  always_comb begin
    shifted   = shift_rows(sub_bytes(state_in));
    state_out = (final_round ? shifted : mix_columns(shifted)) ^ round_key;
  end

endmodule
