// aes_dec_round: one AES decryption round, combinational.
//
// Follows the straightforward inverse cipher: InvShiftRows, InvSubBytes,
// AddRoundKey, then InvMixColumns. With final_round set, InvMixColumns is left
// out; that is the last round, whose key is the cipher key itself (Key0).
// The iterative decryptor reuses this one circuit for all ten rounds.
`timescale 1ns / 1ps
module aes_dec_round
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  input  logic   final_round,
  output block_t state_out
);

  block_t keyed;

  always_comb begin
    keyed     = inv_sub_bytes(inv_shift_rows(state_in)) ^ round_key;
    state_out = final_round ? keyed : inv_mix_columns(keyed);
  end

endmodule
