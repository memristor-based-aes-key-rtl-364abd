// aes_key_schedule: one step of the AES-128 key expansion, in both directions.
//
// The forward path turns round key r-1 into round key r (FIPS-197 expansion:
// w0' = w0 ^ SubWord(RotWord(w3)) ^ Rcon[r], then each further word is the XOR
// of its predecessor and the word four places back). The backward path undoes
// the same step, turning round key r into round key r-1, so a decryptor can walk
// the keys from Key10 down to Key0 without storing them. Both paths use the same
// round index r (1..10), which selects Rcon. Purely combinational.
// The design derives every round key on the fly; this stepping scheme is its own
// choice, the key expansion itself is the AES standard.
`timescale 1ns / 1ps
module aes_key_schedule
  import aes_pkg::*;
(
  input  logic [3:0] round_idx,
  input  block_t     key_in_fwd,
  output block_t     key_out_fwd,
  input  block_t     key_in_bwd,
  output block_t     key_out_bwd
);

  word_t f0, f1, f2, f3;
  word_t b0, b1, b2, b3;

  always_comb begin
    // forward: Key r-1 -> Key r
    f0 = key_in_fwd[127:96] ^ key_core(key_in_fwd[31:0], round_idx);
    f1 = key_in_fwd[95:64]  ^ f0;
    f2 = key_in_fwd[63:32]  ^ f1;
    f3 = key_in_fwd[31:0]   ^ f2;
    key_out_fwd = {f0, f1, f2, f3};
    // backward: Key r -> Key r-1
    b3 = key_in_bwd[31:0]   ^ key_in_bwd[63:32];
    b2 = key_in_bwd[63:32]  ^ key_in_bwd[95:64];
    b1 = key_in_bwd[95:64]  ^ key_in_bwd[127:96];
    b0 = key_in_bwd[127:96] ^ key_core(b3, round_idx);
    key_out_bwd = {b0, b1, b2, b3};
  end

endmodule
