// aes_pkg: shared types and byte-level transformations of AES-128.
//
// The 128-bit block and the round keys are FIPS-197 byte strings: byte 0 sits in
// bits 127:120, and byte 4*c + r is row r of column c of the 4x4 state. The
// S-box and its inverse are not typed in as tables: they are computed at
// elaboration time from their definition (multiplicative inverse in GF(2^8)
// modulo x^8+x^4+x^3+x+1, followed by the affine map with constant 0x63), using
// exponent/logarithm tables over the generator 0x03. A lookup then is a constant
// ROM index. The round functions below are pure combinational functions used by
// the round and key-schedule modules.
`timescale 1ns / 1ps
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;

  localparam int unsigned NR = 10;  // rounds of AES-128

  // multiply by x in GF(2^8)
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  function automatic byte_t rotl8(input byte_t a, input int n);
    return byte_t'((a << n) | (a >> (8 - n)));
  endfunction

  // Forward S-box, entry i in bits 8*i+7 : 8*i.
  function automatic logic [2047:0] make_sbox();
    logic [2047:0] t;
    byte_t exp_t [256];
    byte_t log_t [256];
    byte_t p;
    byte_t inv;
    p = 8'h01;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = p;
      log_t[p] = byte_t'(i);
      p = p ^ xtime(p);             // p * 0x03
    end
    exp_t[255] = 8'h01;
    log_t[0]   = 8'h00;
    for (int i = 0; i < 256; i++) begin
      if (i == 0) inv = 8'h00;
      else        inv = exp_t[(255 - int'(log_t[i])) % 255];
      t[8*i +: 8] = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
    end
    return t;
  endfunction

  function automatic logic [2047:0] make_inv_sbox(input logic [2047:0] s);
    logic [2047:0] t;
    for (int i = 0; i < 256; i++) t[8*int'(s[8*i +: 8]) +: 8] = byte_t'(i);
    return t;
  endfunction

  localparam logic [2047:0] SBOX     = make_sbox();
  localparam logic [2047:0] INV_SBOX = make_inv_sbox(SBOX);

  function automatic byte_t sbox(input byte_t a);
    return SBOX[{a, 3'b000} +: 8];
  endfunction

  function automatic byte_t inv_sbox(input byte_t a);
    return INV_SBOX[{a, 3'b000} +: 8];
  endfunction

  // byte n of a block (n = 4*column + row)
  function automatic byte_t get_byte(input block_t s, input int n);
    return s[127 - 8*n -: 8];
  endfunction

  function automatic block_t sub_bytes(input block_t s);
    block_t o;
    for (int n = 0; n < 16; n++) o[127 - 8*n -: 8] = sbox(get_byte(s, n));
    return o;
  endfunction

  function automatic block_t inv_sub_bytes(input block_t s);
    block_t o;
    for (int n = 0; n < 16; n++) o[127 - 8*n -: 8] = inv_sbox(get_byte(s, n));
    return o;
  endfunction

  // row r is rotated left by r columns
  function automatic block_t shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = get_byte(s, 4*((c + r) % 4) + r);
    return o;
  endfunction

  function automatic block_t inv_shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*((c + r) % 4) + r) -: 8] = get_byte(s, 4*c + r);
    return o;
  endfunction

  function automatic block_t mix_columns(input block_t s);
    block_t o;
    byte_t a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);     a1 = get_byte(s, 4*c + 1);
      a2 = get_byte(s, 4*c + 2); a3 = get_byte(s, 4*c + 3);
      o[127 - 8*(4*c)     -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      o[127 - 8*(4*c + 1) -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      o[127 - 8*(4*c + 2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      o[127 - 8*(4*c + 3) -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

  function automatic block_t inv_mix_columns(input block_t s);
    block_t o;
    byte_t a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);     a1 = get_byte(s, 4*c + 1);
      a2 = get_byte(s, 4*c + 2); a3 = get_byte(s, 4*c + 3);
      o[127 - 8*(4*c)     -: 8] = gf_mul(a0, 8'h0e) ^ gf_mul(a1, 8'h0b) ^ gf_mul(a2, 8'h0d) ^ gf_mul(a3, 8'h09);
      o[127 - 8*(4*c + 1) -: 8] = gf_mul(a0, 8'h09) ^ gf_mul(a1, 8'h0e) ^ gf_mul(a2, 8'h0b) ^ gf_mul(a3, 8'h0d);
      o[127 - 8*(4*c + 2) -: 8] = gf_mul(a0, 8'h0d) ^ gf_mul(a1, 8'h09) ^ gf_mul(a2, 8'h0e) ^ gf_mul(a3, 8'h0b);
      o[127 - 8*(4*c + 3) -: 8] = gf_mul(a0, 8'h0b) ^ gf_mul(a1, 8'h0d) ^ gf_mul(a2, 8'h09) ^ gf_mul(a3, 8'h0e);
    end
    return o;
  endfunction

  // Rcon of round r (1..10): x^(r-1) in GF(2^8)
  function automatic byte_t rcon(input logic [3:0] r);
    byte_t v = 8'h01;
    for (int i = 1; i < 10; i++) if (i < int'(r)) v = xtime(v);
    return v;
  endfunction

  // SubWord(RotWord(w)) ^ {Rcon, 0, 0, 0}
  function automatic word_t key_core(input word_t w, input logic [3:0] r);
    word_t rw = {w[23:0], w[31:24]};
    return {sbox(rw[31:24]) ^ rcon(r), sbox(rw[23:16]), sbox(rw[15:8]), sbox(rw[7:0])};
  endfunction

endpackage
