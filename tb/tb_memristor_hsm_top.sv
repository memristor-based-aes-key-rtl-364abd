// tb_memristor_hsm_top: end-to-end run of both devices at the default sizes.
//
// The memristor curves are supplied as node-X voltages per sweep point. Device
// A's curve digitizes to the 43 codes of the example curve, so its key must be
// FFFFFEB648DB6922400000000DDFFA29; the typical voltage of each ADC state (407,
// 425, 445, 467, 491, 517, 547, 580 mV) is used. Device A encrypts five 16-byte
// messages and the ciphertexts are checked against known-answer values.
// Device B first uses an untuned curve (every voltage 30 mV higher): its key
// differs and its decryption of the first ciphertext must not give the
// plaintext. The sweep is then "tuned" (voltages equal to A's up to a few mV
// inside the same ADC range: -1, 0 or +1 mV), B regenerates its key, and all five ciphertexts
// must decrypt to the messages.
// Mechanisms counted, each must occur at least once: key generation on each
// side, ADC codes at both ends of the range (000 and 111, incl. saturation),
// encryptions, decryptions, a block held back by ready (no key yet, or core
// busy), and a wrong-key decryption detected.
`timescale 1ns / 1ps
module tb_memristor_hsm_top;
  import aes_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       a_keygen_start = 1'b0, b_keygen_start = 1'b0;
  logic [5:0] a_sweep_point, b_sweep_point;
  logic       a_sweep_req, b_sweep_req, a_key_ready, b_key_ready;
  logic [9:0] a_vx_mv, b_vx_mv;
  logic       a_pt_valid = 1'b0, a_pt_ready, a_ct_valid;
  logic       b_ct_valid = 1'b0, b_ct_ready, b_pt_valid;
  block_t     a_pt = '0, a_ct, b_ct = '0, b_pt;

  static logic [2:0] curve [43] = '{7,7,7,7,7,7,7,6,5,5,4,4,4,3,3,3,3,2,2,2,1,1,
                                    0,0,0,0,0,0,0,0,0,0,0,3,3,5,7,7,7,2,1,2,2};
  static int typical [8] = '{407, 425, 445, 467, 491, 517, 547, 580};
  static block_t msg [5] = '{128'h546865207265736f6c7574696f6e206f, 128'h66207468697320414443203d3230306d,
                             128'h48616e616e2041626420456c48616d69, 128'h65642052616479436169726f20556e69,
                             128'h76657273697479206e616e6f2070726f};
  static block_t cip [5] = '{128'h5de1b88669ec12577cc67e3a7dde7f3e, 128'ha2e6441c8bb96714d9eb5843aac076ac,
                             128'h4cdf1fcd516770098cef181420e8e406, 128'h443952e9ee05fdf16a98ded51dd68f8d,
                             128'h41df4a44aef1b988276dcca4a9c22e05};

  int  checks = 0, failures = 0;
  int  n_keygen_a = 0, n_keygen_b = 0, n_code0 = 0, n_code7 = 0, n_enc = 0, n_dec = 0;
  int  n_held = 0, n_wrong_key = 0, n_no_key_accept = 0;
  int  b_offset_mv = 30;
  bit  b_tuned = 1'b0;
  block_t got_ct [5];

  always #5 clk = ~clk;

  // memristor curves as seen at node X
  assign a_vx_mv = 10'(typical[curve[a_sweep_point]]);
  assign b_vx_mv = b_tuned ? 10'(typical[curve[b_sweep_point]] + ((int'(b_sweep_point) % 3) - 1))
                           : 10'(typical[curve[b_sweep_point]] + b_offset_mv);

  memristor_hsm_top dut (
    .clk(clk), .rst_n(rst_n),
    .a_keygen_start(a_keygen_start), .a_sweep_point(a_sweep_point), .a_sweep_req(a_sweep_req),
    .a_vx_mv(a_vx_mv), .a_key_ready(a_key_ready),
    .a_pt_valid(a_pt_valid), .a_pt_ready(a_pt_ready), .a_pt(a_pt), .a_ct_valid(a_ct_valid), .a_ct(a_ct),
    .b_keygen_start(b_keygen_start), .b_sweep_point(b_sweep_point), .b_sweep_req(b_sweep_req),
    .b_vx_mv(b_vx_mv), .b_key_ready(b_key_ready),
    .b_ct_valid(b_ct_valid), .b_ct_ready(b_ct_ready), .b_ct(b_ct), .b_pt_valid(b_pt_valid), .b_pt(b_pt)
  );

  // ADC code statistics, taken inside device A and B
  always @(posedge clk) begin
    if (dut.a_code_valid || dut.b_code_valid) begin
      if (dut.a_code_valid && dut.a_code == 3'd0) n_code0++;
      if (dut.a_code_valid && dut.a_code == 3'd7) n_code7++;
      if (dut.b_code_valid && dut.b_code == 3'd0) n_code0++;
      if (dut.b_code_valid && dut.b_code == 3'd7) n_code7++;
    end
    if (a_pt_valid && !a_pt_ready) n_held++;
    if ((a_pt_valid && a_pt_ready && !a_key_ready) || (b_ct_valid && b_ct_ready && !b_key_ready))
      n_no_key_accept++;
    if (b_ct_valid && !b_ct_ready) n_held++;
  end

  task automatic encrypt_a(input block_t p, output block_t c);
    @(negedge clk);
    a_pt = p; a_pt_valid = 1'b1;
    do @(posedge clk); while (!a_pt_ready);
    @(negedge clk);
    a_pt_valid = 1'b0;
    while (!a_ct_valid) @(negedge clk);
    c = a_ct;
    n_enc++;
  endtask

  task automatic decrypt_b(input block_t c, output block_t p);
    @(negedge clk);
    b_ct = c; b_ct_valid = 1'b1;
    do @(posedge clk); while (!b_ct_ready);
    @(negedge clk);
    b_ct_valid = 1'b0;
    while (!b_pt_valid) @(negedge clk);
    p = b_pt;
    n_dec++;
  endtask

  task automatic keygen(input bit side_b);
    @(negedge clk);
    if (side_b) b_keygen_start = 1'b1; else a_keygen_start = 1'b1;
    @(negedge clk);
    b_keygen_start = 1'b0; a_keygen_start = 1'b0;
    if (side_b) begin
      while (!b_key_ready) @(negedge clk);
      n_keygen_b++;
    end else begin
      while (!a_key_ready) @(negedge clk);
      n_keygen_a++;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t r;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // a block offered before any key exists must wait for the key
    fork
      keygen(1'b0);
      begin
        @(negedge clk);
        a_pt = msg[0]; a_pt_valid = 1'b1;
        repeat (20) @(negedge clk);
        checks++;
        if (a_ct_valid || a_pt_ready) begin failures++; $display("block accepted without a key"); end
        a_pt_valid = 1'b0;
      end
    join
    checks++;
    if (dut.a_key !== 128'hFFFFFEB648DB6922400000000DDFFA29) begin
      failures++; $display("device A key %h", dut.a_key);
    end
    for (int i = 0; i < 5; i++) begin
      encrypt_a(msg[i], got_ct[i]);
      checks++;
      if (got_ct[i] !== cip[i]) begin failures++; $display("message %0d: ciphertext %h expected %h", i, got_ct[i], cip[i]); end
    end
    // back-to-back offer: second block waits while the core is busy
    fork
      encrypt_a(msg[1], r);
      begin
        repeat (3) @(negedge clk);
        checks++;
        if (a_pt_ready) begin failures++; $display("ready high while encrypting"); end
        @(negedge clk);
      end
    join
    @(negedge clk);
    a_pt = msg[2]; a_pt_valid = 1'b1;
    @(negedge clk);
    a_pt_valid = 1'b0;
    repeat (12) @(negedge clk);
    // device B, untuned sweep
    b_tuned = 1'b0;
    keygen(1'b1);
    checks++;
    if (dut.b_key === dut.a_key) begin failures++; $display("untuned device B produced device A's key"); end
    decrypt_b(got_ct[0], r);
    checks++;
    if (r === msg[0]) begin failures++; $display("wrong key decrypted correctly"); end
    else n_wrong_key++;
    // device B, tuned sweep
    b_tuned = 1'b1;
    keygen(1'b1);
    checks++;
    if (dut.b_key !== dut.a_key) begin failures++; $display("tuned device B key %h differs", dut.b_key); end
    for (int i = 0; i < 5; i++) begin
      decrypt_b(got_ct[i], r);
      checks++;
      if (r !== msg[i]) begin failures++; $display("message %0d decrypted to %h", i, r); end
    end
    // every mechanism must have happened
    checks++; if (n_no_key_accept != 0) begin failures++; $display("%0d blocks accepted without a key", n_no_key_accept); end
    checks++; if (n_keygen_a < 1) begin failures++; $display("no key generated on device A"); end
    checks++; if (n_keygen_b < 2) begin failures++; $display("device B keys: %0d", n_keygen_b); end
    checks++; if (n_code0 < 1) begin failures++; $display("ADC code 000 never seen"); end
    checks++; if (n_code7 < 1) begin failures++; $display("ADC code 111 never seen"); end
    checks++; if (n_enc < 6) begin failures++; $display("encryptions: %0d", n_enc); end
    checks++; if (n_dec < 6) begin failures++; $display("decryptions: %0d", n_dec); end
    checks++; if (n_held < 1) begin failures++; $display("ready never held a block back"); end
    checks++; if (n_wrong_key < 1) begin failures++; $display("no wrong-key decryption seen"); end
    $display("keygen A=%0d B=%0d code000=%0d code111=%0d enc=%0d dec=%0d held=%0d wrong_key=%0d",
             n_keygen_a, n_keygen_b, n_code0, n_code7, n_enc, n_dec, n_held, n_wrong_key);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
