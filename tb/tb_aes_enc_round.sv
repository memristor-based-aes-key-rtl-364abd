// tb_aes_enc_round: one encryption round against an independent software model.
// Each entry is {final_round, state_in, round_key, expected encryption-round
// output, expected decryption-round output}; half of them are final rounds.
`timescale 1ns / 1ps
module tb_aes_enc_round;
  import aes_pkg::*;
  typedef struct packed { logic f; block_t s; block_t k; block_t e; block_t d; } vec_t;
  localparam int NV = 8;
  localparam vec_t VEC [NV] = '{
'{1'b0, 128'hba72499bfa121e836b2ac15726ee7d6b, 128'h0af6ab13c38e92cae0d15057b159987f, 128'hbe7ce75b467c838fb15f5e06ade326f9, 128'hb84c1d6826b8c78f3f8a637d80d508e5},
'{1'b1, 128'h94cc7411d717f14579b2aa100fbbb34f, 128'ha593feaed27248b762e3ab5805f0765a, 128'h8763522adc452535d409393673bbd790, 128'h426d9cc6df5503cbcd6461cafece5db9},
'{1'b0, 128'h2b9c1d7e0f37c44921bd3f6564eadf7f, 128'h142a72668c47e223d16edd8c47b46afc, 128'hffb99e3e838fc7a03d4ab9c5e9391861, 128'he0929ef7e5f3f850bafb2cff1d657826},
'{1'b1, 128'h5baee261f53b26152d263ba83b037cd4, 128'h962e434801256b885e9c9051f320b0db, 128'hafcca100e7d27b6786e7080811c44719, 128'hc1fb0a67769b6ae7a4d5ab48ba039303},
'{1'b0, 128'h83f39ea7adbd0d74e6dec7f3dfaecc8f, 128'h646566641a7ba2660f3011fc3570291c, 128'h9c5ff2111b55582ca6e2c0a5df9b1865, 128'h2e285253004ca87e6408dcf62ae3d868},
'{1'b1, 128'h57990d1a0091268919f25d9d0612df35, 128'h9d6026a240f4589a5d791f1dd97cfefa, 128'hc6e16a34237dc63889b0c8bab69209a4, 128'h4759ab50120db7efd3d5ecc47c78ddb9},
'{1'b0, 128'h777a7b4f15241abf57bd437ad4b12984, 128'h0534f3f3875c25b08bea06c2874cfaa4, 128'hebdce5659a81c0975751cfd61a8c42ab, 128'ha700c6944d29d69f71a6145640675ceb},
'{1'b1, 128'hdd17b2d842845de82a5bc539888ac780, 128'h54a2399ccfc9fcc2da31ce3dd166bdcd, 128'h95fd9f51e3f03aa33f4ff9a61596f1df, 128'h9d6d3e54394ecd994f7ef007463130e0}
  };
  block_t s_in, rk, s_out;
  logic fin;
  int checks = 0, failures = 0;
  aes_enc_round dut (.state_in(s_in), .round_key(rk), .final_round(fin), .state_out(s_out));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < NV; i++) begin
      s_in = VEC[i].s; rk = VEC[i].k; fin = VEC[i].f;
      #1;
      checks++;
      if (s_out !== VEC[i].e) begin
        failures++; $display("mismatch vec %0d: %h expected %h", i, s_out, VEC[i].e);
      end
    end
    // FIPS-197 Appendix B, round 1: start of round -> start of round 2
    s_in = 128'h193de3bea0f4e22b9ac68d2ae9f84808; rk = 128'ha0fafe1788542cb123a339392a6c7605; fin = 1'b0;
    #1;
    checks++;
    if (s_out !== 128'ha49c7ff2689f352b6b5bea43026a5049) begin
      failures++; $display("FIPS-197 round 1 mismatch: %h", s_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
