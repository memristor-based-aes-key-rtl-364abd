// tb_aes_key_schedule: checks both directions of the key-schedule step.
// Reference round keys come from an independent software AES key expansion
// (FIPS-197 Appendix A key, an all-counting key, the 128-bit key derived from the
// memristor example, and two random keys): each entry is {round r, Key r-1, Key r}.
`timescale 1ns / 1ps
module tb_aes_key_schedule;
  import aes_pkg::*;
  typedef struct packed { logic [3:0] r; block_t kprev; block_t knext; } vec_t;
  localparam int NV = 50;
  localparam vec_t VEC [NV] = '{
'{4'd1, 128'h2b7e151628aed2a6abf7158809cf4f3c, 128'ha0fafe1788542cb123a339392a6c7605},
'{4'd2, 128'ha0fafe1788542cb123a339392a6c7605, 128'hf2c295f27a96b9435935807a7359f67f},
'{4'd3, 128'hf2c295f27a96b9435935807a7359f67f, 128'h3d80477d4716fe3e1e237e446d7a883b},
'{4'd4, 128'h3d80477d4716fe3e1e237e446d7a883b, 128'hef44a541a8525b7fb671253bdb0bad00},
'{4'd5, 128'hef44a541a8525b7fb671253bdb0bad00, 128'hd4d1c6f87c839d87caf2b8bc11f915bc},
'{4'd6, 128'hd4d1c6f87c839d87caf2b8bc11f915bc, 128'h6d88a37a110b3efddbf98641ca0093fd},
'{4'd7, 128'h6d88a37a110b3efddbf98641ca0093fd, 128'h4e54f70e5f5fc9f384a64fb24ea6dc4f},
'{4'd8, 128'h4e54f70e5f5fc9f384a64fb24ea6dc4f, 128'head27321b58dbad2312bf5607f8d292f},
'{4'd9, 128'head27321b58dbad2312bf5607f8d292f, 128'hac7766f319fadc2128d12941575c006e},
'{4'd10, 128'hac7766f319fadc2128d12941575c006e, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6},
'{4'd1, 128'h000102030405060708090a0b0c0d0e0f, 128'hd6aa74fdd2af72fadaa678f1d6ab76fe},
'{4'd2, 128'hd6aa74fdd2af72fadaa678f1d6ab76fe, 128'hb692cf0b643dbdf1be9bc5006830b3fe},
'{4'd3, 128'hb692cf0b643dbdf1be9bc5006830b3fe, 128'hb6ff744ed2c2c9bf6c590cbf0469bf41},
'{4'd4, 128'hb6ff744ed2c2c9bf6c590cbf0469bf41, 128'h47f7f7bc95353e03f96c32bcfd058dfd},
'{4'd5, 128'h47f7f7bc95353e03f96c32bcfd058dfd, 128'h3caaa3e8a99f9deb50f3af57adf622aa},
'{4'd6, 128'h3caaa3e8a99f9deb50f3af57adf622aa, 128'h5e390f7df7a69296a7553dc10aa31f6b},
'{4'd7, 128'h5e390f7df7a69296a7553dc10aa31f6b, 128'h14f9701ae35fe28c440adf4d4ea9c026},
'{4'd8, 128'h14f9701ae35fe28c440adf4d4ea9c026, 128'h47438735a41c65b9e016baf4aebf7ad2},
'{4'd9, 128'h47438735a41c65b9e016baf4aebf7ad2, 128'h549932d1f08557681093ed9cbe2c974e},
'{4'd10, 128'h549932d1f08557681093ed9cbe2c974e, 128'h13111d7fe3944a17f307a78b4d2b30c5},
'{4'd1, 128'hfffffeb648db6922400000000ddffa29, 128'h60d25b61280932436809324365d6c86a},
'{4'd2, 128'h60d25b61280932436809324365d6c86a, 128'h943a592cbc336b6fd43a592cb1ec9146},
'{4'd3, 128'h943a592cbc336b6fd43a592cb1ec9146, 128'h5ebb03e4e288688b36b231a7875ea0e1},
'{4'd4, 128'h5ebb03e4e288688b36b231a7875ea0e1, 128'h0e5bfbf3ecd39378da61a2df5d3f023e},
'{4'd5, 128'h0e5bfbf3ecd39378da61a2df5d3f023e, 128'h6b2c49bf87ffdac75d9e781800a17a26},
'{4'd6, 128'h6b2c49bf87ffdac75d9e781800a17a26, 128'h79f6bedcfe09641ba3971c03a3366625},
'{4'd7, 128'h79f6bedcfe09641ba3971c03a3366625, 128'h3cc581d6c2cce5cd615bf9cec26d9feb},
'{4'd8, 128'h3cc581d6c2cce5cd615bf9cec26d9feb, 128'h801e68f342d28d3e238974f0e1e4eb1b},
'{4'd9, 128'h801e68f342d28d3e238974f0e1e4eb1b, 128'hf2f7c70bb0254a3593ac3ec57248d5de},
'{4'd10, 128'hf2f7c70bb0254a3593ac3ec57248d5de, 128'h96f4da4b26d1907eb57daebbc7357b65},
'{4'd1, 128'h52f22665a60c12d289185d950ee88136, 128'hc8fe23ce6ef2311ce7ea6c89e902edbf},
'{4'd2, 128'hc8fe23ce6ef2311ce7ea6c89e902edbf, 128'hbdab2bd0d3591acc34b37645ddb19bfa},
'{4'd3, 128'hbdab2bd0d3591acc34b37645ddb19bfa, 128'h71bf0611a2e61cdd96556a984be4f162},
'{4'd4, 128'h71bf0611a2e61cdd96556a984be4f162, 128'h101eaca2b2f8b07f24addae76f492b85},
'{4'd5, 128'h101eaca2b2f8b07f24addae76f492b85, 128'h3bef3b0a89178b75adba5192c2f37a17},
'{4'd6, 128'h3bef3b0a89178b75adba5192c2f37a17, 128'h1635cb2f9f22405a329811c8f06b6bdf},
'{4'd7, 128'h1635cb2f9f22405a329811c8f06b6bdf, 128'h294a55a3b66815f984f00431749b6fee},
'{4'd8, 128'h294a55a3b66815f984f00431749b6fee, 128'hbde27d310b8a68c88f7a6cf9fbe10317},
'{4'd9, 128'hbde27d310b8a68c88f7a6cf9fbe10317, 128'h5e998d3e5513e5f6da69890f21888a18},
'{4'd10, 128'h5e998d3e5513e5f6da69890f21888a18, 128'hace720c3f9f4c535239d4c3a0215c622},
'{4'd1, 128'h09166f6b113d178d6c0fd3901ff239a1, 128'h81045dab90394a26fc3699b6e3c4a017},
'{4'd2, 128'h81045dab90394a26fc3699b6e3c4a017, 128'h9fe4adba0fdde79cf3eb7e2a102fde3d},
'{4'd3, 128'h9fe4adba0fdde79cf3eb7e2a102fde3d, 128'h8ef98a7081246dec72cf13c662e0cdfb},
'{4'd4, 128'h8ef98a7081246dec72cf13c662e0cdfb, 128'h674485dae660e83694affbf0f64f360b},
'{4'd5, 128'h674485dae660e83694affbf0f64f360b, 128'hf341ae98152146ae818ebd5e77c18b55},
'{4'd6, 128'hf341ae98152146ae818ebd5e77c18b55, 128'hab7c526dbe5d14c33fd3a99d481222c8},
'{4'd7, 128'hab7c526dbe5d14c33fd3a99d481222c8, 128'h22efba3f9cb2aefca3610761eb7325a9},
'{4'd8, 128'h22efba3f9cb2aefca3610761eb7325a9, 128'h2dd069d6b162c72a1203c04bf970e5e2},
'{4'd9, 128'h2dd069d6b162c72a1203c04bf970e5e2, 128'h6709f14fd66b3665c468f62e3d1813cc},
'{4'd10, 128'h6709f14fd66b3665c468f62e3d1813cc, 128'hfc74ba682a1f8c0dee777a23d36f69ef}
  };
  logic [3:0] round_idx;
  block_t kf_in, kf_out, kb_in, kb_out;
  int checks = 0, failures = 0;
  aes_key_schedule dut (.round_idx(round_idx), .key_in_fwd(kf_in), .key_out_fwd(kf_out),
                        .key_in_bwd(kb_in), .key_out_bwd(kb_out));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < NV; i++) begin
      round_idx = VEC[i].r; kf_in = VEC[i].kprev; kb_in = VEC[i].knext;
      #1;
      checks++;
      if (kf_out !== VEC[i].knext) begin
        failures++; $display("forward mismatch vec %0d: %h expected %h", i, kf_out, VEC[i].knext);
      end
      checks++;
      if (kb_out !== VEC[i].kprev) begin
        failures++; $display("backward mismatch vec %0d: %h expected %h", i, kb_out, VEC[i].kprev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
