// tb_aes_encrypt: runs the iterative AES-128 core from plaintext to ciphertext on known vectors
// (FIPS-197 Appendix B and C.1, the first message of the memristor-key example,
// and random vectors from an independent software AES) and checks every result,
// the latency of 10 cycles from the start edge to done, the busy flag, and that a
// start pulse arriving while busy is ignored.
`timescale 1ns / 1ps
module tb_aes_encrypt;
  import aes_pkg::*;
  typedef struct packed { block_t k; block_t p; block_t c; } vec_t;
  localparam int NV = 6;
  localparam int LATENCY = 10;
  localparam vec_t VEC [NV] = '{
'{128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, 128'h3925841d02dc09fbdc118597196a0b32},
'{128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a},
'{128'hfffffeb648db6922400000000ddffa29, 128'h546865207265736f6c7574696f6e206f, 128'h5de1b88669ec12577cc67e3a7dde7f3e},
'{128'h52f22665a60c12d289185d950ee88136, 128'h248a1e924e8fd0ae2e1a9492a3305f18, 128'hdbde1e4ddb42e1cbbc6d9c87d082b1ba},
'{128'h09166f6b113d178d6c0fd3901ff239a1, 128'h8cb610900f9e347fae886dc6507795ec, 128'hf4df8c990661dae67a29e80ef3cee50c},
'{128'ha095f20f9395650cf9380b8edb224a6b, 128'h745c4c3fcb2eb2c73e14934c867ee057, 128'hdfc45deeb6139ffb61bec64f13352e4b}
  };
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  block_t key, din, dout;
  int checks = 0, failures = 0;
  int cycles;
  always #5 clk = ~clk;
  aes_encrypt dut (.clk(clk), .rst_n(rst_n), .start(start), .key(key), .din(din),
                   .busy(busy), .done(done), .dout(dout));
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    key = '0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < NV; i++) begin
      key <= VEC[i].k; din <= VEC[i].p; start <= 1'b1;
      @(posedge clk);             // start sampled here
      start <= 1'b0;
      cycles = 0;
      // a second start while busy must be ignored
      @(negedge clk);
      checks++;
      if (!busy) begin failures++; $display("busy not set after start"); end
      start = 1'b1; din = ~VEC[i].p;
      do begin
        @(posedge clk);
        #1;
        cycles++;
        start = 1'b0; din = VEC[i].p;
      end while (!done && cycles < 100);
      checks++;
      if (cycles != LATENCY) begin failures++; $display("vec %0d latency %0d, expected %0d", i, cycles, LATENCY); end
      checks++;
      if (dout !== VEC[i].c) begin failures++; $display("vec %0d result %h expected %h", i, dout, VEC[i].c); end
      checks++;
      if (busy) begin failures++; $display("busy still set at done"); end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
