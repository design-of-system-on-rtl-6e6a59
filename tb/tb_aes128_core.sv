// tb_aes128_core: self-checking test of the AES-128 core.
// Twelve (key, plaintext, ciphertext) triples: the FIPS 197 appendix C.1 and
// appendix B examples, the first SP 800-38A ECB example, and nine random
// triples whose ciphertexts were computed with an independent AES library.
// Each is encrypted (result must equal the ciphertext) and decrypted (result
// must equal the plaintext); start-to-done latency must be 10 cycles for
// encryption and 20 for decryption, and busy must be high meanwhile.
module tb_aes128_core;
  localparam int NV = 12;
  typedef logic [127:0] vec_t [3];
  localparam vec_t V [NV] = '{
    '{128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a},
    '{128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, 128'h3925841d02dc09fbdc118597196a0b32},
    '{128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h6bc1bee22e409f96e93d7e117393172a, 128'h3ad77bb40d7a3660a89ecaf32466ef97},
    '{128'h38b4e652e44da7f2370d9e260e271365, 128'h50a4a3a6d07f5c0c332f8b1224083fd2, 128'h2a1526a93654497163eacbd8f2f0f4ba},
    '{128'h2b902f8911e81818f8c99d5d5d983195, 128'h7504d90e945de2e8f54ee781cc75f636, 128'hf79a52bf2330c781f902a02e8f4f690d},
    '{128'hd85099095aa300165a67036f9b540d6b, 128'h8f0be21124179c3dd9f73817ce6e118d, 128'he32fd7515c1aa8d69cb4a020307914f0},
    '{128'h264aad6cb6dd210faf94acd3cf92c190, 128'h237cb11f5d108cf25930263938b370a1, 128'h8781a68284bb0f6f698db55868121471},
    '{128'hb5769fa0f1483f95a90d9df2f130d60f, 128'hcf04bd93f50ae69514da8c659ce2b10c, 128'hf86e4f0766254df44514846bd7e68f81},
    '{128'hccdaebf990d19838b0d7ec0b3e97818e, 128'hcb96c4dbadbe172296d5234a42b24c6b, 128'h0b597edb7e156fcaddcddbeceee1c6b8},
    '{128'ha4e6ed24ec636a8ac0a1271e58662792, 128'h38aaf84e58056d8f2fa8edd094ba97ae, 128'h74b8c0884092c84d5636337375f8a7ff},
    '{128'h8b15442ee2db611a91bfe39469733a92, 128'h47d58fa3c55018300372555fd235f118, 128'h66289b7e0a5307fbdc46b8c5e71effce},
    '{128'h29fb388c22e44cb637f01210c3707a90, 128'hb405420fb169779edfb5b9342405157f, 128'hec6567bd60350034b6c60d2755e3615f}
  };

  logic         clk = 1'b0;
  logic         rst, start, decrypt, busy, done;
  logic [127:0] key, din, dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes128_core dut (.clk, .rst, .start, .decrypt, .key, .din, .busy, .done, .dout);

  task automatic run(input bit dec, input logic [127:0] k, input logic [127:0] x,
                     input logic [127:0] exp, input int exp_lat);
    int lat;
    @(negedge clk);
    start = 1'b1; decrypt = dec; key = k; din = x;
    @(negedge clk);
    start = 1'b0; key = '0; din = '0;
    lat = 0;   // cycles after the edge that samples start
    while (!done) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low while working"); end
      @(negedge clk);
      lat++;
    end
    checks += 2;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s key %h in %h: got %h exp %h", dec ? "dec" : "enc", k, x, dout, exp);
    end
    if (lat != exp_lat) begin
      failures++;
      $display("FAIL %s latency %0d, expected %0d", dec ? "dec" : "enc", lat, exp_lat);
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; decrypt = 1'b0; key = '0; din = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < NV; i++) begin
      run(1'b0, V[i][0], V[i][1], V[i][2], 10);
      run(1'b1, V[i][0], V[i][2], V[i][1], 20);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
