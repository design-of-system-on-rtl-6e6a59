// tb_crypto_module_top: end-to-end test of the whole cryptographic module at
// its default sizes (no parameter overrides), all four units running at once.
//
//  X11:     the testbench plays the CPU and steps the routing selects for
//           three jobs: an 80-byte message through Keccak -> Skein -> JH ->
//           Keccak (a core used twice), the same message through JH ->
//           Skein -> Keccak (another order must give another result), and a
//           37-byte message through Skein -> channel D -> Keccak, where D is
//           an external core modelled here as a pass-through. Output is read
//           with random back-pressure and the input has random gaps. First,
//           a message is started into Keccak and abandoned by pulsing
//           Keccak's own reset; the first job then proves Keccak recovered.
//  SHA-256: a 100-byte message (its padding spills into a second block).
//  AES-128: the FIPS 197 appendix C.1 example, encrypted and decrypted.
//  RSA:     a 2048-bit key: m^e mod n with e = 65537, then c^d mod n must
//           give m back.
// Message byte k of a length-len message is (31*k + 7*len + 5) mod 256. All
// expected values were computed by independent software (hash models and
// arbitrary-precision arithmetic). Each mechanism listed in the final
// "mechanisms" line is counted and must occur at least once.
module tb_crypto_module_top;
  import x11_pkg::*;

  localparam int NJOB = 3;
  localparam int LENS [NJOB] = '{80, 80, 37};
  localparam int NSTEP [NJOB] = '{4, 3, 3};
  localparam channel_e STEPS [NJOB][4] = '{
    '{CH_B, CH_A, CH_C, CH_B},
    '{CH_C, CH_A, CH_B, CH_A},
    '{CH_A, CH_D, CH_B, CH_A}};
  localparam logic [511:0] EXP [NJOB] = '{
    512'h8d8452b1b06027c0049fe5c1209dde1381c6c8a3f2cf2c9043bc1060d0dfbf92db0ea1024112937f1cc92cbad9588ea0517aab3e0234175573b27c0f8bc24f79,
    512'h629a3d7343a928b71987427042fdf2ebe7c2a53f2baffb1ecc597ad946b4889f531745668643bd0545767d3e9bec32d2d765b897c0cf984e439547142fded7c4,
    512'he8f23cb6d438aeaec0ce9774a80b2318afc7f9180f5a61f10ad1662045c02e3b8a5edd80fb53cc2c66b4e616b44878fff42dde2310d3016c0853eed525bbea5e};
  localparam logic [2047:0] RSA_N = 2048'hd9508f2c06ba06c110a52b4bb4f812a4e741a2949859defb03c5da19e80001dcf4a0ad379c6ec951f71bc8b8df7f81b54256bf4182b5db03666da69b92598780b6316d269b718a2e908b1e628c8eca003d81a144b878507524812c637136b8ed7ab8845b19caefb5abcb7b90e3619a6e24fb2a24b24d3f5facb5220a58ba115378a8c4b5a059edad3a7b881ee5898ea407524cb7e689f0a5f7edaa7e01ac56c5a7577f39fe21bea37cebb4a4e311ade34145f2302172a971a175b57462dc1894701d6510a4ee6b6479b8fe725b5bb651162ff85394c8c953b801c7ccc2bbc8af2cafd6dfdd7942abbe8efe3c086c2d78f3453710e7ae0463c1a4f8ee13a7cfc3;
  localparam logic [2047:0] RSA_D = 2048'h010327a984199bfcc175a107c77a65cf48e1659deb6b021a45010171d523b7f8fc6854cb346792d13c393aed780694cef2704940cbdab86e72663442f317df80ab51fc124dd07bf31d7a42a2aea5df03bfdbab444a2fa1921c9c4d172b393dac6ec62d3cc493cd35e45af703dbfee401306acf2dac461080ce18009b322e4e0f244d461ef1e59109c45848c9e1303c02e275b7201a0cf853ea5078bafb4de0592764652c88eb4662f4fc7ce6b3dba0d99d8f025144343c9a7058c436b72180d71b16fa1e540c48e0f250aba4aae5328d1475de8664367218afad40e64edd3eeae00925e05b6cb6938fee38ad3be483bec5e865b673aacf95c1242409080481e5;
  localparam logic [2047:0] RSA_M = 2048'h006d4b9aebcd1f5ec9c18070b6d13089633a50eee0f9e038eb8f624fb804d820984181177906159644f9794cdd933160d2d5844307f062cec7b317d94d1fe09f0af438d297524d6af51e8722c21b609228ce6f2410645d51c6f8da3eabe19f5803e0a813bdc2ae9963d2e49085ef3430ed038db4de38378426d0b944a2863a7f3b5f3d86268ecc45dc6bf1e1a399f82a65aa9c8279f248b08cb4a0d7d62256758a7d43b578633074b7970386fee29476311624273bfd1d338d0038ec42650644781f9c58d6645fa9e8a8529f035efa259b08923d10c67fd994b2b8fda02f34a6795b929e9a9a80fdea7b5bf55eb561a4216363698b529b4a97b750923ceb3ffd;
  localparam logic [2047:0] RSA_C = 2048'h21a7f7db7f051c4ce8de18ea37e118d6696eb37a19e18948e15d2342455a5060abff396fbd1295fb272f8c365232a366785a6c899979dd995b2cfb0431390c1fb00aa7301014fb751965fd71f0c23a77d9f0a23b909b78762ea45ae81acaa6bf0e4b0d4fe4f3440d8f046ee3e62f8115489f1180514397b7f1b65e5547f425f5879e039a15bce70784750c70018453432a20558c880e858f7adb147dae1bec7598d1254543a87282aff193a9249607ce5f2a3c2e7563f058602c40ac3fd8555618706d651c7a04ced78ef3d47514976ff684eece1f4d92e7fceeaaff572b972a57763b6f8b408b8647634b80438b2520e55a1777246b22949c31f602e3a813cb;
  localparam logic [255:0]  SHA_EXP = 256'h987c397e189982f0680aaf4baaf0e1f83cf22a9a089637ff5e2d93cf8982e42d;
  localparam logic [127:0] AES_K = 128'h000102030405060708090a0b0c0d0e0f;
  localparam logic [127:0] AES_P = 128'h00112233445566778899aabbccddeeff;
  localparam logic [127:0] AES_C = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;

  logic             clk = 1'b0;
  logic             rst;
  logic [2:0]       x11_core_rst;
  logic [SEL_W-1:0] x11_sel, x11_sel_0;
  logic [W-1:0]     x11_hash_input, x11_hash_output;
  logic             x11_hash_input_valid, x11_hash_input_read;
  logic             x11_hash_output_write, x11_hash_output_ready;
  logic [W-1:0]     x11_ext_din [9];
  logic             x11_ext_src_ready [9];
  logic             x11_ext_src_read [9];
  logic [W-1:0]     x11_ext_dout [9];
  logic             x11_ext_dst_write [9];
  logic             x11_ext_dst_ready [9];
  logic [2:0]       x11_core_src_read, x11_core_dst_write;
  logic [63:0]      sha_din, sha_dout;
  logic             sha_src_ready, sha_src_read, sha_dst_write, sha_dst_ready;
  logic             aes_start, aes_decrypt, aes_busy, aes_done;
  logic [127:0]     aes_key, aes_din, aes_dout;
  logic             rsa_start, rsa_busy, rsa_done;
  logic [2047:0]    rsa_base, rsa_exponent, rsa_modulus, rsa_result;

  int checks = 0, failures = 0;
  int n_route = 0, n_core2core = 0, n_reuse = 0, n_ext = 0, n_bp = 0, n_gap = 0, n_order = 0, n_abort = 0;
  int n_sha = 0, n_aes_enc = 0, n_aes_dec = 0, n_rsa_enc = 0, n_rsa_dec = 0;
  logic [511:0] results [NJOB];

  always #5 clk = ~clk;

  crypto_module_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- X11: external pass-through core on channel D
  logic [W-1:0] ext_buf [9];
  int           ext_in = 0, ext_out = 0;
  always_comb begin
    for (int e = 0; e < 9; e++) begin
      x11_ext_src_read[e]  = 1'b0;
      x11_ext_dst_write[e] = 1'b0;
      x11_ext_dout[e]      = '0;
    end
    x11_ext_src_read[0]  = x11_ext_src_ready[0] && (ext_in < 9);
    x11_ext_dst_write[0] = (ext_in == 9) && (ext_out < 9);
    x11_ext_dout[0]      = ext_buf[ext_out % 9];
  end
  always @(posedge clk) begin
    if (x11_ext_src_read[0]) begin
      ext_buf[ext_in] <= x11_ext_din[0];
      ext_in <= ext_in + 1;
    end
    if (x11_ext_dst_write[0] && x11_ext_dst_ready[0]) begin
      if (ext_out == 8) begin ext_in <= 0; ext_out <= 0; end
      else ext_out <= ext_out + 1;
    end
    if (x11_hash_output_write && !x11_hash_output_ready) n_bp++;
  end

  function automatic logic [7:0] mbyte(input int len, input int k);
    return 8'((31*k + 7*len + 5) % 256);
  endfunction

  function automatic logic [W-1:0] mword(input int len, input int i);
    logic [W-1:0] w;
    w = '0;
    for (int b = 0; b < 8; b++)
      if (8*i + b < len) w[8*b +: 8] = mbyte(len, 8*i + b);
    return w;
  endfunction

  task automatic route(input channel_e src, input channel_e dst);
    x11_sel   <= src;
    x11_sel_0 <= dst;
    n_route++;
    @(posedge clk);
  endtask

  function automatic logic has_answer(input channel_e ch);
    if (ch == CH_D) return x11_ext_dst_write[0];
    return x11_core_dst_write[int'(ch)];
  endfunction

  // Start an 80-byte message into Keccak, stop after the header and four
  // data words, then reset Keccak alone.
  task automatic x11_abort_keccak();
    route(CH_M, CH_B);
    for (int i = -1; i < 4; i++) begin
      x11_hash_input_valid <= 1'b1;
      x11_hash_input <= (i < 0) ? W'(80) : mword(80, i);
      do @(posedge clk); while (!x11_hash_input_read);
    end
    x11_hash_input_valid <= 1'b0;
    repeat (3) @(posedge clk);
    x11_core_rst <= 3'b010;
    @(posedge clk);
    x11_core_rst <= 3'b000;
    n_abort++;
    route(CH_M, CH_M);
  endtask

  task automatic x11_job(input int j);
    int uses [3];
    logic [W-1:0] got [9];
    uses = '{0, 0, 0};
    route(CH_M, STEPS[j][0]);
    for (int i = -1; i < (LENS[j] + 7) / 8; i++) begin
      if ($urandom % 4 == 0) begin
        x11_hash_input_valid <= 1'b0;
        n_gap++;
        @(posedge clk);
      end
      x11_hash_input_valid <= 1'b1;
      x11_hash_input <= (i < 0) ? W'(LENS[j]) : mword(LENS[j], i);
      do @(posedge clk); while (!x11_hash_input_read);
    end
    x11_hash_input_valid <= 1'b0;
    for (int s = 0; s < NSTEP[j]; s++) begin
      channel_e cur, nxt;
      cur = STEPS[j][s];
      nxt = (s == NSTEP[j] - 1) ? CH_M : STEPS[j][s+1];
      if (cur <= CH_C) begin
        uses[int'(cur)]++;
        if (uses[int'(cur)] == 2) n_reuse++;
      end else n_ext++;
      while (!has_answer(cur)) @(posedge clk);
      route(cur, nxt);
      if (nxt == CH_M) begin
        for (int i = 0; i < 9; i++) begin
          x11_hash_output_ready <= ($urandom % 3 != 0);
          @(posedge clk);
          while (!(x11_hash_output_write && x11_hash_output_ready)) begin
            x11_hash_output_ready <= ($urandom % 3 != 0);
            @(posedge clk);
          end
          got[i] = x11_hash_output;
        end
        x11_hash_output_ready <= 1'b0;
      end else begin
        n_core2core++;
        while (has_answer(cur)) @(posedge clk);
      end
    end
    check(got[0] == 64'd64, $sformatf("x11 job %0d header", j));
    for (int i = 0; i < 8; i++) begin
      results[j][64*i +: 64] = got[i+1];
      check(got[i+1] == EXP[j][64*i +: 64], $sformatf("x11 job %0d word %0d", j, i));
    end
    route(CH_M, CH_M);
  endtask

  // ---------------- SHA-256
  task automatic sha_job();
    localparam int L = 100;
    logic [63:0] got [5];
    for (int i = -1; i < (L + 7) / 8; i++) begin
      sha_src_ready <= 1'b1;
      sha_din <= (i < 0) ? 64'(L) : mword(L, i);
      do @(posedge clk); while (!sha_src_read);
    end
    sha_src_ready <= 1'b0;
    sha_dst_ready <= 1'b1;
    for (int i = 0; i < 5; i++) begin
      do @(posedge clk); while (!sha_dst_write);
      got[i] = sha_dout;
    end
    sha_dst_ready <= 1'b0;
    check(got[0] == 64'd32, "sha header");
    for (int i = 0; i < 4; i++) check(got[i+1] == SHA_EXP[64*i +: 64], $sformatf("sha word %0d", i));
    n_sha++;
  endtask

  // ---------------- AES-128
  task automatic aes_op(input bit dec, input logic [127:0] x, input logic [127:0] exp);
    aes_start <= 1'b1; aes_decrypt <= dec; aes_key <= AES_K; aes_din <= x;
    @(posedge clk);
    aes_start <= 1'b0;
    do @(posedge clk); while (!aes_done);
    check(aes_dout == exp, dec ? "aes decrypt" : "aes encrypt");
    if (dec) n_aes_dec++; else n_aes_enc++;
  endtask

  // ---------------- RSA
  task automatic rsa_op(input logic [2047:0] b, input logic [2047:0] e, input logic [2047:0] exp,
                        input bit dec);
    rsa_start <= 1'b1; rsa_base <= b; rsa_exponent <= e; rsa_modulus <= RSA_N;
    @(posedge clk);
    rsa_start <= 1'b0;
    do @(posedge clk); while (!rsa_done);
    check(rsa_result == exp, dec ? "rsa decrypt" : "rsa encrypt");
    if (dec) n_rsa_dec++; else n_rsa_enc++;
  endtask

  initial begin
    rst = 1'b1;
    x11_core_rst = 3'b000;
    x11_sel = CH_M; x11_sel_0 = CH_M;
    x11_hash_input = '0; x11_hash_input_valid = 1'b0; x11_hash_output_ready = 1'b0;
    sha_din = '0; sha_src_ready = 1'b0; sha_dst_ready = 1'b0;
    aes_start = 1'b0; aes_decrypt = 1'b0; aes_key = '0; aes_din = '0;
    rsa_start = 1'b0; rsa_base = '0; rsa_exponent = '0; rsa_modulus = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    fork
      begin
        x11_abort_keccak();
        for (int j = 0; j < NJOB; j++) x11_job(j);
      end
      sha_job();
      begin aes_op(1'b0, AES_P, AES_C); aes_op(1'b1, AES_C, AES_P); end
      begin rsa_op(RSA_M, 2048'd65537, RSA_C, 1'b0); rsa_op(RSA_C, RSA_D, RSA_M, 1'b1); end
    join
    if (results[0] != results[1]) n_order++;
    $display("mechanisms: routes=%0d core_to_core=%0d reuse=%0d external=%0d backpressure=%0d input_gaps=%0d order_effect=%0d aborts=%0d sha=%0d aes_enc=%0d aes_dec=%0d rsa_enc=%0d rsa_dec=%0d",
             n_route, n_core2core, n_reuse, n_ext, n_bp, n_gap, n_order, n_abort,
             n_sha, n_aes_enc, n_aes_dec, n_rsa_enc, n_rsa_dec);
    check(n_route > 0, "no route change");
    check(n_core2core > 0, "no core-to-core transfer");
    check(n_reuse > 0, "no core reused");
    check(n_ext > 0, "no external channel");
    check(n_bp > 0, "no back-pressure");
    check(n_gap > 0, "no input gap");
    check(n_order > 0, "order did not matter");
    check(n_abort > 0, "no core abort");
    check(n_sha > 0, "no sha job");
    check(n_aes_enc > 0 && n_aes_dec > 0, "aes not both ways");
    check(n_rsa_enc > 0 && n_rsa_dec > 0, "rsa not both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
