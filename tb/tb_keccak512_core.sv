// tb_keccak512_core: self-checking testbench of the Keccak-512 core.
//
// Hashes 11 messages of lengths 0, 5, 55, 56, 64, 71, 72, 80, 119, 143, 200 bytes, chosen to hit
// every padding case (empty, partial block, exact block, block plus one byte,
// several blocks). Message byte k of a message of length len is
// (31*k + 7*len + 5) mod 256. The expected digests were computed with an
// independent software model of Keccak-512 (checked against the published
// empty-message digest) and are written here as 512-bit constants (zero-extended), digest
// byte k in bits [8k+:8]. Pass 1 runs with source and sink always ready and
// also checks the latency from header acceptance to the first output word
// against the core's documented cycle budget; pass 2 repeats the messages
// with random gaps on src_ready and random back-pressure on dst_ready.
module tb_keccak512_core;
  localparam int NMSG = 11;
  localparam int NW   = 8;      // digest words after the header
  localparam int LENS [NMSG] = '{0, 5, 55, 56, 64, 71, 72, 80, 119, 143, 200};
  localparam logic [511:0] EXP [NMSG] = '{
    512'h0e6870363db3da0c16fb6927ef91f035b41367e0cb9b46ba7679d8f9caa90fc004436af366c4674e0ec6b766c3a8299cb246e7ffac91fc3592eb3c4cde42ab0e,
    512'h7e21c279bfd7130aa96159eb1b4b03eb8b79f962611c96dda398dc0ea553eea2f3244e5249c199c17946a921692365393a69299001cbe2c524c21c49f9e6bc76,
    512'hf50da078eb935163ad6dbe1c69fd20b79dd2a23628dab0a5b567c360c4e13a50eccf7052898c7fd1afeec9a8e40ed05f8a3e87d62315ebe4b2d61a5259a3888b,
    512'hbeba35235e8158618e2841bed975ad41883ba366ac6eaaa0f32bbf46f56bfb8fd6dfc337e46faef985dfe53fade25e6da5cc0bfe33b77aafd0ae65add9474b69,
    512'hab8924e83c80db08006bde70de2976b6c6d1120e11a439337754b4fa22c19f06d42b93ed65c912ebb94532255bf9bf5d207da4eb4a32e58d698b1b5f41aa6def,
    512'hc9266f64f0f888173ee9c6d6dec753fddb31b33d0dde4a6c37b6b393072a1a4c049b5f9ef5f433842932b9e22e88eb8764c859d5af6b0285769274ae1cd5aab7,
    512'h3546428f3aa29dfa77eadc172275f80dcbabc101c7a8bce5da4beb1ddd05c0bf58115286813d6d2531aefa330d9b028d5f8c5139c2decabc40e81384afe30a4c,
    512'h1eef4a3aba07e48af92f42ab58f6b71cecb399e7e23d7d7ec9f0a21c44d7ea9e577b47f822aa21decfc07a314d10fe2fb52ba0db7587de329996c10c23a0f372,
    512'h4adb7b554061c27b12d3a860cdb52cde76e9fcbc60eb2a0d2b5b626051cdb4ca71f1f4e907f1369f647c3b99d5ae29136e9457f251dbd132174b77a67cbf6932,
    512'h4aec042914c3a38a0a6ff92926961dbb74a5a480efc558ce8fdd406f4f4b0e006d32e3f1343d4e513b5177c3c19dd5c04355e3b759fa0a5c16799625a42ae5fd,
    512'h75548862eeca167e9fcd63483e3da36d626037977dae89b9124a4be9ced73b74bd28c696ea0f6aec03aec11b960131d021a8cbd7c1c692aec3a63aa85b271eff};

  logic        clk = 1'b0;
  logic        rst;
  logic [63:0] din, dout;
  logic        src_ready, src_read, dst_write, dst_ready;
  int          checks = 0, failures = 0;
  int          cycle = 0;
  bit          stall_src = 1'b0, stall_dst = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  keccak512_core dut (.clk, .rst, .din, .src_ready, .src_read, .dout, .dst_write, .dst_ready);

  function automatic logic [7:0] mbyte(input int len, input int k);
    return 8'((31*k + 7*len + 5) % 256);
  endfunction

  function automatic int expected_latency(input int len);
    int words;
    words = (len + 7) / 8;
    return words + 26*((len/72)+1) + 1;
  endfunction

  // Sends header then data words; returns the cycle the header was taken.
  task automatic send(input int len, output int hdr_cycle);
    int nw;
    logic [63:0] w;
    nw = (len + 7) / 8;
    for (int i = -1; i < nw; i++) begin
      if (i < 0) w = 64'(len);
      else begin
        w = '0;
        for (int b = 0; b < 8; b++)
          if (8*i + b < len) w[8*b +: 8] = mbyte(len, 8*i + b);
          else w[8*b +: 8] = 8'($urandom);       // bytes past the end are ignored
      end
      while (stall_src && ($urandom % 3 == 0)) begin
        src_ready <= 1'b0; din <= 64'($urandom);
        @(posedge clk);
      end
      src_ready <= 1'b1; din <= w;
      do @(posedge clk); while (!src_read);
      if (i < 0) hdr_cycle = cycle;
    end
    src_ready <= 1'b0;
  endtask

  task automatic receive(input int idx, output int first_cycle);
    logic [63:0] got [NW+1];
    for (int i = 0; i < NW+1; i++) begin
      dst_ready <= !(stall_dst && ($urandom % 2 == 0));
      @(posedge clk);
      while (!(dst_write && dst_ready)) begin
        dst_ready <= !(stall_dst && ($urandom % 2 == 0));
        @(posedge clk);
      end
      if (i == 0) first_cycle = cycle;
      got[i] = dout;
    end
    dst_ready <= 1'b0;
    checks++;
    if (got[0] != 64'(8*NW)) begin
      failures++;
      $display("FAIL msg %0d: header %h", idx, got[0]);
    end
    for (int i = 0; i < NW; i++) begin
      checks++;
      if (got[i+1] != EXP[idx][64*i +: 64]) begin
        failures++;
        $display("FAIL msg %0d len %0d word %0d: got %h exp %h", idx, LENS[idx], i,
                 got[i+1], EXP[idx][64*i +: 64]);
      end
    end
  endtask

  initial begin
    int hc, fc;
    rst = 1'b1; src_ready = 1'b0; dst_ready = 1'b0; din = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int pass = 0; pass < 2; pass++) begin
      stall_src = (pass == 1);
      stall_dst = (pass == 1);
      for (int m = 0; m < NMSG; m++) begin
        fork
          send(LENS[m], hc);
          receive(m, fc);
        join
        if (pass == 0) begin
          // First output word is seen at the edge after dst_write rises with dst_ready high.
          checks++;
          if (fc - hc != expected_latency(LENS[m])) begin
            failures++;
            $display("FAIL latency len %0d: %0d cycles, expected %0d", LENS[m], fc - hc,
                     expected_latency(LENS[m]));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
