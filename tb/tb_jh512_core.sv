// tb_jh512_core: self-checking testbench of the JH-512 core.
//
// Hashes 11 messages of lengths 0, 5, 55, 56, 64, 71, 72, 80, 119, 143, 200 bytes, chosen to hit
// every padding case (empty, partial block, exact block, block plus one byte,
// several blocks). Message byte k of a message of length len is
// (31*k + 7*len + 5) mod 256. The expected digests were computed with an
// independent software model of JH-512 (checked against the published
// empty-message digest) and are written here as 512-bit constants (zero-extended), digest
// byte k in bits [8k+:8]. Pass 1 runs with source and sink always ready and
// also checks the latency from header acceptance to the first output word
// against the core's documented cycle budget; pass 2 repeats the messages
// with random gaps on src_ready and random back-pressure on dst_ready.
module tb_jh512_core;
  localparam int NMSG = 11;
  localparam int NW   = 8;      // digest words after the header
  localparam int LENS [NMSG] = '{0, 5, 55, 56, 64, 71, 72, 80, 119, 143, 200};
  localparam logic [511:0] EXP [NMSG] = '{
    512'h4fec0ec541e89a911bbcc5f4b104fb17e1dece4169316b1db6c21efff4c569befac8a2fa7407903f0f06834bfcc88fd5876bb95aad79d917802c9d6ff7f2ec90,
    512'hac27851b8bd063a58dbf0127dbe8a6a532e8b134ab5636969cbf1f84e8f8f82d6a524b7ecea4563d04d6552d00c7aa5ce2944013b62091fc7b248ee5038478af,
    512'h2e3eea5c465c518545e5cfd344865933f96ba52932cf682d3dbba1ebdde4a6b10ce043b30d21e3fb43fd041777e1cd9e8bc40ccc3dafd6a0910630ce420fe013,
    512'h3d2ae5e72f868b38efd205f6aa4bf66a0ad86cf4213087ae0e684ef4a3d22536529c65fbc4bbf102f3136eded7fbda8cfcec8afb14b727c33a3a8bd766ea5716,
    512'hb4ea4708468e905ef125cf7e2fcd4e0030fafcb5a8ef5ea26fbe1448977d8cf3868049cfa8c6c790259f93bf88c75a7e6edf6a942990cede3d9db4eec4d7087c,
    512'h23a2f7d58ac48dc8367e37e8cc566299b829bc904aaa564d199a491a45341897526dacce283d19866dc92af0fcf7f32a4b9645ab39fd2a9f9193a29013730dee,
    512'hacaa2c260355c4a538bed888a6dbb79b5f4d15a94da19644d566c1209444c502a5d30b098afa6b0522724dfb27318d68f02fbbb216e7fccd61854cc01e9371f3,
    512'he76d5cf08a15a173855c2afaea4c0569b8aa208890acdc90899ef2c13e41681a0afe49b7f3172e09010cd417d855c677ab67f19e05180875a74d807e415ad52a,
    512'head6b8cb93a3b6c3eda648e7f67e606224153354d7e613aad81a55c900c942a872122d6703dcad1bf64ad2061903f1fc47e0f9cc0011a515adc0aa823b879f8e,
    512'hef535b389f9b775b863486813eab9f77e3257fa16f4bdd0810bafeb12408966acdb0500061e46c12b915756ac37d7e1b3f5c879c26c28b02654edbf590cdfa5b,
    512'habe8de54510b76ae625ccb357a31f64ca32ea2d8d84232bb6f65dc1fc6e87b7ec6e01f21e264d63b26c58020b1baba7098e6a1cf8fd86ec64d6281ba6a86cc4b};

  logic        clk = 1'b0;
  logic        rst;
  logic [63:0] din, dout;
  logic        src_ready, src_read, dst_write, dst_ready;
  int          checks = 0, failures = 0;
  int          cycle = 0;
  bit          stall_src = 1'b0, stall_dst = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  jh512_core dut (.clk, .rst, .din, .src_ready, .src_read, .dout, .dst_write, .dst_ready);

  function automatic logic [7:0] mbyte(input int len, input int k);
    return 8'((31*k + 7*len + 5) % 256);
  endfunction

  function automatic int expected_latency(input int len);
    int words;
    words = (len + 7) / 8;
    return 42 + words + 44*((len%64==0)?(len/64+1):(len/64+2)) + 1;
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
