// tb_sha256_core: self-checking testbench of the SHA-256 core.
//
// Hashes 11 messages of lengths 0, 5, 55, 56, 64, 71, 72, 80, 119, 143, 200 bytes, chosen to hit
// every padding case (empty, partial block, exact block, block plus one byte,
// several blocks). Message byte k of a message of length len is
// (31*k + 7*len + 5) mod 256. The expected digests were computed with an
// independent software model of SHA-256 (checked against the published
// empty-message digest) and are written here as 512-bit constants (zero-extended), digest
// byte k in bits [8k+:8]. Pass 1 runs with source and sink always ready and
// also checks the latency from header acceptance to the first output word
// against the core's documented cycle budget; pass 2 repeats the messages
// with random gaps on src_ready and random back-pressure on dst_ready.
module tb_sha256_core;
  localparam int NMSG = 11;
  localparam int NW   = 4;      // digest words after the header
  localparam int LENS [NMSG] = '{0, 5, 55, 56, 64, 71, 72, 80, 119, 143, 200};
  localparam logic [511:0] EXP [NMSG] = '{
    512'h000000000000000000000000000000000000000000000000000000000000000055b852781b9995a44c939b64e441ae2724b96f99c8f4fb9a141cfc9842c4b0e3,
    512'h00000000000000000000000000000000000000000000000000000000000000009c057a8d1342d451a30e214a6b9552606fa60f30b94f80aee71a7ab519ce32c1,
    512'h00000000000000000000000000000000000000000000000000000000000000000e3100e35919d4b1caf8bc37b581e3f01879f8c6b7c7f43e2c3d13576cbde7ef,
    512'h000000000000000000000000000000000000000000000000000000000000000051d05313f36b2af861e8b353aecc63702709785e050fd09c3558e10311821869,
    512'h00000000000000000000000000000000000000000000000000000000000000001598a07a66bc772e0d259ed5fdfb066c62e2045a8b0317a3a7f279c204c3b76f,
    512'h00000000000000000000000000000000000000000000000000000000000000000044f81f125868ceb06c0111ac72d4891f80fc3f40771b0c87c213b7ff8644c4,
    512'h000000000000000000000000000000000000000000000000000000000000000038a5aef1dde2b4b671ead90474d4fe02a69153f287f7c83ceda297598f34a1d1,
    512'h000000000000000000000000000000000000000000000000000000000000000022feaee85007918f502c77ce7a6a6f106cfbe225fea747201967cfe51cee23ff,
    512'h00000000000000000000000000000000000000000000000000000000000000000473e9882c21214b9cf5a2133013ee07377c46a09f052622d2c7e443cfd28cf0,
    512'h0000000000000000000000000000000000000000000000000000000000000000f4ad3c4f74267414f994ad1f88421d4c49a0b99e1c060b237d995708e4d67cf5,
    512'h00000000000000000000000000000000000000000000000000000000000000002199e8c79012a78e980579e76fc10148ad8ed29fb76bd92ad0583d2173f28eba};

  logic        clk = 1'b0;
  logic        rst;
  logic [63:0] din, dout;
  logic        src_ready, src_read, dst_write, dst_ready;
  int          checks = 0, failures = 0;
  int          cycle = 0;
  bit          stall_src = 1'b0, stall_dst = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  sha256_core dut (.clk, .rst, .din, .src_ready, .src_read, .dout, .dst_write, .dst_ready);

  function automatic logic [7:0] mbyte(input int len, input int k);
    return 8'((31*k + 7*len + 5) % 256);
  endfunction

  function automatic int expected_latency(input int len);
    int words;
    words = (len + 7) / 8;
    return words + 66*((len%64<56)?(len/64+1):(len/64+2)) + 1;
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
