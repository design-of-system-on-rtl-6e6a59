// tb_skein512_core: self-checking testbench of the Skein-512-512 core.
//
// Hashes 11 messages of lengths 0, 5, 55, 56, 64, 71, 72, 80, 119, 143, 200 bytes, chosen to hit
// every padding case (empty, partial block, exact block, block plus one byte,
// several blocks). Message byte k of a message of length len is
// (31*k + 7*len + 5) mod 256. The expected digests were computed with an
// independent software model of Skein-512-512 (checked against the published
// empty-message digest) and are written here as 512-bit constants (zero-extended), digest
// byte k in bits [8k+:8]. Pass 1 runs with source and sink always ready and
// also checks the latency from header acceptance to the first output word
// against the core's documented cycle budget; pass 2 repeats the messages
// with random gaps on src_ready and random back-pressure on dst_ready.
module tb_skein512_core;
  localparam int NMSG = 11;
  localparam int NW   = 8;      // digest words after the header
  localparam int LENS [NMSG] = '{0, 5, 55, 56, 64, 71, 72, 80, 119, 143, 200};
  localparam logic [511:0] EXP [NMSG] = '{
    512'h7aba2ce7d9d1a44e3370c0fc2d56851f0cb8bd0d73d3a2a7fe6465d00379ca1ff46aa00fafa437adbb33a7cb95232157623dae774263cc90c2195592504c5bbc,
    512'h840a69e555637bcf899e0ea8c725fce8c9f8b29b0a4d8feea2817e34ffbcf780578dd06899680c521ced437df1a17134d41e7f186a0d365f47d75f12fc141d24,
    512'h906893d8e9be7d5e32eac159b7e99f54aa4341db4a98dffdf92ccd58c90e26f60f5bdd1e90218d02a5369a6ac6aaf590c896db76395f26127bc73ef7f245986b,
    512'h5290d7330698e4bd52a3e86078f47c4fe5ee2c6f59debb171e7c1c2d501bae23bec2eb9beee2adad36709c1cbc588b0c6a18742293b5c977f27b2996259739a8,
    512'h00f4458ab9114529d9b526d39a7c56e0ea257fd78291f33604258a8e9408dafae3f24475df31602ccd0bcf2cce0128f50b77dab67e2b187a8c6126a8e4b628ba,
    512'h61262c788c161bcf4343f537f3198524b756dc87eb8442cb6a330c52fedd158431fd842f922b261a5495d0133abad3e8dda464ea5bc26045db71f69370cf22be,
    512'hcb469b99ef722c4ad539f7a1ce0b76db5958df93e9bb560037df5900fbef326b7cacc4884ee7549337748dfc3c69048c0d29642d8ac3716f2bf1bb26adcb4b50,
    512'hbce0cff19e0899280b5a938984081314ec9440f9e9ba6186ae939f5f3258761406e171a8ef931f72c4c69314ebba6ef874c31abb1a4df0a16f947bcebbeacb8d,
    512'hf3caa8ed39b6232affe43a9337fcd92354adb36579141e7d8705ce8d6e97d3b2492d17cca7d5466175c779040e2b8a74bf5734f69b5b2d886d814988fd0067f4,
    512'h13a35606d9a5dee6441132e442315fc70ea7d5ef1e77c6d7ab481dc4f7f33a56df0009228f79741df6e0d6f8fa980132de1a749a8fe026f3a593aa32ba9df408,
    512'hed2252ddff415b0e3c684ae9bed4d74ae723396716f974953abcb9b3620bf100390ad2abbc09fd6ec6e6fc289861c911c37393088eb8b8fc04541ffc91b1d189};

  logic        clk = 1'b0;
  logic        rst;
  logic [63:0] din, dout;
  logic        src_ready, src_read, dst_write, dst_ready;
  int          checks = 0, failures = 0;
  int          cycle = 0;
  bit          stall_src = 1'b0, stall_dst = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  skein512_core dut (.clk, .rst, .din, .src_ready, .src_read, .dout, .dst_write, .dst_ready);

  function automatic logic [7:0] mbyte(input int len, input int k);
    return 8'((31*k + 7*len + 5) % 256);
  endfunction

  function automatic int expected_latency(input int len);
    int words;
    words = (len + 7) / 8;
    return words + 74*((len==0)?1:(len+63)/64) + 73;
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
