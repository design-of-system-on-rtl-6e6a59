// sha256_core: SHA-256 hash core (FIPS 180-4) with the same 64-bit word
// stream interface as the X11 cores, for the SoC's standalone hash module.
//
// Words are packed into a 64-byte block; at the end of the message the
// padding (a 0x80 byte, zeros, the 64-bit big-endian bit length) is added,
// spilling into one more block when fewer than 9 bytes are free. Each block
// runs the 64-round compression, one round per clock, with the message
// schedule kept as a 16-word sliding window. The constants are computed at
// elaboration from their definition: K[t] is the fractional part of the
// cube root of the t-th prime, H0[i] that of the square root of the i-th
// prime, both taken to 32 bits via exact integer roots.
//
// Interface: din/src_ready/src_read and dout/dst_write/dst_ready as in the
// X11 cores (src_read = able to accept AND src_ready; dst_write = word
// valid, taken with dst_ready). Framing: header = message length in bytes,
// then the data words, message byte k in bits [8*(k%8)+:8]; output =
// header 32, then 4 words holding digest bytes 0..31 the same way.
// Timing: 1 cycle per input word, per block 1 + 1 + 64 cycles, then 5
// output words. rst is synchronous, active high.
module sha256_core
  import x11_pkg::byte_mask;
#(
  parameter int unsigned ROUNDS = 64
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [63:0]   din,
  input  logic          src_ready,
  output logic          src_read,
  output logic [63:0]   dout,
  output logic          dst_write,
  input  logic          dst_ready
);
  typedef logic [31:0] k_t [64];
  typedef logic [31:0] h_t [8];
  typedef enum logic [2:0] {S_HDR, S_LOAD, S_ABSORB, S_RUN, S_OUT} state_e;
  typedef enum logic [1:0] {M_DATA, M_PAD, M_FINAL} mode_e;

  function automatic int nth_prime(input int n);
    int cnt, p;
    bit is_p;
    cnt = -1;
    p = 1;
    while (cnt < n) begin
      p++;
      is_p = 1'b1;
      for (int d = 2; d * d <= p; d++) if (p % d == 0) is_p = 1'b0;
      if (is_p) cnt++;
    end
    return p;
  endfunction

  // floor(v ** (1/k)) for k = 2 or 3, by bisection on the result bits.
  function automatic logic [127:0] iroot(input logic [127:0] v, input int k);
    logic [127:0] r, c, pw;
    r = '0;
    for (int b = 40; b >= 0; b--) begin
      c = r | (128'd1 << b);
      pw = (k == 2) ? c * c : c * c * c;
      if (pw <= v) r = c;
    end
    return r;
  endfunction

  function automatic k_t gen_k();
    k_t k;
    for (int t = 0; t < 64; t++) k[t] = 32'(iroot(128'(nth_prime(t)) << 96, 3));
    return k;
  endfunction

  function automatic h_t gen_h0();
    h_t h;
    for (int i = 0; i < 8; i++) h[i] = 32'(iroot(128'(nth_prime(i)) << 64, 2));
    return h;
  endfunction

  localparam k_t K  = gen_k();
  localparam h_t H0 = gen_h0();

  function automatic logic [31:0] ror(input logic [31:0] x, input int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic logic [31:0] bswap32(input logic [31:0] x);
    return {x[7:0], x[15:8], x[23:16], x[31:24]};
  endfunction

  state_e       st;
  mode_e        mode;
  h_t           h;
  logic [31:0]  a, b, c, d, e, f, g, hh;
  logic [31:0]  w [16];
  logic [511:0] blk;
  logic [63:0]  msglen, rem;
  logic [6:0]   nbytes;
  logic         need_len;
  logic [6:0]   rnd;
  logic [2:0]   oidx;
  logic [3:0]   take;

  assign take      = (rem >= 64'd8) ? 4'd8 : rem[3:0];
  assign src_read  = src_ready && (st == S_HDR ||
                     (st == S_LOAD && rem != '0 && nbytes < 7'd64));
  assign dst_write = (st == S_OUT);

  // Handshake rules: a word is read only when offered, and an offered output
  // word stays unchanged until the sink takes it.
  a_read_offered: assert property (@(posedge clk) disable iff (rst) src_read |-> src_ready);
  a_out_held:     assert property (@(posedge clk) disable iff (rst)
                                   dst_write && !dst_ready |=> dst_write && $stable(dout));
  always_comb begin
    if (oidx == 3'd0) dout = 64'd32;
    else dout = {bswap32(h[2*(int'(oidx)-1)+1]), bswap32(h[2*(int'(oidx)-1)])};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_HDR; mode <= M_DATA;
      h <= H0;
      {a, b, c, d, e, f, g, hh} <= '0;
      for (int i = 0; i < 16; i++) w[i] <= '0;
      blk <= '0; msglen <= '0; rem <= '0; nbytes <= '0; need_len <= 1'b0;
      rnd <= '0; oidx <= '0;
    end else begin
      unique case (st)
        S_HDR: if (src_read) begin
          h <= H0;
          blk <= '0;
          msglen <= din; rem <= din; nbytes <= '0; need_len <= 1'b0;
          st <= S_LOAD;
        end
        S_LOAD: begin
          if (rem == '0 || nbytes == 7'd64) st <= S_ABSORB;
          else if (src_read) begin
            blk[8*nbytes +: 64] <= din & byte_mask(take);
            nbytes <= nbytes + 7'(take);
            rem    <= rem - 64'(take);
          end
        end
        S_ABSORB: begin
          logic [511:0] pb;
          logic [63:0]  bits;
          pb = blk;
          bits = msglen << 3;
          if (nbytes == 7'd64) mode <= M_DATA;
          else begin
            if (!need_len) pb[8*nbytes +: 8] = 8'h80;
            if (nbytes < 7'd56) begin
              for (int i = 0; i < 8; i++) pb[8*(56+i) +: 8] = bits[8*(7-i) +: 8];
              mode <= M_FINAL;
            end else mode <= M_PAD;
          end
          for (int t = 0; t < 16; t++)
            w[t] <= {pb[32*t +: 8], pb[32*t+8 +: 8], pb[32*t+16 +: 8], pb[32*t+24 +: 8]};
          {a, b, c, d, e, f, g, hh} <= {h[0], h[1], h[2], h[3], h[4], h[5], h[6], h[7]};
          rnd <= '0;
          st <= S_RUN;
        end
        S_RUN: begin
          logic [31:0] t1, t2, s0, s1, wn;
          t1 = hh + (ror(e, 6) ^ ror(e, 11) ^ ror(e, 25)) + ((e & f) ^ (~e & g))
               + K[rnd[5:0]] + w[0];
          t2 = (ror(a, 2) ^ ror(a, 13) ^ ror(a, 22)) + ((a & b) ^ (a & c) ^ (b & c));
          s0 = ror(w[1], 7) ^ ror(w[1], 18) ^ (w[1] >> 3);
          s1 = ror(w[14], 17) ^ ror(w[14], 19) ^ (w[14] >> 10);
          wn = s1 + w[9] + s0 + w[0];
          for (int i = 0; i < 15; i++) w[i] <= w[i+1];
          w[15] <= wn;
          hh <= g; g <= f; f <= e; e <= d + t1;
          d <= c; c <= b; b <= a; a <= t1 + t2;
          rnd <= rnd + 7'd1;
          if (rnd == 7'(ROUNDS - 1)) begin
            h[0] <= h[0] + t1 + t2; h[1] <= h[1] + a; h[2] <= h[2] + b; h[3] <= h[3] + c;
            h[4] <= h[4] + d + t1;  h[5] <= h[5] + e; h[6] <= h[6] + f; h[7] <= h[7] + g;
            blk <= '0;
            nbytes <= '0;
            oidx <= '0;
            need_len <= (mode == M_PAD);
            st <= (mode == M_FINAL) ? S_OUT : S_LOAD;
          end
        end
        S_OUT: if (dst_ready) begin
          oidx <= oidx + 3'd1;
          if (oidx == 3'd4) st <= S_HDR;
        end
        default: st <= S_HDR;
      endcase
    end
  end

endmodule
