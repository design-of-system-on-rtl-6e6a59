// jh512_core: JH-512 hash core (round-3 JH, the version chained by X11).
//
// JH keeps a 1024-bit state H. Each 512-bit message block M is XORed into
// the first half of H, the bijection E8 runs, and M is XORed into the second
// half. E8 first regroups H into 256 4-bit elements (bit i, i+256, i+512 and
// i+768 of H form one element), then runs 42 rounds, one per clock: every
// element passes one of two 4-bit S-boxes chosen by a bit of the round
// constant, neighbouring pairs pass the linear map L (an MDS code over
// GF(2^4)), and the permutation P8 (swap, shuffle, swap) reorders them. The
// 256-bit round constant is itself advanced each round by the same round
// function over 64 elements with S-box S0 only, starting from the fractional
// part of sqrt(2). After round 42 the elements are degrouped into H.
// The initial H is computed by the core itself: H(-1) = 0x0200 followed by
// zeros, compressed once with an all-zero block (43 cycles per message).
// Padding: a 1 bit, zeros, and the 128-bit big-endian bit length, at least
// 512 bits in all; the digest is the last 512 bits of H.
//
// Interface (names from the published schematic, semantics this design's):
//   din/src_ready/src_read : src_read = able to accept AND src_ready.
//   dout/dst_write/dst_ready: dst_write = word on dout; moves with dst_ready.
//   Stream framing: header = message length in bytes, then the data words
//   (byte k of the message in bits [8*(k%8)+:8]); output = header 64, then
//   the 8 digest words, digest byte k in bits [8*(k%8)+:8].
// Timing: 42 cycles for the initial value, 1 cycle per input word, per block
// 1 + 1 + 42 cycles, then 9 output words. rst is synchronous, active high.
module jh512_core
  import x11_pkg::byte_mask, x11_pkg::DIGEST_BYTES, x11_pkg::DIGEST_WORDS;
#(
  parameter int unsigned ROUNDS = 42
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
  typedef logic [255:0][3:0] elem_t;   // 256 4-bit elements
  typedef logic [63:0][3:0]  rcon_t;   // 64 4-bit elements
  typedef enum logic [2:0] {S_HDR, S_LOAD, S_ABSORB, S_RUN, S_OUT} state_e;
  typedef enum logic [1:0] {M_INIT, M_DATA, M_PAD, M_FINAL} mode_e;

  localparam logic [255:0] RC0 =
    256'h6a09e667f3bcc908b2fb1366ea957d3e3adec17512775099da2f590b0667322a;
  localparam logic [3:0] SB0 [16] = '{4'd9, 4'd0, 4'd4, 4'd11, 4'd13, 4'd12, 4'd3, 4'd15,
                                      4'd1, 4'd10, 4'd2, 4'd6, 4'd7, 4'd5, 4'd8, 4'd14};
  localparam logic [3:0] SB1 [16] = '{4'd3, 4'd12, 4'd6, 4'd13, 4'd5, 4'd7, 4'd1, 4'd9,
                                      4'd15, 4'd2, 4'd0, 4'd4, 4'd11, 4'd10, 4'd14, 4'd8};

  // Bit i of H in the algorithm's numbering: MSB first within byte i/8,
  // byte b held in h[8*b +: 8].
  function automatic int hpos(input int i);
    return 8*(i/8) + 7 - (i%8);
  endfunction

  function automatic elem_t group(input logic [1023:0] h);
    elem_t a;
    for (int i = 0; i < 128; i++) begin
      a[2*i]   = {h[hpos(i)],     h[hpos(i+256)], h[hpos(i+512)], h[hpos(i+768)]};
      a[2*i+1] = {h[hpos(i+128)], h[hpos(i+384)], h[hpos(i+640)], h[hpos(i+896)]};
    end
    return a;
  endfunction

  function automatic logic [1023:0] degroup(input elem_t a);
    logic [1023:0] h;
    for (int i = 0; i < 128; i++) begin
      {h[hpos(i)],     h[hpos(i+256)], h[hpos(i+512)], h[hpos(i+768)]} = a[2*i];
      {h[hpos(i+128)], h[hpos(i+384)], h[hpos(i+640)], h[hpos(i+896)]} = a[2*i+1];
    end
    return h;
  endfunction

  // Linear map L on an element pair: GF(2^4) multiply by 2 is (x<<1)^(x>>3 & x^2 term).
  function automatic logic [3:0] mul2(input logic [3:0] x);
    return {x[2:0], 1'b0} ^ {2'b00, x[3], x[3]};
  endfunction

  // Round over n elements: S-box layer (select bits sel), L on pairs, P_n.
  function automatic elem_t round8(input elem_t a, input rcon_t rc);
    elem_t t, p;
    for (int i = 0; i < 256; i++)
      t[i] = rc[63 - i/4][3 - i%4] ? SB1[a[i]] : SB0[a[i]];
    for (int i = 0; i < 256; i += 2) begin
      t[i+1] = t[i+1] ^ mul2(t[i]);
      t[i]   = t[i]   ^ mul2(t[i+1]);
    end
    for (int i = 0; i < 256; i += 4) {t[i+2], t[i+3]} = {t[i+3], t[i+2]};
    for (int i = 0; i < 128; i++) begin
      p[i]     = t[2*i];
      p[i+128] = t[2*i+1];
    end
    for (int i = 128; i < 256; i += 2) {p[i], p[i+1]} = {p[i+1], p[i]};
    return p;
  endfunction

  function automatic rcon_t next_rc(input rcon_t rc);
    logic [3:0] t [64];
    logic [3:0] p [64];
    rcon_t r;
    // rc element n is hex digit n of the constant: rc[63-n] in packed order.
    for (int n = 0; n < 64; n++) t[n] = SB0[rc[63-n]];
    for (int n = 0; n < 64; n += 2) begin
      t[n+1] = t[n+1] ^ mul2(t[n]);
      t[n]   = t[n]   ^ mul2(t[n+1]);
    end
    for (int n = 0; n < 64; n += 4) {t[n+2], t[n+3]} = {t[n+3], t[n+2]};
    for (int n = 0; n < 32; n++) begin
      p[n]    = t[2*n];
      p[n+32] = t[2*n+1];
    end
    for (int n = 32; n < 64; n += 2) {p[n], p[n+1]} = {p[n+1], p[n]};
    for (int n = 0; n < 64; n++) r[63-n] = p[n];
    return r;
  endfunction

  function automatic logic [63:0] bswap(input logic [63:0] x);
    logic [63:0] y;
    for (int b = 0; b < 8; b++) y[8*b +: 8] = x[8*(7-b) +: 8];
    return y;
  endfunction

  state_e         st;
  mode_e          mode;
  logic [1023:0]  hs;
  elem_t          grp;
  rcon_t          rc;
  logic [511:0]   blk;
  logic [63:0]    msglen, rem;
  logic [6:0]     nbytes;
  logic           need_len;
  logic [5:0]     rnd;
  logic [3:0]     oidx;
  logic [3:0]     take;
  elem_t          grp_next;

  assign take      = (rem >= 64'd8) ? 4'd8 : rem[3:0];
  assign src_read  = src_ready && (st == S_HDR ||
                     (st == S_LOAD && rem != '0 && nbytes < 7'd64));
  assign dst_write = (st == S_OUT);

  // Handshake rules: a word is read only when offered, and an offered output
  // word stays unchanged until the sink takes it.
  a_read_offered: assert property (@(posedge clk) disable iff (rst) src_read |-> src_ready);
  a_out_held:     assert property (@(posedge clk) disable iff (rst)
                                   dst_write && !dst_ready |=> dst_write && $stable(dout));
  assign dout      = (oidx == 4'd0) ? 64'(DIGEST_BYTES) : hs[512 + 64*(int'(oidx) - 1) +: 64];
  assign grp_next  = round8(grp, rc);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_HDR; mode <= M_INIT;
      hs <= '0; grp <= '0; rc <= RC0; blk <= '0;
      msglen <= '0; rem <= '0; nbytes <= '0; need_len <= 1'b0;
      rnd <= '0; oidx <= '0;
    end else begin
      unique case (st)
        S_HDR: if (src_read) begin
          // H(-1): hash length 512 as a big-endian 16-bit value, then zeros.
          logic [1023:0] h0;
          h0 = '0;
          h0[15:0] = 16'h0002;
          hs <= h0;
          grp <= group(h0);
          rc <= RC0;
          blk <= '0;
          msglen <= din; rem <= din; nbytes <= '0; need_len <= 1'b0;
          mode <= M_INIT; rnd <= '0;
          st <= S_RUN;
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
          pb = blk;
          if (nbytes == 7'd64) begin
            mode <= M_DATA;
          end else if (nbytes != '0) begin
            pb[8*nbytes +: 8] = 8'h80;          // the 1 bit after the message
            mode <= M_PAD;
          end else begin
            if (!need_len) pb[7:0] = 8'h80;     // aligned message: 1 bit here
            pb[511:448] = bswap(msglen << 3);   // bit length, big-endian
            mode <= M_FINAL;
          end
          blk <= pb;
          grp <= group(hs ^ {512'd0, pb});
          rc  <= RC0;
          rnd <= '0;
          st  <= S_RUN;
        end
        S_RUN: begin
          grp <= grp_next;
          rc  <= next_rc(rc);
          rnd <= rnd + 6'd1;
          if (rnd == 6'(ROUNDS - 1)) begin
            hs <= degroup(grp_next) ^ {blk, 512'd0};
            blk <= '0;
            nbytes <= '0;
            oidx <= '0;
            need_len <= (mode == M_PAD);
            st <= (mode == M_FINAL) ? S_OUT : S_LOAD;
          end
        end
        S_OUT: if (dst_ready) begin
          oidx <= oidx + 4'd1;
          if (oidx == 4'(DIGEST_WORDS)) st <= S_HDR;
        end
        default: st <= S_HDR;
      endcase
    end
  end

endmodule
