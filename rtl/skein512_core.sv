// skein512_core: Skein-512-512 hash core (Skein 1.3, the version chained by
// X11).
//
// Skein is a chain of UBI blocks. Each 64-byte message block is encrypted by
// the Threefish-512 tweakable block cipher, keyed by the chaining value H and
// tweaked by the byte position and the first/final/type flags, and the
// result XOR the block becomes the new H. After the last message block one
// more UBI block (type "output", an 8-byte zero counter) yields the digest.
// H starts at the Skein-512-512 initial value, i.e. the result of the
// configuration UBI block ("SHA3" schema, version 1, 512-bit output), stored
// here as a constant. Threefish runs one of its 72 rounds per clock: four
// MIX operations (add, rotate, xor) and the word permutation; the subkey is
// added before round 0 and after every fourth round.
//
// Interface (names from the published schematic, semantics this design's):
//   din/src_ready/src_read : src_read = able to accept AND src_ready.
//   dout/dst_write/dst_ready: dst_write = word on dout; moves with dst_ready.
//   Stream framing: header = message length in bytes, then the data words
//   (byte k of the message in bits [8*(k%8)+:8]); output = header 64, then
//   the 8 digest words (little-endian bytes, as the algorithm defines them).
// Timing: 1 cycle per input word, per block 1 + 1 + 72 cycles, plus 73 for
// the output block, then 9 output words. rst is synchronous, active high.
module skein512_core
  import x11_pkg::byte_mask, x11_pkg::DIGEST_BYTES, x11_pkg::DIGEST_WORDS;
#(
  parameter int unsigned ROUNDS = 72
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
  typedef logic [63:0] w8_t [8];
  typedef enum logic [2:0] {S_HDR, S_LOAD, S_ABSORB, S_RUN, S_OUT} state_e;

  localparam logic [63:0] C240 = 64'h1BD11BDAA9FC1A22;
  localparam w8_t IV = '{64'h4903ADFF749C51CE, 64'h0D95DE399746DF03,
                         64'h8FD1934127C79BCE, 64'h9A255629FF352CB1,
                         64'h5DB62599DF6CA7B0, 64'hEABE394CA9D5C3F4,
                         64'h991112C71A75B523, 64'hAE18A40B660FCC33};
  localparam logic [5:0] T_MSG = 6'd48;
  localparam logic [5:0] T_OUT = 6'd63;
  // Threefish-512 rotation constants R[d mod 8][j] and word permutation.
  localparam int ROT [8][4] = '{'{46, 36, 19, 37}, '{33, 27, 14, 42},
                                '{17, 49, 36, 39}, '{44,  9, 54, 56},
                                '{39, 30, 34, 24}, '{13, 50, 10, 17},
                                '{25, 29, 39, 43}, '{ 8, 35, 56, 22}};
  localparam int PERM [8] = '{2, 1, 4, 7, 6, 5, 0, 3};

  function automatic logic [63:0] rol(input logic [63:0] v, input int n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  // Subkey s from the extended key k[0..8] and tweak t[0..2].
  function automatic w8_t subkey(input logic [63:0] k [9], input logic [63:0] t [3],
                                 input logic [4:0] s);
    w8_t r;
    for (int i = 0; i < 8; i++) r[i] = k[(int'(s) + i) % 9];
    r[5] = r[5] + t[int'(s) % 3];
    r[6] = r[6] + t[(int'(s) + 1) % 3];
    r[7] = r[7] + 64'(s);
    return r;
  endfunction

  function automatic w8_t tf_round(input w8_t v, input logic [2:0] d8);
    w8_t f, r;
    for (int j = 0; j < 4; j++) begin
      f[2*j]   = v[2*j] + v[2*j+1];
      f[2*j+1] = rol(v[2*j+1], ROT[d8][j]) ^ f[2*j];
    end
    for (int i = 0; i < 8; i++) r[i] = f[PERM[i]];
    return r;
  endfunction

  state_e      st;
  w8_t         h, blk, v;
  logic [63:0] k [9];
  logic [63:0] t [3];
  logic [63:0] rem, pos;
  logic [6:0]  nbytes;
  logic        first, fin, out_phase;
  logic [6:0]  rnd;
  logic [3:0]  oidx;
  logic [3:0]  take;

  assign take      = (rem >= 64'd8) ? 4'd8 : rem[3:0];
  assign src_read  = src_ready && (st == S_HDR ||
                     (st == S_LOAD && rem != '0 && nbytes < 7'd64));
  assign dst_write = (st == S_OUT);

  // Handshake rules: a word is read only when offered, and an offered output
  // word stays unchanged until the sink takes it.
  a_read_offered: assert property (@(posedge clk) disable iff (rst) src_read |-> src_ready);
  a_out_held:     assert property (@(posedge clk) disable iff (rst)
                                   dst_write && !dst_ready |=> dst_write && $stable(dout));
  assign dout      = (oidx == 4'd0) ? 64'(DIGEST_BYTES) : h[3'(oidx - 4'd1)];

  // Next Threefish state, with the subkey added after every fourth round.
  w8_t v_next;
  always_comb begin
    w8_t sk;
    v_next = tf_round(v, rnd[2:0]);
    sk = subkey(k, t, 5'((rnd + 7'd1) >> 2));
    if (rnd[1:0] == 2'd3)
      for (int i = 0; i < 8; i++) v_next[i] = v_next[i] + sk[i];
  end

  // Key schedule and first subkey of a UBI block keyed by `key`.
  task automatic start_block(input w8_t key, input w8_t msg,
                             input logic [63:0] t0, input logic [63:0] t1);
    logic [63:0] kk [9];
    logic [63:0] tt [3];
    w8_t         s0;
    kk[8] = C240;
    for (int i = 0; i < 8; i++) begin
      kk[i] = key[i];
      kk[8] = kk[8] ^ key[i];
    end
    tt[0] = t0; tt[1] = t1; tt[2] = t0 ^ t1;
    s0 = subkey(kk, tt, 5'd0);
    for (int i = 0; i < 9; i++) k[i] <= kk[i];
    for (int i = 0; i < 3; i++) t[i] <= tt[i];
    for (int i = 0; i < 8; i++) v[i] <= msg[i] + s0[i];
    rnd <= '0;
  endtask

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_HDR;
      rem <= '0; pos <= '0; nbytes <= '0;
      first <= 1'b1; fin <= 1'b0; out_phase <= 1'b0;
      rnd <= '0; oidx <= '0;
      for (int i = 0; i < 8; i++) begin h[i] <= '0; blk[i] <= '0; v[i] <= '0; end
      for (int i = 0; i < 9; i++) k[i] <= '0;
      for (int i = 0; i < 3; i++) t[i] <= '0;
    end else begin
      unique case (st)
        S_HDR: if (src_read) begin
          rem <= din; pos <= '0; nbytes <= '0;
          first <= 1'b1; out_phase <= 1'b0;
          h <= IV;
          for (int i = 0; i < 8; i++) blk[i] <= '0;
          st <= S_LOAD;
        end
        S_LOAD: begin
          if (rem == '0 || nbytes == 7'd64) st <= S_ABSORB;
          else if (src_read) begin
            blk[nbytes[5:3]] <= din & byte_mask(take);
            nbytes <= nbytes + 7'(take);
            rem    <= rem - 64'(take);
          end
        end
        S_ABSORB: begin
          // The block that empties the message is the final one.
          start_block(h, blk, pos + 64'(nbytes),
                      {(rem == '0), first, T_MSG, 56'd0});
          pos   <= pos + 64'(nbytes);
          fin   <= (rem == '0);
          first <= 1'b0;
          st    <= S_RUN;
        end
        S_RUN: begin
          for (int i = 0; i < 8; i++) v[i] <= v_next[i];
          rnd <= rnd + 7'd1;
          if (rnd == 7'(ROUNDS - 1)) begin
            w8_t hn;
            for (int i = 0; i < 8; i++) hn[i] = v_next[i] ^ blk[i];
            h <= hn;
            nbytes <= '0;
            for (int i = 0; i < 8; i++) blk[i] <= '0;
            if (out_phase) begin
              oidx <= '0;
              st   <= S_OUT;
            end else if (fin) begin
              // Output UBI block: counter 0, 8 bytes, first and final.
              w8_t zero;
              for (int i = 0; i < 8; i++) zero[i] = '0;
              out_phase <= 1'b1;
              start_block(hn, zero, 64'd8, {1'b1, 1'b1, T_OUT, 56'd0});
            end else begin
              st <= S_LOAD;
            end
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
