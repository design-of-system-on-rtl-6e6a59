// keccak512_core: Keccak-512 hash core (the SHA-3 competition version with
// the original 0x01 ... 0x80 padding, as used by X11).
//
// Message words are XOR-absorbed into a block buffer of 9 lanes (rate 576
// bits). When the block is full, or the message has ended and the padding is
// applied, the buffer is XORed into lanes 0..8 of the 1600-bit state and
// Keccak-f[1600] runs, one of its 24 rounds per clock. After the last block
// the first 8 lanes are the digest.
//
// Interface (names from the published schematic, semantics this design's):
//   din/src_ready/src_read : src_ready says a word is on din; src_read is
//                            high in the cycle the core takes it
//                            (src_read = able to accept AND src_ready).
//   dout/dst_write/dst_ready: dst_write says a word is on dout; it moves when
//                            dst_ready is high in the same cycle.
//   Stream framing: header word = message length in bytes, then the data
//   words (byte k of the message in bits [8*(k%8)+:8]); output = header 64,
//   then the 8 digest words.
// Timing: 1 cycle per input word, 1 cycle to absorb a block, 24 cycles per
// permutation, then 9 output words at one per cycle. rst is synchronous,
// active high.
module keccak512_core
  import x11_pkg::byte_mask, x11_pkg::DIGEST_BYTES, x11_pkg::DIGEST_WORDS;
#(
  parameter int unsigned ROUNDS = 24
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
  localparam int unsigned RATE_W = 9;          // lanes per block
  localparam int unsigned RATE_B = 8*RATE_W;   // bytes per block

  typedef logic [63:0] lanes_t [25];
  typedef logic [63:0] rc_t [24];
  typedef enum logic [2:0] {S_HDR, S_LOAD, S_ABSORB, S_RUN, S_OUT} state_e;

  // Round constants from the degree-8 LFSR of the Keccak specification.
  function automatic logic lfsr_bit(input int t);
    logic [7:0] r;
    r = 8'h01;
    for (int k = 0; k < t; k++) r = {r[6:0], 1'b0} ^ (r[7] ? 8'h71 : 8'h00);
    return r[0];
  endfunction

  function automatic rc_t gen_rc();
    rc_t c;
    logic [63:0] v;
    for (int i = 0; i < 24; i++) begin
      v = '0;
      for (int j = 0; j < 7; j++) v[(1<<j)-1] = lfsr_bit(j + 7*i);
      c[i] = v;
    end
    return c;
  endfunction
  localparam rc_t RC = gen_rc();

  // Rotation offsets r[x][y], indexed as x + 5*y.
  localparam int ROT [25] = '{ 0,  1, 62, 28, 27,
                              36, 44,  6, 55, 20,
                               3, 10, 43, 25, 39,
                              41, 45, 15, 21,  8,
                              18,  2, 61, 56, 14};

  function automatic logic [63:0] rol(input logic [63:0] v, input int n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  function automatic lanes_t round_f(input lanes_t a, input logic [63:0] rc);
    logic [63:0] c [5];
    logic [63:0] d [5];
    lanes_t b, e;
    for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ rol(c[(x+1)%5], 1);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rol(a[x+5*y] ^ d[x], ROT[x+5*y]);
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++)
        e[x+5*y] = b[x+5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    e[0] = e[0] ^ rc;
    return e;
  endfunction

  state_e      st;
  lanes_t      a;
  logic [63:0] blk [RATE_W];
  logic [63:0] rem;        // message bytes still to come
  logic [6:0]  nbytes;     // bytes held in blk
  logic        last_blk;
  logic [4:0]  rnd;
  logic [3:0]  oidx;
  logic [3:0]  take;

  assign take      = (rem >= 64'd8) ? 4'd8 : rem[3:0];
  assign src_read  = src_ready && (st == S_HDR ||
                     (st == S_LOAD && rem != '0 && nbytes < 7'(RATE_B)));
  assign dst_write = (st == S_OUT);

  // Handshake rules: a word is read only when offered, and an offered output
  // word stays unchanged until the sink takes it.
  a_read_offered: assert property (@(posedge clk) disable iff (rst) src_read |-> src_ready);
  a_out_held:     assert property (@(posedge clk) disable iff (rst)
                                   dst_write && !dst_ready |=> dst_write && $stable(dout));
  assign dout      = (oidx == 4'd0) ? 64'(DIGEST_BYTES) : a[5'(oidx) - 5'd1];

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_HDR;
      rem <= '0;
      nbytes <= '0;
      last_blk <= 1'b0;
      rnd <= '0;
      oidx <= '0;
      for (int i = 0; i < 25; i++) a[i] <= '0;
      for (int i = 0; i < RATE_W; i++) blk[i] <= '0;
    end else begin
      unique case (st)
        S_HDR: if (src_read) begin
          rem    <= din;
          nbytes <= '0;
          for (int i = 0; i < 25; i++) a[i] <= '0;
          for (int i = 0; i < RATE_W; i++) blk[i] <= '0;
          st <= S_LOAD;
        end
        S_LOAD: begin
          if (rem == '0 || nbytes == 7'(RATE_B)) st <= S_ABSORB;
          else if (src_read) begin
            blk[nbytes[6:3]] <= din & byte_mask(take);
            nbytes <= nbytes + 7'(take);
            rem    <= rem - 64'(take);
          end
        end
        S_ABSORB: begin
          // A block that ends the message (room left for padding) is the last.
          logic [63:0] pb [RATE_W];
          logic        fin;
          fin = (rem == '0) && (nbytes < 7'(RATE_B));
          for (int i = 0; i < RATE_W; i++) pb[i] = blk[i];
          if (fin) begin
            pb[nbytes[6:3]][8*nbytes[2:0] +: 8] = pb[nbytes[6:3]][8*nbytes[2:0] +: 8] ^ 8'h01;
            pb[RATE_W-1][63:56] = pb[RATE_W-1][63:56] ^ 8'h80;
          end
          for (int i = 0; i < RATE_W; i++) a[i] <= a[i] ^ pb[i];
          last_blk <= fin;
          rnd <= '0;
          st  <= S_RUN;
        end
        S_RUN: begin
          a   <= round_f(a, RC[rnd]);
          rnd <= rnd + 5'd1;
          if (rnd == 5'(ROUNDS - 1)) begin
            nbytes <= '0;
            for (int i = 0; i < RATE_W; i++) blk[i] <= '0;
            oidx <= '0;
            st   <= last_blk ? S_OUT : S_LOAD;
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
