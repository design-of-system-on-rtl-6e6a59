// aes128_core: AES-128 block cipher (FIPS 197), encryption and decryption,
// for the SoC's AES module.
//
// Iterative datapath, one round per clock. The round keys are expanded on
// the fly: encryption derives round key r+1 from round key r as it goes;
// decryption first runs the key schedule forward for 10 cycles to reach the
// last round key and then runs it backwards (each earlier key word is the
// XOR of two later ones, and the first word also needs SubWord/RotWord and
// the round constant), so no key storage is needed. The S-box is computed at
// elaboration from its definition: multiplicative inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1 (through log/antilog tables to the generator 3), then the
// affine map with constant 0x63.
//
// Interface: present key, din and decrypt with a one-cycle start while busy
// is low; done pulses for one cycle when dout holds the result, which stays
// until the next start. Byte 0 of every 128-bit value (the first byte of the
// FIPS 197 byte sequence) is bits [127:120].
// Timing: encryption 10 cycles, decryption 20 cycles from start to done.
// rst is synchronous, active high.
module aes128_core (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic         decrypt,
  input  logic [127:0] key,
  input  logic [127:0] din,
  output logic         busy,
  output logic         done,
  output logic [127:0] dout
);
  typedef logic [7:0] sbox_t [256];
  typedef enum logic [1:0] {S_IDLE, S_KEYFWD, S_ENC, S_DEC} state_e;

  function automatic logic [7:0] xtime(input logic [7:0] x);
    return {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] x, input logic [7:0] y);
    logic [7:0] p, a;
    p = '0;
    a = x;
    for (int i = 0; i < 8; i++) begin
      if (y[i]) p = p ^ a;
      a = xtime(a);
    end
    return p;
  endfunction

  // Inverse via log/antilog tables to the generator 3, then the affine map.
  function automatic sbox_t gen_sbox(input bit inverse);
    sbox_t s;
    logic [7:0] ex [256];
    logic [7:0] lg [256];
    logic [7:0] p, b, r;
    p = 8'h01;
    for (int i = 0; i < 256; i++) begin ex[i] = '0; lg[i] = '0; end
    for (int i = 0; i < 255; i++) begin
      ex[i] = p;
      lg[p] = 8'(i);
      p = xtime(p) ^ p;
    end
    for (int x = 0; x < 256; x++) begin
      b = (x == 0) ? 8'h00 : ex[(255 - int'(lg[x])) % 255];
      for (int i = 0; i < 8; i++)
        r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
      r = r ^ 8'h63;
      if (inverse) s[r] = 8'(x);
      else s[x] = r;
    end
    return s;
  endfunction

  localparam sbox_t SBOX  = gen_sbox(1'b0);
  localparam sbox_t ISBOX = gen_sbox(1'b1);

  function automatic logic [31:0] sub_word(input logic [31:0] w);
    return {SBOX[w[31:24]], SBOX[w[23:16]], SBOX[w[15:8]], SBOX[w[7:0]]};
  endfunction

  // Next round key from key k with round constant rc.
  function automatic logic [127:0] key_next(input logic [127:0] k, input logic [7:0] rc);
    logic [31:0] t, n0, n1, n2, n3;
    t  = sub_word({k[23:0], k[31:24]}) ^ {rc, 24'd0};
    n0 = k[127:96] ^ t;
    n1 = k[95:64] ^ n0;
    n2 = k[63:32] ^ n1;
    n3 = k[31:0] ^ n2;
    return {n0, n1, n2, n3};
  endfunction

  // Previous round key from key k that was made with round constant rc.
  function automatic logic [127:0] key_prev(input logic [127:0] k, input logic [7:0] rc);
    logic [31:0] p0, p1, p2, p3;
    p3 = k[31:0] ^ k[63:32];
    p2 = k[63:32] ^ k[95:64];
    p1 = k[95:64] ^ k[127:96];
    p0 = k[127:96] ^ sub_word({p3[23:0], p3[31:24]}) ^ {rc, 24'd0};
    return {p0, p1, p2, p3};
  endfunction

  // Byte r of column c: row r, column c.
  function automatic logic [127:0] enc_round(input logic [127:0] s, input bit last);
    logic [7:0] sb [16];
    logic [7:0] a0, a1, a2, a3;
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sb[4*c + r] = SBOX[s[127 - 8*(4*((c + r) % 4) + r) -: 8]];
    for (int c = 0; c < 4; c++) begin
      {a0, a1, a2, a3} = {sb[4*c], sb[4*c+1], sb[4*c+2], sb[4*c+3]};
      if (last) o[127 - 32*c -: 32] = {a0, a1, a2, a3};
      else o[127 - 32*c -: 32] = {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
                                  a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
                                  a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
                                  xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
    end
    return o;
  endfunction

  function automatic logic [127:0] inv_shift_sub(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = ISBOX[s[127 - 8*(4*((c + 4 - r) % 4) + r) -: 8]];
    return o;
  endfunction

  function automatic logic [127:0] inv_mix(input logic [127:0] s);
    logic [7:0] a0, a1, a2, a3;
    logic [127:0] o;
    for (int c = 0; c < 4; c++) begin
      {a0, a1, a2, a3} = s[127 - 32*c -: 32];
      o[127 - 32*c -: 32] = {gmul(a0, 8'd14) ^ gmul(a1, 8'd11) ^ gmul(a2, 8'd13) ^ gmul(a3, 8'd9),
                             gmul(a0, 8'd9)  ^ gmul(a1, 8'd14) ^ gmul(a2, 8'd11) ^ gmul(a3, 8'd13),
                             gmul(a0, 8'd13) ^ gmul(a1, 8'd9)  ^ gmul(a2, 8'd14) ^ gmul(a3, 8'd11),
                             gmul(a0, 8'd11) ^ gmul(a1, 8'd13) ^ gmul(a2, 8'd9)  ^ gmul(a3, 8'd14)};
    end
    return o;
  endfunction

  state_e       st;
  logic [127:0] state, rk;
  logic [7:0]   rcon;
  logic [3:0]   rnd;

  assign busy = (st != S_IDLE);
  assign dout = state;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; state <= '0; rk <= '0; rcon <= 8'h01; rnd <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          rk   <= key;
          rcon <= 8'h01;
          rnd  <= 4'd1;
          if (decrypt) begin
            state <= din;
            st    <= S_KEYFWD;
          end else begin
            state <= din ^ key;
            st    <= S_ENC;
          end
        end
        S_KEYFWD: begin
          logic [127:0] kn;
          kn = key_next(rk, rcon);
          rk <= kn;
          rnd <= rnd + 4'd1;
          if (rnd == 4'd10) begin
            state <= state ^ kn;                 // AddRoundKey with K10
            rcon  <= 8'h36;                      // constant that made K10
            rnd   <= 4'd10;
            st    <= S_DEC;
          end else rcon <= xtime(rcon);
        end
        S_ENC: begin
          logic [127:0] kn;
          kn = key_next(rk, rcon);
          state <= enc_round(state, rnd == 4'd10) ^ kn;
          rk    <= kn;
          rcon  <= xtime(rcon);
          rnd   <= rnd + 4'd1;
          if (rnd == 4'd10) begin st <= S_IDLE; done <= 1'b1; end
        end
        S_DEC: begin
          // rnd counts 10 down to 1; key K(rnd-1) is rebuilt from K(rnd).
          logic [127:0] kp, t;
          kp = key_prev(rk, rcon);
          t  = inv_shift_sub(state) ^ kp;
          state <= (rnd == 4'd1) ? t : inv_mix(t);
          rk    <= kp;
          rcon  <= rcon[0] ? (((rcon ^ 8'h1b) >> 1) | 8'h80) : (rcon >> 1);
          rnd   <= rnd - 4'd1;
          if (rnd == 4'd1) begin st <= S_IDLE; done <= 1'b1; end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
