// rsa_modexp: RSA modular exponentiation, result = base^exponent mod modulus,
// for the SoC's RSA module (encryption, decryption and signing are all this
// one operation with different exponents).
//
// Left-to-right binary exponentiation on top of a bit-serial interleaved
// modular multiplier. The multiplier computes a*b mod n one bit of a per
// clock, most significant first: p = 2p - (n if it overflows), then p = p + b
// - (n if it overflows); p stays below n, so KEY_W+2 bits suffice. Before the
// exponent is scanned the base is reduced modulo n (a multiplication by 1)
// and the exponent's leading zeros are shifted out, one per clock. Then every
// exponent bit costs a squaring and, for a 1 bit, a multiplication by the
// base. The modulus may be any value of at least 2; no Montgomery form or
// precomputation is needed.
//
// Interface: present base, exponent and modulus with a one-cycle start while
// busy is low; done pulses for one cycle when result is valid, and result
// holds until the next start. All operands are KEY_W-bit unsigned integers.
// Timing: KEY_W + 1 cycles per multiplication; from start to done
// (KEY_W+1)*(1 + s + m) + (KEY_W - s) + 1 cycles for an exponent of s
// significant bits of which m are ones. rst is synchronous, active high.
module rsa_modexp #(
  parameter int unsigned KEY_W = 2048
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [KEY_W-1:0] base,
  input  logic [KEY_W-1:0] exponent,
  input  logic [KEY_W-1:0] modulus,
  output logic             busy,
  output logic             done,
  output logic [KEY_W-1:0] result
);
  localparam int unsigned CW = $clog2(KEY_W + 1);
  typedef enum logic [2:0] {S_IDLE, S_REDUCE, S_NORM, S_SQR, S_MUL} state_e;

  state_e           st;
  logic [KEY_W-1:0] n, mb, ex, r;
  logic [KEY_W-1:0] ma, mbv;       // multiplier operands a, b
  logic [KEY_W-1:0] p;             // partial product, < n between steps
  logic [CW-1:0]    mcnt;          // multiplier bits left
  logic [CW-1:0]    ebits;         // exponent bits left
  logic             mrun;
  logic [KEY_W-1:0] p_next;

  // One step of the interleaved multiplier.
  always_comb begin
    logic [KEY_W+1:0] t;
    t = {1'b0, p, 1'b0};
    if (t >= {2'b00, n}) t = t - {2'b00, n};
    if (ma[KEY_W-1]) t = t + {2'b00, mbv};
    if (t >= {2'b00, n}) t = t - {2'b00, n};
    p_next = t[KEY_W-1:0];
  end

  assign busy   = (st != S_IDLE);
  assign result = r;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; n <= '0; mb <= '0; ex <= '0; r <= '0;
      ma <= '0; mbv <= '0; p <= '0; mcnt <= '0; ebits <= '0; mrun <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (mrun) begin
        p    <= p_next;
        ma   <= ma << 1;
        mcnt <= mcnt - 1'b1;
        if (mcnt == CW'(1)) mrun <= 1'b0;
      end
      unique case (st)
        S_IDLE: if (start) begin
          n <= modulus; ex <= exponent; ebits <= CW'(KEY_W);
          ma <= base; mbv <= KEY_W'(1); p <= '0; mcnt <= CW'(KEY_W); mrun <= 1'b1;
          st <= S_REDUCE;
        end
        S_REDUCE: if (!mrun) begin
          mb <= p;
          r  <= KEY_W'(1);
          st <= S_NORM;
        end
        S_NORM: begin
          if (ebits == '0) begin
            st <= S_IDLE; done <= 1'b1;          // exponent 0: result 1
          end else if (!ex[KEY_W-1]) begin
            ex <= ex << 1; ebits <= ebits - 1'b1;
          end else begin
            ma <= r; mbv <= r; p <= '0; mcnt <= CW'(KEY_W); mrun <= 1'b1;
            st <= S_SQR;
          end
        end
        S_SQR: if (!mrun) begin
          r <= p;
          if (ex[KEY_W-1]) begin
            ma <= p; mbv <= mb; p <= '0; mcnt <= CW'(KEY_W); mrun <= 1'b1;
            st <= S_MUL;
          end else begin
            ex <= ex << 1; ebits <= ebits - 1'b1;
            if (ebits == CW'(1)) begin st <= S_IDLE; done <= 1'b1; end
            else begin
              ma <= p; mbv <= p; p <= '0; mcnt <= CW'(KEY_W); mrun <= 1'b1;
            end
          end
        end
        S_MUL: if (!mrun) begin
          r  <= p;
          ex <= ex << 1; ebits <= ebits - 1'b1;
          if (ebits == CW'(1)) begin st <= S_IDLE; done <= 1'b1; end
          else begin
            ma <= p; mbv <= p; p <= '0; mcnt <= CW'(KEY_W); mrun <= 1'b1;
            st <= S_SQR;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
