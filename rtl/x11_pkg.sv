// x11_pkg: types and constants shared by the X11 dynamic-routing design.
//
// The routing fabric has 13 channels, lettered A..M after the pins of the
// multiplexer and demultiplexer. Channels A, B and C carry the three built
// hash cores (Skein, Keccak, JH), D..L are free for the remaining X11
// functions, and M is the external hash input (as a source) and the hash
// output (as a destination). The letters and the 13-channel, 64-bit, 4-bit
// select sizes follow the published schematic; which core sits on which
// letter is this design's choice.
//
// Every core speaks the same 64-bit word stream: one header word holding the
// message length in bytes, then ceil(len/8) data words, message byte k in
// bits [8*(k%8) +: 8] of its word. A core answers with a header word of 64
// (the digest length in bytes) and the eight 64-bit digest words in the same
// byte order, so one core's answer is a valid message for the next.
package x11_pkg;

  localparam int unsigned W      = 64;   // routed data width
  localparam int unsigned N_CH   = 13;   // routing channels A..M
  localparam int unsigned SEL_W  = 4;    // select width

  typedef enum logic [SEL_W-1:0] {
    CH_A = 4'd0,  CH_B = 4'd1,  CH_C = 4'd2,  CH_D = 4'd3,
    CH_E = 4'd4,  CH_F = 4'd5,  CH_G = 4'd6,  CH_H = 4'd7,
    CH_I = 4'd8,  CH_J = 4'd9,  CH_K = 4'd10, CH_L = 4'd11,
    CH_M = 4'd12
  } channel_e;

  // Channel of each built core and of the external port.
  localparam channel_e CH_SKEIN  = CH_A;
  localparam channel_e CH_KECCAK = CH_B;
  localparam channel_e CH_JH     = CH_C;
  localparam channel_e CH_EXT    = CH_M;

  // All three cores produce 512-bit digests: 8 words after the header.
  localparam int unsigned DIGEST_BYTES = 64;
  localparam int unsigned DIGEST_WORDS = 8;

  // Bytes of a word that belong to the message when `take` (1..8) are valid.
  function automatic logic [63:0] byte_mask(input logic [3:0] take);
    logic [63:0] m;
    m = '0;
    for (int b = 0; b < 8; b++)
      if (b < int'(take)) m[8*b +: 8] = 8'hFF;
    return m;
  endfunction

endpackage
