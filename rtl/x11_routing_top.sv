// x11_routing_top: X11-style multi-hash with dynamic routing.
//
// Three hash cores (Skein-512 on channel A, Keccak-512 on B, JH-512 on C)
// hang between a 13-to-1 multiplexer and a 1-to-13 demultiplexer. The
// multiplexer picks the source channel (sel, the "Sel" pins): a core's
// output or, on channel M, the external hash input. Its output X feeds the
// demultiplexer, which delivers to the destination channel (sel_0, the
// "Sel_0" pins): a core's input or, on channel M, the external hash output.
// A controller (normally the SoC CPU) hashes a message through any sequence
// of cores by stepping the two selects: M->first core, then core->core for
// every further step, then last core->M. The result therefore depends on
// which cores are used, in what order and how often. Channels D..L are the
// free pins for the eight other X11 functions; they are brought out as
// ports so external cores can be attached.
//
// The channel letters, the 13-channel/64-bit/4-bit-select sizes, channel M
// as hash input, X feeding the hash output and the cores' port names follow
// the published schematic, as do the separate reset pins of the cores
// (core_rst, the schematic's rst/rst_0/rst_1). Routing the handshake
// together with the data, the A/B/C assignment, the extra global reset and
// the word framing (see x11_pkg) are this design's choices.
//
// Handshake on every channel: a source shows a word with its valid
// (a core's dst_write, hash_input_valid); the destination takes it in the
// cycle its read strobe is high (a core's src_read; hash_output_ready for
// channel M). Change sel/sel_0 only between messages: while the source
// core holds its answer and the destination core waits for a header.
// Clock `clk`; `rst` is synchronous, active high, and resets all cores;
// core_rst[c] (same timing) resets core c alone, e.g. to abort a message.
module x11_routing_top
  import x11_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [2:0]        core_rst,           // per core, index as below
  input  logic [SEL_W-1:0]  sel,                // source channel (Sel)
  input  logic [SEL_W-1:0]  sel_0,              // destination channel (Sel_0)
  // channel M: hash input (source) and hash output (destination)
  input  logic [W-1:0]      hash_input,
  input  logic              hash_input_valid,
  output logic              hash_input_read,
  output logic [W-1:0]      hash_output,
  output logic              hash_output_write,
  input  logic              hash_output_ready,
  // channels D..L (index 0..8): for external hash cores
  output logic [W-1:0]      ext_din        [9],
  output logic              ext_src_ready  [9],
  input  logic              ext_src_read   [9],
  input  logic [W-1:0]      ext_dout       [9],
  input  logic              ext_dst_write  [9],
  output logic              ext_dst_ready  [9],
  // status of the built cores, index 0 = A (Skein), 1 = B (Keccak), 2 = C (JH)
  output logic [2:0]        core_src_read,
  output logic [2:0]        core_dst_write
);
  localparam int unsigned N_CORE = 3;
  localparam int unsigned N_EXT  = 9;
  // Routing channel of each built core, index 0 = Skein, 1 = Keccak, 2 = JH.
  localparam channel_e CORE_CH [N_CORE] = '{CH_SKEIN, CH_KECCAK, CH_JH};

  logic [W-1:0] src_data  [N_CH];
  logic         src_valid [N_CH];
  logic         src_taken [N_CH];
  logic [W-1:0] dst_data  [N_CH];
  logic         dst_valid [N_CH];
  logic         dst_taken [N_CH];
  logic [W-1:0] x;
  logic [2:0]   c_rst;

  logic [W-1:0] c_din  [N_CORE];
  logic [W-1:0] c_dout [N_CORE];
  logic         c_src_ready [N_CORE];
  logic         c_src_read  [N_CORE];
  logic         c_dst_write [N_CORE];
  logic         c_dst_ready [N_CORE];

  assign c_rst = {3{rst}} | core_rst;

  dynamic_routing u_routing (
    .sel, .sel_0,
    .src_data, .src_valid, .src_taken,
    .dst_data, .dst_valid, .dst_taken,
    .x
  );

  skein512_core u_skein (
    .clk, .rst(c_rst[0]),
    .din(c_din[0]), .src_ready(c_src_ready[0]), .src_read(c_src_read[0]),
    .dout(c_dout[0]), .dst_write(c_dst_write[0]), .dst_ready(c_dst_ready[0])
  );

  keccak512_core u_keccak (
    .clk, .rst(c_rst[1]),
    .din(c_din[1]), .src_ready(c_src_ready[1]), .src_read(c_src_read[1]),
    .dout(c_dout[1]), .dst_write(c_dst_write[1]), .dst_ready(c_dst_ready[1])
  );

  jh512_core u_jh (
    .clk, .rst(c_rst[2]),
    .din(c_din[2]), .src_ready(c_src_ready[2]), .src_read(c_src_read[2]),
    .dout(c_dout[2]), .dst_write(c_dst_write[2]), .dst_ready(c_dst_ready[2])
  );

  always_comb begin
    // built cores on channels A..C
    for (int c = 0; c < N_CORE; c++) begin
      src_data[CORE_CH[c]]  = c_dout[c];
      src_valid[CORE_CH[c]] = c_dst_write[c];
      c_dst_ready[c]        = src_taken[CORE_CH[c]];
      c_din[c]              = dst_data[CORE_CH[c]];
      c_src_ready[c]        = dst_valid[CORE_CH[c]];
      dst_taken[CORE_CH[c]] = c_src_read[c];
      core_src_read[c]  = c_src_read[c];
      core_dst_write[c] = c_dst_write[c];
    end
    // external cores on channels D..L
    for (int e = 0; e < N_EXT; e++) begin
      src_data[int'(CH_D) + e]  = ext_dout[e];
      src_valid[int'(CH_D) + e] = ext_dst_write[e];
      ext_dst_ready[e]    = src_taken[int'(CH_D) + e];
      ext_din[e]          = dst_data[int'(CH_D) + e];
      ext_src_ready[e]    = dst_valid[int'(CH_D) + e];
      dst_taken[int'(CH_D) + e] = ext_src_read[e];
    end
    // channel M
    src_data[CH_EXT]  = hash_input;
    src_valid[CH_EXT] = hash_input_valid;
    hash_input_read   = src_taken[CH_EXT];
    hash_output       = x;
    hash_output_write = dst_valid[CH_EXT];
    dst_taken[CH_EXT] = dst_valid[CH_EXT] && hash_output_ready;
  end

endmodule
