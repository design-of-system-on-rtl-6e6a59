// crypto_module_top: the hardware cryptographic module of the IoT SoC.
//
// It gathers the SoC's crypto accelerators side by side: the X11-style
// multi-hash with dynamic routing (x11_routing_top: Skein-512, Keccak-512
// and JH-512 between a 13-to-1 multiplexer and a 1-to-13 demultiplexer),
// a SHA-256 hash core, an AES-128 cipher and an RSA modular-exponentiation
// engine. In the SoC all of them sit on the CPU's internal bus; the bus is
// not specified, so every unit's own interface is brought out as top-level
// ports, prefixed with the unit's name, for a bus adapter or CPU model to
// drive. The units share clock and reset and are otherwise independent.
//
// Which units exist and that only X11 goes through the dynamic routing
// follow the published SoC block diagram; algorithm variants (512-bit X11
// functions, AES-128, a 2048-bit RSA default) and all interfaces are this
// design's choices. See each unit's file for its protocol and timing.
// Clock `clk`; `rst` is synchronous, active high.
module crypto_module_top
  import x11_pkg::*;
#(
  parameter int unsigned RSA_W = 2048
) (
  input  logic              clk,
  input  logic              rst,
  // X11 dynamic routing (see x11_routing_top)
  input  logic [2:0]        x11_core_rst,       // per-core reset, A/B/C
  input  logic [SEL_W-1:0]  x11_sel,
  input  logic [SEL_W-1:0]  x11_sel_0,
  input  logic [W-1:0]      x11_hash_input,
  input  logic              x11_hash_input_valid,
  output logic              x11_hash_input_read,
  output logic [W-1:0]      x11_hash_output,
  output logic              x11_hash_output_write,
  input  logic              x11_hash_output_ready,
  output logic [W-1:0]      x11_ext_din        [9],
  output logic              x11_ext_src_ready  [9],
  input  logic              x11_ext_src_read   [9],
  input  logic [W-1:0]      x11_ext_dout       [9],
  input  logic              x11_ext_dst_write  [9],
  output logic              x11_ext_dst_ready  [9],
  output logic [2:0]        x11_core_src_read,
  output logic [2:0]        x11_core_dst_write,
  // SHA-256 (see sha256_core)
  input  logic [63:0]       sha_din,
  input  logic              sha_src_ready,
  output logic              sha_src_read,
  output logic [63:0]       sha_dout,
  output logic              sha_dst_write,
  input  logic              sha_dst_ready,
  // AES-128 (see aes128_core)
  input  logic              aes_start,
  input  logic              aes_decrypt,
  input  logic [127:0]      aes_key,
  input  logic [127:0]      aes_din,
  output logic              aes_busy,
  output logic              aes_done,
  output logic [127:0]      aes_dout,
  // RSA (see rsa_modexp)
  input  logic              rsa_start,
  input  logic [RSA_W-1:0]  rsa_base,
  input  logic [RSA_W-1:0]  rsa_exponent,
  input  logic [RSA_W-1:0]  rsa_modulus,
  output logic              rsa_busy,
  output logic              rsa_done,
  output logic [RSA_W-1:0]  rsa_result
);

  x11_routing_top u_x11 (
    .clk, .rst,
    .core_rst(x11_core_rst),
    .sel(x11_sel), .sel_0(x11_sel_0),
    .hash_input(x11_hash_input), .hash_input_valid(x11_hash_input_valid),
    .hash_input_read(x11_hash_input_read),
    .hash_output(x11_hash_output), .hash_output_write(x11_hash_output_write),
    .hash_output_ready(x11_hash_output_ready),
    .ext_din(x11_ext_din), .ext_src_ready(x11_ext_src_ready), .ext_src_read(x11_ext_src_read),
    .ext_dout(x11_ext_dout), .ext_dst_write(x11_ext_dst_write), .ext_dst_ready(x11_ext_dst_ready),
    .core_src_read(x11_core_src_read), .core_dst_write(x11_core_dst_write)
  );

  sha256_core u_sha256 (
    .clk, .rst,
    .din(sha_din), .src_ready(sha_src_ready), .src_read(sha_src_read),
    .dout(sha_dout), .dst_write(sha_dst_write), .dst_ready(sha_dst_ready)
  );

  aes128_core u_aes (
    .clk, .rst,
    .start(aes_start), .decrypt(aes_decrypt), .key(aes_key), .din(aes_din),
    .busy(aes_busy), .done(aes_done), .dout(aes_dout)
  );

  rsa_modexp #(.KEY_W(RSA_W)) u_rsa (
    .clk, .rst,
    .start(rsa_start), .base(rsa_base), .exponent(rsa_exponent), .modulus(rsa_modulus),
    .busy(rsa_busy), .done(rsa_done), .result(rsa_result)
  );

endmodule
