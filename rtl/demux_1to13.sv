// demux_1to13: the routing demultiplexer. Input X is driven onto the output
// A..M (index 0..12) chosen by the binary value on Sel; every other output is
// zero, and codes 13..15 leave all outputs at zero. Purely combinational. The
// 13 outputs, 4-bit select and 64-bit default width follow the published
// schematic; zero on unselected outputs is this design's choice (it also keeps
// handshake strobes of unselected cores low when the block routes them).
module demux_1to13 #(
  parameter int unsigned W     = 64,
  parameter int unsigned N     = 13,
  parameter int unsigned SEL_W = 4
) (
  input  logic [SEL_W-1:0] sel,
  input  logic [W-1:0]     x,
  output logic [W-1:0]     dout [N]   // pins A..M
);
  always_comb begin
    for (int i = 0; i < N; i++)
      dout[i] = (sel == SEL_W'(i)) ? x : '0;
  end
endmodule
