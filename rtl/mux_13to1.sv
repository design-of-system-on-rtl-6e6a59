// mux_13to1: the routing multiplexer. Output X carries input A..M (index
// 0..12) chosen by the binary value on Sel; codes 13..15 select nothing and
// drive X to zero. Purely combinational, no clock. The 13 inputs, the 4-bit
// select and the 64-bit default width follow the published schematic; the
// zero output for unused codes is this design's choice. The width is a
// parameter so the same block also routes 1-bit handshake signals.
module mux_13to1 #(
  parameter int unsigned W     = 64,
  parameter int unsigned N     = 13,
  parameter int unsigned SEL_W = 4
) (
  input  logic [SEL_W-1:0] sel,
  input  logic [W-1:0]     din [N],   // pins A..M
  output logic [W-1:0]     x
);
  always_comb begin
    x = '0;
    for (int i = 0; i < N; i++)
      if (sel == SEL_W'(i)) x = din[i];
  end
endmodule
