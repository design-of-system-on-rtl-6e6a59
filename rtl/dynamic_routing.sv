// dynamic_routing: connects one source channel to one destination channel of
// the 13-channel fabric, data and handshake together.
//
// Source channel `sel` (the multiplexer select) is any core output or the
// external hash input; destination channel `sel_0` (the demultiplexer select)
// is any core input or the external hash output. The data path is the
// mux_13to1 -> X -> demux_1to13 pair of the published schematic. So that a
// word really moves from one core to the next, the same selects also route
// the handshake: the source's "word valid" (dst_write of a core) travels
// forward through a 1-bit mux/demux pair, and the destination's "word taken"
// strobe (src_read of a core) travels back through a 1-bit pair with the
// selects swapped. Routing the handshake this way is this design's own
// completion of the document's data-only description.
//
// Combinational; one word crosses per clock when both ends are ready. X is
// also brought out, as in the schematic where it feeds HashOutput.
module dynamic_routing
  import x11_pkg::*;
#(
  parameter int unsigned DW = W,
  parameter int unsigned NC = N_CH,
  parameter int unsigned SW = SEL_W
) (
  input  logic [SW-1:0] sel,              // source channel (Sel)
  input  logic [SW-1:0] sel_0,            // destination channel (Sel_0)
  // source side: outputs of cores / external hash input
  input  logic [DW-1:0] src_data  [NC],
  input  logic          src_valid [NC],
  output logic          src_taken [NC],
  // destination side: inputs of cores / external hash output
  output logic [DW-1:0] dst_data  [NC],
  output logic          dst_valid [NC],
  input  logic          dst_taken [NC],
  output logic [DW-1:0] x
);
  logic [0:0] v_in  [NC];
  logic [0:0] v_out [NC];
  logic [0:0] t_in  [NC];
  logic [0:0] t_out [NC];
  logic [0:0] v_x, t_x;

  always_comb begin
    for (int i = 0; i < NC; i++) begin
      v_in[i]      = src_valid[i];
      t_in[i]      = dst_taken[i];
      dst_valid[i] = v_out[i][0];
      src_taken[i] = t_out[i][0];
    end
  end

  mux_13to1   #(.W(DW), .N(NC), .SEL_W(SW)) u_mux   (.sel(sel),   .din(src_data), .x(x));
  demux_1to13 #(.W(DW), .N(NC), .SEL_W(SW)) u_demux (.sel(sel_0), .x(x),        .dout(dst_data));

  mux_13to1   #(.W(1), .N(NC), .SEL_W(SW)) u_vmux   (.sel(sel),   .din(v_in), .x(v_x));
  demux_1to13 #(.W(1), .N(NC), .SEL_W(SW)) u_vdemux (.sel(sel_0), .x(v_x),  .dout(v_out));
  mux_13to1   #(.W(1), .N(NC), .SEL_W(SW)) u_tmux   (.sel(sel_0), .din(t_in), .x(t_x));
  demux_1to13 #(.W(1), .N(NC), .SEL_W(SW)) u_tdemux (.sel(sel),   .x(t_x),  .dout(t_out));

endmodule
