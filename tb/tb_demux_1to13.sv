// tb_demux_1to13: self-checking test of the 1-to-13 routing demultiplexer.
// For every select code 0..15 and random data on X, output sel must carry X
// and all other outputs must be zero (all outputs zero for codes 13..15).
module tb_demux_1to13;
  logic        clk = 1'b0;
  logic [3:0]  sel;
  logic [63:0] x;
  logic [63:0] dout [13];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  demux_1to13 dut (.sel, .x, .dout);

  initial begin
    for (int rep = 0; rep < 8; rep++)
      for (int s = 0; s < 16; s++) begin
        x   = {$urandom, $urandom} | 64'h1;
        sel = 4'(s);
        @(posedge clk);
        for (int i = 0; i < 13; i++) begin
          checks++;
          if (dout[i] !== ((i == s) ? x : 64'd0)) begin
            failures++;
            $display("FAIL sel=%0d out %0d = %h", s, i, dout[i]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
