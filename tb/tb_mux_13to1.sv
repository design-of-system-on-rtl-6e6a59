// tb_mux_13to1: self-checking test of the 13-to-1 routing multiplexer.
// All 16 select codes are applied with fresh random inputs each time; the
// output must equal input[sel] for codes 0..12 and zero for 13..15. The
// block is combinational, so each check is made one clock after the inputs
// change.
module tb_mux_13to1;
  logic        clk = 1'b0;
  logic [3:0]  sel;
  logic [63:0] din [13];
  logic [63:0] x;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mux_13to1 dut (.sel, .din, .x);

  initial begin
    for (int rep = 0; rep < 8; rep++)
      for (int s = 0; s < 16; s++) begin
        logic [63:0] exp;
        for (int i = 0; i < 13; i++) din[i] = {$urandom, $urandom};
        sel = 4'(s);
        exp = (s < 13) ? din[s] : 64'd0;
        @(posedge clk);
        checks++;
        if (x !== exp) begin
          failures++;
          $display("FAIL sel=%0d x=%h exp=%h", s, x, exp);
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
