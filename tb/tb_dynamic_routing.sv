// tb_dynamic_routing: self-checking test of the data-plus-handshake router.
// For every (source, destination) pair of select codes 0..15, with random
// data, valid and taken values on all channels, it checks that
//   x and dst_data[dst] equal src_data[src] (zero for codes above 12),
//   dst_valid[dst] equals src_valid[src], every other dst_valid is low,
//   src_taken[src] equals dst_taken[dst], every other src_taken is low,
//   every other dst_data is zero.
module tb_dynamic_routing;
  logic        clk = 1'b0;
  logic [3:0]  sel, sel_0;
  logic [63:0] src_data  [13];
  logic        src_valid [13];
  logic        src_taken [13];
  logic [63:0] dst_data  [13];
  logic        dst_valid [13];
  logic        dst_taken [13];
  logic [63:0] x;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dynamic_routing dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL sel=%0d sel_0=%0d: %s", sel, sel_0, what);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 3; rep++)
      for (int s = 0; s < 16; s++)
        for (int d = 0; d < 16; d++) begin
          logic [63:0] ed;
          logic        ev, et;
          for (int i = 0; i < 13; i++) begin
            src_data[i]  = {$urandom, $urandom};
            src_valid[i] = 1'($urandom);
            dst_taken[i] = 1'($urandom);
          end
          sel = 4'(s); sel_0 = 4'(d);
          ed = (s < 13) ? src_data[s] : 64'd0;
          ev = (s < 13) ? src_valid[s] : 1'b0;
          et = (d < 13) ? dst_taken[d] : 1'b0;
          @(posedge clk);
          check(x === ed, "x");
          for (int i = 0; i < 13; i++) begin
            check(dst_data[i]  === ((i == d) ? ed : 64'd0), "dst_data");
            check(dst_valid[i] === ((i == d) ? ev : 1'b0),  "dst_valid");
            check(src_taken[i] === ((i == s) ? et : 1'b0),  "src_taken");
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
