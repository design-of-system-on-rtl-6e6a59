// tb_x11_routing_top: end-to-end test of the dynamically routed multi-hash,
// at the design's full size (the top has no parameters).
//
// The testbench plays the SoC CPU. For each job it routes channel M (hash
// input) to the first core, streams the message in, then for every further
// step waits until the current core shows its answer and re-routes that core
// to the next one, so the 64-byte digest flows straight from core to core,
// and finally routes the last core to channel M and collects the result with
// random back-pressure on hash_output_ready. Before the jobs, a message is
// started into Keccak and abandoned half-way by pulsing that core's own
// reset (core_rst[1]); job 1 then reuses Keccak, so its result shows the
// core was cleanly reset (without the reset it would hang). Jobs:
//   1. 80-byte message -> Keccak -> Skein -> JH -> Keccak  (Keccak used twice)
//   2. same message    -> JH -> Skein -> Keccak          (other order)
//   3. 37-byte message -> Skein -> channel D -> Keccak     (D is an external
//      core modelled here as a pass-through that re-emits its input)
//   4. empty message   -> JH
// Message byte k of a length-len message is (31*k + 7*len + 5) mod 256. The
// expected results were computed by independent software models of the
// three hash functions chained the same way. Mechanisms counted, each must
// occur: route changes, core-to-core transfers, a core used twice in one
// job, a job through an external channel, output back-pressure, input gaps,
// two orders of the same cores giving different results, and a core abort.
module tb_x11_routing_top;
  import x11_pkg::*;

  localparam int NJOB = 4;
  localparam int LENS [NJOB] = '{80, 80, 37, 0};
  localparam int NSTEP [NJOB] = '{4, 3, 3, 1};
  localparam channel_e STEPS [NJOB][4] = '{
    '{CH_B, CH_A, CH_C, CH_B},
    '{CH_C, CH_A, CH_B, CH_A},
    '{CH_A, CH_D, CH_B, CH_A},
    '{CH_C, CH_A, CH_A, CH_A}};
  localparam logic [511:0] EXP [NJOB] = '{
    512'h8d8452b1b06027c0049fe5c1209dde1381c6c8a3f2cf2c9043bc1060d0dfbf92db0ea1024112937f1cc92cbad9588ea0517aab3e0234175573b27c0f8bc24f79,
    512'h629a3d7343a928b71987427042fdf2ebe7c2a53f2baffb1ecc597ad946b4889f531745668643bd0545767d3e9bec32d2d765b897c0cf984e439547142fded7c4,
    512'he8f23cb6d438aeaec0ce9774a80b2318afc7f9180f5a61f10ad1662045c02e3b8a5edd80fb53cc2c66b4e616b44878fff42dde2310d3016c0853eed525bbea5e,
    512'h4fec0ec541e89a911bbcc5f4b104fb17e1dece4169316b1db6c21efff4c569befac8a2fa7407903f0f06834bfcc88fd5876bb95aad79d917802c9d6ff7f2ec90};

  logic             clk = 1'b0;
  logic             rst;
  logic [2:0]       core_rst;
  logic [SEL_W-1:0] sel, sel_0;
  logic [W-1:0]     hash_input, hash_output;
  logic             hash_input_valid, hash_input_read;
  logic             hash_output_write, hash_output_ready;
  logic [W-1:0]     ext_din [9];
  logic             ext_src_ready [9];
  logic             ext_src_read [9];
  logic [W-1:0]     ext_dout [9];
  logic             ext_dst_write [9];
  logic             ext_dst_ready [9];
  logic [2:0]       core_src_read, core_dst_write;

  int checks = 0, failures = 0;
  int n_route = 0, n_core2core = 0, n_reuse = 0, n_ext = 0, n_bp = 0, n_gap = 0, n_order = 0, n_abort = 0;
  logic [511:0] results [NJOB];

  always #5 clk = ~clk;

  x11_routing_top dut (.*);

  // External pass-through core on channel D (index 0): takes 9 words, then
  // offers them back.
  logic [W-1:0] ext_buf [9];
  int           ext_in = 0, ext_out = 0;
  always_comb begin
    for (int e = 0; e < 9; e++) begin
      ext_src_read[e]  = 1'b0;
      ext_dst_write[e] = 1'b0;
      ext_dout[e]      = '0;
    end
    ext_src_read[0]  = ext_src_ready[0] && (ext_in < 9);
    ext_dst_write[0] = (ext_in == 9) && (ext_out < 9);
    ext_dout[0]      = ext_buf[ext_out % 9];
  end
  always @(posedge clk) begin
    if (ext_src_read[0]) begin
      ext_buf[ext_in] <= ext_din[0];
      ext_in <= ext_in + 1;
    end
    if (ext_dst_write[0] && ext_dst_ready[0]) begin
      if (ext_out == 8) begin ext_in <= 0; ext_out <= 0; end
      else ext_out <= ext_out + 1;
    end
    if (hash_output_write && !hash_output_ready) n_bp++;
  end

  function automatic logic [7:0] mbyte(input int len, input int k);
    return 8'((31*k + 7*len + 5) % 256);
  endfunction

  task automatic route(input channel_e src, input channel_e dst);
    sel   <= src;
    sel_0 <= dst;
    n_route++;
    @(posedge clk);
  endtask

  // Output valid of a channel as the routing sees it.
  function automatic logic has_answer(input channel_e ch);
    if (ch == CH_D) return ext_dst_write[0];
    return core_dst_write[int'(ch)];
  endfunction

  task automatic send_message(input int len);
    int nw;
    logic [W-1:0] w;
    nw = (len + 7) / 8;
    for (int i = -1; i < nw; i++) begin
      if (i < 0) w = W'(len);
      else begin
        w = '0;
        for (int b = 0; b < 8; b++)
          if (8*i + b < len) w[8*b +: 8] = mbyte(len, 8*i + b);
      end
      if ($urandom % 4 == 0) begin
        hash_input_valid <= 1'b0;
        n_gap++;
        @(posedge clk);
      end
      hash_input_valid <= 1'b1;
      hash_input <= w;
      do @(posedge clk); while (!hash_input_read);
    end
    hash_input_valid <= 1'b0;
  endtask

  // Start an 80-byte message into Keccak, stop after the header and four
  // data words, then reset Keccak alone.
  task automatic abort_keccak();
    route(CH_M, CH_B);
    for (int i = -1; i < 4; i++) begin
      hash_input_valid <= 1'b1;
      hash_input <= (i < 0) ? W'(80) : {8{8'(i)}};
      do @(posedge clk); while (!hash_input_read);
    end
    hash_input_valid <= 1'b0;
    repeat (3) @(posedge clk);
    core_rst <= 3'b010;
    @(posedge clk);
    core_rst <= 3'b000;
    n_abort++;
    route(CH_M, CH_M);
  endtask

  task automatic run_job(input int j);
    int uses [3];
    logic [W-1:0] got [9];
    uses = '{0, 0, 0};
    route(CH_M, STEPS[j][0]);
    send_message(LENS[j]);
    for (int s = 0; s < NSTEP[j]; s++) begin
      channel_e cur, nxt;
      cur = STEPS[j][s];
      nxt = (s == NSTEP[j] - 1) ? CH_M : STEPS[j][s+1];
      if (cur <= CH_C) begin
        uses[int'(cur)]++;
        if (uses[int'(cur)] == 2) n_reuse++;
      end else n_ext++;
      while (!has_answer(cur)) @(posedge clk);
      route(cur, nxt);
      if (nxt == CH_M) begin
        for (int i = 0; i < 9; i++) begin
          hash_output_ready <= ($urandom % 3 != 0);
          @(posedge clk);
          while (!(hash_output_write && hash_output_ready)) begin
            hash_output_ready <= ($urandom % 3 != 0);
            @(posedge clk);
          end
          got[i] = hash_output;
        end
        hash_output_ready <= 1'b0;
      end else begin
        n_core2core++;
        while (has_answer(cur)) @(posedge clk);
      end
    end
    checks++;
    if (got[0] != 64'd64) begin
      failures++;
      $display("FAIL job %0d header %h", j, got[0]);
    end
    for (int i = 0; i < 8; i++) begin
      results[j][64*i +: 64] = got[i+1];
      checks++;
      if (got[i+1] != EXP[j][64*i +: 64]) begin
        failures++;
        $display("FAIL job %0d word %0d: got %h exp %h", j, i, got[i+1], EXP[j][64*i +: 64]);
      end
    end
    route(CH_M, CH_M);
  endtask

  initial begin
    rst = 1'b1;
    core_rst = 3'b000;
    sel = CH_M; sel_0 = CH_M;
    hash_input = '0; hash_input_valid = 1'b0; hash_output_ready = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    abort_keccak();
    for (int j = 0; j < NJOB; j++) run_job(j);
    if (results[0] != results[1]) n_order++;
    $display("mechanisms: routes=%0d core_to_core=%0d reuse=%0d external=%0d backpressure=%0d input_gaps=%0d order_effect=%0d aborts=%0d",
             n_route, n_core2core, n_reuse, n_ext, n_bp, n_gap, n_order, n_abort);
    checks += 8;
    if (n_route == 0)     begin failures++; $display("FAIL no route change"); end
    if (n_core2core == 0) begin failures++; $display("FAIL no core-to-core transfer"); end
    if (n_reuse == 0)     begin failures++; $display("FAIL no core reused"); end
    if (n_ext == 0)       begin failures++; $display("FAIL no external channel"); end
    if (n_bp == 0)        begin failures++; $display("FAIL no back-pressure"); end
    if (n_gap == 0)       begin failures++; $display("FAIL no input gap"); end
    if (n_order == 0)     begin failures++; $display("FAIL order did not matter"); end
    if (n_abort == 0)     begin failures++; $display("FAIL no core abort"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
