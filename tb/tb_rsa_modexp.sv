// tb_rsa_modexp: self-checking test of the modular exponentiation engine at
// a reduced width (128 bits, to keep the run short; the default width is
// exercised by the top-level testbench). Ten (base, exponent, modulus)
// triples with results computed independently by arbitrary-precision
// software: exponents 65537, 1, 0, 3 and six random 128-bit ones; odd and
// even moduli; bases not reduced below the modulus. Each result is checked,
// and so is the start-to-done cycle count against
//   (W+1)*(1 + s + m) + (W - s) + 1
// for an exponent with s significant bits of which m are ones.
module tb_rsa_modexp;
  localparam int W  = 128;
  localparam int NV = 10;
  typedef logic [W-1:0] vec_t [4];
  localparam vec_t V [NV] = '{
    '{128'h73ab48767734d7c1c7fde805ec99108d, 128'h00000000000000000000000000010001, 128'hdb5b5fab8f4d3e27dda1494c73cf256d, 128'hdaef45e3c1adffbc5a34f1010871231a},
    '{128'h2fa91425cb0088539d2c67eda13ffe79, 128'h00000000000000000000000000000001, 128'hf9cb9e86830c71c2cdcc69292f45e678, 128'h2fa91425cb0088539d2c67eda13ffe79},
    '{128'h986e86cb0ab8ab67a26b7f62b1852f27, 128'h00000000000000000000000000000000, 128'he3eff9c0cf44dd3f89e7d15f17362f25, 128'h00000000000000000000000000000001},
    '{128'hd4ea65d003d716849f8558a628518867, 128'h00000000000000000000000000000003, 128'ha66b0d389d95847ebd299753a7677796, 128'h5bbbc6b5664206004ac3f3f3dd2036b7},
    '{128'h5387f61376c468aec7321cc007b37e14, 128'h320094ead7a94ded97491e2370c6a5b8, 128'h998092253deffa38e12b2b8f30b17d0b, 128'h1a821a83b156d918bc9a949cf8643db3},
    '{128'h15c1d2dfa9964aef012d0ea67ff12229, 128'h6822a6b24735af1ca7a1149075139237, 128'hcb4d8474a3ea284d3bd0334684e55160, 128'h28d91ac7087d375385e640c8b8d9d859},
    '{128'h4105cca7b53302fc154cd2aad7185dda, 128'h834c687a3acb6266c20ba2c250b601fc, 128'hee82ec3ffee5a5b28d1fe1daff666589, 128'hdbeeb7630dd46f701d791bf1d04d6d2a},
    '{128'h1b98fbe466809a111ba1192ec42b7170, 128'h111b8aaa62f28d1a4a789cb3d8b9b45c, 128'h902a174f11fa2ac0079dd25a49fe85b0, 128'h818e5f3b3dc159c771ade9ea41db6ac0},
    '{128'hed52a24135b00a5436a80bdf0023b682, 128'h601e5b45785116080d650372e90794df, 128'haf5570eed8e94b150452ef05f542441d, 128'h01f8fccfb6232b08c60ded3b808a131b},
    '{128'h32d03fdda123f50190f5380e12b2a414, 128'h563e9bed45100358acc6d8f2c74c7ccf, 128'heb77730f65bd9acbb57a6a1dfaf8cda9, 128'h3c173f2d8f43eb57533e19a103119850}
  };

  logic         clk = 1'b0;
  logic         rst, start, busy, done;
  logic [W-1:0] base, exponent, modulus, result;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rsa_modexp #(.KEY_W(W)) dut (.clk, .rst, .start, .base, .exponent, .modulus, .busy, .done, .result);

  function automatic int expected_cycles(input logic [W-1:0] e);
    int s, m;
    s = 0; m = 0;
    for (int i = 0; i < W; i++) if (e[i]) begin s = i + 1; m++; end
    return (W + 1) + (W - s) + 1 + (s + m) * (W + 1);
  endfunction

  initial begin
    rst = 1'b1; start = 1'b0; base = '0; exponent = '0; modulus = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < NV; i++) begin
      int cyc;
      @(negedge clk);
      start = 1'b1; base = V[i][0]; exponent = V[i][1]; modulus = V[i][2];
      @(negedge clk);
      start = 1'b0; base = '0; exponent = '0; modulus = '0;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 2;
      if (result !== V[i][3]) begin
        failures++;
        $display("FAIL vector %0d: got %h exp %h", i, result, V[i][3]);
      end
      if (cyc != expected_cycles(V[i][1])) begin
        failures++;
        $display("FAIL vector %0d: %0d cycles, expected %0d", i, cyc, expected_cycles(V[i][1]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
