// tb_puf_metrics: measures the usual PUF quality metrics on the two PUF
// models. The arbiter PUF is measured at 8, 16, 32 and 64 bits, the sizes of
// hybrid PUF that the scheme is evaluated at, over 200 random challenges on
// four chips (four CHIP_SEEDs); the butterfly PUF at its 16 bits over 200
// pairs of excitations:
//   uniqueness  - mean fraction of differing response bits between chips
//                 (all pairs of chips, same challenges)
//   reliability - 1 - mean fraction of bits that differ between a first
//                 and a repeated evaluation on the same chip
//   randomness  - fraction of response bits that are 1
// The arbiter PUF runs with NOISE=100, which at 16 bits gives a bit-flip
// rate near the 1.6 % implied by a 98.4 % reliability. The checks are loose
// bounds around the values expected of a working PUF; the measured numbers
// are printed.
module tb_puf_metrics;
  localparam int CH = 200;
  localparam int NOISE = 100;
  localparam int NW = 4;
  localparam int WIDTHS [NW] = '{8, 16, 32, 64};
  logic clk = 0, rst_n = 0;
  logic bexcite = 0;
  logic [15:0] key;
  logic kv;
  int checks = 0, failures = 0;
  // per width: inter-chip, intra-chip and ones bit counts, and a done flag
  longint inter [NW], intra [NW], ones [NW];
  logic [NW-1:0] wdone = '0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NW; g++) begin : g_w
    localparam int N = WIDTHS[g];
    logic excite = 0;
    logic [N-1:0] c = '0;
    logic [N-1:0] r [4];
    logic [3:0] v;

    arbiter_puf #(.N(N), .CHIP_SEED(32'h1234_5678), .NOISE(NOISE)) p0 (.clk, .rst_n, .excite, .challenge(c), .response(r[0]), .valid(v[0]));
    arbiter_puf #(.N(N), .CHIP_SEED(32'h0BAD_F00D), .NOISE(NOISE)) p1 (.clk, .rst_n, .excite, .challenge(c), .response(r[1]), .valid(v[1]));
    arbiter_puf #(.N(N), .CHIP_SEED(32'h5EED_0003), .NOISE(NOISE)) p2 (.clk, .rst_n, .excite, .challenge(c), .response(r[2]), .valid(v[2]));
    arbiter_puf #(.N(N), .CHIP_SEED(32'h5EED_0004), .NOISE(NOISE)) p3 (.clk, .rst_n, .excite, .challenge(c), .response(r[3]), .valid(v[3]));

    task automatic eval_all(logic [N-1:0] cc, output logic [N-1:0] o [4]);
      @(negedge clk); c = cc; excite = 1;
      @(negedge clk); excite = 0;
      for (int i = 0; i < 4; i++) o[i] = r[i];
    endtask

    initial begin
      logic [N-1:0] a [4], b [4], cc;
      longint ie = 0, ia = 0, on = 0;
      wait (rst_n);
      for (int t = 0; t < CH; t++) begin
        for (int k = 0; k < N; k += 32) cc = (cc << 32) | N'($urandom);
        eval_all(cc, a);
        eval_all(cc, b);
        for (int i = 0; i < 4; i++) begin
          ia += $countones(a[i] ^ b[i]);
          on += $countones(a[i]);
          for (int j = i + 1; j < 4; j++) ie += $countones(a[i] ^ a[j]);
        end
      end
      inter[g] = ie; intra[g] = ia; ones[g] = on;
      wdone[g] = 1'b1;
    end
  end

  butterfly_puf #(.N(16)) b0 (.clk, .rst_n, .excite(bexcite), .key, .valid(kv));

  task automatic expect_range(string what, real x, real lo, real hi);
    checks++;
    $display("%s: %0.2f %%", what, x);
    if (x < lo || x > hi) begin failures++; $display("FAIL %s outside %0.1f..%0.1f", what, lo, hi); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint bintra = 0, bones = 0;
    logic [15:0] k0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // butterfly PUF: 200 pairs of excitations
    for (int t = 0; t < 2 * CH; t++) begin
      @(negedge clk); bexcite = 1;
      @(negedge clk); bexcite = 0;
      while (!kv) @(negedge clk);
      if (t % 2 == 0) k0 = key;
      else bintra += $countones(k0 ^ key);
      bones += $countones(key);
    end
    wait (&wdone);
    for (int g = 0; g < NW; g++) begin
      real bits;
      bits = real'(CH * WIDTHS[g]);
      $display("arbiter PUF, %0d bits (4 chips, %0d challenges, NOISE=%0d):", WIDTHS[g], CH, NOISE);
      expect_range("  uniqueness", 100.0 * real'(inter[g]) / (6.0 * bits), 40.0, 60.0);
      expect_range("  reliability", 100.0 - 100.0 * real'(intra[g]) / (4.0 * bits),
                   WIDTHS[g] == 16 ? 96.0 : 90.0, 99.9);
      expect_range("  randomness", 100.0 * real'(ones[g]) / (4.0 * bits), 40.0, 60.0);
    end
    $display("butterfly PUF (%0d excitation pairs):", CH);
    expect_range("  reliability", 100.0 - 100.0 * real'(bintra) / real'(CH * 16), 80.0, 95.0);
    expect_range("  share of ones", 100.0 * real'(bones) / real'(2 * CH * 16), 80.0, 95.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
