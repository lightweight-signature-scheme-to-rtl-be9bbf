// tb_enrolment: the enrolment experiment that selects a chip's (HD, KEY)
// branches. For each of two chips (two arbiter-PUF seeds) it runs 500
// iterations of one random challenge on the arbiter PUF (hashed to its HD)
// and one excitation of the butterfly PUF, and counts the occurrences of
// every (HD, KEY) pair. It checks that every key is one of the 16 that the
// unstable cells allow, that the counts add up, that the HDs spread around
// the middle of 0..16, and that the two chips' HD distributions differ. It
// prints, per chip, the four most frequent pairs with HD in 7..10, the
// candidates for the FSM's branch table.
module tb_enrolment;
  localparam int ITER = 500;
  logic clk = 0, rst_n = 0;
  logic excite_a = 0, excite_b = 0;
  logic [15:0] c = 0, r1, r2, key;
  logic v1, v2, vk;
  logic [3:0] hd1, hd2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  arbiter_puf #(.N(16), .CHIP_SEED(32'h1234_5678)) chip1 (
    .clk, .rst_n, .excite(excite_a), .challenge(c), .response(r1), .valid(v1));
  arbiter_puf #(.N(16), .CHIP_SEED(32'h0BAD_F00D)) chip2 (
    .clk, .rst_n, .excite(excite_a), .challenge(c), .response(r2), .valid(v2));
  butterfly_puf #(.N(16)) bpuf (.clk, .rst_n, .excite(excite_b), .key, .valid(vk));
  hd_hash #(.N(16), .HD_W(4)) h1 (.challenge(c), .response(r1), .hd(hd1));
  hd_hash #(.N(16), .HD_W(4)) h2 (.challenge(c), .response(r2), .hd(hd2));

  task automatic expect_true(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic report(string chip, int to [logic [19:0]]);
    logic [19:0] best [4];
    int n [4];
    foreach (n[i]) n[i] = 0;
    foreach (to[p]) if (p[19:16] >= 7 && p[19:16] <= 10) begin
      for (int i = 0; i < 4; i++) if (to[p] > n[i]) begin
        for (int j = 3; j > i; j--) begin best[j] = best[j-1]; n[j] = n[j-1]; end
        best[i] = p; n[i] = to[p];
        break;
      end
    end
    for (int i = 0; i < 4; i++)
      $display("%s candidate %0d: HD%0d, %h, %0d occurrences", chip, i + 1, best[i][19:16], best[i][15:0], n[i]);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int to1 [logic [19:0]];
    int to2 [logic [19:0]];
    int hist1 [16], hist2 [16];
    int total1, total2, diff;
    foreach (hist1[i]) begin hist1[i] = 0; hist2[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < ITER; k++) begin
      logic [3:0] a, b;
      @(negedge clk); c = 16'($urandom); excite_a = 1; excite_b = 1;
      @(negedge clk); excite_a = 0; excite_b = 0;
      a = hd1; b = hd2;
      while (!vk) @(negedge clk);
      expect_true("key in the allowed set", (key | 16'h3090) == 16'hFFFF);
      to1[{a, key}] = to1.exists({a, key}) ? to1[{a, key}] + 1 : 1;
      to2[{b, key}] = to2.exists({b, key}) ? to2[{b, key}] + 1 : 1;
      hist1[a]++; hist2[b]++;
    end
    total1 = 0; total2 = 0;
    foreach (to1[p]) total1 += to1[p];
    foreach (to2[p]) total2 += to2[p];
    expect_true("chip 1 counts add up", total1 == ITER);
    expect_true("chip 2 counts add up", total2 == ITER);
    expect_true("chip 1 HDs centred", hist1[7] + hist1[8] + hist1[9] > ITER / 4);
    expect_true("chip 2 HDs centred", hist2[7] + hist2[8] + hist2[9] > ITER / 4);
    diff = 0;
    foreach (hist1[i]) diff += (hist1[i] > hist2[i]) ? hist1[i] - hist2[i] : hist2[i] - hist1[i];
    $display("HD histogram difference between the chips: %0d of %0d", diff, 2 * ITER);
    for (int i = 0; i < 16; i++) $display("HD%0d: chip 1 %0d, chip 2 %0d", i, hist1[i], hist2[i]);
    report("chip 1", to1);
    report("chip 2", to2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
