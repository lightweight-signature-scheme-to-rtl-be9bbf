// tb_butterfly_puf: checks the butterfly PUF model: the key arrives with a
// one-clock valid pulse SETTLE+1 clocks after the excite clock, the stable
// cells always give their stable value, each unstable cell gives both values
// over many excitations, and the 16 keys CF6F..FFFF all occur.
module tb_butterfly_puf;
  logic clk = 0, rst_n = 0;
  logic excite;
  logic [15:0] key;
  logic valid;
  int checks = 0, failures = 0;
  localparam logic [15:0] STABLE = 16'hFFFF, UNSTABLE = 16'h3090;

  always #5 clk = ~clk;

  butterfly_puf #(.N(16), .STABLE_KEY(STABLE), .UNSTABLE_MASK(UNSTABLE), .SETTLE(2)) dut (
    .clk, .rst_n, .excite, .key, .valid);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen [logic [15:0]];
    int ones [16];
    excite = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int k = 0; k < 600; k++) begin
      int lat;
      excite = 1;
      @(posedge clk); #1;
      excite = 0;
      lat = 0;
      while (!valid && lat < 20) begin @(posedge clk); #1; lat++; end
      checks++;
      if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
      checks++;
      if ((key & ~UNSTABLE) !== (STABLE & ~UNSTABLE)) begin
        failures++; $display("FAIL stable cells %h", key);
      end
      seen[key] = 1;
      for (int i = 0; i < 16; i++) ones[i] += int'(key[i]);
      @(posedge clk); #1;
      checks++;
      if (valid) begin failures++; $display("FAIL valid longer than one clock"); end
    end
    for (int i = 0; i < 16; i++) if (UNSTABLE[i]) begin
      checks++;
      if (ones[i] < 200 || ones[i] > 400) begin failures++; $display("FAIL cell %0d ones %0d", i, ones[i]); end
    end
    checks++;
    if (seen.num() != 16) begin failures++; $display("FAIL %0d distinct keys", seen.num()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
