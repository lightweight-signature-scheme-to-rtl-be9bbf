// tb_resuming_response: checks that the passcode challenge is applied to the
// arbiter PUF with one excite pulse, that the PUF is marked busy meanwhile,
// and that the HD answered by a scripted PUF is latched and reported ready
// 3 clocks after the request, for several challenges and PUF delays.
module tb_resuming_response;
  import hs_pkg::*;
  logic clk = 0, rst_n = 0, req = 0;
  word_t passcode_c = 0, apuf_challenge;
  logic apuf_excite, apuf_valid = 0, busy, ready;
  hd_t hd_in = 0, hd;
  int checks = 0, failures = 0;
  int excites = 0;
  int puf_delay = 1;
  word_t seen_c;

  always #5 clk = ~clk;

  resuming_response dut (.clk, .rst_n, .req, .passcode_c, .apuf_excite,
    .apuf_challenge, .apuf_valid, .hd_in, .busy, .ready, .hd);

  // scripted PUF: HD = low nibble of the challenge + 1, after puf_delay clocks
  initial forever begin
    @(posedge clk);
    if (apuf_excite) begin
      excites++;
      seen_c = apuf_challenge;
      repeat (puf_delay - 1) @(posedge clk);
      #1 apuf_valid = 1; hd_in = seen_c[3:0] + 4'd1;
      @(posedge clk);
      #1 apuf_valid = 0; hd_in = 4'd0;
    end
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0h expected %0h", what, got, exp); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      int cyc;
      word_t c;
      c = 16'($urandom);
      puf_delay = 1 + (k % 3);
      excites = 0;
      @(negedge clk); req = 1; passcode_c = c;
      @(negedge clk); req = 0; passcode_c = 16'($urandom);
      cyc = 1;
      expect_eq("busy", busy, 1);
      while (!ready && cyc < 50) begin @(negedge clk); cyc++; end
      expect_eq("challenge applied", seen_c, c);
      expect_eq("HD latched", hd, 4'(c[3:0] + 4'd1));
      expect_eq("one excite", excites, 1);
      expect_eq("clocks to ready", cyc, 2 + puf_delay);
      expect_eq("not busy", busy, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
