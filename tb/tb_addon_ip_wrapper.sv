// tb_addon_ip_wrapper: checks the encapsulated signature register (reset,
// load, hold) and the gating of the IP core's outputs by the verifier's
// AS and UA states.
module tb_addon_ip_wrapper;
  import hs_pkg::*;
  logic clk = 0, rst_n = 0, hs_wr = 0, enable = 0, reject = 0, rejected;
  word_t hs_wdata = 0, authenticate;
  logic [7:0] core_out = 0, ip_output;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  addon_ip_wrapper #(.OUT_W(8)) dut (.clk, .rst_n, .hs_wr, .hs_wdata, .authenticate,
    .enable, .reject, .core_out, .ip_output, .rejected);

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
    word_t held;
    repeat (2) @(negedge clk);
    expect_eq("reset value", authenticate, 0);
    rst_n = 1;
    held = 0;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      hs_wr = ($urandom_range(3) == 0);
      hs_wdata = 16'($urandom);
      enable = $urandom_range(1);
      reject = !enable && $urandom_range(1);
      core_out = 8'($urandom);
      #1;
      expect_eq("gated output", ip_output, enable ? core_out : 8'h00);
      expect_eq("rejected", rejected, reject);
      @(posedge clk); #1;
      if (hs_wr) held = hs_wdata;
      expect_eq("signature register", authenticate, held);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
