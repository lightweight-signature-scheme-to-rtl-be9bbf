// tb_ip_core_stack: checks the stack of IP cores against a cycle model.
// Random selections (including numbers beyond the last core), signature
// writes, verification starts and verifier AS/UA outputs are applied for
// 3000 clocks. Each clock the per-core write strobes, the signature routed
// to the verifier and the per-core enabled/rejected verdicts are compared
// with the model. A directed part then checks that changing the selection
// during a verification does not move the verdict, that a verdict is taken
// only once per verification, and that a core's verdict survives the
// verification of the others. It prints how often each case occurred and
// fails if one never did.
module tb_ip_core_stack;
  import hs_pkg::*;
  localparam int NUM_IP = 4;
  logic clk = 0, rst_n = 0;
  logic [7:0] sel = 0;
  logic hs_wr = 0, verify_start = 0, as_state = 0, ua_state = 0;
  logic [NUM_IP-1:0] hs_wr_core, enabled, rejected;
  word_t [NUM_IP-1:0] hs_core;
  word_t hs_sel;
  int checks = 0, failures = 0;
  int n_wr = 0, n_as = 0, n_ua = 0, n_none = 0;

  always #5 clk = ~clk;

  ip_core_stack #(.NUM_IP(NUM_IP)) dut (.clk, .rst_n, .sel, .hs_wr, .hs_wr_core,
    .hs_core, .verify_start, .hs_sel, .as_state, .ua_state, .enabled, .rejected);

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0h expected %0h", what, got, exp); end
  endtask

  // model state
  int m_vsel = 0;
  bit m_pending = 0;
  logic [NUM_IP-1:0] m_en = '0, m_rej = '0;

  task automatic model_clock();
    if (verify_start) begin
      m_vsel = int'(sel);
      m_pending = (int'(sel) < NUM_IP);
      if (int'(sel) < NUM_IP) begin m_en[sel] = 0; m_rej[sel] = 0; end
      if (int'(sel) >= NUM_IP) n_none++;
    end else if (m_pending && (as_state || ua_state)) begin
      m_pending = 0;
      m_en[m_vsel] = as_state;
      m_rej[m_vsel] = ua_state;
      if (as_state) n_as++; else n_ua++;
    end
  endtask

  task automatic compare();
    logic [NUM_IP-1:0] exp_wr;
    for (int i = 0; i < NUM_IP; i++) exp_wr[i] = hs_wr && (int'(sel) == i);
    expect_eq("write strobes", hs_wr_core, exp_wr);
    expect_eq("signature under test", hs_sel, m_vsel < NUM_IP ? hs_core[m_vsel] : 16'h0);
    expect_eq("enabled", enabled, m_en);
    expect_eq("rejected", rejected, m_rej);
    if (exp_wr != 0) n_wr++;
  endtask

  // one clock: set inputs at the negedge, compare, advance model at posedge
  task automatic step(logic [7:0] s, bit w, bit v, bit a, bit u);
    @(negedge clk);
    sel = s; hs_wr = w; verify_start = v; as_state = a; ua_state = u;
    for (int i = 0; i < NUM_IP; i++) hs_core[i] = 16'h1111 * 16'(i + 1) ^ 16'(n_wr);
    #1 compare();
    @(posedge clk);
    model_clock();
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit a;
    hs_core = '0;
    repeat (2) @(negedge clk);
    expect_eq("reset enabled", enabled, 0);
    expect_eq("reset rejected", rejected, 0);
    rst_n = 1;

    for (int k = 0; k < 3000; k++) begin
      a = ($urandom_range(5) == 0);
      step(8'($urandom_range(5)), $urandom_range(3) == 0, $urandom_range(7) == 0,
           a, !a && ($urandom_range(5) == 0));
    end

    // directed: verify core 1, switch the selection to 3 before the verdict
    step(8'd1, 0, 1, 0, 0);
    step(8'd3, 0, 0, 0, 0);
    step(8'd3, 0, 0, 1, 0);
    expect_eq("verdict goes to the core selected at the start", enabled[1], 1);
    // a second AS/UA pulse in the same verification is ignored
    step(8'd3, 0, 0, 0, 1);
    step(8'd3, 0, 0, 0, 0);
    expect_eq("one verdict per verification", enabled[1], 1);
    expect_eq("no verdict for the newly selected core", rejected[3], m_rej[3]);
    // reject core 2; core 1 keeps its verdict
    step(8'd2, 0, 1, 0, 0);
    step(8'd2, 0, 0, 0, 1);
    step(8'd2, 0, 0, 0, 0);
    expect_eq("core 2 rejected", rejected[2], 1);
    expect_eq("core 1 still enabled", enabled[1], 1);

    $display("writes %0d, AS verdicts %0d, UA verdicts %0d, verifications of no core %0d",
             n_wr, n_as, n_ua, n_none);
    if (n_wr == 0 || n_as == 0 || n_ua == 0 || n_none == 0) begin
      failures++; $display("FAIL a case never occurred");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
