// tb_hw_signature_top: end-to-end test of the signature system at its
// default parameters, driven as a processor would drive it over AXI4-Lite.
//
//  1. Generation: start, wait for done, then check independently that the
//     Hamming distance of the returned passcode challenge and the last APUF
//     response is the enrolled HD of the reported branch, that the last BPUF
//     key is that branch's KEY, and that the encapsulated signature is the
//     bit-index mix of the two.
//  2. Verification with the right passcode: the IP core is authenticated and
//     its outputs pass.
//  3. A signature modified in the register (loaded as from a bit file) is
//     rejected after the time limit and the outputs are blocked.
//  4. Random passcode challenges: the decision is compared with a model of
//     the extended FSM fed with the HD of the PUF's answer (read back).
//  5. A time limit too short for the branch's key position.
//  6. A second generation, which must use a fresh challenge, verified again.
//  7. Several IP cores: a signature generated into a second core, a
//     modified one loaded into a third, each verified in turn; earlier
//     verdicts must stay, an unverified core stays blocked, and a selection
//     beyond the last core touches none.
// Each mechanism (both retry loops, acceptance, rejection by time-out,
// rejection in Start for an HD outside 7..10, loading a signature, output
// gating, per-core verdicts) is counted, and one that never happened is a
// failure.
module tb_hw_signature_top;
  import hs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [5:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0;
  logic arvalid = 0, arready, rvalid, rready = 0;
  logic [31:0] wdata = 0, rdata;
  logic [3:0] wstrb = 0;
  logic [1:0] bresp, rresp;
  localparam int NUM_IP = 4;
  logic [NUM_IP-1:0][7:0] core_out = '0, ip_output;
  word_t [NUM_IP-1:0] authenticate;
  word_t arb_out, bp_out;
  logic [NUM_IP-1:0] authenticated, rejected;
  int cur = 0;   // core selected in IP_SEL
  int checks = 0, failures = 0;

  int n_l1 = 0, n_l2 = 0, n_accept = 0, n_timeout = 0, n_window = 0,
      n_load = 0, n_pass = 0, n_block = 0, n_multi = 0;

  always #5 clk = ~clk;

  hw_signature_top dut (
    .clk, .rst_n,
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready), .s_wdata(wdata),
    .s_wstrb(wstrb), .s_wvalid(wvalid), .s_wready(wready), .s_bresp(bresp),
    .s_bvalid(bvalid), .s_bready(bready), .s_araddr(araddr), .s_arvalid(arvalid),
    .s_arready(arready), .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid),
    .s_rready(rready),
    .core_out, .ip_output, .authenticate, .arb_out, .bp_out, .authenticated, .rejected);

  // the IP cores behind the wrappers: free-running patterns
  always @(posedge clk)
    for (int i = 0; i < NUM_IP; i++) core_out[i] <= core_out[i] + 8'(37 + 2 * i);

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0h expected %0h", what, got, exp); end
  endtask

  task automatic axi_write(logic [5:0] a, logic [31:0] d);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wstrb = 4'hF; wvalid = 1; bready = 1;
    do @(posedge clk); while (!awready);
    #1 awvalid = 0; wvalid = 0;
    while (!bvalid) @(posedge clk);
    @(posedge clk); #1 bready = 0;
  endtask

  task automatic axi_read(logic [5:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1; rready = 1;
    do @(posedge clk); while (!arready);
    #1 arvalid = 0;
    while (!rvalid) @(posedge clk);
    d = rdata;
    @(posedge clk); #1 rready = 0;
  endtask

  function automatic word_t ref_sign(word_t k, hd_t h);
    word_t x, s;
    for (int i = 0; i < 16; i++) x[i] = k[i] ^ h[i % 4];
    for (int i = 0; i < 16; i++) s[(i + 4 * (int'(h) % 4)) % 16] = x[i];
    return s;
  endfunction

  function automatic word_t ref_unsign(word_t s, hd_t h);
    word_t x, k;
    for (int i = 0; i < 16; i++) x[i] = s[(i + 4 * (int'(h) % 4)) % 16];
    for (int i = 0; i < 16; i++) k[i] = x[i] ^ h[i % 4];
    return k;
  endfunction

  function automatic int hamming(word_t a, word_t b);
    int n = 0;
    for (int i = 0; i < 16; i++) if (a[i] != b[i]) n++;
    return n > 15 ? 15 : n;
  endfunction

  // Extended FSM model: 0 = Start->UA, 1 = AS, 2 = E0->UA on time-out.
  function automatic int ref_decision(word_t s, int h, int t);
    if (h < 7 || h > 10 || s == 0) return 0;
    for (int i = 0; i < NBR && i < t; i++)
      if (CHIP1_BRANCHES[i].key == ref_unsign(s, 4'(h))) return 1;
    return 2;
  endfunction

  task automatic generate_hs(output word_t hs, output word_t c, output int br);
    logic [31:0] d;
    int polls = 0;
    axi_write(6'h00, 32'h1);
    do begin axi_read(6'h04, d); polls++; end while (!d[0] && polls < 2000);
    expect_eq("generation done", d[0], 1);
    br = int'(d[5:4]);
    axi_read(6'h08, d); hs = d[15:0];
    axi_read(6'h10, d); c = d[15:0];
    axi_read(6'h14, d);
    expect_eq("HD of passcode CRP", hamming(c, d[15:0]), CHIP1_BRANCHES[br].hd);
    axi_read(6'h18, d);
    expect_eq("BPUF key of branch", d[15:0], CHIP1_BRANCHES[br].key);
    expect_eq("signature", hs, ref_sign(CHIP1_BRANCHES[br].key, CHIP1_BRANCHES[br].hd));
    expect_eq("authenticate port", authenticate[cur], hs);
  endtask

  // Verify with passcode (c, t); returns 1 for AS, 0 for UA.
  task automatic verify(word_t c, logic [7:0] t, output logic acc);
    logic [31:0] d;
    int polls = 0;
    axi_write(6'h0C, {8'h00, t, c});
    axi_write(6'h00, 32'h2);
    do begin axi_read(6'h04, d); polls++; end while (!d[2] && !d[3] && polls < 100);
    checks++;
    if (d[2] == d[3]) begin failures++; $display("FAIL no verification decision"); end
    acc = d[2];
    repeat (3) @(negedge clk);
    if (acc) begin
      expect_eq("outputs pass", ip_output[cur], core_out[cur]);
      if (ip_output[cur] == core_out[cur]) n_pass++;
    end else begin
      expect_eq("outputs blocked", ip_output[cur], 0);
      expect_eq("rejected port", rejected[cur], 1);
      if (ip_output[cur] == 0 && rejected[cur]) n_block++;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t hs, c, hs2, c2, hs3, c3, tampered, rc;
    int br, br2, exp_dec, h;
    logic acc;
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. generation
    generate_hs(hs, c, br);
    axi_read(6'h24, d);
    n_l1 += int'(d[15:0]);
    n_l2 += int'(d[31:16]);
    $display("signature %h branch %0d challenge %h, %0d challenge and %0d key retries",
             hs, br, c, d[15:0], d[31:16]);

    // 2. verification with the right passcode
    verify(c, 8'd10, acc);
    expect_eq("authenticated", acc, 1);
    if (acc) n_accept++;

    // 3. modified signature loaded into the register
    tampered = hs ^ 16'h0101;
    axi_write(6'h20, 32'(tampered));
    n_load++;
    expect_eq("loaded signature", authenticate[0], tampered);
    verify(c, 8'd10, acc);
    expect_eq("tampered signature rejected", acc, 0);
    if (!acc) n_timeout++;
    axi_write(6'h20, 32'(hs));
    n_load++;

    // 4. random passcode challenges against the EFSM model
    for (int k = 0; k < 40; k++) begin
      rc = 16'($urandom);
      verify(rc, 8'd10, acc);
      axi_read(6'h14, d);
      h = hamming(rc, d[15:0]);
      exp_dec = ref_decision(hs, h, 10);
      expect_eq("decision vs model", acc, exp_dec == 1);
      if (exp_dec == 0 && !acc) n_window++;
      if (exp_dec == 2 && !acc) n_timeout++;
      if (exp_dec == 1 && acc) n_accept++;
    end

    // 5. time limit shorter than the key position (needs position > 1)
    exp_dec = ref_decision(hs, int'(CHIP1_BRANCHES[br].hd), 1);
    verify(c, 8'd1, acc);
    expect_eq("short time limit", acc, exp_dec == 1);
    if (exp_dec == 2 && !acc) n_timeout++;

    // 6. second generation, fresh challenge, verified
    generate_hs(hs2, c2, br2);
    checks++;
    if (c2 == c) begin failures++; $display("FAIL challenge reused"); end
    verify(c2, 8'd10, acc);
    expect_eq("second signature authenticated", acc, 1);
    if (acc) n_accept++;

    // 7. several IP cores; core 0 holds hs2 and is authenticated
    cur = 2;
    axi_write(6'h28, 32'd2);
    generate_hs(hs3, c3, br);
    expect_eq("core 0 signature kept", authenticate[0], hs2);
    expect_eq("core 1 untouched", authenticate[1], 0);
    verify(c3, 8'd10, acc);
    expect_eq("core 2 authenticated", acc, 1);
    if (acc) n_accept++;
    cur = 1;
    axi_write(6'h28, 32'd1);
    axi_write(6'h20, 32'(hs3 ^ 16'h0010));
    n_load++;
    verify(c3, 8'd10, acc);
    expect_eq("core 1 modified signature rejected", acc, 0);
    repeat (2) @(negedge clk);
    expect_eq("core 0 still passes", ip_output[0], core_out[0]);
    expect_eq("core 2 still passes", ip_output[2], core_out[2]);
    expect_eq("core 3 never verified, blocked", ip_output[3], 0);
    expect_eq("authenticated port", authenticated, 4'b0101);
    expect_eq("rejected port, per core", rejected, 4'b0010);
    axi_read(6'h2C, d);
    expect_eq("VERDICTS register", d, {16'h0002, 16'h0005});
    axi_read(6'h08, d);
    expect_eq("HS register shows core 1", d[15:0], hs3 ^ 16'h0010);
    axi_write(6'h28, 32'd5);
    axi_read(6'h08, d);
    expect_eq("HS register beyond last core", d, 0);
    verify(c3, 8'd10, acc);
    axi_read(6'h2C, d);
    expect_eq("selection beyond last core changes no verdict", d, {16'h0002, 16'h0005});
    if (authenticated == 4'b0101 && rejected == 4'b0010 && ip_output[3] == 0) n_multi++;
    axi_write(6'h28, 32'd0);
    cur = 0;

    axi_read(6'h24, d);
    n_l1 = int'(d[15:0]);
    n_l2 = int'(d[31:16]);

    $display("mechanisms: challenge retries %0d, key retries %0d, accepted %0d, time-outs %0d,",
             n_l1, n_l2, n_accept, n_timeout);
    $display("            HD-window rejects %0d, signature loads %0d, outputs passed %0d, blocked %0d",
             n_window, n_load, n_pass, n_block);
    $display("            cores with independent verdicts %0d", n_multi);
    if (n_l1 == 0)      begin failures++; $display("FAIL no challenge retry"); end
    if (n_l2 == 0)      begin failures++; $display("FAIL no key retry"); end
    if (n_accept == 0)  begin failures++; $display("FAIL no acceptance"); end
    if (n_timeout == 0) begin failures++; $display("FAIL no time-out"); end
    if (n_window == 0)  begin failures++; $display("FAIL no HD-window reject"); end
    if (n_load == 0)    begin failures++; $display("FAIL no signature load"); end
    if (n_pass == 0)    begin failures++; $display("FAIL outputs never passed"); end
    if (n_block == 0)   begin failures++; $display("FAIL outputs never blocked"); end
    if (n_multi == 0)   begin failures++; $display("FAIL per-core verdicts not seen"); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
