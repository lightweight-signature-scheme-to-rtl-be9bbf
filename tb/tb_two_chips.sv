// tb_two_chips: the cloning / signature-forgery experiment with two chips.
// Chip 1 and chip 2 are two instances of the system with different arbiter
// PUF seeds and their own enrolled branch tables. Eight times, chip 1
// generates a signature and authenticates its IP core; then the same
// signature and passcode are loaded into chip 2, as a copied bit file would
// be. Chip 2 re-measures the HD on its own PUF; its decision is compared
// with a model of the extended FSM fed with the HD of chip 2's answer, and
// at least one copy must be refused. Chip 2 must also authenticate a
// signature it generated itself. The number of copies accepted shows how
// often a 4-bit digest collides between two chips.
module tb_two_chips;
  import hs_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // chip 1 bus
  logic [5:0] aw1, ar1; logic awv1, awr1, wv1, wr1, bv1, br1, arv1, arr1, rv1, rr1;
  logic [31:0] wd1, rd1; logic [3:0] ws1; logic [1:0] bre1, rre1;
  // chip 2 bus
  logic [5:0] aw2, ar2; logic awv2, awr2, wv2, wr2, bv2, br2, arv2, arr2, rv2, rr2;
  logic [31:0] wd2, rd2; logic [3:0] ws2; logic [1:0] bre2, rre2;
  logic [3:0][7:0] core_out = {4{8'h5A}}, ipo1, ipo2;
  word_t [3:0] au1, au2;
  word_t ao1, ao2, bo1, bo2;
  logic [3:0] ok1, ok2, rej1, rej2;

  hw_signature_top chip1 (
    .clk, .rst_n, .s_awaddr(aw1), .s_awvalid(awv1), .s_awready(awr1), .s_wdata(wd1),
    .s_wstrb(ws1), .s_wvalid(wv1), .s_wready(wr1), .s_bresp(bre1), .s_bvalid(bv1),
    .s_bready(br1), .s_araddr(ar1), .s_arvalid(arv1), .s_arready(arr1), .s_rdata(rd1),
    .s_rresp(rre1), .s_rvalid(rv1), .s_rready(rr1), .core_out, .ip_output(ipo1),
    .authenticate(au1), .arb_out(ao1), .bp_out(bo1), .authenticated(ok1), .rejected(rej1));
  tb_axil_master m1 (.clk, .awaddr(aw1), .awvalid(awv1), .awready(awr1), .wdata(wd1),
    .wstrb(ws1), .wvalid(wv1), .wready(wr1), .bresp(bre1), .bvalid(bv1), .bready(br1),
    .araddr(ar1), .arvalid(arv1), .arready(arr1), .rdata(rd1), .rresp(rre1),
    .rvalid(rv1), .rready(rr1));

  hw_signature_top #(.CHIP_SEED(32'h0BAD_F00D), .BRANCHES(CHIP2_BRANCHES),
                     .CHALLENGE_SEED(16'h1D2C)) chip2 (
    .clk, .rst_n, .s_awaddr(aw2), .s_awvalid(awv2), .s_awready(awr2), .s_wdata(wd2),
    .s_wstrb(ws2), .s_wvalid(wv2), .s_wready(wr2), .s_bresp(bre2), .s_bvalid(bv2),
    .s_bready(br2), .s_araddr(ar2), .s_arvalid(arv2), .s_arready(arr2), .s_rdata(rd2),
    .s_rresp(rre2), .s_rvalid(rv2), .s_rready(rr2), .core_out, .ip_output(ipo2),
    .authenticate(au2), .arb_out(ao2), .bp_out(bo2), .authenticated(ok2), .rejected(rej2));
  tb_axil_master m2 (.clk, .awaddr(aw2), .awvalid(awv2), .awready(awr2), .wdata(wd2),
    .wstrb(ws2), .wvalid(wv2), .wready(wr2), .bresp(bre2), .bvalid(bv2), .bready(br2),
    .araddr(ar2), .arvalid(arv2), .arready(arr2), .rdata(rd2), .rresp(rre2),
    .rvalid(rv2), .rready(rr2));

  task automatic expect_true(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

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

  function automatic bit ref_accept(word_t s, int h, branch_tab_t tab);
    if (h < 7 || h > 10 || s == 0) return 0;
    for (int i = 0; i < NBR; i++) if (tab[i].key == ref_unsign(s, 4'(h))) return 1;
    return 0;
  endfunction

  // generation on one chip; returns signature and passcode challenge
  task automatic gen(int chip, output word_t hs, output word_t c);
    logic [31:0] d;
    int polls = 0;
    if (chip == 1) m1.write(6'h00, 1); else m2.write(6'h00, 1);
    do begin
      if (chip == 1) m1.read(6'h04, d); else m2.read(6'h04, d);
      polls++;
    end while (!d[0] && polls < 2000);
    expect_true("generation done", d[0]);
    if (chip == 1) m1.read(6'h08, d); else m2.read(6'h08, d);
    hs = d[15:0];
    if (chip == 1) m1.read(6'h10, d); else m2.read(6'h10, d);
    c = d[15:0];
  endtask

  task automatic ver(int chip, word_t c, output bit acc);
    logic [31:0] d;
    int polls = 0;
    if (chip == 1) begin m1.write(6'h0C, {16'h000A, c}); m1.write(6'h00, 2); end
    else           begin m2.write(6'h0C, {16'h000A, c}); m2.write(6'h00, 2); end
    do begin
      if (chip == 1) m1.read(6'h04, d); else m2.read(6'h04, d);
      polls++;
    end while (!d[2] && !d[3] && polls < 100);
    expect_true("decision", d[2] != d[3]);
    acc = d[2];
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t hs, c, hs2, c2;
    logic [31:0] d;
    bit acc, exp;
    int cloned_ok = 0, cloned_refused = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      gen(1, hs, c);
      ver(1, c, acc);
      expect_true("chip 1 authenticates its own signature", acc);
      m2.write(6'h20, 32'(hs));          // copied bit file on chip 2
      ver(2, c, acc);
      m2.read(6'h14, d);
      exp = ref_accept(hs, hamming(c, d[15:0]), CHIP2_BRANCHES);
      expect_true("chip 2 decision matches the model", acc == exp);
      if (acc) cloned_ok++; else cloned_refused++;
    end
    $display("copied signatures: %0d refused, %0d accepted by chip 2", cloned_refused, cloned_ok);
    expect_true("chip 2 refuses copies", cloned_refused > 0);
    gen(2, hs2, c2);
    ver(2, c2, acc);
    expect_true("chip 2 authenticates its own signature", acc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
