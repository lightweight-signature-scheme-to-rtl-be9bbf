// tb_sig_fsm: drives the generation FSM with scripted PUF answers. The
// arbiter side answers a sequence of Hamming distances, the butterfly side a
// sequence of keys, each one clock after the excite pulse. The testbench
// checks the number of retries of both levels, that each retry uses the next
// challenge of the LFSR (x^16+x^14+x^13+x^11+1, computed here), that the
// passcode is the accepted challenge, that a KEY enrolled for another HD is
// refused, the chosen branch, the signature against a bit-index model of the
// mixing, and the clock count from start to done. A second FSM with a table
// of HD ranges checks that every HD inside a branch's range is accepted,
// that one outside all ranges is not, and that the signature is made from
// the HD measured.
module tb_sig_fsm;
  import hs_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic apuf_excite, apuf_valid = 0, bpuf_excite, bpuf_valid = 0;
  word_t apuf_challenge, key = 0, hs, passcode_c;
  hd_t hd = 0;
  logic busy, done, l1_retry, l2_retry;
  logic [1:0] branch;
  int checks = 0, failures = 0;
  int l1_cnt = 0, l2_cnt = 0;
  hd_t   hd_q[$];
  word_t key_q[$];
  word_t chal_log[$];

  // second FSM: branches with HD ranges
  localparam branch_tab_t RANGE_BRANCHES = '{
    '{hd: 4'd3,  hd_hi: 4'd5,  key: 16'hDFFF},
    '{hd: 4'd10, hd_hi: 4'd11, key: 16'hEFFF},
    '{hd: 4'd9,  hd_hi: 4'd9,  key: 16'hFF7F},
    '{hd: 4'd7,  hd_hi: 4'd8,  key: 16'hCFFF}
  };
  logic start_r = 0, ax_r, av_r = 0, bx_r, bv_r = 0;
  word_t ac_r, key_r = 0, hs_r, pc_r;
  hd_t hd_r = 0;
  logic busy_r, done_r, l1_r, l2_r;
  logic [1:0] branch_r;
  int l1_cnt_r = 0, l2_cnt_r = 0;
  hd_t   hd_qr[$];
  word_t key_qr[$];

  always #5 clk = ~clk;

  sig_fsm #(.BRANCHES(CHIP1_BRANCHES), .CHALLENGE_SEED(16'hACE1)) dut (
    .clk, .rst_n, .start, .apuf_excite, .apuf_challenge, .apuf_valid, .hd,
    .bpuf_excite, .bpuf_valid, .key, .busy, .done, .hs, .passcode_c, .branch,
    .l1_retry, .l2_retry);

  sig_fsm #(.BRANCHES(RANGE_BRANCHES), .CHALLENGE_SEED(16'h1234)) dut_r (
    .clk, .rst_n, .start(start_r), .apuf_excite(ax_r), .apuf_challenge(ac_r),
    .apuf_valid(av_r), .hd(hd_r), .bpuf_excite(bx_r), .bpuf_valid(bv_r), .key(key_r),
    .busy(busy_r), .done(done_r), .hs(hs_r), .passcode_c(pc_r), .branch(branch_r),
    .l1_retry(l1_r), .l2_retry(l2_r));

  always @(posedge clk) begin
    av_r <= ax_r;
    bv_r <= bx_r;
    if (ax_r) hd_r <= hd_qr.size() ? hd_qr.pop_front() : 4'd0;
    if (bx_r) key_r <= key_qr.size() ? key_qr.pop_front() : 16'h0000;
    if (rst_n && l1_r) l1_cnt_r++;
    if (rst_n && l2_r) l2_cnt_r++;
  end

  // scripted PUFs
  always @(posedge clk) begin
    apuf_valid <= apuf_excite;
    bpuf_valid <= bpuf_excite;
    if (apuf_excite) begin
      chal_log.push_back(apuf_challenge);
      hd <= hd_q.size() ? hd_q.pop_front() : 4'd0;
    end
    if (bpuf_excite) key <= key_q.size() ? key_q.pop_front() : 16'h0000;
    if (rst_n && l1_retry) l1_cnt++;
    if (rst_n && l2_retry) l2_cnt++;
  end

  function automatic word_t lfsr_next(word_t s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  function automatic word_t ref_sign(word_t k, hd_t h);
    word_t x, s;
    for (int i = 0; i < 16; i++) x[i] = k[i] ^ h[i % 4];
    for (int i = 0; i < 16; i++) s[(i + 4 * (int'(h) % 4)) % 16] = x[i];
    return s;
  endfunction

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0h expected %0h", what, got, exp); end
  endtask

  task automatic run_r(hd_t hds[$], word_t keys[$], int exp_l1, int exp_l2,
                      int exp_branch, word_t exp_hs);
    hd_qr = hds; key_qr = keys;
    l1_cnt_r = 0; l2_cnt_r = 0;
    @(negedge clk); start_r = 1;
    @(negedge clk); start_r = 0;
    for (int i = 0; i < 1000 && !done_r; i++) @(negedge clk);
    expect_eq("range: done", done_r, 1);
    expect_eq("range: level-1 retries", l1_cnt_r, exp_l1);
    expect_eq("range: level-2 retries", l2_cnt_r, exp_l2);
    expect_eq("range: branch", branch_r, exp_branch);
    expect_eq("range: signature", hs_r, exp_hs);
  endtask

  task automatic run(output int cycles);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 0;     // clock edges after the one that samples start
    while (!done && cycles < 1000) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    word_t exp_c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Run 1: three HDs outside the table, then HD 9 (branches 3 and 4).
    // KEY FFFF is not enrolled, EFFF is enrolled but for HD 10, FF7F is
    // branch 3's key (table index 2).
    hd_q  = '{4'd3, 4'd12, 4'd7, 4'd9};
    key_q = '{16'hFFFF, 16'hEFFF, 16'hFF7F};
    run(cyc);
    expect_eq("done", done, 1);
    expect_eq("level-1 retries", l1_cnt, 3);
    expect_eq("level-2 retries", l2_cnt, 2);
    expect_eq("branch", branch, 2);
    expect_eq("signature", hs, ref_sign(16'hFF7F, 4'd9));
    // 4 level-1 tries x 2 clocks + 3 level-2 tries x 2 clocks + 1 mix clock
    expect_eq("clocks start->done", cyc, 15);
    exp_c = 16'hACE1;
    expect_eq("tries", chal_log.size(), 4);
    foreach (chal_log[i]) begin
      expect_eq("challenge sequence", chal_log[i], exp_c);
      if (i < 3) exp_c = lfsr_next(exp_c);
    end
    expect_eq("passcode", passcode_c, exp_c);
    expect_eq("busy after done", busy, 0);
    // Run 2: immediate hit on branch 1 (HD 10, EFFF); new challenge.
    chal_log.delete();
    l1_cnt = 0; l2_cnt = 0;
    hd_q  = '{4'd10};
    key_q = '{16'hEFFF};
    run(cyc);
    expect_eq("done 2", done, 1);
    expect_eq("retries 2", l1_cnt + l2_cnt, 0);
    expect_eq("branch 2", branch, 0);
    expect_eq("signature 2", hs, ref_sign(16'hEFFF, 4'd10));
    expect_eq("clocks 2", cyc, 5);
    expect_eq("fresh challenge", passcode_c, lfsr_next(exp_c));
    // HD ranges: 6 and 12 are in no range, 8 is in 7..8; EFFF is enrolled
    // only for 10..11 and is refused; CFFF is accepted with HD 8.
    run_r('{4'd6, 4'd12, 4'd8}, '{16'hEFFF, 16'hCFFF}, 2, 1, 0, ref_sign(16'hCFFF, 4'd8));
    // every HD of each range is accepted
    run_r('{4'd7}, '{16'hCFFF}, 0, 0, 0, ref_sign(16'hCFFF, 4'd7));
    run_r('{4'd11}, '{16'hEFFF}, 0, 0, 2, ref_sign(16'hEFFF, 4'd11));
    run_r('{4'd10}, '{16'hEFFF}, 0, 0, 2, ref_sign(16'hEFFF, 4'd10));
    run_r('{4'd2, 4'd4}, '{16'hDFFF}, 1, 0, 3, ref_sign(16'hDFFF, 4'd4));
    run_r('{4'd5}, '{16'hFF7F, 16'hDFFF}, 0, 1, 3, ref_sign(16'hDFFF, 4'd5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
