// tb_xor_shift_mixer: checks the XOR stage and the nibble rotation of the
// signature mixer against a bit-index model written in the testbench, and
// checks that every (HD, KEY) pair of the printed chip-1 enrolment gives a
// distinct signature.
module tb_xor_shift_mixer;
  import hs_pkg::*;
  word_t key, out1, sign;
  hd_t   hd;
  int checks = 0, failures = 0;

  xor_shift_mixer dut (.key, .hd, .out1, .sign);

  function automatic word_t ref_sign(word_t k, hd_t h);
    word_t x, s;
    int sh;
    for (int i = 0; i < 16; i++) x[i] = k[i] ^ h[i % 4];
    sh = 4 * (int'(h) % 4);
    for (int i = 0; i < 16; i++) s[(i + sh) % 16] = x[i];
    return s;
  endfunction

  task automatic check(word_t k, hd_t h);
    word_t x;
    key = k; hd = h;
    #1;
    for (int i = 0; i < 16; i++) x[i] = k[i] ^ h[i % 4];
    checks += 2;
    if (out1 !== x) begin failures++; $display("FAIL out1 %h/%h: %h vs %h", k, h, out1, x); end
    if (sign !== ref_sign(k, h)) begin
      failures++; $display("FAIL sign %h/%h: %h vs %h", k, h, sign, ref_sign(k, h));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t s [4];
    check(16'h0001, 4'd1);            // 0x0001^0x1111 = 0x1110, rotl 4 -> 0x1101
    checks++;
    if (sign !== 16'h1101) begin failures++; $display("FAIL fixed vector %h", sign); end
    for (int h = 0; h < 16; h++) check(16'hEFFF, 4'(h));
    for (int k = 0; k < 2000; k++) check(16'($urandom), 4'($urandom));
    for (int b = 0; b < 4; b++) begin
      check(CHIP1_BRANCHES[b].key, CHIP1_BRANCHES[b].hd);
      s[b] = sign;
    end
    for (int a = 0; a < 4; a++)
      for (int b = a + 1; b < 4; b++) begin
        checks++;
        if (s[a] == s[b]) begin failures++; $display("FAIL branches %0d %0d collide", a, b); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
