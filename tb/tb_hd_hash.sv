// tb_hd_hash: checks the Hamming-distance hash against a bit-by-bit count
// done in the testbench, for corner pairs and 2000 random pairs, including
// the saturation of a full 16-bit difference to 15.
module tb_hd_hash;
  logic [15:0] c, r;
  logic [3:0]  hd;
  int checks = 0, failures = 0;

  hd_hash #(.N(16), .HD_W(4)) dut (.challenge(c), .response(r), .hd);

  task automatic check_pair(logic [15:0] cc, logic [15:0] rr);
    int n;
    c = cc; r = rr;
    #1;
    n = 0;
    for (int i = 0; i < 16; i++) if (cc[i] != rr[i]) n++;
    if (n > 15) n = 15;
    checks++;
    if (hd !== 4'(n)) begin
      failures++;
      $display("FAIL c=%h r=%h hd=%0d expected %0d", cc, rr, hd, n);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_pair(16'h0000, 16'h0000);
    check_pair(16'hFFFF, 16'h0000);   // 16 differences -> 15
    check_pair(16'h7FFF, 16'h0000);   // 15
    check_pair(16'h0001, 16'h0000);
    check_pair(16'hA5A5, 16'h5AA5);   // 8
    for (int k = 0; k < 2000; k++) check_pair(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
