// tb_efsm_verifier: runs the extended FSM through each of its transitions
// with signatures built in the testbench by a bit-index model of the mixing:
// Start->E0->AS for enrolled keys at each position of the key set (with the
// clock count of the decision), E0->UA on timeout for an unenrolled key, for
// a wrong HD and for a time limit shorter than the key's position, and
// Start->UA for an HD outside 7..10 and for an empty register. It also
// checks that AS and UA hold and that RESET returns the machine to Start.
module tb_efsm_verifier;
  import hs_pkg::*;
  logic clk = 0, rst_n = 0, rst_efsm = 1;
  word_t hs_in = 0, out1, out2;
  hd_t hd = 0;
  word_t [NBR-1:0] keys;
  logic [7:0] t_limit = 8'd10, t_left;
  logic authenticated, rejected, in_e0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  efsm_verifier #(.HD_MIN(4'd7), .HD_MAX(4'd10), .T_W(8)) dut (
    .clk, .rst_n, .rst_efsm, .hs_in, .hd, .keys, .t_limit,
    .authenticated, .rejected, .in_e0, .out1, .out2, .t_left);

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

  // Release RESET with the given inputs; return the decision and the number
  // of clock edges until it.
  task automatic verify(word_t h, hd_t d, logic [7:0] t, output logic acc, output int edges);
    @(negedge clk);
    rst_efsm = 1; hs_in = h; hd = d; t_limit = t;
    @(negedge clk);
    expect_eq("Start while RESET", {authenticated, rejected, in_e0}, 0);
    rst_efsm = 0;
    edges = 0;
    while (!authenticated && !rejected && edges < 100) begin @(negedge clk); edges++; end
    acc = authenticated;
    repeat (5) @(negedge clk);
    expect_eq("decision holds", {authenticated, rejected}, {acc, !acc});
  endtask

  task automatic case_(string what, word_t h, hd_t d, logic [7:0] t, logic exp_acc, int exp_edges);
    logic acc;
    int e;
    verify(h, d, t, acc, e);
    expect_eq({what, " decision"}, acc, exp_acc);
    expect_eq({what, " clocks"}, e, exp_edges);
    if (exp_acc) expect_eq({what, " Out2"}, out2, keys[exp_edges - 2]);
    else if (exp_edges > 1) expect_eq({what, " Out2 NILL"}, out2, 0);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NBR; b++) keys[b] = CHIP1_BRANCHES[b].key;
    repeat (3) @(posedge clk);
    rst_n = 1;
    case_("key 1",      ref_sign(16'hEFFF, 4'd10), 4'd10, 8'd10, 1, 2);
    case_("key 2",      ref_sign(16'hCFFF, 4'd10), 4'd10, 8'd10, 1, 3);
    case_("key 3",      ref_sign(16'hFF7F, 4'd9),  4'd9,  8'd10, 1, 4);
    case_("key 4",      ref_sign(16'hDFFF, 4'd9),  4'd9,  8'd10, 1, 5);
    case_("HD 7 edge",  ref_sign(16'hDFFF, 4'd7),  4'd7,  8'd10, 1, 5);
    case_("unenrolled", ref_sign(16'h1234, 4'd9),  4'd9,  8'd10, 0, 11);
    case_("wrong HD",   ref_sign(16'hDFFF, 4'd9),  4'd8,  8'd10, 0, 11);
    case_("short T",    ref_sign(16'hDFFF, 4'd9),  4'd9,  8'd3,  0, 4);
    case_("HD 11",      ref_sign(16'hEFFF, 4'd11), 4'd11, 8'd10, 0, 1);
    case_("HD 6",       ref_sign(16'hEFFF, 4'd6),  4'd6,  8'd10, 0, 1);
    case_("empty REG",  16'h0000,                  4'd9,  8'd10, 0, 1);
    case_("tampered",   ref_sign(16'hDFFF, 4'd9) ^ 16'h0100, 4'd9, 8'd10, 0, 11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
