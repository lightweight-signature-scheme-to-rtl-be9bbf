// tb_arbiter_puf: checks the arbiter PUF model for the properties a PUF
// must have: the response appears with a one-clock valid pulse after the
// excite clock, the same challenge always gives the same response on one
// chip (noise off), responses change with the challenge, about half of the
// bits are ones, and two chips (seeds) answer the same challenges
// differently in roughly half of the bits (uniqueness).
module tb_arbiter_puf;
  logic clk = 0, rst_n = 0;
  logic excite;
  logic [15:0] challenge, resp_a, resp_b;
  logic valid_a, valid_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  arbiter_puf #(.N(16), .CHIP_SEED(32'h1234_5678)) chip_a (
    .clk, .rst_n, .excite, .challenge, .response(resp_a), .valid(valid_a));
  arbiter_puf #(.N(16), .CHIP_SEED(32'h0BAD_F00D)) chip_b (
    .clk, .rst_n, .excite, .challenge, .response(resp_b), .valid(valid_b));

  task automatic apply(logic [15:0] c, output logic [15:0] ra, output logic [15:0] rb);
    challenge = c;
    excite = 1'b1;
    @(posedge clk); #1;
    excite = 1'b0;
    checks++;
    if (!valid_a || !valid_b) begin failures++; $display("FAIL no valid pulse"); end
    ra = resp_a; rb = resp_b;
    @(posedge clk); #1;
    checks++;
    if (valid_a) begin failures++; $display("FAIL valid longer than one clock"); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] ra, rb, ra2, rb2, first;
    int ones, inter, distinct;
    excite = 0; challenge = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    ones = 0; inter = 0; distinct = 0;
    apply(16'h0000, first, rb);
    for (int k = 0; k < 400; k++) begin
      logic [15:0] c;
      c = 16'($urandom);
      apply(c, ra, rb);
      apply(c, ra2, rb2);
      checks++;
      if (ra !== ra2 || rb !== rb2) begin
        failures++; $display("FAIL response not repeatable for %h", c);
      end
      ones  += $countones(ra);
      inter += $countones(ra ^ rb);
      if (ra != first) distinct++;
    end
    // 400 x 16 = 6400 bits: demand 35..65 % ones and inter-chip distance
    checks += 3;
    if (ones < 2240 || ones > 4160) begin failures++; $display("FAIL ones=%0d", ones); end
    if (inter < 2240 || inter > 4160) begin failures++; $display("FAIL inter=%0d", inter); end
    if (distinct < 300) begin failures++; $display("FAIL distinct=%0d", distinct); end
    $display("ones %0d inter-chip distance %0d of 6400 bits", ones, inter);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
