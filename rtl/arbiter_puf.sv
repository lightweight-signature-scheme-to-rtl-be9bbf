// arbiter_puf: behavioural model of the 16-bit arbiter PUF (APUF), the
// strong PUF of the scheme. It is not synthesizable logic in any useful
// sense: a real APUF races an edge through two chains of challenge-driven
// switch stages and a latch decides which path arrived first, so its answer
// comes from the manufacturing spread of the wire and mux delays.
//
// Model. The response has N bits; bit j comes from its own N-stage chain,
// each stage a pair of 2:1 muxes that pass or cross the two paths under
// challenge bit C[i], closed by an arbiter latch (the structure drawn for the
// arbiter PUF IP). The race is modelled with the usual additive delay model:
// each stage adds a chip-specific signed delay difference whose sign the
// crossed stages invert, and the latch outputs 1 when the sum is positive.
// The delay differences are drawn from CHIP_SEED, so two instances with
// different seeds behave like two chips. NOISE adds a random term to every
// race (0 = perfectly reliable chip).
//
// Interface and timing: pulse `excite` for one clock with `challenge`
// stable; `response` is updated on the next clock edge and holds until the
// next excitation, and `valid` is high for the one clock after that edge. The 16-bit width follows the document's main
// configuration; the per-chain structure, the delay model, the seed and the
// one-cycle latency are this model's own choices.
module arbiter_puf #(
  parameter int unsigned N         = 16,
  parameter int unsigned CHIP_SEED = 32'h1234_5678,
  parameter int unsigned NOISE     = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         excite,
  input  logic [N-1:0] challenge,
  output logic [N-1:0] response,
  output logic         valid
);

  // Integer hash used to draw a stage's delay difference.
  function automatic int unsigned mix32(int unsigned x);
    int unsigned h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb_352d;
    h = h ^ (h >> 15);
    h = h * 32'h846c_a68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Signed delay difference of stage i of chain j, in -512..511 units.
  function automatic int stage_delay(int unsigned j, int unsigned i);
    int unsigned h;
    h = mix32(CHIP_SEED ^ mix32(j * 32'd1031 + i));
    return int'(h[9:0]) - 512;
  endfunction

  // Race through chain j: the sign of the accumulated difference is flipped
  // by every crossed stage behind it.
  function automatic logic race(int unsigned j, logic [N-1:0] c);
    int acc;
    int sgn;
    acc = stage_delay(j, N);         // arbiter latch offset
    sgn = 1;
    for (int k = N - 1; k >= 0; k--) begin
      if (c[k]) sgn = -sgn;
      acc = acc + sgn * stage_delay(j, k);
    end
    if (NOISE != 0)
      acc = acc + int'($urandom_range(2 * NOISE)) - int'(NOISE);
    return acc > 0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      response <= '0;
      valid    <= 1'b0;
    end else if (excite) begin
      for (int j = 0; j < N; j++) response[j] <= race(j, challenge);
      valid <= 1'b1;
    end else begin
      valid <= 1'b0;
    end
  end

endmodule
