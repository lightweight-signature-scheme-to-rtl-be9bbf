// sig_fsm: the three-level finite state machine that generates the hardware
// signature (HS) from the two PUFs.
//
// Level 1 (S0 -> S1..S4): the arbiter PUF is excited with a challenge and the
// Hamming distance (HD) of the pair is compared with the enrolled HD, or HD
// range, of each of the four branches (condition C1). If none matches, the
// challenge is altered (a 16-bit LFSR steps) and the APUF is excited again.
// Level 2 (Si -> Ki): the butterfly PUF is excited and its KEY is compared
// with the enrolled KEY of every branch whose HD matched (condition C2). If
// none matches, the BPUF is excited again. The signature is made from the HD
// actually measured, so a branch with an HD range yields one signature per
// HD in its range.
// Level 3 (Ki -> HS): the signature is the XOR-and-shift mix of HD and KEY
// (xor_shift_mixer); the FSM rests in the accepting state with `done` high,
// and its copies of the secret KEY and HD are cleared.
// The challenge that passed level 1 is returned as the passcode challenge C,
// which the verifier needs to measure the same HD again on this chip.
//
// The level structure, the two retry loops and the mixing follow the
// document. The enrolled table defaults to the chip-1 enrolment values it
// prints. The LFSR, the handshakes (one-clock excite pulses, one-clock valid
// pulses), the first-match order between branches and the branch numbering
// of the accepting state are this design's choices.
//
// Interface and timing: pulse `start`; `done` rises after at least
// 2 + 2*(level-1 tries) + (BPUF latency+1)*(level-2 tries) + 2 clocks and
// stays high until the next `start`; `busy` is high in between. `l1_retry` / `l2_retry` pulse once per
// failed try of each level.
module sig_fsm
  import hs_pkg::*;
#(
  parameter branch_tab_t BRANCHES       = CHIP1_BRANCHES,
  parameter word_t       CHALLENGE_SEED = 16'hACE1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  // arbiter PUF side (through hd_hash)
  output logic  apuf_excite,
  output word_t apuf_challenge,
  input  logic  apuf_valid,
  input  hd_t   hd,
  // butterfly PUF side
  output logic  bpuf_excite,
  input  logic  bpuf_valid,
  input  word_t key,
  // result
  output logic  busy,
  output logic  done,
  output word_t hs,
  output word_t passcode_c,
  output logic [1:0] branch,
  output logic  l1_retry,
  output logic  l2_retry
);

  typedef enum logic [2:0] {
    S0,          // start state
    L1_EXCITE,   // apply challenge to the APUF
    L1_WAIT,     // wait for the HD, test C1
    L2_EXCITE,   // state Si: excite the BPUF
    L2_WAIT,     // wait for the KEY, test C2
    K_SIGN,      // state Ki: mix HD and KEY
    HS_ACCEPT    // accepting state HS
  } state_t;

  state_t          state;
  word_t           lfsr;
  hd_t             hd_q;
  word_t           key_q;
  logic [NBR-1:0]  hd_hit, key_hit, cand;
  logic [1:0]      key_idx;
  word_t           mix_out1, mix_sign;

  // Condition C1: which branches accept this HD.
  always_comb begin
    for (int b = 0; b < NBR; b++) hd_hit[b] = (hd >= BRANCHES[b].hd) && (hd <= BRANCHES[b].hd_hi);
  end

  // Condition C2: which of the candidate branches accept this KEY.
  always_comb begin
    key_idx = '0;
    for (int b = 0; b < NBR; b++) key_hit[b] = cand[b] && (BRANCHES[b].key == key);
    for (int b = NBR - 1; b >= 0; b--) if (key_hit[b]) key_idx = 2'(b);
  end

  xor_shift_mixer u_mix (
    .key  (key_q),
    .hd   (hd_q),
    .out1 (mix_out1),
    .sign (mix_sign)
  );

  assign apuf_challenge = lfsr;
  assign apuf_excite    = (state == L1_EXCITE);
  assign bpuf_excite    = (state == L2_EXCITE);
  assign done           = (state == HS_ACCEPT);
  assign busy           = (state != S0) && (state != HS_ACCEPT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S0;
      lfsr       <= CHALLENGE_SEED;
      hd_q       <= '0;
      key_q      <= '0;
      cand       <= '0;
      branch     <= '0;
      hs         <= '0;
      passcode_c <= '0;
      l1_retry   <= 1'b0;
      l2_retry   <= 1'b0;
    end else begin
      l1_retry <= 1'b0;
      l2_retry <= 1'b0;
      unique case (state)
        S0, HS_ACCEPT: if (start) state <= L1_EXCITE;
        L1_EXCITE:     state <= L1_WAIT;
        L1_WAIT: if (apuf_valid) begin
          if (|hd_hit) begin
            hd_q       <= hd;
            cand       <= hd_hit;
            passcode_c <= lfsr;
            state      <= L2_EXCITE;
          end else begin
            // GOTO L1: alter the challenge (x^16 + x^14 + x^13 + x^11 + 1)
            lfsr     <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
            l1_retry <= 1'b1;
            state    <= L1_EXCITE;
          end
        end
        L2_EXCITE:     state <= L2_WAIT;
        L2_WAIT: if (bpuf_valid) begin
          if (|key_hit) begin
            key_q  <= key;
            branch <= key_idx;
            state  <= K_SIGN;
          end else begin
            l2_retry <= 1'b1;           // GOTO L2
            state    <= L2_EXCITE;
          end
        end
        K_SIGN: begin
          hs    <= mix_sign;
          // the secret KEY and HD are deleted once the signature exists
          key_q <= '0;
          hd_q  <= '0;
          // the next signature starts from a fresh challenge
          lfsr  <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
          state <= HS_ACCEPT;
        end
        default: state <= S0;
      endcase
    end
  end

  // The accepted pair must be one of the enrolled branches.
  a_accept_enrolled: assert property (@(posedge clk) disable iff (!rst_n)
    (state == K_SIGN) |-> (hd_q >= BRANCHES[branch].hd && hd_q <= BRANCHES[branch].hd_hi &&
                           BRANCHES[branch].key == key_q));

endmodule
