// hw_signature_top: a lightweight hardware-signature system that binds
// NUM_IP ADD-ON IP cores to one FPGA. It places the generation phase and the
// verification phase of the scheme behind one AXI4-Lite register port.
//
// Generation: sig_fsm excites the arbiter PUF (arbiter_puf, hashed by
// hd_hash to a 4-bit Hamming distance) until the distance is one of the
// enrolled HDs, then excites the butterfly PUF (butterfly_puf) until its KEY
// is the enrolled KEY of that branch, and mixes HD and KEY
// (xor_shift_mixer) into a 16-bit signature. The signature is written into
// the register encapsulated in the IP core chosen by IP_SEL (addon_ip_wrapper,
// routed by ip_core_stack) and the challenge that was used is made available
// as the passcode.
// Verification: resuming_response applies the passcode challenge to the same
// arbiter PUF and re-measures the HD; while it does so the extended FSM
// (efsm_verifier) is held in its Start state. It then unmixes the stored
// signature and compares it with the public key set within the time limit
// V. The core checked is the one selected when the verification starts; its
// verdict stays latched while other cores are checked. A new verification
// request returns the EFSM to Start at once, so the previous decision is
// never read as the new one. Only an authenticated core's outputs are let
// through.
//
// Both phases share the chip's one arbiter PUF; the verification side has it
// whenever resuming_response is busy. Both phases and the shared PUFs follow
// the document's block diagrams, and NUM_IP = 4 follows the four ADD-ON IP
// cores of the document's system figure. The single register port, the
// sharing of the PUF and of one EFSM among the cores, and holding the EFSM
// in reset until the HD is known are this design's choices. The IP cores
// themselves, the processor and the AXI interconnect are outside: the
// cores' outputs arrive on `core_out[i]`.
//
// Interface and timing: one clock `clk`, active-low asynchronous reset
// `rst_n`, AXI4-Lite slave as described in hs_axil_regs. A generation takes
// a variable number of clocks (two PUF retry loops); a verification takes
// 3 clocks for the HD and 2..T+1 clocks in the EFSM.
module hw_signature_top
  import hs_pkg::*;
#(
  parameter int unsigned CHIP_SEED      = 32'h1234_5678,
  parameter int unsigned APUF_NOISE     = 0,
  parameter word_t       BPUF_STABLE    = 16'hFFFF,
  parameter word_t       BPUF_UNSTABLE  = 16'h3090,
  parameter branch_tab_t BRANCHES       = CHIP1_BRANCHES,
  parameter word_t       CHALLENGE_SEED = 16'hACE1,
  parameter hd_t         HD_MIN         = 4'd7,
  parameter hd_t         HD_MAX         = 4'd10,
  parameter logic [7:0]  T_RESET        = 8'd10,
  parameter int unsigned NUM_IP         = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [5:0]  s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [5:0]  s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  input  logic [NUM_IP-1:0][7:0] core_out,      // outputs of the wrapped IP cores
  output logic [NUM_IP-1:0][7:0] ip_output,     // gated IP core outputs
  output word_t [NUM_IP-1:0]     authenticate,  // encapsulated signature registers
  output word_t                  arb_out,       // arbiter PUF response
  output word_t                  bp_out,        // butterfly PUF key
  output logic  [NUM_IP-1:0]     authenticated, // cores enabled by the verifier
  output logic  [NUM_IP-1:0]     rejected       // cores refused by the verifier
);

  // register port
  logic       gen_start, verify_start, hs_load;
  word_t      passcode_c, hs_load_data;
  logic [7:0] t_limit;
  logic [6:0] status;
  logic [7:0] ip_sel;
  logic [31:0] verdicts;

  // arbiter PUF and its hash
  logic  apuf_excite, apuf_valid;
  word_t apuf_challenge;
  hd_t   hd;

  // generation
  logic       gen_apuf_excite, gen_bpuf_excite, gen_busy, gen_done, gen_done_q;
  word_t      gen_challenge, gen_hs, gen_c;
  logic [1:0] gen_branch;
  logic       l1_retry, l2_retry;
  logic       bpuf_valid;

  // verification
  logic  rr_apuf_excite, rr_busy, rr_ready;
  word_t rr_challenge;
  hd_t   rr_hd;
  word_t [NBR-1:0] pub_keys;
  logic  efsm_in_e0, efsm_as, efsm_ua;

  // IP-core stack
  logic [NUM_IP-1:0] hs_wr_core, ip_enabled, ip_rejected;
  word_t             hs_view;
  word_t             hs_sel;
  logic [7:0]        ip_out_sel;
  word_t efsm_out1, efsm_out2;
  logic [7:0] efsm_t_left;

  hs_axil_regs #(.ADDR_W(6), .T_W(8), .T_RESET(T_RESET)) u_regs (
    .aclk(clk), .aresetn(rst_n),
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .gen_start, .verify_start, .passcode_c, .t_limit, .hs_load, .hs_load_data,
    .status, .hs(hs_view), .gen_c, .arb_out, .bp_out, .ip_out(ip_out_sel),
    .l1_retry, .l2_retry, .ip_sel, .verdicts
  );

  // The verifier owns the arbiter PUF while it re-measures the HD.
  assign apuf_excite    = gen_apuf_excite | rr_apuf_excite;
  assign apuf_challenge = rr_busy ? rr_challenge : gen_challenge;

  arbiter_puf #(.N(HS_W), .CHIP_SEED(CHIP_SEED), .NOISE(APUF_NOISE)) u_apuf (
    .clk, .rst_n, .excite(apuf_excite), .challenge(apuf_challenge),
    .response(arb_out), .valid(apuf_valid)
  );

  hd_hash #(.N(HS_W), .HD_W(HD_W)) u_hash (
    .challenge(apuf_challenge), .response(arb_out), .hd
  );

  butterfly_puf #(.N(HS_W), .STABLE_KEY(BPUF_STABLE), .UNSTABLE_MASK(BPUF_UNSTABLE)) u_bpuf (
    .clk, .rst_n, .excite(gen_bpuf_excite), .key(bp_out), .valid(bpuf_valid)
  );

  sig_fsm #(.BRANCHES(BRANCHES), .CHALLENGE_SEED(CHALLENGE_SEED)) u_gen (
    .clk, .rst_n, .start(gen_start),
    .apuf_excite(gen_apuf_excite), .apuf_challenge(gen_challenge),
    .apuf_valid(apuf_valid && !rr_busy), .hd,
    .bpuf_excite(gen_bpuf_excite), .bpuf_valid, .key(bp_out),
    .busy(gen_busy), .done(gen_done), .hs(gen_hs), .passcode_c(gen_c), .branch(gen_branch),
    .l1_retry, .l2_retry
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gen_done_q <= 1'b0;
    else        gen_done_q <= gen_done;
  end

  // Register encapsulation: the new signature enters the selected IP core
  // when generation completes, or software loads one from the bit file.
  ip_core_stack #(.NUM_IP(NUM_IP)) u_stack (
    .clk, .rst_n,
    .sel         (ip_sel),
    .hs_wr       (hs_load || (gen_done && !gen_done_q)),
    .hs_wr_core,
    .hs_core     (authenticate),
    .verify_start,
    .hs_sel,
    .as_state    (efsm_as),
    .ua_state    (efsm_ua),
    .enabled     (ip_enabled),
    .rejected    (ip_rejected)
  );

  for (genvar i = 0; i < NUM_IP; i++) begin : g_ip
    addon_ip_wrapper #(.OUT_W(8)) u_ip (
      .clk, .rst_n,
      .hs_wr       (hs_wr_core[i]),
      .hs_wdata    (hs_load ? hs_load_data : gen_hs),
      .authenticate(authenticate[i]),
      .enable      (ip_enabled[i]),
      .reject      (ip_rejected[i]),
      .core_out    (core_out[i]),
      .ip_output   (ip_output[i]),
      .rejected    (rejected[i])
    );
  end

  assign authenticated = ip_enabled;
  // the register port shows the selected core
  always_comb begin
    hs_view    = '0;
    ip_out_sel = '0;
    for (int i = 0; i < NUM_IP; i++) begin
      if (ip_sel == 8'(i)) begin
        hs_view    = authenticate[i];
        ip_out_sel = ip_output[i];
      end
    end
  end
  assign verdicts   = {16'(ip_rejected), 16'(ip_enabled)};

  resuming_response u_rr (
    .clk, .rst_n, .req(verify_start), .passcode_c,
    .apuf_excite(rr_apuf_excite), .apuf_challenge(rr_challenge),
    .apuf_valid, .hd_in(hd), .busy(rr_busy), .ready(rr_ready), .hd(rr_hd)
  );

  always_comb begin
    for (int b = 0; b < NBR; b++) pub_keys[b] = BRANCHES[b].key;
  end

  efsm_verifier #(.HD_MIN(HD_MIN), .HD_MAX(HD_MAX), .T_W(8)) u_efsm (
    .clk, .rst_n, .rst_efsm(verify_start || !rr_ready), .hs_in(hs_sel), .hd(rr_hd),
    .keys(pub_keys), .t_limit, .authenticated(efsm_as), .rejected(efsm_ua),
    .in_e0(efsm_in_e0), .out1(efsm_out1), .out2(efsm_out2), .t_left(efsm_t_left)
  );

  assign status = {gen_busy, gen_branch, efsm_ua, efsm_as, rr_ready, gen_done};

  // The two phases never drive the arbiter PUF in the same clock.
  a_apuf_owner: assert property (@(posedge clk) disable iff (!rst_n)
    !(gen_apuf_excite && rr_apuf_excite));

endmodule
