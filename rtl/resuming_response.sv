// resuming_response: the first step of signature verification. It measures
// the Hamming distance (HD) again on this chip: the passcode challenge C
// delivered with the IP core is applied to the arbiter PUF, and the HD of
// the resulting pair (from hd_hash) is captured for the extended FSM. Only
// the chip that generated the signature reproduces the HD that was mixed
// into it.
//
// The document names this step ("resuming response", feeding the extended
// FSM) and says the challenge comes with the passcode; the handshake is this
// design's choice.
//
// Interface and timing: pulse `req` with `passcode_c` stable. One clock
// later `apuf_excite` pulses; when the PUF's `apuf_valid` arrives the HD is
// latched and `ready` goes high on the following edge (3 clocks after `req`
// with the arbiter_puf model) and stays high until the next `req`.
module resuming_response
  import hs_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  req,
  input  word_t passcode_c,
  output logic  apuf_excite,
  output word_t apuf_challenge,
  input  logic  apuf_valid,
  input  hd_t   hd_in,
  output logic  busy,
  output logic  ready,
  output hd_t   hd
);

  typedef enum logic [1:0] {IDLE, EXCITE, WAIT_HD, READY} state_t;
  state_t state;
  word_t  c_q;

  assign apuf_excite    = (state == EXCITE);
  assign apuf_challenge = c_q;
  assign busy           = (state == EXCITE) || (state == WAIT_HD);
  assign ready          = (state == READY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      c_q   <= '0;
      hd    <= '0;
    end else begin
      unique case (state)
        IDLE, READY: if (req) begin
          c_q   <= passcode_c;
          state <= EXCITE;
        end
        EXCITE:  state <= WAIT_HD;
        WAIT_HD: if (apuf_valid) begin
          hd    <= hd_in;
          state <= READY;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
