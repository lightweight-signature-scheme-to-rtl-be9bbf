// efsm_verifier: the extended finite state machine (EFSM) that verifies a
// hardware signature. It has four states, Start, E0 (intermediate), AS
// (authenticated) and UA (not authenticated), guarded transitions, and two
// update variables Out1 and Out2.
//
//   Start: while RESET is high the register REG is cleared.
//   Start -> E0 when RESET is low, the re-measured HD lies in HD_MIN..HD_MAX
//     and the signature read from the IP core is non-zero. REG takes the
//     signature, T is loaded with the time limit, and the update functions
//     run: Out1 = REG xor HD, Out2 = Out1 shifted back by HD.
//   Start -> UA when RESET is low and that guard fails.
//   E0: every clock one key of the public key set KEY1..KEY4 is presented
//     and T counts down. E0 -> AS when the key is non-zero and equals Out2
//     while T has not run out; E0 -> UA, with Out2 cleared (NILL), when T
//     reaches 0 without a match.
//   AS and UA hold until RESET is raised again.
//
// The states, guards, update functions, HD window 7..10 and the time limit
// 10 follow the document's EFSM diagram. The XOR with HD is applied to every
// nibble and the shift is a nibble rotation, the inverse of xor_shift_mixer
// (this design's choice, see hs_pkg). Presenting the four keys round-robin,
// one per clock, and reading REG as the signature input while leaving Start
// are also this design's choices; the printed "T=5" in the E0 -> AS guard is
// read as "T not yet expired".
//
// Interface and timing: `rst_efsm` is the EFSM's RESET input. The decision
// comes 1 clock after RESET falls for UA from Start, otherwise 1 + k clocks
// where k (1..T_LIMIT) is the position of the matching key in the
// round-robin order or T_LIMIT on timeout. `authenticated` / `rejected`
// are the AS / UA state outputs.
module efsm_verifier
  import hs_pkg::*;
#(
  parameter hd_t         HD_MIN = 4'd7,
  parameter hd_t         HD_MAX = 4'd10,
  parameter int unsigned T_W    = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rst_efsm,
  input  word_t            hs_in,       // signature read from the IP core
  input  hd_t              hd,          // HD measured again on this chip
  input  word_t [NBR-1:0]  keys,        // public key set KEY1..KEY4
  input  logic [T_W-1:0]   t_limit,     // time limit V from the passcode
  output logic             authenticated,
  output logic             rejected,
  output logic             in_e0,
  output word_t            out1,
  output word_t            out2,
  output logic [T_W-1:0]   t_left
);

  typedef enum logic [1:0] {START, E0, AS, UA} state_t;
  state_t     state;
  word_t      reg_hs;
  logic [1:0] kidx;
  word_t      key_now;
  word_t      x1, x2;
  logic [2*HS_W-1:0] rot;

  assign key_now       = keys[kidx];
  assign authenticated = (state == AS);
  assign rejected      = (state == UA);
  assign in_e0         = (state == E0);

  // Update functions on the signature being loaded.
  always_comb begin
    x1  = hs_in ^ {(HS_W/HD_W){hd}};
    rot = {x1, x1} >> (HD_W * hd[1:0]);
    x2  = rot[HS_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= START;
      reg_hs <= '0;
      out1   <= '0;
      out2   <= '0;
      t_left <= '0;
      kidx   <= '0;
    end else if (rst_efsm) begin
      state  <= START;
      reg_hs <= '0;                    // G: REG = 0
      kidx   <= '0;
    end else begin
      unique case (state)
        START: begin
          if (hd >= HD_MIN && hd <= HD_MAX && hs_in != '0) begin
            reg_hs <= hs_in;
            out1   <= x1;
            out2   <= x2;
            t_left <= t_limit;
            kidx   <= '0;
            state  <= E0;
          end else begin
            state  <= UA;
          end
        end
        E0: begin
          if (key_now != '0 && key_now == out2 && t_left != '0) begin
            state <= AS;
          end else if (t_left <= 1) begin
            t_left <= '0;
            out2   <= '0;                // Out2 = NILL
            state  <= UA;
          end else begin
            t_left <= t_left - 1'b1;     // T--
            kidx   <= kidx + 1'b1;
          end
        end
        AS, UA: ;                        // hold until RESET
        default: state <= START;
      endcase
    end
  end

  // AS is entered only from E0.
  a_as_from_e0: assert property (@(posedge clk) disable iff (!rst_n)
    (state == AS && $past(state) != AS) |-> $past(state) == E0);
  a_as_holds_key: assert property (@(posedge clk) disable iff (!rst_n)
    (state == AS) |-> (out2 != '0 && reg_hs != '0));

endmodule
