// addon_ip_wrapper: register encapsulation of the hardware signature in an
// ADD-ON IP core. The signature produced at generation is written into a
// register that travels with the IP core (its `authenticate` output, from
// which the verifier reads it back), and the IP core's outputs are passed to
// the platform only while the verifier reports the core authenticated. A
// core that is rejected has its outputs held at zero and raises `rejected`,
// so that the platform can move on to the next IP core.
//
// The register, its 16-bit width and the authenticate/ip_output names follow
// the document; the IP core itself (a benchmark circuit) is outside this
// design and connects through `core_out`. Zero-gating of the outputs and the
// write-enable handshake are this design's choices.
//
// Interface and timing: `hs_wr` loads `hs_wdata` on the clock edge;
// `ip_output` is combinational from `core_out` and `enable`.
module addon_ip_wrapper
  import hs_pkg::*;
#(
  parameter int unsigned OUT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             hs_wr,
  input  word_t            hs_wdata,
  output word_t            authenticate,   // encapsulated signature register
  input  logic             enable,         // from the verifier: AS state
  input  logic             reject,         // from the verifier: UA state
  input  logic [OUT_W-1:0] core_out,       // outputs of the wrapped IP core
  output logic [OUT_W-1:0] ip_output,
  output logic             rejected
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     authenticate <= '0;
    else if (hs_wr) authenticate <= hs_wdata;
  end

  assign ip_output = enable ? core_out : '0;
  assign rejected  = reject && !enable;

endmodule
