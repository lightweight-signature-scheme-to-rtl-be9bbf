// ip_core_stack: the heterogeneous IP-core module, a stack of NUM_IP ADD-ON
// IP cores, each with its own encapsulated signature. The processor selects
// one core (`sel`). A new or loaded signature is written into the selected
// core's register, and a verification checks the selected core. The verdict
// of each core is kept after the verifier moves on: a core that reached the
// authenticated state stays enabled, and a core that was refused stays
// marked rejected, until that core is verified again. Moving on to another
// core after a refusal is left to software, which re-selects and verifies
// again.
//
// The stack of ADD-ON IP cores and the move to the next core on a refusal
// follow the paper's system architecture. The number of cores (four, as
// drawn there), the selection register and the per-core verdict latches are
// this design's choices.
//
// Interface and timing: `sel` is sampled with `verify_start`, so changing it
// during a verification does not move the verdict to another core. Verdicts
// are latched on the clock edge after the verifier's AS/UA output rises.
// `hs_sel` is combinational from the captured selection.
module ip_core_stack
  import hs_pkg::*;
#(
  parameter int unsigned NUM_IP = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [7:0]              sel,            // core number; >= NUM_IP selects none
  input  logic                    hs_wr,          // write a signature
  output logic [NUM_IP-1:0]       hs_wr_core,     // ... into the selected core
  input  word_t [NUM_IP-1:0]      hs_core,        // every core's signature register
  input  logic                    verify_start,
  output word_t                   hs_sel,         // signature of the core under test
  input  logic                    as_state,       // verifier in AS
  input  logic                    ua_state,       // verifier in UA
  output logic [NUM_IP-1:0]       enabled,
  output logic [NUM_IP-1:0]       rejected
);

  logic [7:0]       vsel;
  logic             pending;     // a verdict is still to be taken for vsel

  always_comb begin
    hs_wr_core = '0;
    hs_sel     = '0;
    for (int i = 0; i < NUM_IP; i++) begin
      hs_wr_core[i] = hs_wr && (sel == 8'(i));
      if (vsel == 8'(i)) hs_sel = hs_core[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vsel     <= '0;
      pending  <= 1'b0;
      enabled  <= '0;
      rejected <= '0;
    end else if (verify_start) begin
      vsel    <= sel;
      pending <= (32'(sel) < NUM_IP);
      for (int i = 0; i < NUM_IP; i++) begin
        if (sel == 8'(i)) begin
          enabled[i]  <= 1'b0;
          rejected[i] <= 1'b0;
        end
      end
    end else if (pending && (as_state || ua_state)) begin
      pending <= 1'b0;
      for (int i = 0; i < NUM_IP; i++) begin
        if (vsel == 8'(i)) begin
          enabled[i]  <= as_state;
          rejected[i] <= ua_state;
        end
      end
    end
  end

  a_verdict_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    (enabled & rejected) == '0);

endmodule
