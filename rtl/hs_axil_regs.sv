// hs_axil_regs: 32-bit AXI4-Lite slave through which the processor drives
// signature generation and verification and reads their results, in the
// place of the general-purpose AXI ports (S00_AXI) of the signature IPs.
//
// Register map (byte addresses, 32-bit words):
//   0x00 CTRL      W   bit0 = start generation, bit1 = start verification
//                      (both self-clearing pulses)
//   0x04 STATUS    R   bit0 generation done, bit1 HD re-measured,
//                      bit2 authenticated (AS), bit3 rejected (UA),
//                      bits5:4 accepted FSM branch, bit6 generation busy
//   0x08 HS        R   signature register encapsulated in the IP core
//   0x0C PASSCODE  RW  bits15:0 challenge C, bits23:16 time limit V
//   0x10 GEN_C     R   challenge C chosen by the last generation
//   0x14 ARB_OUT   R   last arbiter PUF response
//   0x18 BP_OUT    R   last butterfly PUF key
//   0x1C IP_OUT    R   gated outputs of the ADD-ON IP core
//   0x20 HS_LOAD   W   bits15:0 written into the signature register (the
//                      signature carried by the bit file)
//   0x24 RETRIES   R   bits15:0 level-1 (challenge) retries, bits31:16
//                      level-2 (KEY) retries, counted since reset, saturating
//   0x28 IP_SEL    RW  bits7:0 IP core that HS, HS_LOAD, IP_OUT and the
//                      next generation or verification refer to
//   0x2C VERDICTS  R   bits15:0 enabled (authenticated) cores, bits31:16
//                      rejected cores, one bit per core
// Other addresses read as zero and ignore writes; every access gets OKAY.
//
// The 32-bit AXI interface is the document's; the register map is this
// design's own. Writes need AWVALID and WVALID together; one transaction of
// each kind is outstanding at a time. A write is answered on BVALID one clock
// after it is taken, a read on RVALID one clock after ARVALID is taken.
module hs_axil_regs
  import hs_pkg::*;
#(
  parameter int unsigned ADDR_W = 6,
  parameter int unsigned T_W    = 8,
  parameter logic [T_W-1:0] T_RESET = 8'd10
) (
  input  logic              aclk,
  input  logic              aresetn,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  // towards the signature logic
  output logic              gen_start,
  output logic              verify_start,
  output word_t             passcode_c,
  output logic [T_W-1:0]    t_limit,
  output logic              hs_load,
  output word_t             hs_load_data,
  input  logic [6:0]        status,
  input  word_t             hs,
  input  word_t             gen_c,
  input  word_t             arb_out,
  input  word_t             bp_out,
  input  logic [7:0]        ip_out,
  input  logic              l1_retry,
  input  logic              l2_retry,
  output logic [7:0]        ip_sel,
  input  logic [31:0]       verdicts
);

  localparam logic [ADDR_W-1:0] A_CTRL = 'h00, A_STATUS = 'h04, A_HS = 'h08,
    A_PASS = 'h0C, A_GENC = 'h10, A_ARB = 'h14, A_BP = 'h18, A_IP = 'h1C,
    A_LOAD = 'h20, A_RETRY = 'h24, A_SEL = 'h28, A_VERD = 'h2C;

  logic [15:0] l1_cnt, l2_cnt;

  logic wr_take, rd_take;

  // A write is taken when both address and data are offered and no response
  // is pending; a read when no read data is pending.
  assign s_awready = s_awvalid && s_wvalid && !s_bvalid;
  assign s_wready  = s_awready;
  assign wr_take   = s_awready;
  assign s_arready = !s_rvalid;
  assign rd_take   = s_arvalid && s_arready;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d, logic [3:0] be);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = be[b] ? d[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  logic [31:0] pass_q;
  assign passcode_c = pass_q[15:0];
  assign t_limit    = pass_q[16 +: T_W];

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      s_bvalid     <= 1'b0;
      s_rvalid     <= 1'b0;
      s_rdata      <= '0;
      pass_q       <= 32'(T_RESET) << 16;
      gen_start    <= 1'b0;
      verify_start <= 1'b0;
      hs_load      <= 1'b0;
      hs_load_data <= '0;
      l1_cnt       <= '0;
      l2_cnt       <= '0;
      ip_sel       <= '0;
    end else begin
      if (l1_retry && l1_cnt != '1) l1_cnt <= l1_cnt + 1'b1;
      if (l2_retry && l2_cnt != '1) l2_cnt <= l2_cnt + 1'b1;
      gen_start    <= 1'b0;
      verify_start <= 1'b0;
      hs_load      <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (wr_take) begin
        s_bvalid <= 1'b1;
        unique case ({s_awaddr[ADDR_W-1:2], 2'b00})
          A_CTRL: if (s_wstrb[0]) begin
            gen_start    <= s_wdata[0];
            verify_start <= s_wdata[1];
          end
          A_PASS: pass_q <= merge(pass_q, s_wdata, s_wstrb);
          A_SEL:  if (s_wstrb[0]) ip_sel <= s_wdata[7:0];
          A_LOAD: if (&s_wstrb[1:0]) begin
            hs_load      <= 1'b1;
            hs_load_data <= s_wdata[15:0];
          end
          default: ;
        endcase
      end
      if (rd_take) begin
        s_rvalid <= 1'b1;
        unique case ({s_araddr[ADDR_W-1:2], 2'b00})
          A_STATUS: s_rdata <= 32'(status);
          A_HS:     s_rdata <= 32'(hs);
          A_PASS:   s_rdata <= pass_q;
          A_GENC:   s_rdata <= 32'(gen_c);
          A_ARB:    s_rdata <= 32'(arb_out);
          A_BP:     s_rdata <= 32'(bp_out);
          A_IP:     s_rdata <= 32'(ip_out);
          A_RETRY:  s_rdata <= {l2_cnt, l1_cnt};
          A_SEL:    s_rdata <= 32'(ip_sel);
          A_VERD:   s_rdata <= verdicts;
          default:  s_rdata <= '0;
        endcase
      end
    end
  end

  // AXI rules: a response, once offered, stays until it is accepted.
  a_bvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    (s_bvalid && !s_bready) |=> s_bvalid);
  a_rvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    (s_rvalid && !s_rready) |=> (s_rvalid && $stable(s_rdata)));

endmodule
