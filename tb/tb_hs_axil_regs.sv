// tb_hs_axil_regs: an AXI4-Lite master in the testbench exercises the
// register block: control pulses, the passcode register with byte strobes
// and its reset value, every read-only register, the signature load, the
// retry counters, the IP-core selection and verdicts, an unmapped address, and write/read responses held under
// back-pressure.
module tb_hs_axil_regs;
  import hs_pkg::*;
  logic aclk = 0, aresetn = 0;
  logic [5:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0;
  logic arvalid = 0, arready, rvalid, rready = 0;
  logic [31:0] wdata = 0, rdata;
  logic [3:0] wstrb = 0;
  logic [1:0] bresp, rresp;
  logic gen_start, verify_start, hs_load, l1_retry = 0, l2_retry = 0;
  logic [7:0] ip_sel;
  logic [31:0] verdicts = 0;
  word_t passcode_c, hs_load_data;
  logic [7:0] t_limit;
  logic [6:0] status = 0;
  word_t hs = 0, gen_c = 0, arb_out = 0, bp_out = 0;
  logic [7:0] ip_out = 0;
  int checks = 0, failures = 0;
  int gen_pulses = 0, ver_pulses = 0, load_pulses = 0;
  word_t last_load;

  always #5 aclk = ~aclk;

  hs_axil_regs #(.ADDR_W(6), .T_W(8), .T_RESET(8'd10)) dut (
    .aclk, .aresetn,
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready), .s_wdata(wdata),
    .s_wstrb(wstrb), .s_wvalid(wvalid), .s_wready(wready), .s_bresp(bresp),
    .s_bvalid(bvalid), .s_bready(bready), .s_araddr(araddr), .s_arvalid(arvalid),
    .s_arready(arready), .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid),
    .s_rready(rready),
    .gen_start, .verify_start, .passcode_c, .t_limit, .hs_load, .hs_load_data,
    .status, .hs, .gen_c, .arb_out, .bp_out, .ip_out, .l1_retry, .l2_retry,
    .ip_sel, .verdicts);

  always @(posedge aclk) if (aresetn) begin
    if (gen_start) gen_pulses++;
    if (verify_start) ver_pulses++;
    if (hs_load) begin load_pulses++; last_load = hs_load_data; end
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0h expected %0h", what, got, exp); end
  endtask

  task automatic axi_write(logic [5:0] a, logic [31:0] d, logic [3:0] s = 4'hF, int bdelay = 0);
    @(negedge aclk);
    awaddr = a; awvalid = 1; wdata = d; wstrb = s; wvalid = 1;
    do @(posedge aclk); while (!awready);
    #1 awvalid = 0; wvalid = 0;
    repeat (bdelay) begin
      @(negedge aclk);
      expect_eq("bvalid held", bvalid, 1);
    end
    @(negedge aclk); bready = 1;
    do @(posedge aclk); while (!bvalid);
    expect_eq("bresp", bresp, 0);
    #1 bready = 0;
  endtask

  task automatic axi_read(logic [5:0] a, output logic [31:0] d, input int rdelay = 0);
    logic [31:0] first;
    @(negedge aclk);
    araddr = a; arvalid = 1;
    do @(posedge aclk); while (!arready);
    #1 arvalid = 0;
    @(negedge aclk);
    first = rdata;
    repeat (rdelay) begin
      @(negedge aclk);
      expect_eq("rvalid held", rvalid, 1);
      expect_eq("rdata stable", rdata, first);
    end
    rready = 1;
    do @(posedge aclk); while (!rvalid);
    d = rdata;
    expect_eq("rresp", rresp, 0);
    #1 rready = 0;
  endtask

  initial begin
    repeat (20000) @(posedge aclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge aclk);
    aresetn = 1;
    axi_read(6'h0C, d);
    expect_eq("passcode reset value", d, 32'h000A_0000);
    expect_eq("t_limit reset", t_limit, 10);
    axi_write(6'h00, 32'h1);
    repeat (2) @(posedge aclk);
    expect_eq("gen pulse", gen_pulses, 1);
    expect_eq("no verify pulse", ver_pulses, 0);
    axi_write(6'h00, 32'h2, 4'hF, 3);
    repeat (2) @(posedge aclk);
    expect_eq("verify pulse", ver_pulses, 1);
    expect_eq("gen pulses", gen_pulses, 1);
    axi_write(6'h0C, 32'h0005_BEEF);
    expect_eq("passcode_c", passcode_c, 16'hBEEF);
    expect_eq("t_limit", t_limit, 5);
    axi_write(6'h0C, 32'hFF07_1234, 4'b0101);
    axi_read(6'h0C, d, 2);
    expect_eq("byte strobes", d, 32'h0007_BE34);
    axi_write(6'h20, 32'h0000_F55A);
    repeat (2) @(posedge aclk);
    expect_eq("hs load pulse", load_pulses, 1);
    expect_eq("hs load data", last_load, 16'hF55A);
    for (int k = 0; k < 20; k++) begin
      status = 7'($urandom); hs = 16'($urandom); gen_c = 16'($urandom);
      arb_out = 16'($urandom); bp_out = 16'($urandom); ip_out = 8'($urandom);
      axi_read(6'h04, d); expect_eq("STATUS", d, 32'(status));
      axi_read(6'h08, d); expect_eq("HS", d, 32'(hs));
      axi_read(6'h10, d); expect_eq("GEN_C", d, 32'(gen_c));
      axi_read(6'h14, d); expect_eq("ARB_OUT", d, 32'(arb_out));
      axi_read(6'h18, d); expect_eq("BP_OUT", d, 32'(bp_out));
      axi_read(6'h1C, d, k % 3); expect_eq("IP_OUT", d, 32'(ip_out));
    end
    axi_read(6'h3C, d); expect_eq("unmapped", d, 0);
    repeat (5) begin
      @(negedge aclk); l1_retry = 1; @(negedge aclk); l1_retry = 0;
    end
    @(negedge aclk); l2_retry = 1; @(negedge aclk); l2_retry = 0;
    axi_read(6'h24, d); expect_eq("RETRIES", d, 32'h0001_0005);
    expect_eq("IP_SEL reset", ip_sel, 0);
    axi_write(6'h28, 32'h0000_0003);
    expect_eq("IP_SEL", ip_sel, 3);
    axi_read(6'h28, d); expect_eq("IP_SEL read", d, 3);
    verdicts = 32'h0004_0003;
    axi_read(6'h2C, d); expect_eq("VERDICTS", d, 32'h0004_0003);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
