// tb_axil_master: AXI4-Lite master used by the testbenches. It drives one
// slave port and offers blocking write and read tasks; a write offers
// address and data together and waits for the response, a read waits for
// the data. Testbench use only.
module tb_axil_master (
  input  logic        clk,
  output logic [5:0]  awaddr,
  output logic        awvalid,
  input  logic        awready,
  output logic [31:0] wdata,
  output logic [3:0]  wstrb,
  output logic        wvalid,
  input  logic        wready,
  input  logic [1:0]  bresp,
  input  logic        bvalid,
  output logic        bready,
  output logic [5:0]  araddr,
  output logic        arvalid,
  input  logic        arready,
  input  logic [31:0] rdata,
  input  logic [1:0]  rresp,
  input  logic        rvalid,
  output logic        rready
);
  initial begin
    awaddr = 0; awvalid = 0; wdata = 0; wstrb = 0; wvalid = 0; bready = 0;
    araddr = 0; arvalid = 0; rready = 0;
  end

  task automatic write(logic [5:0] a, logic [31:0] d);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wstrb = 4'hF; wvalid = 1; bready = 1;
    do @(posedge clk); while (!(awready && wready));
    #1 awvalid = 0; wvalid = 0;
    while (!bvalid) @(posedge clk);
    @(posedge clk); #1 bready = 0;
  endtask

  task automatic read(logic [5:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1; rready = 1;
    do @(posedge clk); while (!arready);
    #1 arvalid = 0;
    while (!rvalid) @(posedge clk);
    d = rdata;
    @(posedge clk); #1 rready = 0;
  endtask

  logic unused_resp;
  assign unused_resp = ^{bresp, rresp};
endmodule
