// hd_hash: the hash that turns an arbiter-PUF challenge/response pair into a
// 4-bit Hamming distance (HD), so that the 16-bit response itself never
// leaves the generation logic. HD = number of bit positions in which the
// challenge and the response differ.
//
// Interface and timing: purely combinational. The distance of a 16-bit pair
// runs from 0 to 16 and the document carries it in 4 bits; the value 16,
// which does not fit, saturates to 15 (this design's choice). The fan-in
// width is a parameter; the document's main configuration is 16 bits.
module hd_hash #(
  parameter int unsigned N    = 16,
  parameter int unsigned HD_W = 4
) (
  input  logic [N-1:0]    challenge,
  input  logic [N-1:0]    response,
  output logic [HD_W-1:0] hd
);

  localparam int unsigned CNT_W = $clog2(N + 1);
  localparam int unsigned HD_MAX = (1 << HD_W) - 1;

  logic [N-1:0]     diff;
  logic [CNT_W-1:0] count;

  always_comb begin
    diff  = challenge ^ response;
    count = '0;
    for (int i = 0; i < N; i++) count = count + CNT_W'(diff[i]);
    if (32'(count) > HD_MAX) hd = HD_W'(HD_MAX);
    else                     hd = HD_W'(count);
  end

endmodule
