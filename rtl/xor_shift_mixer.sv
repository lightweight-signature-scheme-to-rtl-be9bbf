// xor_shift_mixer: the "mixing response" of signature generation. It
// combines the 4-bit Hamming distance (HD) and the 16-bit KEY in two steps,
// as drawn for the generation phase: a bitwise XOR of HD with the KEY
// (Out1[i] = HD[i] xor KEY[i] for each bit of a nibble), then a shift in
// 4-bit units.
//
// The XOR is applied to every nibble of the KEY (HD replicated four times)
// and the shift is a rotation left by HD mod 4 nibbles. Both widenings are
// this design's choice: they keep all 16 KEY bits in the signature and make
// the operation invertible by the verifier's update functions
// (Out1 = REG xor HD, Out2 = Out1 shifted back by HD).
//
// Interface and timing: purely combinational.
module xor_shift_mixer
  import hs_pkg::*;
(
  input  word_t key,
  input  hd_t   hd,
  output word_t out1,     // after the XOR stage
  output word_t sign      // after the nibble rotation: the hardware signature
);

  logic [2*HS_W-1:0] twice;

  always_comb begin
    out1  = key ^ {(HS_W/HD_W){hd}};
    twice = {out1, out1} << (HD_W * hd[1:0]);
    sign  = twice[2*HS_W-1:HS_W];
  end

endmodule
