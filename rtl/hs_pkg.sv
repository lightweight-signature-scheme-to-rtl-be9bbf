// hs_pkg: types and functions shared by the hardware-signature blocks.
//
// The scheme binds an IP core to one chip. A strong arbiter PUF (APUF)
// answers a challenge; the Hamming distance (HD) between challenge and
// response is a 4-bit digest. A weak butterfly PUF (BPUF) yields a 16-bit
// KEY. A three-level FSM accepts only enrolled (HD, KEY) pairs and mixes
// them, by XOR and shifting, into a 16-bit hardware signature (HS) that is
// stored in a register inside the IP core. An extended FSM (EFSM) undoes the
// mixing with the HD it measures again on the same chip and compares the
// result with the enrolled public keys inside a time limit.
//
// The mixing function is this design's reading of the document: XOR with the
// HD replicated into every nibble, then rotation left by whole nibbles, HD
// mod 4 of them (the "4-bit shifting"). Because the XOR mask is the same in
// every nibble, the XOR and the nibble rotation commute, so the verifier can
// apply "Out1 = REG xor HD, Out2 = Out1 shifted by HD" exactly as the
// EFSM update functions are printed and recover the KEY.
package hs_pkg;

  localparam int unsigned HS_W  = 16;   // signature, KEY, challenge width
  localparam int unsigned HD_W  = 4;    // hashed Hamming distance width
  localparam int unsigned NBR   = 4;    // FSM branches HD1..HD4 / KEY1..KEY4

  typedef logic [HS_W-1:0] word_t;
  typedef logic [HD_W-1:0] hd_t;

  // Enrolled branch table: level-1 condition C1 (an HD, or a range of HDs
  // from hd to hd_hi) and level-2 condition C2 (KEY) of one FSM branch.
  typedef struct packed {
    hd_t   hd;       // lowest accepted HD
    hd_t   hd_hi;    // highest accepted HD; equal to hd for a single value
    word_t key;
  } branch_t;

  typedef branch_t [NBR-1:0] branch_tab_t;

  // Default table: the four (HD, KEY) pairs with the highest printed
  // occurrence counts for chip 1 whose HD lies in the EFSM window 7..10.
  // Index 0 is branch 1.
  localparam branch_tab_t CHIP1_BRANCHES = '{
    '{hd: 4'd9,  hd_hi: 4'd9,  key: 16'hDFFF}, // branch 4: HD9,  DFFF, 11 occurrences
    '{hd: 4'd9,  hd_hi: 4'd9,  key: 16'hFF7F}, // branch 3: HD9,  FF7F, 12 occurrences
    '{hd: 4'd10, hd_hi: 4'd10, key: 16'hCFFF}, // branch 2: HD10, CFFF, 13 occurrences
    '{hd: 4'd10, hd_hi: 4'd10, key: 16'hEFFF}  // branch 1: HD10, EFFF, 27 occurrences
  };

  // The same selection from the values printed for chip 2.
  localparam branch_tab_t CHIP2_BRANCHES = '{
    '{hd: 4'd9,  hd_hi: 4'd9,  key: 16'hCFFF}, // branch 4: HD9,  CFFF, 20 occurrences
    '{hd: 4'd9,  hd_hi: 4'd9,  key: 16'hFF7F}, // branch 3: HD9,  FF7F, 24 occurrences
    '{hd: 4'd10, hd_hi: 4'd10, key: 16'hDFFF}, // branch 2: HD10, DFFF, 27 occurrences
    '{hd: 4'd10, hd_hi: 4'd10, key: 16'hFFFF}  // branch 1: HD10, FFFF, 33 occurrences
  };

  // HD replicated into every nibble of a word.
  function automatic word_t hd_mask(hd_t hd);
    return {(HS_W/HD_W){hd}};
  endfunction

  // Rotate left / right by whole nibbles, hd mod 4 of them.
  function automatic word_t rotl_nib(word_t w, hd_t hd);
    logic [2*HS_W-1:0] d;
    d = {w, w} << (HD_W * hd[1:0]);
    return d[2*HS_W-1:HS_W];
  endfunction

  function automatic word_t rotr_nib(word_t w, hd_t hd);
    logic [2*HS_W-1:0] d;
    d = {w, w} >> (HD_W * hd[1:0]);
    return d[HS_W-1:0];
  endfunction

  // Signature generation: Out1 = KEY xor HD, HS = Out1 shifted.
  function automatic word_t hs_mix(word_t key, hd_t hd);
    return rotl_nib(key ^ hd_mask(hd), hd);
  endfunction

  // EFSM update functions: Out1 = REG xor HD, Out2 = Out1 shifted back.
  function automatic word_t hs_unmix(word_t reg_hs, hd_t hd);
    return rotr_nib(reg_hs ^ hd_mask(hd), hd);
  endfunction

endpackage
