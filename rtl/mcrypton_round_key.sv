// mcrypton_round_key: round-key generation of the flexible m-Crypton core.
//
// From the key register V and the 16-bit round constant CR:
//   M  = S(V[0]) XOR CR, S applying S-box S0 to each nibble
//   Mi = M AND Qi (mask units, Q0=0xf000 .. Q3=0x000f)
//   KR = (V[1]^M0, V[2]^M1, V[3]^M2, X^M3)
// where X is V[0] for a 64-bit key and V[4] for 96- and 128-bit keys, picked
// by SEL[1]. All key sizes share everything else. Combinational.
module mcrypton_round_key
  import mcrypton_pkg::*;
(
  input  key_t        v,
  input  word_t       cr,
  input  logic  [1:0] sel,
  output block_t      kr
);

  word_t s_out, m, last;
  word_t d [4];

  for (genvar n = 0; n < 4; n++) begin : g_sbox
    mcrypton_sbox #(.IDX(0)) u_sbox0 (
      .x(v[KEY_W-1-4*n -: 4]),
      .y(s_out[WORD_W-1-4*n -: 4])
    );
  end

  always_comb m = s_out ^ cr;

  // Mask units M0..M3.
  always_comb
    for (int i = 0; i < 4; i++) d[i] = m & KEY_MASK[i];

  always_comb begin
    last = sel[1] ? get_word(v, 4) : get_word(v, 0);
    kr   = {get_word(v, 1) ^ d[0],
            get_word(v, 2) ^ d[1],
            get_word(v, 3) ^ d[2],
            last           ^ d[3]};
  end

endmodule
