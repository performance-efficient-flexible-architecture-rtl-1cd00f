// mcrypton_sigma: key addition (sigma) of m-Crypton.
//
// Row i of the state (16 bits) is XORed with round-key word K[i]. With row 0
// in the top 16 bits of the state and K[0] in the top 16 bits of the round
// key, this is a plain 64-bit XOR. Combinational.
module mcrypton_sigma
  import mcrypton_pkg::*;
(
  input  block_t a,
  input  block_t round_key,   // {K[0], K[1], K[2], K[3]}
  output block_t b
);

  always_comb begin
    for (int i = 0; i < 4; i++)
      b[BLOCK_W-1-WORD_W*i -: WORD_W] = a[BLOCK_W-1-WORD_W*i -: WORD_W]
                                      ^ round_key[BLOCK_W-1-WORD_W*i -: WORD_W];
  end

endmodule
