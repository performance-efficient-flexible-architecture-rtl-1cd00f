// mcrypton_pi: column-wise bit permutation (pi) of m-Crypton.
//
// Each column i of the state, (a0,a1,a2,a3) = rows 0..3, is mapped to
// (b0,b1,b2,b3) with b_j = XOR over k of (Q_((i+j+k) mod 4) AND a_k), using
// the nibble masks Q0=1110, Q1=1101, Q2=1011, Q3=0111. Every output bit is
// thus the XOR of three input bits of the same bit position within the
// column. Combinational a -> b, no clock.
module mcrypton_pi
  import mcrypton_pkg::*;
(
  input  block_t a,
  output block_t b
);

  always_comb begin
    b = '0;
    for (int i = 0; i < 4; i++) begin       // column
      for (int j = 0; j < 4; j++) begin     // output row
        nibble_t acc;
        acc = '0;
        for (int k = 0; k < 4; k++)         // input row
          acc ^= PI_MASK[(i + j + k) % 4] & a[BLOCK_W-1-4*(4*k+i) -: 4];
        b[BLOCK_W-1-4*(4*j+i) -: 4] = acc;
      end
    end
  end

endmodule
