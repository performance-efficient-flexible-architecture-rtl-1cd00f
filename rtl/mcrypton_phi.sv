// mcrypton_phi: output transformation phi = tau o pi o tau of m-Crypton.
//
// Applied once to the state left after the last round: transpose, bit
// permutation, transpose. Since tau is its own inverse this is the bit
// permutation done row-wise instead of column-wise. Combinational a -> b.
// The order tau, pi, tau follows the cipher's definition of phi.
module mcrypton_phi
  import mcrypton_pkg::*;
(
  input  block_t a,
  output block_t b
);

  block_t t1, t2;

  always_comb t1 = transpose(a);
  mcrypton_pi u_pi (.a(t1), .b(t2));
  always_comb b = transpose(t2);

endmodule
