// mcrypton_gamma: non-linear substitution layer (gamma) of m-Crypton.
//
// Every nibble of the 4x4 state matrix goes through an S-box chosen by its
// position: the nibble in row r, column c uses S_((r+c) mod 4). Row 0 thus
// uses S0 S1 S2 S3, row 1 uses S1 S2 S3 S0, and so on, as the cipher
// defines. Sixteen S-box instances, no clock, combinational a -> b.
module mcrypton_gamma
  import mcrypton_pkg::*;
(
  input  block_t a,
  output block_t b
);

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      localparam int unsigned N = 4*r + c;
      mcrypton_sbox #(.IDX((r + c) % 4)) u_sbox (
        .x(a[BLOCK_W-1-4*N -: 4]),
        .y(b[BLOCK_W-1-4*N -: 4])
      );
    end
  end

endmodule
