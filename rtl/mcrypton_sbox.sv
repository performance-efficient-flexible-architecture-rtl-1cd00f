// mcrypton_sbox: one of the four 4-bit m-Crypton S-boxes, S_IDX.
//
// Purely combinational table lookup, y = S_IDX(x). The four tables are the
// cipher's S0..S3; S2 is the inverse of S0 and S3 the inverse of S1, a
// property the tables below satisfy. Each table is held as a 64-bit
// constant, entry x in bits [63-4x -: 4].
//
// Interface: x (4 bits) in, y (4 bits) out, no clock. IDX (0..3) picks the
// box; the substitution layer uses all four, the key schedule only S0.
module mcrypton_sbox #(
  parameter int unsigned IDX = 0
) (
  input  logic [3:0] x,
  output logic [3:0] y
);

  //                                          0123456789abcdef
  localparam logic [63:0] SBOX_TABLE [4] = '{64'h4f38dac0b57e2619,   // S0
                                            64'h1c7a6d53fb20849e,   // S1
                                            64'h7ec209da3f5864b1,   // S2 = S0^-1
                                            64'hb0a7d642ce3915f8};  // S3 = S1^-1

  localparam logic [63:0] TABLE = SBOX_TABLE[IDX % 4];

  initial assert (IDX < 4) else $error("mcrypton_sbox: IDX must be 0..3");

  always_comb y = TABLE[63 - 4*x -: 4];

endmodule
