// mcrypton_pkg: types and constants shared by the m-Crypton encryption core.
//
// State convention: the 64-bit block is the 4x4 nibble matrix H with
// h0 in bits [63:60] and h15 in bits [3:0]; row r holds h(4r)..h(4r+3),
// column c holds h(c), h(4+c), h(8+c), h(12+c). A 16-bit word has its first
// nibble in bits [15:12]. The key register V is 128 bits wide, word V[0] in
// bits [127:112] and V[7] in bits [15:0]. These bit orders are this
// design's choice; the m-Crypton definition only numbers the nibbles.
// The key-size select codes 01/10/11 follow the cipher architecture's own
// selection-line values; 00 is unused.
package mcrypton_pkg;

  localparam int unsigned BLOCK_W    = 64;   // plaintext/ciphertext width
  localparam int unsigned KEY_W      = 128;  // widest key, key register width
  localparam int unsigned WORD_W     = 16;   // key-schedule word
  localparam int unsigned NUM_ROUNDS = 12;   // rounds rho after the initial key addition

  typedef logic [BLOCK_W-1:0] block_t;
  typedef logic [KEY_W-1:0]   key_t;
  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [3:0]         nibble_t;

  // Key-size selection line SEL[1:0].
  typedef enum logic [1:0] {
    KS_NONE = 2'b00,   // no input connected (mux input S0 empty)
    KS_64   = 2'b01,
    KS_96   = 2'b10,
    KS_128  = 2'b11
  } key_size_e;

  // Bit-permutation masks Q0..Q3 of the round function (nibble masks).
  localparam nibble_t PI_MASK [4] = '{4'b1110, 4'b1101, 4'b1011, 4'b0111};

  // Nibble n (0..15) of a block, h_n.
  function automatic nibble_t get_nib(block_t s, int unsigned n);
    return s[BLOCK_W-1-4*n -: 4];
  endfunction

  // 16-bit word w (0..7) of the key register, V[w].
  function automatic word_t get_word(key_t v, int unsigned w);
    return v[KEY_W-1-WORD_W*w -: WORD_W];
  endfunction

  // Column-to-row transposition tau: nibble (row i, column j) moves to
  // (row j, column i). Pure wiring, so it is a function rather than a module.
  function automatic block_t transpose(block_t a);
    block_t b;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        b[BLOCK_W-1-4*(4*j+i) -: 4] = a[BLOCK_W-1-4*(4*i+j) -: 4];
    return b;
  endfunction

  // Key-schedule masks Q0..Q3 (mask units M0..M3): Qi keeps nibble i of a
  // 16-bit word, counted from the most significant.
  localparam word_t KEY_MASK [4] = '{16'hf000, 16'h0f00, 16'h00f0, 16'h000f};

endpackage
