// mcrypton_ref_pkg: behavioural reference model of m-Crypton encryption,
// used by the testbenches to compute expected values.
//
// Written independently of the RTL structure: the state is an array of
// sixteen nibbles, the key schedule keeps only the t = 4, 6 or 8 words of
// the real key (no zero padding), the bit permutation is computed bit by
// bit, rotations and the round constants by loops. Nibble h0 is the most
// significant nibble of the 64-bit block; key word 0 is the most
// significant word of the key.
package mcrypton_ref_pkg;

  typedef int unsigned nib_a [16];

  // S-boxes S0..S3, entry x of box i.
  localparam int unsigned SB [4][16] = '{
    '{ 4, 15,  3,  8, 13, 10, 12,  0, 11,  5,  7, 14,  2,  6,  1,  9},
    '{ 1, 12,  7, 10,  6, 13,  5,  3, 15, 11,  2,  0,  8,  4,  9, 14},
    '{ 7, 14, 12,  2,  0,  9, 13, 10,  3, 15,  5,  8,  6,  4, 11,  1},
    '{11,  0, 10,  7, 13,  6,  4,  2, 12, 14,  3,  9,  1,  5, 15,  8}};

  function automatic nib_a split(logic [63:0] s);
    nib_a h;
    for (int n = 0; n < 16; n++) h[n] = int'(s[63-4*n -: 4]);
    return h;
  endfunction

  function automatic logic [63:0] join_n(nib_a h);
    logic [63:0] s = '0;
    for (int n = 0; n < 16; n++) s = (s << 4) | 64'(h[n] & 15);
    return s;
  endfunction

  function automatic logic [63:0] gamma(logic [63:0] s);
    nib_a h = split(s);
    for (int n = 0; n < 16; n++) h[n] = SB[(n/4 + n%4) % 4][h[n]];
    return join_n(h);
  endfunction

  // Mask Q_m has a 0 only at bit position m (Q0 = 1110 ... Q3 = 0111).
  function automatic logic [63:0] pi(logic [63:0] s);
    nib_a a = split(s), b;
    for (int col = 0; col < 4; col++)
      for (int j = 0; j < 4; j++) begin
        int unsigned v = 0;
        for (int p = 0; p < 4; p++) begin
          int unsigned bit_v = 0;
          for (int k = 0; k < 4; k++)
            if (p != (col + j + k) % 4) bit_v ^= (a[4*k + col] >> p) & 1;
          v |= bit_v << p;
        end
        b[4*j + col] = v;
      end
    return join_n(b);
  endfunction

  function automatic logic [63:0] tau(logic [63:0] s);
    nib_a a = split(s), b;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) b[4*c + r] = a[4*r + c];
    return join_n(b);
  endfunction

  function automatic logic [63:0] phi(logic [63:0] s);
    return tau(pi(tau(s)));
  endfunction

  // Round constant C_r = x^r mod (x^4 + x + 1).
  function automatic int unsigned rcon(int unsigned r);
    int unsigned c = 1;
    repeat (r) begin
      c = c << 1;
      if ((c & 16) != 0) c ^= 'h13;
    end
    return c;
  endfunction

  function automatic int unsigned rot16(int unsigned w, int unsigned k);
    int unsigned x = w & 'hffff;
    repeat (k) x = ((x << 1) | (x >> 15)) & 'hffff;
    return x;
  endfunction

  // Number of 16-bit key words for key-size code 1, 2, 3.
  function automatic int unsigned nwords(int unsigned ks);
    return (ks == 1) ? 4 : (ks == 2) ? 6 : 8;
  endfunction

  typedef int unsigned words_a [8];

  function automatic words_a to_words(logic [127:0] key);
    words_a u;
    for (int i = 0; i < 8; i++) u[i] = int'(key[127-16*i -: 16]);
    return u;
  endfunction

  function automatic logic [127:0] from_words(words_a u);
    logic [127:0] k = '0;
    for (int i = 0; i < 8; i++) k = (k << 16) | 128'(u[i] & 'hffff);
    return k;
  endfunction

  // Round key from key words u (t of them in use) and round constant c.
  function automatic logic [63:0] round_key(words_a u, int unsigned t, int unsigned c);
    int unsigned d = 0, d_i [4], last;
    for (int n = 0; n < 4; n++)
      d |= ((SB[0][(u[0] >> (12 - 4*n)) & 15]) ^ c) << (12 - 4*n);
    for (int i = 0; i < 4; i++) d_i[i] = d & ('hf000 >> (4*i));
    last = (t == 4) ? u[0] : u[4];
    return {16'(u[1] ^ d_i[0]), 16'(u[2] ^ d_i[1]), 16'(u[3] ^ d_i[2]), 16'(last ^ d_i[3])};
  endfunction

  // One key-register update; words beyond t come out as zero.
  function automatic words_a key_update(words_a u, int unsigned t);
    if (t == 4)      return '{u[1], u[2], u[3], rot16(u[0], 3), 0, 0, 0, 0};
    else if (t == 6) return '{u[5], rot16(u[0], 3), u[1], u[2], rot16(u[3], 8), u[4], 0, 0};
    else             return '{u[5], u[6], u[7], rot16(u[0], 3), u[1], u[2], u[3], rot16(u[4], 8)};
  endfunction

  // All thirteen round keys K0..K12 for a left-aligned key.
  typedef logic [63:0] rk_a [13];
  function automatic rk_a round_keys(logic [127:0] key, int unsigned ks);
    int unsigned t = nwords(ks);
    words_a u = to_words(key);
    rk_a rk;
    for (int i = t; i < 8; i++) u[i] = 0;
    for (int r = 0; r < 13; r++) begin
      rk[r] = round_key(u, t, rcon(r));
      u = key_update(u, t);
    end
    return rk;
  endfunction

  // State after the initial key addition and the first `rounds` rounds.
  function automatic logic [63:0] state_after(logic [63:0] pt, logic [127:0] key,
                                              int unsigned ks, int unsigned rounds);
    rk_a rk = round_keys(key, ks);
    logic [63:0] s = pt ^ rk[0];
    for (int r = 1; r <= rounds; r++) s = tau(pi(gamma(s))) ^ rk[r];
    return s;
  endfunction

  function automatic logic [63:0] encrypt(logic [63:0] pt, logic [127:0] key, int unsigned ks);
    return phi(state_after(pt, key, ks, 12));
  endfunction

  // Clear the key bits a key of this size does not have.
  function automatic logic [127:0] key_align(logic [127:0] key, int unsigned ks);
    return key & ({128{1'b1}} << (128 - 16*nwords(ks)));
  endfunction

  function automatic logic [63:0] rand64();
    return {$urandom, $urandom};
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
