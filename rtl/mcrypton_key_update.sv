// mcrypton_key_update: flexible key-register update for 64/96/128-bit keys.
//
// The key register V is always 128 bits (eight 16-bit words V[0]..V[7]); a
// 64-bit key sits in V[0..3] and a 96-bit key in V[0..5], the remaining
// words being zero. Per round the register becomes
//   64-bit : (V1, V2, V3, V0<<<3, 0, 0, 0, 0)
//   96-bit : (V5, V0<<<3, V1, V2, V3<<<8, V4, 0, 0)
//   128-bit: (V5, V6, V7, V0<<<3, V1, V2, V3, V4<<<8)
// where <<<k is a 16-bit left rotation. One multiplexer per output word picks
// among the three candidates with the selection line (01, 10, 11); the
// zero words are the grounded multiplexer inputs. Code 00 (no key size) gives
// an all-zero register, which is this design's choice.
// Combinational v -> v_next.
module mcrypton_key_update
  import mcrypton_pkg::*;
(
  input  key_t        v,
  input  logic  [1:0] sel,
  output key_t        v_next
);

  function automatic word_t rotl(word_t w, int unsigned k);
    return word_t'((w << k) | (w >> (WORD_W - k)));
  endfunction

  word_t w [8];
  word_t n64 [8], n96 [8], n128 [8];

  always_comb begin
    for (int i = 0; i < 8; i++) w[i] = get_word(v, i);

    n64  = '{w[1], w[2], w[3], rotl(w[0], 3), '0, '0, '0, '0};
    n96  = '{w[5], rotl(w[0], 3), w[1], w[2], rotl(w[3], 8), w[4], '0, '0};
    n128 = '{w[5], w[6], w[7], rotl(w[0], 3), w[1], w[2], w[3], rotl(w[4], 8)};

    for (int i = 0; i < 8; i++) begin
      unique case (key_size_e'(sel))
        KS_64:   v_next[KEY_W-1-WORD_W*i -: WORD_W] = n64[i];
        KS_96:   v_next[KEY_W-1-WORD_W*i -: WORD_W] = n96[i];
        KS_128:  v_next[KEY_W-1-WORD_W*i -: WORD_W] = n128[i];
        default: v_next[KEY_W-1-WORD_W*i -: WORD_W] = '0;
      endcase
    end
  end

endmodule
