// tb_mcrypton_key_update: checks one key-register update for each key
// size against the reference, which works on the t real key words only.
// Also checks that words beyond the key come out zero and that the unused
// select code 00 gives zero.
`define WATCHDOG_CYCLES 100000
module tb_mcrypton_key_update;
  import mcrypton_ref_pkg::*;
  `include "tb_common.svh"

  logic [127:0] v, vn;
  logic [1:0]   sel;
  mcrypton_key_update dut (.v(v), .sel(sel), .v_next(vn));

  initial begin
    for (int n = 0; n < 3000; n++) begin
      automatic int unsigned ks = 1 + n % 3;
      words_a u;
      logic [127:0] exp;
      sel = 2'(ks);
      v   = key_align(rand128(), ks);
      #1;
      u   = to_words(v);
      exp = from_words(key_update(u, nwords(ks)));
      check(vn == exp, $sformatf("ks=%0d update(%032h) = %032h expected %032h", ks, v, vn, exp));
    end
    sel = 2'b00;
    v   = rand128();
    #1;
    check(vn == '0, "select 00 must give zero");
    finish_tb();
  end
endmodule
