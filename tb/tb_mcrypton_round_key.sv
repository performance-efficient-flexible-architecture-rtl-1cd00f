// tb_mcrypton_round_key: checks round-key generation for every key size
// and every round constant C0..C12 against the reference.
`define WATCHDOG_CYCLES 100000
module tb_mcrypton_round_key;
  import mcrypton_ref_pkg::*;
  `include "tb_common.svh"

  logic [127:0] v;
  logic [15:0]  cr;
  logic [1:0]   sel;
  logic [63:0]  kr;
  mcrypton_round_key dut (.v(v), .cr(cr), .sel(sel), .kr(kr));

  initial begin
    for (int n = 0; n < 3900; n++) begin
      automatic int unsigned ks = 1 + n % 3;
      automatic int unsigned r  = (n / 3) % 13;
      automatic int unsigned c  = rcon(r);
      logic [63:0] exp;
      sel = 2'(ks);
      v   = key_align(rand128(), ks);
      cr  = {4{4'(c)}};
      #1;
      exp = round_key(to_words(v), nwords(ks), c);
      check(kr == exp, $sformatf("ks=%0d r=%0d key(%032h) = %016h expected %016h", ks, r, v, kr, exp));
    end
    finish_tb();
  end
endmodule
