// tb_mcrypton_sigma: checks the key addition row by row against the
// reference (row i XOR key word i) for random states and round keys.
`define WATCHDOG_CYCLES 100000
module tb_mcrypton_sigma;
  import mcrypton_ref_pkg::*;
  `include "tb_common.svh"

  logic [63:0] a, k, b;
  mcrypton_sigma dut (.a(a), .round_key(k), .b(b));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a = rand64();
      k = rand64();
      #1;
      for (int i = 0; i < 4; i++)
        check(b[63-16*i -: 16] == (a[63-16*i -: 16] ^ k[63-16*i -: 16]),
              $sformatf("row %0d of sigma(%016h, %016h) = %016h", i, a, k, b));
    end
    finish_tb();
  end
endmodule
