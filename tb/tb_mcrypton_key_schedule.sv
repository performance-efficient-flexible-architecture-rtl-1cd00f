// tb_mcrypton_key_schedule: runs the key path through a load cycle and
// twelve step cycles for each key size and checks K0..K12 against the
// reference. Key bits below a 64- or 96-bit key are filled with random
// values and must not change the round keys.
`define WATCHDOG_CYCLES 100000
module tb_mcrypton_key_schedule;
  import mcrypton_ref_pkg::*;
  `include "tb_common.svh"

  logic rst_n, load, step;
  logic [127:0] key;
  logic [1:0]   sel;
  logic [63:0]  rk;
  mcrypton_key_schedule dut (.clk(clk), .rst_n(rst_n), .load(load), .step(step),
                             .key(key), .sel(sel), .round_key(rk));

  initial begin
    rst_n = 1'b0; load = 1'b0; step = 1'b0; key = '0; sel = 2'b11;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      automatic int unsigned ks = 1 + n % 3;
      automatic logic [127:0] k = rand128();
      automatic rk_a exp = round_keys(key_align(k, ks), ks);
      @(negedge clk);
      sel = 2'(ks); key = k; load = 1'b1;
      #1 check(rk == exp[0], $sformatf("ks=%0d K0 %016h expected %016h", ks, rk, exp[0]));
      @(negedge clk);
      load = 1'b0; key = rand128();
      for (int r = 1; r <= 12; r++) begin
        step = 1'b1;
        #1 check(rk == exp[r], $sformatf("ks=%0d K%0d %016h expected %016h", ks, r, rk, exp[r]));
        @(negedge clk);
      end
      step = 1'b0;
    end
    finish_tb();
  end
endmodule
