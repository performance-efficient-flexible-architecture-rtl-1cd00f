// tb_mcrypton_sbox: checks all sixteen entries of each S-box S0..S3
// against the reference tables, and the inverse pairs S2 = S0^-1 and
// S3 = S1^-1 by chaining instances, which does not rely on the tables.
`define WATCHDOG_CYCLES 1000
module tb_mcrypton_sbox;
  import mcrypton_ref_pkg::*;
  `include "tb_common.svh"

  logic [3:0] x;
  logic [3:0] y [4];
  logic [3:0] y20, y31, y02;

  for (genvar i = 0; i < 4; i++) begin : g_box
    mcrypton_sbox #(.IDX(i)) dut (.x(x), .y(y[i]));
  end
  mcrypton_sbox #(.IDX(2)) u_inv0 (.x(y[0]), .y(y20));
  mcrypton_sbox #(.IDX(3)) u_inv1 (.x(y[1]), .y(y31));
  mcrypton_sbox #(.IDX(0)) u_inv2 (.x(y[2]), .y(y02));

  initial begin
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      #1;
      for (int i = 0; i < 4; i++)
        check(y[i] == 4'(SB[i][v]), $sformatf("S%0d(%0d)=%0d expected %0d", i, v, y[i], SB[i][v]));
      check(y20 == x, $sformatf("S2(S0(%0d)) = %0d", v, y20));
      check(y31 == x, $sformatf("S3(S1(%0d)) = %0d", v, y31));
      check(y02 == x, $sformatf("S0(S2(%0d)) = %0d", v, y02));
    end
    finish_tb();
  end
endmodule
