// tb_mcrypton_datapath: drives the round datapath with round keys from the
// reference key schedule and checks the state register after the load and
// after every round, the ciphertext after round 12, and that the register
// holds while neither load nor step is high.
`define WATCHDOG_CYCLES 100000
module tb_mcrypton_datapath;
  import mcrypton_ref_pkg::*;
  `include "tb_common.svh"

  logic rst_n, load, step;
  logic [63:0] pt, rk, state, ct;
  mcrypton_datapath dut (.clk(clk), .rst_n(rst_n), .load(load), .step(step),
                         .plaintext(pt), .round_key(rk), .state(state), .ciphertext(ct));

  initial begin
    rst_n = 1'b0; load = 1'b0; step = 1'b0; pt = '0; rk = '0;
    repeat (2) @(negedge clk);
    check(state == '0, "state not cleared by reset");
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      automatic int unsigned ks = 1 + n % 3;
      automatic logic [127:0] key = key_align(rand128(), ks);
      automatic logic [63:0]  p   = rand64();
      automatic rk_a keys = round_keys(key, ks);
      @(negedge clk);
      load = 1'b1; pt = p; rk = keys[0];
      @(negedge clk);
      load = 1'b0; pt = rand64();
      check(state == state_after(p, key, ks, 0), "state after load");
      for (int r = 1; r <= 12; r++) begin
        if (r == 7) begin                       // idle cycle in the middle
          rk = rand64();
          @(negedge clk);
          check(state == state_after(p, key, ks, 6), "state changed while idle");
        end
        step = 1'b1; rk = keys[r];
        @(negedge clk);
        step = 1'b0;
        check(state == state_after(p, key, ks, r), $sformatf("state after round %0d", r));
      end
      check(ct == encrypt(p, key, ks), $sformatf("ciphertext %016h expected %016h", ct, encrypt(p, key, ks)));
    end
    finish_tb();
  end
endmodule
