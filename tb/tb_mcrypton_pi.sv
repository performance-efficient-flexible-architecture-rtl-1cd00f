// tb_mcrypton_pi: compares the pi layer with the reference model on
// fixed corner patterns and 2000 random states.
`define WATCHDOG_CYCLES 100000
module tb_mcrypton_pi;
  import mcrypton_ref_pkg::*;
  `include "tb_common.svh"

  logic [63:0] a, b;
  mcrypton_pi dut (.a(a), .b(b));

  task automatic one(input logic [63:0] v);
    a = v;
    #1;
    check(b == pi(v), $sformatf("pi(%016h) = %016h expected %016h", v, b, pi(v)));
  endtask

  initial begin
    one(64'h0);
    one('1);
    one(64'h0123456789abcdef);
    for (int n = 0; n < 16; n++) one(64'h1 << (4*n));
    for (int n = 0; n < 2000; n++) one(rand64());
    finish_tb();
  end
endmodule
