// tb_mcrypton_round_counter: checks that init gives C0 = 1 and each step
// the next power of x modulo x^4+x+1 (1,2,4,8,3,6,...), that CR repeats the
// constant in all four nibbles, that the register holds without step and
// that init restarts the sequence.
`define WATCHDOG_CYCLES 10000
module tb_mcrypton_round_counter;
  import mcrypton_ref_pkg::*;
  `include "tb_common.svh"

  logic rst_n, init, step;
  logic [3:0]  c;
  logic [15:0] cr;
  mcrypton_round_counter dut (.clk(clk), .rst_n(rst_n), .init(init), .step(step), .c(c), .cr(cr));

  initial begin
    rst_n = 1'b0; init = 1'b0; step = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int pass = 0; pass < 3; pass++) begin
      @(negedge clk);
      init = 1'b1;
      #1 check(c == 4'h1 && cr == 16'h1111, $sformatf("init constant %h", cr));
      @(negedge clk);
      init = 1'b0;
      for (int r = 1; r <= 14; r++) begin
        step = 1'b0;
        if (r == 5) begin                 // one idle cycle: must hold
          @(negedge clk);
          check(c == 4'(rcon(r)), "constant changed without step");
        end
        step = 1'b1;
        #1 check(c == 4'(rcon(r)) && cr == {4{4'(rcon(r))}},
                 $sformatf("round %0d constant %h expected %h", r, c, rcon(r)));
        @(negedge clk);
      end
      step = 1'b0;
    end
    finish_tb();
  end
endmodule
