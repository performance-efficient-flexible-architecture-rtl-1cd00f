// mcrypton_round_counter: round-constant generator of m-Crypton.
//
// Produces C_r = x^r in GF(2^4) modulo x^4 + x + 1 (1, 2, 4, 8, 3, 6, ...)
// and the 16-bit constant CR = C_r repeated in all four nibbles. A 4-bit
// register holds the next constant; one step is a multiplication by x:
// R[3:1] = X[2:0] shifted up, R[0] = X[3], with X[3] also XORed into R[1].
//
// Interface: init is high in the load cycle; cr is then C_0 = 1 and the
// register takes C_1. While step is high cr is the register and the
// register advances. Reset clears the register to C_0 (this design's
// choice; the init cycle does not depend on it).
module mcrypton_round_counter
  import mcrypton_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    init,
  input  logic    step,
  output nibble_t c,
  output word_t   cr
);

  nibble_t c_q, c_next;

  always_comb begin
    c      = init ? 4'h1 : c_q;
    c_next = {c[2], c[1], c[0] ^ c[3], c[3]};
    cr     = {4{c}};
  end

  always_ff @(posedge clk) begin
    if (!rst_n)            c_q <= 4'h1;
    else if (init || step) c_q <= c_next;
  end

endmodule
