// mcrypton_datapath: iterative 64-bit round datapath of m-Crypton.
//
// One state register (the "C register") and one round of logic. In the load
// cycle the register takes plaintext XOR K0 (the initial key addition); in
// each of the twelve following step cycles it takes
// sigma_Kr(tau(pi(gamma(C)))), one full round rho per clock. The
// ciphertext is phi(C) = tau(pi(tau(C))), taken combinationally from the
// register, so it is valid once the twelfth round has been stored and stays
// valid until the next load.
//
// Interface: load selects the plaintext input (the figure's Start line),
// step advances one round; round_key must carry K0 during load and Kr during
// the r-th step. The register is cleared by the synchronous active-low reset and holds
// when neither load nor step is high; both are this design's choices.
module mcrypton_datapath
  import mcrypton_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  logic   step,
  input  block_t plaintext,
  input  block_t round_key,
  output block_t state,
  output block_t ciphertext
);

  block_t c_q, g_out, p_out, t_out, src, c_next;

  // Round function without key addition: gamma, pi, tau.
  mcrypton_gamma u_gamma (.a(c_q),   .b(g_out));
  mcrypton_pi    u_pi    (.a(g_out), .b(p_out));
  always_comb t_out = transpose(p_out);

  // Plaintext / feedback multiplexer, then key addition.
  always_comb src = load ? plaintext : t_out;
  mcrypton_sigma u_sigma (.a(src), .round_key(round_key), .b(c_next));

  always_ff @(posedge clk) begin
    if (!rst_n)            c_q <= '0;
    else if (load || step) c_q <= c_next;
  end

  // Output transformation.
  mcrypton_phi u_phi (.a(c_q), .b(ciphertext));

  assign state = c_q;

endmodule
