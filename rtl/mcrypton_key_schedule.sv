// mcrypton_key_schedule: key path of the flexible m-Crypton core.
//
// A multiplexer feeds either the master key (load cycle) or the U register
// to both the round-key generator and the key-update network; the update
// result is written back into U every load or step cycle. The round
// constant comes from the round counter. So in the load cycle round_key is
// K0 of the master key, and in the r-th step cycle it is Kr.
//
// Interface: key is 128 bits, a shorter key left-aligned (64-bit key in
// key[127:64], 96-bit key in key[127:32]); the bits below it are not used.
// sel is the key-size code and must be stable for a whole encryption.
module mcrypton_key_schedule
  import mcrypton_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic        step,
  input  key_t        key,
  input  logic  [1:0] sel,
  output block_t      round_key
);

  key_t    u_q, v_cur, v_next;
  word_t   cr;
  nibble_t c;

  always_comb v_cur = load ? key : u_q;

  mcrypton_round_counter u_rc (
    .clk(clk), .rst_n(rst_n), .init(load), .step(step), .c(c), .cr(cr)
  );

  mcrypton_round_key u_rk (.v(v_cur), .cr(cr), .sel(sel), .kr(round_key));

  mcrypton_key_update u_ku (.v(v_cur), .sel(sel), .v_next(v_next));

  always_ff @(posedge clk) begin
    if (!rst_n)            u_q <= '0;
    else if (load || step) u_q <= v_next;
  end

endmodule
