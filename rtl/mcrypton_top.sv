// mcrypton_top: flexible iterative m-Crypton encryption core.
//
// Encrypts a 64-bit block under a 64-, 96- or 128-bit key chosen at run
// time by key_size (01, 10, 11). One round per clock: a load cycle that
// performs the initial key addition, twelve round cycles, then the
// ciphertext is available combinationally from the state register through
// the output transformation, with a one-cycle done pulse.
//
// Interface: hold plaintext, key (left-aligned) and key_size while start is
// high for one cycle with busy low; they are used in that cycle only.
// done rises 12 cycles after the cycle in which start was taken, and
// ciphertext then stays valid until the next accepted start. start may be
// given again in the done cycle, so a block can be issued every 13 cycles.
module mcrypton_top
  import mcrypton_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [1:0]   key_size,
  input  logic [63:0]  plaintext,
  input  logic [127:0] key,
  output logic [63:0]  ciphertext,
  output logic         busy,
  output logic         done
);

  logic   load, step;
  logic [1:0] sel;
  block_t round_key, state;

  mcrypton_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .key_size(key_size),
    .load(load), .step(step), .sel(sel), .busy(busy), .done(done)
  );

  mcrypton_key_schedule u_ks (
    .clk(clk), .rst_n(rst_n), .load(load), .step(step),
    .key(key), .sel(sel), .round_key(round_key)
  );

  mcrypton_datapath u_dp (
    .clk(clk), .rst_n(rst_n), .load(load), .step(step),
    .plaintext(plaintext), .round_key(round_key),
    .state(state), .ciphertext(ciphertext)
  );

endmodule
