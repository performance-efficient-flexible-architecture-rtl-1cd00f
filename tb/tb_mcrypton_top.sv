// tb_mcrypton_top: end-to-end test of the m-Crypton core at its default
// (and only) configuration. Encrypts random blocks under random 64-, 96-
// and 128-bit keys and compares every ciphertext with the reference model.
// Checks that done comes exactly 12 cycles after the cycle in which start
// was taken and that the ciphertext stays valid afterwards. It also makes
// each control feature happen and counts it: every key size, blocks issued
// back to back (start in the done cycle), a start while busy (ignored), a
// start with key size 00 (refused), a key-size change between blocks, and
// junk in the key bits a short key does not use. A feature that never
// happened counts as a failure.
`define WATCHDOG_CYCLES 200000
module tb_mcrypton_top;
  import mcrypton_ref_pkg::*;
  `include "tb_common.svh"

  localparam int unsigned LATENCY = 12;   // cycles from accepted start to done

  logic         rst_n, start, busy, done;
  logic [1:0]   key_size;
  logic [63:0]  plaintext, ciphertext;
  logic [127:0] key;

  mcrypton_top dut (.clk(clk), .rst_n(rst_n), .start(start), .key_size(key_size),
                    .plaintext(plaintext), .key(key), .ciphertext(ciphertext),
                    .busy(busy), .done(done));

  int n_size [4] = '{0, 0, 0, 0};
  int n_back_to_back = 0, n_busy_start = 0, n_refused = 0, n_size_change = 0, n_junk = 0;

  // Starts one block in the current cycle (we are just after a negedge with
  // the core idle) and returns when done has been seen.
  task automatic encrypt_block(input int unsigned ks, input bit poke_busy, input bit junk,
                               output logic [63:0] exp);
    logic [127:0] k = junk ? rand128() : key_align(rand128(), ks);
    logic [63:0]  p = rand64();
    int cycles = 0;
    exp = encrypt(p, key_align(k, ks), ks);
    if (junk && ks != 3 && k != key_align(k, ks)) n_junk++;
    start = 1'b1; key_size = 2'(ks); plaintext = p; key = k;
    check(!busy, "core busy at start");
    @(negedge clk);
    start = 1'b0; plaintext = rand64(); key = rand128(); key_size = 2'($urandom);
    n_size[ks]++;
    while (!done) begin
      cycles++;
      if (poke_busy && cycles == 5) begin
        start = 1'b1; key_size = 2'(1 + $urandom % 3);
        n_busy_start++;
      end
      @(negedge clk);
      start = 1'b0;
      if (cycles > 40) break;
    end
    check(cycles == LATENCY, $sformatf("done %0d cycles after start, expected %0d", cycles, LATENCY));
    check(ciphertext == exp, $sformatf("ks=%0d ct %016h expected %016h", ks, ciphertext, exp));
  endtask

  initial begin
    automatic int last_ks = 0;
    logic [63:0] exp;
    rst_n = 1'b0; start = 1'b0; key_size = 2'b00; plaintext = '0; key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      int unsigned ks;
      bit b2b;
      ks  = 1 + $urandom % 3;
      b2b = (n % 4 == 1);
      if (n % 50 == 7) begin          // refused start: key size 00
        start = 1'b1; key_size = 2'b00;
        @(negedge clk);
        start = 1'b0;
        check(!busy, "start with key size 00 was taken");
        n_refused++;
      end
      if (last_ks != 0 && ks != last_ks) n_size_change++;
      encrypt_block(ks, n % 10 == 3, n % 3 == 0, exp);
      last_ks = ks;
      if (b2b) n_back_to_back++;       // next block starts in this done cycle
      else begin
        repeat (1 + $urandom % 3) begin
          @(negedge clk);
          check(!busy && !done && ciphertext == exp, "ciphertext not held while idle");
        end
      end
    end
    for (int i = 1; i <= 3; i++) check(n_size[i] > 0, $sformatf("key size code %0d never used", i));
    check(n_back_to_back > 0, "no back-to-back blocks");
    check(n_busy_start > 0, "no start while busy");
    check(n_refused > 0, "no refused start");
    check(n_size_change > 0, "no key-size change");
    check(n_junk > 0, "no junk below a short key");
    $display("blocks: 64-bit %0d, 96-bit %0d, 128-bit %0d; back-to-back %0d; start while busy %0d; refused %0d; size changes %0d; junk key bits %0d",
             n_size[1], n_size[2], n_size[3], n_back_to_back, n_busy_start, n_refused, n_size_change, n_junk);
    finish_tb();
  end
endmodule
