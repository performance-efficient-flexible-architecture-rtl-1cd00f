// tb_mcrypton_ctrl: checks the sequencer's timing. After an accepted start
// there must be exactly one load cycle, then twelve step cycles, then a
// one-cycle done pulse; starts while busy and starts with key size 00 are
// ignored; sel carries the captured key size; a start in the done cycle
// begins the next block at once.
`define WATCHDOG_CYCLES 100000
module tb_mcrypton_ctrl;
  `include "tb_common.svh"

  logic rst_n, start, load, step, busy, done;
  logic [1:0] ks, sel;
  mcrypton_ctrl dut (.clk(clk), .rst_n(rst_n), .start(start), .key_size(ks),
                     .load(load), .step(step), .sel(sel), .busy(busy), .done(done));

  // Counts load/step cycles and checks them at done.
  int n_load = 0, n_step = 0, since_load = -1;
  always @(posedge clk) if (rst_n) begin
    if (load) begin n_load++; since_load = 0; end
    else if (since_load >= 0) since_load++;
    if (step) n_step++;
  end

  task automatic run_block(input logic [1:0] size, input bit poke_busy);
    int steps_before = n_step;
    start = 1'b1; ks = size;
    #1 check(load == 1'b1 && sel == size, "start not taken");
    @(negedge clk);
    start = 1'b0; ks = 2'(size + 1);
    for (int c = 1; c <= 12; c++) begin
      check(busy && step && !load && !done, $sformatf("cycle %0d: busy/step", c));
      check(sel == size, "sel changed during encryption");
      if (poke_busy && c == 4) begin
        start = 1'b1;
        #1 check(!load, "start while busy was taken");
      end
      @(negedge clk);
      start = 1'b0;
    end
    check(done && !busy && !step, "done pulse missing after 12 rounds");
    check(n_step - steps_before == 12, $sformatf("%0d step cycles", n_step - steps_before));
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; ks = 2'b00;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(!busy && !done, "idle after reset");
    // key size 00 is refused
    start = 1'b1; ks = 2'b00;
    #1 check(!load, "start with key size 00 taken");
    @(negedge clk);
    start = 1'b0;
    check(!busy, "busy after refused start");
    for (int n = 0; n < 30; n++) begin
      run_block(2'(1 + n % 3), n % 2 == 0);
      // back-to-back: the next start comes in the done cycle for half the
      // blocks, one idle cycle later for the others
      if (n % 2 == 1) begin
        @(negedge clk);
        check(!done && !busy, "done longer than one cycle");
      end
    end
    @(negedge clk);
    check(n_load == 30, $sformatf("%0d loads for 30 blocks", n_load));
    finish_tb();
  end
endmodule
