// mcrypton_ctrl: sequencer of the iterative m-Crypton core.
//
// Accepts start when idle and the key size is not 00, giving one load cycle
// (load high), then twelve step cycles (step high, busy high), one per
// round. done pulses for one cycle right after the twelfth round has been
// stored; the core is idle again in that cycle, so a new start can be
// accepted there (a new block every 13 cycles). A start while busy is
// ignored. The key size is captured at the accepted start and sel carries
// it through the encryption (sel shows the input code during the load
// cycle itself). All of this sequencing is this design's choice.
module mcrypton_ctrl
  import mcrypton_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [1:0] key_size,
  output logic       load,
  output logic       step,
  output logic [1:0] sel,
  output logic       busy,
  output logic       done
);

  logic       busy_q, done_q;
  logic [3:0] round_q;            // round being computed in a step cycle, 1..12
  logic [1:0] ks_q;

  always_comb begin
    load = start && !busy_q && (key_size_e'(key_size) != KS_NONE);
    step = busy_q;
    sel  = load ? key_size : ks_q;
    busy = busy_q;
    done = done_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      done_q  <= 1'b0;
      round_q <= '0;
      ks_q    <= KS_NONE;
    end else begin
      done_q <= 1'b0;
      if (load) begin
        busy_q  <= 1'b1;
        round_q <= 4'd1;
        ks_q    <= key_size;
      end else if (busy_q) begin
        if (round_q == 4'(NUM_ROUNDS)) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
        end else begin
          round_q <= round_q + 4'd1;
        end
      end
    end
  end

  // An encryption in progress always has a valid key size.
  a_ks_valid: assert property (@(posedge clk) disable iff (!rst_n)
                               busy_q |-> (key_size_e'(ks_q) != KS_NONE));
  // done follows exactly the last round.
  a_done_after_last: assert property (@(posedge clk) disable iff (!rst_n)
                               done_q |-> $past(busy_q && round_q == 4'(NUM_ROUNDS)));

endmodule
