// tb_common.svh: counters, clock and watchdog shared by the testbenches.
// A testbench defines WATCHDOG_CYCLES before including this file; the
// watchdog counts a failure and ends the run if the test has not finished
// by then.
int checks = 0;
int failures = 0;
logic clk = 1'b0;
always #5 clk = ~clk;

task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    if (failures <= 10) $display("FAIL %s", what);
  end
endtask

task automatic finish_tb();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask

initial begin
  repeat (`WATCHDOG_CYCLES) @(posedge clk);
  failures++;
  $display("FAIL watchdog expired");
  finish_tb();
end
