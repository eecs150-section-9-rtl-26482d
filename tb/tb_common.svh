// tb_common.svh: shared scaffolding for the self-checking testbenches.
// Include inside a testbench module. It declares the check counters, a
// 10-time-unit clock, a check task, and a watchdog that counts a failure
// and ends the run after TB_WATCHDOG_CYCLES clock cycles. TB_FINISH prints
// the result line and ends the simulation.
`ifndef TB_WATCHDOG_CYCLES
`define TB_WATCHDOG_CYCLES 100000
`endif

int   checks   = 0;
int   failures = 0;
logic clk      = 1'b0;
always #5 clk = ~clk;

task automatic chk(input logic ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL @%0t: %s", $time, what);
  end
endtask

initial begin : watchdog
  repeat (`TB_WATCHDOG_CYCLES) @(posedge clk);
  failures++;
  $display("FAIL: watchdog expired after %0d cycles", `TB_WATCHDOG_CYCLES);
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

`define TB_FINISH begin \
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
  $finish; \
end
