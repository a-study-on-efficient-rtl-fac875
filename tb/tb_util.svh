// tb_util.svh: shared testbench scaffolding. Declares a 100 MHz clock, the
// check/failure counters, a check task, and a watchdog that fails the run
// after WATCHDOG_CYCLES clock cycles. Include it inside a testbench module
// after defining WATCHDOG_CYCLES.
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  initial begin
    repeat (`WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end
