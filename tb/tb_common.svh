// Common testbench scaffolding: clock, check counter and watchdog.
// WATCHDOG_CYCLES must be defined before inclusion.
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  initial begin : watchdog
    repeat (`WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end
