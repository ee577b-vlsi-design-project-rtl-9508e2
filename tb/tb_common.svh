// Shared testbench scaffolding: check counter, check task and watchdog.
// WATCHDOG_CYCLES must be defined before inclusion; `clk` must exist.
int checks = 0, failures = 0;

task automatic check(bit ok, string what);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL: %s", what);
  end
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
