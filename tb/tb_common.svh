// Shared testbench helpers: check counting, the result line, a watchdog.
// Expects a clock named clk in the including module.
int checks = 0;
int failures = 0;

task automatic chk(input bit ok, input string msg);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL @%0t: %s", $time, msg);
  end
endtask

task automatic finish_tb();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask

`define TB_WATCHDOG(CLK, N) \
  initial begin \
    repeat (N) @(posedge CLK); \
    failures++; \
    $display("FAIL: watchdog expired"); \
    finish_tb(); \
  end
