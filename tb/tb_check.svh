// Shared testbench helpers: check counters and the end-of-test report.
int checks = 0;
int failures = 0;

task automatic chk(bit ok, string msg);
  checks++;
  if (!ok) begin
    failures++;
    if (failures <= 20) $display("FAIL: %s", msg);
  end
endtask

task automatic report();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask
