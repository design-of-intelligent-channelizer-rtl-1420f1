// Check counting shared by the block testbenches: declares `checks` and
// `failures`, a `check(ok, msg)` function, and a `finish_tb` task that prints
// the result line and ends the simulation.
  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL @%0t: %s", $time, what);
    end
  endfunction
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
