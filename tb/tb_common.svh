// tb_common.svh: shared testbench helpers, included inside a testbench
// module that declares clk, checks and failures. check() compares a value
// with its expected value and reports mismatches.
task automatic check(input string what, input longint got, input longint exp);
  checks++;
  if (got !== exp) begin
    failures++;
    $display("FAIL %s: got %0d expected %0d", what, got, exp);
  end
endtask
