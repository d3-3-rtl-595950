// tb_watchdog: loads the counter, gives ticks and checks that wdog rises
// exactly after load_val ticks, stays high, ignores ticks when disabled and
// drops when reloaded.
module tb_watchdog;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, tick = 0, enable = 0, load = 0;
  logic [23:0] load_val = '0, count;
  logic wdog;
  watchdog #(.W(24)) dut (.clk, .rst_n, .tick, .enable, .load, .load_val, .count, .wdog);
  `include "tb/tb_common.svh"
  always #5 clk = ~clk;
  task automatic ticks(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); tick = 1;
      @(negedge clk); tick = 0;
    end
  endtask
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); load = 1; load_val = 24'd100;
    @(negedge clk); load = 0;
    ticks(50);
    check("no count while disabled", count, 100);
    enable = 1;
    ticks(99);
    check("count after 99", count, 1);
    check("wdog low before zero", wdog, 0);
    ticks(1);
    check("wdog at zero", wdog, 1);
    ticks(5);
    check("wdog stays", wdog, 1);
    check("count holds", count, 0);
    @(negedge clk); load = 1; load_val = 24'hFFFFFF;
    @(negedge clk); load = 0;
    check("wdog cleared by reload", wdog, 0);
    ticks(3);
    check("big count", count, 24'hFFFFFC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
