// tb_apb_rtc: with a reduced oscillator rate of OSC_HZ ticks per second,
// sets the time, runs a number of seconds and checks the count, then
// programs an alarm and checks that wakeup rises exactly when the seconds
// reach it and clears on write.
module tb_apb_rtc;
  import gnss_pkg::*;
  localparam int OSC = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, osc_tick = 0, wakeup;
  apb_req_t apb_req = '0;
  apb_rsp_t apb_rsp;
  apb_rtc #(.OSC_HZ(OSC)) dut (.clk, .rst_n, .apb_req, .apb_rsp, .osc_tick, .wakeup);
  `include "tb/tb_common.svh"
  `include "tb/apb_tasks.svh"
  always #5 clk = ~clk;
  int osc_count = 0;
  logic osc_en = 0;
  always begin
    repeat (3) @(negedge clk);
    wait (osc_en);
    osc_tick = 1;
    @(negedge clk);
    osc_tick = 0;
    osc_count++;
  end
  initial begin
    logic [31:0] rd;
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    apb_write(16'h0000, 32'h3FFF_FFF0);
    apb_write(16'h0008, 32'h1);       // run
    t0 = osc_count;
    osc_en = 1;
    wait (osc_count == t0 + 10 * OSC);
    apb_read(16'h0000, rd);
    check("seconds after 10 s", rd, 32'h3FFF_FFFA);
    apb_write(16'h0004, 32'h3FFF_FFFD);
    apb_write(16'h0008, 32'h3);       // run, wake enable
    wait (wakeup);
    apb_read(16'h0000, rd);
    check("wakeup at alarm", rd, 32'h3FFF_FFFD);
    apb_write(16'h0008, 32'h7);
    check("wakeup cleared", wakeup, 0);
    wait (osc_count == t0 + 17 * OSC);
    apb_read(16'h0000, rd);
    check("30-bit wrap", rd, 32'h1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
