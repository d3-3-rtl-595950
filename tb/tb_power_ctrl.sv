// tb_power_ctrl: checks the reset length after power-on, HALT and resume on
// an interrupt level (not on level 0), SLEEP with wake-up by the RTC and by
// the external input (supply back on, system reset for RST_CLKS clocks,
// cause recorded and cleared), and that HALT is ignored while asleep.
module tb_power_ctrl;
  import gnss_pkg::*;
  localparam int RST = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rtc_wakeup = 0, ext_wakeup = 0;
  logic [3:0] irl = '0;
  logic cpu_clk_en, core_pwr_on, sys_rst_n;
  apb_req_t apb_req = '0;
  apb_rsp_t apb_rsp;
  power_ctrl #(.RST_CLKS(RST)) dut (.clk, .rst_n, .apb_req, .apb_rsp, .irl, .rtc_wakeup, .ext_wakeup,
                                    .cpu_clk_en, .core_pwr_on, .sys_rst_n);
  `include "tb/tb_common.svh"
  `include "tb/apb_tasks.svh"
  always #5 clk = ~clk;
  initial begin
    #100000;
    $display("watchdog timeout");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // clocks with sys_rst_n low after a wake-up
  int rst_low = 0;
  always @(posedge clk) if (rst_n && core_pwr_on && !sys_rst_n) rst_low++;

  task automatic wake_test(input bit by_rtc);
    logic [31:0] rd;
    rst_low = 0;
    apb_write(16'h0000, 32'h2);
    check("asleep: power off", core_pwr_on, 0);
    check("asleep: cpu clock off", cpu_clk_en, 0);
    check("asleep: reset", sys_rst_n, 0);
    apb_write(16'h0000, 32'h1);          // ignored while asleep
    irl = 4'd3;
    repeat (20) @(negedge clk);
    check("stays asleep on interrupt", core_pwr_on, 0);
    irl = '0;
    if (by_rtc) rtc_wakeup = 1; else ext_wakeup = 1;
    @(negedge clk);
    rtc_wakeup = 0; ext_wakeup = 0;
    check("woken: power on", core_pwr_on, 1);
    repeat (RST + 3) @(negedge clk);
    check("reboot reset length", rst_low, RST);
    check("reboot: running", sys_rst_n, 1);
    check("reboot: cpu clock", cpu_clk_en, 1);
    apb_read(16'h0004, rd);
    check("wake cause", rd, by_rtc ? 1 : 2);
    apb_write(16'h0004, rd);
    apb_read(16'h0004, rd);
    check("wake cause cleared", rd, 0);
  endtask

  initial begin
    logic [31:0] rd;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (RST - 1) @(negedge clk);
    check("power-on reset held", sys_rst_n, 0);
    repeat (2) @(negedge clk);
    check("power-on reset released", sys_rst_n, 1);
    check("power on", core_pwr_on, 1);
    check("cpu clock on", cpu_clk_en, 1);
    // HALT until an interrupt
    apb_write(16'h0000, 32'h1);
    check("halted", cpu_clk_en, 0);
    apb_read(16'h0000, rd);
    check("halt readback", rd, 1);
    repeat (10) @(negedge clk);
    check("still halted", cpu_clk_en, 0);
    irl = 4'd9;
    @(negedge clk);
    check("resumed on interrupt", cpu_clk_en, 1);
    check("halt keeps power", core_pwr_on, 1);
    irl = '0;
    wake_test(1);
    wake_test(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
