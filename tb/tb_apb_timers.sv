// tb_apb_timers: with prescaler reload P the tick period is P+1 clocks.
// Timer 0 in periodic mode with reload R must interrupt every (R+1)*(P+1)
// clocks; timer 1 in one-shot mode interrupts once and stops. The watchdog
// loaded with W asserts wdog (W)*(P+1) clocks (within one tick) later.
module tb_apb_timers;
  import gnss_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  apb_req_t apb_req = '0;
  apb_rsp_t apb_rsp;
  logic [1:0] irq;
  logic wdog;
  apb_timers dut (.clk, .rst_n, .apb_req, .apb_rsp, .irq, .wdog);
  `include "tb/tb_common.svh"
  `include "tb/apb_tasks.svh"
  always #5 clk = ~clk;
  int cyc = 0;
  int irq0_times [$];
  int irq1_count = 0;
  int wd_time = -1;
  logic [1:0] irq_d = 0;
  always @(posedge clk) begin
    cyc++;
    irq_d <= irq;
    if (irq[0] && !irq_d[0]) irq0_times.push_back(cyc);
    if (irq[1] && !irq_d[1]) irq1_count++;
    if (wdog && wd_time < 0) wd_time = cyc;
  end
  initial begin
    logic [31:0] rd;
    int t_wd;
    repeat (2) @(negedge clk);
    rst_n = 1;
    apb_write(16'h0000, 32'd3);            // prescaler: tick every 4 clocks
    apb_write(16'h0014, 32'd9);            // timer0 reload 9 -> 40 clocks
    apb_write(16'h0018, 32'b0_1111);       // enable, periodic, load, irq en
    apb_write(16'h0024, 32'd5);            // timer1 reload 5
    apb_write(16'h0028, 32'b0_1101);       // enable, one-shot, load, irq en
    apb_write(16'h0030, 32'd50);           // watchdog load 50
    t_wd = cyc;
    apb_write(16'h0038, 32'd1);            // watchdog enable
    // clear timer0 irq each time it fires
    for (int k = 0; k < 6; k++) begin
      wait (irq[0]);
      apb_write(16'h0018, 32'b1_1011);     // keep enable/periodic/irq en, clear pending
    end
    repeat (300) @(negedge clk);
    check("timer0 periods seen", irq0_times.size() >= 6, 1);
    for (int k = 1; k < 6; k++)
      check($sformatf("timer0 period %0d", k), irq0_times[k] - irq0_times[k-1], 40);
    check("one-shot fired once", irq1_count, 1);
    apb_read(16'h0028, rd);
    check("one-shot stopped", rd[0], 0);
    check("watchdog fired", wd_time > 0, 1);
    check("watchdog time", (wd_time - t_wd) / 4 >= 49 && (wd_time - t_wd) / 4 <= 52, 1);
    apb_read(16'h0030, rd);
    check("watchdog counter at zero", rd, 0);
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
