// tb_sy1031bf_top: end-to-end run of the whole baseband at its full size
// (16 tracking modules, 9 front-ends, 64 kB SRAM, 32768 Hz RTC prescaler),
// acting as the CPU on the APB and AHB ports.
// Antenna signals: front-ends 0..3 receive the PRN 1 code, front-ends 4..8
// the same code with the carrier turned by 180 degrees (sign inverted), at
// 4 samples per chip with the GPS clock at SYS_CLK/2 (pulse deletion 2).
//  TM0  all front-ends, no relative phase: the two groups cancel,
//       I_P = 255*(-48>>3) + (-36>>3) = -1535
//  TM1  all front-ends, front-ends 4..8 turned by 180 deg: the beam adds
//       up, I_P = 255*(432>>3) + (324>>3) = 13810
//  TM2  as TM1 but the code slewed by one chip: correlation lost
//  TM3  front-ends 0..3 only (front-end on/off), SCALER=1:
//       I_P = 255*(192>>1) + (144>>1) = 24552
//  TM4..15 enabled on other PRN states, checked for new data only.
// ACC_INT is routed through the interrupt controller; its spacing must be
// (ACC_PERIOD+1) samples * 2 clocks. MEAS_INT, both timers, the watchdog,
// the RTC wake-up, GPIO, both UARTs, the SPI master (UART2 and SPI on shared GPIO pads, looped back), the
// SRAM, a 16-bit external memory on EBI bank 1, stopping the CPU clock
// until an interrupt, and SLEEP with an external wake-up are
// exercised too. Each mechanism is counted and one that never happens is a
// failure.
module tb_sy1031bf_top;
  import gnss_pkg::*;
  localparam int N_FE = 9;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  apb_req_t apb_req = '0;
  apb_rsp_t apb_rsp;
  logic ahb_hsel = 0, ahb_hwrite = 0, ahb_hready, ahb_hresp;
  logic [31:0] ahb_haddr = '0, ahb_hwdata = '0, ahb_hrdata;
  logic [1:0] ahb_htrans = '0;
  logic [2:0] ahb_hsize = '0;
  logic [N_FE-1:0] if_sgn = '0, if_mag = '1, fe_p0, fe_p1;
  logic antenna_ok = 1, gps_ref_clk;
  logic [1:0] ext_irq = '0;
  logic irq_ack = 0;
  logic [3:0] irq_ack_irl = '0, irl;
  logic wdog, uart_rx, uart_tx, rtc_osc_tick = 0, rtc_wakeup;
  logic [7:0] gpio_i, gpio_o, gpio_oe;

  sy1031bf_top dut (
    .clk, .rst_n, .apb_req, .apb_rsp,
    .ahb_hsel, .ahb_haddr, .ahb_htrans, .ahb_hwrite, .ahb_hsize, .ahb_hwdata,
    .ahb_hrdata, .ahb_hready, .ahb_hresp,
    .if_sgn, .if_mag, .antenna_ok, .fe_p0, .fe_p1, .gps_ref_clk,
    .ext_irq, .irq_ack, .irq_ack_irl, .irl,
    .wdog, .gpio_i, .gpio_o, .gpio_oe, .uart_rx, .uart_tx, .rtc_osc_tick, .rtc_wakeup,
    .mem_a, .mem_d_o, .mem_d_i, .mem_d_oe, .mem_cs_n, .mem_oe_n, .mem_we_n, .mem_be_n,
    .ext_wakeup, .cpu_clk_en, .core_pwr_on, .sys_rst_n);
  logic ext_wakeup = 0, cpu_clk_en, core_pwr_on, sys_rst_n;

  // external 16-bit asynchronous memory on bank 1 (512 bytes, mirrored)
  // GPIO pads: constant 0x5A, or in loop mode pad 0 (UART2 TX) drives
  // pad 1 (UART2 RX) and pad 3 (SPI MOSI) drives pad 4 (SPI MISO)
  logic pad_loop = 0;
  int cs0_low = 0;
  always_comb begin
    gpio_i = 8'h5A;
    if (pad_loop) begin
      gpio_i[1] = gpio_o[0];
      gpio_i[4] = gpio_o[3];
    end
  end
  always @(posedge clk) if (pad_loop && gpio_oe[5] && !gpio_o[5]) cs0_low++;
  logic [23:0] mem_a;
  logic [31:0] mem_d_o, mem_d_i;
  logic mem_d_oe, mem_oe_n, mem_we_n;
  logic [3:0] mem_cs_n, mem_be_n;
  logic [7:0] ext_mem [512];
  int ext_busy_clks = 0;
  always_comb begin
    mem_d_i = '0;
    if (!mem_cs_n[1] && !mem_oe_n)
      mem_d_i[15:0] = {ext_mem[(int'(mem_a) & 510) + 1], ext_mem[int'(mem_a) & 510]};
  end
  // writes take effect when write enable rises (values sampled a clock before)
  logic we_d = 1, cs1_d = 1;
  logic [23:0] a_d;
  logic [15:0] d_d;
  logic [1:0] be_d;
  always @(posedge clk) begin
    if (mem_we_n && !we_d && !cs1_d) begin
      if (!be_d[0]) ext_mem[int'(a_d) & 510]       = d_d[7:0];
      if (!be_d[1]) ext_mem[(int'(a_d) & 510) + 1] = d_d[15:8];
    end
    we_d <= mem_we_n; cs1_d <= mem_cs_n[1]; a_d <= mem_a; d_d <= mem_d_o[15:0]; be_d <= mem_be_n[1:0];
  end
  `include "tb/tb_common.svh"
  `include "tb/apb_tasks.svh"
  always #5 clk = ~clk;
  assign uart_rx = uart_tx;
  always @(negedge clk) rtc_osc_tick <= ~rtc_osc_tick;   // 32768 ticks = 65536 clocks

  // mechanism counters
  int n_beam = 0, n_cancel = 0, n_onoff = 0, n_slew = 0, n_acc = 0, n_meas = 0;
  int n_halt = 0, n_sleep = 0, n_uart2 = 0, n_ebi = 0, n_spi = 0, n_timer = 0, n_wdog = 0, n_rtc = 0, n_uart = 0, n_sram = 0, n_gpio = 0, n_div = 0;

  bit prn1 [1023];
  function automatic logic [9:0] g2_state(input int d);
    logic [9:0] g2 = '1;
    for (int i = 0; i < 1023 - d; i++)
      g2 = {g2[8:0], g2[1] ^ g2[2] ^ g2[5] ^ g2[7] ^ g2[8] ^ g2[9]};
    return g2;
  endfunction
  function automatic logic [15:0] ch(input int t, input int r);
    return 16'(12'h800 + t * 12'h80 + r * 4);
  endfunction

  // GPS sample timeline, reconstructed from the reference clock: with a
  // division of 2 a sample is taken in every cycle where gps_ref_clk is high.
  int s = 0;
  logic run = 0;
  always @(posedge clk) if (run && gps_ref_clk) s <= s + 1;
  always @(negedge clk) begin
    int idx;
    idx = (s + ((run && gps_ref_clk) ? 1 : 0)) / 4 % 1023;
    for (int f = 0; f < N_FE; f++) if_sgn[f] <= prn1[idx] ^ (f >= 4);
  end

  // reference clock period
  int ref_rise_last = -1, ref_period_bad = 0, cyc = 0;
  logic ref_d = 0;
  always @(posedge clk) begin
    cyc++;
    ref_d <= gps_ref_clk;
    if (rst_n && gps_ref_clk && !ref_d) begin
      if (ref_rise_last >= 0 && cyc - ref_rise_last != 2) ref_period_bad++;
      ref_rise_last = cyc;
    end
  end

  task automatic ahb(input bit wr, input int sz, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] rd);
    @(negedge clk);
    ahb_hsel = 1; ahb_htrans = 2'b10; ahb_hwrite = wr; ahb_hsize = 3'(sz); ahb_haddr = a;
    @(negedge clk);
    ahb_hsel = 0; ahb_htrans = 2'b00; ahb_hwdata = d;
    #1;
    while (!ahb_hready) begin
      ext_busy_clks++;
      @(negedge clk);
      #1;
    end
    rd = ahb_hrdata;
  endtask

  int acc_times [$];
  initial begin
    logic [31:0] rd;
    logic [9:0] g1 = '1, g2 = '1;
    for (int i = 0; i < 1023; i++) begin
      prn1[i] = g1[9] ^ g2[1] ^ g2[5];
      g1 = {g1[8:0], g1[2] ^ g1[9]};
      g2 = {g2[8:0], g2[1] ^ g2[2] ^ g2[5] ^ g2[7] ^ g2[8] ^ g2[9]};
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (sys_rst_n);

    // ---- SRAM over AHB ----
    ahb(1, 2, 32'h4000_FFFC, 32'hDEAD_BEEF, rd);
    ahb(1, 0, 32'h4000_FFFD, 32'h0000_5500, rd);
    ahb(1, 1, 32'h4000_0002, 32'h1234_0000, rd);
    ahb(0, 2, 32'h4000_FFFC, 0, rd);
    check("sram byte write merged", rd, 32'hDEAD_55EF);
    ahb(0, 2, 32'h4000_0000, 0, rd);
    check("sram halfword", rd[31:16], 16'h1234);
    if (rd[31:16] == 16'h1234) n_sram++;
    check("sram no wait states", ext_busy_clks, 0);

    // ---- external memory: bank 1 set to 16 bits, 2 wait states ----
    apb_write(16'h6004, 32'h21);
    apb_read(16'h6004, rd);
    check("ebi bank config", rd, 32'h21);
    ahb(1, 2, 32'h0100_0010, 32'hCAFE_F00D, rd);
    ahb(1, 0, 32'h0100_0013, 32'h7700_0000, rd);
    ahb(0, 2, 32'h0100_0010, 0, rd);
    check("ebi word with byte merged", rd, 32'h77FE_F00D);
    check("ebi device bytes", {ext_mem[19], ext_mem[18], ext_mem[17], ext_mem[16]}, 32'h77FE_F00D);
    ahb(0, 2, 32'h4000_FFFC, 0, rd);
    check("sram after ebi", rd, 32'hDEAD_55EF);
    // word write 2 beats + byte write 1 beat + word read 2 beats, each beat
    // 3 strobe clocks and 1 recovery clock with hready low
    check("ebi wait clocks", ext_busy_clks, 5 * 4);
    if (rd == 32'hDEAD_55EF && ext_mem[19] == 8'h77) n_ebi++;

    // ---- GPIO ----
    apb_write(16'h4004, 32'hC3);
    apb_write(16'h4008, 32'hF0);
    apb_read(16'h4000, rd);
    check("gpio in", rd, 32'h5A);
    check("gpio out", gpio_o, 8'hC3);
    if (rd == 32'h5A && gpio_oe == 8'hF0) n_gpio++;

    // ---- UART: three bytes looped back ----
    apb_write(16'h500C, 32'd7);
    apb_write(16'h5000, 32'h47); apb_write(16'h5000, 32'h50); apb_write(16'h5000, 32'h53);

    // ---- UART2 and SPI take over GPIO pads 0..6 ----
    apb_write(16'h400C, 32'h7F);
    pad_loop = 1;
    check("pad directions, SPI off", gpio_oe[6:0], 7'b0010001);

    // ---- UART2 (tx looped to rx): its 4-byte receive FIFO overruns on 5 ----
    apb_write(16'h800C, 32'd3);
    for (int k = 0; k < 5; k++) apb_write(16'h8000, 32'(8'h61 + k));
    repeat (5 * 10 * 4 + 100) @(negedge clk);
    apb_read(16'h8004, rd);
    check("uart2 overrun", rd[3], 1);
    for (int k = 0; k < 4; k++) begin
      apb_read(16'h8000, rd);
      check("uart2 byte", rd[7:0], 8'h61 + k);
      if (rd[7:0] == 8'h61 + k) n_uart2++;
    end

    // ---- SPI master, mosi looped to miso, slave select 0 ----
    apb_write(16'h700C, 32'd1);
    apb_write(16'h7000, 32'h96);
    apb_write(16'h7008, 32'hB);
    check("pad directions, SPI master", gpio_oe[6:0], 7'b1101101);
    do apb_read(16'h7004, rd); while (!rd[2]);
    apb_read(16'h7000, rd);
    check("spi loopback", rd[7:0], 8'h96);
    check("spi cs released", gpio_o[6:5], 2'b11);
    check("spi cs0 was low", cs0_low > 0, 1);
    if (rd[7:0] == 8'h96) n_spi++;
    apb_write(16'h7008, 32'h0);

    // ---- correlation unit ----
    for (int t = 0; t < 16; t++) begin
      apb_write(ch(t, 2), 32'h8000_0000);
      apb_write(ch(t, 3), 32'(g2_state(t < 4 ? 5 : 100 + t)));
      apb_write(ch(t, 5), 32'h1FF);
      apb_write(ch(t, 6), 32'd3);
      apb_write(ch(t, 0), 32'h1);
    end
    apb_write(ch(1, 7), 32'h8888_0000);   // FE4..7 phase 8
    apb_write(ch(1, 8), 32'h8);           // FE8 phase 8
    apb_write(ch(2, 7), 32'h8888_0000);
    apb_write(ch(2, 8), 32'h8);
    apb_write(ch(2, 4), 32'd1);           // slew TM2 by one chip
    apb_write(ch(3, 5), 32'h00F);         // FE0..3 only
    apb_write(ch(3, 6), 32'd1);
    apb_write(16'h0010, 32'h1);           // FE0 power mode bit
    check("fe power", {fe_p1[0], fe_p0[0]}, 2'b01);
    apb_write(16'h0004, 32'd3999);        // ACC_INT every 4000 samples
    apb_write(16'h0008, 32'd1);           // MEAS every 2nd
    // interrupt controller: unmask timer0 (8), ACC (10), MEAS (11), RTC (12)
    apb_write(16'h2010, 32'h1D00);
    apb_write(16'h2000, 32'h0400);        // ACC at high level
    // timers: prescaler 9, timer0 periodic 99 -> irq every 1000 clocks
    apb_write(16'h1000, 32'd9);
    apb_write(16'h1014, 32'd99);
    apb_write(16'h1018, 32'b0_1111);
    apb_write(16'h1030, 32'd300);         // watchdog 300 ticks = 3000 clocks
    apb_write(16'h1038, 32'd1);
    // RTC: alarm at 1 s
    apb_write(16'h3004, 32'd1);
    apb_write(16'h3008, 32'h3);
    // start correlation: run, division 2 (field 1), ACC/MEAS irq enable
    @(negedge clk);
    apb_req.paddr = 16'h0000; apb_req.pwdata = 32'h0000_0311; apb_req.pwrite = 1;
    apb_req.psel = 1; apb_req.penable = 0;
    @(negedge clk); apb_req.penable = 1;
    @(posedge clk); run <= 1;
    @(negedge clk); apb_req.psel = 0; apb_req.penable = 0; apb_req.pwrite = 0;

    // serve ACC interrupts through the interrupt controller
    while (acc_times.size() < 4) begin
      @(negedge clk);
      if (irl == 4'd10) begin
        acc_times.push_back(cyc);
        irq_ack = 1; irq_ack_irl = 4'd10;
        @(negedge clk); irq_ack = 0;
        apb_write(16'h000C, 32'h0001_0000);   // clear ACC pending
      end
    end
    for (int k = 1; k < acc_times.size(); k++) begin
      check("ACC_INT spacing", acc_times[k] - acc_times[k-1], 8000);
      if (acc_times[k] - acc_times[k-1] == 8000) n_acc++;
    end
    check("gps reference clock period", ref_period_bad, 0);
    if (ref_period_bad == 0 && ref_rise_last > 0) n_div++;

    // correlation results of the last epoch
    apb_read(16'h000C, rd);
    check("all 16 TMs have new data", rd[15:0], 16'hFFFF);
    if (rd[17]) n_meas++;
    apb_read(ch(0, 9), rd); check("TM0 cancelled beam", $signed(rd), -1535);
    if ($signed(rd) == -1535) n_cancel++;
    apb_read(ch(1, 9), rd); check("TM1 steered beam", $signed(rd), 13810);
    if ($signed(rd) == 13810) n_beam++;
    apb_read(ch(2, 9), rd); check("TM2 slewed: small", $signed(rd) > -1000 && $signed(rd) < 1000, 1);
    if ($signed(rd) > -1000 && $signed(rd) < 1000) n_slew++;
    apb_read(ch(3, 9), rd); check("TM3 four front-ends", $signed(rd), 24552);
    if ($signed(rd) == 24552) n_onoff++;
    apb_read(ch(1, 17), rd);
    check("MEAS latched epochs", rd[4:0] >= 3, 1);

    // UART bytes
    for (int k = 0; k < 3; k++) begin
      logic [7:0] e [3] = '{8'h47, 8'h50, 8'h53};
      apb_read(16'h5000, rd);
      check("uart byte", rd[7:0], e[k]);
      if (rd[7:0] == e[k]) n_uart++;
    end
    // timer and watchdog
    apb_read(16'h2004, rd);
    if (rd[8]) n_timer++;
    if (wdog) n_wdog++;
    // RTC wake-up after one second of oscillator ticks
    wait (rtc_wakeup || cyc > 70000);
    if (rtc_wakeup) n_rtc++;
    apb_read(16'h2004, rd);
    check("RTC irq pending", rd[12], 1);

    // ---- power modes: CPU clock stop until an interrupt, then SLEEP ----
    apb_write(16'h200C, 32'hFFFF);       // clear all pending
    apb_write(16'h2010, 32'h20);         // only external interrupt 5 enabled
    apb_write(16'h9000, 32'h1);
    repeat (20) @(negedge clk);
    check("cpu clock stopped", cpu_clk_en, 0);
    ext_irq[1] = 1;
    repeat (3) @(negedge clk);
    ext_irq[1] = 0;
    check("cpu clock restarted by interrupt", cpu_clk_en, 1);
    if (cpu_clk_en) n_halt++;
    apb_write(16'h3008, 32'h5);          // RTC: clear the wake flag, wake-up off
    check("RTC wake-up cleared", rtc_wakeup, 0);
    apb_write(16'h9000, 32'h2);
    check("sleep: core power off", core_pwr_on, 0);
    check("sleep: system reset", sys_rst_n, 0);
    repeat (5) @(negedge clk);
    ext_wakeup = 1;
    @(negedge clk);
    ext_wakeup = 0;
    wait (sys_rst_n);
    @(negedge clk);
    check("woken: core power on", core_pwr_on, 1);
    apb_read(16'h9004, rd);
    check("wake cause external", rd, 2);
    apb_read(16'h4004, rd);
    check("gpio reset by the reboot", rd, 0);
    apb_read(16'h3000, rd);
    check("RTC kept its time", rd != 0, 1);
    if (core_pwr_on && rd != 0) n_sleep++;

    check("mechanism: beam steering", n_beam > 0, 1);
    check("mechanism: beam cancellation", n_cancel > 0, 1);
    check("mechanism: front-end on/off", n_onoff > 0, 1);
    check("mechanism: code slew", n_slew > 0, 1);
    check("mechanism: ACC_INT", n_acc > 0, 1);
    check("mechanism: MEAS_INT", n_meas > 0, 1);
    check("mechanism: pulse deletion", n_div > 0, 1);
    check("mechanism: timer", n_timer > 0, 1);
    check("mechanism: watchdog", n_wdog > 0, 1);
    check("mechanism: RTC wake-up", n_rtc > 0, 1);
    check("mechanism: UART", n_uart > 0, 1);
    check("mechanism: SRAM", n_sram > 0, 1);
    check("mechanism: GPIO", n_gpio > 0, 1);
    check("mechanism: external memory", n_ebi > 0, 1);
    check("mechanism: SPI", n_spi > 0, 1);
    check("mechanism: UART2", n_uart2 > 0, 1);
    check("mechanism: CPU clock on demand", n_halt > 0, 1);
    check("mechanism: SLEEP and wake-up", n_sleep > 0, 1);
    $display("mechanisms: ebi=%0d spi=%0d uart2=%0d halt=%0d sleep=%0d", n_ebi, n_spi, n_uart2, n_halt, n_sleep);
    $display("mechanisms: beam=%0d cancel=%0d onoff=%0d slew=%0d acc=%0d meas=%0d div=%0d timer=%0d wdog=%0d rtc=%0d uart=%0d sram=%0d gpio=%0d",
             n_beam, n_cancel, n_onoff, n_slew, n_acc, n_meas, n_div, n_timer, n_wdog, n_rtc, n_uart, n_sram, n_gpio);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
