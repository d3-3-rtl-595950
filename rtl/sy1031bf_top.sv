// sy1031bf_top: SY1031BF GPS baseband with 16 beamforming tracking channels.
// Puts together everything of the baseband except the SPARC CPU, whose
// buses are ports of this module:
//  * sp1016bf: the correlation unit with N_TM tracking modules, each forming
//    its own beam from the N_FE antenna front-ends, clocked by the GPS clock
//    enable from gps_clkgen (pulse deletion of SYS_CLK by 1..8, the factor
//    being set in the correlation unit's GCTRL register);
//  * apb_timers (two timers and watchdog), irq_ctrl, apb_rtc, apb_gpio,
//    apb_uart (UART1, 16-byte FIFOs; UART2, 4-byte FIFOs) and apb_spi on the
//    APB port;
//  * power_ctrl (CPU clock on demand, SLEEP with RTC or external wake-up),
//    which with the RTC runs from the power-on reset rst_n, while all other
//    blocks are reset by its sys_rst_n (also an output, for the CPU);
//  * ahb_sram, the 64 kB on-chip SRAM, and ahb_ebi, the external memory
//    interface, on the AHB-lite port.
// APB slaves are selected by paddr[15:12]: 0 correlation unit, 1 timers,
// 2 interrupt controller, 3 RTC, 4 GPIO, 5 UART1, 6 EBI bank settings,
// 7 SPI, 8 UART2, 9 power control; other pages read 0.
// UART2 and SPI share the eight GPIO pads; a set bit in the GPIO ALTERNATE
// register gives the pad to them: 0 UART2 TX, 1 UART2 RX, 2 SPI SCLK,
// 3 MOSI, 4 MISO, 5 CS0 (slave select input in slave mode), 6 CS1.
// SCLK, MOSI and CS0 are outputs in master mode and inputs in slave mode,
// MISO the other way round.
// AHB map: 0x0000_0000-0x03FF_FFFF external memory (four 16 MB banks),
// 0x4000_0000 on-chip SRAM (mirrored up to 0x7FFF_FFFF); other addresses
// complete at once, reading 0.
// Interrupt lines: 2 UART1, 3 SPI, 6 UART2, 4/5 external, 8/9 timers, 10 ACC_INT,
// 11 MEAS_INT, 12 RTC wake-up. The block set follows the document; the
// address map and interrupt numbers are this design's.
module sy1031bf_top
  import gnss_pkg::*;
#(
  parameter int unsigned N_TM       = N_TM_DEF,
  parameter int unsigned N_FE       = N_FE_DEF,
  parameter int unsigned SRAM_BYTES = 65536,
  parameter int unsigned UART_DEPTH = 16,
  parameter int unsigned UART2_DEPTH = 4,
  parameter int unsigned RTC_OSC_HZ = 32768
) (
  input  logic            clk,
  input  logic            rst_n,
  // APB port of the CPU's AHB/APB bridge
  input  apb_req_t        apb_req,
  output apb_rsp_t        apb_rsp,
  // AHB-lite port for the on-chip SRAM and the external memory
  input  logic            ahb_hsel,
  input  logic [31:0]     ahb_haddr,
  input  logic [1:0]      ahb_htrans,
  input  logic            ahb_hwrite,
  input  logic [2:0]      ahb_hsize,
  input  logic [31:0]     ahb_hwdata,
  output logic [31:0]     ahb_hrdata,
  output logic            ahb_hready,
  output logic            ahb_hresp,
  // GPS IF interface
  input  logic [N_FE-1:0] if_sgn,
  input  logic [N_FE-1:0] if_mag,
  input  logic            antenna_ok,
  output logic [N_FE-1:0] fe_p0,
  output logic [N_FE-1:0] fe_p1,
  output logic            gps_ref_clk,
  // CPU interrupt interface
  input  logic [1:0]      ext_irq,
  input  logic            irq_ack,
  input  logic [3:0]      irq_ack_irl,
  output logic [3:0]      irl,
  // other peripherals
  output logic            wdog,
  // GPIO pads, shared with UART2 and SPI (see the pin table above)
  input  logic [7:0]      gpio_i,
  output logic [7:0]      gpio_o,
  output logic [7:0]      gpio_oe,
  input  logic            uart_rx,
  output logic            uart_tx,
  input  logic            rtc_osc_tick,
  output logic            rtc_wakeup,
  // power modes
  input  logic            ext_wakeup,
  output logic            cpu_clk_en,
  output logic            core_pwr_on,
  output logic            sys_rst_n,
  // external memory bus
  output logic [23:0]     mem_a,
  output logic [31:0]     mem_d_o,
  input  logic [31:0]     mem_d_i,
  output logic            mem_d_oe,
  output logic [3:0]      mem_cs_n,
  output logic            mem_oe_n,
  output logic            mem_we_n,
  output logic [3:0]      mem_be_n
);
  localparam int unsigned NS = 10;

  apb_req_t   req [NS];
  apb_rsp_t   rsp [NS];
  logic [3:0] page;

  // power control and the RTC stay powered in SLEEP and use the power-on
  // reset; everything else is reset by sys_rst_n
  logic srst_n;

  power_ctrl u_pwr (
    .clk, .rst_n, .apb_req(req[9]), .apb_rsp(rsp[9]), .irl, .rtc_wakeup, .ext_wakeup,
    .cpu_clk_en, .core_pwr_on, .sys_rst_n);
  assign srst_n = sys_rst_n;

  assign page = apb_req.paddr[15:12];

  // APB decoder: one psel per page.
  always_comb begin
    for (int s = 0; s < NS; s++) begin
      req[s]      = apb_req;
      req[s].psel = apb_req.psel && (page == 4'(s));
    end
  end

  always_comb begin
    apb_rsp = '{prdata: '0, pready: 1'b1, pslverr: 1'b0};
    for (int s = 0; s < NS; s++)
      if (page == 4'(s)) apb_rsp = rsp[s];
  end

  logic       gps_ce, acc_int, meas_int, uart_irq, uart2_irq, spi_irq;
  logic [2:0] gps_div;
  logic [1:0] tmr_irq;
  logic [15:0] irq_lines;

  gps_clkgen u_clkgen (.clk, .rst_n(srst_n), .div(gps_div), .gps_ce, .gps_ref_clk);

  sp1016bf #(.N_TM(N_TM), .N_FE(N_FE)) u_corr (
    .clk, .rst_n(srst_n), .apb_req(req[0]), .apb_rsp(rsp[0]), .gps_ce,
    .if_sgn, .if_mag, .antenna_ok, .gps_div, .fe_p0, .fe_p1,
    .acc_int, .meas_int, .meas_strobe());

  apb_timers u_tmr (.clk, .rst_n(srst_n), .apb_req(req[1]), .apb_rsp(rsp[1]), .irq(tmr_irq), .wdog);

  always_comb begin
    irq_lines     = '0;
    irq_lines[2]  = uart_irq;
    irq_lines[3]  = spi_irq;
    irq_lines[6]  = uart2_irq;
    irq_lines[4]  = ext_irq[0];
    irq_lines[5]  = ext_irq[1];
    irq_lines[8]  = tmr_irq[0];
    irq_lines[9]  = tmr_irq[1];
    irq_lines[10] = acc_int;
    irq_lines[11] = meas_int;
    irq_lines[12] = rtc_wakeup;
  end

  irq_ctrl #(.N_IRQ(15)) u_irq (
    .clk, .rst_n(srst_n), .apb_req(req[2]), .apb_rsp(rsp[2]), .irq_in(irq_lines),
    .ack(irq_ack), .ack_irl(irq_ack_irl), .irl);

  apb_rtc #(.OSC_HZ(RTC_OSC_HZ)) u_rtc (
    .clk, .rst_n, .apb_req(req[3]), .apb_rsp(rsp[3]), .osc_tick(rtc_osc_tick), .wakeup(rtc_wakeup));

  logic [7:0] core_o, core_oe, alt, alt_o, alt_oe;
  logic       uart2_rx, uart2_tx, spi_master;
  logic       spi_sclk_o, spi_mosi_o, spi_miso_o;
  logic [1:0] spi_cs_n_o;

  apb_gpio #(.W(8)) u_gpio (.clk, .rst_n(srst_n), .apb_req(req[4]), .apb_rsp(rsp[4]), .gpio_i,
                            .gpio_o(core_o), .gpio_oe(core_oe), .alt);

  // pad multiplexer
  always_comb begin
    alt_o  = {1'b0, spi_cs_n_o[1], spi_cs_n_o[0], spi_miso_o, spi_mosi_o, spi_sclk_o, 1'b1, uart2_tx};
    alt_oe = {1'b0, spi_master, spi_master, !spi_master, spi_master, spi_master, 1'b0, 1'b1};
    for (int b = 0; b < 8; b++) begin
      gpio_o[b]  = alt[b] ? alt_o[b]  : core_o[b];
      gpio_oe[b] = alt[b] ? alt_oe[b] : core_oe[b];
    end
  end
  assign uart2_rx = alt[1] ? gpio_i[1] : 1'b1;

  apb_uart #(.DEPTH(UART_DEPTH)) u_uart (
    .clk, .rst_n(srst_n), .apb_req(req[5]), .apb_rsp(rsp[5]), .rx(uart_rx), .tx(uart_tx), .irq(uart_irq));

  apb_uart #(.DEPTH(UART2_DEPTH)) u_uart2 (
    .clk, .rst_n(srst_n), .apb_req(req[8]), .apb_rsp(rsp[8]), .rx(uart2_rx), .tx(uart2_tx), .irq(uart2_irq));

  apb_spi #(.DEPTH(16)) u_spi (
    .clk, .rst_n(srst_n), .apb_req(req[7]), .apb_rsp(rsp[7]),
    .sclk_o(spi_sclk_o), .mosi_o(spi_mosi_o), .miso_i(alt[4] && gpio_i[4]), .cs_n_o(spi_cs_n_o),
    .sclk_i(alt[2] && gpio_i[2]), .mosi_i(alt[3] && gpio_i[3]), .cs_n_i(!alt[5] || gpio_i[5]),
    .miso_o(spi_miso_o), .is_master(spi_master), .irq(spi_irq));

  // AHB decoder: address-phase selects, data-phase response mux
  logic        sel_sram, sel_ebi, dsel_sram_q, dsel_ebi_q;
  logic [31:0] sram_hrdata, ebi_hrdata;
  logic        sram_hready, ebi_hready, sram_hresp, ebi_hresp;

  assign sel_sram = ahb_hsel && (ahb_haddr[31:30] == 2'b01);
  assign sel_ebi  = ahb_hsel && (ahb_haddr[31:26] == 6'd0);

  always_ff @(posedge clk or negedge srst_n) begin
    if (!srst_n) begin
      dsel_sram_q <= 1'b0;
      dsel_ebi_q  <= 1'b0;
    end else if (ahb_hready) begin
      dsel_sram_q <= sel_sram && ahb_htrans[1];
      dsel_ebi_q  <= sel_ebi && ahb_htrans[1];
    end
  end

  always_comb begin
    if (dsel_sram_q) begin
      ahb_hrdata = sram_hrdata;
      ahb_hready = sram_hready;
      ahb_hresp  = sram_hresp;
    end else if (dsel_ebi_q) begin
      ahb_hrdata = ebi_hrdata;
      ahb_hready = ebi_hready;
      ahb_hresp  = ebi_hresp;
    end else begin
      ahb_hrdata = '0;
      ahb_hready = 1'b1;
      ahb_hresp  = 1'b0;
    end
  end

  ahb_sram #(.BYTES(SRAM_BYTES)) u_sram (
    .clk, .rst_n(srst_n), .hready_in(ahb_hready), .hsel(sel_sram), .haddr(ahb_haddr), .htrans(ahb_htrans),
    .hwrite(ahb_hwrite), .hsize(ahb_hsize), .hwdata(ahb_hwdata), .hrdata(sram_hrdata),
    .hready(sram_hready), .hresp(sram_hresp));

  ahb_ebi u_ebi (
    .clk, .rst_n(srst_n), .hready_in(ahb_hready), .hsel(sel_ebi), .haddr(ahb_haddr), .htrans(ahb_htrans),
    .hwrite(ahb_hwrite), .hsize(ahb_hsize), .hwdata(ahb_hwdata), .hrdata(ebi_hrdata),
    .hready(ebi_hready), .hresp(ebi_hresp), .apb_req(req[6]), .apb_rsp(rsp[6]),
    .mem_a, .mem_d_o, .mem_d_i, .mem_d_oe, .mem_cs_n, .mem_oe_n, .mem_we_n, .mem_be_n);
endmodule
