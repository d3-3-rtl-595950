// power_ctrl: power-mode controller for the CPU clock and SLEEP mode.
// Clock on demand for the CPU: writing HALT drops cpu_clk_en, gating the
// CPU clock outside this block; the next pending interrupt (irl != 0)
// raises it again so the interrupt is serviced. SLEEP: writing SLEEP drops
// core_pwr_on, which switches off the core supply; this block and the RTC
// stay powered. An RTC wake-up or the external wake-up input switches the
// supply back on, holds sys_rst_n low for RST_CLKS clocks to reboot the
// system and records the cause in WAKE (write 1 to clear).
// APB registers (word index paddr[3:2]):
//   0 CTRL [0] HALT (write 1; reads 1 while halted) [1] SLEEP (write 1)
//   1 WAKE [0] woken by RTC [1] woken by external input
// Modes and wake-up sources follow the document; the register layout, the
// reset length and resuming on any interrupt level are this design's.
module power_ctrl
  import gnss_pkg::*;
#(
  parameter int unsigned RST_CLKS = 16
) (
  input  logic       clk,
  input  logic       rst_n,       // power-on reset of the always-on logic
  input  apb_req_t   apb_req,
  output apb_rsp_t   apb_rsp,
  input  logic [3:0] irl,         // interrupt level to the CPU
  input  logic       rtc_wakeup,
  input  logic       ext_wakeup,
  output logic       cpu_clk_en,
  output logic       core_pwr_on,
  output logic       sys_rst_n
);
  localparam int unsigned RW = $clog2(RST_CLKS + 1);
  logic          wr;
  logic          halt_q, sleep_q;
  logic [1:0]    wake_q;
  logic [RW-1:0] rst_cnt_q;

  assign wr = apb_wr(apb_req);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      halt_q    <= 1'b0;
      sleep_q   <= 1'b0;
      wake_q    <= '0;
      rst_cnt_q <= RW'(RST_CLKS);
    end else begin
      if (rst_cnt_q != '0) rst_cnt_q <= rst_cnt_q - 1'b1;
      if (sleep_q) begin
        if (rtc_wakeup || ext_wakeup) begin
          sleep_q   <= 1'b0;
          wake_q    <= wake_q | {ext_wakeup, rtc_wakeup};
          rst_cnt_q <= RW'(RST_CLKS);
        end
      end else begin
        if (wr && apb_req.paddr[3:2] == 2'd0) begin
          if (apb_req.pwdata[0]) halt_q  <= 1'b1;
          if (apb_req.pwdata[1]) sleep_q <= 1'b1;
        end else if (irl != '0) begin
          halt_q <= 1'b0;
        end
        if (wr && apb_req.paddr[3:2] == 2'd1) wake_q <= wake_q & ~apb_req.pwdata[1:0];
      end
      if (rst_cnt_q == RW'(1)) halt_q <= 1'b0;   // reboot starts running
    end
  end

  assign cpu_clk_en  = !halt_q && !sleep_q;
  assign core_pwr_on = !sleep_q;
  assign sys_rst_n   = !sleep_q && (rst_cnt_q == '0);

  assign apb_rsp.prdata  = (apb_req.paddr[3:2] == 2'd0) ? 32'({sleep_q, halt_q}) :
                           (apb_req.paddr[3:2] == 2'd1) ? 32'(wake_q) : '0;
  assign apb_rsp.pready  = 1'b1;
  assign apb_rsp.pslverr = 1'b0;
endmodule
