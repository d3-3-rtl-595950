// apb_rtc: pseudo real-time clock with 1 s resolution and wake-up.
// osc_tick pulses once per cycle of the 32 kHz oscillator (synchronised
// into SYS_CLK outside). A prescaler counts OSC_HZ ticks per second and
// advances a 30-bit seconds counter. When the seconds reach the ALARM value
// the wake-up flag is set; with wake-up enabled it drives wakeup, which can
// restart the system from sleep. APB registers (word index paddr[3:2]):
//   0 TIME (write sets, restarts the second)   1 ALARM
//   2 CTRL [0] run [1] wake-up enable [2] wake-up flag (write 1 to clear)
// The 30-bit width and 32 kHz oscillator follow the document; alarm
// compare and layout are this design's.
module apb_rtc
  import gnss_pkg::*;
#(
  parameter int unsigned W      = 30,
  parameter int unsigned OSC_HZ = 32768
) (
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t apb_req,
  output apb_rsp_t apb_rsp,
  input  logic     osc_tick,
  output logic     wakeup
);
  localparam int unsigned PW = $clog2(OSC_HZ);
  logic [PW-1:0] pre_q;
  logic [W-1:0]  sec_q, alarm_q;
  logic [2:0]    ctrl_q;
  logic          wr, sec_tick;
  logic [1:0]    widx;

  assign wr       = apb_wr(apb_req);
  assign widx     = apb_req.paddr[3:2];
  assign sec_tick = ctrl_q[0] && osc_tick && (pre_q == PW'(OSC_HZ - 1));
  assign wakeup   = ctrl_q[1] && ctrl_q[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_q   <= '0;
      sec_q   <= '0;
      alarm_q <= '1;
      ctrl_q  <= '0;
    end else begin
      if (ctrl_q[0] && osc_tick) pre_q <= sec_tick ? '0 : pre_q + 1'b1;
      if (sec_tick) begin
        sec_q <= sec_q + 1'b1;
        if (sec_q + 1'b1 == alarm_q) ctrl_q[2] <= 1'b1;
      end
      if (wr && widx == 2'd0) begin
        sec_q <= apb_req.pwdata[W-1:0];
        pre_q <= '0;
      end
      if (wr && widx == 2'd1) alarm_q <= apb_req.pwdata[W-1:0];
      if (wr && widx == 2'd2) begin
        ctrl_q[1:0] <= apb_req.pwdata[1:0];
        if (apb_req.pwdata[2]) ctrl_q[2] <= 1'b0;
      end
    end
  end

  always_comb begin
    unique case (widx)
      2'd0:    apb_rsp.prdata = 32'(sec_q);
      2'd1:    apb_rsp.prdata = 32'(alarm_q);
      2'd2:    apb_rsp.prdata = 32'(ctrl_q);
      default: apb_rsp.prdata = '0;
    endcase
  end
  assign apb_rsp.pready  = 1'b1;
  assign apb_rsp.pslverr = 1'b0;
endmodule
