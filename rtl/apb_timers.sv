// apb_timers: two 24-bit timers and the watchdog on a common 10-bit prescaler.
// The prescaler counts SYS_CLK down from its reload value and gives one
// tick per (PRESCALER_RELOAD+1) clocks. Each timer decrements on a tick
// while enabled; on reaching zero it raises its interrupt and either
// reloads (periodic mode) or stops (one-shot). The watchdog counts the same
// ticks. APB registers (word index paddr[5:2]):
//   0 PRESCALER_RELOAD  1 PRESCALER_VALUE (read)
//   4/8  TIMERn_COUNTER   5/9  TIMERn_RELOAD
//   6/10 TIMERn_CTRL [0] enable [1] periodic [2] load (write 1) [3] irq enable
//                    [4] irq pending (write 1 to clear)
//   12 WDOG_COUNTER (read; write loads)  14 WDOG_CTRL [0] enable
// Widths (24/10) follow the document; register layout is this design's.
module apb_timers
  import gnss_pkg::*;
#(
  parameter int unsigned TW = 24,
  parameter int unsigned PW = 10
) (
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t apb_req,
  output apb_rsp_t apb_rsp,
  output logic [1:0] irq,
  output logic     wdog
);
  logic [PW-1:0] pre_rld_q, pre_q;
  logic          tick;
  logic [TW-1:0] cnt_q [2];
  logic [TW-1:0] rld_q [2];
  logic [4:0]    ctrl_q [2];
  logic          wd_en_q, wd_load;
  logic [TW-1:0] wd_cnt;
  logic          wr;
  logic [3:0]    widx;

  assign wr   = apb_wr(apb_req);
  assign widx = apb_req.paddr[5:2];
  assign tick = (pre_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_rld_q <= '0;
      pre_q     <= '0;
      wd_en_q   <= 1'b0;
      for (int n = 0; n < 2; n++) begin
        cnt_q[n]  <= '0;
        rld_q[n]  <= '0;
        ctrl_q[n] <= '0;
      end
    end else begin
      pre_q <= tick ? pre_rld_q : pre_q - 1'b1;
      for (int n = 0; n < 2; n++) begin
        if (tick && ctrl_q[n][0]) begin
          if (cnt_q[n] == '0) begin
            if (ctrl_q[n][3]) ctrl_q[n][4] <= 1'b1;
            if (ctrl_q[n][1]) cnt_q[n] <= rld_q[n];
            else              ctrl_q[n][0] <= 1'b0;
          end else begin
            cnt_q[n] <= cnt_q[n] - 1'b1;
          end
        end
        if (wr && widx == 4'(4 + 4*n)) cnt_q[n] <= apb_req.pwdata[TW-1:0];
        if (wr && widx == 4'(5 + 4*n)) rld_q[n] <= apb_req.pwdata[TW-1:0];
        if (wr && widx == 4'(6 + 4*n)) begin
          ctrl_q[n][3:0] <= {apb_req.pwdata[3], 1'b0, apb_req.pwdata[1:0]};
          if (apb_req.pwdata[2]) cnt_q[n] <= rld_q[n];
          if (apb_req.pwdata[4]) ctrl_q[n][4] <= 1'b0;
        end
      end
      if (wr && widx == 4'd0)  pre_rld_q <= apb_req.pwdata[PW-1:0];
      if (wr && widx == 4'd14) wd_en_q   <= apb_req.pwdata[0];
    end
  end

  assign wd_load = wr && (widx == 4'd12);

  watchdog #(.W(TW)) u_wdog (
    .clk, .rst_n, .tick, .enable(wd_en_q), .load(wd_load),
    .load_val(apb_req.pwdata[TW-1:0]), .count(wd_cnt), .wdog);

  assign irq = {ctrl_q[1][4], ctrl_q[0][4]};

  always_comb begin
    unique case (widx)
      4'd0:  apb_rsp.prdata = 32'(pre_rld_q);
      4'd1:  apb_rsp.prdata = 32'(pre_q);
      4'd4:  apb_rsp.prdata = 32'(cnt_q[0]);
      4'd5:  apb_rsp.prdata = 32'(rld_q[0]);
      4'd6:  apb_rsp.prdata = 32'(ctrl_q[0]);
      4'd8:  apb_rsp.prdata = 32'(cnt_q[1]);
      4'd9:  apb_rsp.prdata = 32'(rld_q[1]);
      4'd10: apb_rsp.prdata = 32'(ctrl_q[1]);
      4'd12: apb_rsp.prdata = 32'(wd_cnt);
      4'd14: apb_rsp.prdata = 32'(wd_en_q);
      default: apb_rsp.prdata = '0;
    endcase
  end
  assign apb_rsp.pready  = 1'b1;
  assign apb_rsp.pslverr = 1'b0;
endmodule
