// irq_ctrl: interrupt controller for 15 sources with two priority levels.
// A rising edge on irq_in[n] (n = 1..15; bit 0 unused) or a software force
// sets pending[n]. Among pending and unmasked sources, those programmed to
// level 1 win over level 0, and within a level the higher number wins; irl
// carries that number to the CPU (0 = none). The CPU acknowledges with
// ack/ack_irl, which clears the pending bit. APB registers (word index
// paddr[4:2]): 0 LEVEL, 1 PENDING (read), 2 FORCE (write sets pending),
// 3 CLEAR (write 1 clears), 4 MASK (1 = enabled). Source count and two
// levels follow the document; edge detection and layout are this design's.
module irq_ctrl
  import gnss_pkg::*;
#(
  parameter int unsigned N_IRQ = 15
) (
  input  logic           clk,
  input  logic           rst_n,
  input  apb_req_t       apb_req,
  output apb_rsp_t       apb_rsp,
  input  logic [N_IRQ:0] irq_in,
  input  logic           ack,
  input  logic [3:0]     ack_irl,
  output logic [3:0]     irl
);
  logic [N_IRQ:0] pend_nx, pend_q, mask_q, level_q, prev_q, act;
  logic           wr;
  logic [2:0]     widx;

  assign wr   = apb_wr(apb_req);
  assign widx = apb_req.paddr[4:2];
  assign act  = pend_q & mask_q;

  always_comb begin
    pend_nx = pend_q | (irq_in & ~prev_q);
    if (ack) pend_nx[ack_irl] = 1'b0;
    if (wr && widx == 3'd2) pend_nx = pend_nx | apb_req.pwdata[N_IRQ:0];
    if (wr && widx == 3'd3) pend_nx = pend_nx & ~apb_req.pwdata[N_IRQ:0];
    pend_nx[0] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q  <= '0;
      mask_q  <= '0;
      level_q <= '0;
      prev_q  <= '0;
    end else begin
      prev_q <= irq_in;
      pend_q <= pend_nx;
      if (wr && widx == 3'd0) level_q <= apb_req.pwdata[N_IRQ:0];
      if (wr && widx == 3'd4) mask_q  <= apb_req.pwdata[N_IRQ:0];
    end
  end

  always_comb begin
    irl = '0;
    for (int n = 1; n <= N_IRQ; n++)
      if (act[n] && !level_q[n]) irl = 4'(n);
    for (int n = 1; n <= N_IRQ; n++)
      if (act[n] && level_q[n]) irl = 4'(n);
  end

  always_comb begin
    unique case (widx)
      3'd0:    apb_rsp.prdata = 32'(level_q);
      3'd1:    apb_rsp.prdata = 32'(pend_q);
      3'd4:    apb_rsp.prdata = 32'(mask_q);
      default: apb_rsp.prdata = '0;
    endcase
  end
  assign apb_rsp.pready  = 1'b1;
  assign apb_rsp.pslverr = 1'b0;
endmodule
