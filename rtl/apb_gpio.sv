// apb_gpio: 8-bit general-purpose parallel I/O.
// Each pin has an output value and a direction bit (1 = drive); the pin
// inputs pass a two-flop synchroniser before they can be read. APB
// registers (word index paddr[3:2]): 0 DATA_IN (read), 1 DATA_OUT,
// 2 DIRECTION, 3 ALTERNATE. A set ALTERNATE bit hands that pin to another
// peripheral; the pin multiplexer itself sits in the top level, this block
// only holds the selection on alt. The 8-bit width and the sharing of
// lines with other peripherals follow the document; the register layout is
// this design's.
module apb_gpio
  import gnss_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  apb_req_t     apb_req,
  output apb_rsp_t     apb_rsp,
  input  logic [W-1:0] gpio_i,
  output logic [W-1:0] gpio_o,
  output logic [W-1:0] gpio_oe,
  output logic [W-1:0] alt
);
  logic [W-1:0] sync1_q, sync2_q;
  logic         wr;
  logic [1:0]   widx;

  assign wr   = apb_wr(apb_req);
  assign widx = apb_req.paddr[3:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1_q <= '0;
      sync2_q <= '0;
      gpio_o  <= '0;
      gpio_oe <= '0;
      alt     <= '0;
    end else begin
      sync1_q <= gpio_i;
      sync2_q <= sync1_q;
      if (wr && widx == 2'd1) gpio_o  <= apb_req.pwdata[W-1:0];
      if (wr && widx == 2'd2) gpio_oe <= apb_req.pwdata[W-1:0];
      if (wr && widx == 2'd3) alt     <= apb_req.pwdata[W-1:0];
    end
  end

  always_comb begin
    unique case (widx)
      2'd0:    apb_rsp.prdata = 32'(sync2_q);
      2'd1:    apb_rsp.prdata = 32'(gpio_o);
      2'd2:    apb_rsp.prdata = 32'(gpio_oe);
      default: apb_rsp.prdata = 32'(alt);
    endcase
  end
  assign apb_rsp.pready  = 1'b1;
  assign apb_rsp.pslverr = 1'b0;
endmodule
