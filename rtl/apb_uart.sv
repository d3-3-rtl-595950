// apb_uart: UART with transmit and receive FIFOs.
// Frames are 8N1 (start bit, 8 data bits LSB first, one stop bit). Each
// bit lasts SCALER+1 SYS_CLK cycles. The transmitter takes bytes from the
// transmit FIFO; the receiver synchronises rx, finds the falling edge of
// the start bit, samples every bit in its middle and pushes the byte into
// the receive FIFO if the stop bit is 1 (a full FIFO sets the overrun
// flag). APB registers (word index paddr[3:2]):
//   0 DATA   write pushes into TX FIFO, read pops the RX FIFO
//   1 STATUS [0] RX data [1] TX full [2] TX empty and idle [3] overrun
//            (write 1 clears) [4] frame error (write 1 clears)
//   2 CTRL   [0] RX irq enable [1] TX-empty irq enable
//   3 SCALER clocks per bit minus 1 (16 bits)
// FIFO depth is 16 bytes for UART1 and 4 for UART2 (parameter DEPTH), as
// in the document; frame format and registers are this design's.
module apb_uart
  import gnss_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t apb_req,
  output apb_rsp_t apb_rsp,
  input  logic     rx,
  output logic     tx,
  output logic     irq
);
  localparam int unsigned CW = $clog2(DEPTH) + 1;
  logic        wr, rd;
  logic [1:0]  widx;
  logic [15:0] scaler_q;
  logic [1:0]  ctrl_q;
  logic        ovr_q, ferr_q;

  assign wr   = apb_wr(apb_req);
  assign rd   = apb_req.psel && apb_req.penable && !apb_req.pwrite;
  assign widx = apb_req.paddr[3:2];

  // ---------------- FIFOs ----------------
  logic [7:0] txf_dout, rxf_dout, rx_byte;
  logic       txf_full, txf_empty, rxf_full, rxf_empty, tx_pop, rx_push;
  logic [CW-1:0] txf_cnt, rxf_cnt;

  sync_fifo #(.W(8), .DEPTH(DEPTH)) u_txf (
    .clk, .rst_n, .push(wr && widx == 2'd0), .din(apb_req.pwdata[7:0]), .pop(tx_pop),
    .dout(txf_dout), .full(txf_full), .empty(txf_empty), .count(txf_cnt));
  sync_fifo #(.W(8), .DEPTH(DEPTH)) u_rxf (
    .clk, .rst_n, .push(rx_push), .din(rx_byte), .pop(rd && widx == 2'd0),
    .dout(rxf_dout), .full(rxf_full), .empty(rxf_empty), .count(rxf_cnt));

  // ---------------- transmitter ----------------
  logic [9:0]  tx_sh_q;
  logic [3:0]  tx_bits_q;
  logic [15:0] tx_cnt_q;
  logic        tx_busy;

  assign tx_busy = (tx_bits_q != '0);
  assign tx_pop  = !tx_busy && !txf_empty;
  assign tx      = tx_busy ? tx_sh_q[0] : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sh_q   <= '1;
      tx_bits_q <= '0;
      tx_cnt_q  <= '0;
    end else if (tx_pop) begin
      tx_sh_q   <= {1'b1, txf_dout, 1'b0};
      tx_bits_q <= 4'd10;
      tx_cnt_q  <= scaler_q;
    end else if (tx_busy) begin
      if (tx_cnt_q == '0) begin
        tx_sh_q   <= {1'b1, tx_sh_q[9:1]};
        tx_bits_q <= tx_bits_q - 1'b1;
        tx_cnt_q  <= scaler_q;
      end else begin
        tx_cnt_q <= tx_cnt_q - 1'b1;
      end
    end
  end

  // ---------------- receiver ----------------
  logic [2:0]  rx_sync_q;
  logic        rx_s;
  logic [3:0]  rx_bits_q;
  logic [15:0] rx_cnt_q;
  logic [8:0]  rx_sh_q;
  logic        rx_frame_end;

  assign rx_s         = rx_sync_q[2];
  assign rx_frame_end = (rx_bits_q == 4'd1) && (rx_cnt_q == '0);
  assign rx_byte      = rx_sh_q[8:1];
  assign rx_push      = rx_frame_end && rx_s && !rxf_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync_q <= '1;
      rx_bits_q <= '0;
      rx_cnt_q  <= '0;
      rx_sh_q   <= '0;
    end else begin
      rx_sync_q <= {rx_sync_q[1:0], rx};
      if (rx_bits_q == '0) begin
        if (!rx_s) begin                      // start bit edge
          rx_bits_q <= 4'd10;
          rx_cnt_q  <= {1'b0, scaler_q[15:1]}; // to the middle of the bit
        end
      end else if (rx_cnt_q == '0) begin
        rx_bits_q <= rx_bits_q - 1'b1;
        rx_cnt_q  <= scaler_q;
        if (rx_bits_q != 4'd1) rx_sh_q <= {rx_s, rx_sh_q[8:1]};
        if (rx_bits_q == 4'd10 && rx_s) rx_bits_q <= '0;  // false start
      end else begin
        rx_cnt_q <= rx_cnt_q - 1'b1;
      end
    end
  end

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scaler_q <= 16'd15;
      ctrl_q   <= '0;
      ovr_q    <= 1'b0;
      ferr_q   <= 1'b0;
    end else begin
      if (rx_frame_end && rx_s && rxf_full) ovr_q <= 1'b1;
      else if (wr && widx == 2'd1 && apb_req.pwdata[3]) ovr_q <= 1'b0;
      if (rx_frame_end && !rx_s) ferr_q <= 1'b1;
      else if (wr && widx == 2'd1 && apb_req.pwdata[4]) ferr_q <= 1'b0;
      if (wr && widx == 2'd2) ctrl_q   <= apb_req.pwdata[1:0];
      if (wr && widx == 2'd3) scaler_q <= apb_req.pwdata[15:0];
    end
  end

  assign irq = (ctrl_q[0] && !rxf_empty) || (ctrl_q[1] && txf_empty && !tx_busy);

  always_comb begin
    unique case (widx)
      2'd0:    apb_rsp.prdata = 32'(rxf_dout);
      2'd1:    apb_rsp.prdata = 32'({rxf_cnt, txf_cnt, ferr_q, ovr_q, txf_empty && !tx_busy, txf_full, !rxf_empty});
      2'd2:    apb_rsp.prdata = 32'(ctrl_q);
      default: apb_rsp.prdata = 32'(scaler_q);
    endcase
  end
  assign apb_rsp.pready  = 1'b1;
  assign apb_rsp.pslverr = 1'b0;
endmodule
