// apb_spi: SPI interface that works either as master (two slave selects)
// or as slave, with 16-byte transmit and receive FIFOs.
// Both modes use SPI mode 0 (clock idle low, data sampled on the rising
// clock edge and changed on the falling edge), 8-bit frames, MSB first.
// Master: while the transmit FIFO holds bytes, the selected cs_n_o line is
// low and each byte is shifted out on mosi_o while miso_i is shifted in;
// sclk_o has a half period of SCALER+1 clocks. Slave: sclk_i, cs_n_i and
// mosi_i pass two-flop synchronisers (so sclk_i must be slower than
// SYS_CLK/8); while cs_n_i is low, bits are sampled on rising sclk edges
// and miso_o presents the next transmit bit (0xFF when the FIFO is empty).
// Received bytes go to the receive FIFO in both modes.
// APB registers (word index paddr[3:2]):
//   0 DATA   write pushes TX FIFO, read pops RX FIFO
//   1 STATUS [0] RX data [1] TX full [2] TX empty and idle
//   2 CTRL   [0] enable [1] master [2] slave select (0/1) [3] RX irq enable
//   3 SCALER master half clock period minus 1 (8 bits)
// Master/slave operation, two slave selects and the 16-byte buffer follow
// the document; the SPI mode, frame format and registers are this design's.
module apb_spi
  import gnss_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  apb_req_t   apb_req,
  output apb_rsp_t   apb_rsp,
  // master pins
  output logic       sclk_o,
  output logic       mosi_o,
  input  logic       miso_i,
  output logic [1:0] cs_n_o,
  // slave pins
  input  logic       sclk_i,
  input  logic       mosi_i,
  input  logic       cs_n_i,
  output logic       miso_o,
  output logic       is_master,   // enabled as master (pin directions)
  output logic       irq
);
  localparam int unsigned CW = $clog2(DEPTH) + 1;
  logic       wr, rd;
  logic [1:0] widx;
  logic [3:0] ctrl_q;
  logic [7:0] scaler_q;
  logic       en, master;

  assign wr     = apb_wr(apb_req);
  assign rd     = apb_req.psel && apb_req.penable && !apb_req.pwrite;
  assign widx   = apb_req.paddr[3:2];
  assign en     = ctrl_q[0];
  assign master = ctrl_q[1];
  assign is_master = en && master;

  logic [7:0] txf_dout, rxf_dout, rx_byte;
  logic       txf_full, txf_empty, rxf_full, rxf_empty, tx_pop, rx_push;
  logic [CW-1:0] txf_cnt, rxf_cnt;

  sync_fifo #(.W(8), .DEPTH(DEPTH)) u_txf (
    .clk, .rst_n, .push(wr && widx == 2'd0), .din(apb_req.pwdata[7:0]), .pop(tx_pop),
    .dout(txf_dout), .full(txf_full), .empty(txf_empty), .count(txf_cnt));
  sync_fifo #(.W(8), .DEPTH(DEPTH)) u_rxf (
    .clk, .rst_n, .push(rx_push), .din(rx_byte), .pop(rd && widx == 2'd0),
    .dout(rxf_dout), .full(rxf_full), .empty(rxf_empty), .count(rxf_cnt));

  // ---------------- master ----------------
  typedef enum logic [1:0] {M_IDLE, M_LOW, M_HIGH} mstate_t;
  mstate_t     ms_q;
  logic [7:0]  m_tx_q, m_rx_q, m_cnt_q;
  logic [2:0]  m_bit_q;
  logic        m_pop, m_push, m_busy;

  assign m_busy = (ms_q != M_IDLE);
  assign m_pop  = en && master && !m_busy && !txf_empty;
  // byte done on the last falling edge
  assign m_push = (ms_q == M_HIGH) && (m_cnt_q == '0) && (m_bit_q == 3'd7);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ms_q    <= M_IDLE;
      m_tx_q  <= '0;
      m_rx_q  <= '0;
      m_cnt_q <= '0;
      m_bit_q <= '0;
    end else begin
      unique case (ms_q)
        M_IDLE: if (m_pop) begin
          m_tx_q  <= txf_dout;
          m_bit_q <= '0;
          m_cnt_q <= scaler_q;
          ms_q    <= M_LOW;
        end
        M_LOW: begin
          if (m_cnt_q == '0) begin
            m_rx_q  <= {m_rx_q[6:0], miso_i};   // rising edge: sample
            m_cnt_q <= scaler_q;
            ms_q    <= M_HIGH;
          end else m_cnt_q <= m_cnt_q - 1'b1;
        end
        default: begin   // M_HIGH
          if (m_cnt_q == '0) begin            // falling edge: shift
            m_tx_q  <= {m_tx_q[6:0], 1'b1};
            m_cnt_q <= scaler_q;
            if (m_bit_q == 3'd7) ms_q <= M_IDLE;
            else begin
              m_bit_q <= m_bit_q + 1'b1;
              ms_q    <= M_LOW;
            end
          end else m_cnt_q <= m_cnt_q - 1'b1;
        end
      endcase
    end
  end

  // chip select stays low between back-to-back bytes
  logic cs_act_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           cs_act_q <= 1'b0;
    else if (m_pop)                       cs_act_q <= 1'b1;
    else if (!m_busy && txf_empty)        cs_act_q <= 1'b0;
  end

  assign sclk_o = (ms_q == M_HIGH);
  assign mosi_o = m_tx_q[7];
  assign cs_n_o = (en && master && cs_act_q) ? (ctrl_q[2] ? 2'b01 : 2'b10) : 2'b11;

  // ---------------- slave ----------------
  logic [2:0] sclk_s, cs_s;
  logic [1:0] mosi_s;
  logic       s_rise, s_fall, s_sel;
  logic [7:0] s_tx_q;
  logic [6:0] s_rx_q;
  logic [2:0] s_bit_q;
  logic       s_push, s_pop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0;
      cs_s   <= '1;
      mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk_i};
      cs_s   <= {cs_s[1:0], cs_n_i};
      mosi_s <= {mosi_s[0], mosi_i};
    end
  end

  assign s_sel  = en && !master && !cs_s[1];
  assign s_rise = sclk_s[1] && !sclk_s[2];
  assign s_fall = !sclk_s[1] && sclk_s[2];
  assign s_push = s_sel && s_rise && (s_bit_q == 3'd7);
  // load the next byte when selected and at each byte boundary
  assign s_pop  = en && !master && !txf_empty &&
                  ((cs_s[2] && !cs_s[1]) || (s_sel && s_fall && s_bit_q == 3'd0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_tx_q  <= '1;
      s_rx_q  <= '0;
      s_bit_q <= '0;
    end else if (!s_sel) begin
      s_bit_q <= '0;
    end else begin
      if (cs_s[2]) s_tx_q <= s_pop ? txf_dout : 8'hFF;   // just selected
      if (s_rise) begin
        s_rx_q  <= {s_rx_q[5:0], mosi_s[1]};
        s_bit_q <= s_bit_q + 1'b1;
      end
      if (s_fall) begin
        if (s_bit_q == 3'd0) s_tx_q <= s_pop ? txf_dout : 8'hFF;
        else                 s_tx_q <= {s_tx_q[6:0], 1'b1};
      end
    end
  end
  assign miso_o = s_tx_q[7];

  assign tx_pop  = m_pop || s_pop;
  assign rx_push = (m_push || s_push) && !rxf_full;
  assign rx_byte = m_push ? m_rx_q : {s_rx_q[6:0], mosi_s[1]};

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q   <= '0;
      scaler_q <= 8'd7;
    end else begin
      if (wr && widx == 2'd2) ctrl_q   <= apb_req.pwdata[3:0];
      if (wr && widx == 2'd3) scaler_q <= apb_req.pwdata[7:0];
    end
  end

  assign irq = ctrl_q[3] && !rxf_empty;

  always_comb begin
    unique case (widx)
      2'd0:    apb_rsp.prdata = 32'(rxf_dout);
      2'd1:    apb_rsp.prdata = 32'({rxf_cnt, txf_cnt, txf_empty && !m_busy, txf_full, !rxf_empty});
      2'd2:    apb_rsp.prdata = 32'(ctrl_q);
      default: apb_rsp.prdata = 32'(scaler_q);
    endcase
  end
  assign apb_rsp.pready  = 1'b1;
  assign apb_rsp.pslverr = 1'b0;
endmodule
