// ahb_ebi: external bus interface for asynchronous memory (SRAM / Flash).
// An AHB-lite slave (hready_in is the bus HREADY, hready this slave's
// ready output) maps four banks of 16 MB (haddr[25:24] selects the
// bank, one chip select each). Every bank is configured over APB with its
// own data width (8, 16 or 32 bits) and number of wait states. A transfer
// wider than the bank is split into beats: a 32-bit access to an 8-bit
// bank takes four beats, to a 16-bit bank two. Each beat drives address,
// chip select, byte enables and output enable (read) or write enable
// (write) for WS+1 clocks, sampling read data in the last of them, and is
// followed by one recovery clock with all strobes inactive. hready is low
// from the start of the data phase until the last beat has finished.
// Byte enables (active low) select individual bytes of 16- and 32-bit
// devices; data lanes are little-endian, an 8-bit device sits on
// mem_d[7:0] and a 16-bit device on mem_d[15:0].
// APB registers: word n (paddr[3:2]) = bank n configuration,
//   [1:0] width 0 = 8, 1 = 16, 2 = 32 bits; [7:4] wait states.
// Four banks of 16 MB, the three widths, wait states and byte enables
// follow the document; beat timing, recovery clock and register layout are
// this design's choices. The optional fifth bank on the GPIO pins is not
// included.
module ahb_ebi
  import gnss_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // AHB-lite slave
  input  logic        hready_in,
  input  logic        hsel,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [2:0]  hsize,
  input  logic [31:0] hwdata,
  output logic [31:0] hrdata,
  output logic        hready,
  output logic        hresp,
  // APB configuration
  input  apb_req_t    apb_req,
  output apb_rsp_t    apb_rsp,
  // memory bus
  output logic [23:0] mem_a,
  output logic [31:0] mem_d_o,
  input  logic [31:0] mem_d_i,
  output logic        mem_d_oe,
  output logic [3:0]  mem_cs_n,
  output logic        mem_oe_n,
  output logic        mem_we_n,
  output logic [3:0]  mem_be_n
);
  typedef enum logic [1:0] {S_IDLE, S_STROBE, S_RECOVER} state_t;

  logic [7:0]  cfg_q [4];
  state_t      state_q;
  logic [25:0] addr_q;
  logic [1:0]  size_q, bank_q, width_q, beat_q, nbeats_q;
  logic        wr_q;
  logic [3:0]  ws_q, cnt_q;
  logic [31:0] rdata_q;
  logic        start;

  // ---------------- configuration ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 4; b++) cfg_q[b] <= 8'hF2;   // 32 bits, 15 wait states
    end else if (apb_wr(apb_req)) begin
      cfg_q[apb_req.paddr[3:2]] <= apb_req.pwdata[7:0];
    end
  end
  assign apb_rsp.prdata  = 32'(cfg_q[apb_req.paddr[3:2]]);
  assign apb_rsp.pready  = 1'b1;
  assign apb_rsp.pslverr = 1'b0;

  // ---------------- beat geometry ----------------
  logic [1:0] nb;        // beats of the new transfer minus 1
  logic [1:0] new_w;
  assign new_w = cfg_q[haddr[25:24]][1:0];
  always_comb begin
    unique case (new_w)
      2'd0:    nb = (hsize[1:0] == 2'd0) ? 2'd0 : (hsize[1:0] == 2'd1) ? 2'd1 : 2'd3;
      2'd1:    nb = (hsize[1:0] == 2'd2) ? 2'd1 : 2'd0;
      default: nb = 2'd0;
    endcase
  end

  assign start  = hsel && htrans[1] && hready_in && (state_q == S_IDLE);
  assign hready = (state_q == S_IDLE);
  assign hresp  = 1'b0;
  assign hrdata = rdata_q;

  // byte address of the current beat
  logic [25:0] beat_addr;
  always_comb begin
    unique case (width_q)
      2'd0:    beat_addr = addr_q + 26'(beat_q);
      2'd1:    beat_addr = ((size_q == 2'd2) ? {addr_q[25:2], 2'b00} : {addr_q[25:1], 1'b0}) + 26'({beat_q, 1'b0});
      default: beat_addr = {addr_q[25:2], 2'b00};
    endcase
  end

  // lanes of the AHB word touched by this beat, and device byte enables
  logic [3:0] ahb_be, dev_be;
  always_comb begin
    unique case (size_q)
      2'd0:    ahb_be = 4'b0001 << addr_q[1:0];
      2'd1:    ahb_be = addr_q[1] ? 4'b1100 : 4'b0011;
      default: ahb_be = 4'b1111;
    endcase
    unique case (width_q)
      2'd0:    dev_be = 4'b0001;
      2'd1:    dev_be = (size_q == 2'd0) ? (addr_q[0] ? 4'b0010 : 4'b0001) : 4'b0011;
      default: dev_be = ahb_be;
    endcase
  end

  // memory pins; hwdata is held by the master for the whole data phase
  always_comb begin
    mem_a    = beat_addr[23:0];
    mem_cs_n = '1;
    mem_oe_n = 1'b1;
    mem_we_n = 1'b1;
    mem_be_n = '1;
    mem_d_oe = 1'b0;
    mem_d_o  = '0;
    unique case (width_q)
      2'd0:    mem_d_o[7:0]  = hwdata[8*beat_addr[1:0] +: 8];
      2'd1:    mem_d_o[15:0] = hwdata[16*beat_addr[1] +: 16];
      default: mem_d_o       = hwdata;
    endcase
    if (state_q == S_STROBE) begin
      mem_cs_n[bank_q] = 1'b0;
      mem_be_n = ~dev_be;
      mem_oe_n = wr_q;
      mem_we_n = !wr_q;
      mem_d_oe = wr_q;
    end
  end

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      addr_q   <= '0;
      size_q   <= '0;
      bank_q   <= '0;
      width_q  <= '0;
      beat_q   <= '0;
      nbeats_q <= '0;
      wr_q     <= 1'b0;
      ws_q     <= '0;
      cnt_q    <= '0;
      rdata_q  <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          addr_q   <= haddr[25:0];
          size_q   <= hsize[1:0];
          bank_q   <= haddr[25:24];
          width_q  <= new_w;
          ws_q     <= cfg_q[haddr[25:24]][7:4];
          nbeats_q <= nb;
          wr_q     <= hwrite;
          beat_q   <= '0;
          cnt_q    <= '0;
          state_q  <= S_STROBE;
        end
        S_STROBE: begin
          if (cnt_q == ws_q) begin
            if (!wr_q) begin
              unique case (width_q)
                2'd0:    rdata_q[8*beat_addr[1:0] +: 8]  <= mem_d_i[7:0];
                2'd1:    rdata_q[16*beat_addr[1] +: 16] <= mem_d_i[15:0];
                default: rdata_q <= mem_d_i;
              endcase
            end
            state_q <= S_RECOVER;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        default: begin   // S_RECOVER
          cnt_q <= '0;
          if (beat_q == nbeats_q) begin
            state_q <= S_IDLE;
          end else begin
            beat_q  <= beat_q + 1'b1;
            state_q <= S_STROBE;
          end
        end
      endcase
    end
  end
endmodule
