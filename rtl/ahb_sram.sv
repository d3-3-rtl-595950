// ahb_sram: on-chip zero-wait-state SRAM on an AHB-lite bus.
// BYTES of memory organised as 32-bit words with byte lanes, so 8-, 16-
// and 32-bit transfers (hsize 0/1/2) are all supported; the lanes follow
// the little-endian byte address. The address phase is registered when
// hready_in (the bus HREADY) is high; a
// write updates the addressed lanes at the end of its data phase and a
// read returns the word combinationally in its data phase, so hready is
// always 1 and back-to-back write-read to the same address sees the new
// data. hresp is always OKAY. Size and access widths follow the document;
// the endianness and bus subset are this design's choices.
module ahb_sram #(
  parameter int unsigned BYTES = 65536
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hready_in,
  input  logic        hsel,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [2:0]  hsize,
  input  logic [31:0] hwdata,
  output logic [31:0] hrdata,
  output logic        hready,
  output logic        hresp
);
  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [3:0][7:0] mem [WORDS];
  logic            wr_q;
  logic [AW-1:0]   widx_q;
  logic [3:0]      be_q, be;

  always_comb begin
    unique case (hsize[1:0])
      2'd0:    be = 4'b0001 << haddr[1:0];
      2'd1:    be = haddr[1] ? 4'b1100 : 4'b0011;
      default: be = 4'b1111;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q   <= 1'b0;
      widx_q <= '0;
      be_q   <= '0;
    end else begin
      if (hready_in) begin
        wr_q <= hsel && htrans[1] && hwrite;
        if (hsel && htrans[1]) begin
          widx_q <= haddr[AW+1:2];
          be_q   <= be;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_q)
      for (int b = 0; b < 4; b++)
        if (be_q[b]) mem[widx_q][b] <= hwdata[8*b +: 8];
  end

  assign hrdata = mem[widx_q];
  assign hready = 1'b1;
  assign hresp  = 1'b0;
endmodule
