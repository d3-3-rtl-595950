// gps_clkgen: GPS clock pulse deletion.
// The GPS correlation path runs on SYS_CLK with pulses deleted by a factor
// of 1..8 (div = factor-1). Here the kept pulses are a clock enable:
// gps_ce is high in one SYS_CLK cycle out of every factor. The same factor
// divides SYS_CLK into gps_ref_clk, the reference clock sent to the RF
// front-ends (high for the first half of each period, rounded down, so it
// stays high for factor 1 where the front-end takes SYS_CLK itself).
// A change of div takes effect at the next period boundary.
// Using an enable instead of a gated clock is this design's choice.
module gps_clkgen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] div,
  output logic       gps_ce,
  output logic       gps_ref_clk
);
  logic [2:0] cnt_q, div_q, cnt_nx, div_nx;
  logic       wrap;

  assign gps_ce = (cnt_q == 3'd0);
  assign wrap   = (cnt_q == div_q);
  assign cnt_nx = wrap ? 3'd0 : cnt_q + 1'b1;
  assign div_nx = wrap ? div : div_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q       <= '0;
      div_q       <= '0;
      gps_ref_clk <= 1'b1;
    end else begin
      cnt_q       <= cnt_nx;
      div_q       <= div_nx;
      gps_ref_clk <= (div_nx == 3'd0) || ({1'b0, cnt_nx} < ({1'b0, div_nx} + 4'd1) / 4'd2);
    end
  end
endmodule
