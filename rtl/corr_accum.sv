// corr_accum: one correlation path of a tracking module.
// Each GPS sample (ce=1) the signed product of composite IF, carrier and
// code is added into a 10-bit pre-accumulator. Every PRE_LEN samples the
// pre-accumulated value passes the channel scaler (divide by 1/2/4/8) and
// is added, with saturation, into the 16-bit correlation accumulator.
// A dump strobe (given together with ce on the last sample of an
// integration) flushes the partial pre-accumulation, copies the result into
// dump_val one clock later and restarts both accumulators from zero.
// The 10/16-bit widths follow the document; PRE_LEN and saturation are
// this design's choices.
module corr_accum #(
  parameter int unsigned DW      = 6,
  parameter int unsigned PW      = 10,
  parameter int unsigned AW      = 16,
  parameter int unsigned PRE_LEN = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ce,
  input  logic                 clr,
  input  logic signed [DW-1:0] din,
  input  logic [1:0]           scale,
  input  logic                 dump,
  output logic signed [AW-1:0] dump_val
);
  localparam int unsigned CW = $clog2(PRE_LEN);
  localparam logic signed [AW:0] MAXV = (AW+1)'((2**(AW-1)) - 1);
  localparam logic signed [AW:0] MINV = -(AW+1)'(2**(AW-1));

  logic signed [PW-1:0] pre_q, pre_nx, scaled;
  logic signed [AW-1:0] acc_q;
  logic signed [AW:0]   acc_sum;
  logic signed [AW-1:0] acc_sat;
  logic [CW-1:0]        cnt_q;
  logic                 flush;

  assign pre_nx = pre_q + PW'(din);
  assign flush  = dump || (cnt_q == CW'(PRE_LEN-1));

  bf_scaler #(.W(PW)) u_scale (.din(pre_nx), .scale(scale), .dout(scaled));

  assign acc_sum = (AW+1)'(acc_q) + (AW+1)'(scaled);
  always_comb begin
    if (acc_sum > MAXV)      acc_sat = MAXV[AW-1:0];
    else if (acc_sum < MINV) acc_sat = MINV[AW-1:0];
    else                     acc_sat = acc_sum[AW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_q    <= '0;
      acc_q    <= '0;
      cnt_q    <= '0;
      dump_val <= '0;
    end else if (clr) begin
      pre_q <= '0;
      acc_q <= '0;
      cnt_q <= '0;
    end else if (ce) begin
      if (flush) begin
        pre_q <= '0;
        cnt_q <= '0;
        if (dump) begin
          dump_val <= acc_sat;
          acc_q    <= '0;
        end else begin
          acc_q <= acc_sat;
        end
      end else begin
        pre_q <= pre_nx;
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end
endmodule
