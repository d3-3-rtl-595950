// code_nco: code numerically controlled oscillator of a tracking module.
// A W-bit phase accumulator advances by freq on every GPS sample (ce).
// Each wrap marks the end of half a C/A chip: tick is high, combinationally,
// in the clock cycle of the sample whose addition wraps, so the code
// generator steps on the same clock edge. The NCO therefore runs at twice
// the chipping rate (freq = 2 * f_chip / f_sample * 2^W); this half-chip
// resolution is what the half-chip spaced code needs. Widths are this
// design's choice.
module code_nco #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic         clr,
  input  logic [W-1:0] freq,
  output logic [W-1:0] phase,
  output logic         tick
);
  logic [W:0] sum;
  assign sum  = {1'b0, phase} + {1'b0, freq};
  assign tick = ce && !clr && sum[W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      phase <= '0;
    else if (clr)    phase <= '0;
    else if (ce)     phase <= sum[W-1:0];
  end
endmodule
