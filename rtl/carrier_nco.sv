// carrier_nco: carrier numerically controlled oscillator of a tracking module.
// A W-bit phase accumulator advances by freq on every GPS sample (ce).
// Its top 4 bits address the 16-step sin/cos map; each wrap of the
// accumulator is one carrier cycle and increments the cycle counter, which
// together with the phase forms the carrier-phase measurement. clr restarts
// phase and count. The 32-bit widths are this design's choice.
module carrier_nco #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic         clr,
  input  logic [W-1:0] freq,
  output logic [W-1:0] phase,
  output logic [31:0]  cycles
);
  logic [W:0] sum;
  assign sum = {1'b0, phase} + {1'b0, freq};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= '0;
      cycles <= '0;
    end else if (clr) begin
      phase  <= '0;
      cycles <= '0;
    end else if (ce) begin
      phase <= sum[W-1:0];
      if (sum[W]) cycles <= cycles + 1'b1;
    end
  end
endmodule
