// bf_scaler: programmable data-path scaler of a tracking channel.
// Sits between the 10-bit pre-accumulator and the 16-bit correlation
// accumulator. The SCALER code 00/01/10/11 selects a factor of 1/2/4/8;
// this design divides by it (arithmetic right shift), so that a beam made
// of many front-ends keeps within the fixed range of the accumulator.
// Combinational.
module bf_scaler #(
  parameter int unsigned W = 10
) (
  input  logic signed [W-1:0] din,
  input  logic [1:0]          scale,
  output logic signed [W-1:0] dout
);
  assign dout = din >>> scale;
endmodule
