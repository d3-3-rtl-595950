// sincos_lut: carrier sin/cos map with 1-bit amplitude and 4-bit phase.
// Sixteen phase steps of 22.5 degrees; each output is -1, 0 or +1 as a
// 2-bit two's-complement value. The entries are the document's map: sin is
// +1 for phases 2..6, -1 for 10..14 and 0 elsewhere; cos is +1 for 0..2 and
// 14..15, -1 for 6..10 and 0 elsewhere. Combinational.
module sincos_lut (
  input  logic [3:0]        phase,
  output logic signed [1:0] sin_o,
  output logic signed [1:0] cos_o
);
  always_comb begin
    unique case (phase)
      4'd2, 4'd3, 4'd4, 4'd5, 4'd6:      sin_o = 2'sb01;
      4'd10, 4'd11, 4'd12, 4'd13, 4'd14: sin_o = 2'sb11;
      default:                           sin_o = 2'sb00;
    endcase
    unique case (phase)
      4'd0, 4'd1, 4'd2, 4'd14, 4'd15:    cos_o = 2'sb01;
      4'd6, 4'd7, 4'd8, 4'd9, 4'd10:     cos_o = 2'sb11;
      default:                           cos_o = 2'sb00;
    endcase
  end
endmodule
