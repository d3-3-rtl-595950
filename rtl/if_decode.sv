// if_decode: IF interface sample conversion.
// Maps the 2-bit sign/magnitude sample of a GPS RF front-end to its signed
// value: SGN=0 is positive, SGN=1 negative, MAG=1 selects magnitude 3 and
// MAG=0 magnitude 1 (coding as given for the SP1016 IF input). A one-bit
// front-end uses SGN only and has MAG tied, as the document prescribes.
// Purely combinational; val is a 3-bit two's-complement number.
module if_decode (
  input  logic             sgn,
  input  logic             mag,
  output logic signed [2:0] val
);
  always_comb begin
    unique case ({sgn, mag})
      2'b01:   val = 3'sd3;
      2'b00:   val = 3'sd1;
      2'b10:   val = -3'sd1;
      default: val = -3'sd3;   // 2'b11
    endcase
  end
endmodule
