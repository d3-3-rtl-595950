// phase_rotator: carrier mixer / phase rotator of one front-end input.
// Looks up sin and cos of the 4-bit rotator phase and multiplies the signed
// IF sample (+-1, +-3) by each, giving I = IF*cos and Q = IF*sin in the
// range -3..+3 (3-bit two's complement). Because the table amplitude is
// only -1/0/+1 the product is a select/negate, not a real multiplier.
// The phase input is the channel carrier phase plus this front-end's
// relative phase, added by the caller. Combinational.
module phase_rotator (
  input  logic signed [2:0] if_val,
  input  logic [3:0]        phase,
  output logic signed [2:0] i_o,
  output logic signed [2:0] q_o
);
  logic signed [1:0] s, c;

  sincos_lut u_lut (.phase(phase), .sin_o(s), .cos_o(c));

  function automatic logic signed [2:0] mix(logic signed [2:0] x, logic signed [1:0] t);
    unique case (t)
      2'sb01:  return x;
      2'sb11:  return -x;
      default: return 3'sd0;
    endcase
  endfunction

  assign i_o = mix(if_val, c);
  assign q_o = mix(if_val, s);
endmodule
