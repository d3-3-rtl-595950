// tb_sincos_lut: compares all 16 entries with sin/cos of phase*22.5 deg
// quantised to one bit of amplitude (|x| >= 0.5 gives +-1, else 0).
module tb_sincos_lut;
  int checks = 0, failures = 0;
  logic [3:0] phase;
  logic signed [1:0] s, c;
  sincos_lut dut (.phase, .sin_o(s), .cos_o(c));
  `include "tb/tb_common.svh"
  function automatic int q1(real x);
    return (x >= 0.5) ? 1 : (x <= -0.5) ? -1 : 0;
  endfunction
  initial begin
    for (int p = 0; p < 16; p++) begin
      real a;
      phase = 4'(p);
      a = 2.0 * 3.14159265358979 * p / 16.0;
      #1;
      check($sformatf("sin(%0d)", p), s, q1($sin(a)));
      check($sformatf("cos(%0d)", p), c, q1($cos(a)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
