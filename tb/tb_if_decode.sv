// tb_if_decode: checks the four sign/magnitude codes against their values
// (SGN=0 positive, MAG=1 magnitude 3).
module tb_if_decode;
  int checks = 0, failures = 0;
  logic sgn, mag;
  logic signed [2:0] val;
  if_decode dut (.sgn, .mag, .val);
  `include "tb/tb_common.svh"
  initial begin
    for (int c = 0; c < 4; c++) begin
      int e;
      {sgn, mag} = 2'(c);
      #1;
      e = (mag ? 3 : 1) * (sgn ? -1 : 1);
      check($sformatf("sgn=%0d mag=%0d", sgn, mag), val, e);
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
