// tb_bf_scaler: every 10-bit input with every scaler code; expected is the
// input divided by 1/2/4/8 and rounded towards minus infinity.
module tb_bf_scaler;
  int checks = 0, failures = 0;
  logic signed [9:0] din, dout;
  logic [1:0] scale;
  bf_scaler #(.W(10)) dut (.din, .scale, .dout);
  `include "tb/tb_common.svh"
  initial begin
    for (int v = -512; v < 512; v += 7)
      for (int s = 0; s < 4; s++) begin
        int d, e;
        din = 10'(v); scale = 2'(s);
        d = 1 << s;
        e = (v >= 0) ? v / d : -((-v + d - 1) / d);
        #1;
        check($sformatf("%0d/%0d", v, d), dout, e);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
