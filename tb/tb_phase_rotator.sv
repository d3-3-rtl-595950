// tb_phase_rotator: all IF values (+-1, +-3) times all 16 phases; the
// expected I/Q are IF*cos and IF*sin of the one-bit quantised carrier.
module tb_phase_rotator;
  int checks = 0, failures = 0;
  logic signed [2:0] if_val, i_o, q_o;
  logic [3:0] phase;
  phase_rotator dut (.if_val, .phase, .i_o, .q_o);
  `include "tb/tb_common.svh"
  function automatic int q1(real x);
    return (x >= 0.5) ? 1 : (x <= -0.5) ? -1 : 0;
  endfunction
  initial begin
    int vals [4] = '{-3, -1, 1, 3};
    for (int v = 0; v < 4; v++)
      for (int p = 0; p < 16; p++) begin
        real a;
        if_val = 3'(vals[v]);
        phase  = 4'(p);
        a = 2.0 * 3.14159265358979 * p / 16.0;
        #1;
        check($sformatf("I if=%0d ph=%0d", vals[v], p), i_o, vals[v] * q1($cos(a)));
        check($sformatf("Q if=%0d ph=%0d", vals[v], p), q_o, vals[v] * q1($sin(a)));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
