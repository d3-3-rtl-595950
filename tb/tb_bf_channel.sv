// tb_bf_channel: random front-end samples, relative phases, carrier phases
// and on/off masks; the expected composite I/Q is the sum over enabled
// front-ends of IF * cos/sin((carrier + relative phase) * 22.5 deg),
// quantised to one bit. Includes the all-off and all-on masks.
module tb_bf_channel;
  localparam int N_FE = 9;
  int checks = 0, failures = 0;
  logic signed [2:0] if_val [N_FE];
  logic [3:0] carr_phase;
  logic [4*N_FE-1:0] rel_phase;
  logic [N_FE-1:0] active;
  logic signed [5:0] sum_i, sum_q;
  bf_channel #(.N_FE(N_FE)) dut (.if_val, .carr_phase, .rel_phase, .active, .sum_i, .sum_q);
  `include "tb/tb_common.svh"
  function automatic int q1(real x);
    return (x >= 0.5) ? 1 : (x <= -0.5) ? -1 : 0;
  endfunction
  initial begin
    int vals [4] = '{-3, -1, 1, 3};
    for (int n = 0; n < 400; n++) begin
      int ei, eq;
      ei = 0; eq = 0;
      carr_phase = 4'($urandom);
      rel_phase  = {$urandom, $urandom};
      active     = (n == 0) ? '0 : (n == 1) ? '1 : N_FE'($urandom);
      for (int f = 0; f < N_FE; f++) begin
        int v, p;
        real a;
        v = (n < 4) ? 3 : vals[$urandom % 4];
        if_val[f] = 3'(v);
        p = (carr_phase + rel_phase[4*f +: 4]) % 16;
        a = 2.0 * 3.14159265358979 * p / 16.0;
        if (active[f]) begin
          ei += v * q1($cos(a));
          eq += v * q1($sin(a));
        end
      end
      #1;
      check($sformatf("sum_i n=%0d", n), sum_i, ei);
      check($sformatf("sum_q n=%0d", n), sum_q, eq);
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
