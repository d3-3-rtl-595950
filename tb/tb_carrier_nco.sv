// tb_carrier_nco: for several frequency words, runs N enabled samples
// (with idle cycles in between) and checks phase = N*freq mod 2^32 and
// cycles = floor(N*freq / 2^32).
module tb_carrier_nco;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce = 0, clr = 0;
  logic [31:0] freq = '0, phase, cycles;
  carrier_nco #(.W(32)) dut (.clk, .rst_n, .ce, .clr, .freq, .phase, .cycles);
  `include "tb/tb_common.svh"
  always #5 clk = ~clk;
  initial begin
    longint unsigned tot;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      automatic int n = 500 + $urandom % 2000;
      @(negedge clk); clr = 1; freq = (t == 0) ? 32'h4000_0000 : $urandom;
      @(negedge clk); clr = 0;
      for (int k = 0; k < n; k++) begin
        ce = 1; @(negedge clk);
        ce = ($urandom % 2 == 0); if (!ce) @(negedge clk);
        ce = 0;
      end
      tot = longint'(n) * longint'(freq);
      check("phase", phase, tot % (64'd1 << 32));
      check("cycles", cycles, tot >> 32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
