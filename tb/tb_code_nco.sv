// tb_code_nco: counts the half-chip ticks over N samples for random
// frequency words and checks count = floor(N*freq / 2^32) and the final
// phase; ticks must only occur in enabled cycles.
module tb_code_nco;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce = 0, clr = 0;
  logic [31:0] freq = '0, phase;
  logic tick;
  int ticks = 0, bad = 0;
  code_nco #(.W(32)) dut (.clk, .rst_n, .ce, .clr, .freq, .phase, .tick);
  `include "tb/tb_common.svh"
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (tick) ticks++;
    if (tick && !ce) bad++;
  end
  initial begin
    longint unsigned tot;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      automatic int n = 500 + $urandom % 3000;
      @(negedge clk); clr = 1; freq = (t == 0) ? 32'h8000_0000 : $urandom;
      @(negedge clk); clr = 0; ticks = 0;
      for (int k = 0; k < n; k++) begin
        ce = 1; @(negedge clk);
        ce = 0; if ($urandom % 2 == 0) @(negedge clk);
      end
      tot = longint'(n) * longint'(freq);
      check("ticks", ticks, tot >> 32);
      check("phase", phase, tot % (64'd1 << 32));
    end
    check("ticks only when enabled", bad, 0);
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
