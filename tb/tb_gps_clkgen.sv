// tb_gps_clkgen: for every division factor 1..8 measures the spacing of the
// GPS clock enables (must equal the factor), counts enables over a window
// and checks the reference clock high time of floor(factor/2) cycles
// (factor 1: always high) and its period.
module tb_gps_clkgen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [2:0] div = '0;
  logic gps_ce, gps_ref_clk;
  gps_clkgen dut (.clk, .rst_n, .div, .gps_ce, .gps_ref_clk);
  `include "tb/tb_common.svh"
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 1; f <= 8; f++) begin
      int n_ce, n_hi, gap_bad, last, cyc;
      @(negedge clk); div = 3'(f - 1);
      repeat (20) @(negedge clk);
      n_ce = 0; n_hi = 0; gap_bad = 0; last = -1;
      for (cyc = 0; cyc < 8 * 40; cyc++) begin
        @(posedge clk); #1;
        if (gps_ce) begin
          if (last >= 0 && cyc - last != f) gap_bad++;
          if (last >= 0 && n_hi != ((f == 1) ? 1 : f / 2)) gap_bad++;
          last = cyc;
          n_ce++;
          n_hi = 0;
        end
        if (gps_ref_clk) n_hi++;
      end
      check($sformatf("ce spacing and ref high time f=%0d", f), gap_bad, 0);
      check($sformatf("ce count f=%0d", f), n_ce >= 320 / f && n_ce <= 320 / f + 1, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
