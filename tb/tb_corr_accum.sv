// tb_corr_accum: drives random products with random gaps between samples,
// random scaler codes and dumps at irregular intervals. A reference model
// in the testbench keeps the pre-accumulator (flushed every PRE_LEN
// samples or on dump), divides by 2^scale rounding down, adds with
// saturation at +-2^15 and compares every dumped value. One long run of
// large positive samples checks saturation.
module tb_corr_accum;
  localparam int PRE_LEN = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce = 0, clr = 0, dump = 0;
  logic signed [5:0] din = '0;
  logic [1:0] scale = '0;
  logic signed [15:0] dump_val;
  int sat_seen = 0;
  corr_accum #(.DW(6), .PRE_LEN(PRE_LEN)) dut (.clk, .rst_n, .ce, .clr, .din, .scale, .dump, .dump_val);
  `include "tb/tb_common.svh"
  always #5 clk = ~clk;

  function automatic int fdiv(int v, int s);
    int d = 1 << s;
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction
  function automatic int sat(int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  int pre = 0, cnt = 0, acc = 0;
  task automatic sample(input int v, input bit d);
    @(negedge clk);
    ce = 1; din = 6'(v); dump = d;
    pre += v;
    if (d || cnt == PRE_LEN - 1) begin
      acc = sat(acc + fdiv(pre, scale));
      pre = 0; cnt = 0;
    end else cnt++;
    @(negedge clk);
    ce = 0; dump = 0;
    if (d) begin
      check("dump", dump_val, acc);
      if (acc == 32767) sat_seen++;
      acc = 0;
    end
    if ($urandom % 3 == 0) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 40; blk++) begin
      automatic int len = 1 + $urandom % 300;
      scale = 2'($urandom);
      for (int k = 0; k < len; k++)
        sample(int'($urandom % 55) - 27, k == len - 1);
    end
    // saturation: 4000 samples of +27 with no scaling
    scale = 0;
    for (int k = 0; k < 4000; k++) sample(27, k == 3999);
    check("saturation reached", sat_seen > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
