// tb_ahb_sram: random 8/16/32-bit writes and reads over AHB-lite, including
// back-to-back write then read of the same address, compared with a byte
// array kept by the testbench (little-endian lanes). Runs on a reduced
// memory size; the addressing is the same at 64 kB.
module tb_ahb_sram;
  localparam int BYTES = 1024;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic hsel = 0, hwrite = 0, hready, hresp;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0] htrans = '0;
  logic [2:0] hsize = '0;
  ahb_sram #(.BYTES(BYTES)) dut (.clk, .rst_n, .hready_in(1'b1), .hsel, .haddr, .htrans, .hwrite, .hsize,
                                 .hwdata, .hrdata, .hready, .hresp);
  `include "tb/tb_common.svh"
  always #5 clk = ~clk;
  logic [7:0] model [BYTES];

  // one pipelined transfer per call: address phase now, data phase next clock
  logic        pend_rd = 0;
  logic [31:0] pend_exp;
  logic [31:0] pend_wdata;
  task automatic xfer(input bit wr, input int sz, input int a, input logic [31:0] d);
    int n = 1 << sz;
    @(negedge clk);
    hwdata = pend_wdata;
    if (pend_rd) check("read data", hrdata, pend_exp);
    hsel = 1; htrans = 2'b10; hwrite = wr; hsize = 3'(sz); haddr = 32'(a);
    pend_rd = !wr;
    pend_exp = '0;
    for (int b = 0; b < n; b++) begin
      int lane = (a + b) % 4;
      if (wr) begin
        model[a + b] = d[8*lane +: 8];
      end else pend_exp[8*lane +: 8] = model[a + b];
    end
    if (!wr && n < 4)
      for (int l = 0; l < 4; l++) pend_exp[8*l +: 8] = model[(a & ~3) + l];
    pend_wdata = d;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < BYTES; a += 4) xfer(1, 2, a, $urandom);
    for (int k = 0; k < 3000; k++) begin
      automatic int sz = $urandom % 3;
      automatic int a = ($urandom % BYTES) & ~((1 << sz) - 1);
      xfer($urandom % 2, sz, a, $urandom);
      if (k % 10 == 0) xfer(0, 2, a & ~3, 0);
    end
    xfer(0, 2, 0, 0);
    @(negedge clk); htrans = 0; hsel = 0;
    if (pend_rd) check("read data", hrdata, pend_exp);
    check("hready", hready, 1);
    check("hresp", hresp, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
