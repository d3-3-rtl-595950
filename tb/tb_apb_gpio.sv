// tb_apb_gpio: writes output values and directions and reads them back;
// drives random pin values and reads them through the synchroniser; sets
// and reads back the alternate-function selection.
module tb_apb_gpio;
  import gnss_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0] gpio_i = '0, gpio_o, gpio_oe, alt;
  apb_req_t apb_req = '0;
  apb_rsp_t apb_rsp;
  apb_gpio #(.W(8)) dut (.clk, .rst_n, .apb_req, .apb_rsp, .gpio_i, .gpio_o, .gpio_oe, .alt);
  `include "tb/tb_common.svh"
  `include "tb/apb_tasks.svh"
  always #5 clk = ~clk;
  initial begin
    logic [31:0] rd;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      logic [7:0] v, d, p, a;
      v = 8'($urandom); d = 8'($urandom); p = 8'($urandom); a = 8'($urandom);
      if (k == 0) check("alt reset", alt, 0);
      apb_write(16'h000C, 32'(a));
      check("alt", alt, a);
      apb_write(16'h0004, 32'(v));
      apb_write(16'h0008, 32'(d));
      check("gpio_o", gpio_o, v);
      check("gpio_oe", gpio_oe, d);
      gpio_i = p;
      repeat (3) @(negedge clk);
      apb_read(16'h0000, rd);
      check("gpio_i", rd, p);
      apb_read(16'h0008, rd);
      check("dir readback", rd, d);
      apb_read(16'h000C, rd);
      check("alt readback", rd, a);
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
