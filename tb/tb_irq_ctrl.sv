// tb_irq_ctrl: raises sources and checks the reported level: the highest
// pending unmasked source wins inside a priority level and level 1 beats
// level 0; masking, forcing, clearing and acknowledging are exercised.
module tb_irq_ctrl;
  import gnss_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ack = 0;
  logic [3:0] ack_irl = '0, irl;
  logic [15:0] irq_in = '0;
  apb_req_t apb_req = '0;
  apb_rsp_t apb_rsp;
  irq_ctrl #(.N_IRQ(15)) dut (.clk, .rst_n, .apb_req, .apb_rsp, .irq_in, .ack, .ack_irl, .irl);
  `include "tb/tb_common.svh"
  `include "tb/apb_tasks.svh"
  always #5 clk = ~clk;
  task automatic pulse(input int n);
    @(negedge clk); irq_in[n] = 1;
    @(negedge clk); irq_in[n] = 0;
  endtask
  task automatic do_ack(input int n);
    @(negedge clk); ack = 1; ack_irl = 4'(n);
    @(negedge clk); ack = 0;
  endtask
  initial begin
    logic [31:0] rd;
    repeat (2) @(negedge clk);
    rst_n = 1;
    apb_write(16'h0010, 32'hFFFE);    // unmask all
    pulse(3); pulse(7); pulse(5);
    @(negedge clk);
    check("highest of 3,5,7", irl, 7);
    apb_write(16'h0000, 32'h0008);    // source 3 to high level
    check("level 1 wins", irl, 3);
    do_ack(3);
    check("after ack 3", irl, 7);
    apb_write(16'h0010, 32'hFF7E);    // mask 7
    check("7 masked", irl, 5);
    apb_write(16'h000C, 32'h0020);    // clear 5
    check("nothing left unmasked", irl, 0);
    apb_read(16'h0004, rd);
    check("pending shows 7", rd, 32'h80);
    apb_write(16'h0008, 32'h4000);    // force 14
    check("forced 14", irl, 14);
    // a held level must not re-trigger after ack
    @(negedge clk); irq_in[9] = 1;
    @(negedge clk);
    check("14 over 9", irl, 14);
    do_ack(14); do_ack(9);
    repeat (3) @(negedge clk);
    check("held line no retrigger", irl, 0);
    irq_in[9] = 0;
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
