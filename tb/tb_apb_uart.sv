// tb_apb_uart: tx is looped back to rx. Writes a burst of bytes (filling
// the transmit FIFO), checks the bit time on the line, reads every byte
// back through the receive FIFO, then overfills the receive FIFO and checks
// the overrun flag. A directly driven bad stop bit sets the frame error.
module tb_apb_uart;
  import gnss_pkg::*;
  localparam int DEPTH = 16;
  localparam int SCALER = 7;    // 8 clocks per bit
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rx, tx, irq;
  logic loop = 1, rx_drv = 1;
  apb_req_t apb_req = '0;
  apb_rsp_t apb_rsp;
  assign rx = loop ? tx : rx_drv;
  apb_uart #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .apb_req, .apb_rsp, .rx, .tx, .irq);
  `include "tb/tb_common.svh"
  `include "tb/apb_tasks.svh"
  always #5 clk = ~clk;
  int cyc = 0, t_fall = -1, t_rise = -1;
  logic tx_d = 1;
  always @(posedge clk) begin
    cyc++;
    tx_d <= tx;
    if (rst_n && !tx && tx_d && t_fall < 0) t_fall = cyc;
    if (tx && !tx_d && t_fall >= 0 && t_rise < 0) t_rise = cyc;
  end
  initial begin
    logic [31:0] rd;
    logic [7:0] sent [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    apb_write(16'h000C, SCALER);
    apb_write(16'h0008, 32'h1);         // rx irq enable
    sent.push_back(8'h01);              // start bit + one zero... bit0=1
    apb_write(16'h0000, 32'h01);
    for (int k = 1; k < DEPTH; k++) begin
      automatic logic [7:0] b = 8'($urandom);
      sent.push_back(b);
      apb_write(16'h0000, 32'(b));
    end
    wait (t_rise > 0);
    check("start bit length", t_rise - t_fall, SCALER + 1);
    for (int k = 0; k < DEPTH; k++) begin
      do apb_read(16'h0004, rd); while (!rd[0]);
      check("irq with rx data", irq, 1);
      apb_read(16'h0000, rd);
      check($sformatf("byte %0d", k), rd[7:0], sent[k]);
    end
    // overrun: send DEPTH+2 bytes without reading
    for (int k = 0; k < DEPTH + 2; k++) apb_write(16'h0000, 32'(k));
    repeat ((DEPTH + 3) * 10 * (SCALER + 1)) @(negedge clk);
    apb_read(16'h0004, rd);
    check("overrun flag", rd[3], 1);
    check("rx fifo full count", rd[14:10], DEPTH);
    // frame error: stop bit 0
    loop = 0;
    @(negedge clk); rx_drv = 0;
    repeat (10 * (SCALER + 1)) @(negedge clk);
    rx_drv = 1;
    repeat (4 * (SCALER + 1)) @(negedge clk);
    apb_read(16'h0004, rd);
    check("frame error", rd[4], 1);
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
