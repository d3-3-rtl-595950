// tb_apb_spi: two SPI blocks on one APB bus (A at 0x000, B at 0x100).
// A is master and drives B, a slave, through slave select 1; B's miso
// returns to A. Bytes go both ways at once; the test checks the data, the
// sclk half period, that only cs_n_o[1] is used and that it stays low over
// a burst, the 0xFF fill when the slave has nothing to send, and the
// status bits and the RX interrupt.
module tb_apb_spi;
  import gnss_pkg::*;
  localparam int SCALER = 5;    // half period 6 clocks
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  apb_req_t apb_req = '0, req_a, req_b;
  apb_rsp_t apb_rsp, rsp_a, rsp_b;
  logic a_sclk, a_mosi, b_miso, b_unused_sclk, b_unused_mosi, irq_a, irq_b;
  logic [1:0] a_cs, b_unused_cs;
  logic a_unused_miso, a_master, b_master;
  always_comb begin
    req_a = apb_req; req_a.psel = apb_req.psel && !apb_req.paddr[8];
    req_b = apb_req; req_b.psel = apb_req.psel &&  apb_req.paddr[8];
    apb_rsp = apb_req.paddr[8] ? rsp_b : rsp_a;
  end
  apb_spi dut_a (.clk, .rst_n, .apb_req(req_a), .apb_rsp(rsp_a),
    .sclk_o(a_sclk), .mosi_o(a_mosi), .miso_i(b_miso), .cs_n_o(a_cs),
    .sclk_i(1'b0), .mosi_i(1'b0), .cs_n_i(1'b1), .miso_o(a_unused_miso), .is_master(a_master), .irq(irq_a));
  apb_spi dut_b (.clk, .rst_n, .apb_req(req_b), .apb_rsp(rsp_b),
    .sclk_o(b_unused_sclk), .mosi_o(b_unused_mosi), .miso_i(1'b0), .cs_n_o(b_unused_cs),
    .sclk_i(a_sclk), .mosi_i(a_mosi), .cs_n_i(a_cs[1]), .miso_o(b_miso), .is_master(b_master), .irq(irq_b));
  `include "tb/tb_common.svh"
  `include "tb/apb_tasks.svh"
  always #5 clk = ~clk;
  initial begin
    #2000000;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // line monitor
  int cyc = 0, t_prev_edge = -1, half_min = 1000, half_max = 0, cs0_low = 0;
  int cs1_rises = 0;
  logic sclk_d = 0, cs1_d = 1;
  always @(posedge clk) begin
    cyc++;
    sclk_d <= a_sclk;
    cs1_d  <= a_cs[1];
    if (rst_n && a_sclk != sclk_d) begin
      if (t_prev_edge >= 0 && a_sclk) begin
        if (cyc - t_prev_edge < half_min) half_min = cyc - t_prev_edge;
        if (cyc - t_prev_edge > half_max) half_max = cyc - t_prev_edge;
      end
      t_prev_edge = cyc;
    end
    if (rst_n && !a_cs[0]) cs0_low++;
    if (rst_n && a_cs[1] && !cs1_d) cs1_rises++;
  end
  initial begin
    logic [31:0] rd;
    logic [7:0] m_tx [4], s_tx [4];
    repeat (2) @(negedge clk);
    rst_n = 1;
    check("A idle cs", a_cs, 2'b11);
    apb_write(16'h000C, SCALER);
    apb_write(16'h0108, 32'h9);         // B: enable, slave, rx irq
    for (int k = 0; k < 4; k++) begin
      m_tx[k] = 8'($urandom);
      s_tx[k] = 8'($urandom);
    end
    m_tx[0] = 8'hA5; s_tx[0] = 8'h3C;
    for (int k = 0; k < 3; k++) apb_write(16'h0100, 32'(s_tx[k]));
    apb_read(16'h0104, rd);
    check("B status tx not empty", rd[2:0], 3'b000);
    for (int k = 0; k < 4; k++) apb_write(16'h0000, 32'(m_tx[k]));
    apb_write(16'h0008, 32'hF);         // A: enable, master, select 1, irq
    t_prev_edge = -1;
    repeat (10) @(negedge clk);
    check("cs1 low", a_cs, 2'b01);
    do apb_read(16'h0004, rd); while (!rd[2]);
    repeat (4) @(negedge clk);
    check("cs released", a_cs, 2'b11);
    check("cs1 one burst", cs1_rises, 1);
    check("cs0 unused", cs0_low, 0);
    check("sclk low phase min", half_min, SCALER + 1);
    check("sclk low phase max", half_max, SCALER + 2);   // +1 between bytes
    check("A irq", irq_a, 1);
    check("A is master", a_master, 1);
    check("B is slave", b_master, 0);
    check("B irq", irq_b, 1);
    for (int k = 0; k < 4; k++) begin
      apb_read(16'h0000, rd);
      check($sformatf("A rx %0d", k), rd[7:0], k < 3 ? s_tx[k] : 8'hFF);
      apb_read(16'h0100, rd);
      check($sformatf("B rx %0d", k), rd[7:0], m_tx[k]);
    end
    apb_read(16'h0004, rd);
    check("A rx empty", rd[0], 0);
    apb_read(16'h0104, rd);
    check("B status", rd[2:0], 3'b100);
    check("A irq clear", irq_a, 0);
    // master disabled: no transfer
    apb_write(16'h0008, 32'h0);
    apb_write(16'h0000, 32'h55);
    repeat (100) @(negedge clk);
    check("disabled cs", a_cs, 2'b11);
    apb_read(16'h0004, rd);
    check("disabled tx held", rd[2], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
