// tb_ahb_ebi: four banks are given random widths (8/16/32 bits) and wait
// states; a behavioural asynchronous memory per bank (byte array, writes
// on the rising edge of write enable for the enabled bytes, reads while
// output enable is low) sits on the memory bus. Random byte, halfword and
// word reads and writes over AHB are compared with a byte-level reference.
// Each strobe must last exactly WS+1 clocks and each transfer must use the
// number of beats its size and the bank width require.
module tb_ahb_ebi;
  import gnss_pkg::*;
  localparam int BANK_BYTES = 256;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic hsel = 0, hwrite = 0, hready, hresp;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0] htrans = '0;
  logic [2:0] hsize = '0;
  apb_req_t apb_req = '0;
  apb_rsp_t apb_rsp;
  logic [23:0] mem_a;
  logic [31:0] mem_d_o, mem_d_i;
  logic mem_d_oe, mem_oe_n, mem_we_n;
  logic [3:0] mem_cs_n, mem_be_n;
  ahb_ebi dut (.clk, .rst_n, .hready_in(1'b1), .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hrdata, .hready, .hresp,
               .apb_req, .apb_rsp, .mem_a, .mem_d_o, .mem_d_i, .mem_d_oe, .mem_cs_n, .mem_oe_n,
               .mem_we_n, .mem_be_n);
  `include "tb/tb_common.svh"
  `include "tb/apb_tasks.svh"
  always #5 clk = ~clk;

  int width [4];     // bytes
  int ws [4];
  logic [7:0] dev [4][BANK_BYTES];
  logic [7:0] ref_mem [4][BANK_BYTES];

  function automatic int bank_of(input logic [3:0] cs_n);
    for (int b = 0; b < 4; b++) if (!cs_n[b]) return b;
    return -1;
  endfunction

  // device model: read data
  always_comb begin
    int b;
    mem_d_i = '0;
    b = bank_of(mem_cs_n);
    if (b >= 0 && !mem_oe_n)
      for (int l = 0; l < 4; l++)
        if (l < width[b]) mem_d_i[8*l +: 8] = dev[b][((int'(mem_a) & ~(width[b] - 1)) + l) % BANK_BYTES];
  end

  // device model: write on we_n rising; strobe length and beat counting
  logic we_d = 1;
  logic [3:0] cs_d = '1;
  logic [23:0] a_d;
  logic [31:0] d_d;
  logic [3:0] be_d;
  int strobe_len = 0, strobe_bad = 0, beats = 0;
  // sampled just after the falling edge, away from the controller's clock
  // edge and after the master has updated hwdata
  always begin
    int b;
    @(negedge clk);
    #2;
    we_d <= mem_we_n; cs_d <= mem_cs_n; a_d <= mem_a; d_d <= mem_d_o; be_d <= mem_be_n;
    b = bank_of(cs_d);
    if (mem_we_n && !we_d && b >= 0)
      for (int l = 0; l < 4; l++)
        if (l < width[b] && !be_d[l]) dev[b][((int'(a_d) & ~(width[b] - 1)) + l) % BANK_BYTES] = d_d[8*l +: 8];
    if (mem_cs_n != '1) strobe_len++;
    else if (strobe_len > 0) begin
      if (strobe_len != ws[bank_of(cs_d)] + 1) strobe_bad++;
      strobe_len = 0;
      beats++;
    end
  end

  task automatic xfer(input bit wr, input int sz, input int bank, input int off,
                      input logic [31:0] d, output logic [31:0] rd);
    @(negedge clk);
    hsel = 1; htrans = 2'b10; hwrite = wr; hsize = 3'(sz);
    haddr = {6'd0, 2'(bank), 24'(off)};
    @(negedge clk);
    hsel = 0; htrans = 2'b00; hwdata = d;
    while (!hready) @(negedge clk);
    rd = hrdata;
  endtask

  initial begin
    logic [31:0] rd;
    automatic int beats_bad = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 4; b++) begin
      automatic int wcode = (b < 3) ? b : $urandom % 3;
      width[b] = 1 << wcode;
      ws[b] = (b == 3) ? 9 + $urandom % 7 : $urandom % 4;   // bank 3 uses bit 3
      apb_write(16'(4 * b), 32'(ws[b] << 4 | wcode));
      for (int i = 0; i < BANK_BYTES; i++) begin
        dev[b][i] = 8'($urandom);
        ref_mem[b][i] = dev[b][i];
      end
    end
    apb_read(16'h0004, rd);
    check("config readback", rd[1:0], 1);
    for (int k = 0; k < 600; k++) begin
      automatic int sz = $urandom % 3;
      automatic int n = 1 << sz;
      automatic int b = $urandom % 4;
      automatic int off = ($urandom % BANK_BYTES) & ~(n - 1);
      automatic bit wr = $urandom % 2;
      automatic logic [31:0] d = $urandom;
      automatic int b0 = beats;
      automatic int expect_beats = (n > width[b]) ? n / width[b] : 1;
      xfer(wr, sz, b, off, d, rd);
      if (wr) begin
        for (int i = 0; i < n; i++) ref_mem[b][off + i] = d[8 * ((off + i) % 4) +: 8];
      end else begin
        for (int i = 0; i < n; i++)
          check($sformatf("read bank %0d off %0d", b, off + i), rd[8 * ((off + i) % 4) +: 8], ref_mem[b][off + i]);
      end
      @(negedge clk);
      if (beats - b0 != expect_beats) beats_bad++;
    end
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < BANK_BYTES; i++)
        if (dev[b][i] !== ref_mem[b][i]) begin
          failures++;
          $display("FAIL device bank %0d byte %0d", b, i);
        end
    checks++;
    check("strobe length WS+1", strobe_bad, 0);
    check("beats per transfer", beats_bad, 0);
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
