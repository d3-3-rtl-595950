// tb_sp1016bf: the correlation unit with 4 tracking modules, programmed
// over APB. All nine front-ends carry the PRN 1 code (+3 for chip 0, -3 for
// chip 1) at 4 samples per chip, one GPS sample every other clock.
//  TM0: PRN 1, all front-ends, SCALER=3 -> I_P = 255*(432>>3)+(324>>3) = 13810
//  TM1: PRN 2 (cross-correlation) -> |I_P| small
//  TM2: PRN 1, only front-end 0 with relative phase 180 deg, SCALER=0
//       -> I_P = -(255*48+36) = -12276
//  TM3: disabled -> no new data
// Also checks: new-data status and its clearing, ACC_INT every
// ACC_PERIOD+1 samples, MEAS_INT every second ACC period with the
// measured code phase, front-end power bits, clock division field and the
// antenna-ok status bit.
module tb_sp1016bf;
  import gnss_pkg::*;
  localparam int N_TM = 4, N_FE = 9;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, gps_ce = 0, antenna_ok = 1;
  logic [N_FE-1:0] if_sgn = '0, if_mag = '1, fe_p0, fe_p1;
  logic [2:0] gps_div;
  logic acc_int, meas_int, meas_strobe;
  apb_req_t apb_req = '0;
  apb_rsp_t apb_rsp;
  sp1016bf #(.N_TM(N_TM), .N_FE(N_FE)) dut (
    .clk, .rst_n, .apb_req, .apb_rsp, .gps_ce, .if_sgn, .if_mag, .antenna_ok,
    .gps_div, .fe_p0, .fe_p1, .acc_int, .meas_int, .meas_strobe);
  `include "tb/tb_common.svh"
  `include "tb/apb_tasks.svh"
  always #5 clk = ~clk;

  bit prn1 [1023];
  function automatic logic [9:0] g2_state(input int d);
    logic [9:0] g2 = '1;
    for (int i = 0; i < 1023 - d; i++)
      g2 = {g2[8:0], g2[1] ^ g2[2] ^ g2[5] ^ g2[7] ^ g2[8] ^ g2[9]};
    return g2;
  endfunction
  function automatic logic [15:0] ch(input int t, input int r);
    return 16'(12'h800 + t * 12'h80 + r * 4);
  endfunction

  // sample bookkeeping and IF stimulus
  int s = 0;
  logic run;
  assign run = (gps_div == 3'd3);   // GCTRL written with run and division field together
  int acc_edges [$];
  int meas_edges [$];
  logic acc_d = 0, meas_d = 0;
  always @(posedge clk) begin
    if (gps_ce && run) s <= s + 1;
    acc_d <= acc_int; meas_d <= meas_int;
    if (rst_n && acc_int && !acc_d) acc_edges.push_back(s);
    if (rst_n && meas_int && !meas_d) meas_edges.push_back(s);
  end
  always @(negedge clk) begin
    int idx;
    gps_ce <= ~gps_ce;
    idx = (s + (run ? 1 : 0)) / 4 % 1023;
    if_sgn <= {N_FE{prn1[idx]}};
  end

  initial begin
    logic [31:0] rd;
    logic [9:0] g1 = '1, g2 = '1;
    for (int i = 0; i < 1023; i++) begin
      prn1[i] = g1[9] ^ g2[1] ^ g2[5];
      g1 = {g1[8:0], g1[2] ^ g1[9]};
      g2 = {g2[8:0], g2[1] ^ g2[2] ^ g2[5] ^ g2[7] ^ g2[8] ^ g2[9]};
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      apb_write(ch(t, 2), 32'h8000_0000);            // CODE_FREQ
      apb_write(ch(t, 1), 32'h0);                    // CARR_FREQ
      apb_write(ch(t, 3), 32'(g2_state(t == 1 ? 6 : 5)));
      apb_write(ch(t, 0), 32'h1);
    end
    apb_write(ch(0, 5), 32'h1FF); apb_write(ch(0, 6), 32'd3);
    apb_write(ch(1, 5), 32'h1FF); apb_write(ch(1, 6), 32'd3);
    apb_write(ch(2, 5), 32'h001); apb_write(ch(2, 6), 32'd0);
    apb_write(ch(2, 7), 32'h0000_0008);               // FE0 phase 8 = 180 deg
    apb_read(ch(2, 7), rd);
    check("phase readback", rd, 8);
    apb_write(16'h0004, 32'd1999);                   // ACC every 2000 samples
    apb_write(16'h0008, 32'd1);                      // MEAS every 2nd ACC
    apb_write(16'h0010, 32'h2AAAA);                  // FE power: P1 set
    check("fe_p1", fe_p1, 9'h1FF);
    check("fe_p0", fe_p0, 9'h0);
    apb_write(16'h0000, 32'h0000_0331);              // run, div field 3, both irqs
    check("gps_div", gps_div, 3);
    // first epoch
    do apb_read(16'h000C, rd); while (!rd[0]);
    repeat (4) @(negedge clk);
    apb_read(16'h000C, rd);
    check("new data TM0..2, not TM3", rd[3:0], 4'b0111);
    check("antenna ok", rd[18], 1);
    apb_read(ch(0, 9), rd);  check("TM0 I_P", $signed(rd), 13810);
    apb_read(ch(0, 10), rd); check("TM0 Q_P", $signed(rd), 0);
    apb_read(ch(2, 9), rd);  check("TM2 I_P", $signed(rd), -12276);
    apb_read(ch(1, 9), rd);  check("TM1 cross-corr small", $signed(rd) < 1000 && $signed(rd) > -1000, 1);
    apb_write(16'h000C, 32'h0003_FFFF);              // clear all status
    apb_read(16'h000C, rd);
    check("status cleared", rd[17:0], 0);
    do apb_read(16'h000C, rd); while (!rd[0]);
    repeat (4) @(negedge clk);
    apb_read(ch(0, 9), rd);  check("TM0 I_P epoch 2", $signed(rd), 13810);
    apb_read(ch(2, 9), rd);  check("TM2 I_P epoch 2", $signed(rd), -12276);
    // ACC / MEAS timing (pending bits were cleared once in between)
    wait (s > 16100);
    check("acc edges", acc_edges.size() >= 2, 1);
    check("meas edges", meas_edges.size() >= 1, 1);
    if (meas_edges.size() >= 1) check("first MEAS at sample 4000", meas_edges[0], 4000);
    if (acc_edges.size() >= 1) check("first ACC at sample 2000", acc_edges[0], 2000);
    apb_read(ch(0, 16), rd);
    check("TM0 code phase at MEAS (half chips)", rd, (16000 - 1) % 4092 / 2);
    apb_read(ch(0, 17), rd);
    check("TM0 1 ms epochs at MEAS", rd[4:0], (16000 - 1) / 4092);
    apb_read(16'h000C, rd);
    check("acc and meas pending", rd[17:16], 2'b11);
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
