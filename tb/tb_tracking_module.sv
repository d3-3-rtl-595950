// tb_tracking_module: one tracking module against a sample-by-sample
// reference model kept in the testbench (its own NCOs, a tap-method C/A
// code for PRN 1, the one-bit sin/cos of the carrier plus relative phase,
// 10-bit pre-accumulation over 16 samples, divide-by-2^SCALER and a
// saturating 16-bit sum). GPS samples arrive every other clock.
//  A: the front-ends carry the PRN 1 code itself (+3 for chip 0, -3 for
//     chip 1), carrier frequency 0, two front-ends on, SCALER=3: the
//     prompt in-phase correlation must be 255*(16*6>>3)+(12*6>>3) = 3069
//     for every epoch, besides matching the model.
//  B: random samples, random carrier frequency, relative phases, scaler.
// Every dump is compared, the dump period must be 4092 samples (1023 chips
// at 4 samples per chip), and a measurement strobe must latch the model's
// NCO phases, carrier cycles, code phase and epoch counts.
module tb_tracking_module;
  import gnss_pkg::*;
  localparam int N_FE = 9;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce = 0, code_load = 0, slew_load = 0, meas_strobe = 0;
  logic [9:0] g2_init = '0;
  logic [10:0] slew_val = '0;
  tm_cfg_t cfg = '0;
  logic signed [2:0] if_val [N_FE];
  logic signed [15:0] i_p, q_p, i_el, q_el;
  logic dump_pulse, epoch, slewing;
  tm_meas_t meas;
  tracking_module #(.N_FE(N_FE), .PRE_LEN(16)) dut (
    .clk, .rst_n, .ce, .cfg, .if_val, .code_load, .g2_init, .slew_load, .slew_val,
    .meas_strobe, .integr_i_p(i_p), .integr_q_p(q_p), .integr_i_el(i_el), .integr_q_el(q_el),
    .dump_pulse, .epoch, .slewing, .meas);
  `include "tb/tb_common.svh"
  always #5 clk = ~clk;

  bit ref_code [1023];
  function automatic int q1(real x);
    return (x >= 0.5) ? 1 : (x <= -0.5) ? -1 : 0;
  endfunction
  function automatic int fdiv(int v, int s);
    int d = 1 << s;
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction
  function automatic int sat(int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  // model state
  longint unsigned m_carr, m_code, m_cyc;
  int m_chip, m_half, m_ep1, m_ep20, m_cnt;
  int m_pre [4], m_acc [4], m_dump [4];
  int dumps, last_dump_sample, samples, period_bad;

  task automatic model_reset();
    m_carr = 0; m_code = 0; m_cyc = 0; m_chip = 0; m_half = 0; m_ep1 = 0; m_ep20 = 0; m_cnt = 0;
    for (int k = 0; k < 4; k++) begin m_pre[k] = 0; m_acc[k] = 0; end
  endtask

  // one GPS sample: returns 1 if it ends an epoch (dump)
  function automatic bit model_step();
    int si = 0, sq = 0, cp, ce_, prod [4];
    bit tick, ep;
    int ph = int'(m_carr >> 28);
    for (int f = 0; f < N_FE; f++) if (cfg.active_rf[f]) begin
      real a = 2.0 * 3.14159265358979 * ((ph + cfg.rel_phase[4*f +: 4]) % 16) / 16.0;
      si += if_val[f] * q1($cos(a));
      sq += if_val[f] * q1($sin(a));
    end
    cp  = ref_code[m_chip] ? -1 : 1;
    ce_ = (m_half == 1) ? (ref_code[(m_chip + 1) % 1023] ? -1 : 1) : cp;
    prod[0] = si * cp; prod[1] = sq * cp; prod[2] = si * ce_; prod[3] = sq * ce_;
    tick = ((m_code + cfg.code_freq) >> 32) != 0;
    ep = tick && m_half == 1 && m_chip == 1022;
    for (int k = 0; k < 4; k++) begin
      m_pre[k] += prod[k];
      if (ep || m_cnt == 15) begin
        m_acc[k] = sat(m_acc[k] + fdiv(m_pre[k], cfg.scaler));
        m_pre[k] = 0;
        if (ep) begin m_dump[k] = m_acc[k]; m_acc[k] = 0; end
      end
    end
    m_cnt = (ep || m_cnt == 15) ? 0 : m_cnt + 1;
    // advance
    if (((m_carr + cfg.carr_freq) >> 32) != 0) m_cyc++;
    m_carr = (m_carr + cfg.carr_freq) & 64'hFFFF_FFFF;
    m_code = (m_code + cfg.code_freq) & 64'hFFFF_FFFF;
    if (tick) begin
      if (m_half == 1) m_chip = (m_chip + 1) % 1023;
      m_half ^= 1;
    end
    if (ep) begin
      if (m_ep1 == 19) begin m_ep1 = 0; m_ep20++; end else m_ep1++;
    end
    return ep;
  endfunction

  logic [9:0] prn1_g2;
  task automatic setup_prn1();
    logic [9:0] g1 = '1, g2 = '1;
    for (int i = 0; i < 1023; i++) begin
      ref_code[i] = g1[9] ^ g2[1] ^ g2[5];
      g1 = {g1[8:0], g1[2] ^ g1[9]};
      g2 = {g2[8:0], g2[1] ^ g2[2] ^ g2[5] ^ g2[7] ^ g2[8] ^ g2[9]};
    end
    g2 = '1;   // G2 state delayed by 5 chips
    for (int i = 0; i < 1018; i++) g2 = {g2[8:0], g2[1] ^ g2[2] ^ g2[5] ^ g2[7] ^ g2[8] ^ g2[9]};
    prn1_g2 = g2;
  endtask

  int meas_checked = 0;
  // Runs n_epochs epochs; matched=1 makes the IF carry the prompt code.
  task automatic run(input bit matched, input int n_epochs, input int expect_ip);
    bit ep;
    int got_dumps = 0;
    @(negedge clk); cfg.enable = 0; code_load = 1; g2_init = prn1_g2;
    @(negedge clk); code_load = 0; cfg.enable = 1;
    model_reset();
    last_dump_sample = 0; samples = 0;
    while (got_dumps < n_epochs) begin
      longint mstate [6];
      // idle clock between samples
      ce = 0;
      #1 check("no epoch without a sample", epoch, 0);
      @(negedge clk);
      ce = 1;
      for (int f = 0; f < N_FE; f++)
        if_val[f] = matched ? (ref_code[m_chip] ? -3'sd3 : 3'sd3)
                            : 3'(2 * int'($urandom % 4) - 3);
      meas_strobe = (samples == 3000);
      mstate = '{longint'(m_code), longint'(m_carr), longint'(m_cyc), 2 * m_chip + m_half, m_ep1, m_ep20};
      ep = model_step();
      samples++;
      @(negedge clk);
      meas_strobe = 0;
      if (samples == 3001 && got_dumps == 0) begin
        check("meas code nco", meas.code_nco_phase, mstate[0]);
        check("meas carr nco", meas.carr_nco_phase, mstate[1]);
        check("meas carr cycles", meas.carr_cycles, mstate[2]);
        check("meas code phase", meas.code_phase, mstate[3]);
        check("meas epoch 1ms", meas.epoch_1ms, mstate[4]);
        check("meas epoch 20ms", meas.epoch_20ms, mstate[5]);
        meas_checked++;
      end
      if (ep) begin
        check("dump pulse", dump_pulse, 1);
        check("INTEGR_I_P", i_p, m_dump[0]);
        check("INTEGR_Q_P", q_p, m_dump[1]);
        check("INTEGR_I_EL", i_el, m_dump[2]);
        check("INTEGR_Q_EL", q_el, m_dump[3]);
        if (expect_ip != 0) check("matched I_P", i_p, expect_ip);
        if (samples - last_dump_sample != 4092) period_bad++;
        last_dump_sample = samples;
        got_dumps++;
        dumps++;
      end
    end
  endtask

  initial begin
    for (int f = 0; f < N_FE; f++) if_val[f] = 3'sd1;
    setup_prn1();
    repeat (2) @(negedge clk);
    rst_n = 1;
    // A: matched code
    cfg.code_freq = 32'h8000_0000;   // half chip every 2 samples
    cfg.carr_freq = 32'h0;
    cfg.active_rf = 9'b000010001;
    cfg.rel_phase = '0;
    cfg.scaler    = 2'd3;
    run(1, 3, 3069);
    // B: random signal and settings
    for (int r = 0; r < 3; r++) begin
      cfg.carr_freq = $urandom;
      cfg.active_rf = 9'($urandom);
      cfg.rel_phase = {4'($urandom), $urandom};
      cfg.scaler    = 2'($urandom);
      run(0, 2, 0);
    end
    check("dump period 4092 samples", period_bad, 0);
    check("measurement checked", meas_checked > 0, 1);
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
