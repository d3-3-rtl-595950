// sp1016bf: GPS correlation unit with pre-correlation beamforming.
// N_TM tracking modules share the N_FE front-end inputs. The 2-bit IF
// samples are decoded and registered once per GPS sample (gps_ce, the
// pulse-deleted clock) and fed to every TM, each of which forms its own
// beam (front-end mask, per-front-end relative phase, scaler) before
// correlating. Software reaches all of it through an APB slave (zero wait
// states; prdata is combinational from registers):
//   global   (paddr[11]=0, word index paddr[6:2])
//     0 GCTRL   [0] run, [6:4] GPS clock division-1, [8] ACC_INT enable,
//               [9] MEAS_INT enable
//     1 ACC_PERIOD  GPS samples per ACC_INT period minus 1 (24 bits)
//     2 MEAS_DIV    ACC periods per MEAS_INT minus 1 (8 bits)
//     3 STATUS  [15:0] new-INTEGR flag per TM, [16] ACC_INT pending,
//               [17] MEAS_INT pending, [18] antenna ok; write 1 to clear
//     4 FE_PWR  two power-mode bits per front-end (bits 2f+1:2f)
//   channel c (paddr[11]=1, c=paddr[10:7], word index paddr[6:2])
//     0 CTRL [0] enable   1 CARR_FREQ   2 CODE_FREQ
//     3 G2_INIT (write restarts the code)   4 SLEW (write starts a slew)
//     5 ACTIVE_RF_INPUT   6 SCALER   7 PHASE_LO (FE0..7)  8 PHASE_HI (FE8)
//     9..12 INTEGR_I_P, INTEGR_Q_P, INTEGR_I_EL, INTEGR_Q_EL
//     13..17 MEAS code NCO phase, carrier NCO phase, carrier cycles,
//            code phase in half chips, epochs {20 ms[31:16], 1 ms[4:0]}
// ACC_INT becomes pending every ACC_PERIOD+1 GPS samples; every
// (MEAS_DIV+1)-th of those also latches the measurements of all TMs in the
// same clock and sets MEAS_INT pending. fe_p0/fe_p1 gather the two power
// bits of all front-ends. The register names ACTIVE_RF_INPUT, SCALER and
// INTEGR_* are the document's; addresses and other layout are this
// design's own.
module sp1016bf
  import gnss_pkg::*;
#(
  parameter int unsigned N_TM    = N_TM_DEF,
  parameter int unsigned N_FE    = N_FE_DEF,
  parameter int unsigned PRE_LEN = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  apb_req_t        apb_req,
  output apb_rsp_t        apb_rsp,
  input  logic            gps_ce,
  input  logic [N_FE-1:0] if_sgn,
  input  logic [N_FE-1:0] if_mag,
  input  logic            antenna_ok,
  output logic [2:0]      gps_div,
  output logic [N_FE-1:0] fe_p0,
  output logic [N_FE-1:0] fe_p1,
  output logic            acc_int,
  output logic            meas_int,
  output logic            meas_strobe
);
  // ---------------- IF input ----------------
  logic signed [2:0] if_dec [N_FE];
  logic signed [2:0] if_q   [N_FE];
  for (genvar f = 0; f < N_FE; f++) begin : g_if
    if_decode u_dec (.sgn(if_sgn[f]), .mag(if_mag[f]), .val(if_dec[f]));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      if_q[f] <= 3'sd1;
      else if (gps_ce) if_q[f] <= if_dec[f];
    end
  end

  // ---------------- registers ----------------
  tm_cfg_t     cfg_q      [N_TM];
  logic [9:0]  g2_q       [N_TM];
  logic [10:0] slew_q     [N_TM];
  logic        code_load  [N_TM];
  logic        slew_load  [N_TM];
  logic [31:0] gctrl_q;
  logic [23:0] acc_period_q, acc_cnt_q;
  logic [7:0]  meas_div_q, meas_cnt_q;
  logic [N_TM-1:0] newdata_q, dump_pulse;
  logic        acc_pend_q, meas_pend_q;
  logic [2*N_FE-1:0] fe_pwr_q;

  logic signed [15:0] i_p [N_TM], q_p [N_TM], i_el [N_TM], q_el [N_TM];
  tm_meas_t    meas     [N_TM];

  logic        wr, is_ch, acc_tick, meas_tick, run;
  logic [3:0]  ch;
  logic [4:0]  widx;

  assign wr    = apb_wr(apb_req);
  assign is_ch = apb_req.paddr[11];
  assign ch    = apb_req.paddr[10:7];
  assign widx  = apb_req.paddr[6:2];
  assign run   = gctrl_q[0];

  assign gps_div  = gctrl_q[6:4];
  for (genvar f = 0; f < N_FE; f++) begin : g_pwr
    assign fe_p0[f] = fe_pwr_q[2*f];
    assign fe_p1[f] = fe_pwr_q[2*f+1];
  end
  assign acc_int  = acc_pend_q  && gctrl_q[8];
  assign meas_int = meas_pend_q && gctrl_q[9];

  // ACC / MEAS interval timing, in GPS samples.
  assign acc_tick    = run && gps_ce && (acc_cnt_q == acc_period_q);
  assign meas_tick   = acc_tick && (meas_cnt_q == meas_div_q);
  assign meas_strobe = meas_tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gctrl_q      <= '0;
      acc_period_q <= 24'd3999;
      meas_div_q   <= '0;
      acc_cnt_q    <= '0;
      meas_cnt_q   <= '0;
      acc_pend_q   <= 1'b0;
      meas_pend_q  <= 1'b0;
      newdata_q    <= '0;
      fe_pwr_q     <= '0;
      for (int t = 0; t < N_TM; t++) begin
        cfg_q[t]  <= '0;
        g2_q[t]   <= 10'h3FF;
        slew_q[t] <= '0;
      end
    end else begin
      // interval counters
      if (!run) begin
        acc_cnt_q  <= '0;
        meas_cnt_q <= '0;
      end else if (gps_ce) begin
        if (acc_tick) begin
          acc_cnt_q  <= '0;
          meas_cnt_q <= meas_tick ? '0 : meas_cnt_q + 1'b1;
        end else begin
          acc_cnt_q <= acc_cnt_q + 1'b1;
        end
      end
      // status bits: set by hardware, cleared by writing 1
      for (int t = 0; t < N_TM; t++) begin
        if (dump_pulse[t]) newdata_q[t] <= 1'b1;
        else if (wr && !is_ch && widx == 5'd3 && apb_req.pwdata[t]) newdata_q[t] <= 1'b0;
      end
      if (acc_tick) acc_pend_q <= 1'b1;
      else if (wr && !is_ch && widx == 5'd3 && apb_req.pwdata[16]) acc_pend_q <= 1'b0;
      if (meas_tick) meas_pend_q <= 1'b1;
      else if (wr && !is_ch && widx == 5'd3 && apb_req.pwdata[17]) meas_pend_q <= 1'b0;

      if (wr && !is_ch) begin
        unique case (widx)
          5'd0: gctrl_q      <= apb_req.pwdata;
          5'd1: acc_period_q <= apb_req.pwdata[23:0];
          5'd2: meas_div_q   <= apb_req.pwdata[7:0];
          5'd4: fe_pwr_q     <= apb_req.pwdata[2*N_FE-1:0];
          default: ;
        endcase
      end
      if (wr && is_ch && 32'(ch) < N_TM) begin
        unique case (widx)
          5'd0: cfg_q[ch].enable    <= apb_req.pwdata[0];
          5'd1: cfg_q[ch].carr_freq <= apb_req.pwdata;
          5'd2: cfg_q[ch].code_freq <= apb_req.pwdata;
          5'd3: g2_q[ch]            <= apb_req.pwdata[9:0];
          5'd4: slew_q[ch]          <= apb_req.pwdata[10:0];
          5'd5: cfg_q[ch].active_rf <= apb_req.pwdata[8:0];
          5'd6: cfg_q[ch].scaler    <= apb_req.pwdata[1:0];
          5'd7: cfg_q[ch].rel_phase[31:0]  <= apb_req.pwdata;
          5'd8: cfg_q[ch].rel_phase[35:32] <= apb_req.pwdata[3:0];
          default: ;
        endcase
      end
    end
  end

  // one-cycle command strobes (act on the value being written)
  always_comb begin
    for (int t = 0; t < N_TM; t++) begin
      code_load[t] = wr && is_ch && (32'(ch) == t) && (widx == 5'd3);
      slew_load[t] = wr && is_ch && (32'(ch) == t) && (widx == 5'd4);
    end
  end

  // ---------------- tracking modules ----------------
  for (genvar t = 0; t < N_TM; t++) begin : g_tm
    tracking_module #(.N_FE(N_FE), .PRE_LEN(PRE_LEN)) u_tm (
      .clk, .rst_n,
      .ce         (gps_ce && run),
      .cfg        (cfg_q[t]),
      .if_val     (if_q),
      .code_load  (code_load[t]),
      .g2_init    (apb_req.pwdata[9:0]),
      .slew_load  (slew_load[t]),
      .slew_val   (apb_req.pwdata[10:0]),
      .meas_strobe(meas_tick),
      .integr_i_p (i_p[t]),
      .integr_q_p (q_p[t]),
      .integr_i_el(i_el[t]),
      .integr_q_el(q_el[t]),
      .dump_pulse (dump_pulse[t]),
      .epoch      (),
      .slewing    (),
      .meas       (meas[t])
    );
  end

  // ---------------- read mux ----------------
  logic [31:0] rdata;
  always_comb begin
    rdata = '0;
    if (!is_ch) begin
      unique case (widx)
        5'd0: rdata = gctrl_q;
        5'd1: rdata = 32'(acc_period_q);
        5'd2: rdata = 32'(meas_div_q);
        5'd3: rdata = 32'({antenna_ok, meas_pend_q, acc_pend_q, 16'(newdata_q)});
        5'd4: rdata = 32'(fe_pwr_q);
        default: rdata = '0;
      endcase
    end else if (32'(ch) < N_TM) begin
      unique case (widx)
        5'd0:  rdata = 32'(cfg_q[ch].enable);
        5'd1:  rdata = cfg_q[ch].carr_freq;
        5'd2:  rdata = cfg_q[ch].code_freq;
        5'd3:  rdata = 32'(g2_q[ch]);
        5'd4:  rdata = 32'(slew_q[ch]);
        5'd5:  rdata = 32'(cfg_q[ch].active_rf);
        5'd6:  rdata = 32'(cfg_q[ch].scaler);
        5'd7:  rdata = cfg_q[ch].rel_phase[31:0];
        5'd8:  rdata = 32'(cfg_q[ch].rel_phase[35:32]);
        5'd9:  rdata = 32'(i_p[ch]);
        5'd10: rdata = 32'(q_p[ch]);
        5'd11: rdata = 32'(i_el[ch]);
        5'd12: rdata = 32'(q_el[ch]);
        5'd13: rdata = meas[ch].code_nco_phase;
        5'd14: rdata = meas[ch].carr_nco_phase;
        5'd15: rdata = meas[ch].carr_cycles;
        5'd16: rdata = 32'(meas[ch].code_phase);
        5'd17: rdata = {meas[ch].epoch_20ms, 11'd0, meas[ch].epoch_1ms};
        default: rdata = '0;
      endcase
    end
  end

  assign apb_rsp.prdata  = rdata;
  assign apb_rsp.pready  = 1'b1;
  assign apb_rsp.pslverr = 1'b0;
endmodule
