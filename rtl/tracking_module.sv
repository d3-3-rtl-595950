// tracking_module: one SP1016BF tracking module (TM) with its beamformer.
// Per GPS sample (ce): the N_FE front-end samples are phase-rotated by the
// carrier phase plus their relative phases and combined (bf_channel) into
// composite I and Q; each is multiplied by the prompt code and by the
// half-chip early code, and the four products feed the correlators
// I_P, Q_P, I_EL, Q_EL (10-bit pre-accumulation, scaler, 16-bit
// accumulator). All four dump at every 1 ms C/A code epoch; dump_pulse
// marks new INTEGR values one clock after the epoch sample.
// meas_strobe latches the five measurements at once: code NCO phase,
// carrier NCO phase, carrier cycle count, C/A code phase (half chips) and
// the 1 ms / 20 ms epoch counts. A disabled TM holds its NCOs and
// correlators cleared. code_load restarts the C/A code with a new G2 state;
// slew_load delays it by slew_val chips. Structure per the document;
// epoch-aligned dump and the counter widths are this design's choices.
module tracking_module
  import gnss_pkg::*;
#(
  parameter int unsigned N_FE    = N_FE_DEF,
  parameter int unsigned PRE_LEN = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  tm_cfg_t           cfg,
  input  logic signed [2:0] if_val [N_FE],
  input  logic              code_load,
  input  logic [9:0]        g2_init,
  input  logic              slew_load,
  input  logic [10:0]       slew_val,
  input  logic              meas_strobe,
  output logic signed [15:0] integr_i_p,
  output logic signed [15:0] integr_q_p,
  output logic signed [15:0] integr_i_el,
  output logic signed [15:0] integr_q_el,
  output logic              dump_pulse,
  output logic              epoch,
  output logic              slewing,
  output tm_meas_t          meas
);
  localparam int unsigned SW = 6;

  logic        run, clr;
  logic [31:0] carr_phase, code_phase_nco, carr_cycles;
  logic        half_tick, code_p, code_el, half;
  logic [9:0]  chip;
  logic signed [SW-1:0] sum_i, sum_q;
  logic signed [SW-1:0] p_ip, p_qp, p_iel, p_qel;
  logic [4:0]  ep1_q;
  logic [15:0] ep20_q;

  assign clr = !cfg.enable;
  assign run = ce && cfg.enable;

  carrier_nco #(.W(32)) u_carr (
    .clk, .rst_n, .ce(run), .clr, .freq(cfg.carr_freq), .phase(carr_phase), .cycles(carr_cycles));

  code_nco #(.W(32)) u_code_nco (
    .clk, .rst_n, .ce(run), .clr, .freq(cfg.code_freq), .phase(code_phase_nco), .tick(half_tick));

  ca_code_gen u_ca (
    .clk, .rst_n, .load(code_load), .g2_init, .slew_load, .slew_val, .half_tick,
    .code_p, .code_el, .chip, .half, .epoch, .slewing);

  bf_channel #(.N_FE(N_FE), .SW(SW)) u_bf (
    .if_val, .carr_phase(carr_phase[31:28]), .rel_phase(cfg.rel_phase[4*N_FE-1:0]),
    .active(cfg.active_rf[N_FE-1:0]), .sum_i, .sum_q);

  // Code wipe-off: chip 0 is +1, chip 1 is -1.
  assign p_ip  = code_p  ? -sum_i : sum_i;
  assign p_qp  = code_p  ? -sum_q : sum_q;
  assign p_iel = code_el ? -sum_i : sum_i;
  assign p_qel = code_el ? -sum_q : sum_q;

  corr_accum #(.DW(SW), .PRE_LEN(PRE_LEN)) u_ip  (.clk, .rst_n, .ce(run), .clr, .din(p_ip),  .scale(cfg.scaler), .dump(epoch), .dump_val(integr_i_p));
  corr_accum #(.DW(SW), .PRE_LEN(PRE_LEN)) u_qp  (.clk, .rst_n, .ce(run), .clr, .din(p_qp),  .scale(cfg.scaler), .dump(epoch), .dump_val(integr_q_p));
  corr_accum #(.DW(SW), .PRE_LEN(PRE_LEN)) u_iel (.clk, .rst_n, .ce(run), .clr, .din(p_iel), .scale(cfg.scaler), .dump(epoch), .dump_val(integr_i_el));
  corr_accum #(.DW(SW), .PRE_LEN(PRE_LEN)) u_qel (.clk, .rst_n, .ce(run), .clr, .din(p_qel), .scale(cfg.scaler), .dump(epoch), .dump_val(integr_q_el));

  // 1 ms and 20 ms epoch counters.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ep1_q      <= '0;
      ep20_q     <= '0;
      dump_pulse <= 1'b0;
    end else begin
      dump_pulse <= epoch && run;
      if (clr || code_load) begin
        ep1_q  <= '0;
        ep20_q <= '0;
      end else if (epoch && run) begin
        if (ep1_q == 5'd19) begin
          ep1_q  <= '0;
          ep20_q <= ep20_q + 1'b1;
        end else begin
          ep1_q <= ep1_q + 1'b1;
        end
      end
    end
  end

  // Simultaneous measurement latch.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meas <= '0;
    end else if (meas_strobe) begin
      meas.code_nco_phase <= code_phase_nco;
      meas.carr_nco_phase <= carr_phase;
      meas.carr_cycles    <= carr_cycles;
      meas.code_phase     <= {chip, half};
      meas.epoch_1ms      <= ep1_q;
      meas.epoch_20ms     <= ep20_q;
    end
  end
endmodule
