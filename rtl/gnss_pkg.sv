// gnss_pkg: types and constants shared by the SY1031BF baseband blocks.
// The APB bus is carried as two packed structs (request from the master,
// response from a slave) so that every peripheral has the same two ports.
// The channel register bundle of a tracking module and its latched
// measurements are structs too. Sizes N_TM=16 and N_FE=9 follow the
// document; the register layout is this design's own.
package gnss_pkg;

  localparam int unsigned N_TM_DEF = 16;  // tracking modules
  localparam int unsigned N_FE_DEF = 9;   // antenna / RF front-end inputs
  localparam int unsigned APB_AW   = 16;  // APB address width

  typedef struct packed {
    logic [APB_AW-1:0] paddr;
    logic              psel;
    logic              penable;
    logic              pwrite;
    logic [31:0]       pwdata;
  } apb_req_t;

  typedef struct packed {
    logic [31:0] prdata;
    logic        pready;
    logic        pslverr;
  } apb_rsp_t;

  // Per-channel configuration written by software.
  typedef struct packed {
    logic        enable;      // TM active
    logic [31:0] carr_freq;   // carrier NCO phase increment per sample
    logic [31:0] code_freq;   // code NCO increment per sample (wrap = half chip)
    logic [8:0]  active_rf;   // ACTIVE_RF_INPUT: front-end on/off mask
    logic [1:0]  scaler;      // SCALER: 00 /1, 01 /2, 10 /4, 11 /8
    logic [35:0] rel_phase;   // 9 x 4-bit front-end relative phase
  } tm_cfg_t;

  // Measurements latched on a MEAS strobe.
  typedef struct packed {
    logic [31:0] code_nco_phase;
    logic [31:0] carr_nco_phase;
    logic [31:0] carr_cycles;
    logic [10:0] code_phase;  // half-chip index 0..2045
    logic [4:0]  epoch_1ms;   // 0..19
    logic [15:0] epoch_20ms;
  } tm_meas_t;

  // Helper: one APB write strobe.
  function automatic logic apb_wr(apb_req_t r);
    return r.psel && r.penable && r.pwrite;
  endfunction

endpackage
