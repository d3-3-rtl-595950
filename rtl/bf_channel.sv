// bf_channel: pre-correlation beamformer of one tracking channel.
// Each of the N_FE front-end samples goes through its own phase rotator
// whose phase is the channel carrier phase plus that front-end's relative
// phase (4 bits, modulo 16). Front-ends switched off in the ACTIVE_RF_INPUT
// mask contribute 0. The I and Q outputs of the enabled rotators are summed
// into one composite, already carrier-wiped stream (|sum| <= 3*N_FE).
// Combinational; registering is left to the correlators that follow.
module bf_channel #(
  parameter int unsigned N_FE = 9,
  parameter int unsigned SW   = 6    // sum width, holds +-3*N_FE
) (
  input  logic signed [2:0]    if_val [N_FE],
  input  logic [3:0]           carr_phase,
  input  logic [4*N_FE-1:0]    rel_phase,
  input  logic [N_FE-1:0]      active,
  output logic signed [SW-1:0] sum_i,
  output logic signed [SW-1:0] sum_q
);
  logic signed [2:0] ri [N_FE];
  logic signed [2:0] rq [N_FE];

  for (genvar f = 0; f < N_FE; f++) begin : g_rot
    phase_rotator u_rot (
      .if_val(if_val[f]),
      .phase (carr_phase + rel_phase[4*f +: 4]),
      .i_o   (ri[f]),
      .q_o   (rq[f])
    );
  end

  always_comb begin
    sum_i = '0;
    sum_q = '0;
    for (int f = 0; f < N_FE; f++) begin
      if (active[f]) begin
        sum_i = sum_i + SW'(ri[f]);
        sum_q = sum_q + SW'(rq[f]);
      end
    end
  end
endmodule
