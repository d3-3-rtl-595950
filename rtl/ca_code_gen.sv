// ca_code_gen: GPS C/A (Gold) code generator with code slew.
// Two 10-stage LFSRs: G1 (feedback from stages 3 and 10, starting all ones)
// and G2 (feedback 2,3,6,8,9,10) whose start state g2_init (bit k holds
// stage k+1) selects the
// satellite: loading the G2 state that corresponds to a PRN's code delay
// serves GPS as well as WAAS/EGNOS ranging codes. The chip is G1[10]^G2[10]
// (0 means +1, 1 means -1).
// The generator steps on half-chip ticks from the code NCO. code_p is the
// prompt chip; code_el is the same code half a chip earlier (during the
// second half of a chip it already shows the next chip, G1[9]^G2[9]).
// chip counts 0..1022 and epoch pulses, combinationally with the tick that
// ends chip 1022, i.e. on the last sample of each 1 ms code period.
// A slew request of N chips holds the code for N chip periods, delaying
// the replica by N chips. load restarts the code at chip 0.
module ca_code_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [9:0]  g2_init,
  input  logic        slew_load,
  input  logic [10:0] slew_val,
  input  logic        half_tick,
  output logic        code_p,
  output logic        code_el,
  output logic [9:0]  chip,
  output logic        half,
  output logic        epoch,
  output logic        slewing
);
  logic [10:1] g1, g2;
  logic [10:0] slew_cnt;
  logic        chip_end;

  assign slewing  = (slew_cnt != '0);
  assign chip_end = half_tick && half;
  assign epoch    = chip_end && !slewing && (chip == 10'd1022);
  assign code_p   = g1[10] ^ g2[10];
  assign code_el  = half ? (g1[9] ^ g2[9]) : code_p;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g1       <= '1;
      g2       <= '1;
      chip     <= '0;
      half     <= 1'b0;
      slew_cnt <= '0;
    end else if (load) begin
      g1       <= '1;
      g2       <= g2_init;   // bit 9 is stage 10, bit 0 is stage 1
      chip     <= '0;
      half     <= 1'b0;
      slew_cnt <= '0;
    end else begin
      if (slew_load) slew_cnt <= slew_val;
      if (half_tick) begin
        half <= ~half;
        if (chip_end) begin
          if (slewing) begin
            if (!slew_load) slew_cnt <= slew_cnt - 1'b1;
          end else begin
            g1   <= {g1[9:1], g1[3] ^ g1[10]};
            g2   <= {g2[9:1], g2[2] ^ g2[3] ^ g2[6] ^ g2[8] ^ g2[9] ^ g2[10]};
            chip <= (chip == 10'd1022) ? '0 : chip + 1'b1;
          end
        end
      end
    end
  end
endmodule
