// tb_ca_code_gen: the reference C/A code is built the classic way, G1
// XOR two taps of G2 (PRN 1: taps 2,6; PRN 7: taps 1,8; PRN 19: taps 3,6),
// whose code delay is 5, 139 and 471 chips. The testbench finds the G2 start state for
// that delay by stepping a G2 register itself, loads it and compares one
// full period (1023 chips) of prompt and half-chip early code. It checks
// the first ten chips of PRN 1 (octal 1440), the epoch pulse spacing of
// 2046 half-chip ticks, the code phase counter, and that a slew of S chips
// delays the code by S chips.
module tb_ca_code_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, slew_load = 0, half_tick = 0;
  logic [9:0] g2_init = '0;
  logic [10:0] slew_val = '0;
  logic code_p, code_el, half, epoch, slewing;
  logic [9:0] chip;
  ca_code_gen dut (.clk, .rst_n, .load, .g2_init, .slew_load, .slew_val, .half_tick,
                   .code_p, .code_el, .chip, .half, .epoch, .slewing);
  `include "tb/tb_common.svh"
  always #5 clk = ~clk;

  bit ref_code [1023];

  // Reference code by the tap method; stage k of a register is bit k-1.
  task automatic make_ref(input int ta, input int tb);
    logic [9:0] g1 = '1, g2 = '1;
    for (int i = 0; i < 1023; i++) begin
      ref_code[i] = g1[9] ^ g2[ta-1] ^ g2[tb-1];
      g1 = {g1[8:0], g1[2] ^ g1[9]};
      g2 = {g2[8:0], g2[1] ^ g2[2] ^ g2[5] ^ g2[7] ^ g2[8] ^ g2[9]};
    end
  endtask
  // G2 state whose stage-10 output is G2 delayed by d chips.
  function automatic logic [9:0] g2_state(input int d);
    logic [9:0] g2 = '1;
    for (int i = 0; i < 1023 - d; i++)
      g2 = {g2[8:0], g2[1] ^ g2[2] ^ g2[5] ^ g2[7] ^ g2[8] ^ g2[9]};
    return g2;
  endfunction

  task automatic tick();
    @(negedge clk); half_tick = 1;
    @(negedge clk); half_tick = 0;
  endtask

  int epochs, last_ep, ep_gap_bad;
  int htick_count = 0;
  always @(posedge clk) begin
    if (half_tick) htick_count++;
    if (epoch) begin
      if (epochs > 0 && htick_count - last_ep != 2046) ep_gap_bad++;
      last_ep = htick_count;
      epochs++;
    end
  end

  initial begin
    int taps [3][2] = '{'{2, 6}, '{1, 8}, '{3, 6}};
    int dly  [3]    = '{5, 139, 471};
    int bad_p, bad_e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      make_ref(taps[s][0], taps[s][1]);
      @(negedge clk); load = 1; g2_init = g2_state(dly[s]);
      @(negedge clk); load = 0;
      if (s == 0) begin
        int first10 = 0;
        for (int i = 0; i < 10; i++) first10 = (first10 << 1) | int'(ref_code[i]);
        check("PRN1 first chips octal 1440", first10, 'o1440);
      end
      bad_p = 0; bad_e = 0;
      epochs = 0; ep_gap_bad = 0;
      for (int i = 0; i < 1023 * 3; i++) begin
        #1;
        if (code_p !== ref_code[i % 1023]) bad_p++;
        if (chip != 10'(i % 1023)) bad_p++;
        if (code_el !== ref_code[i % 1023]) bad_e++;
        tick();
        #1;
        if (code_p !== ref_code[i % 1023]) bad_p++;
        if (code_el !== ref_code[(i + 1) % 1023]) bad_e++;
        tick();
      end
      check($sformatf("prompt code mismatches set %0d", s), bad_p, 0);
      check($sformatf("early code mismatches set %0d", s), bad_e, 0);
      check("epochs in 3 periods", epochs, 3);
      check("epoch spacing", ep_gap_bad, 0);
    end
    // slew by 37 chips: code then lags the reference by 37 chips
    @(negedge clk); slew_load = 1; slew_val = 11'd37;
    @(negedge clk); slew_load = 0;
    bad_p = 0;
    for (int i = 0; i < 37; i++) begin
      if (!slewing) bad_p++;
      tick(); tick();
    end
    check("slewing during slew", bad_p, 0);
    check("slew finished", slewing, 0);
    bad_p = 0;
    for (int i = 0; i < 200; i++) begin
      #1 if (code_p !== ref_code[i % 1023]) bad_p++;
      tick(); tick();
    end
    check("code after slew", bad_p, 0);
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
