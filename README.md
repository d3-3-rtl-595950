# SY1031BF: GPS baseband with pre-correlation beamforming

A GPS receiver normally correlates the signal of one antenna. This baseband
takes up to nine antennas. Each antenna has its own RF front-end that
delivers 2-bit IF samples. Each of the 16 tracking channels forms its
own beam from them before correlating. Per channel, software chooses:

- which front-ends take part;
- a relative phase for each front-end;
- a scaling factor that keeps the sum inside the fixed-width correlators.

So every satellite can be tracked with its own antenna pattern. For example,
one channel can steer towards a satellite while another cancels an
interferer from a different direction.

This RTL holds the correlation unit (SP1016BF, 16 tracking modules and 64
correlators) and the SoC logic around it:

- on-chip SRAM and the external bus interface on an AHB-lite port;
- timers and watchdog, interrupt controller, RTC, GPIO, two UARTs, SPI and
  power-mode control on an APB port.

The SPARC CPU is not included. Its AHB-lite and APB master sides are ports of
the top, `sy1031bf_top`.

## The beamforming datapath

One tracking module (`tracking_module`) handles one GPS sample per
enable pulse, `gps_ce`. A sample goes through these stages:

1. **IF decode** (`if_decode`). Sign and magnitude become a signed value:
   `SGN=0,MAG=1` gives +3, `0,0` gives +1, `1,0` gives -1 and `1,1`
   gives -3. For a 1-bit front-end, tie MAG high.
2. **Phase rotation** (`phase_rotator`, `sincos_lut`). Each front-end's
   rotator phase is `carrier_phase[31:28] + rel_phase[f]`, taken modulo 16.
   The 16-entry sine and cosine tables hold only -1, 0 and +1, so the
   "multiplier" is a negate-or-zero. I is IF×cos and Q is IF×sin. Each is
   a 3-bit signed value in ±3.
3. **Combination** (`bf_channel`). The front-ends enabled in
   ACTIVE_RF_INPUT are summed. Disabled ones contribute zero. With nine
   inputs the sum stays within ±27 (6 bits).
4. **Code wipe-off.** The composite I and Q are each multiplied by the
   prompt code and by a second code replica. That gives four products:
   I_P, Q_P, I_EL and Q_EL.
5. **Correlation** (`corr_accum`, one per product):
   - A 10-bit pre-accumulator sums 16 samples (16 × 27 fits in 10 bits).
   - The per-channel scaler (`bf_scaler`) divides that sum by 1, 2, 4
     or 8 (SCALER 0..3).
   - A 16-bit accumulator adds the result, saturating instead of wrapping.

   At every 1 ms code epoch the partial pre-accumulation is flushed. The four
   accumulators are then dumped into INTEGR_I_P, INTEGR_Q_P, INTEGR_I_EL and
   INTEGR_Q_EL. The channel's new-data flag is set.

Nine steered antennas give up to nine times the single-antenna amplitude.
The scaler exists for this: with SCALER = log2(number of enabled inputs),
a full beam uses roughly the range of a single antenna.

### Tracking loop hardware

- **Carrier NCO** (`carrier_nco`). A 32-bit phase accumulator advanced by
  CARR_FREQ per sample. Its top 4 bits drive the rotators. Each wrap
  increments a 32-bit carrier cycle counter.
- **Code NCO** (`code_nco`). A 32-bit accumulator advanced by CODE_FREQ.
  Each wrap is one *half* chip, so the NCO runs at twice the chip rate.
  For 1.023 Mchip/s at a sample rate fs, set
  CODE_FREQ = 2 × 1.023e6 / fs × 2^32.
- **C/A generator** (`ca_code_gen`). The GPS Gold code generator:
  - G1 uses taps 3 and 10. G2 uses taps 2, 3, 6, 8, 9 and 10.
  - The satellite is chosen by writing the 10-bit G2 initial state (bit k =
    stage k+1), so any GPS or SBAS PRN can be loaded without a table.
    Writing G2_INIT restarts the code at chip 0.
  - The second replica, used for the `_EL` correlators, is the code half a
    chip early.
  - Writing SLEW holds the code for that many chips, delaying it, which is
    how software scans code phase.
  - The chip counter (0..1022) produces the 1 ms epoch. An epoch counter
    (0..19) produces the 20 ms epoch.

### Measurements

On a measurement strobe, every channel latches five values in the same
clock:

- code NCO phase;
- carrier NCO phase;
- carrier cycle count;
- code phase in half chips (`{chip, half}`);
- the epoch counts: 1 ms count in bits 4:0, 20 ms count in bits 31:16.

Latching all channels on one strobe is what lets software form
pseudoranges that belong together.

## Clocking and interrupts of the correlation unit

Everything runs on one clock, SYS_CLK. The GPS processing clock is a
pulse-deleted SYS_CLK that keeps one pulse in 1..8. Here it is built as a
clock enable, `gps_ce`, from `gps_clkgen`, rather than as a gated clock. The
same factor divides SYS_CLK into `gps_ref_clk`, the reference clock sent to
the RF front-ends. A new factor takes effect at the next period boundary.
The correlation unit's own register interface also runs on SYS_CLK; there
is no separate bus clock.

There are two interrupts:

- **ACC_INT** becomes pending every ACC_PERIOD+1 GPS samples. It is the
  interrupt software must serve to read the correlations.
- **MEAS_INT** becomes pending on every (MEAS_DIV+1)-th ACC_INT. The same
  event is the measurement strobe.

Both interrupts have enable bits and write-1-to-clear pending bits in STATUS.
The interrupt controller sees them as lines 10 and 11.

Note that the correlators dump on their own 1 ms code epochs, not on ACC_INT.
Software reads INTEGR_* when the new-data flag of a channel is set. To see
every dump, ACC_PERIOD must be shorter than 1 ms of samples.

### Correlation unit registers (APB page 0)

| Address | Register | Contents |
|---|---|---|
| 0x000 | GCTRL | [0] run, [6:4] clock division − 1, [8] ACC_INT enable, [9] MEAS_INT enable |
| 0x004 | ACC_PERIOD | GPS samples per ACC_INT − 1 (reset 3999) |
| 0x008 | MEAS_DIV | ACC periods per MEAS_INT − 1 |
| 0x00C | STATUS | [15:0] new INTEGR per channel, [16] ACC pending, [17] MEAS pending, [18] antenna ok; write 1 to clear |
| 0x010 | FE_PWR | two power-mode bits per front-end, driven on `fe_p0`/`fe_p1` |

Channel c is at 0x800 + c×0x80:

| Offset | Register | Offset | Register |
|---|---|---|---|
| 0x00 | CTRL [0] enable | 0x24 | INTEGR_I_P |
| 0x04 | CARR_FREQ | 0x28 | INTEGR_Q_P |
| 0x08 | CODE_FREQ | 0x2C | INTEGR_I_EL |
| 0x0C | G2_INIT (restarts code) | 0x30 | INTEGR_Q_EL |
| 0x10 | SLEW (chips) | 0x34 | code NCO phase |
| 0x14 | ACTIVE_RF_INPUT (9 bits) | 0x38 | carrier NCO phase |
| 0x18 | SCALER (2 bits) | 0x3C | carrier cycles |
| 0x1C | PHASE_LO: 4-bit phase of FE0..7 | 0x40 | code phase (half chips) |
| 0x20 | PHASE_HI: phase of FE8 | 0x44 | epochs {20 ms, 1 ms} |

A disabled channel keeps its NCOs and correlators cleared.

## System

`sy1031bf_top` defaults to 16 channels, 9 front-ends and 64 kB SRAM.

**APB map.** Pages are selected by `paddr[15:12]`:

| Page | Block | Page | Block |
|---|---|---|---|
| 0 | correlation unit | 5 | UART1 (16-byte FIFOs) |
| 1 | timers + watchdog | 6 | external bus bank settings |
| 2 | interrupt controller | 7 | SPI |
| 3 | RTC | 8 | UART2 (4-byte FIFOs) |
| 4 | GPIO | 9 | power control |

**AHB map.**

- 0x0000_0000–0x03FF_FFFF: external memory, four 16 MB banks selected by
  `haddr[25:24]`.
- 0x4000_0000: the on-chip SRAM, mirrored up to 0x7FFF_FFFF.
- Any other address completes at once and reads zero.

The decoder keeps the data-phase selection and feeds the combined HREADY
back to both slaves.

**Interrupt lines.**

| Line | Source | Line | Source |
|---|---|---|---|
| 2 | UART1 | 8, 9 | timers |
| 3 | SPI | 10 | ACC_INT |
| 4, 5 | external inputs | 11 | MEAS_INT |
| 6 | UART2 | 12 | RTC wake-up |

### Peripherals

All APB slaves have zero wait states.

- **`ahb_sram`.** Zero-wait-state AHB-lite memory with byte, halfword
  and word writes. It is written as a byte-lane array, so a synthesis tool
  can map it onto an SRAM macro.
- **`ahb_ebi`.** Asynchronous memory interface.
  - Each bank's register holds its width in [1:0] (0 = 8, 1 = 16,
    2 = 32 bits) and its wait states in [7:4]. The reset value is 32 bits
    with 15 wait states, the safe setting for booting from a slow device.
  - An access wider than the bank is split into beats; a word from an 8-bit
    bank takes four.
  - Each beat drives address, chip select, byte enables and OE or WE for
    WS+1 clocks, then one recovery clock.
  - `mem_a` is a byte address. 8-bit devices use `mem_d[7:0]` and 16-bit
    devices `mem_d[15:0]`.
- **`apb_timers`.** A 10-bit prescaler feeding two 24-bit timers
  (periodic or one-shot, interrupt on underflow) and a 24-bit watchdog
  (`watchdog`). The watchdog holds the `wdog` output until it is reloaded.
- **`irq_ctrl`.** 15 sources, each with one of two priority levels.
  - A rising edge or a software force sets a pending bit.
  - `irl` is the highest pending, unmasked source. Level 1 comes first,
    then the higher number.
  - The CPU's acknowledge clears the pending bit.
- **`apb_rtc`.** A 30-bit seconds counter driven by ticks of the 32768 Hz
  oscillator, plus an alarm register whose match raises a wake-up.
- **`apb_gpio`.** 8 bits with a data-out and a direction register.
  Inputs pass a two-flop synchroniser. A fourth register, ALTERNATE, hands
  single pads to UART2 and the SPI. The pad multiplexer in the top uses
  this assignment:

  | Pad | Function | Direction |
  |---|---|---|
  | 0 | UART2 TX | out |
  | 1 | UART2 RX | in |
  | 2 | SPI SCLK | out as master, in as slave |
  | 3 | SPI MOSI | out as master, in as slave |
  | 4 | SPI MISO | in as master, out as slave |
  | 5 | SPI CS0 | out as master; slave-select input as slave |
  | 6 | SPI CS1 | out as master |

  A pad whose ALTERNATE bit is clear stays under GPIO control. Pad 7 is
  always GPIO.
- **`apb_uart`.** Used twice. Frames are 8N1, with a programmable bit
  time (SCALER+1 clocks per bit) and receive/transmit FIFOs. The status
  register reports overrun and frame errors.
- **`apb_spi`.** Master with two slave selects, or slave, in SPI mode 0,
  MSB first, with 16-byte FIFOs.
  - As master, the chip select stays low over back-to-back bytes.
  - As slave, the inputs are synchronised, so the slave's SCLK must stay
    below SYS_CLK/8. The slave sends 0xFF when it has nothing queued.
- **`power_ctrl`.** This block and the RTC run from the power-on reset
  `rst_n`; everything else is reset by `sys_rst_n`.
  - Writing HALT drops `cpu_clk_en`, the enable for an external CPU clock
    gate. Any interrupt level raises it again.
  - Writing SLEEP drops `core_pwr_on` and holds `sys_rst_n` low. An RTC or
    external wake-up turns power back on, releases reset after 16 clocks and
    records the cause.

## Departures and open points

- **Rotator phase.** The carrier phase is added into each rotator's
  phase, so the rotators are also the carrier mixer. There are no separate
  carrier multipliers after the beamformer. This keeps one 16-step table
  per front-end and matches the table's role as the carrier mixer.
- **Scaler direction.** The scaler is taken as a divider (arithmetic
  shift right). Scaling up would only make overflow worse.
- **Choices of this design.** These are not fixed by the source:
  - pre-accumulation length (16) and the dump on the code epoch;
  - accumulator saturation;
  - the second code replica being half a chip *early*;
  - slew as a hold;
  - all register layouts and addresses;
  - interrupt numbers;
  - SPI mode and UART frame format;
  - EBI strobe timing;
  - the reboot reset length;
  - the GPIO pad assignment of UART2 and SPI.
- **Not built:**
  - the CPU (third-party) and the I2C master (only named);
  - per-peripheral clock on demand (only the CPU clock stop exists);
  - the fifth EBI bank on GPIO pins;
  - the debug-UART use of the UART1 lines (the debug unit belongs to the CPU);
  - Galileo signals: only GPS and SBAS C/A codes are generated.
- **Pad-level signals.** Tristate buses and clock gates are left to the
  pad ring and clock tree. The top has separate `_o`, `_i` and `_oe`
  signals and clock *enables*.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

- The IF-path testbenches compare against a floating-point sin/cos model.
- `tb_ca_code_gen` checks PRNs against the shift-and-add property of Gold
  codes: each PRN equals G1 XOR a delayed G2.
- `tb_tracking_module` runs a sample-by-sample reference model of the
  whole channel.
- `tb_sy1031bf_top` runs the full default-sized design. It:
  - steers a beam onto a synthetic satellite on one channel and cancels it
    on another;
  - checks ACC_INT and MEAS_INT spacing through the interrupt controller;
  - exercises every peripheral, the external memory (a 16-bit device
    model) and the power modes;
  - counts each mechanism, and fails if any never happened.

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -I. -y rtl -y tb rtl/gnss_pkg.sv tb/tb_sy1031bf_top.sv --top-module tb_sy1031bf_top
./obj_dir/Vtb_sy1031bf_top
```

Replace the testbench name for any other block. `tb/tb_common.svh` and
`tb/apb_tasks.svh` hold the shared check and APB tasks.
