# TX UI aligner: phase monitoring and alignment for a transceiver transmitter

In a timing-distribution network the clock travels inside the data stream. Each
node recovers it and sends it on, so every transmitter must send its data in a
fixed phase to its reference clock. The AMD transceiver transmitter does not
guarantee that. Its serializer divides the serial clock down to the parallel
clock **XCLK**, for example by 40 for 9.6 Gb/s data on a 240 MHz word clock.
Data and XCLK always keep the same phase to each other. But on every TX reset
the divider restarts in an arbitrary state. XCLK, and the data with it, then
sits a different whole number *n* of unit intervals (UI, one serial bit time)
away from the reference clock **TxRef**. For picosecond-level timing this
jump has to be undone after every reset.

This design does so in the FPGA fabric, in two parts:

1. A **DDMTD** (digital dual mixer time difference) phase detector measures
   the XCLK-to-TxRef phase with sub-picosecond resolution.
2. The transmitter's own **phase interpolator** (TxPI) moves XCLK and the data
   back. It steps in UI/64 through the transceiver's DRP (dynamic
   reconfiguration port), and each correction is *n* x 64 steps.

It needs access to XCLK. It does not use the transmit buffer's status flag,
and the transmit buffer stays in use.

```
             clk_dmtd (n/(n+1) x f_TxRef, from a PLL)
                 |
 TxRef --+--> [sampler]--[deglitcher]--pulse_a--+
         |                                       +--[counter]--[averager]--> phase count
 XCLK ---|--> [sampler]--[deglitcher]--pulse_b--+                 |   \
 (from   |                                                         |    [phase_conv] --> phase in fs
  GT)    |                                                         v
         |                                         [ui_aligner_fsm: count -> PI steps,
         |                                          n = round(error / 64), n x 64 steps]
         |                                                         |
         |                                                [drp_controller: RMW of PI code]
         |                                                         |
         +---------------------- transceiver (TX PI, serializer) <-+ DRP
```

The top module `tx_ui_aligner` also holds `rx_comma_aligner`, with its own
clock and ports. It does the word alignment that the receiving end of such a
link performs on 8b10b commas.

## How the DDMTD measures phase

The offset clock `clk_dmtd` runs at f_dmtd = n/(n+1) · f_in. Each sampling
edge therefore lands T_in/n later in the input's cycle than the one before.
When an input clock is used as *data* and sampled on `clk_dmtd`, the result
is a slow square wave, the **beat**. Its period is (n+1) input periods, which
is n offset-clock cycles. A delay d of the input moves the beat's edge by
d · n / T_in offset-clock cycles, so the phase is magnified n times. An
ordinary counter can then measure it.

* `ddmtd_sampler` is the mixer flop followed by one more flop, giving the mixer
  time to resolve when it goes metastable. The same sampler is used for both
  channels, so its latency cancels.
* `ddmtd_deglitcher`: when the two edges almost coincide, jitter makes the
  sampled beat toggle several times before it settles. The deglitcher accepts
  a new level only after the raw beat has held it for `GLITCH_THR`
  consecutive cycles. The transition it keeps is therefore the *last* one of
  the burst, delayed by a constant that is the same in both channels. It emits
  a one-cycle pulse per accepted rising edge and counts the rejected
  transitions.
* `ddmtd_counter` runs one free-running counter and captures it on both
  channels' pulses. Its phase output is the number of cycles from the TxRef
  pulse to the XCLK pulse, between 0 and n-1. It also measures the beat
  period, from TxRef pulse to TxRef pulse, which equals n. This lets the rest
  of the design work without knowing the clock ratio.
* `ddmtd_averager` averages 2^`AVG_LOG2` samples (16 by default) to smooth
  out jitter and metastability. The phase is circular: with XCLK close to
  the TxRef edge, samples alternate between about 0 and about n-1. Each sample
  is therefore unwrapped against the first one before it is summed, and the
  rounded mean is folded back into [0, n).
* `ddmtd_phase_conv` converts a count to time:
  t = count · (f_in − f_dmtd)/(f_in · f_dmtd) = count · T_in / n. The factor
  comes from the two real-valued frequency parameters at elaboration. It is
  applied as one fixed-point multiplication with 16 fraction bits, and the
  output is in femtoseconds. At the defaults (240 MHz, n = 16383) one count
  is 254.3 fs.

One raw sample takes one beat period. With n = 16383 at 240 MHz that is
68 µs, so one averaged measurement takes about 1.1 ms. Resolution and
measurement time trade against each other through n, which is fixed by the
PLL that makes `clk_dmtd`, not by the RTL. `CNT_W` only has to exceed
log2(n), and `GLITCH_THR` has to be longer than a glitch burst (roughly
peak-to-peak jitter / (T_in/n)) but well below n/2.

## How the alignment controller decides

`ui_aligner_fsm` runs this sequence:

| state   | what happens |
|---------|--------------|
| IDLE    | Wait for `enable` and the transceiver's TX reset done. |
| SETTLE  | Throw away `SETTLE_SAMPLES` raw samples that may straddle the last change. |
| MEASURE | Wait for one averaged count. |
| COMPUTE | phase_steps = round(avg · XCLK_UI · 64 / period), using a 29-cycle sequential divider. err is the circular difference phase_steps − `target_steps`, within ±half an XCLK period. n = round(err / 64). |
| SHIFT   | Request \|n\| · 64 single PI steps: down if XCLK is late (n > 0), up if it is early. Then go back to SETTLE. |
| LOCKED  | n = 0: `aligned` is high. Keep measuring. |

Only whole UI are corrected. A reset moves XCLK by whole UI only, so the part
of the phase below one UI is a fixed property of the board and is left alone.
The controller therefore holds the phase to within half a UI of
`target_steps`, and the same after every reset.

`target_steps` is a calibration value of the installation, in PI steps from
0 to XCLK_UI·64 − 1. A natural choice is the `phase_steps` read at the first
alignment. Its part below one UI (`target_steps` mod 64) should match the
board's fixed sub-UI phase. If the target sits half a UI away from that
phase, the true phase is on the rounding boundary of n, and measurement noise
decides which of the two neighbouring UI the controller locks to. The
resulting phase is then not deterministic.

Behaviour while LOCKED:

* If a later measurement shows n ≠ 0, `aligned` drops.
* With `auto_realign` set, a new correction starts and `realigns` counts it.
* With `auto_realign` clear, the controller only reports the error in
  `ui_offset` and keeps monitoring.
* If `MAX_ITER` corrections in a row do not reach n = 0, `fail` is set. This
  happens, for example, if the PI does not respond. The controller then waits
  until `tx_resetdone` or `enable` goes low.

One UI of correction costs 64 DRP read-modify-writes. That is about 10 cycles
each with a 3-cycle DRP, so a 20 UI correction takes some 13 k cycles,
negligible next to one measurement.

## PI stepping over the DRP

`drp_controller` turns each step request into a read of the DRP register
that holds the PI code. It then adds or subtracts `STEP` (1) in the `PI_W`-bit
field at `PI_LSB`, modulo 2^PI_W because the interpolator is circular, and
writes the word back with all other bits unchanged. It follows the usual
DRP handshake: a one-cycle `en` (with `we`, `addr` and `di`) answered by a
one-cycle `rdy` (with `dout`), with one access outstanding at a time.
Assertions check that rule. A step costs 4 cycles plus twice the DRP
latency. If the transceiver does not answer within `TIMEOUT` cycles, the step
is abandoned and the sticky `error` is set.

**The register address, field position and width (`PI_ADDR` = 0x09C,
`PI_LSB` = 0, `PI_W` = 7) are placeholders.** Set them from the DRP
attribute map of the transceiver family in use, together with whatever
override enables that family needs for DRP control of the TX PI. The sign
convention (PI code up means XCLK later) must also be checked on hardware. If
it is the other way round, swap `PI_UP`/`PI_DOWN` in `ui_aligner_pkg`.

## Receiver word alignment

`rx_comma_aligner` takes 40-bit words of a deserialised stream whose bit
offset is unknown. It shifts them one bit at a time, through a barrel
shifter over the last two words, until an 8b10b comma sits at bit
`COMMA_POS`. The comma is K28.5 of either running disparity, and the earliest
bit is at bit 0.

* In search, it tries each offset for `FRAME_WORDS` words before slipping one
  more bit.
* Once locked, it checks one comma per frame. After `LOSS_THR` misses in a
  row it searches again.
* The output word is delayed by one register.

## Top-level interface (`tx_ui_aligner`)

All transmitter-side logic, the DRP included, runs on `clk_dmtd` with a
synchronous, active-high `rst`. `clk_txref` and `clk_xclk` are only sampled.
`tx_resetdone` is synchronised with two flops. The DRP is clocked by
`clk_dmtd`, so `clk_dmtd` must be within the transceiver's DRP clock limit.

| port | dir | meaning |
|------|-----|---------|
| `clk_dmtd`, `rst` | in | offset clock (n/(n+1) of TxRef); reset |
| `clk_txref`, `clk_xclk` | in | reference clock; serializer parallel clock from the transceiver |
| `tx_resetdone`, `enable`, `auto_realign` | in | transceiver TX reset done; start alignment; correct jumps seen while locked |
| `target_steps[12:0]` | in | wanted XCLK-TxRef phase in PI steps |
| `drp_req` / `drp_rsp` | out/in | DRP request struct {en, we, addr[9:0], di[15:0]} and response {rdy, dout[15:0]} (see `ui_aligner_pkg`) |
| `state`, `aligned`, `fail`, `drp_error` | out | controller state and status |
| `phase_cnt`, `phase_cnt_valid`, `period_cnt` | out | averaged DDMTD count and beat period (n) |
| `phase_fs`, `phase_fs_valid` | out | averaged phase in femtoseconds, for monitoring |
| `phase_steps`, `ui_offset`, `pi_code` | out | phase in PI steps, last n found, current PI code |
| `steps_done`, `realigns`, `corrections`, `glitches_ref`, `glitches_xclk`, `unwrapped` | out | counters for monitoring |
| `clk_rx`, `rst_rx`, `rx_data_raw[39:0]` | in | receiver word clock, reset, unaligned words |
| `rx_data[39:0]`, `rx_aligned`, `rx_slip`, `rx_slips` | out | aligned words, lock, current bit offset, slip count |

## Parameters, and where their values come from

| parameter | default | origin |
|-----------|---------|--------|
| `PI_STEPS_PER_UI` | 64 | PI resolution of UI/64, as in the method |
| `XCLK_UI` (also `rx_comma_aligner.W`) | 40 | 9.6 Gb/s on a 240 MHz word clock, as in the method |
| `F_IN_HZ` | 240e6 | same example |
| `F_DMTD_HZ` | 240e6 · 16383/16384 | chosen here (n = 16383). Only affects `phase_fs`. |
| `CNT_W` | 16 | chosen; must exceed log2(n) |
| `AVG_LOG2` | 4 (16 samples) | chosen; averaging is required, the count is not given |
| `GLITCH_THR` | 64 | chosen |
| `SETTLE_SAMPLES`, `MAX_ITER` | 2, 8 | chosen |
| `PI_ADDR`, `PI_LSB`, `PI_W` | 0x09C, 0, 7 | placeholders, see above |
| `DRP_TIMEOUT` | 1024 | chosen |
| `COMMA`, `FRAME_WORDS`, `LOSS_THR` | K28.5, 1, 4 | chosen |

Also this design's own choices:

* the deglitcher's hold-time rule
* measuring the beat period and unwrapping before averaging
* the divider-based conversion to PI steps
* single-step DRP writes
* the monitoring and `fail` behaviour
* running everything on `clk_dmtd`

The DDMTD structure (sampler, deglitcher keeping the last transition,
counter, averaging, the count-to-time formula) and the correction in n x 64
PI steps follow the published method.

## What is not here

* **The transceiver itself** (serializer, clock dividers, PI, DRP slave) is
  vendor hard IP. `tb/gt_tx_model.sv` is a behavioural stand-in. XCLK is
  TxRef delayed by a fixed path delay, plus a random whole number of UI drawn
  at each TX reset, plus the PI offset, with optional jitter.
* **The PLL/MMCM** that makes `clk_dmtd` and the external reference clock
  chip are not modelled as logic. The testbenches generate those clocks
  directly.
* The TX-buffer-status aligner and buffer bypass are alternative ways to
  reach the same goal and are not part of this design.
* Measuring the transmitted *data* against TxRef is a laboratory measurement,
  outside the design.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_ddmtd_sampler` | Output is the input two offset-clock edges earlier. Beat period is n = 1024 cycles with half duty. |
| `tb_ddmtd_deglitcher` | Random glitch bursts before each edge. One rise per edge, at the exact expected cycle. Every short pulse counted. |
| `tb_ddmtd_counter` | Phase and period with a wrapping 12-bit counter, coincident pulses included. |
| `tb_ddmtd_averager` | Means, rounding, unwrapping across 0/n−1 (including runs whose unwrapped mean is negative), timing of `avg_valid`. |
| `tb_ddmtd_phase_conv` | Count to femtoseconds against the formula, within 2 fs. |
| `tb_ddmtd` | Real clocks (n = 1024), ±6 ps jitter. Averaged count within 2 counts of d·n/T_in for six delays, including both sides of the wrap. |
| `tb_drp_controller` | 300 random steps with random DRP latency. Field arithmetic modulo 128, other bits kept, one read and one write per step, exact cycle count, timeout. |
| `tb_ui_aligner_fsm` | Numeric plant: 7 UI late, 13 UI early across the wrap, jumps while locked with and without auto-realign, a stuck PI leading to `fail` and its clearing. |
| `tb_rx_comma_aligner` | Comma-framed random stream at three bit offsets. Lock, correct slip, word-exact output, loss of lock after 4 misses. |
| `tb_tx_ui_aligner` | Whole design at default parameters against `gt_tx_model` (details below). |

`tb_tx_ui_aligner` runs with TxRef at 240.31 MHz, n = 16383 and ±1 ps of
jitter on TxRef and XCLK:

* Four TX resets with random UI offsets. After each one, the true XCLK phase
  is identical, step for step, to the one after the first lock.
* Injected ±UI jumps, with automatic realignment on and off.
* The receiver aligner on a stream cut at a 7-bit offset.
* It checks that each mechanism (glitch rejection, unwrapping, PI up and
  down, correction, lock, realignment, monitoring drop, receiver slips)
  actually happened.

It takes about 10 s of wall time for 24 ms of simulated time.

`tb_tx_resets_workload` repeats the TX reset 1000 times, with the top at its
default parameters. To keep this run short, the offset clock is set to
n = 1024 (4.07 ps per count). After every reset it checks four things:

* the aligner locks;
* the true XCLK phase equals the phase after the first lock, to the PI step;
* the measured phase is within half a UI of the target;
* the averaged count varies by at most 2 counts across resets.

It also checks that at least 30 of the 40 UI offsets occurred. This run
takes under two minutes.

The transceiver model puts edges exactly where the PI code says. These tests
therefore show that the logic always lands on the same PI code and UI. They
do not reproduce the picosecond-level spread of real silicon.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/ui_aligner_pkg.sv tb/tb_tx_ui_aligner.sv --top-module tb_tx_ui_aligner
./obj_dir/Vtb_tx_ui_aligner
```

Replace the testbench name to run another one. The testbenches use
femtosecond time precision (`timeprecision 1fs`), because PI steps are
about 1.6 ps. `-Wno-fatal` is needed only because the behavioural clock
models use delays computed at run time.
