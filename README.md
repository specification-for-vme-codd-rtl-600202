# CODD synchronisation: beam-locked Gate and BLR timing for closed-orbit acquisition

The PS closed-orbit system measures the beam position on 40 pick-ups with
integrators. An integrator needs two timing signals that follow the beam bunch
by bunch: an acquisition **Gate** around the bunch it measures, and a **Base
Line Restoration (BLR)** pulse between bunches. The RF signals the accelerator
distributes do not stay in phase with the bunches. This is especially true
through RF gymnastics, where the harmonic number changes and bunches are split
or merged. So the system makes its own synchronous frequency and realigns to a
real bunch whenever it has to.

This RTL models the whole digital chain in one synchronous design:

```
 PS-RF ──► RF phase shifter ─┐                           ┌── CAL-RF (C0..C100)
 PU signal ──────────────────┴─► reference mux ─► phase ─► DDS ─► f_b-RF ─┴─► f_synch ──┐
                                   (timing)      detector   ▲                          │
 B-train Up/Down ─► PDFP B-count ─► frequency table bank ───┘                          │
 PU amplitude ─► comparator ─► re-synchroniser ─► Synch-Trig ──────────────────────────┤
                                                                                       ▼
                          10 × Gate & BLR generator  (x16 loop, /16, /h, turn counter,
                                                       comparator + preset counter)
```

| File | Role |
|---|---|
| `rtl/codd_sync_top.sv` | the whole system: RF-Mux and Synchronizer, digital PLL, 10 generators |
| `rtl/gate_blr_generator.sv` | one Gate & BLR generator module |
| `rtl/vco_x16_pll.sv` | behavioural stand-in for the generator's analog x16 VCO loop |
| `rtl/bucket_timebase.sv`, `rtl/turn_selection.sv`, `rtl/gate_blr_channel.sv` | the generator's /16 and /h counters, turn counter, and comparator with preset counter |
| `rtl/rf_mux_synchronizer.sv` | the RF-Mux and Synchronizer module |
| `rtl/rf_timing.sv`, `rtl/rf_shifter.sv`, `rtl/int_rf_sources.sv`, `rtl/bunch_comparator.sv`, `rtl/resynchroniser.sv`, `rtl/output_logic.sv` | its parts |
| `rtl/phase_discriminator_adc.sv`, `rtl/dds.sv`, `rtl/pdfp.sv`, `rtl/pdfp_ctrl.sv` | the f_b-RF phase-locked loop and its frequency program |
| `rtl/codd_pkg.sv` | shared widths, Enable/Mask bit positions, and the generator register struct |

## Clocking model

Everything runs on one clock, `clk`, with a synchronous active-low reset
`rst_n`. Every RF signal (PS-RF, CAL-RF, PU, f_b-RF, f_synch) is a 1-bit level
sampled on `clk`, and every "edge" in the design is an edge detected on those
samples. Time resolution is therefore one `clk` cycle. The useful operating
range follows from that:

* f_synch needs at least 16 `clk` cycles per period, because each period is
  cut into 16 phase steps. 64 or more is better: the test benches use 64,
  which gives one 16 x f_synch tick every 4 cycles.
* The phase shifter delays in whole `clk` cycles. A step is 1/32 of the RF
  period only when `clk` is 32 times the RF.
* The DDS frequency word is `f / f_clk * 2^32`.

In real hardware these signals are analog or run on their own clocks. The
sampled model keeps the logic exact and simulates with plain Verilator.

## The Gate & BLR generator: how a bunch is found in time

This is the core of the design and the part that needs the most care.

A revolution is `h` buckets (RF periods), and each bucket is cut into 16
phase steps. So a revolution is `16·h` ticks of a clock at 16 × f_synch. With
`h ≤ 31`, any position in the revolution fits in 9 bits:

```
 bunch_phase[8:4] = bucket (0 .. h-1)       bunch_phase[3:0] = phase step (0 .. 15)
```

* **x16 loop** (`vco_x16_pll`). It produces the 16 × f_synch tick. The real
  module uses an analog VCO. The model instead measures each f_synch period
  in `clk` cycles and places 16 evenly spaced ticks over the next period.
  Tick 0 falls on the f_synch rising edge. `locked` rises after the first
  full period. When the f_synch frequency changes, for example when the
  source switches from calibration RF to f_b-RF, the first period is
  subdivided using the old measurement, so a few ticks of that period are
  lost or bunched up. The following periods are correct again.
* **/16 and /h** (`bucket_timebase`). A 4-bit phase counter steps on every
  tick. A bucket counter steps when the phase wraps and wraps after `h`
  buckets (`h = 0` counts 32). The Synch Trigger forces bucket 0, phase 0, so
  the revolution is aligned to the bunch the trigger was derived from.
  `rev_start` pulses on each wrap to bucket 0, but not on the trigger itself.
* **Turn selection** (`turn_selection`). A trigger clears a 16-bit turn
  counter and arms it. Enable/Mask bit 6 chooses the trigger: the Synch
  Trigger, or the External trigger. The revolution that starts at the trigger
  is turn 0. The counter saturates at 65535. The acquisition window is open
  for `Start ≤ turn < Stop`, so `Stop = Start + 2` acquires two turns.
* **Comparator and preset counter** (`gate_blr_channel`). On each tick the
  current `{bucket, phase}` is compared with `bunch_phase`. Mask bits at 1 make
  the matching bucket bits don't-care. A match loads a 6-bit counter with the
  length, and the output stays high until the counter has counted `length`
  ticks down. A pulse can therefore last up to 63/16 buckets.

  Each generator has two such channels, one for the BLR and one for the Gate.
  Each channel has its own 9-bit bunch phase and 6-bit length, and both share
  the bucket mask. The Gate channel fires only inside the turn window. The
  BLR channel fires on every turn, unless Enable/Mask bit 7 limits it to the
  window.

Enable/Mask register (16 bits, `codd_pkg::EM_*`):

| bits | meaning |
|---|---|
| 4:0 | bucket mask, 1 = ignore that bucket bit |
| 5 | output enable (both channels) |
| 6 | turn counter started by the External trigger instead of the Synch Trigger |
| 7 | BLR restricted to the turn window |
| 15:8 | unused |

Worked example (the one the top-level test bench uses). Take `h = 8` and an
f_synch period of 64 cycles, so one tick is 4 cycles and one revolution is
512 cycles.

* **A Gate module.** `mask_en = 0x0020`, `gate_phase = {3, 5}`,
  `gate_len = 20`, `Start = 2`, `Stop = 4`. It gives two gates of 80 cycles.
  The first starts about `(2·128 + 3·16 + 5)·4 = 1236` cycles after the Synch
  Trigger, and the second one revolution later.
* **A BLR module.** `mask_en = 0x003F` (all bucket bits ignored),
  `blr_phase = {0, 2}`, `blr_len = 4`. It gives one 16-cycle pulse in every
  bucket.

Timing detail: the comparison uses the counter value from before the tick, so
the output rises one tick-slot after the phase named in the register. This
offset is the same for every channel, so relative placement is exact.

In the crate, 10 such modules are used: 5 as BLR generators and 5 as Gate
generators. `codd_sync_top` instantiates all 10. Their register sets are given
as the `gen_regs` array of `codd_pkg::gen_regs_t`.

## The f_b-RF loop

* **PDFP** (`pdfp`). An up/down counter follows the B-train: one Up pulse
  adds 1, one Down pulse subtracts 1, and it saturates at 0 and at 65535. `c0`
  clears it, so the count starts at C0. The count, clamped to 1023,
  addresses the frequency table. The word read becomes the DDS frequency word.
* **PDFP controller** (`pdfp_ctrl`). The tables sit in 8 banks of 1024 × 32
  bits, one bank per particle type and harmonic. The crate CPU writes them
  through `tbl_wr_*`. `elft` makes `inj_bank` the active bank for the next
  cycle. Each of the 4 `bank_trig` inputs switches to the bank in its
  `bank_map` entry; this is the harmonic change at the start of RF
  gymnastics. If several triggers arrive together, the lowest-numbered one
  wins. Reads take one cycle.
* **Phase detector** (`phase_discriminator_adc`). A digital phase-frequency
  detector. It counts the cycles between a reference rising edge and the next
  f_b-RF rising edge, or the other way round. The signed result, positive
  when the reference leads, is the "ADC word". There is one word per RF
  period.
* **DDS** (`dds`). A 32-bit phase accumulator whose top bit is f_b-RF. It adds
  `ftw + P + I` each cycle, where:
  * `P = err·2^18` is replaced on each error word;
  * `I` accumulates `err·2^14`.

  For a 64-cycle RF period, one cycle of error corrects about a quarter of
  itself per period. The integrator absorbs a frequency-program error of
  several per mille. `pll_en = 0` opens the loop and clears both terms.

The loop locks to the shifted PS-RF during calibration. After injection it is
switched to the PU signal. If the phase shifter is set so that the shifted
PS-RF lines up with the PU signal, the switch causes no phase jump. The
top-level test bench checks this: the phase error stays at 0 cycles through
the switch.

## RF-Mux and Synchronizer

The source selection through one machine cycle (`rf_timing`):

| event | `calib` | PLL reference | f_synch |
|---|---|---|---|
| /Cal-Start (C0) | 1 | shifted PS-RF | CAL-RF (external, or internal if `int_cal`) |
| /Cal-Stop (C100) | 0 | shifted PS-RF | f_b-RF |
| injection trigger | 0 | PU signal, from the next RF rising edge | f_b-RF |

Software strobes `soft_start`, `soft_stop` and `soft_inj` do the same as the
timing inputs. `ss` replaces the PS-RF by the internal clock. `int_cal`
replaces CAL-RF by the internal calibration RF. Both exist for testing
without external signals (`int_rf_sources`: periods of 64 and 256 `clk`
cycles).

The other parts:

* **Phase shifter** (`rf_shifter`). It delays the PS-RF by `rf_phase + 1`
  cycles, using a 32-stage delay line.
* **Comparator** (`bunch_comparator`). It takes the pick-up amplitude as a
  signed 12-bit sample. With `pp = 0` it detects `pu_amp > threshold`; with
  `pp = 1` it detects `pu_amp < -threshold`.
* **Re-synchroniser** (`resynchroniser`). /Resynch (falling edge) or
  `soft_sync` arms it. The next detected bunch starts a count of DDS-RF
  rising edges, and on edge number `resynch_r` (counting from 0) it emits the
  Synch trigger. This realigns all generators to a surviving bunch after the
  gymnastics.
* **Output logic** (`output_logic`). It forms the module outputs:
  * Cal-RF: the selected calibration RF.
  * Cal-Trig: a pulse per /Cal-Gen falling edge.
  * Ext-Trig: a pulse per /Ext.Trig falling edge. It also drives the
    generators' External trigger.
  * ADC Trig: a pulse per detected bunch.
  * Synch-Trig: the re-synchroniser pulse, or, after an injection trigger,
    a pulse on the next DDS-RF rising edge.

## What is this design's own choice

The block structure, the register widths and counts, and the sequence of
operation follow the specification:

| item | value |
|---|---|
| harmonic number | 5 bits |
| bunch phase | 9 bits (5 + 4) |
| Gate/BLR length | 6 bits |
| Start and Stop | 16 bits |
| mask | 5 bits |
| RF phase shift | 5 bits |
| comparator threshold | 12 bits |
| re-synchronisation value | 6 bits |
| frequency-table banks | 8 |
| Gate & BLR generators | 10 |

The following were not specified and were chosen here:

* the single sampled clock domain and the digital forms of the analog parts:
  * the x16 VCO loop, the phase discriminator and ADC, and the
    DAC-and-comparator are digital or behavioural here;
  * the VCO model is a behavioural stand-in for an analog circuit and
    should be replaced by the real loop in hardware;
* the Enable/Mask bit layout beyond the 5 mask bits, and two channels per
  generator module;
* the meaning of the 6-bit re-synchronisation value (a count of DDS-RF
  periods after the bunch);
* the content of each Output Logic signal;
* the PI loop filter, the 32-bit DDS, the 1024-entry tables, the 16-bit
  B-count and the 4 bank triggers;
* configuration registers appear as plain ports. There is no VME slave
  interface, and no serial link between the PDFP controller and the PDFP:
  the link is a parallel read port.

Not modelled:

* the generator input labelled "BLR (8 bit)" in the block diagram, whose use
  is not described;
* the second DDS of the NIM crate, whose role is not described;
* the crate CPU, the TG8 timing generators, the burst generator, the remote
  reset module, the RF receiver and the RF distribution modules. Their
  signals are the top's ports.

## Simulating

Every test bench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/codd_pkg.sv tb/tb_codd_sync_top.sv --top-module tb_codd_sync_top
./obj_dir/Vtb_codd_sync_top
```

Give the package file first. `-y rtl` lets Verilator find each module in
`rtl/<name>.sv`. To run another test, change the test bench file and the top
name. Each block has one: `tb/tb_<module>.sv`.

`tb_codd_sync_top` runs one full machine cycle at the default parameters in a
few seconds:

1. The tables are programmed and the injection bank is selected at ELFT.
2. C0 starts calibration, with calibration pulses and the B-train.
3. The PLL locks to a PS-RF 0.5 % off its program.
4. C100 switches f_synch to the PLL output.
5. Injection moves the PLL to the PU signal and fires the Synch trigger.
6. The 5 BLR and 5 Gate modules run. One BLR module is switched off for two
   revolutions.
7. RF gymnastics, here a bunch splitting from h = 8 to h = 16:
   * a bank trigger loads a program at twice the frequency;
   * the beam signals double in frequency;
   * the generators are given h = 16 and the PLL relocks;
   * /Resynch realigns the generators on a bunch.

   The revolution stays 512 cycles. The test checks that the gates keep their
   turn spacing with buckets half as long, and that the BLR fires in all 16
   buckets.

The test counts each mechanism and fails if any one never happens.

`tb_pickup_sequences` exercises a Gate & BLR generator on the real
acquisition pattern. There are 40 pick-ups, in straight sections 0, 3, 5, 7,
10, … 97, and one revolution is 100 straight sections. A pick-up `d` sections
downstream of the first one therefore sees the bunch `d/100` of a revolution
later. Its gate setting is

```
offset = bunch·16 + floor(16·h·d / 100) ticks
{bucket, phase} = offset mod 16h,  Start = offset div 16h
```

The test places all 40 gates for each of three injection orders:

| injection | pick-up order | direction |
|---|---|---|
| Booster | 43, 45, 47 … 37, 40 | increasing sections |
| EPA e+ | 93, 95, 97 … 87, 90 | increasing sections |
| EPA e- | 73, 70, 67 … 77, 75 | decreasing sections |

It does this at h = 4, 7, 8, 10 and 16, 600 gates in all, and checks each
gate's start time and length and that the gates follow the beam order.

## How far it has been checked

* Every block passes its own test bench, and the full system passes the
  end-to-end test at the default parameters.
* Each test bench was also run against a deliberately broken copy of its
  module and reported failures.
* The RTL passes Verilator lint with `-Wall`. The only remaining notices are
  for package constants a given module does not use. It also elaborates in
  Yosys (slang front end). Yosys also synthesises it: about 1,230 flip-flops, with
  the 256 Kbit table memory kept as a memory.

Nothing has been checked against the real modules or against measured beam
signals. The parts that stand in for analog hardware only reproduce its
function.
