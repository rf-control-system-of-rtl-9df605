# Digital RF control for a heavy-ion medical synchrotron

A synchrotron for cancer therapy (helium to argon ions, 100-800 MeV/u, a
129.8 m ring at harmonic number 4) needs an accelerating RF that sweeps from
about 1 MHz to 8 MHz while the dipole field ramps. The beam intensity can be
anywhere from 10^7 to 10^11 particles per pulse. Here the RF comes from a
direct digital synthesizer (DS) driven by a 20-bit frequency word, 10 Hz per
LSB. The logic in this repository computes that word from two things:

* a **programmed frequency pattern**, read from memory. During acceleration
  the memory pointer is stepped by the magnet's field pulses (B-clock), so
  the frequency follows the real field, not a clock;
* two **beam feedback corrections**, recomputed every 2 us from the beam
  monitors. One corrects radial position (dR, proportional + integral). The
  other corrects beam phase (dphi, proportional only) and damps
  synchrotron oscillations.

The same memory module also holds the patterns for the accelerating voltage,
the ferrite bias, the radial-position bias and a voltage correction. Those go
to the analog RF chain.

The structure follows the published description of the HIMAC RF control
system. That description is detailed about the block structure and the
numbers (widths, rates, sizes). It gives no ROM contents, register maps or
handshakes. Where this design had to choose, the choice is stated below and
in each file's header.

## Block map

```
                 cycle_start, timing registers
                          |
                    +-----v------+  T-clock 50 kHz, capture,
                    | timing_gen |  acc. start, flat top
                    +-----+------+------------------+
                          | fb_on                   |
 computer writes ---------|-------------+   B+/B- -+|
                          |             |          ||
                          |       +-----v----------vv-----------------+
                          |       | memory_module                     |
                          |       |  pattern_seq (one shared pointer) |
                          |       |  pattern_mem x5 (A/B units)       |
                          |       +--+-------+-------------------------+
                          |          | f     | dR bias     Vo, ferrite, Vcor -> ports
  ADC words  -------------v----------v-------v--+
  (dR1,dR2,dphi1,dphi2,   | digital_low_level   |----> ds_freq (20 bit) to the DS
   beam intensity)        +---------------------+
```

`digital_low_level` contains:

```
dR1,dR2 -> mon_input -> fb_ctrl (PI, USE_INT=1) -+
                          ^ beam_cmp (dR thr)    |
                                                 +-> freq_out -> ds_freq
dphi1,dphi2 -> mon_input -> fb_ctrl (P, USE_INT=0) -+        ^ f REF
                          ^ beam_cmp (dphi thr)
trig_seq: sample, TRIG1..TRIG4 for all of the above
```

| file | role |
|---|---|
| `rf_pkg.sv` | widths, types, saturating arithmetic, the computed gain "ROM" |
| `trig_seq.sv` | 20-clock sample frame, ADC strobe and TRIG1..TRIG4 |
| `mon_input.sv` | two gain ROMs, sum, 5-sample averager, TRIG1 latch |
| `beam_cmp.sv` | beam intensity >= threshold, per loop |
| `soft_start.sv` | 4-bit ramp counter switching a loop in and out (~90 us) |
| `fb_ctrl.sv` | bias (REF - x), soft-start scaling, Kp, integrator + Ki, TRIG3 latch |
| `freq_out.sv` | dR + dphi, plus frequency pattern, TRIG4 latch to the DS |
| `digital_low_level.sv` | the complete loop circuit |
| `pattern_seq.sv` | the pattern pointer and its three regions |
| `pattern_mem.sv` | one pattern: two 128k x 20 units, flat-top smoothing |
| `memory_module.sv` | five patterns, host interface, bank switching |
| `timing_gen.sv` | 50 kHz T-clock and cycle events |
| `rf_control_top.sv` | everything wired together |

## The sample frame: where the 2 us goes

All loop arithmetic runs on the 10 MHz clock, paced by a 20-clock frame
(`trig_seq`). One ADC conversion per frame gives the 2 us sample period.
Within a frame:

| slot | strobe | what happens |
|---|---|---|
| 0  | `sample` | ADC words enter the input stage (gain ROMs, averager history); beam comparators and soft-start counters step |
| 2  | `trig1`  | input value latched (mon_dr / mon_dp) |
| 6  | `trig2`  | integrator of the dR loop accumulates |
| 10 | `trig3`  | loop outputs latched (corr_dr / corr_dp) |
| 19 | `trig4`  | 20-bit word latched to the DS |

The DS word built from one set of ADC words appears exactly 20 clocks after
the `sample` strobe rises. That is the 2 us processing delay the system was
specified with. The strobe slots 2/6/10 are this design's own. Any
increasing order works, since each stage only needs the previous latch to
be stable. `ds_load` (TRIG4) tells the DS interface that a new word follows
on the next clock.

## The feedback loops

Per frame, for each loop (`fb_ctrl`):

```
err   = REF - x                  x = latched monitor value, 12-bit
err_s = err * cnt / 15           cnt = soft-start counter 0..15
p     = sat(err_s * Kp / 8)
acc   = sat(acc + err_s)         dR loop only, at TRIG2
i     = sat(acc * Ki / 8)
y     = sat(p + i)               at TRIG3
ds    = clamp(f_pattern + sat(y_dR + y_dphi), 0, 2^20-1)   at TRIG4
```

All words are 12-bit two's complement (the monitors deliver 11 bits plus
sign) and all sums saturate.

* **Gain ROMs.** The original circuit uses ROMs addressed by a data word
  and a 4-bit setting. Their contents are not published. Here every such
  ROM is the computed product `x*k/8`: k = 8 is unity, 0 is off and 15 is
  1.875. The same function serves the two input-channel ROMs of
  `mon_input`. Replace `rf_pkg::rom_gain` to change the law everywhere.
* **Bias.** The radial reference is normally the position-bias pattern from
  memory. `dr_ref_sel = 0` selects a manual value instead. Getting this bias
  right is what keeps the beam alive when the radial loop closes.
* **Start/stop.** A loop is closed only while the beam intensity is at or
  above that loop's threshold (`beam_cmp`) and its F.B. STOP line is low.
  The 4-bit counter then climbs one step every 3 frames, reaching 15 after
  90 us. When either condition goes away it walks back down at the same
  rate. The published circuit has the counter and a ~100 us time constant.
  The step rate, the downward ramp and the linear cnt/15 scaling are this
  design's choices. `reset_dr` / `reset_dp` clear the counter, the
  integrator and the output latch.
* **dphi loop is proportional only.** The published text gives P for dphi
  and PI for dR. Its schematic draws the integrator stage in both loops but
  labels the dphi one "P control". This design follows the text
  (`USE_INT = 0` for dphi), so there is no Ki input for dphi.
* **Averager.** `avg_dr` / `avg_dp` switch in the mean of the last five
  input sums. The history is kept even while it is switched out.

Signs: a positive correction raises the frequency. The monitor polarity
(which sign of dR or dphi means "beam outside" or "beam late") has to match
the cabling. `tb_workload_damping` shows the polarity for which the dphi
loop damps.

## Pattern memories and the machine cycle

Each of the five pattern kinds (`rf_pkg::pat_kind_e`: frequency, voltage,
ferrite bias, position bias, voltage correction) has two 131072 x 20-bit
units, A and B. One unit is read while the computer writes the other.
Writing `host_reg_sel = 4` requests a unit. The switch happens at the next
capture event, so a cycle never changes patterns halfway.

All five share one pointer (`pattern_seq`), which walks three regions of
the address space:

| region | addresses | entered by | pointer moves on |
|---|---|---|---|
| 1, flat base | 0 .. r2_start-1 | capture event (pointer to 0) | T-clock, +1 |
| 2, acceleration | r2_start .. r3_start-1 | acceleration-start event: jump to `jump_addr` | B+ pulse +1, B- pulse -1 |
| 3, flat top | r3_start .. r3_end | flat-top event: jump to r3_start | T-clock, +1 |

The pointer stops at the end of each region. `jump_addr` must be the
region-2 address whose frequency equals the last region-1 word. The
computer that builds the patterns knows it and writes it as a register
(`host_reg_sel = 3`). Region boundaries use registers 0-2.

**Flat-top smoothing.** The jump to the region-3 head may step the output.
Each `pattern_mem` therefore follows a jump at the flat top by moving its
output one LSB per clock to the stored word. After that it tracks the
memory again. `slewing` shows when this is active. The published design
asks for one-bit steps; it does not give a rate, so one step per clock is
this design's choice. For the frequency word that is 10 Hz per 100 ns.

Read latency: a pattern output shows the word at the pointer two clocks
after the pointer moves (pointer register, then synchronous read).

The `timing_gen` divides 10 MHz by 200 into the 50 kHz T-clock. After
`cycle_start` it fires capture, acceleration start and flat top at
T-clock counts written by the computer (`tg_reg_sel` 0..2). It also holds
`fb_on` high between the counts in registers 3 and 4. `fb_on` low raises
both loops' F.B. STOP lines. The programmable-count scheme is this design's
own; the published system only lists these signals.

## What is not here

These parts are outside the logic, and their signals are ports of
`rf_control_top`:

* the host computer;
* the B-clock generator, which measures the dipole field;
* the beam monitors and their ADCs;
* the DS chip itself (STEL-1375A);
* the analog RF chain: DACs, ferrite-bias supply, amplitude modulator,
  amplifiers, cavity and phase detectors;
* LED displays and monitor DACs. The values they show are the `mon_*`,
  `ss_*`, `beam_ok_*` and `corr_*` outputs.

Two pieces of the published system are named without a described function,
and are not built:

* a second ROM + latch path from the 20-bit frequency sum to a phase-adjust
  unit;
* the accelerating-voltage (amplitude) loop. The Vo and voltage-correction
  patterns are only brought out as ports.

## Sizes and trust

At default parameters the top holds 26.2 Mbit of pattern memory, about 560
flip-flops and about 530 word-level cells. All files lint cleanly under
Verilator `-Wall` except for a few unused-signal and unconnected-pin
notices. They also elaborate in Yosys via slang. The two memory arrays of
`pattern_mem` are inferred as RAMs.

What is checked, by self-checking testbenches in `tb/`:

* every block against a reference model written independently in its
  testbench: arithmetic, saturation, strobe slots and the 20-clock latency;
* two complete machine cycles of the full top at default sizes
  (`tb_rf_control_top`). This covers a bank swap, every pointer move, the
  smoothing, soft start in and out, and loss of beam. It also checks that
  the DS word equals the pattern plus corrections at every update;
* `tb_workload_himac_cycle`: a full-size cycle at real rates. The frequency
  pattern fills the whole 128k-word unit. 70000 B-clock steps of 0.2 G,
  one per 10 us (0.1 to 1.5 T at 2 T/s), sweep 1 to 8 MHz. This is 7.6 M
  clocks and about 15 s of simulation;
* `tb_workload_damping`: the dphi loop closed around a linearised beam
  model, with the system's 7 us monitor delay and 3 us DS + cavity delay.
  A 20 degree oscillation falls to under 0.1 degree in 1 ms at 4 kHz and
  6 kHz. At 7 kHz it only falls to about 4 degrees: the loop delay starts
  to bite at that frequency.

The beam model is a textbook linearisation, not a measured transfer
function. The gain-ROM law is invented. Treat loop gains as relative
numbers until the ROMs are replaced by the real tables.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. Run one with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/rf_pkg.sv tb/tb_rf_control_top.sv --top-module tb_rf_control_top
./obj_dir/Vtb_rf_control_top
```

Swap the testbench name for any file in `tb/` (`tb_<block>.sv` per block,
plus the two `tb_workload_*`). The simulations start uninitialised state at
random values. Everything that is read is reset, except the pattern RAMs,
which the computer must load before a cycle starts.

Parameters worth changing: `DEPTH` (words per pattern unit), `TDIV`
(T-clock divider), `FRAME` (clocks per sample) and `SS_DIV` (soft-start
step) on `rf_control_top`; the strobe slots on `trig_seq`; the widths in
`rf_pkg`.
