# Ring-oscillator clock generators with calibration: an SNC AD-PLL and an MPC injection-locked multiplier

Ring oscillators are small, cheap and tune over a wide range. Two weaknesses keep them out of
demanding clock jobs: their frequency follows the supply voltage, and their phase noise
accumulates without bound. This RTL models two clock generators that answer those weaknesses in
different ways:

* **SNC AD-PLL**: an all-digital PLL used as the zero-delay clock buffer of a DDR5 registering
  clock driver. The reference and the output have the same frequency, 3 GHz in the main
  configuration. The ring DCO compensates supply noise itself, open loop, so the loop needs no
  supply-noise logic. An auxiliary frequency-tracking loop (A-FTL) makes lock fast enough for the
  RCD start-up budget.
* **MPC-ILCM**: an injection-locked clock multiplier that turns a 300 MHz reference into
  4.8 GHz (N = 16). Every reference edge re-aligns the ring and wipes its accumulated jitter.
  This only works if two errors are calibrated away:
  * the frequency error (FE) between the ring and N·f_REF;
  * the path offset (PO) between where the calibrator samples and where the injection actually
    lands.
  Multi-phase-based calibration (MPC) measures both with the ring's own eight output phases.

The two generators are independent. `ro_clkgen_top` places them side by side, each with its own
group of ports (`adpll_*` and `ilcm_*`).

Digital control logic is synthesizable SystemVerilog. The analog parts are behavioural models:
they use `real` arithmetic and delays and are not meant for synthesis. Those parts are the ring
DCO, the TDC-PFD, the injection-locked ring and the delay lines. Each one says so in its first
comment line.

| File | Kind | What it is |
|---|---|---|
| `rocg_pkg.sv` | package | 10-bit oscillator word type, DCDL widths, up/down/hold decision type, helpers |
| `snc_adpll.sv` | RTL (structural) | AD-PLL: TDC-PFD → loop filter → DCO, with A-FTL and lock detector |
| `snc_dco.sv` | behavioural | supply-compensated ring DCO |
| `tdc_pfd.sv` | behavioural | 5-step Vernier TDC, dead-zone PFD, S_CDC retiming clock |
| `adpll_dlf.sv` | RTL | loop filter: direct proportional path, deserialized integral path |
| `a_ftl.sv` | RTL | counter-based frequency detector with one-shot large integral step |
| `lock_detector.sv` | RTL | lock when the integral code stays in a window |
| `clk_stop_ctrl.sv` | RTL | glitch-free clock stop, at least 16 cycles after the request |
| `mpc_ilcm.sv` | RTL (structural) | ILCM: ILO, two DCDLs, decision logic, frequency and gating control |
| `ilo.sv` | behavioural | 4-stage differential ring with injection, 8 phases, 10-bit DCR |
| `dcdl.sv` | behavioural | delay line: NAND coarse cells plus fine P/N load capacitors |
| `dcw_ctrl.sv` | RTL | turns up/down decisions into the 64-bit N_ctrl and 8-bit P_ctrl words |
| `mpc_decision.sv` | RTL | three sub-sampling bang-bang phase detectors and the decision tables |
| `freq_ctrl.sv` | RTL | BB-PLL for the first lock, then the FE integral path; drives the DCR |
| `gating_ctrl.sv` | RTL | gates one injection out of every GRCW |
| `dsm1.sv` | RTL | first-order delta-sigma modulator for the fractional DCR bits |
| `ro_clkgen_top.sv` | RTL (structural) | both generators side by side |

## The SNC AD-PLL

### Loop structure

The reference `s_ref` is compared with the DCO output by the TDC-PFD.
* The TDC reports the phase error in five steps. Three thresholds are narrow, at 0 and ±6 ps,
  and keep jitter low at lock. Two are broad, at ±20 ps, and speed up acquisition.
* A dead-zone PFD adds a separate frequency-error flag. It fires when the edges are more than
  40 ps apart, or when one edge has no partner.
* Everything is retimed by `s_cdc`, a delayed copy of the reference. All digital blocks of the
  loop run on this clock, so the phase and frequency errors reach the filter within one reference
  period.

The loop filter (`adpll_dlf`) decodes the TDC thermometer into a signed weight with a
non-linear gain: ±1, ±2 or ±4, and ±8 for the frequency flag.
* **Proportional path:** the weight goes straight into the DCO word every cycle.
* **Integral path:** the weight is accumulated over DES = 8 cycles, then added to the integral
  code C_I once, scaled by α1. C_I has 4 fractional bits.
* **DCO word:** integer part of C_I plus the proportional weight, saturated to 10 bits.

Both paths steer the same DCO cells, so their gain ratio does not drift with PVT.

### A-FTL: the staircase acquisition

The narrow TDC alone would need a long time to pull a DCO that starts at 290 MHz up to 3 GHz.
The A-FTL solves this by counting instead of timing:
* It counts reference edges and DCO edges from a common start.
* When the two counts differ by more than two, it raises `s_en_ftl` for one cycle. At that
  moment it adds a large step α2 to C_I:
  `α2 = (F0_CODES + C) · diff / n_dig` codes, where C is the present DCO word and F0_CODES
  (97) is the 290 MHz floor expressed in codes. Since f_DCO ≈ K_DCO · (F0_CODES + C), this
  is the code change that moves the DCO by the measured ratio. It needs no knowledge of the
  reference frequency, so one setting serves every speed grade.
* It then holds its counters in reset (`s_rst`) for 8 cycles, so the step reaches the DCO
  before the next measurement starts.

The effect is a staircase:
* Far from the target, the counts diverge quickly and each step is large.
* Near the target, divergence takes longer and the steps shrink.
* Once the DCO count reaches 1023 without diverging, the A-FTL stops correcting and the TDC
  path finishes the lock.

The DCO count crosses from the DCO clock domain as a Gray code through two flip-flops. The
reference side subtracts a captured base value, so the DCO side never needs a reset crossing.

### DCO model and supply-noise compensation

The DCO model gives:

`f = 290 MHz + (code + 256·s_band) · 3 MHz + FP · ΔV`

* FP = 60.8 MHz/V with compensation on (`SNC = 1`); this is the measured value of the real
  circuit.
* FP = 3300 MHz/V with compensation off; this is a plain ring.

The compensating bias circuit is not modelled as a circuit. Only its measured effect is.

### Lock detector and clock stop

* **Lock detector:** lock is declared after 64 consecutive integral updates within ±4 codes of
  a reference value. Any update outside the window re-centres the reference and drops lock.
* **Clock stop:** the request is sampled twice by the output clock divided by 8. The gate
  enable is taken one divided cycle after the second sample, so the output toggles for 17 to 24
  more cycles after any request. That meets the required "at least 16". The enable changes on
  the falling edge of the clock, so `clk_out` never glitches.

## The MPC injection-locked multiplier

### What has to be calibrated

Each injection pulse (S_INJ, the reference gated by `gating_ctrl`) shorts φ0/φ180 of the ring
and drags the nearest φ0 crossing toward the injection instant.
* If the free-running ring is slightly off N·f_REF, it drifts during the 16 cycles between
  injections. Every injection then jerks the phase back, and these periodic jerks become
  reference spurs. That is the FE.
* A calibrator that tries to measure the FE by sampling near the injection point sees its own
  sampling clock's delay mismatch mixed into the result. That is the PO.

### How the eight phases measure both

The four-stage differential ring provides eight phases spaced T_OSC/8 apart. The design samples
them with three sub-sampling bang-bang detectors.

* **PD_PRE** samples φ315 with `S_PRE`, which is S_REF delayed by DCDL_PRE. When calibrated,
  S_PRE lands exactly T_OSC/8 *before* the injection point. φ315 then crosses zero there only
  if no phase error has accumulated since the last injection. Its sign is therefore the sign of
  the FE.
* **PD_POST** samples φ45 with `S_POST` (S_REF delayed by DCDL_POST), T_OSC/8 *after* the
  injection point. On an injected cycle, the sample shows the realigned edge.
  A narrow-range **DLL** moves DCDL_POST until S_POST sits on that edge.
* **PD_INJ** samples φ0 with S_POST. It tells whether the injection meets a rising or a falling
  φ0 edge, which flips the meaning of the other two samples.

The PO calibration uses the gating. Once every GRCW injections (GRCW = 100, a gating rate of
1/100), the injection is skipped:
* **Injected cycle:** the phase is realigned and φ45 sits where the DLL expects it.
* **Gated cycle:** nothing realigns the phase, so the φ45 sample shows whether an injection
  would have pushed or pulled it. That is the FE that is really left.
* The **PO calibrator** uses that sample to move DCDL_PRE until no push or pull remains. This
  puts S_PRE at the true pre-injection point, including every path offset.

Bandwidths:
* The FE loop and the DLL act on every injected cycle, so they are fast.
* The PO loop acts once per GRCW cycles, so it is roughly 100× slower. This separation keeps
  the PO loop from fighting the DLL.

### Decision tables

`mpc_decision` evaluates the tables on the falling edge of S_REF, one half-period after the
samples. Each decision is HOLD unless ILCM mode is on.

| Loop | Active on | UP when |
|---|---|---|
| FE calibrator (to DCR, via `freq_ctrl`) | injected cycles | PD_INJ ≠ PD_PRE |
| DLL (to DCDL_POST) | injected cycles | PD_INJ ≠ PD_POST |
| PO calibrator (to DCDL_PRE) | gated cycles | PD_INJ = PD_POST |

All three depend on PD_INJ because it gives the edge polarity. The PO table is the complement
of the DLL table because the PO calibrator corrects the sampling clock of the FE loop and not
the ring. The signs were chosen so that every loop converges, and the closed-loop test confirms
this.

### Delay lines and their control words

Each DCDL has three parts:
* 0–7 NAND coarse stages of 20 ps each, set from a port;
* a fine section with an 8-bit P_ctrl (8 ps per unit);
* a 64-bit N_ctrl (0.15 ps per unit).

All these values are model choices.

`dcw_ctrl` turns up/down decisions into thermometer words as follows:
* N moves one unit per decision.
* Only when N is stuck at 0 or 64 does P move, one unit at a time.
* After a P step, P is locked out for 4 decisions.

The lockout is this design's addition. The decisions arrive two cycles late, and without the
lockout P would step twice: 16 ps, wider than the 9.6 ps span of N. The loop would then hunt
forever between the two P values.

### Start-up: BB-PLL, then ILCM

Injection locking only captures a ring that is already close to N·f_REF. `freq_ctrl` first
runs a bang-bang PLL:
* φ0 is divided by 16 and compared with S_REF.
* Each cycle applies a ±2-code proportional step and a ±16/64-code integral step to the 10-bit
  DCR.

This detector sees phase only, not frequency. Far from the target its decisions alternate
with the beat and average out. From the reset word (4.8 GHz), it therefore pulls in only about
±30 MHz at the output, which is about ±0.6 % of the reference. `tb_ilcm_ref_configs` locks
at 298 MHz and 302 MHz references. A 290 MHz reference stays unlocked near 4.8 GHz.

When `ilcm_mode` rises, these changes follow:
* The divider stops.
* Injection starts.
* The DCR integral moves only by the FE decision, in steps of 4/64 code.

The integral code keeps 6 fractional bits. A first-order delta-sigma modulator (`dsm1`) turns
them into a carry that is added to the DCR word each reference cycle. The DCR therefore
alternates between two adjacent codes, and its average carries the fraction. This lets the
frequency loop settle between codes; the ILO's ideal code of 511.85 is not a whole number.

`ilcm_mode` is an input because nothing in the source design says what triggers the switch.

### ILO model

The ring is a phase accumulator running at `f = 3.7763 GHz + DCR · 2 MHz`. This keeps 4.8 GHz
between codes (DCR = 511.85), so the FE loop has real work to do. Behaviour of the model:
* An injection, 0.1 ns after the S_INJ edge, moves the phase by the fraction β of the error
  to the nearest φ0 crossing.
* β = sw / (sw + 4) for the 4-bit switch size sw (13W gives 0.76), so it grows with the switch
  size and saturates.
* Outputs update at every 1/16 of a period and right after an injection.

## Where this RTL departs from the source design

* **TDC step count.** The source design describes the TDC in two places that disagree: "three
  fine + four coarse" and "five steps, three narrow + two broad". The five-step version is
  built.
* **Not built:**
  * Delta-sigma modulators on the two delay lines. The source design puts 20-bit modulators on
    every MPC loop. Here only the DCR word has one, a first-order `dsm1` on its 6 fractional
    bits. The delay lines move in whole N_ctrl units of 0.15 ps.
  * The delay monitor and the replica blocks of the RCD's zero-delay-buffer feedback path.
  * The supply-compensating bias circuit as a circuit. Only its measured frequency-pushing
    factor is in the DCO model.
* **Own choices, not given by the source design:** these are all parameters with defaults.
  * All gains: the loop filter weights, α1, DES, the α2 formula, K_I, K_PRE, K_POST and the
    BB-PLL gains.
  * The A-FTL hold and saturation counts.
  * The lock window.
  * DCO and ILO tuning gains.
  * All delay-line unit delays.
  * β versus switch size.
  * The broad TDC step (20 ps) and the dead zone (40 ps).
  * The BB-PLL's detector: it compares phase only, with no frequency detector. This limits
    its pull-in to about ±0.6 % of the reference.
* **Decision-table signs.** The table contents were derived from the loop behaviour described
  for them and checked in closed loop.

## Simulated behaviour

With default parameters, the top-level test runs both generators together.

| Quantity | Simulated | Ideal or requirement |
|---|---|---|
| AD-PLL output frequency | 2999.99–3000.01 MHz | 3000 MHz |
| AD-PLL lock time, from 290 MHz | 235–250 ns (varies with the random seed) | ≤ 3.5 µs (the real chip measured < 700 ns) |
| Output cycles after a clock-stop request | 18–24 | ≥ 16 |
| ILCM average output frequency | 4799.996 MHz | 4800 MHz |
| ILCM average DCR | 511.75 | 511.85 |
| S_POST delay | 126.15 ps | 126.04 ps |
| S_PRE delay | 74.4 ps | 73.96 ps |

The AD-PLL holds lock through a −40 mV supply step. S_POST and S_PRE settle within 0.5 ps of
their ideals. The residue comes from bang-bang dithering and the finite resolution of the
fractional DCR bits. Without the delta-sigma dither the DCR sat a whole code low and S_PRE was
1 ps off.

Every mechanism occurs during the run, and the test counts each one:
* A-FTL steps and dead-zone frequency errors;
* BB-PLL cycles and gated cycles;
* FE, DLL and PO decisions;
* a P_ctrl step.

## Simulating

Each testbench in `tb/` checks itself and ends with one line, `TB_RESULT checks=N failures=M`.
A watchdog stops any run that hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/rocg_pkg.sv tb/tb_ro_clkgen_top.sv \
          -y rtl --top-module tb_ro_clkgen_top -o sim
./obj_dir/sim
```

`-Wno-fatal` keeps the build going past Verilator's warnings about the run-time delay values
in the behavioural models (ZERODLY). Those delays are intended and never zero.

Substitute any `tb_<module>` to test one block.
* `tb_ro_clkgen_top` runs the whole top with no parameter overrides, in about 2 s.
* `tb_adpll_ddr5_configs` runs the AD-PLL at three DDR5 clock frequencies.
* `tb_ilcm_ref_configs` runs the ILCM at 298 MHz and 302 MHz references.
* Most unit tests compare against an independent reference model driven by `$urandom`
  stimulus. Two examples: the loop filter gets 6000 random cycles, and `dcw_ctrl` gets 4000
  decisions.
* Tests for the behavioural models check the model equations directly:
  * DCO frequency versus code and supply;
  * TDC threshold crossings;
  * ILO frequency, phase spacing and the β·10 ps pull of a 10 ps early injection;
  * delay-line delay per unit.

All files use `timescale 1ns/1fs`. The behavioural models need a simulator with `--timing`
support, because of real-valued delays and event scheduling.

## Changing it

* **Another DDR5 speed grade.** Change only the reference. The DCO covers 290 MHz to above
  3.2 GHz with `s_band = 0`.
  * No gain needs changing: the A-FTL step scales with the present DCO word.
  * `tb_adpll_ddr5_configs` runs 1.6, 2.4 and 3.2 GHz side by side at default parameters.
    They lock in about 380, 300–317 and 223–241 ns, within 0.2 % of the target.
  * Check that the A-FTL saturation count (`FTL_SAT`) stays below the counter range.
* **Another ILCM ratio or reference.** Set `N` on `mpc_ilcm`. Move `F_MIN_HZ` of the ILO so that N·f_REF
  stays inside the DCR range, and within about 30 MHz of the frequency at `DCR_INIT` of
  `freq_ctrl`, because of the BB-PLL pull-in limit. The DCDL ranges must then still cover T_OSC/8 plus the injection
  path delay.
* **Gating rate.** `grcw` is a live input. Lowering it speeds up the PO loop but brings it
  closer to the DLL bandwidth.
