# DTC-retimed pulse-output digital-to-frequency converter

A pulse-output direct digital synthesizer makes a square wave from a fixed
clock. An N-bit phase accumulator adds a frequency control word FCW every
clock period T_CK, and its most significant bit toggles at an average
frequency of

    f_out = f_CK * FCW / 2^N,      0 <= FCW <= 2^(N-1)

The MSB can only change on a clock edge, though. Each of its edges is late by
up to one clock period, and the pattern of these errors repeats. That
deterministic jitter shows up as spurious tones around the wanted tone.

This design removes the jitter by delaying every MSB edge onto an evenly
spaced grid. The accumulator residue at an edge (all bits except the MSB,
called AR here) says how far the edge overshot its ideal time: AR steps of
T_CK/FCW. Delaying the edge by (FCW - AR) * T_CK / FCW puts every edge
exactly one clock period after its ideal time. A digital-to-time converter
(DTC) with N_DTC bits over one clock period applies that delay. The edges
then scatter by less than one DTC LSB, T_CK / 2^N_DTC, and the output stays a
50% duty-cycle square wave. With the default N = 12, N_DTC = 11 and
T_CK = 500 ps, the LSB is 0.244 ps. The worst fractional spur is then about

    20*log10( FCW / (2^N * 2^N_DTC) )  dBc

which is -73 dBc at FCW = 1792. The worst spur grows by 6 dB per octave of FCW, and DTC
non-linearity raises it further (see "DTC impairments").

## Signal flow

```
 ck_ref (2 f_CK)
   |
 dfc_clock_phases ---- CK1 CK2 CK3 CK4  (f_CK, T_CK/4 apart)
   |CK1                          |CK4                     |CK1..CK4
 dfc_phase_accumulator --acc--> dfc_delay_word --msb,DW--> dfc_coarse_delay --MR---> DTC-R --o_r--+
   (N bits, +FCW)      --FCW->  (N_DTC-stage divider,      (phase select by       --MRN--> DTC-F --o_f--+
                                 MSB carried alongside)     DW[top 2 bits],                           |
                                                            fine word steering)   dfc_edge_combiner <-+
                                                                                          |
                                                                                         out
```

| Module | Kind | Clock | Role |
|---|---|---|---|
| `dfc_top` | RTL + models | all | the whole converter |
| `dfc_clock_phases` | RTL | ck_ref, both edges | CK1..CK4 by dividing the reference by 2 |
| `dfc_phase_accumulator` | RTL | CK1 | N-bit accumulator; it also outputs the FCW used for each step |
| `dfc_delay_word` | RTL | CK4 | pipelined delay-word computation; the MSB travels alongside |
| `dfc_coarse_delay` | RTL | CK1..CK4 | picks the coarse clock phase (MR) and holds the fine word for each DTC |
| `dfc_fine_dtc` | behavioural model | none | fine DTC (used twice), with optional INL and full-scale error |
| `dfc_edge_combiner` | RTL | o_r / o_f | toggle pair with XOR: out rises on o_r and falls on o_f |
| `dfc_pkg` | package | | INL shape type and INL polynomials |

## The delay word

This is the subtle part of the design. The ideal causal delay of an edge,
counted in DTC LSBs, is

    (FCW - AR) * 2^N_DTC / FCW      which lies in (0, 2^N_DTC]

The top value 2^N_DTC, a delay of exactly one clock, occurs whenever AR = 0.
Plain truncation would need N_DTC + 1 bits to hold it. The word used here is

    DW = 2^N_DTC - 1 - floor(AR * 2^N_DTC / FCW)

This is the ideal value rounded up, minus one LSB. It always fits in N_DTC
bits. The fixed one-LSB offset moves every edge by the same amount, so it
changes no spur. Rounding up and truncating leave the same error sequence,
except on the AR = 0 edges. There the error moves from one end of the LSB to
the other. The one visible result is described under "Measured behaviour".

The hardware forms the fraction AR/FCW with a restoring divider. The divider
is pipelined one quotient bit per CK4 stage, N_DTC stages in all, and the
word is the quotient's bitwise complement. It produces a new word every clock
because the MSB can toggle every clock (FCW = 2^(N-1)). The MSB and the
divisor travel down the same pipeline as the remainder. So the `msb`/`dw`
pair at the output always belongs to one accumulator state, even across a
change of FCW. The accumulator outputs `fcw_q`, the step it actually added,
so a word is never divided by a newer FCW than the one that produced its
residue. Frequency changes are phase-continuous; nothing is reset.

Only the words of cycles in which the MSB changes are used. In other cycles
AR can exceed FCW and the quotient means nothing.

## Coarse and fine delay, interleaving

A DTC whose full scale spans a whole clock period is hard to build. It
would also have no time to recover between conversions. So the delay is
split:

* **Coarse, from the two MSBs of DW.** Four flip-flops sample the MSB on CK1,
  CK2, CK3 and CK4. MR is the output of the flip-flop chosen by those two
  bits. An MSB change registered on a CK4 edge therefore reaches MR
  (c+1)*T_CK/4 later, where c is the coarse code.
* **Fine, from the other N_DTC-2 bits.** The fine DTC adds
  DW_fine * (T_CK/4) / 2^(N_DTC-2). It needs a full scale of only T_CK/4.
* **Two interleaved fine DTCs.** DTC-R is triggered by MR and converts the
  rising edges. DTC-F is triggered by MRN and converts the falling edges.
  When the MSB rises or falls, a CK4 register stage loads the fine word into
  that DTC's holding register (`dw_fine_r` or `dw_fine_f`). Two edges of the
  same polarity are at least two clock periods apart. Each DTC therefore sees
  a stable word and has at least one clock of recovery time.

The phase mux never glitches. Its select changes only on a CK4 edge. At that
moment all four sampling flip-flops hold the same value: CK4 has just sampled
the previous MSB, and the other three sampled it earlier in the cycle.

Coarse plus fine gives T_CK/4 + DW * T_CK/2^N_DTC, measured from the CK4
edge that registered the MSB change. For an ideal DTC the complete latency,
from the CK1 edge on which the accumulator's MSB changed to the output edge,
is

    (N_DTC + 2) * T_CK + T_OFF + DW * T_CK / 2^N_DTC

That is 3T/4 to CK4, N_DTC pipeline cycles, one cycle in the coarse
register, a quarter period to the first phase, then the coarse and fine
delay. T_OFF is the DTC's fixed offset.

## DTC impairments

`dfc_fine_dtc` is a behavioural model; a real fine DTC is an analog delay
cell. The model waits

    T_OFF_PS + (dw + INL(dw)) * TAU_FS_PS / 2^NB

after a trigger's rising edge, then emits a pulse of width PW_PS. A large
INL can make this negative at the ends of the fine range; the model then
reports an error and uses zero, so raise T_OFF_PS above INL_MAX LSB when
testing large INL. Four error
sources can be modelled with the parameters. All are off by default:

| Error | How to set it |
|---|---|
| INL | `INL_SHAPE` = `INL_PARABOLIC` or `INL_CUBIC`, `INL_MAX` in LSB. The shapes are zero-mean polynomials over the fine range, listed in `dfc_pkg`. |
| Fine full-scale error | `TAU_FS_R_PS`, `TAU_FS_F_PS` on `dfc_top` (nominal T_CK/4) |
| R/F full-scale mismatch | set `TAU_FS_R_PS` and `TAU_FS_F_PS` to different values |
| Clock-phase error | a duty-cycle error on `ck_ref`, which moves CK2 and CK4 |

INL, clock-phase and full-scale errors keep the edge errors half-wave
symmetric, so spurs appear only at odd multiples of f_CK/GRR. GRR,
2^N / gcd(2^N, FCW), is the number of clocks after which the accumulator
repeats. A mismatch between DTC-R and DTC-F breaks the symmetry. It adds
even-order spurs, even harmonics and a duty-cycle offset.

For a quick estimate with INL only:

    worst spur ≈ FCW * (1 + zeta * INL_max) / (2^N * 2^N_DTC)

Here zeta = 1 for a parabolic INL and 2/(3 - sqrt 5) ≈ 2.6 for a cubic one.

## Parameters (`dfc_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 12 | accumulator bits |
| `N_DTC` | N-1 = 11 | delay-word bits (2 coarse, N_DTC-2 fine); must be at least 3 |
| `T_CK_PS` | 500.0 | clock period assumed by the DTC models; `ck_ref` must have period T_CK_PS/2 |
| `T_OFF_PS` | 20.0 | DTC fixed offset |
| `TAU_FS_R_PS`, `TAU_FS_F_PS` | T_CK/4 | fine full-scale of DTC-R / DTC-F |
| `INL_SHAPE`, `INL_MAX` | none, 0 | INL of both fine DTCs |

The ports are `ck_ref`, `rst_n` (asynchronous, active low), `fcw[N-1:0]` and
`out`. Two observation outputs are added: `msb_c`, the raw accumulator MSB,
and `mr`, the coarse-retimed MSB. Reset must be asserted with a falling edge
of `rst_n`. While it is held, CK1..CK4 stop, so the clears of flip-flops on
those clocks come only from the asynchronous reset.

## Departures from the original architecture, and choices made here

* **Delay word.** DW is the ideal value rounded up minus one LSB, not
  truncated, so that it fits in N_DTC bits (see above).
* **Delay-word logic.** The original only calls for a logic block clocked by
  CK4 with a matching MSB delay. The pipelined divider, its latency of
  N_DTC cycles and the extra coarse register cycle are this design's choices.
* **Combining o_R and o_F.** A toggle pair with an XOR is used. This makes the
  output independent of the DTC pulse width.
* **Clock divider and coarse mapping.** The four-phase divider is built from
  two flip-flops. Coarse code c selects phase c+1 after CK4.
* **Timing values.** T_CK = 500 ps (f_CK = 2 GHz), the DTC offset of 20 ps
  and the pulse width of T_CK/8 are assumed values.
* **Clock-phase error.** It is introduced through the reference duty cycle,
  which moves CK2 and CK4 together.
* **Not included:**
  * the calibration that aligns the coarse and fine ranges (nothing about it
    is specified);
  * the reference PLL;
  * any delta-sigma or dithering front end (not part of this architecture).

## Synthesis notes

Everything except `dfc_fine_dtc` is synthesizable. The clocking is
deliberately multi-phase:

* the accumulator runs on CK1, the delay-word logic on CK4;
* the four sampling flip-flops run on one phase each, and their outputs are
  muxed into MR;
* the combiner is clocked by the DTC outputs.

A real implementation needs timing constraints for these crossings. The
design relies on these margins:

* CK1 to CK4 is 3T/4;
* the coarse select is stable for a whole period;
* the fine words are held for at least two periods.

`dfc_fine_dtc` uses `real` parameters and delays. Synthesis tools that
reject real parameters cannot read `dfc_top`; the digital blocks can be
synthesized on their own.

## Measured behaviour (simulation)

* **Full size (defaults), `tb_dfc_top`.** The test uses:
  * FCW = 1792;
  * FCW = 1365 over a full 4096-cycle repetition;
  * FCW = 2048, with an edge every clock;
  * FCW = 1024 and FCW = 3;
  * 60 random phase-continuous FCW switches.

  All of the roughly 4,400 output edges land exactly where predicted
  (within 2 fs). After
  removing the constant latency, they lie within [0, 1 LSB) of the ideal
  grid. Every coarse phase is used on both edge polarities.
* **Spur measurements, `tb_dfc_workloads`.** The test computes the DFT of the
  measured edge errors over one repetition period. "Estimate" is the
  closed-form expression above.

  | Configuration | Worst spur | Estimate / reference |
  |---|---|---|
  | N=12, N_DTC=11, FCW=1792, ideal | -73.1 dBc | -73.4 dBc |
  | same, raw accumulator MSB (`msb_c`) | -7.6 dBc (retiming gains 65.5 dB) | |
  | same, parabolic INL 3 LSB, 2 LSB phase error, 3 LSB full-scale error | -57.8 dBc | about -60 dBc |
  | same plus 3 LSB R/F mismatch | -56.3 dBc; even-order spurs at -69.6 dBc | even-order spurs expected |
  | N=6, N_DTC=5, FCW=1..32, ideal | within 1.65 dB of estimate (largest at FCW=3) | |
  | N=6, odd FCW, INL 3 LSB | within 3.5 dB (parabolic, FCW ≥ 5) and 2 dB (cubic, FCW ≥ 3) | |
  | N=6, odd FCW, INL 10 LSB (DTC offset raised to 200 ps) | within 2.6 dB (parabolic, FCW ≥ 5; cubic, FCW ≥ 3) | |
  | N=4, N_DTC=3, FCW=3 | -31.0 dBc | -32.6 dBc |
  | N=12, FCW=1792, R/F mismatch only, duty 50.029 % / 49.971 % | second harmonic -60.74 dBc | \|cos(pi d)\| gives -60.74 dBc |
  | same, duty 50.146 % | second harmonic -46.76 dBc | -46.76 dBc |

  Every run also computes the spurs directly from the expected delay-word
  errors:

      DW_coarse + (DW_fine + INL) * tau_FS / (T_CK/4) + EW_phase - DW_ideal

  All terms are in LSB. DW_ideal = (FCW - AR) * 2^N_DTC / FCW is the
  unquantised delay word. EW_phase is the timing error of the selected clock
  phase. These spurs are compared with the spurs of the simulated edges. They agree within
  0.05 dB in all runs. The limit comes from the 1 fs time resolution.
  The exact line spectrum of the output is also computed from its edge
  times. For N_DTC ≥ 8 its worst sub-harmonic matches the edge-error result
  within 0.1 dB. The same is done for `msb_c`, to show what the retiming gains.
  A duty-cycle offset within ±0.03 % keeps the second harmonic below
  -60 dBc.

  One exception: with parabolic INL at FCW = 3 (N = 6), the measured spur is
  8 dB *below* the estimate. With only three distinct edges, the rounding
  choice above puts the AR = 0 edge on a different fine code, and so on a
  different INL value.

## Simulating

Every block has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=... failures=...` line. Each testbench has a watchdog that
ends the run with a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/dfc_pkg.sv tb/tb_dfc_top.sv --top-module tb_dfc_top -o sim
./obj_dir/sim
```

`-Wno-fatal` is needed because Verilator warns (ZERODLY) about the DTC
model's run-time delay value. Use the same command with `tb_dfc_workloads`, `tb_dfc_delay_word`,
`tb_dfc_coarse_delay` and the others. `tb/dfc_spur_harness.sv` is the
reusable measurement harness. To measure another configuration, instantiate
it with other `N`, FCW ranges or impairments. All files use
`timeunit 1ps; timeprecision 1fs;` because the DTC LSB is a fraction of a
picosecond.
