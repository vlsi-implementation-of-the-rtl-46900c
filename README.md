# 8-PSK TCM Viterbi receiver with phase ambiguity resolution

This is synthesizable SystemVerilog for the digital core of a satellite receiver
for trellis-coded 8-PSK: a soft-decision Viterbi decoder for the optimum 8-state
rate-2/3 Ungerboeck code, plus a phase-ambiguity resolver and a carrier phase
detector.

The hard problem this core solves is phase ambiguity. A carrier recovery loop for
8-PSK can lock at any of eight phases, k·π/4 apart. Good 8-PSK trellis codes are
not rotationally invariant: a rotated code sequence is not a code sequence. So the
usual differential-decoding fix is not available. This core watches how well the
Viterbi decoder's best path matches the received signal. It sums, over a long
window, the largest branch metric leaving the most likely state. If that sum stays
below a threshold, the constellation is declared misaligned and is counter-rotated
by one more π/4 step. The branch metrics already exist inside the decoder, so the
detector costs little hardware.

The organisation follows a published VLSI implementation of this receiver:
- the block partition;
- the word lengths (8-bit samples, 6-bit rotated components, 7-bit branch metrics,
  9-bit path metrics);
- the three-RAM trace-back memory;
- the window lengths (4096/8192) and thresholds (79424/78400).

Where that description was silent, the choices here are marked below and in each
file's header.

## Signal flow and timing

```
 P,Q (8b) ─► phase_shifter ─PS,QS (6b)─► branch_metric_gen ─8×7b─► acs_unit ─8×2b sel─► decoding_memory ─► {BIT1,BIT0}
               ▲    │ PS45,QS45                      │                 │ most likely state        ▲
               │    ▼                                ▼                 ├──────────────────────────┘
               │  costas_phase_detector ─► costas_phase  phase_sync_detector ◄─┘
               └──────────── phase_shift (3b) ◄──────────┘      └─► alarm
```

- One symbol is processed per clock. There is no handshake: the clock is the
  recovered symbol clock.
- The phase shifter, the branch metric generator and the ACS each have one
  register stage. The decoding memory adds 41 clocks. A sample on `p_in`/`q_in`
  therefore comes out as decoded bits **44 clocks** later.
- `dec_valid` rises once the memory has been filled after reset.
- `costas_phase` follows the input by 2 clocks.
- Reset is synchronous and active high. After reset the resolver starts in the
  misaligned state (`alarm = 1`, `phase_shift = 0`).

At 44.736 Mbit/s (2 information bits per symbol) the clock runs at 22.368 MHz.
The original chip was rated to 70 Mbit/s (35 MHz). Nothing here has been timed
against a process.

## The code and the state numbering (`tcm_pkg`)

The parity-check polynomials are h2 = 4, h1 = 2 and h0 = 11 (octal), with 8 states
and both input bits coded. There are therefore four branches into and out of every
state, and no parallel transitions. The free squared distance is 4.586, a 3.6 dB
asymptotic gain over uncoded QPSK, and the code is invariant only to a full 360°
rotation.

The code is realised as a systematic feedback encoder with state `s = {r1, r2, r3}`:

    z0 = r3,  r1' = r3,  r2' = r1 ^ x2,  r3' = r2 ^ x1,  symbol = {x2, x1, z0}

8-PSK point `i` lies at angle `i·π/4` (natural mapping).

- The state LSB is the `z0` of all four branches leaving it. So the LSB of the most
  likely state says whether the likely next symbol is even or odd. The resolver
  uses exactly that.
- The predecessors of state `n` are `{sel, n[2]}` for `sel = 0..3`.
- The 2-bit `sel` the ACS picks per state is the "path selection" value that the
  survivor memory stores.

The helper functions `branch_symbol`, `pred_state`, `info_bits` and `next_state`
encode these rules once for all blocks.

## Rotation and quantisation (`phase_shifter`)

The 8-bit samples are rotated by −k·π/4 and then rounded to 6 bits (round half up,
saturate to [−32, 31]).

- Even k only swaps and negates the components.
- Odd k uses `(P±Q)·181/256` (≈1/√2).

The 6-bit words keep the same full scale as the 8-bit input, so an odd rotation
clips the corners of the square. This is the saturation effect that sets the
optimum quantiser range.

The rotator also outputs the point rotated by a further −π/4 (`ps45`, `qs45`). The
Costas detector uses this pair, so the detector needs no multipliers of its own.

## Branch metrics (`branch_metric_gen`)

The metric is the correlation `m_i = X cos(iπ/4) + Y sin(iπ/4)`. Larger means more
likely.

- Even metrics are ±X and ±Y.
- Odd metrics are ±U and ±V, with U = (X+Y)/√2 and V = (Y−X)/√2.

All eight lie in [−45, 45] and fit 7 bits signed.

## Add-compare-select and metric normalisation (`acs_unit`)

For each state the four candidates are `pm[pred] + bm[symbol] + 64`. The +64 makes
every branch metric non-negative, and adding the same constant to every branch
changes no decision. The largest candidate wins, and ties go to the lower `sel`.

Path metrics are 9-bit natural binary. When every new metric is at least 128 (a
quarter of the range), 128 is subtracted from all of them. In hardware this only
remaps the two MSBs.

Offset branch metrics lie in [19, 109]. Any state reaches any other in two steps,
so the spread between metrics stays below about 180. That keeps every metric below
512; an assertion in the RTL checks it. The most likely state (largest metric,
lowest index on a tie) is registered in the same clock as the selection bits it
belongs to.

## Survivor memory: three-RAM trace-back (`decoding_memory`)

This is the least obvious part of the design. Its pieces:

| piece | module | size |
|---|---|---|
| three survivor RAMs, 8 states × 2 bits per column, 10 columns | `dp_ram` | 16 × 10 each |
| output reordering RAM | `dp_ram` | 2 × 10 |
| decimal up/down address counter + RAM-role counter `SEL` | `tbk_address_gen` | 4-bit address |
| trace-back pointer | `traceback_unit` | 3-bit state |
| decoding pointer, emits `{x2, x1}` | `decode_unit` | 3-bit state |

All four RAMs share one address from the counter, which runs 0→9, 9→0, 0→9, and so
on. A block of ten columns is therefore always read back in the opposite direction
to the one it was written in, which means newest column first. This is exactly
what a trace-back needs.

Reads are asynchronous and writes are clocked. A RAM can thus be read and
overwritten at the same address in one clock, and the read returns the old word.

In block *k*:

| RAM | role in block *k* | contents |
|---|---|---|
| `k mod 3` | written with block *k*; the same clock first reads the old word at that address and the decoding pointer walks it | block *k−3* → *k* |
| `(k−1) mod 3` | trace-back, starting from the most likely state of the last column of block *k−1* | block *k−1* |
| `(k−2) mod 3` | idle; decoded in block *k+1* | block *k−2* |

1. At the end of block *k*, the trace-back pointer has crossed block *k−1*. It
   holds the survivor state at the end of block *k−2*.
2. That state seeds the decoding pointer.
3. In block *k+1* the decoding pointer walks block *k−2* backwards and emits one
   information-bit pair per clock, newest first.
4. Each pair is written into the reordering RAM at the shared address.
5. In block *k+2* the counter runs the other way, so the pairs leave in
   transmission order.

Each trace-back and decoding pass covers 20 trellis steps from the chosen best
state: 10 steps of pure trace-back, then 10 decoding steps. A single decision
therefore rests on 10 to 19 steps of trace-back.

A column is decided 21 to 39 clocks after it was written, 30 on average. With the
reordering RAM and the output register, the bits leave 41 clocks after their
column entered the memory (four blocks plus one clock).

## Phase ambiguity resolution (`phase_sync_detector`)

Each clock the detector takes the largest of the four even metrics (if the most
likely state's LSB is 0) or of the four odd ones. These are the branches leaving
the most likely state. It adds this value to a 24-bit accumulator `C`.

The window is sized by the current status:

| status | `alarm` | window N | threshold (thr_sel = 0, 5 dB set) | threshold (thr_sel = 1, 4 dB set) |
|---|---|---|---|---|
| H1, misaligned | 1 | 4096 | 79424 | 78400 |
| H0, aligned | 0 | 8192 | 158848 | 156800 |

At the end of a window:
- If `C > T`, the status becomes H0.
- Otherwise the status becomes H1 and `phase_shift` advances by one (another −π/4
  rotation). The next 32 symbols are then left out of the sum while the decoder
  settles on the new phase.

The longer H0 window makes false alarms (losing a correct lock) extremely rare. The
short H1 window keeps acquisition fast: at most 8 × (4096 + 32) symbols.

`alarm` is the chip's misalignment flag. An outer decoder (for example
Reed-Solomon) can use it to mark output bits as erasures.

The thresholds are scaled to the 6-bit component LSB. With the constellation at
radius 0.5 and the 6-bit full scale at 0.78, the radius is 20.5 LSB. The
normalised estimator C' = C/N then averages about 20.4 when aligned and about 19.1
when a π/4 step away at Eb/N0 = 5 dB. The normalised threshold 79424/4096 = 19.39
lies between the two.

## Carrier phase detector (`costas_phase_detector`)

This is a decision-directed 8-PSK detector:
1. From X, Y, U and V it forms the eight correlations.
2. It picks the nearest point `i` (the largest correlation).
3. It outputs `m_(i+2) = Y cos φ_i − X sin φ_i`, which is about r·sin(phase error).

At low SNR more decisions are wrong, so the detector's effective gain drops. The
original chip shows this same adaptive behaviour. The 7-bit signed output drives
the external loop amplifier, loop filter and VCO.

## Top level (`tcm_receiver_asic`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | symbol clock; synchronous reset |
| `p_in`, `q_in` | in | 8 | signed ADC samples |
| `thr_sel` | in | 1 | threshold set: 0 = 5 dB, 1 = 4 dB |
| `dec_bits` | out | 2 | `{BIT1, BIT0}` = `{x2, x1}` |
| `dec_valid` | out | 1 | `dec_bits` holds data |
| `alarm` | out | 1 | misalignment / erasure flag |
| `phase_shift` | out | 3 | current counter-rotation (units of π/4) |
| `costas_phase` | out | 7 | carrier phase error, signed |
| `renorm`, `window_done`, `c_last` | out | 1, 1, 24 | observation: metric normalisation, window end, last C |

The analog receiver is not part of this RTL:
- IF/AGC chain;
- quadrature demodulator;
- baseband shaping filters;
- the two 8-bit flash ADCs;
- the clock extractor with its PLL/VCXO;
- the Costas loop filter and VCO.

Its digital boundary is the `p_in`/`q_in`/`clk` inputs and the `costas_phase`
output.

## Where this departs from the original description

- **Memory schedule.** The original gives the RAM organisation, the shared
  up/down address, read-before-write and the 20-step trace-back from the best
  state. It does not give the order in which the three RAMs change roles; the
  schedule here is this design's. The original quotes a total processing delay of
  30 symbols. Here a column is decided 30 clocks after it is written, on average,
  and the bits leave the memory after 41 clocks, reordering included.
- **Thresholds.** The chip values 79424/78400 are used. The table of the
  optimised thresholds lists 79378/78344. For the 8192 window the threshold is
  simply doubled, matching the tabulated 158755/156688 to within 0.1 %.
- **Tie-break at the threshold.** `C = T` counts as misaligned.
- **Settling gap.** The gap of 32 symbols after each rotation is this design's
  value. The original sums from an offset L without giving it.
- **Costas detector.** The original gives only the detector's purpose, that it
  shares gates with the rotator, and its falling gain at low SNR. Its structure
  here is this design's choice, and the tabulated digital/analog gain ratios are
  not reproduced.
- **Not built: burst mode.** The original mentions a burst mode with an external
  unique-word detector but does not describe it.
- **Additions.** Reset, `dec_valid` and the observation outputs.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_phase_shifter` | all 8 rotations against floating point, corners included; 1-clock latency |
| `tb_branch_metric_gen` | all 4096 input pairs against floating point; nearest point has the largest metric |
| `tb_acs_unit` | decisions, most likely state and normalisation flag against an unbounded-integer reference, 20 000 steps |
| `tb_decoding_memory` | a known trellis path with random decoy survivors; exact decoded bits at 41-clock latency; `dec_valid` timing |
| `tb_phase_sync_detector` | windows summing exactly to T and T+1, both window lengths, both threshold sets, skipped symbols, rotation stepping |
| `tb_costas_phase_detector` | error against r·sin(angle to nearest point), both signs |
| `tb_tcm_receiver_asic` | end to end at default sizes, described below |
| `tb_para_statistics` | estimator statistics with Gaussian noise, described below |

`tb_tcm_receiver_asic` runs these steps:
1. Acquire from a 3π/4 channel rotation.
2. Decode every bit pair exactly at 44-clock latency.
3. Stay locked through 8192-symbol windows.
4. Check the Costas output sign for ±0.08 rad offsets.
5. Take a 5π/4 carrier jump with the 4 dB thresholds, and re-acquire.

It fails if any of the following never happened: a rotation step, a window of
either length, an H1→H0 or H0→H1 transition, a metric normalisation, or either
threshold setting.

`tb_para_statistics` sends 204 800 symbols per condition with Gaussian noise at
Eb/N0 = 5 dB and 4 dB, with an ideal AGC that holds total received power constant.
At 5 dB, with the default seed, it measures:
- aligned: mean C' = 20.39 (8192-symbol windows, variance 0.0036);
- one step misaligned: mean C' = 19.10 (4096-symbol windows, variance 0.0108);
- bit error rate: 1.9·10⁻³.

Other seeds move the means by about ±0.01 and the bit error rate between 1.6 and
1.9·10⁻³. The variance estimates, taken over only 25 or 50 windows, range from
0.003 to 0.011.

The published hardware simulation reports 20.40, 19.09 and 1.8·10⁻³ at the same
point (its variances are for 4096-symbol windows). At 4 dB the aligned and
misaligned means are 19.88 and 18.97, on either side of the 4 dB threshold 19.14.

## Simulating

Each testbench is a top with no ports. With Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/tcm_pkg.sv tb/tb_tcm_receiver_asic.sv \
          --top-module tb_tcm_receiver_asic
./obj_dir/Vtb_tcm_receiver_asic
```

Replace the testbench name to run another one. Every testbench runs in well under
a second of simulation time. `tb_tcm_receiver_asic` and `tb_para_statistics` use
the top with all parameters at their defaults.

To change the window lengths, thresholds or settling gap, override the parameters
of `phase_sync_detector` (`N_SHORT`, `N_LONG`, `T_5DB`, `T_4DB`, `SETTLE`). Word
lengths and the survivor block length are in `tcm_pkg`. The ACS normalisation
argument above assumes 7-bit branch metrics and 9-bit path metrics. Changing
either needs the overflow assertion in `acs_unit` to keep passing.
