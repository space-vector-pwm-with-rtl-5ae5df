# CME-SVPWM: space-vector PWM with common-mode voltage elimination

A multilevel inverter feeding a P-phase motor can reach most output voltages
through several switching states that differ only in their common-mode
voltage, the average of the P phase voltages. That voltage drives bearing
currents and electromagnetic interference. This modulator uses **only
switching states whose phase levels add up to zero**, so, ignoring dead times,
the common-mode voltage of the inverter never moves. It works for any number
of phases P and any odd number of levels N, needs no trigonometric functions
or tables, and its cost does not grow with the number of levels. The default
configuration is a five-level, five-phase cascaded full-bridge drive clocked
at 50 MHz with a 9.8 kHz switching frequency and a 4 µs dead time.

## The idea in three linear maps

Phase references and switching vectors are normalized to the inverter's
voltage step Vdc, so a switching vector is a vector of P integers (levels) and
the reference `v_r` is a vector of P reals. A modulator must find vectors
`v_1..v_l` and dwell times `t_1..t_l` (fractions of the period, summing to 1)
whose time average is the reference. With the zero-sum condition on every
vector, only the part of `v_r` with its mean removed can be produced.

Step 0 is plain scaling: the phase reference voltages are divided by Vdc.
Then take the basis `b_k = e_k - e_(k+1)` (k = 1..P-1) plus the all-ones vector.
A vector has zero sum exactly when its all-ones coordinate is zero, so every
zero-common-mode vector is an integer combination of the P-1 difference
vectors alone. This turns the constrained P-dimensional problem into an
unconstrained (P-1)-dimensional one:

1. **R (reduce).** `w_r = R v_r`, where component i is the running sum of
   the reference with its mean removed:
   `w_r[i] = v[0] + .. + v[i] - (i+1)/P * (v[0] + .. + v[P-1])`.
2. **B-SVPWM on w_r.** This is the ordinary multilevel SVPWM in P-1
   dimensions. Split each component into floor and fractional part, and sort
   the fractional parts in descending order `f(0) >= .. >= f(P-2)`. Vector 0
   is the floor vector. Vector j adds one unit to the j components with the
   largest fractions. The dwell times are `t_0 = 1 - f(0)`,
   `t_j = f(j-1) - f(j)` and `t_(P-1) = f(P-2)`. There are P vectors, each
   next to the one before, and the last one is the first plus `[1,..,1]`.
3. **Q (expand).** `v = Q w`, where
   `v[0] = w[0]`, `v[k] = w[k] - w[k-1]` and `v[P-1] = -w[P-2]`. Each
   unit step in w becomes "one phase up one level, its neighbour down one
   level", so every output vector sums to zero.

Worked example (P = 5, m = 1.9, 50 Hz, t = 2.5 ms):
`v_r = [1.344 1.693 -0.297 -1.877 -0.863]` gives
`w_r = [1.344 3.037 2.740 0.863]` and the sequence

| j | reduced vector | switching vector  | dwell |
|---|----------------|-------------------|-------|
| 1 | [1 3 2 0]      | [1 2 -1 -2 0]     | 0.137 |
| 2 | [1 3 2 1]      | [1 2 -1 -1 -1]    | 0.123 |
| 3 | [1 3 3 1]      | [1 2 0 -2 -1]     | 0.396 |
| 4 | [2 3 3 1]      | [2 1 0 -2 -1]     | 0.307 |
| 5 | [2 4 3 1]      | [2 2 -1 -2 -1]    | 0.036 |

All levels lie in -2..2, so a five-level inverter can produce them. Both
testbenches for the algorithm check this example.

## Switching pattern

Each step of the sequence moves exactly two phases, one up and one down.
Because the last reduced vector is the first plus `[1,..,1]`, the last
switching vector is the first plus `[1, 0, .., 0, -1]`. So the return from
the last vector to the first also moves only two phases. The sequence is
therefore applied in sorted order in every period, 1, 2, .., P and then back
to 1, with no symmetric (up-down) arrangement. This gives 2P level changes
per period, and every phase switches exactly twice. Two opposite edges
happen at the same moment, which keeps the common-mode voltage at zero.
Once dead times are added they are no longer simultaneous. Depending on the
current directions, short pulses of ±Vdc/P then remain in the common-mode
voltage. This is a property of the method and not a defect of the RTL.

The linear range is `m <= (N-1)/2` for odd N, which is `m <= 2` for five
levels. Beyond that, some levels fall outside the inverter's range.

## Hardware structure

```
ref_v[P] (volts), vdc_inv
   │
   ▼
cme_normalize ─► cme_ref_reduce ─► cme_bsvpwm ─► cme_q_expand ─► cme_vector_sequencer ─► level[P]
(×1/Vdc, P+1 clk) (R, 1 clk)     (sort, 1 clk)   (Q, 1 clk)     (shadow + period timer)    │
                                  └ cme_frac_sorter                                        ▼
                                                                                  P × cme_gate_driver
                                                                                  (2 cells × 2 legs,
                                                                                   cme_deadtime_leg)
                                                                                        │
                                                                              gate_hi / gate_lo
```

| module | role |
|---|---|
| `cme_pkg` | drive constants (P, N, clock, period, dead time) and the fixed-point formats |
| `cme_normalize` | `v_r = V_r * (1/Vdc)`. One multiplier is shared by the phases, one phase per clock, with rounding and saturation |
| `cme_ref_reduce` | block R: the exact numerator `P*C_i - (i+1)*S`, then division by P with a rounded reciprocal (error ≤ 1 LSB) |
| `cme_frac_sorter` | parallel rank sorter: each input is compared with every other input. Ties keep input order |
| `cme_bsvpwm` | floor/fraction split, sorter, P reduced vectors, P dwell times |
| `cme_q_expand` | block Q, plus the overmodulation check |
| `cme_vector_sequencer` | period counter. Double-buffers the sequence and outputs vector j between the switching instants |
| `cme_gate_driver` | maps a phase level to the legs of its H-bridge cells |
| `cme_deadtime_leg` | complementary gate pair of one leg with dead-time insertion |
| `cme_svpwm_top` | wires everything together |

### Number formats

All formats are choices of this design.

* Reference voltages `ref_v` are signed 16-bit numbers in volts with 6
  fractional bits (±512 V). `vdc_inv` is 1/Vdc as an unsigned 18-bit number
  with 20 fractional bits, which supports Vdc ≥ 4 V. It is read with each
  reference, so a measured dc-link voltage can be followed.
* Normalized references are signed 16-bit numbers with 12 fractional bits,
  in units of Vdc (range ±8, resolution about 0.00024 Vdc).
* The reduced reference is 20 bits wide with the same 12 fractional bits.
* Dwell times are unsigned 13-bit fractions of the period (1.0 = 4096). They
  are exact differences of the sorted fractions, so they always sum to
  exactly one period.
* Phase levels are signed 4-bit numbers.

### Timing

* A reference is taken on a clock where `ref_valid` and `ref_ready` are both
  high. `ref_ready` then stays low for P clocks while the normalizer works.
  A request made meanwhile is ignored, not queued.
* `seq_valid` follows P+4 clocks later (9 for five phases), with `seq_overmod` (the sequence needed
  levels outside ±(N-1)/2; those levels are saturated).
* The new sequence goes into a shadow register. It is used from the next
  period boundary, marked by `swap`. A period therefore always uses one
  consistent sequence. If several references arrive in one period, the last
  one wins.
* The period is `PERIOD` = 5102 clocks (50 MHz / 9.8 kHz). `period_start`
  is high in its first clock. Use it to request the next reference.
* Switching instants are `b_j = round((t_0+..+t_j) * PERIOD)`. Vector j is
  output while `b_(j-1) <= count < b_j`. A vector with zero dwell time is
  skipped.
* Before the first sequence arrives, all levels are 0.

### Gate signals

Which transistor pattern produces a level depends on the inverter topology.
The mapping here is for a cascaded full-bridge with `(N-1)/2` H-bridge cells
per phase, and it is this design's own choice:

* For level L > 0, cells 0..L-1 output +Vdc (leg A up, leg B down).
* For level L < 0, cells 0..|L|-1 output -Vdc (leg A down, leg B up).
* All other cells output 0 (both legs down).

A one-level step therefore moves exactly one leg. Each leg has an upper and a
lower gate. On every changeover, both gates stay off for `DEAD` clocks
(200 = 4 µs). If a request is withdrawn during the dead time, the leg
returns at once to the gate it had, since its complement was never turned
on. Cells are not rotated. Cell 0 switches on every change between levels 0
and ±1, and cell 1 on every change between ±1 and ±2, so their switching
losses differ with the modulation index. Balancing the cells would be a
change confined to `cme_gate_driver`.

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `P` | 5 | phases |
| `N_LEVELS` | 5 | inverter levels (odd) |
| `VIN_W`, `VIN_FRAC` | 16, 6 | reference voltage width and fractional bits |
| `INV_W`, `INV_FRAC` | 18, 20 | width and fractional bits of 1/Vdc |
| `REF_W`, `FRAC` | 16, 12 | normalized reference width and fractional bits |
| `LVL_W` | 4 | level width |
| `PERIOD` | 5102 | clocks per switching period |
| `DEAD` | 200 | dead-time clocks |

All modules are written for general P and N. End-to-end simulation covers
P = 5 / N = 5 at the defaults, and also P = 7 / N = 7, P = 3 / N = 3 and
P = 6 / N = 5.

## Where this differs from the reference implementation

* **Latency.** The FPGA implementation this design is based on needed 1231
  clocks (25 µs) per reference, with a sequential B-SVPWM core of unpublished
  structure. Here only the normalization is sequential (P clocks on one
  multiplier). The other three stages are single-cycle, and a sequence is
  ready 9 clocks after its reference. Both fit easily in one 102 µs period. The
  combinational sorter and constant multipliers cost more logic than a
  sequential design would. Coarse synthesis of the top gives about 1200
  flip-flop bits, against roughly 900 flip-flops in that implementation. The
  design uses no memories.
* **Even level counts.** The overmodulation limit `(N-1)/2`, taken with
  integer division, equals `N/2 - 1` for even N, which is the method's
  linear limit there. The gate mapping, however, assumes a cascaded
  full-bridge, which always has an odd number of levels.
* **Own choices.** The fixed-point formats, the run-time 1/Vdc input, the
  reference handshake, the double buffering of sequences, the rounding of switching instants,
  saturation on overmodulation, the tie rule of the sorter and the
  level-to-gate mapping are not specified by the method. Each is described
  above.
* The reference source (an external controller board), the power stage and
  the motor are outside this RTL. The reference arrives on `ref_valid`/`ref_v`,
  and the gate signals leave on `gate_hi`/`gate_lo`.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops on a watchdog.

| testbench | what it establishes |
|---|---|
| `tb_cme_normalize` | worked example in volts, and 2000 random vectors and reciprocals against the rounded, saturated product. Also checks the P+1 latency and that requests made while busy are ignored |
| `tb_cme_ref_reduce` | worked example, invariance to a common offset, and 2000 random references against the exact rational value (±1 LSB), 1-clock latency |
| `tb_cme_frac_sorter` | 5000 inputs, half of them rich in ties, against a stable insertion sort |
| `tb_cme_bsvpwm` | worked example, and 3000 random references against a reference model. Also checks adjacency, last = first + 1, that the dwell times sum to one period, and that the dwell-weighted average of the vectors reproduces `w_r` exactly |
| `tb_cme_q_expand` | worked example, random vectors, zero sum, saturation and overmodulation flag |
| `tb_cme_vector_sequencer` | clock-by-clock vector index against the scaled instants. Covers zero dwell times, double loads, loads in the last clock of a period, and repeated periods (PERIOD reduced to 500) |
| `tb_cme_gate_driver` | no shoot-through, dead time exactly `DEAD` on a steady request, cell sum equals level, one leg per step, short pulses (DEAD reduced to 7) |
| `tb_cme_svpwm_top` | default parameters: worked example (vectors, dwell times within 0.003, 2P switchings, two phases per step), one full 50 Hz fundamental at m = 1.9 and a quarter at m = 0.8. Checked every clock: zero level sum, levels in range, one-up/one-down per step. Checked every period: the per-phase time average equals the reference with its mean removed within 0.005 Vdc. Also covers an integer reference, sorter ties, overmodulation, dead times, a request made while busy and the 9-clock latency |
| `tb_cme_svpwm_generic` (with `cme_generic_run`) | the complete modulator for P = 7 / N = 7, P = 3 / N = 3 and P = 6 / N = 5, each with its own period and dead time and 100 random sinusoidal references. Checks zero level sum every clock, level range, steps, per-period averages and the overmodulation flag |

The RTL also carries concurrent assertions, which Verilator checks when
`--assert` is given. `cme_deadtime_leg` asserts that the two gates of a leg
are never on together. `cme_vector_sequencer` asserts that the vector index
and the period counter stay in range.

The top-level test runs about 1.3 million clocks in a few seconds. To run a
testbench with Verilator 5:

```
verilator --binary --timing --top-module tb_cme_svpwm_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/cme_pkg.sv tb/tb_cme_svpwm_top.sv
./obj_dir/Vtb_cme_svpwm_top
```

The RTL has been simulated only and has not been run on hardware. The
effect of dead times on the common-mode voltage is not modelled.
