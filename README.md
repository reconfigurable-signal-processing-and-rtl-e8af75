# Reconfigurable transmitter DSP: interpolation chain and signal component separator

A digital transmitter for 5G-class signals has to turn baseband I/Q
samples into whatever its RF back end consumes. A Cartesian
transmitter needs I and Q. A polar one needs an amplitude A and a phase
phi. An outphasing one needs two constant-envelope phases
phi1 = phi + theta and phi2 = phi - theta, with theta = acos(A).
Multilevel outphasing also needs a coarse amplitude level A_MOP. The
non-linear conversions widen the spectrum by five to ten times, so the
baseband must first be interpolated up to the RF sampling rate, here up
to f_Clk = 4 GHz.

This RTL does both jobs in one reconfigurable block:

* a **programmable interpolator** (three polyphase half-band filters and
  a third-order CIC) with factors 2, 4, 8 and 8n = 16, 24, ..., 128;
* a **signal component separator (SCS)** built from pipelined CORDICs,
  which produces the Cartesian, polar, outphasing or multilevel
  outphasing signals with 7-bit phases;
* **4-way parallelism** at the fast end. The CIC integrators are unrolled
  and the SCS is replicated four times, so nothing runs faster than
  f_Clk/4, yet the output is one sample per f_Clk cycle.

The hardware configuration (which SCS cores exist, the output resolution,
the parallelism) is set by parameters. The operating point (clock ratio,
interpolation tap, scaling, modulation) is set at run time through a
small control bus.

```
             f_Clk/8n    f_Clk/4n    f_Clk/2n     f_Clk/n        K lanes @ f_Clk/K           f_Clk
 bb_in ──► HBF1 ──────► HBF2 ──────► HBF3 ──────► CIC (x n) ──┐
 (I/Q)     31 taps   │  15 taps   │  7 taps    │  N=3, unrolled│
                     │            │            │  by K = 4     ▼
                     └────────────┴────────────┴──► deser ──► lanes[0..3] ──► SCS core 0 ─┐
                       bypass taps (x2, x4, x8)     + tap mux                  SCS core 1 ─┤ output
                                                                               SCS core 2 ─┤ mux ──► out
                                                                               SCS core 3 ─┘
 clk ──► clk_div (strobes ce_n, ce_2n, ce_4n, ce_8n, ce_k)     ctrl_bus (run-time registers)
```

## Clocking: one clock, rate strobes

The source design has divided clocks f_Clk/n, /2n, /4n, /8n and
f_Clk/k. Here everything runs on the master clock `clk`. `clk_div`
turns each divided clock into a one-cycle **enable strobe**, so the
design has one clock domain and no clock-crossing logic. The strobes
nest: `ce_8n` implies `ce_4n`, which implies `ce_2n`, which implies
`ce_n`. `ce_k` fires every K cycles, at a phase set by `clk_shift`.
`k_phase` numbers the K master cycles of each f_Clk/K period.

With the main setting n = 2, K = 4 the rates are:

| stage | input rate | output rate |
|---|---|---|
| HBF1 | f_Clk/16 (baseband) | f_Clk/8 |
| HBF2 | f_Clk/8 | f_Clk/4 |
| HBF3 | f_Clk/4 | f_Clk/2 |
| CIC  | f_Clk/2 | f_Clk, as 4 lanes per f_Clk/4 period |
| SCS  | 4 lanes per f_Clk/4 period | f_Clk, serial |

One convention holds throughout. A stage's output register changes on
that stage's output strobe and holds for the whole period. The next
stage samples it on its own input strobe, which is the same strobe. So
every hand-over adds exactly one period of latency, and it never
depends on the order in which the simulator evaluates processes.

## Interpolator

### Half-band stages (`hbf`)

A half-band filter of 4M-1 taps has 2M+1 non-zero coefficients: the
centre tap and the taps an odd distance from it. Interpolating by two
splits it into two branches that run at the input rate:

* even branch: `y(2n) = sum g[m] x(n-m)`, m = 0..2M-1, where g is
  symmetric, so pairs are added first and only M multipliers remain;
* odd branch: `y(2n+1) = x(n-M+1)`, just a delay, because the centre
  tap (0.5 times the interpolation gain 2) is 1.

| stage | taps | non-zero | multipliers | stop band (this coefficient set) |
|---|---|---|---|---|
| HBF1 | 31 | 17 | 8 | about 61 dB |
| HBF2 | 15 | 9 | 4 | about 71 dB |
| HBF3 | 7 | 5 | 2 | about 60 dB |

The tap counts follow the source. **The coefficient values are this
design's own.** They come from an equiripple half-band design with
pass-band edges of 0.195, 0.125 and 0.07 of each stage's output rate,
quantised to Q1.14. They are listed in `dsp_pkg` as the first half of
the even branch, already multiplied by 2. They are plainly rounded, so
the DC gain is 0.1 to 0.2 % below one. Forcing the sum to exactly 1.0
would cost 5 to 10 dB of stop band. HBF1's 0.195 edge passes a
200 MHz NR carrier (about ±95 MHz) at a 250 Msps input. The
output multiplexer picks the even result on the strobe between two
input samples and the odd one on the strobe that coincides with the
next input. Outputs are rounded and saturated to Q1.14.

### CIC with unrolled integrators (`cic`)

`H(z) = [(1 - z^-L)/(1 - z^-1)]^3`, with **L = n**, the divider ratio,
so the whole chain interpolates by 8n.

* The three combs run on `ce_n`.
* Their output is zero-stuffed on the master clock. A K-deep register
  collects K consecutive values.
* Each of the three integrators computes, once per f_Clk/K period, the
  K running sums `y(Kn-j) = y(Kn-K) + x(Kn-K+1) + ... + x(Kn-j)`
  starting from the previous block's last sum. This is the 4-way
  unrolled integrator, so it runs at f_Clk/4 instead of f_Clk.
* Registers are 28 bits wide (16 + 3·log2 16) and wrap around, which is
  exact for any n up to 16.
* The DC gain is n². The output is divided by 2^`cic_shift` (rounded)
  and saturated. The reset value 2 normalises n = 2 exactly. For an n
  that is not a power of two, pick the largest shift that does not
  saturate your signal.

### Taps and deserializer (`deser`)

The interpolator output can come from HBF1 (x2), HBF2 (x4), HBF3 (x8)
or the CIC (x8n). The CIC already delivers 4 lanes per period. A
half-band tap is a serial stream, so a 3-register chain packs 4
consecutive samples into one word. That word is issued at the next
`ce_k`, and `valid` marks the periods that carry one.

The baseband rate stays f_Clk/8n whichever tap is used. So the bypass
taps produce fewer samples than there are master cycles, and the
serial output comes in bursts of 4.

## Signal component separator

### Datapath of one core (`scs_core`)

```
I,Q ─► vectoring CORDIC ─► level stage ─► ratio stage ─► arccos CORDIC ─► output stage
        (A, phi)            A<=1, A*AMAX,   t = A*AMAX/A_mo  theta=acos(t)    phi1 = phi+theta
        17 steps            A_mo=ceil(..)   (multilevel)     16 steps         phi2 = phi-theta
                                            t = A (outphasing)                wrap to [0,2pi), 7-bit
phi ───────────────── delay 18 ──────────────────────────────────────────►
A, A_mo ─────────────────────────────── delay 16 ────────────────────────►
I,Q ──────────────────────────── delay 35 ──────────────────────────────►
```

* **Vectoring CORDIC** (`cordic_vec`). A first stage folds the left
  half plane onto the right one (angle ±π). Then come 15 shift-add
  micro-rotations, one register stage each, and a multiply by 1/K =
  0.60725. The outputs are A in Q1.14 and phi as a signed binary angle,
  with π = 2^15.
* **Multilevel level.** `A_mo = ceil(A·AMAX)`, limited to 1..AMAX, and
  `A_MOP = A_mo/(2·AMAX)`. AMAX = 4 here, so the four equally spaced
  levels are 1/8, 2/8, 3/8 and 4/8. The ratio A·AMAX/A_mo needs no
  divider: it is multiplied by a constant reciprocal of A_mo.
* **Arccos CORDIC** (`cordic_acos`), the least familiar part. It starts
  from the vector (1, 0) and the angle 0. In step n it compares x with
  the threshold t_n and picks d = sign(y) if x ≥ t_n, else -sign(y).
  It then rotates **twice** by d·atan(2^-n), so theta changes by
  2d·atan(2^-n). A double rotation scales the vector by exactly
  1 + 2^-2n, and the threshold gets the same factor,
  t_{n+1} = t_n + t_n·2^-2n. No gain correction is then needed. That is
  why this form is used rather than a plain CORDIC, whose scale factor
  would spoil the x ≥ t comparison. The iteration can settle on
  -acos(t) (near t = 1) or 2π - acos(t) (near t = -1), which have the
  same cosine, so the result is folded onto [0, π]. Over [-1, 1] the
  error is below 0.04°.
* **Output stage.** It forms phi1 and phi2 and wraps them onto [0, 2π):
  2π is added to a negative angle and removed from one of 2π or more.
  Each phase is then rounded to `OUT_RES` = 7 bits, and A is rounded to
  Q0.7. Delay lines balance every path, so all fields of a sample leave
  together, 36 f_Clk/K steps after it entered, whatever the mode.

### Output fields (`scs_out_t`)

The four fields mirror the four output multiplexers of the SCS:

| field | Cartesian | polar | outphasing | multilevel outphasing |
|---|---|---|---|---|
| `amp_lvl` (7 b, Q0.7) | 0 | 0 | 64 (= 0.5) | A_mo·64/AMAX (= A_MOP) |
| `a_i` (16 b) | I | A (Q0.7 in bits 6:0) | A | A |
| `ph1` (7 b) | 0 | phi | phi1 | phi1 |
| `q_ph2` (16 b) | Q | 0 | phi2 (bits 6:0) | phi2 (bits 6:0) |

A 7-bit phase code p stands for p·2π/128.

### Generation and run-time selection

`SCS_TYPE` decides what is built:

* 0: Cartesian only, no CORDIC, 1 step of latency;
* 1: polar, with the vectoring CORDIC only, 18 steps;
* 2 or 3: the full core, which outphasing and multilevel outphasing
  share, 36 steps.

The run-time `mode` register chooses among the architectures that were
built. A mode above `SCS_TYPE` falls back to the highest one built. The
default, 3, supports all four modes.

Synthesised to generic gates, one core takes about 33 cells for type 0,
11.7 k for type 1 and 38.4 k for types 2 and 3. The full core costs
about 3.3 times the polar one because of the arccos CORDIC and its
delay lines.

### Time interleaving (`scs_ti`)

There are K = 4 cores, core j taking lane j. They all advance on
`ce_k`, so each runs at f_Clk/4. At `ce_k` the output multiplexer
emits lane 0 of the finished word and keeps lanes 1..3 in a holding
register. It then emits lane j in slot `k_phase = j`. The stream leaves
in the original sample order, one sample per master cycle.

## Control bus (`ctrl_bus`)

A synchronous write port (`bus_we`, 3-bit `bus_addr`, 8-bit
`bus_wdata`) and a combinational read port (`bus_rdata`).

| addr | field | reset | meaning |
|---|---|---|---|
| 0 | `n_div[4:0]` | 2 | divider and CIC ratio n, 2..16 (smaller values are stored as 2) |
| 1 | `isel[1:0]` | 3 | 0 HBF1 (x2), 1 HBF2 (x4), 2 HBF3 (x8), 3 CIC (x8n) |
| 2 | `cic_shift[3:0]` | 2 | right shift after the CIC |
| 3 | `mode[1:0]` | 3 | 0 Cartesian, 1 polar, 2 outphasing, 3 multilevel outphasing |
| 4 | `clk_shift[1:0]` | 0 | phase of the f_Clk/K strobe |

The reset values are the main configuration: multilevel outphasing with
x16 interpolation. Changes apply at once. Reconfiguring while data is
flowing produces a short transient: words that mix two taps, or a
pipeline holding samples of the old mode. Reset the design, or let the
stream drain, if that matters.

## Top level (`dsp_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | master clock f_Clk, asynchronous active-low reset |
| `bus_we`, `bus_addr`, `bus_wdata`, `bus_rdata` | in/out | control bus |
| `bb_in` (`iq_t`) | in | baseband I/Q, signed Q1.14; must be valid whenever `bb_ready` is high |
| `bb_ready` | out | the f_Clk/8n strobe; a sample is taken in that cycle |
| `out` (`scs_out_t`), `out_valid` | out | output stream |

The parameters and their defaults are `K` = 4, `SCS_TYPE` = 3,
`OUT_RES` = 7, `AMAX` = 4 and `CIC_W` = 28. `K` must be a power of two.
The end-to-end test has also been run with `K` = 2 and `K` = 8, and
every output sample matched the model. At `K` = 8 the test's bound on
the output count is a few samples too tight for the x8 tap, because
the deserializer then holds more samples. `clk_shift` is 2 bits wide,
so it reaches only the first 4 phases when `K` = 8.
`OUT_RES` can be 1..7. A shorter phase code is right-aligned in the
7-bit fields of `scs_out_t`, and a value above 7 is rejected at
elaboration. Going wider needs `scs_out_t` widened too.

The clock source and the RF phase modulator / power amplifier are not
part of this RTL. `clk` comes in as a port, and `out` is what they
would consume.

Number formats: samples are signed Q1.14 (range ±2, ±1 nominal), and
internal angles are 16-bit binary angles.

## How far to trust it

Every module has a self-checking testbench in `tb/`. Its reference
model is written independently of the RTL structure (`tb_ref_pkg`):

* the half-band and CIC stages are checked as zero stuffing followed by
  a full-length convolution;
* the SCS is checked with real-valued `sqrt`, `atan2` and `acos`.

Results:

* Half-band, CIC, deserializer and whole interpolator: **bit-exact**
  against the model, including the cycle timing of the unit blocks. The
  CIC is checked for n = 2, 3 and 16 and into saturation. The chain is
  checked at all four taps and at x24.
* CORDICs: magnitude within 4 LSB, phase within 12/65536 of a turn,
  arccos within 12/65536 of a turn (measured: 6). Latencies are exact.
* SCS (all four `SCS_TYPE` variants side by side): every 7-bit phase within one code of the rounded ideal value,
  and A within one Q0.7 step. The amplitude level is exact except within
  0.002 of a level boundary. All four levels occur.
* `tb_dsp_top` runs the top at its default parameters. It covers the
  reset configuration (with no bus write), every mode and every tap,
  n = 3, a shifted f_Clk/K phase, full-rate output and all interleaved
  slots and levels. It counts each of these and fails if one never
  happened. Cartesian output must equal the model's interpolated I/Q
  bit for bit.

### Signal quality (`tb_evm`)

`tb_evm` measures what a transmitter designer cares about. The signal
is a periodic OFDM-like baseband: 192 tones spanning ±0.375 of the input
rate (about a 190 MHz carrier at 250 Msps), each carrying a random
64-QAM symbol, at an RMS of 0.2 and an 8.3 dB crest factor. The envelope
is rebuilt from the output fields: A·e^{jφ}, or
(amp_lvl/64)·(e^{jφ1}+e^{jφ2})/2. One steady-state period is
transformed. EVM is taken over the tone bins, against the input symbols
after the interpolator's fitted gain and delay. ACLR compares the
in-band power with bins 104..296 on either side, about a 200 MHz
adjacent channel.

| factor | Cartesian | polar | outphasing | multilevel outphasing |
|---|---|---|---|---|
| x16 EVM / ACLR | 0.21 % / 69.6 dB | 0.50 % / 48.1 dB | 1.15 % / 39.5 dB | 0.42 % / 48.7 dB |
| x8  EVM / ACLR | 0.08 % / 69.4 dB | 0.55 % / 45.1 dB | 1.54 % / 36.3 dB | 0.50 % / 46.1 dB |
| x4  EVM / ACLR | 0.06 % / 69.4 dB | 0.77 % / 41.9 dB | 2.22 % / 32.6 dB | 0.71 % / 43.1 dB |

(The ACLR shown is the worse side.) The 7-bit phase quantisation
dominates. Its noise spreads over the output band, so a higher
interpolation factor leaves less of it in and next to the channel.
Plain outphasing suffers most, because its error is fixed by the
constant-envelope vectors while the signal is small. The multilevel
scheme scales those vectors with the level, which gains 9 to 10 dB of
ACLR. The testbench checks these against the NR 64-QAM limits (EVM
≤ 8 %, ACLR ≥ 30 dB). It also checks that multilevel beats plain
outphasing at every factor.

What is not verified: a standard-conformant NR waveform and receiver,
timing closure at 4 GHz, and reconfiguration while data is flowing.

## Where this design departs from, or fills in, the source

* Divided clocks are replaced by enable strobes on one clock.
* The half-band coefficients, all internal word lengths, the rounding
  and saturation points, the control-bus protocol and register map,
  AMAX = 4 and the reset behaviour were chosen here, not taken from the
  source.
* The arccos step uses the double-rotation form: the angle grows by
  twice atan(2^-n) per step, consistent with the 1 + 2^-2n threshold
  scaling.
* A_mo is limited to 1..AMAX. Phases of 2π or more are wrapped as well
  as negative ones.
* Polar mode can be selected at run time in the full core.
* The Cartesian I/Q path is delay-balanced like the others.
* The input rate is f_Clk/8n for every tap. The x2/x4/x8 taps therefore
  deliver their output in bursts rather than at a lower uniform clock.
* The largest input rate is f_Clk/16 (n ≥ 2): 250 Msps at 4 GHz. That
  covers a 200 MHz NR carrier, but not a 400 MHz one at a 4 GHz clock.

## Simulating

Plain Verilator 5 is enough. For example, the end-to-end test:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/dsp_pkg.sv tb/tb_ref_pkg.sv tb/tb_dsp_top.sv --top-module tb_dsp_top
./obj_dir/Vtb_dsp_top
```

Any other testbench runs the same way: replace `tb_dsp_top` with
`tb_hbf`, `tb_cic`, `tb_deser`, `tb_interpolator`, `tb_cordic_vec`,
`tb_cordic_acos`, `tb_scs_core`, `tb_scs_ti`, `tb_clk_div`,
`tb_ctrl_bus` or `tb_evm` (which needs no `tb_ref_pkg`). Each prints `TB_RESULT checks=<n> failures=<m>` and
stops, and a watchdog ends it with a failure if it hangs. The top
testbench and `tb_evm` each run in a few seconds.

Files: `rtl/dsp_pkg.sv` holds the shared types, coefficient tables and
CORDIC constants. There is one module per file in `rtl/`.
`pipe_delay` is the enable-gated delay line that the SCS uses for
balancing.
