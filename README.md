# Feed-forward dynamic range compressor for hearing aids

A dynamic range compressor (DRC) squeezes the wide range of everyday sound
levels into the narrow range a hearing-impaired listener can use. Below a
compression threshold CT the signal passes unchanged; above it, every dB more
at the input gives only CF dB more at the output (CF = 1/compression ratio).
How fast the gain drops when a loud sound starts (attack) and how fast it
recovers afterwards (release) is set by two decay coefficients.

The hearing-aid standard defines those times at the **output**: attack is the
time the output takes to come within 3 dB of its final value after the input
steps from 55 dB to 90 dB, release the time to come within 4 dB after the step
back. The usual textbook formulas for the coefficients assume the time is
measured on the **detected input level**, and the compression itself shortens
the time seen at the output. This design is a plain, fully pipelined
compressor datapath; its point is that it is driven with coefficients from
compensated formulas (given below), so that the output meets the specified
times. With 4 ms attack and release at 20 kHz, CT = 70 dB and CF = 0.5, the
RTL reaches 82.9 dB 81 samples after the rising step and 51.1 dB 81 samples
after the falling one. The targets are 83 dB and 51 dB.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, one sample per
clock. The clock is meant to run at the sample rate (20 kHz).

## Signal path

```
x_in ─► Input Reg ─┬─► |x| (or x²) ─► envelope filter ─► p Reg
                   │                                       │
                   │          log2 table + exponent, × dB/octave
                   │                                       ▼
                   │                                     s Reg        level in dB
                   │          s > CT ? (1-CF)(s-CT) : 0    │
                   │                                       ▼
                   │                                  Gain_dB Reg     attenuation in dB
                   │          × log2(10)/20, 2^-frac table, >> int
                   │                                       ▼
                   │                                  Gain_lin Reg    linear gain ≤ 1
                   │                        [ smoothing ─► GainSm Reg ]  (SMOOTH = 1)
                   ▼                                       ▼
              input buffer (4 or 5 stages) ───────────►  ×  ─► Output Reg ─► y_out
```

| Stage | Module | Register | Format |
|---|---|---|---|
| input | `drc_top` | Input Reg | 16 bit signed |
| envelope | `drc_level_detector` | p Reg | 15 bit magnitude (30 bit for RMS) |
| level | `drc_log2` (+ `drc_log_addr_gen`) | s Reg | dB, unsigned Q7.9 |
| compression | `drc_gain_stage` | Gain_dB Reg | attenuation in dB, Q7.9 |
| linear gain | `drc_antilog` | Gain_lin Reg | Q1.15, 1.0 = 32768 |
| smoothing (optional) | `drc_smoothing` | GainSm Reg | Q1.15 |
| alignment | `drc_delay_line` | input buffer | 16 bit signed |
| output | `drc_gain_apply` | Output Reg | 16 bit signed |

Shared types and constants are in `drc_pkg`. Parameters live in
`drc_cfg_regs`.

**The dB scale.** Levels are in dB relative to one input LSB. A full-scale
16 bit input is 90.3 dB, 90 dB is an amplitude of 31623, and 55 dB is 562.
This lines the digital levels up with the sound pressure levels of the
hearing-aid test. For another calibration, shift CT by the offset between the
two scales.

## Envelope follower and its coefficients

The level detector is a one-pole low-pass filter. Its coefficient depends on
the direction of the change:

```
d(n) = |x(n)|            (absolute detector, default)
d(n) = x(n)²             (RMS detector, DETECTOR = DET_RMS)
p(n) = α p(n-1) + (1-α) d(n)   if d(n) > p(n-1)    attack  (Beta1 registers)
p(n) = β p(n-1) + (1-β) d(n)   otherwise            release (Beta2 registers)
```

Four multipliers form both candidates and a multiplexer picks one. α, 1-α, β
and 1-β are separate 16 bit registers, so they need not sum to exactly 1.0.
The sum is rounded to nearest and saturated to the envelope width.

The hardware does not compute the coefficients; software writes them. With
N_a = f_s·t_a and N_r = f_s·t_r, IV/FV the initial and final input levels of
the test step (90 and 55 dB), and CT and CF as above, the compensated
formulas are:

```
absolute detector
  δa = (FV − 3) − (FV(1−CF) − 3)/(1−CF)        δr = (CT(1−CF) + 4)/(1−CF) − (CT + 4)
  1 − α^(Na+1) = 10^(−(3+δa)/20)
  β^(Nr+1)     = (10^((CT+4+δr)/20) − 10^(FV/20)) / (10^(IV/20) − 10^(FV/20))

RMS detector (the level is squared, so the targets are squared too)
  1 − α^(Na+1) = 10^(−(3+δa)/10)
  β^(Nr+1)     = [(10^((CT+4+δr)/20) − 10^(FV/20)) / (10^(IV/20) − 10^(FV/20))]²
```

Setting δa = δr = 0 gives the conventional formulas. Those aim the detected
level, not the output, at the 3 dB / 4 dB points.

With the smoothing stage there are two filters in series. The single-stage
sample count is then replaced by a shortened one, and the same formulas are
applied to it:

```
absolute:  Nasm + 1 = 0.3039 (Na + 1)     Nrsm + 1 = 0.6177 (Nr + 1)    (same α, β in both stages)
RMS:       Nasm + 1 = 0.2872 (Na + 1)     Nrsm + 1 = 0.6500 (Nr + 1)
           detector uses the RMS formulas, smoothing stage the absolute ones
```

Register values for 4 ms / 4 ms at 20 kHz, CT = 70 dB, CF = 0.5. A register
holds round(c·65536).

| Architecture | α (attack) | β (release) | α_sm | β_sm |
|---|---|---|---|---|
| absolute | 0.9914 | 0.9824 | – | – |
| RMS | 0.9964 | 0.9651 | – | – |
| absolute + smoothing | 0.9729 | 0.9733 | 0.9729 | 0.9733 |
| RMS + smoothing | 0.9880 | 0.9498 | 0.9714 | 0.9746 |
| conventional (any) | 0.985 | 0.9763 | same | same |

## Logarithm and antilogarithm

**Log.** `drc_log_addr_gen` is a priority encoder, i.e. a chain of 2:1
multiplexers from the MSB down. It finds the leading one of p at bit k
(k ≥ W) and returns e = k − W and the W bits below the leading one as a table
index i, so that p ≈ (2^W + i)·2^e. A table of 2^W entries holds
log2(1 + i/2^W) in Q0.11. Adding the integer part W + e gives log2(p) in
Q5.11.

The encoder has PW − W stages: 7 for the default (15 bit envelope, 8 bit
index) and 11 with a 4 bit index. So a smaller table costs a longer encoder.
The RMS detector's 30 bit envelope needs 15 more stages. Levels below 2^W
(48 dB for W = 8) are treated as if the leading one were at bit W; this only
affects levels far below any useful threshold.

log2(p) is then multiplied by 20/log2(10) = 6.0206 dB per octave
(10/log2(10) for the RMS detector, whose envelope is a power). The result is
rounded to Q7.9 dB. With W = 8 the level error is below 0.035 dB; with W = 4
it is below 0.53 dB, which is one index step.

**Antilog.** The attenuation A (dB) is multiplied by log2(10)/20 to get
octaves, and rounded to W fraction bits. The fraction indexes a 2^W-entry
table of 2^(−f) in Q1.15, and the table output is shifted right by the
integer part. A shift of 16 or more gives zero gain. Both tables are computed
at elaboration time from these formulas, so changing W needs nothing else.

## Gain smoothing (optional)

With `SMOOTH = 1` a second one-pole filter follows the linear gain. Two
subtractor/comparator pairs check the gap between the new gain G_lin and the
previous smoothed gain G_sm against a threshold G_th:

```
G_sm − G_lin > G_th : G_sm = b1·G_sm + (1−b1)·G_lin     gain falling (attack, Beta1Sm)
G_lin − G_sm > G_th : G_sm = b2·G_sm + (1−b2)·G_lin     gain rising (release, Beta2Sm)
otherwise           : G_sm = G_lin
```

With G_th = 0 this is a plain two-coefficient follower. A larger G_th lets
small gain changes through unfiltered. The stage removes the steps left by
the table quantisation, at the cost of five more registers, two multipliers
and one more stage in the input buffer. The recommended low-power
configuration leaves it out.

## Registers and start-up

Write a register by holding `cfg_we` high for one clock with `cfg_addr` /
`cfg_wdata`. All registers are 16 bit.

| Addr | Register | Format | Needed when |
|---|---|---|---|
| 0 | Beta1 (α, attack) | Q0.16 | always |
| 1 | 1 − Beta1 | Q0.16 | always |
| 2 | Beta2 (β, release) | Q0.16 | always |
| 3 | 1 − Beta2 | Q0.16 | always |
| 4 | CT, compression threshold | dB Q7.9 (70 dB = 35840) | always |
| 5 | 1 − CF | Q0.16 (CF = 0.5 → 32768) | always |
| 6–9 | Beta1Sm, 1 − Beta1Sm, Beta2Sm, 1 − Beta2Sm | Q0.16 | SMOOTH = 1 |
| 10 | G_th, gain error threshold | Q1.15 | SMOOTH = 1 |

After reset `run` is low and every pipeline register holds. Once each needed
register has been written at least once, `run` rises one clock later and
stays high until reset. Registers can be rewritten while running; the new
value takes effect on the next sample. Note that CF = 0 (an infinite ratio)
cannot be programmed exactly: 1 − CF saturates at 65535/65536.

## Top-level interface and timing

`drc_top` parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `DETECTOR` | `DET_ABS` | `DET_ABS` absolute detector, `DET_RMS` mean-square detector |
| `LOG_W` | 8 | log and antilog table index width (4 and 8 are the studied values) |
| `SMOOTH` | 0 | 1 adds the gain smoothing stage |

Ports: `clk`, `rst_n` (asynchronous, active low), the register port,
`x_in`/`y_out` (16 bit signed), and three status outputs. `run` means the
configuration is complete. `attack` says the detector took the attack branch
on its last update. `compressing` says the level was above CT on the last
gain update.

While `run` is high, one sample is taken from `x_in` on every rising edge. The
sample taken at edge k leaves on `y_out` after edge k + 5 (k + 6 with
smoothing). The input buffer has as many stages as there are registers on the
gain path (4, or 5 with smoothing). The gain therefore multiplies the very
sample it was computed from, including that sample's contribution to the
envelope.

## Verification

Every module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. Each unit test compares the block against a
model computed in the testbench:

- `tb_drc_level_detector`: exact integer model of the filter, both detector
  types, random bursts and coefficients.
- `tb_drc_log_addr_gen`: exhaustive over 15 bit inputs for W = 8 and W = 4,
  plus random 30 bit inputs. Checks (2^W+i)·2^e ≤ p < (2^W+i+1)·2^e.
- `tb_drc_log2` and `tb_drc_antilog`: compare against real-valued log10 and
  powers, with error bounds.
- `tb_drc_gain_stage`, `tb_drc_smoothing`, `tb_drc_gain_apply`,
  `tb_drc_delay_line`, `tb_drc_cfg_regs`: exact or one-LSB checks against the
  formulas above.

System-level tests:

- `tb_drc_full`: runs the default `drc_top` on the 55 → 90 → 55 dB step test.
  Coefficients come from the compensated formulas, computed in the testbench
  and checked against the table values. The test:
  - compares every output sample with a floating-point model (largest
    deviation 0.07 dB);
  - checks the 83 dB / 51 dB points, the 80 dB steady state and the latency;
  - checks that nothing moves before the configuration is complete.
- `tb_drc_top`: runs all eight architectures (absolute/RMS × smoothing or not
  × 8/4 bit tables) on the same test. It checks:
  - the target levels;
  - the latency and the sign;
  - the error against the floating-point model over the two 81-sample
    transients: RMSE 0.010–0.023 dB with 8 bit tables and 0.09–0.15 dB with
    4 bit tables;
  - that every detector, gain and smoothing branch occurred.
- `tb_drc_conventional`: uses the uncompensated coefficients (0.985 / 0.9763)
  and checks that the output misses the targets. Attack levels at 81 samples:
  81.5 dB (absolute), 80.8 (RMS), 86.0 (absolute + smoothing),
  85.1 (RMS + smoothing).

To run one with plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl rtl/drc_pkg.sv tb/tb_drc_full.sv --top-module tb_drc_full
./obj_dir/Vtb_drc_full
```

Every test simulates a few thousand samples and finishes in well under a
second.

## Design choices beyond the source

The structure follows the published architecture: register set, four-multiplier
envelope filter, leading-one address generator, base-2 tables, compare-and-mux
gain stage, two-comparator smoothing stage, and input buffer sized to the
pipeline. The following were not specified there and are this design's own:

- the binary points (Q0.16 coefficients, Q7.9 dB, Q5.11 log2, Q1.15 gains),
  rounding to nearest everywhere, and the dB reference of one LSB;
- the register write port, the address map, and the rule that `run` waits for
  every needed register;
- the antilog stage's constant multiplier that turns dB into octaves before
  splitting integer and fraction;
- the value of the address generator below 2^W;
- letting gain differences within G_th pass straight through in the smoothing
  stage;
- storing 1 − CF and applying it as an attenuation, rather than a signed gain
  (CF − 1).

The coefficient formulas are computed off-line and are not part of the RTL.
The published power and area figures come from a 65 nm standard-cell layout
and cannot be reproduced from the RTL alone.
