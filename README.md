# C-Mantec on-chip learner

C-Mantec ("competitive majority network trained by error correction") is a
constructive neural network algorithm. It builds a single-hidden-layer
network of threshold neurons whose output is the majority vote of the hidden
neurons, and grows the hidden layer while it trains. The hidden neurons are
*thermal perceptrons*: each has a temperature that falls as it learns, and
its learning step shrinks with both temperature and distance from its
decision boundary. When a pattern is misclassified, the wrong neurons compete.
The one with the largest thermal factor `Tfac` learns the pattern, but only if
that factor exceeds the growing factor `gfac`. Otherwise a new neuron is added
and every temperature starts again from `T0`.

This RTL performs the whole algorithm in hardware, training included. The
training patterns arrive over a serial line. All further work happens in the
fabric: choosing a pattern at random, evaluating the network, computing the
thermal factors, updating weights, growing the network and filtering noisy
patterns. It is plain synthesizable SystemVerilog with no vendor cores, and
its products use shift-and-add multipliers.

## Structure

```
cmantec_top
 ├─ serial_rx          serial port (8N1) -> pattern bytes
 ├─ pattern_block      pattern RAM, random draw, eligible set, noise filter
 ├─ cmantec_control    sequencing, activation flags
 │   ├─ s_module       majority of the active neurons (network output)
 │   └─ tfac_module    largest Tfac and its neuron, 16 neurons per clock
 └─ cmantec_neuron x NN
     ├─ shift_add_mult one multiplier, shared in time by all phases
     └─ exp_table      exp(-x) samples for interpolation
cmantec_pkg            shared widths, formats and the exp() sample function
```

All `NN` neurons exist in hardware from the start. The control block keeps
activation flags, and the first `n_active` neurons form the current network.
The other neurons still compute, but their outputs are masked. Four signal
groups link the blocks:

- The pattern block broadcasts the current pattern to all neurons. The pattern
  holds the inputs `psi` and the class `target`.
- The neurons send their outputs `S` and their `Tfac` values to the control
  block.
- The control block returns the network output `maj` to all neurons.
- A one-hot neuron selector (`upd_sel`) tells the winning neuron to learn.

## One learning step and its timing

Each step has up to three phases. Their lengths are fixed by construction and
reported on `cyc_maj`, `cyc_tfac` and `cyc_upd`:

| phase | what happens | clocks |
|---|---|---|
| majority | draw a pattern (4 clocks), each neuron accumulates `h` one input per two clocks, `S = h > 0`, majority | `8 + 2*NI` |
| largest Tfac | each neuron computes Tfac (`N1+N2+16` clocks), then the Tfac module scans groups of 16 | `34 + ceil(n_active/16)` for 8+8-bit weights (`N1+N2+18+ceil(n_active/16)` in general) |
| weight update | the selected neuron updates one weight per two clocks, then the bias | `4 + 2*NI` |

With 10 inputs and 25 neurons the three phases take 28, 36 and 24 clocks.

A step runs as follows:

1. The control block asks for a pattern. If no pattern is eligible, then every
   training pattern was classified correctly since the last learning event.
   Training stops with `success`.
2. The network evaluates the pattern. If `maj` equals the target, the pattern
   is retired from the eligible set and the next one is drawn.
3. Otherwise every neuron computes `Tfac`. The value is forced to 0 for
   neurons that are inactive or answered correctly. The Tfac module finds the
   largest value. If it is strictly above `gfac`, only that neuron updates its
   weights.
4. If no neuron qualifies, the next neuron is activated and all iteration
   counters are cleared, which sets every temperature back to `T0`. The same
   pattern is then presented again to the larger network. After that step the
   noise filter runs. If no neuron is left to add, training stops with `full`.

`start` clears all weights and begins with one active neuron. `done` stays
high at the end, together with either `success` or `full`.

## The neuron datapath

This block needs the most care. Fixed-point formats (see `cmantec_pkg`):

| quantity | format |
|---|---|
| input `psi` | unsigned 8 bits, 7 fractional (1.0 = `8'h80`) |
| weights, bias | signed `N1+N2` bits, `N2` fractional (8+8 by default) |
| potential `h` | signed `N1+N2+2+clog2(NI+1)` bits, `N2` fractional |
| temperature `T`, `T0` | unsigned `N1+N2` bits, `N2` fractional; `T0` = 1.0 |
| `x = abs(h)/T` | 8 fractional bits |
| exp samples, `Tfac`, `gfac` | unsigned 16 bits, 15 fractional (1.0 = `16'h8000`) |

**Evaluation.** `h = sum(w_i * psi_i) - b`. Each product is formed on the
magnitude of the weight, truncated to `N2` fractional bits and then signed.
`S = (h > 0)`, so a neuron with `h = 0` is OFF. The strict inequality is
deliberate: together with the majority rule below, it keeps the majority
logic a single add-and-compare.

**Thermal factor.** `Tfac = (T/T0) * exp(-abs(h)/T)` with
`T = T0 * (1 - I/Imax)`. `I` counts the updates this neuron has made since
the last temperature reset. `Imax` is restricted to a power of two
(`2^log2_imax`, at most `2^17`; larger settings are treated as 17), so every division by `Imax` becomes a shift.
Computing Tfac takes three products on the neuron's one multiplier and a
division:

1. `T = T0 - (T0*I >> log2_imax)`
2. `x = (abs(h) << 8) / T` by a restoring divider that produces one quotient
   bit per clock over `N1+N2+8` bits. `abs(h)` is first clamped to `N1+N2`
   bits.
3. Table lookup: `k = floor(8x)` gives `e0 = exp(-k/8)` and
   `e1 = exp(-(k+1)/8)`. Then `e = e0 - ((e0-e1) * frac) >> 5`, where `frac`
   holds the 5 bits of `x` below the 1/8 step. `e = 0` for `x >= 8` or `T = 0`.
4. `Tfac = e * (Imax - I) >> log2_imax`, which equals `T/T0 * e` without
   dividing by `T0`.

**Update.** `w_i += (t - S) * psi_i * Tfac` and `b -= (t - S) * Tfac`. The
bias acts as a weight on a constant -1 input. Weights saturate at the
`N1+N2`-bit range. `I` is incremented and stops at `Imax`, where
`Tfac = 0`, so the neuron can no longer learn until the next reset.

The weights are registers, not block RAM. The pattern block keeps its
broadcast pattern register stable from the draw until the update finishes, so
the neurons read `psi` straight from it.

## Exponential table

The table holds 64 samples of `exp(-x)` for `x = 0, 0.125, ... 7.875`, plus
the end point `exp(-8)`, so the last interval can be interpolated too. Beyond
8 the result is 0. The samples are computed during elaboration as
`round(2^15 * exp(-1/8)^k)`, so no data file is needed. Each neuron holds its
own copy. Linear interpolation between samples 1/8 apart keeps the
relative error of `exp` below about 2e-3, since the chord error is at most
`(1/8)^2 / 8`.

## Majority and largest Tfac

`s_module` adds the `S` bits of the active neurons. It compares the sum with
`n_active >> 1` and outputs `sum > n_active/2`. The comparison is strict, so
a tie gives 0 and, for example, 1 vote out of 3 is not a majority. The module
is purely combinational.

`tfac_module` reads 16 neurons per clock. A comparison tree finds the largest
value of the group and compares it with the running maximum, which is held in
a register together with its index. It scans `ceil(n_active/16)` groups and
breaks ties in favour of the lowest neuron index. Groups of 16 keep the
comparison tree within one clock at the target frequency.

## Pattern memory, random draw and noise filter

Each word of the distributed RAM holds the `NI` input bytes, the class bit and
an 8-bit count of the learning events the pattern caused. It is written
synchronously and read asynchronously. Over the serial line, each pattern
arrives as `NI` input bytes followed by one class byte, whose bit 0 is the
class.

**Eligible set.** Positions `0 .. n_elig-1` are eligible. A draw reads
position `(lfsr * n_elig) >> 16`, where `lfsr` is a free-running 16-bit LFSR.
If the network answers correctly, the pattern is swapped with the last
eligible position and `n_elig` decreases by one, so a pattern is not drawn
twice in a pass. Any learning event makes all `n_train` patterns eligible
again.

**Noise filter.** With `P = n_train`, `S1 = sum(c)` and `S2 = sum(c^2)` over
the counts `c`, a pattern is noise if `c > mean + phi * sd`, where `sd` is
the population standard deviation. The hardware evaluates this without
division or square root:

```
d = P*c - S1 > 0   and   d^2 * 2^8 > phi^2 * (P*S2 - S1^2)     (phi has 4 fractional bits)
```

Pass 1 sums the counts. Pass 2 swaps each noisy pattern to the end of the
training positions, shrinks `n_train`, and clears the counts of the patterns
it keeps. The filter runs only when `phi_en` is high; `phi_en = 0` means
phi is infinite.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `NI` | 15 | inputs per pattern (one more byte carries the class) |
| `NN` | 94 | neurons built |
| `N1`, `N2` | 8, 8 | integer and fractional bits of a weight |
| `T0` | 256 (1.0) | initial temperature |
| `MAX_PAT` | 37888 | pattern memory depth |
| `CLKS_PER_BIT` | 631 | serial bit time in clocks (115200 baud at 72.72 MHz) |

The defaults are the 15-input, 16-bit-weight configuration. On the original
target, a Virtex-5 XC5VLX110T, that configuration holds 94 neurons and
37,888 patterns. Other reported builds:

| inputs | patterns | weights | neurons |
|---|---|---|---|
| 7 | 72,728 | | |
| 31 | 18,944 | | |
| 63 | 9,216 | | |
| 15 | | 12+8 bits | 85 |
| 15 | | 16+16 bits | 50 |

To build one of them, override the parameters. Run-time inputs are `gfac`,
`log2_imax`, `phi_en` and `phi`. The benchmark runs used `gfac = 0.01`
(`16'd328`), `Imax = 16384` and no filter for Boolean functions. For
real-valued data they used `gfac = 0.1`, `Imax = 65536` and `phi = 2`.

The clock comes from outside the design; an on-chip PLL set it to 72.72 MHz
on the original board. The trained weights can be read inside the neurons.
No read-back path to the host is included.

## Interpretations and departures

- **Majority rule.** The majority is strict (`sum > n_active/2`). A
  `>=` comparator with a halved active count would call 1 vote in 3 a
  majority.
- **Noise rule.** A pattern is noise when its count is strictly above
  `mean + phi*sd`. With `>=`, a set of equal counts would lose every
  pattern.
- **Exponent.** The exponent uses `abs(h)`, as in the thermal perceptron. The
  table only covers negative arguments.
- **Division and fractions.** The division `abs(h)/T`, the divider, the
  clamping of `abs(h)` and every fractional format are choices of this design.
  The divider length is what makes the Tfac phase `34 + ceil(n/16)` clocks
  with 8+8-bit weights.
- **Adding a neuron.** After a neuron is added, the pattern is presented again
  (3 clocks shorter, with no random draw), and the noise filter runs after
  that step.
- **Bias update.** The bias update rule, the saturating weights, the LFSR and
  the serial format are this design's choices.
- **Stopping rules.** Training stops when a full pass finds no error, or when
  no neuron is left.

## Simulation

Every file in `rtl/` and `tb/` holds one module or package, named after the
file. Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops
itself with a watchdog. With Verilator 5:

```
verilator --binary -Irtl -Itb rtl/cmantec_pkg.sv tb/tb_cmantec_top.sv \
          --top-module tb_cmantec_top -Mdir obj_top && obj_top/Vtb_cmantec_top
```

| testbench | what it checks |
|---|---|
| `tb_cmantec_full` | Default size. XOR of 2 inputs sent at 115200 baud. Trains to success with 2 neurons (about 1.7 M clocks, 15 s of simulation), re-checks the trained network with an independent model, and checks every phase length. |
| `tb_cmantec_top` | 7 inputs, 24 neurons. Runs XOR2, XOR3, parity of 5, and a random 7-input function on 96 patterns, which grows past 16 neurons. Also a run where `gfac` blocks learning and the network fills up, and XOR3 with contradicting copies under `phi = 2`, where the copies are removed as noise. Re-checks the trained networks and every phase length. Counts each mechanism. |
| `tb_cmantec_wide` | 63 inputs (the widest build), 16 neurons. Parity of inputs 0, 31 and 62 with small random values on the other 60 inputs; trains to success, re-checks the trained network and every phase length (majority 134, update 130 clocks). |
| `tb_cmantec_wideweights` | 15 inputs with 16+16-bit weights (the widest weights reported), 16 neurons. Parity of 3 inputs; trains to success with 3 neurons and checks the phase lengths, including the longer Tfac phase `50 + ceil(n/16)`. |
| `tb_cmantec_neuron` | `S` against a model, `Tfac` against floating-point `T/T0*exp(-abs(h)/T)` within 0.6 % + 4 LSB, bit-exact weight updates, latencies, masking, and saturation of every weight and the bias after repeated updates. |
| `tb_pattern_block` | Draw timing, a full pass returns each pattern once, eligibility reset, noise filter against a floating-point mean/sd reference. |
| `tb_cmantec_control` | Every branch of the step sequence and the recorded phase lengths, with the testbench standing in for the other blocks. |
| `tb_tfac_module`, `tb_s_module`, `tb_exp_table`, `tb_shift_add_mult`, `tb_serial_rx` | Unit checks against independent references. |

At the default size, training XOR2 took 1,744,937 clocks (12,378 weight
updates), or 24 ms at 72.72 MHz. The published board time for XOR2 is a
mean of 8 ms, so this single run is about three times slower. XOR3 at 7 inputs
took 108,160 clocks, or 1.5 ms, against a published 30 ms. The run time
depends mainly on how many updates the random presentation order needs,
so single runs scatter widely around such means.

The benchmark data sets (MCNC
ALU functions, UCI problems) are not included, so those workloads are not
simulated.
