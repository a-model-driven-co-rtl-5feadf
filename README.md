# Streaming 1024-tap correlator for an anti-collision radar

An automotive anti-collision radar sends out a known pseudo-random code
and listens for its echo. An obstacle shows up as a copy of the code in the
received signal, delayed by the round trip. To find that delay, the receiver
correlates the received samples y with the reference code c:

    C(j) = sum_{i=0}^{1023} c(i) * y(i + j)

C(j) peaks when the window of samples starting at j lines up with the
echo. The delay j of the peak gives the distance. Tracking the peak from
one code period to the next gives the relative speed.

The received signal is sampled at 100 MHz, one sample every 10 ns. For every
sample the correlator must do 1024 multiplications and add up all 1024
products. This RTL does all of that work in parallel and in a pipeline. It
takes one sample and produces one correlation value on every clock.

## Data ranges

| quantity                 | range          | bits (two's complement) |
|--------------------------|----------------|-------------------------|
| received sample y        | -8 .. 7        | 4  (`SAMPLE_W`)         |
| reference-code chip c    | -1 .. 1        | 2  (`COEFF_W`)          |
| products, partial sums   | -8192 .. 8191  | 14 (`SUM_W`)            |
| result `out_corr`        | integer        | 32 (`OUT_W`)            |

14 bits are exactly enough. The extreme sums are 1024 x (-8) = -8192 and
1024 x 7 = 7168, so no stage ever overflows. The tree needs no saturation or
width growth. If you widen `SAMPLE_W` or raise `N`, you must widen `SUM_W` to
match.

## Structure

```
                 correlation (top)
  received_signal ──► time_repeated_multiplication (trm)
  received_valid       ├─ shift_register     1024 x 4-bit window
  coeff[0..1023] ──►   └─ repeated_multiplication
                            └─ 1024 x multiplication
                     ──► addition_tree (trat)
                            └─ 10 x add_step  (1024→512→…→2→1)
                                   └─ N_IN/2 x addition (registered)
                     ──► conv_integer (normalisation) ──► out_corr, out_valid
```

`corr_pkg` holds the default sizes and types.

### The sample window (`shift_register`)

The 1024 most recent samples sit in a shift register. When
`received_valid` is high, every tap takes the value of the tap above it. The
new sample enters at `tap[N-1]`, so `tap[0]` is the oldest sample. This
orientation matters. After the sample with index j+1023 has entered,
`tap[i]` is y(j+i), the operand that C(j) multiplies with c(i). When
`received_valid` is low, the window holds its contents.

### Multiplication (`repeated_multiplication`, `multiplication`)

1024 combinational multipliers form the products `tap[i] * coeff[i]`, each
sign-extended to 14 bits. With a ternary code, each multiplier is in effect a
negate-or-zero selector. Synthesis tools reduce it to that; the RTL keeps a
plain signed multiply, so wider codes also work.

### The pipelined addition tree (`addition_tree`, `add_step`, `addition`)

The 1024 products are summed by a binary tree of ten stages. Stage s has
1024/2^s adders. Adder k of a stage adds elements 2k and 2k+1 of the previous
stage. Each adder has a register on its output, so each level of the tree is
one pipeline stage. This is what lets a full 1024-input sum finish every
clock. For example, the 8th stage is four adders working side by side. A
`raz` input (synchronous, active-high clear) goes to every adder.

The tree also carries a 10-deep pipeline of valid flags next to the data.

### Output (`conv_integer`)

The 14-bit sum is sign-extended to a 32-bit integer and registered together
with its valid flag.

## Interface and timing of `correlation`

| port              | dir | width       | meaning                                   |
|-------------------|-----|-------------|-------------------------------------------|
| `clk`             | in  | 1           | clock, one sample per cycle (100 MHz)     |
| `rst`             | in  | 1           | synchronous, active high; clears window, tree and flags |
| `received_valid`  | in  | 1           | `received_signal` holds a new sample      |
| `received_signal` | in  | 4 signed    | sample y                                  |
| `coeff`           | in  | 1024 x 2 signed | reference code c(0..1023)             |
| `out_valid`       | out | 1           | `out_corr` holds a new result             |
| `out_corr`        | out | 32 signed   | C(j)                                      |

* **Latency:** 12 clocks. A sample taken at rising edge t completes window j.
  C(j) appears with `out_valid` high after edge t+12: 1 clock for the window,
  10 for the tree and 1 for the output register.
* **Throughput:** one result per accepted sample, with no stalls. Pauses in
  `received_valid` show up as matching gaps in `out_valid`.
* **Code timing:** `coeff` is applied combinationally to the window during
  the clock after a sample enters. A fixed code is simply held. A code that
  changes per window must be presented one clock after its window's last
  sample.
* **Start-up:** after `rst` the window is all zeros. The first 1023 results
  are therefore partial correlations. You can count 1024 accepted samples
  before trusting a result, or simply ignore them.
* `time_repeated_multiplication` has an assertion that every code chip
  applied to a valid window lies in -1..1.

## Where this RTL makes its own choices

The blocks, their order, the value ranges, the 1024-tap size, the direction
of the shift register, the pairing in the tree and the clock/clear ports of
the adders are those of the original accelerator. The following are
choices of this design:

* the `received_valid`/`out_valid` flags and the window hold when no sample
  arrives (the original streams one sample per clock with no flags);
* a synchronous clear on the sample window (the original window register has
  no reset);
* combinational multipliers, registered adders and a registered output
  stage, giving the 12-clock latency;
* a 32-bit output width;
* the reference code as a 1024-element input port. The block that generates
  the code is outside the accelerator and its sequence is not defined here.

The code generator, the converters and the RF front end of the radar
(antenna, circulator, modulation, demodulation, amplification, filtering)
are not part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>`.
Each compares the module against values computed independently in the
testbench. Each ends by printing `TB_RESULT checks=N failures=M`.

* `tb_multiplication`: all 64 sample/code combinations.
* `tb_addition`, `tb_conv_integer`: random operands, range ends, clear,
  one-clock latency.
* `tb_add_step`, `tb_repeated_multiplication`: full 1024-wide random vectors.
* `tb_shift_register`, `tb_time_repeated_multiplication`: 1024-deep window
  under a random stream with gaps and code changes.
* `tb_addition_tree`: streamed sums with gaps. It checks the exact 10-clock
  latency and the extremes -8192 and +7168.
* `tb_correlation`: the whole correlator at its default size, against a
  reference model, with exact 12-clock timing. It covers stream pauses, code
  changes, all three chip values, both range ends and the detection of a
  noisy, delayed echo. The echo check requires the largest output to be the
  one for the echo's exact delay. It also counts that each of these cases
  occurred.
* `tb_radar_echo`: a radar scenario. The code repeats period after period,
  and two obstacles return echoes of different strength at two delays. It
  checks that in each period the correlation peaks at both delays and that
  the stronger echo gives the larger peak.

To simulate, for example:

```
verilator --binary --timing --assert -Irtl rtl/corr_pkg.sv tb/tb_correlation.sv \
          --top-module tb_correlation -Mdir obj_tb
./obj_tb/Vtb_correlation
```

All testbenches run at the default size of 1024 taps, each in well under a
second. Lint with `verilator --lint-only -Wall -Irtl rtl/corr_pkg.sv rtl/correlation.sv`.

## Size

At default parameters, synthesis to generic cells gives 18,444 flip-flop
bits: 4,096 in the window, 14,322 in the tree, 14 at the output (once the
sign-extension copies merge) and 12 valid flags. It also gives 1,023
14-bit adders and 1,024 small multipliers. The original was built on an
Altera Stratix II EP2S60.
