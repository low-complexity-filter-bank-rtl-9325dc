# Minimum-adder filter bank channelizer

A wideband receiver splits one fast input stream into many narrow channels.
It does this with one bandpass channel filter per channel, all running at the
full input rate. That makes the channel filters the most expensive part of the
receiver. Their coefficients are constants, so each multiplication can be
written as shifts and additions. The cost of the bank is then the number of
adders, and the width of each one.

This RTL cuts that cost in two ways.

1. **Shared subexpressions.** Bit patterns recur in the coefficients when they
   are written in canonic signed digit (CSD) form. For example, `[1 0 1]`
   means x + x/4 and `[1 0 -1]` means x − x/4. Each such product of the input
   is computed once, in one multiplier block. Every tap of every channel
   filter reuses it, at any shift, with no extra adder.
2. **Super-subexpressions.** Where two common subexpressions, or one and a
   single digit, occur at a fixed distance in the same coefficient, their sum
   is shared as well. This gives 3- and 4-digit patterns. Each one costs one
   more adder in the shared block and saves an adder in every tap that uses
   it. Each such addition is done *before* the result is shifted into place,
   so all adders in the multiplier block are only a few bits wider than the
   input.

The filters are linear-phase (symmetric), so one partial product serves two
taps.

## The multiplier block (`ss_mult_block`)

With x1 as the input sample, the block forms five more signals using five
adders, in two adder steps:

| signal | formed as        | CSD pattern             | value       | kept as integer | adder width |
|--------|------------------|-------------------------|-------------|-----------------|-------------|
| x1     | input            | `1`                     | 1           | x1              | –           |
| x2     | x1 + x1>>2       | `1 0 1`                 | 5/4 · x1    | 5·x1   (×2^2)   | W+3         |
| x3     | x1 − x1>>2       | `1 0 -1`                | 3/4 · x1    | 3·x1   (×2^2)   | W+3         |
| x4     | x2 − x1>>4       | `1 0 1 0 -1`            | 19/16 · x1  | 19·x1  (×2^4)   | W+5         |
| x5     | x2 + x3>>5       | `1 0 1 0 0 1 0 -1`      | 163/128 · x1| 163·x1 (×2^7)   | W+8         |
| x6     | −x3 + x2>>4      | `-1 0 1 0 1 0 1`        | −43/64 · x1 | −43·x1 (×2^6)   | W+7         |

Each output `xs[i]` is the integer x_i · 2^e, with e = 0, 2, 2, 4, 7, 6. That
is exact: no bits are dropped. The outputs leave sign-extended on a common
W+9-bit bus, `xs[0..5]`, in the order x1..x6. `sse_pkg::ss_exp()` gives each
output's exponent e. The block is purely combinational.

This set of subexpressions is the one the example filter below needs. It is
fixed in `sse_pkg` and `ss_mult_block`. A different coefficient set will
usually want a different set. Among the 3-digit patterns, `1 0 1 0 1`,
`1 0 1 0 -1`, `-1 0 1 0 1`, `-1 0 1 0 -1` and their negations are the most
common ones.

## Describing a coefficient as terms

A channel filter has no coefficient memory and no multipliers. Each distinct
coefficient is given as a list of up to three **terms** (`sse_pkg::term_t`):

```
term = { used, neg, src (x1..x6), shift }     value = ±x_src · 2^-shift
```

`shift` is the CSD position of the term's leading digit. A tap with *t* terms
costs *t*−1 adders. The example filter used throughout is an 8-tap filter with
16-bit CSD coefficients (weights 2^-1 … 2^-16):

| tap      | CSD digits (2^-1 … 2^-16)            | terms                         | ×2^16   |
|----------|--------------------------------------|-------------------------------|---------|
| h0 = h7  | `+0+0-00+0+00+0-0`                   | x4>>1 + x5>>8                 | 39238   |
| h1 = h6  | `0+0-0+0+0+0+0+0-`                   | x1>>2 + x6>>4 + x4>>12        | 13651   |
| h2 = h5  | `0+0+00+0-000+0-0`                   | x5>>2 + x3>>13                | 20870   |
| h3 = h4  | `-0+0+0+0+0+00+0-`                   | x6>>1 + x5>>9                 | −21853  |

These are the parameter `sse_pkg::EX_TERMS`. The four distinct coefficients
have 29 non-zero digits between them. Plain CSD would need 32 adders for this
filter. With the shared block it needs 17:

- 5 adders in the multiplier block;
- 5 tap adders (1 + 2 + 1 + 1);
- 7 structural adders.

Four adder steps lead to any partial product: two in the block and up to two
in a tap.

Each term contributes `xs[src] <<< (F − shift − e)` to an integer scaled by
2^F. This needs `shift + e ≤ F`. `sse_lpfir` checks that at elaboration and
stops with an error naming the term if it fails.

## The channel filter (`sse_lpfir`)

The filter is in transposed form. Partial products p_k = h_k · x[n] are
computed once per input sample, only for k < N/2. The delay line then uses
p_(N−1−k) = p_k:

```
y    <= p0 + z1
z_j  <= p_j + z_(j+1)        j = 1 .. N-2   (p_j taken from the mirror tap)
z_N-1 <= p0
```

This gives y[n] = Σ h_k · x[n−k] exactly. The result is a signed ACC_W-bit
integer with F fractional bits, so the real output is y / 2^F. The default
ACC_W = W + F + 3 holds any filter with Σ|h| < 4. The example's Σ|h| is 2.92.

**Timing.** The delay line moves only when `in_valid` is high. `y` and
`out_valid` are registered and follow `in_valid` by one clock. There is no
other pipelining. The longest path is the two adder steps of the block, up to
two tap adders and one structural adder. The reset is synchronous and
active-low, and it clears the delay line.

**Parameters.**

| parameter | default     | meaning                                    |
|-----------|-------------|--------------------------------------------|
| `W`       | 8           | input width                                |
| `N`       | 8           | taps; must be even                         |
| `F`       | 16          | coefficient wordlength                     |
| `ACC_W`   | W+F+3       | output width                               |
| `TERMS`   | EX_TERMS  | `tap_terms_t [N/2]`, index k is tap k       |

## The channelizer (`fbc_channelizer`, top)

```
x_in ──► ss_mult_block ──xs──┬─► sse_lpfir (channel 0, TERMS[0]) ──┐
                             ├─► sse_lpfir (channel 1, TERMS[1]) ──┤
                             ⋮                                      ├─► downsampler (÷D) ──► y[0..M-1]
                             └─► sse_lpfir (channel M-1)        ────┘
```

One multiplier block feeds all M channel filters. Each filter builds its own
partial products from the shared outputs. It then runs its own delay line at
the full input rate. A single modulo-D counter in `downsampler` keeps every
D-th output of all channels at once. The first sample after reset is kept.

The defaults follow a D-AMPS receiver:

- a 34.02 MHz wideband input, one sample per clock;
- 1134 channels of 30 kHz (`M = 1134`);
- decimation by 350 (`D = 350`), which gives 97.2 kHz per channel;
- 16-bit coefficients (`F = 16`).

**Timing.** A sample taken with `in_valid` produces its decimated outputs two
clocks later: one clock in the filter and one in the downsampler. `out_valid`
is high for one clock. `y[m]` holds its value until the next kept sample.

**Ports.**

| port        | dir | width            | meaning                                           |
|-------------|-----|------------------|---------------------------------------------------|
| `clk`       | in  | 1                | clock                                             |
| `rst_n`     | in  | 1                | synchronous active-low reset                      |
| `in_valid`  | in  | 1                | `x_in` holds a new sample                         |
| `x_in`      | in  | W                | signed wideband sample                            |
| `out_valid` | out | 1                | `y` holds one decimated sample of every channel   |
| `y`         | out | ACC_W × M        | channel outputs, F fractional bits                |

## Where this RTL stops short of a D-AMPS channelizer

- **No real channel coefficients.** A real D-AMPS bank needs Parks–McClellan
  bandpass filters with these specifications:
  - passband edge 30 kHz and stopband edge 30.5 kHz;
  - 0.1 dB passband ripple;
  - stopband attenuation of 65, 85 or 96 dB, which takes 610, 940 or 1180
    taps.

  Each channel also needs its modulation to its own centre frequency. None of
  these coefficients are included. By default, every one of the 1134 channels
  carries the 8-tap example filter, so the bank is structurally complete but
  all channels compute the same thing. To build a real bank, set `N` and give
  each channel its own `TERMS[m]`. The CSD decomposition and the choice of
  shared subexpressions are done offline. If the coefficients need
  subexpressions other than x1..x6, extend `ss_src_e`, `ss_exp()` and
  `ss_mult_block` together.
- **Equal filter lengths.** All channels share one `N`.
- **Full-rate filtering.** Each filter runs at the input rate, and the
  decimator discards 349 of every 350 outputs. No polyphase restructuring is
  done.
- **No rounding.** Outputs are exact. Requantising to a narrower output is
  left to the user.
- **No timing closure.** Whether a clock of 34.02 MHz or more is met has not
  been measured on any technology.
- **Own choices.** The `in_valid`/`out_valid` handshake, the register
  placement, the reset and the decimator phase are all choices of this design.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Reference values are computed independently of the RTL's shift arithmetic.
They come either from the CSD digit strings or from the rational value of
each subexpression, in `tb/tb_ref_pkg.sv`.

| testbench            | what it checks                                                                                   |
|----------------------|--------------------------------------------------------------------------------------------------|
| `tb_ss_mult_block`   | all 256 8-bit inputs, plus random 14-bit inputs, against x1·{1, 5, 3, 19, 163, −43}              |
| `tb_sse_lpfir`       | the example filter and a second 6-tap term set, on random input with stalls and full-scale bursts, against direct convolution; one-clock latency |
| `tb_downsampler`     | D = 5 and D = 350: the right samples are kept, in every lane, at the right rate                  |
| `tb_fbc_channelizer` | 3 channels with two different term sets, D = 7, against direct convolution; two-clock latency    |
| `tb_fbc_full`        | the top at its defaults (1134 channels, D = 350), 12,000 samples                                 |

`tb_fbc_channelizer` also counts how often each behaviour occurred: input
stalls, kept and dropped samples, full-scale input, and channels that differ.
It fails if any count is zero.

To run one with Verilator:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
    rtl/sse_pkg.sv tb/tb_ref_pkg.sv rtl/ss_mult_block.sv rtl/sse_lpfir.sv \
    rtl/downsampler.sv rtl/fbc_channelizer.sv tb/tb_fbc_channelizer.sv \
    --top-module tb_fbc_channelizer
./obj_dir/Vtb_fbc_channelizer
```

## Files

| file                      | contents                                                            |
|---------------------------|---------------------------------------------------------------------|
| `rtl/sse_pkg.sv`          | subexpression enum and scales, `term_t`, the example's `EX_TERMS` |
| `rtl/ss_mult_block.sv`    | shared multiplier block                                             |
| `rtl/sse_lpfir.sv`        | symmetric transposed-form channel filter                            |
| `rtl/downsampler.sv`      | decimator by D for all channels                                     |
| `rtl/fbc_channelizer.sv`  | top: block + M filters + decimator                                  |
| `tb/tb_ref_pkg.sv`        | reference coefficients and test term sets                           |
| `tb/tb_*.sv`              | testbenches                                                         |
