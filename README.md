# Multi-level 1D discrete wavelet transform with data reorder units

This is a streaming, multi-level one-dimensional discrete wavelet transform (DWT)
for orthogonal Daubechies wavelets. It takes one 16-bit sample per clock. It
produces the highpass bands H^1..H^J and the final lowpass band L^J of a
J-level dyadic decomposition.

Two ideas keep the hardware small:

* **One filter per level, shared by lowpass and highpass.** For Daubechies
  filters the highpass taps are the lowpass taps in reverse order, with
  alternate signs: g_{M-1-m} = (-1)^m h_m. If the last M samples are presented
  once in order and once reversed, the same M multipliers compute both
  outputs. The only change is that the odd taps are negated in the highpass
  pass. A small register network, the **data reorder unit (DRU)**, does this
  reordering.
* **Hardware scaled to the sample rate of each level.** Decimation by two
  halves the rate at every level. So level j has 2^(j-1) cycles per tap group,
  and it needs only ceil(M/2^(j-1)) multipliers, each used in every cycle. For
  the default M = 4, J = 3 the three levels have 4, 2 and 1 multipliers: 7
  multipliers for the whole transform.

```
 din ──► level 1 ──L^1──► level 2 ──L^2──► level 3 ──► L^3
 1/clk     │  4 mult       │  2 mult        │  1 mult
           └► H^1 (1/2)    └► H^2 (1/4)     └► H^3 (1/8)   (output rates per clock)
```

## What each level computes

Level j filters its input x (the input stream for j = 1, otherwise L^(j-1)):

    v_n = sum_{m=0}^{M-1} h_m x_{2n-m}                     lowpass  -> L^j
    u_n = sum_{m=0}^{M-1} (-1)^(M-1-m) h_{M-1-m} x_{2n-m}  highpass -> H^j

Samples before x_0 count as zero, so the first outputs are
v_0 = h_0 x_0 and u_0 = -h_3 x_0 (for M = 4).

## Number formats

| quantity      | width | format | note |
|---------------|-------|--------|------|
| samples, in and out | 16 | Q10.5 (5 fractional bits) | same format at every level |
| coefficients  | 8     | Q1.7   | round(h*128) of the Daubechies taps |
| products      | 24    | 12 fractional bits | full precision |
| sums, accumulator | 16+8+log2(M)+1 | full precision | no rounding inside a level |

Each level output is its full-precision sum shifted right by 7 bits. This
truncates toward minus infinity. The result is then cut to 16 bits. An
overflowing output wraps; there is no saturation. The lowpass DC gain is about
sqrt(2) per level, so keep |input| well below 2^15/2^(J/2) LSB. The testbenches
use |x| < 128.0.

Stored lowpass taps (`dwt_pkg::daub_h`):

| M | h_0 | h_1 | h_2 | h_3 | h_4 | h_5 |
|---|-----|-----|-----|-----|-----|-----|
| 4 | 62 | 107 | 29 | -17 | | |
| 6 | 43 | 103 | 59 | -17 | -11 | 5 |

## The data reorder unit

This is the part of the design that needs the most explanation.

The DRU of a level has M registers r[0..M-1]. Each register chooses between
only two sources. Two events drive the DRU. One comes at the *even-sample
time*, when x_{2n} is at the input. The other comes at the *odd-sample time*,
when x_{2n+1} is at the input:

* **load** (even-sample time): r[0] <- I_e (x_{2n}, straight from the input),
  r[1] <- I_o (x_{2n-1}, caught by the `eo_split` register one sample
  earlier), and r[2..M-1] reverse among themselves (r[i] <- r[M+1-i]).
  Afterwards r[i] = x_{2n-i}. This is lowpass order: v_n = sum h_i r[i].
* **rev** (odd-sample time): all M registers reverse (r[i] <- r[M-1-i]).
  Afterwards r[i] = x_{2n-(M-1-i)}. This is highpass order:
  u_n = sum (-1)^i h_i r[i]. At the same time I_o catches x_{2n+1}.

The next load reverses r[2..M-1] again. This puts the surviving older samples
x_{2n}.. x_{2n-M+3} back into lowpass order at positions 2..M-1, and the two
oldest samples drop out. For M = 4 (registers a, b, c, d):

| after | a | b | c | d | filter computes |
|-------|---|---|---|---|-----------------|
| load at sample 2n | x_{2n} | x_{2n-1} | x_{2n-2} | x_{2n-3} | v_n = h0 a + h1 b + h2 c + h3 d |
| rev               | x_{2n-3} | x_{2n-2} | x_{2n-1} | x_{2n} | u_n = h0 a - h1 b + h2 c - h3 d |

So a takes I_e or d, b takes I_o or c, c takes d or b, and d takes c or a. The
registers hold between events. At levels 2 and up the events are 2^j cycles
apart.

## Time sharing within a level

Level j has S = 2^(j-1) cycles per half period (lowpass half, then highpass
half) and P = ceil(M/S) multipliers. In slot s of a half period (s = 0..S-1),
multiplier p works on tap i = p*S + s. A multiplexer in front of the
multiplier picks r[i], and the coefficient is h_i, negated for odd i in the
highpass half. Tap positions past M-1 multiply zero. This happens only when S
does not divide M, for example M = 6 at level 3, or any level with S > M.

* Level 1 (S = 1): 4 multipliers, an adder tree, one result per cycle. The
  outputs alternate lowpass and highpass.
* Level 2 (S = 2): multiplier 0 does a then b, multiplier 1 does c then d.
* Level 3 (S = 4): one multiplier does a, b, c, d.

From level 2 on, `psum_acc` adds the partial sums of the S slots. Its output
is partial sum + register. The register is cleared at the end of the last slot
(time T_j), so the next coefficient starts from zero.

Each multiplier output goes through a pipeline latch (parameter `PIPE`,
default 1). This adds one cycle per level.

## Timing

A free-running J-bit counter t times everything; t = 0 is the first cycle
after reset. Sample a_t must be on `din` in cycle t.

Level j takes its first input sample at OFF_j = Delta_(j-1), and its first
lowpass output appears at

    Delta_j = Delta_(j-1) + 2^(j-1) + PIPE = 2^j - 1 + j*PIPE      (Delta_0 = 0)

| level | OFF (PIPE=0) | load / rev cycles (PIPE=0) | L^j valid | H^j valid |
|-------|--------------|----------------------------|-----------|-----------|
| 1 | 0 | 2k / 2k+1 | Delta_1 + 2k | Delta_1 + 2k + 1 |
| 2 | 1 | 4k+1 / 4k+3 | Delta_2 + 4k | Delta_2 + 4k + 2 |
| 3 | 3 | 8k+3 / 8k+7 | Delta_3 + 8k | Delta_3 + 8k + 4 |

With PIPE = 1 (the default), Delta = 2, 5, 10 for levels 1-3, and the offsets
are 0, 2, 5. The accumulator of level j >= 2 is cleared at
T_j = Delta_j + 2^(j-1) k, the cycle in which a complete coefficient leaves.

`level_ctrl` decodes all strobes from t:

* u = (t - OFF - 1) mod 2^j
* load = (u == 2S-1)
* rev = (u == S-1)
* hi = u >= S
* slot = u mod S

The clear and valid flags are delayed by `PIPE` cycles. Valid flags stay low
until the level has taken its first sample. A reversal also waits for that
first sample, so anything on `din` before then never reaches a register.

## Interface of `dwt_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | clock |
| rst_n | in | 1 | asynchronous, active low |
| din | in | 16 | sample, one per clock, Q10.5 |
| h_out[J] | out | J x 16 | H^1..H^J; 0 when not valid |
| h_valid | out | J | one-cycle strobes |
| l_out | out | 16 | L^J; 0 when not valid |
| l_valid | out | 1 | one-cycle strobe |

Parameters: `M` (filter length, 4 or 6, default 4), `J` (levels, default 3),
`PIPE` (pipeline latches, default 1). Coefficients exist for M = 4 and M = 6
only, and the DRU requires even M.

There is no input handshake or stall. The transform runs continuously.
Reset clears all registers, so a new stream starts after reset.

## Files

| file | contents |
|------|----------|
| `rtl/dwt_pkg.sv` | widths, types, quantised coefficients |
| `rtl/eo_split.sv` | even/odd split: I_e wire and I_o register |
| `rtl/dru.sv` | data reorder unit |
| `rtl/level_ctrl.sv` | per-level schedule from the global counter |
| `rtl/shared_filter.sv` | multiplexed multipliers, sign sharing, pipeline latches, adder tree |
| `rtl/psum_acc.sv` | partial-sum accumulator with clear at T_j |
| `rtl/dwt_level.sv` | one level |
| `rtl/dwt_top.sv` | J-level cascade and cycle counter |
| `tb/dwt_ref_pkg.sv` | reference model straight from the filter equations |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus end-to-end runs |

End-to-end tests:

* `tb_dwt_top`: the defaults (M = 4, J = 3, PIPE = 1), 576 samples.
* `tb_dwt_top_d6`: the 6-tap Daubechies filter.
* `tb_dwt_top_j4`: J = 4 without pipeline latches.

Each one checks every output value and its cycle against the reference. Each
one also checks that every mechanism acted: loads, reversals, highpass phases,
accumulator clears and time-shared slots, at every level.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv tb/tb_dwt_top.sv \
    --top-module tb_dwt_top -o sim
./obj_dir/sim
```

The two packages are listed first. `-y` lets Verilator find every module by
its file name. Replace `tb_dwt_top` with any other `tb/tb_*.sv` module. The
simulator needs no other files.

## Where this implementation makes its own choices

The following follow the original architecture:

* the DRU register network and its two switching events
* the per-level multiplier counts and time-slot order
* the sign sharing through the mirror relation
* the pipeline latches after the multipliers
* the accumulator cleared at T_j
* the switching cycles of levels 1-3
* the 16-bit data and 8-bit coefficient word lengths

The rest is this implementation's own:

* **Coefficient format** Q1.7 and round-to-nearest quantisation of the taps.
* **Output arithmetic**: one truncation per level, at the output, with wrap on
  overflow.
* **Control**: a single global counter decoded per level, instead of separate
  timing logic; one-cycle valid flags; zeroed outputs between valid samples;
  no reversal before a level's first sample.
* **Even M only.** Odd-length filters are not supported. Their DRU would swap
  about a different axis, and no orthogonal Daubechies filter has odd length.
* **Hold between events.** The DRU registers keep their value between events.
  Levels 2 and up need this.
* **Reset** is asynchronous and active low. It clears every register to zero,
  and this zero is also the "samples before x_0" padding.
