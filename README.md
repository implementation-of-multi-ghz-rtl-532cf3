# Parallel trapezoidal shaper for multi-GS/s pulse spectroscopy

Fast radiation detectors such as diamond sensors give exponential pulses
that decay in 10–20 ns. To measure the energy of each pulse you turn it into
a trapezoid whose flat-top height is proportional to the charge. The classic
recursive trapezoidal filter does this one sample per clock. When the converter
samples at 5 GS/s, no FPGA fabric can run that loop at 5 GHz. This design
takes the samples as words of N at a time (16 samples per 312.5 MHz clock by
default) and replicates every element of the filter per lane. The one part
that does not replicate trivially is the accumulator, and it is rebuilt as a
pipelined prefix-sum network closed by a single row of feedback adders.

The RTL is plain synthesizable SystemVerilog and uses no vendor primitives.

## The signal chain

For an input v(n), with rise time k samples, flat top l−k samples and a
preamplifier decay of τ with sample period Ts:

| stage | formula | module |
|---|---|---|
| rise-time difference | d^k(n) = v(n) − v(n−k) | `delay_sub` (first copy) |
| flat-top difference | d^{k,l}(n) = d^k(n) − d^k(n−l) | `delay_sub` (second copy) |
| deconvolution | p(n) = p(n−1) + d^{k,l}(n); r(n) = p(n) + M·d^{k,l}(n) | `pz_deconv` |
| trapezoid integration | s(n) = s(n−1) + r(n) | `parallel_acc` |

Here M = 1 / (exp(Ts/τ) − 1). The deconvolution turns a pulse A·exp(−n·Ts/τ)
into a step of height A·(M+1). The last accumulator integrates the
k-wide, l-delayed box that results, which gives a trapezoid. It rises for k
samples, stays at A·(M+1)·k for l−k samples and falls back to zero over k
samples. Pile-up does not disturb this: the filter is linear, so overlapping
pulses give overlapping trapezoids, and each one returns exactly to baseline.

`trap_filter_par` wires the four stages together. Its ports are:

| port | width | meaning |
|---|---|---|
| `x[N]` | 14 (signed) | converter samples; lane 0 is the oldest sample of the word |
| `k`, `l` | clog2(K_MAX+1), clog2(L_MAX+1) | the two delays in samples; flat top = l − k |
| `m_coef` | 32 | M as unsigned fixed point, 16 fraction bits |
| `s[N]` | 64 (signed) | trapezoid output, scaled by 2^16 |
| `rst` | 1 | synchronous, active high |

## The parallel accumulator

A running sum has a loop: each output needs the previous one. With N samples
per clock, a direct build chains N 64-bit additions in one cycle. `parallel_acc`
splits the work in two parts:

1. **Prefix sums inside the word (no feedback).** For each lane i the unit forms
   S_i = x_0 + … + x_i. With four lanes this is
   s1 = x0+x1, s3 = x2+x3, s2 = s1+x2, s4 = s1+s3,
   so S = (x0, s1, s2, s4). For general N the same scheme is a Sklansky
   prefix tree of log2(N) adder levels. Since nothing in it feeds back, a
   register goes after every level.
2. **One feedback row.** Lane i outputs Y_i(t) = Y_{N−1}(t−1) + S_i(t): the
   total of the previous word (the last lane of the output register) plus the
   partial sum of the current word. This is the only place that has to settle
   in a single clock: one 64-bit adder per lane, all fed from the same register.

The price is latency. Outputs appear log2(N)+1 clocks after the inputs: 3
clocks for 4 lanes and 5 for 16. Any path that is combined with an
accumulator output must be delayed by the same amount. `pz_deconv` therefore
delays d^{k,l} by the accumulator latency before it multiplies by M, so both
adder inputs belong to the same sample.

Arithmetic wraps modulo 2^64. The trapezoid is a linear combination of the
inputs, so the final output is exact whenever its true value fits in 64 bits,
even if an intermediate accumulator has wrapped.

## Delays across lanes

A delay of D samples does not fall on word boundaries in general. `delay_sub`
splits it as D = Q·N + R:

- Past words are kept in a circular buffer, a memory array with registered
  reads that maps to block RAM. The buffer depth is the next power of two
  at or above D_MAX/N + 2 words.
- Each clock the buffer reads the words that are Q and Q+1 clocks old. When
  Q = 0 the current input word is used in place of the first read.
- Lane j takes lane j−R of the newer word if j ≥ R. Otherwise it takes lane
  N+j−R of the older word.

This lets `k` and `l` take any value from 0 to 512 at run time. Values above
the maximum are clamped. A fill counter makes samples from before reset read
as zero, so the memory needs no reset. The output is registered: d appears 2
clocks after x.

## Number formats and scaling

- Input: 14-bit signed. It grows to 15 bits after the first difference and to
  16 bits after the second.
- M: 32-bit unsigned, 16 fraction bits, so up to about 65535. For τ = 20 ns at
  5 GS/s, M = 99.5. At 200 MS/s, M = 3.52.
- To keep the arithmetic exact, p is shifted left by 16 rather than rounding
  the product M·d. So r, and therefore s, carry a factor of 2^16. Divide
  `s` by 65536 to get the trapezoid in ADC units × (M+1) × k.

## Timing

| block | latency (clocks) |
|---|---|
| `delay_sub` | 2 |
| `parallel_acc` | log2(N) + 1 |
| `pz_deconv` | log2(N) + 3 |
| `trap_filter_par` | 2·log2(N) + 8 (16 at N = 16, 12 at N = 4) |

Throughput is N samples per clock, with no stalls and no valid signal. The
input is treated as a continuous converter stream. Set `k`, `l` and `m_coef`
while `rst` is held. A change while the filter is running leaves a permanent
offset in the accumulators.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | lanes per clock, a power of two (1 is allowed) |
| `X_W` | 14 | input sample width |
| `K_MAX`, `L_MAX` | 512 | largest delays in samples |
| `M_W`, `M_FRAC` | 32, 16 | format of M |
| `ACC_W` | 64 | accumulator width |

The defaults are the 5 GS/s build: a 14-bit converter, 16 × 312.5 MHz and
64-bit accumulators. Lower rates use fewer lanes: 1 lane for 200 MS/s, 4 for
1 GS/s and 8 for 2.5 GS/s. Shared constants are in `trap_pkg`.

## What is given and what is chosen here

These parts follow the description of the method:

- the stage chain;
- per-lane replication with 16 lanes at 312.5 MHz;
- the four-lane prefix tree and the single shared feedback register of the
  accumulator, with its latency of 3 at N = 4;
- the formula for M;
- the 14-bit input and the 64-bit accumulators.

These are this design's own choices:

- the Sklansky tree for N ≠ 4;
- the word/lane split of the delays and their run-time range (512);
- the fixed-point format of M and the exact, 2^16-scaled arithmetic;
- the register placement and therefore the total latency;
- the synchronous reset and the zero history after reset;
- lane order, with lane 0 oldest;
- the absence of a valid/handshake signal.

The description of the accumulator equations is ambiguous. Read one way, each
output lane keeps its own feedback. The design follows the other reading,
where all lanes share the previous word's total, because only that reading
gives a running sum.

Not included:

- the converter, the processor that would write `k`, `l` and M, and the
  detector front end;
- any trigger, peak detection or histogramming after the shaper;
- timing closure. The 330–350 MHz figure for the 64-bit feedback adder is a
  claim about a specific FPGA family and has not been checked.

## Verification

Each testbench checks its outputs against a model that handles one sample at
a time, and prints `TB_RESULT checks=… failures=…`.

- `tb_parallel_acc`: 4 and 16 lanes, random and full-scale inputs. Exact
  running sums at latencies 3 and 5. Also a reset in the middle of the run.
- `tb_delay_sub`: 4 and 16 lanes. The delay changes between words: 0, less
  than one word, whole words, rotated lanes, the maximum and above the
  maximum. History before reset reads as zero.
- `tb_pz_deconv`: 4 and 16 lanes. Exact check of r = p·2^16 + M·d with random
  values. A matched exponential must give a step of height A·(M+1) within 1 %.
- `tb_trap_filter_par`: the full-size build (default parameters). Four (k, l, τ)
  settings: 150/200/100, 7/12/50, 32/48/100 and 50/75/50 samples. The input is
  random-phase exponential pulses with noise and pile-up. Every output sample
  is compared exactly. Each isolated pulse must have its flat top within 1 %
  of A_s·(M+1)·k and return to baseline. The test also counts lane-rotating
  delays, whole-word delays, delays shorter than one word and pile-ups, and
  fails if any of them never happened.
- `tb_trap_rates` (with helper `tb_rate_run`): the sample-rate comparison.
  A 20 ns decay with 30 ns rise and 10 ns flat top, run at 200 MS/s (N=1),
  1 GS/s (N=4), 2.5 GS/s (N=8) and 5 GS/s (N=16). Checked exactly, and the
  flat-top spread caused by random pulse phase must shrink with rate. It
  measures about 21.5 / 4.8 / 1.9 / 0.9 % peak-to-peak, which is close to the
  expected Ts/τ.

All of these run in well under a second.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/trap_pkg.sv \
    tb/tb_trap_filter_par.sv --top-module tb_trap_filter_par -Mdir obj
./obj/Vtb_trap_filter_par
```

Replace the testbench name to run any of the others. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/trap_pkg.sv rtl/<module>.sv`.
