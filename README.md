# Sequential AR-model spectral estimator in decimal fixed point

This design estimates the power spectral density of a sampled signal one
sample at a time. For every new sample it

1. refines an autoregressive (AR) model of the signal with one step of the
   least-mean-square (LMS) algorithm, and
2. takes a 16-point FFT of the model's AR parameters.

The spectrum of an AR process follows from the transform of its
prediction-error filter, so each 16-bin transform carries a spectral
estimate, and the estimates improve as samples arrive. The transform is
taken of the AR parameters A(1)..A(16) exactly as they stand, without the
leading 1 of the error filter; the host derives the plotted spectrum from
the bins. The logic sits on an FPGA next to an embedded CPU. The two
share a dual-port block RAM: the CPU writes a run's parameters and samples,
starts the logic, and collects one 16-bin complex spectrum per sample.

All arithmetic is 32-bit integer arithmetic on values scaled by a
*decimal* factor F = 10,000. Each product is divided by F again in a
hardware divider. Division is what makes the design slow and large, so
most of the structure below is about sharing and scheduling multipliers and
dividers.

## A run, as the host sees it

Block-RAM map (32-bit words, 1024 of them):

| words              | contents                                             |
|--------------------|------------------------------------------------------|
| 0 .. N-1           | samples x(1) .. x(N), each `trunc(x * F)`            |
| 31 + 32(n-1) + 2i  | real part of bin X[i] after sample n                 |
| 31 + 32(n-1) + 2i+1| imaginary part of bin X[i] after sample n            |
| 1020               | N, number of samples                                 |
| 1021               | fl, filter length (number of AR parameters, 0..16)   |
| 1022               | u, LMS step size times F (0.0299 → 299)              |
| 1023               | F, the fixed-point scale (10,000)                    |

The host fills these words through port A (`host_*`) and pulses `start`
for one cycle. `busy` stays high during the run, and `done` pulses once the
last spectrum is in memory. `sample` and `ef` (the prediction error of the
latest sample) show progress. A 30-sample run fits exactly: the samples take
words 0..29 and the spectra take words 31..990. Longer runs overwrite the
parameter words, and the hardware does not check for this.

Turning bins into a plot is left to the host. The reference plots
match `20*log10(|X[i]|^2 / max_k |X[k]|^2)`. With a 1 kHz sample
rate the bins are 62.5 Hz apart, and bin i stands for i*62.5 Hz.

## Number format and rounding

A real value v travels as the 32-bit integer `trunc(v * F)`. After every
multiplication of two scaled values the product is divided by F, truncating
toward zero (positive results round down, negative ones round up). The
multipliers keep the low 32 bits of each product. Sums wrap at 32 bits. At
the sizes used (samples below 10,000, parameters of a few thousand) nothing
overflows.

The FFT twiddle factors W^k = exp(-j2πk/16) are stored scaled by F and
rounded: 9239, 7071 and 3827 for cos/sin of 22.5°, 45° and 67.5°. Two of them
are exact small integers, W^0 = 1 and W^4 = -j. These are used unscaled, so
their products need no division. Because of this, FFT stages 1 and 2 never
touch a divider.

## LMS engine (`lms_engine`)

For sample n with filter length fl:

```
ef   = x(n) + Σ_{k=1..fl} trunc(A(k)·x(n-k) / F)
A(k) = A(k) − trunc(2u · trunc(ef·x(n-k) / F) / F)       k = 1..fl
```

Here x(m) = 0 for m < 1 ("zero history"). Each term depends on the one
before it, so the engine runs strictly in series. It reads a sample from the
RAM, fires the single multiplier, waits for it, fires the single divider,
waits again, and accumulates. The update loop needs two multiply–divide
pairs per parameter. 2u is formed by a shift. The 16 AR parameters are
registers. They are zeroed when a run starts and carried from sample to
sample.

The engine has no arithmetic units of its own. It borrows lane 0 of the
FFT's 7 multipliers and 4 dividers, because the two engines never run at
the same time.

## The 16-point FFT (`fft16`)

The transform takes the 16 AR parameters A(1)..A(16) as real inputs (with
fl < 16 the upper ones are zero). It is a radix-2 decimation-in-time FFT
with bit-reversed input order. It works in place on a register file of 16
complex words and produces X[0..15] in natural order. All eight butterflies
of a stage are evaluated in the same clock edge:
`top' = top + t`, `bottom' = top − t`, with `t = W·bottom`.

What differs from stage to stage is how t is obtained:

| stage | twiddles used       | products | divisions | divider rounds |
|-------|---------------------|----------|-----------|----------------|
| 1     | W^0                 | 0        | 0         | 0              |
| 2     | W^0, W^4            | 4        | 0         | 0              |
| 3     | W^0, W^2, W^4, W^6  | 6        | 8         | 2              |
| 4     | W^0 .. W^7          | 7        | 12        | 3              |

A W^0 butterfly uses the bottom value directly and needs no multiplier.
Every other butterfly of the stage gets its own complex multiplier, in
butterfly order. Stage 4 therefore needs all 7 multipliers, and multiplier i
carries element 9+i times W^(i+1). Each product with a scaled twiddle has
two parts, and both must be divided by F. The four dividers take four parts
per round, so stage 3 takes 2 rounds and stage 4 takes 3. The state machine
is:
`LOAD → (MUL → MWAIT → (DIV → DWAIT)* → BFLY) × 4 → DONE`.

The FFT has been checked against a published case: the AR parameters of
sample 30 of the reference 30-sample run give, bit for bit, the 16 bins the
reference design produced for them (`tb_fft16`, first check).

## Arithmetic units (`cmult`, `fxdiv`)

`cmult` computes `(a.re·b.re − a.im·b.im, a.re·b.im + a.im·b.re)`, each part
kept to its low 32 bits, with a latency of `LAT` = 5 cycles. `fxdiv` divides
a signed 32-bit dividend by an unsigned 16-bit divisor, truncates toward
zero, and has a latency of `LAT` = 35 cycles; a zero divisor gives 0. Both
accept one operation per cycle. The controllers use them one operation at a
time and wait for `out_valid`. Each unit computes its result at once and
then delays it through a shift register. This matches the timing of a
pipelined core, but it is not how one would build a fast divider.

## Sequencer and top (`psd_logic`, `psd_top`, `dpram`)

`psd_logic` does the following:

1. reads the four parameter words and clamps fl to 0..16;
2. for each sample, starts the LMS engine, then the FFT, then writes 32
   result words through RAM port B;
3. multiplexes lane 0 of the arithmetic units between the two engines; an
   assertion checks that the engines are never busy at the same time.

`dpram` is the 1024×32 dual-port RAM. Its reads are registered and return
the old data when a write hits the same word. On a same-word write by both
ports, port B wins. `psd_top` connects the two and brings out the host port.

## Timing

Let L be the multiplier latency and D the divider latency. Counting from the
cycle in which `start` is sampled to the `done` pulse:

* LMS update: `6 + fl·(3L + 3D + 4)`
* FFT: `16 + 3L + 5D`
* one sample: `P = 56 + fl·(3L + 3D + 4) + 3L + 5D`
* a run: `7 + N·P`

The defaults are L = 5, D = 35 and fl = 16. One sample then takes 2,230
cycles, 1,984 of them in the LMS loop. The 30-sample run takes 66,907
cycles. The LMS loop is what limits speed, not the transform.

The reference design's 30-sample run took about 4.4 ms in simulation. That
equals this cycle count at a clock period of about 66 ns. The reference's
own cycle count and clock are not known, so this comparison is only a
plausibility check.

## Parameters

| module      | parameter     | default | meaning                                 |
|-------------|---------------|---------|-----------------------------------------|
| `psd_top`   | `ADDR_W`      | 10      | RAM address width (1024 words)          |
|             | `MAX_FL`      | 16      | AR parameters held                      |
|             | `MULT_LAT`    | 5       | multiplier latency                      |
|             | `DIV_LAT`     | 35      | divider latency                         |
| `psd_logic` | `RES_BASE`    | 31      | first result word                       |
|             | `SAMPLE_BASE` | 0       | word of x(1)                            |
|             | `PARAM_BASE`  | 1020    | first parameter word (`psd_top` sets it to the last 4 words) |

The FFT size (16), the number of multipliers (7) and the number of dividers
(4) are constants in `psd_pkg`. The FFT's stage tables are built for 16
points and cannot be changed by a parameter. `MAX_FL` must be at most 16.

## What follows the reference design and what does not

These parts follow the reference design: the LMS and FFT equations, the
decimal scale and its truncation, the twiddle values, the unscaled W^0/W^4
products, the 7 multipliers and 4 dividers, the latencies 5 and 35, the
single shared multiplier/divider for the LMS loop, the order "update, then
transform" per sample, the sample addresses, and the address range of the
results.

These are this design's own choices:

* the location of the parameter words;
* the start/done handshake;
* the re/im interleaving of the result words;
* the division schedule (four parts per round, real part first), which
  agrees with the one round of the reference that is known;
* the hand-over cycles between phases;
* the clamping of fl;
* the behaviour on a zero divisor;
* one clock and a synchronous active-high reset;
* how the arithmetic units are built inside.

The reference design also used vendor 16- and 64-point FFT cores in place
of its own FFT. Those variants, the embedded CPU, its SDRAM and the
configuration flash are outside this RTL. Their side of the RAM is the
`host_*` port.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog. Expected values
come from `tb/psd_ref_pkg.sv`, which is an independent model written with
64-bit integers and loops. It also generates the test signal: tones of
0.1, 0.3 and 0.5 amplitude at 100, 200 and 300 Hz, sampled at 1 kHz.

| testbench        | checks                                                                 |
|------------------|------------------------------------------------------------------------|
| `tb_cmult`       | products (including published operand pairs) and exact 5-cycle latency |
| `tb_fxdiv`       | truncation toward zero, extremes, random divisors, exact 35-cycle latency |
| `tb_dpram`       | both ports, simultaneous writes, read-before-write, hold when disabled  |
| `tb_fft16`       | the published 16-bin case, 40 random transforms, latency `16+3L+5D`     |
| `tb_lms_engine`  | ef and all 16 parameters after every sample, clear, fl = 16/4/0, latency |
| `tb_psd_logic`   | every result word of several runs, no stray writes, run time, fl clamp, N = 0 |
| `tb_psd_top`     | the full 30-sample run at default parameters, checked end to end (see below) |

`tb_psd_top` checks all 960 result words and the run time of 66,907 cycles.
It checks that the last spectrum peaks at 312.5 Hz, with local maxima at
187.5 Hz and 62.5 Hz; these are the peaks the reference design reported.
It also checks that a second run starts from zeroed parameters. It counts
how often each mechanism occurs: lane-0 sharing, zero-history taps, latency
waits, whole-number twiddle stages, multi-round division, use of all 7
multipliers, and result writes. Any mechanism that never occurs is a
failure. The run takes about 10 s.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/psd_pkg.sv rtl/cmult.sv rtl/fxdiv.sv rtl/dpram.sv rtl/lms_engine.sv \
  rtl/fft16.sv rtl/psd_logic.sv rtl/psd_top.sv \
  tb/psd_ref_pkg.sv tb/tb_psd_top.sv --top-module tb_psd_top
./obj_dir/Vtb_psd_top
```

Any other testbench runs the same way with its own top module. The package
files must come first.

## How far to trust it

Every module passes lint and elaboration. The arithmetic matches the
fixed-point model bit for bit, and the FFT matches the one published case
exactly. The input samples of the reference run are not known to the last
digit, so the full LMS run could not be compared with its published AR
parameters. With the test signal used here the run ends with
parameters close to the published ones (for example 152 and 1516 against
161 and 1537) and with the same spectral peaks.

Timing closure, the real divider implementation and the host software are
not covered. The first two are placeholders with the right latency.
