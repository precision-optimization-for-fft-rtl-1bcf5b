# Memory-based FFT with a statically optimized scaling schedule

A fixed-point FFT that stores every intermediate result in one memory must use
the same wordlength in every stage. Since each radix-2 stage can double the
magnitude of the data, the textbook remedy is to halve the data in every stage.
That is always safe, but it costs one fraction bit per stage, even though the
data rarely grows by the full factor of two.

This processor keeps the hardware of the halve-every-stage design and changes
one thing: a compile-time schedule decides, stage by stage, whether the data
gains an integer bit or not:

* **scaling stage** (`1`): the butterfly result is shifted right by one bit,
  with truncation. The binary point moves one place to the right.
* **saturating stage** (`0`): the result keeps its format. The rare values that
  do not fit are clamped to the largest or smallest representable value.

The schedule is chosen offline from the probability distribution of the data.
For uniformly distributed input it reaches, at 11 bits, the precision that
halving in every stage needs 14 bits for (about 33.5 dB SQNR for 8192 points).
The schedule costs no logic: it is a parameter that selects the shift in each
stage. The design follows the thesis *Precision Optimization for FFT Processor
Design using Static Probability-Based Analysis*, which derives the schedules.
The RTL, the control unit, the memory organisation and the interface are this
design's own.

The top level, `fft_processor`, has a `RADIX` parameter:

* `RADIX = 2` (default) builds the radix-2 processor `fft_r2_mem`. Most of this
  text describes it.
* `RADIX = 4` builds the radix-4 processor `fft_r4_mem`, described in its own
  section below. It uses the same organisation with a four-input PE.

## Number formats and the schedule

A format `<m, n>` is a two's complement number with `m` integer bits (sign
included) and `n` fraction bits, where `m + n = WL`. The hardware only sees
WL-bit integers. The format only says where the binary point is.

* Input samples are `<1, WL-1>`, i.e. values in [-1, 1).
* Stage `s` adds `SCHED` bit `s` to the integer part. The most significant of
  the `log2(N)` used bits belongs to the first stage.
* Output samples are `<M, WL-M>` with `M = 1 + (number of ones in SCHED)`. The
  value of an output integer `y` is `y * 2^(M-WL)`.

Default (N = 8192, WL = 11): `SCHED = 13'b1111010101010`. The integer part
after stages 1..13 is 2 3 4 5 5 6 6 7 7 8 8 9 9, so the output is `<9, 2>`.
Setting every bit to 1 gives the classic halving in every stage, with output
`<1+log2 N, ...>`.

Published schedules for 8192 points with uniform input, as used in the tests:

| WL | SCHED (stage 1 first) | output format |
|----|-----------------------|---------------|
| 8, 9 | 1110101010101 | <9, WL-9> |
| 10 .. 14 | 1111010101010 | <9, WL-9> |
| 15 | 1111011010101 | <10, 5> |
| 16 | 1111101010101 | <10, 6> |

For 256 points at WL = 12 the best schedule is `1111_0101`.

### How a schedule is chosen (offline, not in the RTL)

Each real input value is treated as a discrete random variable over the 2^WL
representable values. A butterfly output is a sum of two independent such
variables. Its probability mass function is therefore the convolution of the
input PMFs. The twiddle factor has unit magnitude and is ignored for this
purpose. Stage by stage, the output PMF is propagated, and the two options are
compared:

* gaining a bit: truncation noise, i.e. the power of the discarded LSB;
* keeping the format: saturation noise, i.e. the probability mass beyond the
  range times the squared clamp error.

The option with less noise is taken, and the PMF after that quantization is
carried to the next stage. For radix-4, an output is the sum of four inputs,
and a stage compares three options: 0, 1 or 2 gained bits. The cost is O(2^WL per stage). A different input
distribution, size or wordlength only needs a new `SCHED` value.

## Datapath (radix-2)

```
             +------------------ control unit (fft_ctrl) -----------------+
             |  load addr (bit-reversed) | p, q, twiddle idx, inc | wb addr |
in --> [mux] --> storage (fft_storage) --> PE (butterfly_r2) --> [mux] --> out
          ^        2 banks, N words         cmul + 4x scale_sat     |
          +--------------------------------- write back ------------+
                           twiddle_rom --^
```

* **Input mux.** While loading, the storage write port takes the input sample.
  While computing, it takes the PE result.
* **Storage** (`fft_storage`): N complex words of 2*WL bits, rewritten in place
  in every stage. 8192 x 22 = 180,224 bits by default.
* **PE** (`butterfly_r2`): one radix-2 decimation-in-time butterfly per cycle.
* **Output mux.** Results of the last stage go to the output port, not back to
  the storage, so no separate read-out pass is needed.

### The butterfly and its single quantization point

```
X[p] = (a + W*b) * 2^-inc        X[q] = (a - W*b) * 2^-inc
```

`W*b` is computed exactly (`cmul`, four multipliers, DW+TW+1 bits). `a` is
aligned to it, and the sum and difference are formed at full precision. Only
then does `scale_sat` quantize each of the four real outputs. It drops the
twiddle's TW-2 fraction bits plus `inc` more by an arithmetic right shift
(truncation toward minus infinity: 1.5 becomes 1, -1.5 becomes -2). It then
clamps to WL bits. Scaling at the output rather than at the input leaves the
result noiseless up to that one point. `ovf` reports a clamp.

The twiddle factors (`twiddle_rom`) are Q2.(TW-2) numbers, TW = 16, so +1.0 is
exact. They are rounded to nearest from a quarter-wave cosine table of N/4+1
entries. The table is computed during elaboration. Both parts of W_N^k are read
from it by symmetry. With 16 bits the coefficient error stays far below the
data's quantization noise for WL up to 16.

### Storage banking

The PE reads two words and writes two words every cycle. The storage does not
use a four-port memory. It splits the words over two simple dual-port banks:

* the bank is the XOR of all address bits;
* the row within a bank is the address without bit 0.

The two words of a radix-2 butterfly differ in exactly one address bit, so
they always sit in different banks. An assertion checks this rule.

## Control and timing

`fft_ctrl` runs three phases:

1. **LOAD**: accepts N samples with `in_valid`/`in_ready`, one per cycle, in
   natural order. Sample n is written to address bitrev(n).
2. **RUN**: for stage st = 0 .. log2(N)-1, issues butterflies j = 0 .. N/2-1.
   `p` is j with a 0 inserted at bit st, and `q = p + 2^st`. The twiddle
   exponent is (j mod 2^st) * N / 2^(st+1).
3. **DRAIN**: after each stage, the control unit waits until the 3-cycle PE
   pipeline (1 cycle memory read, 2 cycles PE) is empty, so the next stage
   never reads a stale word. This costs 4 cycles per stage.

Cycle counts:

* Compute time: `log2(N) * (N/2 + 4)` cycles. That is 53,300 for N = 8192.
  `busy` is high for exactly that long.
* Total time per transform with back-to-back input: N more cycles for loading.
  That is 61,492 for N = 8192, about 13 MS/s at 100 MHz.
* `done` pulses in the cycle after the last output. The next transform can load
  immediately.

Outputs appear during the last stage with no back-pressure. The top level has
four output lanes. Lane k is valid when `out_valid` and `out_lane[k]` are both
set, and it carries bin `out_idx[k]`. With radix-2, two bins appear per cycle:

* `out_lane` is `0011`, and lanes 2 and 3 are driven to 0;
* lane 0 carries bin `out_idx[0]`, which counts up from 0;
* lane 1 carries bin `out_idx[0] + N/2`.

## Radix-4 configuration

The thesis applies the same method to radix-4 FFTs. There a stage can make the
data up to four times larger, so a stage may gain 0, 1 or 2 integer bits. With
`RADIX = 4`:

* **Schedule.** `SCHED` holds one 2-bit field per stage. The first stage owns
  the most significant used field. The output format is `<1 + sum of fields, rest>`.
* **Mixed radix.** If log2(N) is odd, as for 8192 = 2 x 4^6, the first stage
  is a radix-2 stage, and its field must be 0 or 1. The remaining stages are
  radix-4: ceil(log2(N)/2) stages in total, 7 for 8192 points.
* **PE** (`butterfly_r4`). It multiplies three inputs by W^e1, W^e2 and W^e3
  exactly. It forms the 4-point DFT at full precision:
  * `X0 = y0 + y1 + y2 + y3`
  * `X1 = y0 - y1 - j(y2 - y3)`
  * `X2 = y0 + y1 - y2 - y3`
  * `X3 = y0 - y1 + j(y2 - y3)`

  It then quantizes each output once with `scale_sat`, shifting 0-2 bits. In
  the radix-2 stage it computes two radix-2 butterflies with unit twiddles
  instead.
* **Storage** (`fft_storage4`). Four banks. The bank is the XOR of the odd
  address bits next to the XOR of the even address bits; the row drops the two
  lowest bits. The four words of one butterfly differ only in two adjacent
  address bits, so they always fall into four different banks.
* **Control** (`fft_ctrl4`). It issues N/4 butterflies per stage.
  * A radix-4 stage with span s reads p, p+s, p+2s, p+3s.
  * The twiddle exponents are pos\*N/(2s), pos\*N/(4s) and 3\*pos\*N/(4s).
  * The third exponent can reach N/2 or more. The ROM then supplies W^(e-N/2),
    and `fft_r4_mem` negates it.
* **Timing.** Compute time is `ceil(log2 N / 2) * (N/4 + 4)` cycles: 14,364
  for 8192 points. Four bins leave per cycle and `out_lane` is `1111`.
* **Default schedule.** `01 10 01 01 01 01 01` (the `SCHED` default when `RADIX = 4` is `32'h1955`).
  It gives the integer parts 2 4 5 6 7 8 9, which are the formats of the
  radix-2 default at the same points of the transform. The thesis plots
  radix-4 results but does not print the schedules, so this value is this
  design's choice.

## Measured precision

Each of the following runs feeds random input through the RTL and compares the
RTL output with a double-precision FFT. The input is uniformly distributed
unless a row says otherwise. There is one transform per 8192-point run and
eight per 256-point run. All RTL outputs are also checked
bit for bit against an independent integer model.

| configuration | RTL SQNR | published |
|---|---|---|
| 8192 pt, WL 8, optimized | 18.5 dB | 18.08 dB |
| 8192 pt, WL 9, optimized | 24.2 dB | 23.70 dB |
| 8192 pt, WL 10, optimized | 27.9 dB | 27.47 dB |
| 8192 pt, WL 11, optimized (default) | 33.8-34.0 dB | 33.47 dB |
| 8192 pt, WL 12, optimized | 39.9 dB | 39.50 dB |
| 8192 pt, WL 13, optimized | 45.9 dB | 45.51 dB |
| 8192 pt, WL 14, optimized | 52.0 dB | 51.50 dB |
| 8192 pt, WL 15, optimized | 55.5 dB | 55.28 dB |
| 8192 pt, WL 16, optimized | 61.1 dB | 60.83 dB |
| 8192 pt, WL 11, halving every stage | 14.1 dB | 14.10 dB |
| 8192 pt, WL 14, halving every stage | 32.2 dB | 32.16 dB |
| 256 pt, WL 12, `1111_0101` | 43.4 dB | 42.75 dB |
| 256 pt, WL 12, `1111_1111` | 35.7 dB | 35.39 dB |
| 8192 pt radix-4, WL 11, `01 10 01 01 01 01 01` | 40.5 dB | about 37 dB (read from plot) |
| 8192 pt radix-4, WL 8 / 11 / 14 / 16, halving every stage | 0.1 / 18.1 / 36.1 / 48.2 dB | about -1.5 / 16.5 / 34.5 / 46.5 dB (plot) |
| 8192 pt radix-4, normal input (sigma 0.2), 1 bit per stage, WL 10 / 12 / 15 | 31.1 / 43.3 / 61.3 dB | about 33 / 45 / 63 dB (plot) |
| 8192 pt radix-4, normal input (sigma 0.2), halving, WL 12 / 16 | 14.9 / 38.9 dB | about 13 / 37 dB (plot) |

The default 11-bit processor matches the 14-bit processor that halves in every
stage. Its storage is 3/14 smaller.

The radix-4 rows come from `tb_fft_full_r4` and `tb_sqnr_r4_workloads`. The
radix-4 runs agree with the published curves to within about 2 dB. The
published radix-4 curve for normal input with sigma 0.4 is not reproduced: the
published 1-bit-per-stage result saturates at about 20 dB, while this design
reaches 37 dB at 12 bits. The split of the 13 radix-2 stages of an 8192-point
transform into radix-4 stages is not published, and it changes how fast the
data grows.

The radix-4 processor is more precise at the same wordlength. It has 7
quantization points instead of 13. The published radix-4 figures are only
available as a plot, and the schedule behind them is not given. The table
therefore compares the radix-4 rows with approximate values read from the plot.

## Where this design departs from the published design, or adds to it

* **Throughput.** The published processor is quoted at 100 MS/s with a 10 ns
  clock. This design computes one butterfly per cycle. At 100 MHz that gives
  about 13 MS/s for 8192 points. More butterflies per cycle would need
  wider banking.
* **Input mux position.** The published block diagram places the input
  multiplexer in front of the PE. Here it selects the storage write data. The
  first DIT stage pairs samples that arrive N/2 apart, so they cannot go
  straight from the input into the PE.
* **Radix.** The published hardware is radix-2. The method also covers radix-4
  and radix-8, evaluated only in software. Radix-2 and radix-4 are built here,
  with a radix-2 first stage for odd log2(N). Radix-8 is not built.
* **This design's own choices.** The published design does not specify the
  following:
  * the twiddle width (16 bits) and the quarter-wave table;
  * parity banking;
  * the pipeline depth and the drain stall;
  * the valid/ready input and the two-lane output;
  * the reset: active-low and asynchronous, clearing control state and valid
    flags but not the datapath registers.

## Files

| file | content |
|---|---|
| `rtl/fft_pkg.sv` | phase enum, helper functions |
| `rtl/fft_processor.sv` | top level: selects the radix-2 or radix-4 processor, four output lanes |
| `rtl/fft_r2_mem.sv` | radix-2 processor: control unit, storage, twiddle ROM, PE, muxes |
| `rtl/fft_ctrl.sv` | phases, DIT address and twiddle generation, write-back delay line |
| `rtl/butterfly_r2.sv` | radix-2 PE with output scaling |
| `rtl/cmul.sv` | exact complex multiplier |
| `rtl/scale_sat.sv` | truncate-and-saturate quantizer |
| `rtl/twiddle_rom.sv` | quarter-wave twiddle ROM |
| `rtl/fft_storage.sv`, `rtl/bank_ram.sv` | two-bank data memory |
| `rtl/fft_r4_mem.sv` | radix-4 processor: the same structure with three twiddle ROMs |
| `rtl/fft_ctrl4.sv` | radix-4 and mixed-radix address and twiddle generation |
| `rtl/butterfly_r4.sv` | radix-4 PE, with a mode for two radix-2 butterflies |
| `rtl/fft_storage4.sv` | four-bank data memory |
| `tb/fft_ref_pkg.sv` | reference models: twiddles, quantizer, bit-accurate radix-2 and radix-4 FFTs, float FFT |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_fft_r2_mem.sv` | end-to-end test at N = 64: three transforms, forced saturation, mechanism counts |
| `tb/tb_fft_r4_mem.sv` | radix-4 end-to-end test at N = 32 (mixed radix) and N = 64 |
| `tb/tb_fft_processor.sv` | top level with both radices at N = 64 |
| `tb/tb_fft_full.sv` | one transform at the default parameters (8192 points, 11 bits, radix-2) |
| `tb/tb_fft_full_r4.sv` | 8192-point radix-4 transforms, default schedule and halving |
| `tb/tb_sqnr_workloads.sv`, `tb/fft_sqnr_probe.sv` | the radix-2 rows of the precision table above |
| `tb/tb_sqnr_r4_workloads.sv`, `tb/fft_sqnr_probe4.sv` | the radix-4 halving and normal-input rows |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. From the
top of the tree, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fft_pkg.sv tb/fft_ref_pkg.sv tb/tb_fft_full.sv --top-module tb_fft_full -o sim
./obj_dir/sim
```

Run times:

* `tb_fft_full` and `tb_fft_full_r4`: a few seconds each.
* `tb_sqnr_workloads`: about 30 s (13 processors).
* `tb_sqnr_r4_workloads`: about 30 s (9 processors).
* all other testbenches: under a second.

## Changing it

* `RADIX`: 2 or 4. Set `SCHED` to match: 1 bit per radix-2 stage, or 2 bits
  per radix-4 stage.
* `N`: any power of two from 8 up for radix-2. Radix-4 was tested at 32, 64
  and 8192 points. The storage is N x 2*WL bits and the
  twiddle table has N/4+1 entries.
* `WL`: the wordlength of the I/O and the storage.
* `SCHED`: choose it for the new N, WL and input distribution, as described
  above. Radix-2 uses the low log2(N) bits; radix-4 uses the low
  2 x ceil(log2(N)/2) bits.
* `TW`: increase it if WL grows well beyond 16.
