# Four-scale wavelet analyser with multiplier-free FIR filters

This is synthesizable SystemVerilog for a discrete wavelet transform (DWT).
The signal is split into four scales by a cascade of filter pairs, and none of
the filters uses a hardware multiplier. Each filter uses **distributed arithmetic**
(DA). The samples enter bit by bit. A small table of precomputed coefficient sums
replaces the multiply-accumulate, so each filter is one table, one adder and a
few registers. The cost is speed: a 16-bit sample takes 16 clocks to filter.
That suits designs where logic is scarce and the sample rate is modest.

The structure follows a published Simulink/FPGA design of a DA wavelet
filter bank. The pieces that design leaves open are this implementation's own
choices. These include the sample handshake, the coefficient quantization and
how results are scaled between scales. Each one is listed below.

## The cascade

```
 x ──► [ low-pass | high-pass ] ─► ↓2 ─► D1
            │
            └─► ↓2 ─► [ low-pass | high-pass ] ─► ↓2 ─► D2
                           │
                           └─► ↓2 ─► [ ... ] ─► D3
                                        └─► ↓2 ─► [ ... ] ─► D4
                                                     └─► ↓2 ─► A4
```

Each scale (`dwt_level`) filters its input with a 4-tap low-pass and a 4-tap
high-pass filter at the same time. Both results are then decimated by two. The
high-pass output is the **detail** of that scale (D1..D4). The low-pass output is
the **approximation**, and it is the input of the next scale. After four scales
the outputs are D1, D2, D3, D4 and the coarsest approximation A4. For N input
samples you get N/2, N/4, N/8 and N/16 detail samples and N/16 approximation
samples.

The filters are the 4-tap Daubechies pair, often written D4 (Matlab calls it
`db2`). They are used in the orientation of Matlab's decomposition filters, and
tap k multiplies x[n−k]:

| tap k | Lo_D[k] | ×2^14 | Hi_D[k] | ×2^14 |
|---|---|---|---|---|
| 0 | (1−√3)/(4√2) = −0.12941 | −2120 | −0.48296 | −7913 |
| 1 | (3−√3)/(4√2) = 0.22414 | 3672 | 0.83652 | 13705 |
| 2 | (3+√3)/(4√2) = 0.83652 | 13705 | −0.22414 | −3672 |
| 3 | (1+√3)/(4√2) = 0.48296 | 7913 | −0.12941 | −2120 |

`Hi_D[k] = (−1)^(k+1) · Lo_D[3−k]`. The integers are the constants `LO_D` and
`HI_D` in `rtl/dwt_pkg.sv`.

All scales share one clock. A scale only acts when it is handed a sample. So
scale 1 works at the input rate (one sample per 16 clocks at most), scale 2 at
half that rate, and so on. Deeper scales are idle most of the time. No scale
can be overrun if the input obeys `in_ready`.

## How one DA filter computes y[n] = Σ c_k · x[n−k]

This is the core of the design (`da_fir`). Write each 16-bit two's-complement
sample by its bits: x = −b₁₅·2¹⁵ + Σ_{i<15} b_i·2^i. Then

```
y = Σ_k c_k x_k = −2¹⁵ · T(b₁₅ of all taps) + Σ_{i<15} 2^i · T(b_i of all taps)
```

Here `T(a)` is the sum of the coefficients c_k whose tap has a 1 at that bit
position. With four taps there are only 16 possible bit patterns, so `T` is a
16-entry table (`da_rom`):

| address (tap3 tap2 tap1 tap0) | entry |
|---|---|
| 0000 | 0 |
| 0001 | c₀ |
| 0010 | c₁ |
| … | … |
| 1110 | c₃+c₂+c₁ |
| 1111 | c₃+c₂+c₁+c₀ |

Address bit 0 holds the newest sample. The table is computed at elaboration
from the coefficient parameter, so you never edit it by hand.

The filter's data path, in order:

1. **Delay line.** Four sample registers. A new sample shifts in on `in_valid`.
2. **Parallel-to-serial registers** (`p2s_reg`), one per tap. The clock after a
   sample arrives, each one loads its tap. It then presents one bit per clock,
   most significant bit first.
3. **Table.** The four current bits form the address. The entry is registered,
   so it arrives one clock later.
4. **Scaling accumulator** (`scaling_acc`). For each bit-time it computes
   `acc = 2·acc + T`. For the first bit-time (the sign bit) the fed-back value
   is replaced by 0 and the entry is *subtracted*. After 16 bit-times `acc`
   equals y exactly. Set `SIGNED_DATA = 0` for unsigned samples: the subtraction
   then becomes an add.
5. **Output register.** One clock after the last bit-time it copies the
   accumulator and pulses `out_valid`.

A bit counter runs from 0 to 15 and frames each word. It is delayed by one clock
to line up with the registered table. Its start marks the sign bit and its end
(count = 15) closes the word. The result is full precision: 34 bits, with the
coefficients' 2^14 scale.

### Cycle timing of one filter

| clock | event |
|---|---|
| t | `in_valid`: the sample enters the delay line |
| t+1 | parallel-to-serial registers load; counter restarts |
| t+2 … t+17 | bits 15 … 0 address the table |
| t+3 … t+18 | table words enter the accumulator |
| t+19 | output register copies the accumulator |
| t+20 | `out_valid`, y[n] on `out_data` |

Latency is DATA_W+4 = 20 clocks. The next sample may arrive at t+16, so the
filter accepts one sample every DATA_W = 16 clocks. The pipeline overlaps
consecutive words with no idle bit-time. `in_ready` is high exactly when a
sample would load into a free slot. An assertion in `da_fir` flags a sample
offered while `in_ready` is low.

### Longer filters

A table for n taps has 2^n entries, so a long filter is not given one large
table. Its taps are split into groups of `LUT_IN` (default 4, the natural FPGA
LUT size). Each group gets its own table, and the table outputs are added before
the accumulator. With the default 4 taps there is one table and no extra adder.
The testbench builds an 8-tap filter this way, using two tables.

## Numbers between the scales

- **Samples**: 16-bit two's complement (`DATA_W`). The width is tied to the
  bit counter, which closes each word at 15.
- **Coefficients**: 16-bit, 14 fraction bits (`COEF_W`, `COEF_FRAC`); the range
  is −2 … +2. Table entries are 18 bits wide.
- **Rescaling**: every filter result is shifted right by 14 bits (rounding
  towards −∞). It is then **saturated** to 16 bits before decimation. Every scale
  therefore uses the input's units and the same 16-bit path. The low-pass filter
  has a DC gain of √2, so a large input can grow past 16 bits after a scale or
  two. Such results are clipped, and `sat[j]` pulses for one clock. If you want
  no clipping, keep the input amplitude below about 2^15/√2^j for j scales, or
  widen the samples.
- **Decimation** keeps samples 0, 2, 4, … of each filter's output, counted from
  reset (`downsample2`, `KEEP_PHASE = 0`). Its output is registered.
- **Start-up**: the delay lines reset to zero, so the first outputs see zeros
  before the signal.

## Top-level interface (`dwt4_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_data` | in | 1, 16 | input sample strobe and value |
| `in_ready` | out | 1 | a sample may be given this clock |
| `d_valid[j]`, `d_data[j]` | out | 4, 4×16 | detail of scale j+1 (one-clock strobe) |
| `a_valid`, `a_data` | out | 1, 16 | approximation of the last scale |
| `sat[j]` | out | 4 | scale j+1 clipped a result this clock |

Latency: a kept sample appears on D1 21 clocks after its input. Each further
scale adds 21 clocks, so D_j (and A4 with D4) arrives 21·j clocks after the
input sample that completes it. Each `*_data` holds its value until the next
strobe.

Parameters: `LEVELS` (4) and `DATA_W` (16) on the top. `da_fir` also takes
`TAPS`, `COEFS`, `COEF_W`, `SIGNED_DATA` and `LUT_IN`. `dwt_level` takes
`LO_COEFS`, `HI_COEFS` and `COEF_FRAC`. To use another wavelet, pass other
coefficients; the tables follow automatically.

## Files

| file | contents |
|---|---|
| `rtl/dwt_pkg.sv` | widths, coefficient constants |
| `rtl/dwt4_top.sv` | cascade of `LEVELS` scales |
| `rtl/dwt_level.sv` | one scale: two filters, rescale/saturate, two decimators |
| `rtl/da_fir.sv` | distributed-arithmetic FIR |
| `rtl/p2s_reg.sv` | parallel-to-serial register, MSB first |
| `rtl/da_rom.sv` | coefficient-sum table |
| `rtl/scaling_acc.sv` | shift-and-add accumulator and output register |
| `rtl/downsample2.sv` | keep every second sample |
| `tb/dwt_ref_pkg.sv` | integer reference model used by the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench checks its block against an ordinary integer-multiply model.
It prints `TB_RESULT checks=N failures=M` and stops itself. For example, to run
the whole analyser:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/dwt_pkg.sv rtl/p2s_reg.sv rtl/da_rom.sv rtl/scaling_acc.sv \
  rtl/downsample2.sv rtl/da_fir.sv rtl/dwt_level.sv rtl/dwt4_top.sv \
  tb/dwt_ref_pkg.sv tb/tb_dwt4_top.sv --top-module tb_dwt4_top -o sim
./obj_dir/sim
```

For the other testbenches, swap the last file and `--top-module`. The packages
must come first.

What the testbenches cover:

- **`tb_dwt4_top`** runs at the default size. It feeds 2048 samples: noise, a
  triangle, and full-scale DC and alternating runs. Most are back to back, some
  come after gaps. It checks every D1..D4 and A4 value, the D1 latency, the
  per-scale output counts, and that saturation happened at scale 1 and at a
  deeper scale.
- **`tb_da_fir`** checks the low-pass, high-pass, unsigned-sample and 8-tap
  (two-table) variants. It also checks the 20-clock latency and the 16-clock
  sample spacing.
- **`tb_dwt_level`** checks one scale, including the count of `sat` pulses.
- The remaining testbenches check the small blocks one by one.

Each test runs in well under a second.

## How far it follows the original design

Taken from the original design:

- the four-scale cascade, with decimation after each filter;
- a 4-tap filter per branch;
- the filter's structure: delay line, four parallel-to-serial registers, the
  16-entry coefficient-sum table with one clock of latency, the shift-left-
  and-add accumulator, the counter against 15 that closes each word, and the
  separate output register;
- splitting long filters into 4-input tables plus an adder.

This implementation's own choices:

- **Wavelet.** The text names "Daubechies 4"; the four-tap filter implies the
  D4 (`db2`) pair.
- **Coefficient format.** 16-bit coefficients with 14 fraction bits.
- **Signed samples.** The original accumulator is drawn as a plain adder. Here
  the sign-bit word is subtracted. `SIGNED_DATA = 0` gives the plain adder.
- **Word start.** In the original the word-end signal clears the accumulator
  register. Here the fed-back value is zeroed at the start of a word instead. No
  bit-time is lost, and a sample fits exactly every 16 clocks.
- **Handshake.** A `valid`/`in_ready` strobe interface on a single clock,
  instead of a multirate schedule.
- **Rescaling.** The 2^14 rescaling with saturation between scales, and the
  `sat` flags.
- **Decimation phase.** Even-indexed samples are kept.
- **Outputs.** Every output stream has its own port.

The original gives resource figures only for an FPGA tool flow; they are not
repeated here. After generic synthesis this RTL has no multipliers. It holds
1540 flip-flop bits and eight 16×18-bit tables (2304 ROM bits).
