# MRMDF FFT/IFFT: a 128/64-point transform for 1 to 4 MIMO-OFDM streams

An IEEE 802.11n receiver or transmitter needs a 64- or 128-point FFT/IFFT
for each of up to four spatial streams. Each transform must finish within
3.6 or 4.0 µs. Building one pipelined FFT per stream wastes hardware. This
design instead runs all streams through one pipeline with **four parallel
data paths**. It is a *mixed-radix multipath delay-feedback* (MRMDF)
structure:

* **multipath:** four samples enter per clock, as in a multipath
  delay-commutator (MDC) FFT, so four streams can be served at full rate;
* **delay feedback:** every butterfly pairs its two operands through a
  single-path delay-feedback (SDF) memory, so no separate reorder buffers
  are needed and memory stays at about one word per point and stream;
* **mixed radix:** a 128-point transform is 2 × 64, and the 64-point part
  is 8 × 8. Using radix-8 leaves only one stage of general twiddles, and
  that stage uses a small set of constants that is shared by the paths.

The result comes out in bit-reversed order. Each output word is labelled
with its frequency bin.

## Data format: paths, sequences and groups

Everything in the pipeline depends on one data layout. A *sequence* is one
stream's sample series. `nseq` (1 to 4) sequences are processed together.

* **Input.** On each valid cycle, path `p` brings the next sample of
  sequence `p`. Paths `p >= nseq` are ignored.
* **Group.** After Module 1, a group is `nseq` consecutive valid cycles.
  In cycle `s` of group `g`, path `j` carries sample `4g + j` of sequence
  `s`. A 128-point frame is 32 groups, and a 64-point frame is 16.

Within a group, every sequence sits at the same position on a given path.
So a path needs one twiddle for the whole group, whichever sequence it
carries.

A butterfly that pairs samples `d` apart (`d` a multiple of 4) therefore
pairs groups `d/4` apart, on the same path. Its delay-feedback memory holds
`d/4 · nseq` words. Distances below 4 (2 and 1) pair different paths of the
same cycle and need no memory at all.

With fewer than four sequences, a group is shorter and the memories use
only part of their depth. Throughput is then proportional to `nseq`. The
input arrives at one sample per cycle per stream in every configuration, so
the pipeline is idle for `4 − nseq` cycles out of every four.

## The pipeline

```
 in ─► Module 1 ─► Module 2 ─────────────► Module 3 ───────────────────────► Module 4 ─► out
       regroup     radix-2, 128 = 2×64     radix-8 step 1 (d=32,16,8)         radix-8 step 2 (d=4,2,1)
                   (bypassed at 64)        + W8 trivial twiddles              + W8 trivial twiddles
                   + W128^q                + modified multiplier W64^(n2·k1)   bit-reversed output
```

| block | file | memory at 4 sequences |
|---|---|---|
| Module 1, regrouping | `data_reorder.sv` | 16 words |
| Module 2, radix-2 step | `radix2_module.sv` (+ `twiddle_rom`, `complex_mult`) | 4 × 64 = 256 words |
| Module 3, first radix-8 step | `radix8_module3.sv` (+ `sdf_stage`, `sdf_bu2_lane`, `modified_cmult`) | 4 × (32 + 16 + 8) = 224 words |
| Module 4, second radix-8 step | `radix8_module4.sv` | 4 × 4 = 16 words |
| top | `mrmdf_fft.sv` | — |

Shared types (`cplx_t`, `coef_t`) and arithmetic helpers are in
`fft_pkg.sv`.

### The delay-feedback butterfly (`sdf_bu2_lane`)

Each lane counts valid samples in blocks of `2L` samples, where
`L = G · nseq`:

* **First half:** the input is written to memory. The old memory content,
  which is the differences of the previous block, goes out.
* **Second half:** the output is `memory + input`, and `memory − input` is
  written back.

The output is therefore the decimation-in-frequency butterfly result in
place order, delayed by `L` valid samples. `sdf_stage` bundles four lanes
with one counter that tells the parent module which group is leaving.
Twiddles are chosen from that group number.

### Module 2: 128 = 2 × 64

Write `n = 64r + q` and `k = 2l + m`. The 128-point DFT is then two 64-point
DFTs:

* of `x(q) + x(q+64)`, giving the even bins;
* of `(x(q) − x(q+64)) · W128^q`, giving the odd bins.

With a memory distance of 16 groups, the sums go straight on to Module 3.
The differences wait in the memory and leave during the first half of the
next frame.

The four paths need four different `W128^q` in a cycle, but the block has
only two complex multipliers and two ROMs. The work is split in time:

* while differences are being written, multiplier `k` twiddles the
  difference of path `k` before it is stored;
* while they are read back, multiplier `k` twiddles the stored difference
  of path `k + 2`.

Both multipliers are busy on every cycle.

The ROM (`twiddle_rom`) stores 1/8 of a period: cosine and sine of
`2πi/128` for `i = 0..16`, as `round(16384·cos)` and `round(16384·sin)`.
Every other angle is folded onto these by quadrant and octant symmetry.

In 64-point mode, Module 2 is a single register stage.

### Modules 3 and 4: 64 = 8 × 8

Write `n = 8·n1 + n2` and `k = k1 + 8·k2`:

```
X(k1 + 8k2) = Σ_n2 [ W64^(n2·k1) · Σ_n1 x(8n1 + n2) W8^(n1·k1) ] W8^(n2·k2)
```

**Module 3** computes the inner 8-point DFT over `n1` (distances 32, 16 and
8 samples) as three delay-feedback radix-2 stages. Between the stages it
applies the *trivial* twiddles of an 8-point DFT:

* after stage 1, `W8^(n bits 4:3)` where position bit 5 is set;
* after stage 2, `−j` where bits 4 and 3 are set.

`W8^1` and `W8^3` need a 1/√2 scaling. It is done with shifts and adds.

At position `n = 8p + n2`, Module 3's output holds bin `k1 = bitrev3(p)`.
That value needs the one *nontrivial* twiddle, `W64^(n2·k1)`, with exponent
0 to 49.

**`modified_cmult`** applies this twiddle to all four paths at once,
without general multipliers. Every exponent is a quadrant rotation of an
angle `2πm/64`, `m = 0..15`. The cosine and sine of that angle are `C[m]`
and `C[16−m]`, where `C[i] = round(16384·cos(2πi/64))`. These are nine
(cos, sin) constant sets. Each product with a constant is a fixed sum of
shifted samples (canonical signed digits, at most seven terms). The
quadrant only chooses signs and which partial products pair up.

**Module 4** does the outer 8-point DFT over `n2`:

* distance 4 is one group: a delay-feedback stage with one group of memory,
  then `W8^j` on path `j` where position bit 2 is set;
* distances 2 and 1 are butterflies between paths 0/2, 1/3 and then 0/1,
  2/3, with `−j` on path 3 in between.

On leaving, path `j` of group `g` holds bin `bitrev6(4g + j)` of its
64-point block.

For 128 points, the extra Module 2 bit is the lowest bin bit, so the bin is
`bitrev7(4g + j)`. The top module puts this number on `out_bin[j]`.

## Top-level interface (`mrmdf_fft`)

| port | meaning |
|---|---|
| `clk`, `rst_n` | clock; asynchronous active-low reset of counters and valid flags |
| `clear` | synchronous restart; pulse after changing `nseq`, `mode128` or `inverse` |
| `nseq[2:0]` | 1..4 sequences |
| `mode128` | 1 = 128-point, 0 = 64-point |
| `inverse` | 1 = IFFT including 1/N, 0 = FFT |
| `in_valid`, `in_re[4]`, `in_im[4]` | 12-bit input; path `p` = sequence `p` |
| `out_valid`, `out_seq`, `out_grp` | which sequence and group the output cycle holds |
| `out_bin[4]` | frequency bin (or time index for IFFT) on each path |
| `out_re[4]`, `out_im[4]` | 20-bit results |

**Timing.** Frames must follow one another without a break in framing.
Idle cycles are allowed: the pipeline simply waits. The pipeline advances
only with valid input, so the last frame's results come out only while a
further frame, for example zeros, is being sent.

With continuous input, the results of one frame span exactly `N` cycles,
and frames follow every `N` cycles. At four sequences that is
`4 × 128` points per 128 cycles. A clock of 35.6 MHz therefore meets the
3.6 µs limit for the largest case.

**Latency**, counted in valid groups inside the core, is 16 (Module 2, 128
points only) + 14 (Module 3) + 1 (Module 4) + 1 (Module 1: a block is read
while the next one arrives), plus one register per stage. A single
following frame is exactly enough to flush the last one.

**IFFT.** The IFFT uses the same core. Real and imaginary parts are
exchanged before and after it, and the result is shifted right by
log2 N with rounding. This gives `x(n) = 1/N Σ X(k) W^(−nk)`.

**Word lengths.** The FFT output is not scaled. With 12-bit inputs, the
seven bits of growth of a 128-point transform plus one guard bit fit into
20 bits. Twiddles are Q2.14.

## How this implementation departs from the original design

* **Module 1.** The original regroups the streams with skewing delay lines,
  a switch and deskewing delays. Here, the same 16 words form one 4 × 4
  array that is transposed in place. Its layout alternates from block to
  block, so block b is read from exactly the words that block b+1 is
  overwriting. This works for any `nseq` from 1 to 4. Like the
  delay-feedback stages, Module 1 moves only with input.
* **Module 2.** The original lists two complex multipliers and two ROMs for
  four paths without saying how they are shared. The split in time
  described above is this implementation's own.
* **Arithmetic.** Word lengths, rounding, the canonical-signed-digit
  constants, the valid/flush handshake, `clear`, the IFFT-by-exchange and
  the bin labelling (instead of reordering the output) are this
  implementation's choices.
* **Unverified claims.** The claimed 38 % gate saving of the modified
  multiplier over four complex multipliers is not verified here. Neither
  are FPGA power and clock figures (about 297 mW and 161 MHz on a Xilinx
  part).
* **Total memory.** At four sequences the design uses
  16 + 256 + 224 + 16 = 512 words.

## Verification

Each module has a self-checking testbench in `tb/` that compares against
values computed independently in double precision:

| testbench | what it checks |
|---|---|
| `tb_twiddle_rom` | all 128 twiddles, to within 1 LSB |
| `tb_complex_mult` | random products, to within 1.5 LSB |
| `tb_modified_cmult` | every group position against `exp(−j2πe/64)` |
| `tb_sdf_bu2_lane` | exact sums and differences, and the first-output latency, for 1, 3 and 4 sequences with random idle cycles |
| `tb_data_reorder` | group contents and timing for 1–4 sequences |
| `tb_radix2_module` | sums, twiddled differences and bypass; latency `16·nseq + 1` |
| `tb_radix8_module3` | 8-point DFT over `n1` times `W64^(n2·k1)`; latency `14·nseq + 3` |
| `tb_radix8_module4` | 8-point DFT over `n2` in bit-reversed place; latency `nseq + 2` |

`tb_mrmdf_fft` runs the whole processor at its default sizes. It covers
128 and 64 points, 1 to 4 sequences, FFT and IFFT, with and without input
stalls, two random frames per configuration. It compares every bin with a
double-precision DFT: within 40 LSB on outputs of up to about 2^18 for the
FFT, and within 2 LSB for the IFFT. It also checks the `N`-cycle frame
period, and counts that bypass, idle regrouping cycles, stalls and `clear`
each occurred.

## Simulating

Plain Verilator 5 is enough. The package must be named; the other modules
are found through `-Irtl`:

```
verilator --binary --timing -Wno-fatal -Irtl --top-module tb_mrmdf_fft \
    rtl/fft_pkg.sv tb/tb_mrmdf_fft.sv
./obj_dir/Vtb_mrmdf_fft
```

Replace `tb_mrmdf_fft` with any other testbench name to test one block.
Each testbench ends by printing `TB_RESULT checks=N failures=M`.

## Changing it

* **Word lengths.** `IW`, `DW`, `CW` and `CFRAC` are in `fft_pkg`. Keep
  `DW >= IW + 8` for unscaled 128-point transforms. If `CFRAC` changes, the
  ROM and constant tables (`twiddle_rom`, `modified_cmult`, `scale_r2`)
  must be regenerated from the formulas given in their comments.
* **Transform sizes.** The delay distances (16; 8, 4, 2; 1 group) and the
  position-bit twiddle selections are tied to 128 = 2 × 8 × 8. Other sizes
  need a new decomposition, not just new parameters.
