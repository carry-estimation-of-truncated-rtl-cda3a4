# Truncated-width multipliers with carry estimation, in a 2048-point FFT

A fixed-width multiplier returns only the upper half of its product. The
cheapest way to build one is to never build the lower columns of the
partial-product array at all. But then the carry those columns would have
sent into the kept half is lost, and the result is biased low by up to
several units in the last place. The columns a multiplier drops are not
random noise, though. Their sum is strongly tied to the bits of the highest
dropped column, and those bits are cheap to count. So the carry can be
*estimated* from that one column, plus a small statistical correction for
everything below it.

This repository holds SystemVerilog for that idea, in two parts:

* **Fixed-width multipliers** with three estimators of the lost carry
  (Type I, II and III), for both radix-4 Booth and modified Baugh-Wooley
  arrays.
* **A 2048-point FFT/IFFT processor** whose twiddle multipliers are 12×9
  Booth multipliers that drop their 6 lowest columns and use the Type III
  estimate. There, the estimate reduces to a constant-plus-half-a-count:
  `carry = floor(beta/2) + 1`.

The design is based on a master's thesis on carry estimation for
truncated multipliers. Where this RTL departs from that description, the
section [Departures and limits](#departures-and-limits) says so.

## Carry estimation

Take an n×n product and keep the n most significant columns. Let **beta**
be the number of ones in column n−1, the highest dropped column. On its
own, beta contributes beta/2 units to the kept part. Every column below it
contributes a further amount **lambda**, on average. The carry added at the
bottom of the kept part is then

    sigma = round(beta/2 + lambda)

The three types differ only in how lambda is estimated.

| Type | lambda is estimated from | Booth (radix 4) | Baugh-Wooley |
|---|---|---|---|
| none | – | 0 (direct truncation) | 0 |
| I | the operand bits feeding the dropped part | (1/4)·(number of non-zero Booth digits, last row excluded) | (1/4)·(a_0 + … + a_{n−2}) |
| II | the bits of column n−1 (conditional expectation) | beta/10 + (3/20)·ceil(n/2) | (beta − alpha_{n−1})/6 + (n−1)/12 |
| III | the bits *and* their position (two-dimensional) | a constant: 3/8 of every dropped bit, at its weight | a per-width lookup on d = beta − P(n−1,0) |

Notes on each type:

* **Booth Type III** depends on beta only. That makes it the cheapest
  estimator: a fixed constant plus half of a popcount. The constant is
  found by counting the partial-product bits in each dropped column below
  the top one, weighting each by 3/8 and by its column weight. For the
  12×9 multiplier that drops 6 columns, lambda = 9/16, so
  `sigma = round(beta/2 + 9/16) = floor(beta/2) + 1`.
* **Baugh-Wooley Type III** adds a table entry E to beta:
  `sigma = floor((beta + 1 + E)/2)`. E is an estimate of 2·lambda − 1 and
  is a function of d:

  | n | E |
  |---|---|
  | 8 | floor((d+1)/2) |
  | 10 | 0 if d = 0, else floor((d+2)/2) |
  | 12 | floor((d+2)/2) |
  | 14, 16 | floor((d+3)/2) |

How the arrays are built:

* **Booth array.** The multiplier b is cut into ceil(BW/2) overlapping
  triples {b[2i+1], b[2i], b[2i−1]}, with b[−1] = 0. Each triple gives a
  digit in {−2, …, 2}. Row i is a or 2a, inverted for a negative digit. A
  correction bit n_i sits at column 2i. The all-ones triple is digit 0
  with n_i = 0. Each row is sign extended.
* **Baugh-Wooley array.** Partial products that use exactly one sign bit
  are inverted, and two constant ones are added, at columns n and 2n−1.

The RTL sums the kept columns with ordinary adders; the synthesis tool
builds the tree. The point of the method is that the dropped columns
simply do not exist in the netlist. Only the beta column is counted.

### How close the estimators get

The table below gives the mean of |p·2^n − a·b| over *all* operand pairs
for n×n multipliers keeping n bits. It is measured by
`tb_mult_error_table`. Cells in *italics* differ from the published
analysis; the published value is in brackets.

| | n = 8 | n = 10 | n = 12 |
|---|---|---|---|
| Booth, direct truncation | 384.25 | 1920.25 | 9216.25 |
| Booth, Type I | 84.59 | 350.78 | 1461.55 |
| Booth, Type II | 88.77 | 393.60 | *1655.65 (1667.44)* |
| Booth, Type III | 88.77 | 406.16 | 1654.26 |
| Baugh-Wooley, direct truncation | 576.25 | 2816.25 | 13312.25 |
| Baugh-Wooley, Type I | 92.05 | 403.46 | 1743.25 |
| Baugh-Wooley, Type II | *100.01 (102.81)* | *491.19 (403.15)* | *1891.23 (1750.22)* |
| Baugh-Wooley, Type III | *100.67 (90.18)* | *498.99 (393.89)* | *1867.89 (1673.38)* |

Estimation removes about 78 to 85 % of the error of direct truncation.
For the FFT multiplier (12×9, 6 columns dropped), the mean error is
72.25 with direct truncation and 22.83 with `floor(beta/2) + 1`.
`tb_booth_trunc_mult` checks both figures over all 2^21 pairs.

## The twiddle multiplier

`cmult_trunc` multiplies a 12-bit complex sample by a 9-bit complex
twiddle factor. The twiddle has 8 fraction bits, so +1.0 is stored as
255/256.

* It uses four `booth_trunc_mult` instances. Each is 12×9, drops 6
  columns, uses Type III, and has a 15-bit output.
* It forms `re = xr·wr − xi·wi` and `im = xr·wi + xi·wr` in 16 bits.
* It drops 2 more bits by an arithmetic shift, giving 14 bits.

One output LSB is one input LSB. Each multiplier sees the twiddle as its
Booth-encoded operand (5 rows).

### Effect on a small FFT

How much does the carry estimate matter inside a transform? In the
64-point test, 8-bit complex samples pass through one radix-2³
butterfly stage. The twiddle products are then formed with 11×9
multipliers that drop k columns. A second 8-point stage is computed
exactly. The test is `tb_fft64_trunc_sweep`, over 200 random frames:

| k | Direct truncation | Type III | Exact product, then truncate | Same, +1 on imaginary part |
|---|---|---|---|---|
| 8 | 39.69 dB | 46.02 dB | 46.14 dB | 47.65 dB |
| 9 | 32.16 dB | 41.99 dB | 42.02 dB | 45.05 dB |
| 10 | 26.15 dB | 36.02 dB | 36.53 dB | 40.50 dB |
| 11 | 20.12 dB | 30.12 dB | 30.70 dB | 35.04 dB |
| 12 | 14.07 dB | 24.02 dB | 24.66 dB | 29.13 dB |

Dropping columns without an estimate costs about 10 dB. With Type III,
the result comes within 0.7 dB of truncating the exact product, and the
multiplier stays as small as the plain truncated one. The last column
shows why a correction is needed at all. Truncation always rounds down.
In the real part, the errors of the two products cancel. In the
imaginary part, they add up to about one LSB, so adding 1 there recovers
3 to 5 dB. The published study reports the same ordering, with numbers
within about 2 dB of these. One exception: it puts Type III slightly
above plain post-truncation for k ≥ 9, where this test puts it slightly
below.

## The 2048-point processor

### Decomposition and memory

The processor is memory based and in place. 2048 = 8·8·8·4, so a
transform is three radix-2³ stages and one radix-2² stage. Each stage is
256 groups of 8 words.

* In stage s < 3, the 8 words of a group are `256 >> 3s` apart.
* In stage 3, they are 8 consecutive words, which form two 4-point
  butterflies.

Results are written back to the addresses they came from. After the last
stage, bin k sits at address bitrev11(k). The unload step reads in that
order, so bins leave in natural order.

`fft_main_mem` holds the 2048 words. A word is 29 bits: 12-bit real,
12-bit imaginary, and a 5-bit block exponent. The memory has one
synchronous read port (with read enable) and one write port.

### Ping-pong cache (`pingpong_cache`)

A stage reads every word once and writes it once. Run naively, four
stages cost 8192 reads and 8192 writes of the big memory. The cache cuts
that in half by pairing the stages:

* **Pair 0 (stages 0 and 1).** Stage-0 groups read main memory and write
  their results into the cache. Stage-1 groups read the cache and write
  main memory.
* **Pair 1 (stages 2 and 3).** The same, with stage 2 filling the cache
  and stage 3 emptying it.

This only works if the first-stage groups that feed a set of
second-stage groups run together. The controller orders the groups so
that they do:

* **Pair 0.** For each offset o in 0..31, it runs the eight stage-0
  groups `o + 32·i`. These produce exactly the 64 words that the eight
  stage-1 groups with offset o need, and those run next.
* **Pair 1.** For each 32-word block, it runs the block's four stage-2
  groups, then its four stage-3 groups.

So the cache holds 64 words. It is addressed with the ordinary
main-memory address and keeps only the bits that change inside the
current window: bits [10:8] and [7:5] in pair 0, bits [4:0] in pair 1.
The controller therefore uses one address computation for both
memories.

### Controller (`fft_ctrl`)

For each group, the controller:

1. reads the 8 words (9 cycles, including the read latency);
2. hands them to the engine (1 cycle);
3. waits out the engine's 2-cycle latency;
4. writes the 8 results back (8 cycles).

That is 20 cycles per group. A transform on its own takes 24578 cycles
from `start` to `done`: 2048 cycles to load, 4·256·20 to compute, and
2048 to unload.

The twiddle step of a group with offset b in stage s is `b·8^s`.
`tb_fft_ctrl` checks the cycle count.

### Continuous flow

If `start` is pulsed again while a transform is running, the next frame
is queued. When the current frame finishes, the controller makes one
pass over the memory that unloads the old frame and loads the new one.
On each cycle with an input sample, it reads bin k from `bitrev(k)` and
writes sample k of the new frame to that same address. The memory
returns the old word on a read-before-write.

That leaves the new frame stored bit-reversed: sample n is at
`bitrev(n)`. Because radix-2³ and radix-2² stages leave their result in
the same bit-reversed order as plain radix 2, this needs no other
change. A one-bit *map* flag, toggled on every such pass, sends every
main-memory address through `bitrev`. The next unload then reads in
natural order, and the flag flips back.

In this mode a frame goes in and a frame comes out every 2048 + 20480 =
22528 cycles, with one 2048-word memory.

### Processing engine (`pe`) and block floating point

Each memory word carries its own exponent; its value is
`mantissa·2^exp`. The engine works in these steps:

1. **Alignment** (`block_scaling_unit`). The 8 inputs are shifted right
   to the largest exponent among them. In the first stage all exponents
   are 0, so nothing moves.
2. **Butterfly** (`bu_r8`). This is an 8-point DFT done as three radix-2
   steps.
   * The internal factor −j is a swap and a negation.
   * The factors W8^1 and W8^3 use √2/2 ≈ 181/256, built from shifts and
     adds.
   * Outputs are 16 bits wide, so nothing can overflow.
   * In radix-2² mode, it is two independent 4-point DFTs.
3. **ODSU1** (overflow detection and scaling unit, `odsu`). It finds the
   smallest common right shift (0 to 4) that brings all 16 parts back into
   12 bits, and applies it.
4. **Pipeline register.**
5. **Twiddle multiplication.** Output p of a radix-2³ butterfly holds
   sub-bin rev3(p), so it is multiplied by `W^(rev3(p)·step)`. The
   twiddles come from `twiddle_rom`, a table of cos/sin values computed
   at elaboration. Output 0, and any output whose twiddle index is 0,
   bypasses the multiplier.
6. **ODSU2.** It scales the 14-bit products back to 12 bits (shift 0 to
   2).
7. **Pipeline register.** The result exponent is the aligned exponent
   plus both shifts; it saturates at 31.

In the radix-2² stage, the multipliers and ODSU2 are skipped. The engine
has a latency of 2 cycles and accepts one group per cycle, although the
controller does not use that rate.

### Inverse transform and top-level interface

The IFFT conjugates the samples on the way in and the bins on the way
out. The negation saturates −2048 to 2047. There is no 1/N scaling; the
exponent absorbs the growth.

`fft2048_top` has the following interface:

* **Control.** Each `start` pulse carries an `inverse` flag for its
  frame. A pulse while busy queues the next frame for continuous flow.
  `busy` stays high until the last queued frame has left and `done` has
  pulsed.
* **Input.** Samples enter with `in_valid`/`in_ready`.
* **Output.** Bins leave one per cycle with `out_valid`, as
  `out_re`, `out_im` and `out_exp`.
* **Stand-alone multiplier.** The 8-bit Baugh-Wooley Type III multiplier
  is brought out on `bw_a`, `bw_b`, `bw_p`, beside the FFT.

Reset is synchronous and active low.

Measured accuracy of a full 2048-point run against a double-precision
DFT, by `tb_fft2048_top`:

| Input | SQNR (dB) |
|---|---|
| DC | 60 |
| tones | 46.8 |
| random | 49.3 |
| inverse transform | 49.5 |
| streamed forward / inverse | 49.1 / 49.0 |

These are around the 48 dB the original work reports for this
multiplier.

## Departures and limits

* **One controller, no overlap of groups.** The original processor
  splits control over four units; here one state machine does it all.
  Groups run one after another (20 cycles each), and I/O overlaps only
  the unload of the previous frame, not the butterfly stages.
* **Cache size and group order are this design's own.** The source
  describes the data flow of the ping-pong cache but not its size or
  addressing. The 64-word cache, the stage pairing 0/1 and 2/3, and the
  group order above follow from that data flow for a 2048 = 8·8·8·4
  transform.
* **Timing and formats are this design's own.** These are choices made
  here:
  * the engine latency;
  * the exponent width;
  * the 16-bit butterfly output;
  * the truncating shifts in the ODSUs;
  * the twiddle quantisation (round, clamp +1.0 to 255/256).
* **Baugh-Wooley Type II and III** follow the published formulas as read
  here. They do not reproduce the published error figures (see the table
  above). The Booth multiplier, which the FFT uses, does.
* **Booth Types I and II** use the formulas for dropping n columns.
  With any other `TRUNC`, only Type III adapts, because it is computed
  from the bits actually dropped.
* **Booth Type I** sums the non-zero digits of all rows but the last, and
  rounds halves up. This reading reproduces the published figures.
* **Not built.** The generalised truncation (keeping more than n bits)
  is not implemented. The 64-point study is a testbench
  (`tb_fft64_trunc_sweep`) built around the real butterfly, twiddle ROM
  and multipliers. It is not a 64-point processor.

## Files

| File | Contents |
|---|---|
| `rtl/trunc_pkg.sv` | method enum, FFT constants, sample and memory word types, `rev3` |
| `rtl/booth_trunc_mult.sv` | radix-4 Booth fixed-width multiplier (AW, BW, TRUNC, METHOD) |
| `rtl/bw_trunc_mult.sv` | Baugh-Wooley fixed-width multiplier (N, METHOD) |
| `rtl/cmult_trunc.sv` | 12×9 truncated complex multiplier |
| `rtl/twiddle_rom.sv` | twiddle table, NP read ports |
| `rtl/bu_r8.sv` | radix-2³ / radix-2² butterfly |
| `rtl/odsu.sv` | overflow detection and scaling |
| `rtl/block_scaling_unit.sv` | exponent alignment and update |
| `rtl/pe.sv` | processing engine |
| `rtl/fft_main_mem.sv` | 2048-word data memory |
| `rtl/pingpong_cache.sv` | 64-word ping-pong cache |
| `rtl/fft_ctrl.sv` | load / stage / unload / continuous-flow controller |
| `rtl/fft2048_top.sv` | top level |

Each `tb/tb_<module>.sv` is a self-checking testbench for one module.
`tb/tb_mult_error_table.sv` produces the error table above.
`tb/tb_fft64_trunc_sweep.sv` produces the 64-point SQNR table.

## Simulating

Every testbench is self-contained and ends with a line
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5, run from the
repository root:

    verilator --binary --timing -Wno-fatal -y rtl \
      rtl/trunc_pkg.sv tb/tb_fft2048_top.sv \
      --top-module tb_fft2048_top -Mdir obj_top
    ./obj_top/Vtb_fft2048_top

`-y rtl` lets Verilator find each module in its own file. The package
must be named explicitly. For a block test, replace the testbench file
and the top module name, for example `tb/tb_pe.sv` and `tb_pe`.

The full-size FFT test (about 15 s) runs six transforms of all 2048
points. Four are separate: DC, tones, random, and inverse. Two are
streamed back to back in continuous flow. It reports:

* the SQNR of each transform;
* how often each mechanism fired: ODSU1 and ODSU2 scaling, exponent
  alignment, radix-2² groups, twiddle bypass, and the inverse mode;
* the main-memory and cache access counts;
* the spacing of the streamed frames.

`tb_mult_error_table` sweeps about 17 million operand pairs per
multiplier and takes about 20 s.

To try another estimator in the FFT, change the `METHOD` parameter of the
`booth_trunc_mult` instances in `rtl/cmult_trunc.sv`, or the default in
`rtl/booth_trunc_mult.sv`.
