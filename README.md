# Dual-PE regularized FHT engine for long real-data DFTs

This RTL computes the discrete Fourier transform of long real-valued data
sets, around a million samples each, in continuous real time. Samples come in
at one per clock, and a transformed set leaves every N clocks.

The DFT is not computed with a complex FFT. The engine computes the
**discrete Hartley transform** (DHT) with a memory-based, radix-4
**regularized fast Hartley transform** (RFHT):

    H[k] = sum_n x[n] * cas(2*pi*n*k/N),   cas(a) = cos(a) + sin(a)

The input is real, so the DHT is real, and it carries the same information
as the DFT:

    Re X[k] = (H[N-k] + H[k]) / 2,     Im X[k] = (H[N-k] - H[k]) / 2

One RFHT module, called a *processing element* (PE), needs
(N/8)·log4(N) clocks per transform. That is less than the N-clock arrival
time of a set only up to N = 4^7. The engine therefore uses **two PEs** and
deals them alternate data sets. Each PE then has 2N clocks per set, which
covers every length from 4^8 to 4^15. The default build is N = 4^10 = 1,048,576.
Its latency is about 5N/4 clocks: more than one set period, less than two.

## Top level: `rfht_dual_pe`

```
 in_data ──► set counter ──► PE0 (even-numbered sets) ──┐
 (1/clk)       (N samples)  PE1 (odd-numbered sets)  ──┴► merge ──► h2f_convert ──► out_re/out_im
                                                                            └──► psd_calc ──► out_psd
```

* Input: `in_valid`/`in_data`, 18-bit signed samples. There is no
  back-pressure. N consecutive valid samples form one data set. Sets are
  numbered from reset, and set i goes to PE (i mod 2).
* Output: one word per clock. A PE's output set starts N clocks after the
  other PE's and lasts N clocks, so the two streams never overlap and a
  simple multiplexer merges them. If they ever did overlap, or a set arrived
  at a PE with no free buffer, the sticky `overrun` flag would be set.
* Output form: `fourier_mode` is sampled when a PE starts to unload a set.
  * With `fourier_mode = 0`, the set leaves as Hartley values H[0..N-1] in
    natural order.
  * With `fourier_mode = 1`, it leaves as N/2+1 Fourier bins,
    k = 0..N/2.
  * `out_fourier` marks which form a word is in.
  * With the Fourier bins, `out_psd` gives each bin's power
    |X[k]|² = `out_psd · 4^out_exp`. This is computed exactly as
    re² + im², which equals 2(H[k]² + H[N−k]²).
* Scale: every output is a block floating-point number,
  `value = out_re * 2^out_exp` (likewise `out_im`). `out_exp` is signed. In
  Fourier form the 1/2 of the conversion formulas is folded into the
  exponent, so `out_re = H[N-k] + H[k]` exactly.
* Observation ports: `pe_busy`, `pe_stage_done` and `pe_stage_shift` show
  each PE's progress and scaling decisions.

Parameters:

* `N`, the transform length. It must be a power of 4 and at least 16, and
  is fixed at build time.
* `LUT_LEVELS`, 2 (default) or 3: the coefficient-table scheme (see below). Data width (18) and coefficient width (27)
are set in `rfht_pkg`.

## Inside a PE: `rfht_pe`

A PE is a memory-based engine. It has three activities, and they run at the
same time on different halves of its double-buffered data memory
(`rfht_dm`, 2N words):

1. **Load.** Samples are written one per clock. Sample n goes to word
   `dibit_reverse(n)`: the base-4 digits of n in reverse order. This is the
   input permutation that a radix-4 decimation-in-time transform needs. A
   `bfp_scaler` measures the peak of the incoming set.
2. **Process.** There are log4(N) stages of N/8 double butterflies each, one
   double butterfly per clock, all in place. Between stages the pipeline
   drains: the last write of a stage lands 8 clocks after its last issue,
   and 8 clocks are allowed. The per-stage scale factor is then fixed.
3. **Unload.** The result is read out one word per clock, in natural order
   or in the pair order H[0], H[1], H[N-1], H[2], H[N-2], …, H[N/2] that the
   Fourier converter needs.

The halves are used in strict rotation. Each half cycles through
EMPTY → FULL → DONE → EMPTY.

**Timing (verified by simulation).** From the last sample of a set to its
first output word takes `log4(N)·(N/8 + 8) + 4` clocks:

| N | latency (clocks) | share of the 2N-clock period each PE has |
|---|---|---|
| 4^10 = 1,048,576 | 1,310,804 | ≈ 5N/4 |
| 4^11 = 4,194,304 | 5,767,260 | ≈ 11N/8 |

### In-place addressing (`rfht_addr_gen`)

Before stage s (s = 0 … log4N−1), word `p = g·4M + r·M + m` holds element m
of the r-th length-M sub-transform of group g, where M = 4^s. The stage
merges each group of four sub-transforms into one transform of length 4M.
Output bins k and M−k of a group need the same inputs, H_r[k] and H_r[M−k].
So one double butterfly takes the eight words

    slots 0..3 : g·4M + r·M + k          (r = 0..3)
    slots 4..7 : g·4M + r·M + (M − k)

and writes its eight results back to the same words. For k = 1 … M/2−1 this
is a *generic* butterfly. Bins k = 0 and k = M/2 are their own partners, and
are handled together by one *special* butterfly. Stage 0 (M = 1) is made of
*first-stage* butterflies: two independent length-4 transforms each. Every
stage therefore has N/8 butterflies.

### Eight banks, two butterflies every two clocks (`rfht_dm`, `dm_pair_router`)

Each buffer half is eight dual-port banks of N/8 words (`dm_bank`). A bank
does one read and one write per clock. A double butterfly needs eight reads
and eight writes per clock, so its eight words would have to sit in eight
different banks. No simple bank function achieves that for every stage.
What does work is a pairing of butterflies. Word p lives in

    bank(p) = (sum of the base-4 digits of p) mod 4  +  4·(p mod 2)
    word    = p >> 3

Why this works:

* Digit sum mod 4 separates the four words of one radix-4 column. Those
  words differ only in digit s, which the stage walks through 0..3.
* Within an aligned group of eight addresses, the function covers all
  eight banks once. So `p >> 3` is a valid in-bank address.
* Loading (dibit-reversed) and unloading (natural order) touch one word per
  clock, so any bank function serves them.
* Butterflies 2i and 2i+1 of any stage have sixteen addresses that hit
  every bank **exactly twice**. A single butterfly hits some banks twice
  and some not at all. This was checked exhaustively for N = 4^2 … 4^11.

`dm_pair_router` uses this. Butterflies are issued one per clock, and the
even/odd pair is planned together:

1. For each bank, the word in the lower slot (0..15) is accessed in the
   first clock and the other in the second.
2. It reads the two bank-order groups on consecutive clocks and holds the
   first.
3. It hands the even butterfly its eight inputs in slot order 4 clocks after
   its issue. The odd butterfly gets its inputs one clock later, also 4
   clocks after its own issue.
4. Results come back in slot order. The even results are held one clock.
   When the odd results arrive, the sixteen words are written back over two
   clocks with the same plan.

Every bank sees at most one read and one write per clock, and the pipeline
still completes one double butterfly per clock. Pairs never share
addresses, so the overlap of one pair's writes with the next pair's reads is
safe. For a pair issued at clock t:

| clock | t+2, t+3 | t+3, t+4 | t+4, t+5 | t+7, t+8 | t+8, t+9 |
|---|---|---|---|---|---|
| event | bank reads | read data | butterfly inputs | butterfly results | bank writes |

The twiddle generators deliver 3 clocks (two-level) or 4 clocks
(three-level) after issue. A short delay lines them up with the butterfly
inputs.

### The double butterfly (`double_butterfly`)

This unit is the core of the design. For angle φ_r = 2π·r·k/(4M) the
recursion of the radix-4 Hartley transform gives:

    c_r = cos φ_r · a_r + sin φ_r · b_r
    e_r = cos φ_r · b_r − sin φ_r · a_r          (a_r = H_r[k], b_r = H_r[M−k])

    H[k+qM]   : A0 = c0+c1+c2+c3   A1 = c0+e1−c2−e3   A2 = c0−c1+c2−c3   A3 = c0−e1−c2+e3
    H[M−k+qM] : B0 = b0+c1−e2−c3   B1 = b0−e1+e2−e3   B2 = b0−c1−e2+c3   B3 = b0+e1+e2+e3

Here c0 = a0 and e0 = b0, since φ_0 = 0. Each of the three non-trivial
rotations uses three multipliers, `t = cos·(a+b)`,
`c = t − (cos−sin)·b` and `e = t − (cos+sin)·a`. That is why a twiddle
factor is delivered as the triple (cos, cos−sin, cos+sin). The count is 9
multipliers and 3 + 6 + 16 = 25 adders. The 16 output additions are shared
as (c0±c2), (c1+c3), (e1−e3), (b0±e2), (c1−c3) and (e1+e3).

*Regularisation.* The special and first-stage butterflies reuse the same
datapath:

* The A outputs are taken from slots 0..3 through five multiplexers, using
  additions only.
* The three rotators are fed with a = b = slots 4..7.
* With a = b, a rotation by φ gives `c = (cos+sin)·h` and `e = (cos−sin)·h`.
* With the angles r·π/4 the B outputs become the k = M/2 bins: H[M/2+qM].
* With the angles (π/2, π/2, 3π/2) they become a plain length-4 Hartley
  butterfly.

The address generator supplies these angles, so nothing else in the engine
knows about butterfly types.

The unit has three pipeline stages. Products are rounded to nearest.
Outputs saturate at 18 bits, but block floating-point scaling means they
never need to.

### Twiddle factors from two-level tables (`twiddle_gen`)

Each PE has three generators, one per rotation r. An angle index j
(φ = 2πj/N) is split into three fields:

* quadrant (2 bits)
* coarse index i_c (log2 L bits)
* fine index i_f (log2 L bits)

where L = √(N/4), which is 512 at the default size. Three tables of L words
are computed at elaboration time:

    coarse sine  SC[i] = sin(π/2 · i/L)      (cosine read as SC[L−i], SC[L] taken as 1)
    fine sine    SF[i] = sin(π/2 · i/L²)
    fine cosine  CF[i] = cos(π/2 · i/L²)

Four multipliers combine them through cos(θ+ψ) and sin(θ+ψ). The quadrant
is then folded in by swapping and negating. The tables hold 9·√N/2 words
per PE, against N/4 words per table for a plain quarter-wave table. The
generator has a three-clock latency. Coefficients are 27-bit with 25
fractional bits, accurate to about 2^-24.

**Three-level tables (`twiddle_gen3`, `LUT_LEVELS = 3`).** For ultra-long
transforms the in-quadrant angle splits into coarse, middle and fine
fields. Five tables of about ∛(N/4) words are held:

* a coarse sine table, which also gives the coarse cosine
* middle sine and middle cosine
* fine sine and fine cosine

The angle-sum identities are applied twice, coarse + middle and then
+ fine, using eight multipliers. At N = 4^10 each table is 64 words, against
512 for the two-level tables, at the cost of four more multipliers per
generator. Latency is four clocks. The two-level scheme stays the default.
The three-level one is chosen with the `LUT_LEVELS` parameter of
`rfht_dual_pe` and `rfht_pe`.

### Block floating-point scaling (`bfp_scaler`)

A double butterfly can grow a word by up to 3 bits, because
|A| ≤ (1 + 3√2)·max|input|. Scaling is conditional:

1. After each stage, the OR of the magnitudes of all words written gives the
   bit length of the peak.
2. The next stage right-shifts its inputs by 0 to 3 bits, just enough to
   bring them into [−2^14, 2^14).
3. The loaded set is measured in the same way, which sets the stage-0
   shift.
4. The shifts are summed into the set's exponent.

No shift is applied after the last stage, so its growth is kept in the
result. Data that needs no scaling is not scaled.

### Hartley to Fourier (`h2f_convert`)

`h2f_convert` keeps H[k] of a pair and emits `H[N−k] ± H[k]` when H[N−k]
arrives, one clock later. The self-paired bins 0 and N/2 pass with Im = 0.

## Resources at the default size (N = 4^10)

| | per PE | engine |
|---|---|---|
| data memory | 2N = 2,097,152 words × 18 bit | 4,194,304 words |
| coefficient tables | 3 × 3 × 512 = 4,608 words × 27 bit | 9,216 words |
| multipliers | 9 (butterfly) + 12 (tables) | 42 |
| with `LUT_LEVELS = 3` | 3 × 5 × 64 = 960 table words, 9 + 24 multipliers | 1,920 words, 66 multipliers |

The word counts match the published figures for this configuration. At 18
bits a data word is 2.25 bytes, so the data memory of the engine is about
9 MB.

## How far it can be trusted

**Verified** with Verilator, using two-state simulation and random initial
values:

* Every unit has its own self-checking testbench, with references computed
  independently in double precision.
* For each unit, a deliberately broken copy was shown to fail its
  testbench.
* The whole engine was checked against a direct DHT or DFT with dense random
  data, at N = 1,024 and, with three-level tables, at N = 4,096.
* The pair router was run through every stage of an N = 256 transform
  against a behavioural bank model. Every butterfly input was checked, and
  the whole memory after each stage.
* The whole engine was checked against closed-form transforms of sparse
  sets, every bin of every set, at N = 4^10 (default build) and N = 4^11.
* Worst errors seen: 15–45 output LSBs at the block exponent's scale. This
  is mostly the bias of truncating shifts accumulating over stages.

**Departures from the original architecture:**

* **Data-memory bank function.** The original's DM is also eight dual-port
  banks read over two clocks for two butterflies. The bank function it
  refers to is not reproduced; the digit-sum function above is this
  design's own. In-bank addressing and the plan rule are also this
  design's.
* **Single-PE rate.** A half is reloaded only after it has been unloaded. A
  lone PE therefore sustains one set per N + latency clocks, not one per N
  clocks. Inside the dual-PE engine this does not matter: each PE needs one
  set per 2N clocks and gets it.
* **Coefficient schemes.** The two- and three-level table schemes are
  built. The single-level quarter-wave table, which the original uses only
  for comparison at short lengths, is not.
* **Not built:**
  * any post-processing in the idle time between sets
  * the mapping onto a particular FPGA, such as block RAM and UltraRAM
    allocation.
* **This design's own choices:**
  * the butterfly ordering
  * pipeline depths
  * the 8-clock inter-stage gap
  * rounding
  * the peak measure
  * the stream interface
  * the Fourier pair ordering
  * the `overrun` flag

## Sizes the engine can be built for

N is a parameter. It must be a power of 4, at least 16. For real-time
operation it must also be at least 4^8 for the dual-PE arrangement to be
needed, and at most 4^15. At N = 4^11 (four million points) the engine
needs 16.8 M data words. That build was simulated and passes. At 4^15 the
data memory alone would be 4^16 words, far beyond any on-chip RAM.

## Simulating

All files are plain SystemVerilog. Read the package first. For example, the
end-to-end test at N = 1,024:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rfht_pkg.sv tb/tb_rfht_dual_pe.sv --top-module tb_rfht_dual_pe
./obj_dir/Vtb_rfht_dual_pe
```

Every testbench ends with one line, `TB_RESULT checks=<n> failures=<m>`.

| testbench | what it runs | time |
|---|---|---|
| `tb_double_butterfly` | 600 sets, all three butterfly types, against the Hartley definition | < 1 s |
| `tb_twiddle_gen` | 3,000 angles at N = 4^10, incl. quadrant boundaries | < 1 s |
| `tb_rfht_addr_gen` | all butterflies of all stages at N = 1,024; coverage of every word | < 1 s |
| `tb_rfht_dm` | bank mapping, both halves, all ports, load during unload | < 1 s |
| `tb_dm_pair_router` | all stages of N = 256 through a bank model: every input, memory after each stage | < 1 s |
| `tb_twiddle_gen3` | 3,000 angles at N = 4^10 through the three-level tables | < 1 s |
| `tb_bfp_scaler` | random blocks, shifts 0–3 | < 1 s |
| `tb_h2f_convert` | pass-through and pair conversion | < 1 s |
| `tb_psd_calc` | 2,000 random and extreme bins against 64-bit integer squares | < 1 s |
| `tb_rfht_pe` | one PE, N = 256, four sets, both unload orders, exact latency | < 1 s |
| `tb_rfht_dual_pe` | engine, N = 1,024, dense and sparse sets, mode switch, mechanism counts | < 1 s |
| `tb_rfht_dual_pe_3lvl` | as above with three-level tables, N = 4,096 | ≈ 5 s |
| `tb_rfht_dual_pe_full` | engine at default parameters (N = 4^10), three sets back to back | ≈ 15 s |
| `tb_rfht_dual_pe_4m` | engine at N = 4^11, three sets back to back | ≈ 1 min |

`tb_dual_body.svh` holds the shared body of the four engine tests. Besides
checking every output bin, it counts how often each mechanism occurs:

* both PEs used
* stages with and without scaling
* both output forms, and a switch between them
* non-zero PSD bins (every Fourier bin's PSD is checked exactly and against
  the reference)
* latency above one set period at long lengths

A mechanism that never happened counts as a failure.

## Files

| file | contents |
|---|---|
| `rtl/rfht_pkg.sv` | widths, number formats, butterfly-type enum, twiddle struct, dibit reversal |
| `rtl/rfht_dual_pe.sv` | top: set dealing, two PEs, output merge, Fourier conversion |
| `rtl/rfht_pe.sv` | one PE: load/process/unload control and pipeline |
| `rtl/double_butterfly.sv` | nine-multiplier double butterfly |
| `rtl/twiddle_gen.sv` | two-level-table twiddle generator |
| `rtl/twiddle_gen3.sv` | three-level-table twiddle generator |
| `rtl/rfht_addr_gen.sv` | in-place addresses, butterfly type and angles |
| `rtl/rfht_dm.sv`, `rtl/dm_bank.sv` | double-buffered data memory, eight dual-port banks per half |
| `rtl/dm_pair_router.sv` | two-clock bank access plan for pairs of butterflies |
| `rtl/bfp_scaler.sv` | block floating-point peak detector |
| `rtl/h2f_convert.sv` | Hartley-to-Fourier conversion |
| `rtl/psd_calc.sv` | power spectral density of the Fourier bins |
