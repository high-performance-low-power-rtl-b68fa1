# Low-power radix-4 FFT cores (16, 32 and 64 points)

This is a family of streaming FFT cores for complex 16-bit fixed-point data.
They are built for low dynamic power at a given sample rate. All cores are
radix-4 single-path delay commutator (R4SDC) pipelines or parallel versions of
them, and they share four power-saving parts:

* a **radix-4 butterfly made of two multi-operand sums** instead of six
  adder/subtractors, with exact negation;
* a **multiplierless twiddle unit** for stages whose coefficients come from the
  16-point set. It uses shifts and adds with shared subexpressions, and its
  control signals are decoded from the stage counter rather than read from a
  coefficient ROM;
* the **IDR commutator**. It reorders data through six dual-port RAMs that are
  written only 5/3 times per frame each;
* **parallel-pipelined** versions. They process 2 or 4 interleaved streams, so
  the clock can be 2 or 4 times slower at the same sample rate.

The top module `fft_cores` holds five independent cores side by side. Apart from
clock and reset, each has its own ports:

| prefix | core | samples / clock | latency (steps) | output index |
|---|---|---|---|---|
| `f16_` | `fft16_r4sdc`, 16-point pipeline | 1 | 18 | `f16_index`, 4 bits |
| `f32_` | `fft32_r4sdc`, 32-point pipeline (radices 4, 4, 2) | 1 | 36 | `f32_index`, 5 bits |
| `f64_` | `fft64_r4sdc`, 64-point pipeline | 1 | 68 | `f64_index`, 6 bits |
| `p16_` | `fft16_par2`, 16-point, 2 streams | 2 | 11 | `p16_base`: `y[0]`=X(base), `y[1]`=X(base+4) |
| `p64_` | `fft64_par4`, 64-point, 4 streams | 4 | 20 | `p64_base`: `y[j]`=X(base+16j) |

Latency is counted from the step that takes a frame's first input to the step
that delivers its first result, X(0).

## Number format, scaling and handshake

* **Samples.** A sample is `cplx_t` from `fft_pkg`: 16-bit two's-complement
  real and imaginary parts, 32 bits in all. Twiddles are Q1.15, and +1 is
  stored as `7fff`.
* **Scaling.** Every radix-4 butterfly divides its result by 4, and the
  radix-2 butterfly divides by 2. Each core therefore returns **DFT(x)/N**.
  A stage can overflow only in one corner case: terms of −32768 that are
  negated and then all add up to +1.0. Rounding is by truncation
  (arithmetic shift right) in the butterflies, and products are truncated
  to 15 fractional bits.
* **Handshake.** `in_valid` is a step enable for the whole core. With it high,
  the core takes the input and moves every pipeline register one step; with it
  low, the core holds still. `out_valid` is high for one clock after each step
  that produced a result, and the index or base output names the bin(s).
  Frames follow each other without gaps: the core never stalls and has no
  back-pressure.
* **Reset.** `rst_n` is a synchronous, active-low reset. It clears counters,
  valid flags and pipeline registers. RAM contents are not cleared; they are
  never read before being written.

## How an R4SDC stage works

An N_t-point radix-4 stage splits its input block into four quarters A0..A3 of
Q = N_t/4 words. For each position q, the butterfly needs A0[q], A1[q], A2[q]
and A3[q] together, once for each of its four outputs m = 0..3. For output m it
forms

    y = (A0 + (-j)^m A1 + (-j)^2m A2 + (-j)^3m A3) / 4

The result is then multiplied by the twiddle W_N^(q·m).

The commutator delivers the four words. Output period m = 0 runs while quarter
A3 of the current frame is arriving. Periods 1, 2 and 3 run while quarters A0,
A1 and A2 of the next frame arrive. So one sample goes in and one result comes
out on every step. Each stage is

    commutator -> butterfly -> register -> twiddle multiplier -> register

and the last stage has no multiplier. Results leave in base-4 digit-reversed
order, e.g. X(0), X(4), X(8), X(12), X(1), ... for 16 points.

### The IDR commutator (`idr_commutator`)

This is the least obvious part of the design. Six RAMs of Q words, DM0..DM5,
form two chains fed from the input: DM0 → DM2 → DM4 and DM1 → DM3 → DM5. All
RAMs use the same address q in a given cycle. When a RAM is written, the word
it held at q is read out in the same cycle and passed to the next RAM in its
chain. A word that is no longer needed is simply overwritten.

The write enables depend only on the output period m:

| m | RAMs written |
|---|---|
| 0 | DM1, DM3 |
| 1 | DM0, DM2, DM4 |
| 2 | DM1, DM3, DM5 |
| 3 | DM0, DM2 |

That makes ten RAM-quarter writes per frame, or 5/3 per RAM.

A RAM is read only when its word is needed: it feeds an output
multiplexer, or it moves to the next RAM because that RAM is being written.
Otherwise its read enable is low and its output keeps the last word it
showed, so the unused outputs do not toggle:

| m | RAMs read |
|---|---|
| 0 | DM0, DM1, DM2 |
| 1 | DM0, DM1, DM2, DM3 |
| 2 | DM1, DM2, DM3, DM4 |
| 3 | DM0, DM2, DM3, DM4, DM5 |

That is 16 reads per position instead of 24.

Quarter p of a frame is written while period p+1 (mod 4) is running. The
outputs come from four multiplexers. Below, In is the stage input and A..F are
the read data of DM0..DM5:

| m | O1 | O2 | O3 | O4 | quarters held by O1..O4 |
|---|---|---|---|---|---|
| 0 | C | In | A | B | A0, A3, A2, A1 |
| 1 | D | C | A | B | A1, A0, A2, A3 |
| 2 | C | D | E | B | A2, A1, A0, A3 |
| 3 | D | C | F | E | A3, A2, A1, A0 |

The operand order changes from period to period, so the commutator also outputs
`idx[4]`, the quarter each output holds. The stage computes each operand's
rotation from it: (-j)^(idx·m). This needs no reordering, because the
butterfly accepts its operands in any order (next section).

`tb_idr_commutator` checks every output word against the expected quarter. It
also counts the RAM writes and reads in each frame and checks that there are
exactly 10·Q and 16·Q. Finally, it checks that a RAM whose read is disabled
keeps its output.

Later stages with one word per quarter use `sr_commutator`, a tapped delay line
of 6Q registers with the same interface and timing. In the 64-point pipeline,
the second stage (Q = 4) uses another IDR commutator.

### Summation butterfly (`r4_sum_butterfly`)

A rotation by a power of -j only swaps the real and imaginary parts and
changes their signs. For each operand, the butterfly picks the part it needs
with a multiplexer. Where the term is negated, it takes the one's complement.
The real and imaginary results are each one multi-operand sum over four terms.

One's complement is one less than the true negative. So a decoder counts the
inverted terms of each sum (COM for the real sum, COMI for the imaginary) and
adds that count as a fifth operand. Negation is therefore exact, and the
butterfly agrees bit for bit with a plain complex adder tree followed by `>>> 2`.

Each operand has its own swap and invert controls, derived from its 2-bit
rotation code. The same block therefore serves every commutator, whatever
order it delivers in.

### Multiplierless twiddle unit (`mless_cmul`, `csd_shift_add`, `mless_ctrl`)

Quantized to Q15, the sixteen 16-point twiddles W16^e use only:

* the trivial values 1 and -j;
* the constants `5a82`, `7641` and `30fb`;
* the complements of those constants: `a57d`, `89be` and `cf04`.

Products are built from two shared subexpressions, 5X = X + 4X and
65X = X + 64X:

    5a82·X = (5X << 12) + (5X << 9) + (65X << 1)
    7641·X = (X << 15) + 65X − (5X << 9)
    30fb·X = (65X << 8) − (X << 12) − 5X

A complemented constant c̄ = −(c+1) is handled as −(c·X + X). Adding X once
turns `5a82` into `5a83`, `7641` into `7642` and `30fb` into `30fc`, and the
sum is then negated.

`csd_shift_add` takes one real input and returns its products with Wr and Wi.
Two of these (one for Xr, one for Xi), a subtractor and an adder make up the
complex product in `mless_cmul`. Trivial coefficients bypass the shift-add
path: 1 passes unchanged, and -j swaps the parts and negates.

`mless_ctrl` decodes the control word s1..s7 from (m, q) of the stage, through
e = q·m:

| e | coefficient | controls |
|---|---|---|
| 0 | 1 | none (pass) |
| 4 | -j | s7 |
| 1 | (7641, cf04) | s6, s4 |
| 2 | (5a82, a57d) | s6, s1 |
| 3 | (30fb, 89be) | s6, s3, s5 |
| 6 | (a57d, a57d) | s6, s1, s2 |
| 9 | (89be, 30fb) | s6, s3 |

The coefficient column is (Wr, Wi). The control signals:

* s1 selects the 5a82 channel;
* s2 makes Wr the complement;
* s3 and s4 choose the complemented 7641 or 30fb constant;
* s5 swaps which of the two constants goes to Wr;
* s6 means "nontrivial";
* s7 means "-j".

These bit meanings are this design's own encoding.

The exact coefficient 1 passes untouched. In the conventional multiplier
(`nbw_cmul`, used where coefficients are not 16-point twiddles) the same
coefficient is `7fff`, which shrinks the value by 2^-15. Both units truncate
their products to 15 fractional bits.

Twiddles for the conventional multiplier come from `twiddle_rom`. It is
computed at elaboration as floor(32768·cos) and floor(−32768·sin), with +1
saturated to `7fff`. This matches the rule behind the hand-listed 16-point
constants above.

## The individual cores

**`fft16_r4sdc`** uses two stages:

1. IDR commutator (Q = 4), summation butterfly, multiplierless unit.
2. Shift-register commutator (Q = 1), summation butterfly.

**`fft64_r4sdc`** uses three stages:

1. IDR commutator (Q = 16), summation butterfly, conventional multiplier
   with a 64-entry ROM.
2. IDR commutator (Q = 4), summation butterfly, multiplierless unit.
3. Shift-register commutator (Q = 1), summation butterfly.

**`fft32_r4sdc`** uses radix 4, 4, 2:

1. IDR commutator (Q = 8), summation butterfly, conventional multiplier with
   a 32-entry ROM.
2. Shift-register commutator (Q = 2), summation butterfly, multiplierless
   unit. The stage-2 twiddles W8^(q·m) equal W16^(2q·m), so the decoder is
   given 2q.
3. Radix-2 stage: two-word delay commutator (`r2_commutator`) and
   add/subtract butterfly (`r2_butterfly`).

The output index is m1 + 4·m2 + 16·m3.

**`fft16_par2`** takes x(2n) and x(2n+1) in the same clock.

* **Stage 1.** Each stream has a shift-register commutator of half size
  (Q = 2), a summation butterfly and a multiplierless unit. The even stream
  sees positions q = 0 and 2, and the odd stream sees 1 and 3.
* **Shuffle.** The shuffle unit collects each stage-1 block of four words.
  It uses two 4-word memories, TM1 for the even stream and TM2 for the odd
  one. Each memory has one write and two read ports and is split into two
  2-word banks that alternate between writing and reading.
* **Stage 2.** Two fixed-index butterflies (`r4_simple_butterfly`) compute
  the outputs: the first gives m2 = 0 and then 2, the second gives m2 = 1
  and then 3.

**`fft64_par4`** takes x(4n+i), i = 0..3, in the same clock.

* **Stage 1.** Stream i has a quarter-size IDR commutator (Q = 4) and a
  summation butterfly. Its twiddle is W64^((4q'+i)·m1), where q' is the
  position within the stream. Stream 0 needs only 16-point twiddles, so it
  uses the multiplierless unit; streams 1–3 use conventional multipliers.
* **Stage 2.** Each stream has a shift-register commutator (Q = 1) and a
  summation butterfly. Its twiddle is W16^(i·m2), which is multiplierless.
  Stream 0's twiddle is always 1, so it has only a register.
* **Stage 3.** The four streams' results form the last radix-4 butterfly.
  It is spread over four fixed-index butterflies, one for each m3, and their
  outputs are X(base + 16·m3).

## Where this RTL departs from the published architecture

* **Scaling and rounding.** The divide-by-4 per stage, truncation, the
  16-bit word in every stage, the reset and the `in_valid` step enable are all
  choices of this design. The source gives the 32-bit complex input width and
  none of the rest.
* **IDR commutator.**
  * It uses one common read/write address instead of separate read address
    generators.
  * It replaces the butterfly control bits of the original with the `idx`
    tags.
  * The read enables that keep unused RAM outputs still are derived here
    from the write table and the multiplexers. The hold is modelled by a
    register behind each RAM's asynchronous read port; a RAM macro with a
    latched output would do the same job.
* **Butterfly routing.** The two summation blocks and the COM/COMI decoder
  follow the original. The exact routing of operands through its four
  multiplexers and six inverters does not; every operand has its own swap
  and invert controls instead.
* **Shift-add module.** The constant channels, the complement handling and
  the swap follow the original; s1..s5 are encoded as described above. The
  adder count is not tuned to the original's figure of 11.
* **Parallel cores.** The shuffle unit's addressing and the pairing of stage-2
  outputs in `fft16_par2` are this design's, as is the use of the
  multiplierless unit for stream 0 of `fft64_par4`, stage 1.
* **Conventional multiplier.** `nbw_cmul` is written with `*`. The Wallace-tree
  structure of the original is left to synthesis.
* **Not included.** The baseline parts used only for comparison: a plain
  dual-port-RAM commutator, a triple-port-RAM commutator and the six-adder
  radix-4 butterfly. The published power and area figures come from
  gate-level estimates in a 0.18 µm process and are not reproduced here.

## Files

* **`rtl/fft_pkg.sv`** holds the shared types: `cplx_t`, the rotation code
  and the s1..s7 control word.
* **Other `rtl/*.sv` files** hold one module each.
* **`idr_dpram` and `tp_sram`** are the memories of the IDR commutator and the
  shuffle unit, written as arrays.
* **`tb/tb_<module>.sv`** is the self-checking testbench of each module. Each
  ends by printing `TB_RESULT checks=<n> failures=<n>`.

The testbenches:

* compare against independently computed references. Every core is checked
  against a floating-point DFT. The 16-point cores and the 64-point
  parallel core are also checked against a bit-exact model of the arithmetic;
* check latencies and output order;
* have a watchdog.

`tb_fft_cores` runs all five cores at their default sizes. It feeds them an
impulse, a tone and then random frames, with random gaps in `in_valid`. Each
result must lie within 4–6 LSB of the exact DFT/N. The testbench also checks
latencies, output order and frame counts. It counts how often each mechanism
is used and fails if one never is. The mechanisms are:

* frozen steps;
* the pass, -j and shift-and-add paths of the multiplierless units;
* the conventional multipliers;
* each IDR write period;
* shuffle reads from both banks.

## Simulating

With Verilator 5, from the directory that contains `rtl/` and `tb/`:

    verilator --binary --timing -Irtl -y rtl +libext+.sv rtl/fft_pkg.sv \
        tb/tb_fft_cores.sv --top-module tb_fft_cores -o sim && ./obj_dir/sim

Replace `tb_fft_cores` with any other testbench to test a single block. Each
run takes well under a second.

To use a core on its own, instantiate it with `fft_pkg.sv` compiled first. The
cores have no parameters; their sizes are fixed by the configuration.
`idr_commutator` and `sr_commutator` take `Q` (words per quarter) and can be
reused for other stage sizes. `twiddle_rom` takes `N`.
