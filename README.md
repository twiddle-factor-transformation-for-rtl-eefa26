# Pipelined FFT with migrated twiddle factors

A pipelined FFT processor spends much of its area on twiddle-factor ROMs. In
a radix-2 pipeline, stage *i* of a 2^n-point transform needs a table of
about 2^(n-1-i) words. Radix-2^2 cuts the number of multipliers but keeps
large tables in the first stages.

The *twiddle factor transformation* of I.-C. Park, W. Son and J.-H. Kim
("Twiddle Factor Transformation for Pipelined FFT Processing") treats every
radix-2 based FFT as the radix-2 decimation-in-frequency (DIF) flow graph
with its twiddle factors moved around. Take two butterflies of the same
stage. A factor common to both of their inputs can be pushed through them to
their outputs, and sometimes further, without changing the result. Choosing
which factors to move, and how far, gives radix-2^2, radix-2 DIT, or new
schemes whose tables are much smaller.

This RTL is a single-path delay feedback (SDF) pipelined FFT whose twiddle
multipliers are generated from such a choice. The choice is written as a
*moving matrix*. The default build is a 2048-point FFT with the scheme that
has the smallest tables, the *evenly-distributed radix-2^2* algorithm:

| position (between stages) | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | total |
|---|---|---|---|---|---|---|---|---|---|---|---|
| evenly-distributed radix-2^2 | -j | 4 | -j | 64 | -j | 32 | -j | 32 | -j | 32 | **164 words**, 5 multipliers |
| plain radix-2^2, same size | -j | 512 | -j | 128 | -j | 32 | -j | 8 | -j | const | 680 words, 4 mult. + 1 const. |

The whole pipeline is built from that matrix, which is a parameter. With
another matrix the same RTL becomes the radix-2, radix-2^2, modified
radix-2^2 or DIT pipeline.

## The pipeline

```
 in ──► BF1 ──► TW1 ──► BF2 ──► TW2 ──► ... ──► TW10 ──► BF11 ──► out (bit-reversed)
        │▲              │▲                               │▲
       D=1024          D=512                             D=1
```

* **BFk** (`sdf_stage`) is a radix-2 DIF butterfly with a feedback delay of
  D = 2^(n-k) words (`sdf_delay`). The input samples are counted in blocks
  of 2D. The first half of a block is parked in the delay, while the
  differences of the previous block leave from it. In the second half, the
  parked sample a and the new sample b give a+b, which is output, and a-b,
  which goes back into the delay. A stage's output is its column of the flow
  graph in natural order. `out_idx` gives the position *p* of each output
  sample in that column.
* **TWk** (`twiddle_stage`) is twiddle position k. It multiplies each
  sample by W_N^T(p). The exponent T(p) comes from the moving matrix, as
  shown below.

A stage only moves when a valid sample arrives. A gap in `in_valid` is
therefore a stall that travels down the pipe as a bubble.

## Twiddle positions and the moving matrix

This is the part of the design that is not standard.

**Exponents of the radix-2 DIF graph.** Normalise every twiddle to base N,
so a twiddle is W_N^t with an n-bit exponent t. At position i the radix-2
DIF graph multiplies the sample at position p by

```
t_i(p) = p[n-i] * (p mod 2^(n-i)) * 2^(i-1)
```

Bit j of this exponent, for i-1 <= j <= n-2, is the product
`p[n-i] & p[j-i+1]`. Call the factor W_N^(2^j) that this bit switches on
b_ij, the *min-common factor*. The set of (i, j) pairs is the *symbolic
exponent matrix* E.

**Moving a factor.** Moving factor b_ij through the next butterfly stage
leaves the result unchanged as long as the factor is the same on both of
that butterfly's inputs. So it must not depend on the bit of p that the
butterfly combines. Stage i+r combines bit n-i-r, so b_ij can move r
positions for any r <= n-2-j. This limit is the *moving span*.

The moving matrix M gives, for each (i, j), how far b_ij moves:
m_ij = 0 leaves it in place. After migration, position k multiplies by

```
T_k(p) = sum over (i,j) with i + m_ij = k of (p[n-i] & p[j-i+1]) << j   (mod N)
```

`twiddle_exp_gen` computes exactly this sum from the stage's sample
counter, using AND gates and an adder.

**What each position costs.** The top two exponent bits select a multiple
of W_N^(N/4) = -j. That is a swap and a negation (`quarter_rotator`), and
it exploits the pi/2 symmetry. The remaining live bits, those the matrix
leaves at position k, decide the hardware:

| live bits below the quadrant | hardware at the position |
|---|---|
| none | rotation only ("trivial") |
| one, bit j | constant multiplier by W_N^(2^j), or pass (`const_cmult`) |
| L >= 2 | table of 2^L words (`twiddle_rom`) and general complex multiplier (`cmult`) |

The table address is formed by gathering the live bits of T in order.
Table word a therefore holds W_N^e, where e is a's bits placed back at the
live positions. The exponent sum could in principle carry into a bit that
is not live, and the table would then not cover it. An immediate assertion
in `twiddle_exp_gen` watches for this. It never fires for the supplied
matrices. The block testbench checks every position of the three
2048-point radix-2^2-family matrices exhaustively, and the assertion stays
silent in every pipeline simulation.

**The matrices supplied** (`tft_pkg`). `move_mat_t` is a packed array
`m[i-1][j]` of 4-bit entries. A row written in hex reads like the printed
matrix, with column j = n-1 leftmost. For example, the first row of the
evenly-distributed scheme is `64'h00113333579`.

| function | scheme | N | table words | general mult. | constant mult. |
|---|---|---|---|---|---|
| `move_even_r22_2048()` (default) | evenly-distributed radix-2^2 | 2048 | 164 | 5 | 0 |
| `move_mod_r22_2048()` | modified radix-2^2 (positions 1, 3, 5 keep their lowest factor) | 2048 | 344 | 4 | 4 |
| `move_mod_radix22(n, q)` | modified radix-2^2, first q odd positions keep their lowest factor | any | 1368 at 8192 (q = 4) | 5 | 5 |
| `move_r22_2048()`, `move_radix22(n)` | radix-2^2 | 2048 / any | 680 at 2048, 2728 at 8192 | 4 / 5 | 1 |
| `move_radix2()` | radix-2 DIF (nothing moves) | any | 1020 at 2048 | 8 | 1 |
| `move_dit_1024()`, `move_dit(n)` | radix-2 DIT (everything moves its full span) | 1024 / any | 508 at 1024 | 7 | 1 |

The figures are computed by the package functions `total_entries` and
`count_kind`, and checked in the testbenches. They agree with the paper's
comparison for all 2048-point rows, for radix-2^2 at 8192 points, and for
the modified scheme at 8192 points with q = 4.

The paper says the modification is applied to "the first several stages"
but prints its matrix only for 2048 points, so q is a parameter here. At
1024 points, q = 3 gives 172 words with 4 general and 3 constant
multipliers. The paper's comparison lists 178 words with the same
multiplier counts, and no q reproduces that figure. The evenly-distributed
scheme is also listed at 1024 and 8192 points, but its matrix is printed
only for 2048 points, so no other size is supplied.

`move_ok(n, M)` rejects a matrix that moves a factor that does not exist, or
moves one beyond its span. `tft_fft_top` stops elaboration on such a matrix.

## Interface and timing (`tft_fft_top`)

| port | width | |
|---|---|---|
| `clk`, `rst_n` | 1 | rising edge; asynchronous active-low reset |
| `in_valid`, `in_re`, `in_im` | 1, DW, DW | one signed complex sample per valid cycle, frames of N back to back, natural order |
| `out_valid`, `out_re`, `out_im` | 1, OW, OW | result samples, OW = DW+LOG2N+1 |
| `out_bin` | LOG2N | frequency bin of the current output; bins come in bit-reversed order |

Parameters are `LOG2N` (11), `DW` (16), `TW` (16) and `MOVE`
(`move_even_r22_2048()`). `OW` is derived.

* **Throughput.** One sample per clock, continuously.
* **Latency.** A frame needs N-1 samples of delay to pass through. Each
  stage boundary adds one register for the butterfly output. Each twiddle
  position adds one register (trivial) or two (constant or table). For the
  default build there are 2072 clock edges between the edge that takes
  sample 0 and the edge that loads the first result.
* **Flushing.** The pipeline only advances with its input, so the last
  frame must be pushed out with another N samples, for instance zeros.
  Samples already in the output registers drain without more input.
* **Output order.** The output is in bit-reversed order, with `out_bin`
  giving the bin. No reorder buffer is included.

## Arithmetic

* **Datapath.** DW + LOG2N + 1 bits wide throughout (28 for the default).
  The inputs are sign-extended, and no butterfly can overflow, even with
  full-scale complex input. The output is the unscaled DFT sum.
* **Twiddles.** TW-bit signed words with 2^(TW-2) = 1.0. This wastes one
  bit but lets +1 be stored exactly. The tables are computed at elaboration
  from `$cos` and `$sin`.
* **Multipliers.** Four real products each, rounded to nearest (halves up)
  back to the datapath width. The constant multiplier multiplies by an
  elaboration-time constant and leaves the reduction to shifts and adds to
  synthesis.
* **Accuracy.** Measured against a double-precision DFT on full-scale
  random frames, the relative RMS error is about 4e-5 (about 2^-14.6). This
  holds for every scheme and size tested.

Sizes after coarse synthesis of the default top: about 1800 flip-flops and
120 kbit of memory. That is 114.6 kbit of feedback delay (2047 words of
2 × 28 bits) plus the 164-word tables.

## What follows the paper and what is this design's own

These follow the paper:
* the SDF pipeline;
* the exponent of each twiddle position derived from the moving matrix;
* the printed moving matrices;
* one table of 2^L words per position, using the pi/2 symmetry;
* -j handled without a multiplier;
* a constant multiplier where only one exponent bit remains.

These are this design's own choices, because the paper does not give them:
* word widths, twiddle scaling and rounding;
* valid/stall handling and the reset;
* the delay built as a circular-buffer memory;
* generating the exponent with AND gates and an adder;
* the gathered-bit table address;
* register placement and latency;
* bit-reversed output with a bin index, and no reordering;
* flushing by further input.

Not included:
* the finer pi/4 symmetry, which would halve the tables again;
* shift-and-add constant multipliers written out by hand;
* an evenly-distributed matrix for sizes other than 2048.

## Files

| file | contents |
|---|---|
| `rtl/tft_pkg.sv` | moving-matrix type, the matrices, legality check, live bits and table cost, twiddle constants |
| `rtl/tft_fft_top.sv` | the pipeline |
| `rtl/sdf_stage.sv`, `rtl/sdf_delay.sv` | butterfly stage and its feedback delay |
| `rtl/twiddle_stage.sv` | one twiddle position: rotation, then nothing, constant or table multiply |
| `rtl/twiddle_exp_gen.sv` | exponent after migration, quadrant and table address |
| `rtl/twiddle_rom.sv` | compact table |
| `rtl/quarter_rotator.sv`, `rtl/cmult.sv`, `rtl/const_cmult.sv` | arithmetic |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_tft_variants.sv`, `tb/fft_run.sv` | the pipeline with the other matrices and sizes |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends. The
full-size one, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
  rtl/tft_pkg.sv tb/tb_tft_fft_top.sv --top-module tb_tft_fft_top -o sim
./obj_dir/sim
```

Add `-y tb` for `tb_tft_variants`, which needs `fft_run`.

* **`tb_tft_fft_top`** runs the default 2048-point build with no parameter
  changes. It streams a random frame, a two-tone frame and a random frame
  with random stalls, then a flush frame. Every bin is checked against a
  DFT computed in the testbench. It also checks the latency and that each
  bin appears exactly once. It counts that stalls, -j rotations and table
  twiddles all occurred. It takes well under a second.
* **`tb_tft_variants`** builds six pipelines: modified radix-2^2, radix-2^2
  and radix-2 at 2048 points, DIT at 1024 points, and radix-2^2 and
  modified radix-2^2 at 8192 points. Each one is checked the same way. It
  also counts that constant multiplications occurred. It takes about 30 s,
  mostly building.
* The block testbenches check the exponent generator exhaustively against
  an independent reference. They also check the table cost of each matrix,
  and each arithmetic unit bit-exactly against integer models.

To try another scheme, pass a matrix:
`tft_fft_top #(.LOG2N(13), .MOVE(tft_pkg::move_radix22(13)))`. A new matrix
is a `move_mat_t` with one hex row per position.
