# Multiplier-free 8x8 approximate DCT: a 14-addition transform in a row-parallel 2-D pipeline

Block transforms in image and video codecs (JPEG, H.26x, HEVC) spend most of
their arithmetic on the 8-point DCT. This design swaps the exact DCT for an
*approximate* DCT: an 8x8 matrix `T` whose entries are only 0 and +/-1, chosen
so that its rows stay mutually orthogonal and keep the DCT's frequency
structure. With this matrix a 1-D transform needs **14 additions and nothing
else**: no multipliers and no shifts. The 2-D transform of an 8x8 block is done
by the usual row-column split: a 1-D transform on every row, a transposition
buffer, then a 1-D transform on every column. The datapath takes one 8-pixel
row per clock and puts out one 8-coefficient column per clock, with no gap
between blocks.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable and parameterized
by the pixel width, which defaults to 8 bits.

## The transform

Coefficient `X[k] = sum_n T[k][n] * x[n]` with

```
        n:  0  1  2  3  4  5  6  7
  X0     [  1  1  1  1  1  1  1  1 ]
  X1     [  0  1  0  0  0  0 -1  0 ]
  X2     [  1  0  0 -1 -1  0  0  1 ]
  X3     [  1  0  0  0  0  0  0 -1 ]
  X4     [  1 -1 -1  1  1 -1 -1  1 ]
  X5     [  0  0  0  1 -1  0  0  0 ]
  X6     [  0 -1  1  0  0  1 -1  0 ]
  X7     [  0  0  1  0  0 -1  0  0 ]
```

`T * T^T` is diagonal, `diag(8, 2, 4, 2, 8, 2, 4, 2)`, so `D * T` is orthonormal with
`D = diag(1/sqrt8, 1/sqrt2, 1/2, 1/sqrt2, 1/sqrt8, 1/sqrt2, 1/2, 1/sqrt2)`. The
scaling `D` is **not** applied in hardware. A codec folds it into the
quantiser step sizes. The outputs are therefore the integer products `T * x`.

### Fast algorithm: three butterfly stages

`T = P4 * A12 * A11 * A1`. Each factor is a pipeline stage with one register
rank:

| stage (module) | what it computes | adders |
|---|---|---|
| A1 (`a1_stage`) | `u[i] = x[i] + x[7-i]`, `u[4+i] = x[3-i] - x[4+i]`  (i = 0..3) | 8 |
| A11 (`a11_stage`) | `v0 = u0+u3`, `v1 = u1+u2`, `v2 = u1-u2`, `v3 = u0-u3`; `v4..v7 = u4..u7` | 4 |
| A12 (`a12_stage`) | `w0 = v0+v1`, `w1 = v0-v1`, `w2 = -v2`; `w3..w7 = v3..v7` | 2 (+1 negation) |
| P4 (wiring in `dct1d`) | `w0..w7` are `X0, X4, X6, X2, X5, X7, X1, X3` | 0 |

Only the even half goes beyond the first butterfly. The odd coefficients
`X1, X3, X5, X7` are single differences `x1-x6`, `x0-x7`, `x3-x4` and `x2-x5`,
and they leave A1 already finished. The two later stages only carry them along.

Worked example, checked by the testbenches: `x = 1, 5, 11, 15, 17, 12, 19, 14`
gives `u = 15, 24, 23, 32, -2, -1, -14, -13` after A1. A11 maps
`u = 1, 4, 23, 7, 29, 9, 12, 11` to `v = 8, 27, -19, -6, 29, 9, 12, 11`.

### Word growth

Each stage adds one bit, so nothing wraps:

| signal | width (default) |
|---|---|
| pixel (unsigned) | `PIXEL_W` = 8 |
| row-transform input (signed, zero-extended) | 9 |
| row-transform output / transposition buffer | 12 |
| column-transform output `coef` | 15 |

The largest magnitude is the DC term of a flat white block: 64 * 255 = 16320,
which fits in 15 signed bits. The 2-D results are exact integers.

## The 2-D pipeline (`approx_dct2d`)

```
 pix row r ──► dct1d (rows) ──► transpose_buffer ──► dct1d (columns) ──► coef column u
   8 x 8b      3 clocks, 9→12b    8 clocks              3 clocks, 12→15b     8 x 15b
```

* Input: a block is 8 beats `pix[0..7] = x[r][0..7]`, r = 0..7, each with
  `in_valid`. Gaps between beats are allowed.
* Output: 8 beats with `out_valid`. Beat u carries column u of
  `Y = T * X * T^T`, with `coef[v] = Y[v][u]`.
* Throughput: one row per clock in and one column per clock out, sustained over
  any number of back-to-back blocks.
* Latency: column 0 of a block leaves **14 clocks** after its row 0 entered
  (3 + 8 + 3) when blocks follow each other. Column u leaves u clocks later.
* `in_ready` is high except during a *flush pass* (see below). A row offered
  while it is low is not taken and must be held.
* Reset `rst` is synchronous and active high. It clears the pipeline registers
  and the buffer control.

Both passes use the same 1-D transform. The structure would allow a different
approximation for the row pass and the column pass. Here both are the same.

## The transposition buffer (`transpose_buffer`)

This is the least obvious part. The row transform delivers row vectors, but
the column transform needs a whole column at once. A column of a block exists
only once all 8 rows have arrived. Meanwhile the next block's rows keep arriving
at one per clock. The buffer has to read an old block and write a new one in
the same clocks.

The buffer is a single 8x8 array of registers. Its **shift direction alternates
from block to block**:

```
 pass A (FILL_COLS): every clock the array shifts one column LEFT;
                     the incoming vector is written into column 7;
                     column 0 (leaving) is put out: dout[r] = arr[r][0]
 pass B (FILL_ROWS): every clock the array shifts one row UP;
                     the incoming vector is written into row 7;
                     row 0 (leaving) is put out:    dout[r] = arr[0][r]
```

After a pass A over block b, row j of b sits in column j. In the next pass B,
the row leaving at clock k is `arr[k][*]`. That is element k of every row,
i.e. column k of block b, and it is exactly what the column transform needs.
Meanwhile block b+1 enters row by row from the bottom. After pass B, row j of
b+1 sits in array row j. The next pass A then reads it out column by column
from the left. A mod-8 counter numbers the clocks of a pass. At each wrap the
direction flips. Each lane needs one 2:1 output multiplexer, and each register
needs one 2:1 input multiplexer.

Flow control:

* A pass advances only on clocks where a row arrives. A gap in the input
  stalls both the write and the read, so the output gets the same gap.
* A stored block would otherwise wait for the next block to push it out. So,
  at a pass boundary, the buffer starts a **flush pass** if no row arrives,
  a full block is stored, and `drain_ok` is high. A flush pass reads the
  block out in 8 clocks while writing nothing. In the top level `drain_ok`
  means "no row at the input and none inside the row transform" (`dct1d.busy`).
  During a flush `in_ready` is low.
* An assertion checks that no row reaches the buffer during a flush pass.

In the top level the array is 64 words of 12 bits (768 storage bits). Each 1-D
transform holds 3 x 8 pipeline words, which grow from 10 to 12 bits in the row
pass and from 13 to 15 bits in the column pass.

## Where this RTL departs from the source description

The published design gives the matrix, the factorization, the stage diagram,
the 2-D block diagram and a block diagram of the buffer. The following points
are choices made here:

* **Word widths.** The original code keeps every word at 8 bits, which wraps
  for most inputs. Here each stage grows one bit. The low 8 bits of each
  result match an all-8-bit datapath.
* **Registered pass-through lanes in A11.** The original stage diagram has
  registers only on the four adder lanes of A11. That would make the odd
  coefficients leave one clock before the even ones. Here all eight lanes are
  registered, so the latency is 3 clocks on every lane.
* **Sign convention.** The differences follow the factorization:
  `u4 = x3 - x4`, `v2 = u1 - u2`, and so on. The original simulation printouts
  can also be read as the opposite operand order, which flips the sign of some
  coefficients. A codec that expects the other convention must negate those
  outputs.
* **Transposition buffer control.** The original buffer diagram shows an 8x8
  register array, eight multiplexers, a counter and a row of registers, but no
  select rule or load timing. The alternating-direction scheme above is this
  design's way of doing a real-time transpose with one 64-word array.
* **Handshake.** The original blocks have only clock and reset. Here `valid`
  travels with the data. The stall, flush, `in_ready` and `drain_ok` behaviour
  is this design's own.
* **Signed arithmetic and unsigned pixels** are assumed. The data registers of
  the buffer have no reset.

Not included:

* The other approximate DCTs the design was compared with (Bouguezel-Ahmad-Swamy
  2008, Cintra-Bayer 2011). They are not specified in enough detail to build.
* The scaling by `D` and any quantisation or coefficient selection.

## Files

| file | contents |
|---|---|
| `rtl/dct_pkg.sv` | block size, the stage-to-coefficient lane map, buffer enums |
| `rtl/a1_stage.sv`, `rtl/a11_stage.sv`, `rtl/a12_stage.sv` | the three butterfly stages |
| `rtl/dct1d.sv` | 8-point transform: the three stages plus output permutation |
| `rtl/transpose_buffer.sv` | real-time 8x8 transposition buffer |
| `rtl/approx_dct2d.sv` | top level: row transform, buffer, column transform |
| `tb/dct_ref_pkg.sv` | reference model: `T` written out, plain matrix products |
| `tb/*_tb.sv` | one self-checking testbench per module, plus the image workload `image_blocks_tb` |

## Verification

Every testbench compares the outputs with values computed independently. The
stage testbenches use their factor matrix written out, and the others use the
full matrix `T` in `tb/dct_ref_pkg.sv`. Each testbench has a watchdog and ends
by printing `TB_RESULT checks=N failures=M`.

* `a1_stage_tb`, `a11_stage_tb`, `a12_stage_tb`: the worked examples above,
  extreme values and random streams with valid gaps. Latency is one clock.
* `dct1d_tb`: every coefficient is driven to both extremes, then 4000 random
  vectors with gaps. It checks a latency of exactly 3 clocks and the `busy`
  flag.
* `transpose_buffer_tb`: 400 random blocks. It checks back-to-back latency (8
  clocks to column 0), random stalls inside blocks, and idle periods with and
  without `drain_ok`. From the ports it counts stall clocks, flushes and passes.
  Consecutive passes alternate direction, so two or more passes use both.
* `approx_dct2d_tb`: 300 blocks at the default parameters. These include flat
  0 and 255 blocks and two checkerboards. It checks the 14-clock latency and
  the bubble-free output of back-to-back blocks. It also checks stalls,
  flushes, and rows refused during a flush, then re-offered. Every mechanism
  must occur at least once.
* `image_blocks_tb`: a compression workload. A generated 128x128 8-bit image
  (gradients, a sharp-edged square, fine texture, noise) is streamed as 256
  back-to-back blocks. Column j of the image must leave exactly 14 + j clocks
  after the first row, so 256 blocks take 2062 clocks. Every coefficient is
  checked against the reference. The coefficients must also invert exactly
  through `T^-1 = T^T * diag(1/8, 1/2, 1/4, 1/2, 1/8, 1/2, 1/4, 1/2)`. For
  information, the bench also prints the PSNR of the image rebuilt from the
  10 lowest zig-zag coefficients of each block. On this test image it is
  about 30.7 dB.

Run one with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dct_pkg.sv tb/dct_ref_pkg.sv rtl/a1_stage.sv rtl/a11_stage.sv rtl/a12_stage.sv \
    rtl/dct1d.sv rtl/transpose_buffer.sv rtl/approx_dct2d.sv tb/approx_dct2d_tb.sv \
    --top-module approx_dct2d_tb -Mdir obj_top
./obj_top/Vapprox_dct2d_tb
```

For the other benches, use the same pattern with fewer files. Each testbench
runs in well under a second.

## Changing it

* `PIXEL_W` on `approx_dct2d` sets the input width. All internal widths follow
  from it, with 3 bits of growth per 1-D pass.
* To use a different 1-D approximation in one of the passes, replace that
  `dct1d` instance. The buffer and the top level only need an 8-lane vector
  with a valid bit and a fixed latency. The top level's `drain_ok` also relies
  on the row transform's `busy` output.
