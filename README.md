# Multiplier-free 8x8 2-D DCT with angle-recoded CORDIC processors

This core computes the two-dimensional discrete cosine transform of 8x8
blocks, the transform used in JPEG-style image and video coding, without a
single multiplier. Each coefficient of the 8-point DCT comes from a rotation
of a pair of sums or differences of the input samples by one of four fixed
angles: pi/4, 3pi/8, 7pi/16 and 3pi/16. Each rotation is done by a CORDIC
processor that is hard-wired for its angle. The sign of every micro-rotation
is decided at design time, which is called *angle recoding*. Only the
micro-rotations the angle needs are built: between one and five instead of
one per result bit. The CORDIC gain is then removed by a few shift-and-add
stages, again chosen for that angle. The result has no angle datapath, no
arctangent table, no ROM and no multipliers: only adders, fixed shifts
(wires) and registers.

The 2-D transform uses the usual row-column decomposition. A 1-D DCT
transforms the rows. A register-array transpose buffer turns the rows into
columns. A second, identical 1-D DCT transforms the columns. A small state
machine sequences the three.

```
 data_in[0..7] ──► dct1d_cordic ──►  >>>2  ──► transpose_module ──► reverse ──► dct1d_cordic ──► data_out[0..7]
  (one row/clk)     (row DCT)      (÷4)        (8x8 cells,          order       (column DCT)     (one column/clk)
                                               mode A in / B out)
        nd, rfd, start_dct ◄──── dct_controller ────► start (buffer enable), control (buffer mode), cordic_out, out_col
```

## Number format and what comes out

Data words are two's complement fixed point. The default width is
`W = 17` in 1Q16 format: a sign bit and 16 fraction bits, so inputs lie in
[-1, 1). The reference test scales an 8-bit sample `p` as
`round(p / 1000 * 2^16)`. For example, 34 becomes 2228.

Each 1-D pass computes the orthonormal DCT-II:

    y[u] = 1/2 c(u) sum_x x[x] cos((2x+1) u pi / 16),   c(0) = 1/sqrt(2), c(u>0) = 1

The row results are divided by 4 (arithmetic shift right by 2, truncating)
before they go into the transpose buffer. This brings them back into the
W-bit input range. The final output is therefore

    data_out[v] (while out_col = k) = Z(v, k) / 4

Here `Z` is the orthonormal 2-D DCT of the block, `v` is the vertical
frequency (down the rows of the input block) and `k` is the horizontal
frequency (along a row). The outputs are `W + 2` bits in the same scaling as
the inputs, so a full-scale block cannot wrap. To get back to sample units
with the 1/1000 input scaling, multiply by `4 * 1000 / 2^16`.

## The angle-recoded CORDIC processors (`ar_cordic`)

A micro-rotation by `[sigma, i]` is

    x' = x - sigma * (y >>> i)
    y' = y + sigma * (x >>> i)

It rotates by `sigma * atan(2^-i)` and stretches the vector by
`sqrt(1 + 2^-2i)`. A compensation factor is a signed sum of at most three
powers of two. It is applied to both coordinates in one pipeline stage.

| angle  | used by            | micro-rotations `[sigma,i]`            | compensation factors                                   | angle error | gain error |
|--------|--------------------|----------------------------------------|--------------------------------------------------------|-------------|------------|
| pi/4   | C1: y0, y4         | [-1,0]                                 | (1-2^-2)(1-2^-4)(1+2^-8)(1+2^-9)(1+2^-12)              | 0           | +0.045%    |
| 3pi/8  | C2: y2, y6         | [1,0] [1,2] [1,3] [1,6] [1,7]          | (2^-1+2^-3+2^-6)(1+2^-4)                               | +7.1e-5 rad | +0.010%    |
| 7pi/16 | C3, C6: odd terms  | [1,0] [1,1] [1,3] [1,10]               | (2^-1+2^-3)(1+2^-8)(1+2^-12)                           | -7.0e-5 rad | +0.004%    |
| 3pi/16 | C4, C5: odd terms  | [1,1] [1,3] [1,10] [1,14]              | (1-2^-3)(1+2^-6)(1+2^-10)(1+2^-12)                     | -8.4e-6 rad | +0.252%    |

The pi/4 processor uses a single micro-rotation by -pi/4 (sigma = -1). Fed
with `(b, a)` it returns `(a+b)/sqrt2` and `(a-b)/sqrt2`.

The 3pi/16 factors follow the original schedule as published. Their product
is 0.25% larger than the exact inverse gain. Changing the last two factors to
`(1-2^-10)(1-2^-12)` would bring the error down to 0.01%. This RTL keeps the
published signs. The factors are easy to change, because all schedules live
in the functions `rot_count`, `rot_shift`, `rot_neg`, `comp_count` and
`comp_term` of `rtl/dct_pkg.sv`.

The processors are unrolled (parallel-pipelined): one register stage per
micro-rotation and per compensation factor, and a new vector on every clock.
Shorter schedules are padded with delay stages, so all four angles have the
same latency, `CORDIC_LAT = 8`. All right shifts truncate.

## The 1-D DCT flow (`dct1d_cordic`)

Six processors compute one 8-point DCT. With `s_k = x_k + x_{7-k}` and
`t_k = x_k - x_{7-k}` (k = 0..3), and `cm = cos(m pi/16)`, `sm = sin(m pi/16)`:

* Even part: `a = s0+s3`, `b = s1+s2`, `c = s0-s3`, `d = s1-s2`.
  * C1 (pi/4) rotates `(b, a)` and gives `2*y0` and `2*y4`.
  * C2 (3pi/8) rotates `(c, d)` and gives `2*y6` and `2*y2`.
* Odd part: four independent rotations.
  * C3 (7pi/16) rotates `(t0, t3)` and gives `(t0 s1 - t3 c1, t0 c1 + t3 s1)`.
  * C4 (3pi/16) rotates `(t2, t1)` and gives `(t2 c3 - t1 s3, t2 s3 + t1 c3)`.
  * C5 (3pi/16) rotates `(t0, t3)` and gives `(t0 c3 - t3 s3, t0 s3 + t3 c3)`.
  * C6 (7pi/16) rotates `(t2, t1)` and gives `(t2 s1 - t1 c1, t2 c1 + t1 s1)`.
  * Four adders then form `y1 = (C3.y + C4.y)/2`, `y7 = (C3.x + C4.x)/2`,
    `y3 = (C5.x - C6.y)/2` and `y5 = (C5.y + C6.x)/2`.

The set of processors is the original one: one for (y0, y4), one for
(y2, y6), four for the odd outputs, the two 7pi/16 processors identical and
the two 3pi/16 processors identical. The wiring of the odd part is this
design's own. It follows from writing each odd output as the sum of one
rotation of `(t0, t3)` and one of `(t1, t2)`.

The pipeline has four parts:

1. butterflies (1 clock);
2. even pre-adds (1 clock);
3. CORDIC (8 clocks);
4. output adders and halving (1 clock).

That gives `DCT1D_LAT = 11` clocks at one row per clock. Internal words have
four extra integer bits, and the outputs have two.

Measured accuracy over random rows is within 0.12% of the row's Euclidean
length plus 24 LSB of the real-valued DCT. The 3pi/16 gain error dominates.

## The transpose buffer (`transpose_cell`, `transpose_module`)

The buffer is an 8x8 array of W-bit cells with no addressing logic. Every
cell has two inputs: one from its left neighbour and one from the
neighbour below.

* **Mode A** (`control = 0`): the row on `din` enters the left column and
  every column moves one place right. After 8 writes, cell (i, j) holds
  element i of row 7-j.
* **Mode B** (`control = 1`): every row moves up one place. The top row is
  the output. Before the first mode-B clock the output carries element 0 of
  every row, which is column 0 of the block. After k clocks it carries
  column k. Inside a column the order is reversed: output j carries row 7-j.
  The top level undoes this by wiring `col_in[r] = dout[7-r]`.

Both modes shift only while `start` (the buffer enable) is high.

Zeros enter the bottom row in mode B. A new block can only be written after
the old one has been read out. The controller enforces this, and an
assertion checks it.

## Sequencing and handshake (`dct_controller`, `dct2d_cordic`)

A row is taken on every clock where `nd` and `rfd` are both high. The
controller has four states:

* `IDLE`: the first row taken here starts a block and pulses `start_dct`.
* `ONE_DCT`: takes the remaining seven rows. Gaps in `nd` are allowed.
* `TRANS_INTER`: `rfd` is low. Row results are written into the buffer in
  mode A as they leave the row DCT, whatever the state.
* `TRANSPOSE_READY`: entered after the eighth result has been written.
  `control = 1` for eight clocks, and each of these clocks reads one column
  into the column DCT.

Timing with rows on back-to-back clocks:

| event                                   | clock   |
|-----------------------------------------|---------|
| rows taken                              | 0 - 7   |
| row results written into the buffer     | 11 - 18 |
| columns read (`control = 1`)            | 19 - 26 |
| next block's first row can be taken     | 27      |
| 2-D result columns (`cordic_out = 1`, `out_col = 0..7`) | 30 - 37 |

So a block takes 27 clocks, and the last row of a block reaches its first
result column after `2*DCT1D_LAT + 1 = 23` clocks. The column DCT drains
while the next block loads.

`start` and `control` are outputs of the core, so the buffer's activity can
be watched from outside. `rst` is asynchronous and active high. It resets
only control state and valid flags. Data registers are not reset and are
never read before they have been written.

## Accuracy on real image data

The reference block is the top-left 8x8 corner of the 512x512 "Lena" test
image, entered at 17 bits. The core's coefficients match the exact
orthonormal 2-D DCT to within 0.25 sample units. The DC term is 259.64
against an exact 259.5.

Two error sources dominate:

* the truncating shift between the two passes: one LSB there is 0.06
  sample units;
* the CORDIC gain errors above.

With `W = 45` the truncation noise vanishes. The DC term then reads 259.73,
which shows the two +0.045% gain errors of the pi/4 processor. The largest
error over the block stays at 0.23 sample units, set by the schedules
rather than the word width.

A whole 512x512 image (4096 blocks, a synthetic test pattern generated by
`tb_dct2d_image`) streams through the core at one block per 27 clocks. After
a real-valued inverse DCT, it reconstructs with a PSNR of 64 dB.

## Where this RTL departs from the original design

* **Streaming control.** The original controller waits out the row-DCT
  latency after every row. Here rows stream back to back into the pipelined
  row DCT, and `rfd` (ready-for-data) provides backpressure. The original
  CORDIC core had only `ND`.
* **Buffer mode polarity.** `control = 0` loads and `control = 1` reads out.
  This follows the core's port description. The original controller code
  drives the opposite level on the clocks that write a row.
* **Port directions.** `START` and `CONTROL` were bidirectional. Here they
  are outputs.
* **Added output.** `out_col` numbers the result columns.
* **Output width.** The outputs are `W+2` bits rather than `W`, so
  full-scale blocks cannot wrap.
* **Compensation factors.** Two factors are reconstructions (the second
  factor for 7pi/16, and the grouping for 3pi/8). Both agree with the exact
  inverse gains to better than 0.01%. The 3pi/16 factors are kept as
  published, with their 0.25% gain error.
* **Odd-part wiring.** See above.
* **Adder count.** The original comparison counts 12 additions outside the
  CORDIC processors for a 1-D DCT. This flow uses 16: 8 butterflies, 4 even
  pre-adds and 4 odd post-adds.
* **Not included.** The two designs the original work compared against are
  not part of this RTL: a Chen-algorithm DCT with multipliers and a
  scaling-free "new CORDIC" variant with 32- to 50-bit words. Neither are
  power or FPGA area figures.

## Files

| file | contents |
|------|----------|
| `rtl/dct_pkg.sv` | `N`, `CORDIC_LAT`, `DCT1D_LAT`, the angle enum and the CORDIC schedule tables |
| `rtl/ar_cordic.sv` | fixed-angle CORDIC processor (parameters `ANGLE`, `W`) |
| `rtl/dct1d_cordic.sv` | pipelined 8-point 1-D DCT (parameters `W_IN`, `W_OUT`) |
| `rtl/transpose_cell.sv`, `rtl/transpose_module.sv` | two-mode cell and the N x N transposer (parameters `N`, `W`) |
| `rtl/dct_controller.sv` | block sequencer FSM |
| `rtl/dct2d_cordic.sv` | the 2-D core (parameter `W`, default 17) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_dct2d_wide` (45-bit core) and `tb_dct2d_image` (512x512 image) |

Each testbench compares against values computed in real arithmetic. Each
prints `TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. The
end-to-end `tb_dct2d_cordic` runs the core at its default parameters. It
runs the Lena block and 39 random blocks with gaps, stalls and back-to-back
blocks. It also checks the 23-clock latency and counts each handshake
mechanism.

To simulate with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/dct_pkg.sv \
          tb/tb_dct2d_cordic.sv --top-module tb_dct2d_cordic
obj_dir/Vtb_dct2d_cordic
```

Replace the testbench name to run another one. The package must be read
first. Every other file is found by module name via `-y`.
