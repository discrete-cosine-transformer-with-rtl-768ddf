# Shape-adaptive 8x8 DCT / IDCT core for MPEG-4 object coding

MPEG-4 codes video objects of arbitrary shape, not only rectangular frames.
An 8x8 block on the edge of an object holds some pixels that belong to the
object and some that do not. An ordinary 8x8 DCT would mix the two. The
shape-adaptive DCT (SA-DCT) transforms only the object pixels:

1. In every column, the object pixels are pushed to the top, closing any gaps,
   and the column is transformed with an N-point DCT. N (0..8) is the number
   of object pixels in that column.
2. In every row of the result, the values are pushed to the left and the row
   is transformed with an M-point DCT. M is the number of values in that row.

The result has exactly as many coefficients as the object has pixels. The
inverse (SA-IDCT) undoes both steps. It needs the binary shape to know where
each value came from.

This core does both directions with one time-shared 1D transform unit. That
unit handles every length N = 1..8 with the same eight multipliers, because
its coefficients come from a ROM indexed by N. A full forward block
(N = 8 everywhere) takes 64 clock cycles, and blocks can follow each other
with no idle cycle between them.

## Block diagram

```
 in_shape_i ─┐                 ┌──────────────┐
             MUX─► shape_shift ─► count N ─────► addr_gen ──► coef_rom
 shape_memory┘        │ packed shape ─► shape_memory         (N, k, dir)
   (row read)         │                                          │
 in_x_i ─────┐        ▼                                          ▼
             MUX─► pixel_shift ─► dct1d: 2 x mat_calc ─► z(k), z(k+1)
 transposer ─┘    (pack + pos)   (even rows | odd rows)      │
  (line read)                                                ├─► out_o[0..1]
                                 transposer ◄────────────────┘ (first pass)
```

| Module | Role |
|---|---|
| `sadct_pkg` | Block size, word widths, types, and the fixed-point DCT basis function |
| `shape_shift` | Counts the object pixels of a line and gives the packed shape |
| `pixel_shift` | Packs object pixels to the top/left. Also gives each packed pixel's original position |
| `coef_rom` | coeff0..3 for both matrix calculators, for each N, cycle and direction |
| `mat_calc` | 1x4 matrix calculator: four pre-adders/subtractors, four multipliers, adder tree |
| `dct1d` | Variable-length 1D DCT/IDCT built from two `mat_calc` |
| `shape_memory` | 8x8 shape bits, written by column, read by row |
| `transposer` | 8x8 intermediate values, written along one direction, read along the other |
| `addr_gen` | Controller: passes, line and cycle counters, memory enables, handshake |
| `sadct_core` | Top level |

## The variable-length 1D transform (`dct1d`, `mat_calc`, `coef_rom`)

This is the heart of the design. The N-point DCT basis is
`c(N,u,n) = sqrt(2/N)·α(u)·cos(π·u·(2n+1)/(2N))`, with α(0) = 1/√2 and
α(u) = 1 otherwise. It is symmetric: `c(N,u,N-1-n) = (-1)^u · c(N,u,n)`.
So each even output depends only on the sums `x(i) + x(N-1-i)`, and each odd
output only on the differences `x(i) - x(N-1-i)`. For odd N, the middle
sample has no partner: it enters the even rows alone, and its odd-row
coefficients are exactly zero. An N-point DCT therefore reduces to two small
matrices of at most 4x4 each. For N = 8 these are the usual even/odd halves
of the fast DCT. The same holds for every other N, with other entries.

`mat_calc` computes one row of such a matrix in one cycle:
`z = Σ coeff_i · (a_i ± b_i)`. `dct1d` has two of them:

- **Forward.** An operand multiplexer pairs sample i with sample N-1-i for
  the current N. The even calculator adds the pair and yields z(2k). The odd
  one subtracts and yields z(2k+1). A line therefore takes ceil(N/2) cycles,
  k = 0..3.
- **Inverse.** The even calculator takes z0, z2, z4, z6 and the odd one
  z1, z3, z5, z7, with the pre-adders passing the value through (b = 0). In
  cycle k they give the even part E and the odd part O of output sample k. A
  butterfly then forms `x(k) = E + O` and `x(N-1-k) = E − O`.

`coef_rom` holds 128 words of eight 14-bit coefficients. The address is
{direction, N, k}:

- forward: even `c(N,2k,i)`, odd `c(N,2k+1,i)`, for the pairs with 2i+1 ≤ N;
- inverse: even `c(N,2i,k)`, odd `c(N,2i+1,k)`.

All other entries are zero, so unused inputs never matter. The table is
computed while the design is elaborated, from the formula in
`sadct_pkg::basis_coef`: the value is scaled by 2^12 and rounded to the
nearest integer.

**Numerics.**

- Coefficients are signed 14-bit with 12 fractional bits. The largest is
  1.0, for N = 1.
- Products and sums keep full precision (33 bits).
- Each 1D result is rounded to nearest (ties up) and saturated to 16 bits.
- A forward-then-inverse round trip of 8-bit pixels comes back within ±3
  (the testbench checks this bound).

## Shift block (`shape_shift`, `pixel_shift`)

A line's shape is 8 bits. Bit n is set when sample n (x_n) belongs to the
object. For example, shape `00100101` (bit 7 first) marks x0, x2 and x5.

- `shape_shift` counts the set bits (N) and returns the packed shape: bits
  0..N-1 set.
- `pixel_shift` gives every set bit a rank: the number of set bits below it.
  Output m takes the input whose rank is m. So any number of runs and holes
  is packed in one combinational step. The module also returns `pos_o[m]`,
  the original position of the m-th object sample. The inverse transform
  uses it to put each value back in place.

## Memories

- **`shape_memory`.** During a forward column pass it stores each column's
  packed shape. Bit i of column j is then set exactly when column j has an
  i-th coefficient. Reading row i gives the shape of row i for the second
  pass. That row shape can have gaps, for columns with N = 0.
- **`transposer`.** It holds the 8x8 intermediate block:
  - forward: written by column (two words per cycle), read by row;
  - inverse: written by row, read by column.

  Reads are combinational and return zero when their enable is low. Both
  memories clear on reset.

## Passes, timing and the controller (`addr_gen`)

| Direction | Pass | Data from | Shape from | Results go to |
|---|---|---|---|---|
| forward | COL_IN | input column j | input | transposer column j; packed shape to shape memory |
| forward | ROW_MEM | transposer row i | shape memory row i | output, (row i, col c) |
| inverse | SHAPE | – | input column j | packed shape to shape memory |
| inverse | ROW_IN | input coefficient row i | shape memory row i | transposer row i, at the original column positions |
| inverse | COL_MEM | transposer column j | input column j (sent again) | output, at the original pixel positions |

**Cycle counts.**

- A line of N samples takes max(1, ceil(N/2)) cycles. An empty line still
  takes one cycle and produces nothing.
- A SHAPE line takes one cycle.
- A forward block takes at most 64 cycles: exactly 64 when full.
- An inverse block takes at most 72 cycles, 8 of which load the shape.
- The whole path, from input multiplexer through shift, multipliers and
  memory write, is combinational within one cycle. So the second pass can
  start right after the first, and a new block can start in the cycle after
  the previous block ends.

## Interface (`sadct_core`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk_i`, `rst_i` | in | 1 | clock; synchronous reset, active high |
| `idct_i` | in | 1 | direction of the next block, sampled at its first line |
| `in_valid_i` / `in_ready_o` | in/out | 1 | handshake for one input line |
| `in_shape_i` | in | 8 | shape of the line (bit n = sample n) |
| `in_x_i` | in | 8 x 16 | samples x0..x7, signed |
| `out_o[2]` | out | `sample_t` | `{valid, row, col, value}`: two results per cycle |
| `out_blk_end_o` | out | 1 | set in the cycle that holds a block's last results |
| `busy_o` | out | 1 | a block is in progress |

**Input protocol.** Hold each input line stable until `in_ready_o` is high.
`in_ready_o` rises in the last cycle that uses the line, and the line is
taken on that clock edge.

- A forward block is 8 lines: column j, with its shape and pixels.
- An inverse block is 24 lines:
  - the 8 shape columns (samples ignored);
  - the 8 coefficient rows, where row i holds its M_i coefficients in
    words 0..M_i-1 and the rest are ignored (shape ignored);
  - the 8 shape columns again (samples ignored).

**Outputs.** Outputs are registered and appear one cycle after they are
computed. Forward coefficient c of row i leaves with row = i, col = c.
Inverse pixel (r, j) leaves with row = r, col = j.

## How far it follows the source design, and where it departs

**Taken from the source design:**

- the organisation: shift block, address generator, coefficient ROM, two 1D
  units, shape memory, matrix transposer, and input multiplexers fed back
  from the memories;
- the SA-DCT procedure;
- the folded even/odd matrix form with programmable coeff0..3 and four
  pre-adders;
- 16-bit data and 8-bit shape inputs;
- 64 cycles for a full block.

**This design's own choices:**

- **Sample pairing for N < 8.** The source figure wires x'i to x'(7-i).
  The equations pair x(i) with x(N-1-i), and this design follows the
  equations, using a multiplexer.
- **Inverse data flow.** The IDCT butterfly, the shape pass, and sending the
  shape twice are this design's own, as are writing the transposer by row
  and reading it by column. The source says only that the inverse shares the
  multipliers and the transposition memory with little extra hardware.
  Because of the extra shape pass, an inverse block takes 72 cycles, not 64.
  At a 20 MHz clock that is 20.5 M cycles/s for 4CIF at 30 frames/s, just
  above what the clock gives. Forward 4CIF, Main@L2 and the full CIF codec
  fit.
- **Word widths, rounding, saturation and reset.** The coefficient word
  width, the rounding rule and saturation are not specified by the source.
  Neither are the reset behaviour or the valid/ready handshake.
- **No gate-level targets.** The source's 0.35 µm implementation
  (about 40,000 gates, 20 MHz) is not reproduced. The RTL's clock rate is
  set by one long combinational path: multiplexer, shift, multiplier and
  adder tree. It is only known after synthesis.

## Verification

Each module has a self-checking testbench in `tb/`. The expected values come
from `tb/sadct_ref_pkg.sv`, which computes the transform in its plain, direct
matrix form, with basis values it derives from `cos()` itself. It does not
use the folded form the hardware uses.

| Testbench | What it checks |
|---|---|
| `tb_shape_shift` | all 256 shapes |
| `tb_pixel_shift` | all 256 shapes, 4 times, with random data; positions too |
| `tb_coef_rom` | every ROM entry |
| `tb_mat_calc` | random and extreme operands |
| `tb_dct1d` | every N, both directions, bit-exact; index coverage; cycles per vector; saturation |
| `tb_shape_memory`, `tb_transposer` | random access against a model array; read gating; reset |
| `tb_addr_gen` | every cycle against a precomputed schedule of 40 blocks with random stalls |
| `tb_sadct_core` | end to end (see below) |
| `tb_macroblock` | one all-object macroblock (6 full blocks) in exactly 384 cycles, then a boundary macroblock forward and inverse |

`tb_sadct_core` runs 48 shapes forward and then inverse, back to back, with
idle input cycles mixed in. The shapes include the full block, the empty
block, every line length 0..8 and lines with holes. For each block it checks:

- every result, bit-exact;
- that no extra position is written;
- the reconstruction against the original pixels;
- the exact cycle count of the block.

It also counts each mechanism (stall, direction switch, back-to-back start,
64-cycle full block) and fails if one never happens.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert rtl/sadct_pkg.sv tb/sadct_ref_pkg.sv \
    $(ls rtl/*.sv | grep -v sadct_pkg) tb/tb_sadct_core.sv \
    --top-module tb_sadct_core -o sim
./obj_dir/sim
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`.
