# Approximate 4-2 compressor multiplier and a Sobel edge detector built on it

Image edge detection tolerates small arithmetic errors: a gradient magnitude
that is off by a fraction of a percent rarely changes whether a pixel is
called an edge. This design exploits that. Its core is an 8x8 unsigned Dadda
multiplier whose partial-product tree uses a cheap *approximate* 4-2
compressor in the eight least significant columns and the conventional exact
compressor above them. The multiplier computes the two squares of the Sobel
gradient magnitude, `Gr = sqrt(Gx^2 + Gy^2)`, in a one-pixel-per-cycle
streaming edge detector for 256 x 256 grey images. A multiply-accumulate (MAC)
unit built on the same multiplier sits beside the detector.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). Every module has
a self-checking testbench, and the top level is tested end to end at full
size.

## The two 4-2 compressors

A 4-2 compressor adds bits that all sit in the same column of the
partial-product matrix.

**Exact** (`exact_compressor42`) takes five bits, y1..y4 and cin, and returns
their count as `sum + 2*(carry + cout)`:

```
sum   = y1 ^ y2 ^ y3 ^ y4 ^ cin
cout  = (y1 ^ y2) ? y3  : y1      -- independent of cin
carry = (y1^y2^y3^y4) ? cin : y4
```

`cout` feeds the `cin` of the compressor one column to the left in the same
reduction stage. `carry` goes to that column in the next stage. Because `cout`
does not depend on `cin`, a row of these cells has no ripple.

**Approximate** (`approx_compressor42`) has no cin and no cout. It returns
`2*carry + sum`:

```
carry = a1 | a2
sum   = (a1 ^ a2) ? (a3 & a4) : (a3 | a4)      -- a 2:1 multiplexer
```

It is right for 12 of the 16 input patterns. The other four are wrong by
exactly 1:

| a1 a2 a3 a4 | true count | 2*carry+sum | error |
|-------------|-----------:|------------:|------:|
| 0 1 0 0     | 1 | 2 | +1 |
| 1 0 0 0     | 1 | 2 | +1 |
| 0 0 1 1     | 2 | 1 | -1 |
| 1 1 1 1     | 4 | 3 | -1 |

The two input pairs play different roles. The pair (a1, a2) drives the
multiplexer select and the carry, while (a3, a4) is data. So the multiplier
can change its error by choosing which bits go to which pins.

## The approximate multiplier (`approx_mult8`)

The 64 partial products `pp[i][j] = b[i] & a[j]` have weight `2^(i+j)`. This
gives columns of height 1, 2, ..., 8, ..., 2, 1. Two reduction stages bring
every column down to height 4, then to height 2. A 16-bit adder then adds the
two rows that remain.

**C-8 configuration.** Every compressor in columns 0-7 (weights 2^0..2^7) is
approximate, and every compressor in columns 8 and up is exact. So errors
enter only the low half of the product, and the high half is computed
exactly from what reaches it.

The cells are placed by a greedy column-by-column Dadda schedule, working from
the least significant column up. In each column, while the column (plus the
carries arriving from the column to its right) is taller than the stage
target, the schedule adds a cell, trying them in this order:

- an approximate compressor (in columns 0-7), which removes 3 bits;
- an exact compressor (in columns 8 and up), which removes 4 bits when it can
  take a cout or a fifth bit as cin, and 3 bits otherwise (cin then tied to
  0);
- a full adder, which removes 2 bits;
- a half adder, which removes 1 bit.

The result is 24 cells:

| stage | target | cells (column: cell) |
|-------|--------|----------------------|
| 1 | 4 | c4 HA; c5 AC; c6 AC, HA; c7 AC, AC; c8 EC, HA; c9 EC, HA; c10 EC; c11 FA |
| 2 | 2 | c2 HA; c3-c7 AC; c8-c12 EC; c13 FA |

AC is an approximate compressor, EC an exact compressor, FA a full adder and
HA a half adder. In total: 9 AC, 8 EC, 2 FA, 5 HA.

The input order of each approximate compressor was chosen to lower the mean
absolute error. For each cell, all six ways of splitting its four bits into a
select pair and a data pair were tried, keeping the best.

**Accuracy over all 65536 operand pairs** (the testbench checks these figures
exactly):

| metric | value |
|---|---|
| products with any error | 58250 (88.9 %) |
| mean absolute error | 98.7 (0.15 % of 255*255) |
| mean relative error (nonzero products) | 3.3 % |
| mean error (bias) | +70.4 |
| error range | -520 .. +392 |

Be careful with the error rate: 25 % is the rate of a single *compressor*.
Almost every product passes through several approximate cells, so most
products are slightly wrong. The error is small in magnitude and has a
positive bias. Both operands below 4, or either operand 0, give exact results.

To try another split between approximate and exact columns, the whole netlist
has to be regenerated with a different column boundary, because the cell
placement changes. The module is a flat structural netlist with one line per
cell. Net names say where each cell sits: `s<stage>_c<column>_<n>_{s,c,co}`.

## The edge detector (`sobel_edge_detector`)

Pixels arrive one per clock in raster order (`pix_valid`). `pix_sof` marks
pixel (0,0) and restarts the row and column counters, so a frame can be cut
short. Idle cycles are allowed anywhere. There is no back-pressure. The
pipeline has five register stages:

| stage | module | work | cycles |
|---|---|---|---|
| window | `sobel_window` (2 x `line_buffer`) | 3x3 neighbourhood from two row buffers and a 3-column shift register | 1 |
| gradient | `sobel_gradient` | Gx, Gy with the Sobel masks (shifts and adds) | 1 |
| magnitude | `gradient_magnitude` (2 x `approx_mult8`, `isqrt`) | \|G\|/4, approximate squares; then sum and floor square root | 2 |
| decision | `edge_threshold` | `edge = Gr > threshold` | 1 |

The pixel at (r, c) completes the window centred on (r-1, c-1). The result
for that centre (`edge_valid`, `edge_o`, `edge_mag`, `edge_x`, `edge_y`) is
visible after the fifth rising edge, counting the one that takes the pixel.

**Masks.** Gx uses `[-1 0 1; -2 0 2; -1 0 1]` and Gy uses its transpose
(top row negative). Gx and Gy lie in -1020..1020.

**Scaling for the 8-bit multiplier.** A gradient needs 10 bits of magnitude,
but the multiplier takes 8. So `|Gx|` and `|Gy|` are shifted right by 2 before
squaring. 1020 >> 2 = 255, so nothing saturates. `Gr` and the `threshold`
input are therefore in units of 4 gradient levels. With the approximate
squares, Gr stays at or below 359.

**Borders.** Only the 254 x 254 interior pixels have a full neighbourhood, so
only they produce results, each tagged with its coordinates. A receiver
building a 256 x 256 edge map should treat the one-pixel border as non-edge.

**Effect of the approximation.** The end-to-end test runs 138684 results on
synthetic images. The approximate squares changed Gr, compared with exact
squares of the same scaled gradients, in 80277 results. They changed the edge
decision in only 16.

## The MAC (`approx_mac`)

On each clock with `en = 1`, the MAC computes `acc <= acc + approx_mult8(a, b)`.
`clear` (synchronous) has priority over `en`. The accumulator is 24 bits
(`ACC_W`) and wraps around on overflow. It holds 260 full-scale products,
because the largest approximate product is 64505.

## Top level (`approx_edge_top`)

`approx_edge_top` places the edge detector and the MAC side by side. They
share only `clk` and the active-low synchronous `rst_n`. Parameters:
`IMG_W = IMG_H = 256`, `ACC_W = 24`. Image file reading and resizing to
256 x 256 are done before the pixel stream reaches the hardware.

## Where this design departs from, or fills in, the source design

The source design gives the compressor equations, the C-8 multiplier
configuration and the order of the Sobel operations. These choices are this
design's own:

- **Cell placement.** The exact placement of every cell in the reduction tree
  is not given. The greedy Dadda schedule above, and the input ordering of
  the approximate compressors, are this design's.
- **Which columns are approximate.** One passage speaks of replacing *all*
  conventional compressors by approximate ones. The configuration actually
  specified uses them only in the 8 low columns, and that is what is built.
- **The second compressor.** The source design mentions two new approximate
  compressors but describes only one. That one is built.
- **Smoothing.** The source design says the masks are applied to a smoothed
  image but defines no smoothing step. None is built: the masks act on the
  raw pixels.
- **Threshold circuit.** The threshold comparison is said to use stochastic
  logic, which is not described. A binary comparator with a run-time
  threshold is used instead.
- **Architecture and interfaces.** The streaming architecture, line buffers,
  border rule, gradient scaling, integer square-root method (restoring,
  unrolled), pipeline timing and all handshakes are this design's. So are the
  MAC's width, enable and clear.

## Files

| file | contents |
|---|---|
| `rtl/sobel_pkg.sv` | pixel, window, gradient and magnitude types |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | counter cells |
| `rtl/exact_compressor42.sv`, `rtl/approx_compressor42.sv` | the two 4-2 compressors |
| `rtl/approx_mult8.sv` | 8x8 approximate Dadda multiplier |
| `rtl/approx_mac.sv` | multiply-accumulate unit |
| `rtl/line_buffer.sv`, `rtl/sobel_window.sv` | row buffers and 3x3 window |
| `rtl/sobel_gradient.sv`, `rtl/gradient_magnitude.sv`, `rtl/isqrt.sv`, `rtl/edge_threshold.sv` | pipeline stages |
| `rtl/sobel_edge_detector.sv`, `rtl/approx_edge_top.sv` | detector and top |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/sobel_ref_pkg.sv` | integer reference model of the edge pipeline |
| `tb/approx_square.hex` | the 256 approximate squares `approx_mult8(k, k)`, from an independent bit-level model of the same tree; used as reference data |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. Run them from the directory that holds `rtl/` and `tb/`, because
the `.hex` file is read by a relative path. For example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sobel_pkg.sv tb/tb_approx_edge_top.sv --top-module tb_approx_edge_top
./obj_dir/Vtb_approx_edge_top
```

`tb_approx_edge_top` runs the top at its default parameters. It streams three
256 x 256 frames (the second cut short by a new start of frame) with random
idle cycles, and checks every result's value and its 5-cycle timing against
the reference model. Alongside, it runs 20000 MAC operations, including a
wrap of the accumulator. It counts gaps, border pixels, edges, non-edges,
restarts and the MAC's accumulate, hold, clear and wrap events, and fails if
any of them never happens. It takes a few seconds.

`tb_approx_mult8` sweeps all 65536 operand pairs. It checks the error bound,
the error statistics above and a hash of every product. The compressor
testbenches are exhaustive, and `tb_isqrt` covers all 2^17 inputs.

`sobel_window` asserts that `pix_sof` only comes with `pix_valid`.
