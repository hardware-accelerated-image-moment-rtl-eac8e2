# Systolic image-moment engine

This RTL computes one geometric image moment per camera frame, in real time:

    M_pq = sum over x = 1..m, y = 1..n of  x^p * y^q * f(x, y)

Here f is an 8-bit grayscale image, x is the row and y the column, both
counted from 1. The orders p and q each run from 0 to 7, so the total order
goes up to 14. The default frame is 1024 x 1024. Moments like these describe
an object's mass, centroid, orientation and shape. They are used as features
for recognition and navigation, for example on underwater vehicles.

The architecture follows the paper "Hardware-Accelerated Image Moment
Computation for UUV Navigation":

- a ring (systolic array) of four identical moment processor elements (MPEs),
- fed by a control unit,
- with a final accumulator,
- all arithmetic in an unsigned 18-bit floating-point format,
- with a pipelined power unit, a 10-bit carry select adder and a 10x10 Dadda
  multiplier as building blocks.

The paper leaves the control unit, the handshakes, the number encoding
details and the end-of-frame sequence open. Those parts are this design's
own. Each is marked below and in the header comment of each file.

## The number format

Every moment value is an 18-bit word `{E[7:0], M[9:0]}` of type
`moment_pkg::fp_t`:

- **value = M * 2^(E-9)**. The mantissa M keeps its leading one explicitly,
  so a nonzero M lies in 512..1023.
- **Zero is M = 0.** Its exponent is 0.
- **1.0 is E = 0, M = 512.** Every integer up to 1024 is exact, which covers
  all coordinates and pixel values.
- **The largest value is 1023 * 2^246, about 1.16e77.** A 1024x1024 frame
  of 255s has M77 = 5.8688e48, which fits easily. Storing that number as a
  plain integer would take 163 bits.
- **There is no sign bit.** Every term is nonnegative.
- **Results are truncated (rounded toward zero), and overflow saturates** to
  the largest value.

The paper gives the 8-bit exponent, the 10-bit mantissa, the normalised form,
the missing sign and the 1.16e77 maximum. Putting the leading one inside the
10 bits is this design's reading. It is the encoding that gives exactly that
maximum, and it makes the mantissa adder 10 bits wide and the mantissa
multiplier 10 x 10, as in the paper. The exponent offset and the truncation
are this design's choices.

### Accuracy: read this before using the results

Ten mantissa bits give about three significant decimal digits per
operation. The real problem is accumulation. A partial sum whose last
mantissa bit is worth more than a term no longer grows when that term is
added: the term is truncated away. Frames large enough to fill the partial
sums lose most of their small terms. Results measured by the testbenches
(the first two rows by `tb_moment_engine`, the last two by
`tb_moment_engine_full`):

| frame | moment | 18-bit result | exact | error |
|---|---|---|---|---|
| 16x16 random | various | | | 0.5 - 1.3 % |
| 2x8 random | various | | | ~0.1 % |
| 1024x1024, all 255 | M77 | 2.42e48 | 5.8688e48 | 59 % low |
| 1024x1024 random | M35 | 1.89e30 | 6.76e30 | 72 % low |

The paper quotes a maximum rounding error of 3.27 % up to the 14th order.
This arithmetic, read as the paper describes it, does not reach that figure
on full frames. If you need accurate full-frame moments, widen the
accumulating adders. For example, give the ring and the accumulator a longer
mantissa, or add with round-to-nearest and a guard bit. The testbenches use
a bit-exact model of the truncating arithmetic, so they will need the same
change.

## How a frame flows through the ring

### Input stream

The camera side delivers *beats* of four horizontally adjacent pixels, one
beat per clock at most, in raster order, under a valid/ready handshake. Beat
g of row x holds columns 4g+1 .. 4g+4. The paper only says that a control
unit hands each cell its pixel with x and y. This stream format is this
design's choice.

### Cells

Pixel j of a beat goes to cell j, so:

- cell 1 handles columns 1, 5, 9, ...,
- cell 4 handles columns 4, 8, 12, ...

Each cell is an `mpe`. It raises x to p and y to q, forms x^p * y^q * f, and
adds that term to the partial moment passed on by its left neighbour. That
neighbour's value has been delayed by five registers. From input to output a
cell has five register stages (`MPE_LAT` = 5).

### The ring and its 20 slots

The output of cell 4 is fed back into cell 1, as in the paper's four-cell
figure. The loop is 4 x 5 = 20 register stages long, so it holds 20
independent partial sums at once. Call them **slots**; one passes cell 1
each clock.

- A beat accepted in cycle n adds its four terms to slot n mod 20: cell 1
  adds its term first, then cell 2 five cycles later, and so on.
- A frame longer than 20 beats visits each slot many times. The feedback
  keeps every slot accumulating for the whole frame.

The control unit makes this line up. It registers each beat once, then
delays cell k's operands (x, y_k, p, q, pixel) by a further k*5 cycles, so
each operand meets its slot as the slot passes.

### Draining into the accumulator

When a frame's last beat has entered cell 1, the control unit cuts the
feedback for 20 cycles (`fb_en` low). During those cycles:

- cell 1 receives zero instead of the returning slot;
- `moment_accumulator` (the final adder with a feedback register) adds each
  slot leaving cell 4, one per cycle, starting from zero.

After 20 cycles every slot of the frame has been summed and the ring is
empty. `m_valid` then pulses with the moment on `m_value`.

The paper draws both a final accumulating adder and the cell-4-to-cell-1
feedback, without saying how they share the work. Running the ring for the
whole frame and the accumulator only during this drain window is this
design's interpretation. It needs one slow floating-point add per cycle in
the accumulator and counts no term twice.

### Back-to-back frames

The next frame can stream in during the drain. Its beats land in slots that
leave the ring only after the drain window, and they start from zero because
the feedback is cut. No cycle is lost between frames.

The one exception is a frame of fewer than 20 beats. Its last beat would
start a second drain before the first has finished, so `in_ready` drops for
that last beat until the earlier drain is nearly done. This only matters for
images under 80 pixels.

### Timing at the top

- One beat per cycle.
- `m_valid` is high in the cycle that comes 22 cycles (`N_CELLS*MPE_LAT + 2`)
  after the cycle in which the last beat was accepted.
- `m_value` holds its value until the next drain begins.
- `p_cfg` and `q_cfg` are sampled with the first beat of a frame. The
  control unit carries them with every pixel, so frames with different
  orders can overlap in the pipeline.
- Throughput is 4 pixels per clock. One 1024x1024 frame takes 262144 cycles,
  so the paper's 954 frames/s needs a 250 MHz clock.

## Inside a cell (`mpe`)

| stage | x path | y path | pixel path | previous-moment path |
|---|---|---|---|---|
| 1-3 | `exp_unit` x^p | `exp_unit` y^q | 3 registers | 5 registers |
| 4 | register x^p | register y^q * f | | |
| 5 | register x^p * (y^q * f) | | | |
| out | | | | previous + term (`fp_add`), combinational from registers |

From the paper: three registers on the pixel, five on the previous moment,
one after the x power unit, and the two multipliers and the adder.

This design's choice: the registers after y^q * f and after the full product.
They line the term up with the five-register path and keep one
floating-point multiply per stage. A pixel of 0 adds nothing, and this is
how empty cycles are filled.

## Power unit (`exp_unit`)

x^p is computed in a fixed three stages, whatever p is, rather than in p
sequential multiplies:

- stage 1: x^2 = x*x
- stage 2: x^3 = x^2*x and x^4 = x^2*x^2
- after stage 3: x^5 = x^4*x, x^6 = x^3*x^3 and x^7 = x^4*x^3, feeding an
  8:1 multiplexer driven by p. Input 0 of the multiplexer is the constant 1.

From the paper: the three stages, the six multipliers, the output
multiplexer and the limit of x^7.

This design's choices:

- which operands feed which multiplier;
- registering every power at every stage boundary, so that all powers of one
  x arrive together;
- the constant 1 for p = 0;
- carrying p down the pipeline with x.

The input is an integer coordinate, converted by `int_to_fp`. The
conversion is exact up to 1024.

## Arithmetic blocks

- `csa10`: 10-bit carry select adder. It is split into blocks of 1, 1, 2, 3
  and 3 bits. Each block is two ripple chains of full adders, one for
  carry-in 0 and one for carry-in 1, and a multiplexer picks one when the
  lower carry arrives. Bit 0 is duplicated too and selected by the carry
  input. The partition follows the paper; the block sizes are fixed, so keep
  W = 10.
- `dadda10`: unsigned 10x10 Dadda multiplier. Plain AND partial products are
  reduced with full and half adders through the heights 9, 6, 4, 3, 2, then
  summed by a ripple-carry adder. The placement schedule is computed once at
  elaboration by a constant function. The paper also mentions modified Booth
  encoding; that is not used, because the operands are unsigned and the
  paper's dot diagram shows a plain partial-product array.
- `fp_add`: compares the operands, shifts the smaller mantissa right by the
  exponent difference (truncating), adds with `csa10`, and renormalises a
  carry-out by one right shift and an exponent increment.
- `fp_mul`: adds the exponents, multiplies the mantissas with `dadda10`,
  normalises by one bit and truncates.
- `full_adder`, `ripple_adder`: the cells both arithmetic blocks are built
  from.

All four arithmetic units are combinational. Only the MPE and power-unit
registers pipeline them. At synthesis, expect a long path through
`fp_mul`, and through `fp_add` in the accumulator loop.

## Files

| file | contents |
|---|---|
| `rtl/moment_pkg.sv` | format type `fp_t`, constants, per-cell operand struct `cell_in_t` |
| `rtl/moment_engine.sv` | top: control unit + ring + accumulator |
| `rtl/control_unit.sv` | stream handshake, coordinates, skew, drain and stall control |
| `rtl/systolic_array.sv` | ring of `N_CELLS` MPEs with switchable feedback |
| `rtl/moment_accumulator.sv` | final accumulating adder |
| `rtl/mpe.sv`, `rtl/exp_unit.sv` | cell and power unit |
| `rtl/fp_add.sv`, `rtl/fp_mul.sv`, `rtl/int_to_fp.sv` | floating-point units |
| `rtl/csa10.sv`, `rtl/dadda10.sv`, `rtl/ripple_adder.sv`, `rtl/full_adder.sv` | integer arithmetic |
| `tb/moment_ref_pkg.sv` | reference arithmetic: exact big integers, cut to 10 bits |
| `tb/tb_<block>.sv` | self-checking testbench per block |
| `tb/engine_check.sv` | cycle-exact checker driving one engine (used by `tb_moment_engine`) |
| `tb/tb_moment_engine_full.sv` | two full 1024x1024 frames at default parameters |

Parameters of the top are `IMG_ROWS` and `IMG_COLS` (default 1024; the
columns must be a multiple of `N_CELLS`, and both at most 2047) and
`N_CELLS` (default 4, as in the paper). The widths live in `moment_pkg`:
exponent 8, mantissa 10, coordinates 11, pixel 8, order 3, MPE latency 5.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog.

- **Arithmetic.** The CSA is checked against integer addition (corner carry
  chains plus 200k random cases). The Dadda multiplier is checked
  exhaustively (all 2^20 products). The floating-point add, multiply and
  conversion are checked against exact big-integer results cut to ten
  significant bits, including zeros and saturation.
- **Power unit and cell.** A new operand set goes in every cycle, and each
  result is checked at its exact latency.
- **Ring.** `tb_systolic_array` applies the skew itself. It runs two 50-beat
  frames back to back and checks every slot leaving the ring during each
  drain.
- **Control unit.** `tb_control_unit` checks, every cycle, the operands
  reaching each cell, `in_ready`, and the four drain controls. It uses a 3x8
  image with random gaps, so frames overlap and stall.
- **Top at reduced size.** `tb_moment_engine` runs a 16x16 and a 2x8 engine
  side by side. It compares every moment bit for bit with a cycle-exact
  model of the slots, and checks it against the exact moment within 5 %. It
  also requires that each mechanism happened at least once: feedback reuse
  of a slot, drain, stall, stream gap, a beat accepted during a drain, and a
  change of order between frames.
- **Top at default size.** `tb_moment_engine_full` runs two 1024x1024 frames
  (all-255 M77, then random M35 with gaps) with no parameter overrides. It
  checks both results bit for bit and checks the result latency. Its errors
  against the exact moment are the ones in the accuracy table above. It runs
  in about a minute and a half.

To run a testbench with Verilator (5.x), from the directory that holds `rtl/`
and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_moment_engine \
        rtl/moment_pkg.sv tb/moment_ref_pkg.sv tb/tb_moment_engine.sv
    ./obj_dir/Vtb_moment_engine

Swap in another `tb_*` name for the others. Modules are found by file name
through `-I`. `-Wno-fatal` keeps Verilator's width and lifetime warnings on
the testbench code from stopping the build.

## Not included

- **The camera** is outside the design. Its stream is the top's input.
- **Implementation figures** such as area, power and clock rate belong to a
  45 nm standard-cell implementation, which is not part of this RTL.
- **Several moments at once.** The engine computes one moment M_pq per
  frame. All 64 moments with p, q <= 7 need 64 engines or 64 passes over the
  frame; the paper does not say which it intends.
