# Locally broadcast 2-D IIR/FIR filter and its cascade form

This is a 2-D recursive (IIR) image filter for raster-scanned video. It takes
one pixel per clock. No signal in it fans out to more than a handful of
neighbouring cells. Conventional direct-form 2-D filters broadcast the input
pixel `x(n,m)` to every numerator multiplier, and the output `y(n,m)` to every
denominator multiplier. Such global nets grow with the filter order and end
up setting the clock period. In this design every multiplier row gets its
own locally delayed copy of `x` and `y`. The result still has zero latency:
`y(n,m)` appears in the same clock as `x(n,m)`. The longest path is one
multiplier plus about three adders. A cascade of second-order sections,
built from the same cells, is the top level.

The filter computes

    y(n,m) = sum_{i=0..N} sum_{j=0..N} a(i,j) x(n-i, m-j)
           + sum_{i=0..N} sum_{j=0..N} b(i,j) y(n-i, m-j),      b(0,0) = 0

Here `n` is the line and `m` the pixel in the line. In raster order, one
pixel back (`z2^-1`) is one clock and one line back (`z1^-1`) is `M` clocks,
where `M` is the image width. Setting every `b(i,j)` to zero turns the same
hardware into an FIR filter.

## The regrouping that removes the broadcast

Write `F(i) = sum_j a(i,j) z2^-j` and `G(i) = sum_j b(i,j) z2^-j` for row `i`
of the coefficient matrix. Pick an integer `P` with `1 <= P <= M-1`. The
transfer function can then be nested as

    Y = [F(0)X + G(0)Y]
      + z1^-1 z2^P ( [F(1)X1 + G(1)Y1]
      + z1^-1 z2^P ( [F(2)X2 + G(2)Y2] + ... ))

with `Xk = z2^-kP X` and `Yk = z2^-kP Y`. Each of the three pieces is now
local:

* **The z^-P chains.** `X1, X2, ...` are `x` pushed through a chain of
  `P`-sample delays, and the same holds for `y`. Row `i` taps the chain at
  depth `i`. No tap drives more than the next stage and one row.
* **`z1^-1 z2^P`, a delay of `M-P` samples.** Each row's result is delayed
  by this amount and added to the row below, top row first. The
  `z2^-iP` that row `i`'s inputs carry and the `z2^+P` of each nesting level
  cancel, so row `i` ends up delayed by exactly `i` lines.
* **Row 0.** Row 0 adds `F(0)X + G(0)Y` to the delayed sum of the rows above,
  and the result is `y`. Since `b(0,0) = 0`, `y` reaches the row-0
  multipliers only through registers. There is therefore no combinational
  loop, even though `y` depends combinationally on the current `x` (through
  `a(0,0)`).

`P` changes only where the delay sits: in the `z^-P` chains (`2NP` words) or
in the line buffers (`N(M-P)` words). It does not change the result or its
quantisation.

## Blocks

| Module | Role |
|---|---|
| `pe0` | One coefficient row: `F(i)Xi + G(i)Yi` (`PE0`). |
| `pe1` | A line buffer of `M-P` words plus an adder (`PE1`): it delays the sum from above and adds this row's result. |
| `delay_line` | A delay of `DEPTH` samples, used for the `z^-P` stages and for the `PE1` line buffers. |
| `iir2d_systolic` | The order-`N` filter: `N+1` `pe0` rows, `N` `pe1`s and `2N` `z^-P` stages. |
| `iir2d_cascade` | The top level: `NS = floor((N+1)/2)` second-order `iir2d_systolic` sections in series. |
| `iir2d_pkg` | Default word lengths and sizes. |

### PE0: the row cell and its systolic transformation

Take a direct second-order row, `a0 x + a1 z^-1 x + a2 z^-2 x` plus the same
for `y`. Written plainly, it broadcasts `x` to three multipliers and needs
a register between each pair of adders. `pe0` moves one of those registers
out of the adder chain and onto the two input lines:

    tap 0 : a(i,0)*x      + b(i,0)*y          (no delay)
    tap 1 : a(i,1)*x'     + b(i,1)*y'         x' = z^-1 x, y' = z^-1 y
    tap 2 : a(i,2)*x'     + b(i,2)*y'   -> register -> added into tap 1
    out   = tap0 + tap1 + (registered tap2)

The total delay seen by tap 2 is still two: one on the line and one in the
adder chain. Each line then drives only two multipliers. The chain holds one
register instead of two, and the result leaves the cell without a register,
which is where the zero latency comes from. For orders other than 2, the
pattern repeats every two taps: a line register before taps 1, 3, 5, ...
and an adder-chain register after taps 2, 4, 6, .... Tap `j` therefore
always sees `z^-j`. This generalisation belongs to this design and is
described further under "Departures".

Row 0 is instantiated with `ROW0 = 1`, which leaves out the `b(0,0)`
multiplier. For `N = 2` the filter has `2(N+1)^2 - 1 = 17` multipliers. It
has `9 + 4P + 2(M-P) = 2M + 2P + 9` words of delay: 9 cell registers, the
`z^-P` stages and the line buffers.

### PE1 and the line buffers

Each `pe1` holds `M-P` words (511 at the defaults). They are kept in a
circular buffer: a memory plus a wrapping pointer. At each enabled clock,
the word under the pointer is read out and replaced by the new input. The
memory has no reset, so it can map to RAM. Instead, a fill flag forces the
output to zero until every word has been written once after reset. At the
ports this is exactly a shift register that was cleared by reset. The short
`z^-P` stages use the same module.

## Timing and interface

* One pixel per clock while `en` is high. When `en` is low every register,
  pointer and buffer holds its value.
* `iir2d_systolic.y` depends combinationally on `x` (zero latency).
* `iir2d_cascade` puts one register (`z^-1`) after each section. That
  register feeds the next section, and the last one drives the output. `y`
  is therefore the result for the pixel presented `NS` enabled clocks
  earlier: two clocks at `N = 4`. This keeps the critical path of the
  cascade equal to that of one section.
* `rst_n` is an asynchronous, active-low reset. It gives zero initial
  conditions: all past `x` and `y` are taken as 0.
* The coefficients `a[l][i][j]` and `b[l][i][j]` (section `l`, row `i`,
  tap `j`) are plain input ports. They must be held stable while
  filtering. `b[l][0][0]` is ignored.
* There is no line or frame boundary handling. Just as the `z^-1`/`z^-M`
  mapping implies, a tap that reaches past the start of a line sees the end
  of the previous line, and the first line sees zeros from reset. To filter
  each frame independently, reset between frames.

Top-level ports of `iir2d_cascade`:

| Port | Width | Meaning |
|---|---|---|
| `clk`, `rst_n`, `en` | 1 | clock, async reset (active low), sample enable |
| `x` | 16 signed | input pixel |
| `a`, `b` | `[NS][3][3]` x 16 signed | coefficients, 12 fraction bits (range about ±8) |
| `y` | 16 signed | filtered pixel, registered |

## Number formats

| Quantity | Format |
|---|---|
| `x`, `y` | `DATA_W = 16` bits, two's complement |
| coefficients | `COEF_W = 16` bits, `COEF_FRAC = 12` fraction bits |
| each product | full 32-bit product, arithmetic shift right by 12 (truncation), kept at 24 bits |
| partial sums, line-buffer words | `ACC_W = 24` bits, wrapping |
| `y` | the 24-bit sum saturated to 16 bits; this value is fed back and passed on to the next section |

Each product is truncated on its own and all sums wrap. As a result, the
output does not depend on the order of the additions, so the restructured
filter gives bit for bit the same output as the plain difference equation.
The testbenches rely on this. The only non-linear step is the saturation of
`y`.

## Parameters

| Parameter | Default | Where |
|---|---|---|
| `N` | 4 (`iir2d_cascade`), 2 (`iir2d_systolic`, `pe0`) | filter order; the cascade has `NS = (N+1)/2` sections |
| `M` | 512 | image width (samples per line) |
| `P` | 1 | `z^-P` step, `1 <= P <= M-1` |
| `DW`, `CW`, `CF`, `AW` | 16, 16, 12, 24 | word lengths, defaults in `iir2d_pkg` |

For an odd `N`, the last section has only a first-order `j` direction. Set
its `j = 2` coefficients to zero. The section count is the same as for the
next even `N`.

## Departures and limits

Several choices belong to this design rather than to the architecture:

* **Word lengths and overflow handling.** The word lengths, truncation,
  wrapping sums and output saturation are choices of this design. The
  architecture gives none of them.
* **Multiplier.** A low-error fixed-width multiplier would reduce roundoff
  noise. It is not included: the multipliers here are plain full products,
  truncated afterwards.
* **`M` and `P`.** The defaults `M = 512` and `P = 1` are examples. Any
  value works.
* **Section registers.** The cascade's inter-section and output registers
  add one clock of latency per section. A single section has zero latency.
* **The FIR case.** The FIR case is the IIR hardware with `b = 0`, so the
  unused `b` multipliers and `y`-line registers remain. A dedicated FIR
  build would drop them and use `(N+1)^2` multipliers.
* **PE0 for other orders.** The `pe0` register pattern for orders other
  than 2 is a straightforward extension that keeps every tap delay
  correct. For `N >= 3` it does not reproduce the `floor(N/3)` storage
  grouping given in the published delay-element count.
* **Adder order.** The adders are written in a fixed order, not as
  balanced trees. The path that ends at `y` is one multiplier, three adders
  and the output saturation. For rows 1 and up, the path into the line
  buffer is one multiplier and four adders. The architecture's critical
  period of one multiplier plus three adders assumes balanced adder trees,
  spanning a `pe0` and its `pe1` adder.
* **`b(0,0)`.** It is required to be zero. Its port is ignored rather than
  checked.

## Simulation

Every testbench is self-checking. Each compares the hardware with a direct
evaluation of the difference equation in `tb/iir2d_ref_pkg.sv`, and ends
with a `TB_RESULT checks=N failures=F` line. To run one with plain
Verilator:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/iir2d_pkg.sv tb/iir2d_ref_pkg.sv tb/tb_iir2d_cascade.sv \
        --top-module tb_iir2d_cascade -o sim
    ./obj_dir/sim

| Testbench | What it covers |
|---|---|
| `tb_delay_line` | `DEPTH` 1 and 6 against a queue, with `en` stalls. |
| `tb_pe0` | The `N = 2` cell and a row-0 `N = 4` cell against the row equation. The check is made in the same cycle. |
| `tb_pe1` | Line-buffer depths 7 and 1. |
| `tb_iir2d_systolic` | `N = 2` with `M = 8, P = 3`; `N = 3` with `M = 7, P = 1`; `N = 2` with `P = M-1`. Each runs a stable IIR, a saturating IIR and an FIR coefficient set, and outputs are checked in the same clock as their input. |
| `tb_iir2d_cascade` | End to end: `N = 4` (two sections) and `N = 6` (three sections), with stalls, saturation, FIR, a zeroed `j = 2` column, and a check of the one-clock-per-section latency. |
| `tb_iir2d_systolic_frame` | The single second-order filter at its defaults (`N = 2`, `M = 512`, `P = 1`) and with `P = 300`: one 512 x 512 IIR frame and one FIR frame, every output checked in the same clock as its input. |
| `tb_iir2d_cascade_full` | The top at its defaults (`N = 4`, `M = 512`, `P = 1`): one full 512 x 512 frame, all 262144 outputs checked, runs in a few seconds. |
