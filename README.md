# Four-tap systolic FIR filter

This is a pipelined FIR filter for FPGAs and ASICs, built as a one-dimensional
systolic array. It computes

    y(t) = a_0 x(t) + a_1 x(t-1) + ... + a_{N-1} x(t-N+1)

on a stream of unsigned 16-bit samples and produces one new result on every
clock. It has four taps (N = 4) by default. The array is made of N copies of
one small processing element. Each element has one multiplier, one adder and
three registers, and is wired only to its neighbours. No wire runs the length
of the array, so the clock rate does not drop as taps are added.

## The processing element (`rtl/fir_pe.sv`)

Each element performs one step of the sum:

    y_out = y_in + a_i * x_in

The sample is captured in an input register. That register feeds the
multiplier and also drives `x_out`, so a sample moves one element to the right
per clock. The product is added to the incoming partial sum `y_in`, which is
not registered. The result then passes through **two** output registers before
it leaves on `y_out`, so a partial sum moves one element to the right every
two clocks.

Timing of one element, counting rising edges:

| output | value after edge t |
|---|---|
| `x_out` | `x_in` at edge t |
| `y_out` | `y_in` at edge t-1 + `coef` at edge t-1 × `x_in` at edge t-2 |

## How the array lines up samples and sums (`rtl/systolic_fir.sv`)

This is the part that takes the most thought. Samples and partial sums both
flow left to right, but at different speeds: samples take one clock per
element and sums take two. So as a partial sum moves right, it meets
successively *newer* samples. The sum starts at the left end as zero. It first
meets the oldest sample of its window, and the newest sample last, in the
rightmost element.

For this reason coefficient `a_k` (which weights `x(t-k)`) goes to element
`N-1-k`. The leftmost element gets `a_{N-1}` and the rightmost gets `a_0`. The
`coef[k]` port of the filter is indexed by `k` as in the equation, and the
reversal is done inside the module.

Counting from the edge that captures a sample:

* the newest sample of a window reaches `y_out` after N+1 clocks (5 for four
  taps);
* the oldest sample reaches it after 2N clocks (8 for four taps). The sum path
  holds 2N registers.

Together:

    y_out after edge t = sum_k a_k * x(t - (N+1) - k)

where x(e) is the sample captured at edge e. After a reset, the first result
whose whole window is real data appears 2N = 8 clocks after the first sample
is captured. From then on there is one result per clock.

The partial sum leaving each element is also brought out on `y_part[i]`, so
the intermediate sums y1, y2 and y3 can be watched. `y_part[N-1]` is the same
as `y_out`.

## Interface of `systolic_fir`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; all registers use the rising edge |
| `rst` | in | 1 | synchronous, active-high; clears every register |
| `coef[N]` | in | `COEF_W` each | `coef[k]` = a_k |
| `x_in` | in | `DATA_W` | sample, captured on every edge |
| `y_out` | out | `ACC_W` | filter output |
| `y_part[N]` | out | `ACC_W` each | partial sum after element i |

Parameters, with defaults taken from `rtl/fir_pkg.sv`:

| parameter | default | origin |
|---|---|---|
| `TAPS` | 4 | the reference four-tap filter |
| `DATA_W` | 16 | the reference 16-bit unsigned input |
| `ACC_W` | 16 | the reference 16-bit partial sums and output |
| `COEF_W` | 16 | this design's choice |

## Arithmetic

All values are unsigned. Products and sums are truncated to `ACC_W` bits,
which means they wrap modulo 2^ACC_W. With the default 16-bit sums, a window
whose true sum exceeds 65535 wraps. The reference use keeps sums small (unit
coefficients, single-digit samples). Raise `ACC_W` if you need the full range:
up to `DATA_W + COEF_W + clog2(TAPS)` bits gives an exact result.

## Reconfiguring the coefficients

The coefficients are plain input ports and may change at any clock. Partial
sums already inside the array keep the products they have collected. For 2N
clocks after a change, results therefore mix old and new coefficients. After
that they use only the new set. No loading protocol or coefficient storage is
defined; the surrounding logic must hold `coef` steady.

## Where this design departs from, or goes beyond, its source

The element structure, the four-tap chain, the 16-bit unsigned data path and
the 8-clock latency follow the reference design. The following are this
design's own choices:

* **Reset.** The reference design's registers have no reset. Here a
  synchronous reset clears them all.
* **Coefficient order.** The reversal onto the elements is derived from the
  timing analysis above. The reference example uses all-one coefficients, so
  it does not settle the order.
* **Array ends.** `y_in` of the first element is tied to zero. `x_out` of the
  last element is left unused.
* **Coefficient width and wrap-around** are not fixed by the reference design.
* **`y_part` outputs.** Exposing the partial sums is an observation aid.
* **On-chip debug.** The reference design adds vendor logic-analyzer cores
  for debugging (a controller core plus integrated analyzer cores reached over
  JTAG). They are not part of this RTL. Any on-chip analyzer can be attached
  to `x_in`, `y_part` and `y_out`.

## Verification

Both testbenches check their own results. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb/tb_fir_pe.sv` checks one element. It covers reset, the one-clock
  sample path and the three-clock product path with an isolated sample. It
  then runs about 2000 clocks of random samples, partial sums and
  coefficients against a model built from the recorded inputs.
* `tb/tb_systolic_fir.sv` runs the filter at its default size and has four
  phases:
  1. The reference series 0 2 5 7 4 8 5 5 9 9 … with all coefficients 1. Each
     partial sum is checked on every clock. The output must step through
     18 24 22 27 28 32 36.
  2. An impulse with coefficients 2 3 4 5. The output must show a_0·v exactly
     5 clocks after capture and a_3·v at 8 clocks, and zero at all other times.
  3. 2000 clocks of random data and coefficients, with a correct result checked
     on every clock against the FIR equation itself.
  4. Twenty coefficient changes during streaming, with checks resuming 2N
     clocks after each change.

  The testbench counts how often each of these happened and fails if any never
  did.

To run them with Verilator:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/fir_pkg.sv rtl/fir_pe.sv rtl/systolic_fir.sv tb/tb_systolic_fir.sv \
        --top-module tb_systolic_fir
    ./obj_dir/Vtb_systolic_fir

    verilator --binary --timing --assert -Irtl \
        rtl/fir_pkg.sv rtl/fir_pe.sv tb/tb_fir_pe.sv --top-module tb_fir_pe
    ./obj_dir/Vtb_fir_pe

`verilator --lint-only -Wall -Irtl rtl/fir_pkg.sv rtl/fir_pe.sv
rtl/systolic_fir.sv` lints the RTL without warnings.

## Changing the design

* **Taps.** Set `TAPS`. The latency becomes 2·TAPS clocks for the oldest sample
  and TAPS+1 for the newest. In the testbench, change `fir_pkg::TAPS` or the
  local parameters. The reference-series phase assumes four taps.
* **Widths.** Set `DATA_W`, `COEF_W` and `ACC_W` independently. The element
  keeps the low `ACC_W` bits of every product and sum.
* **Signed data.** This needs `signed` operands in `fir_pe` and sign
  extension in place of the zero-extending casts.
