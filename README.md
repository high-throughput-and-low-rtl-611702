# Multiple-datapath low-power FIR filter cores

These are FIR filter cores that compute

    y(n) = sum_{k=0}^{N-1} h_k * x(n-k)

with M multiply-accumulate datapaths working in parallel. The M datapaths give
throughput: each output takes ceil(N/M) clock cycles instead of N. Two ways of
ordering and splitting the multiplications save power by reducing toggling at
the multiplier inputs:

* **Coefficient segmentation (CSEG).** Each coefficient is split into a small
  non-negative part for the multiplier and a signed power of two, which is
  applied with a shifter.
* **Block processing (BP).** Each coefficient is kept on the multiplier for two
  cycles and used for two consecutive outputs, y(n) and y(n+1).
* **Combined (COMB).** Both of the above at once.

The RTL is written in synthesizable SystemVerilog. Everything is parameterized
by tap count `N` and datapath count `M`. The defaults are a 73-tap band-pass
filter on 2 datapaths, with 16-bit samples and coefficients, 16x16 Booth
multipliers and 40-bit full-precision outputs. The top level, `fir_ip_top`,
holds one core of each kind side by side.

## Core organisation

```
            +-----------+     +------+
            |   hrom    |---->| HREG |----+
            | M banks   |     +------+    |   +------------------+   +------+
 x_in ----->+-----------+                 +-->| datapath group   |-->| OREG |--> y_out
 x_valid    |   xram    |     +------+    |   | dp_cseg / dp_bp /|   +------+
 x_ready <--| circular  |---->| XREG |----+   | dp_comb          |
            +-----------+     +------+        +------------------+
                  ^  ^                               ^     ^
                  |  +------------ fir_ctrl ---------+-----+
```

`fir_core` has three pipeline stages:

1. **Fetch.** `fir_ctrl` addresses one word of every coefficient bank (`hrom`)
   and one sample per datapath (`xram`). The words are caught in HREG and XREG.
2. **Datapath.** Each datapath multiplies its pair. The datapath group adds all
   the terms to the fed-back accumulator in a single adder.
3. **Output.** OREG takes the finished sum and pulses `y_valid`.

### Splitting the taps over datapaths

With L = ceil(N/M), datapath j handles taps j*L ... j*L+L-1. The last datapath
is padded with zero coefficients up to M*L taps. The coefficient memory is
stored as M banks of L words, so one address `c` (the step) gives every
datapath its coefficient at once. For N = 73:

| M | steps per output (L) | outputs/s at 10 MHz |
|---|----------------------|---------------------|
| 1 | 73                   | 137 k               |
| 2 | 37                   | 270 k               |
| 4 | 19                   | 526 k               |
| 8 | 10                   | 1000 k              |

### Sample buffer and pointers

`xram` is a circular buffer with one write port and M read ports. The
controller writes each accepted sample at the write pointer. It keeps one read
pointer per datapath: at step c, datapath j's pointer names the slot of
x(n - j*L - c). The pointers start at fixed offsets from the newest sample and
move back one slot per step, wrapping at the buffer end. The buffer holds
N + 2B - 1 samples, where B is the block size (1 for CSEG, 2 for BP and COMB).
That covers the N + B - 1 samples of the block in progress plus B samples taken
while it runs. This is what lets the next block start straight after the
current one, so a continuous input stream gets one output every L cycles.

## Coefficient segmentation

Every coefficient h is written as h = m + s:

* s = +/-2^k is a signed power of two;
* m >= 0 is the smallest value that makes the sum exact.

Toggling at the multiplier input is lower because m is a small, never-negative
number: it lacks the sign-extension ones that a negative coefficient would
carry. s is applied without a multiplier (`seg_shift`). `xconv` forms -x, a mux
picks x or -x by the sign of s, and a shifter shifts left by k.

The rules are:

* **Positive h:** s = +2^floor(log2 h) and m = h - s.
* **Negative h:** s = -2^ceil(log2 |h|) and m = h - s.
* **Zero h:** m = 1 and s = -1, so the two branches cancel.

s is coded in 5 bits: bit 4 is the sign and bits 3:0 are k. Example: the 8-bit
coefficient 11110001 (-15) becomes m = 00000001 and s = 1_0100, i.e. -2^4.
The split is done when the design is elaborated (`fir_pkg::segment`). The ROM
holds (m, s) pairs, so the hardware does no splitting at run time. Each CSEG
datapath adds two terms, so the adder has 2M+1 inputs instead of M+1 (17
instead of 9 for M = 8). This growth is what erodes the power advantage of
segmentation at high M.

## Block processing

The coefficient stays fixed for two cycles. The sample alternates between the
one for y(n) and the one for y(n+1), which is one slot newer. For N = 6 and
M = 2, the two datapaths step through:

```
cycle:   0            1            2              3            4              5
dp 0:    h0*x(n)      h0*x(n+1)    h1*x(n-1)      h1*x(n)      h2*x(n-2)      h2*x(n-1)
dp 1:    h3*x(n-3)    h3*x(n-2)    h4*x(n-4)      h4*x(n-3)    h5*x(n-5)      h5*x(n-4)
acc:     acc0         acc1         acc0           acc1         acc0           acc1
```

acc0 builds y(n) and acc1 builds y(n+1). A single mux selects acc[sel]. Its
output feeds back into the adder through the clear gate (`clacc`), which feeds
zero on an output's first step. The same mux output also goes to the output
register. The select toggles every cycle, even between blocks. OREG takes each
finished accumulator on the next cycle in which the select points at it,
before the following block overwrites it. So y(n) is loaded 3 cycles after its
last fetch, and y(n+1) one cycle later. A block starts only with the select at
0, and blocks are 2L cycles long, so back-to-back blocks stay aligned.

COMB (`dp_comb`) is the CSEG front end (Booth multiplier on m, shifter on s)
in front of the BP pair of accumulators.

## Interface and timing (`fir_core`)

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1     | clock, rising edge |
| `rst_n`   | in  | 1     | asynchronous active-low reset; clears the sample history to zero |
| `x_in`    | in  | 16    | sample, two's complement |
| `x_valid` | in  | 1     | a sample is offered |
| `x_ready` | out | 1     | the core takes it at the edge when both are high |
| `y_out`   | out | 40    | full-precision output, no rounding |
| `y_valid` | out | 1     | one-cycle pulse per output, outputs in input order |

Parameters: `ALG` (`ALG_CSEG`, `ALG_BP`, `ALG_COMB`; default `ALG_COMB`), `N`
(73), `M` (2), and `COEFF` (N coefficients; default `fir_pkg::BP73`).

Timing:

* **CSEG on an idle core.** The output for a sample comes L + 4 cycles after
  the sample is taken.
* **BP and COMB.** Work starts once both samples of a pair are in. The pair of
  outputs comes on two consecutive cycles, 2L + 4 or 2L + 5 cycles after the
  second sample. The extra cycle is spent waiting for the select to return
  to 0.
* **Steady state.** With `x_valid` held high, CSEG gives one output every L
  cycles. BP and COMB give two outputs every 2L cycles (1 and 2L - 1 cycles
  apart). `x_ready` drops while the core has all the samples it can hold.

`fir_ip_top` has parameters `N` and `M`, and array ports indexed 0 = CSEG,
1 = BP, 2 = COMB.

## Coefficients

`fir_pkg::BP73` is a Hamming-windowed band-pass filter, in Q15, with a pass
band from 0.2 to 0.4 of the Nyquist frequency:
h[n] = round(32768 * w[n] * (sin(0.4*pi*k) - sin(0.2*pi*k)) / (pi*k)), where
k = n - 36, the k = 0 term is 0.2, and w[n] = 0.54 - 0.46 cos(2*pi*n/72). Any
other set can be passed through `COEFF`. All 16-bit values, including -32768,
are handled exactly.

## Design choices and departures

* **Flip-flop sample buffer.** The sample buffer is meant to be a latch-based
  circular buffer, which saves power. Here it uses flip-flops, so the design
  has one clock and no latches. Its function is unchanged.
* **One clock edge for both accumulators.** The block-processing accumulators
  are meant to be clocked on opposite phases of the clock. Here they share one
  edge and take turns through enables.
* **Choices of this design.** The buffer depth (N + 2B - 1), the valid/ready
  handshake, the 40-bit accumulator, the zero-coefficient coding, the
  coefficient values and the radix-4 Booth recoding are all choices of this
  design.
* **Tap order.** Each datapath steps through its taps in ascending order. The
  result does not depend on this order.
* **Not included.** The conventional core without the low-power schemes is not
  included; it served only as the reference point for power and area. Power,
  area and the effect of a clock rate are not modelled by RTL simulation.

## Files

* `rtl/fir_pkg.sv`: widths, types, the coefficient set and the segmentation
  function.
* `rtl/booth_mult.sv`: radix-4 Booth multiplier.
* `rtl/seg_shift.sv`: xconv/mux/shift branch.
* `rtl/xram.sv`: sample buffer.
* `rtl/hrom.sv`: coefficient banks.
* `rtl/fir_ctrl.sv`: controller.
* `rtl/dp_cseg.sv`, `rtl/dp_bp.sv`, `rtl/dp_comb.sv`: datapath groups.
* `rtl/fir_core.sv`: one core.
* `rtl/fir_ip_top.sv`: the three cores side by side.
* `tb/tb_<module>.sv`: a self-checking testbench per module.
* `tb/ctrl_check.sv`, `tb/core_check.sv`: reusable checkers.
* `tb/tb_fir_workloads.sv`: M = 1, 2, 4, 8 for every algorithm.

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fir_pkg.sv tb/tb_fir_ip_top.sv --top-module tb_fir_ip_top
./obj_dir/Vtb_fir_ip_top
```

What is checked:

* **Arithmetic blocks.** Exhaustive corner cases and random operands against
  reference arithmetic. The segmentation is checked against a brute-force
  search over all powers of two, and against hand-worked cases.
* **Controller.** A model tracks which sample sits in every buffer slot. For
  every fetch and every real tap, it confirms the right sample was addressed.
  It also checks the pipeline controls and the output spacing.
* **Cores.** Every output is compared with a direct convolution.
* **`tb_fir_ip_top`.** Runs the three default-size cores on 1000 random
  samples, first with random gaps, then back to back. It checks every output
  and the 37-cycle output rate, and counts each mechanism: input stalls,
  accumulator clears, second-accumulator writes, negative and positive shift
  codes, zero coefficients, padding taps and back-to-back blocks.
* **`tb_fir_workloads`.** Does the same for 1, 2, 4 and 8 datapaths, checking
  output spacings of 73, 37, 19 and 10 cycles.
