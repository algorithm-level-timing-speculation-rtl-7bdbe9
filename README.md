# Timing-speculative convolution accelerator with checksum error detection

Running a circuit faster than its static timing analysis allows (overclocking)
usually works, but not always. When it fails, the failure is rarely a small
rounding-like error. The longest paths in an adder or multiplier are the carry
chains, so a late signal usually corrupts the *most significant* bits of a
result. That can wreck a neural network's output even when the errors are rare.
How much overclocking is safe also depends on the board, the temperature and
the data, so no fixed "safe" frequency can be found in advance.

This design makes overclocking usable for the convolution layers of a CNN by
checking every unit of work, a *tile*, with two cheap checksums:

* **sigma**, the sum of every output the accelerator produced for the tile;
* **rho**, the same sum computed *directly from the tile's inputs and weights*,
  by a small unit that needs only one multiplier.

If the two agree, the tile is accepted. If they differ, a timing error happened
somewhere in the overclocked datapath. The tile's output is thrown away, and the
host recomputes that one tile at a safe clock frequency. Tiles are independent,
so a failed tile does not stall the others. A failure costs one tile's run time
plus two clock reprogrammings.

The RTL implements the scheme from the technical report *Algorithm Level Timing
Speculation for Convolutional Neural Network Accelerators* (T. Marty, T. Yuki,
S. Derrien, Inria RT-0500, 2018). It was written independently, so where that
report leaves details open, the choices here are this implementation's own.
They are listed in the section "What is fixed by the scheme and what is chosen
here" near the end.

## Contents

| file | what it is |
| --- | --- |
| `rtl/conv_pkg.sv` | default sizes, phase enum, derived-size functions |
| `rtl/speculative_conv_system.sv` | top level: FIFOs, checksum units, kernel, comparator |
| `rtl/conv_accelerator.sv` | tiled convolution kernel (buffers, loop control, datapaths) |
| `rtl/dot_product_unit.sv` | one datapath: UN multipliers + pipelined adder tree |
| `rtl/tile_buffer.sv` | one on-chip memory bank (simple dual-port, synchronous read) |
| `rtl/input_checksum.sv` | rho from the input stream (one multiplier) |
| `rtl/output_checksum.sv` | sigma from the output stream |
| `rtl/checksum_compare.sv` | end-of-tile comparison, error verdict |
| `rtl/error_sync.sv` | verdict crossing from accelerator clock to system clock |
| `rtl/async_fifo.sv`, `rtl/sync_fifo.sv` | dual-clock and single-clock FIFOs |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/conv_accel_check.sv` | reusable driver/checker for the kernel testbench |
| `tb/clock_wizard_model.sv` | behavioural programmable clock generator (testbench only) |

## The convolution and its tiles

A convolution layer maps an input of N feature maps to M output maps through
K x K kernels. With unit stride:

    y[m][r][c] = sum_{n<N} sum_{i<K} sum_{j<K} w[m][n][i][j] * x[n][r+i][c+j]

The accelerator computes it one tile at a time. A tile covers TM output maps,
TN input maps and a TR x TC patch of output positions, so it needs a
(TR+K-1) x (TC+K-1) patch of each input map. The default sizes are those of a
small FPGA build for the fifth convolution layer of AlexNet (N=192, M=128,
13x13 output, K=3):

| parameter | default | meaning |
| --- | --- | --- |
| `WL` | 16 | word length of every value (inputs, weights, outputs, checksums) |
| `K` | 3 | kernel size |
| `TM`, `TN` | 32, 32 | output / input maps per tile |
| `TR`, `TC` | 13, 13 | output rows / columns per tile |
| `UM` | 8 | replicated datapaths (output maps computed in parallel) |
| `UN` | 8 | multipliers per datapath (input maps consumed in parallel) |

A tile produces *partial* sums over its own TN input maps. The layer above
needs 192/32 = 6 channel tiles per output block. Adding their partial sums is
left to the system, for example to the host or a following tile-accumulation
step. Each tile is checked on its own.

## The checksum identity (how rho avoids doing the convolution)

Summing the outputs of a tile and substituting the convolution gives

    sigma = sum_{m,r,c} y[m][r][c]
          = sum_{n,i,j} ( sum_{r<TR, c<TC} x[n][r+i][c+j] ) * ( sum_m w[m][n][i][j] )
          = sum_{n,i,j} X[n][i][j] * Wsum[n][i][j]  =:  rho

Two rearrangements make rho cheap:

1. **Factorization.** The weight w[m][n][i][j] multiplies the same group of
   inputs for every output position. So the inputs of each group can be summed
   first, and each sum is multiplied once. The m dimension collapses too:
   the kernels applied to the same input can be added up before the multiply.
   A tile then needs TN*K*K = 288 multiplications instead of TR*TC = 169 times
   as many.
2. **Reuse in the sums.** X[n][i][j] is the sum of a TR x TC window of input
   map n shifted by (i, j). Neighbouring windows share almost everything.
   Moving the window one column right adds one column and removes another.
   Moving it one row down adds one row and removes another.

`input_checksum` does both while the tile streams past, one input word per
cycle, and never stores the input maps:

* **Weights.** While the weights stream by, `Wsum[n][i][j]` is accumulated
  over m in a TN*K*K-word table.
* **Row window sums.** For input row a of map n, the unit forms the K window
  sums `S_a[j] = sum_{c<TC} x[n][a][c+j]`. It sums the first TC words, and then
  each further word gives the next window in one step:
  `S_a[j] = S_a[j-1] + x[n][a][TC-1+j] - x[n][a][j-1]`. The first K-1 words of
  the row are kept for the subtraction. At most one window sum is finished per
  input word.
* **Column reuse.** `X[n][0][j]` is the sum of `S_a[j]` over rows
  a = 0..TR-1. After that, `X[n][i][j] = X[n][i-1][j] + S_{TR-1+i}[j] - S_{i-1}[j]`,
  so the window sums of the first K-1 rows are kept. At most one X is finished
  per input word, and they come out in (n, i, j) order.
* **Multiply-accumulate.** Each finished X is multiplied by its `Wsum` entry.
  The X values arrive in the same order as the table, so a simple counter
  addresses it. A single multiplier suffices.

The unit's storage is the weight-sum table plus K-1 input words, (K-1)*K row
window sums and K column sums. `rho_valid` rises three clock edges after the
edge that accepts the tile's last input word. That is long before the kernel has finished
computing, so the check adds no latency.

`output_checksum` is the easy side. It adds the UM words of each output beat
with an adder tree and accumulates the sums over the tile.

### Why the comparison is exact

Every value has the same word length WL, and every product and sum wraps
modulo 2^WL, in the datapath and in both checksum units alike. Integer addition
and multiplication modulo 2^WL obey the same distributive and associative laws
as ordinary arithmetic, so rho == sigma holds bit for bit for every error-free
tile. A single flipped bit in any output changes sigma by ±2^b, which is
never 0 modulo 2^WL, so every single-bit output error is detected. A multi-bit
error can cancel out in the sum with small probability.

There is one consequence to keep in mind. Values are treated as WL-bit integers
with wrap-around, so this RTL has no fixed-point rescaling step, such as a right
shift after the multiplication. A rounding step between the products and the
sums would break the identity. Such scaling belongs after the tile, for example
when the partial sums are combined.

## System structure and clock domains

    clk_sys (safe)             | clk_acc (speculative, from a programmable clock generator)
                               |
    s_in  --> async_fifo ------+--> input_checksum --> sync_fifo --> conv_accelerator
                               |          | rho                            |
                               |   checksum_compare <-- sigma --+          |
                               |          |                     |          v
    s_out <-- async_fifo <-----+----------+----- output_checksum <-- sync_fifo
                               |          |
    tile_done / tile_error <---+-- error_sync

* Only the accelerator side is overclocked. Transfers to and from memory run
  on `clk_sys` at a safe frequency. The asynchronous FIFOs (Gray-coded
  pointers, two-flop synchronizers) are the only data path between the two
  clocks, so `clk_acc` can change frequency without the system side noticing.
* Both checksum units are *taps* on the streams. Data, valid and ready pass
  straight through, and the units only watch transferred beats. They never
  stall the stream.
* The checksum units run on the overclocked clock as well. A timing error
  inside them shows up as a false alarm, which costs one recomputation, or
  in rare cases as a missed error. The report that this design follows places
  them the same way.
* `checksum_compare` waits until both checksums of a tile are in, in either
  order, and issues one verdict. `error_sync` carries it across to `clk_sys`
  as a one-cycle `tile_done` strobe with `tile_error`.

### Tile stream formats

Input stream `s_in` carries one WL-bit word per beat:

1. TM*TN*K*K weights, in (m, n, i, j) order, j fastest;
2. TN*(TR+K-1)*(TC+K-1) inputs, in (n, row, column) order, column fastest.

Output stream `s_out` carries UM words per beat, TM/UM*TR*TC beats in
(m-block, r, c) order. Word u of a beat (bits `u*WL +: WL`) is output map
`m-block*UM + u`.

`tile_done` pulses a few system cycles after the tile's last output beat has
left the accelerator. The FIFOs and checksum units find tile boundaries by
counting, so the sender must always send complete tiles.

### What the host does with a verdict

The recovery policy is software and is not part of the RTL.
`tb/tb_speculative_conv_system.sv` acts it out:

1. Stream tiles at the overclocked frequency and keep the outputs of each tile
   until its verdict arrives.
2. On `tile_error = 1`, discard that tile's outputs. Reprogram the clock
   generator to the safe frequency, send the same tile again, then reprogram
   the generator back to the overclocked frequency.

Reprogram the clock only between tiles, while the accelerator is idle and
waiting for weights. The clock generator in the testbench stops its output
while it relocks, which the design tolerates in that state.

## The convolution kernel

`conv_accelerator` has three kinds of parallelism:

* each of the UM `dot_product_unit`s multiplies UN input maps by their weights
  in the same cycle and adds the products in a registered adder tree (unrolling);
* the datapaths are pipelined, so a new output position enters every cycle;
* the UM datapaths are replicas. They see the same inputs and apply
  different kernels (different output maps).

A tile passes through five phases, visible on `acc_phase`:

| phase | cycles (accelerator clock) | what happens |
| --- | --- | --- |
| LOAD_W | TM*TN*K*K (9216) when fed every cycle | weights go to UM*UN banks; bank (m%UM, n%UN) |
| LOAD_X | TN*(TR+K-1)*(TC+K-1) (7200) | inputs go to UN banks; bank n%UN |
| COMPUTE | TM/UM * TN/UN * K*K * TR*TC (24336), exactly | one loop iteration per cycle |
| DRAIN | DLAT + 3 | last sums written back |
| STORE | TM/UM*TR*TC (676) beats when not stalled | output banks streamed out |

The compute loop nest is (m-block, n-block, i, j, r, c) with c fastest. Each
iteration reads UN input words, one per input bank and all from the same
address, and UM*UN weights, one per weight bank. Datapath u adds its result to
output bank u at position (m-block, r, c). The adds for n-block 0 with i = 0,
j = 0 overwrite the bank instead, which clears the previous tile's data. The
output banks are updated by read-modify-write. The read is issued one cycle
before the datapath result arrives, and the write follows in the next cycle.
An address comes back only TR*TC cycles later, so no forwarding is needed
(TR*TC >= 2 is required and asserted).

The datapath latency is `DLAT = 1 + ceil(log2(UN))` (4 for UN = 8). An
assertion checks that the datapath's valid bit and the address tag that travels
alongside it stay aligned.

In STORE, the output banks' read registers serve as the output register.
A bank is read only when the stream can take a beat, so back-pressure stalls
the phase without dropping or repeating a beat.

The phases run one after another: the kernel does not load the next tile while
it computes the current one. Load/compute overlap comes from the FIFOs in
front of the kernel, which fill with the next tile's words. With the default
FIFO depths that overlap is small.

## Throughput and size at the defaults

* One tile computes 32*32*9*169 = 1,557,504 multiply-accumulates in
  24,336 cycles, which is 64 per cycle.
* Memory: 147,456 bits of weights + 115,200 bits of inputs + 86,528 bits of
  outputs in the kernel, 4,608 bits of weight sums in `input_checksum`, and the
  FIFOs. In total about 363 kbit.
* The error-detection cost is one multiplier, a handful of adders, the
  288-word weight-sum table and a few dozen registers. Compare that with the
  64 multipliers of the kernel.
* AlexNet conv5 runs as (128/32)*(192/32) = 24 tiles. conv3 (N=256, M=384)
  and conv4 (N=384, M=384) run as 96 and 144 tiles. All three have 13x13
  outputs and K=3, and every dimension is a multiple of the default tile.
* A build with a whole-layer tile, for example TM=128, TN=192 with UM up to 32
  and UN=16 as on a larger FPGA, needs those parameters set explicitly. The
  default buffers hold 9,216 weights, not 221,184.

## What is fixed by the scheme and what is chosen here

Taken from the scheme this RTL implements:

* overclocked kernel behind asynchronous FIFOs, with the memory side on a safe clock;
* input- and output-checksum units placed on the input and output streams;
* the checksum formula, with its factorization over i, j, the summation over
  m, and the row/column reuse;
* a single multiplier for rho, and an accumulator with a parallel adder for sigma;
* a comparison per tile, with recomputation at a safe frequency on mismatch;
* the kernel structure: UN-way unrolled multipliers with an adder tree, UM
  replicas, and weight, input and output buffers;
* the tile and unroll sizes and the 16-bit word length of the default build.

Chosen here, because the scheme does not fix them:

* integer arithmetic modulo 2^WL everywhere, with no fixed-point rescaling;
* stream formats and orders, and tile boundaries found by counting;
* one word per beat on the input stream. A faster kernel would need wider
  input beats, and `input_checksum` would then have to take several words per
  cycle. That is not built here;
* buffer banking, the loop order and the pipeline depth of the kernel;
* load, compute and store running one after another inside the kernel, with
  no double buffering;
* FIFO depths of 16, and the toggle synchronizer for the verdict;
* reset style: one asynchronous active-low reset per clock domain.

Not covered:

* Strides other than 1. The checksum reuse changes for strided windows, and
  it is not implemented.
* Padding at the layer border.
* Accumulation of partial sums across channel tiles.
* Activation and pooling layers.
* Fully connected layers.
* The programmable clock generator, the DMA and data mover, and the host. The
  top exposes the streams and takes `clk_acc` as an input.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. They are
self-checking against models computed in the testbench itself. The models are
direct evaluations of the convolution or the checksum sum, or queue models for
the FIFOs. Each testbench has a watchdog.

With Verilator 5, from the repository root:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
      -y rtl -y tb +libext+.sv -Irtl --top-module tb_speculative_conv_system \
      rtl/conv_pkg.sv tb/tb_speculative_conv_system.sv -o sim
    ./obj_dir/sim

Replace the top module for the other testbenches, for example
`tb_conv_accelerator` or `tb_input_checksum`.

| testbench | what it shows |
| --- | --- |
| `tb_speculative_conv_system` | whole design at the defaults. A clean tile, then a tile with an imitated timing error (bit 15 of one output word flipped inside the output buffer) that is detected, recomputed at the safe clock and accepted, then two tiles back to back. Also checked: every output word, the exact COMPUTE length, and that clock reprogramming, input back-pressure and output back-pressure all occur. Simulates in seconds; the Verilator build takes a few minutes. |
| `tb_alexnet_conv5` | a whole AlexNet-conv5-sized layer (N=192, M=128, 13x13, K=3) at the defaults: 24 tiles streamed back to back at the overclocked frequency. The testbench adds up the partial sums of the channel tiles; all 21,632 outputs are compared with a direct evaluation, all 24 verdicts must be clean, and COMPUTE must total 24 x 24,336 cycles. |
| `tb_conv_accelerator` | kernel in four configurations (including UN=UM=3 with K=2, UN=UM=1, and 8-bit words with UN=16), random stalls on both streams; every output word and the exact COMPUTE length are checked |
| `tb_input_checksum` | rho against a brute-force sum of all outputs: a small non-square tile and the full default tile |
| `tb_output_checksum` | sigma values, timing, and stream pass-through under stalls |
| `tb_checksum_compare`, `tb_error_sync` | verdict pairing in any order; verdicts across clocks of either speed ratio |
| `tb_async_fifo`, `tb_sync_fifo`, `tb_tile_buffer`, `tb_dot_product_unit` | the building blocks |

A timing error cannot happen in an RTL simulation. The end-to-end testbench
imitates one by writing into the output buffer through a hierarchical
reference after the tile has been computed.

## Lint notes

Verilator reports `SYNCASYNCNET` on the resets. The registers use them
asynchronously, while the `disable iff` clauses of the concurrent assertions
sample them synchronously. The warning is expected and does not affect the
hardware.
