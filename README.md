# Sliding-window 3x3 convolution unit

A small, run-time configurable convolution engine for CNN inference on an FPGA.
One unit convolves **one input channel** of any height and width with **one 3x3
kernel** at stride 1 with zero padding, reading the input map and the weights
from external RAM and writing the output map back there. Nothing about the layer
shape is fixed in hardware: height, width, padding, kernel size and addresses are
given per run, so a new network needs new weights and a new configuration, not a
new bitstream.

The idea is the classic sliding window: bring three input rows on chip, move a
3x3 register window along them one column per cycle, and produce one
multiply-accumulate result (nine products summed) per cycle once the pipeline is
full.

The design follows a published HLS-based convolution unit (a sliding-window
"convolution computation unit" with 32-element row buffers, a 3x3 window, nine
multipliers feeding an adder tree, and 16-bit data). That description gives the
block structure, the buffer sizes and the nine-stage datapath; it does not give
a memory protocol, a number format, how rows wider than the buffer are handled,
or how other kernel sizes are addressed. Those are choices made here and are
listed in [Departures and choices](#departures-and-choices).

## How a layer is computed

```
 external RAM                        on chip
 +-----------+   rows r..r+2,   +-------------+  1 column   +--------------+  1 result  +-------------+
 | input map | --------------> | line_buffer  | ----------> | window_mac   | ---------> | output_     |
 | kernel    |   32 columns    | 3 x 32 words |  per cycle  | 3x3 window,  |  per cycle | buffer      |
 | output map| <-------------- +-------------+             | 9 mult, tree |            | 32 words,   |
 +-----------+   n results                                  +--------------+            | final adder |
       ^                                                                                 +-------------+
       +------------------------------- ccu_ctrl (sequencing, addresses, weights) -------------+
```

For an output map of `out_h x out_w` the controller (`ccu_ctrl`) does:

1. **Weights.** Read w0..w8 (row-major) into registers.
2. For every output row `r`, and for every **segment** of at most 30 outputs
   starting at column `c0`:
   - **LOAD** – fill the three row buffers with the input words the segment
     needs: rows `r-pad .. r-pad+2`, columns `c0-pad .. c0-pad+n+1`, where `n`
     is the number of outputs in the segment. That is at most 32 words per row,
     exactly the buffer size. Words that fall in the zero padding are written as
     zeros without touching memory. In accumulate mode the `n` output words
     already in RAM are also read into the output buffer.
   - **COMP** – read one buffered column per cycle (`n+2` cycles) and shift it
     into the window. From the third column on, every shift completes a 3x3
     patch, and the result enters the pipeline.
   - **FLUSH** – wait for the last result to leave the pipeline (8 cycles).
   - **DRAIN** – write the `n` output words to RAM.
3. Pulse `done`.

The row buffer holds 32 words, so one segment covers 30 outputs. A row wider
than that is cut into overlapping segments: neighbouring segments share two
input columns, which are loaded twice. All three rows are reloaded for every
output row and every segment. No row is kept for the next output row, so each
input word is read about three times. This keeps the control simple and matches
the original unit's behaviour, where the three rows are refilled for each output
row. It is also the main reason why the unit is memory-bound (see
[Timing](#timing)).

## The window pipeline

`window_mac` is the arithmetic core. The stage split is the original design's
nine-cycle picture, with the last stage in `output_buffer`:

| cycle | hardware | what happens |
|-------|----------|--------------|
| 1–3 | `win[k][0..2]` | a column enters on the right, the window shifts left; after 3 shifts `win[k][j]` = input(r+k, c+j) |
| 4 | `prod[0..8]` | nine products `win[k][j] * w[3k+j]`, registered |
| 5 | `lvl1[0..3]` | four adders: (p0+p1) (p2+p3) (p4+p5) (p6+p7); p8 is delayed |
| 6 | `lvl2[0..1]` | two adders |
| 7 | `lvl3` | one adder |
| 8 | `res_sum` | add the delayed p8, then shift right by the fraction bits |
| 9 | `output_buffer` | `entry <= sat(old + res)` (accumulate mode) or `sat(res)` |

The unit computes cross-correlation, as CNN frameworks do:
`out[r][c] = sum_{k,j} w[3k+j] * in[r+k-pad][c+j-pad]`.

The window holds no state that needs clearing between segments. The controller
raises `col_emit` only from the third column of a segment, so stale columns never
produce a result. A result travels with its output index (`col_tag`/`res_tag`),
so the output buffer knows where to put it. Results appear 6 cycles after the
column that completes their patch. The pipeline sustains one result per cycle.

## Number format

Data and weights are 16-bit two's-complement fixed point with `FRAC_BITS = 8`
fraction bits (Q7.8). The original reports "16-bit precision" but gives no
format, so Q7.8 is a choice made here. Products (32 bits) and the nine-term sum
(36 bits) are exact. The sum is shifted right arithmetically by 8 (floor), added
to the old output word in accumulate mode, and saturated to 16 bits.

## Configuration and use

`ccu_pkg::ccu_cfg_t`, sampled in the cycle where `start` is high (with `busy` low):

| field | meaning |
|-------|---------|
| `in_base` | word address of the input map, row-major, `height*width` words |
| `w_base` | word address of the 9 weights, row-major |
| `out_base` | word address of the output map, row-major, `out_h*out_w` words |
| `height`, `width` | input map size (16 bits each) |
| `pad` | zero padding on every border, 0..3 |
| `ksize` | size of the whole kernel; `out_h = height + 2*pad - ksize + 1` (same for `out_w`) |
| `sub_r`, `sub_c` | offset of the 3x3 piece being applied inside a larger kernel |
| `acc` | 1: add the results to the output map already in RAM |

For a plain 3x3 layer, set `ksize = 3`, `sub_r = sub_c = 0` and `acc = 0`. A
configuration with no output finishes right after the weights are read.

**Several input channels.** Run the first channel with `acc = 0` and each
further channel, with its own kernel, with `acc = 1`. The channels sum into one
output map.

**Kernels smaller than 3x3.** Store a 3x3 kernel whose extra weights are zero,
and set `ksize` to the true size so the output map has the right shape.

**Kernels larger than 3x3.** Zero-fill the kernel to a multiple of 3, for
example 5x5 to 6x6. Apply it as 3x3 pieces at `(sub_r, sub_c) = (0,0), (0,3),
(3,0), (3,3)`, one run per piece, with the real `ksize` and `pad`. Use `acc = 1`
for every run after the first. Each run rounds and saturates on its own, so the
result can differ in the last bit from a single-pass convolution. The testbench
models exactly this behaviour.

## External memory port

There is one word-wide port, and the unit is always its master:

- A request (`mem_req`, `mem_we`, `mem_addr`, `mem_wdata`) is held unchanged until
  `mem_gnt` is high. The transfer happens in that cycle. An assertion checks this
  rule.
- Read data returns on `mem_rvalid`/`mem_rdata` in request order, any number of
  cycles later. It is always accepted.
- Reads are pipelined: the LOAD phase issues one request per cycle while earlier
  reads are still in flight.
- Writes are posted. The unit raises `done` once the last write has been granted.

Addresses are word addresses (32 bits). Any memory, or a bridge to a bus such as
AXI or Avalon, that follows these rules will work.

## Timing

With a memory that always grants and answers reads after a fixed `L` cycles, a
layer takes exactly

```
cycles = 10 + L + sum over all segments of (5*n + 18 + L)        (n = outputs in the segment, <= 30)
```

counted from the `start` pulse to the `done` pulse. In accumulate mode, add `n`
per segment. Per segment, `3*(n+2)` cycles go to LOAD, `n+2` to COMP and `n` to
DRAIN. So only about one cycle in five is spent computing. The memory port,
not the multipliers, sets the speed.

Single-channel 3x3 layers, padding 1, `L = 4`, at 100 MHz, counting 18
operations per output (`2*9*H*W`). The last two columns are the cycles and GOP/s
reported for the original HLS implementation, for comparison:

| map | cycles (this RTL) | GOP/s | cycles (original) | GOP/s (original) |
|-----|------------------:|------:|------------------:|-----------------:|
| 7x7 | 413 | 0.214 | 1433 | 0.062 |
| 14x14 | 1302 | 0.271 | 3938 | 0.09 |
| 28x28 | 4550 | 0.310 | 10174 | 0.139 |
| 56x56 | 18158 | 0.311 | 42568 | 0.133 |
| 112x112 | 72590 | 0.311 | 172815 | 0.131 |
| 224x224 | 290318 | 0.311 | 812774 | 0.111 |

The two are not directly comparable: the original ran on an HLS-generated
circuit with its own memory system. The shape of the curve is similar. Small
maps pay the fixed cost per row, and large maps level off, bounded by the
reloading of rows.

## Departures and choices

Taken from the original design: the single-channel 3x3 sliding-window unit;
three row buffers of 32 elements; a 32-entry output buffer; the nine-multiplier,
4-2-1-1 adder-tree pipeline with a final accumulate into the output row; 16-bit
data; stride 1; padding; zero-filled weights for small kernels; sums of pieces
for large kernels; reloading three rows per output row.

Chosen here (the original is silent):

- Q7.8 fixed point, floor rounding and saturation.
- The memory protocol above.
- Cutting wide rows into 30-output segments with a two-column overlap.
- The configuration struct, including `ksize`, `sub_r`/`sub_c` and `acc`. In
  accumulate mode the old outputs are preloaded into the output buffer.
- No overlap between LOAD, COMP and DRAIN, and no reuse of rows between output
  rows.
- Asynchronous active-low reset of control state only. The buffers and the
  datapath registers are not reset, because they are always written before
  they are read.

Not included:

- Running several units in parallel over channels, with shared inputs or atomic
  output updates. The original leaves this open.
- The external DRAM. `tb/ext_mem_model.sv` is a behavioural stand-in for the
  testbenches.

## Files

| file | contents |
|------|----------|
| `rtl/ccu_pkg.sv` | widths, buffer length, configuration struct, saturation function |
| `rtl/sliding_window_ccu.sv` | top: the four blocks wired together |
| `rtl/ccu_ctrl.sv` | sequencer, address generator, weight registers |
| `rtl/line_buffer.sv` | three row RAMs, one column read per cycle |
| `rtl/window_mac.sv` | 3x3 window, multipliers, adder tree (cycles 1–8) |
| `rtl/output_buffer.sv` | output row RAM with the final saturating adder (cycle 9) |
| `tb/ext_mem_model.sv` | behavioural external RAM: fixed latency, random grant stalls |
| `tb/tb_*.sv` | self-checking testbenches, one per block, plus `tb_ccu_vgg` |

Parameters: `ROW_LEN` (32) on the top and the blocks, and `DATA_W`,
`FRAC_BITS`, `BUF_LEN` and the field widths in `ccu_pkg`. `ROW_LEN` can be
changed freely. The saturation code follows `DATA_W`. The testbenches' reference
models assume 16-bit data and 8 fraction bits.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Each has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sliding_window_ccu \
    rtl/ccu_pkg.sv rtl/ccu_ctrl.sv rtl/line_buffer.sv rtl/window_mac.sv \
    rtl/output_buffer.sv rtl/sliding_window_ccu.sv tb/ext_mem_model.sv tb/tb_sliding_window_ccu.sv
./obj_dir/Vtb_sliding_window_ccu
```

For the single-block testbenches, compile `ccu_pkg.sv`, the block and its
testbench. `tb_ccu_ctrl` also needs `ext_mem_model.sv`.

| testbench | what it checks |
|-----------|----------------|
| `tb_line_buffer` | random writes and column reads against a shadow copy, including read-during-write |
| `tb_window_mac` | values, tags and the exact 6-cycle latency against a reference; 30 results back to back |
| `tb_output_buffer` | load, overwrite and accumulate with saturation in both directions |
| `tb_ccu_ctrl` | per segment: weights, buffered rows with padding, preloaded outputs, column order, emitted tags, write addresses and data, no write before the pipeline is empty; includes pieces of 5x5 and 7x7 kernels |
| `tb_sliding_window_ccu` | end to end against a reference convolution with a stalling memory: padding 0–3, one and several segments per row, an empty layer, two channels accumulated, saturation, and 1x1, 2x2, 5x5 and 7x7 kernels; checks that each segment's results arrive as one unbroken run, and that each of these mechanisms happened |
| `tb_ccu_vgg` | default parameters, the VGG-16 map sizes 7x7 to 224x224: every output word, plus the cycle formula above (well under a second in Verilator) |
