# Precision-scalable CNN accelerators for tiled inference

A convolution layer of a real network rarely fits in the small on-chip memories
of an accelerator. The usual answer is tiling. Software splits the layer into
tiles along output channels, height and input channels, and calls the
accelerator once per tile. The accelerator sums the input-channel tiles of one
output in an on-chip buffer, so partial sums never travel to external memory.

This repository holds the accelerator side of that scheme: three
loosely-coupled accelerators, for 2D convolution, depthwise convolution and
fully-connected layers. Each has the usual socket of a tile-based SoC:

- a configuration word;
- DMA read and write channels to external memory;
- a done pulse.

Its arithmetic is built on *Sum-Together* (ST) multipliers. A 16x16 multiplier
can instead compute the sum of two 8x8 products or four 4x4 products. So at 8 or
4 bits of precision, each processing element consumes two or four input channels
per clock.

The top module `cnn_acc_top` places the three accelerators side by side. They
share only the clock and the active-low reset. Each keeps its own socket, with
port names prefixed `c2d_`, `dw_` and `fc_`. In a real SoC each would sit in
its own accelerator tile. Most of this README describes the 2D-convolution
accelerator `conv2d_acc`; the other two reuse its socket, registers, memories
and arithmetic, and are described in their own sections below. All sizes are
SystemVerilog parameters. The 2D-convolution defaults give:

- 16 processing elements (PEs), one per output channel;
- an input memory of 18x18 pixels x 16 channels;
- a weight memory of 7x7 x 16 input x 16 output channels;
- a 64-bit DMA bus carrying 32-bit words.

## The ST multiplier (`st_mult`)

Both 16-bit operands are seen as four 4-bit fields, `[15:12] [11:8] [7:4] [3:0]`.
A 3-bit `cfg` selects the function:

| cfg | mode  | P |
|-----|-------|---|
| 000 | 16x16 | A[15:0]·B[15:0] |
| 100 | 16x8  | A[15:0]·B[7:0] |
| 010 | 8x8   | A[15:8]·B[7:0] + A[7:0]·B[15:8] |
| 011 | 8x4   | A[15:8]·B[3:0] + A[7:0]·B[11:8] |
| 001 | 4x4   | A[15:12]·B[3:0] + A[11:8]·B[7:4] + A[7:4]·B[11:8] + A[3:0]·B[15:12] |

A's fields are paired with B's in reverse order. That is why the packing stage
(below) writes activations and weights into their operands in opposite orders.

Details of this implementation:

- Every field is a signed two's-complement number.
- Codes 101, 110 and 111 act as 16x16.
- The unit is combinational. It computes the sub-products directly rather than
  building a shared partial-product array.

## One invocation, phase by phase (`conv2d_acc`)

A write on `conf_info` (valid/ready) starts the accelerator. `conf_info` carries
14 registers. In field order of `conf_info_t`:

| register | meaning |
|---|---|
| in_add | input pointer (word index in external memory) |
| w_add | weight pointer |
| out_add | output pointer |
| flags | bit 0 quantize (q), bit 1 accumulate (acc), bit 2 ReLU |
| n_w, n_h, n_c | input tile width, height, channels (before padding) |
| pad_stride_kern | kern[15:12], pad_type[11:8], stride[7:4], pad[3:0] |
| filt | output channels in this tile (≤ 16) |
| offset_pe_out | distance between output channels in memory |
| offset_pe | distance between filters in memory |
| options | CONFIG1[3:0] (MAC precision), CONFIG2[7:4] (output width) |
| offset_q_data | pointer to the quantization constants |
| offset_read_ci | distance between input channels in memory |

The invocation then runs these phases, in order.

1. **Load inputs.** The accelerator issues one DMA read per input channel, at
   `in_add + c*offset_read_ci`, of `n_w*n_h` words. It writes them into
   `plm_in` at `16*(18*h + w) + c`, and inserts zeros for the padding.
   `pad_type` selects which borders get `pad` zero rows/columns:
   - 0: none;
   - 1: left, right and top;
   - 2: left, right and bottom;
   - 3: left and right;
   - 4: all four.

   Types 1–3 exist for height tiling. Only the first tile of a layer has a top
   border, and only the last has a bottom border.
2. **Load weights.** One DMA read per filter, at `w_add + co*offset_pe`, of
   `kern*kern*n_c` words, into `plm_f`.
3. **Load quantization constants.** Only when q is set. One read of
   `3*filt + 2` words, in this order:
   - the weight cross-products, one per filter;
   - the input·weight scales, one per filter;
   - the scaled biases, one per filter;
   - the inverse output scale;
   - the output zero point.
4. **Packing.** `plm_in` and `plm_f` are read back and packed into 16-bit ST
   operands. The number of consecutive channels per operand depends on CONFIG1:
   - 1: four 4-bit channels;
   - 2 or 3: two 8-bit channels;
   - otherwise: one 16-bit channel.

   Input channel k goes to the k-th lowest field. Weight channel k goes to the
   k-th highest field. Missing channels (n_c not a multiple of the lane count)
   are zero. A weight word holds the operands of all 16 PEs side by side, so a
   single read feeds every PE.
5. **Compute** (`conv2d_compute`). The computation is output stationary:

   ```
   for oh, ow:                      one output pixel, all 16 PEs in parallel
     acc = acc_flag ? buf_acc[oh,ow] : 0
     for g (channel group), kh, kw: one clock each
       acc[pe] += ST(A[oh*s+kh, ow*s+kw, g], B[kh, kw, g][pe])
     buf_acc[oh,ow] = acc
     plm_out[oh,ow] = q_flag ? requant(acc) : acc
   ```

   The multiply mode is CONFIG1: 4-bit uses `001`, 8-bit uses `010` and 16-bit
   uses `000`.
6. **Store.** One DMA write per output channel, at `out_add + co*offset_pe_out`,
   of `n_w_out*n_h_out` words. Each 64-bit beat carries the result in bits
   [31:0] and `0xdeadbeef` in bits [63:32].
7. **Done.** `acc_done` pulses for one clock, and `conf_info_rdy` rises again.

The output size is:

- `n_in - kern + 1` for stride 1;
- `(n_in - kern)/2 + 1` for any other stride value (stride 2 is the only other
  one used).

### Partial sums across input-channel tiles

`buf_acc` keeps the 32-bit sums of the last invocation. A software tiling loop
that splits input channels does the following:

- It calls the first Cin tile with acc = 0 and every later one with acc = 1.
- It sets q (and ReLU) only on the last Cin tile.

Each call stores its output. Only the last call's stored output is final. The
buffer is not cleared between invocations, so two layers must not interleave
their Cin tiles.

### Re-quantization (`requant`)

When q is set, each 32-bit sum becomes a 4-, 8- or 16-bit value (CONFIG2 = 1, 2,
anything else). The formula uses integer-only affine quantization:

```
r = (acc - w_cross[co]) * sf_iw[co] + bias[co]
r = max(r, 0)                                  if ReLU
q = sat( round(r * sf_out_inv) + z_out )
```

`sf_iw`, `bias` and `sf_out_inv` are signed Q15.16 fixed point. The following
are this design's own choices, and are the place to adapt to another
quantization toolchain:

- the fixed-point formats;
- the rounding (half up);
- applying ReLU before the output scale.

## Depthwise convolution (`dwconv_acc`)

Each output channel is the convolution of one input channel with its own
kernel, so nothing accumulates across channels. The ST multiplier cannot pair
channels as in the 2D case. Instead it gets 1, 2 or 4 positions of the *same*
kernel window (16, 8 or 4 bits). The window is walked in row-major order, and
the last group is zero-filled.

- Same socket, registers, padding types, quantization and store as
  `conv2d_acc`. `filt` is ignored; output channel c comes from input channel c.
- 16 PEs, PE c works on channel c (`n_c` <= 16).
- Loads: one DMA read per channel for the input (padding inserted on chip),
  one read of all `n_c*k*k` kernel words, and, when quantizing, `3*n_c+2`
  constants (w_cross, sf_iw and bias per channel, then sf_out_inv, z_out).
- The input memory is split into four banks holding the same data, so four
  window positions are read in one clock.
- Compute: `ceil(k*k/lanes) + 3` clocks per output pixel, all channels in
  parallel.
- Store: one DMA write per channel, `n_h_out*n_w_out` words at
  `out_add + c*offset_pe_out`.
- No partial-sum accumulation (`acc_flag` is ignored).

## Fully connected (`fc_acc`)

Computes y = W x for a tile of up to `N_MAX` = 1024 inputs and 16 outputs.
Each PE (`fc_pe`) owns one output neuron and has *two* ST multipliers, so one
clock consumes 2, 4 or 8 input activations at 16, 8 or 4 bits. Missing values
at the end of the vector are zero-filled.

Register use differs from the convolutions:

| register | meaning for FC |
|---|---|
| in_add | word index of the first input activation |
| w_add | word index of W[0][first input of the tile] |
| out_add | word index of the first output |
| flags | bit 0 quantize, bit 1 continue partial sums, bit 2 ReLU |
| n_c | inputs in this tile |
| filt | outputs in this tile (<= 16) |
| offset_pe | distance in words between two rows of W (the full input length) |
| options | precision, as for the convolutions |
| offset_q_data | word index of the `3*filt+2` quantization constants |

Phases: one DMA read of the inputs, one read of `n_c` weights per output
neuron (at `w_add + m*offset_pe`), optionally the quantization constants,
operand packing, `ceil(n_c/(2*lanes))` compute clocks, then one DMA write of
`filt` words. With bit 1 of `flags` set, the sums start from the values left by
the previous invocation. A long input vector can therefore be split into
several tiles. Only the last tile should quantize.

## Timing

- Every channel is a valid/ready pair. A word moves on a rising edge where both
  are high. An offered word stays stable until it is taken; assertions in
  `conv2d_acc` check this.
- Load and store move one DMA word per clock when the socket does not stall.
- Packing takes about one clock per value read.
- Compute takes `n_grp*kern*kern + 4` clocks per output pixel, where
  `n_grp = ceil(n_c / lanes)`. The whole phase finishes
  `n_h_out*n_w_out*(n_grp*kern² + 4) + 1` clocks after its start pulse. The
  4-bit mode therefore runs a 16-channel tile four times faster than 16-bit.
- Reset `rst` is active low and asynchronous for the control state. The
  memories are not reset. The assertions use `rst` in their `disable iff`, so
  Verilator lint reports `rst` as used both synchronously and asynchronously
  (SYNCASYNCNET). This is expected.

## Memories (`plm_ram`)

All six buffers are `plm_ram` instances:

- one write port and one read port;
- synchronous read with one clock of latency;
- read-before-write;
- a per-lane write enable, which models the interleaved (banked) memories that
  let all 16 PEs write their output channel in the same clock.

| buffer | words x width | index |
|---|---|---|
| plm_in | 5184 x 32 | 16·(18·h + w) + c |
| plm_f | 12544 x 32 | 16·(16·(7·kh + kw) + ci) + co |
| A (packed inputs) | 5184 x 16 | 16·(18·h + w) + g |
| B (packed weights) | 784 x (16 x 16) | 16·(7·kh + kw) + g |
| buf_acc, plm_out | 324 x (16 x 32) | 18·oh + ow |

The input layout has a fixed row pitch of 18. A tile therefore has at most 18
padded columns, even if it has few rows.

## Files

| file | contents |
|---|---|
| rtl/conv2d_pkg.sv | shared types: conf_info_t, dma_info_t, cfg_t, constants |
| rtl/conv2d_cfg.sv | register unpacking, padded/output sizes, DMA lengths |
| rtl/st_mult.sv | ST multiplier |
| rtl/conv2d_pe.sv | PE: ST multiplier + 32-bit accumulator |
| rtl/requant.sv | output re-quantization |
| rtl/plm_ram.sv | 1R1W lane-enabled memory |
| rtl/conv2d_compute.sv | compute-phase loop nest with 16 PEs and 16 re-quantizers |
| rtl/conv2d_acc.sv | 2D convolution: socket, load/pack/compute/store controller, memories |
| rtl/dwconv_acc.sv | depthwise convolution accelerator |
| rtl/fc_pe.sv | FC processing element: two ST multipliers + accumulator |
| rtl/fc_acc.sv | fully-connected accelerator |
| rtl/cnn_acc_top.sv | top: the three accelerators side by side |
| tb/dma_mem_model.sv | external memory + DMA engine model with random stalls |
| tb/tb_*.sv | one self-checking testbench per module, plus tb_mobilenet_last (a full network layer) |

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Each has a watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl -Wno-fatal --top-module tb_cnn_acc_top \
    rtl/conv2d_pkg.sv rtl/*.sv tb/dma_mem_model.sv tb/tb_cnn_acc_top.sv
./obj_dir/Vtb_cnn_acc_top
```

Replace `tb_cnn_acc_top` with any other testbench name (use a fresh
`--Mdir` or delete `obj_dir` between builds).

`tb_cnn_acc_top` runs the whole design at its default parameters. It gives
each socket its own memory model and runs all three accelerators at the same
time: a 2D convolution (8x8x16 input, 4 filters of 3x3, at 4 bits in one tile
and at 16 bits in two input-channel tiles), a 16x16x16 depthwise layer with
3x3 kernels and padding, and a 1024-to-16 fully-connected layer in two input
tiles. It compares every output word with its own reference. It fails if any
counted mechanism never happened: each accelerator finishing, all three busy at
once, stalls on every socket, quantization, ReLU, accumulation and raw output.

`tb_mobilenet_last` runs the last convolution layer of MobileNet (3x3x256
input, 256 filters of 1x1) on `conv2d_acc` in full. The layer is split into
16 output-channel tiles x 16 input-channel tiles (256 invocations), with
partial sums kept on chip across the input-channel tiles. All 2304 8-bit
outputs are checked.

`tb_dwconv_acc` and `tb_fc_acc` test those accelerators alone, in the same
style as `tb_conv2d_acc`. They cover every precision, tiling over channels and
height (DW) or over inputs and outputs (FC), quantization and raw outputs, and
one tile at the largest sizes. They also check the exact compute cycle count on
runs without DMA stalls.

The unit tests check:

- the ST multiplier, against the product table, over all modes;
- the PE and the re-quantizer, against reference arithmetic written
  independently in the testbench;
- the memory, against a shadow array;
- the configuration decoder, against the sizes worked out by hand;
- the compute phase, against a reference convolution on packed data, including
  its exact cycle count.

`tb_conv2d_acc` runs the 2D-convolution accelerator with its default parameters. It models external
memory and a DMA engine, with random stalls on every channel. A small tiling
driver splits several layers into tiles over output channels, height (stride 1)
and input channels. After each layer, the bench compares every output word with
its own convolution at the same operand precision. The layers together exercise:

- all three precisions;
- all padding types;
- stride 2;
- accumulation across Cin tiles;
- quantization with ReLU and saturation at each output width;
- partly filled channel groups;
- socket stalls;
- one tile at the full memory sizes (18x18x16 padded input, 16 filters of 7x7).

The bench counts each of these mechanisms and fails if one never occurred. It
runs in a few minutes.

## What to trust, and known departures

- The loop orders, memory layouts, DMA transactions, padding rules, register
  fields and the ST configuration table follow the accelerator's published
  description.
- The quantization arithmetic is not defined there beyond the names of its
  constants. The formula and formats here are a reasonable standard choice, not
  a bit-exact copy of any reference model.
- Operands are packed directly into one 16-bit word per pixel and channel group.
  They are not spread over four 4-bit nibble memories. The result is the same
  operands, with fewer memories.
- The cycle schedule is this design's own: one MAC step per clock, with four
  clocks of overhead per output pixel.
- The largest network layer evaluated for this accelerator, the first
  MobileNet layer (96x96x3, 3x3 kernels), was tiled in rows of the full width
  of 96 (98 with padding). That does not fit the 18-column row pitch of
  `plm_in`. Such a layer needs either a width split in software or a larger
  `N_W_IN_MAX`. The average 8x8x16 layer, the 3x3x256→256 1x1 layer (as 16x16
  channel tiles) and any tile up to 18x18x16 / 7x7x16x16 fit the defaults.
- The DW and FC sections of the source describe changes to the 2D design, not
  full designs. The four input banks (DW), the FC register use and `N_MAX` are
  this design's own choices.
- Tiling itself is software on the host processor and is not part of the RTL.
  The testbench driver shows how the registers are set for each tile.
