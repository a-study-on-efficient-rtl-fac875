# Streaming CNN accelerator for MNIST digits, with a split-SRAM dense memory

This is a small fixed-point accelerator that classifies a 28x28 handwritten
digit. It attaches to a RISC-V SoC as an AXI4-Lite peripheral. It has two
goals:

- **Never store a feature map.** The convolution emits its outputs in the
  order the next layers consume them, so no intermediate image is ever
  buffered.
- **Split the biggest memory into SRAM macros.** The dense-layer weight banks
  can be divided into several smaller SRAM macros, with the split chosen for
  low power.

Each of the ten dense banks holds 1408 bytes. The default split is
2x512 + 256 + 128 words. Eleven other splits are one parameter change away.

The network:

| layer | shape | arithmetic |
|---|---|---|
| input | 28x28, 8-bit | signed 8-bit fixed point |
| convolution | 8 filters 3x3, output 26x26x8 | 8x8 products, exact 20-bit sum, truncated to 16 bits, + 16-bit bias |
| ReLU | 26x26x8 | |
| max-pool 2x2 | 13x13x8 = 1352 values | |
| fully connected | 1352 -> 10 | 16x8 products, exact 35-bit sum, truncated to 16 bits, + 16-bit bias |
| arg-max | digit 0-9 | replaces softmax, because only the class is needed |

All RTL is synthesizable SystemVerilog. The full-size design checks out
end to end in simulation against a bit-exact reference model.

## Data flow

```
 AXI4-Lite ──> axi_lite_if ──┬──> weight_loader ──> conv weight regs, conv biases,
                             │                       dense banks, dense biases
                             └──> input_loader ──> input_memory (784 x 8)
                                                         │ (row, col) reads
 main_controller (busy) <── loaders, conv done           v
        conv_controller + pixel registers ──> 8 x CMAC ──> 8 x accumulate/truncate
              ──> 8 x bias + ReLU ──> maxpool_unit (8 x 2x2) ──> dense_controller
              (max-pool buffer) ──> 10 x MAC, each with its own dense_mem_wrapper bank
              ──> 10 x bias ──> max_finder ──> RESULT register
```

Module hierarchy: `cnn_axi_top` contains `axi_lite_if` and `cnn_accel`.
`cnn_accel` contains:

- `weight_loader`, `input_loader` and `main_controller`;
- `input_memory`, which holds one `sram_macro`;
- `conv_unit`, made of `conv_controller`, `conv_weight_mem`, and eight each of
  `cmac`, `conv_acc`, `bias_adder` and `relu`;
- `maxpool_unit`, which holds eight `maxpool_sub`;
- `dense_unit`, made of `dense_controller` and ten each of `dense_mem_wrapper`,
  `mac` and `bias_adder`. Each `dense_mem_wrapper` is built from `sram_macro`s;
- `max_finder`.

Shared sizes, widths and types live in `cnn_pkg`.

## The convolution order and the pixel registers

This is the least obvious part of the design, and everything downstream
depends on it.

### Why the order matters

A 2x2 max-pool needs four convolution outputs: two adjacent pixels in each of
two adjacent rows. A plain raster scan would produce a whole output row before
the second row of any pooling window exists, so a row buffer would be needed.
Instead, the controller moves the 3x3 window in a zig-zag:

```
step 0: rows 0-2, cols 0-2  -> output (0,0)
step 1: rows 1-3, cols 0-2  -> output (1,0)
step 2: rows 0-2, cols 1-3  -> output (0,1)
step 3: rows 1-3, cols 1-3  -> output (1,1)   <- pooling window complete
step 4: rows 0-2, cols 2-4  -> output (0,2)
...
```

The image is covered in 13 horizontal *strips* of four input rows each:
rows 2s to 2s+3, for s = 0 to 12. Each strip produces output rows 2s and
2s+1. Within a strip the window walks left to right. At each column it first
produces the top output, then the bottom one. The four pixels of every
pooling window therefore leave the convolution back to back. Each max-pool
sub-unit needs one 16-bit register and a 2-bit counter. Each pooled word goes
straight into the dense layer.

### Pixel registers

The controller holds four 24-bit *pixel registers*, one per input row of the
current strip. Each register holds three horizontally adjacent pixels, which
is exactly one kernel row. A pixel read from the input memory is steered by
its row into one register. That register shifts: the new pixel enters lane 2
(bits 23:16), and the older ones move to lanes 1 and 0.

- **Starting a strip.** The controller reads columns 0-2 of all four rows:
  12 reads.
- **Each later column.** It reads only the four pixels of the new column.

Each compute cycle picks one register through a multiplexer and sends it to
all eight CMACs. Each CMAC does three 8x8 multiplies and two additions, and
gets one row of its own filter from `conv_weight_mem`. So an output pixel
takes three cycles, one per kernel row:

- the top output uses registers 0, 1, 2;
- the bottom output uses registers 1, 2, 3.

Once loaded, a pixel is used by up to six output pixels.

### Timing

| phase | cycles |
|---|---|
| start of strip | 12 reads + 1 wait for the last read + 6 compute |
| each of the other 25 columns | 4 reads + 1 wait + 6 compute |
| one strip | 19 + 25 x 11 = 294 |
| one image (13 strips) | 3822 |

That is 1456 input-memory reads per image, where a plain 3x3 scan would need
6084. Reading and computing are not overlapped. This keeps the controller
simple, at the cost of nearly twice the 2028 cycles (676 outputs x 3) of a fully pipelined
schedule.

### From sum to activation

`conv_acc` sums the three CMAC results at full width (20 bits). It keeps bits
[19:4] of the sum: the 4 fraction bits are dropped and the upper bits wrap.
The result is registered and comes out one clock after the third cycle. In
the next cycle, the bias adder and ReLU act on it combinationally. The result
is registered again and sent to the max-pool unit. The two outputs of one
column are three cycles apart.

## Dense layer

Each pooled word (eight channels, 16 bits each) is captured in the eight-entry
*max-pool buffer*. Over the next eight cycles, one channel per cycle goes to
all ten MACs. At the same time, the controller reads the same address from
all ten weight banks. Bank n holds the weights of output neuron n.

The weight address runs from 0 to 1351 in arrival order:
address = (pool_row x 13 + pool_col) x 8 + channel.

Pooled words arrive at least 12 cycles apart, so an eight-cycle drain never
collides with the next capture. An assertion in `dense_controller` guards
this.

After the 1352nd product, each MAC keeps bits [23:8] of its 35-bit sum (the
upper bits wrap) and adds its bias. The ten neurons then go to `max_finder`.
It compares them one per cycle and keeps the strictly larger value, so a tie
goes to the lower digit. It reports the digit and its value 10 cycles later.

## Dense weight banks: the memory breakdown

`dense_mem_wrapper` gives each bank a continuous 1408x8 address space (11-bit
address) built from `sram_macro` instances. The bank needs 1352 words;
1408 is the smallest total that these macro sizes can reach. Each macro:

- gets a chip select decoded from its address range;
- sees the address minus its base;
- drives a data-out multiplexer. The multiplexer is steered by the range
  decoded at the read, registered to match the one-cycle macro latency.

The macro list is the parameter `MACRO_DEPTH`, stacked from address 0 upwards.
Its length is set by `N_MACROS`.

| name | macros (words) | parameters |
|---|---|---|
| config0 | 1024, 256, 128 | `N_MACROS=3, MACRO_DEPTH='{0:1024,1:256,2:128,default:0}` |
| config1 | 1024, 128, 128, 128 | |
| **config2 (default)** | 512, 512, 256, 128 | addresses 0-511, 512-1023, 1024-1279, 1280-1407 |
| config3 | 512, 512, 128, 128, 128 | |
| config4 | 512, 256, 256, 256, 128 | |
| config5 | 512, 256, 256, 128, 128, 128 | |
| config6 | 512, 256, 128 x 5 | |
| config7 | 512, 256, 256, 256, 64, 64 | |
| config8 | 256 x 5, 128 | |
| config9 | 128 x 11 | `N_MACROS=11, MACRO_DEPTH='{default:128}` |
| config10 | 512, 256, 256, 128, 128, 64, 64 | |
| config11 | 512, 512, 128, 128, 64, 64 | |

Published power measurements of these splits favoured two 512-word macros over one
1024-word macro. Splitting further, into 128- or 64-word macros, costs more in
per-macro periphery than it saves in bit-line capacitance. So config2 is the
default.

`sram_macro` is a plain synchronous array model with chip select, write
enable and a registered read. For a real chip, replace its body with the
foundry macro of the same depth; the wrapper does not change. To change the
split inside the accelerator, edit the `MACRO_DEPTH`/`N_MACROS` defaults of
`dense_mem_wrapper` (or pass them down from `dense_unit`).

## Programming model

### Registers

Word-addressed AXI4-Lite registers, 32-bit data:

| offset | name | access | meaning |
|---|---|---|---|
| 0x00 | CONTROL | RW | bit 0: 0 = DATA_IN carries weights, 1 = DATA_IN carries pixels |
| 0x04 | DATA_IN | W | one weight/bias (bits 15:0) or one pixel (bits 7:0) |
| 0x08 | RESULT | R | bits 3:0 digit, bits 31:16 its neuron value (signed); reading clears RESULT_STATUS |
| 0x0C | BUSY_STATUS | R | bit 0: busy |
| 0x10 | WRITE_STATUS | R | bit 0: DATA_IN still holds a word the accelerator has not taken |
| 0x14 | RESULT_STATUS | R | bit 0: RESULT holds a new result |

Error responses:

- A DATA_IN write while WRITE_STATUS = 1 is dropped, with SLVERR.
- Writes to read-only or unmapped offsets are ignored, with SLVERR.
- Reads of unmapped offsets return 0, with SLVERR.

WSTRB is ignored. One transaction is outstanding per channel.

### Software sequence

1. After reset, BUSY_STATUS = 1. Write CONTROL = 0, then the 13610 weights
   through DATA_IN, polling WRITE_STATUS between writes. BUSY_STATUS drops
   after the last weight.
2. For each image: write CONTROL = 1, then 784 pixels in raster order. The
   accelerator raises BUSY_STATUS with the last pixel, and clears it when the
   convolution is done (3822 cycles).
3. The next image may be sent as soon as BUSY_STATUS is 0. The previous
   result arrives about 25 cycles after the convolution ends, while the new
   image loads. It is collected through RESULT_STATUS and RESULT.

### Weight order

| # | content | count |
|---|---|---|
| 1 | conv weights: filter 0-7, each 3x3 row-major | 72 |
| 2 | conv biases, channel 0-7 | 8 |
| 3 | dense weights: neuron 0-9, each 1352 weights in the address order above | 13520 |
| 4 | dense biases, neuron 0-9 | 10 |

Main weights and pixels are signed 8-bit values. Biases are signed 16-bit
values, on the scale of the sum after its truncation shift.

## Fixed point, and what to set for trained weights

Both truncation points are in `cnn_pkg`:

- `CONV_SHIFT = 4` for the convolution;
- `DENSE_SHIFT = 8` for the dense layer.

They were picked so that random 8-bit data exercises the full 16-bit range.
They are not tuned to a trained network. Where the binary point sits after
each layer depends on how the weights were quantized. Set these two
parameters, and the bias scale, to match your quantization. The accumulators
are wide enough that nothing is lost before the shift. After it, overflow
wraps (no saturation).

## Simulation

Every block has a self-checking testbench, `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
They share `tb/tb_util.svh` (clock, check task, watchdog) and
`tb/cnn_ref_pkg.sv`, a bit-exact reference model of the whole network. To run
one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/cnn_pkg.sv tb/cnn_ref_pkg.sv tb/tb_cnn_axi_top.sv --top-module tb_cnn_axi_top
./obj_dir/Vtb_cnn_axi_top
```

Notable testbenches:

- **`tb_cnn_axi_top`** runs the full-size design (no overrides) through the
  AXI port, acting as the processor:
  - loads all weights;
  - sends two random images back to back;
  - checks both digits and neuron values against the reference model.

  It also checks the busy windows and cycle counts (13 x 294 per image), and
  counts each mechanism: write-status polling, SLVERR on overflow and bad
  addresses, and the result-status clear. It takes well under a minute.
- **`tb_cnn_accel`** runs three images through the stream interface. It
  checks every result and the busy timing.
- **`tb_conv_controller`** and **`tb_conv_unit`** check the zig-zag order
  cycle by cycle against the reference convolution, plus the 1456 reads and
  3822 cycles.
- **`tb_dense_mem_wrapper`** builds all twelve bank splits side by side. For
  each it checks write/read-back and where every macro sits in the address
  space.

The testbenches use random images and weights, not a trained MNIST model. The
classification accuracy of a trained network is therefore not verified here;
only bit-exact agreement with the reference arithmetic is.

## Departures and choices beyond the original design

- The SoC (core, interconnect, AXI crossbar and protocol conversion) is not
  included. `cnn_axi_top` exposes a plain AXI4-Lite slave port and a `busy`
  pin.
- The register offsets, bit positions, the SLVERR rules, and RESULT_STATUS
  clearing on read are this design's choices. The set of six registers (three
  status, one control, one input buffer, one result buffer) is not.
- The weight stream order, the flattening order of the dense input, and raster
  pixel order are this design's choices.
- Truncation points and wrap-on-overflow are assumed (see above). So is the
  16-bit bias width.
- The convolution schedule does not overlap reads with computation. The
  design only fixes three cycles per output pixel.
- The input memory is one 784x8 macro. It could equally be split into several
  macros or built from flip-flops.
- SRAM macros are behavioural-but-synthesizable arrays. A mixed SRAM + latch
  or flip-flop standard-cell memory variant of the dense bank was considered
  and rejected as costlier. It is not provided.
- Reset is synchronous and active low throughout.
