# FPQNet: a LeNet-5 accelerator that processes images like a video stream

This is a fully pipelined, quantized LeNet-5 handwritten-digit classifier written in
synthesizable SystemVerilog. It has no shared compute array and no instruction
scheduler. Every layer of the network is its own piece of hardware, and they are
chained like stages of a video pipeline. Pixels enter one per clock with
display-style timing (vsync, hsync, data-enable). Each layer consumes its input
while the input is still arriving. The class of an image is therefore known a few
hundred clocks after its last pixel, not after a full layer-by-layer pass.

Three choices keep the hardware small:

* The input image is binary (1 bit per pixel). The first convolution therefore
  needs only selectors ("add the weight if the pixel is 1"), not multipliers.
* The sigmoid is replaced by a step function (output 1 if the sum is > 0, else 0).
  Every activation is therefore a single bit.
* Weights and biases are 8-bit signed integers and all of them are held on chip.

Ten identical kernels run side by side, each classifying its own image, fed in lock
step from a 512-bit host stream.

## Network

| Layer | Operation | Output | Hardware |
|---|---|---|---|
| input | 28x28 binary image | 28x28x1 | video timing generator |
| C1 | 5x5 conv, 1 -> 6 channels, bias, step | 24x24x6 bits | `conv_layer` (selectors) |
| S2 | 2x2 mean pooling, stride 2 | 12x12x6, values 0..4 | `mean_pool` |
| C3 | 5x5 conv, 6 -> 16 channels, bias, step | 8x8x16 bits | `conv_layer` (3-bit x 8-bit multipliers) |
| S4 | 2x2 mean pooling | 4x4x16, values 0..4 | `mean_pool` |
| flatten | 16x4x4 -> 256-element vector | 256 x 3 bits | `linear_mapping` |
| F5 | fully connected 256 -> 120, bias, step | 120 bits | `fc_layer` |
| F6 | fully connected 120 -> 84, bias, step | 84 bits | `fc_layer` |
| F7 | fully connected 84 -> 10, bias, no activation | 10 signed sums | `fc_layer` |
| argmax | index of the largest F7 sum | 4 bits | `find_max` |

The pooled value is the number of ones in the 2x2 window (0..4). This is 4x the
mean, which only scales the C3 and F5 weights and needs no division. F7 has no
activation, because only the position of its largest output matters. On a tie the
lower index wins.

## The video-timing pipeline (the key idea)

Every layer boundary carries the same control struct, `video_ctrl_t`
(`vsync`, `hsync`, `de`), plus the layer's data bits. A layer never counts pixels
from the start of memory. Instead, `frame_pos` rebuilds the row and column of the
current pixel from the sync edges:

* vsync resets the row counter.
* A rising hsync that follows a line which carried data advances the row.
* de advances the column.

### Convolution (`conv_layer`)

* Each input channel keeps K-1 line FIFOs (`line_fifo`, one image line deep) and a
  KxK window of registers. The window always holds the neighbourhood of the newest
  pixel.
* Once row >= K-1 and column >= K-1, a valid output exists.
* For every output channel, all `IN_CH*K*K` products (or selections, for 1-bit
  input) go through one `adder_tree` in the same clock, together with the bias.
  The sign decides the output bit.
* Window column `K-1-kx` holds image offset `kx`, so weight `(ky,kx)` multiplies
  pixel `(y+ky, x+kx)`. This is correlation, as in the usual framework definition
  of a convolution layer.
* The output carries the same sync signals, delayed by the layer latency of 2
  clocks, with de masked to the positions that produce an output.
* A layer's output is therefore again a video stream, with "holes" in de. The next
  layer needs no change to consume it.

### Pooling (`mean_pool`)

One line FIFO plus a 2x2 window. It emits on odd rows and odd columns. Latency is
2 clocks.

### Flatten (`linear_mapping`)

The S4 output arrives spread over the frame. It is written into a small RAM per
channel at `row*4+col`. One clock after the last S4 pixel, the 256 elements leave
one per clock in channel-major order: `n = c*16 + y*4 + x`. A one-clock `vs` pulse
marks the start of the vector.

### Fully connected layers (`fc_layer`)

* Each output neuron has its own multiplier and accumulator. The whole layer takes
  one input element per clock.
* The weight column for the current input index is read from an on-chip weight
  array with a synchronous read.
* The accumulators clear on `vs`.
* Two clocks after the last element, the bias is added (plus the step function in
  F5 and F6). The results are loaded into a shift register and then leave one per
  clock, preceded by a `vs` pulse. The next layer therefore sees the same vector
  protocol.

### Latency

Counted from the clock edge that takes in the last pixel of the image to
`class_valid` of `find_max`:

```
C1 2 + S2 2 + C3 2 + S4 2 + flatten 2 + F5 (256+3) + F6 (120+3) + F7 (84+3) + argmax 10 = 489 clocks
```

At the 250 MHz of the reference FPGA build, this is 1.96 us. A whole frame with
porches is 34x31 = 1054 clocks (4.2 us). The published per-image latency of 9.32 us
also includes the host link, which is not modelled here. The kernel testbench checks the
489-clock figure exactly.

## System around the kernels (`fpqnet_top`)

```
512-bit host stream -> axi_serializer -> 16-bit words -> data_converter --params--> all kernels
                                                      \--pixels--> hdmi_timing_gen -> 10 x lenet_kernel
10 x class index -> result_collector -> 40-bit result word (valid/ready) -> host
```

### `axi_serializer`

Splits each 512-bit beat into 32 16-bit words, lowest word first, with valid/ready
on both sides. An assertion checks that the upstream holds its beat while it is
stalled.

### `data_converter`, `mode = 0` (parameters)

* Each 16-bit word carries one signed 8-bit parameter in bits 7:0.
* Parameters come in the fixed order C1 weights, C1 biases, C3 weights, C3 biases,
  F5 weights, F5 biases, F6 weights, F6 biases, F7 weights, F7 biases.
* Within a weight section the order is: output channel, then input channel, then
  kernel row, then kernel column. For FC layers it is output neuron, then input
  index.
* The converter turns the stream into `param_wr_t` writes (`sel`, `row`, `col`,
  `data`) and broadcasts them to every kernel. All ten kernels run the same network.
* A full load is 44,426 words. `params_loaded` rises after the last one. Any
  padding words in the final beat are ignored until the mode goes back to
  parameters.

### `data_converter`, `mode = 1` (images)

* Bit k of each 16-bit word is the current pixel of kernel k's image. Bits 15:10
  are unused.
* One image group is 784 words, row by row. Four groups fill exactly 98 beats.

### `hdmi_timing_gen`

Wraps the active 28x28 pixels in sync pulses and porches (H 2/2/28/2, V 1/1/28/1).
If the host has no word ready when an active pixel is due, the horizontal and
vertical counters freeze (`pix_stall`) rather than put a hole into the image.

### `result_collector`

Waits until all ten kernels have produced a class. It then presents them as one
40-bit word, with kernel k in bits 4k+3..4k. If a kernel delivers a new class
while its previous one is still waiting, `res_overflows` counts it.

Reset is asynchronous and active low throughout. Memories (line FIFOs, weight
arrays) are not reset. Their contents are written before they are read. Lint
therefore reports `rst_n` as driving both synchronous and asynchronous logic.

## Files

* `rtl/fpqnet_pkg.sv`: sizes, `param_sel_e`, `param_wr_t`, `video_ctrl_t`, and
  per-section row/column counts.
* `rtl/*.sv`: one module per file. The top is `fpqnet_top`. Defaults are the full
  network.
* `tb/lenet_ref_pkg.sv`: an independent integer reference model of the network,
  with random parameter, parameter-stream and image generators.
* `tb/tb_<module>.sv`: a self-checking testbench for each module. Each prints
  `TB_RESULT checks=N failures=M`.
  * `tb_lenet_kernel` checks the class against the reference model and checks the
    489-clock latency.
  * `tb_fpqnet_top` runs the full-size top end to end: a full parameter load, then
    4 groups of 10 images. The host inserts gaps, and the result port is
    throttled. It counts host back-pressure, pixel stalls and result-port waits,
    and fails if any of them never occurred. It compares all 40 classes with the
    reference model.

Simulate with Verilator 5, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
  rtl/fpqnet_pkg.sv tb/lenet_ref_pkg.sv tb/tb_fpqnet_top.sv --top-module tb_fpqnet_top
./obj_dir/Vtb_fpqnet_top
```

The C++ build of the full top takes a few minutes. The simulation takes about
half a minute.

## Where this RTL departs from, or fills in, the published design

* **Parameter count.** The layer sizes add up to 44,426 parameters. The published
  figure for the 28x28 network is 50,004. The layer sizes were followed.
* **F7 activation.** One diagram draws a sigmoid after the last layer. The text
  instead takes the maximum of the raw last-layer outputs, and that is what is
  built.
* **Flatten order.** The description says the 4x4 maps are flattened
  "vertically". Here each map is flattened row by row. The order only has to match
  how the F5 weights were trained. To change it, swap `row` and `col` in the
  `linear_mapping` write address.
* **Own choices.** The following are not given and were chosen here:
  * porch and sync sizes
  * the 16-bit word formats for parameters and pixels (beyond "8-bit parameters"
    and "bits 0 to 9 go to the ten kernels")
  * parameter order within a section
  * tie-breaking in the argmax
  * the result word format and its overflow counter
  * the stall-on-empty timing generator
  * the pooled value being a count rather than a mean
* **Not included.** The OpenCAPI transaction/link layers, the bridge that turns
  them into an AXI stream, and the register slave that would set `mode` are
  platform IP. The top exposes their stream and mode signals as plain ports.
  Host software is also not included.
* **Weights.** No trained weights are included. The testbenches use random 8-bit
  parameters and random images, and check bit-exactly against the reference model.
  Accuracy on MNIST is therefore not demonstrated here.
