# Two-stage face detector in programmable logic

This RTL finds faces in a video stream in two stages. The stages are split between the
programmable logic (PL) and the processor system (PS) of a Zynq UltraScale+ MPSoC.

1. **Candidates.** A cheap pixel pipeline runs on every frame and finds skin-coloured
   regions. It outputs their bounding boxes as face candidates.
2. **Classification.** Software on the processor cuts out each candidate and scales it to
   the network's input size. A convolutional neural network then classifies it as face or
   not face.
   - Only the convolution and pooling layers run in the logic, on the accelerator described
     here.
   - The fully connected layers, and the final two-element output, stay in software.
   - Confirmed faces go back into the logic, which draws their boxes on the outgoing video.

The classifier is meant to be a fine-tuned AlexNet-style network. The accelerator's default
size follows from that: 384 processing elements, the number of filters in AlexNet's widest
layer. That is also one DSP slice per PE, and 384 is the DSP count of the original
implementation.

```
camera ─► preproc ──────────────────────────────► candidate boxes ─► (PS)
            skin ► median ► erode ► dilate ► labelling
(PS) ◄──► dcnn_accel ◄── DDR (kernels)                 (PS: fully connected layers)
            PS bus ► controller ► PE matrix / pooling ◄► 2 feature-map banks
(PS) ─► detection slots ─► viz_overlay ─► display
```

`face_detect_top` places the three parts side by side:

- `preproc`: the candidate pipeline.
- `dcnn_accel`: the accelerator.
- `viz_overlay`: the detection overlay.

The top's ports carry everything that belongs to the processor, the DDR memory, the camera and
the display. There is a single clock.

## Candidate pipeline (`preproc`)

All stages take one pixel per clock. Each stage keeps the input's valid gaps.

- **`skin_classifier`** turns each RGB pixel into a skin / not-skin bit. A pixel counts as
  skin only if it passes three tests, all in integer arithmetic:
  - **RGB:** R>95, G>40, B>20, max−min>15, |R−G|>15, R>G and R>B.
  - **YCbCr:** 77≤Cb≤127 and 133≤Cr≤173, using BT.601 integer coefficients.
  - **HSV:** hue 0–50° and saturation 23–68%.
  - Because the RGB test guarantees that R is the maximum, H = 60(G−B)/(R−min) and
    S = (R−min)/R. Both bounds are checked by cross-multiplication, so no divider is needed.
  - All thresholds are parameters.
- **`median3x3`** keeps a pixel if at least 5 of its 3×3 neighbourhood are set.
- **`morph3x3`** is used twice, as an erosion and then a dilation (an opening with a 3×3
  square). Together with the median filter, this removes speckle before labelling.
- **`window3x3`** is the helper that feeds both filters.
  - It holds two line buffers and emits the window around each pixel, with zeros outside the
    frame.
  - To emit the last column and the last row, it inserts padding pixels itself. It needs one
    idle cycle after each line and W+2 idle cycles after each frame. Any real video blanking
    is longer than that.
- **`ccl_bbox`** labels 8-connected regions in a single pass and keeps one bounding box per
  label.
  - **Equivalence table.** It is kept fully flattened at all times. When two regions meet at
    a pixel, every entry that points to the larger label is redirected to the smaller label in
    the same clock. So every lookup is one read, and no second pass over the image is needed.
  - **Output.** After the frame, the table is scanned once. Every surviving region whose box
    covers at least `MIN_AREA` pixels (default 400) is emitted as a candidate. Smaller
    regions are dropped.
  - **Overflow.** A frame may use `MAX_LABELS−1` labels (default 255). Pixels that would need
    more labels stay unlabelled, and `overflow` is raised for that frame.

The latency from a pixel to its filtered version is about two lines. Candidates appear within
`MAX_LABELS` cycles after the last pixel of a frame.

## DCNN accelerator (`dcnn_accel`)

### Number formats

| Quantity | Width | Format |
|---|---|---|
| Weights | 9 bits | Q1.7 |
| Feature-map values and biases | 18 bits | Q10.7 |

A PE multiplies 18×9 bits into a 48-bit accumulator. The accumulator starts at the bias,
aligned to the product's 14 fraction bits. At the end of a receptive field:

1. The sum is shifted right by 7 (truncating).
2. ReLU is applied, if the layer enables it.
3. The result is saturated to 18 bits.

### Memories

**Kernel bank (`kernel_bank`).** One block per filter, each 4096×9 bits (one BRAM36 each).
All blocks are read at one shared address, so every PE gets its own filter's weight in the same
cycle.

**Feature-map banks (`fmap_bank`).** Two banks, each with one block per map, 1024×18 bits (one
BRAM18 each). They work as ping-pong buffers: a layer reads one bank and writes the other. So a
chain of layers alternates between them, and the processor chooses the source bank for each
layer.

Memory budget at the defaults, in BRAM36 units:

| Memory | Blocks |
|---|---|
| Kernel bank | 384 |
| Two feature-map banks, 768 × ½ | 384 |
| **Total** | **768** |

The original implementation reports 777.5 BRAM36. The depths here are inferred from that total.
They are not documented values.

### Convolution

One pass of a convolution streams one input pixel per clock into all PEs at once. The pixel is
taken from map `c` at `(oy·S+ky−P, ox·S+kx−P)`, where S is the stride and P the padding.
Points that fall in the padding feed a zero.

- **Loop order.** The controller (`dcnn_ctrl`) walks, from outer to inner: output row, output
  column, input channel, kernel row, kernel column.
- **Kernel word.** Every PE reads word `(c·K+ky)·K+kx` of its own kernel block.
- **Write-back.** When the receptive field ends, all PEs write their results in parallel to
  their own output maps, at `oy·out_w+ox`.
- **Cycle count.** A layer takes `out_h·out_w·C·K·K` issue cycles, plus the kernel load, plus
  3 drain cycles.

The datapath has three stages:

| Stage | Work |
|---|---|
| Issue | Controller emits addresses |
| Read / MAC | Memories answer; PEs accumulate |
| Write | Results written to the other bank |

Consecutive output pixels follow without bubbles.

**Filter grouping.** A layer's per-filter kernel may be larger than a kernel block, or the
layer may be defined as grouped. If so, the processor sets `groups2`, and the layer runs as two
passes:

- Pass g uses input channels g·C/2 … (g+1)·C/2−1 and filters g·F/2 … (g+1)·F/2−1.
- The other half of the PEs is disabled.
- Each pass loads its own kernels from DDR. Group 1's kernels start at the first 256-byte
  boundary after group 0's.

### Pooling

Pooling (`pool_unit`) walks the K×K window at stride S. It reads the same address in every map
of the source bank and keeps one running maximum per channel. All channels are written in
parallel to the other bank.

### Kernel loading

Before each convolution pass, `ddr_reader` copies the kernels from DDR into the kernel bank. It
uses an AXI4-style read channel with 128-bit data, bursts of up to 16 beats and one burst in
flight.

In DDR, filters are stored back to back. Each 128-bit beat holds eight weights, one per 16-bit
lane, sign-extended from 9 bits. The loader writes one weight per clock.

### Processor bus (`dcnn_ps_if`)

The bus is word-addressed, with 32-bit data and req/ready handshaking. Read data returns with
`rvalid` one cycle after the request is accepted. Bits `[23:22]` of the address select the
region:

| `addr[23:22]` | Region | Contents |
|---|---|---|
| 0 | Registers | 0 CTRL (bit 0 = start), 1 STATUS (bit 0 busy, bit 1 done, sticky until next start), 2 OP (`[1:0]` op: 0 conv, 1 pool; `[4]` source bank; `[5]` ReLU; `[6]` groups2), 3 channels (`[9:0]` in, `[25:16]` out), 4 input size (`[11:0]` w, `[27:16]` h), 5 output size (same layout), 6 kernel (`[3:0]` K, `[7:4]` stride, `[11:8]` pad), 7 DDR byte address of the kernels (256-byte aligned) |
| 1 | Biases | One 18-bit bias per filter, at offset = filter |
| 2 | Feature maps | `[21]` bank, `[20:12]` map, `[11:0]` word |

Behaviour while a layer runs:

- Register writes are ignored.
- Feature-map accesses are refused: `ready` stays low until the layer finishes.

`irq` pulses when a layer is done.

The output size is written by the processor rather than computed, which saves a divider.

**Typical layer sequence**, run by the processor:

1. Write the candidate into bank 0.
2. For each layer, write the registers and biases, start the layer, and wait for `irq`.
3. Read the last maps back and compute the fully connected layers in software.

## Overlay (`viz_overlay`)

The processor fills up to `N_DET` (default 8) detection slots with boxes. On the display
stream, every pixel on the outline of a filled slot's box is replaced by `COLOR` (green by
default). The module counts x and y itself. Its delay is one clock.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `IMG_W`, `IMG_H` | 3840, 2160 | top, vision blocks | frame size (4K UHD) |
| `MAX_LABELS` | 256 | `ccl_bbox` | label table size |
| `MIN_AREA` | 400 | `ccl_bbox` | smallest candidate box area |
| `N_DET` | 8 | `viz_overlay` | detection slots |
| `N_PE` | 384 | accelerator | PEs = filters = maps per bank |
| `KDEPTH` | 4096 | kernel bank | weights per filter |
| `FDEPTH` | 1024 | feature-map banks | pixels per map |
| `MAX_BURST` | 16 | `ddr_reader` | DDR burst length |
| skin thresholds | see above | `skin_classifier` | colour rules |

Fixed formats live in `dcnn_pkg`: 9/18-bit data, 7 fraction bits, a 48-bit accumulator and a
128-bit DDR bus. Shared vision types live in `vision_pkg`: 12-bit coordinates, `bbox_t` and
`rgb_t`.

## What follows the original and what does not

**Follows the original design:**

- The PL/PS split.
- The pre-processing stages and their order.
- The 9-bit and 18-bit formats.
- One kernel block per filter and one memory per feature map.
- Two feature-map banks.
- One MAC per filter, with serial input and parallel write-back.
- Biases in registers.
- Kernels loaded from DDR per layer.
- Channel-parallel pooling.
- Two-way filter grouping.

**Choices of this design:**

- The skin threshold values.
- The filter sizes and the opening.
- The labelling algorithm and the size measure.
- The PE count and memory depths. These are inferred from the resource figures above, not
  documented.
- ReLU and max pooling, taken from AlexNet.
- Zero padding and stride.
- The loop order.
- The bus protocol and register map.
- The DDR layout.
- The overlay's drawing style.

**Known limits at the defaults:**

- A feature map holds at most 1024 pixels (for example 32×32). The network input must be
  scaled to fit. A 227×227 AlexNet input, with 55×55 maps after the first layer, would need
  `FDEPTH` ≥ 3025.
- A filter holds at most 4096 weights per pass.
- The input map count is limited to `N_PE`.
- `ksize`, `stride` and `pad` are 4-bit fields.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one:

- prints `TB_RESULT checks=<n> failures=<n>`;
- has a watchdog.

Shared testbench code:

| File | Contents |
|---|---|
| `tb/ddr_model.sv` | DDR model with random stalls |
| `tb/dcnn_tb_tasks.svh` | Bus tasks and a bit-exact reference model of convolution and pooling |
| `tb/vision_tb_model.svh` | Reference skin rule, filters and flood-fill labelling |

To build and run one testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module tb_dcnn_accel \
    rtl/dcnn_pkg.sv rtl/vision_pkg.sv rtl/*.sv tb/ddr_model.sv tb/tb_dcnn_accel.sv
./obj_dir/Vtb_dcnn_accel
```

(Listing a package twice on the command line is harmless. Alternatively, list the packages
first and the other modules explicitly.)

End-to-end testbenches:

- **`tb_face_detect_top`** runs the whole design at a reduced size: 64×48 frames, 16 PEs and
  small memories. It does the following:
  - streams two frames of synthetic skin-coloured rectangles and checks the candidates
    against a reference;
  - runs a three-layer network on the accelerator through the bus: a padded ReLU
    convolution, max pooling, and a grouped convolution;
  - checks every output value;
  - checks that feature-map access is refused while a layer runs;
  - writes a detection and checks the drawn outline.

  It counts every mechanism and fails if one never happened: convolution passes, pooling,
  grouping, padding, ReLU clamping, DDR stalls, refused accesses, label merges, rejected small
  regions and overlay pixels.
- **`tb_face_detect_full`** runs the same test at the default sizes: one 3840×2160 frame and
  384-filter layers. It takes about two minutes with Verilator.
- **`tb_dcnn_alexnet`** runs the accelerator alone at its default size. It uses layers shaped
  like AlexNet's last convolutional stage, on 13×13 maps with random data:
  - conv3: 256→384 maps;
  - conv4: 384→384 maps, in two groups;
  - conv5: 384→256 maps, in two groups;
  - 3×3/2 max pooling.

  It checks all 182 thousand outputs and each layer's cycle count. This is the largest network
  shape these memories hold.
