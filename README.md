# conv3d: a 3x3 convolution-layer accelerator with 16 processing elements

`conv3d` computes one quantized 2-D convolution layer of the kind used in the
classification and regression heads of a RetinaNet object detector. Each layer has:

- a 3x3 kernel, stride 1 and zero padding 1, so the output is the same size as the input;
- 256 input channels and 256 output channels;
- 4-bit signed weights and 8-bit signed activations and biases;
- a bias add, ReLU, saturation and an 8-bit output.

The input width and height (up to 80 columns) and four fixed-point scales are set for
each layer through an AXI4-Lite register block. One 64-bit AXI4-Stream input carries
the data. An 8-bit AXI4-Stream output returns the result.

The design targets the programmable logic of a Zynq-7000 class SoC-FPGA. There, a
processor and a DMA engine feed the accelerator from DDR memory. Only the accelerator
is in this repository. The processor, DMA, AXI interconnect and DDR are vendor parts
and are not included.

## Block diagram

```
 s_axis (64b) ──► conv_controller ──► weight_memory (8 banks x 9 kernel positions x 1024 x 32b)
                       │          ──► bias_memory   (32 x 64b)
                       │          ──► activation_memory
                       │                 3 window rows of 3 positions (flip-flops)
                       │                 + 2 line FIFOs (RAM)
                       ▼
             read p (kernel position), n (channel word), g (filter group)
                       │
       64b activation word (broadcast) + 32b weights per PE + bias per PE
                       ▼
   processing_element x16: 8 mac ─► sum_tree (+ aligned bias) ─► quantizer
                       ▼
                 output_mux ──► m_axis (8b, TLAST on the last value)

 s_axi (AXI4-Lite) ──► axil_regs ──► layer configuration, start / done
```

| File | Contents |
|---|---|
| `rtl/conv_pkg.sv` | widths, the layer configuration struct, controller states |
| `rtl/conv3d.sv` | top level |
| `rtl/conv_controller.sv` | load sequencing and the compute loop nest |
| `rtl/axil_regs.sv` | AXI4-Lite register block |
| `rtl/weight_memory.sv` | on-chip copy of all weights of a layer |
| `rtl/bias_memory.sv` | on-chip copy of the 256 biases |
| `rtl/activation_memory.sv` | sliding 3x3 window over the padded input |
| `rtl/line_fifo.sv` | run-time-length delay line used twice by the activation memory |
| `rtl/processing_element.sv` | 8 MACs, sum tree and quantizer for one output channel |
| `rtl/mac.sv` | 4x8-bit multiply into a 20-bit accumulator |
| `rtl/sum_tree.sv` | adds 8 accumulators and the aligned bias |
| `rtl/quantizer.sv` | ReLU, rescaling and saturation to 8 bits |
| `rtl/output_mux.sv` | serializes the 16 PE results onto the output stream |

## Operation of one layer

Software writes the configuration registers and sets the start bit. It then sends
one stream that holds three parts back to back:

1. **Weights:** 9·256·256/16 = 36,864 beats. Each beat holds 16 weights of 4 bits in
   ZXYN order: channel fastest, then kernel x, kernel y, then filter. Each beat is
   written as two 32-bit words on two clocks, lower half first. The input stream
   therefore accepts a beat every other clock, for 73,727 clocks in all.
2. **Biases:** 32 beats. Each beat holds 8 biases, with bias 8m+i in byte i.
3. **Activations:** the unpadded input in ZXY order (channel fastest, then x, then y),
   8 channels per beat with channel 8n+i in byte i.

The output stream returns the output feature map in the same ZXY order. It carries
one 8-bit value per beat, and TLAST marks the last value of the layer. When the
layer is complete, the done bit is set.

Weights and biases stay on chip for the whole layer. Each activation is read from
the stream exactly once.

## Activation memory: the sliding window

The padded input is pushed one word (8 channels) at a time through a chain:

```
stream/zero ─► bottom window row (3 positions) ─► line FIFO ─►
               middle window row (3 positions) ─► line FIFO ─► top window row (3 positions)
```

- **Window rows.** Each row is a flip-flop shift register holding 3 positions × 32
  words, so the whole window is 9 × 32 × 64 = 18,432 bits. Every one of these words
  is readable in any clock.
- **Line FIFOs.** Each FIFO delays the words by (a_x − 1) positions. As a result, the
  three window rows always hold the same three columns of three consecutive padded rows.
- **Initial load.** The controller first shifts in (2·(a_x+2)+3) positions. The zero
  padding is inserted by the controller, not taken from the stream.
- **Moving the window.** After each output pixel, one more position moves the window
  right by a column. At the end of a row, three positions move it to the start of the
  next row: the right padding, the left padding and the first pixel.

The line FIFOs are circular buffers in RAM with a synchronous read. Their length is
set when the layer starts. The default depth is 79·32 = 2,528 words of 64 bits, which
covers inputs up to 80 columns.

## Weight and bias memories

- **Weight banks.** The weight memory has 8 banks. Filter f is stored in bank f mod 8.
- **Kernel-position memories.** Each bank is split into 9 memories, one per kernel
  position. Each holds 1,024 words of 32 bits (8 weights). That makes 72 memories and
  73,728 words in all.
- **Addressing.** In a memory, the word for filter f and channel word n is at address
  n·32 + f/8.
- **Reads.** Each memory has two registered read ports. One read therefore returns the
  32-bit weight words of 16 consecutive filters, one for each PE, at the same kernel
  position and channel word.
- **Biases.** The bias memory holds 32 words of 64 bits. A read returns the 16 biases
  of one filter group.

## Processing element arithmetic

Each PE computes one output channel.

1. **MACs.** The 8 MACs each multiply one activation by one weight. The product is a
   signed 12-bit value. It is accumulated into 20 bits. On the first step of an output
   pixel, the accumulator is loaded with the product instead of being added to.
2. **Sum tree.** Three adder levels produce 21-, 22- and 23-bit sums.
3. **Bias alignment.** The bias has `bias_scale` fractional bits. The sum has
   `input_scale + weight_scale` fractional bits. The bias is shifted left or right
   (arithmetic) by the difference, kept to 23 bits, and added. The result is a 24-bit
   value called `sum4`.
4. **Quantizer.** The quantizer uses lb = input_scale + weight_scale − output_scale:
   - a negative `sum4` gives 0 (ReLU);
   - a `sum4` above 2^(lb+7) − 1 gives 127 (saturation);
   - otherwise the output is `sum4 >> lb`, truncated.

   A negative lb shifts left, with the same saturation.

A PE result appears 3 clocks after its last MAC step. The stages are the MAC
register, the `sum4` register and the output register.

## Schedule and cycle count

The controller runs the loop nest below:

```
for y in 0..a_y-1, x in 0..a_x-1:              output pixel
  for g in 0..15:                               group of 16 filters (one per PE)
    for (ky,kx) in 3x3, skipping padding:       kernel position
      for n in 0..31:                           channel word (8 channels)
        one read of all memories, one MAC step in all 128 MACs
  load the next window position(s)
```

Kernel positions that fall on the padding are skipped at no cost, because they would
only add zeros. The only stall in the compute loop is on output back-pressure. The
last MAC step of a group waits while the output multiplexer is still sending the
previous group. With 256 channels a group takes at least 128 clocks, which is much
longer than the 16 clocks needed to send its results. So the stall appears only when
the output stream is held off.

Without output back-pressure, a layer of a_x × a_y takes:

```
73,727 (weights) + 32 (biases) + (2(a_x+2)+3)·32 (initial window)
  + 512 · Vx · Vy (MAC steps)
  + (a_x·a_y − 1)·32 + (a_y − 1)·64 (window moves) + 23 (pipeline and output drain)
```

Vx = 3·a_x − 2 is the number of kernel columns that fall on real data, summed over
all x. Vy is the same for rows. Results for the layer sizes of the detector heads:

| Input | Clocks | Time at 71 MHz (14 ns) | Time at 100 MHz |
|---|---|---|---|
| 80×80×256 | 29,290,678 | 410 ms | 293 ms |
| 40×40×256 | 7,259,318 | 102 ms | 73 ms |
| 20×20×256 | 1,811,638 | 25.4 ms | 18.1 ms |
| 10×10×256 | 479,798 | 6.7 ms | 4.8 ms |
| 5×5×256 | 161,878 | 2.3 ms | 1.6 ms |

All five figures are checked clock-for-clock in simulation. For comparison, the
high-level-synthesis version of this accelerator was scheduled at up to 37.6 M clocks
for 80×80. Its kernel-position loop needed up to 38 clocks, where this design needs
32. That version was measured at 0.518 s per 80×80 layer on a 14 ns clock.

## Registers (AXI4-Lite, 32-bit, byte addresses)

| Offset | Name | Meaning |
|---|---|---|
| 0x00 | control | bit 0 start (write 1; reads 1 until the run begins), bit 1 done (sticky, cleared by the next start), bit 2 idle |
| 0x10 | a_x | input width, 2..80 (the line FIFOs need at least one position) |
| 0x18 | a_y | input height, ≥ 1 |
| 0x20 | output_scale | fractional bits of the output |
| 0x28 | input_scale | fractional bits of the input activations |
| 0x30 | weight_scale | fractional bits of the weights |
| 0x38 | bias_scale | fractional bits of the biases |

- Registers are written as whole words; write strobes are ignored.
- After reset, a_x and a_y read 5 and the scales read 0.
- The configuration is latched when a run starts.

## Parameters

The top-level parameters are N_CH = 256, N_PE = 16, N_MAC = 8 and MAX_X = 80. The
tests also use smaller values (for example, N_CH = 32 and MAX_X = 8) to keep
simulations short. N_CH must be a multiple of 16, and N_PE must be a multiple of 8.

## Choices that go beyond the original description

- **Register map and stream framing.** The register offsets, the control bits, the
  TLAST rule and the asynchronous active-low reset are all this design's own. Input
  TLAST is ignored.
- **Pipeline registers.** There is a registered memory read, a registered sum and a
  registered output. The kernel-position loop therefore has no per-position pipeline
  fill. This is why the MAC phase takes 32 clocks per position instead of up to 38.
- **No overlap.** Loading and computing do not overlap: weights and biases are
  reloaded for every layer, as in the original flow.
- **Weight memory layout.** The weight memory follows a cyclic split by filter
  (filter mod 8) into 8 banks. Each of the 72 memories has one write port and two
  read ports.
- **Rounding.** The quantizer truncates; it does not round. The original software
  reference rounds, but the hardware it describes truncates. Bias alignment uses
  arithmetic (floor) shifts.

## Not included

- The ARM processing system, the AXI DMA, the AXI interconnects, the reset block and
  the DDR memory. These are vendor IP around the accelerator.
- The final (fifth) convolution of each head: 256 to 720 or 36 channels in floating
  point. It does not fit this datapath and runs in software.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench ends by printing
`TB_RESULT checks=N failures=M`. The reference arithmetic is in `tb/tb_ref_pkg.sv`.

- **`tb_conv3d`:** the whole accelerator at N_CH = 32 and MAX_X = 8, running five
  layers with different sizes (down to 2×1) and scales against a software model. It
  applies random stream gaps and output back-pressure. It counts each mechanism it exercised: skipped
  padding positions, inserted padding words, row-change loads, stalls, shift
  directions, ReLU and saturation.
- **`tb_conv3d_full`:** the accelerator with its default parameters, on a 5×5×256
  layer. It checks every output and the exact cycle count.
- **`tb_conv3d_heads`:** the default-parameter accelerator on all five head layer sizes,
  80×80, 40×40, 20×20, 10×10 and 5×5 (×256 channels). It checks every output and the
  cycle count of each layer against the table above. The run takes a few minutes.

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Itb --top-module tb_conv3d_full \
    rtl/conv_pkg.sv tb/tb_ref_pkg.sv tb/tb_conv3d_full.sv
./obj_dir/Vtb_conv3d_full
```

`-y rtl` lets Verilator find each module in its own file. The packages are listed
first because the modules import them. Other testbenches are run the same way,
with their own name in place of `tb_conv3d_full`.

