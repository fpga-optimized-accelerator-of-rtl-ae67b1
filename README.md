# DCNN accelerator with circular-window readout and shared multipliers

This is a layer-by-layer inference engine for VGG-style convolutional networks, with 3x3 convolution (stride 1, padding 1), 2x2 max pooling, fully connected layers and a final arg-max. Data and weights are 6-bit sign-magnitude numbers.

Two ideas keep it small and fast:

- **Circular sliding window (CSW) readout.** The 3x3 window does not move "always right". It moves down, right, up, right. Four window positions then cover a 2x2 block of outputs, each pixel of a four-row strip is read from memory only once, and the four outputs of a block come out in the order 2x2 max pooling needs.
- **Multiplier sharing.** Sign and magnitude are handled separately. This lets one wide unsigned multiplier compute two or three small products at once: the operands are packed with zero gaps so that the partial products land in separate bit fields.

The datapath handles 64 input channels × 4 kernels per pass. Each output pixel takes two clocks, which is 1152 multiplies per clock, and they are built from 448 wide multiplies.

## Number format and shared multipliers

A value is `{sign, magnitude[4:0]}`. For example, -4 is `1_00100` and +4 is `0_00100`. A product's sign is the XOR of the two signs, and its 10-bit magnitude comes from an unsigned multiply. `dcnn_pkg::sm_prod` turns a sign and magnitude into a signed 11-bit product for the adders.

- **SSTM** (`sstm.sv`): one input × three weights.
  - The weights are packed as `{w1, 00000, w2, 00000, w3}` (25 bits) and multiplied by the 5-bit input magnitude.
  - Each partial product is at most 10 bits wide, and the packing leaves 10 bits per field, so the three products sit in bits [29:20], [19:10] and [9:0] without overlap.
- **SSDM** (`ssdm.sv`): two inputs × two weights (in1·w1 and in2·w2).
  - The inputs are packed as `{in1, 0^15, in2}` (25 bits) and the weights as `{w1, 00000, w2}` (15 bits), giving a 40-bit product.
  - in1·w1 is in bits [39:30] and in2·w2 in bits [9:0].
  - The cross terms in1·w2 and in2·w1 fall inside [29:10] and are discarded.
- **PE3** (`pe3.sv`) holds four SSTM. **PE2** (`pe2.sv`) holds two SSDM.

## PE array and what one beat carries

Every output pixel of every channel needs the 9 window values. These are sent in two *beats* of five values per channel:

| beat    | slots in1..in4 (kernel positions) | slot in5 |
|---------|-----------------------------------|----------|
| phase 0 | 1, 3, 4, 6                        | 0        |
| phase 1 | 2, 5, 7, 8                        | 0        |

Positions are numbered row-major, `p = 3*dy + dx`. For FC layers, phase p carries input words 4p..4p+3 and in5 is unused.

The array (`pe_array.sv`, L = 64 columns, one per input channel) has three rows:

- **Row 1:** one PE3 per channel. Its four SSTM take in1..in4, each times the weights of kernels 0, 1 and 2.
- **Row 2:** one PE2 per channel. The two SSDM take (in1, in2) and (in3, in4) with the weights of kernel 3.
- **Row 3:** 32 PE2 for position 0. Position 0 needs 64 channels × 4 kernels = 256 products per output pixel, and there are two beats, so row 3 must deliver 128 products per clock. PE2 number u handles channels 2u and 2u+1. In phase p, SSDM 0 multiplies them by kernel 2p and SSDM 1 by kernel 2p+1. The same value is sent in both beats for this reason.

In FC mode, row 3 is gated off. Rows 1 and 2 then compute 512 inputs × 4 neurons per two clocks. All products are registered once at the array output.

## The CSW reader (INPUT CU)

`input_cu.sv` is the most intricate block.

For one channel group, the padded image is processed in horizontal **strips** of four padded rows. Each strip produces two output rows. Within a strip, each **group** produces a 2x2 block of outputs through four window states:

```
r1 (0,0) --down--> r2 (1,0) --right--> r3 (1,1) --up--> r4 (0,1) --right--> next group
```

The same RAM address is read for all 64 channels at once, one address per clock. The reads land in a per-channel 4x4 register window, indexed by (strip row, column mod 4). Each state needs the following new data:

| state | first group of a strip  | later groups     |
|-------|-------------------------|------------------|
| r1    | 9 (the full 3x3 window) | 3 (a new column) |
| r2    | 3 (a new row)           | 1                |
| r3    | 3                       | 3                |
| r4    | 1                       | 1                |

In the steady state this is 8 reads per group, which equals the compute time (4 states × 2 beats).

Padding positions are not read from RAM; they are written into the window as zero, but still take their clock. A read overwrites the datum four columns to its left, so it must not run too far ahead of the state being sent. Reads for r1 and r3 may run two states ahead, and reads for r2 and r4 three states ahead. This lookahead keeps the pipeline at 8 clocks per group without overwriting live data. A new strip starts reading only after the previous strip has been sent completely.

One pass over an n×n map (n even) reads (n+2)·4·(n/2) addresses, so each padded row is read about twice (once per strip that covers it), not three times as with a row-by-row window.

FC layers: each step reads 8 consecutive addresses (8 × 64 inputs) and sends them as two beats.

The reader pulses `w_take` to swap the weight bank:

- at the first beat of a convolution pass;
- at the first beat of every FC step.

It waits when the next bank is not yet full.

## Weights: clock-crossing FIFOs and ping-pong banks

Weights come from external memory in their own clock domain, through four dual-clock FIFOs (`async_fifo.sv`, Gray-coded pointers, two-flop synchronisers). There is one FIFO per kernel of the pass, and one FIFO word holds 64 weights (one per channel).

`weight_cu.sv` holds two banks of 9 words per kernel. One bank feeds the array while the other fills, one word per kernel per clock, whenever all four FIFOs hold data. The weight stream must therefore contain, per pass and per kernel:

- convolution: the 9 position words;
- each FC step: 8 words plus one filler word.

The stream order is layer by layer, kernel group j, then channel group k (convolution) or step s (FC). The slot multiplexer chooses position words by beat phase, as in the table above.

## Output path (OUTPUT CU)

`output_cu.sv` holds four `cov_fc_out` (one per kernel), one `cov_only_out` and four partial-sum FIFOs (`sync_fifo.sv`).

- **cov_only_out**
  - Two 64-input adder trees sum row 3's position-0 products: kernels 0 and 1 in phase 0, kernels 2 and 3 in phase 1.
  - On the first beat of a value it also adds the starting term: the bias for the first channel group, or the partial sum popped from the FIFO for later groups.
  - It contains the SOFTMAX unit.
- **cov_fc_out**
  - A 256-input adder tree sums one kernel's rows 1 and 2 products.
  - The accumulator adds the tree sum and the side term from cov_only_out, and restarts on the first beat.
  - One clock after the last beat, the value goes either to the FIFO (more channel groups follow) or into Q/A, and then optionally into pooling.
  - Latency from the last beat: 1 clock to the FIFO, 2 to the Q/A output, 3 to the pooled output.
- **Q/A** (`qa_unit.sv`) fuses quantisation and ReLU into a range lookup.
  - The 24-bit sum is compared with 31 ascending thresholds d1..d31. The output is the 5-bit index of the interval holding it: 0 for a ≤ d1, 31 for a > d31.
  - Thresholds are per output channel and precomputed offline from the floating-point scale.
- **Pooling** (`pool_unit.sv`): one comparator and a register. Every fourth value the feedback is forced to 0, so it outputs the maximum of each 2x2 block (the CSW order makes those four consecutive).
- **SOFTMAX** (`softmax_unit.sv`): an arg-max over the last layer's outputs, four at a time, in a three-clock pipeline:
  1. compare two pairs;
  2. compare the two winners;
  3. compare with the running maximum.

  After the last group it outputs the label. Outputs at index n_valid or above never win (for example, 10 classes in 3 groups of 4), and ties go to the lower index.

## Memories and data layout

- **RAM groups** (`ram_bank.sv`, `ram_sel.sv`). There are two groups of 64 RAMs, each 50176 words deep (one 224×224 map).
  - Layer i reads group `i mod 2` and writes the other.
  - Channel c of a map lives in RAM `c mod 64` at address `(c div 64)·n·n + row·n + col`.
  - The result of kernel group j (channels 4j..4j+3) goes to RAMs `(4j+m) mod 64`.
  - RAM SEL rebuilds the write address:
    - pooled outputs arrive in row-major order;
    - unpooled outputs arrive in CSW order and are placed by block counters;
    - FC neuron 4j+m goes to word `4j div 64`.
  - The host port reads or writes any RAM while the engine is idle; reads have latency 1.
- **Parameter ROM** (`param_rom.sv`). 13416 entries, one per output channel of VGG16 for ImageNet. Each entry holds the bias (word 0) and thresholds d1..d31 (words 1..31), all 24 bits. It is loaded through a port. `bq_cu.sv` reads the four entries of a kernel group, one per clock, before a pass starts (`ready` rises 6 clocks after `start`).

## Control (TOP CU)

`top_cu.sv` runs three nested loops:

1. over layers;
2. over kernel groups j (4 kernels or 4 FC neurons each);
3. for convolution only, over channel groups k (64 channels each).

Each pass:

1. loads bias and thresholds;
2. starts the reader at base `k·n·n`;
3. waits for the reader to finish and for the output pipeline to drain (8 clocks).

FIFO use follows from k: the first group adds the bias, later groups add the stored partial sums, and every group except the last writes to the FIFO.

The network is described by a 16-entry layer table written by the host (`dcnn_pkg::layer_t`):

- `conv`, `pool`;
- `n` (input size);
- `cin_groups` (⌈channels/64⌉);
- `kgroups` (⌈outputs/4⌉);
- `fc_steps` (inputs / 512);
- `rom_base`;
- `nvalid` (classes, for the last layer).

## Top level (`dcnn_top.sv`) and how to run a network

1. Reset `rst_n` (accelerator clock) and `ddr_rst_n` (weight clock).
2. Write the layer table (`lt_we`, `lt_addr`, `lt_data`).
3. Load the ROM (`rom_ld_*`, one 24-bit word per clock).
4. Write the input image into RAM group 0 (`host_wr_en`, `host_group=0`, `host_lane`, `host_addr`, `host_wr_data`).
5. Pulse `start` with `layer_num`.
6. Feed the weight stream on `w_wr_en` / `w_wr_data[4]` in the `ddr_clk` domain, holding while any `w_full` is set.
7. `label_valid` pulses with the class label at the end of the last layer, and `done` pulses when all layers are finished.
8. Results of the last layer are in group `layer_num mod 2` and can be read through the host port.

## Sizes

All defaults are the sizes needed for VGG16:

| network         | largest RAM use        | partial-sum FIFO | ROM entries           |
|-----------------|------------------------|------------------|-----------------------|
| CIFAR-10 32×32  | 1024 words             | 1024             | 5258                  |
| ImageNet 224×224 | 50176 words (64 × 224²) | 50176            | 13416 (4224 conv + 9192 FC) |

Both fit the defaults. The FC layers' weights are never stored on chip.

## Where this design departs from, or fills in, the published description

- The description gives the block structure, the CSW state sequence, the beat contents, the SSTM/SSDM packing, the Q/A equation, and the pooling and arg-max structure. The following are choices of this implementation:
  - the register window, read lookahead and addressing inside the reader;
  - the row-3 split over kernels;
  - the weight bank format (9 words, FC filler word);
  - memory layout and depths;
  - widths (24-bit accumulation and thresholds);
  - pipeline latencies;
  - the tie rule of the arg-max;
  - host ports and the layer table.
- The SSDM text puts the 25-bit packed word on the weight side, while its equation and figures put it on the input side. The input side is used. The product is identical either way.
- COV_ONLY_OUT is described with one 64-input tree. Two are used, because row 3 delivers two kernels' products per clock.
- Switching between passes costs the drain time plus a few control clocks (about 12 clocks). The source quotes 2–3 clocks.
- The external DDR4 and its controller are not part of the RTL. Their side of the weight FIFOs is a port.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`) that compares against an independent model and prints `TB_RESULT checks=N failures=M`:

- Arithmetic units are checked exhaustively or with random values.
- The reader is checked for data, read count (n+2)·4·(n/2) and an 8-clock group period.
- The FIFOs are checked against queue models.
- TOP CU's pass sequence is checked against the nested loops.

`tb_dcnn_top.sv` runs the complete design at its default sizes. A three-layer network streams its weights through the clock-crossing FIFOs:

- a convolution with 128 channels, so partial sums go through the FIFOs, and with pooling;
- a convolution without pooling;
- a 12-neuron FC layer with 10 classes.

An integer reference model checks every written result and the label. The testbench counts each mechanism (all four CSW states, padding reads, FIFO writes and reads, pooling, FC beats, bank swaps, back-pressure from full weight FIFOs, waits for weights, RAM group swaps, the label) and fails if one never happens. It runs in about 10k clocks, under a second once built.

`tb_vgg16.sv` runs the VGG16 workloads at the default sizes. The weights are pseudo-random, and the per-layer thresholds are calibrated so that activations stay spread across all layers.

- **CIFAR-10, full network** (13 convolution and 3 FC layers): 547,441 clocks per image. The label and all ten class outputs match the reference.
- **ImageNet, first layer only** (224×224, 3→64 channels, which fills the RAMs to their last word): 1,627,474 clocks. 3000 sampled outputs match.

Deeper ImageNet layers were not simulated because they take too long.

Simulate with plain Verilator, for example:

```
verilator --binary --timing --assert -y rtl +libext+.sv -Irtl rtl/dcnn_pkg.sv tb/tb_dcnn_top.sv --top-module tb_dcnn_top
./obj_dir/Vtb_dcnn_top
```

Replace `tb_dcnn_top` with any other testbench name. The 64-lane top takes a few minutes to compile. Verilator may warn SYNCASYNCNET for `rst_n`: the FIFO assertions sample the asynchronous reset in their `disable iff`, which does not affect the logic.
