# Four FPGA inference engines for deep learning

This RTL implements four small-footprint inference architectures from a thesis on efficient FPGA inference. All four avoid multipliers:

- **DCTIF tanh.** A hyperbolic-tangent unit. It stores a coarse table of tanh and rebuilds the values between table entries with a discrete-cosine-transform interpolation filter. The filter uses only shifts and adds.
- **SNN overlay.** A single-hidden-layer neural network with up to 2450 hidden and 30 output neurons. Inputs and activations are powers of two, so every "multiplication" is a shift. The network size is set at run time through AXI4-Lite registers.
- **POLYBiNN.** A classifier built from a forest of small decision trees, boosted with AdaBoost. Each tree has six binary inputs, so it is exactly one 6-input LUT. The whole classifier is combinational logic plus a short voting pipeline.
- **POLYCiNN.** A stack of POLYBiNN forests, one per overlapping window of a colour image. Their inputs are local-binary-pattern (LBP) histograms and a downsampled copy of the image. A fusion stage adds up the votes of the windows.

The four designs do not share data. `fpga_dl_top` places them side by side, each with its own ports and all on one clock and one active-low asynchronous reset.

## DCTIF hyperbolic tangent (`tanh_dctif`)

The input `z` is an unsigned 11-bit magnitude: 3 integer bits and 8 fraction bits, covering 0 to 8. The output is tanh(z) with 8 fraction bits. The sign is handled outside the unit, using tanh(-z) = -tanh(z).

**Regions.** `tanh_range_decoder` sorts each input into one of four regions. The `out_region` code is given in brackets.

| Input range (in LSBs of 1/256) | Region | Output |
|---|---|---|
| z < 59 | pass (00) | z itself, because tanh z ≈ z there |
| z ≥ 712 | saturation (01) | 255/256 |
| other z that is a multiple of 4 | sample (10) | read from the table |
| other z | interpolation (11) | interpolated |

**Sample table.** Samples of tanh are stored every 4 LSBs, i.e. every 1/64 (step s = 4, α = 1/4). The table has 167 entries of 8 bits, about 1.3 kbit. It is not a data file: a constant function computes it at elaboration as round(256·tanh(k/64)).

**Interpolation.** A point at fractional position r ∈ {1, 2, 3} (in quarters) between samples B and C uses the four neighbours A, B, C, D. The weights, in sixteenths, are:

| r | A | B | C | D |
|---|---|---|---|---|
| 1 | −2 | 15 | 3 | 0 |
| 2 | −2 | 10 | 10 | −2 |
| 3 | 0 | 3 | 15 | −2 |

`dctif_interp` reads two table entries per cycle and forms each pair of weighted terms with shifts and subtractions. It adds the two pair sums, adds 8 and shifts right by 4, then clamps the result to 8 bits.

The rounding is this design's choice. With truncation the worst error is 0.0064; with rounding it is 0.0039, which meets the published 0.004. The region bounds 59 and 712 were also chosen to meet 0.004; the source gives no values for them.

**Timing.** `in_valid`/`in_ready` handshake. One result every 2 cycles, because each interpolation uses two table reads. Latency is 3 cycles.

**Four taps.** The interpolation uses four taps, as the coefficient table and the block diagrams show; one footnote elsewhere mentions two taps, which this design does not follow.

## SNN overlay (`snn_overlay`)

**Number formats:**
- **Inputs:** 3-bit codes. Code 0 means 0; code k means 2^(k−1), so inputs take the values 0, 1, 2, …, 64.
- **Weights:** signed 8-bit.
- **Hidden activations:** a 3-bit code for quantized tanh, with values {1, ½, ¼, 0, −¼, −½, −1}. The codes are 000, 001, 010, 111, 110, 101, 100 in that order.

**Hidden neuron (`snn_hidden_neuron`).** Each input adds `weight << (code−1)` to a 16-bit saturating accumulator. The accumulator starts from the bias. When the sum is complete, a priority encoder compares it with six thresholds and produces the activation code. The thresholds are ±atanh(¾), ±atanh(½) and ±atanh(¼), scaled by 2^6. They are computed at elaboration in `snn_pkg::qtanh_threshold`.

The accumulator format (6 fraction bits) and the choice of thresholds at the midpoints between the tanh levels are this design's own.

**Output neuron (`snn_output_neuron`).** Each hidden activation adds the weight, arithmetically shifted right by 0, 1 or 2 and negated for negative codes. The sum is kept with 2 fraction bits and saturated to 16 bits.

**Sequencing.** All hidden neurons work in parallel, one input per cycle. Each neuron has its own weight memory of `MAX_IN` words. After the last input, the activations are encoded and copied into an activation buffer. The output neurons then work through that buffer, one hidden activation per cycle, while the hidden layer already takes the next image.

The steady-state period is max(n_inputs, n_hidden) + 5 cycles per image. For a 784-1024-10 MNIST network at 300 MHz that is about 291k images/s; the published figure is 210k images/s.

The `ev_input_stall`, `ev_act_stall` and `ev_image_done` strobes show three events:
- the hidden layer waiting for inputs;
- the hidden layer waiting for the output layer;
- an image finishing.

**Host interface.** AXI4-Lite registers set the network:

| Address | Register | Access | Contents |
|---|---|---|---|
| 0x00 | CTRL | RW | [2:0] stream target, [8] run |
| 0x04 | N_INPUTS | RW | clamped to 1..MAX_IN |
| 0x08 | N_HIDDEN | RW | clamped to 1..N_HID |
| 0x0C | N_OUTPUTS | RW | clamped to 1..N_OUT |
| 0x10 | STATUS | RO | [0] load done, [1] hidden busy, [2] output busy, [3] input FIFO empty, [31:16] FIFO count |
| 0x14 | IMAGES | RO | images completed |

Data arrives on a 32-bit AXI4-Stream, one value per beat in the low bits. The stream target selects what the beats are:

| Target | Beats | Order |
|---|---|---|
| 0 | hidden weights | neuron by neuron, input by input |
| 1 | hidden biases | one per hidden neuron |
| 2 | output weights | one set per output neuron |
| 3 | output biases | one per output neuron |
| 4 | input codes | through a 2048-entry FIFO |

Results leave on an AXI4-Stream master as sign-extended 16-bit sums, one beat per output neuron. `tlast` marks the last neuron of each image. The register map and stream format are this design's own; the source only names the AXI interfaces.

The full-size default holds 2450 × 1000 8-bit hidden weights, 19.6 Mbit. That is the amount of block RAM on the ZC706 board the architecture was sized for.

## POLYBiNN (`polybinn`)

The pipeline has three stages:

1. **Binarize.** `feature_binarizer` compares each pixel with 128 (half the range).
2. **Trees and vote.** `polybinn_tree_array` evaluates M × N trees, N per class. Each tree is a 64-entry truth table indexed by six chosen features. `polybinn_class_vote` then computes, for each class:
   - **D = 1** when Σ dₙcₙ > ½ Σ cₙ, where cₙ are the trees' boosting confidences;
   - **C** = Σ dₙcₙ / Σ cₙ, quantized to 2 bits at ¼, ½ and ¾.

   The weights are constants, so this reduces to fixed logic; no divider is built.
3. **Voting.** `polybinn_argmax` picks the class. It has two modes:
   - **Original** (`SIMPLIFIED=0`):
     - if any class is active, the active class with the highest C wins;
     - if none is active, the class with the lowest C wins;
     - ties go to the lower class index.

     This is built as a tree of pipelined comparators.
   - **Simplified** (`SIMPLIFIED=1`): a priority encoder over D. The default priority order is by MNIST training-set class size: 1, 7, 3, 2, 9, 0, 6, 8, 4, 5. When no class is active it picks the first class in that order.

One image per cycle; latency is 7 cycles for 10 classes. The published design runs at 100 MHz with 90 ns latency.

**The tree model is a placeholder.** No trained model is available. `polybinn_model_pkg` supplies, for every tree, six feature indices, a 64-bit truth table and an 8-bit confidence. All come from a fixed integer hash. To deploy a trained forest, replace the bodies of `tree_feature`, `tree_lut`, `tree_conf` and `feature_threshold` with the trained values. The hardware does not change.

## POLYCiNN (`polycinn`)

**Input.** The image is 32 × 32 pixels with 3 channels and 4 bits per value (the 4 MSBs of each colour). It arrives one row per cycle.

**LBP layer (`lbp_layer`).** It builds a 4-bit code for every pixel and channel, in the order {top, right, bottom, left}. Each bit says whether that neighbour is brighter.

Only two comparator arrays are built:
- a column array, comparing each pixel with the one below (south);
- a row array, comparing each pixel with its right neighbour (east).

The north and west bits are the complements of the south and east comparisons from the neighbouring pixels. As a result:
- ties count as "brighter" for the top and left bits but not for the right and bottom bits;
- neighbours outside the image give 0.

A row's codes are formed when the next row arrives, so the last row needs one extra cycle: an image takes 33 cycles.

**Histograms.** Nine 16 × 16 windows with stride 8 cover the image. Each window has 16 accumulators per channel, one per code value, which together form its histogram.

**Downsampled image (`image_downsampler`).** An 8 × 8 copy of the image, made from the mean of each 4 × 4 block. Window w uses the 6 × 6 sub-image at the same window position, with stride 1. The source gives the sizes but not the method: the block mean is this design's choice.

**Per window.** Each window has 156 features: 48 histogram bins and 108 downsampled values. Each feature is binarized against its own learned threshold. The window then has a POLYBiNN array of 10 classes × N trees.

**Fusion (`decision_fusion`).** Adds the nine 2-bit confidences of each class and picks the largest sum, with a pipelined comparator tree. Ties go to the lower index.

**Timing.** `out_valid` is high in the 11th cycle after the cycle that transfers the last row. `score` carries the per-class sums.

**Size.** The published CIFAR-10 result uses 1000 trees per class per window, i.e. 90,000 trees. The default here is `N = 100`, which is one of the published sweep points. Elaborating this block takes memory in proportion to N: about 5 GB at N = 100 and 16 GB at N = 300. N = 1000 would need more than 32 GB. Raise N if your tools have the memory.

## Top level (`fpga_dl_top`)

Port prefixes:
- `snn_`: the AXI4-Lite slave, the input and output AXI4-Streams, and the event strobes;
- `tanh_`: `tanh_z`, `tanh_out` and `tanh_out_region`, with a valid/ready handshake;
- `pbn_`: 784 pixels in, one-hot class out;
- `pcn_`: one image row in with valid/ready, then the one-hot class and scores out.

Not included:
- the processor, DMA engine and DRAM of the SNN system;
- the convolutional feature extractor that feeds POLYBiNN for CIFAR-10;
- the software that generates the HDL.

These were not designed in the source. The SNN's AXI ports are where such a system connects.

## Simulation

Every block has a self-checking testbench in `tb/`. Each ends with `TB_RESULT checks=N failures=M` and has a watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/*_pkg.sv \
  $(ls rtl/*.sv | grep -v _pkg) tb/tb_polycinn.sv --top-module tb_polycinn -o sim
./obj_dir/sim
```

The testbenches compare against models written independently in the testbench:

| Testbench | Reference |
|---|---|
| `tb_tanh_dctif` | `$tanh` |
| `tb_snn_overlay` | an integer network model |
| `tb_polybinn`, `tb_polycinn` | the tree, vote and LBP definitions |

Where a rate or latency is stated above, the testbench also checks the cycle count.

**`tb_fpga_dl_top`** runs all four designs at once, at full default size:
- the SNN configured as a 12-20-3 network;
- a sweep of tanh inputs;
- 300 POLYBiNN images;
- six POLYCiNN images.

It counts each mechanism and fails if one never occurs: AXI writes and reads, weight loading, input and activation stalls, result back-pressure, every tanh region, single and multiple active POLYBiNN classes, and POLYCiNN row stalls. It builds and runs in about 2.5 minutes.

## Where this departs from the source

| Choice | In the source | Here |
|---|---|---|
| Trained models | not given | POLYBiNN/POLYCiNN trees and thresholds are hash placeholders |
| POLYCiNN trees per class and window | 1000 | 100 (tool memory) |
| tanh region bounds | not given | 59 and 712, with rounding (max error 0.0039) |
| SNN | accumulator widths, register map and stream format not given | own choices (see the SNN section) |
| MNIST POLYCiNN configuration | 22 × 22 windows, stride 3 | not the default |
