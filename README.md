# LeNet-5 accelerator with a time-triggered, accuracy-degrading hardware trojan

This is a small convolutional-network accelerator for 30x30 images of
handwritten digits, plus a hardware trojan hidden in it. The trojan needs no
input pattern to trigger it. It counts the images the accelerator has
classified. Once enough have gone by, it adds an offset to one stored value
of the network: one weight, one bias or one feature map. The predictions get
worse, either slowly or all at once.

The trojan comes in two forms:

* **Gradual (GDAT).** The offset grows by the smallest step of the number
  format every 2^N images until it reaches a chosen payload. Accuracy sinks
  over weeks.
* **Sudden (SDAT).** The trojan stays dormant for a fixed number of images,
  six months' worth at 30 images per second. Then it applies the whole
  payload at once and keeps it.

Both forms are meant to get through a two-week functional test without
notice. Both cost a counter, a comparator or incrementer, and one adder on
an existing memory data path.

The clean accelerator computes the whole network in a single fixed-point
multiply-accumulate unit. The trojan sits next to the memories. The rest of
this file explains each part, where the RTL departs from the design it
follows, and how to simulate it.

## Number format and overflow

Every weight, bias, pixel and intermediate value is a 16-bit Q1.14 word:

- a sign bit and one integer bit;
- 14 fraction bits;
- range -2 to 2 - 2^-14;
- one step (LSB) is 2^-14 = 0.000061.

Products are kept at full precision (Q2.28) and summed in a 48-bit
accumulator. When the bias has been added, the sum goes back to Q1.14 in two
steps:

1. The low 14 bits are dropped, which rounds toward minus infinity.
2. The low 16 bits of what remains are kept.

A result outside [-2, 2) therefore **wraps around**; it does not saturate.
This matters for the trojan. The payload sizes were chosen as the largest
values that do not push any later computation over the edge. A larger
payload turns a big positive output into a negative one.

## The network and how it is computed

| Layer    | Output           | Kernel   | Activation |
|----------|------------------|----------|------------|
| input    | 30x30x1          |          |            |
| Conv1    | 28x28x16         | 3x3x1    | ReLU       |
| AvgPool1 | 14x14x16         | 2x2, stride 2 |       |
| Conv2    | 12x12x32         | 3x3x16   | ReLU       |
| AvgPool2 | 6x6x32           | 2x2, stride 2 |       |
| FC1      | 64               | 1152 inputs | ReLU    |
| FC2      | 10 (one per digit) | 64 inputs | none     |

The network has 79,242 parameters. The predicted digit is the FC2 output
with the largest value; on a tie the lower digit wins.

Every layer is the same loop nest, with the settings listed in
`lenet_pkg::layer_cfg`:

```
for oc, oy, ox:                       // each output word
    acc = 0
    for ic, ky, kx:                   // each tap, one per clock
        acc += in[ch][oy*s+ky][ox*s+kx] * w[...]
    out[oc][oy][ox] = wrap16((acc + bias[oc] << 14) >> 14), then ReLU
```

The pooling layers are the same nest with four differences:

- they read channel `ch = oc`, not `ch = ic`;
- they use the constant weight 0.25;
- they add no bias;
- they use stride 2.

A fully connected layer is a 1x1 "convolution" with 1152 or 64 input
channels.

`layer_ctrl` issues one tap per clock. In that clock it sends a
feature-map read and, except when pooling, a weight read and a bias read.
All memories answer one clock later, when `mac_unit` accumulates. After the
last tap of an output word there is one wait clock, and then the write
clock. In the write clock the finished word goes to the next layer's RAM
and the accumulator is cleared. So an output word costs (taps + 2) clocks:

| Layer    | Words  | Clocks per word | Clocks  |
|----------|--------|-----------------|---------|
| Conv1    | 12,544 | 11              | 137,984 |
| AvgPool1 | 3,136  | 6               | 18,816  |
| Conv2    | 4,608  | 146             | 672,768 |
| AvgPool2 | 1,152  | 6               | 6,912   |
| FC1      | 64     | 1,154           | 73,856  |
| FC2      | 10     | 66              | 660     |

An image takes 910,997 clocks from `start` to `done`. At 125 MHz that is
7.3 ms, or about 137 images per second. The trojan's timing assumes 30 images
per second, so this rate is more than enough. The original accelerator is
much more parallel: its FPGA build used 288 DSP blocks. The single MAC here
computes the same function. It is not a model of that datapath.

## Where the values live

Sixteen weight ROM banks (`weight_store`, made of `weight_rom` banks) are
split into two groups:

- **Group A**, 8 banks of 674 words: Conv1, Conv2 and FC2 weights.
- **Group B**, 8 banks of 9,216 words: the FC1 weights.

Word `g` of a group is in bank `g % 8`, at address `g / 8`. Within a group
the words are numbered as follows:

```
Conv1 : g = k*9 + ky*3 + kx                  k < 16
Conv2 : g = 144 + (k*16 + c)*9 + ky*3 + kx   k < 32, c < 16
FC2   : g = 4752 + n*64 + i                  n < 10
FC1   : g = n*1152 + c*36 + y*6 + x          n < 64   (group B)
```

A single **bias ROM** (`bias_rom`) holds the 122 biases in this order:
Conv1 0-15, Conv2 16-47, FC1 48-111, FC2 112-121.

**Feature maps** change with every image, so they live in read-write
memories (`fmap_ram`), one per layer output. A word's address is
`c*H*W + y*W + x`. The FC2 outputs go straight into `argmax_unit`.

The split into 16 weight banks (8 + 8) and one bias memory follows the
original design. So do ROMs for the parameters and RAM for the feature maps.
The word order inside the banks is this design's own choice.

**ROM contents.** The trained weights are not available. The ROMs hold a
fixed pseudo-random pattern instead, from `lenet_pkg::weight_value` and
`bias_value`, which is an integer hash scaled to small values. The one
exception is Conv1 kernel 15 and its bias, whose published trained values
are used, because that kernel holds the weight target. The accelerator
computes the same function whatever the contents are. The predictions of
this RTL, however, mean nothing as digit recognition. To run a real network,
replace the two functions, or load the ROM arrays with `$readmemh`.

## The trojan

### Targets and payloads

The targets were picked by a sensitivity analysis. It set one parameter at
a time to 0.9999 and measured the accuracy. Numbers here count from zero;
the original counts from one, so "kernel 15, weight 9" is k = 14, tap 8.

| `TARGET`     | Value hit                                         | Where the adder sits                                   | Payload          |
|--------------|---------------------------------------------------|--------------------------------------------------------|------------------|
| `TGT_WEIGHT` | Conv1 kernel 15, weight 9 (bottom right, -0.2501) | read data of weight group A, bank 6, address 16        | 1.3623 (22,320 LSB) |
| `TGT_BIAS`   | FC2 bias 9 (the neuron for digit 8)               | read data of the bias ROM, index 120                   | 1.045 (17,121 LSB)  |
| `TGT_FMAP`   | AvgPool1 feature map 15, all 196 words            | write data of the AvgPool1 RAM, addresses 2744-2939    | 0.45 (7,373 LSB)    |
| `TGT_NONE`   | nothing                                           |                                                        |                  |

The weight payload is the largest that cannot overflow Conv1. Even in the
worst case, every positive weight multiplied by 1, the sum stays below
1.9999:

    1.9999 - (sum of positive weights 0.6055) - bias 0.0321 = 1.3623

The other two payloads come from simulations of the original network.

The payload site is `trojan_inject`. It takes a word and the address the
word belongs to. If the site is enabled and the address is in its window, it
adds the offset with 16-bit wrap-around; otherwise the word passes
untouched. With the offset at zero, as while the trojan is dormant, the data
path is exactly the clean one. The top always has all three sites. `TARGET`
enables one of them, because the trojans were evaluated one at a time.

### Triggers

Both triggers count `done` pulses, that is, images processed. Clock cycles
are not counted. Reset clears them.

- **`gdat_trigger`** has a free-running `CNT_W`-bit counter. Each time the
  counter wraps from all ones to zero, the offset grows by one LSB, until
  the offset equals the payload. The counter width is the smallest that
  keeps accuracy within 1 % of the baseline through a two-week functional
  test: 15 bits for the feature-map target and 13 for the weight and bias
  targets (`lenet_pkg::gdat_counter_width`). At 30 images per second the
  full payload arrives after:

  | Target      | Images per step | Steps  | Time      |
  |-------------|-----------------|--------|-----------|
  | weight      | 8,192           | 22,320 | 70.5 days |
  | bias        | 8,192           | 17,121 | 54.1 days |
  | feature map | 32,768          | 7,373  | 93.2 days |

  During the two-week test, 36,288,000 images, the offset reaches only
  1,107 LSB (feature map) or 4,429 LSB (weight, bias). The original reports
  74, 47.3 and 83.3 days for the three targets. Its wording of the counter
  widths does not reproduce those figures exactly. This RTL keeps the
  counter widths, so the times in the table above are the ones that hold
  here.

- **`sdat_trigger`** has a 29-bit counter. The image that brings the count
  to 473,040,000 (six months at 30 images per second) arms the trigger.
  From the next clock on, the offset is the whole payload, for good, and
  the counter stops. A two-week activation would need only 26 bits.

`KIND` picks the trigger: `KIND_GDAT` (the default) or `KIND_SDAT`.

The cost of a trigger is almost all flip-flops. `gdat_trigger` holds
31 bits with the 15-bit counter, or 29 with a 13-bit one.
`sdat_trigger` holds 30. The original FPGA build added 29 to 32
registers for the bias and feature-map trojans. It added about 157 for
the weight trojan. In this RTL the weight payload site is
combinational, so the weight trojan costs no more than the others.

### Default configuration

`lenet5_accel` with no parameters has these settings:

- feature-map target;
- gradual trigger with a 15-bit counter;
- payload 0.45.

Set `TARGET`, `KIND`, `PAYLOAD`, `GDAT_CNT_W`, `SDAT_W` and
`SDAT_ACTIVATE_AT` to build any of the six trojans that were evaluated, or a
clean accelerator.

## Interface and timing (`lenet5_accel`)

| Port                        | Dir | Meaning |
|-----------------------------|-----|---------|
| `clk`, `rst_n`              | in  | clock; asynchronous reset, active low |
| `img_we`, `img_addr[9:0]`, `img_data[15:0]` | in | write pixel `y*30+x` (Q1.14) of the input image; ignored while `busy` |
| `start`                     | in  | pulse while idle to classify the loaded image |
| `busy`                      | out | high from the clock after `start` until the result is ready |
| `done`                      | out | one-clock pulse with the result; also the trojans' count event |
| `class_id[3:0]`, `class_val` | out | predicted digit and its FC2 output, valid from `done` until the next `start` |
| `logits[10]`                | out | all ten FC2 outputs |

The image memory keeps its contents between images, so the host rewrites
only the pixels that change.

## Files

Each file starts with a comment on what it does and its timing.

| File | Contents |
|------|----------|
| `rtl/lenet_pkg.sv` | Q1.14 type, sizes, memory map, layer settings, targets, payloads, ROM contents |
| `rtl/lenet5_accel.sv` | top: memories, sequencer, MAC, argmax, trigger, payload sites |
| `rtl/layer_ctrl.sv` | layer sequencer and address generation |
| `rtl/mac_unit.sv` | multiply-accumulate, bias, wrap, ReLU |
| `rtl/weight_store.sv`, `rtl/weight_rom.sv` | 16-bank weight ROM with the weight payload site |
| `rtl/bias_rom.sv` | bias ROM |
| `rtl/fmap_ram.sv` | feature-map RAM |
| `rtl/argmax_unit.sv` | predicted digit |
| `rtl/gdat_trigger.sv`, `rtl/sdat_trigger.sv` | the two trojan triggers |
| `rtl/trojan_inject.sv` | payload site |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/lenet_ref_pkg.sv` | behavioural reference of the network, with the trojan payloads |

## Verification

Every testbench checks its module against values computed independently,
and ends with a line of the form `TB_RESULT checks=N failures=M`. The main
ones are these:

- **`tb_layer_ctrl`** runs a whole image. It compares every tap and every
  write (867,968 taps, 21,514 writes) against loop nests written out layer
  by layer. It also checks the 910,997-clock run length.
- **`tb_lenet5_accel`** runs eight images through five accelerators side by
  side:
  - a clean one;
  - a gradual feature-map trojan;
  - a sudden weight trojan;
  - a gradual bias trojan;
  - a sudden feature-map trojan.

  The counters are shortened so that the triggers fire during the run. For
  each image, each accelerator's ten outputs must match `lenet_ref_pkg`
  bit for bit. The model is given the offset the trigger must have reached
  by then. The testbench counts each mechanism: gradual steps, gradual
  saturation, sudden arming, each payload site changing words, and an image
  write during a run being ignored. A mechanism that never happens is a
  failure. In a typical run the trojans change the predicted digit in about 6 of the
  32 trojaned classifications.
- **`tb_lenet5_full`** runs three images through the default configuration
  with every parameter at its default. The trojan must still be dormant, so
  the outputs must equal the clean model.

- **`tb_trojan_timeline`** runs the three gradual triggers and the sudden
  one at full size, one image per clock, for 241,598,464 images (about two
  minutes of simulation). It checks every offset at several points: the
  end of a two-week test, and the image before and the image at which each
  gradual trigger reaches its payload. The sudden trigger must still be
  dormant at all of them.

Not verified: accuracy on real digits, since no trained weights are
available. The sudden trigger's arming at 473,040,000 images is checked
only with a small counter in `tb_sdat_trigger`; the logic is the same.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_lenet5_accel \
    rtl/lenet_pkg.sv tb/lenet_ref_pkg.sv tb/tb_lenet5_accel.sv -o sim
./obj_dir/sim
```

Modules are found by file name through `-Irtl`. For a single block, name its
testbench instead, for example `tb_gdat_trigger`; only `tb_lenet5_accel` and
`tb_lenet5_full` need `tb/lenet_ref_pkg.sv`.

Build times and run times:

| Testbench | Build | Run |
|-----------|-------|-----|
| `tb_lenet5_accel` | about 2 minutes | about 8 seconds |
| `tb_lenet5_full` | about 1.5 minutes | under 2 seconds |

Most of the build time goes into the ROM initialisation code.

## Departures from the original design and open points

- **Datapath.** One multiply-accumulate per clock replaces the original
  parallel engine, whose internals are not described. Results are
  bit-identical to a straightforward Q1.14 evaluation of the network.
- **Activation and rounding.** ReLU after Conv1, Conv2 and FC1, and floor
  rounding, are assumptions. The original does not state them.
- **Feature-map target.** The payload is added to every word of the map,
  which is how "feature map 15 is targeted" is read here.
- **ROM contents** are placeholders (see above). As a result the memory is
  1,626,336 bits: exactly the parameters plus the feature maps. The
  original FPGA build reports 2,192,896 bits, so its organisation differs.
- **GDAT times** differ from the reported ones as explained above.
- **Host side.** The image load port and the start/done handshake are this
  design's own. The host and the dataset are outside the RTL.
