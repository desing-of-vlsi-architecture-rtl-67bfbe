# On-chip back-propagation trainer for a 784 x 32 x 10 perceptron

This RTL trains a small multilayer perceptron inside the chip itself. It does
not only run inference. Images and initial weights are loaded once. A single
`start` pulse then runs stochastic-gradient back propagation over the training
images, classifies the test images, and reports the number of correct
answers after every epoch. No processor is involved.

The architecture follows the paper *"Design of VLSI Architecture for a
Flexible Test Bed of Artificial Neural Network for Training and Testing on
FPGA"*. That paper trains a 784 x 32 x 10 network on handwritten digits:
100 training and 100 test images, 10 epochs, learning rate 0.125, 16-bit
fixed point. This SystemVerilog is an independent implementation of that
architecture. Its numeric details and interfaces are its own; see
"Choices and departures" below.

The main idea is **one MAC per neuron, reused for every phase of training**.
There are 42 neurons (32 hidden and 10 output). Each neuron has its own weight
memory, multiply-accumulate unit and activation table. A six-state controller
points all of them at the same weight index on every cycle. Depending on the
state, a neuron's MAC does one of three jobs:

- it accumulates a weighted sum;
- it updates a weight in place;
- it works as a plain multiplier for the error that flows back.

The whole datapath advances one input, one hidden unit or one weight column
per clock. Nothing is pipelined and nothing stalls.

## The per-image schedule

Every image passes through the states below. `cnt` is the step counter. All
neurons of a layer work in parallel on the same `cnt`.

| state | cycles | hidden neurons (j = 0..31)               | output neurons (k = 0..9)                 |
|-------|--------|------------------------------------------|-------------------------------------------|
| S0    | 1      | clear accumulator                        | clear accumulator                         |
| S1    | 784    | `acc += x[cnt] * w1[j][cnt]`             | hold                                      |
| S2    | 32     | hold (H[j] = f(acc) is read)             | `acc += H[cnt] * w2[k][cnt]`              |
| S3    | 32     | hold                                     | `w2[k][cnt] += H[cnt] * -(delta2[k] >>> 3)` |
| S4    | 32     | neuron `cnt` stores `e1 = sum_k psum[k]` | `psum[k] = delta2[k] * w2[k][cnt]`        |
| S5    | 784    | `w1[j][cnt] += x[cnt] * -(delta1[j] >>> 3)` | hold                                   |

A **training image** takes 1 + 784 + 32 + 32 + 32 + 784 = **1665 cycles**.
That is 816 cycles forward, 848 cycles backward and one cycle for S0.

A **test image** stops after S2 and takes 1 + 784 + 32 = **817 cycles**.

Images follow each other with no gap. An epoch of 100 training and 100 test
images therefore takes exactly 100 x 1665 + 100 x 817 = **248,200 cycles**.
The source paper reports a 1.774 ns clock period for its FPGA build and
0.4403 ms per epoch. At that clock, 248,200 cycles is exactly 0.4403 ms, so
this schedule matches the paper's cycle count. The clock period was not re-measured for this RTL. It has no
pipeline registers in the MAC path, so expect a much longer critical path
than 1.774 ns on most targets.

Several values are combinational and are needed several states later. They
stay valid because nothing overwrites the accumulators between their
forward state and the next S0:

- **H[j] and its derivative.** The hidden accumulator stops changing after S1.
  Its activation-table output stays valid through S2 to S5.
- **O[k], e2 and delta2.** The output accumulator stops changing after S2.
  `e2 = O - d` (one subtractor per output neuron) and
  `delta2 = e2 * O'` (one multiplier per output neuron) stay valid through
  S3 and S4.
- **delta1[j].** In S4, when `cnt == j`, hidden neuron j latches its error
  `e1`. `delta1 = e1 * H'` is then combinational and valid in S5.

In S3 and S5 the accumulator is *not* loaded. The weight read from the
memory is fed to the MAC's adder as its base operand, and the sum goes back
to the same memory word in the same cycle. Weight memories therefore have an
asynchronous read and a synchronous write. This is what lets a layer's
weights be updated at one column per cycle.

### Order of the output update and the hidden error

S3 writes the new output weights before S4 reads them to form the hidden
error. The hidden error is therefore computed with *updated* output weights.
Textbook back propagation uses the old ones. The design keeps this order on
purpose. The testbench's reference model does the same, so the results
match bit for bit. Running S4 before S3 in `ann_fsm` would give the
textbook order at the same cycle count, since delta2 stays valid through
both states; that variant is not provided.

## The neuron

`neuron.sv` is one module for both layers; `IS_OUTPUT` selects the role. It
is made of four parts:

- **Weight memory** (`weight_mem`). It holds 784 words for a hidden neuron
  and 32 for an output neuron.
- **MAC** (`mac_unit`). It computes `sum = base + (a * b >>> 12)`, where
  `base` is zero, its own accumulator, or the current weight. The
  accumulator loads `sum` only in the neuron's forward state.
- **Activation table** (`act_lut`). It gives the activation and its
  derivative from one 256-entry table for each, addressed by |sum| in steps
  of 1/32. The activation is the sigmoid by default. The `ACT` parameter
  selects tanh instead, per layer through `HID_ACT` / `OUT_ACT` on the top.
  The sign is put back from the symmetry of the curve: f(-x) = 1 - f(x) for
  the sigmoid, f(-x) = -f(x) for tanh. The derivative is symmetric. Sums
  beyond +-8 use the last entry and raise `lut_sat`. The entries are
  computed at elaboration:
  `f[i] = round(4096 * s)` and `f'[i] = round(4096 * s * (1 - s))` with
  `s = 1 / (1 + exp(-i/32))`; for tanh `s = tanh(i/32)` and
  `f'[i] = round(4096 * (1 - s^2))`.
- **Error block.** It computes `delta = sat16(e * f' >>> 12)`, where `e` is
  `act - d` for an output neuron or the latched hidden error for a hidden
  neuron. The learning-rate step is `-(delta >>> 3)`, i.e. lr = 1/8 applied
  as a shift.

The MAC operands by state:

| state              | a          | b                | base   | result goes to        |
|--------------------|------------|------------------|--------|-----------------------|
| forward (S1 / S2)  | input      | weight           | acc    | accumulator           |
| update (S5 / S3)   | input      | -(delta >>> 3)   | weight | weight memory         |
| S4, output neuron  | delta      | weight           | 0      | `psum`, to the adder  |

## The hidden error in one cycle

In S4 the ten output neurons each produce `delta2[k] * w2[k][cnt]`.
`adder_tree` adds the ten products in a single cycle, with no rounding. The
result is saturated to 16 bits and written into hidden neuron `cnt`. The
32 hidden errors are therefore ready after 32 cycles, one per cycle.

## Numbers

- Words are 16-bit two's complement with 12 fraction bits. The range is
  -8 to +7.9998 and the step is 1/4096. This covers pixels (0..1),
  activations (0..1), derivatives (0..0.25), deltas and weights.
- Weighted sums are kept at 32 bits with the same binary point, so a
  784-term sum cannot overflow.
- Every product is `(a * b) >>> 12`, which rounds toward minus infinity.
- A value written to a 16-bit word saturates: a weight, a delta, or the
  hidden error.
- The learning rate is 0.125. It is applied as an arithmetic shift right by
  3 of the delta, before the multiplication.

`ann_pkg.sv` holds these constants (`DATA_W`, `FRAC`, `ACC_W`, `LR_SHIFT`),
the state enum and the `sat16` / `fx_mul` helpers. Changing `FRAC` changes
the format everywhere except the table step in `act_lut`, which is its own
parameter.

## Epochs, images and accuracy

`train_test_ctrl` runs `cfg_epochs` epochs. Each epoch trains on
`cfg_train` images and then tests `cfg_test` images. All three values are
sampled at `start` and may be anything up to the memory sizes.

Images live in `image_mem` in image-major order: pixel p of image i is at
address `i*784 + p`. Training images are at indices 0..99 and test images at
100..199. Each image has a 4-bit label.

A test image's output sums are complete one cycle after its last S2 cycle.
The controller compares `argmax(O)` with the label in that cycle; this is
the S0 of the next image, before its clear takes effect. At the end of an
epoch:

- `acc_valid` pulses once;
- `acc_count` gives the number of correct test images;
- `acc_epoch` gives the epoch number;
- `hit` pulses for each correct image.

`busy` is high from the start pulse until the last comparison. `done` is
high from then until the next start.

## Using part of the hardware

A run can use fewer neurons than were built. `cfg_hidden` (1..N) and
`cfg_outputs` (2..K) are also sampled at `start`. A value of 0 or out of
range selects the whole layer. With n hidden neurons in use:

- S2, S3 and S4 last n cycles instead of N;
- a training image takes 1 + 2M + 3n cycles and a test image 1 + M + n;
- neurons beyond the first n hidden / k output neurons keep their weights;
- unused output neurons add nothing to the hidden error and are never
  predicted.

A smaller network can therefore be tried on the same build. Weights of the
unused neurons are kept, so a later run on the whole network continues
from them.

## Host interface

Use these ports only while `busy` is low; an assertion checks this.

- `pix_we / pix_waddr / pix_wdata` write one pixel.
- `lbl_we / lbl_waddr / lbl_wdata` write one label.
- `w_we / w_layer / w_neuron / w_addr / w_wdata` write one weight.
  `w_layer` is 0 for the hidden layer and 1 for the output layer.
  `w_neuron` selects the neuron and `w_addr` its input index.
- `w_rdata` returns the weight at the same selection, combinationally.

This is also how trained weights are read out.

Reset (`rst_n`) is active-low and synchronous. It clears controllers and
accumulators, but not the memories.

## Parameters

`ann_top` takes the following parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `M`         | 784 | inputs |
| `N`         | 32  | hidden neurons |
| `K`         | 10  | output neurons |
| `MAX_TRAIN` | 100 | training images held |
| `MAX_TEST`  | 100 | test images held |

The cycle counts scale as 1 + 2M + 3N per training image and 1 + M + N per
test image. `HID_ACT` and `OUT_ACT` (`ACT_SIGMOID` or `ACT_TANH`, default sigmoid)
choose each layer's activation. The number of hidden layers is fixed at
one. `MAX_TEST` must be at least `MAX_TRAIN`.

## Choices and departures

What follows the source paper:

- the network shape and data-set sizes;
- the 16-bit fixed point and the learning rate;
- the six states and their order;
- one weight memory, MAC and table per neuron;
- the table addressed by the magnitude of the sum;
- the ten-operand adder;
- the per-state cycle counts;
- a choice of activation and of how much of the hardware a network uses.

Chosen here, where the paper gives no detail:

- the 4.12 number format, the 32-bit accumulator, truncation and saturation;
- sigmoid and tanh as the two activations, and the table's size, step and
  rounding;
- that neuron counts are chosen at run time but the activation at
  elaboration;
- the one-cycle S0;
- the idle state and back-to-back image handshake;
- the image memory layout and asynchronous memory reads;
- the host load/read port;
- argmax with lowest-index ties as the classifier decision.

The paper says a neuron's register is zero in S4. That is kept for the
output neurons, whose MAC is a plain multiplier there. Hidden neurons keep
their sum through S4 so that `H'` is still available for `delta1`.

The paper's generalised cycle formulas do not reproduce its own 816 / 848
numbers. The numbers were followed.

Not built:

- more than one hidden layer;
- choosing the activation at run time, or per neuron rather than per layer;
- random weight initialisation by LFSR, which the paper lists as future work.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the
module with values computed independently in the testbench and prints
`TB_RESULT checks=N failures=M`.

`tb_ann_top_full` runs the default 784 x 32 x 10 design through ten full
epochs of 100 training and 100 test images. The images are synthetic: ten
random binary class prototypes with 1/8 of the pixels flipped. The
testbench contains an integer reference model of the same arithmetic and
checks:

- every epoch's accuracy;
- every epoch's length of exactly 248,200 cycles;
- all 25,728 weights after training.

After these ten epochs it runs one more epoch on 16 hidden and 9 output
neurons and checks it the same way.

It also checks that each mechanism occurs at least once:

- all six states;
- images run on part of the hidden layer;
- back-to-back images;
- right and wrong answers;
- table saturation;
- weight updates.

On this data the accuracy goes 48, 91, 98, 100, then 100 in every later
epoch. On the reduced network it is 89: images of the tenth class can no
longer be right. The run takes about 11 s of simulation after a build of about two
minutes.

`tb_ann_top` does the same for a 24 x 6 x 4 network with a tanh hidden
layer, in well under a second.

`tb_ann_top_fwd12` runs inference only on the default build, using 12 of
the 32 hidden neurons, i.e. a 784 x 12 x 10 network on 22 neurons. It
checks every image's classification against a reference model and a
forward latency of 1 + 784 + 12 = 797 cycles per image. The source paper
quotes 795 cycles for this case without a breakdown.

No MNIST data and no FPGA results are part of this release.

Simulate, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/ann_pkg.sv tb/tb_ann_top_full.sv --top-module tb_ann_top_full -o sim
./obj_dir/sim
```

Replace the testbench name to run another test, e.g. `tb_neuron` or
`tb_ann_fsm`. `tb/ann_top_check.svh` is the body shared by the two
end-to-end testbenches.

## Files

| file | content |
|------|---------|
| `rtl/ann_pkg.sv` | number format, states, helpers |
| `rtl/ann_top.sv` | the complete trainer |
| `rtl/ann_fsm.sv` | six-state controller and step counter |
| `rtl/train_test_ctrl.sv` | epoch/image sequencing, accuracy count |
| `rtl/neuron.sv` | one neuron: memory, MAC, table, error block |
| `rtl/mac_unit.sv` | multiply-accumulate with selectable base |
| `rtl/act_lut.sv` | sigmoid and derivative table |
| `rtl/weight_mem.sv` | per-neuron weight memory |
| `rtl/adder_tree.sv` | multi-operand adder for the hidden error |
| `rtl/image_mem.sv` | image and label memory |
| `rtl/argmax.sv` | predicted class |

Testbenches are in `tb/`: `tb_<module>.sv` for each module, plus
`tb_ann_top_full.sv` (default size, ten epochs) and `tb_ann_top_fwd12.sv`
(inference on 12 hidden neurons). `ann_top_check.svh` holds the body that
the two `tb_ann_top*` training testbenches share.
