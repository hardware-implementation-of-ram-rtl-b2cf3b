# A RAM neural network built from logic gates

This design recognises handwritten-style digits (10 classes) in a 24 x 16
binary image with a *RAM* or *weightless* neural network. A RAM neuron looks up
a few pixels in a truth table instead of multiplying and adding weights. The
design does not store those tables in memory. Each trained neuron becomes a
small combinational function: the OR of the input addresses that training set
to 1. Synthesis minimises that function like any other logic. The network has
no weights, no memories and no state machine. One image is classified in one
pass through combinational logic, and the top adds a single register stage
at the output.

The network holds 340 neurons with 12 inputs each, 34 per class. They are
spread over four "neuron chips" and one "decision chip". This follows a
five-device partition in which each neuron chip sees only a quarter of the
image.

```
 pixels[383:0]
   |-- rows  0-5  (96 px) --> IC1 neuron_chip: 8 neurons/class --> 10 x 3-bit counts --.
   |-- rows  6-11 (96 px) --> IC2 neuron_chip: 8 neurons/class --> 10 x 3-bit counts --|
   |-- rows 12-17 (96 px) --> IC3 neuron_chip: 8 neurons/class --> 10 x 3-bit counts --|-- 130 bits
   '-- rows 18-23 (96 px) --> IC4 neuron_chip: 10 neurons/class -> 10 x 4-bit counts --'
                                                                                       |
                     IC5 decision_chip: 10 x group_adder --> class_comparator --> class (4 bits)
                                                                                       |
                                                      ram_nn_top output register <-----'
```

## How one neuron works (`ram_neuron`)

A 12-input RAM neuron is a 4096 x 1 table addressed by 12 pixels. Training
shows the neuron every training image of its class and writes 1 at the
address each image presents. At recall the neuron fires when the address of
the new image was seen in training. For 195 training images at most 195 of
the 4096 entries are 1, so it is cheaper to describe only those entries:

    fire = (addr == T0) | (addr == T1) | ... | (addr == T(N-1))

`ram_neuron` is this equation. `TERMS` is a parameter array of trained
addresses, so every comparison has a constant on one side. Synthesis then
reduces the sum of minterms to a few gates: addresses that differ in one bit
merge, duplicate terms vanish, and bits that never vary become single
literals. The "weights" exist only as the shape of that logic.

`addr[0]` is neuron input e1 and `addr[11]` is e12. The module's default
`TERMS` is a real trained neuron of class "Four": 30 training addresses, 9 of
them distinct. With these defaults the module is that neuron. One of the 30
terms was given incomplete and is completed with !e12, like its neighbours.

## Connections and trained contents (`ram_nn_pkg`)

Two things in the network are data, not structure. The first is which pixel
drives which neuron input; the original connects neurons to the image at
random. The second is the trained minterms of each neuron. The training set
(scanned postal-address digits) is not part of this design. `ram_nn_pkg`
produces both at elaboration time with constant functions, so the RTL
elaborates on its own:

* **Training images.** Each class has a seven-segment style glyph
  (`glyph_pixel`): strokes 2 pixels thick on rows 1-22 and columns 2-13.
  Pattern *k* of class *c* is the glyph with every pixel flipped when a 32-bit
  hash of (c, k, pixel) falls below 16/256 (`sample_pixel`). Patterns
  `0 .. N_TRAIN-1` train the network. Higher *k* give unseen test images.
* **Connections.** Chip *ch* owns pixels `96*ch .. 96*ch+95`. Input *i* of
  neuron *j* of class *c* is connection slot `s = 12*j + i`. The slot maps to
  local pixel `(a*s + b) mod 96` (`neuron_pixel`). Here *a* is a unit modulo
  96 (`6*(u>>1) + (u odd ? 5 : 1)` for a hashed `u` in 0..31) and *b* is a
  hashed offset; both depend on chip and class. On IC1..IC3, a class's
  8 x 12 = 96 inputs therefore cover each of the chip's pixels exactly once.
  IC4's 10 x 12 = 120 inputs use a second such map for slots 96..119, so 24
  pixels feed two neurons of a class.
* **Trained minterms.** `neuron_terms(ch, c, j, N_TRAIN)` lists, for
  k = 0..194, the address that pattern *k* presents to the neuron. Entries at
  or above `N_TRAIN` repeat entry 0. Every neuron therefore has exactly 195
  terms, and a smaller `N_TRAIN` only changes their values.

To build the network from real training data, replace `neuron_terms` and
`neuron_pixel` with functions that return your trained addresses and
connections. Nothing else depends on how they are made.

## Counting neurons and the 3-bit limit (`class_counter`, `neuron_chip`)

Each neuron chip reports, per class, how many of its neurons fired. The
counts cross to the decision chip on a 130-bit bus: 3 bits per class from
IC1..IC3 (8 neurons each) and 4 bits per class from IC4 (10 neurons). Three
bits cannot hold 8. `class_counter` keeps the 3-bit width and **saturates**:
a class that fires all 8 neurons of a chip is reported as 7. The largest
score is therefore 7+7+7+10 = 31, not 34. This costs resolution exactly
when classes match strongly: two classes that both saturate on a chip look
equal there. In the end-to-end test saturation occurs hundreds of times.
If you prefer exact counts, set `COUNT_W` to 4 on every
chip and widen `cnt_small`.

## Choosing the class (`group_adder`, `class_comparator`, `decision_chip`)

The decision chip adds the four counts of each class (`group_adder`, 6-bit
result). It then picks the class with the largest sum in `class_comparator`.
The comparator is a tree of comparator-plus-multiplexer cells over 16 slots,
with slots 10..15 empty. Each cell passes on the right-hand (higher-index)
candidate only if its score is strictly larger. A tie therefore goes to the
lowest class index, and an empty image (all sums 0) is reported as class 0.
The design has no reject output: the winning score `out_score` is provided,
so a user can reject weak or tied decisions outside the network.

## Interface and timing (`ram_nn_top`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock |
| `rst_n`     | in  | 1     | asynchronous reset, active low; clears `out_valid`, `out_class`, `out_score` |
| `in_valid`  | in  | 1     | `pixels` holds an image in this cycle |
| `pixels`    | in  | 384   | image, pixel index = row*16 + column, 24 rows of 16 |
| `out_valid` | out | 1     | `out_class` / `out_score` belong to the image of the previous cycle |
| `out_class` | out | 4     | recognised class 0..9 |
| `out_score` | out | 6     | number of neurons of that class that fired (IC1..IC3 counts saturated at 7) |

From `pixels` to the output register everything is combinational: 12-bit
minterm matches, population counts, one 4-input adder and a four-level
compare tree. An image presented with `in_valid` in cycle *t* appears on the
outputs after the clock edge that ends cycle *t*. The network takes one image
per clock and has no back-pressure. The original ran asynchronously, with
about 40 ns through the neuron chips and 220 ns through the decision stage.
The output register and the reset are this design's additions. No timing
analysis has been done, so the reachable clock rate is not known.

Parameter: `N_TRAIN` (default 195, the largest training set in the original
study) is the number of training patterns per class used by the package.

## How far it can be trusted

Behaviour that follows the original network:

* 12-input neurons, 34 per class, 340 in all, for 10 classes.
* 384 pixels split into four groups of 96.
* 8/8/8/10 neurons per class on the four chips, with 3/3/3/4-bit counts.
* The decision stage adds the counts and compares them to pick a 4-bit class.
* Neurons as sums of trained minterms.
* The default neuron's contents.

Choices made by this design, not taken from the original:

* The saturation of the 3-bit counts.
* The tie rule.
* The pixel numbering and the rows each chip sees.
* The connection maps.
* The synthetic training glyphs and noise.
* The bit order e1 = LSB.
* The output register and the reset.

The original was trained on a scanned-character database that is not
available. Recognition rates measured here therefore describe the synthetic
digits only: 94 % on unseen noisy digits with 195 training patterns. The
original reported up to 100 % on its data.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_ram_neuron` | all 4096 addresses of the default neuron against a table built from the 30 minterms written out bit by bit; exactly 9 addresses fire |
| `tb_class_counter` | all inputs of the 8-neuron/3-bit form (saturation at 7) and of the 10-neuron/4-bit form |
| `tb_group_adder` | all 8192 combinations of 3+3+3+4-bit counts |
| `tb_class_comparator` | 4000 score vectors, half of them drawn from 0..3 to force ties; expected result from a linear scan for the first maximum |
| `tb_decision_chip` | 3000 random count vectors: all 10 sums and the winner |
| `tb_neuron_chip` | IC1 (8 neurons, 3 bits) and IC4 (10 neurons, 4 bits) on unseen noisy digits, clean glyphs, an empty image and random images |
| `tb_ram_nn_top` | the whole network at default parameters, see below |
| `tb_train_sizes` | two copies of the network trained on 50 and 100 patterns per class, 200 unseen digits each, against the reference model; prints each recognition rate (190 and 193 of 200 in a typical run) |

The reference models in `tb_neuron_chip` and `tb_ram_nn_top` build a full
4096-entry truth table per neuron at run time, from the package's training
patterns and connections, and evaluate neurons by table lookup. They share
the training data with the RTL but none of its logic.

`tb_ram_nn_top` streams 341 images, one per clock. They are an empty image,
the 10 clean glyphs, 300 unseen noisy digits, 20 random images and 10 more
digits after a reset, with idle cycles mixed in. Checks:

* every class and score;
* that `out_valid` follows `in_valid` by exactly one cycle;
* that an image presented during reset gives no result;
* that each mechanism occurs at least once: a saturated 3-bit count, an IC4
  count above 7, a tie between classes, an idle cycle and a reset;
* a recognition rate of at least 90 % on the noisy digits.

A typical run reports 886 saturated counts, 996 wide IC4 counts, 24 ties and
94 % recognition.

Running a testbench with Verilator 5 (from the directory holding `rtl/` and
`tb/`):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb +libext+.sv --top-module tb_ram_nn_top \
    rtl/ram_nn_pkg.sv tb/tb_ram_nn_top.sv
./obj_dir/Vtb_ram_nn_top +verilator+rand+reset+2
```

Replace the top module and file for other testbenches. The package must come
first.

## Build cost

The contents of all 340 neurons are computed by constant functions during
elaboration: 340 x 195 addresses of 12 pixels each. Every neuron becomes its
own module specialisation. Measured on one core:

* Verilator lint of `ram_nn_top`: about 80 s.
* Verilator build of the full testbench: about 2 minutes; the simulation
  itself takes under a second.
* Verilator build of `tb_train_sizes` (two networks): about 4 minutes.
* Yosys with the slang front end: about 5 minutes to elaborate `ram_nn_top`
  and about 6 minutes for coarse synthesis. Coarse synthesis gives about
  28,000 word-level cells before technology mapping and minimisation.

A single `neuron_chip` takes about a minute. Lowering `N_TRAIN` does not
shorten these times, because each neuron keeps 195 terms.

## Files

* `rtl/ram_nn_pkg.sv`: sizes, training images, connection map, trained minterms.
* `rtl/ram_neuron.sv`: one neuron as a sum of minterms.
* `rtl/class_counter.sv`: per-class fired-neuron count, saturating.
* `rtl/neuron_chip.sv`: one 96-pixel partition (IC1..IC4).
* `rtl/group_adder.sv`: per-class score.
* `rtl/class_comparator.sv`: comparator/multiplexer tree, lowest index wins ties.
* `rtl/decision_chip.sv`: IC5, sums and comparison.
* `rtl/ram_nn_top.sv`: the complete network with its output register.
* `tb/tb_*.sv`: one self-checking testbench per module.
