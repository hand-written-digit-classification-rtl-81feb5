# Hand-written digit classifier with Binary Addition Trees

This is a small, fully parallel-per-line neural-network classifier for
hand-written digits. A 28 x 28 grey-scale image goes in, together with a
trained weights matrix; 393 clock cycles later a 4-bit number 0-9 comes out.

The network is a single layer of ten perceptrons, one per digit. Perceptron
*k* computes `out_k = sigmoid(w_k . x + b_k)` over all 784 pixels, and a max
selector reports the digit whose perceptron scored highest. The main idea of
the design is how the 784-term dot products are summed: the image is processed
one 28-pixel line at a time, and the 28 products of a line are added in a
**Binary Addition Tree (BAT)** of 27 adders instead of a serial chain. A line
then costs 6 multiply cycles plus 4 tree stages of 2 cycles, 14 cycles instead
of the 62 a serial multiply-and-add needs, and the whole image
28 x 14 + 1 = 393 cycles instead of 1737 (77 % fewer).

Weights are trained off-line (for example with backpropagation) and loaded
through a write port; there is no training hardware here.

## Data flow

```
             img write port                 weight / bias write ports
                   |                                    |
            +--------------+                   +-----------------+
            | image_buffer |                   |  weight_memory  |
            |  28 x 28 x 8 |                   | 10 x 784 x 8 +  |
            +--------------+                   | 10 biases       |
                   | 28 pixels of line L       +-----------------+
                   |                             | 10 x 28 weights of line L, 10 biases
                   v                             v
   +------------------------------------------------------------------+
   | perceptron 0..9 (ten in parallel)                                |
   |  28 x seq_multiplier --> bat_adder_tree (27 adders) --> acc += . |
   +------------------------------------------------------------------+
                   | ten 32-bit sums
                   v
          10 x sigmoid_unit --> max_selector --> digit register (4 bit)

   classifier_controller: line counter, cycle-in-line counter, start/busy/done
```

In total: 280 multipliers (10 perceptrons x 28), 270 tree adders, ten
accumulators, ten sigmoid units and one nine-comparator max selector.

## The 393-cycle schedule

Cycle 0 is the first cycle after the clock edge that samples `start`. That
same edge loads every accumulator with its perceptron's bias.

| cycles of line L (base 14 L) | what happens |
|---|---|
| 0 | controller addresses line L; at the end of the cycle all 280 multipliers sample their pixel and weight |
| 1 - 4 | radix-4 multiply steps (2 pixel bits per cycle) |
| 5 | products written to the multipliers' output registers |
| 6 - 7 | tree stage 1 (adders 1-8, 15-20), registered at the end of cycle 7 |
| 8 - 9 | tree stage 2 (adders 9-12, 21-23) |
| 10 - 11 | tree stage 3 (adders 13, 14, 24) |
| 12 | tree stage 4, first level (adders 25, 26) |
| 13 | tree stage 4, second level (adder 27); the accumulator adds its result at the end of the cycle |

After line 27 (cycles 0-391), cycle 392 runs the ten sigmoids and the max
selector; the digit and the ten scores are registered at the end of it, and
`done` is high in the following cycle: 393 edges after the start edge. Lines
are processed strictly one after another; the multipliers and the tree are
never busy at the same time. Overlapping them (pipelining) would roughly halve
the time, but is not part of this design.

## The Binary Addition Tree

28 inputs do not form a power of two, so the tree is lopsided: a 16-input
half and a 12-input half, joined by one last adder. The adder numbers below
are the ones used in the code (`a[n]` in `bat_adder_tree.sv`):

```
 stage 1          stage 2        stage 3       stage 4
 x0+x1   = 1 \
 x2+x3   = 2 /--  9 = 1+2  \
 x4+x5   = 3 \              >-- 13 = 9+10  \
 x6+x7   = 4 /-- 10 = 3+4  /                \
 x8+x9   = 5 \                               >-- 26 = 13+14 \
 x10+x11 = 6 /-- 11 = 5+6  \                /                \
 x12+x13 = 7 \              >-- 14 = 11+12 /                  >-- 27 = 26+25 --> sum
 x14+x15 = 8 /-- 12 = 7+8  /                                 /
 x16+x17 = 15\                                              /
 x18+x19 = 16/-- 21 = 15+16 \                              /
 x20+x21 = 17\               >-- 24 = 21+22 --- 25 = 24+23
 x22+x23 = 18/-- 22 = 17+18 /                  /
 x24+x25 = 19\                                /
 x26+x27 = 20/-- 23 = 19+20 ------------------
```

There are five adder levels but four stages of two cycles each. Stages 1-3
each hold one level and register it at the end of their second cycle, so
those adders have two clock periods to settle (a two-cycle path that a timing
constraint for synthesis should declare). Stage 4 holds the last two levels:
adders 25 and 26 are registered after its first cycle, and adder 27 works in
its second cycle, its output going straight into the perceptron's
accumulator register. Adder 23 (the odd one of the right half) simply waits
in its register during stage 3.

The tree's inputs must stay stable for stage 1's two cycles; the multipliers'
output registers hold them until the next line's products arrive, so this is
always true inside the classifier.

Widths: products are 16 bits, the tree works at 21 bits (28 products need
five more bits), the accumulator is 32 bits.

## Numbers

| quantity | format | range |
|---|---|---|
| pixel | unsigned 8 bit, value p/256 | 0 .. 0.996 (grey levels 0-255) |
| weight | signed 8 bit, value w/16 | -8 .. +7.94 |
| product, line sum, accumulator | signed, 12 fraction bits | 32-bit accumulator |
| bias | signed 16 bit, 12 fraction bits | -8 .. +7.9998 |
| score (sigmoid output) | unsigned 8 bit, value s/256 | 0 .. 0.996 |

Products are exact and sums never overflow: 784 x 255 x 128 needs 26 bits.
All of these widths are this design's choice and live in `rtl/nn_pkg.sv`.

## Sigmoid

The sigmoid uses a piecewise-linear approximation with slopes 1/4, 1/8 and
1/32, so it needs only shifts and adds:

```
y(|x|) = min( |x|/4 + 0.5,  |x|/8 + 0.625,  |x|/32 + 0.84375,  1 )
y(x)   = 1 - y(|x|)   for x < 0
```

Taking the minimum of the lines puts the breakpoints exactly where the lines
cross (|x| = 1, 2.333 and 5), so the curve is continuous and never decreases;
the frequently published breakpoint 2.375 leaves a small downward step that
could swap the order of two scores. The error against 1/(1+e^-x) is below
0.02; the 8-bit output adds up to 1/256 of truncation.

A sigmoid never reverses the order of its inputs, but the approximation and
its 8-bit output can make two different sums equal, so comparing scores is
not quite the same as comparing raw sums. In particular every sum at or above +5 becomes the same score
(255), and every sum at or below -5 becomes 0. Such ties are broken towards the
lowest digit. Train (or scale) the weights so that the sums of interest stay
within about +-5.

## Max selector

A chain of nine comparators walks the scores from digit 0 to digit 9 and
replaces the running maximum only when a score is strictly greater; equal
scores therefore go to the lowest digit. It is combinational and its result
is registered in cycle 392.

## Interface (`image_classifier`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `img_we`, `img_addr`, `img_data` | in | 1, 10, 8 | write pixel `img_addr` = 28 x row + column |
| `w_we`, `w_class`, `w_addr`, `w_data` | in | 1, 4, 10, 8 | write the weight of digit `w_class` for pixel `w_addr` |
| `b_we`, `b_class`, `b_data` | in | 1, 4, 16 | write the bias of digit `b_class` |
| `start` | in | 1 | one-cycle pulse; ignored while `busy` |
| `busy` | out | 1 | high from cycle 0 to cycle 392 |
| `done` | out | 1 | one-cycle pulse, 393 edges after the start edge |
| `digit` | out | 4 | classified digit, held until the next `done` |
| `scores` | out | 10 x 8 | the ten sigmoid outputs, held likewise |

Usage: after reset, write the 7840 weights, the ten biases and the 784 pixels
(one per cycle, in any order), pulse `start`, wait for `done`. For the next
image only the pixels need rewriting. Writes are ignored while `busy`, so the
operands of a running classification cannot change under it. The image and
weight arrays are not reset; biases reset to zero. Out-of-range addresses and
classes are ignored.

## Files

| file | contents |
|---|---|
| `rtl/nn_pkg.sv` | widths, types, sizes and cycle budgets |
| `rtl/image_classifier.sv` | top level |
| `rtl/classifier_controller.sv` | IDLE / RUN / SELECT sequencer with line and cycle counters |
| `rtl/image_buffer.sv` | 784-pixel image store with a whole-line read port |
| `rtl/weight_memory.sv` | 10 x 784 weights and 10 biases, whole-line read for all classes |
| `rtl/perceptron.sv` | 28 multipliers, one tree and the accumulator of one digit |
| `rtl/seq_multiplier.sv` | 6-cycle radix-4 pixel x weight multiplier |
| `rtl/bat_adder_tree.sv` | the 27-adder, 4-stage tree |
| `rtl/sigmoid_unit.sv` | piecewise-linear sigmoid |
| `rtl/max_selector.sv` | arg-max of ten scores |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulation

Every testbench prints one line `TB_RESULT checks=N failures=M` and stops;
`failures=0` is a pass. With Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_image_classifier \
    -y rtl -y tb +libext+.sv rtl/nn_pkg.sv tb/tb_image_classifier.sv
./obj_dir/Vtb_image_classifier
```

Replace the module name for the other testbenches. The testbenches are
two-state clean: everything they read is reset or written first.

What is checked:

* `tb_seq_multiplier`: corner and random operands against integer products;
  `done` exactly six edges after the start edge.
* `tb_bat_adder_tree`: zero, extreme, one-hot and random inputs against a
  loop sum; the result valid only in the eighth cycle.
* `tb_perceptron`: whole images (extreme and random) line by line against
  b + sum of w x; `line_done` only in the fourteenth line cycle.
* `tb_sigmoid_unit`: a fine sweep and random sums against the same curve
  computed in real arithmetic, against the true sigmoid (within 0.025), and
  for monotonicity.
* `tb_max_selector`: the ten-score example `[0.1 0.2 0.3 0.44 0.88 0.15 0.2
  0.33 0.6 0.76]` must give 4 (`4'b0100`), ties, random sets.
* `tb_image_buffer`, `tb_weight_memory`: full write and read-back, ignored
  out-of-range writes, bias reset.
* `tb_classifier_controller`: every control output cycle by cycle over the 393
  cycles; start pulses while busy are ignored.
* `tb_image_classifier`: the top at full size. Ten seven-segment style digit
  images with matching template weights must each be recognised (the "4"
  gives `4'b0100`); random networks at three weight scales are checked digit
  and score against a reference model, covering every sigmoid segment on both
  signs, saturation ties, negative sums, writes and start pulses while busy.
  Every run must take exactly 393 cycles.

## Where this design makes its own choices

The line-by-line organisation, the counts (784 pixels, ten perceptrons, 28
multipliers and a 27-adder tree per line), the tree's shape and adder
numbering, the 6 + 2 x 4 cycles per line, the single max-selector cycle, the
sigmoid-then-max order and the 4-bit output follow the original design.
Everything else was chosen here: the number formats, the multiplier's
internal algorithm, how the two cycles of each tree stage are used, where the
bias enters (loaded into the accumulator), the sigmoid approximation, tie
breaking, the memories and their load ports, and the start/busy/done
handshake. The original block diagram labels the classifier output "3 bit";
ten digits need four, and four are used.

Not included: the training of the weights, and the serial multiply-then-add
organisation (1737 cycles) that the tree replaces.
