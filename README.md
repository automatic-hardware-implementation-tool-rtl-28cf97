# Boosted hyperrectangle classifier compiled into logic

This is a fully parallel hardware decision function for a binary Adaboost
classifier whose weak classifiers are axis-parallel boxes
("hyperrectangles") in feature space. The classifier is trained off-line.
Everything it learned is baked into the circuit as constants: the box
bounds, the class of each box and the weight of each weak classifier. A
comparison against a known byte then costs only a short gate chain. A sum
of known weights then becomes a table lookup. A new training run gives new
parameter values, and so a new circuit.

The decision for a feature vector `x` of `D` bytes is

    y(x) = sgn( sum_{t=1..T} alpha_t * h_t(x) ),     h_t(x) in {-1, +1}

Each weak classifier `h_t` answers `+y_H` when `x` lies strictly inside
its box and `-y_H` otherwise. With all `T` weak classifiers evaluated at
once, the circuit accepts one feature vector every clock. The intended use is
pixel-wise classification right after a feature extractor on the same chip,
for example image segmentation at one pixel per 20 ns with a 50 MHz clock.

## Structure

    feat (D bytes) ──┐
                     ├─ src_sel ─► T x weak_classifier ─► ceil(T/4) x alpha_lut ─► reg
    word (32 bit) ─► feature_word_loader ─┘     (h_t bits)          (partial sums)
                                                                             │
                                            y_pos, score ◄─ reg ◄─ sign ◄─ adder_tree

| module | role |
|---|---|
| `adaboost_top` | top level: selects the parallel or the 32-bit word input and feeds the decision function |
| `adaboost_decision` | the strong classifier: `T` weak classifiers, table stage, adder tree, sign, two register stages |
| `weak_classifier` | one hyperrectangle, built from constant comparators |
| `const_gt_cmp` | `a > B` for a constant `B`, as an AND/OR gate chain |
| `alpha_lut` | signed sum of four `±alpha` values, read from a 16-entry table |
| `adder_tree` | balanced tree adding the table outputs |
| `feature_word_loader` | rebuilds a feature vector from 32-bit words carrying 4 features each |
| `adaboost_pkg` | feature width, table size, bus width, and the default model |

## Comparing against a constant

The comparators are where most of the logic sits, so they are worth
understanding first. A bound is a known byte `B`, so `A > B` does not need a
subtractor. Walk the bits of `A` from the least significant end and keep a
running result `L`, starting with `L = 0`:

* where `B` has a 1, `L = A[i] & L`: `A` must also have a 1 there, and the
  lower bits must already decide "greater";
* where `B` has a 0, `L = A[i] | L`: a 1 in `A` decides "greater" by itself.

For `B = 151 = 1001_0111b`, the three low 1-bits AND into the constant 0 and
disappear. What is left is

    L = A7 & (A6 | (A5 | (A4 & A3)))

A byte comparison is never more than eight inputs deep. On a 4-input-LUT
FPGA it fits in two cascaded LUTs, one slice. `const_gt_cmp` builds this chain
at elaboration, one gate per bit. The "less than" test of an upper bound
uses the same block on inverted bits: `x < B` is the same as `~x > ~B`.

## Weak classifiers: boxes with open sides

`weak_classifier` holds `2*D` bounds and a class `Y_H`:

    h = Y_H   if  THETA_L[d] < x[d] < THETA_U[d]  for every d
    h = -Y_H  otherwise

A lower bound of 0 or an upper bound of 255 means "no limit on this side".
No comparator is built for it, so a box that only constrains a few features
costs only those comparators. Three kinds of weak classifier are the same
block with different bounds:

* **single threshold**: only `THETA_U[d]` is set in one feature
  (`h = y` when `x[d] < theta`);
* **single interval**: both bounds are set in one feature;
* **general hyperrectangle**: any number of features are bounded.

Mixing all three kinds gives the fewest weak classifiers for a given error.
It is also the default model here.

One consequence of treating 0 and 255 as open: `x[d] = 0` passes an open
lower bound, whereas a literal `x > 0` would fail. Bounds of 0 and 255 should
therefore only be used to mean "unbounded".

The hardware cost of a weak classifier is the number of comparators actually
built: `weak_classifier` computes it as the local parameter `NUM_CMP`. That is
at most 1 for a threshold, at most 2 for an interval and at most `2*D` for a
general box.

## Summing the votes without multipliers

Every product `alpha_t * h_t` is either `+alpha_t` or `-alpha_t`. A group of
four weak-classifier bits can only select 16 different sums. `alpha_lut`
precomputes those 16 signed sums at elaboration and reads one out, with the
four `h` bits as the address. Each output bit is then one 16-bit LUT, and the
first level of additions costs no adders. `adder_tree` adds the
`ceil(T/4)` partial sums in a balanced binary tree. The sign bit of the total
is the class.

Widths: `alpha` is an unsigned integer of `ALPHA_W` bits. A partial sum is
`ALPHA_W + 3` bits. The score is `ALPHA_W + 3 + clog2(ceil(T/4))` bits, two's
complement, and no overflow is possible. A group with fewer than four weak
classifiers is padded with `alpha = 0`. A score of exactly 0 is reported as
class +1.

## Timing and interfaces

`adaboost_decision` has two register stages: the partial sums after the
table stage, then the score and class after the adder tree.

* It accepts one vector per clock, with `in_valid` high.
* `out_valid`, `y_pos` (1 = class +1) and `score` appear exactly 2 clocks
  later.
* Reset `rst_n` is asynchronous and active low. It clears the valid flags and
  the registers.

`adaboost_top` adds the choice of input, fixed by `src_sel`:

* `src_sel = 0`: all `D` features in parallel on `feat`, with `feat_valid`.
  The latency is 2 clocks and one decision can be made per clock.
* `src_sel = 1`: 32-bit words on `word`, with `word_valid`. Each word
  carries four features: byte `k` of word `i` is feature `4i+k`. `word_sof`
  marks the first word of a vector and re-aligns the word count. A vector
  takes `ceil(D/4)` words, 16 at `D = 64`. The result comes 3 clocks after
  the last word. This mode is meant for use as a coprocessor behind a
  32-bit bus such as PCI. The bus protocol itself is not included.

The input that is not selected is ignored.

## Loading a trained model

All learned values are parameters of `adaboost_top` and
`adaboost_decision`:

| parameter | type | meaning |
|---|---|---|
| `D` | int | number of features (default 64) |
| `T` | int | number of weak classifiers (default 32) |
| `ALPHA_W` | int | bits per weight (default 8) |
| `THETA_L` | `logic [T-1:0][D-1:0][7:0]` | lower bounds, `THETA_L[t][d]`; 0 = open |
| `THETA_U` | `logic [T-1:0][D-1:0][7:0]` | upper bounds; 255 = open |
| `Y_H` | `logic [T-1:0]` | class of each box, 1 = +1 |
| `ALPHA` | `logic [T-1:0][ALPHA_W-1:0]` | weights |

Training gives real-valued weights `alpha_t = 0.5 * ln((1 - e_t) / e_t)`.
Only the relative sizes of the weights matter, so scale them by a common
factor and round them to `ALPHA_W`-bit integers. Rounding can flip decisions
whose score is close to zero. `tb/tb_xor_workload.sv` is a complete small
example: the XOR problem in two features, solved by three weak classifiers.

The defaults come from fixed formulas in `adaboost_pkg` (`dflt_theta_l`,
`dflt_theta_u`, `dflt_y`, `dflt_alpha`). They cycle through a threshold, an
interval and a four-feature box. They exist so that every module elaborates
on its own and so that the default size can be simulated. They are not a
trained classifier. The generated default covers up to `T*D = 16384` bound
pairs, for example 256 weak classifiers on 64 features. A larger classifier
must be given its model explicitly.

## Sizes and what they cover

* **Features.** Features are bytes, and `D` = 64 is the intended upper limit
  for a fully parallel design. Problems with 2 to 64 features fit by setting
  `D`, for example 2 (synthetic XOR), 4 (texture features for defect
  segmentation), 13 to 34 (small benchmark sets) or 64 (8x8 digit images).
* **Rate.** At 50 MHz the design makes one decision per 20 ns. Segmenting a
  300x300 region within a budget of 1 us per pixel leaves a wide margin.
* **Classes.** Only two-class decisions are implemented. Problems with more
  classes need several binary classifiers and a rule to combine them. That
  rule is not part of this design.

## Choices made in this implementation

The source description defines the arithmetic and the comparator structure.
The following details were chosen here:

* 8-bit unsigned integer weights and their off-line scaling;
* the default `T = 32` and the default model;
* the two pipeline registers: the description asks for a fully parallel
  circuit and one decision per 15 to 20 ns, and mentions 10 ns in another
  place. This design makes one decision per clock;
* class +1 for a score of 0;
* asynchronous active-low reset;
* the balanced adder tree;
* the bus-side framing (`word_sof`, byte order) and the static input select.

Not included:

* the feature extractor that feeds the classifier;
* the camera;
* the bus protocol core;
* the training program;
* any multi-class combination.

## Simulation

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. Run one
with Verilator 5 from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
        rtl/adaboost_pkg.sv tb/tb_adaboost_ref_pkg.sv tb/tb_adaboost_top.sv \
        --top-module tb_adaboost_top -o sim
    ./obj_dir/sim

| testbench | what it checks |
|---|---|
| `tb_const_gt_cmp` | eight constants, including 0, 151 and 255, against all 256 inputs |
| `tb_weak_classifier` | a box with open sides, a threshold and a one-value interval, on random and bound-edge inputs |
| `tb_alpha_lut` | all 16 addresses of a full group and of a zero-padded group |
| `tb_adder_tree` | 1, 5 and 8 inputs, random and extreme values |
| `tb_feature_word_loader` | vectors back to back and with gaps, a cut-short vector followed by re-alignment, and the valid-pulse timing |
| `tb_adaboost_decision` | default size (64 features, 32 weak classifiers): 600 vectors against an integer reference model, a 2-clock latency on every result, and coverage of both classes and all three weak-classifier kinds |
| `tb_adaboost_top` | the whole design at its default parameters: both inputs, both latencies, back-to-back input, bus gaps, ignored inputs, `word_sof` re-alignment, both classes and all three weak-classifier kinds. It fails if any of these never occurs |
| `tb_xor_workload` | a hand-built two-feature XOR model (`D = 2`, `T = 3`) against the XOR rule |

The reference model (`tb_adaboost_ref_pkg`) evaluates the boxes with plain
integer comparisons and sums the signed weights directly. It does not reuse
the comparator chains, tables or adder tree of the RTL.
