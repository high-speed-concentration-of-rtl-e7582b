# Sorted-stream concentrator: merging timestamped streams at two samples per clock

In a triggerless data-acquisition system every front-end sends a continuous
stream of small packets (here 32 bits: a timestamp and a measurement), each
stream already in timestamp order. To build time slices further downstream,
all streams must be combined into one stream that is still strictly in
timestamp order. This RTL does that merge in a binary tree of two-input
merger units. Each unit emits **two samples per clock**, so the output
bandwidth is `2 x f_clk` samples/s rather than `1 x f_clk`. A wider output,
not a faster clock, is what raises throughput once an FPGA's clock limit
(about 200 MHz) is reached.

Two ideas make two samples per clock cheap:

* **One spare register per input.** Block-RAM FIFOs can only give a fixed
  number of samples per read, but a merger sometimes needs two samples from
  one stream and sometimes one from each. A two-sample first-word-fall-through
  (FWFT) FIFO, followed by a single one-sample register `R`, lets a unit take
  either one or two samples from each stream on every clock.
* **Two comparisons, not three.** Each stream's two visible samples are
  already in order, so the two oldest of the four can be found with two
  parallel comparisons and one tie-break.

## Why a unit waits for every input

A unit outputs a sample only when **both** of its inputs show two samples. If
one input were empty, its next sample might turn out to be older than
something already sent. So an empty input stalls the unit, even when the
other input is full. The same rule means the tree only drains when every
input has newer data behind what is waiting (see *Flushing the end of data*).

The input buffers also absorb the skew between streams: data with one
timestamp can reach different inputs at different times. With the default
depth, each input of each unit holds 513 two-sample words (512 in block
memory plus 1 in the FIFO's output register).

## The input stage: FWFT FIFO plus register R (`pair_fifo`, `stream_buf`)

This is the least obvious part of the design.

`pair_fifo` is a block-memory FIFO whose word is two samples, `F0` (older)
and `F1` (newer). It is first-word-fall-through: the head word is always on
its output. Internally the memory is read synchronously into an output
register, as block RAM requires. That register is refilled in the same clock
its word is popped, so a word can leave every clock.

`stream_buf` sits between the FIFO and the merger and holds one register, `R`.
It always shows the merger the **two oldest unconsumed samples** of its
stream:

| R     | samples shown to the merger |
|-------|-----------------------------|
| empty | `F0, F1`                    |
| full  | `R, F0`                     |

The stream counts as valid exactly when the FIFO has a head word. `R` on its
own is not enough: `R` with an empty FIFO is only one sample, so the unit
waits.

The merger reports how many samples it took from the stream (`take` = 0, 1
or 2). The register then moves as follows:

| take | R before | action                                   | R after |
|------|----------|------------------------------------------|---------|
| 1    | empty    | `F0` used; `F1` saved in `R`; pop FIFO   | full    |
| 1    | full     | `R` used; FIFO word kept                 | empty   |
| 2    | empty    | `F0`, `F1` used; pop FIFO                | empty   |
| 2    | full     | `R`, `F0` used; `F1` saved in `R`; pop   | full    |

So the FIFO is popped whenever its word has been used up, and `R` never holds
more than the one sample that was left over. Only a single 32-bit register per
input is needed, not a small FIFO that can be read at a variable width.

### Walk-through

Stream A = `0 2 | 3 3 | 99 99` and stream B = `0 1 | 1 2 | 99 99`, written as
two-sample words (the samples are labelled by timestamp, e.g. `A2`):

| A shows     | B shows      | decision        | output   | afterwards                      |
|-------------|--------------|-----------------|----------|---------------------------------|
| `A0 A2`     | `B0 B1`      | one each, A first | `A0 B0` | A: R=A2, FIFO popped; B: R=B1   |
| `A2 A3`     | `B1 B1`      | two from B      | `B1 B1`  | B: R=B2, FIFO popped            |
| `A2 A3`     | `B2 B99`     | one each, A first | `A2 B2` | A: R empty; B: R empty          |
| `A3 A3`     | `B99 B99`    | two from A      | `A3 A3`  | A: FIFO popped                  |
| `A99 A99`   | `B99 B99`    | two from A      | `A99 A99`| A empty: unit waits             |

The unit test `tb_merge_node` replays this sequence and checks the exact
output order.

## Choosing the two oldest samples (`merger`)

Each input shows an ordered pair: `A0 <= A1` and `B0 <= B1`. The merger
decides with two comparisons that run in parallel, plus a third for the mixed
case:

| condition                   | meaning                              | output       |
|-----------------------------|--------------------------------------|--------------|
| `A1 <= B0`                  | all of A's pair is older than all of B's | `A0 A1` (take A 2) |
| else `B1 <= A0`             | all of B's pair is older than all of A's | `B0 B1` (take B 2) |
| else `A0 <= B0`             | one from each                        | `A0 B0`      |
| else                        | one from each                        | `B0 A0`      |

In the mixed case `A1 > B0` and `B1 > A0`. The oldest sample is therefore
`min(A0, B0)`, and the second oldest is the other one of `A0` and `B0`.
Equal timestamps go out stream A first, because `A1 <= B0` is tested first.

The decision is registered into an output pair with a valid/ready handshake.
The merger fires when both inputs are valid and its output register is empty
or being read. It then produces one pair per clock for as long as data and
the sink allow. Assertions check that each output pair is in order and that
the output stays stable while the sink stalls.

## The tree (`merge_node`, `merge_tree`)

`merge_node` is one complete unit: two `pair_fifo`s, two `stream_buf`s and a
`merger`. `merge_tree` connects `S - 1` units as a binary tree. The FIFOs
between levels are the input FIFOs of the next level's units.

Streams are numbered like a heap:

* stream 1 is the output;
* input `i` is stream `S + i`;
* unit `k` (for `k = 1 .. S-1`) merges streams `2k` and `2k+1` into stream `k`.

For the default `S = 4` this is two leaf units feeding one root unit.

A two-input tree needs more FIFO memory than one wide merger. In exchange, no
unit ever compares more than four samples per clock.

### Bandwidth and latency

* Output: at most one pair (two samples) per clock. At a 160 MHz clock this is
  320 Msample/s, or 10.24 Gbit/s of 32-bit samples.
* The inputs' combined rate must not exceed the output rate. The design does
  not enforce this limit. Input FIFOs that fill up push back through
  `in_ready`.
* Latency through an empty unit: a word written at clock edge `t` reaches
  `out_valid` at edge `t+2`. Each further tree level adds 3 edges: one for the
  FIFO write, then the two above. The total is `2 + 3*(log2(S)-1)` edges,
  which is 5 for `S = 4`.

## Flushing the end of data

Because a unit waits while any input is empty, the last samples of a burst
stay buffered until every input has received something newer. To flush the
tree, a source appends samples with a timestamp at least as large as any real
one. The testbenches use `16'hFFFF`, and eight such words per input are enough
for trees of up to three levels. There is no separate flush signal or timeout.

## Types, ports and parameters

`merge_pkg` defines:

* `sample_t`: a packed struct of `ts` (16 bits, bits 31:16) and `adc`
  (16 bits). Timestamps compare as unsigned values and must not wrap during a
  merge.
* `pair_t`: `sample_t [1:0]`, where element 0 is the older sample.
* `sel_e`: the merger's four decisions (`SEL_A2`, `SEL_B2`, `SEL_AB`, `SEL_BA`).

Top module `merge_tree`:

| port        | dir | type              | meaning                                   |
|-------------|-----|-------------------|-------------------------------------------|
| `clk`       | in  | logic             | clock                                     |
| `rst_n`     | in  | logic             | synchronous, active-low reset; empties everything |
| `in_data`   | in  | `pair_t [S]`      | two-sample word per input, in time order  |
| `in_valid`  | in  | `logic [S-1:0]`   | word offered                              |
| `in_ready`  | out | `logic [S-1:0]`   | leaf FIFO has room; word taken when both high |
| `out_data`  | out | `pair_t`          | two merged samples, element 0 older       |
| `out_valid` | out | logic             | output pair present                       |
| `out_ready` | in  | logic             | sink takes the pair                       |

| parameter | default | meaning                                   |
|-----------|---------|-------------------------------------------|
| `S`       | 4       | number of input streams; a power of two, at least 2 |
| `DEPTH`   | 512     | memory words per input FIFO of every unit (power of two) |

With the defaults, the tree uses 6 FIFOs x 512 words x 64 bits = 196,608 bits
of memory. That is six 36-kbit block RAMs on a Xilinx 7-series device.

## How far to trust it, and where it departs from the original description

The following follow the original description: the two-samples-per-clock
merger, the FWFT two-sample block FIFO followed by a single register `R`, the
R/F0/F1 selection rules, the two-comparison decision, the rule to wait while
any input is empty, the binary tree, the 32-bit sample and the 4-input
example tree.

The following are this design's own choices, because the description does not
give them:

* the 16/16 split of the sample into timestamp and measurement;
* the FIFO depth;
* the valid/ready handshakes and the back-pressure;
* the merger's output register;
* the synchronous active-low reset;
* A-first ordering of equal timestamps;
* the flushing convention.

Known differences and gaps:

* In the original walk-through, one clock in which both streams already show
  two samples is marked as a plain wait, and no reason is given. This RTL
  makes a decision on every clock where both streams are valid, so it has no
  such bubble. The output order is the same.
* Input words must already be two-sample pairs in time order. The RTL does
  not include a stage that packs single front-end samples into pairs.
* The streams must be sorted before they enter. Sorting slightly out-of-order
  front-end data is outside this design.
* Timestamp wrap-around is not handled.
* Timing at the 160 MHz target on a Kintex-7 device has not been checked.
  The critical path is expected to run through the R/F0/F1 multiplexers, one
  16-bit comparator stage and the take/pop logic.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_pair_fifo` compares the FIFO against a queue model under random
  traffic. It checks capacity (`DEPTH+1` words), the full flag, one word per
  clock while streaming, and reset.
* `tb_stream_buf` models the FIFO and checks that the merger always sees the
  two oldest unconsumed samples, and when the FIFO is popped.
* `tb_merger` checks every decision from the four input samples alone, plus
  waiting, stall hold, one pair per clock, and the walk-through decisions.
* `tb_merge_node` runs the walk-through and checks the exact output order,
  2-edge latency, full-rate bursts, and random sorted streams with gaps,
  stalls and full FIFOs.
* `tb_merge_tree` is the end-to-end test at the default size (4 inputs, 512-word
  FIFOs). It feeds 4 x 6000 samples through sparse, congested, burst and
  random phases, and compares every output timestamp with an independently
  sorted reference. It also checks per-stream order, complete delivery,
  5-edge latency, and one pair per clock at the root after a stall is
  released. It counts each mechanism (all four decisions, waiting for an empty
  input, output stall, back-pressure between levels, full input FIFOs, a
  sample held in `R`) and fails if any of them never happened.
* `tb_merge_tree_s8` repeats the end-to-end test with 8 inputs (three levels)
  and 32-word FIFOs.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_merge_tree rtl/merge_pkg.sv tb/tb_merge_tree.sv
./obj_dir/Vtb_merge_tree
```

Replace `tb_merge_tree` with any other testbench name. To lint the RTL, run
`verilator --lint-only -Wall -Irtl -y rtl rtl/merge_pkg.sv rtl/merge_tree.sv`.

## Files

| file                 | contents                                              |
|----------------------|-------------------------------------------------------|
| `rtl/merge_pkg.sv`   | sample, pair and decision types                       |
| `rtl/pair_fifo.sv`   | two-sample FWFT block-memory FIFO                     |
| `rtl/stream_buf.sv`  | one-sample register R and the R/F0/F1 selection       |
| `rtl/merger.sv`      | two-comparison decision and registered output         |
| `rtl/merge_node.sv`  | one two-input merger unit                             |
| `rtl/merge_tree.sv`  | top: binary tree of units                             |
| `tb/*.sv`            | the testbenches listed above                          |
