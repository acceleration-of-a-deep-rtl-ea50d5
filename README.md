# LLP jet tagger: serialised cyclic-RAM MAC inference engine

This is synthesizable SystemVerilog for the forward pass of a jet-tagging
neural network used to look for long-lived particles (LLPs) in collider
data. The network takes 638 numbers per jet and scores the jet against four
classes: LLP jet, heavy-flavour quark jet, light-flavour quark jet and
gluon jet.

The design rests on two ideas:

1. **Serialised cyclic-RAM multiply-accumulate.** A matrix product is not
   unrolled into banks of multipliers and adder trees. Each output row gets
   one floating point multiply-accumulate (MAC) unit. The unit is fed by
   two *cyclic RAMs*. A cyclic RAM is read at consecutive addresses by a
   counter that wraps back to zero, so no address logic is needed. One
   RAM holds the current input row and the other holds the whole weight
   matrix. One weight word is read per cycle and broadcast to every MAC
   unit of a layer, so a layer has a single narrow weight path and one
   shared controller.
2. **Elementwise RAM storage.** A matrix is cut into 16x4 blocks. It is
   not stored row after row. It is spread over 64 RAMs, one per element
   position in a block. Element (r, c) of every block goes to RAM `r*4+c`,
   at the block's index. Reading or writing a whole block is then a single
   access with one shared address.

## Dataflow of one jet

```
 charged cand. 25x17 --> store --> conv 64 -> conv 32 -> conv 32 -> conv 8 --\
 neutral cand. 25x6  --> store --> conv 32 -> conv 16 -> conv 16 -> conv 4 ---+-> flatten (332)
 sec. vertices 4x12  --> store --> conv 32 -> conv 16 -> conv 16 -> conv 8 --/        |
 global features (14) + LLP decay length (1) ----------------------------------> concat (347)
                                                                                      |
                        dense 200 -> dense 100 -> dense 100 -> dense 4 -> scores[4] <-/
```

Each "conv N" is a 1-D convolution with kernel size 1. For every object
(particle or vertex) it computes the same affine map, so a layer is the
matrix product `Y = X * W^T + b`. Here X is objects x features, W is
filters x features and b has one entry per filter. A ReLU follows every
layer except the last dense layer. The three branches run at the same
time. The flatten and dense stages then run one after the other.

| stage | module | MAC units | MAC cycles |
|---|---|---|---|
| charged branch, 4 layers | `conv_branch` | 25 per layer | 1088 + 2048 + 1024 + 256 = 4416 |
| neutral branch | `conv_branch` | 25 per layer | 192 + 512 + 256 + 64 = 1024 |
| vertex branch | `conv_branch` | 4 per layer | 384 + 512 + 256 + 128 = 1280 |
| dense 347-200-100-100-4 | `dense_stack` | 1 per layer | 69400 + 20000 + 10000 + 400 = 99800 |

One jet takes **104,654 cycles** from `start` to `done` at the default
sizes. The testbench checks this number. The dense stage takes 95% of that
time, because each dense layer has a single MAC unit (one input row: one
jet).

## The MAC unit and its accumulator preset (`mac_unit`)

A multiplier (`fp_mul`) feeds a product register. The product register
feeds an adder (`fp_add`), whose output goes to the accumulator register,
and the register feeds back into the adder. A dot product is not started by
clearing the accumulator. Its first product is instead added to the bias:

```
acc <= (first ? bias : acc) + x*w
```

So the bias addition costs no cycle and no separate kernel. An operand
pair is registered as a product one cycle after it is presented. The sum is
registered a cycle later, and `out_valid` pulses with it. Dot products may
follow each other with no gap.

## One layer: `column_mac_array`

There are ROWS MAC units, one per row of X. Each row of X sits in its own
K-word cyclic RAM. W sits in one cyclic RAM of N*K words, where W[j][k] is
at address `j*K + k`. The bias RAM has N words. Two shared counters drive
everything:

* `k` runs over 0..K-1 and addresses every input-row RAM. It raises
  `first` at k = 0 and `last` at k = K-1.
* `j` runs over 0..N-1, counting weight rows, and addresses the bias RAM.

The weight RAM simply advances by one word per cycle and wraps. Each MAC
unit therefore replays its input row once per weight row. After K cycles
every MAC unit holds one element of output column j. The whole column
(ROWS values) leaves on `out_valid / out_col / out_data`, one column every
K cycles. The input matrix is written the same way, one column per write
(`x_col`, with a row mask `x_row_en`).

Timing: `start` is followed by N*K issue cycles. Column j appears three
cycles after its last multiply (RAM read, product register, accumulator).
`done` pulses with the last column, **N*K + 3 cycles** after the start
cycle. For the 16x4-by-16x4 block convolution (16 MAC units) that is 67
cycles.

Because layer l produces its output one column at a time, and layer l+1
takes its input one column at a time, layers chain directly. Each output
column goes through a ReLU and is written into the next layer's input
RAMs as it appears. The next layer starts one cycle after the previous
one is done.

## Single-MAC kernel (`mac_kernel`)

`mac_kernel` is the single-MAC form of the same scheme. By default it
convolves a 16x4 input block with a 16x4 weight block into a 16x16
result, using 1024 multiplications on one multiplier.
It holds:

* a 4-word cyclic input RAM for one input row;
* a 64-word cyclic weight RAM;
* a 0..3 counter, which also marks the accumulator reset;
* a 0..15 weight-row counter.

An input row streams in one element per cycle (`in_valid / in_ready`). It
is then replayed against all 16 weight rows, giving one output every 4
cycles. The next row is taken after one turn-around cycle. A full block
takes 16 x (4 + 64 + 1) cycles; the last result appears after 1105 cycles.

With one input row it is a dense layer: the input vector streams in word
by word, and the layer's outputs leave one every K cycles, in order.
`dense_stack` uses four such kernels, sized to the layers.

## Elementwise block store (`elementwise_store`)

This store holds a ROWS x COLS matrix (25x17 by default), zero padded to
whole 16x4 blocks. The blocks are numbered row-major over the block grid:
block `b = rb*NBC + cb` covers rows `16*rb..16*rb+15` and columns
`4*cb..4*cb+3`. That gives 2 x 5 = 10 blocks for 25x17.

| RAM | 0 | 1 | 2 | 3 | 4 | ... | 63 |
|---|---|---|---|---|---|---|---|
| address b holds | B[0,0] | B[0,1] | B[0,2] | B[0,3] | B[1,0] | ... | B[15,3] |

Every RAM gets the same address, the block index. A block is written with
`wr_en`, and a read returns the block on `rd_data` one cycle after `rd_en`.
A block written in one cycle can be read back by a read in the next
cycle, so an update followed by a read-out takes two cycles. Only the RAM
depth depends on the matrix size. The number of RAMs stays 64.

In each `conv_branch` the store holds the branch's input matrix. On
`start`, a loader reads block after block and writes each block's four
columns into the first layer's input RAMs. It masks rows and columns that
fall outside the matrix. This takes 6 cycles per block: read, wait, then
4 column writes.

## Flatten and dense stages

`flatten_unit` keeps the 347-word dense input vector in registers, built
as follows:

* The last-layer output columns of the three branches are stored at
  `offset + p*F + j`: object-major, charged first, then neutral, then
  vertices.
* The 14 global features and the decay length follow. They are written
  over `g_we / g_idx`, with g_idx 0..13 for the global features and 14 for
  the decay length.

When all three branches are done, the vector is streamed, one word per
cycle, into the cyclic input RAM of the first dense layer. That layer is a
`mac_kernel` with K = 347 and N = 200. It starts by itself once the last
word has arrived. Each dense layer's outputs are also the next layer's
input words, in the same order. So they pass through a ReLU straight into
the next kernel, which likewise starts on its last word. Consecutive layers
finish N*K + 3 cycles apart. `dense_stack` keeps the last layer's four
outputs in `scores`.

## Number format

All data, weights and sums are IEEE-754 single precision. Both `fp_mul`
and `fp_add` round to nearest, ties to even. Subnormal inputs count as
zero, and results below the normal range are flushed to a signed zero.
Overflow gives infinity. Infinities and NaNs are not propagated as such:
the network is assumed to carry finite values only. Exact cancellation in
the adder gives +0. The testbenches compare results bit for bit (with +0
equal to -0) against a reference that rounds double-precision results to
single precision. That reference is exact for a single `+` or `*`.

## Top-level interface (`llp_tagger_top`)

All values are 32-bit floats. Nothing may be loaded while `busy` is high.

| port | use |
|---|---|
| `w_we, w_layer[3:0], w_addr[16:0], w_data` | weight W[j][k] of a layer at address `j*K+k`. Layers 0-3 are the charged branch, 4-7 neutral, 8-11 vertices and 12-15 dense. |
| `b_we, b_layer[3:0], b_addr[8:0], b_data` | bias b[j] of a layer |
| `blk_we, blk_lane[1:0], blk_idx[3:0], blk_data[64]` | one 16x4 input block. Lane 0 is charged, 1 neutral and 2 vertices. Element (r, c) is at `blk_data[r*4+c]`. Blocks: 10, 4 and 3 per lane. |
| `g_we, g_idx, g_data` | global feature 0..13, or the decay length at index 14 |
| `start`, `busy`, `done`, `scores[4]` | run one jet. `done` pulses when `scores` is valid. |

Weights and biases stay loaded: the weight RAMs are used as ROMs and wrap
back to word 0 after every pass. So a new jet only needs its inputs
written and a new `start`. Reset (`rst_n`) is synchronous and active low.

## What is this design's own choice

The source design gives the two storage and compute schemes above, the
network's layer sizes, and the 16x4 block geometry. The following are
choices made here and can be changed:

* **Activation:** ReLU after every convolution layer and every hidden
  dense layer. The source says only that activations are interleaved.
* **Output layer:** a fourth dense layer of 4 nodes, with no activation,
  produces the class scores. The source draws three dense layers (200,
  100, 100) but classifies into four classes. No softmax is applied.
* **Convolution kernel size 1.** Each convolution is a per-object matrix
  product.
* **Flatten order:** object-major within each branch, with the branches
  in the order charged, neutral, vertices, then global features and decay
  length.
* **Bias index:** the bias follows the weight row (filter), as a
  convolution has one bias per filter.
* **Loading:** load ports for weights, biases and inputs. The weight
  values themselves are not part of the design.
* **Sequencing:** one jet at a time; layers run one after another, the
  branches in parallel; a block store feeds the first layer through a
  loader.
* **Pipelining:** one-cycle RAM reads and a product register. Sums are
  formed in a single cycle by a combinational adder, with no attempt to
  meet a particular clock frequency.
* **Number format:** single precision with flush-to-zero.

Cycle counts differ from the latencies the source reports for its kernel
comparison. Those figures work out to 49 cycles for one MAC unit at
350 MHz and 6 cycles for the column MAC units at 250 MHz. The schedule
implemented here does one multiply per MAC unit per cycle: 1024 multiplies
on one unit, or 64 per unit with 16 units. That schedule cannot reach the
reported figures. This design follows the described schedule and measures
1105 and 67 cycles. By contrast, the block store's two-cycle update and
read-out matches its reported 20 ns at 100 MHz.

Not included:

* the host CPU and its PCIe link, which supply inputs and weights;
* dropout, which does nothing at inference;
* the baseline implementations the source compares against (fully and
  partly unrolled convolution, single and double buffered block storage).

## Simulating

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. To build one with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/llp_pkg.sv tb/tb_fp_pkg.sv \
    tb/tb_llp_tagger_top.sv --top-module tb_llp_tagger_top
./obj_dir/Vtb_llp_tagger_top
```

| testbench | what it shows |
|---|---|
| `tb_llp_tagger_top` | Two full-size jets, checked against a layer-by-layer reference. Also checks the cycle count per jet (104,654), and that the mechanisms happened: block reads, 16 layer passes per jet, ReLU clamping, the flatten hand-over, and branches waiting for one another. Runs in a few seconds. |
| `tb_conv_branch` | The charged branch at full size: 25x8 outputs and 4492 cycles. |
| `tb_dense_stack` | The dense layers at full size, run twice so the weight RAMs wrap. |
| `tb_column_mac_array` | The 16x4-by-16x4 block convolution, plus a 25-row array with a masked row. Checks the rate of one column per K cycles and `done` at N*K+3. |
| `tb_mac_kernel` | The single-MAC block convolution: 256 outputs, spacing, and 1105 cycles. |
| `tb_elementwise_store` | Block placement, read-back in any order, and two-cycle update plus read. |
| `tb_mac_unit`, `tb_cyclic_ram`, `tb_flatten_unit`, `tb_fp_add`, `tb_fp_mul` | The building blocks. |

`tb/tb_fp_pkg.sv` holds the reference arithmetic: `fadd_ref`, `fmul_ref`
and `layer_ref`, where `layer_ref` accumulates in the hardware's order,
bias first.

Network sizes are parameters of `llp_tagger_top` (`CPF_FILTERS`,
`NPF_FILTERS`, `SV_FILTERS`, `DENSE_NODES`). The input sizes are in
`rtl/llp_pkg.sv`.
