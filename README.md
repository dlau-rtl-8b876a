# DLAU — a tiled, stream-pipelined deep learning accelerator

DLAU computes the layers of a fully connected neural network,
`y_j = sigmoid( sum_i w[i][j] * x[i] )`, on an FPGA. The layers of real networks
are far too large to hold on chip at once, so the design does two things:

* **Tiling.** The input nodes of a layer are cut into tiles of 32. One tile of
  inputs sits in registers, 32 multipliers work on it in parallel, and the
  hardware is reused tile after tile, so one small datapath serves layers of
  any size up to the capacity of the weight cache.
* **Streaming.** Three processing units — the Tiled Matrix Multiplication
  Unit (TMMU), the Part Sum Accumulation Unit (PSAU) and the Activation
  Function Acceleration Unit (AFAU) — are chained by valid/ready streams
  with a FIFO on every link. Each unit accepts one item per clock cycle, so
  once the first tile is loaded the TMMU produces a result every cycle and
  never waits for the units behind it.

```
 w stream ──► FIFO ─┐
                    ├─► TMMU ──► FIFO ──► PSAU ──► FIFO ──► AFAU ──► FIFO ──► y stream
 x stream ──► FIFO ─┘   32 lanes          running sums     sigmoid
```

In a complete system a host processor programs the accelerator and a DMA
engine moves weights, inputs and outputs between external DDR memory and the
`w`, `x` and `y` streams. Those parts are platform IP and are not included;
their side of the interface is the ports of `dlau_top`.

## Number formats

| quantity                      | format              | width |
|-------------------------------|---------------------|-------|
| inputs `x`, weights `w`       | signed Q8.8         | 16    |
| products                      | signed Q16.16       | 32    |
| part sums, accumulated sums   | signed Q24.16       | 40    |
| outputs `y`                   | unsigned Q8.8, 0…256 = 0…1.0 | 16 |

Outputs use the input format, so one layer's outputs can be fed back as the
next layer's inputs. All formats are set in `rtl/dlau_pkg.sv`
(`DATA_W`, `FRAC_W`, `ACC_W`). Sums wrap at 40 bits; with 256 inputs of
magnitude below 128 that cannot happen.

## TMMU: how the tiling works

The description below uses the default of 32 lanes (parameter `LANES`).

**Weight cache.** The whole weight matrix of the current layer lives on chip
in 32 block-RAM banks (`weight_bram`). Row `i` of the matrix — the weights
leaving input node `i` — goes to bank `i % 32`, at address
`(i / 32) * MAX_OUT + j` for output neuron `j`. Reading the same address from
all 32 banks therefore yields, in one cycle, the 32 weights that connect the
32 inputs of tile `t` to neuron `j`. Each bank holds `(MAX_IN/32) * MAX_OUT`
words (2048 at the defaults; 32 banks × 2048 × 16 bits = 1 Mbit).

**Order of work.** For tile `t = 0, 1, …` and, inside it, neuron
`j = 0 … n_out-1`, the TMMU reads the 32 weights, multiplies them with the 32
inputs of the tile and sums the products in an adder tree. The result is the
*part sum* of neuron `j` over tile `t`. It leaves with the neuron index and
three tags: `first` (tile 0), `last` (last tile) and `eol` (the last part sum
of the layer).

**Two input register sets.** A tile of inputs is used for `n_out`
consecutive cycles, one per neuron, but loading the next tile from the input
stream takes only 32 cycles. So the TMMU has two sets of 32 input registers.
One feeds the multipliers while the other is filled with the next tile, and
the two swap roles at each tile boundary. A set is handed back to the loader
only when the last product of its tile has been formed, not when the last
address is issued, because the multipliers read the set one cycle after the
issue. As a result, only the first tile is waited for: with inputs arriving
one per cycle and at least about 36 neurons, the part sums leave without a
gap from the first to the last.

**Short last tile.** If `n_in` is not a multiple of 32, the last tile holds
fewer inputs. The lanes beyond the tile length are multiplied by zero, so
whatever the unused registers and weight words contain has no effect.

**Pipeline.** issue address → bank read (registered) → 32 multipliers
(registered) → 5-level adder tree into the output register. A single enable,
`en = !ps_valid || ps_ready`, stalls all stages at once when the part sum is
not taken, and the banks' read registers hold their word while stalled.
The latency from issue to part sum is three cycles.

## PSAU: accumulation over tiles

The PSAU keeps one running sum per output neuron in an accumulation buffer
(`MAX_OUT` × 40 bits). For each part sum it reads the neuron's entry, or zero
when the part sum is tagged `first`. It adds the part sum and writes the
result back. When the part sum is tagged `last`, the total goes to the output
register instead.
The buffer is read combinationally and written at the clock edge. The same
neuron comes back at the earliest one cycle later, so there is no read-after-write
hazard and the unit accepts a part sum every cycle, the rate at which the
TMMU produces them.

The addition is done by `brent_kung_adder`, a parallel-prefix adder:

1. *pre-processing:* `p_i = a_i XOR b_i`, `g_i = a_i AND b_i` (carry in is
   folded into bit 0's generate);
2. *generation:* (g, p) pairs are combined with
   `(G, P) = (G_hi | P_hi & G_lo, P_hi & P_lo)` in a Brent–Kung tree. An
   up-sweep forms the group signals of aligned blocks of 2, 4, 8 … bits. A
   down-sweep then fills in the prefixes at the remaining positions. This
   takes `2·log2(W) − 1` levels and few cells;
3. *sum:* `s_i = p_i XOR c_i`, where `c_i` is the prefix generate of bits
   `0 … i−1`.

Widths that are not a power of two are padded internally.

### Alternative adder: parallel self-timed adder (PASTA)

Setting `ADDER = ADDER_PASTA` on `dlau_top` or `psau` replaces the
Brent–Kung adder with `pasta_adder`. This adder uses only half adders, one per
bit, each with a two-input multiplexer in front of it:

* **initial phase** (`start`; the multiplexer select SEL = 0): the half adders
  add the operands, giving `s = a XOR b` and `c = a AND b`;
* **iterative phase** (SEL = 1): the multiplexers feed back each bit's sum
  and the carry of the bit below, giving `s' = s XOR (c << 1)` and
  `c' = s AND (c << 1)`. This repeats until every carry is zero.

The number of iterations follows the operands' longest carry chain rather
than the worst case. The original form of this adder is asynchronous: gate
delays separate the iterations, and the zero state of all carries signals
completion. Here every iteration is a clock cycle, and `done` is the zero
test of the carry register, so an addition takes from one to `W+1` cycles
after `start`. In the PSAU, a part sum is handed to the adder when it
arrives and accepted when `done` rises. This costs about 10 cycles per part
sum for typical signed 40-bit operands, because sign extension makes long
carry chains. The TMMU is then throttled by back-pressure. A 256 × 256 layer
takes about 20 200 cycles, against 2092 with the Brent–Kung adder. The
option exists to compare the two adders; the default is Brent–Kung.

## AFAU: sigmoid by piecewise linear interpolation

The sigmoid is split into four ranges, using its symmetry
`s(x) = 1 − s(−x)` and its saturation:

| range         | output                                   |
|---------------|------------------------------------------|
| `x ≤ −8`      | 0                                        |
| `−8 < x ≤ 0`  | `1 − (a[i]·(−x) + b[i])`, `i = ⌊−x/k⌋`   |
| `0 < x ≤ 8`   | `a[i]·x + b[i]`, `i = ⌊x/k⌋` (segment 15 at `x = 8`) |
| `x > 8`       | 1                                        |

Only the positive half is stored. With `k = 0.5` that takes 16 segments. Each
segment is the chord of the sigmoid between its end points:

```
x0 = i*k, x1 = x0 + k
a[i] = (s(x1) - s(x0)) / k         (Q0.16)
b[i] = s(x0) - a[i] * x0           (Q0.16)
```

The 16 `{a, b}` pairs are in `rtl/afau_sigmoid_lut.hex` (one 32-bit word
per line, `a` in the upper half), generated from these formulas and loaded
into a ROM. The error is below 1 LSB of the Q8.8 output before rounding. A
different activation function only needs a different table.

Pipeline: (1) range test, |x| and segment index; (2) registered table read;
(3) multiply-add, symmetry and saturation, rounded to Q8.8, into the output
register. The latency is three cycles and the unit produces one result per
cycle. The stall scheme is the same as in the TMMU.

## FIFOs

`stream_fifo` is a synchronous FIFO with a type parameter for its payload
(`DEPTH` a power of two, default 32). Its head word is read combinationally,
so a word written into an empty FIFO can leave one cycle later. A full FIFO
still accepts a word in a cycle in which it also gives one away. An
assertion checks that a word offered on the input stays stable until it is
taken. The FIFOs absorb rate differences: for example, the PSAU emits nothing
while early tiles are accumulated, and then one sum per cycle during the last
tile.

## Using `dlau_top`

Parameters: `MAX_IN = 256`, `MAX_OUT = 256` (largest layer),
`FIFO_DEPTH = 32`, `LANES = 32` (tile size, a power of two: fewer lanes
cost fewer multipliers and banks and take proportionally more cycles), `ADDER = ADDER_BRENT_KUNG` (or `ADDER_PASTA`, see
above).

All handshakes transfer a word on a rising edge at which `valid` and `ready`
are both high. The reset `rst_n` is asynchronous and active low.

1. Set `cfg_n_in` (1…`MAX_IN`) and `cfg_n_out` (1…`MAX_OUT`). Pulse
   `w_start` for one cycle.
2. Send `n_in × n_out` weights on `w_valid/w_ready/w_data`, input node `i` in
   the outer loop and neuron `j` in the inner loop. Wait for `w_busy` to fall.
3. Pulse `start` (with `cfg_n_in`/`cfg_n_out` still set). Send the `n_in`
   inputs on `x`.
4. Take the `n_out` outputs from `y`, in neuron order. The last one comes
   with `y_last`. `done` pulses for one cycle after it is taken, and `busy`
   is high from `start` to then.

For a multi-layer network, repeat these steps per layer and use the outputs
of one layer as the inputs of the next. Weight loading must not overlap a
running layer; an assertion flags it.

**Timing.** At the defaults, a 256 × 256 layer with inputs arriving one per
cycle and the output always ready takes 2092 cycles from `start` to `done`:
32 cycles to load the first tile, 8 tiles × 256 neurons at one part sum per
cycle, and about 12 cycles of pipeline latency. The steady-state rate stays at
one part sum per cycle as long as `n_out` is at least about 36. For smaller
layers, loading the next tile (32 cycles) becomes the bottleneck.

## Relation to the original description

These points follow the published design: the three-unit pipeline, the FIFO
buffers on every link, the 32-wide tiling with row `i` in bank `i % 32`, the
two alternating input register sets, the one-part-sum-per-cycle PSAU built on
a Brent–Kung adder, the half-adder iteration of the alternative adder, and
the four-range table-driven sigmoid with one result per cycle.

These are this implementation's own choices: the number formats, `k = 0.5`,
`MAX_IN`/`MAX_OUT`, the FIFO depth, the valid/ready handshakes, the
tags that travel with part sums, the load order and address map of the
weights, the masking of short tiles, the pipeline depths and the control
ports.

Not included:

* the host processor, DDR3 memory controller, DMA engine and JTAG-UART of
  the surrounding system. These are platform IP; the streams and control
  ports stand in for them;
* a truly asynchronous version of the self-timed adder. `pasta_adder`
  clocks its iterations, as explained above;
* any on-chip sequencing of several layers; the host drives each layer.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench              | what it checks |
|------------------------|----------------|
| `tb_brent_kung_adder`  | 40- and 13-bit adders against `+`, corner and random operands |
| `tb_weight_bram`       | write/read-back, read-enable hold, simultaneous read and write |
| `tb_stream_fifo`       | order against a queue model, full/empty, pass-through when full, one word per cycle, latency |
| `tb_afau`              | against a real-arithmetic sigmoid (±2 LSB), exact saturation, latency 3, one result per cycle under back-pressure |
| `tb_pasta_adder`       | sums against `+`, and the cycle count against the carry-chain length of the operands |
| `tb_psau`              | exact sums for several layer shapes (including one neuron and one tile), one part sum per cycle, random stalls |
| `tb_psau_pasta`        | the same with the PASTA adder, with bounds on the cycles per part sum |
| `tb_tmmu`              | every part sum and tag exact, short tiles, random stalls, gap-free part sums after the first tile |
| `tb_tmmu_lanes8`       | the same with 8 lanes |
| `tb_dlau_top`          | end to end at the default sizes: a 256 × 256 layer with a cycle-count check, a two-layer network fed from its own outputs, irregular sizes, random gaps and back-pressure |
| `tb_dlau_top_pasta`    | the same layers with `ADDER_PASTA` |
| `tb_dlau_top_lanes8`   | the same layers with `LANES = 8` (a 256 × 256 layer takes 8212 cycles) |

`tb_dlau_top` also counts how often each mechanism happened and fails if one
never did: weight loading, layer completion, input-set swaps, masked short
tiles, multi-tile accumulation, TMMU stalls from back-pressure, full FIFOs,
both sigmoid saturations and both halves of the interpolation.

To run one with Verilator, from the directory holding `rtl/` and `tb/` (the
AFAU reads its table by the relative path `rtl/afau_sigmoid_lut.hex`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_dlau_top rtl/dlau_pkg.sv tb/tb_dlau_top.sv
./obj_dir/Vtb_dlau_top
```

Each full run takes well under a second of simulation time.
