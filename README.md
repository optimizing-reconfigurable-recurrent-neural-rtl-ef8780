# Column-wise, latency-hiding LSTM inference engine

An LSTM layer has a loop-carried dependency. The matrix-vector product (MVM)
of timestep t+1 needs the hidden vector h_t, and h_t only exists once the
MVM of timestep t has gone through the whole activation pipeline. Most
accelerators compute the MVM row by row, as dot products of whole rows with
the whole vector [x_t, h_{t-1}]. Such an engine must stop at the end of every
timestep until h_t comes back, and the deeper the pipeline, the longer the
stop.

This engine computes the MVM **column by column** instead. Each cycle a few
elements of the input vector are multiplied by the matching columns of the
weight matrix, and the partial result vectors are accumulated. The
x_t-columns of a timestep do not depend on h_{t-1}. So as soon as the last
column of timestep t has been issued, the engine starts on the x-columns of
timestep t+1 while the tails are still turning timestep t's sums into h_t.
By the time the h-columns come up, h_t is (normally) already written back.
The activation pipeline runs in the shadow of the x part.

Parallelism has two axes, and they are the two sizes of one weight tile:

* **EP** (element parallelism): the number of vector elements consumed per
  cycle, i.e. the tile width in columns.
* **VP** (vector parallelism): the number of matrix rows worked on at once,
  i.e. the tile height.

The engine has VP kernels of EP multipliers each, so EP x VP multipliers in
all. The default is EP = 16, VP = 1024: 16384 8-bit multipliers, the large
configuration of the original design.

## The combined, interlaced weight matrix

The four gate matrices (i, f, g, o), each lh x (lx + lh), are stored as one
matrix of `4*lh` rows by `lx + lh` columns. Rows are interlaced by hidden
element:

```
row 4j+0 : input gate i of hidden element j
row 4j+1 : forget gate f
row 4j+2 : modulation gate g
row 4j+3 : output gate o
columns 0 .. lx-1       : weights of x_t
columns lx .. lx+lh-1   : weights of h_{t-1}
```

Because of the interlacing, the four values a tail needs for element j are
neighbours in the result vector.

## Tiling and the walk order (`mvm_ctrl`)

The matrix is cut into tiles of EP columns by VP rows:

* column tile `ct` runs from 0 to `nct-1`, where `nct = (lx+lh)/EP`;
* row block `rb` runs from 0 to `nrb-1`, where `nrb = ceil(4*lh/VP)`.

Row r of the matrix belongs to kernel `r mod VP`, in row block `r / VP`. The
controller issues one tile per cycle, in this order:

```
for t in 0 .. ts-1
  for ct in 0 .. nct-1          (x tiles first, then h tiles)
    for rb in 0 .. nrb-1
      issue tile (ct, rb): vector slice [ct*EP, ct*EP+EP) to all kernels,
                           kernel k reads its weight word ct*nrb + rb
```

Row blocks are the inner loop, so every kernel keeps one partial sum per row
block (up to 6 at the default sizes). All row blocks finish in the last
`nrb` cycles of a timestep. The x part of the next timestep is
`(lx/EP)*nrb` cycles long, and that is the time available to hide the tail
pipeline. This ordering is a choice of this implementation; the original
architecture only says that large matrices are processed tile by tile.

The controller stalls in two cases:

* **h hazard (`stall_h`).** An h tile k may issue only once elements
  `0 .. (k+1)*EP-1` of h_{t-1} have been written back. `vector_buffer`
  counts the written elements, and the count is cleared at the end of each
  sweep. The tails produce h_t in index order, so a count is enough.
* **x starvation (`stall_x`).** The next EP elements of x_t are not yet in
  the input queue.

On timestep 0 the h tiles read the zero point, which is the quantized value
of h_{-1} = 0.

## Kernel (`mvm_kernel`) and zero-point compensation

Each kernel has a chain of stages:

1. A `weight_buffer` read (1 cycle).
2. EP processing elements, each an 8 x 8-bit unsigned multiplier giving a
   16-bit product.
3. A balanced, registered `adder_tree` over the EP products (log2 EP levels).
4. A 32-bit accumulator per row block, cleared by the first column tile.

Latency from issue to result is `3 + log2(EP)` cycles; the throughput is one
tile per cycle.

Operands are unsigned with zero points (`r = S*(q - z)`). The wanted value is
`sum((w - zw)(x - zx))`, which is computed as

```
sum(w*x) - zx*sum(w) + corr,     corr = n*zw*zx - zw*sum(x),  n = lx + lh
```

Each kernel adds up its own weights next to the products, giving the
row-specific term `zx*sum(w)`. The term `corr` is the same for every row. The
controller computes it once per sweep from the issued vector slices and
hands it to the kernels with the last column tile. All of this is exact in
32-bit two's-complement arithmetic.

## From sums to h_t: adapter, dequant, tails, quant

* **`adapter`** stores the `nrb` row blocks of a timestep (VP results each).
  It then streams the first `4*lh` rows to the tails, `4*NTAIL` rows (that
  is, NTAIL hidden elements) per cycle. Group g holds hidden elements
  `g*NTAIL .. g*NTAIL+NTAIL-1`. One buffer is enough: the sums of timestep
  t+1 cannot be complete before all of h_t has been written back, and an
  assertion checks this.
* **`dequant`** computes `sat16((acc * dq_mult) >>> dq_shift) + bias[row]`
  (saturating). The result is a gate pre-activation in Q3.12.
* **`lstm_tail`** handles one hidden element per cycle, with a latency of 4
  cycles. NTAIL = 16 tails run side by side. Each tail computes:

  ```
  c_t = sig(f)*c_{t-1} + sig(i)*tanh(g)
  h_t = sig(o)*tanh(c_t)
  ```

  Products are 16 x 16 bits, truncated back to Q3.12 (floor); sums
  saturate. Element j uses tail `j mod NTAIL`, which keeps c_{t-1} in a local
  memory at address `j / NTAIL`.
* **`act_lut`**: sigmoid and tanh are 2048-entry tables, as in the original
  design. The table index is the top 11 bits of the Q3.12 input: 2048 steps
  of 1/128 over [-8, 8), with no clamping logic. Entry k holds
  `round(4096*f((k+0.5)/128))`. The contents are computed at elaboration time
  with `$exp`/`$tanh`.
* **`quant`** computes
  `q = clamp(((h * q_mult) >>> q_shift) + zx, 0, 255)` and writes the result
  into `vector_buffer` for the next timestep. The Q3.12 and quantized values
  also leave the engine on the `h_*` port.

x_t and h_t share one scale and one zero point (`zx`), so together they form
one 8-bit input vector.

## Timing and throughput

If there are no stalls, a timestep takes `nct*nrb` cycles, and every cycle
uses all EP x VP multipliers on real rows, except for unused rows in the
last row block when `4*lh` is not a multiple of VP. The time from the last
tile of a timestep to the first h_t element written back is about
`3+log2(EP)` (kernel) + 1 (adapter) + 1 (dequant) + 4 (tail) + 1 (quant)
cycles. For EP = 16 that is about 14 cycles. After that, NTAIL elements are
written per cycle. If `(lx/EP)*nrb` is at least this latency and the tails
keep ahead of the h tiles (NTAIL >= EP/nrb), the engine never stalls.

Measured at the default size:

| layer                          | tiles issued | busy cycles | h stalls | issue / busy |
|--------------------------------|--------------|-------------|----------|--------------|
| lx = 2048, lh = 256, 2 steps   | 288          | 320         | 0        | 90.0 %       |
| lx = lh = 256, 150 steps       | 4800         | 4832        | 0        | 99.3 %       |
| lx = lh = 512, 25 steps        | 3200         | 3248        | 0        | 98.5 %       |
| lx = lh = 1024, 25 steps       | 12800        | 12880       | 0        | 99.3 %       |

The final drain explains the difference: the last timestep has no next
timestep to overlap with. The end-to-end testbench at reduced size shows both
regimes. With `lx/EP*nrb = 4` cycles the controller stalls on h. With 32
cycles it has zero h stalls and overlaps the tails.

The counters on the top are: `cnt_busy`, `cnt_issue`, `cnt_stall_h`,
`cnt_stall_x`, and `cnt_overlap` (tiles issued while an earlier timestep was
still in the tails). `cnt_issue / cnt_busy` is the hardware utilization in
the sense of "fraction of run time the multipliers are not idle".

## Using the engine (`rnn_lstm_top`)

1. **Configure.** Drive `cfg` (`rnn_pkg::rnn_cfg_t`) and keep it stable:

   | field               | meaning                                                |
   |---------------------|--------------------------------------------------------|
   | `lx`, `lh`          | vector lengths                                         |
   | `ts`                | number of timesteps                                    |
   | `zx`, `zw`          | zero points of vectors and of weights                  |
   | `dq_mult`/`dq_shift`| `S_w*S_x` as a fixed-point factor                      |
   | `q_mult`/`q_shift`  | `1/S_h` in Q3.12 units (e.g. h in [-1, 1] onto 1..255: 127, 12) |

   The lengths must satisfy these conditions:

   * `lx` and `lh` are multiples of EP;
   * `lh` is a multiple of NTAIL;
   * `lx <= MAX_LX` and `lh <= MAX_LH`;
   * `(lx+lh)/EP * ceil(4*lh/VP) <= WDEPTH`.
2. **Load the weights.** Pulse `w_we` with `w_row` (0 .. 4*lh-1),
   `w_ctile` (0 .. nct-1) and the EP weights of that row in that column tile.
   Loading uses `cfg.lh` to place the words.
3. **Load the biases.** Pulse `b_we` with `b_row` and a Q3.12 `b_val`.
4. **Run.** Pulse `start` (one cycle, while `busy` is low). Stream x_t as
   EP-element slices on `x_valid/x_ready`: `lx/EP` slices per timestep, in
   order, for all timesteps. `h_valid` then delivers NTAIL hidden elements
   per cycle (`h_base`, `h_fx`, `h_q`), in element order, for each timestep.
   `done` pulses after the last one.

Weights persist between sequences; only the cell state and h restart at 0.

## Parameters of the top

| parameter | default | origin |
|-----------|---------|--------|
| `EP`      | 16      | large configuration of the original design |
| `VP`      | 1024    | large configuration of the original design |
| `NTAIL`   | 16      | own choice (number of tail units is not fixed by the source) |
| `MAX_LX`  | 2048    | own choice: a 2048-feature video-frame input |
| `MAX_LH`  | 1536    | largest benchmark layer |
| `WDEPTH`  | 1152    | own choice: words per kernel for lx = lh = 1536 (192 column tiles x 6 row blocks) |
| `XFIFO`   | 8       | own choice: depth of the x_t slice queue |

EP and VP must be powers of two, and VP a multiple of 4*NTAIL. The smaller
configuration of the original design is EP = 4, VP = 1024 (4096
multipliers). Sizing: at defaults the weight buffers hold 1024 x 1152 x 128
bits = 151 Mbit, enough for an lx = lh = 1536 layer.

## Workloads

These benchmark LSTM layers fit the default configuration. The input length
is taken equal to the hidden length:

| layer           | words per kernel |
|-----------------|------------------|
| h = 256         | 32               |
| h = 512         | 128              |
| h = 1024        | 512              |
| h = 1536        | 1152 (full)      |
| lx = 2048, h = 256 (video-frame features) | 144 |

Any number of timesteps below 2^16 is supported. GRU layers are **not**
supported (see below).

## What is not here, and where this design departs

* **No GRU tail.** The source mentions a GRU tail, but it does not define the
  GRU cell or how its gates map onto the combined matrix. The usual GRU form
  needs the x and h parts of the candidate gate separately, which a single
  combined MVM does not deliver. Only LSTM is built.
* **No DSP packing.** The packing of four shared-operand 8-bit products into
  one FPGA DSP block is not modelled. The kernels use plain 8-bit
  multipliers. The column-wise order is what makes such packing possible:
  all the products of one column share the vector element.
* **No tail FIFOs.** The source synchronises the tails with FIFOs. Here all
  latencies are fixed, so plain pipeline registers align the data.
* **Own choices.** The following are choices of this implementation, made
  where the source gives no detail:
  * the fixed-point split (Q3.12) and the rounding (floor for products and
    shifts, round-to-nearest in the tables);
  * the scale representation (multiplier + shift);
  * where the bias is added (after de-quantization);
  * the weight layout and the load port;
  * the walk order over row blocks;
  * the hazard check by write count;
  * the split of the zero-point compensation between controller and kernels;
  * the first-timestep zero state.
* **Sequencing.** The engine runs one layer at a time with a batch of one.
  Stacking layers would mean feeding `h_q` of one run as x of the next.

## Verification

Each block has a self-checking testbench in `tb/`. The expected values come
from `tb/lstm_ref_pkg.sv`, a bit-exact integer/real model of the arithmetic
that is written separately from the RTL.

| testbench               | what it checks |
|-------------------------|----------------|
| `tb_rnn_lstm_top`       | Reduced size (EP 4, VP 16, 2 tails). Three sequences on one instance: h stalls with a short x part; zero h stalls plus timestep overlap with a long x part; x starvation with a gappy input. Every h_t element is checked (fixed point and quantized), along with exact tile counts and the busy counter. |
| `tb_rnn_lstm_full`      | Default parameters, a 2048 -> 256 layer for 2 timesteps. |
| `tb_rnn_lstm_deepbench` | Default parameters; h = 256 (150 steps), 512 and 1024 (25 steps), lx = lh. |
| `tb_mvm_ctrl`           | Walk order, addresses, flags, vector slices, correction term, stalls. |
| `tb_mvm_kernel`         | Dot products with zero points over 3 row blocks, exact latency, back-to-back sweeps. |
| `tb_adapter`, `tb_dequant`, `tb_act_lut`, `tb_lstm_tail`, `tb_quant`, `tb_vector_buffer`, `tb_weight_buffer` | Unit behaviour. All 2048 entries of both tables are checked. |

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with plain
Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rnn_pkg.sv tb/lstm_ref_pkg.sv tb/tb_rnn_lstm_top.sv \
    --top-module tb_rnn_lstm_top -Mdir obj && ./obj/Vtb_rnn_lstm_top
```

Verilator finds the other modules by file name in `rtl/`. The default-size
testbenches take about two minutes to build; each takes well under five
minutes to run.

## Files

The RTL is in `rtl/`. There is one module or package per file, and each file
opens with a description of its function and timing.

| file                              | contents |
|-----------------------------------|----------|
| `rnn_pkg.sv`                      | shared widths, types, the configuration struct, fixed-point helpers |
| `rnn_lstm_top.sv`                 | the engine |
| `mvm_ctrl.sv`                     | the tile walk |
| `mvm_kernel.sv`                   | the kernel |
| `weight_buffer.sv`                | the kernel's weight memory |
| `adder_tree.sv`                   | the kernel's adder tree |
| `adapter.sv`                      | the adapter |
| `dequant.sv`                      | de-quantization and bias |
| `act_lut.sv`                      | activation tables |
| `lstm_tail.sv`                    | the tail |
| `quant.sv`                        | quantization |
| `vector_buffer.sv`                | h storage |
| `sync_fifo.sv`                    | x queue |
