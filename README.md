# Block-batched LSTM inference accelerator

This is an FPGA-style accelerator for LSTM inference. The network is too
large to keep on chip: a 784-input, 128-unit LSTM cell followed by a
10-output fully connected layer and an arg-max, classifying MNIST-sized
inputs. All weights and inputs therefore live in off-chip memory. The
accelerator streams them through small on-chip ping-pong buffers in tiles,
and it reuses each weight tile across a whole batch of inputs. The design
idea is called **block-batching**. It keeps the on-chip memory small and
still gives the weights enough reuse to keep the multipliers busy.

The RTL is written in parameterised SystemVerilog. The parameter defaults
are the reference configuration:

| Parameter | Default | Meaning |
|---|---|---|
| `N_IN` | 784 | input width (one MNIST image, flattened) |
| `N_HID` | 128 | hidden units |
| `N_OUT` | 10 | outputs / classes |
| `BATCH` | 500 | input pairs per batch |
| `BLOCK` | 64 | tile edge |
| `IN_W, IN_I` | 18, 2 | input format |
| `HID_*`, `MEM_*`, `CALC_*` | 14, 6 | hidden/cell state, weights and biases, accumulators and gates |
| `OUT_W` | 4 | class index width |

The number of batches is a run-time input (`n_batches`).

## The computation

For one input pair `x`, the cell works from the hidden state `h` and the cell
state `C`. Gates are written in the order f, i, z, o:

```
f = σ(W_if·x + b_if + W_hf·h + b_hf)     i = σ(...)     z = tanh(...)     o = σ(...)
C = f·C + i·z
h = o·tanh(C)
L = W_l·h + b_l
class = argmax(L)
```

### Batch-stateful hidden state

A conventional stateful LSTM feeds the `h` of one pair into the next pair.
That serialises the `W_h·h` product with everything else. Here, all pairs of
a batch use the same hidden state: the one left by the **previous batch**.
The `W_h·h` part of every gate is therefore computed once per batch and per
hidden block. It runs in parallel with the input products. Two hidden state
arrays are kept:

- `h_prev` is read by the hidden-path products for the whole batch.
- `h_next` is written as each pair is processed.

At the end of a batch, `h_next` is copied into `h_prev`. The cell state `C`
is a single array that is carried from pair to pair. At start-up, `h_prev`
and then `C` are filled with Gaussian pseudo-random values.

## Block-batching dataflow

For each batch `b`, and for each block `kb` of `BLOCK` hidden units:

1. **Hidden path** (`lstm_calc_batch_h`). `tmp_h[g][k] = b_h + Σ_j h_prev[j]·W_h[g][kb·BLOCK+k][j]`
   for all four gates. The result is one vector per block, shared by the
   whole batch. This takes `N_HID` cycles, overlapped with step 2.
2. **Input path** (`lstm_calc_batch_x`). The `N_IN` columns are cut into
   `NJB = ceil(N_IN/BLOCK)` column tiles. For every tile, the loaders deliver
   two things:
   - `X[BATCH][BLOCK]`: that column tile of all pairs of the batch.
   - `W_i[4][BLOCK rows][BLOCK cols]`: the same columns of the block's rows.

   The unit walks pair by pair and column by column. Each cycle, it
   multiplies one input value with one weight column (4×`BLOCK` multipliers)
   and adds the products to the pair's accumulators `acc[BATCH][4][BLOCK]`.
   The accumulators start from `b_i` on the first tile. A tile takes
   `BATCH·width` cycles. For the defaults there are 13 tiles, and the last one
   is only 16 columns wide.
3. **Gates, state and output layer** (`lstm_fizo_logistic_batch`). For each
   pair, and for each of the block's hidden units, one per cycle, the unit:
   - adds the two gate parts;
   - applies the PLAN σ/tanh;
   - updates `C`;
   - forms `h`;
   - adds `h·W_l[:, unit]` into the pair's output accumulators `L[BATCH][N_OUT]`.

   `L` starts from `b_l` on the first block. This takes `BATCH·BLOCK` cycles.

After the last block, the arg-max of every pair's `L` row is written to
memory as its class (`lstm_logistic_calc`). Then the hidden state is handed
over to the next batch.

The input tiles of a batch are fetched again for every hidden block, so the
batch input traffic is `N_HID/BLOCK` times the input size. In return, only
`BATCH×4×BLOCK` accumulators are needed instead of `BATCH×4×N_HID`. Every
weight fetched is used `BATCH` times.

### Buffers and prefetch

Each loader owns a ping-pong buffer and a memory read port:

| Loader | Port | Buffer contents |
|---|---|---|
| `buffer_x_batch` | 0 | input column tiles |
| `buffer_wi_blocks` | 1 | `W_i` tiles |
| `buffer_wh_blocks` | 2 | per hidden block: the `W_h` rows, `b_i`, `b_h`, the `W_l` columns and `b_l` |

Each loader runs through the same tile sequence as the computation, on its
own:

- It fills the idle bank while the compute side reads the full one.
- It waits (`stall`) only when both banks are full.
- The compute side waits only when the bank it needs is not complete yet.

`burst_reader` turns a description such as "groups × rows × row_len words
with these strides" into one read burst per row. It labels each returned
word with its group, row and column.

### Timing

At the defaults:

- State initialisation takes `2·N_HID` cycles, once.
- The compute-bound time per batch is `(N_HID/BLOCK)·(BATCH·N_IN + BATCH·BLOCK) + BATCH` cycles.
  That is 848,500 cycles for 500 pairs, about 1,700 cycles per inference.

The input-path pass dominates. It runs at one column per cycle for all
4×`BLOCK` lanes. With a memory that randomly delays requests and responses,
the default-size simulation of one batch took 927,657 cycles. The extra
cycles are waits for the first tiles and for the fetches of each block.

## Number formats

Every value is signed two's complement `<W,I>`: W bits, I of them integer
bits including the sign. After every multiply-add, the result is
re-quantised into the target format in two steps:

1. Extra fraction bits are truncated, i.e. rounded toward −∞.
2. The result saturates at the ends of the range.

`lstm_pkg::fx_requant` is the single place this happens. `lstm_calc_batch_x`
also reports each accumulator saturation (`sat_event`).

In memory, every value occupies one 32-bit word that holds the signed integer
`value·2^F`. Values outside the format saturate when they are loaded.

### Activations (PLAN)

σ is the piecewise-linear PLAN approximation. For `a = |x|`:

| Range | σ |
|---|---|
| `a ≥ 5` | 1 |
| `2.375 ≤ a < 5` | `a/32 + 0.84375` |
| `1 ≤ a < 2.375` | `a/8 + 0.625` |
| `a < 1` | `a/4 + 0.5` |

For negative x the result is `1 − σ`. The slopes are shifts and the offsets
are constants, so no multiplier is needed. tanh is `2σ(2x) − 1`, built from
the same unit.

### Gaussian state initialisation

`gprng` adds four 16-bit Fibonacci LFSRs (`lfsr16`, taps 15, 14, 12 and 3,
i.e. x^16+x^15+x^13+x^4+1, period 65535) in a two-level adder tree and
divides by four. By the central limit theorem the sum is roughly Gaussian,
with a standard deviation of about 9459 LSB. A sample is scaled by 2^-13
into the state format, so its standard deviation is about 1.15.

## Memory map and host interface

All addresses are word addresses and all matrices are row-major:

| Base | Contents |
|---|---|
| `x_base` | `X[nSamples][N_IN]` |
| `wi_base` | `W_if, W_ii, W_iz, W_io`, each `[N_HID][N_IN]` |
| `wh_base` | `W_hf ... W_ho`, each `[N_HID][N_HID]` |
| `wl_base` | `W_l[N_OUT][N_HID]` |
| `bias_base` | `b_i[4][N_HID]`, then `b_h[4][N_HID]`, then `b_l[N_OUT]` |
| `out_base` | one class index per pair, written by the accelerator |

A run is started by a `start` pulse. It is given the base addresses,
`n_batches` (nSamples = n_batches × BATCH) and four LFSR seeds. `busy`
stays high until `done` pulses.

Each read port uses:

- a request handshake, `req_valid`/`req_ready`, carrying `req_addr` and `req_len` (one burst);
- then `req_len` response words, `rsp_valid`/`rsp_data`, in request order, with no back-pressure.

The write port is a plain `wr_valid`/`wr_ready` handshake with `wr_addr` and
`wr_data`. In a real system an AXI master adapter and the memory controller
sit behind these ports, together with a host processor that sets the base
addresses. None of these are part of this RTL.

## What follows the reference design and what is this design's own

These follow the reference design:

- the block-batching order of work;
- the batch-stateful hidden state;
- double buffering of X, W_i and W_h;
- the parallel hidden-path and input-path products;
- the FIZO/output-layer loop, fusing the gate and state update with the output layer;
- the arg-max;
- the 4-LFSR Gaussian initialisation;
- PLAN activations;
- saturating fixed-point formats;
- all default sizes and formats.

These are this design's own choices:

- **Memory ports and handshake.** The reference uses AXI burst masters.
  Here, each loader has a simple burst request/response port. The one-word
  memory layout above is also this design's.
- **Bias initialisation.** The accumulators are seeded with their biases
  inside the compute units on the first pass. There are no separate
  accumulator-initialisation steps. `b_l` and `W_l` are fetched by the
  `W_h` loader.
- **Timing of the compute units.** The input-path unit handles one column
  per cycle for all lanes, and the FIZO unit one hidden unit per cycle.
  Neither has pipeline registers. The reference, built with high-level
  synthesis, reached initiation intervals of 3 to 12 cycles depending on
  `BLOCK`. Those cycle counts are not reproduced here.
- **Smaller choices.** Truncation as the rounding mode, the scaling of the
  Gaussian samples, the tie rule of the arg-max (the lowest index wins), and
  zero seeds being replaced by 1.
- **Hidden-state arrays.** Two hidden-state arrays (`h_prev`/`h_next`) make
  the batch hand-over explicit.
- **Restrictions.** `N_HID` must be a multiple of `BLOCK`, and nSamples a
  multiple of `BATCH`. `N_IN` is free.

## Files

| File | Role |
|---|---|
| `rtl/lstm_pkg.sv` | defaults, gate order, `fx_requant` |
| `rtl/lstm_top.sv` | control FSM, state arrays, wiring |
| `rtl/burst_reader.sv` | burst address generator |
| `rtl/buffer_x_batch.sv`, `rtl/buffer_wi_blocks.sv`, `rtl/buffer_wh_blocks.sv` | loaders and ping-pong buffers |
| `rtl/lstm_calc_batch_x.sv`, `rtl/lstm_calc_batch_h.sv` | input-path and hidden-path multiply-accumulate |
| `rtl/lstm_fizo_logistic_batch.sv` | gates, state update, output layer |
| `rtl/lstm_logistic_calc.sv` | arg-max |
| `rtl/plan_activation.sv` | PLAN σ/tanh |
| `rtl/gprng.sv`, `rtl/lfsr16.sv` | Gaussian state initialisation |

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one:

- compares the module against an independent restatement of the arithmetic
  in `tb/tb_ref_pkg.sv` (real-valued floor and clamp, the PLAN table, the LFSR
  polynomial);
- prints `TB_RESULT checks=N failures=M`;
- has a watchdog.

`tb/tb_mem_model.sv` is a behavioural multi-port memory. It accepts requests
late at random, pauses responses at random and back-pressures writes at
random.

The end-to-end tests share `tb/tb_lstm_top_body.svh`. The body does the
following:

1. Generates inputs and weights. One forget-gate weight row is made large
   enough to force saturation.
2. Runs a step-by-step reference model of the whole algorithm.
3. Compares every predicted class and the final `h` and `C` with the model.
4. Counts how often each mechanism occurred, and fails if any never did:
   - compute waiting for a buffer;
   - a loader stalled a tile ahead;
   - the hidden-path and input-path units running at the same time;
   - a narrow last column tile;
   - the state hand-over between batches;
   - accumulator saturation;
   - write back-pressure.

There are two end-to-end tests:

- `tb_lstm_top` uses a reduced size: 44-16-10, `BLOCK` 8, batches of 6, 3 batches.
- `tb_lstm_top_full` uses the defaults with no parameter override and one
  batch of 500 pairs. Its simulation takes about 6 s, and building it with
  Verilator takes several minutes.
- `tb_lstm_top_h32` is elaborated for the 784-32-10 network with `BLOCK` 16
  (two hidden blocks, 49 column tiles). It runs 2 batches of 20 pairs. With
  so few pairs per batch, each weight tile is reused only 20 times, and the
  run is limited by memory traffic: 216,803 cycles against a compute bound of
  64,040.

To simulate with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl -Itb \
  rtl/lstm_pkg.sv tb/tb_ref_pkg.sv tb/tb_lstm_top.sv --top-module tb_lstm_top
./obj_dir/Vtb_lstm_top
```

Replace `tb_lstm_top` with any other testbench name. To try another
configuration, change the localparams at the top of `tb/tb_lstm_top.sv`.
`N_HID` must stay a multiple of `BLOCK`.
