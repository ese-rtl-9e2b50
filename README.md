# Sparse LSTM engine: one weight stream, many frames, load-balanced PEs

This is a synthesizable SystemVerilog model of an FPGA engine that runs a pruned (sparse)
LSTM layer for speech recognition. The main idea is that after pruning, only about one weight in
nine is non-zero. The remaining weights are stored column-compressed and streamed once per time
step from external memory. The streamed weights feed many identical channels, each working on its
own audio frame. Inside a channel, the rows of every matrix are interleaved over 32 processing
elements (PEs). Each PE walks its share of the non-zeros at one per cycle.

Three things keep those PEs busy:

- **Overlapped loading.** The next matrix loads into the idle half of a double buffer while the
  current matrix is being multiplied.
- **Run-ahead.** A per-PE activation FIFO lets a PE with a light column run ahead of one with a
  heavy column.
- **Overlapped element-wise work.** The gate non-linearities and cell update for one gate run
  while the products for the next gate are computed.

The default configuration is the evaluated network: 153 inputs, 1024 cells and a 512-wide
recurrent projection. It has 32 channels of 32 PEs each. One time step produces `y_t` for 32
frames at once.

## The computation

One time step of the LSTM with peepholes and projection, per channel:

```
i_t = σ(W_ix x_t + W_ir y_{t-1} + W_ic ⊙ c_{t-1} + b_i)
f_t = σ(W_fx x_t + W_fr y_{t-1} + W_fc ⊙ c_{t-1} + b_f)
g_t = σ(W_cx x_t + W_cr y_{t-1} + b_c)
c_t = f_t ⊙ c_{t-1} + g_t ⊙ i_t
o_t = σ(W_ox x_t + W_or y_{t-1} + W_oc ⊙ c_t + b_o)
m_t = o_t ⊙ tanh(c_t)
y_t = W_ym m_t
```

The nine matrices `W_*x` (1024×153), `W_*r` (1024×512) and `W_ym` (512×1024) are sparse and
shared by all channels. The peephole vectors `W_ic, W_fc, W_oc` and the biases are dense and also
shared. `g_t` uses the sigmoid as written above, not the more common tanh.

### Number formats

| Quantity | Format |
|---|---|
| Activations, cell state, peepholes, biases, `y` | 16-bit signed Q3.12 (range ±8) |
| Sparse weights | 12-bit signed Q1.10 (range ±2) |
| Products and accumulators | 32-bit, 22 fraction bits |

An SpMV result converts back to Q3.12 with a 10-bit arithmetic shift and saturation. Every
element-wise product shifts by 12 and saturates. 12-bit weights are the width at which pruned
networks were found to lose no accuracy. The other widths are this design's choice (`ese_pkg`).

## Sparse matrix format

Row `r` of a matrix belongs to PE `r mod NPE`, as local row `r / NPE`. This interleaving spreads
the rows of a dense region over all PEs.

Each PE stores its rows column by column, in two memories:

- **Pointer buffer** (`ptr_read`): one word per column, holding the *end* address of that
  column's entries. The start of a column is the previous column's end, or 0 for the first one.
- **Weight buffer** (`spmat_read`): 16-bit entries `{rel[3:0], w[11:0]}`. `rel` is the number of
  zero rows skipped since the previous non-zero of the column (or since local row 0).

A gap of 16 or more rows cannot be written in 4 bits. It is bridged with *padding entries*,
`rel = 15, w = 0`, each of which advances the row by 16 and adds nothing. Padding costs a cycle
like any entry and is counted in the tests. For the 1024-row matrices at 11% density it is rare.

Both buffers exist twice (halves 0 and 1). Matrix `k` of a step always goes to half `k mod 2`.

## Datapath of one channel (`ese_channel`)

```
 x_t / y_{t-1} / m_t ──► feeder ──► ActQueue (one FIFO per PE)
                                      │  │  │
                          PE 0 … PE NPE-1: PtrRead → SpmatRead → multiply → accumulate → act buffer (2 banks)
                                      │  │  │
                                    Assemble ──► element-wise unit (peephole ⊙, adder, σ/tanh, ⊙+, H buffer) ──► y_t
```

**Feeder and ActQueue** (`act_queue`). A product job streams its source vector into the
ActQueue at one element per cycle:

| Matrix | Source vector |
|---|---|
| `W_*x` | `x_t` from the input buffer |
| `W_*r` | the channel's own `y_{t-1}` |
| `W_ym` | `m_t` |

Each element is written into every PE's FIFO at once. The feeder stalls while any FIFO is full;
`ev_stall` reports those cycles. FIFO depth is `QDEPTH` (8 by default).

**PE** (`ese_pe`). A PE pops an activation, looks up its column's entry range and issues one
entry per cycle. Each entry multiplies the activation by the weight and adds the product to the
accumulator of row `row_pos + rel`.

- The next column is popped in the same cycle as the current column's last entry, so consecutive
  non-empty columns run back to back.
- An empty column costs one cycle, because one activation is taken per cycle.
- A job with `n_c` entries in column `c` therefore takes `Σ_c max(1, n_c)` cycles in the PE, plus
  3 cycles of start-up and pipeline. This is checked exactly in `tb_ese_pe`.

**Accumulator and act buffer** (`spmv_accu`). A one-stage multiply pipeline feeds
read-modify-write accumulation into one of two banks of `ROWS = NH/NPE` words.

- Clearing a bank takes one cycle. It resets per-row "written" flags, so the first product of a
  row overwrites instead of adding.
- Products for gate `g` go to bank `g mod 2`. Element-wise pass `g` can then read bank `g mod 2`
  while gate `g+1` fills the other bank.

**Assemble** (`assemble`) reverses the interleaving. For vector index `idx` it reads local row
`idx / NPE` of PE `idx mod NPE` and converts the result to Q3.12.

**Element-wise unit** (`ew_unit`) makes five passes over the vector, one element per cycle, with
two pipeline stages. A pass over `len` elements takes `len + 2` cycles.

| Pass | Computes |
|---|---|
| `EW_I` | `i = σ(s + W_ic⊙c_{t-1} + b_i)` |
| `EW_F` | `f = σ(s + W_fc⊙c_{t-1} + b_f)` |
| `EW_G` | `c_t = f⊙c_{t-1} + σ(s + b_c)⊙i`, written over `c_{t-1}` |
| `EW_O` | `m = σ(s + W_oc⊙c_t + b_o) ⊙ tanh(c_t)` |
| `EW_Y` | `y_t = s`, also sent to the output buffer |

The H buffer holds `i, f, c, m` (NH words each) and `y` (NY words). It uses two `elem_mul`
instances (a plain one and a multiply-add), an `adder_tree` for `s + peephole + bias`, and two
`sigmoid_tanh` instances. With `zero_state`, `c_{t-1}` and `y_{t-1}` read as zero; this is the
first frame of a sequence.

**Sigmoid / tanh** (`sigmoid_tanh`). A four-segment piecewise-linear sigmoid with power-of-two
slopes (the PLAN approximation): shifts and adds only. `tanh(x) = 2σ(2x) − 1`. The largest error
is 0.019 for σ and 0.038 for tanh. The segments at |x| = 2.375 meet 16 LSB apart, so the curve
dips slightly there.

## Schedule of a time step (`ese_controller`)

The nine products are issued in gate order: `W_ix, W_ir | W_fx, W_fr | W_cx, W_cr | W_ox, W_or |
W_ym`. Each pair accumulates into one bank, and the first product of a pair clears it. Three
activities run concurrently, each waiting only for its real dependencies:

| Activity | Starts when |
|---|---|
| Loader: matrix `k` into half `k mod 2` | product `k−2` has finished with that half |
| Product `k` | matrix `k` is loaded, **and** its bank has been read by element-wise pass `g−2`; `W_ym` also needs `m_t` (pass `EW_O` done) |
| Element-wise pass `g` | both products of gate `g` are done (`EW_Y` waits for `W_ym`) |

So matrix `k+1` streams in while product `k` runs, and the non-linearities of one gate overlap
the products of the next. The assertion `a_load_bank_free` checks that a half is never reloaded
while it is being read. `done` pulses after `EW_Y` of all channels. `new_seq` with `start`
selects the zero state.

## Top level (`ese_top`)

`ese_top` holds the controller, the input buffer, `NCH` channels and the output buffer. All ports
are plain signals.

- **Host writes** (`in_we, in_sel, in_ch, in_kind, in_addr, in_data`):
  - `in_sel = 0` writes `x_t[in_addr]` of channel `in_ch`;
  - `in_sel = 1` writes element `in_addr` of the shared parameter vector `in_kind`, one of
    `P_WIC, P_WFC, P_WOC, P_BI, P_BF, P_BC, P_BO`.
- **Control:** pulse `start` (with `new_seq` for the first frame); `busy`; `done` pulses at the
  end of the step.
- **Results:** `out_data = y_t[out_addr]` of channel `out_ch`, combinational.
- **Matrix stream** (what a memory controller would deliver):
  - `ld_req_valid` pulses with `ld_req_mat`, the matrix wanted next;
  - the memory side then sends beats (`ld_valid`). First come one beat per column with
    `ld_is_ptr = 1` and `ld_addr` = column. Then come the entry beats with `ld_is_ptr = 0` and
    `ld_addr` = entry address, up to the longest PE slice; shorter slices are padded with
    anything;
  - each beat carries one 16-bit word per PE (`ld_data[NPE]`);
  - `ld_last` marks the final beat;
  - gaps between beats are allowed.
- **Monitors:** `ev_stall`, `ev_pad`, `ev_load_overlap`, `ev_ew_overlap`, and `ev_issue` (channel
  0's per-PE issue flags).

Software has to produce the per-PE encoding. For each matrix, PE and column, emit the non-zeros
of rows `p, p+NPE, …` in row order with relative indices and padding. The column pointer is the
running entry count. The matrix stream is the pointer words, then the entry words. The encoder in
`tb/ese_tb_core.sv` (task `build`) is a complete reference.

## Sizes and capacity

| Parameter | Default | Where it comes from |
|---|---|---|
| `NX, NH, NY` | 153, 1024, 512 | the evaluated network |
| `NPE` | 32 | a theoretical 2.9 µs for an 18.3k-non-zero matrix means ~32 non-zeros per cycle at 200 MHz |
| `NCH` | 32 | the reported operation counts imply 32 frames per step |
| `WDEPTH` | 4096 entries per half | own choice |
| `QDEPTH` | 8 | own choice |

`WDEPTH` covers the largest evaluated matrix (60.4k non-zeros, about 1.9k per PE) with margin.
The 200 MHz clock is an assumption, not a stated number.

Every evaluated matrix fits:

| Matrix | Entries per PE | Columns | Rows per PE |
|---|---|---|---|
| 1024×153, ~11.7% | ~580 | 153 | 32 |
| 1024×512, ~11.4% | ~1.9k | 512 | 32 |
| 512×1024, 10% | ~1.6k | 1024 | 16 |

With 11% random weights, the full-size simulation of one step takes 27.2k cycles for all 32
frames. The sum over the nine matrices of the busiest PE's entries is 12.4k. The gap comes mostly
from the weight stream. Each matrix needs `columns + longest slice` beats, about 16.1k for the
step, and the testbench's memory model delivers a beat on about three cycles in four. That alone
gives about 21.5k cycles. The rest is time in which a load waits for a half to become free. PE utilisation in that run is 43%. The
reference implementation reports 82.7 µs per step, about 16.5k cycles at 200 MHz.

When memory is not the limit, run time follows the number of non-zeros. `tb_ese_sparsity` runs
one 256×64 product on 8 PEs at several densities. It uses two kinds of matrix:

- **unbalanced:** every weight is kept independently with the given probability;
- **balanced:** every PE's slice gets the same number of non-zeros, the effect of
  load-balance-aware pruning.

Typical results:

| Non-zero | Unbalanced cycles | Unbalanced speedup | Balanced cycles | Balanced speedup |
|---|---|---|---|---|
| 100% | 2051 | 1.0× | 2051 | 1.0× |
| 50% | 1039 | 2.0× | 1027 | 2.0× |
| 30% | 650 | 3.2× | 618 | 3.3× |
| 20% | 468 | 4.4× | 419 | 4.9× |
| 15% | 348 | 5.9× | 326 | 6.3× |
| 10% | 250 | 8.2× | 233 | 8.8× |

At 90% pruned, balancing gains 4–13% depending on the random draw. The shortfall from the ideal
10× comes from the remaining imbalance and from empty columns. These are compute-only figures.
In a full system the weight stream also limits the speed, as the full-size run above shows.

## Where this model departs from the reference architecture

- **Product order.** Products run gate by gate (`W_ix, W_ir, W_fx, …`). The reference schedule
  fetches all `W_*x` first, then all `W_*r`. That order would need four accumulator banks per PE
  instead of two.
- **Scheduler form.** The reference presents the schedule as a fixed sequence of six states.
  Here the controller is a set of dependency counters. It starts each load, product and
  element-wise pass as soon as its inputs are ready. The overlaps are the same; the exact cycle
  at which each begins is not fixed.
- **Where vectors live.** The reference fetches the bias and peephole vectors, and `x_t`, over
  the memory stream during the step. Here the host writes them into the input buffer. The
  peephole and bias vectors are written once and then kept.
- **Cost of empty columns.** An empty column costs a PE one cycle. The load-balancing argument
  counts only non-zeros per PE. For the evaluated matrices a PE sees on average 3.5 non-zeros per
  column, so empty columns are rare, but the bound is `Σ max(1, n_c)`, not `Σ n_c`.
- **Own choices.** The entry format, pointer convention, padding scheme, number formats,
  sigmoid approximation, load-stream protocol, host interface and buffer contents are not
  specified by the reference. They are chosen here.
- **Missing system parts.** PCIe, the DDR controller, external memory, the host CPU and the data
  bus are not modelled. The matrix stream and host access appear as top-level ports instead.
- **Load-balance-aware pruning** is a training-time step and has no hardware here. The design
  works for any sparsity pattern; balanced matrices only make it faster.

## Files

`rtl/` has one module or package per file:

| File | Contents |
|---|---|
| `ese_pkg` | types and constants |
| `ese_top` | top level |
| `ese_controller` | schedule of a time step |
| `input_buffer`, `output_buffer` | host-side buffers |
| `ese_channel` | one channel |
| `act_queue`, `sync_fifo` | activation broadcast queue and its FIFO |
| `ese_pe`, `ptr_read`, `spmat_read`, `spmv_accu` | PE and its memories and accumulator |
| `assemble` | reverses the row interleaving |
| `ew_unit`, `elem_mul`, `adder_tree`, `sigmoid_tanh` | element-wise datapath |

`tb/` has one self-checking testbench per module, `tb_<module>.sv` (including the helper
`tb_sync_fifo`), plus the speedup sweep `tb_ese_sparsity`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. There are two end-to-end tests.
`tb_ese_top` runs a reduced size: 2 channels × 4 PEs, 12/128/16, three steps.
`tb_ese_top_full` runs the default size for one step. Both use `ese_tb_core.sv`, which:

- draws random sparse matrices and encodes them;
- plays the memory side with random gaps;
- checks every `y_t` bit-exactly against a fixed-point LSTM model;
- checks that every mechanism occurred (stalls, padding, overlapped loads, overlapped
  element-wise passes, first frame).

To simulate with Verilator (5.x), from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert rtl/ese_pkg.sv $(ls rtl/*.sv | grep -v ese_pkg) \
  tb/ese_tb_core.sv tb/tb_ese_top.sv --top-module tb_ese_top -Mdir obj -o sim -Wno-fatal
./obj/sim
```

Replace `tb_ese_top` with any other testbench name. The full-size test builds in about two
minutes and runs in seconds.
