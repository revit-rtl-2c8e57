# ReViT attention accelerator in SystemVerilog

Neighbouring patches of an image look alike. In a vision transformer this means
that many patch feature vectors are close to one another. This accelerator uses
that redundancy. It first sorts the patches into a few *semantic groups* with a
locality-sensitive hash. Each group has a centroid, the mean of its patches. A
patch is then written as the centroid plus a small difference (delta). A
projection such as `Q = W·x` becomes

    Q(x) = W·x_c + W·(x − x_c)

The first term is computed once per group. The second multiplies `W` by the
delta. Deltas are small numbers, so they have few non-zero digits. The PE array
is bit-serial and spends one cycle per non-zero digit, so the deltas finish in
fewer cycles than raw features would. Attention scores are formed the same way,
and softmax runs block by block. Scheduling lets each group move on to its
global (inter-group) step as soon as its local work ends. Pruners drop
unimportant patches and whole groups.

All RTL is in `rtl/`. Testbenches and memory models are in `tb/`. The top module
is `revit_top`.

## The bit-serial PE and where the cycles go (`rbsp`)

Each PE receives `PC` features, `PC` centroid values and `PC` weights per slice
(default `PC = 4`).

- In **raw** mode the PE uses the features as they are.
- In **delta** mode a subtractor first forms `x − c`, a 10-bit value.
- Every operand is recoded into radix-4 modified-Booth digits (`-2..2`).
- In each cycle, every lane takes its lowest remaining non-zero digit. The
  weight is shifted by that digit's position, plus one more place for |2|, and
  negated for a negative digit. An adder tree sums the `PC` shifted weights
  into a 32-bit accumulator.
- Digits that are zero cost nothing. A slice therefore takes `N + 1` cycles,
  where `N` is the largest count of non-zero digits in any lane. The extra cycle
  is the done cycle. A delta of 0 costs only the done cycle. A raw byte such as
  `0x55` costs 4 + 1 cycles.

`save_base` keeps the finished sum as the PE's *base*, which is the centroid's
result. In delta mode, the output adds `base_in` to the accumulated sum. This
adder is the differential reconstruction element (DRP), and it gives back
`W·x` exactly.

## Splitting the array by group (`rmmu`, `rsched`)

`rmmu` is a `ROWS × COLS` grid of PEs (default 64 × 64).

- **Data flow.** Weights are broadcast along rows and features along columns.
  Column `c` computes output vector `c`.
- **Switch boxes.** Between neighbouring columns there is a one-bit switch box
  (`link[c]`). When it is 1 the two columns belong to the same sub-array. When
  it is 0 the array is cut there.
- **Base chain.** Each PE's `base_in` is its own saved base at the left edge of
  a sub-array. Elsewhere it is its left neighbour's `base_in`. So the leftmost
  column holds the group's centroid result, and every other column of the
  group reconstructs against it.
- **Flat mode.** All links at 1 makes one large array, which ordinary (flat)
  attention uses.
- **Slice timing.** Enabled columns start a slice together. Each column
  finishes when its own slowest digit stream ends. `done` rises one cycle after
  the slowest enabled column.

`rsched` decides the cuts. Given the group sizes, it gives each non-empty group

    a_g = 1 + size_g · (COLS − nonempty_groups) / total_patches

columns. The rounding remainder goes to the largest group. The first column of
each sub-array follows the previous one, and `link` has a 0 at each boundary.
`flat` puts everything into group 0.

The scheduler also orders the two phases of hierarchical attention:

- *Intra-group* attention is local to each group.
- *Inter-group* attention is global, between centroids.

With `ooo_en` set, a group's inter-group step is issued (`inter_go`,
`inter_grp`) as soon as that group reports its intra phase done, whether or
not the other groups have finished. With `ooo_en` clear, inter steps wait for
all groups. `idle_cols` counts column-cycles in which an allocated sub-array
had nothing to do.

## Running a layer: the command sequence

The central controller (`central_ctrl`) carries out one command at a time,
received on `cmd_valid`/`cmd_ready`. `busy` stays high until the command has
finished. Command fields are in `revit_pkg::cmd_t`.

| opcode | effect |
|---|---|
| `OP_LOAD` | prefetch `len` words from HBM address `src` into the fill bank of the input (`bufsel[0]=0`) or weight (`bufsel[0]=1`) buffer at `a0` |
| `OP_SWAP` | swap fill/drain banks of input, weight, Q/V, K/A buffers (`bufsel` bits 0..3) |
| `OP_MATMUL` | `n0` slices. Slice `s` reads input word `a0+s` (features), `a1+s` (centroids) and weight word `a2+s`. The sink is chosen per command (see below). |
| `OP_SCHED` | hand the group counts to `rsched` and allocate sub-arrays (`flat`, `ooo` flags) |
| `OP_SOFTMAX` | softmax over `n1` score blocks for `n0` rows. The K/A drain bank at `a0 + blk·a2 + row` is read, and probabilities go to the K/A fill bank at `a1 + blk·a2 + row`. |
| `OP_PRUNE` | feed `n0` V vectors (Q/V drain bank from `a0`) and one attention row (K/A drain word `a1`) to the patch (`pr_sel=0`) or group (`pr_sel=1`) pruner |
| `OP_CLEAR` | reset the group counts and pruning counters |

The sink of a matmul command is one of:

- `SINK_QV`: write each column's `ROWS` results, requantised to 8 bits by
  `>>> shift` and saturation, to Q/V address `dst + column`.
- `SINK_SCORE`: write each row's `COLS` scores, requantised to 16 bits, to
  K/A address `dst + row`.
- `SINK_HASH`: send rows `0..G−1` of each column (the hash projections `α·x`)
  to the group engine.
- `SINK_NONE`: store nothing, as in a centroid pass.

Other matmul controls:

- `save_base`: store the results as bases.
- `auto_link`: take the switch-box bits from `rsched` instead of the command.
- `phase` and `grp_mask`: tell `rsched` that these groups finished their intra
  or inter step.

A differential projection of one layer then runs as follows. The end-to-end
testbench does exactly this.

1. Load the patches (one word per `PC` features: column `c`, lane `j` at bits
   `(c·PC+j)·8`) and the hash rows `α`. Run a `SINK_HASH` matmul. Each G-PE
   computes `floor((α_g·x + β_g) / 16)` for every group and takes the argmax.
   The index goes to the Idx buffer and the count to `group_count`.
2. `OP_SCHED`. Read `grp_first` / `grp_cols`.
3. The host averages each group into its centroid (this design has no
   averaging unit). It places each group's patches in that group's columns and
   the centroid in every column of the group's centroid word.
4. A centroid pass: raw mode, only the first column of each sub-array,
   `save_base`, `auto_link`.
5. A delta pass: `cmd_col_mode` all 1, `auto_link`, `SINK_QV`. Mark it
   `PH_INTRA` with the groups it completes.
6. For every `inter_go`, run that group's global step with `PH_INTER`.
   `sched_done` pulses when all groups have finished both phases.

Scores `Q·K` over several key blocks use `SINK_SCORE` with a flat array, one
command per block of `COLS` keys. After a K/A swap, `OP_SOFTMAX` turns them
into probabilities. The `A·V` product is one more matmul. The host moves the
probabilities from the K/A buffer to the weight buffer through HBM, because
there is no direct on-chip path.

## Blockwise softmax (`diff_softmax`)

Scores of a row arrive in blocks of `BLK` (default 64) with a lane mask. For
each block the unit:

1. finds the block maximum `m_b`;
2. computes `e_i = 2^((s_i − m_b)/16)` from a 16-entry table of fractional
   powers and a shift;
3. adds them into `l_b`;
4. merges the block into the running pair (`m_g`, `l_g`). Whichever side has
   the smaller maximum is scaled down by `2^(Δm/16)`.

After the last block it forms one reciprocal of `l_g`. Then it outputs one
block per cycle. Each `e_i` is rescaled to the final maximum and multiplied by
the reciprocal, giving Q1.15 probabilities (`32768 = 1.0`). Base-2 exponents
amount to a fixed scale of the scores, which the projection shift absorbs. The
error against exact arithmetic stays within a few tens of LSB. Up to `NBLK`
(default 4, i.e. 256 keys) blocks are held per row.

## Group generation and pruning (`sgg_engine`, `pruner`)

**Group generation.** `sgg_engine` holds `NGPE` two-stage G-PEs. A dispatcher
hands each patch's `G` hash values to a free G-PE, round robin. The G-PE adds
`β`, shifts by `GSHIFT` (γ = 16) and takes the argmax, with ties going to the
lower group. Results write the Idx buffer and count the group sizes.

**Pruning.** `pruner` holds `NPPE` P-PEs. A P-PE takes the L1 norm of a V
vector, `VL` elements per cycle. It multiplies the norm by the candidate's
attention weight and keeps the candidate if the product reaches `thr`. The
mask write comes `D/VL + 2` cycles after the candidate is taken. The top has
two pruners:

- the patch pruner, for local pruning;
- the group pruner, for pruning whole groups by their centroid's score.

At inference the Gumbel-softmax decision of the original method is a hard
comparison. Here it is exactly that comparison, with the threshold as an
input.

## Buffers and memory (`pingpong_buffer`, `scratch_bank`, `prefetcher`)

Each buffer is two `scratch_bank`s (synchronous read, one-cycle latency). One
bank fills while the other drains. `swap` exchanges them.

| buffer | word | depth per bank | size |
|---|---|---|---|
| input | 2048 bit (64 columns × 4 lanes × 8 bit) | 256 | 128 KB |
| weight | 2048 bit (64 rows × 4 lanes × 8 bit) | 512 | 256 KB |
| Q/V | 512 bit (64 × 8 bit) | 1024 | 128 KB |
| K/A | 1024 bit (64 × 16 bit) | 576 | 144 KB |
| Idx | 2 bit | 16384 (one bank) | 4 KB |

The total is 660 KB.

The prefetcher issues up to `MAXOUT` outstanding reads to HBM, one 2048-bit
word each. It expects responses in order and writes them to the selected
buffer. The HBM itself is outside the design. `tb/hbm_model.sv` and the memory
inside `tb/revit_host.sv` stand in for it, with fixed latency and in-order
data.

## Parameters

Defaults follow the published configuration where one is given:

- 64 × 64 PEs;
- 8-bit operands;
- 4 semantic groups;
- 660 KB of buffer;
- 1 GHz target. The RTL has no clock-specific logic.

`PC`, the G-PE and P-PE counts, the buffer split, `GSHIFT` and the widths are
this design's own choices.

## Where this differs from the published design

- **Array mapping.** In the published sub-array, PE `(i, j)` handles feature
  dimension `j` of patch `i`. Here a column is still one patch, but each row
  computes a different output channel, with its own weights broadcast along
  the row. The `PC` features of a slice are reduced inside each PE. This
  keeps every sum inside one PE, so delta reconstruction is one adder per PE.
- **Centroids are averaged by the host.** No hardware averaging unit is
  described, and none is built.
- **No on-chip path from A to V.** Softmax results return to the weight buffer
  through memory.
- **The SIMD vector unit only does softmax.** Layernorm and dropout are not
  built.
- **No patch packing.** Pruning stops at the mask; packing the kept patches is
  left to the host.
- **The global buffer is split statically** into the five buffers. It cannot
  be repartitioned at run time.
- **Fixed requantisation and softmax arithmetic.** Q/V, scores and
  probabilities use a shift with saturation and base-2 exponentials. The
  original numeric formats are not specified.
- **Host-driven control.** Control is a host-driven command list. The original
  control microarchitecture is not specified.

## Verification

Every unit has a self-checking testbench in `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.

- `tb_rbsp` checks results against exact products in both modes. It also
  checks that the cycle count equals the number of non-zero Booth digits + 1.
- `tb_rmmu` runs random sub-array splits and mixed raw and delta columns.
- `tb_diff_softmax` compares against a floating-point softmax over several
  blocks.
- `tb_sgg_engine`, `tb_pruner`, `tb_rsched`, `tb_pingpong_buffer` and
  `tb_prefetcher` each compare against reference models inside the testbench.

`tb_revit_top` runs the whole layer sequence above on an 8 × 8 array with
`PC = 2`:

1. hashing, checked against the reference argmax;
2. allocation, checked against the formula;
3. centroid and delta passes, with every projected value checked against
   `W·x` computed from the raw patches;
4. out-of-order global steps;
5. a two-block softmax whose second block has the larger maximum;
6. both pruners.

It counts each mechanism and fails if any never occurred: prefetch, swap,
hashing, split array, flat array, delta mode, saturation, inter-group issue,
softmax rescaling, keep and prune.

8 × 8 with `PC = 2` is the largest size simulated end to end. At the default
64 × 64 array with `PC = 4`, Verilator needs more than ten minutes just to
compile the model to C++ object code. The defaults are therefore covered by
lint and elaboration, and each unit is checked in simulation at reduced sizes.
To run the defaults anyway, instantiate `revit_top` without a parameter list
next to `revit_host #(.ROWS(64), .COLS(64), .PC(4))`, wired exactly as in
`tb_revit_top`, and allow a long build.

To simulate with plain Verilator:

    verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/revit_pkg.sv tb/tb_revit_top.sv --top-module tb_revit_top -o sim
    ./obj_dir/sim

Substitute another testbench name to run a unit test.
