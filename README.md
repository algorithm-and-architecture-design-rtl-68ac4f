# H.264/AVC in-place deblocking filter and intra-coding datapath

This RTL holds two pieces of H.264/AVC video hardware that share a 4x4-block,
four-samples-per-cycle style:

1. **An in-place deblocking filter.** It filters one macroblock at a time
   straight out of an external frame store. It uses a single 8-pixel filter
   and only 16 x 32 bits of local memory. It keeps that memory small by
   filtering the edges in an interleaved order, so a 4x4 block never waits
   for more than the edge below it. The output is bit-exact with the
   standard's edge order.
2. **The datapath of an intra-frame encoder.** It covers prediction, the
   forward and inverse 4x4 transforms, quantisation and a mode-decision cost.
   The encoder drops the plane prediction modes. It replaces the Hadamard
   SATD with a cost weighted in the DCT domain. It offers a three-step
   search that costs 6 of the 9 Intra4x4 modes. The front end of the CAVLC
   entropy coder, which finds the non-zero levels, is included.

Both parts sit side by side in `h264_top`, each with its own ports.

---

## 1. Deblocking filter

### 1.1 Why the edge order matters

The standard defines deblocking per macroblock:

- first all four vertical edges, left to right;
- then all four horizontal edges, top to bottom.

Each edge filter reads and modifies up to three pixels on each side. A
straightforward implementation therefore keeps the whole macroblock, plus its
upper and left neighbours, in local memory between the two passes.

The order used here gets the same result with far less storage. The
macroblock is taken one row of 4x4 blocks at a time. Within a row:

```
H(L|1)  H(1|2)  V(T|1)  H(2|3)  V(T|2)  H(3|4)  V(T|3)  V(T|4)
```

- `H(a|b)` filters horizontally across the vertical edge between blocks a and
  b. L is the block in the left neighbour.
- `V(T|b)` filters vertically across the horizontal edge on top of block b.
  T is the block above it: either in the previous row, or in the upper
  macroblock.

A block's top edge is filtered as soon as both of its vertical edges are
done. This is legal: the standard's order also filters every vertical edge
that touches those pixels before the horizontal one.

When block b's top edge is filtered, block b becomes the new "top" for the
next row. Only the bottom block of each column is ever waiting. That is one
row of 4x4 blocks: 4 luma blocks = 16 words of 32 bits. Chroma uses the same
order with two blocks per row.

### 1.2 Datapath (`dbf_v2`)

```
          in_data (frame store, 4 px)            out_data (frame store)
               |                                     ^
               v                                     |
   +--> [ 8-pixel edge filter ] --> q side ---> [4x4 shift reg] --+
   |        ^          |                                           |
   |        | p side   +--> finished block -> [4x4 transpose reg] -+--> SRAM 16x32 (1R/1W)
   |        |                                       ^   |               |
   +--------+---------- p/q multiplexing -----------+---+---------------+
```

The units work together as follows:

- **4x4 shift register** (`shift_reg4x4`). It carries the q-side block of
  one vertical edge over to the p side of the next, so a block is fetched
  from the frame store once.
- **4x4 transpose register** (`transpose_reg4x4`). It turns a row-major
  block into columns for its horizontal-edge filtering, and turns the result
  back into rows. It alternates its shift direction (up / left) from block to
  block. It can therefore read out one block transposed while the next block
  is shifted in, with no second register.
- **1R/1W SRAM** (`sram_1r1w`, 16 x 32). It holds the bottom block of each
  column as four column words, ready for the vertical filtering of the next
  row.
- **Edge filter** (`dbf_edge_filter`). It is combinational and handles one
  line of 8 pixels per cycle.
  - bS 1-3: the normal filter.
  - bS 4: the strong filter, or the 3-tap p0/q0 filter.
  - Chroma: the chroma rules.
- **Thresholds** (`dbf_threshold_lut`). These are the alpha, beta and tc0
  tables of the standard, indexed by the clipped average QP plus the slice
  offsets. The average is taken with the neighbour's QP on macroblock edges.

The controller is a small FSM. Its state is phase, component, block row,
block and line. A `decode()` function turns the state into the per-cycle
control word. The SRAM read address is computed from the *next* state,
because the SRAM has a one-cycle read.

### 1.3 Interface and timing

| Signal group | Meaning |
|---|---|
| `start`, `busy`, `done` | One macroblock per `start`. `done` pulses in the last cycle. |
| `bs_v[x][y]`, `bs_h[y][x]` | Luma bS of vertical edge x / horizontal edge y, per block row / column (0..4). Chroma reuses them. |
| `qp_y/qp_cb/qp_cr[3]` | QP of the current, left and upper macroblock. |
| `offset_a/b` | Slice filter offsets. |
| `in_req, in_comp, in_by, in_bx, in_row` → `in_data` | Read request for one 4-pixel row word. The data must come back **in the same cycle**. |
| `out_valid, out_comp, out_by, out_bx, out_row, out_data` | Write-back of one finished word. |

Block coordinates are relative to the macroblock:

- `by`/`bx` = 1..4 (1..2 for chroma) are its own blocks.
- `by` = 0 is the bottom block row of the upper macroblock.
- `bx` = 0 is the right block column of the left macroblock.

The frame-store controller adds the macroblock position. Every word read is
written back exactly once, because the filter works in place.

**Cycle budget.** A macroblock takes 312 cycles:

| Component | Cycles |
|---|---|
| Luma | 184 |
| Cb | 64 |
| Cr | 64 |

The design this RTL follows reaches 300 cycles with more overlap between
fetch and filtering than is described in enough detail to reproduce. A
simpler variant of this scheme needs 336 cycles and an 80 x 32 buffer.

| Frame | MB/frame | Needed clock at 30 frames/s (312 cycles/MB) |
|---|---|---|
| CIF 352x288 | 396 | 3.71 MHz |
| 2048x1024 | 8192 | 76.7 MHz |

### 1.4 Boundary strength

`dbf_bs_gen` computes the bS of one edge from the two blocks' coding
information. The rules, evaluated top-down:

| bS | Condition |
|---|---|
| 4 | Either block is intra and the edge is a macroblock edge |
| 3 | Either block is intra |
| 2 | Either block has coefficients |
| 1 | Different reference, or a motion-vector component differs by 4 or more quarter samples |
| 0 | Otherwise |

`h264_top` instantiates 32 of them, one per luma edge segment. It takes:

- per-4x4-block flags, motion vectors and reference indices of the current
  macroblock;
- the same for the adjoining column of the left macroblock and the adjoining
  row of the upper macroblock.

`filter_left` / `filter_top` force bS 0 on picture or slice borders.

---

## 2. Intra-coding datapath

### 2.1 Flow through `h264_top`

```
source buffer (96x32) --> residual = src - pred --> forward 4x4 transform --+--> mode decision (cost, best mode)
        ^                        ^                  (DCT or Hadamard)       |
   src_we/src_raddr      intra predictor gen.                               +--> Q --> coefficient buffer (2 x 104x64)
                         (4 px / cycle)                                      |      (AC part + DC part, ping-pong)
                                                                             +--> IQ --> inverse transform --> rec_*
                                                                                              |
                                                 prediction, delayed 9 cycles --> reconstruction --> recon_*, bnd_*
three-step Intra4x4 selector (request / cost ports)
```

A controller outside the top runs the schedule. It chooses the class, mode,
block and QP, and writes the source macroblock. It stores the boundary
samples in its boundary buffer and feeds them back as neighbour pixels. All
of its control points are ports.

**Orientation.** Words move through the path in a fixed order:

1. The source buffer holds each 4x4 block as four **column** words (pixel k
   of a word = row k).
2. The predictor is asked for columns, so the residual enters the forward
   transform column by column.
3. The forward transform therefore returns coefficient **rows**.
4. Those rows go through Q/IQ into the inverse transform, whose first pass is
   then horizontal. This matches the standard's inverse transform bit for
   bit.
5. The reconstructed residual leaves as columns again, scaled by 64 before
   the final `(x+32)>>6`.

**Timing.**

- The source buffer has a one-cycle read, so `src_raddr` is presented one
  cycle before the matching `res_valid` / `pred_*`.
- Mode number, mode cost and blocks-per-mode are tagged onto a block when it
  enters the transform. They reach the cost unit when the block leaves, one
  block later.
- Quantised levels are written to the coefficient buffer at `coef_waddr`,
  one cycle after the transform output (the Q/IQ register).

### 2.2 Units

**Predictor** (`intra_pred_gen`, combinational).

- Modes supported:
  - Intra4x4: all nine modes.
  - Intra16x16: vertical, horizontal and DC.
  - Chroma: DC, horizontal and vertical.
- Plane modes report `mode_ok = 0`.
- Every predicted sample is one of: a neighbour, `(A+B+1)>>1`,
  `(A+2B+C+2)>>2`, or a DC average. The predictor therefore computes all
  pair sums of the 13 Intra4x4 neighbours once. For each of the four output
  positions it selects one result with a per-mode index formula.
- Output: one row or one column of a 4x4 block per call.

**Transform** (`transform4x4`).

- Two 1-D butterflies (8 additions each) around the alternating transpose
  register. The forward DCT and the Hadamard share one butterfly; the
  inverse DCT and the Hadamard share the other.
- Rate: one 4-coefficient word per cycle, blocks back to back, one block per
  4 cycles. The first output word comes the cycle after the last input word.
- The four words of a block must arrive consecutively; an assertion checks
  this. `in_ready` drops only in the one gap where a new block would collide
  with a read-out in progress.
- **Chroma 2x2 DC transform.** Put the four chroma DC values at (0,0),
  (0,1), (1,0) and (1,1) of a 4x4 block and send it through the Hadamard
  with `fwd_direct`. The 2x2 results come out at (0,0), (0,2), (2,0) and
  (2,2).

**DC registers** (`dc_register`, one at each transform).

In Intra16x16 the sixteen block DCs go through a second 4x4 Hadamard. The
inverse DCT of the AC blocks needs the result of that pass. Two small
16-entry registers avoid holding all 256 AC coefficients of the macroblock
while that happens:

1. **Forward pass** (`fwd_dc_cap`). Send the sixteen blocks of the chosen
   Intra16x16 mode through the DCT in raster order. The forward register
   keeps each block's (0,0) coefficient at entry `4*row + col`.
2. **DC pass** (`fwd_direct` + `fwd_dc_sel`, `hadamard`, `q_dc`,
   `inv_hadamard`, `inv_dc_load`). The DC block is read out of the forward
   register as column words and goes through the Hadamard, DC Q/IQ and
   inverse Hadamard. Its output is loaded into the inverse register with the
   standard's DC scaling `(x+2)>>>2`.
3. **AC pass** (`inv_dc_sub`). The sixteen blocks run through the DCT and
   Q/IQ again. The inverse DCT takes each block's (0,0) input from the
   inverse register.

The reconstructed residual is then bit-exact with the standard's
Intra16x16 decoding. The 2x2 chroma DC case uses the same path with four
entries (see above).

**Q/IQ** (`quant_unit`).

- `level = sign(M) * ((|M| * quant_coef + qp_const) >> (15 + QP/6))`
- `qp_const = 2^q_bits / 3` (intra rounding).
- `dequant = level * dequant_coef << QP/6`
- The coefficient factors are taken from small tables indexed by QP mod 6
  and the position class (both indices even / both odd / mixed).
- DC coefficients use one more shift and twice the rounding constant.
- Zero inputs bypass the multipliers to save power.
- Results are registered one cycle after the input.

**Cost and mode decision** (`mode_decision`).

```
cost = mode_cost + sum over blocks ( sum_ij w_ij * |F_ij| ) >> 5
w = 32 (both indices even), 20 (both odd), 25 (mixed)
```

- F is the *DCT* of the residual, the same transform the encoder uses. The
  weights approximate the inverse-quantiser scaling, so the cost tracks the
  coded energy better than a Hadamard SATD would.
- The multiplications are shifts and adds.
- A mode may span 1, 4 or 16 blocks.
- A strictly smaller cost replaces the best, so among equal costs the
  earlier mode wins.

**Three-step Intra4x4 selector** (`fast_i4_mode_sel`).

| Step | Modes costed |
|---|---|
| 1 | Vertical (0), horizontal (1), DC (2) |
| 2 | The two 22.5° neighbours of the cheaper of vertical and horizontal: 5 and 7 next to vertical, or 6 and 8 next to horizontal |
| 3 | The remaining diagonal next to the cheaper step-2 mode: 4 after 5 or 6, 3 after 7 or 8 |

- The result is the cheapest of the six modes costed.
- The selector asks for costs through `sel_req_valid/sel_req_mode` and waits
  for `sel_cost_valid/sel_cost`. The controller runs each requested mode
  through the datapath; the top testbench does exactly that.
- Ties go to vertical in step 1, and to the mode costed first elsewhere.

**Memories.**

- Source buffer: `sram_sp`, 96 x 32 bits: 64 luma words + 2 x 16 chroma
  words.
- Coefficient buffer: `coef_pingpong_buf`, two banks of 104 x 64 bits.
  - Each bank holds 96 AC words (24 blocks x 4 lines of four 16-bit levels)
    and 8 DC words. The DC words let the Intra16x16 DC levels be rewritten
    alone when that mode wins.
  - The coding loop writes one bank while the entropy coder reads the other.
  - `coef_swap` exchanges the banks.

**Reconstruction** (`boundary_recon`).

- Per column of the inverse-transform output it computes
  `clip(0, 255, pred + ((res + 32) >> 6))` for four pixels. The output is
  registered, one cycle later (`recon_*`).
- It keeps column 3 of each block (`bnd_right`: the left neighbours of the
  next block) and row 3 (`bnd_bottom`: the upper neighbours of the block
  below). `bnd_valid` pulses when both are complete.
- In the top, the prediction reaches it through a 9-stage shift register.
  A column leaves the inverse transform exactly 9 cycles after it entered
  the forward transform: 4 cycles in, 1 in the Q/IQ register, 4 in again.
  That holds because a block's four words never stall.

**CAVLC scanning phase** (`cavlc_scan`).

- It sits on the entropy-coder side of the coefficient buffer. A word read
  with `ec_re` and `ec_scan` arrives one cycle later as line `ec_raddr[1:0]`
  of its block.
- The four rows of a block are written into a 16-entry register in zigzag
  order. The last row must be row 3.
- A mask of non-zero entries and two priority encoders ("find leading one")
  then emit the non-zero levels from high to low frequency, one per cycle.
  Zeros take no cycles.
- Each level comes with `run_before` and `zeros_left`. The block comes with
  TotalCoeff, TrailingOnes (at most 3) and TotalZeros: the values the
  encoding phase's code tables are indexed by.
- `scan_ready` is low while a block is being scanned.

---

## 3. What is not here

| Missing part | What the top provides instead |
|---|---|
| The intra coder's macroblock controller and its pipelined schedule (about 1086 cycles per macroblock; 117 MHz for 720p at 30 frames/s) | Its control points are the top's intra ports |
| The boundary-pixel buffer that holds the reconstructed neighbours of the macroblock | `bnd_*` / `recon_*` outputs; neighbour pixels are inputs |
| CAVLC encoding phase (coeff_token, level, total_zeros and run_before code tables, bit packer) and the UVLC coder of the mode information | The scanning phase's outputs `scan_*` |
| The 80 x 32, 336-cycle variant of the deblocking filter | — |

## 4. Departures and choices worth knowing

- **Deblocking cycle count.** Deblocking takes 312 cycles per macroblock, not
  300 (see 1.3). The output is bit-exact either way.
- **Source buffer layout.** The source buffer holds column words, not row
  words, so that the inverse transform is bit-exact (see 2.1).
- **Frame-store read timing.** The frame-store read returns data in the same
  cycle. A registered memory needs one word of look-ahead in the address
  generation.
- **Cost normalisation.** The weighted cost is normalised per 4x4 block
  (`>>5`). The mode cost is supplied by the controller.
- **Transform widths.** The transforms work on 16-bit inputs with 20-bit
  internal / output values. The inverse transform takes the low 16 bits of
  each dequantised value.
- **Tables from the standard.** The alpha/beta/tc0 tables, the bS rules, the
  prediction equations and the quantiser tables are those of the H.264/AVC
  standard.
- **Intra16x16 DC scaling.** The standard's final DC scaling `(x+2)>>>2` is
  applied where the inverse DC register is loaded. The quantiser's DC
  dequantisation leaves it out. The forward DC register expects the sixteen
  blocks in raster order.
- **Reconstruction alignment.** The prediction is re-timed by a fixed
  9-cycle delay rather than stored per block. That relies on the transform
  never stalling inside a block.
- **Reset.** All registers reset asynchronously (`rst_n` low). Memories are
  not reset.

## 5. Verification

Every block has a self-checking testbench in `tb/`. Each one:

- compares the block against models written independently from the
  standard's equations (`tb/dbf_ref_pkg.sv`, `tb/intra_ref_pkg.sv`);
- checks cycle counts;
- ends with a `TB_RESULT checks=N failures=M` line;
- has a watchdog.

| Testbench | What it shows |
|---|---|
| `tb_dbf_v2` | 3x3-macroblock frames, 2 frames: pixel-exact against the standard-order reference; 312 cycles per macroblock; every word read once and written once; strong, 3-tap, normal, chroma and no-filter cases all occur |
| `tb_dbf_edge_filter`, `tb_dbf_threshold_lut`, `tb_dbf_bs_gen` | Random lines, every table index, random block pairs |
| `tb_shift_reg4x4`, `tb_transpose_reg4x4`, `tb_sram_1r1w`, `tb_sram_sp`, `tb_coef_pingpong_buf` | Streams against models; read latency; old data on read-during-write; bank swapping |
| `tb_intra_pred_gen` | Every mode, line, orientation and availability against the standard's formulas; plane modes rejected |
| `tb_transform4x4` | Forward and inverse instances against the matrix definitions; latency; 32 blocks in 128 cycles |
| `tb_dc_register` | Random entry and column writes, collisions, both read ports, reset |
| `tb_boundary_recon` | Random residuals that clip at both ends, every pixel, one-cycle latency, both boundaries, gaps |
| `tb_quant_unit`, `tb_mode_decision`, `tb_fast_i4_mode_sel` | All QPs, AC and DC; weighted cost and tie rule; request sequence, choice and 13-cycle block time |
| `tb_cavlc_scan` | Empty, sparse, +-1 and dense blocks: statistics, level order, run_before / zeros_left, one cycle per level |
| `tb_h264_top` | End to end at default parameters. **Deblocking:** 6 macroblocks with random coding information, boundary strengths derived by the testbench. **Intra:** full 9-mode search and three-step search of four blocks through the real datapath, Intra16x16, a coding pass with coefficient-buffer write and reconstruction (residual, pixels and boundary samples), a Hadamard DC pass, bank swap, entropy-side read and CAVLC scan of the stored block, and a whole Intra16x16 macroblock through both DC registers (16 blocks reconstructed bit-exact). It counts every mechanism (each bS value, each filter kind, DCT and Hadamard, best-mode replacement, both selector branches and diagonals, swap, scanned levels, DC-register blocks) and fails if one never happens |

To run one testbench with Verilator, list the packages first:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dbf_pkg.sv rtl/intra_pkg.sv tb/dbf_ref_pkg.sv tb/intra_ref_pkg.sv \
  rtl/*.sv tb/tb_h264_top.sv --top-module tb_h264_top -Mdir obj -o sim
./obj/sim
```

For the other testbenches, replace the last file and the top module.

## 6. Size

Coarse synthesis with Yosys gives these sizes. A cell is a word-level
operator.

| Module | Cells | FF bits | Memory bits |
|---|---|---|---|
| `dbf_v2` | 549 | 270 | 512 |
| `intra_pred_gen` | 361 | 0 | 0 |
| `transform4x4` | 69 | 327 | 0 |
| `quant_unit` | 81 | 145 | 2432 (coefficient tables) |
| `cavlc_scan` | 395 | 289 | 0 |
| `dc_register` | 139 | 256 | 0 |
| `boundary_recon` | 49 | 100 | 0 |
| `h264_top` | 3082 | 2589 | 19328 |
