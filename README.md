# Custom vector instructions for MB-LBP face detection

This RTL implements the two custom vector instructions that speed up a
boosted-cascade face detector. The detector runs mostly as software on a soft
vector processor. Two inner loops dominate its run time, and each becomes one
instruction:

* **LBP table lookup** (`lbp_lut_cvi`). Evaluates two cascade features in
  every byte lane and returns their summed 8-bit score.
* **LBP pattern computation** (`lbp_pattern_cvi`). Streams an image stripe
  row by row and returns the 8-bit multi-block local binary pattern (MB-LBP)
  of every pixel position, for one block size at a time (1x1, 2x2 or 4x4).

`lbp_cvi_top` puts both behind one custom-instruction port. That is the
boundary to the vector engine. The engine itself is not part of this RTL: its
lanes, scratchpad, DMA, masking and wavefront skipping, and the host processor
that issues instructions.

## How the detector uses the instructions

A search window slides over every position of every level of an image pyramid.
At each position, the cascade runs stages in order. Each stage is a handful of
features, and each feature gives one of two scores:

1. The feature's MB-LBP pattern is taken at the feature's offset in the
   window. The pattern compares the pixel sum of a centre block with the sums
   of its eight neighbour blocks.
2. The pattern indexes a 256-entry, 1-bit table. The bit selects the
   feature's PASS or FAIL score.
3. The scores of the stage are added. A stage total below zero rejects the
   position ("early exit"). A position that passes every stage is a detection.

Two restrictions make this fit a vector machine:

* **Block sizes.** The cascade is trained with square blocks of 1, 2 or 4
  pixels only. A pattern then depends only on position and block size, not on
  the feature. So all patterns can be computed once per image, as three
  byte arrays, and each feature becomes a lookup into one of them at an
  offset.
* **8-bit scores.** PASS and FAIL scores are signed 8-bit integers, and the
  stage threshold is 0. The scores are chosen offline, for example by an
  integer solver. For every pass/fail combination of a stage's features, the
  sum must fall in [0, 127] when the original classifier passes the stage,
  and in [-128, -1] when it fails. Stage totals then never overflow 8 bits,
  so the hardware adds bytes and ignores carries.

Software vectorises across a row of window positions: one byte lane per
position. The inner loop per stage is:

```
pulse stage_start with the stage number      // feature counter -> stage's first row
for each feature pair (f, f+1) of the stage:
    t = LUT(patterns[f.size] at f's offset,     // operand A
            patterns[f+1.size] at f+1's offset) // operand B, masked by live positions
    total += t                                   // ordinary 8-bit vector add
    end of instruction -> instr_end               // counter -> next row
live &= (total >= 0)
```

Positions that exit early are masked off. When a whole wavefront (one row of
positions) is dead, the engine's wavefront skipping does not issue it.

## The table-lookup instruction (`lbp_lut_cvi`)

### Feature memory

Every byte lane evaluates the same feature pair in the same clock, so the
tables are not replicated per lane. One shared memory (`lut_feature_mem`)
holds one feature pair per 544-bit row:

| bits      | field            |
|-----------|------------------|
| 543..288  | feature B table (bit p = pattern p passes) |
| 287..280  | feature B PASS   |
| 279..272  | feature B FAIL   |
| 271..16   | feature A table  |
| 15..8     | feature A PASS   |
| 7..0      | feature A FAIL   |

(`lbp_cvi_pkg::lut_row_t`.) A stage with an odd number of features pads its
last row with a feature whose PASS and FAIL are both 0. The target cascade
has 12 stages and 98 features, eight stages with an odd count. It therefore
needs (98 + 8) / 2 = 53 rows, which is the default `LUT_ROWS`.

### Feature counter

Software never sends a memory address with a lookup. A small stage table
holds the first row of each stage:

* `stage_start` with `stage_num` loads the counter from the stage table.
* `instr_end` advances the counter by one row.

Back-to-back lookup instructions therefore step through the stage's feature
pairs. `instr_end` is a separate strobe, not a flag on a wavefront. An
instruction whose wavefronts were all skipped still advances the counter.

The memory is read every clock at the counter's *next* value. The row
register always holds the row the counter points at, with no bubble between
instructions.

### Lane datapath (`lut_lane`)

There are 4·`LANES` byte lanes: 64 for 16 lanes, so 128 lookups per clock.
Each lane works in two register stages:

1. Look up bit `pat_a` of table A and bit `pat_b` of table B. Select PASS or
   FAIL for each feature.
2. Add the two scores modulo 256.

Masked lanes are computed anyway, but their byte enable is low.

### Timing

* One wavefront per clock, no stall.
* A result appears exactly 2 clocks after its wavefront.
* `stage_start` must come at least one clock before the stage's first
  wavefront.
* `instr_end` may come with the last wavefront or in any later clock. The
  next instruction may start in the following clock.
* Configuration writes (`cfg_row_*`, `cfg_stage_*`) take one clock each. A
  row written in clock t is used by wavefronts from clock t+2 on.

## The LBP pattern instruction (`lbp_pattern_cvi`)

This is the less obvious of the two. An MB-LBP pattern with 4x4 blocks
depends on 144 pixels, but a vector instruction has two operands and one
result. The instruction gets around this by keeping state.

### Stripes and halo

The image is processed in vertical stripes exactly one wavefront wide
(W = 4·`LANES` pixels). Each wavefront is one row of a stripe, given twice:

* operand A starts `HALO` = 8 pixels left of the stripe;
* operand B starts 8 pixels right of the stripe's left edge.

A[0..W-1] followed by B[W-16..W-1] is the *extended row*: W + 16 pixels,
with 8 extra pixels on each side of the stripe. In memory, both operands are
just the same packed row read at two offsets.

Software runs three passes over a stripe: 1x1, 2x2, then 4x4. `in_first`
marks the first row of each pass. Then it moves to the next stripe.

### Stage 1: block sums (`lbp_block_sum`)

For block size s:

1. A column sum adds the incoming row to the previous s-1 rows. The last
   three extended rows are stored.
2. A block sum adds s adjacent column sums.

`out_sum[i]` is the sum of the s x s block whose top-left pixel is extended
column i, in the row s-1 above the incoming one. Sums are 12 bits, since
16 · 255 = 4080. Rows before `in_first` read as zero. So do columns past the
right end of the extended row, which no output ever uses.

### Stage 2: comparison (`lbp_compare`)

The stage keeps the last 8 block-sum rows. For the incoming block-sum row:

* it is the bottom row of the 3x3 window;
* the row from s rows ago is the centre row;
* the row from 2s rows ago is the top row.

For output column x, the centre block sits at extended column 8 + x and its
neighbours at ±s columns. Each bit is 1 when the neighbour's sum is greater
than or equal to the centre's. Comparing sums is the same as comparing
averages, because all nine blocks have the same size.

Bit order, as in OpenCV's MB-LBP:

| bit | 7 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|-----|---|---|---|---|---|---|---|---|
| block | top-left | top | top-right | right | bottom-right | bottom | bottom-left | left |

### Where the patterns land

The pattern produced when stripe row r enters belongs to the window whose
centre block has its top-left pixel at (stripe column x, row r - 2s + 1).
Software offsets its destination pointer by 2s - 1 rows.

The first 2s - 1 outputs of a pass are partial and must be discarded. They
are computed with zeros above the top row. The latency is 2 clocks, at one
row per clock. Left and right halos of 8 cover the worst case: 4 pixels left
and 7 right for s = 4.

## The unit (`lbp_cvi_top`)

| port | dir | meaning |
|------|-----|---------|
| `cvi_valid`, `cvi_op` | in | wavefront present; `OP_LUT` (0) or `OP_LBP` (1) |
| `cvi_a`, `cvi_b` | in | operands, 4·`LANES` bytes each |
| `cvi_mask` | in | byte mask, returned as `res_byteen` |
| `cvi_first`, `cvi_mode` | in | pattern pass start and block size (`BLK_1X1/2X2/4X4`) |
| `lut_stage_start`, `lut_stage_num`, `lut_instr_end` | in | feature counter control |
| `cfg_row_we/addr/data` | in | write one 544-bit feature-pair row |
| `cfg_stage_we/idx/base` | in | write one stage-table entry |
| `res_valid`, `res_data`, `res_byteen` | out | result wavefront, 2 clocks after issue |

Both units have the same 2-clock latency, so results leave in issue order.

Parameters, with defaults matching the 16-lane configuration:

* `LANES` = 16 (32-bit lanes);
* `LUT_ROWS` = 53;
* `MAX_STAGES` = 12.

`HALO` (default 8) is a parameter of the pattern unit. It must be at least
4, the largest block size, and at most 2·`LANES`.

Assertions (enabled with `--assert`) check three usage rules:

* no lookup wavefront arrives in the same clock as `lut_stage_start`;
* the block size does not change within a pattern pass;
* the two units never deliver a result in the same clock.

## What follows the source design and what is this RTL's own choice

**Follows the source design:**

* dual lookup per byte lane with PASS/FAIL selection and an 8-bit add;
* one shared 544-bit-wide memory of 53 feature-pair rows;
* an automatically advancing feature counter that starts at a per-stage
  address;
* a stateful, row-at-a-time pattern pipeline on stripes one wavefront wide,
  fed with two overlapping operands;
* two pattern stages (add rows and columns, then compare centre and
  neighbours at a stride of s);
* three block-size modes.

**This RTL's own choices:**

* the engine-side port: opcode bit, explicit `stage_start`/`instr_end`
  strobes, byte mask;
* the stage-start table;
* the `cfg_*` write ports. The original loads the memory with a separate
  custom instruction whose format is not known; the write ports stand in
  for it;
* the row field layout;
* a table bit of 1 means PASS;
* the LBP bit order and the ≥ comparison;
* the halo of 8 pixels per side;
* the output row convention and the zero fill above a pass;
* both pipelines at 2 clocks;
* reset is synchronous and active low. It clears control state, the
  stage table and the row histories, but not the feature memory.

**Outside this RTL:**

* the vector engine, with its scratchpad, DMA, masking and wavefront
  skipping;
* the host processor;
* the HDMI video path;
* the software steps that are not custom instructions: colour-to-grey
  conversion, pyramid downscaling, the vector adds and merging of
  detections.

**Capacity:**

* A cascade with more than 12 stages or 53 feature pairs needs larger
  `MAX_STAGES`/`LUT_ROWS`.
* A cascade with block sizes other than 1, 2 and 4 cannot use the pattern
  instruction.
* Image size is not limited by this unit: any number of rows, and stripes of
  64 columns at 16 lanes.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb/lbp_ref_pkg.sv` is the reference model. It holds an image and computes
block sums, MB-LBP patterns and feature scores straight from the pixels, with
the same zero-fill rules as the hardware.

| testbench | what it checks |
|-----------|----------------|
| `tb_lut_feature_mem` | all 53 rows, one-clock read latency, read-before-write on one row |
| `tb_lut_lane` | 2000 random feature pairs and patterns, 2-clock latency |
| `tb_lbp_lut_cvi` | random 12-stage cascade; stages in shuffled order; 0–4 wavefronts per instruction; `instr_end` with or after the last wavefront; masks; exact 2-clock latency |
| `tb_lbp_block_sum` | every block sum of every row, three block sizes, idle clocks between rows |
| `tb_lbp_compare` | every pattern from reference block sums; each pattern bit must occur |
| `tb_lbp_pattern_cvi` | three stripes × three block sizes, every pattern, 2-clock latency |
| `tb_lbp_cvi_top` | end to end at the default size (see below) |
| `tb_lbp_cvi_lanes` | the same end-to-end test on 4- and 8-lane units |
| `tb_lbp_workload_qvga` | a full dense scan of a 320x240 image pyramid (see below) |

`tb_lbp_cvi_top` does the whole detection at the default parameters. Its
stimulus and checker are in `tb/lbp_e2e_bench.sv`, which `tb_lbp_cvi_lanes`
reuses at 4 and 8 lanes. The test has four steps:

1. It computes the three pattern arrays of a random 40-row stripe through
   the pattern instruction.
2. It loads a random 12-stage, 98-feature cascade into exactly 53 rows.
3. It classifies every 12x12 window position with lookup instructions,
   software-style vector adds and early exit, skipping dead wavefronts.
4. It compares the surviving positions with a detector computed directly
   from the pixels.

It runs the classification twice. The first run covers all positions, so
there are detections. The second covers three positions that the reference
rejects within the first six stages. After they die, the later lookup
instructions have no wavefront at all. The test counts these mechanisms
and fails if any never occurs: each block size, masked bytes, skipped
wavefronts, empty instructions, both ways of ending an instruction, early
exits and detections.

`tb_lbp_workload_qvga` runs the full detection workload on the default-size
unit:

* a random 320x240 image and its 25-level pyramid, scale factor 1.1, made by
  bilinear interpolation (a software step);
* a 24x24 window at stride 1;
* a random 12-stage, 98-feature cascade.

Each level is cut into 64-column stripes, with zero pixels past the image
edges. Every pattern and every detection is checked against the reference.
For the whole pyramid the unit spends:

* 23,807 clocks in pattern instructions;
* 312,274 clocks in lookup instructions (310,349 wavefronts issued, 4,789
  skipped).

At 166 MHz that is about 2 ms. These counts cover only the custom
instructions. The vector adds, stage tests and DMA are extra. A random
cascade also rejects windows far later than a trained face cascade does, so
a real image costs fewer lookup wavefronts.

To run a testbench with Verilator 5, list the two packages and the testbench.
Verilator finds the other modules through `-y`:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/lbp_cvi_pkg.sv tb/lbp_ref_pkg.sv tb/tb_lbp_cvi_top.sv \
  --top-module tb_lbp_cvi_top -Mdir obj && ./obj/Vtb_lbp_cvi_top
```

Replace the testbench file and the top name to run another one. The pyramid
workload takes about half a minute. The others take a few seconds.

**Not verified:**

* other `LANES` values in the block testbenches, which use the default of
  16. The whole unit is tested end to end at 4, 8 and 16 lanes;
* timing closure on an FPGA;
* a cascade trained on real faces. The tests use random cascades whose
  scores respect the 8-bit bound.
