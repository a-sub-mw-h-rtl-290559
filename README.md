# H.264 baseline-profile motion estimation core with a SIMD/systolic-array datapath

This is a motion estimation (ME) engine for H.264 baseline-profile encoders in
portable devices. It is built to use little power, so it aims for the fewest
cycles per macroblock at the lowest clock. It finds the motion vectors of all
seven H.264 block modes (16x16 down to 4x4) to quarter-pixel accuracy.

It does this with two engines that run as a macroblock pipeline:

- **IME, the integer-pel engine.** It runs a low-branch search called the
  one-dimensional diamond search (1D-DS). The search is done only for the four
  16x8 / 8x16 halves of the macroblock. A 16x16 vector is then chosen among
  eight candidates built from those four results. This is the *fast search for
  large blocks*, FSLB.
- **SME, the sub-pel engine.** It runs a 35-point quarter-pel full search
  around the IME's vectors. It reuses every 4x4 SATD for the smaller
  partitions. This is the *fast search for small blocks*, FSSB.

The two engines share two three-port SRAMs:

- **TBRAM** holds the current macroblocks (the template).
- **SWRAM** holds the reference search windows.

The IME's datapath switches between two modes:

- A 16-way **SIMD** mode. It is fast, but it uses both SRAM read ports.
- A two-stage **systolic array (SA)** mode. It is slower, but it uses only
  read ports #0.

So while the IME is in SA mode, the SME can use read ports #1 and run at the
same time.

Everything is SystemVerilog in `rtl/`. A self-checking testbench for each
block is in `tb/`.

## Block map

```
             CPU bus (32b)   memory bus (64b)
                  |                |
               +--------------------+
               |      me_ctrl       |  registers, pixel writes, MB pipeline
               +--------------------+
                  |  write port    |
         +--------+----+     +-----+--------+
         | TBRAM 16x56 |     | SWRAM 80x256 |   me_sram, spiral mapped
         +-------------+     +--------------+
        port #0 |  port #1 |   port #0 |  port #1 |
                |          +-----+-----+----------+
                |                |     |          |
            +---v----------------v-----v+     +---v------------------+
            | ime: IPU0, MUX, IPU1, acc  |     | sme: SPG -> PU -> MCG |
            |      1D-DS, FSLB control   |     |      FSSB update      |
            +---------------------------+     +----------------------+
```

| File | Block |
|---|---|
| `me_pkg.sv` | Types: pixel, 8-pixel line, vectors, read request. Partition numbering, Exp-Golomb length. |
| `me_sram.sv` | Three-port spiral-mapped SRAM, used for both TBRAM and SWRAM. |
| `ipu.sv` | Integer processing unit: REG_TB and REG_SW, 8-way SAD, 11-bit result. |
| `ime.sv` | Integer engine: two IPUs, the SIMD/SA MUX, accumulator and search control. |
| `spg.sv` | Sub-pel generator: window registers, six-tap half-pel planes, quarter-pel blender. |
| `hdm.sv`, `spe.sv`, `pu.sv` | 4-point Hadamard unit, 4x4 SATD element, and four SPEs (a 64-way SIMD). |
| `mcg.sv` | Motion cost generator. |
| `sme.sv` | Sub-pel engine: loads, point sequencing, FSSB partition update. |
| `me_ctrl.sv` | Controller between the host buses and the core. |
| `me_top.sv` | Top level with read-port switching. |

## The integer search (IME)

### Search flow

One IME run per macroblock has three phases.

1. **Initial vector search (SIMD).** Seven candidates are matched as 16x16
   blocks:
   - the predicted vector (PMV), in register 0x02;
   - six more supplied by the host, for example zero, co-located and neighbours.

   Each 16x16 match takes 16 rows. From the row halves (top/bottom) and the
   IPU halves (left/right) of the same match, it gives four SADs at once: A
   (top 16x8), B (bottom 16x8), C (left 8x16) and D (right 8x16). Each of the
   four blocks keeps its own best candidate as its initial vector.
2. **1D-DS for A, B, C and D (SA).** For each block:
   - The four diamond neighbours of the initial vector are matched. This is
     done as one horizontal and one vertical 3-point systolic pass; the centre
     point of each pass is wasted.
   - The best neighbour gives the search direction.
   - Eight points along that direction are matched in one 8-point systolic
     pass, starting at the initial vector.
   - If the best of the eight is not the initial vector, the diamond step and
     the line search repeat once from the new point. There are at most two
     rounds.

   Vectors are clipped to ±SR (SR = 27).
3. **FSLB Mode-1 search (SIMD).** Eight candidates are matched as 16x16 blocks:
   - PMV;
   - MV_A, MV_B, MV_C and MV_D;
   - (A+B)/2, (C+D)/2 and (A+B+C+D)/4, using floor division.

   The best one is MV_Mode1.

All decisions use SAD alone.

### The SIMD/SA datapath

Each IPU holds one 8-pixel template line and one 8-pixel reference line, and
outputs their SAD (11 bits). IPU 0 always takes its lines from read ports #0.
A MUX picks IPU 1's source:

- **SIMD mode:** IPU 1 reads from read ports #1. The two IPUs then cover a
  16-pixel row per cycle.
- **SA mode:** IPU 1 takes IPU 0's registers from the previous cycle.

### The systolic schedule

The systolic schedule is the key to the SA mode and the hardest part of
`ime.sv`. A P-point line search matches a block at P successive reference
positions. The template has lines TB[0], TB[1], and so on. The reference lines
are SW[0], SW[1], and so on, where SW[k] is the line k positions further along
the search direction.

Template lines are taken in pairs (2g, 2g+1). Each pair gets:

- **Cycle 0 (idle).** IPU 0 loads TB[2g] and SW[2g].
- **Cycle c = 1..P.** IPU 0 loads SW[2g+c], and TB[2g+1] at c = 1 (it then
  holds that template line). At the same time, IPU 1 takes IPU 0's previous
  contents (TB[2g] and SW[2g+c-1]).

So in cycle c:

- IPU 0 holds TB[2g+1] against SW[2g+c];
- IPU 1 holds TB[2g] against SW[2g+c-1];
- their sum is the partial SAD of search point c-1 over two template lines.

Partial sums go into one accumulator per point.

A pass over 16 template lines therefore costs 8(P+1) cycles, plus 3 cycles of
pipeline: the SRAM read, the IPU registers and the accumulator. With 16-pixel
lines (16x8 blocks searched vertically), each line is split into two 8-pixel
slices, and each slice is a separate pass over the same accumulators.

Each reference line is read once per pair of template lines, not once per
point. Each template line is read once. This is what lets SA mode leave read
ports #1 free.

A SIMD 16x16 match costs 16 cycles plus 3 of pipeline.

`tb_ime` checks the cycle count of a whole IME run against this formula.

### Spiral-mapped SRAM

The 1D search needs both **row** lines (horizontal search) and **column** lines
(vertical search) of eight pixels, one per cycle per port. `me_sram` provides
both:

- It has eight column blocks, each with its own word-line selector.
- Pixel (x, y) is stored in column block (x+y) mod 8, word y·W/8 + x/8.

Eight successive pixels of any row, or of any column, therefore land in eight
different blocks and can be read together. Each block computes its own word
address from the request (x, y, vertical flag). A barrel shifter then rotates
the eight outputs by (x+y) mod 8 back into picture order.

Timing:

- Reads are synchronous, with one cycle of latency.
- The write port takes one 64-bit memory-bus word, which is eight successive
  pixels of a row.

Sizes:

| RAM | Geometry | Size | Contents |
|---|---|---|---|
| SWRAM | 80x256 | 160 Kbit | Three 80x80 windows, ±32 around a macroblock; two are used by the pipeline. |
| TBRAM | 16x56 | 7 Kbit | Templates. |

## The sub-pel search (SME)

### 35-point full search with FSSB

Around a centre vector, the SME evaluates the 35 quarter-pel points with:

- horizontal offset −2..2 quarter pixels;
- vertical offset −3..3 quarter pixels.

That is ±0.5 by ±0.75 pixel.

There are five centres, in this order:

| Centre | 4x4 blocks matched |
|---|---|
| MV_Mode1 | all sixteen |
| MV_A | top half (8x8 quadrants E, F) |
| MV_B | bottom half (G, H) |
| MV_C | left half (E, G) |
| MV_D | right half (F, H) |

At each point the PU gives the SATDs of the 4x4 blocks, four per cycle. The
SME then updates a table of 41 partitions:

- the search's own Mode 1/2/3 partition;
- every Mode 4-7 partition (8x8, 8x4, 4x8, 4x4) inside the matched blocks. Each
  partition's SATD is the sum of its 4x4 SATDs.

A partition keeps the point with the least cost. The cost is SATD plus
λ·(bits of the vector difference) from the MCG.

Because of this reuse, seven modes come out of five searches without any
separate small-block search. The Mode-1 search alone updates 1 + 4 + 8 + 8 + 16
partitions. Partitions are numbered as follows:

| Partitions | Mode |
|---|---|
| 0 | Mode 1 (16x16) |
| 1-2 | Mode 2 (16x8, top/bottom) |
| 3-4 | Mode 3 (8x16, left/right) |
| 5-8 | Mode 4 (8x8) |
| 9-16 | Mode 5 (8x4) |
| 17-24 | Mode 6 (4x8) |
| 25-40 | Mode 7 (4x4) |

**Skipping duplicate centres.** When one of MV_A..MV_D equals MV_Mode1, its
own search is skipped. Its Mode 2/3 partition is then updated from the Mode-1
search at the same points, so no work is repeated.

### SPG, PU and MCG

**SPG (sub-pel generator).** It holds a 24x24 window of integer pixels: the
16x16 block plus a 3-pixel margin on the left and top, and a 5-pixel margin on
the right and bottom.

- The window is loaded through read port #1 of SWRAM, eight pixels per cycle,
  72 reads.
- In 18 cycles it then computes three half-pel planes with the H.264 six-tap
  filter (1, −5, 20, 20, −5, 1): horizontal, vertical and centre. The centre
  plane is filtered from the unrounded horizontal intermediates.
- A two-tap rounding average, the quarter-pel blender, gives any four 4x4
  blocks at any of the 35 offsets. That is 64 pixels per cycle.

**PU (processing unit).** It has four SPEs. Each SPE works like this:

- it subtracts the 4x4 original from the 4x4 interpolated block;
- a row of four Hadamard units (HDM) transforms the rows;
- a transposing cross-wiring feeds a second row of four HDMs, which transforms
  the columns;
- an absolute-value adder tree sums the 16 coefficients.

The SATD is not halved.

**MCG (motion cost generator).** It computes λ × (signed Exp-Golomb length of
dx + length of dy). The difference is taken against the predicted vector, in
quarter pel.

### SME cycle count

Each centre costs:

- 72 window reads, with the template read in parallel the first time;
- 1 start cycle and 20 cycles for the half-pel planes;
- 35 points × (number of 4x4 groups) PU cycles, plus a two-cycle drain and
  update.

## Read-port switching and the macroblock pipeline

In `me_top`, read ports #0 of both SRAMs always belong to the IME. Ports #1
belong to the IME while it is in SIMD mode (`simd_mode`). Otherwise they belong
to the SME. `port_gnt` is the inverse of `simd_mode`.

The SME asks for the port only when it loads a window or the template. Its PU
and SPG work from registers, so only its loads stall: a load cycle without the
grant simply waits. As a result:

- during the IME's systolic 1D-DS the two engines run in parallel;
- during the IME's SIMD matches the SME can only compute on data it has
  already loaded.

The **macroblock pipeline** is driven by the host, one *step* at a time. In
step N:

- the IME searches macroblock N;
- the SME refines macroblock N−1, using the integer vectors the IME left at the
  end of step N−1.

The buffers alternate between two slots. Slot s holds its template at TBRAM
rows 16s..16s+15 and its search window at SWRAM rows 80s..80s+79. Vector (0,0)
of the window is at (32, 80s+32).

## Host interface

The host interface is this design's own; it is implemented in `me_ctrl.sv`.

**Memory bus** (`mem_we`, `mem_addr[12:0]`, `mem_wdata[63:0]`). The address is
`{sel, y[7:0], xw[3:0]}`. A write stores pixels 8·xw..8·xw+7 of row y, in
TBRAM when sel = 0 and in SWRAM when sel = 1.

**CPU bus** (`cpu_we`, `cpu_addr[7:0]`, 32-bit data). The registers are at
these word addresses:

| Address | Register |
|---|---|
| 0x00 | **Write:** bit 0 starts a step; bit 1 says a new macroblock was loaded for the IME. **Read:** bit 0 busy; bit 1 slot of the next step; bit 2 SME results valid; bits 31:16 cycles of the last step. |
| 0x01 | λ |
| 0x02..0x08 | Initial candidates (x in bits 7:0, y in bits 15:8). 0x02 is PMV. |
| 0x11..0x14 | MV_A..MV_D |
| 0x15 | MV_Mode1 |
| 0x40+p | Best quarter-pel vector of partition p (x in bits 9:0, y in bits 25:16) |
| 0x80+p | Cost of partition p |

A typical step:

1. Load the next slot's template and window over the memory bus.
2. Write the candidates.
3. Write 0x00 = 3.
4. Wait for `step_done`.
5. Read the SME results of the previous macroblock.

The SME's predicted vector is 4× the PMV that was given with its macroblock.

## Parameters and sizes

Everything in `me_top` runs at its default sizes:

| Item | Value |
|---|---|
| SWRAM | 80x256 pixels (160 Kbit) |
| TBRAM | 16x56 pixels (7 Kbit) |
| Search range | ±27 (`ime.SR`) |
| Line width | 8 pixels per port |
| SAD | 11 bits |
| PU | 64 pixels per cycle |
| Sub-pel points | 35 |

`me_sram` takes W and H as parameters. `ime` takes SR. The rest is fixed by
the algorithm.

## Departures from the original design

- **Cycles per macroblock.** A pipeline step takes up to about 1520 cycles.
  Over a whole simulated QCIF frame, steps took at most 1522 cycles, and
  143035 cycles for all 99 macroblocks. The reference schedule this
  design follows reaches 878 cycles. The differences:
  - the SME reloads its 24x24 window for each of its up to five centres;
  - the SIMD matches are not overlapped with other work;
  - the diamond step uses two 3-point passes.
- **Clock needed.** CIF 30 fps with three reference pictures needs 54.24 MHz
  (35640 steps/s × 1522 cycles). That is just above the 54 MHz operating point
  this class of core is specified for, and within its 60 MHz maximum. QCIF
  15 fps with one reference needs about 2.3 MHz.
- **Search range.** It is ±27, not ±32. The vector (0,0) sits at offset 32 of
  an 80x80 window. The sub-pel window reaches 20 pixels past the block
  position, and 32 + 27 + 20 = 79 is the window's last column.
- **SPG structure.** The SPG computes the half-pel planes row by row from a
  loaded window. It does not use a bank of fourteen half-pel blenders fed by
  shift chains of integer pixels. The results are the same; the timing and
  register count differ.
- **Motion cost.** It uses a single predicted vector for every partition.
  H.264 predicts each partition from its own neighbours.
- **Rate estimate and λ.** The Exp-Golomb rate estimate and the λ register are
  choices made here.
- **Results path.** Results are read over the CPU bus. There is no output path
  onto the memory bus.
- **Window management.** Search windows are loaded whole by the host for every
  macroblock. There is no sliding-window reuse between neighbouring
  macroblocks.

## Verification

Each testbench compares the block with an independent model in
`tb/me_ref_pkg.sv`. The model covers:

- test pictures;
- SAD;
- the full IME algorithm, including its cycle count;
- H.264 interpolation;
- 4x4 SATD;
- Exp-Golomb length;
- the complete SME partition search.

| Testbench | What it checks |
|---|---|
| `tb_me_sram` | Random row/column reads against a plain array model. |
| `tb_ipu`, `tb_spe`, `tb_pu`, `tb_mcg` | Random vectors against direct formulas. |
| `tb_spg` | Every quarter-pel offset and block against the H.264 interpolation formula. |
| `tb_ime` | Vectors, SADs and cycles over random pictures with planted motion. |
| `tb_sme` | All 41 partitions, vectors and costs, cycles, and duplicate-centre skips. |
| `tb_me_ctrl` | Register map, bus writes and slot toggling. |
| `tb_me_top` | Five macroblocks through six pipeline steps at default sizes; every result is checked against the models. |

`tb_me_top` also counts the mechanisms and fails if any of them never
happens:

- SIMD matches;
- systolic passes;
- second 1D-DS rounds;
- SME stalls on the port;
- skipped duplicate centres;
- cycles with both engines busy;
- port #1 reads by each engine.

`tb_me_qcif` runs the same flow over a whole QCIF frame: 99 macroblocks, one
reference picture, every result checked. From the longest pipeline step it
works out the clock needed for QCIF 15 fps with one reference and for CIF
30 fps with three references. It fails if the CIF point would not fit 60 MHz.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

## Simulating

With Verilator 5 (`--binary`), from the directory that holds `rtl/` and `tb/`.
Package files come first:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/me_pkg.sv tb/me_ref_pkg.sv $(ls rtl/*.sv | grep -v me_pkg) \
  tb/tb_me_top.sv --top-module tb_me_top
./obj_dir/Vtb_me_top
```

Other testbenches work the same way, with their own `tb/tb_<block>.sv` file
and `--top-module`. Building takes under a minute; the full end-to-end test
then runs in a fraction of a second.
