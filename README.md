# Pipelined EG-LDPC decoder with adaptive read precision for MLC NAND flash

This RTL corrects errors in 8 KB pages read from 2-bit-per-cell NAND flash. It
is built around one long, high-rate code: the (68254, 65536) shortened
Euclidean-geometry LDPC code. That leaves 2718 parity bits per page, about 4 %
of the page.

The decoder runs the normalized APP-based min-sum algorithm on a serial
(row-by-row) schedule. It processes eight parity checks per clock, through a
five-stage pipeline. Two ideas make that affordable:

* **A rotating APP ring.** The 69615 a-posteriori LLRs sit in 17 rotating
  shift-register rings, one per circulant. Because the code is quasi-cyclic,
  every check node finds its 272 variables at the same fixed ring positions.
  So the wiring between storage and the arithmetic is fixed, and no
  permutation network is needed.
* **Conditional update.** Once an LLR has saturated at ±63, it is no longer
  updated, and its processing unit sees zeros. Together with sign-magnitude
  storage, this keeps the ring almost static once the decoder has converged.
  That saves switching power.

Around the decoder sit the flash-side pieces:

* programmable LLR tables that turn 4-bit soft read levels into channel LLRs;
* a controller that picks the read precision (4, 7 or 16 levels) for the next
  pages, from how many iterations the decoder needed on the last ones.

## The code

The parity-check matrix is a row of 17 circulant sub-matrices. Each is
4095 × 4095 with 16 ones per row and column. That gives a 4095 × 69615 matrix
with row weight 272 and column weight 16: the (69615, 66897) code.

The circulants come from the geometry EG(3, 2^4):

* Points are the non-zero elements of GF(2^12); the field is built on
  x^12+x^6+x^4+x+1. Lines are the sets {a + βb : β ∈ GF(2^4)}.
* The 69615 lines that miss the origin fall into 17 cyclic classes under
  multiplication by a primitive element.
* A class with point exponents E gives a circulant. Row r of that circulant has
  its ones at columns (r − e) mod 4095 for e in E.

`ldpc_pkg` holds the resulting 17 × 16 column offsets. Any primitive
polynomial gives a code of the same family and size, with the same properties.
This table is one such member; the source does not say which polynomial its
matrix used.

**Shortening.** The first 1361 columns of the first circulant are shortened
bits: they are known zeros. At load time they are forced to +63 ("certainly
0") whatever the input says. They therefore never change, and their output
bits are always 0.

A second code of the same construction, EG(3, 2^2), is also in the package:
5 circulants of 63 × 63 with weight 4, 315 bits. It uses the same RTL and
exists only so that the testbenches run in seconds. Select it with
`CODE = EG_63`.

## The schedule: how eight rows share one rotating ring

With L_p = 8 lanes, the 4095 rows are handled as 8 interleaved streams of 512
rows each. At rotation T, lane j processes row

    r = (T + 512·j) mod 4095 .

Every clock, each APP ring shifts by one place: `v[x] <= v[x+1]`. So after T
rotations, ring position x holds column (x + T) mod 4095.

Row r needs columns (r + c) mod Z. For lane j these columns are always at ring
positions (512·j + c) mod Z, whatever T is. Each lane therefore reads through
16 fixed taps per tile: 8 × 16 taps × 17 tiles in all.

512 consecutive cycles make one iteration, called a window here. Because
8 · 512 = 4096 = Z + 1, a window covers every row once, and one row twice.

Two consequences are worth knowing when reading the RTL:

* **Write taps.** A row's result comes back 4 cycles after its read. By then
  the ring has moved 4 places, so each read tap has a write tap 4 places behind
  it. The new value is stored one place further still, because the ring also
  moves during the write cycle.
* **Tap collisions.** Two (lane, edge) pairs can land on the same ring register
  in the same cycle. This happens when two of the 8 rows share a column; for
  both codes it is at most 2 pairs.
  - Which pairs collide is fixed by the code, and `dec_tile` works it out when
    the design is elaborated.
  - The first pair owns the write tap. Its conditional updater adds the CTV
    differences of all the pairs sharing the register.
  - Every update reaches the variable; none is lost.

**Pipeline hazards.** The updater adds the differences to the value found at
the write tap *when the difference arrives*, not to the value read 4 cycles
earlier. A variable updated by two rows within those 4 cycles therefore keeps
both updates. The second row has still seen the older value; that is the usual
delayed-update hazard of a pipelined serial schedule. The original architecture
adds to the stale value instead.

## Pipeline and arithmetic

| Stage | Where | Work |
|---|---|---|
| S1 | `dec_tile`, `local_min_detector` | read 16 taps per lane per tile; normalise magnitudes (α = 1/4: 6-bit magnitude → 4 bits); find min1, min2, their index and the sign parity; issue CTV memory reads |
| S2 | `global_min_detector` | merge the 17 local results: global min1, index (tile·16 + local), Δmin = min(min2 − min1, 3), row sign parity |
| S3 | `idx_flag`, `npu` | flag the edge holding the minimum; new CTV = ±(flag ? min1 + Δmin : min1), sign = row parity ⊕ own sign; rebuild the old CTV from the stored record; store the new record and signs |
| S4 | `npu` | difference new − old (−30 … +30) |
| S5 | `cond_updater` | add all differences for the register, saturate to ±63, skip saturated LLRs, write back as 7-bit sign-magnitude |

Number formats:

| Value | Format |
|---|---|
| APP LLR | 7-bit sign-magnitude; zero is stored as +0 |
| CTV message | 5-bit sign-magnitude |
| Stored CTV record | {index 9 b, min1 4 b, Δmin 2 b} plus one sign bit per edge |

Keeping only 2 bits of Δmin means min2 is approximated by min1 + min(min2 − min1, 3).

**Saturated variables.** A variable whose LLR is ±63 when read is *frozen*:

* both its new and its old CTV message are forced to 0;
* its updater does not write.

It still takes part in the row's minimum search and sign parity.

**First visit of a row.** When a row is visited for the first time in a
codeword, the CTV memory has not yet been written for it. The old message is
then taken as zero.

## CTV memory

A row handled by lane j at rotation T was last handled 512 rotations earlier,
by lane j + 1. For lane 7, it was 511 rotations earlier, by lane 0. So the CTV
memory is organised per lane: each lane has its own banks.

* **Banks.** Each lane has a 512 × 15 record bank (central) and, in every tile,
  a 512 × 16 sign bank. All are `ctv_bank` instances: one write port, one read
  port, registered read data.
* **Writes.** Lane j writes its banks at address A mod 512, where A counts the
  decode cycles.
* **Reads.** Lane j reads the banks of lane j + 1 at the same address. Lane 7
  reads the banks of lane 0 one address ahead.
* **Old-valid flag.** Stored messages count as valid once 512 decode cycles
  have passed (511 for lane 7). This is the "CTV memory starts at zero" rule,
  without clearing the memory.

Per tile and address, the sign storage is the same 8 × 16 = 128 bits as a
single 512 × 128 memory. The records are held centrally in the decoder rather
than in the last tile.

## Phases, termination and timing

`dec_controller` runs one codeword through five phases:

1. **LOAD**: 512 cycles. Each tile takes 8 LLRs per cycle.
   - In load cycle τ, lane j of every tile supplies column 512·j + τ.
   - Lane 7 supplies column 3584 + τ − 1, and nothing at τ = 0.
   - `ldpc_pkg::load_col` gives the column for a lane and cycle.
2. **DECODE**: up to `IT_MAX` windows of 512 cycles.
3. **CHECK**: one window of reads without updates. It runs only if the limit is
   reached unconverged, and tests every parity check on the final values.
4. **CAP**: one cycle. The output buffers capture the hard decisions.
5. **OUT**: 512 cycles, 8 bits per tile per cycle.
   - In output cycle τ, lane j of a tile carries column (`out_col0` + 512·j) mod 4095.
   - On the last cycle (`out_last`), lane 7 is idle.

**Early termination.** A window has converged when both of these hold:

* every row it read had even parity;
* no write changed a sign, from the window's first read until its last write.

Then every row saw the same hard-decision vector, so that vector is a
codeword. The test is made when the window's last item is written. The next
cycle captures the output, and reads already issued for the next window are
discarded.

**Cycle counts**, from `start` to `done`; these are exact and checked by the
testbenches:

| Outcome | Cycles (SEG = 512) | Full size |
|---|---|---|
| converged in iteration k | (k + 2)·SEG + 6 | 1542 for k = 1 |
| limit reached, parity-check pass | (IT_MAX + 3)·SEG + 10 | 5642 for IT_MAX = 8 |

At 131 MHz, the worst case is 68254 bits per 5642 cycles, about 1.58 Gb/s. A
page that converges in one iteration takes 1542 cycles, about 5.8 Gb/s. The
output phase is not overlapped with the next page's load. Overlapping it would
remove one window from every page.

`success`, `iter_count`, `ev_early` (converged before the limit) and
`ev_check` (the CHECK phase ran) are valid from `done` until the next `start`.
A page that still fails parity after the CHECK phase is output as decoded so
far, with `success = 0` and `iter_count = IT_MAX`.

## Flash side: LLR tables and precision selection

An (N_s + 1)-level read delivers one 4-bit level per bit. In the testbenches,
bit 3 is the hard read and bits 2:0 the confidence; the RTL makes no assumption
about the encoding.

**LLR tables (`llr_lut`).** This block holds three host-written tables, for the
4-, 7- and 16-level reads. Each has 16 entries of 7-bit sign-magnitude LLRs.
The precision in use selects the table, and all entries reset to 0. The tables
are programmed through `lut_wr_*`, typically from a channel estimate.

**Precision selector (`precision_selector`).** This block watches every
decoded page, and counts a failed page as `IT_MAX` iterations. `REPEAT` (2)
pages in a row that meet a rule trigger it:

| Current | Condition (iterations) | Action |
|---|---|---|
| 4-level | ≥ 2 | go to 7-level |
| 7-level | = 1 | go to 4-level |
| 7-level | ≥ 3 | go to 16-level |
| 16-level | ≤ 2 | go to 7-level |
| 16-level | ≥ 4 | pulse `est_req` (ask for channel estimation) |

The aim is to move up before decoding starts failing, and to move down when
reads are cheaper than needed. A 10-level read is never chosen: its useful
range is too narrow. The flash device and the channel estimator are not part
of this RTL.

## Where this design departs from the original architecture

* **Row order.** 8 rows (T + 512·j) are processed at rotation T, and one row is
  processed twice per window. This lets the taps stay fixed while
  8 · 512 = 4095 + 1.
* **Loading.** Takes 512 cycles at 8 LLRs per tile, rather than 4095 cycles at
  one.
* **Update rule.** The update is added to the current value at the write tap
  (see "Pipeline hazards").
* **Convergence test.** The rule above is this design's own. The original only
  names a parity-check phase.
* **Normalisation.** It is applied to the magnitudes before the minimum search,
  rather than after the min selector. The result is the same; the detectors are
  narrower.
* **Memory organisation.**
  - Sign memory is one bank per lane, rather than one wide bank per tile.
  - The index/min/Δmin records are held centrally, rather than packed with the
    17th tile's signs into 512 × 31 blocks.
* **Δmin** is saturated at 3.
* **Shortened bits.** They are taken as the first 1361 columns of circulant 0.
* **Output.** The output phase is not overlapped with loading.
* **`REPEAT` = 2.** The number of repeats is this design's choice ("repeatedly"
  is not quantified).
* **The tap table** is one member of the code family (see "The code").

## Files

| Module | Role |
|---|---|
| `ldpc_flash_ecc` | top: LLR tables → decoder → precision selector |
| `ldpc_decoder` | controller, 17 tiles, 8 global min detectors, CTV record banks |
| `dec_controller` | phases, CTV addressing, stage tags, convergence, iteration count |
| `dec_tile` | one circulant: APP ring, 8 local min detectors, 128 NPUs, sign banks, updaters, output buffer |
| `app_memory` | rotating LLR ring with fixed read/write taps and 8 load points |
| `output_buffer` | hard-decision capture and 8-bit shift-out |
| `ctv_bank` | simple dual-port memory bank |
| `local_min_detector`, `global_min_detector` | two-minimum search within a tile / across tiles |
| `idx_flag` | minimum index → per-edge flag |
| `npu` | CTV generation, old-message recovery, saturation gating, difference |
| `cond_updater` | sum, saturate, freeze, sign-flip detect |
| `llr_lut`, `precision_selector` | flash-side blocks |
| `ldpc_pkg` | types, formats, code tables, schedule helper functions |

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/ldpc_pkg.sv tb/tb_ldpc_flash_ecc.sv \
              --top-module tb_ldpc_flash_ecc -Mdir obj && ./obj/Vtb_ldpc_flash_ecc

### What the testbenches cover

**Unit tests** compare against behavioural reference models. `tb_dec_tile`
predicts every read, write, frozen edge and collision of one tile against a
column-indexed model.

**`tb_ldpc_decoder` and `tb_ldpc_flash_ecc`** run the 315-bit code end to end.

* Codewords are built independently of the RTL. A shifted pair of circulant
  columns sums to zero, because circulants commute, so such pairs and sums of
  them are codewords.
* The tests check:
  - the decoded word and its syndrome;
  - that every bit is output exactly once;
  - the exact cycle counts.
* The top test makes every mechanism happen and counts it:
  - each LUT table;
  - shortening;
  - first visits;
  - frozen nodes;
  - collisions;
  - early termination;
  - the CHECK phase;
  - all four precision moves;
  - the estimation request.

**`tb_full_size`** runs the top at its default parameters: the full
(68254, 65536) code, 8 lanes, 8 iterations. It decodes a clean page in one
iteration (1542 cycles) and a page with 12 wrong reads in two (2054 cycles).
The Verilator build takes several minutes; the simulation takes seconds.

## Known limits

* The design has been simulated, not synthesised to gates at full size. At
  full size it holds 17 × 4095 × 7 ring bits and 2176 NPUs, and coarse
  synthesis of the whole decoder takes longer than ten minutes. The leaf
  blocks and one APP ring (28,665 flip-flops) synthesise on their own.
* The error-correction performance of this exact matrix and schedule has not
  been measured beyond the test pages. The testbenches check correct behaviour,
  not frame error rates.
* No timing analysis has been made. The clock rate depends on the
  implementation.
