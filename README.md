# NBTI-tolerant register files in SystemVerilog

Negative bias temperature instability (NBTI) slowly raises the threshold voltage of a PMOS
transistor while its gate is held low. In a 6T SRAM cell, one of the two PMOS pull-ups is
stressed whenever the cell stores 0, and the other whenever it stores 1. A cell that holds
the same value for years ages on one side only. Its static noise margin shrinks, and
eventually it can flip on a read. Register files are hit hard because program values are
skewed: most high-order bits of most results are 0, so the same cells see the same value all
the time. The fix is to balance each cell's time at 0 and at 1 (the "one bias probability",
OBP, of the cell should be near 0.5). Failing that, the cells that are bound to be stressed
can be made stronger.

This repository holds RTL for two register files that attack the problem in different ways.
They follow the designs of S. Kothawade's 2011 thesis *Design of Negative Bias Temperature
Instability (NBTI) Tolerant Register File* (Utah State University):

* **`arf_rbr_inv`** is an architecture register file of 32 × 64 bits (the SPARC V9 integer
  registers). It rotates which row holds which register (RR). It rotates which column holds
  which bit (BR). It inverts the stored data in alternate periods (INV). Over many
  context-switch periods, every cell therefore sees every bit of every register in both
  polarities.
* **`nbti_prf`** is a renamed physical register file of 224 registers serving 160 logical
  registers. It is split into a 64-bit bank and a 16-bit bank. The 16-bit bank is meant to be
  built from up-sized, NBTI-robust cells. A predictor guesses, at decode, whether an
  instruction's result will be mostly zeros. If so, the result goes to the narrow bank, which
  never stores the always-zero upper bits at all. Wrong guesses are repaired at writeback by
  moving the value to the other bank.

The top level `nbti_rf_top` places both side by side. They share only clock and reset. Their
ports are prefixed `arf_` and `prf_`.

## Part 1: rotating and inverting architecture register file

### Mapping

The file keeps three counters, in `rotation_controller`:

| counter  | range    | meaning                                                        |
|----------|----------|----------------------------------------------------------------|
| `row_cnt`| 0..N-1   | register `r` is stored in row `(r + row_cnt) mod N`            |
| `bit_cnt`| 0..W-1   | bit `b` of a register is stored in column `(b + bit_cnt) mod W` |
| `inv`    | 0/1      | when 1, cells hold the complement of the data                  |

The hardware for this is small:

* The address decoder (`addr_decoder`) produces one-hot row selects. A barrel rotator
  (`barrel_rotate`) then rotates the selects by `row_cnt`. The file has one rotator per read
  port and one for the write port.
* `bit_rotate_inv` sits on the data path. On the write side it rotates the data left by
  `bit_cnt` and XORs it with `inv`. On the read side it does the reverse.
* `arf_cell_array` is a plain row × column array addressed by one-hot selects.

Software never sees the mapping. A read always returns what was written to the same register
number under the same mapping.

A mapping change (`remap_req`) advances all three counters by one step. `row_cnt` and
`bit_cnt` advance together, each wrapping at its own size (32 and 64), and `inv` toggles. The
parameters `EN_RR`, `EN_BR` and `EN_INV` switch each mechanism off individually. This gives the
variants RR, BR, RBR, INV and RBR+INV. All three are on by default (RBR+INV).

### When the mapping changes, and what happens to the contents

Cells cannot change meaning while instructions are in flight. The intended use is therefore
at an operating-system context switch, every scheduling quantum (about 10 ms). The outgoing
thread's registers are saved before the change, and the incoming thread's are loaded after it.
Nothing then has to move. This is `remap_migrate = 0`: the counters change at the next clock
edge, and the cell contents become meaningless until software writes them again.

For uses without a save and restore, `remap_migrate = 1` performs a **value update**.

* Under the new mapping, register `r` lives where register `r+1` used to live. Moving in
  place therefore needs one spare register.
* The sequencer copies register N-1 into a holding register. It then moves registers N-2, N-3,
  …, 0 one per cycle; each is read with the old mapping and written with the new one. Last,
  it writes register N-1 from the holding register.
* Each move's destination is a row whose old content was already moved away. No value is lost.
* `busy` is high for the N+1 cycles (33 at the default size). During that time the read
  port 0 and the write port belong to the sequencer, and the ports of the file must not be
  used.

Flushing the pipeline before a change is the host processor's job. `busy` and the request
input are the hooks for it.

### Ports and timing

* Two combinational read ports: `rd_addr[i]` → `rd_data[i]` in the same cycle.
* One write port, written at the rising clock edge.
* `row_cnt`, `bit_cnt` and `inv` show the current mapping.
* Reset (`rst_n`, asynchronous, active low) clears the counters and all cells.

## Part 2: banked physical register file with zero-predominance prediction

### Zero predominance and width

A result is *zero predominant* (ZP = 1) when more than 75% of its 64 bits are 0, which means
at least 49 zero bits. A result *fits* the narrow bank when its significant width is at most
16 bits. In that case it is stored as its low 16 bits, and reads zero-extend it.
`value_classifier` computes both.

Prediction asks about ZP, while placement depends on width. These are different properties:
* A value such as `0x8000_0000_0000_0001` is ZP but does not fit.
* A 16-bit value with many ones is not ZP, yet it fits.

The remap step below deals with both cases.

### Predictors

Three predictors are provided, all indexed by PC and defaulting to 8192 entries.
`nbti_prf` selects one with `PRED_KIND` through the `zp_predictor` wrapper.

* **NP predictor** (`np_predictor`, the default) remembers only instructions that produced a
  *non*-zero-predominant result.
  * A hit predicts ZP = 0, and a miss predicts ZP = 1.
  * A low-ZP outcome installs the instruction. A high-ZP outcome on a hit removes it.
  * Entries hold a valid bit and an 8-bit partial tag, so that different instructions sharing
    an index are not confused.
* **Bimodal** (`bimodal_predictor`) is a table of 2-bit saturating counters. It starts in
  "strongly zero predominant", and the two upper states predict ZP = 1.
* **Last value** (`last_value_predictor`) keeps one bit per entry: the last ZP seen. Entries
  start at 1.

Predictors are read at decode and trained at writeback.

### Renaming and allocation at decode

Renaming follows the MIPS R10000 style:
* `rename_map_table` maps 160 logical registers to physical registers.
* Each bank has its own `bank_free_list` (registers 0–111 wide, 112–223 narrow).
* At reset, logical 0–79 map to wide registers 0–79 and logical 80–159 map to narrow
  registers 112–191. This leaves 32 free registers in each bank.

`decode_allocator` takes a narrow register when ZP is predicted, and a wide register
otherwise. When the wanted bank is empty, the instruction stalls at decode (`dec_stall`).
Two refinements keep this from deadlocking:

1. **Narrow fallback** (`NARROW_FALLBACK = 1`): a ZP-predicted instruction takes a wide
   register when the narrow bank is empty. Committed narrow values free their registers only
   when the same logical register is overwritten. A program can therefore park all 112 narrow
   registers in committed state, and a plain stall would then never clear. Set the parameter
   to 0 for the strict stall.
2. **Wide reserve** (`WIDE_RESERVE = 1` in `nbti_prf`): decode never takes the last free wide
   register. The oldest in-flight instruction may need to move a wide result out of a narrow
   register. If younger instructions held every wide register, it could not, and they cannot
   commit before it. Keeping one register back guarantees progress.

### Remap at writeback

`remap_unit` classifies each result against the bank of its destination register:

| destination | result     | action                                                                        |
|-------------|------------|-------------------------------------------------------------------------------|
| narrow      | fits       | write it                                                                      |
| narrow      | too wide   | take a wide register, write there, free the narrow one, report the remap      |
| wide        | too wide   | write it                                                                      |
| wide        | fits       | if a narrow register is free (`REMAP_TO_NARROW = 1`), move there and free the wide one; otherwise write in place |

A too-wide result with no free wide register raises `wb_stall`. The core must hold that
writeback and retry it. With the wide reserve this is rare and always temporary.

A remap is reported on `remap`/`remap_old`/`remap_new`. Inside the file, the map table is
corrected only if the logical register still points to the old physical register; a younger
rename of the same register wins. A rename in the same cycle as a remap of one of its sources
is forwarded, so `ren_psrc` is already correct. **The core is responsible for the rest**: tags
it holds in waiting instructions, and the "previous destination" fields of younger
instructions (which commit will free), must be renamed from `remap_old` to `remap_new`. The
testbench core model shows how.

### Capacity limit

Both banks hold 112 registers. At most 112 logical registers can hold values wider than
16 bits at the same time, counting committed and in-flight values. This is inherent in two
equal banks with 160 logical registers. A workload that keeps more wide values live will
eventually stall writeback for good. The testbenches restrict destinations to 100 logical
registers to stay inside the limit.

### Ports and timing (one instruction per cycle and stage)

| stage     | inputs                                      | outputs                                                  |
|-----------|---------------------------------------------|----------------------------------------------------------|
| decode    | `dec_valid, dec_pc, dec_has_dest, dec_ldest, dec_lsrc[2]` | `dec_stall` (combinational); `ren_*` one cycle after a non-stalled decode |
| operands  | `rd_preg[2]`                                | `rd_data[2]` (combinational)                             |
| writeback | `wb_valid, wb_pc, wb_preg, wb_ldest, wb_value` | `wb_stall` (combinational), remap report; value stored at the clock edge |
| commit    | `cm_free_valid, cm_free_preg`               | —                                                        |
| status    | —                                           | `wide_free`, `narrow_free`                               |

## Where this RTL departs from the source design, and what it leaves out

Choices the source design does not make, or makes differently:
* **Issue width.** The source design evaluates a 4-wide out-of-order core. Here each stage
  handles one instruction per cycle, and the register file has 2 read ports and 1 write port.
  A wider file needs more ports on every block, plus intra-group dependency handling at
  rename.
* **NP predictor contents.** The source describes the NP table only as tracking low-ZP
  instructions. The partial tag, the removal of an entry on a high-ZP outcome, the index
  bits (PC bits 14:2) and reset to empty are this design's choices.
* **Remap in both directions.** The allocation flow chart remaps in both directions, but the
  prose only mentions narrow-to-wide. `REMAP_TO_NARROW = 0` gives the prose's behaviour.
* **Own additions:**
  * the narrow fallback and wide reserve;
  * the reset mapping;
  * the writeback stall;
  * the value-update sequencer, including its cycle count;
  * two read ports and one write port on the architecture file;
  * wrapping row and bit counts separately.
* **Not built:**
  * the 6T SRAM cell and the up-sized cells of the narrow bank (circuit properties; both banks
    here are flip-flop arrays);
  * recovery boosting and the supply-voltage or transistor-sizing comparisons;
  * the pipeline flush;
  * the out-of-order core itself.

## Verification

Every block has a self-checking testbench in `tb/` that compares it with an independent model.
Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_nbti_prf` and `tb_nbti_rf_top` drive the physical register file from a small in-order
  core model in `tb/prf_core_model.svh`. The model keeps a golden copy of all 160 logical
  registers, applies remap reports to its in-flight tags, and checks every operand read. It
  counts decode stalls, remaps in each direction, mispredictions, narrow fallbacks and
  writeback stalls.
* `tb_nbti_rf_top` runs both files at their full default sizes (32 × 64 rotating file;
  224-register file with an 8k-entry NP predictor). Each mechanism must occur at least once:
  * value updates and plain mapping changes;
  * inversion phases, a full wrap of the row count and a wrap of the bit count;
  * decode stalls, remaps both ways, mispredictions and fallbacks.
  About 200,000 checks pass.
* `tb_arf_obp` is a workload test of the bias-balancing method. Four 32 × 64 files run on one
  input stream: no scheme, INV only, RBR only, and RBR+INV. The stream is 20 sequences of 256
  context-switch periods drawn from 15 synthetic programs. For each cell the test measures the
  fraction of time it holds 1 and reports the worst cell.
  * Medians: 0.011 (none), 0.389 (INV), 0.161 (RBR), 0.388 (RBR+INV).
  * 10th percentiles: 0.006, 0.378, 0.155, 0.359.
  * The source study reports RBR 0.17 and RBR+INV 0.48 as medians, and INV only 0.131.
  * RBR agrees. Inversion alone does much better on these synthetic programs than in the
    study, and RBR+INV gains nothing over it. The likely reason: the inversion phase advances
    with the same shift count as the rotation. A given register bit therefore always meets a
    given cell in the same polarity. An inversion schedule independent of the rotation would
    remove that coupling; it is not implemented.
* `tb_zp_pred_workload` runs one synthetic instruction stream through all three predictors at
  8k entries and through the NP predictor at 512 to 4k entries. The stream has 12,000 static
  instructions with mixed zero-predominance behaviours.
  * NP rates fall with table size: 40.6, 30.1, 20.8, 17.4 and 15.2% for 512 to 8k entries.
  * At 8k, bimodal reaches 13.2% and last value 15.7%.
  * The source design reports NP as clearly best on real programs. On this mix the bimodal
    counters win, because they tolerate single deviations. So the NP choice rests on the
    source design's measurements, not on this test.
* For each block, a deliberately broken copy was confirmed to fail its testbench.

## Simulating

Verilator 5 with timing support:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl \
    rtl/nbti_pkg.sv tb/tb_nbti_rf_top.sv --top-module tb_nbti_rf_top
./obj_dir/Vtb_nbti_rf_top
```

Replace `tb_nbti_rf_top` with any testbench name in `tb/`. Notes:
* `-y rtl` lets Verilator find modules by file name.
* `-Itb` finds the shared testbench includes (`tb_predictors.svh`, `prf_core_model.svh`).
* `-Wno-fatal` keeps Verilator going past its width warnings. These are harmless and mostly
  come from the testbenches.
* The full-size end-to-end test runs in well under a minute.

## Changing it

Sizes come from `rtl/nbti_pkg.sv` and from module parameters:

* `arf_rbr_inv`:
  * `N` and `W` can be any size; the rotators work modulo any width.
  * `NRD` sets the number of read ports.
  * `EN_RR`, `EN_BR` and `EN_INV` switch the mechanisms.
* `nbti_prf`:
  * `NPREG` must be even; the two banks are equal halves.
  * Also `NLREG`, `NARROW_W`, `PRED_KIND` (`PRED_NP`, `PRED_BIMODAL`, `PRED_LASTVAL`),
    `PRED_ENT`, `INIT_WIDE` and `WIDE_RESERVE`.
  * `NARROW_FALLBACK = 0` and `REMAP_TO_NARROW = 0` select the strict behaviours described
    above.

Known tool notes:
* Verilator reports `SYNCASYNCNET` on `rst_n`. The flip-flops use it only as an
  asynchronous reset. The free-list assertion, which is disabled during reset, samples it at
  the clock, and that is what the warning sees.
* The `WIDTHTRUNC` warnings are index truncations of register numbers into bank offsets, whose
  ranges are already bounded.
