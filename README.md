# BROOM: an out-of-order RISC-V core with a low-voltage-tolerant L2

BROOM is a test chip in 28-nm CMOS built around two ideas. The first is a
superscalar out-of-order RISC-V core (BOOM, second revision) reshaped so that a
standard ASIC flow can close timing on it. Its slowest loops are cut into
extra pipeline stages, and its large structures are moved into compiled SRAMs
or a hand-placed register file. The second is a 1 MiB L2 cache that keeps
working when the supply voltage is lowered far enough for SRAM cells to start
failing. A boot-time self-test finds the failing bits. Four repair mechanisms
then route around them, so that the chip can trade supply voltage for energy
without losing correctness. The silicon ran at 1.0 GHz at 0.9 V. With the
repairs on it ran down to 0.47 V at 70 MHz; with them off it stopped at 0.6 V.

This repository holds synthesizable SystemVerilog for the parts of that chip
whose working is known in enough detail to write:

* the instruction-fetch frontend: branch target buffer, return address stack,
  global-history branch predictor and next-PC logic;
* the issue and register-read slice of the backend: busy tables, three
  distributed issue windows, and the integer and floating-point register files;
* the resilient L2 cache: BIST, dynamic column redundancy, bit bypass in SRAM,
  line disable and line recycling;
* a top level, `broom_top`, that puts the two halves in separate clock domains.

It is **not** a complete processor. Decode, register renaming (the map
tables and free list), the reorder buffer, the functional units, the
load/store unit, the L1 caches and the uncore are not included. The top brings
out ports where they would connect. No program can run on this RTL on its own.
The testbenches play the part of the missing units.

## The L2 cache and its repairs (`l2_cache`, `dcr`, `lr_vote`, `sram_sp`)

This is the least conventional part of the design and the one most worth
reading closely.

### Organisation

The cache has 8 ways of 2048 sets. Each line holds 64 bytes, stored as 8 rows
(beats) of 64 bits: 8 × 2048 × 64 B = 1 MiB. It is write-back and
write-allocate, with round-robin replacement. Every way owns three
single-ported SRAM macros:

| Array     | Row contents                                                  |
|-----------|---------------------------------------------------------------|
| tag       | `{valid, dirty, tag}`, one row per set                        |
| data      | 64 data bits **plus one spare column**, one row per beat      |
| fault map | the repair state of the line, one row per set                 |

A fault-map row holds:
* a BB-S entry: valid, the position of the bad tag bit, and that bit's correct value;
* a line-disable flag;
* a DCR entry: valid and the 6-bit column address;
* a line-recycling flag.

The fault map sits in SRAM, so one lookup reads tag, fault map and data at
once.

### Boot-time self-test

After the L2 supply has settled, pulse `bist_start`. The BIST walks every set.
It writes all-zeros and then all-ones to each tag row and each data row of
every way, and reads them back. Any bit that reads wrong is a failing cell.
For each line it then decides:

1. **Data faults all in one column → DCR.** The column becomes the line's
   redundancy address.
2. **At most one faulty tag bit → BB-S.** Its position is recorded in the
   fault map.
3. **Anything worse → LD.** The line is disabled and never allocated.
4. **LR pass over each set.** It looks for three disabled lines whose data
   faults are in pairwise different bit positions. It also needs the first of
   them to have a usable tag (clean or BB-S-repairable). Such a triple becomes
   one recycled line.

`bist_done` rises at the end, and the client port accepts requests only from
then on. The counters `log_ld`, `log_dcr`, `log_bbs` and `log_lr` report
what the last run found. They are 16 bits wide, enough for all 16384 lines.

With `assist_en = 0` the BIST only clears the tags and records no repairs.
This is the unassisted cache, used to show what the repairs buy: reads then
return whatever the faulty cells hold.

### The four mechanisms at access time

* **DCR (dynamic column redundancy).** The `dcr` block sits between every
  data row and its SRAM. On a write it shifts every bit from the redundancy
  address upward by one column, so that the bad column carries nothing and
  the top bit goes into the spare. On a read it undoes the shift. One bad
  column per line costs no capacity.
* **BB-S (bit bypass in SRAM).** The tag read from SRAM has its recorded bad
  bit replaced by the value kept in the fault map. On every tag write, that
  value is stored again. Keeping the repair data in SRAM rather than in
  flip-flops lets every tag entry have one, and no search over a repair table
  is needed.
* **LD (line disable).** A disabled way never matches and is never chosen as
  a victim. If every way of a set is disabled, accesses to that set bypass
  the cache and go straight to memory (the `uncached` event).
* **LR (line recycling).** A recycled group behaves as one way, and its tag
  lives in the group's first way. A write goes to all three copies. A read
  takes the bitwise majority (`lr_vote`). Each bit is bad in at most one copy,
  so the majority is always right. Only the data array is recycled; three
  disabled lines give back one line, a third of the lost capacity.

### Timing and interfaces

* **Client port.** One request at a time: `req_valid`/`req_ready`, 64-bit
  words with a byte mask.
  * A hit answers on `resp_valid` one cycle after acceptance. The tag,
    fault-map and data SRAMs are read in the accept cycle; compare, repair
    and vote happen in the next.
  * A miss first writes back a dirty victim. It then refills the line one
    word at a time over the memory port and replays the access.
* **Memory port.** The same request shape (`mem_req_*`, with a ready).
  Read data must come back in order on `mem_resp_valid`.
* **Events.** `ev_hit`, `ev_miss`, `ev_writeback`, `ev_uncached` and
  `ev_recycled_access` pulse once per occurrence.

### Fault model

`sram_sp` is a behavioural model of a compiled single-ported SRAM. Reads take
one cycle, and the output holds while the macro is idle. It can carry up to
16 stuck-at cells, placed from a testbench:

```
dut.u_l2.g_way[3].u_data.set_fault(0, row, bit, 1'b1);   // index, row, bit, value
```

No cells are faulty unless a testbench places them. Fault density against
voltage is not modelled.

## Frontend: fetch and branch prediction (`frontend`, `btb`, `ras`, `bpd`)

Fetch is one instruction per cycle in three stages:

| Stage | What happens | Redirect cost |
|-------|--------------|---------------|
| F0 | The PC goes to instruction memory and the BTB. The predictor hashes the PC with the global history. | — |
| F1 | The instruction arrives and is pre-decoded. The BTB answer arrives. A `jal`, a return (target from the RAS), a BTB-hit indirect jump, or a branch whose BTB counter says taken redirects here. Calls push the RAS. | 1 bubble |
| F2 | The global predictor's direction arrives; its SRAM was read during F1. If it disagrees with the F1 choice for a conditional branch, fetch is redirected again. | 2 bubbles |

Pushing the predictor's redirect one stage later is the key timing change of
this core. It gives the index hash a whole cycle and keeps it off the next-PC
path, at the cost of one extra bubble per predictor redirect.

* **`btb`** is 2-way, with 128 sets per way. Each way is one single-ported
  SRAM. Tags are partial (12 bits). Each entry stores the full target, the
  branch kind and a 2-bit hysteresis counter. The counter decides the
  direction of a conditional branch on a tag hit.
* **`bpd`** is a gshare predictor: 12 bits of global history XORed with the
  PC. It has 4096 two-bit counters, split into a prediction-bit table and a
  hysteresis-bit table. Each table is tall and thin (4096 × 1), so it is
  folded into a square 64 × 64 SRAM. A masked write updates a single bit.
* **`ras`** has 8 entries. When full, a new push overwrites the oldest entry.

History is updated speculatively in F2. The branch unit sends back the
prediction metadata with each resolved branch on `res_*`. A mispredict
restores the history and restarts fetch. The RAS is not repaired after a
mispredict. The instruction memory must answer in the next cycle, and the
fetch buffer is assumed never to stall.

## Backend: issue and register read (`core_backend`, `issue_window`, `busy_table`, `int_regfile`, `fp_regfile`)

Renamed micro-ops (`uop_t` in `broom_pkg`) arrive two per cycle. Each goes to
one of three **distributed issue windows** of 16 entries:

| Window | Issue ports |
|--------|-------------|
| integer | 2 |
| memory | 1 |
| floating point | 1 |

At dispatch the **busy tables** mark each source that is still waiting for its
producer. The integer table has 70 registers and 2 sources per uop. The FP
table has 64 registers and 3 sources, for the fused multiply-add.

Each window is a **collapsing queue**. The oldest uop is always in slot 0.
Issued slots are squeezed out, and younger uops move up. Select is a cascaded
priority search for the oldest uop whose operands are all ready. A writeback
in cycle *t* clears busy bits at once, so the woken uop can issue at *t*+1.

**Issue select and register read are separate pipeline stages.** A selected
uop is registered, and its operands are read in the next cycle. Operands
leave on `exe_*`: ports 0 and 1 are integer, port 2 is memory, port 3 is FP.
`exe_rs3` exists only for the FP port.

* **`int_regfile`**: 70 × 64 bits, six read ports and three write ports. It
  uses hierarchical bitlines, as the original did with hand-placed
  standard-cell bits and tri-state read drivers. The registers form clusters
  of 10. Inside a cluster, one-hot read enables drive a local read line (an
  AND-OR here, where the chip used tri-states). A multiplexer then picks the
  addressed cluster. Register 0 reads as zero.
* **`fp_regfile`**: 64 × 64 bits, three read ports and two write ports, with
  no special structure.

Both files read combinationally and write at the clock edge. A read in the
same cycle as a write returns the old value. Assertions flag two writes to
the same register in one cycle, and dispatch into a full window.

## Top level (`broom_top`)

| Domain | Clock and reset | Contents |
|--------|-----------------|----------|
| core | `clk_core`, `rst_core_n` | frontend and backend |
| L2 | `clk_l2`, `rst_l2_n` | `l2_cache` |

The crossing between the domains belongs to the uncore, which is not
included. The L2 client port (`l2_req_*`/`l2_resp_*`) is therefore a
top-level port already in the L2 domain.

Ports that stand in for the missing units:

| Ports | Missing unit it stands for |
|-------|----------------------------|
| `imem_*` | instruction cache |
| `fetch_*` | fetch buffer / decode |
| `disp_*` | rename |
| `exe_*`, `int_wb_*`, `fp_wb_*` | functional units |
| `res_*` | branch unit |
| `mem_*` | off-chip memory |

Two status outputs:
* `fe_events` = {mispredict, RAS, predictor redirect, BTB redirect};
* `l2_events` = {recycled, uncached, write-back, miss, hit}.

`l2_log` carries the four BIST counters.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5, from the repository root:

```
verilator --binary -j 0 -Wno-fatal --timing --top-module tb_l2_cache \
    rtl/broom_pkg.sv $(ls rtl/*.sv | grep -v broom_pkg) tb/tb_l2_cache.sv
./obj_dir/Vtb_l2_cache
```

Block testbenches override sizes to stay short. For example, `tb_l2_cache`
uses 64 sets.

`tb_broom_top` runs the whole top at its default sizes (the full 1 MiB L2),
in about half a minute. Three agents drive it at once:
* an instruction memory and branch unit drive a looping program with a call,
  a return, a jump and a mispredicted loop branch;
* rename and execute models send dependent integer, memory and FP uops and
  check every operand;
* an L1 model runs reads and writes against the L2. Stuck-at faults are
  placed first so that every repair kind, an uncached set and the
  assists-off mode all occur.

The testbench counts each mechanism and fails if one never happens.

To change a size, override the module parameters. The main ones are:

| Module | Parameters |
|--------|------------|
| `l2_cache` | `WAYS`, `SETS`, `BEATS`, `PADDR` |
| `btb` | `SETS`, `WAYS`, `TAG_BITS` |
| `bpd` | `HIST_BITS` (the tables hold 2^`HIST_BITS` counters) |
| `issue_window` | `ENTRIES`, `ISSUE`, `DISP` |
| `ras` | `DEPTH` |
| `int_regfile` | `CLUSTER` |

The L2 BIST runs in time proportional to `SETS × BEATS`.

## Where this RTL departs from, or goes beyond, the original

* **Taken from the original design:**
  * BTB organisation and SRAM storage;
  * the gshare predictor with split and folded tables;
  * the F1/F2 redirect timing;
  * three 16-entry windows with two integer issue ports;
  * collapsing queues with oldest-first select;
  * select and register read as separate stages;
  * 70-entry 6R/3W integer file with clustered read lines;
  * 3R/2W FP file;
  * the four L2 assists, the boot-time BIST, the 1 MiB L2 size, and the
    separate core and L2 domains.
* **Own choices:**
  * all other sizes: BTB sets, ways and tag width, history length, table
    size, RAS depth, FP register count, cluster size, L2 associativity and
    line size;
  * one-wide fetch and two-wide dispatch;
  * pre-decode rules;
  * replacement policies;
  * the fault-map format;
  * recycling groups limited to the lines of one set;
  * the BIST patterns and decision rules;
  * every handshake.
* **Not modelled:**
  * the register file's hand-placed bit cell (modelled by its logic
    function);
  * the voltage and clock domains themselves: supplies, level shifters and
    clock generation.
* **Limits to keep in mind:**
  * The fault model is stuck-at only. Faults that depend on timing or
    data are not modelled.
  * The repair decision uses only the two BIST patterns.
  * The RAS is not repaired after a mispredict.
  * The L2 serves one request at a time.
  * The rest of the core's performance cannot be reproduced here. The
    measured 3.77 CoreMark/MHz and 1.11 IPC depend on parts that are not
    included.
