# Dual bank register file

An out-of-order core holds a physical register from the moment an instruction is
renamed until the *next* writer of the same logical register retires. For most of that
time the register does nothing: it waits for its result, waits to be read (usually once
or never), and then waits, often longest of all, for its mapping to be retired. A large
monolithic register file pays in access time for all those idle registers.

This RTL implements the dual bank organization described in *Register Organization for
Enhanced On-chip Parallelism*. The physical registers are split into two banks of equal
size:

* **RF1** is the bank the renamer allocates from and the functional units write into.
* **RF2** holds a value for the last part of its lifetime, until its mapping dies.

Once an RF1 register has received its result, and the RF2 register *with the same index*
is free, the value is copied over and the RF1 register goes straight back to the rename
pool. The renamer therefore sees registers come free long before a conventional file
would release them, while each bank stays half the size of the monolithic file. No
per-register count of consumers is needed: the hardware never has to know when a value
was read for the last time.

## The register lifetime it exploits

For one mapping of a logical register to a physical register:

| time | event                                         | state after it      |
|------|-----------------------------------------------|---------------------|
| t0   | register allocated at rename                  | S0: waiting for its value |
| t1   | result written                                | S1: waiting to be read |
| t2   | first read                                    | S2: being read       |
| t3   | last read                                     | S3: waiting to be freed |
| t4   | next writer of the logical register retires   | register free        |

S2 is short; S0+S1 and S3 are each roughly half of the lifetime in the measurements the
organization was derived from. RF1 covers S0 and S1 (and S2 if the reads come early),
RF2 covers the rest. The transfer takes place at t1 or later, whenever the RF2 slot is
free.

## Structure

```
              dispatch group                    operand reads (2*IW)
                   |                                   |
            +------v------+     +-----------+   +------v------+
 decode --->| dbrf_rename |<----| dbrf_free |   | dbrf_read_  |---> operands
            |  map + flag |     |   _list   |   |    mux      |    (RD_LAT later)
            +------+------+     +-----^-----+   +--^------^---+
                   | tags, stale      | freed RF1   |      |
            +------v------+           |        +----+--+ +-+------+
            |  dbrf_rob   |-----------+        |dbrf_rf1| |dbrf_rf2|
            |retire/squash|--- freed RF2 ----->|        | |        |
            +------^------+                    +-^---+--+ +---^----+
                   |                 results ----+   |        |
            completion, branch                   IW transfer buses
                                                 +---v--------+---+
                                                 |   dbrf_xfer    |
                                                 +-------+--------+
                                                         | xfer_mask (broadcast)
```

| module           | role |
|------------------|------|
| `dbrf_pkg`       | bank flag type `bank_e` and the default sizes |
| `dbrf_rf1`       | RF1 data, a *written* bit per register, 2*IW operand read ports, IW write ports, IW transfer read ports |
| `dbrf_rf2`       | RF2 data, a *busy* bit per register, 2*IW operand read ports, written only by the transfer buses |
| `dbrf_xfer`      | picks up to IW indices with RF1 written and RF2 free, drives the buses, produces `xfer_mask` |
| `dbrf_read_mux`  | per read port, picks RF1 or RF2 by the tag's flag; RD_LAT register stages model the bank access time |
| `dbrf_free_list` | bit-vector pool of free RF1 registers, lowest first |
| `dbrf_rename`    | map table of `{bank, index}` per logical register, a saved copy per reorder buffer entry, group renaming, dispatch stall, one-cycle restore |
| `dbrf_rob`       | reorder buffer with destination and stale tags, in-order commit, one-cycle squash |
| `dbrf_top`       | wires the above together |

The issue queue, functional units and bypass network are not part of this RTL; their
connections are ports of `dbrf_top`.

## Bank flags: one index, two live values

Because RF1 register *p* can be reallocated as soon as its value has moved to RF2
register *p*, the same index can belong to two live mappings at once:

```
r6 <- ...        r6 renamed to p5 (RF1)
                 ... p5 written, moved to RF2, RF1 p5 freed ...
r4 <- r2         r4 renamed to p5 (RF1 again)
... <- r6        must read p5 in RF2
... <- r4        must read p5 in RF1
```

So every register name is a pair `{bank, index}`. A name is created as `{RF1, p}`. When
the transfer unit moves *p*, it raises bit *p* of `xfer_mask` for one cycle, and at that
clock edge every holder of a name `{RF1, p}` turns it into `{RF2, p}`:

* the map table entries (`dbrf_rename`),
* the destination and stale tags in the reorder buffer (`dbrf_rob`),
* the source tags waiting in the issue queue (outside this RTL: the queue must do the
  same with `xfer_mask`).

This is safe because, at the moment *p* moves, every existing `{RF1, p}` name refers to
the value being moved; the new mapping of RF1 *p* is created only afterwards. Tags that
leave the renamer in a transfer cycle already carry the new flag. Transfers are strictly
same-index, so RF2 *p* always holds an older generation than RF1 *p*, and RF1 *p* cannot
move until RF2 *p* is released.

## Releasing registers

| event | RF1 | RF2 |
|-------|-----|-----|
| value transferred | register returns to the pool | register becomes busy |
| instruction commits, its stale mapping is `{RF2, p}` | - | RF2 *p* free |
| instruction commits, its stale mapping is still `{RF1, p}` (never moved) | RF1 *p* returns to the pool | - |
| instruction squashed, its register is `{RF1, p}` | RF1 *p* returns to the pool | - |
| instruction squashed, its register is `{RF2, p}` | - | RF2 *p* free for a new transfer |

A register that is released by commit or squash in a given cycle is not also
transferred in that cycle (`block_mask` of `dbrf_xfer`).

**Recovery.** A branch misprediction (`br_valid`, `br_rob`) squashes every younger
instruction. An instruction that completed with an exception squashes itself and all
younger ones when it reaches the head (`exc_valid`, `exc_rob`). The renamer stores, for
every dispatched instruction, the map table as it was just before that instruction
renamed. The copies are not rewritten when registers move. Instead, each reorder
buffer entry collects the indices transferred since its copy was taken. On restore, a
saved `{RF1, p}` whose *p* has moved since then is read back as `{RF2, p}`. This is
exact because that mapping is still live at the restore, so the first transfer of *p*
after the copy was its own. A squash takes one clock edge. The live table is reloaded from the copy of the first squashed
instruction. Every squashed instruction releases its own register in whichever bank
its flag names. `squash_valid` marks the cycle. Dispatch waits in that cycle; older
instructions may still commit.

A squashed instruction may write back in the very cycle of its squash, because the
functional units cannot know about it yet. RF1 then lets the release win, so the
register goes back to the pool with its *written* bit clear.

## Interface and timing of `dbrf_top`

Everything is synchronous to `clk`, with asynchronous active-low `rst_n`.

* **Dispatch.** Present up to IW instructions on `disp_valid`, `disp_has_dst`,
  `disp_dst`, `disp_src1`, `disp_src2`. In the same cycle, `disp_fire` says whether the
  whole group was taken. The renamed source tags (`src*_bank`, `src*_preg`), the RF1
  register of each destination (`dst_preg`) and the reorder buffer entry (`disp_rob`)
  come back combinationally. A group is held if the reorder buffer lacks IW free
  entries, a squash is being applied, or RF1 has fewer free registers than
  the group has destinations. In the last case `stall_noreg` is high.
* **Operand reads.** 2*IW ports with `rd_bank`/`rd_preg`. `rd_data` is valid RD_LAT
  cycles later (1 by default). The file does not forward a result written in the same
  cycle: that is the job of the execute-stage bypass.
* **Writeback.** IW ports `wb_valid`/`wb_preg`/`wb_data` write RF1. A squashed
  instruction must not write back after the cycle of its squash.
* **Completion.** `cpl_valid`/`cpl_rob`/`cpl_exc` mark entries done.
* **Misprediction.** `br_valid`/`br_rob`, for a branch that has not completed yet.
* **Broadcast.** `xfer_mask` must be applied to held source tags in the same cycle.
* **Status.** `commit_valid`, `squash_valid`, `rob_count`, `rf1_free_count`, `rf2_busy`.

At reset, logical register *i* maps to `{RF2, i}` with value 0, and all RF1 registers
are free.

## Configurations and parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `IW`      | 8   | issue width; 2*IW read ports per bank, IW write ports into RF1, IW transfer buses, IW renames/commits per cycle |
| `NPREG`   | 64  | registers in each bank |
| `NLREG`   | 32  | logical registers |
| `DATA_W`  | 64  | register width |
| `ROB_N`   | 128 | reorder buffer entries (power of two) |
| `RD_LAT`  | 1   | bank access latency in cycles |

The defaults are the organization's first configuration (called C3 in the evaluation)
on an 8-wide core: 64 + 64 registers and single-cycle banks. This configuration aims at
a shorter access time than a 128-register monolithic file with the same total storage.
The second configuration (C4) keeps the renaming capacity of the monolithic file:
`NPREG = 128`, `RD_LAT = 2`. The 4-wide variants use `IW = 4`.

| configuration | registers needed | ports (rd/wr/bus per bank) | default build |
|---|---|---|---|
| C3, IW = 8 | 64 + 64 | 16 / 8 / 8 | exactly the defaults |
| C3, IW = 4 | 64 + 64 | 8 / 4 / 4 | `IW = 4` |
| C4, IW = 8 | 128 + 128, 2-cycle | 16 / 8 / 8 | `NPREG = 128, RD_LAT = 2` |
| C4, IW = 4 | 128 + 128, 2-cycle | 8 / 4 / 4 | `NPREG = 128, RD_LAT = 2, IW = 4` |

The 32 logical registers and 64-bit width follow the Alpha instruction set of the
reference processor. A core with split integer and floating-point register files uses
one instance per class.

## Choices made here

These points are not fixed by the organization itself:

* Transfer priority is by lowest index. A transfer, its flag broadcast and the return of
  the RF1 register to the pool all take effect at one clock edge.
* Dispatch is all-or-nothing per group.
* A stale mapping that is still in RF1 at commit releases its RF1 register directly.
* A register written and released in the same cycle ends up released.
* One saved map copy is kept per reorder buffer entry, because the reference retire
  scheme keeps the map state of every in-flight instruction. Keeping the copies in a
  memory and correcting their flags with a per-entry mask of later transfers are
  this design's choices.
* The bank access latency is modelled as register stages after the mux; the banks
  themselves read combinationally.
* The reset state is as described above.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_dbrf_rf1`, `tb_dbrf_rf2`, `tb_dbrf_xfer`, `tb_dbrf_read_mux`, `tb_dbrf_free_list`,
  `tb_dbrf_rename`, `tb_dbrf_rob`: random stimulus against shadow models written from
  the rules above. The mux test checks both the 1-cycle and the 2-cycle latency. The
  RF1 test includes writes that land in the cycle their register is released. The
  rename test restores random saved maps.
* `tb_dbrf_top`: runs the whole subsystem at its default size with a model core around
  it. Random instruction groups are renamed, issued out of order, read their operands,
  write results back and retire. Random mispredictions and exceptions are injected. Every
  operand value is checked against a golden in-order model, exactly RD_LAT cycles after
  the read. At the end the testbench reads all logical registers and checks the register
  accounting. It also requires each mechanism to have occurred at least once: transfers,
  reads from RF2, reads of an index live in both banks, stalls on an empty RF1 pool,
  stale releases in both banks, squashed releases in both banks, mispredictions and
  exceptions.

* `tb_dbrf_top_configs`: the same model core (`dbrf_top_harness`) around three more
  instances: C4 on the 8-wide core, and C3 and C4 on the 4-wide core. Here execution
  pauses for 50 of every 400 cycles, so the instruction window fills behind a
  long-latency event. With 64 RF1 registers the rename pool then runs dry and dispatch
  stalls. With 128 RF1 registers the 128-entry reorder buffer fills first, so no
  empty-pool stall occurs; that is the extra renaming room C4 is meant to provide.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/dbrf_pkg.sv tb/tb_dbrf_top.sv \
          --top-module tb_dbrf_top -o sim
./obj_dir/sim
```

The same pattern works for the other testbenches. For `tb_dbrf_top_configs`, add
`-Itb` so that `dbrf_top_harness.sv` is found. Each testbench runs in a few seconds at
most. Assertions in the RTL flag protocol
errors: a transfer into a busy RF2 register, a register returned to the pool twice, a
misprediction on a dead or completed entry, and a dispatch in the cycle of a map
restore.

## Limits

* Only the register file subsystem is RTL. The issue queue (including the flag update
  of its held tags), the functional units, the bypass network and the front end are
  modelled only in the top-level testbench.
* Access time and the IPC effect of the organization are properties of a physical
  implementation and of a full core; neither is measured here.
