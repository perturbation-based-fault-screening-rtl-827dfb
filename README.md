# Invariance-based fault screener

A soft error that flips a bit in a result register often leaves a visible mark
in the program's data: an address or value that no longer fits the pattern the
same static instruction has followed so far. This unit watches for such
*perturbations* in the memory instructions of an out-of-order processor. When
it sees one, it asks the processor to flush the pipeline from the offending
instruction, using the same recovery path as a branch misprediction. A
perturbation caused by the program itself (a new phase, new input data) simply
happens again after the re-execution, and costs only the flush. A perturbation
caused by a transient fault usually does not come back, so the fault is removed
before it reaches architectural state.

The pattern the screener checks is **bit invariance**. For every static
instruction it remembers which bits of its results have ever changed, and which
bits of the difference between consecutive results have ever changed. A change
in a bit that has been stable until now is a perturbation. This representation
is compact and has a low false-positive rate: each bit can raise at most one
warning before it is marked variant. Masks only ever gain variant bits, though,
so the tables are wiped every 10 million instructions. That way the screener
keeps up with the program's phases instead of slowly going blind.

## What is screened

| quantity            | table         | entries | width  | used by        |
|---------------------|---------------|---------|--------|----------------|
| effective address   | address table | 1024    | 32 bit | loads, stores  |
| store data          | data table    | 512     | 64 bit | stores         |

Only memory instructions are screened, which keeps the tables small and
reduces aliasing. Loaded values are not screened: memory is taken to be
protected by its own ECC. Both tables are direct-mapped and indexed by the low
bits of the instruction address (10 bits and 9 bits). They have **no tags**.
Two static instructions that share an index share one entry, so their masks
merge. Aliasing therefore makes the screener miss faults, but it never makes
it raise false alarms on its own account. A table entry is updated when the
instruction executes, speculatively, and is never rolled back: wrong-path
instructions train the tables too.

## How one entry evolves

An entry holds the last value `L`, the last delta `D`, a value mask `VM` and a
delta mask `DM`. A mask bit of 1 means "this bit has varied". For a new result
`V`:

```
delta      = V - L                      (modulo 2^W)
warn_value = |((V ^ L)     & ~VM)       a stable value bit changed
warn_delta = |((delta ^ D) & ~DM)       a stable delta bit changed (from the 3rd result on)
VM |= V ^ L;  DM |= delta ^ D;  L = V;  D = delta
```

The first result of an instruction only records `L`. The second one sets the
first delta `D` with no delta check. Example, for a load walking an array with
stride 8:

| result | V      | delta | VM (new bits) | DM   | warning         |
|--------|--------|-------|---------------|------|-----------------|
| 1      | 0x1000 | –     | 0             | 0    | –               |
| 2      | 0x1008 | 8     | bit 3         | 0    | value (bit 3)   |
| 3      | 0x1010 | 8     | bit 4         | 0    | value (bit 4)   |
| 4      | 0x1018 | 8     | –             | 0    | none            |
| 5      | 0x1019 | 1     | bit 0         | 0x9  | value and delta |

Warnings 2 and 3 are the natural perturbations of a growing index. They stop
once the low address bits are all variant. The delta mask is what catches
result 5, where a fault shows up as a broken stride.

## Pipeline and timing (`inv_table`)

Each table accepts one request per cycle and never stalls:

| cycle | action                                                                 |
|-------|------------------------------------------------------------------------|
| t     | request presented; entry array read (synchronous read port)            |
| t+1   | entry checked and merged (`inv_check`), written back at the end of t+1 |
| t+2   | registered verdict: `rsp_valid`, tag, value/delta warnings             |

When an instruction hits the index written in the previous cycle, the array
read is stale. A one-entry forwarding register then provides the entry just
written. The entries are plain memory with no reset. One valid bit per entry,
held in flip-flops, marks which entries hold data, and clearing those bits
empties the whole table in one cycle. A clear takes effect at the end of the
cycle it is high in. The request in its second stage during that cycle still
reports its verdict, but its write-back is dropped. The request being read in
that cycle sees an empty entry.

A verdict after 2 cycles is well within the budget the screener has. A fault
must be caught before the faulty instruction commits, which on a Pentium
III-class pipeline leaves about 8 instructions.

## Periodic reset (`reset_timer`)

The pipeline reports how many instructions it counted in each cycle
(`inst_count`, 0–7; retired instructions are the natural choice). The timer
adds them up and pulses `clear` for one cycle each time the total crosses a
multiple of `RESET_INTERVAL` (10,000,000). The surplus of the crossing cycle is
carried into the next period. `clear` is registered, so it is high in the cycle
after the crossing. `RESET_INTERVAL = 0` turns resetting off. This is the
non-resetting variant, which detects noticeably fewer faults on programs with
phase changes (see the workload testbench below).

## Top level: `fault_screener`

```
mem_valid, mem_is_store, mem_pc[31:0], mem_addr[31:0], mem_data[63:0], mem_tag[7:0]
        |                                   (one memory instruction per cycle, at execute)
        +--> u_addr : inv_table 1024 x 32   (address of loads and stores)
        +--> u_data : inv_table  512 x 64   (data of stores only)
inst_count[2:0] --> u_timer : reset_timer --> clear both tables
                                 |
screen_valid, screen_tag, flush_valid, flush_cause, screen_clear   (2 cycles later)
```

| port           | dir | width | meaning                                                        |
|----------------|-----|-------|----------------------------------------------------------------|
| `mem_valid`    | in  | 1     | a load or store executes this cycle                            |
| `mem_is_store` | in  | 1     | it is a store; its data is screened too                        |
| `mem_pc`       | in  | 32    | instruction address (low bits index the tables)                |
| `mem_addr`     | in  | 32    | effective address                                              |
| `mem_data`     | in  | 64    | store data (ignored for loads)                                 |
| `mem_tag`      | in  | 8     | pipeline tag of the instruction, e.g. reorder-buffer index     |
| `inst_count`   | in  | 3     | instructions counted this cycle, drives the reset period       |
| `screen_valid` | out | 1     | verdict for the instruction presented two cycles earlier       |
| `screen_tag`   | out | 8     | its tag                                                        |
| `flush_valid`  | out | 1     | perturbation found: flush from this instruction                |
| `flush_cause`  | out | 4     | `{addr_value, addr_delta, data_value, data_delta}` warnings    |
| `screen_clear` | out | 1     | the tables are cleared this cycle                              |

The processor acts on `flush_valid` the way it acts on a mispredicted branch:
it squashes the tagged instruction and everything younger, then refetches. That
recovery logic belongs to the processor and is not part of this RTL.

**Flush and replay.** The tables have already been updated with the
perturbing value by the time the flush request appears. On re-execution the
value bits therefore match, and a natural perturbation is accepted. The delta
is different, though: a replay sees a delta of 0, so it can raise one more
delta warning if the previous delta had bits not yet marked variant. In the
end-to-end testbench about one replay in six is flagged again this way. The
execution after that sees the same value and a zero delta again, so it is
accepted unless an aliasing instruction changed the entry in between.
Warnings cannot go on forever in any case. Every warning marks at least one
more mask bit as variant, so one entry can raise at most 2·W warnings between
two clears.

An assertion in the top checks that a store's data verdict always comes in the
same cycle as its address verdict, with the same tag.

Parameters (`fs_pkg.sv` holds the defaults):

| parameter        | default    | meaning                              |
|------------------|------------|--------------------------------------|
| `ADDR_ENTRIES`   | 1024       | address-table entries (power of two) |
| `DATA_ENTRIES`   | 512        | data-table entries (power of two)    |
| `ADDR_W`         | 32         | address width                        |
| `DATA_W`         | 64         | store-data width                     |
| `PC_W`           | 32         | instruction-address width            |
| `TAG_W`          | 8          | tag width                            |
| `RESET_INTERVAL` | 10,000,000 | instructions between clears, 0 = off |
| `CNT_W`          | 3          | width of `inst_count`                |

Storage at the defaults is 1024 × 129 + 512 × 257 = 263,680 bits of entry
memory, plus 1,536 valid flip-flops. Each entry holds the last value, the last
delta, two masks and a delta-valid bit.

## Files

| file                        | content                                            |
|-----------------------------|----------------------------------------------------|
| `rtl/fs_pkg.sv`             | default sizes, `flush_cause_t`                     |
| `rtl/inv_check.sv`          | combinational check and update of one entry        |
| `rtl/inv_table.sv`          | one direct-mapped table with pipeline and clear    |
| `rtl/reset_timer.sv`        | periodic clear                                     |
| `rtl/fault_screener.sv`     | top level                                          |
| `tb/tb_inv_check.sv`        | directed and random checks against a bit-level model |
| `tb/tb_inv_table.sv`        | 16-entry table, random requests and clears, reference model |
| `tb/tb_reset_timer.sv`      | default, short and disabled intervals              |
| `tb/tb_fault_screener.sv`   | top at default sizes, 2M cycles against a full reference model |
| `tb/tb_screener_workload.sv`| resetting against non-resetting screener on a phased synthetic program |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/fs_pkg.sv tb/tb_fault_screener.sv \
          --top-module tb_fault_screener
./obj_dir/Vtb_fault_screener
```

Use the same command for the other testbenches, changing the file and top
name. `rtl/fs_pkg.sv` must come first wherever the package is used.

`tb_fault_screener` runs the top at its default parameters for 2 million
cycles, about 11 million instructions and one table clear. The synthetic program
has more static instructions than table entries, back-to-back hits on one
index, and injected single-bit faults. Every flagged instruction is executed
again, without its fault, the way branch recovery would re-execute it. A
reference model predicts every verdict and every clear cycle. The testbench
also requires each mechanism to happen at least once: value and delta warnings
in both tables, forwarding, aliasing, a clear, a clear with a request in
flight, and a replay.

`tb_screener_workload` runs two top instances side by side for 24 million
instructions: the default one and one with resetting off. The program jumps to
new address regions and data every 4 million instructions. On this synthetic
program the resetting screener flags about 44% of injected single-bit faults on
the faulty instruction itself, against about 22% without resetting. It gives
about 0.56 false flushes per 1000 instructions. These figures describe the
synthetic program only. They are not a measurement on real benchmarks.

## Design choices beyond the reference description

The description this RTL follows fixes the algorithm, the two table sizes and
widths, that only memory instructions are screened, the indexing by
instruction address, the speculative update at execute, the 10-million-
instruction reset and the reuse of branch recovery. The following choices are
this design's own:

- **Delta reference.** A new delta is compared with the previous delta, so
  each entry also stores its last delta. Comparing with the very first delta
  is an equally valid reading, with the same storage cost.
- **Value reference.** The value is compared with the last value rather than
  the first. Both give the same mask: a bit differs from the first value at
  some point exactly when it changed between two consecutive values.
- **Start-up.** The first result trains silently, and delta checks start with
  the third result.
- **Index and tags.** The index is taken from the low instruction-address bits,
  with no hashing and no tag.
- **Pipeline.** The two-cycle pipeline, the forwarding register and the
  one-cycle flash clear through valid bits are this design's own, as are the
  clear/in-flight rules above.
- **Interface.** One memory instruction per cycle, an 8-bit tag, the 4-bit
  cause vector and the `inst_count` interface of the reset timer are this
  design's own.

Other screeners exist and are not included: value-history, dynamic-range,
TLB-miss-based and Bloom-filter screeners. They screen the same results with
other representations of the allowed values, and are alternatives to this one.
