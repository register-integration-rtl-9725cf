# Register integration: re-using squashed results at rename

When a speculative out-of-order core recovers from a mis-prediction, it throws away every
instruction after the mistake, including many that had already computed correct results.
Often the correct path soon re-executes the same instructions with the same operands
(code after a hammock branch re-converges, for example). **Register integration** recovers
that work without re-executing it.

The idea rests on one observation. Recovery only has to restore the old register *mapping*.
It does not have to recycle the physical registers the squashed instructions wrote. If those
registers are kept alive, a re-fetched instruction can point its destination at the squashed
instance's output register instead of executing again. This is safe as long as it reads
exactly the same *physical* input registers as that instance did.

This repository holds the rename stage of such a core in synthesizable SystemVerilog, with
the structures it owns:

- the map table
- the free list
- the **integration table (IT)**
- the instruction ordering buffer (ROB)

Default sizes are those of an 8-wide machine: 64 architectural registers, a 128-entry ROB, a
256-entry direct-mapped IT and 64 + 128 + 256 = 448 physical registers. Recovery handles 8
instructions per cycle.

## How an instruction gets integrated

An IT entry describes one squashed, completed instruction instance:

| field | meaning |
|---|---|
| PC | identity of the static instruction (tag) |
| I1, I2 | physical registers it read |
| O | physical register it wrote (kept alive by the IT) |
| jump target | its resolved next PC, if it is a branch |
| memory address | its data address, if it is a load or store |

The IT is indexed by PC only. A rename slot reads the IT entry for its PC at the same time
as it reads the map table for its logical inputs. The *integration test* then compares the
entry's I1/I2 with the physical registers the instruction would read now. If the test passes:

- the destination is mapped to O, and no fresh register is allocated;
- the IT entry is removed, because O now belongs to a live instruction again;
- the instruction enters the ROB already **completed**, so it is never issued or executed;
- a branch is resolved at once from the stored jump target;
- a load or store hands the stored address to the memory ordering buffer.

If the test fails, the instruction takes the next register from the free list as usual.

### The same test across a group of eight

Within one rename group, an instruction's input may come from an earlier instruction in the
same group. Its physical input is then that earlier instruction's *output*, and that output
depends on whether the earlier instruction integrated. `integration_circuit` handles this
with the following rule.

- **Input from before the group.** The IT input must equal the map-table register.
- **Input produced by an earlier slot.** The IT input must equal the earlier slot's *IT*
  output, and that earlier slot must itself have integrated.

The circuit never compares against freshly allocated registers, because no IT entry can name
a register that was only just allocated. So a chain of dependent instructions integrates
together in one cycle, and a chain breaks exactly where an instruction fails. With a
direct-mapped IT this costs about two register comparators per input per slot, next to the
usual logical-register dependence check.

Two slots with the same IT index cannot both take the same entry: only the first may claim
it. Otherwise one physical register would end up with two live owners.

### Worked example

Take X, Y, Z, W mapped to physical registers 50, 51, 48, 49. A mis-predicted branch is
followed by `X = 1; Y++; X++; W = Y*Y; Z = X*Y`, which run and are squashed. Recovery puts
them in the IT with outputs 52 to 56.

On the correct path, the re-fetched `Y++; X++; W = Y*Y; Z = X*Y` behave as follows:

| instruction | physical inputs now | matching IT entry? | result |
|---|---|---|---|
| `Y++` | reads 51 | yes | integrates O = 53 |
| `X++` | reads 50 | no (entry read 52) | allocates 57 |
| `W = Y*Y` | reads 53, 53 (inside the group) | yes | integrates 55 |
| `Z = X*Y` | reads 57 | no | allocates 58 |

Both the circuit testbench and the end-to-end testbench replay this example.

## Who owns a physical register

Integration lets registers outlive their instructions, so ownership has to be exact or
registers leak. At any moment each physical register has exactly one of four states:

| state | who frees it |
|---|---|
| mapped by an architectural register (committed) | the ROB, when a later writer commits (old mapping) |
| owned by an in-flight ROB entry | the ROB at commit of the next writer, or at recovery if the instruction had not completed |
| owned by an IT entry | the IT, when the entry is evicted or invalidated |
| free | the free list hands it out |

The transitions:

- **Recovery.** Recovery is serial: `reorder_buffer` walks back from the youngest entry,
  8 per cycle. Each step restores the instruction's old mapping in the map table. A
  *completed* squashed instruction moves into the IT with its output register. A
  non-completed one frees its register.
- **Integration.** An integrated entry is removed from the IT without freeing O. The new ROB
  entry now owns O.
- **Eviction.** An IT entry displaced by a newer insert (direct-mapped collision) frees O.

The end-to-end testbench checks this at the end of its run. With the ROB drained, every
register must be mapped, held by the IT, or free, and none may be in two places.

## Keeping the IT honest

Matching physical input names is enough for register operands. Two further cases need help.

**Loads.** A load's inputs name only its address registers, not its memory data. Every
snoop port that carries a store address is compared with the addresses of all IT load
entries (`SNOOP_PORTS`, default 4). A match invalidates the entry and frees its register.

In this design a squashed *store* being put into the IT also invalidates matching load
entries, because that store's address is known at that point. Matching is on aligned 8-byte
words.

Once a load has been integrated, a later-arriving store address is the normal job of the
memory ordering buffer. That buffer is outside this design.

**Data mis-speculation.** When a load is squashed because it read a wrong value (a memory
ordering violation), the squash request sets `sq_excl`. The violating instruction is squashed
along with everything younger, and it alone is kept out of the IT.

Its dependents do enter the IT, but they named its (wrong) output register as an input. The
re-executed load gets a new register, so those entries can never match. The independent
work survives.

**Recycled registers** (this design's own rule). Suppose an IT entry names input register
P, and P is freed and then re-allocated to an unrelated value. A later instruction could
then read P and pass the integration test with a stale result.

To prevent this, the free list reports which registers it took back in the previous cycle
(`freed_q`). The IT invalidates every entry that names one of them as an input. With this
connection removed, the end-to-end testbench sees thousands of wrong results.

## Blocks and files

| file | what it is |
|---|---|
| `rtl/ri_pkg.sv` | default sizes, widths and the record types passed between blocks |
| `rtl/integrating_renamer.sv` | top: rename/integrate stage, stall logic, event counters |
| `rtl/integration_circuit.sv` | combinational integration test, in-group routing, output selection |
| `rtl/integration_table.sv` | direct-mapped IT, with removal, insertion/eviction, store snoop and input invalidation |
| `rtl/map_table.sv` | logical-to-physical map, with rename writes and recovery restores |
| `rtl/free_list.sv` | free-register bit vector, lowest-numbered-first allocation |
| `rtl/reorder_buffer.sv` | in-order commit, serial recovery into the IT, completion tracking |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_it_size_sweep.sv`, `tb/renamer_sweep_run.sv` | the end-to-end test repeated with 64- and 128-entry ITs |

### Top-level interface and timing

`integrating_renamer` takes a decoded group (`fe_insn[8]`) at a clock edge where
`fe_valid && fe_ready`. One cycle later it presents the renamed group on `disp[8]`. Each slot
there carries:

- physical inputs and output, and the old mapping;
- the ROB index;
- an `integrated` flag;
- for integrated branches, the stored jump target;
- for integrated loads and stores, the stored data address.

The execution core reports completions on `cpl_*`, with the ROB index, resolved target and
address. A squash is requested with `sq_en`/`sq_idx`. Here `sq_idx` is the oldest
instruction to squash: for a mis-predicted branch, the one after the branch; for a load
ordering violation, the load itself, with `sq_excl` set. Store addresses arrive on `sn_*`.

`fe_ready` is low in any of these cases:

- during recovery;
- in the cycle of a squash request;
- when fewer than 8 ROB slots are free;
- when fewer than 8 registers are free.

Commits appear on `cmt[8]` in the cycle they happen. The `ev_*` outputs count, per cycle,
each of the following:

- integrations and allocations;
- IT inserts and evictions;
- snoop invalidations and input invalidations;
- recycled non-completed registers;
- stalls.

## Where this design departs from, or goes beyond, the description it follows

- **Rename takes one cycle, then a register.** The original machine spends two cycles on
  decode/rename, and integration is expected to need at least two rename stages. The logic
  here is the same, but it is not split into pipeline stages.
- **Recovery is serial rollback**, 8 instructions per cycle. Checkpoint-based recovery is
  not built.
- **The IT is direct-mapped only.** Set-associative ITs (2-way and 4-way) were only
  alternatives and are not built.
- **Own rules, not in the description:**
  - invalidation of IT entries whose input register was recycled;
  - snoop invalidation by squashed stores entering the IT;
  - a per-cycle order inside the IT: removal, then invalidation, then inserts in recovery
    order;
  - the shape check, where an entry must have the same operand/output presence as the
    instruction;
  - only the first slot of a group may claim a given IT entry;
  - handling of an older squash arriving during recovery, which restarts the stop point;
  - commit is blocked at the squash point.
- **Encodings are this design's.** This covers register, PC and address widths, the PC bits
  used as the IT index (bits 9:2), the 8-byte snoop granule, reset contents (identity map)
  and the free-list organisation.
- **Not built:** the memory ordering buffer, fetch and decode, the register file and the
  execution core. Their interfaces are brought out as ports.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and stops itself
with a watchdog if it hangs. With Verilator 5:

```sh
# one block
verilator --binary --timing --assert -Irtl rtl/ri_pkg.sv rtl/integration_circuit.sv \
    tb/tb_integration_circuit.sv --top-module tb_integration_circuit -Mdir obj_ic -o tb
./obj_ic/tb

# the whole renamer, at the default (full) sizes
verilator --binary --timing --assert -Irtl rtl/ri_pkg.sv rtl/map_table.sv rtl/free_list.sv \
    rtl/integration_table.sv rtl/integration_circuit.sv rtl/reorder_buffer.sv \
    rtl/integrating_renamer.sv tb/tb_integrating_renamer.sv \
    --top-module tb_integrating_renamer -Mdir obj_top -o tb
./obj_top/tb
```

`tb_integrating_renamer` runs the full-size design in about a second. It does two things.

- It replays the worked example.
- It runs a random program of loads, stores, ALU operations and branches against a golden
  model until 30,000 instructions have committed.
  - It mis-predicts branches and forces excluded load squashes.
  - It checks every integrated instruction's result, target and address when it dispatches.
  - It checks every commit's PC and value.
  - It fails if any mechanism never occurred: integration, dependent in-group integration,
    IT insertion, eviction, store invalidation, input invalidation, recycling of non-completed
    registers, excluded squash, integrated load/store/branch, or rename stall.

The testbench acts as fetch and the execution core. It presents each store's address when
the store is fetched, and it ends a fetch group after a store. It does this because the
memory ordering buffer, which would catch a store address that arrives after a load was
integrated, is not part of this design. That late-store case is therefore not exercised.

`tb_it_size_sweep` runs the same end-to-end test with 64-entry and 128-entry ITs, side by side.
It needs `tb/renamer_sweep_run.sv` and `-Itb` on the same command line.

The unit testbenches compare each block with an independent model every cycle. The
integration circuit is checked against a serial one-instruction-at-a-time renamer over
20,000 random dependent groups.

### Changing sizes

Module parameters may be lowered freely: width, ROB, IT, ports. `NUM_PREGS` follows as
architectural + ROB + IT, which is the number that means no instruction ever waits for a
register.

Register-number, ROB-index and architectural-register widths come from the defaults in
`ri_pkg`. To grow a structure, change the package default, for example `DEF_IT_SIZE = 512`
(704 registers) or `DEF_ROB_SIZE = 256`, so the widths follow.
