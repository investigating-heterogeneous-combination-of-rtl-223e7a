# Criticality-steered integer back end with fast and slow ALUs

Lowering the supply voltage of a CMOS circuit cuts its energy roughly with the
square of the voltage, but it also slows the circuit down. In an out-of-order
processor, not every instruction needs the speed. Only the instructions on
the program's critical path (the longest chain of dependences) set the run
time. The others have slack and can run on slower, more efficient hardware
without delaying the program.

This RTL builds the integer execution back end of such a processor. It has
two kinds of integer ALU:

| kind | latency | supply in the intended machine | count (default) |
|------|---------|--------------------------------|-----------------|
| fast | 1 cycle | high (1.1 V), power-hungry     | 2               |
| slow | 2 cycles| low (0.7 V), energy-efficient  | 4               |

A critical path predictor labels every instruction *critical* or *not
critical* when it is dispatched:

- Critical instructions run only on fast ALUs.
- All other instructions run only on slow ALUs.

The predictor learns from what happens at issue. An instruction that is the
oldest in the instruction queue when it issues was holding everything up, so
it is counted as critical. The default mix of two fast and four slow ALUs is
the one reported as the best trade-off of performance against energy-delay
product for a six-ALU machine.

The supply voltages themselves are not part of the RTL. In this design, fast
and slow ALUs differ only in latency and throughput.

## How an instruction moves through the back end

```
            +-------------+      +----------------+
 dispatch ->| rename_unit |----->|                |  iss_valid/iss_req   +-------------+
 (4/cycle)  +-------------+      |  issue_queue   |--------------------->| alu_cluster |
            +----------------+   |  32 entries    |                      |  2 fast     |
  PC ------>| crit_predictor |-->|  steer + QOLD  |<----- result buses --|  4 slow     |
            |  CPHT + GCPH   |   +----------------+      (one per ALU)   +-------------+
            +----------------+          | iss_idx, iss_qold                 |
                  ^   ^                 +---> train CPHT, shift GCPH         |
                  |   +---- GBH <-- gshare <-- branch outcomes               |
                  +------------------------------------------ rename_unit <--+ writeback
```

1. **Dispatch.** A group of up to four decoded integer instructions is
   offered on `disp_valid`/`disp_instr`. The group is taken at the clock
   edge when `disp_ready` is high. `disp_ready` is high when the queue has a
   free slot for every valid instruction. The offered group must not change
   while `disp_ready` is low.
   - `rename_unit` gives each source either a value or the tag of the
     in-flight instruction that will produce it.
   - `crit_predictor` reads the prediction.
2. **Wait in the queue.** Operands that are not ready watch all six result
   buses.
3. **Issue.** Each ALU that can take work picks the oldest ready instruction
   of its kind. If the picked instruction is the oldest in the queue, it is
   flagged critical (QOLD). Every issued instruction trains the predictor.
4. **Execute and write back.** The result appears on the ALU's own result
   bus. This is one cycle after issue for a fast ALU and two cycles for a
   slow ALU. Waiting consumers take the value and can issue in that same
   cycle. The register file is updated if this instruction is still the
   newest writer of its destination register.

### Timing of a dependent pair

```
cycle            t          t+1         t+2         t+3
producer (fast)  selected   on bus
consumer                    selected    on bus                 -> back-to-back
producer (slow)  selected   executing   on bus
consumer                                selected    ...        -> two-cycle gap
```

"Selected" means picked by the issue queue. The operands are registered at
the end of that cycle. A slow ALU is not pipelined. It holds its operands for
both cycles, and it can accept a new instruction in the cycle its result is
on the bus. So each slow ALU starts at most one operation every two cycles.

## The critical path predictor

The predictor is a table of saturating counters, the CPHT (critical path
history table). It is indexed by a hash of the instruction address and two
global histories:

```
index = (PC >> 3) ^ GBH ^ GCPH          (11 bits for 2048 entries)
```

- **PC >> 3.** Instructions are 8 bytes apart in the instruction set this is
  sized for.
- **GBH** (global branch history). The last 8 branch outcomes. This is the
  history register of the gshare branch predictor (`gshare`). It is shifted
  when a branch outcome arrives on the `br_*` port.
- **GCPH** (global critical path history). One bit per recently issued
  instruction, giving the last 8. A bit is 1 if that instruction was found
  critical. Bit 0 holds the newest instruction.

Using both histories gives the "BOTH" predictor. Two parameters can drop
either history, which gives three other predictors:

| `USE_GBH` | `USE_GCPH` | predictor |
|-----------|------------|-----------|
| 1 | 1 | BOTH (default) |
| 0 | 1 | GCPH only |
| 1 | 0 | GBH only |
| 0 | 0 | per-address |

**Counters.** Each CPHT entry is a 6-bit saturating counter. An instruction
is predicted critical when its counter is 8 or more. Training happens at
issue, which is speculative:

- Critical (QOLD) instruction: add 8, saturating at 63.
- Any other instruction: subtract 1, saturating at 0.

Because of this asymmetry, one critical observation makes an instruction
critical again. After that, it takes 8 non-critical issues to drop below
the threshold. Reset clears all counters, so every instruction starts as
non-critical and runs on the slow ALUs.

**Training the right entry.** The index computed at dispatch travels with
the instruction through the queue. At issue it is handed back with the QOLD
flag, so the entry that made the prediction is the one trained. The
histories may have changed in the meantime, and this avoids recomputing the
index from them.

**Updating the GCPH.** Several instructions may issue in one cycle. At most
one of them can be the oldest in the queue, and that one is also the oldest
of the issued group. So the bits shifted into the GCPH each cycle are the
QOLD flag followed by one 0 for each other instruction issued.

## Steering and its consequences

Steering is strict: an instruction waits for a unit of its own kind, even if
a unit of the other kind is free. This is what makes the balance between
fast and slow units matter. If the predictor marks more work critical than
two fast units can handle, critical instructions queue up behind each other.
If a configuration has no unit of one kind (`NFAST = 0` or `NSLOW = 0`), all
instructions use the other kind.

The select logic is oldest-first within each kind. Fast units pick first, in
unit order.

## Tags, renaming and writeback

`rename_unit` keeps a register alias table: for each of the 32 architectural
registers, it records whether an in-flight instruction will write the
register, and that instruction's tag. Tags come from an 8-bit counter, one
per dispatched instruction in program order. The issue queue also uses the
tag as the instruction's age. Comparisons are done modulo 256. At most 38
instructions are in flight (32 queued and 6 executing), so this is safe.

For each source register, in order of priority:

1. An older instruction in the same dispatch group writes it: wait on that
   instruction's tag.
2. The alias table names a producer: wait on its tag. If the producer's
   result is on a result bus in this cycle, take the value instead.
3. Otherwise read the register file.

Register 0 reads as zero and is never written. An immediate replaces the
second source.

There is no reorder buffer. Results write the register file as they are
produced, but only if the tag still matches the alias table. A result
overtaken by a younger writer of the same register reaches its consumers
only through the result bus. This gives correct architectural state for a
stream without exceptions or mispredicted paths, which is what this back end
receives.

## Top-level interface (`crit_lp_core`)

| port | dir | meaning |
|------|-----|---------|
| `disp_valid[DW]`, `disp_instr[DW]`, `disp_ready` | in/in/out | dispatch group and handshake; `dinstr_t` holds pc, op, rs1, rs2, rd, use_imm, imm |
| `bp_pc`, `bp_taken`, `bp_ghr` | in/out/out | gshare prediction and the history it used |
| `br_valid`, `br_pc`, `br_ghr`, `br_taken` | in | branch outcome; `br_ghr` is the history returned with the prediction |
| `dbg_raddr`, `dbg_rdata` | in/out | register file read port for inspection |
| `idle` | out | nothing queued or executing |
| `perf` | out | event counters: cycles, dispatched, predicted critical, fast and slow issues, QOLD, bypasses, dispatch stall cycles, branches |

The operations are add, sub, and, or, xor, nor, sll, srl, sra, slt, sltu
and lui, on 32-bit data (`clp_pkg::alu_op_e`). Loads, stores, multiply and
divide are not handled here.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `DW` | 4 | dispatch width (this design's choice) |
| `IQ_ENTRIES` | 32 | instruction queue slots |
| `NFAST`, `NSLOW` | 2, 4 | ALU mix; the study varies this from 6/0 to 0/6 |
| `SLOW_LAT` | 2 | slow ALU latency |
| `CPHT_SIZE` | 2048 | predictor entries (power of two) |
| `USE_GBH`, `USE_GCPH` | 1, 1 | predictor type |
| `GSHARE_ENTRIES` | 4096 | branch predictor entries |

The counter width, increment, decrement, threshold and history lengths are
in `clp_pkg`.

## Files

- `rtl/clp_pkg.sv`: shared types (instruction, operand, queue entry,
  result bus, event counters), constants and the ALU function.
- `rtl/crit_lp_core.sv`: top level.
- `rtl/rename_unit.sv`, `rtl/issue_queue.sv`, `rtl/alu_cluster.sv`,
  `rtl/fast_alu.sv`, `rtl/slow_alu.sv`: rename, queue and execution.
- `rtl/crit_predictor.sv`, `rtl/cpht.sv`, `rtl/gcph_reg.sv`,
  `rtl/gshare.sv`: prediction.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
- `tb/tb_ref_pkg.sv`: the reference models these testbenches share.
- `tb/tb_alu_mix_sweep.sv`: runs one program on every fast/slow mix of
  six ALUs.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
also has a watchdog. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/clp_pkg.sv tb/tb_ref_pkg.sv tb/tb_crit_lp_core.sv \
    --top-module tb_crit_lp_core -o sim
./obj_dir/sim
```

For another testbench, replace `tb_crit_lp_core` with its name.

`tb_crit_lp_core` runs the top at its default size. It runs three programs
against an in-order reference model and compares all registers after each
one:

1. A 40-instruction dependence chain. Cold after reset, it runs on the slow
   ALUs in 83 cycles. After training, it runs on the fast ALUs in 43 cycles.
2. An eight-instruction data-flow graph with one long chain and side
   branches, run as a loop.
3. A random 64-instruction loop body, with branch outcomes fed to the
   branch predictor.

The testbench also checks that each of the following happened at least
once: queue-full stalls, bypasses, fast and slow issues, critical
predictions, QOLD training and branch-history updates.

`tb_alu_mix_sweep` runs one 2560-instruction program on all seven mixes,
from 6 fast / 0 slow to 0 fast / 6 slow, and checks the registers of each.
With its program, the cycle counts relative to the all-fast machine are:

| mix | relative performance | share on slow ALUs |
|-----|----------------------|--------------------|
| 6/0 | 100% | 0% |
| 5/1 | 46%  | 24% |
| 4/2 | 58%  | 40% |
| 3/3 | 65%  | 52% |
| 2/4 | 68%  | 54% |
| 1/5 | 46%  | 53% |
| 0/6 | 50%  | 100% |

The dip at 5/1 comes from strict steering. When the predictor sends more
work to one kind of ALU than that kind can absorb, the machine waits, even
though units of the other kind are free. These numbers come from one
synthetic program and show a trend only. They are not a benchmark result.

## Where this design makes its own choices

The structure sizes, latencies and predictor rules above follow the
described machine. The following are choices of this design:

- Dispatch width of four, and one issue per ALU per cycle.
- Strict steering, including the fallback when a configuration has zero
  units of one kind.
- Oldest-first select.
- Reading of the QOLD rule as "oldest in the instruction queue at issue".
  This is the only criticality detector built.
- Counter threshold taken as "at or above 8".
- Which index bits the histories are XORed into.
- PC >> 3 in the index.
- A non-pipelined slow ALU.
- The operation set.
- Tag-based renaming without a reorder buffer.
- Reset values.
- Gshare details: two-bit counters, trained at branch resolution.

Not built:

- Load/store queue and caches.
- Fetch, decode and commit.
- Dual supply and level conversion.
- Energy accounting. The `perf` counters give the split of work between
  fast and slow ALUs, from which energy can be estimated outside the RTL.
