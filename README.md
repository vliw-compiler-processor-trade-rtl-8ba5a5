# DISVLIW: a VLIW processor that schedules each slot dynamically

A plain VLIW machine issues a long instruction as a unit: the next long
instruction cannot start until every slot of the current one has finished,
so one slow operation (a multi-cycle floating-point divide, say) holds up
the whole machine, and the compiler must pad empty slots with NOPs.

DISVLIW ("Dynamically Instruction Scheduled VLIW") keeps the VLIW object
code, produced by an ordinary VLIW compiler, compacts away the NOPs, and
adds two small bit vectors to every slot that say which *other* functional
units it must wait for and which will wait for it. In hardware each
functional unit gets its own instruction queue, a small set of counters and
a scheduler, so the units slip against each other and each instruction
starts as soon as the instructions it actually depends on have finished,
not when the whole previous long instruction has.

This repository is synthesizable SystemVerilog (IEEE 1800-2017) for that
processor in its main configuration: four functional units (two integer,
two long-latency), a 16 KB direct-mapped instruction cache with a 4-cycle
miss penalty, a perfect data cache, a BTB and speculative execution past
one predicted branch.

## The dependency bits

Every slot of a long instruction carries, next to its 32-bit instruction,

* `dpre`: one bit per other unit; bit set = "an earlier instruction on
  that unit must finish before I may start";
* `dpost`: one bit per other unit; bit set = "a later instruction on that
  unit waits for me".

With N units each vector has N-1 bits. Bit k of a vector held by unit f
names unit k if k < f and unit k+1 otherwise (`dep_fu`/`dep_bit` in
`disvliw_pkg`). Dependencies between instructions of the *same* unit need
no bits: a unit runs its queue in order.

The compiler must pair the bits exactly: every `dpost` bit from unit P to
unit C is matched, in program order, by one `dpre` bit for P in a later
instruction of C. It covers read-after-write, write-after-read and
write-after-write hazards between units. The hardware trusts the bits.

## Dependency counters and the scheduler (the core mechanism)

Each unit f has a dependency counter block `DC_f` with N-1 counters, one
per other unit g. They count "announcements from g not yet consumed by f":

* **announce** — in the *last* EX cycle of an instruction on unit g, for
  every bit set in its `dpost`, the counter for g in the named unit's DC is
  incremented (visible the next cycle);
* **consume** — when unit f issues an instruction, the counters named by
  its `dpre` are decremented.

The scheduler `DS_f` issues the instruction at the head of queue f when,
for every other unit k, `d_k = !dpre[k] || C_k > 0`, the AND of all `d_k`
(the *check signal*) is 1, and unit f is free. Because counters count, a
producer may announce several times before its consumers catch up.

Timing of a dependent pair on two units: producer issues in cycle t, its
last EX cycle is t+L (L = latency), the counter is non-zero in t+L+1, and
the consumer issues in t+L+1 and reads the operand through the write-back
bypass. Integer operations have L = 1, so a dependent chain across units
issues every second cycle; within one unit it issues every cycle (the
unit forwards its own last-EX result).

## Pipeline

| Stage | What happens |
|-------|--------------|
| F   | `fetch_unit` reads one long instruction per cycle from `icache`, writes each non-NOP slot to its unit's `iq`. Any full queue or a cache miss holds the whole long instruction. |
| D/S | per unit: `dyn_sched` checks the head against `dep_counter`; on issue the operands are read from `regfile` (with bypass) and the `dpre` counters decremented. |
| EX  | `func_unit`: 1 cycle for integer, load, store and branch; `FADD_LAT` (4) cycles for FADD/FSUB, `FMUL_LAT` (6) for FMUL, `MUL_LAT` (4) for MUL, 32 for DIVU/REMU. Not pipelined. Announces in its last cycle. |
| WB  | result written to the register file. |

## Branches and speculation

The BTB (16 entries, 2-bit counters) predicts the next long-instruction
address for a long instruction that holds a branch. Everything fetched
after that branch is *speculative* and tagged so in the queues.

While the branch is unresolved, the register file and all DCs are updated
in a temporary copy (the "shadow"): non-speculative instructions update
both copies, speculative ones only the shadow. Speculative instructions read
the shadow. When the branch resolves in its unit:

* prediction right (**commit**): shadow copied into the main register file
  and DCs in one cycle, all tags cleared;
* prediction wrong (**mispredict**): main copied into the shadow, tagged
  queue entries and tagged instructions in EX/WB dropped, fetch restarts at
  the correct address.

The BTB is updated either way. Memory has no shadow, so a speculative
store waits at its queue head until the branch resolves. Only one branch
may be unresolved: a second long instruction with a branch waits in fetch.

## Instruction set (this design's own)

`op[31:26] rd[25:21] rs1[20:16] rs2[15:11]` or `imm[15:0]`; 32 registers of
64 bits, r0 = 0. One register file holds both integers and doubles; memory
words are 64 bits (byte addresses, 8 bytes per word).

| Class | Ops | Unit |
|-------|-----|------|
| ALU | ADD SUB AND OR XOR SLT SLL SRL (rd = rs1 op rs2), ADDI, LUI (imm << 16) | integer |
| Memory | LW rd,imm(rs1); SW rd,imm(rs1) (stores R[rd]) | integer |
| Branch | BEQ/BNE rd,rs1,target; JMP target (absolute long-instruction address) | integer |
| Floating point | FADD FSUB FMUL (IEEE 754 double, round to nearest even) | long-latency |
| Long integer | MUL (64-bit product), DIVU, REMU (on the low 32 bits) | long-latency |
| Control | NOP (slot skipped), HALT (stops fetch) | — |

## Files

| File | Block |
|------|-------|
| `rtl/disvliw_pkg.sv` | shared types, opcodes, slot/queue-entry structs, event counters |
| `rtl/disvliw_top.sv` | the processor |
| `rtl/fetch_unit.sv` | F stage, branch speculation control |
| `rtl/icache.sv` | direct-mapped instruction cache, miss penalty |
| `rtl/btb.sv` | branch target buffer |
| `rtl/iq.sv` | per-unit instruction queue with speculative flush |
| `rtl/dep_counter.sv` | per-unit dependency counters with shadow copy |
| `rtl/dyn_sched.sv` | per-unit dynamic scheduler (check signal) |
| `rtl/func_unit.sv` | functional unit, EX and WB stages |
| `rtl/fpu_dp.sv` | double-precision add/subtract/multiply datapath |
| `rtl/regfile.sv` | register file with shadow copy and bypass |
| `rtl/dmem.sv` | perfect data cache (multi-port memory) |

Top-level parameters: `IQ_DEPTH` (4), `ICACHE_BYTES` (16384),
`MISS_PENALTY` (4), `BTB_ENTRIES` (16), `MUL_LAT` (4), `FADD_LAT` (4),
`FMUL_LAT` (6), `DMEM_WORDS` (1024),
`LONG_MASK` (4'b1100: units 2 and 3 are long-latency).
`MISS_PENALTY = 0` gives a perfect instruction cache: no storage, every
fetch is answered by the instruction memory in the same cycle. The unit count
`N_FU` = 4 is a package constant because the slot format depends on it.

The top's ports: an instruction-memory refill port (`imem_*`, data
expected in the same cycle), debug reads of a register and a data word,
`done` (HALT fetched and everything drained), per-unit issue strobes and a
`perf_t` struct of event counters (cycles, issues, stalls by cause, cache
misses, commits, mispredicts, forwards).

## Simulation

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5:

    verilator --binary --timing --assert --top-module tb_disvliw_top \
        rtl/disvliw_pkg.sv rtl/*.sv tb/tb_disvliw_top.sv -o sim
    ./obj_dir/sim

* `tb_disvliw_top` — the whole processor at default parameters, running a
  generated program (queue-filling divides, a five-iteration loop with a
  speculative store, a long-latency epilogue, a dependent chain of
  double-precision FMUL, FADD and FSUB across the two long units). Checks
  final registers and memory, the issue distance of dependent pairs
  (multiply to add `MUL_LAT + 1`, FMUL to FADD `FMUL_LAT + 1`), the number of commits and mispredicts, and that each
  mechanism (queue full, dependency stall, busy stall, speculative store
  hold, cache miss, branch hold, speculative issue, commit, mispredict,
  own-unit forward, WB bypass) occurred. About 300 cycles.
* `tb_cache_sizes` — the same processor with 8, 16 and 32 KB instruction
  caches and with a perfect one, on a 600-long-instruction loop run three
  times: 8 KB takes conflict misses on every iteration (6643 cycles), 16 and
  32 KB take only the cold misses (4830), the perfect cache none (1812).
* `tb_kernel_dot` — a double-precision inner product of 32 elements (the
  inner loop of a matrix multiply), hand-written as DISVLIW code: loads in
  units 0 and 1, FMUL in unit 2, FADD in unit 3. The result must be
  bit-exact, and in the steady state an iteration takes
  `FMUL_LAT + FADD_LAT + 2` = 12 cycles, the FMUL → FADD → FMUL dependence
  cycle (the FADD must read r6 before the next FMUL overwrites it).
* `tb_kernel_hydro` — the Livermore "hydro fragment"
  `x[k] = q + y[k]*(r*z[k+10] + t*z[k+11])` on 16 elements, with its
  floating-point work split over both long units so that they execute in
  the same cycles and slip against each other; all results bit-exact. Its
  header explains which register reuses need their own dependency bits and
  which are already ordered by other dependences, which is the part of
  writing DISVLIW code that is easiest to get wrong.
* `tb_fpu_dp` — about 94,000 additions, subtractions and multiplications
  (random, cancelling, widely separated, halfway and special operands)
  against the simulator's own double arithmetic.
* `tb_<block>` — one per block, each against an independent model.

Programs in the testbenches are written with a `put(pc, unit, op, rd, rs1,
imm, pre_units, post_units)` helper that turns sets of units into `dpre` and
`dpost` vectors; copy it to write new programs.

## Where this design departs from, or adds to, the description it follows

* **Floating-point units.** The described machine has two floating-point
  units with latencies of 1 to 32 cycles and runs double-precision code;
  its example uses add, subtract and multiply on doubles. Here the two
  long-latency units do IEEE 754 double FADD, FSUB and FMUL, plus integer
  MUL, DIVU and REMU; the 32-cycle divide gives the top of the latency
  range. There is no floating-point divide, square root or conversion, and
  subnormal numbers are flushed to zero. Latencies are this design's
  choice.
* **Comparator.** The described comparator is true when `dpre` and the
  counter are both 0 or the counter exceeds `dpre`; here `dpre = 0` passes
  regardless of the counter, so that announcements waiting for a later
  instruction do not block an independent one.
* **Temporary copies** are kept equal to the originals at all times
  instead of being copied when a prediction is made; the resulting state is
  the same.
* **Mispredict flush** removes only the queue entries fetched after the
  branch; older instructions still queued (units slip) are kept.
* **Choices where nothing is specified:** instruction encoding and opcode
  set, queue depth 4, 4-bit counters (asserted never to overflow), BTB
  size and 2-bit prediction, one outstanding branch, speculative stores
  held, operand bypass/forwarding, HALT, 64-bit registers shared by integer
  and floating-point values, data memory of 1024 words, cache
  line = one long instruction (16 KB counts the 4-byte instructions only;
  tags and dependency bits are extra; with one line per set the listed LRU
  policy has nothing to choose).
* **Not built:** the compiler (VLIW scheduling, compaction, dependency
  insertion) and main memory (the testbenches model it); the baseline VLIW
  and superscalar-VLIW machines the design is compared with. The benchmark
  programs themselves need the compiler; two Livermore-style kernels are
  hand-coded in the testbenches instead.
