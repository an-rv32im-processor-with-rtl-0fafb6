# RV32IM pipeline with fuzzy branch prediction and selective execution

This is a five-stage RV32IM processor. A fuzzy-logic unit predicts each
conditional branch and also says how sure it is. That confidence decides
what the pipeline does with the branch:

- A confident prediction is followed speculatively. If it is right, the
  branch costs nothing.
- An unsure prediction is held. Fetch waits until the branch resolves, so no
  wrong-path instruction is ever started for it.

A real-time mode holds every branch. Branch timing then no longer depends on
the predictor, which makes execution time easier to bound.

The branch predictor is the FLBPU (fuzzy logic branch prediction unit). The
hold-or-speculate decision is made by the SET (selective execution
technique) controller. Both are described in detail below, because they are
the unusual parts. The rest is a conventional in-order pipeline with
forwarding.

## Pipeline at a glance

```
 IF ──► ID ──► EX ──► MEM ──► speculative buffer ──► WB
 │      │      │
 │      │      └─ ALU, M unit, branch/jump resolution, redirect
 │      └─ decoder, register file, dependency checker
 └─ PC, instruction memory, FLBPU prediction, SET decision
```

- **Fetch.** The FLBPU looks at the fetched word in the same cycle. For a
  conditional branch it gives a direction, a target and a confidence
  (0..127). The SET controller then decides whether to follow the predicted
  path or stop fetching.
- **Decode.** This stage reads the register file, which writes through to
  same-cycle reads. It also runs the dependency checker, which sorts operand
  relations into seven classes (see below).
- **Execute.** Forwarding muxes pick each operand from MEM, from WB or from
  the register file. The ALU, the M unit and the branch comparison all work
  here, and branches and jumps resolve here.
  - A redirect flushes decode and execute and costs two cycles. It happens
    for a mispredicted speculated branch, a held branch, JAL and JALR.
- **Memory.** The data memory has byte, halfword and word access, with sign
  or zero extension on loads.
- **Speculative buffer.** This small FIFO sits between MEM and WB. It holds
  results that belong to a speculated branch which has not yet resolved. A
  result commits in order once its branch is known to be right, or is
  dropped if the branch was wrong.
- **Writeback.** The result is written to the register file.

## FLBPU: how a prediction is formed

The FLBPU has three parts.

**Global history register (`ghr`).** An 8-bit shift register holds the last
eight branch outcomes. A classifier puts the history into one of six pattern
classes:

| Class             | Code | Condition                                       |
|-------------------|------|-------------------------------------------------|
| learning          | 100  | fewer than four branches seen since reset        |
| all not taken     | 000  | no taken outcome in the valid history bits       |
| all taken         | 111  | every valid history bit is taken                 |
| alternating       | 010  | the last four outcomes are 0101 or 1010          |
| mostly taken      | 110  | taken is the majority of the valid bits          |
| mostly not taken  | 101  | otherwise                                        |

**Fuzzy inference engine (`fie`).** The engine is purely combinational.

1. *Fuzzification.* Four inputs become strengths on a 0..127 scale, where
   127 means "certainly taken":
   - history: 0x20 per taken outcome, capped at 0x60;
   - pattern class;
   - branch kind, from funct3: BEQ 0x60, BNE 0x75, and so on;
   - branch direction: backward 0x70, forward 0x20.
2. *Rules.* Each rule fires with the minimum of its inputs (fuzzy AND). Each
   rule has a single output value:
   - history says not taken → 0x10;
   - alternating history → the opposite of the last outcome;
   - history says taken → 0x70;
   - backward branch of a loop-like kind → 0x6C;
   - branch kind alone, at half weight → the kind's own strength.

   The rule with the largest firing strength is reported as `rule_fired`.
3. *Defuzzification.* The result is the weighted average of the rule outputs:
   the sum of (firing × output) divided by the sum of firings. It uses a real
   divider. During learning phase 1 a boost of 0x08 is added, and the result
   saturates at 127.

**Branch target buffer (`btb`).** The BTB has 64 fully associative entries.
Each entry holds a full-PC tag and a target. Replacement is true LRU: every
entry keeps an age, and the ages always form a permutation of 0..63. On a
miss the target is computed as PC + B-immediate, so a cold branch can still
be followed.

**Decision, confidence and adaptation (`flbpu`).**

- A branch is predicted taken when the strength is at least the dynamic
  threshold.
- Confidence is `2·|strength − threshold|`, saturated at 127.

The threshold starts at 0x40 and stays within 0x20..0x60. Each misprediction
moves it by 0x0B towards the real outcome: down after a missed taken branch
(0x40 → 0x35), up after a missed not-taken one.

The unit has three learning phases:

- phase 0 for the first three branches;
- phase 1 while accuracy is below 50 %;
- phase 2 after that.

After four mispredictions in a row, *emergency learning* starts. The
threshold goes back to 0x40. Until the next correct prediction, each branch
is predicted from its direction alone (backward = taken) with zero
confidence, which makes SET hold it.

The history, BTB and threshold all update on the clock edge after the branch
resolves in execute.

## Selective execution (SET)

`selective_exec` allows one outstanding branch at a time. It has these
states:

- **NORMAL.** When a conditional branch leaves fetch, it is *speculated* if
  all of these hold:
  - the processor is in high-performance mode;
  - the confidence is at least `CONF_HI` (24);
  - neither operand waits on a load or divide still in flight.

  Otherwise the branch is *held*.
- **SPECULATE.** Fetch continues down the predicted path. A second branch
  waits in fetch until the first one resolves.
- **HOLD.** Fetch stops. When the branch resolves in execute, the redirect
  goes straight to the correct path.
- **CONSERVATIVE.** This is reported instead of NORMAL while the confidence
  needed is doubled. It starts after two outstanding branches in a row had
  the wrong direction from the FLBPU, and ends at the next correct one.

Each speculated branch gets a new 5-bit tag. Instructions fetched in its
shadow carry that tag through the pipeline, into the speculative buffer.

The trade-off: a held branch always costs the two redirect cycles, even
when the prediction was right. Speculation saves those cycles but risks a
flush. Real-time mode (`mode_rt = 1`) holds everything, so every branch
costs the same.

## Dependency classes and hazard control

`dependency_checker` compares the decode-stage sources with the destinations
in EX, MEM and WB. It reports seven classes, from least to most severe:

- none;
- write-after-write;
- read-after-write on WB;
- read-after-write on MEM;
- read-after-write on EX;
- control: the instruction is in the shadow of an unresolved branch;
- load-use.

It also produces the per-operand match flags that drive forwarding.

`hazard_unit` turns those flags into forwarding selects:

- `10` forwards from MEM. MEM wins over WB when both match.
- `01` forwards from WB.
- `00` reads the register file.

It applies stalls and flushes in this priority order:

1. divide busy: stall IF/ID/EX and send a bubble to MEM;
2. redirect from EX: flush ID and EX;
3. load-use: stall IF/ID for one cycle and send a bubble to EX;
4. SET: stall fetch alone.

`hazard_state` is `{flush, stall}`.

## M extension

- MUL, MULH, MULHSU and MULHU take one cycle. The unit uses one 33×33 signed
  multiplier.
- DIV, DIVU, REM and REMU use a restoring divider. The result comes 33
  cycles after the start, and the pipeline stalls for that time.
- Division by zero and the signed overflow case (INT_MIN / −1) return the
  values the RISC-V specification defines.

## Files

All shared types are in `rtl/rv_pkg.sv`, including:

- the control word;
- the pattern, dependency and SET state enums;
- the speculative-buffer entry;
- `perf_t`, the performance counters;
- `events_t`, one strobe per mechanism per cycle.

| Module | Role |
|---|---|
| `rv32im_flbpu_top` | the pipeline; instantiates everything below |
| `flbpu`, `ghr`, `fie`, `btb` | branch prediction |
| `selective_exec` | SET state machine |
| `dependency_checker`, `hazard_unit` | dependence classes, forwarding, stalls/flushes |
| `spec_buffer` | tagged in-order commit between MEM and WB |
| `decoder`, `regfile`, `alu`, `muldiv` | RV32IM datapath |
| `instr_mem`, `data_mem` | 256-word memories, loadable from the top's ports |
| `perf_monitor` | cycle, retire, branch, prediction, stall, flush, forward and BTB counters |

**Top-level interface.**

- Inputs: `clk` and `rst_n` (asynchronous, active low). `mode_rt` selects
  real-time mode.
- Memory loading: `imem_we/waddr/wdata` and `dmem_we/waddr/wdata` load the
  memories while reset is held.
- Debug: `dbg_reg_addr` / `dbg_reg_data` read any register.
- Outputs: `perf` (counters) and `events` (strobes). `prediction_accuracy`
  is a percentage. `dynamic_threshold`, `set_state` and `hazard_state` show
  the current state.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. With
Verilator 5:

```
verilator --binary --timing -Wno-fatal rtl/rv_pkg.sv tb/tb_rv_pkg.sv rtl/*.sv \
          tb/tb_rv32im_flbpu_top.sv --top-module tb_rv32im_flbpu_top -Mdir obj -o sim
./obj/sim
```

Swap in another testbench name to run another block. `tb/tb_rv_pkg.sv`
contains:

- a small RV32IM assembler (one function per instruction);
- the test program;
- a reference instruction-set simulator.

The end-to-end test `tb_rv32im_flbpu_top` uses the top with its default
parameters.

**The test program.** It runs three times around an outer loop and mixes:

- a sum, store and load loop that includes a load-use pair;
- an alternating-outcome branch;
- a branch driven by an xorshift pseudo-random sequence;
- a run of branches on the bits of a constant, which triggers emergency
  learning;
- multiply, divide and remainder;
- a call and return through JAL/JALR;
- halfword stores and loads.

**How the test checks it.**

1. It runs the program in high-performance mode, then again in real-time
   mode.
2. After each run it compares every register and every data-memory word
   with the reference simulator.
3. It checks the retired-instruction and branch counts.
4. It checks that real-time mode never speculates and takes more cycles.
5. It counts every strobe in `events`. Any mechanism that never fired counts
   as a failure.

Typical output:

```
mode_rt=0: 688 instructions in 1322 cycles (IPC x1000 = 520), 174 branches, 114 correct (65%), speculated 39 held 135 mispredict flushes 11
mode_rt=1: 688 instructions in 1375 cycles (IPC x1000 = 500), 174 branches, 114 correct (65%), speculated 0 held 174 mispredict flushes 0
```

**A 32-branch workload.** `tb_workload_32br` runs a short program: 83
instructions plus a final self-jump, with 32 conditional branches.

- A counted loop sums 1..12, giving 12 backward branches.
- A loop of 10 iterations counts its odd iterations. It has a forward branch
  that alternates between taken and not taken, plus the loop branch.

The test checks the results against the reference simulator and prints the
accuracy after branches 4, 15, 24 and 32:

```
mode_rt=0: 83 instructions and the final jump in 122 cycles, IPC x1000 = 688; 21 of 32 correct
  accuracy after branch 4: 100%, 15: 86%, 24: 75%, 32: 65%
  learning duration 12 cycles, BTB hits 28, mispredict flushes 3
mode_rt=1: 83 instructions and the final jump in 152 cycles, IPC x1000 = 552; 21 of 32 correct
```

The learning duration is the cycle at which the accuracy first reached
50 %.

The first four branches are all predicted correctly. They are backward loop
branches, which the backward-branch rule already favours before any
history exists.

## Departures and limits

- **Prediction quality.** The fuzzy membership values, rule set, threshold
  update and learning phases are a reconstruction. They have not been tuned
  to a particular accuracy. On the test program above the predictor reaches
  about 65 %, because a third of its branches are pseudo-random by design.
  The original design reports 81 % after 32 branches of its own test
  program, which is not available. Expect different accuracy and IPC
  figures.
- **Speculative buffer in this pipeline.** Branches resolve in EX, before
  any younger instruction reaches MEM. So the buffer in the processor never
  has to wait: wrong-path instructions are flushed earlier, in ID and EX.
  The buffer's holding and squash paths are tested on their own in
  `tb_spec_buffer`. In the processor it only tags and commits.
- **One outstanding branch.** SET tracks a single unresolved branch. A
  second branch waits in fetch.
- **Memories.**
  - Sizes: both memories are 256 words, chosen for the test programs.
  - Access: reads are asynchronous, writes are synchronous.
  - Alignment: misaligned accesses are not trapped.
  - Reset: data memory is not reset, so load it before use.
  - System instructions: ECALL, EBREAK, FENCE and CSR instructions run as
    no-ops.
- **Not covered.** FPGA-specific matters are outside the RTL: clocking,
  I/O and power.
- **Synthesis.** Yosys maps the whole processor to about 2,400 generic
  cells and about 6,900 flip-flop bits. Most of the flip-flops are the
  BTB's 64 entries of full 32-bit tags and targets.
