# Comet: an explicitly pipelined RV32IM core in SystemVerilog

Comet is a small in-order RISC-V processor (RV32I plus the M extension, plus
one custom instruction pair for FFT butterflies). It was first conceived as a
processor described in C++: a cycle-accurate simulator whose main loop *is*
the pipeline. Every stage is a function, and every pipeline register is a
variable that the stage fills. One loop iteration equals one clock cycle. At
the end of the iteration an explicit stall decision says whether the
registers commit, and an explicit forwarding decision overwrites operands
that are stale. The same code, given to a high-level synthesis tool, becomes
the hardware. So the simulator and the hardware cannot drift apart.

This repository gives that design as hand-written, synthesizable
SystemVerilog. The structure is kept the same:

- five stages: Fetch, Decode, Execute, Memory and Write Back;
- four pipeline registers named after the stages they join (`FtoDC`,
  `DCtoEx`, `ExtoMem`, `MemtoWB`), each a packed struct in `comet_pkg`;
- a stall unit, a forwarding unit and a branch unit sitting beside the
  stages;
- multi-cycle operators (the divider and the two caches), each built as a
  small state machine wrapped around its datapath.

An instruction-set simulator written as a SystemVerilog class is the
reference model in the testbenches. This repeats, in a small way, the
original idea of one executable model against which the pipeline is judged.

```
          +-----------+         +--------+
          |  RegFile  |<--------| Forward|<---------------+----------+
          +-----+-----+         +---+----+                |          |
                |                   |                     |          |
 I-cache -> Fetch -> [FtoDC] -> Decode -> [DCtoEx] -> Execute -> [ExtoMem] -> Mem -> [MemtoWB] -> WB
   ^          ^                   |                 ALU/MUL/DIV/FFT            |                  |
   |          +---- Branch Unit <-+-----------------------+                  D-cache              |
 I-mem                                                                          |           (RegFile write)
                                                                              D-mem
```

## The pipeline registers

| Register | Contents |
|---|---|
| `FtoDC`  | valid, PC, instruction word |
| `DCtoEx` | valid, PC, control word (`ctrl_t`), rd, immediate, `value1`, `value2` (operands, already forwarded) |
| `ExtoMem`| valid, control word, rd, result (or effective address), store data |
| `MemtoWB`| valid, write enable, ECALL marker, rd, result |

The control word is decoded once, in Decode, and travels with the
instruction. It holds the ALU operation, the unit that produces the result
(ALU, multiplier, divider or FFT), the operand sources, the
branch/jump/load/store/ECALL flags and `funct3`.

Each stage is a combinational block that computes the *next* value of the
register after it. `comet_core` then commits all the registers together on
the clock edge, unless the stall unit holds them. The stages map to modules
as follows:

- Fetch: `fetch`.
- Decode: `decode`, plus the register-file read.
- Execute: `alu`, `multiplier`, `divider` and `fft_unit`.
- Memory: `mem_stage`.
- Write Back: the register-file write.

## Hazards: forwarding, stalls and redirects

This is the part that needs the most care. All of it lives in three small
combinational modules, and the core only applies their decisions.

**Forwarding (`forward_unit`).** Operands are resolved *when they enter
`DCtoEx`*, not inside Execute. For each source register of the instruction
in Decode, the unit picks the newest value from this list:

1. the result being computed in Execute this cycle (the instruction one
   ahead);
2. the result leaving the Memory stage (two ahead; for a load, this is the
   loaded value);
3. the register file.

Write Back (three ahead) needs no path. The register file is write-through:
a read of the register being written returns the new value. x0 is never
forwarded.

**Stalls (`hazard_unit`).** The original C++ loop holds every register on a
stall. This core does that for a cache miss only. For the other two stalls
it lets the older instructions drain, which costs fewer cycles:

| Situation | What holds | Bubble enters | Cost |
|---|---|---|---|
| Load in Execute whose rd is read by the instruction in Decode | PC, `FtoDC` | `DCtoEx` | 1 cycle |
| Division in Execute, divider not done | PC, `FtoDC`, `DCtoEx` | `ExtoMem` | 33 cycles per division |
| Load in Memory, data cache not ready (miss) | PC, `FtoDC`, `DCtoEx`, `ExtoMem` | `MemtoWB` | `LINE_WORDS + 1` cycles |
| Instruction cache not ready (miss) | nothing is held; Fetch offers an invalid slot | `FtoDC` | `LINE_WORDS + 1` cycles |

Rules for overlapping stalls:

- A cache miss takes priority over the other two stalls.
- The divider stall takes priority over a load-use stall.

The load-use case exists because a loaded value only appears at the end of
the Memory stage. The consumer waits one cycle and then receives the value
through the Memory forwarding path.

**Redirects (`branch_unit`).** There is no branch predictor: fetch always
continues at PC + 4.

- **Branches and JALR** are resolved in Execute, using forwarded operands.
  When taken, they redirect fetch and drop the two younger instructions in
  Fetch and Decode (2 cycles).
- **JAL** is recognised in Decode, where its target (PC + immediate) is
  already known. It redirects at once and drops only the instruction in
  Fetch (1 cycle).

A redirect from Execute wins over one from Decode in the same cycle. The
Decode-stage JAL is then itself on the wrong path.

**Cycle costs** (all measured by `comet_core_tb`):

| Event | Cost |
|---|---|
| Back-to-back ALU instructions | 1 per cycle |
| Load followed by a user | +1 |
| Taken branch or JALR | +2 |
| JAL | +1 |
| DIV/DIVU/REM/REMU | +33 |
| MUL family | no penalty (single cycle) |
| FFT instructions | no penalty (single cycle) |

## Multi-cycle operators

The original design describes any operator that needs several cycles as a
state machine fused with its execution logic, in one switch statement. Here
that pattern is used three times.

**Divider (`divider`).** Restoring shift-and-subtract division with three
states:

- `IDLE` loads the operand magnitudes.
- `RUN` produces one quotient bit per cycle for 32 cycles.
- `DONE` applies the signs and pulses `done`.

The latency from `start` to `done` is 33 cycles. It implements the RISC-V
corner cases:

- division by zero gives all ones for the quotient and the dividend for the
  remainder;
- `-2^31 / -1` gives `-2^31` with remainder 0.

**Caches (`cache`, used twice).** Each is direct mapped: `LINES` lines of
`LINE_WORDS` words, with a tag and a valid bit per line.

- A read hit answers in the same cycle.
- A read miss pulses `miss`. The `IDLE → REFILL` machine then copies the
  line from the memory behind, one word per cycle. The read hits on the
  cycle after the last word, so a miss costs `LINE_WORDS + 1` cycles.
- Writes go through to memory in the same cycle and never wait. They update
  the line if it is present and do not allocate one.
- Reset invalidates every line.

The instruction cache never writes.

**Multiplier (`multiplier`).** Not multi-cycle. MUL, MULH, MULHSU and MULHU
are done by one signed 33×33-bit multiply, with each operand extended
according to its signedness.

## The FFT butterfly instruction

A custom instruction pair computes one radix-2 butterfly of a fixed-point
FFT. It shows how an application-specific unit drops into the Execute stage
with no change to the rest of the pipeline.

**Data format.** A register holds one complex number: the real part in bits
31:16 and the imaginary part in bits 15:0, both signed Q1.15.

**Encoding.** R-type on the custom-0 major opcode `0001011`:

| Instruction | funct7 | rs2 | rs1 | funct3 | rd | opcode |
|---|---|---|---|---|---|---|
| `BFLY rd, rs1, rs2, k` | k (twiddle index, low 3 bits used) | b | a | `000` | rd | `0001011` |
| `BFLY2 rd` | 0 | 0 | 0 | `001` | rd | `0001011` |

**Semantics.** Let `W = W16^k = cos(2πk/16) − j·sin(2πk/16)` and
`t = W·b`.

- `BFLY` writes `a + t` to rd. It keeps `a − t` in an internal register and
  sets the unit's two-state machine from `EMPTY` to `HOLD`.
- `BFLY2` writes the kept value to rd and returns the machine to `EMPTY`.

A new `BFLY` overwrites a kept value that was never read.

**Arithmetic details.**

- The twiddle table has eight entries: `k = 0..7` of `W16`. This covers an
  8-point FFT, since `W8^k = W16^2k` and `W4^k = W16^4k`. It also covers the
  upper half of a 16-point FFT.
- The entries are cos and sin scaled by 32767 and rounded.
- Products are shifted right arithmetically by 15.
- Sums wrap at 16 bits, and there is no scaling between stages. Inputs
  therefore need headroom: for 8 points, keep them within ±2^11 (12-bit signed values), as the tests do.

Each instruction reads at most two registers and writes one, like any
R-type instruction. Forwarding, stalls and the ISA model therefore need
nothing special.

**Performance.** An 8-point decimation-in-time FFT uses 12 `BFLY` and 12
`BFLY2` instructions. Its inputs are in bit-reversed order in x1..x8, and it
works in place in the registers. In the end-to-end test, the whole program
(load 8 values, 24 butterfly instructions, store 8 values) takes 108 cycles
from reset, cold caches included. The same FFT written out in plain RV32IM,
bit-identical in its results, takes 864 cycles: a factor of 8.0.

## Halting, loading and observing

**Halting.** The core has no traps and no CSRs.

- `ECALL` (and `EBREAK`) stops fetch as soon as it reaches Decode.
- `halted` rises when the ECALL leaves Write Back, after all older
  instructions have retired.
- The core stays halted until reset.

**Top level (`comet_top`).** It holds the core, the two caches and two
word-addressed memories of `IMEM_WORDS` and `DMEM_WORDS` words.

- A host writes the program through `ext_imem_*` and the data through
  `ext_dmem_*` while `rst` is high.
- It releases reset and waits for `halted`.
- It then reads the data memory back through `ext_dmem_*`. The data cache
  writes through, so memory holds every store.
- Addresses wrap modulo the memory size.
- Loads and stores are assumed to be naturally aligned.

**Instrumentation.** `events` is a struct of one-cycle pulses:

| Pulse | Meaning |
|---|---|
| `retire` | an instruction retired |
| `load_use` | load-use stall |
| `mc_stall` | divider stall |
| `fwd_ex` | forward from Execute |
| `fwd_mem` | forward from Memory |
| `redirect_ex` | redirect from Execute |
| `redirect_dc` | redirect from Decode |
| `mul` | multiply |
| `div` | division |
| `fft` | FFT instruction |
| `imiss` | cycle waiting on the instruction cache |
| `dmiss` | cycle waiting on the data cache |

These are the counters the original C++ simulator gathers through a
per-cycle hook. A testbench or a performance-counter block can sum them.

## Parameters (`comet_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `IMEM_WORDS` | 4096 | instruction memory size in 32-bit words (16 KiB) |
| `DMEM_WORDS` | 4096 | data memory size in words (16 KiB) |
| `ICACHE_LINES` | 64 | instruction cache lines |
| `DCACHE_LINES` | 64 | data cache lines |
| `LINE_WORDS` | 4 | words per cache line (≥ 2), both caches |
| `RESET_PC` | 0 | first instruction fetched |

Memory sizes should be powers of two. Line counts must be powers of two.

## How far it follows the original, and where it departs

Taken from the original design:

- the five stages and the names of the four pipeline registers;
- forwarding into `DCtoEx` from Execute and from Memory;
- the branch unit beside Fetch and Decode;
- instruction and data caches;
- multi-cycle operators built as state machines;
- a cache-miss stall that freezes the pipeline;
- the FFT custom instruction, with its packing of two 16-bit values per
  register, a twiddle index in the instruction, a second instruction for
  the second output, and an internal state machine.

Choices made here, where the original gives no detail:

- cache organisation, sizes and write policy;
- the draining load-use and divider stalls;
- resolution of JAL in Decode and of branches in Execute;
- the restoring divider;
- the FFT number format, rounding, twiddle table and opcode;
- ECALL as a halt;
- the host ports and memory sizes.

Not included:

- the **F extension** (floating-point unit);
- **CSRs, traps and interrupts**, which were still in progress in the
  original and not synthesized there;
- **system-call emulation, ELF loading and tracing**, which belong to the
  original's C++ simulator, not to its hardware.

Without them, C programs that rely on a C library's system calls or on an
operating system do not run. Self-contained kernels do.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. A watchdog ends every run.

- **`rv_tb_pkg`** is shared by the testbenches. It holds:
  - an instruction encoder;
  - the instruction-set simulator class `rv_iss`, which runs one
    instruction at a time, with the FFT instruction computed from `$cos` and
    `$sin`;
  - a random program generator: forward-only branches and jumps,
    AUIPC/JALR pairs, loads and stores of every width, dense register
    reuse, M-extension operations and FFT instructions. Each program ends
    by dumping all registers to memory;
  - the two FFT program generators.
- **Unit testbenches.** `alu_tb`, `multiplier_tb`, `divider_tb`,
  `regfile_tb`, `decode_tb`, `branch_unit_tb`, `forward_unit_tb`,
  `hazard_unit_tb`, `mem_stage_tb`, `fetch_tb`, `fft_unit_tb`, `cache_tb`,
  `instruction_memory_tb` and `data_memory_tb`. Each compares against
  values computed independently, exhaustively or at random, and checks
  latencies where they are defined: divider 33 cycles, cache miss
  `LINE_WORDS + 1`.
- **`comet_core_tb`** models the memories itself. It:
  - measures the cycle costs in the table above by differences of run
    length;
  - runs a directed program, including the check that nothing after an
    ECALL takes effect;
  - compares 20 random programs with the instruction-set simulator while
    the instruction and data `ready` signals are toggled at random.
- **`comet_top_tb`** is the end-to-end test at default parameters. It:
  - runs the 8-point FFT with the custom instruction and compares it with
    the instruction-set simulator and with a floating-point DFT (within 8
    LSB);
  - runs the same FFT in plain RV32IM, which must give identical results
    and take more cycles;
  - runs 300 random programs.

  Every run is checked against the instruction-set simulator over the whole
  data memory and the retired-instruction count. The test counts every
  `events` pulse and fails if any mechanism never occurred.
- **Assertions.** Two assertions in `comet_core` guard the control rules:
  - a load-use stall never coincides with a divider stall;
  - no redirect happens while Fetch and Decode are held.

To simulate with Verilator 5 (for example the end-to-end test):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/comet_pkg.sv tb/rv_tb_pkg.sv \
  rtl/alu.sv rtl/multiplier.sv rtl/divider.sv rtl/fft_unit.sv rtl/regfile.sv \
  rtl/decode.sv rtl/branch_unit.sv rtl/forward_unit.sv rtl/hazard_unit.sv \
  rtl/fetch.sv rtl/mem_stage.sv rtl/comet_core.sv rtl/cache.sv \
  rtl/instruction_memory.sv rtl/data_memory.sv rtl/comet_top.sv \
  tb/comet_top_tb.sv --top-module comet_top_tb
./obj_dir/Vcomet_top_tb
```

For a unit test, replace the last source file and `--top-module` with the
unit's testbench, for example `tb/cache_tb.sv --top-module cache_tb`. Only
the packages and the modules it uses are needed. The simulations are
two-state, so every register that is read is reset.

## Files

| File | Contents |
|---|---|
| `rtl/comet_pkg.sv` | opcodes, `ctrl_t`, pipeline register structs, `events_t` |
| `rtl/comet_top.sv` | core + caches + memories + host ports |
| `rtl/comet_core.sv` | pipeline registers and stage wiring |
| `rtl/fetch.sv` | PC |
| `rtl/decode.sv` | decoder |
| `rtl/regfile.sv` | register file |
| `rtl/alu.sv`, `rtl/multiplier.sv`, `rtl/divider.sv`, `rtl/fft_unit.sv` | Execute units |
| `rtl/mem_stage.sv` | load/store alignment and extension |
| `rtl/forward_unit.sv`, `rtl/hazard_unit.sv`, `rtl/branch_unit.sv` | pipeline control |
| `rtl/cache.sv` | cache |
| `rtl/instruction_memory.sv`, `rtl/data_memory.sv` | backing memories |
| `tb/` | testbenches and `rv_tb_pkg` |
