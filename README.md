# Two RISC-V processors: a five-stage pipeline and a minimal multi-cycle core

This repository holds two independent implementations of the RISC-V base
integer instruction set (RV32I), written in synthesizable SystemVerilog. The
pipelined one also implements the multiply/divide extension (RV32IM).

- **The pipelined processor** (`pl_*`) is the main design. It is a classic
  five-stage in-order pipeline: Fetch, Decode, Execute, Mem, WB. Its
  characteristic features are:
  - the next fetch address is *predicted in Decode*;
  - a mistake is *corrected one stage later from a registered jump-or-branch
    ("JoB") value*;
  - operands are forwarded from the Mem and WB stages;
  - the only stall is the one cycle after a load.

  Sustained throughput is close to one instruction per cycle.
- **The multi-cycle core** (`mc_core`) is the opposite trade-off. It is a very
  small processor that walks each instruction through four one-hot states. It
  shifts one bit per cycle and talks to memory over a simple strobe/busy bus.
  It is meant for the smallest FPGAs. Its 24-bit address space is still large
  enough for sizeable programs.

The top level `rv_top` places both side by side. They share only the clock.

## The pipelined processor

### Stages and pipeline registers

```
          +--------- correction (JoB register, Mem stage) ----------+
          |  +------ prediction (Decode) ---+                        |
          v  v                              |                        |
 Fetch: [fetch mux]->PROG ROM==instr==> Decode: RF read ==rs1/rs2==> Execute: bypass -> ALU
          ^                                 predictor                 |  next-PC check -> JoB
          +-- PC+4                                                    v
                                                Mem: DATA RAM / CSRs ==Mres/CSR==> WB -> RF
```

| Stage | What happens | Register at its end |
|---|---|---|
| Fetch | Choose the fetch address. Priority: correction, then prediction, then PC+4. | Program memory output = Decode instruction |
| Decode | Read the register file. Predict the next PC. Check for a load-use hazard. | rs1/rs2 values, immediate, decoded controls, predicted next PC |
| Execute | Bypass, then ALU. Compute the real next PC. Compare it with the prediction. | Eres (result), memory address, store data, JoB (correction target) |
| Mem | Access the data memory. Read a CSR. Act on JoB. | Mres (read data), CSR value |
| WB | Align and sign-extend the load. Select the result. Write the register file. | — |

The program memory (`pl_prog_rom`) is read synchronously. Its output register
*is* the Decode instruction register, so a stalled Fetch simply withholds the
read enable. The data memory (`pl_data_ram`) is addressed from the E/M address
register, and its output register is Mres. The register file (`pl_regfile`)
reads into the D/E registers and is write-through: a value written by WB is
seen by the instruction that reads the register in the same cycle.

### Control: prediction, correction, stall, bypass

This is the part that needs the most care when changing the design.

**Prediction (Decode).**
- `pl_branch_predictor` decodes the instruction in Decode and, in the same
  cycle, steers Fetch.
- When it predicts a taken branch or jump, the instruction fetched in that
  cycle is the target. A well-predicted taken branch therefore costs nothing.
- Every instruction carries its *predicted next PC* down the pipeline.

**Check (Execute).**
- Execute computes the real next PC: the branch target or PC+4, the JAL target,
  or the JALR target.
- If the real next PC differs from the predicted one, Execute loads the JoB
  register with the real address.
- The check applies to every instruction, so wrong branch directions, JALR
  targets and return-stack mistakes are all caught the same way.

**Correction (Mem).**
- A set JoB register redirects Fetch and turns the instructions in Decode and
  Execute into bubbles.
- A misprediction therefore costs exactly **2 cycles**.
- The correction is taken from a register, not from the Execute comparison
  itself. This keeps the comparator and the fetch multiplexer in different
  clock cycles.
- `FAST_BRANCH = 1` (off by default) takes the correction straight from the
  Execute comparison instead.
  - Only Decode is flushed, so a misprediction costs **1 cycle**.
  - The cost is a combinational path from the bypass, through the ALU and
    the comparator, to the program-memory address.

**Load-use stall.**
- `pl_hazard_ctrl` stalls Fetch and Decode for **1 cycle** in this case:
  - the instruction in Execute is a load or a CSR read (its value appears only
    at the end of Mem);
  - and the instruction in Decode reads its destination register.
- It inserts a bubble into Execute. The consumer then receives the value from WB.
- Only registers an instruction really reads count (LUI, AUIPC and JAL read
  none; only OP, STORE and BRANCH read rs2).
- A correction overrides a stall, because the stalled instruction is then on
  the wrong path.

**Bypass.**
- `pl_bypass` picks each operand from the instruction in Mem (newest), then WB,
  then the register file. x0 is never forwarded.
- With the write-through register file, these two sources cover all
  dependences except the load-use case above.

**Worked timing.**
- Loop exit, a backward branch predicted taken but falling through: 2 bubbles.
- `lw x7,0(x3)` followed by `add x8,x7,x7`: 1 bubble.
- A call predicted in Decode (JAL, 0 bubbles) and its return predicted from the
  return stack: 0 bubbles.

### Prediction modes

The parameter `BP_MODE` (and `RAS_EN`) selects one of five predictors that trade
area for accuracy:

| `BP_MODE` | Conditional branches | JAL | Returns (`RAS_EN=1`) |
|---|---|---|---|
| `BP_NONE` | not taken | not taken | not taken (RAS unused) |
| `BP_BTFNT` (default) | taken if the offset is negative | taken | popped from the return stack |
| `BP_GSHARE` | 2-bit counter at `PC[13:2] ^ history` | taken | popped from the return stack |

**Return stack.**
- The stack holds `RAS_DEPTH` = 4 entries.
- Calls are JAL/JALR that write x1 or x5. They push PC+4 when they leave Decode.
- Returns are JALR that read x1 or x5 and write neither. They pop.
- The stack is not repaired after a flush. A wrong-path push or pop only costs
  a later misprediction.

**gshare.**
- gshare has 2^`BHT_BITS` = 4096 counters and a 12-bit global history.
- Both are updated in Execute with the resolved outcome, so they are never
  speculative.
- The counters start weakly not-taken.

The default is the static predictor with the return stack. The published
comparison of these five options gives gshare with a return stack the best
benchmark scores, at a cost of about 30% more LUTs. To switch, set
`BP_MODE` (or `PL_BP_MODE` on `rv_top`) to `rv_pkg::BP_GSHARE`.

### Multiply and divide (`pl_muldiv`, `M_EXT`)

With `M_EXT = 1` (the default), OP instructions with funct7 = 0000001 are
sent to `pl_muldiv` instead of the ALU. The unit computes:

- MUL, MULH, MULHSU and MULHU from one 33 x 33-bit signed product, whose
  operands are sign- or zero-extended as each operation requires;
- DIV, DIVU, REM and REMU on magnitudes, with the signs fixed afterwards.

Division by zero and the -2^31 / -1 overflow give the results the RISC-V
specification defines. No trap is raised.

The unit is combinational, so multiply and divide take one cycle in Execute
like any ALU operation and need no new hazard or bypass logic. It is the
simplest correct structure, but the divider is a very long path. For a
fast FPGA build, replace the divider with an iterative one and stall
Execute while it runs.

With `M_EXT = 0` the core is plain RV32I. M encodings then execute as their
RV32I look-alikes (ADD, SLL and so on).

### CSRs

`pl_csr` provides the read-only user counters:

- `cycle` at 0xC00;
- `time` at 0xC01 (equal to `cycle`);
- `instret` at 0xC02, which counts instructions leaving WB;
- their upper halves at 0xC80 to 0xC82.

Every counter is 64 bits. Any other address reads 0, and CSR writes are
ignored. The CSR value is registered in Mem like load data, so a CSR read has
the same one-cycle use penalty as a load.

### What the pipeline does not do

- There is no trap, interrupt or privileged mode.
- FENCE, ECALL and EBREAK execute as no-operations.
- Misaligned loads, stores and jumps are not detected. Sub-word accesses use
  the low address bits to pick byte lanes.
- There is no floating point.
- Program and data memories are separate. Data lives where the data memory
  decodes it (word index = address bits [15:2] at the default size).
- There is no memory-mapped I/O.

## The multi-cycle core (`mc_core`)

One-hot state register:

| State | Action | Next |
|---|---|---|
| `WAIT_ALU_OR_MEM` (after reset) | wait until the shifter and the memory are idle; write the load or shift result | `FETCH_INSTR` |
| `FETCH_INSTR` | drive PC, pulse `mem_rstrb` | `WAIT_INSTR` |
| `WAIT_INSTR` | wait for `!mem_rbusy`, latch the instruction, read rs1/rs2 | `EXECUTE` |
| `EXECUTE` | compute, write rd, update PC; start a load, store or shift | `FETCH_INSTR`, or `WAIT_ALU_OR_MEM` for loads, stores and shifts |

**Timing with a zero-wait memory:**

| Instruction | Cycles |
|---|---|
| ALU, branch, jump | 3 |
| Load, store | 4 |
| Shift by *n* | 4 + *n* (the shifter moves one bit per cycle) |

**Bus:**
- `mem_addr` carries the byte address, with `ADDR_WIDTH` = 24 significant bits.
- `mem_rstrb` is a one-cycle strobe. `mem_rdata` is taken in the first cycle
  after it in which `mem_rbusy` is low.
- `mem_wmask` is a one-cycle byte-write strobe, with the data replicated on all
  lanes. `mem_wbusy` holds the core while the write completes.

**Other behaviour:**
- The PC and every address are `ADDR_WIDTH` bits wide. AUIPC and JAL/JALR link
  values are therefore truncated to 24 bits.
- SYSTEM instructions write a 32-bit cycle counter to rd, which is enough for
  `rdcycle`.
- `reset_n` is synchronous and active low.
- rd is written once, when its value is final.

## Files

| File | Contents |
|---|---|
| `rtl/rv_pkg.sv` | opcodes, immediate decoders, predictor-mode enum, pipeline event struct |
| `rtl/pl_alu.sv` | ALU and branch comparator (single 33-bit subtract for lt/ltu/eq, barrel shifter) |
| `rtl/pl_regfile.sv` | 32x32 register file, registered reads, write-through |
| `rtl/pl_bypass.sv` | operand forwarding from Mem/WB |
| `rtl/pl_hazard_ctrl.sv` | load-use detection, stall and flush controls |
| `rtl/pl_branch_predictor.sv` | BTFNT/gshare/none + return address stack |
| `rtl/pl_muldiv.sv` | single-cycle multiply/divide unit (M extension) |
| `rtl/pl_csr.sv` | cycle/time/instret counters |
| `rtl/pl_prog_rom.sv`, `rtl/pl_data_ram.sv` | program and data memories (16384 words each by default) |
| `rtl/pl_core.sv` | the pipeline |
| `rtl/pl_system.sv` | core + memories, with a program-load port and a retirement trace |
| `rtl/mc_core.sv` | the multi-cycle core |
| `rtl/rv_top.sv` | both processors side by side |
| `tb/rv_tb_pkg.sv` | instruction encoders, reference instruction-set model `rv_iss`, random program generator `rv_progen` |
| `tb/mc_mem_model.sv` | behavioural memory with random busy cycles for `mc_core` |
| `tb/tb_*.sv` | one self-checking testbench per module |

The pipeline reports what its control did every cycle on the `ev` port
(`rv_pkg::pl_events_t`). The fields are: retire, load stall, bypass from M or
W per operand, branch and JALR resolved or mispredicted, predicted-taken
redirect, return-stack pop, correction, and multiply/divide executed. With these you can measure CPI and
prediction hit rates without looking inside the core.

## Verification

Each module has its own testbench. Each testbench ends by printing
`TB_RESULT checks=N failures=M`. The system-level tests rely on two helpers in
`tb/rv_tb_pkg.sv`.

**`rv_iss`** is an instruction-level reference model of RV32I, with the M
extension as an option.

**`rv_progen`** builds random but terminating programs. They contain:
- counted loops (backward branches);
- forward branches on random data;
- calls and returns through x1;
- computed jumps;
- loads and stores of every width into a data window;
- CSR reads;
- multiply/divide instructions (for the pipelined core only);
- dense register reuse, so that every bypass path and the load-use stall occur.

Each program ends by storing all registers, then spinning on a `jal x0,0`.

What each testbench checks:

- **`tb_pl_system`**
  - Runs a directed program whose retirement time is known exactly: 21
    instructions in 20 + 5 cycles (loop exit 2, load-use 1, forward branch 2).
  - Then runs random programs in lockstep with `rv_iss`. For every
    instruction leaving WB it compares the PC, rd and the value written.
- **`tb_pl_core`** does the same with the gshare predictor and the fast
  correction path. Its directed run must show a 1-cycle penalty.
- **`tb_mc_core`**
  - Checks the cycle count of each instruction class.
  - Then runs random programs on a memory with random wait states and compares
    the final memory with the model's.
- **`tb_rv_top`** runs both processors at once, at the default sizes. It
  requires every mechanism to have happened at least once:
  - load-use stall;
  - bypass M and W on both operands;
  - predicted redirect;
  - return-stack pop;
  - multiply/divide;
  - branch and JALR correction;
  - serial shifts;
  - bus waits.
- **`tb_pl_predictor_sweep`** is a benchmark-style workload.
  - It runs the same program on six copies of the pipelined system: one per
    predictor configuration, plus gshare with the return stack and
    `FAST_BRANCH`. The program is a fixed-point escape-time
    renderer of a 40x20 image, with a called inner function, MUL/DIV and
    data-dependent exits.
  - It checks every image against the model. It also checks the expected
    ordering: every predictor beats none, the return stack beats no
    stack, and the fast correction beats the registered one.
  - It prints CPI and hit rates. Typical output:

    | Predictor | CPI | Branch hit | JALR hit |
    |---|---|---|---|
    | none | 1.191 | 47% | 0% |
    | static (BTFNT) | 1.034 | 94% | 0% |
    | static + RAS | 1.017 | 94% | 100% |
    | gshare | 1.034 | 94% | 0% |
    | gshare + RAS | 1.017 | 94% | 99.6% |
    | gshare + RAS, `FAST_BRANCH` | 1.009 | 94% | 100% |

  - This kernel has no load-use stalls. Real benchmarks with loads give a
    higher CPI.
- **Unit testbenches** compare against independently computed values.
  - `tb_pl_muldiv` checks all eight operations on corner values (zero
    divisor, overflow, extreme values) and on random operands.
  - `tb_pl_branch_predictor` also runs a gshare instance against its own
    counter model.

### Simulating with Verilator

Example for the end-to-end test (any other testbench works the same way):

```
verilator --binary --timing --assert -Wno-fatal \
    -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/rv_pkg.sv tb/rv_tb_pkg.sv tb/tb_rv_top.sv \
    --top-module tb_rv_top -o sim
./obj_dir/sim
```

The testbenches generate their programs. No data files are needed. To run
your own program on the pipelined system, load it word by word through
`ld_we/ld_addr/ld_data` while `rst` is high. Alternatively, give
`pl_system`/`pl_prog_rom` an `INIT_FILE` for `$readmemh`. Execution starts at
address 0 when `rst` falls.

## Departures and choices worth knowing

**Default predictor.**
- The default is static BTFNT with a return stack. This is the configuration
  the pipeline diagram is annotated with.
- The published ray-tracer score (7.375) matches the gshare-with-stack
  configuration. A debugger trace of the original also shows a backward branch
  predicted not taken, which a static predictor would never do. Those runs
  were therefore made with the dynamic predictor. For comparable numbers, use
  `BP_MODE = BP_GSHARE`.
- The original's pipeline drawing marks a "fast branching" path without
  describing it. It is read here as the `FAST_BRANCH` option. The default
  keeps the registered 2-cycle correction that the original's debugger
  trace shows.
- Multiply/divide is enabled by default (`M_EXT = 1`). Use `M_EXT = 0` for
  the plain RV32I configuration.

**Sizes that are not specified.** These were chosen here:
- memory sizes: 64 KiB of program and 64 KiB of data;
- return-stack depth: 4;
- gshare table: 4096 counters, 12 history bits.

The published flip-flop counts suggest a return stack of about five 32-bit
entries.

**Write-through register file.** This is a design choice. Without it, a third
forwarding source would be needed.

**The multi-cycle core** follows its reference behaviour exactly, with these
exceptions:
- the instruction register and the cycle counter are reset;
- rd is written once rather than on every waiting cycle;
- x0 is decoded as zero rather than relying on initial register contents.

None of these changes what a program sees.

**Not built:**
- a multi-cycle divider (the one built is combinational);
- a floating-point unit;
- privileged mode, traps and interrupts;
- the board peripherals (LEDs, LCD, LED matrix);
- any memory system for the multi-cycle core, which exposes its bus.
