# Composite-FU interleaved-multithreaded datapath

A single-issue DSP datapath that gets more work out of each instruction by
chaining its functional units instead of placing them side by side.

A scalar processor with an adder, a multiplier and a shifter uses one of the three
units per cycle. A VLIW processor uses all three in parallel, but it needs a
register file with many ports (5 read and 3 write for three units), which costs
area and power. The **composite functional unit** takes a middle road. It cascades
the three units in a fixed order, here multiplier → shifter → adder ("MSA"). One
instruction can then compute

    rd = ((rs0 * rs1) shifted by s) ± rs2

That is up to three operations per instruction, from only 3 register reads and 1
register write. Any unit in the chain can be switched off, so the same hardware
also executes the shorter forms MS, MA, SA, M, S and A. DSP kernels are full of
multiply–scale–accumulate chains. For them this gives well over one operation per
cycle, and the register file stays barely larger than a scalar machine's.

Pipelining the cascade raises the clock rate but creates latency. This design hides
the latency with **interleaved multithreading (IMT)**:
- one hardware thread per pipeline stage;
- the threads issue in strict rotation;
- each thread has its own register file.

By the time a thread issues again, its previous result has already been written.
The pipeline needs no forwarding, hazard detection or stalls.

The loads from memory need a register write port too. Each thread's file has only
one write port, and the **load/store unit** and the FU write-back share it in
different cycles. With two threads this is a ping/pong pair of register files.

The default configuration is:
- 16-bit data;
- MSA composite unit in 2 pipeline stages;
- 2 threads;
- 16 × 16-bit register file per thread with 3 read ports and 1 write port;
- 256-word instruction memory;
- 4096-word data memory.

## The composite functional unit (`composite_fu`)

The primitives are `cfu_adder`, `cfu_multiplier` and `cfu_shifter`. They are
combinational and W bits wide (W = 16).

| unit | operands | control | result |
|---|---|---|---|
| adder | src1, src2 | `sub` | src1 + src2, or src1 − src2 |
| multiplier | src1, src2 | – | low W bits of the signed product |
| shifter | src1 | `shamt`, 4-bit signed | −8..−1: left by \|shamt\|; 0..7: arithmetic right |

`composite_fu` chains the units listed in its `ORDER` parameter:
- **First unit:** takes operand 0, plus operand 1 if it is an adder or multiplier.
- **Each later adder or multiplier:** takes the chain value and the next unused operand.
- **A shifter:** takes only the chain value.

The number of operands (= register read ports) follows from the order: 3 for MSA,
4 for the four-unit AMSA.

Each unit has a control field `{en, sub, shamt}`. With `en` low the unit is
bypassed: the chain value passes through unchanged. For MSA this gives:

| M | S | A | sub-function | result |
|---|---|---|---|---|
| 1 | 1 | 1 | MSA | ((r0·r1) ≫ s) ± r2 |
| 1 | 1 | 0 | MS | (r0·r1) ≫ s |
| 1 | 0 | 1 | MA | r0·r1 ± r2 |
| 0 | 1 | 1 | SA | (r0 ≫ s) ± r2 |
| 1 | 0 | 0 | M | r0·r1 |
| 0 | 1 | 0 | S | r0 ≫ s |
| 0 | 0 | 1 | A | r0 ± r2 |
| 0 | 0 | 0 | move | r0 |

(≫ s stands for a shift in either direction.) The adder's subtraction is always
chain − r2, never r2 − chain.

**Pipelining.** The cascade is written as one combinational block. `STAGES − 1`
register stages sit at its output, carrying the result, a valid bit and a caller
tag. Synthesis is expected to retime these registers into the cascade; that was
the intended flow for choosing the stage count. So the latency is `STAGES − 1`
cycles at a throughput of one operation per cycle. In the datapath the tag carries
the thread number and the destination register of each operation, so the FU has
no knowledge of threads. `STAGES = 1` gives a purely combinational unit.

## Interleaved threads and the pipeline

`ctx_select` holds one context per thread: program counter, data base address
and a running bit. A thread-number counter steps 0, 1, …, T−1, 0, … every cycle
without exception. If the selected thread is halted, its slot goes idle; no other
thread takes it. Each thread's timing therefore never depends on the others.

Take an instruction issued in cycle *c* by thread *t*, with S = `FU_STAGES`:

| cycle | what happens |
|---|---|
| *c* | fetch (combinational instruction memory), read 3 operands from thread *t*'s file, first part of the cascade, data-memory read for a load |
| end of *c* | load data written into thread *t*'s file |
| *c* … *c*+S−1 | composite FU |
| end of *c*+S−1 | FU result written to `rd` of thread *t*, and/or stored to memory |
| *c*+T (T ≥ S) | thread *t* issues its next instruction and sees both writes |

So a thread may use a result in its very next instruction, and the same is true
of a loaded word. Within one instruction, the FU reads the *old* value of a
register that the load of the same instruction overwrites. A streaming loop can
therefore multiply the current sample while it loads the next one into the same
register.

The top requires `FU_STAGES ≥ 2` and `NTHREADS ≥ FU_STAGES`. It reports an
elaboration error otherwise.

## Register files and the shared write port

`thread_rf` is a cell-based register file:
- NREG flip-flop registers;
- a write-port multiplexer in front of each register;
- an NREG-to-1 read multiplexer per read port;
- asynchronous reset to zero.

`thread_rf_bank` holds one `thread_rf` per thread. It selects the issuing thread's
file for the three operand reads.

Each file has **one** write port, shared between two writers:
- **FU write-back:** for thread *t*, arrives in the last cycle of an instruction,
  S−1 cycles after its issue.
- **Load:** for thread *t*, arrives at the end of the issue cycle.

Thread *t* issues only every T cycles. For S ≥ 2, its two kinds of write therefore
fall in different cycles. Each cycle the port goes to the FU if the FU's
write-back belongs to that thread, and to the load/store unit otherwise.

This is why the design needs at least two stages. With S = 1 both writes would
land in the same cycle on the same port.

An assertion in `thread_rf_bank` checks that the two writes never meet. If they
ever did, the FU write would win. In the end-to-end test the sharing happens
hundreds of times.

## Memories, load/store unit and thread control

- **`instr_mem`:** 256 instructions, combinational read. It is written through the
  top's `prog_*` port.
- **`data_mem`:** 4096 × 16 bits.
  - Two combinational read ports: one for loads, one for the host (`host_raddr` /
    `host_rdata`).
  - One write port, shared by stores and host writes. The host has priority and
    should write only while no thread runs.
- **`ls_unit`:** works separately from the FU.
  - A load reads `DM[base + ld_off]` in the issue cycle and writes it to `ld_rd`.
  - A store writes the instruction's **FU result** to `DM[base + st_off]` when
    that result leaves the pipeline. The unit computes the address at issue and
    keeps it in its own queue of in-flight stores. The queue is a delay line as
    long as the FU latency, so each address leaves it in the cycle its result
    leaves the FU. An assertion checks that they always meet.
  - `base` is the thread's base register, so several threads can run one program
    on different data. Addresses wrap modulo the memory size.

**Thread control.** A pulse on `start[t]` (re)starts thread *t* at `start_pc[t]`
with base `start_base[t]`; a start overrides an issue in the same cycle.
`running[t]` falls once the thread's `halt` instruction has issued. The results of
that instruction are written S−1 cycles later.

There are no branches. A program is straight-line code ended by `halt`. Streaming
work restarts the program with the base advanced, one output per run.

## Instruction word (`cfu_pkg::instr_t`, 66 bits)

| bits | field | meaning |
|---|---|---|
| 65 | `halt` | thread stops after this instruction |
| 64 | `ld_en` | load `DM[base + ld_off]` … |
| 63:60 | `ld_rd` | … into this register |
| 59:48 | `ld_off` | load offset |
| 47 | `st_en` | store the FU result … |
| 46:35 | `st_off` | … to `DM[base + st_off]` |
| 34 | `wb_en` | write the FU result … |
| 33:30 | `rd` | … to this register |
| 29:26, 25:22, 21:18 | `rs[2]`, `rs[1]`, `rs[0]` | operand registers; `rs[0]` enters the first unit |
| 17:12, 11:6, 5:0 | `fu[2]` (A), `fu[1]` (S), `fu[0]` (M) | per unit `{en, sub, shamt[3:0]}` |

An instruction with neither `wb_en` nor `st_en` does not use the FU. One
instruction can combine an FU operation, a load and a store of its own result.

Example: one tap of a FIR filter with the sample in r1, the coefficient in r9 and
the accumulator in r0. The instruction below computes `r0 = ((r1*r9) >>> 4) + r0`
and loads the next sample into r1:

    rs[0] = r1, rs[1] = r9, rs[2] = r0; fu[0].en = 1; fu[1].en = 1, shamt = 4; fu[2].en = 1;
    wb_en = 1, rd = r0; ld_en = 1, ld_rd = r1, ld_off = <next sample>

## Behaviour on the benchmark kernels

Each kernel below runs on the default datapath. The reference figures are the
operations per instruction that the original study reports for the MSA unit. It
assumed loads and stores cost nothing. Here each load occupies the load field
of an instruction, at most one per instruction.

| kernel | testbench | instructions | operations | ops/instr. | reference |
|---|---|---|---|---|---|
| 16-tap FIR, direct form | `tb_fir16_stream` | 16 per output | 31 | 1.94 | 1.94 |
| 16-tap linear-phase FIR (pre-added pairs) | `tb_fir16_stream` | 16 per output | 23 | 1.44 | 1.44 |
| 8×8 matrix × vector | `tb_kernels` | 82 (incl. 9 load-only per thread) | 120 | 1.46 | 1.36 |
| H.264 8-point integer transform | `tb_kernels` | 35 (incl. 2 load-only) | 42 | 1.20 | 1.31 |
| 16-tap complex FIR, one output | `tb_kernels` | 68 (incl. 4 load-only) | 126 | 1.85 | 1.34 |

The FIR stream has 1,024 samples, split 512 per thread. It takes 16,384 busy
cycles, one output per 16 cycles, which is the figure expected for this unit.

The integer transform uses 33 computing instructions, one more than the
reference's 32. One term has the form b − (a ≫ s), and the adder cannot form that
in one instruction. Two more instructions only load, because the first butterfly
needs two samples in registers; the other six loads ride along with butterflies.

The complex FIR computes each product with one MA instruction. The adder only
forms product − accumulator, so the real-part accumulator changes sign at every
step and comes out positive after the last one. Two register sets alternate
between taps. The four loads of the next tap therefore ride along with the four
instructions of the current tap.

## Where this departs from the original design

- **The instruction set is this design's own.** The original names only the
  sub-functions. The following are all choices made here:
  - the encoding;
  - the base + offset addressing;
  - one load and one store per instruction, with the store taking the FU result;
  - the halt bit and host start/restart;
  - no branches.
- **Memory sizes and ports are this design's own:** instruction memory 256
  words, data memory 4096 words. The original only names the memories.
- **The multiplier keeps the low 16 bits of the product.** Shifts to the right
  are arithmetic.
- **The adder only subtracts in one direction** (chain − operand).
- **At least 2 pipeline stages.** The original also studies an un-pipelined unit.
  `composite_fu` supports one stage, but the full datapath does not, because of the
  shared write port.
- **Load bandwidth is one word per instruction.** The original's analysis assumed
  loads arrive whenever needed. A kernel that needs two fresh memory operands per
  multiply–accumulate must hold one of them (e.g. coefficients) in registers, or
  spend extra instructions.
- **The top is built for the three-unit MSA arrangement.**
  - The original's best four-unit arrangement, AMSA, needs 4 read ports.
    `composite_fu` builds it (`NFU = 4`, `ORDER = '{FU_ADD, FU_MUL, FU_SHF, FU_ADD}`,
    `NRD = 4`) and it is tested on its own.
  - Changing `NFU`/`ARRANGEMENT` in `cfu_pkg` would widen the instruction and
    add register-file read ports to match. That has not been simulated.
- **Not modelled:** cycle-time, area and power targets. These are synthesis
  constraints and cannot be checked in simulation.

## How far it can be trusted

- Every module has its own self-checking testbench. Each testbench compares the
  module against a model written independently of the RTL.
- Each testbench has been shown to fail on a deliberately broken copy of its
  module.
- The end-to-end test `tb_cfu_imt_top` runs the default top, with no parameter
  overrides. It has two phases:
  - an 8-tap FIR on both threads;
  - random programs on both threads, compared register by register (through
    stores) with an instruction-level model.
- It checks that an N-instruction program finishes within N·T cycles, i.e. the
  pipeline never stalls.
- It counts each mechanism and fails if one never occurred. The mechanisms are:
  - per-thread issue and every sub-function;
  - load, store, subtraction, left and right shift, move;
  - write-port sharing;
  - back-to-back dependent instructions;
  - a load into a register the same instruction reads;
  - halt, restart and idle slots.
- `tb_cfu_imt_top_deep` and `tb_cfu_imt_top_s4` repeat that test with 3 and 4 FU
  stages, each with 4 threads.
- The RTL passes Verilator lint and the slang front end.
- It has not been synthesised to gates or timed. The retiming of the FU pipeline
  registers is left to the synthesis tool.

## Simulating

Every testbench is self-contained and needs only Verilator 5. From the directory
that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl rtl/cfu_pkg.sv \
        tb/tb_cfu_imt_top.sv --top-module tb_cfu_imt_top --Mdir obj -o sim
    ./obj/sim

Replace `tb_cfu_imt_top` with any other testbench name. Each prints a last line
`TB_RESULT checks=<n> failures=<m>` and stops. A watchdog counts a failure if a
run hangs.

| testbench | what it covers |
|---|---|
| `tb_cfu_adder`, `tb_cfu_multiplier`, `tb_cfu_shifter` | primitives: corner cases and random operands, every shift amount |
| `tb_composite_fu` | MSA at 2 stages and un-pipelined, AMSA at 3 stages; latency, all sub-functions |
| `tb_thread_rf` | register file with 1 and 2 write ports |
| `tb_thread_rf_bank` | per-thread files, write-port selection (3 threads) |
| `tb_ctx_select` | round-robin issue, start, halt, restart (4 threads) |
| `tb_instr_mem`, `tb_data_mem` | memories |
| `tb_ls_unit` | load/store addressing, store queue at 1 and 3 cycles of latency |
| `tb_cfu_imt_top` | whole datapath at its defaults |
| `tb_cfu_imt_top_deep` | whole datapath, 3 stages, 4 threads |
| `tb_cfu_imt_top_s4` | whole datapath, 4 stages, 4 threads |
| `tb_fir16_stream` | 16-tap FIR on 1,024 samples, direct and linear-phase form |
| `tb_kernels` | 8×8 matrix–vector product, H.264 8-point integer transform, 16-tap complex FIR |

All of them finish in well under a second.

To try another configuration:
- **Pipeline depth:** override `FU_STAGES` (and optionally `NTHREADS`) on
  `cfu_imt_top`.
- **Sizes, arrangement and instruction layout:** edit `cfu_pkg`.

## Files

`rtl/` holds one module or package per file:
- `cfu_pkg`
- `cfu_adder`, `cfu_multiplier`, `cfu_shifter`
- `composite_fu`
- `thread_rf`, `thread_rf_bank`
- `ctx_select`
- `instr_mem`, `data_mem`, `ls_unit`
- `cfu_imt_top` (the top)

`tb/` holds the testbenches listed above.
