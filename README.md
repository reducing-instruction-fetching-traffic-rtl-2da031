# Autonomous instruction memory with a CPU-side loop buffer

An autonomous instruction memory (AIM) sits outside the CPU and holds the
instruction memory, the branch target buffer (BTB), a partial instruction
decoder and a return stack. It works out the next fetch address by itself, so
the CPU almost never puts an address on the instruction address bus. This
design goes one step further and saves traffic on the instruction content bus
too. It adds a small loop buffer inside the CPU and keeps the controller of
that buffer in the AIM. While a loop runs from the buffer, the AIM switches
its instruction memory off and leaves the content bus still.

Because both buses are then nearly idle, they can also be merged into one
multiplex bus. That configuration is built too (`MUX_BUS=1`).

The RTL is synthesizable SystemVerilog-2017. The CPU core is not part of it;
a behavioural model of the core's fetch protocol is in the testbenches.

## The wires between CPU and AIM

| Signal | Width | Direction | Meaning |
|---|---|---|---|
| instruction address bus | 32 | CPU → AIM | only driven when the AIM cannot know the address |
| instruction content bus | 32 | AIM → CPU | instruction, or a loop buffer index (see INDEX_ACTIVE) |
| S-Indicate | 2 | CPU → AIM | `00` autonomous, `01` pipeline stall, `10` wrong prediction, `11` compulsory |
| P-Taken | 1 | AIM → CPU | the instruction delivered in the previous cycle was predicted taken |
| L-Indicate | 2 | AIM → CPU | `00` IDLE, `01` FILL, `10` ACTIVE, `11` INDEX_ACTIVE |
| direction | 1 | CPU → AIM | multiplex bus only: the CPU owns the bus this cycle |

What each S-Indicate code does in the AIM:

- **Autonomous.** The AIM goes on by itself. The next address is:
  - the return stack top for a decoded `jr $31`;
  - otherwise the BTB target on a BTB hit;
  - otherwise PC+4.
- **Pipeline stall.** The AIM repeats the same address.
- **Wrong prediction.** The AIM rebuilds the correct address from its own record of the branch (see the next section).
- **Compulsory.** The AIM loads the address the CPU sends. This happens in three cases:
  - the first fetch after reset;
  - indirect jumps (`jr` through a register other than `$31`, and `jalr`);
  - a return the AIM did not predict.

## Choosing the address: `aim_controller`

The controller keeps the two previous fetches in a history (PC-1, PC-2). Each entry records:

- the address;
- whether the BTB hit;
- whether the fetch was predicted taken;
- the predicted next address;
- the decoder's Target and FallThru.

A branch resolves in the CPU's third pipeline stage. So when the CPU reports
a wrong prediction, the branch is PC-2. The controller then needs no address
from the CPU:

- it redirects to FallThru if PC-2 was predicted taken;
- it redirects to Target otherwise.

In the same cycle it updates the BTB, with one-bit prediction:

- a taken branch is installed;
- a branch that fell through is removed.

The history shifts on every cycle except a stall. This keeps PC-2 aligned with the CPU's pipeline. The miss penalty is two cycles.

One exception: if PC-2 was served from the loop buffer, the memory was off and the decoder never saw the word. In that case the CPU sends the corrected address with the wrong-prediction code.

The controller also reports loop events to the loop buffer controller:

- **backward branch taken** (the loop iterates):
  - the BTB predicts a taken branch whose target is at or below the branch; or
  - a not-taken→taken correction goes backwards.
- **backward branch exits:** a taken→not-taken correction of a backward branch.

## Keeping a tagless buffer in step from the other side of the bus

This is the core of the design and the hardest part to follow.

The loop buffer in the CPU (`loop_buffer`) is a plain array with no tags. The
CPU cannot tell which instruction a slot holds; only the AIM knows. The AIM
tells the CPU each cycle, over L-Indicate, where the instruction comes from:

| L-Indicate | CPU does | AIM does |
|---|---|---|
| IDLE | takes the word from the content bus | memory on |
| FILL | takes the word from the content bus and writes it into the buffer at the write pointer | memory on |
| ACTIVE | reads the buffer at its sequential read pointer | memory off, content bus held |
| INDEX_ACTIVE | reads the buffer at the index found in the low bits of the content bus | memory off, only the index bits of the bus change |

### Pointer mirroring

Both sides keep the same two pointers, a write pointer `wp` and a sequential read pointer `rp`. They update them by the same rules in the same cycles:

- FILL writes slot `wp`, then `wp` and `rp` both move to the slot after it.
- ACTIVE reads slot `rp`, then `rp` advances.
- INDEX_ACTIVE reads slot `i`, then `rp = i + 1`.
- In a pipeline-stall cycle, `rp` is left on the slot just written or read. The same instruction is sent again in the next cycle, and it is then a plain ACTIVE read with a still bus.
- A cycle in which the CPU sends an address (wrong prediction or compulsory) delivers no instruction. Neither side changes anything in it.

Indices wrap modulo the buffer size.

### The AIM's directory

On the AIM side, `lbc_aim` keeps one address tag per buffer slot. If the current address hits slot `s`:

- it sends ACTIVE when `s == rp`, which is the cheap case: nothing moves on the bus;
- otherwise it sends INDEX_ACTIVE with `s`.

INDEX_ACTIVE is therefore used exactly when the program jumps inside buffered code. Typical cases:

- the first instruction of an inner loop that was filled during an earlier pass;
- the outer loop's first instruction when the outer branch is taken;
- the instruction after an inner loop's exit.

If the address does not hit, the controller decides between FILL and IDLE. It sends FILL when the address lies inside the loop currently being buffered, and IDLE otherwise.

Because slots are identified by address, correctness never depends on loop detection. If a guess is wrong, only efficiency is lost. Examples:

- a loop is tracked that then exits;
- wrong-path instructions are filled.

A hit is always the right instruction.

### Loop stack

`loop_stack` decides which loop is being buffered. Nested loops use their backward branches first-in last-out, so they are tracked on a stack. Each entry holds:

- the backward branch address;
- the loop's first address;
- a fill bit;
- the length.

On a *backward branch taken* event the controller acts as follows:

- loop longer than the buffer → the stack is emptied and nothing is filled;
- stack empty → the loop becomes the outermost tracked loop;
- same loop as the top → the top's fill bit is set (the loop has been through once);
- inside the outermost loop → pushed as an inner loop;
- otherwise → the stack restarts with this loop.

A *backward branch exits* event for the top loop pops it.

The region that gets filled is the outermost tracked loop, so one pass through an outer loop fills its inner loops as well.

### A walk through a nest

Take an outer loop Y that holds an inner loop X:

1. X's branch is taken for the first time.
   - X is pushed.
   - X's second iteration is filled.
2. X's branch is taken again.
   - X's first instruction hits in a slot behind `rp`, so the AIM sends INDEX_ACTIVE.
   - The rest of X follows as ACTIVE.
3. X exits.
   - The exit is a taken→not-taken misprediction.
   - The instructions after X are outside the tracked region, so they arrive as IDLE.
4. Y's branch is taken.
   - Y becomes the outermost loop.
   - During Y's next iteration the instructions already held are read as INDEX_ACTIVE/ACTIVE.
   - Those not held are filled: Y's head before X, and the part between X's exit and Y's branch.
5. After that, every iteration of Y, with its X iterations, runs from the buffer.
   - The content bus only carries an index when the flow jumps.

Procedure calls inside a loop are filled like any other instruction, because slots are tagged by address.

### The CPU side

`lbc_cpu` holds the CPU-side pointers. It also holds a state register SR:

- the last loop state (2 bits);
- the last P-Taken.

The CPU can use SR to classify mispredictions; the buffer logic does not need it. `cpu_fetch` joins:

- the controller;
- the buffer;
- the multiplexer that hands the instruction to the core.

## The multiplex bus (`mux_bus`, `MUX_BUS=1`)

With one shared bus, the CPU raises the direction line when it sends an address. Both sides may want the bus in the same cycle. In that case the CPU wins and the AIM's word is dropped. That is bus contention.

This costs nothing. The CPU only sends an address when the program flow changes, so the word the AIM had ready is on the wrong path anyway. The miss penalty stays two cycles. This is the policy for a multiple-cycle fetch pipeline.

Contentions are flagged and counted. The alternative for a single-cycle fetch pipeline is not built. In it, the AIM waits a cycle and latches the address, which costs a cycle per contention and an extra latch.

## Files

| Module | Role |
|---|---|
| `aim_pkg` | encodings (S-Indicate, L-Indicate), MIPS I opcodes, decoder/history/loop-stack types |
| `partial_decoder` | finds branches, jumps, calls, returns, indirect jumps; computes Target and FallThru |
| `btb` | direct-mapped branch target buffer, combinational lookup |
| `return_stack` | circular return address stack |
| `instr_mem` | instruction memory with read enable, combinational read, load port |
| `aim_controller` | next-address selection, PC-1/PC-2 history, BTB update, return stack control, loop events |
| `loop_stack` | stack of nested loops |
| `lbc_aim` | AIM-side loop buffer controller: directory, mirrored pointers, L-Indicate, memory enable |
| `aim` | the AIM: all of the above plus the content bus driver |
| `loop_buffer` | tagless buffer in the CPU |
| `lbc_cpu` | CPU-side loop buffer controller with SR |
| `cpu_fetch` | CPU-side fetch unit |
| `mux_bus` | shared address/instruction bus, CPU priority, contention counter |
| `aim_lb_top` | AIM plus CPU fetch unit joined by separate buses or the multiplex bus |

The CPU core connects to the ports of `aim_lb_top`: S-Indicate, the CPU address and its valid/direction line, and the instruction and P-Taken outputs.

## Parameters

| Parameter | Default | Notes |
|---|---|---|
| `LB_SIZE` | 64 words | any power of two; the original evaluation swept 4 to 1024 and averaged 16 to 64 |
| `LS_DEPTH` | 8 | loop nesting depth tracked |
| `BTB_ENTRIES` | 64 | power of two |
| `RS_DEPTH` | 8 | power of two |
| `IM_WORDS` | 4096 | power of two |
| `MUX_BUS` | 0 | 1 selects the multiplex bus |

The original work gives no BTB, return stack, loop stack or memory size. These defaults are this design's choices.

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/aim_pkg.sv tb/tb_aim_lb_top.sv --top-module tb_aim_lb_top --Mdir obj -o sim
./obj/sim
```

| Testbench | What it checks |
|---|---|
| `tb_aim_lb_top` | the whole system at default parameters with `cpu_model` |
| `tb_aim_lb_top_mux` | the whole system with the multiplex bus and a 16-word buffer; the CPU sends the corrected address on every misprediction, so contentions occur and the penalty must stay at two cycles |
| `tb_aim` | the AIM against an independent behavioural buffer |
| `tb_lb_sweep` | the whole system at every buffer size 4, 8, ..., 1024 |
| `tb_<module>` | each block against a model, with random stimulus |

`cpu_model` is a behavioural stand-in for a five-stage core's fetch side. It builds a test program with:

- a two-level nest with a forward branch and a call;
- an indirect jump;
- a loop longer than the buffer;
- a three-level nest;
- a procedure with a loop and a return.

While it runs, the model:

- resolves branches two cycles after delivery;
- inserts random stalls;
- checks every instruction on the correct path;
- checks the two-cycle miss penalty.

The end-to-end benches also check two properties of buffer cycles:

- the memory is off and the content bus is still in ACTIVE;
- only the index bits move in INDEX_ACTIVE.

They also count that every mechanism occurs:

- each L-Indicate state;
- wrong prediction, compulsory and stall;
- return-stack prediction;
- loop stack push, pop and fill;
- a loop too large for the buffer;
- bus contention (multiplex bus only).

### Buffer size sweep

`tb_lb_sweep` runs the system once per buffer size, side by side. For each size it prints:

- the memory access rate (cycles with the memory enabled over all cycles);
- content bus active cycles;
- content bus bit transitions.

The test program's largest loop has 70 instructions. It is broken up at sizes up to 64 words and buffered from 128 words on, where the memory access rate drops from about 49 % to about 35 %. The program is short and its loops run only 2 to 5 times, so these rates are far above what long-running loops give. They show the trend, not the savings on real code.

## Where this departs from the original design, and what to trust

- **Tag directory and mirrored pointers.** The original leaves open how the AIM knows where each instruction sits in the buffer. Its loop stack entries carry slot indices and counts. Here a directory of address tags in the AIM does that job. Pointer mirroring keeps the two sides in step. This costs `LB_SIZE` tags in the AIM and makes the protocol robust.
- **State per cycle, not an explicit state machine.** The L-Indicate value is derived each cycle from the directory hit and the tracked loop region. The transitions the original lists for nested-loop mispredictions arise from that rule rather than being coded one by one:
  - inner or outer loop iterates;
  - inner loop exits;
  - outer loop exits.
- **Filling is circular.** In the original, a newly detected outer loop is filled from the first slot of the buffer. Here filling continues at the write pointer; with the directory, the position does not matter.
- **Re-entry after a misprediction.** Two wrong-path instructions may have been read from the buffer before the CPU reports the misprediction. They move the read pointer. So the first buffered instruction after the correction usually comes as INDEX_ACTIVE, where the original stays in ACTIVE. The cost is a few index bit transitions.
- **INDEX_ACTIVE is coded `11`.** The other three codes are the original's.
- **One-bit BTB.** Direct-mapped, holding only taken branches. The original treats the BTB organisation as a free parameter.
- **Who supplies the corrected address.** The S-Indicate definition has the CPU send the corrected address with every wrong prediction. The partial decoder exists to make that unnecessary. Here the AIM always corrects by itself when it decoded the branch, and ignores an address the CPU sends anyway. The CPU only has to send one for a branch served from the loop buffer.
- **Wrong-path handling.** Cycles in which the CPU sends an address are treated as carrying no instruction on either side.
- **Only the multiple-cycle-fetch multiplex bus** is built.
- **`bltzal`/`bgezal`** are decoded as plain conditional branches (no return address pushed).
- **Trust.** The protocol is checked in two ways:
  - cycle-accurate simulation with a behavioural CPU on one synthetic program, with random stalls and, in `tb_aim`, random loop trip counts, across buffer sizes from 4 to 1024 words;
  - randomized tests of each block against a model.

  The trust is limited in three ways:
  - no real program traces were run;
  - no power or area numbers come with this RTL;
  - the CPU model covers the fetch protocol, not a full pipeline.

## Tool notes

- Verilator's `-Wall` lint reports a few warnings that stand by design:
  - unused low address bits and unused upper bits of the content bus in the CPU controller;
  - unused package opcodes kept for completeness;
  - fields of shared structs that some users do not read (decoder flags, loop stack entry fields);
  - the AIM's bus request and address-valid flag, which the top uses only with the multiplex bus;
  - the `region_o` observation output left open in `aim`;
  - the reset used both as an asynchronous reset and inside assertion `disable iff` clauses.
- Yosys synthesis keeps the memories (instruction memory, BTB, loop buffer, return stack) as memory cells.
