# A five-stage pipelined MIPS integer core with forwarding, load stall and a branch target buffer

This is a classic MIPS pipeline: instruction fetch (IF), decode and register read (ID),
execute (EX), memory (MEM) and write back (WB). Up to five instructions are in flight,
one per stage. Most of the design deals with the cases where the pipeline cannot simply
take in one new instruction per cycle:

* **Data hazards.** An instruction reads a register that an older instruction, still in
  the pipeline, has not yet written. Forwarding muxes in ID handle nearly all of these
  without losing a cycle. The exception is a value that a load has not yet read from
  memory: that case costs exactly one stall cycle.
* **Control hazards.** Jumps and branches are known only after the next instructions have
  already been fetched. By default a branch target buffer (BTB) with 2-bit saturating
  counters predicts them in IF. A parameter instead turns on plain predict-not-taken.
  Either way, only the instructions fetched down the wrong path are killed.
* **Structural hazards.** There are none. Instructions and data live in separate
  memories, and every register-file write happens in WB.

The core executes a 32-bit MIPS integer subset. By default it has no branch delay slots.
A build option runs classic delayed-branch code instead.

## Datapath

```
          +-----+   IF/ID   +--------------+   ID/EX   +-----+  EX/MEM  +------+  MEM/WB
 PC ----->| I-  |---IR----->| control_unit |--ctrl---->| ALU |--------->| D-   |--------> regfile
  ^       | mem |   PC,NPC  | regfile read |  A, B,    |     |  ALUout  | mem  |  BusW    write
  |       +-----+           | imm_ext      |  Imm      +-----+  B, NPC  +------+
  |  btb (lookup)           | fwd muxes <--------------- EX / MEM / WB results
  +------ pc_control <------+ jump (ID)   <----- branch / JR outcome (EX)
```

| file | role |
|---|---|
| `rtl/mips_pkg.sv` | opcodes, funct codes, ALU/extension/mux encodings, the control-word struct `ctrl_t` and the event struct `pipe_events_t` |
| `rtl/mips_pipeline.sv` | top level: pipeline registers, forwarding muxes, result mux, wiring |
| `rtl/imem.sv`, `rtl/dmem.sv` | word-addressed instruction and data memories (asynchronous read, write on the clock edge) |
| `rtl/regfile.sv` | 32 x 32 register file, two read ports and one write port; r0 is always 0 |
| `rtl/control_unit.sv` | decodes opcode and funct into `ctrl_t`; unknown encodings decode to a bubble |
| `rtl/imm_ext.sv` | 16-bit immediate: sign-extended, zero-extended, or placed in the upper half (lui) |
| `rtl/alu.sv` | add, sub, and, or, xor, nor, slt, sltu, shifts, pass-B; zero flag for beq/bne |
| `rtl/hazard_unit.sv` | ForwardA/ForwardB selection and load-use stall detection |
| `rtl/pc_control.sv` | next-PC choice, wrong-path kill, BTB update requests |
| `rtl/btb.sv`, `rtl/pred_fsm.sv` | branch target buffer and its 1- or 2-bit predictor state machine |

Two choices in the mux encodings matter when reading waveforms:

* **RegDst:** 0 = Rt, 1 = Rd, 2 = r31.
* **SelectResult** (the result mux in MEM): 0 = data memory output, 1 = ALU result,
  2 = return address (PC+4, or PC+8 with a delay slot).

The ALU result and the zero flag appear in EX. The result that WB writes is chosen in MEM.

Supported instructions:

* **R-type:** add addu sub subu and or xor nor slt sltu sll srl sra jr jalr.
* **I-type:** addi addiu slti sltiu andi ori xori lui lw sw beq bne.
* **J-type:** j jal.

add/addi do not trap on overflow; they behave like addu/addiu. There are no byte or
halfword accesses, multiply/divide, exceptions or coprocessors.

## Forwarding: operands are selected in ID, not EX

Many textbook pipelines forward into the ALU inputs. Here the forwarding muxes sit in
ID, in front of the A and B pipeline registers. The operand that enters EX is therefore
already correct. The instruction in ID is compared against the three older instructions
in EX, MEM and WB:

| ForwardA / ForwardB | source | older instruction it belongs to |
|---|---|---|
| 0 | register file (Rs / Rt) | none |
| 1 | ALU output in EX | the previous one |
| 2 | result mux in MEM (load data, ALU result or return address) | the second previous one |
| 3 | BusW in WB | the third previous one |

The rule for ForwardA (ForwardB is the same with Rt):

* It is 1 if Rs != 0, Rs equals the destination in EX, and that instruction writes a
  register.
* Otherwise it is 2 under the same test against MEM.
* Otherwise it is 3 under the same test against WB.
* Otherwise it is 0.

The priority order makes the youngest writer win. WB forwarding (source 3) stands in for
the usual "write in the first half, read in the second half" register file. The register
file here has no internal bypass.

One addition of this design: when the instruction in EX is a JAL/JALR, source 1 supplies
its return address (PC+4) rather than the ALU output. The ALU output means nothing for a
jump.

Branch and JR operands go through the same muxes. A branch that follows right behind the
instruction computing its operand therefore needs no extra stall, unless that instruction
is a load.

## The load-use stall

A load's data exists only at the end of MEM. An instruction right behind a load that
needs the loaded register cannot get the data through source 1. The hazard unit raises
`stall` when the instruction in EX is a load and ForwardA or ForwardB is 1. For that one
cycle:

* the PC and the IF/ID register hold, so nothing new is fetched;
* a bubble (an all-zero control word, which writes nothing) enters EX instead of the
  dependent instruction.

On the next cycle the load is in MEM. The dependent instruction now sees source 2 and
picks up the load data from the result mux.

Some consequences:

* Two back-to-back loads feeding one add cost one stall, not two.
* A load followed by an unrelated instruction and then a user costs nothing: the user
  gets the value from MEM.
* Reordering loads away from their users removes the stalls completely. `tb_workloads`
  shows this with an 8-instruction `A = B + C; D = E - F` sequence: 2 stalls unscheduled,
  none scheduled.

A stall never blocks a redirect from EX. If the branch in EX turns out mispredicted, the
stalled instruction is on the wrong path, and it is killed along with the instruction in IF.

## Jumps, branches and prediction

Where each kind of control transfer is resolved fixes its cost when fetch went the wrong way:

| instruction | resolved in | target | instructions killed on a wrong fetch |
|---|---|---|---|
| j, jal | ID | {PC+4[31:28], 26-bit index, 00} | 1 (the one in IF) |
| beq, bne | EX (ALU zero flag) | PC+4 + (sign-extended offset << 2) | 2 (ID and IF) |
| jr, jalr | EX (forwarded Rs) | Rs | 2 |

Killing an instruction clears its valid bit and turns its control word into a bubble.

### `USE_BTB = 0`: predict not taken

Fetch always continues at PC+4. The costs are:

* every jump: 1 cycle;
* every taken branch, jr and jalr: 2 cycles;
* a branch that is not taken: nothing.

With 5 % jumps, 20 % branches and 90 % of branches taken, the CPI comes out as
1 + 0.05 + 0.36 = 1.41. `tb_workloads` checks that figure on a generated 100-instruction mix.

### `USE_BTB = 1` (default): branch target buffer

The BTB is a direct-mapped table looked up with the fetch PC in IF. The index is PC bits
[log2(ENTRIES)+1 : 2]. Each entry holds:

* the full word address of a jump or branch;
* its last taken target;
* `PRED_BITS` prediction bits.

On a hit that predicts taken, the next PC is the stored target, so a correctly predicted
taken branch or jump costs nothing. Every IF/ID register carries the prediction made for
its instruction, and it is checked later:

* **ID:** a jump that was not predicted taken to the right target is redirected at a cost
  of 1 cycle. Rarely, an instruction that is not a control transfer but was predicted taken
  (an aliasing entry after the program changed) is sent back to its PC+4 the same way.
* **EX:** a branch or jr/jalr whose outcome or target differs from the prediction reloads
  the PC at a cost of 2 cycles. The PC is reloaded with the branch target, Rs, or the
  branch's own PC+4.

Updates come from the stage that resolved the instruction, one per cycle, with EX taking
priority over ID. The update rules:

* An entry that is present steps its predictor and, when taken, rewrites its target.
* A taken transfer that is not present is allocated in the weakest taken state.
* A not-taken branch that is not present is not allocated. Predicting it not taken is
  already what a miss does.

`pred_fsm` is the predictor:

* **1 bit:** remembers the last outcome.
* **2 bits:** a saturating counter. Taken counts up to 3 and not taken counts down to 0.
  The prediction is the top bit, so 2 and 3 predict taken.

A nested loop shows the difference. The 1-bit scheme mispredicts the inner-loop branch
twice per pass of the outer loop: once on the exit, and again on re-entry. The 2-bit
counter mispredicts it only on the exit. For a 3 x 4 nested loop, `tb_mips_pipeline` and
`tb_workloads` check the cycle counts for each scheme:

| scheme | cycles |
|---|---|
| predict not taken | 73 |
| 1-bit BTB | 67 |
| 2-bit BTB | 63 |

### `DELAY_SLOT = 1`: delayed branch

Here the instruction right after every jump or branch is its delay slot. It executes
whether or not the transfer is taken, and the compiler is expected to fill it with useful
work or a nop. The BTB is left out in this mode:

* A jump kills nothing, so it costs 0 cycles.
* A taken branch, jr or jalr kills only the instruction in IF, so it costs 1 cycle instead
  of 2.
* JAL/JALR link PC+8, skipping the slot.

A load placed in a taken branch's slot never stalls its user at the target: the killed
fetch already supplies the cycle of delay. A jump or branch inside a delay slot is not
supported.

## Top-level interface and timing (`mips_pipeline`)

| parameter | default | meaning |
|---|---|---|
| `IMEM_WORDS` | 1024 | instruction memory size in 32-bit words (power of two) |
| `DMEM_WORDS` | 1024 | data memory size in words (power of two) |
| `USE_BTB` | 1 | 1 = BTB prediction, 0 = predict not taken |
| `BTB_ENTRIES` | 16 | BTB entries (power of two) |
| `PRED_BITS` | 2 | prediction bits per BTB entry (1 or 2) |
| `DELAY_SLOT` | 0 | 1 = one branch delay slot, no BTB (overrides `USE_BTB`) |

Reset and program loading:

* `rst_n` is an active-low synchronous reset. It clears the PC, the pipeline valid bits,
  the register file and the BTB valid bits.
* While reset is low, a program is written through `imem_we/imem_waddr/imem_wdata`. The
  address is a word index.
* Fetch starts at address 0 on the first clock after reset is released.
* The data memory is not cleared. Write a location before reading it.

Outputs:

* `retire_valid/pc/we/rd/data`: one line per completed instruction, from WB. An
  instruction completes 4 cycles after it is fetched, so n hazard-free instructions take
  n + 4 cycles.
* `store_valid/addr/data`: each store, as it is made in MEM.
* `events` (`pipe_events_t`): the cycle's ForwardA/ForwardB, `stall`, `id_redirect`,
  `ex_redirect`, `ex_resolve`, `ex_taken_ok` (a taken branch that needed no redirect) and
  `btb_hit`. These are meant for performance counting and tests.

Memory accesses are word-aligned. The low two address bits are ignored, and addresses
wrap at the memory size. Loads and stores complete in one cycle. The memories are plain
arrays and stand in for single-cycle instruction and data caches.

## Verification

Every block has its own self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a cycle watchdog.

* **Unit testbenches** compare each block with values computed independently in the
  testbench: exhaustive or random ALU and immediate cases, and every forwarding and stall
  combination. `tb_pred_fsm` runs the nested-loop outcome pattern through both predictor
  widths.
* **`tb/mips_tb_pkg.sv`** holds an instruction encoder, a program generator and an
  instruction-level reference model. For each program, the model produces:
  * the expected completion stream and store stream;
  * the exact predict-not-taken cycle count: n + 4, plus 1 per jump, plus 2 per taken
    branch or jr, plus 1 per load-use pair.
* **`tb_mips_pipeline`** runs three cores side by side (predict not taken, 2-bit BTB,
  1-bit BTB) on directed and random programs. The random programs use nested loops,
  subroutine calls through jal/jr, jalr, and memory traffic. Every core must match the
  reference model exactly. The test also requires each mechanism to occur at least once:
  * each forwarding source on each operand;
  * a load-use stall;
  * ID and EX redirects;
  * a correctly predicted taken branch;
  * a BTB hit.
* **`tb_mips_delayed`** builds the core with `DELAY_SLOT = 1` and runs delayed-branch
  programs from the same generator, with a slot after every jump and branch. The
  reference model runs them with delay-slot semantics. Results and cycle counts must match
  exactly.
* **`tb_workloads`** runs short hand-written sequences and checks each one's stall and
  redirect counts and cycle count: RAW chains, load delay, compiler scheduling, branch
  taken and not taken, the CPI mix and nested loops.
* **`tb_mips_full`** runs the top with every parameter at its default on a nested loop and
  four long random programs.

To simulate with Verilator, list the package files first:

```
verilator --binary -Wno-fatal --top-module tb_mips_pipeline \
    rtl/mips_pkg.sv $(ls rtl/*.sv | grep -v mips_pkg) \
    tb/mips_tb_pkg.sv tb/tb_mips_pipeline.sv
./obj_dir/Vtb_mips_pipeline
```

Replace the top module and the last file to run another testbench. A unit testbench needs
only `rtl/mips_pkg.sv`, its block's file and its own file. Each testbench builds in a few
seconds and runs in well under a second.

The testbenches were written for a two-state simulator. Every state element is reset, and
the memories are written before they are read.

## Departures from the classic description and limitations

* **No delay slots by default.** The instruction after a branch or jump is never
  executed, and JAL and JALR link PC+4. Code written for delayed-branch MIPS needs
  `DELAY_SLOT = 1`, which does not combine with the BTB.
* **JAL/JALR return address through EX forwarding** (see above). This is this design's
  addition.
* **Sizes are this design's own choices:** memory sizes, BTB size and organisation
  (direct-mapped, full-address tag) and the BTB allocation policy. None of them is tied to
  a figure that must be kept.
* **Memories are single-cycle arrays.** There are no caches, misses or bus interfaces.
  Reads are asynchronous, so on an FPGA they map to distributed RAM, or the pipeline needs
  an extra fetch/memory stage to use block RAM.
* **The ISA is incomplete:** no overflow traps, no sub-word memory accesses, no
  multiply/divide, no floating point. Undefined instructions execute as no-ops.
* **Debug visibility only.** `retire_*`, `store_*` and `events` exist for checking and
  counting, and are not part of a bus protocol.
