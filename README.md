# Dual-issue in-order PARCv1 processor

A scalar five-stage pipeline completes at most one instruction per cycle
(CPI ≥ 1). This processor breaks that limit by fetching, decoding, executing
and writing back **two instructions per cycle**, in program order. It
implements the PARCv1 teaching subset of MIPS (`addu addiu mul lw sw j jal jr
bne`). It has two asymmetric execution pipes: an **A pipe** for integer
operations, multiplies and branches, and a **B pipe** for integer operations,
loads and stores. Most of the logic beyond the scalar pipeline exists to
decide, every cycle, whether the second instruction of a pair can go along
with the first, and to which pipe each one goes.

```
            +--> A0 --> A1 --+           A pipe: addu addiu mul bne j jal jr
 F ==2==> D |                | ==2==> W
            +--> B0 --> B1 --+           B pipe: addu addiu lw sw j jal jr
                         (data memory in B1)
```

* **F** reads one *fetch block*: two instructions at an 8-byte-aligned address.
* **D** decodes both, reads four register operands (4 read ports), bypasses
  in-flight results and issues 0, 1 or 2 instructions.
* **A0 / B0** execute. Branches are resolved in A0. Load/store addresses are
  formed in B0.
* **A1 / B1** are the commit point. The data memory is accessed in B1.
* **W** writes both results back (2 write ports).

Both memories are modelled as combinational (single-cycle, never missing),
so every stage takes exactly one cycle.

## Which pipe takes what

| instruction | A pipe | B pipe |
|-------------|:------:|:------:|
| addu, addiu | ✓ | ✓ |
| mul         | ✓ |   |
| bne         | ✓ |   |
| lw, sw      |   | ✓ |
| j, jal, jr  | ✓ | ✓ |

The natural placement of a fetch block is slot 0 (older) in A and slot 1
(younger) in B. When the pipe table forbids that (for example `addiu` followed
by `mul`), the pair is **swizzled**: the older instruction goes to B and the
younger to A. A lone instruction goes to A whenever it may.

## Issue rules (`parc_issue`)

The older instruction of the block issues unless one of its operands is not
ready (see the next section). The younger one issues **in the same cycle**
only if all of the following hold:

1. the older one issues too, or the older slot is empty;
2. no **RAW** hazard inside the block: it does not read the older one's
   destination;
3. no **WAW** name hazard inside the block: the two destinations differ;
4. no **structural** hazard: some placement satisfies the pipe table, so
   `mul,mul`, `mul,bne` and `lw,sw` pairs are split;
5. the older one is not a jump. A jump discards the younger slot, which is
   on the wrong path;
6. the older one is not an illegal instruction. Nothing issues behind an
   exception;
7. its own operands are ready.

An instruction that cannot go along stays in D and issues alone later. Fetch
is held while D still holds part of a block. WAR hazards cannot occur: every
operand is read in D, in order, before anything younger writes.

A younger instruction *is* allowed to issue alongside an older `bne`. It is
marked `young` in its pipe register, and if the branch turns out taken in A0
it is squashed in B0 before it reaches the commit point.

## Bypassing and RAW stalls (`parc_bypass`)

Each of the four read ports has a bypass mux. It compares its source register
with the destinations in A0, B0, A1 and B1, youngest first, and takes the
newest value:

| producer is in | value available? |
|----------------|------------------|
| A0 (ALU, mul, jal link) | yes, from the A unit's output |
| B0, not a load | yes, from the B unit's output |
| B0, a load | **no**: the consumer waits one cycle |
| A1 / B1 | yes. For a load in B1 this is the memory's read data |
| W | yes, through the register file's write-before-read |

A0 and B0 (and A1 and B1) never hold the same destination, because the WAW
rule above keeps such pairs apart. So "youngest first" is unambiguous.

With the parameter `FULL_BYPASS = 0` the same network only detects hazards:
any match in A0..B1 stalls the consumer until the producer reaches W. This is
the cheaper design the full bypass network improves on. Compare the RAW
example `addiu r1; addiu r3 | addu r5,r1,r3; addiu r6,r5 | addiu r7; addiu r9`.
The table gives commit cycles relative to the first instruction:

| instruction | full bypass | stall only |
|-------------|:-----------:|:----------:|
| addiu r1, addiu r3 | 0 | 0 |
| addu r5,r1,r3      | 1 | 3 |
| addiu r6,r5,1      | 2 | 6 |
| addiu r7, addiu r9 | 3 | 7 |

## Control flow

**Aligned fetch blocks.** F always reads the block at `PC & ~7`. If a jump
lands on the second word of a block (`0x204`), the first word is fetched but
marked invalid and dropped. From then on, blocks follow at +8 and the stream
is back in step. A block never crosses a four-instruction cache line.

**Jumps** (`j`, `jal`, `jr`) are resolved in D. The block being fetched
behind them is squashed, a one-cycle bubble. `jr` takes its target through
the bypass network, so it may wait like any other consumer. `jal` writes
`pc+4` to r31 through whichever pipe it went to.

**Branches** (`bne`) are resolved in A0. There is no prediction: fetch carries
on sequentially, and a taken branch squashes F, D and a younger partner in B0,
a two-cycle bubble. The target is `pc + 4 + (offset << 2)`. There is no delay
slot.

The worked aligned-fetch example (opA..opH with jumps to 0x100, 0x204 and
0x30c) commits, relative to opA: opC at +1, opD at +3, opE at +5, the jump
at 0x208 at +6, opF at +8, opG and opH at +9.

## Precise exceptions

An instruction word outside the subset raises an illegal-instruction
exception. It is detected in D but not acted on there. The instruction
travels down its pipe with an exception flag, and the exception is taken
when it reaches **A1/B1**, the commit point:

* the instruction itself does not write;
* everything younger (A0, B0, D, F) is squashed. Nothing younger can be in
  the other stage-1 register, since nothing issues behind an illegal
  instruction;
* everything older has already left, or leaves together with it, and
  completes normally. Stores only write in B1, so no younger store has
  touched memory;
* `epc` records its PC and fetch restarts at `EXC_VECTOR`.

An exception in A1/B1 takes priority over a taken branch in A0, which is
younger. There is no cause register and no return-from-exception
instruction: the subset has none. `addu` does not trap on overflow.

## Interfaces

`parc_dual_top` (parameters `IMEM_WORDS = 4096`, `DMEM_WORDS = 4096`,
`RESET_PC = 0`, `EXC_VECTOR = 0x3000`, `FULL_BYPASS = 1`):

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst` | in | clock; synchronous active-high reset |
| `imem_wen`, `imem_waddr`, `imem_wdata` | in | write one program word (byte address), normally while `rst` is held |
| `commit_valid[1:0]` | out | an instruction leaves W in the A [0] / B [1] pipe |
| `commit_pc[2]` | out | their PCs |
| `epc` | out | PC of the last instruction that raised an exception |
| `ev` | out | per-cycle event flags (`events_t` in `parc_pkg`): dual issue, swizzle, RAW stall, intra-block RAW/WAW/structural split, bypass use, jump, taken branch, young-partner squash, aligned-fetch discard, exception |

`parc_dual_core` has the same observation outputs plus a fetch-block port
(`imem_addr` → `imem_inst0/1`, combinational) and a data port (`dmem_addr`,
`dmem_rdata` combinational, `dmem_wen`/`dmem_wdata` written at the clock
edge). It can be attached to real memories that meet that timing.

Instructions use the MIPS32 encodings: R-type `addu` (funct 0x21) and `jr`
(0x08), SPECIAL2 `mul` (op 0x1c, funct 0x02), `addiu` 0x09, `lw` 0x23,
`sw` 0x2b, `bne` 0x05, `j` 0x02, `jal` 0x03. The all-zero word is a no-op.

## Files

| file | contents |
|------|----------|
| `rtl/parc_pkg.sv` | opcodes, decoded-instruction, pipe-register, bypass-source and event types |
| `rtl/parc_dual_top.sv` | processor + memories |
| `rtl/parc_dual_core.sv` | pipeline registers, squash and exception control, write-back |
| `rtl/parc_fetch.sv` | PC, aligned block address, redirect priority |
| `rtl/parc_imem.sv`, `rtl/parc_dmem.sv` | combinational memories |
| `rtl/parc_decode.sv` | one-instruction decoder (two instances) |
| `rtl/parc_regfile.sv` | 32×32 register file, 4R/2W |
| `rtl/parc_issue.sv` | issue and swizzle decision |
| `rtl/parc_bypass.sv` | one operand's bypass mux and stall request |
| `rtl/parc_alu_a.sv`, `rtl/parc_alu_b.sv` | A-pipe and B-pipe execute units |
| `tb/parc_asm_pkg.sv` | instruction encoders for the tests |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_parc_stall_only` for the `FULL_BYPASS = 0` build |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/parc_pkg.sv tb/parc_asm_pkg.sv tb/tb_parc_dual_top.sv \
    --top-module tb_parc_dual_top -Mdir obj
./obj/Vtb_parc_dual_top
```

Substitute another `tb/tb_<module>.sv` to test a single block.
`tb_parc_dual_top` runs the top at its default sizes and takes well under a
minute.

## How it was verified

* `tb_parc_dual_top` loads programs into the full-size top and compares the
  final registers, the whole data memory, `epc` and the number of committed
  instructions with a sequential instruction-set model in the testbench. It
  runs:
  * the sequences used to explain the design (independent pair issue, RAW
    with bypassing, the load-use chain, jump, taken branch, aligned fetch,
    precise exception, structural, WAW and WAR pairs, `jal`/`jr`), checking
    commit cycles against hand-worked timing;
  * 200 random programs of 400 instructions with forward branches, jumps and
    computed jumps. One in three also contains an illegal instruction, whose
    handler stores a register before ending the program.

  It fails if any event in `ev` never occurs.
* `tb_parc_stall_only` runs the same programs on a top built with
  `FULL_BYPASS = 0`. It checks the stall-only timing of the RAW sequence, and
  that the bypass network is never used.
* `tb_parc_dual_core` runs the RAW sequence on a fully bypassed and a
  stall-only core side by side and checks both timings. It also checks a
  load, a store and an exception.
* Each other block has a unit test against an independent model: random
  stimulus plus directed cases.

## Limits and choices to be aware of

* The memories are ideal. There are no caches, misses or memory stalls.
* These are choices, not derived from a larger specification: MIPS32
  encodings, the 32-entry register file, the memory sizes, the reset PC
  (0) and exception vector (0x3000), and `mul` finishing in one cycle in A0.
* The WAW pair rule is also a choice: the older instruction issues alone,
  rather than both issuing and the older write being suppressed.
* The placement of a lone instruction is a choice: the A pipe whenever it
  may.
* Pipeline diagrams that ignore the jump bubble would show jump targets one
  cycle earlier. Here a jump resolved in D always costs one cycle.
* There is only one exception source (illegal instruction). There is no
  cause register and no way back from the handler.
