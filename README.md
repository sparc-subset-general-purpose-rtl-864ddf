# A five-step SPARC V8 integer subset processor

This is a small 32-bit processor that runs a subset of the SPARC V8 integer
instruction set. It is meant as a simple master controller: a core that an
FPGA or a larger chip can use to sequence other hardware. Every instruction
passes through the same five steps (Fetch, Decode, Execute, Memory, Write
Back), one clock cycle each. A six-state FSM (Idle plus the five steps) steps
through them, and a decoder turns the current step and the instruction's opcode
fields into register enables. Instructions do not overlap, so there are no
hazards, no forwarding and no stalls. Each instruction takes exactly five
cycles.

The core reads its program from an instruction ROM and loads and stores data
in a RAM. The top module, `sparc_processor`, puts the three together.

## Instruction subset

| group            | instructions                                           | SPARC encoding            |
|------------------|--------------------------------------------------------|---------------------------|
| arithmetic       | ADD, SUB, UMUL (and ADDcc, SUBcc, UMULcc)              | op=10, op3 0x00/0x04/0x0A |
| logic            | AND, ANDN, OR, ORN, XOR, XNOR (and their cc forms)     | op=10, op3 0x01..0x07     |
| shift            | SLL, SRL, SRA                                          | op=10, op3 0x25..0x27     |
| memory access    | LD (word), ST (word)                                   | op=11, op3 0x00 / 0x04    |
| control transfer | CALL; Bicc with BE, BCS, BNEG, BVS                      | op=01; op=00, op2=010     |

The second operand is `R[rs2]` when `i` (bit 13) is 0. When `i` is 1 it is the
sign-extended 13-bit immediate. A cc form (op3 bit 4 set) also writes the
integer condition codes `icc = {n, z, v, c}`. They sit in PSR bits 23:20, and
the rest of the PSR reads zero. The flags follow SPARC: `c` is the carry of
ADD and the borrow of SUB, and `v` and `c` are 0 for logic and multiply
results. UMUL writes the low 32 bits of the product to `rd` and the high 32
bits to the Y register.

A branch is taken when its condition holds on `icc`. The four conditions are
z (BE), c (BCS), n (BNEG) and v (BVS). A taken branch goes to
`PC + 4*sign_extend(disp22)`. The other condition codes, BN and BA included,
never branch. CALL always goes to `PC + 4*disp30`.

These are the deliberate differences from full SPARC V8:

* **No delay slot.** The next instruction is fetched only after the PC has
  been updated, so the annul bit has nothing to annul and is ignored.
* **CALL does not link.** It does not write the return address to r15, so it
  acts as an unconditional PC-relative jump. `CALL 0` loops on itself and is
  the natural way to end a program.
* **No register windows, traps or alignment checks.** There are 32 flat
  registers, and r0 always reads zero. SETHI, JMPL, traps and every other
  encoding outside the table run as a no-op that only advances the PC. The
  low two address bits are ignored.

## The five steps

Each step is one clock cycle. The registers a step loads change at the clock
edge that ends it.

| step | state      | what happens                                                                 | enables raised                          |
|------|------------|------------------------------------------------------------------------------|-----------------------------------------|
| T0   | Fetch      | `IR <- ROM[PC]`, `nPC <- PC + 4`                                             | en_rom, en_ir, en_npc                   |
| T1   | Decode     | `opr1 <- R[rs1]`, `opr2 <- R[rs2]` or simm13; store: `MDR2 <- R[rd]`; branch decision and displacement latched | en_dec, en_rs1, en_rd, en_rs2 (i=0), en_mdr2 (ST) |
| T2   | Execute    | ALU result into the result register; LD/ST: `MAR <- opr1 + opr2`; cc forms: icc updated | en_exe_out, aluctrl, en_mar, en_psr     |
| T3   | Memory     | LD: `MDR <- RAM[MAR]`; ST: `RAM[MAR] <- MDR2`; other instructions do nothing | en_ram, en_mdr (LD), wr_ram (ST)        |
| T4   | Write Back | `R[rd] <- result` (ALU ops) or `MDR` (LD); UMUL: `Y <- high word`; `PC <- nPC` or the branch/CALL target | en_pc, en_wb, en_wrt, sel_mdr, wr_y     |

For an ADD the decoder gives exactly this pattern. In T0 it raises en_npc,
en_ir and en_rom. In T1 it raises en_dec, en_rd, en_rs1 and en_rs2. In T2 it
raises en_exe_out, with `aluctrl = 5'b11001` (the code for ADD). T3 raises
nothing. T4 raises en_pc, en_wb and en_wrt. The control unit's testbench
checks every step against this column pattern.

The ALU codes are set in `sparc_pkg` (`alu_op_t`). ADD is `11001`, the idle
value is `00000`, and the codes of the other operations were chosen for this
implementation.

The FSM waits in Idle until `en` is high. After that it cycles
Fetch→…→Write Back→Fetch on its own and no longer looks at `en`. A
synchronous `rst` sends it back to Idle from any state and clears every
register: PC, nPC, IR, the decode latches, the result and PSR registers,
MAR/MDR/MDR2 and the register file. The RAM is not cleared. After a reset,
execution restarts at address 0.

## Block structure

```
sparc_processor
├── core
│   ├── control_unit      FSM + decoder, driven by op, op2, op3, i
│   │   ├── control_fsm   Idle / Fetch / Decode / Execute / Memory / Write Back
│   │   └── control_dec   step + opcode -> ctrl_t bundle of enables
│   └── datapath
│       ├── fetch_unit    PC, nPC, IR; PC update in T4
│       ├── decode_unit   field split, opr1/opr2/rd latches, branch decision
│       ├── regfile       r0..r31 (3 read ports: rs1, rs2, rd), Y
│       ├── execute_unit  alu, result + high-word registers, PSR icc
│       ├── mem_access    MAR, MDR, MDR2, RAM port, result multiplexer
│       └── writeback_unit register-file and Y write requests
├── rom                   instruction memory (combinational read)
└── ram                   data memory (combinational read, clocked write)
```

A few connections need explaining:

* **Branch decision.** The decode unit settles it in T1, using the icc from
  the execute unit's PSR. It sends a `take` flag and a byte displacement back
  to the fetch unit. In T4 the fetch unit loads either `PC + disp` or `nPC`.
* **Store data.** This comes from the register file's third read port,
  addressed by `rd`, and waits in MDR2 from T1 to T3.
* **Write-back value.** The memory-access unit sends one value on to write
  back: MDR for a load (`sel_mdr`), or the execute result for anything else.
* **Control bundle.** The control signals travel as the packed struct
  `sparc_pkg::ctrl_t`. Most of its fields follow the classic naming (en_pc,
  en_npc, en_ir, ...). Three fields were added in this implementation:
  `en_ram` (RAM strobe of T3), `sel_mdr` (load result select) and `wr_y`
  (UMUL high word to Y).

## Interface of `sparc_processor`

| port  | dir | width | meaning                                  |
|-------|-----|-------|------------------------------------------|
| clk   | in  | 1     | clock, all registers on the rising edge  |
| rst   | in  | 1     | synchronous reset, active high           |
| en    | in  | 1     | start: leave Idle for Fetch              |
| state | out | 3     | FSM state (0 Idle, 1 Fetch … 5 Write Back) |
| pc    | out | 32    | program counter                          |
| ir    | out | 32    | instruction register                     |
| psr   | out | 32    | PSR, icc at bits 23:20                   |
| y     | out | 32    | Y register                               |

The top has three parameters. `ROM_WORDS` and `RAM_WORDS` default to 256
words each. `ROM_INIT` is an optional hex file, one word per line, loaded
into the ROM with `$readmemh`. Without it, a testbench writes the program
straight into `u_rom.mem` before raising `en`. Both memories index words by
`addr[log2(WORDS)+1:2]` and wrap past the end.

## How far to trust it, and where it departs from the design it follows

The design this RTL implements sets the instruction list, the five steps and
what moves in each, the control-signal names with their step-by-step pattern
for an ADD (including the ALU code 11001), the Idle/en/rst FSM and the block
diagram. Everything else was decided here:

* **No overlapping of instructions.** The design is described both as a
  "five-stage pipeline" and as an FSM in which each instruction runs T0 to T4
  before the next Fetch. This RTL follows the FSM and its control table, so
  there is no overlap.
* **Branch rule.** The register-transfer description takes the branch when
  the annul bit is 0, and also says the branch is decided from icc. The RTL
  branches on the condition code, as SPARC does.
* **UMUL result split.** The table puts the low word in `rd` and the high
  word in a second register, while the prose says the reverse. The RTL
  follows the table and SPARC: low word to `rd`, high word to Y.
* **Store destination.** The store step is written `M[MDR] <- MDR` in one
  place and "MDR2 is stored in memory at address MAR" in another. The RTL
  does the latter.
* **Choices of this implementation.** The other ALU codes, which instructions
  raise en_psr (the cc forms), and the three added control signals. Also the
  memory sizes and timing, synchronous reset, r0 reading zero, read ports
  that return zero when not enabled, the no-link CALL, and no-ops for
  unsupported encodings.

None of the FPGA results that were reported for this design (about 58 MHz,
0.27 W) are reproduced here. They depend on a device and a tool flow that the
RTL does not fix. After coarse synthesis with Yosys the top comes to
roughly 165 word-level cells and 343 flip-flop bits. The memories and the
32×32 register array are counted separately.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The unit testbenches compare against values
computed independently in the testbench. Examples: 64-bit arithmetic for the
ALU flags, model arrays for the memories and register file, and the expected
control vector for every step × instruction pair.

* `tb_core` runs a hand-written program on the core. The program covers
  overflow, carry and negative flags, taken and untaken branches, SRA, ANDN,
  ORN, ST, LD and CALL. The test checks the final registers and memory word
  against hand-worked values, and checks that each instruction takes five
  cycles.
* `tb_instruction_set` runs each of the nineteen base instructions once, on
  the full processor at its default sizes. Every result is worked out by
  hand. The test also checks the path of PCs through the taken branches and
  CALL, and the five-cycle spacing.
* `tb_sparc_processor` is the end-to-end test. It runs at the default sizes.
  1. It first runs a short hand-checked program.
  2. It then fills the ROM with 256 random instructions, including groups
     that set carry and overflow and then branch on them, and fills the RAM
     with random words.
  3. It runs 3000 instructions in lockstep with an instruction-level
     reference model (`tb/sparc_tb_pkg.sv`). After every instruction it
     compares all registers, Y, icc, the PC and any stored word.
  4. Halfway through, it raises `rst` during an Execute step. It checks the
     return to Idle, the wait for `en` and the restart from address 0.

  It counts every instruction kind, both outcomes of each branch condition,
  the cc forms, the no-op, the reset and the Idle wait. Anything that never
  happens is counted as a failure.

`core` also carries concurrent assertions, checked whenever `--assert` is
on. The ROM is read only in Fetch and the RAM is touched only in the Memory
step. A RAM write never happens without its access strobe, and the PC moves
only in Write Back.

Simulating with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    --top-module tb_sparc_processor \
    -y rtl -y tb +libext+.sv rtl/sparc_pkg.sv tb/sparc_tb_pkg.sv tb/tb_sparc_processor.sv
./obj_dir/Vtb_sparc_processor
```

For the other testbenches, replace the top module and the last file. Leave
out `tb/sparc_tb_pkg.sv` where a testbench does not import it. The whole
suite runs in seconds. `-Wno-fatal` keeps lint warnings, such as unused
package constants, from stopping the build. `--timescale` supplies a time unit
for the RTL files, which declare none.

## Extending it

* **A new ALU instruction.** Add a code to `alu_op_t`, a case to `alu`, a
  line to the op3 decode in `control_dec`, and a case to the reference model.
* **SETHI or a linking CALL.** These would need a write-back source beyond
  `mem_access.data_out`, such as the PC or the immediate shifted by 10.
* **Overlapping the steps.** A pipelined version would need the decoder's
  enables split per stage and hazard handling. None of that exists here.
