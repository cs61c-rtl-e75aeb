# A single-cycle MIPS-subset processor with PLA control

This is a 32-bit processor that runs every instruction in exactly one clock
cycle. It implements seven MIPS instructions: `add`, `sub`, `ori`, `lw`, `sw`,
`beq` and `j`. In one cycle it fetches an instruction, decodes it, reads two
registers, computes, writes memory or a register, and updates the PC. The
central idea is that the control unit is nothing more than a table. The table
maps each opcode to a fixed set of control-point values. Because that table is
a sum of products, the control unit is built as a **programmable logic array
(PLA)**, and the personality matrix of the PLA is the control table itself.

The same PLA block appears in two stand-alone examples that sit next to the
processor in the top level. One shows product terms shared between outputs.
The other shows the short-hand "cross" notation. A third PLA in the top level
is programmed after manufacture, by blowing fuses.

## Instruction set

| instr | format | op<31:26> | func<5:0> | register transfer |
|---|---|---|---|---|
| add | R | 000000 | 100000 | R[rd] ← R[rs] + R[rt] |
| sub | R | 000000 | 100010 | R[rd] ← R[rs] − R[rt] |
| ori | I | 001101 | – | R[rt] ← R[rs] OR ZeroExt(imm16) |
| lw  | I | 100011 | – | R[rt] ← MEM[R[rs] + SignExt(imm16)] |
| sw  | I | 101011 | – | MEM[R[rs] + SignExt(imm16)] ← R[rt] |
| beq | I | 000100 | – | if R[rs] = R[rt]: PC ← PC + 4 + SignExt(imm16)·4 |
| j   | J | 000010 | – | PC ← {(PC+4)<31:28>, target<25:0>, 00} |

Every instruction that is not a branch or jump also does PC ← PC + 4. Field
positions are rs = <25:21>, rt = <20:16>, rd = <15:11>, imm16 = <15:0> and
target = <25:0>. Any other opcode, and any other R-type func code, has no
effect: nothing is written and the PC advances by 4.

## Datapath (`datapath`)

```
            RegDst                        ALUctr
  Rd ─┐    ┌─────┐                          │
      ├─1─►│ mux ├─► Rw ┌──────────┐busA ┌──▼──┐ result ┌──────────┐
  Rt ─┴─0─►└─────┘     │ 32 x 32  ├─────►│ ALU ├──┬────►│Adr  Data │     MemtoReg
  Rs ─────────────► Ra │ register │      └──┬──┘  │     │    Memory├─1─►┌─────┐
  Rt ─────────────► Rb │   file   │busB ┌─────┐   │ busB│Data In   │    │ mux ├─► busW
               busW ──►│  RegWr   ├──┬─►│0 mux├─► │ ───►│WrEn=MemWr│  ┌►└─────┘
                       └──────────┘  │  │1    │   │     └──────────┘  │0
  imm16 ─► Extender(ExtOp) ──────────┼─►└─────┘   └───────────────────┘
                                     └─ ALUSrc         Zero ─► fetch unit
```

* `regfile`: 32 registers of 32 bits. It has two combinational read ports and
  one write port. Register 0 always reads as zero, and writes to it are
  dropped.
* `extender`: zero-extends the immediate when ExtOp = 0 (`ori`) and
  sign-extends it when ExtOp = 1 (`lw`, `sw`).
* `alu`: add, subtract or OR. Zero is 1 when the result is 0, which is how
  `beq` compares its two registers. It does not detect overflow.
* `data_memory`: the read is combinational, so `lw` finishes inside its cycle.
  The write happens at the clock edge.
* `mux2`: the multiplexer behind RegDst (5 bits), ALUSrc and MemtoReg
  (32 bits), and the next-PC muxes (30 bits).

## Control as a PLA (`control`, `pla`)

The control unit decodes 12 inputs, `{op, func}`, into 11 outputs. Each
instruction has one product term. The R-type terms test all 12 bits. The I-
and J-type terms test only the 6 opcode bits. The OR plane then collects the
terms into the control signals:

| signal | add | sub | ori | lw | sw | beq | j |
|---|---|---|---|---|---|---|---|
| RegDst   | 1 | 1 | 0 | 0 | x | x | x |
| ALUSrc   | 0 | 0 | 1 | 1 | 1 | 0 | x |
| MemtoReg | 0 | 0 | 0 | 1 | x | x | x |
| RegWr    | 1 | 1 | 1 | 1 | 0 | 0 | 0 |
| MemWr    | 0 | 0 | 0 | 0 | 1 | 0 | 0 |
| nPC_sel  | 0 | 0 | 0 | 0 | 0 | 1 | 0 |
| Jump     | 0 | 0 | 0 | 0 | 0 | 0 | 1 |
| ExtOp    | x | x | 0 | 1 | 1 | x | x |
| ALUctr   | add | sub | or | add | add | sub | x |

For example, RegWr is the OR of the add, sub, ori and lw terms. MemtoReg is
just the lw term.

* **Don't-cares.** Every `x` is programmed as 0, so no term is connected where
  it is not needed. A different choice of don't-cares can merge terms. For
  instance, RegDst could also be 1 for `sw`, `beq` and `j`. The table is
  written so that this is easy to change.
* **The personality is computed, not typed in.** `control.sv` builds the
  `AND_TRUE`, `AND_COMP` and `OR_PLANE` parameters of the generic `pla` with
  constant functions. It takes the opcode constants from `cpu_pkg` and a
  `row()` function that holds one table column per instruction. To add an
  instruction, add one term and one column.
* **ALUctr encoding.** The 3-bit code is add = 010, subtract = 110,
  or = 001. This is the usual textbook encoding, chosen for this design. It
  lives in the `alu_op_e` enum in `cpu_pkg`.

### The generic PLA (`pla`)

Each input is available in true and complemented form. Product term `t`
connects to input `i` in one of four ways:

* true form: `AND_TRUE[t][i] = 1`
* complemented form: `AND_COMP[t][i] = 1`
* both forms: the term is always 0. This is how an unprogrammed array behaves.
* neither form: the term does not depend on that input.

Output `o` is the OR of all terms `t` for which `OR_PLANE[o][t] = 1`. Any
number of outputs can share one term. The parameters describe the array
*after* programming, with the unwanted connections removed; `pla_fuse` below
models the programming step itself. The `terms` output shows the
product-term lines.

The two examples:

* `pla_shared_terms` has inputs A, B, C and five terms: AB, B'C, AC', B'C'
  and A. Its four outputs are F0 = A + B'C', F1 = AC' + AB,
  F2 = B'C' + AB and F3 = B'C + A. Terms AB and B'C' each feed two outputs.
  These are also the default parameters of `pla`.
* `pla_xnor_xor` has inputs A, B, C, D and four terms. Its outputs are
  F0 = AB + A'B' (XNOR) and F1 = CD' + C'D (XOR). The array has four OR
  gates, but the other two have no terms connected.

### Programming after manufacture (`pla_fuse`)

`pla_fuse` has the same two planes as `pla`. The difference is that each
crosspoint is a one-way programmable element, held in a register:

* **Fuse array** (`ANTIFUSE = 0`, the default). Every crosspoint starts
  connected. Programming a crosspoint breaks the connection.
* **Anti-fuse array** (`ANTIFUSE = 1`). Every crosspoint starts open.
  Programming a crosspoint makes the connection.

Programming a crosspoint a second time has no effect. It can never return to
its initial state.

A blank fuse array has every AND gate wired to both forms of every input, so
all of its terms and outputs are 0. A blank anti-fuse array has no OR
connections, so its outputs are also 0.

The programming port writes one crosspoint per rising edge of `clk` while
`prog_en` is 1:

* `prog_plane = 0`: the true input `prog_col` of term `prog_row`
* `prog_plane = 1`: the complemented input `prog_col` of term `prog_row`
* `prog_plane = 2`: term `prog_col` of output `prog_row`

An assertion flags plane 3. `rst` returns the array to its blank state. This
models a new part: a real fuse cannot be restored.

To program a personality on a fuse array, blow every crosspoint that the
personality does not use. On an anti-fuse array, make every crosspoint it
does use. The top level has a 3-input, 5-term, 4-output fuse array
(`pla3_*` ports), and the end-to-end test programs it to the shared-term
example above.

## Fetch unit and next PC (`ifetch`)

The PC is a 30-bit word address, and its two low bits always read as 00.
The fetch unit has two adders. One computes PC + 4. The other adds the
sign-extended offset to that sum. `nPC_sel` from the control unit only means
"this is a branch". An AND gate turns it into the mux select:

```
nPC_MUX_sel = nPC_sel AND Zero        (0 x -> 0, 1 0 -> 0, 1 1 -> 1)
```

A second mux after the first one selects the jump target when Jump = 1. The
instruction memory (`inst_memory`) is inside the fetch unit and is read
combinationally at the PC.

## Timing

* **Clock edge.** All state changes on the **falling edge** of `clk`: the PC,
  the register file, the data memory and the instruction-memory load port.
  Everything between two falling edges is combinational: fetch, decode,
  register read, ALU, memory read and write-back mux. One instruction
  completes per cycle, and the cycle must be long enough for the slowest
  path, which is `lw`.
* **Reset.** `rst` is synchronous and active high. It sets PC = 0 and clears
  all registers. Data memory is not cleared.
* **Fuse PLA.** `pla_fuse` has its own clock (`pla3_clk` in the top level)
  and programs on the rising edge. The other PLAs have no clock.
* **Loading a program.** Hold `rst` high, write the words through
  `prog_we`/`prog_addr` (a byte address)/`prog_data`, then release `rst`.

## Top level (`cs61c_top`)

The top level contains the processor, the two example PLAs and the fuse
PLA side by side.
They have separate ports. The processor ports are:

| port | direction | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | reset |
| `prog_we`, `prog_addr`, `prog_data` | in | 1, 32, 32 | program load port |
| `pc`, `instr` | out | 32 each | current PC and instruction |
| `ctrl` | out | `ctrl_t` | all control signals |
| `zero` | out | 1 | ALU Zero flag |
| `rw`, `bus_w` | out | 5, 32 | register write |
| `alu_result`, `bus_b` | out | 32 each | memory address and store data |

The PLA ports are:

* `pla1_a..c` → `pla1_f = {F3,F2,F1,F0}`
* `pla2_a..d` → `pla2_f = {F1,F0}`
* for the fuse array: `pla3_clk`, `pla3_rst`, `pla3_prog_en`,
  `pla3_prog_plane`, `pla3_prog_row`, `pla3_prog_col`, `pla3_in` (3) and
  `pla3_out` (4)

Parameters: `IMEM_WORDS` and `DMEM_WORDS` both default to 1024 words (4 KiB
each).

## Choices made where the design leaves things open

* **Memories.** Both memories are 1024 words. The word index is byte-address
  bits <11:2>. Higher address bits wrap around, and the two low bits are
  ignored, so only aligned word accesses exist. Instruction memory is filled
  through a load port.
* **Jump.** Jump is implemented with the standard MIPS rule,
  {(PC+4)<31:28>, target, 00}.
* **Branch target.** PC + 4 + SignExt(imm16)·4, i.e. relative to the next
  instruction.
* **Stores and ori.** A store writes R[rt]. `ori` is a bitwise OR.
* **Undefined opcodes.** They do nothing.
* **Fuse PLA.** The crosspoint registers, the programming port and the reset
  of `pla_fuse` are a logic model of a physical programming step.
* **Not built.** Overflow detection and exceptions. Byte and halfword memory
  access. Input/output devices.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_cs61c_top` runs at the default sizes. It loads a random 600-instruction
  program with forward branches and jumps, ending in a halt (`beq $0,$0,-1`).
  An instruction-level model runs the same program in lockstep. Every cycle
  the testbench compares the PC, the instruction, the register write and the
  memory write. It counts each mechanism and fails if any of these never
  happens:
  * each of the seven instructions
  * a taken and an untaken `beq`
  * a discarded write to register 0
  * a negative load/store offset
  * an `ori` immediate with bit 15 set

  It also checks both PLAs over all their input combinations. Then it blows
  33 fuses of the field-programmable array and checks that the array computes
  the shared-term functions.
* `tb_single_cycle_cpu` runs a hand-written program. It loops to sum 10..1,
  then does loads and stores with positive and negative offsets. It checks
  the stored values and the loaded values. It also checks that the halt is
  reached after exactly 51 cycles, which is one instruction per clock.
* Block testbenches:
  * `tb_control` checks every entry of the control table.
  * `tb_ifetch` checks the next-PC rules under random control inputs.
  * `tb_pla` checks the default personality exhaustively, plus a random
    6-input, 8-term, 5-output personality.
  * `tb_pla_fuse` programs a fuse array and an anti-fuse array. It checks
    the blank state, the programmed functions, that programming again
    changes nothing, that blowing one more fuse has the expected effect, and
    that reset works.
  * The remaining block testbenches compare their block against reference
    models kept inside the testbench.

Simulating with Verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert --top-module tb_cs61c_top \
  -Irtl -Itb -y rtl -y tb rtl/cpu_pkg.sv tb/mips_asm_pkg.sv tb/tb_cs61c_top.sv
./obj_dir/Vtb_cs61c_top
```

Replace `tb_cs61c_top` with any other `tb_*` module to run that testbench.
`tb/mips_asm_pkg.sv` has small encoder functions (`enc_add`, `enc_lw`, …) for
writing test programs.
