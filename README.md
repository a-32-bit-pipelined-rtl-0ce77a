# A three-stage pipelined 32-bit RISC processor

This is a small load/store processor with a 32-bit datapath. Its pipeline is kept as simple as a
pipeline can be. It has three stages: fetch, execute and writeback. All three step on every clock
edge, and each computes its next state from the same snapshot of the whole machine. There is no
stall, no interlock and no forwarding. One instruction completes every clock. Two rules follow
from this, and the program must respect them. They are covered under
[Pipeline timing](#pipeline-timing-the-part-to-read-carefully).

The instruction set has twelve instructions. The register file holds 256 registers, and program
and data live in separate memories (a Harvard arrangement).

## Instruction word

Every instruction is one 32-bit word made of four one-byte fields:

| bits  | 31..24 | 23..16 | 15..8 | 7..0 |
|-------|--------|--------|-------|------|
| field | opcode | rega   | regb  | regc |

Below, `A`, `B` and `C` are the *contents* of registers `rega`, `regb` and `regc`, and `R0` is
the contents of register 0.

| opcode | name | effect |
|--------|------|--------|
| 0x00 | NOP  | nothing |
| 0x01 | ADD  | `reg[regc] = A + B` (low 32 bits) |
| 0x02 | MULT | `reg[regc] = A * B` (low 32 bits) |
| 0x03 | AND  | `reg[regc] = A & B` |
| 0x04 | OR   | `reg[regc] = A \| B` |
| 0x05 | NOT  | `reg[regc] = ~A` |
| 0x06 | SLL  | `reg[regc] = A << B`; the whole 32-bit value of B is the shift count, so 32 or more gives 0 |
| 0x07 | LD   | `reg[regc] = dmem[A + B]` |
| 0x08 | ST   | `dmem[C] = A + B` |
| 0x09 | EQ   | `reg[regc] = (A == B) ? 0 : 0xFFFFFFFF` |
| 0x0A | GT   | `reg[regc] = (A > B, unsigned) ? 0 : 0xFFFFFFFF` |
| 0x0B | JMP  | if `A == R0`: jump to address `C` and set `reg[regb] = PC + 4` (see below); otherwise nothing |
| 0x0C..0xFF | — | executed as NOP |

Some of these are easy to misread:

- **EQ and GT use inverted logic.** They return **all zeros when the condition holds** and all
  ones when it does not. Zero is the "true" value, which suits JMP, since JMP branches when a
  register equals register 0.
- **ST does not store a register.** It stores the *sum* `A + B` at the address held in `regc`.
  There is no store that copies a register unchanged. To store register X, use
  `ST X, Z, addr` with a register Z that holds 0.
- **JMP** is the only control-transfer instruction. It is conditional on `A == R0`. With
  `rega = 0` the condition always holds, so `JMP 0, link, target` is an unconditional jump.
  Register 0 is an ordinary writable register. Keep it at 0 if you want that idiom.
- The memories hold one 32-bit word per address. There is no byte addressing. PC advances by 4,
  so consecutive instructions sit at addresses 0, 4, 8, ... Data addresses are plain word
  indices.

## Pipeline timing (the part to read carefully)

State registers:

- fetch: `PC`, `CIR` (current instruction register) and `PIR` (previous instruction register)
- execute: an **ExState** record made of `result`, `taken`, `wbflag` (0 none, 1 memory,
  2 register), `memwbloc` (memory address) and `regwbloc` (register number)
- writeback: the architectural state itself, i.e. the register file and the data memory

On every rising edge, all of the following happen at once:

| stage | next state |
|-------|------------|
| fetch | `CIR <= PM[PC]`, `PC <= PC + 4`, `PIR <= CIR` |
| execute | `ExState <= f(CIR, registers, data memory, PC)` |
| writeback | the old ExState is committed to the data memory or the register file |

An instruction fetched at edge *n* is executed at edge *n+1*, and its result is in the register
file or the data memory after edge *n+2*.

**No forwarding.** The execute stage reads the register file and the data memory directly. The
instruction just before is committed at the same edge at which the current one is executed, so
the current one reads the *old* value. A result becomes visible to the second instruction after
its producer, not to the first. The same holds for a load that follows a store. The hardware does
not detect this case. Put an independent instruction or a NOP between a producer and its
consumer.

**Jumps.** The jump decision is made in the execute stage, combinationally, while the JMP sits in
`CIR`. In that same cycle the fetch stage loads `CIR` from the jump target instead of from `PC`,
and sets `PC` to target + 4. The word after the JMP is never executed, and the jump costs no
cycle. The link value written to `reg[regb]` is the fetch `PC` of that cycle plus 4. Because that
`PC` already points at the word after the JMP, the link is the **JMP's own address + 8**. A
return through this link therefore skips the word that follows the JMP.

**Reset.** An asynchronous, active-low `rst_n` clears `PC`, `CIR`, `PIR` and the ExState record.
An all-zero `CIR` is a NOP. Register and memory contents are not reset. Execution starts at
address 0 on the first edge after `rst_n` rises, and it never stops, because there is no halt
instruction. A program ends by parking in a jump to itself.

## Hierarchy

```
pmp                      top level: wires the three stages together
├── fetch_unit           PC, CIR, PIR; jump redirect
│   └── word_mem         program memory (1 read port)
├── execute_unit         decode, operand reads, ExState register, jump decision
│   └── word_alu         ADD/MULT/AND/OR/NOT/SLL/EQ/GT; also forms the LD/ST address A+B
└── writeback_unit       commits ExState; serves the execute stage's reads
    ├── word_mem         data memory (execute port + observation port)
    └── regfile          256 x 32, 5 read ports (rega, regb, regc, r0, observation)
riscp_pkg                opcodes, field helpers, the ExState struct
```

The longest combinational path is the load:
`CIR` → register read → adder → data memory read → ExState register.
The jump path runs in parallel: register compare → program memory address → `CIR`.

## Using it

### Top-level ports (`pmp`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `pm_we`, `pm_waddr`, `pm_wdata` | in | write a program word |
| `dm_we`, `dm_waddr`, `dm_wdata` | in | write a data word |
| `rf_we`, `rf_waddr[7:0]`, `rf_wdata` | in | write a register |
| `dbg_dm_addr` → `dbg_dm_rdata` | in/out | read a data word (combinational) |
| `dbg_rf_addr` → `dbg_rf_rdata` | in/out | read a register (combinational) |
| `pc`, `cir`, `pir`, `ex`, `jmp_taken` | out | pipeline state, for observation |

Load the program, the data and the registers while `rst_n` is low, then release reset. A host
write to the data memory or the register file wins over a writeback in the same cycle. An
assertion in `writeback_unit` flags a host write made while a writeback is pending.

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `ADDR_BITS` | 16 | each memory holds 2^ADDR_BITS words. Addresses are 32 bits wide; the upper bits are ignored, so addresses wrap. |
| `PC_STEP` | 4 | PC increment, and the offset added to form the JMP link value |

The field widths (8-bit opcode and register numbers, 256 registers) and the 32-bit word are fixed
in `riscp_pkg`.

### Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/riscp_pkg.sv tb/tb_pmp.sv --top-module tb_pmp -o sim
./obj_dir/sim
```

Use the same command for `tb_word_alu`, `tb_word_mem`, `tb_regfile`, `tb_fetch_unit`,
`tb_execute_unit` and `tb_writeback_unit`.

`tb_pmp` runs the top level at its default parameters, in two phases:

1. **A summing loop.** It adds 10 + 9 + ... + 1, stores 55 at data word 100 and parks. The test
   checks the sum, and also checks that the store lands on the 53rd clock edge. The store is the
   51st instruction executed, so this confirms one instruction per clock and the two-edge
   commit latency. The program is a worked example of the rules above. A NOP separates the
   counter decrement from the JMP that tests it. The JMP at the end of the loop body is
   unconditional (`rega = 0`).
2. **Random programs.** Both memories are filled with random contents and random instructions of
   every opcode, including unassigned ones. Each program then runs for 20,000 clocks. After every
   clock, `PC`, `CIR`, `PIR` and ExState are compared against an instruction-level model written
   independently in the testbench. At the end, all registers and data words are compared. The
   test also counts taken and not-taken jumps, memory and register writebacks, and
   back-to-back dependences, and fails if any of them never occurred.

Each unit has its own testbench. These compare the unit against reference values computed in the
testbench.

## Design choices and where they depart from a literal reading

The instruction semantics above come from a formal, equation-level specification of the
machine. In a few places the equations cannot be built as written, or contradict themselves.
These are the choices made here:

1. **Jump decision timing.** Read literally, the fetch rule redirects when the instruction in
   `CIR` is a JMP *and the registered `taken` flag of the previous instruction* is set. Under that
   reading, a JMP would only jump when it directly followed another taken JMP. This RTL uses the
   decision for the JMP that is currently in `CIR`.
2. **PC after a jump.** Read literally, the redirect leaves `PC` at the target while `CIR`
   already holds the target instruction, so the target would be executed twice. This RTL sets
   `PC` to target + 4.
3. **Writeback register.** The equations store the *contents* of `regc` (or `regb` for JMP) in a
   field that is typed as a register number. This RTL uses the register number.
4. **PC increment.** The constant is named "four" and described as the step to the next
   instruction, but the bit pattern given for it reads eight. This RTL uses 4, as the `PC_STEP`
   parameter.
5. **Unassigned opcodes** (0x0C to 0xFF) have no defined behaviour. They execute as NOP.
6. **Memory size** is not specified. The memory is addressed by full 32-bit words, but each
   memory here holds 2^16 words and wraps above that. Change `ADDR_BITS` to enlarge it. One
   limit applies: the simulator rejects arrays of 2^30 or more entries, so the full 32-bit space
   cannot be modelled as a flat array.
7. **Host ports** (loading and observation) are additions that the processor needs in order to
   be used. They are not part of the instruction-level machine.

Everything else is the specification's as written: field positions, opcodes, the
inverted-sense EQ and GT, the ST semantics, the JMP condition and link value, the absence of
forwarding, and the reset values.
