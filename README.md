# A single-cycle 8-bit CPU with a shared-control ALU

This is a small teaching processor. Every instruction is fetched, decoded
and executed in one clock cycle. A fixed datapath does all the work: a
register file, an ALU, a few 2-to-1 multiplexers and two memories. Each
opcode is simply a setting of 18 control lines, `c1` to `c18`. Once you
know what each line steers, the whole machine follows from one table.
The ALU saves hardware in the same spirit. Its two select lines
configure a shifter and an adder/subtractor at once, and a result
multiplexer keeps the output of the unit that was asked for.

| Resource | Size |
|---|---|
| Registers | 4 × 8 bit: A, B, C, D (numbered 00, 01, 10, 11) |
| Flags | carry C, overflow V, negative N, zero Z |
| Program counter | 6 bit |
| Code memory | 64 words × 16 bit, writable by the program |
| Data memory | 256 bytes |
| Timing | one instruction per rising clock edge, no pipeline, no stalls |

## Instruction word

```
 15   12 11 10 9  8 7             0
+-------+-----+----+---------------+
| opcode|  X  | Y  |   immediate   |
+-------+-----+----+---------------+
```

`X` is normally the destination register and `Y` the source register. The
low byte holds either an immediate value, a data address, or a branch
offset.

| opcode | mnemonic | effect | flags |
|---|---|---|---|
| 0000 | NOOP | nothing | – |
| 0001 | INPUTC / INPUTCF / INPUTD / INPUTDF (Y = 00/01/10/11) | `code[imm] ← code_in`, `code[X+imm] ← code_in`, `data[imm] ← data_in`, `data[X+imm] ← data_in` | – |
| 0010 | MOVE X, Y | `X ← Y` (computed as Y + 0) | – |
| 0011 | LOADI / LOADP X, imm | `X ← imm` | – |
| 0100 | ADD X, Y | `X ← X + Y` | all four |
| 0101 | ADDI X, imm | `X ← X + imm` | all four |
| 0110 | SUB X, Y | `X ← X − Y` | all four |
| 0111 | SUBI X, imm | `X ← X − imm` | all four |
| 1000 | LOAD X, [imm] | `X ← data[imm]` | – |
| 1001 | LOADF X, [Y+imm] | `X ← data[Y+imm]` | – |
| 1010 | STORE [imm], X | `data[imm] ← X` | – |
| 1011 | STOREF [Y+imm], X | `data[Y+imm] ← X` | – |
| 1100 | SHIFTL X (Y = x0) / SHIFTR X (Y = x1) | `X ← X << 1` / `X ← X >> 1` | all four |
| 1101 | CMP X, Y | flags of `X − Y`, nothing written | all four |
| 1110 | JUMP off | `PC ← PC + 1 + off` | – |
| 1111 | BRE/BRZ, BRNE/BRNZ, BRG, BRGE (bits 11:8 = 0000/0001/0010/0011) | branch if the condition holds | – |

Exactly seven instructions write the flags: ADD, ADDI, SUB, SUBI, SHIFTL,
SHIFTR and CMP. Branches test the flags left by the last of these. Branch
codes 0100 to 1111 in bits 11:8 are unused and act as NOOP.

The encodings of MOVE, LOADI, ADD, ADDI, LOAD, STORE, CMP, JUMP and BRG come
from the reference machine code of the example program below. The other
encodings are this implementation's own. They follow the order of the
instruction list and group related instructions under one opcode. All of
them are defined in `rtl/cpu_pkg.sv`, so a different encoding needs
changes there and in `control_unit`.

## The 18 control lines

| line | name | meaning when 1 |
|---|---|---|
| c1 | IMEM_WRITE_ENABLE | write `code_in` into code memory |
| c2 | PROGRAM_COUNTER_MUX | next PC is PC + 1 + offset (computed by the branch logic, not the decoder) |
| c3 | PROGRAM_COUNTER_WRITE_EN | PC loads its next value (1 for every instruction) |
| c4, c5 | REGISTERS_PORT0_SELECT1/0 | register on read port 0 (ALU operand a) |
| c6, c7 | REGISTERS_PORT1_SELECT1/0 | register on read port 1 |
| c8, c9 | REGISTERS_WRITE_SELECT1/0 | register written |
| c10 | REGISTERS_WRITE_ENABLE | write a register |
| c11 | ALU_SOURCE_MUX | ALU operand b is the immediate (0: read port 1) |
| c12, c13 | ALU_SELECT1/0 | 00 shift left, 01 shift right, 10 add, 11 subtract |
| c14 | FLAGS_WRITE_ENABLE | flags register loads the ALU flags |
| c15 | ALU_RESULT_MUX | pass the immediate instead of the ALU result |
| c16 | DMEM_INPUT_MUX | data memory write data is `data_in` (0: read port 1) |
| c17 | DMEM_WRITE_ENABLE | write data memory |
| c18 | REG_WRITEBACK_MUX | register write data comes from data memory (0: ALU result mux) |

The output of the ALU result mux (c15) is the most heavily used bus in the
machine. It is:

- the data memory address;
- the code memory write address (its low six bits);
- the value written to a register, unless c18 selects data memory.

So an "address" in the table below is either the immediate byte itself
(c15 = 1) or `register + immediate` computed by the ALU (c11 = 1 with an
add). The second form is the "F" (offset) variant of each memory
instruction.

Per-opcode settings (every line not listed is 0; c3 is always 1):

| instruction | port 0 | port 1 | write | other lines |
|---|---|---|---|---|
| NOOP | | | | |
| INPUTC | | | | c1, c15 |
| INPUTCF | X | | | c1, c11, add |
| INPUTD | | | | c15, c16, c17 |
| INPUTDF | X | | | c11, add, c16, c17 |
| MOVE | Y | | X | c10, c11, add |
| LOADI | | | X | c10, c15 |
| ADD / SUB | X | Y | X | c10, add/sub, c14 |
| ADDI / SUBI | X | | X | c10, c11, add/sub, c14 |
| LOAD | | | X | c10, c15, c18 |
| LOADF | Y | | X | c10, c11, add, c18 |
| STORE | | X | | c15, c17 |
| STOREF | Y | X | | c11, add, c17 |
| SHIFTL / SHIFTR | X | | X | c10, shl/shr, c14 |
| CMP | X | Y | | sub, c14 |
| JUMP, branches | | | | only the branch line to the c2 logic |

Two details here are easy to misread:

- **The ALU never idles.** Rows that name no operation leave c12/c13 at
  00, so the ALU shifts port 0 left and its result goes nowhere.
- **MOVE is an addition.** The immediate field of MOVE is 0, and the
  ALU computes `Y + 0`.

## The ALU

```
 a ──┬──────────────► shifter (L/R = c13) ──┬─ result ──► 0 ┐
     │                                      └─ shift out ─► 0 ┐      result mux (c12) ─► ALU_RESULT
     └─► adder/subtractor (add/sub = c13) ──┬─ sum ──────► 1 ┘      carry mux   (c12) ─► carry
 b ──────►                                  ├─ carry ─────► 1 ┘      overflow mux(c12) ─► overflow
                                            └─ overflow ──► 1, with 0 tied low
```

- `ALU_SELECT0` (c13) goes to both units at once. It is the shifter's
  left/right line and the adder's add/subtract line.
- `ALU_SELECT1` (c12) drives three multiplexers. Together they pick the
  result, the carry and the overflow of one unit.
  - After a shift, the carry is the bit shifted out and overflow is 0.
  - After an add or subtract, both come from the adder.
- Zero (NOR of all result bits) and negative (bit 7) are computed from the
  selected result.

The adder/subtractor is a ripple-carry chain of full adders.

- Subtraction is `X + ~Y + 1`. Each Y bit passes through an XOR with the
  subtract line, and that line is also the carry into bit 0.
- Carry is the carry out of bit 7. For a subtraction it is 1 when there
  was no borrow.
- Overflow is `c8 XOR c7`, the usual two's-complement overflow.
- The shifter is logical: zeros shift in from either side.

## Program counter and branches

The PC is a 6-bit register that loads every cycle. Its next value comes
from two add-only adders:

```
pc_next   = PC + 1
pc_branch = PC + 1 + offset      offset = low 6 bits of the immediate, two's complement
PC       <= c2 ? pc_branch : pc_next
```

Because the second adder starts from `PC + 1`, an offset is stored with
a "+1 correction". To move `d` instructions away from the branch
itself, you encode `d − 1`:

| want to go | encode |
|---|---|
| to the next instruction (+1) | 0 |
| +2 | 1 |
| to the branch itself (0) | −1 = 111111 |
| back 4 (−4) | −5 = 111011 |

Carries out of the adders are dropped, so the PC wraps from 111111 to
000000 and back.

`c2` is computed from the decoded jump/branch lines and the **stored**
flags:

```
c2 = JUMP
   | BRE  &  Z
   | BRNE & ~Z
   | BRG  & ~Z & (N XNOR V)
   | BRGE &      (N XNOR V)
```

After `CMP X, Y`, `N XNOR V` is true when `X − Y ≥ 0` as signed numbers,
so BRG and BRGE are signed comparisons. The carry flag is kept, but no
branch uses it, so there are no unsigned comparisons.

## Example: adding 1 to N

The program below is the reference workload. It sums 1..N, with N in
data byte 0, and stores the result in data byte 2. It sits at code
addresses 100000–101000, so after reset the PC points at its first
instruction.

```
100000  0011 01 00 00000000   LOADI B, 0        ; sum
100001  0011 00 00 00000001   LOADI A, 1        ; i
100010  1000 11 00 00000000   LOAD  D, [0]      ; N
100011  1101 00 11 00000000   CMP   A, D        ; Loop:
100100  1111 0010  00000011   BRG   End         ; +4, encoded 3
100101  0100 01 00 00000000   ADD   B, A
100110  0101 00 00 00000001   ADDI  A, 1
100111  1110 00 00 11111011   JUMP  Loop        ; −4, encoded −5
101000  1010 01 00 00000010   STORE [2], B      ; End:
```

For N = 5 the STORE executes in cycle 31, which is `3 + 5N + 3`. The
program fits easily: 9 of 64 code words, 3 of 256 data bytes, 3 of 4
registers. The sum is a byte, so N ≤ 22.

## Interface of the top module `cpu`

| port | dir | width | purpose |
|---|---|---|---|
| `clk` | in | 1 | clock; all state changes on the rising edge |
| `rst` | in | 1 | asynchronous, active high: PC ← `RESET_PC`, registers and flags ← 0 |
| `code_in` | in | 16 | word written by INPUTC / INPUTCF |
| `data_in` | in | 8 | byte written by INPUTD / INPUTDF |
| `cload_we`, `cload_addr`, `cload_data` | in | 1, 6, 16 | write code memory while `rst` = 1 |
| `dload_we`, `dload_addr`, `dload_data` | in | 1, 8, 8 | write data memory while `rst` = 1 |
| `dbg_pc`, `dbg_instr`, `dbg_flags` | out | 6, 16, 4 | current PC, instruction, stored flags |
| `dbg_reg_we`, `dbg_reg_sel`, `dbg_reg_data` | out | 1, 2, 8 | register write this cycle |
| `dbg_dmem_we`, `dbg_dmem_addr`, `dbg_dmem_data` | out | 1, 8, 8 | data memory write this cycle |

To load and run a program:

1. Hold `rst` high.
2. Write the program and its data through the `cload_*` / `dload_*`
   ports, one word per clock.
3. Release `rst`. The first instruction executes in the next cycle.

The memories have no reset, so their contents survive `rst`.

Parameters: `RESET_PC` (default 6'b100000) and `DMEM_ADDR_W` (default 8).
The widths in `cpu_pkg` are 8-bit data, 16-bit instructions and a 6-bit
PC. Every ALU and adder block has its own `WIDTH` parameter.

## Module structure

```
cpu
├── pc_register            6-bit PC, enable c3, async reset
├── pc_update_logic        PC+1 and PC+1+offset (full_adder chains)
├── bus_mux2 (6 bit)       PC mux, c2
├── code_memory            64 x 16, async read, clocked write (c1)
├── control_unit           opcode -> c1, c3..c18 and branch lines
├── branch_logic           branch lines + flags -> c2
├── register_file          4 x 8, two read ports, one write port
├── bus_mux2               ALU source (c11), ALU result (c15), dmem input (c16), write-back (c18)
├── alu
│   ├── shifter
│   ├── adder_subtractor   (full_adder chain)
│   ├── bus_mux2 x3        result, carry, overflow
│   └── flag_calculator
├── flags_register         4 flags, enable c14, async reset
└── data_memory            256 x 8, async read, clocked write (c17)
```

## Where this implementation fills gaps

The reference design gives the following in full:

- the datapath;
- the control table;
- the ALU;
- the adder/subtractor;
- the flag logic;
- the PC adders;
- the branch equations.

It says less about the parts below, and the choices made for them
should be checked before this RTL is used as a model of that design:

- **Opcode encodings.** Only nine are known from reference machine code;
  the rest, and the sub-codes for INPUT*, SHIFT* and the branches, are
  this implementation's.
- **Reset value of the PC.** The register's schematic clears every bit
  (PC = 000000). The example program, however, runs from 100000. The
  default follows the program. `RESET_PC = 0` gives the all-zero
  behaviour.
- **Mux input order.** Which input of each datapath mux is 0 and which
  is 1 was derived from the control table. For example, LOADI sets only
  c15, so c15 = 1 must pass the immediate.
- **Memories.** The data memory size (256 bytes) and the memory timing
  (combinational read, clocked write) are chosen here. Single-cycle
  execution requires this timing.
- **External inputs and program loading.** The `code_in` / `data_in`
  inputs and the loading ports are additions.
- **Reset of registers and flags.** Both reset to zero. This is an
  addition.
- **Shifter.** The shifter's internals are not given. It is built as a
  one-bit logical shift.
- **Register file.** Its internals are not given. It is built as an
  array.
- **Control unit.** It is written as one `case` statement per opcode,
  not as gate-level wiring per control line.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog if
it hangs.

| testbench | what it checks |
|---|---|
| `tb_adder_subtractor` | all 2 × 256 × 256 input combinations against integer arithmetic |
| `tb_alu` | all four operations over a grid of operand pairs plus corner values, result and every flag |
| `tb_shifter`, `tb_flag_calculator` | every input value against a reference expression |
| `tb_bus_mux2` | a sweep of input pairs with both select values |
| `tb_pc_update_logic` | every PC and offset, including wrap-around |
| `tb_branch_logic` | every branch line against every flag combination |
| `tb_control_unit` | each opcode's 18-line row against a transcription of the control table |
| `tb_pc_register`, `tb_flags_register`, `tb_register_file`, `tb_code_memory`, `tb_data_memory` | reset, enable/hold and read/write behaviour against a model |
| `tb_cpu` | the example program for N = 5 and N = 0..22 (sum and cycle count), then 60 random programs of 300 cycles each, compared cycle by cycle with an instruction-level model |

The random part of `tb_cpu` counts each mechanism and fails if any of
them never occurs:

- every opcode;
- taken and not-taken branches for every condition;
- the PC wrapping;
- carry and overflow being set;
- execution of code written by INPUTC.

`tb_cpu` runs the CPU at its default parameters and finishes in well
under a second.

To build and run a testbench with Verilator 5, from the repository root:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/cpu_pkg.sv tb/tb_cpu.sv --top-module tb_cpu
./obj_dir/Vtb_cpu
```

For a block testbench, replace `tb_cpu` with its name. `-y rtl` lets
Verilator find each submodule by its file name.
