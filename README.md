# Single-cycle CPU for a MIPS subset

This is a 32-bit processor that finishes every instruction in one clock
cycle. It has no pipeline, no stalls and no multi-cycle states. Fetch, decode,
register read, ALU, data-memory access and the choice of the next PC all
happen combinationally within one clock period. At the following rising edge
the results go into the PC, the register file and the data memory together.
The clock period is therefore set by the slowest instruction, `lw`.

It runs seven instructions from the MIPS instruction set:

| instruction        | effect                                           | format |
|--------------------|--------------------------------------------------|--------|
| `add rd, rs, rt`   | `Reg[rd] = Reg[rs] + Reg[rt]`                    | R      |
| `sub rd, rs, rt`   | `Reg[rd] = Reg[rs] - Reg[rt]`                    | R      |
| `addi rt, rs, imm` | `Reg[rt] = Reg[rs] + SignExtend(imm)`            | I      |
| `lw rt, imm(rs)`   | `Reg[rt] = Mem[Reg[rs] + SignExtend(imm)]`       | I      |
| `sw rt, imm(rs)`   | `Mem[Reg[rs] + SignExtend(imm)] = Reg[rt]`       | I      |
| `beq rs, rt, imm`  | if `Reg[rs] == Reg[rt]`: `PC = PC + 4 + SignExtend(imm)*4` | I |
| `j target`         | `PC = {PC[31:28], target, 00}`                   | J      |

All other instructions have `PC = PC + 4`. The fields are the standard MIPS ones:

```
R:  op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]
I:  op[31:26] rs[25:21] rt[20:16] imm16[15:0]
J:  op[31:26] target[25:0]
```

## Structure

```
             +------------------------------+
  load port->|  fetch_unit                  |
             |  PC -> instr_mem -> instr ---+----------+----------------+
             |  next PC <- Branch, Jump,Zero|          |                |
             +------------------------------+          v                v
                  ^      ^         ^             +-----------+   +---------------+
                  |      |         |   ctrl_t    |  control  |   |   datapath    |
                  |      +---------+-------------| op, funct |   |  reg_file     |
                  |                              +-----------+   |  sign_extend  |
                  |                                    |         |  alu          |
                  |                                    +-------->|  data_mem     |
                  +--------------- Zero -------------------------|  3 muxes      |
                                                                 +---------------+
```

| module             | role |
|--------------------|------|
| `single_cycle_cpu` | top level. Wires the three parts together and masks register and memory writes during reset |
| `fetch_unit`       | PC register, instruction memory, next-PC logic |
| `instr_mem`        | program store, combinational read, clocked load port |
| `control`          | decoder from `op`/`funct` to the eight control points |
| `datapath`         | register file, sign extender, ALU, data memory and the RegDst/ALUSrc/MemToReg muxes |
| `reg_file`         | 32 x 32 bits, read ports Aa→Da and Ab→Db, write port Aw/Dw/WrEn |
| `alu`              | add or subtract, with a Zero flag |
| `sign_extend`      | 16 → 32-bit sign extension |
| `data_mem`         | word data store, combinational read, clocked write |
| `cpu_pkg`          | opcodes, function codes, the `alu_op_e` enum, the `ctrl_t` control struct and the R/I/J instruction-format structs |

## Next-PC logic (fetch unit)

The PC register holds only the word address `PC[31:2]`, which is 30 bits. The
instruction memory reads with those bits. The byte-address bits `[1:0]` are
always `00`. Both sequential and branch targets come from one 30-bit adder
with carry-in 1:

```
seq  = PC[31:2] + 1 + ((Branch & Zero) ? SignExtend(imm16) : 0)
next = Jump ? {PC[31:28], target[25:0]} : seq
```

In byte terms this is `PC + 4` or `PC + 4 + SignExtend(imm)*4`. Because the
adder works on word addresses, the `*4` of the branch offset costs nothing.
For `j`, the top four bits come from the PC of the `j` instruction itself,
not from `PC + 4`. The fetch unit has its own `sign_extend` instance for the
branch offset.

`Zero` comes from the datapath. For `beq`, the decoder sets the ALU to
subtract. `Zero` is then `Reg[rs] == Reg[rt]`, and `Branch & Zero` selects
the offset.

## Datapath and its three muxes

`Reg[rs]` (Da) is always ALU operand A. Three 2:1 muxes, each set by one
control bit, make the rest of the datapath specific to each instruction:

| control    | 0                  | 1                         |
|------------|--------------------|---------------------------|
| `RegDst`   | write `rt`         | write `rd`                |
| `ALUSrc`   | ALU B = `Reg[rt]`  | ALU B = `SignExtend(imm16)` |
| `MemToReg` | write ALU result   | write data-memory output  |

The ALU result is also the data-memory address. `Reg[rt]` (Db) is also the
data-memory write data. The register file and the data memory both read
combinationally and write at the rising edge. As a result, an instruction
that reads the register it writes sees the old value, which is what
single-cycle semantics require.

## Control table

| ctrl       | add | sub | addi | lw | sw | beq | j   |
|------------|-----|-----|------|----|----|-----|-----|
| op         | 000000 | 000000 | 001000 | 100011 | 101011 | 000100 | 000010 |
| funct      | 100000 | 100010 | – | – | – | – | – |
| RegDst     | 1   | 1   | 0    | 0  | 0* | 0*  | 0*  |
| ALUSrc     | 0   | 0   | 1    | 1  | 1  | 0   | 0*  |
| MemToReg   | 0   | 0   | 0    | 1  | 0* | 0*  | 0*  |
| RegWr      | 1   | 1   | 1    | 1  | 0  | 0   | 0   |
| MemWr      | 0   | 0   | 0    | 0  | 1  | 0   | 0   |
| Branch     | 0   | 0   | 0    | 0  | 0  | 1   | 0*  |
| Jump       | 0   | 0   | 0    | 0  | 0  | 0   | 1   |
| ALUCntrl   | Add | Sub | Add  | Add| Add| Sub | Add*|

Entries marked `*` are don't-cares in the original table, and the decoder
drives them to 0 or Add. The `addi` column is derived from its datapath: write
`rt`, immediate operand, ALU result written back. Its opcode is the standard
MIPS `001000`, because the original table has no `addi` column. An opcode or
function code that is not in the table decodes to all zeros. The instruction
then changes nothing, and the PC moves on by 4. An immediate assertion in
`control` checks that no row changes more than one kind of state.

## Interface and timing of `single_cycle_cpu`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | one instruction per rising edge |
| `rst` | in | 1 | synchronous, active high: PC := 0. Register and memory writes are masked while it is high |
| `imem_we`, `imem_waddr`, `imem_wdata` | in | 1, 30, 32 | load port of the instruction memory (word address). It writes at the rising edge |
| `pc`, `instr` | out | 32, 32 | the instruction executing in this cycle |
| `reg_we`, `reg_waddr`, `reg_wdata` | out | 1, 5, 32 | the register write this instruction commits at the next edge |
| `mem_we`, `mem_addr`, `mem_wdata` | out | 1, 32, 32 | the data-memory write it commits at the next edge |

Parameters: `IMEM_WORDS = 256` and `DMEM_WORDS = 256`. Both memories decode
only the low `log2(WORDS)` bits of the word address, so larger addresses wrap
around.

To run a program: hold `rst` high, write it word by word through the load
port, then release `rst`. Execution starts at address 0. Registers and data
memory have no reset, so a program must initialise them before it reads them.

## Choices not fixed by the original design

- The reset and its value (PC = 0), and the masking of writes during reset.
- The instruction-memory load port and the observation outputs.
- Memory sizes (256 words each). Word-only data access, with `Addr[1:0]` ignored.
- Register 0 reads as zero and ignores writes (the MIPS convention).
- The `addi` opcode and control row. Don't-cares resolved to 0. Undefined instructions act as no-ops.
- No overflow detection in the ALU.

## Verification

Each module has a self-checking testbench in `tb/` that compares it with
values computed independently inside the testbench. Each testbench ends with
`TB_RESULT checks=N failures=M` and has a watchdog.

- `single_cycle_cpu_tb` runs the whole CPU at its default sizes. It compares
  the CPU cycle by cycle with an instruction-level reference model written in
  the testbench: PC, instruction, and every register and memory write.
  - The program first initialises all registers and clears the data memory.
    It then sums 10..1 with a loop that has a backward branch, and checks
    that the sum (55) is stored.
  - It loads that value back, takes forward branches, writes to register 0
    and executes an undefined opcode.
  - About 190 random instructions follow, with forward-only control flow.
    Execution wraps through memory and repeats the directed part.
  - It counts the seven instruction kinds, taken and not-taken `beq`,
    backward branches, `j`, loads of stored data, writes to r0 and undefined
    instructions. A count of zero is a failure.
- `fetch_unit_tb` checks the next-PC rules with random Branch, Jump and Zero.
- `datapath_tb` drives hand-written control words and checks the write-back,
  the ALU, Zero and the store data.
- `control_tb` checks every table row and every undefined code.
- `reg_file_tb`, `data_mem_tb`, `instr_mem_tb`, `alu_tb` and `sign_extend_tb`
  check their blocks against arrays or arithmetic.

Simulating with Verilator 5 (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/cpu_pkg.sv \
    tb/single_cycle_cpu_tb.sv --top-module single_cycle_cpu_tb -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace the testbench name to run another one. `-Irtl` lets Verilator find
each module in `rtl/<module>.sv`.
