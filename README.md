# A single-cycle MIPS-subset processor

This is a processor for eight MIPS instructions. Each instruction starts and finishes
within one clock cycle:

| kind      | instructions                   | what they do                                   |
|-----------|--------------------------------|------------------------------------------------|
| R-type    | `add`, `sub`, `and`, `or`, `slt` | `rd = rs op rt`                              |
| load      | `lw rt, imm(rs)`               | `rt = M[rs + sext(imm)]`                       |
| store     | `sw rt, imm(rs)`               | `M[rs + sext(imm)] = rt`                       |
| branch    | `beq rs, rt, off`              | if `rs == rt`: `PC = PC + 4 + sext(off) * 4`   |

Nothing is pipelined and nothing is shared between cycles except the architectural state:
the PC, the 32 registers and the two memories. In one clock period the instruction is
fetched, decoded, executed and written back, all in combinational logic. At the rising
edge the PC, the destination register and, for `sw`, the addressed memory word all update
together. The clock period must therefore cover the slowest instruction. For `lw` that path
runs through instruction memory, the register file, the ALU, data memory and the
write-back mux.

The design is a teaching datapath. It is written to be read, and it maps one module to
each unit of the classic datapath drawing.

## Datapath

```
PC ──> instruction memory ──> instr
│        [25:21] rs ──> register file, read port 1 ──> ALU operand A
│        [20:16] rt ──> register file, read port 2 ──┬─> ALUSrc mux (0) ──> ALU operand B
│                                                    └─> data memory write data
│        [20:16] rt (0) / [15:11] rd (1) ──> RegDst mux ──> register file write register
│        [15:0] ──> sign extend ──┬─> ALUSrc mux (1)
│                                 └─> shift left 2 ──> branch adder
│        [31:26] op, [5:0] funct, ALU Zero ──> control unit ──> the ten control signals
├──> +4 ──> PC+4 ──┬─> PCSrc mux (0) ──> next PC
│                  └─> branch adder ──> PCSrc mux (1)
ALU result ──┬─> data memory address ──> read data ──> MemToReg mux (1) ──┐
             └───────────────────────────────────────> MemToReg mux (0) ──┴─> register write data
```

Who feeds what:

* **Fetch.** `pc_register` holds the byte address of the current instruction.
  `instruction_memory` returns the word at `PC[29:2]` in the same cycle, and
  `pc_incrementer` forms `PC + 4`.
* **Register read.** The `rs` field (`instr[25:21]`) and the `rt` field (`instr[20:16]`)
  address the two read ports of `register_file`.
* **Destination select (RegDst).** The destination register is `rd` (`instr[15:11]`) for
  R-type instructions. For `lw` it is `rt`, because in the I-type format `rt` is the
  destination of a load but a source for `sw` and `beq`.
* **ALU operand select (ALUSrc).** ALU operand B is Read data 2 (0) or the sign-extended
  16-bit immediate (1). The immediate is used by `lw` and `sw` to form the effective address.
* **Memory.** `data_memory` is addressed by the ALU result. Its write data is always
  Read data 2, the `rt` register of an `sw`.
* **Write-back select (MemToReg).** The register file is written with the ALU result (0) or
  the loaded word (1).
* **Next PC (PCSrc).** The next PC is `PC + 4` (0) or the branch target (1).
  `branch_target` shifts the sign-extended offset left by two and adds it to `PC + 4`.
  It needs its own adder because the ALU is busy with the `beq` comparison in the same cycle.

## Control

`control_unit` is a single combinational block. It reads 13 bits: the 6-bit opcode, the
6-bit function field and the ALU's Zero flag. It drives 10 bits of control, bundled as
`mips_pkg::ctrl_t`:

| instr | RegDst | RegWrite | ALUSrc | ALUOp | MemWrite | MemRead | MemToReg |
|-------|:------:|:--------:|:------:|:-----:|:--------:|:-------:|:--------:|
| add   | 1 | 1 | 0 | 010 | 0 | 0 | 0 |
| sub   | 1 | 1 | 0 | 110 | 0 | 0 | 0 |
| and   | 1 | 1 | 0 | 000 | 0 | 0 | 0 |
| or    | 1 | 1 | 0 | 001 | 0 | 0 | 0 |
| slt   | 1 | 1 | 0 | 111 | 0 | 0 | 0 |
| lw    | 0 | 1 | 1 | 010 | 0 | 1 | 1 |
| sw    | x | 0 | 1 | 010 | 1 | 0 | x |
| beq   | x | 0 | 0 | 110 | 0 | 0 | x |

`PCSrc = (opcode == beq) & Zero`. So `beq` subtracts its two registers in the ALU, and the
branch is taken exactly when the difference is zero. The `x` entries are driven 0.

The ALU operation of an R-type instruction is decoded straight from the function field
in this one unit. There is no separate two-level "main control plus ALU control" split.
Encodings, from `mips_pkg`:

| field  | value | meaning |
|--------|-------|---------|
| opcode | 000000 | R-type |
| opcode | 100011 | lw |
| opcode | 101011 | sw |
| opcode | 000100 | beq |
| funct  | 100000 / 100010 / 100100 / 100101 / 101010 | add / sub / and / or / slt |

An opcode or function code outside this set drives all control signals to 0. Such an
instruction writes nothing and falls through to `PC + 4`.

## ALU

The ALU is 32 bits wide with a 3-bit `ALUOp`: `000` and, `001` or, `010` add,
`110` subtract, `111` set-on-less-than. `slt` compares as signed two's complement and gives
1 or 0. The unused codes give 0. `zero` is 1 when the result is all zeros.

## Timing and state

* Everything is clocked on the rising edge of `clk`. `rst` is synchronous and active high.
  It sets the PC to `RESET_PC` (0), clears all 32 registers and blocks register writes.
* Register 0 always reads 0, and writes to it are dropped.
* The register file and both memories read combinationally and write at the clock edge.
  An instruction that reads the register it writes sees the old value. The next
  instruction sees the new one.
* The data memory output is forced to 0 while `MemRead` is 0.
* Memory accesses are whole words. The two low address bits are ignored, and so are
  address bits above the memory depth.
* One instruction per clock cycle, always. The tests check that the cycle count from reset
  release to the halt equals the number of instructions executed.

## Top-level interface (`single_cycle_cpu`)

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst` | in | 1 | clock, synchronous reset |
| `imem_load_we/addr/data` | in | 1 / `IMEM_ADDR_BITS` / 32 | writes one program word per cycle (word address) |
| `dmem_load_we/addr/data` | in | 1 / 32 / 32 | presets data memory (byte address); only used while `rst` = 1 |
| `retire_pc`, `retire_instr`, `retire_next_pc` | out | 32 | the instruction being executed this cycle and where the PC goes next |
| `retire_reg_write/addr/data` | out | 1 / 5 / 32 | its register write |
| `retire_mem_write/addr/data` | out | 1 / 32 / 32 | its memory write |
| `retire_ctrl` | out | `ctrl_t` (10 bits) | its control signals |

The processor cannot write its instruction memory. A program is loaded through the load
port while `rst` is held; after that the memory does not change. During reset, the
data-memory preload port takes over the data memory's write port.

The retire outputs carry no extra logic. They expose internal nets so that a testbench or
debugger can see each instruction's effect before the clock edge commits it.

Parameters: `IMEM_ADDR_BITS = 28`, `DMEM_ADDR_BITS = 28` (memory depth in words, log2),
`RESET_PC = 0`.

Two assertions guard the datapath: no instruction both reads and writes data memory, and
the PC stays word-aligned.

## Where this departs from the textbook machine

* **Memory depth.** Each memory is meant to cover the whole 32-bit byte space with word
  access, which is 2^30 words. Verilator accepts no unpacked array of 2^29 or more entries,
  so the default is 2^28 words (1 GiB per memory). Raise `IMEM_ADDR_BITS` and
  `DMEM_ADDR_BITS` to 30 with a tool that accepts it. The address decode already handles
  any depth up to 30.
* **ALU code 111.** Code 111 is set-on-less-than, because `slt` is in the instruction set
  and the control table assigns it 111. A shift-left operation is not implemented.
* **Function codes.** The codes for `sub`, `and`, `or` and `slt` are the standard MIPS ones.
* **Additions:** the reset, the load ports, the retire outputs, the hard-wired register 0,
  the zero output of data memory when not reading, and the handling of unsupported
  encodings.

Not implemented: jumps, immediate arithmetic, byte and halfword accesses, shifts, and
anything beyond the eight instructions. The processor has no exceptions; an unaligned
address is silently rounded down to a word.

## Files

| file | contents |
|------|----------|
| `rtl/mips_pkg.sv` | opcodes, function codes, ALU codes, `ctrl_t`, instruction field structs |
| `rtl/single_cycle_cpu.sv` | the processor: the datapath wiring of all blocks below |
| `rtl/control_unit.sv` | instruction decoder, table above |
| `rtl/alu.sv` | 32-bit ALU with Zero |
| `rtl/register_file.sv` | 32 x 32 registers, 2 read ports, 1 write port |
| `rtl/instruction_memory.sv` | program memory, combinational fetch, load port |
| `rtl/data_memory.sv` | data memory with MemRead/MemWrite |
| `rtl/pc_register.sv` | program counter |
| `rtl/pc_incrementer.sv` | PC + 4 |
| `rtl/branch_target.sv` | shift-left-2 and branch adder |
| `rtl/sign_extend.sv` | 16 to 32-bit sign extension |
| `rtl/mux2.sv` | 2:1 multiplexer (RegDst, ALUSrc, MemToReg, PCSrc) |
| `tb/tb_<block>.sv` | a self-checking test per block |
| `tb/cpu_checker.sv` | program generator, loader and reference instruction-set model |
| `tb/tb_single_cycle_cpu.sv` | end-to-end test, memories at 2^10 words |
| `tb/tb_single_cycle_cpu_full.sv` | the same at the default 2^28-word memories |

## Verification

Each block has its own testbench that compares the block against values computed
independently. The sign extender is tested exhaustively. The ALU gets directed corner cases
plus 2000 random operations. The register file and data memory are checked against a
shadow array for thousands of random cycles. The control unit is checked against the table
above, including unsupported opcodes. Every testbench ends with a line
`TB_RESULT checks=N failures=M`.

The end-to-end test (`cpu_checker`) loads a program, runs it, and compares every single
cycle against an instruction-set model. It checks the fetched PC and instruction, the next
PC, the register write and the memory write. The programs are:

* **A directed program.** Its first part runs these examples:
  * `add $s4, $t1, $t2`
  * `lw $t0, -4($sp)` and `sw` with a positive offset from `$sp`
  * a taken `beq $at, $0, L` that skips three instructions (offset field 3, i.e. 12 bytes)
  * a not-taken `beq`
  * a write to `$0`

  It then sums an eight-word array in a loop that closes with a backward `beq $0, $0, -5`.
  Its final register values (sum 36 and so on) are checked against hand-computed numbers.
* **Random programs.** These mix all eight instructions. Loads and stores use `$0` or a
  fixed base register with positive and negative offsets. Branches jump short distances
  forward, and about half of them are taken.

The test counts how often each mechanism occurred: each instruction kind, taken and
not-taken branches, negative offsets, and writes to `$0`. It fails if any count stays at
zero. At 2^10-word memories it executes about 900 instructions. The full-size run uses
about 2 GB of host memory for the two 2^28-word arrays.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mips_pkg.sv tb/tb_single_cycle_cpu.sv \
          --top-module tb_single_cycle_cpu -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace the testbench name to run any other test. The simulator is two-state, and the
random-reset flag starts every unreset variable at a random value. That is why the register
file is reset and the tests preset every data word a program reads.

## Changing it

* To add an R-type instruction, add its function code to `funct_e`, and add an ALU code to
  `alu_op_e` if it needs a new operation. Then add a case in `control_unit` and in `alu`,
  and teach `cpu_checker`'s model the instruction.
* To add an I-type instruction such as an immediate add, give it an opcode case in
  `control_unit`. It would reuse `ALUSrc = 1` and `RegDst = 0`.
* To add a jump, extend the next-PC selection with a third source, the 26-bit word address
  shifted left by two.
