# A single-cycle MIPS datapath for six instructions

This is a processor that fetches, decodes, executes and retires one
instruction in every clock cycle. Its instruction set is the smallest one that
still shows every kind of data movement a processor needs: `add` (register to
register), `addi` (register and immediate), `lw` (memory to register), `sw`
(register to memory), `beq` (conditional, PC-relative control flow) and `j`
(absolute control flow). There is no pipeline and no stall. Each instruction
makes a single pass through the datapath: fetch, decode, register read, ALU,
data memory and register write. So the CPI is exactly 1, and the clock period
is set by the slowest instruction, which is `lw`.

The design splits into a **datapath** and a **control** unit:

* The datapath holds the storage (PC, register file, memories) and the
  combinational units (adders, ALU, sign extension, shifters, multiplexers).
* The control unit turns the instruction's opcode into eight signals. These
  steer data through the datapath. Control is built in two ways, as a ROM and
  as random logic, and either one can drive the datapath.

A second, smaller design sits beside the processor: a four-entry register file
built structurally from three building blocks. These are an N-bit register, a
binary-to-one-hot decoder and a 4-to-1 mux. It shows how a multi-ported
register file is put together. The processor's 32-entry register file is the
same construction, scaled up.

## Instruction formats and encodings

All instructions are 32 bits. The fields are:

| format | bits 31:26 | 25:21 | 20:16 | 15:11 | 10:6 | 5:0 |
|---|---|---|---|---|---|---|
| R (`add`) | op = 0x00 | rs | rt | rd | shamt (ignored) | func = 0x20 |
| I (`addi`, `lw`, `sw`, `beq`) | op | rs | rt | imm16 | | |
| J (`j`) | op = 0x02 | imm26 | | | | |

The opcodes are the standard MIPS values: `addi` 0x08, `lw` 0x23, `sw` 0x2B,
`beq` 0x04 and `j` 0x02. They are collected in `rtl/mips_pkg.sv`. Any other
instruction is a no-op that goes on to PC+4.

What each instruction does:

| insn | effect |
|---|---|
| `add rd, rs, rt` | rd = rs + rt |
| `addi rt, rs, imm` | rt = rs + sx(imm) |
| `lw rt, imm(rs)` | rt = M[rs + sx(imm)] |
| `sw rt, imm(rs)` | M[rs + sx(imm)] = rt |
| `beq rs, rt, imm` | if rs == rt then PC = PC+4 + (sx(imm) << 2) |
| `j imm26` | PC = {4'b0000, imm26, 2'b00} |

Here `sx` means sign extension to 32 bits. Two of these rules differ from full
MIPS:

* The jump target clears the top four PC bits. Standard MIPS copies them from
  PC+4 instead.
* Register 0 always reads as zero. This matches MIPS, and `regfile` can turn
  it off with `ZERO_REG0 = 0`.

## How the datapath carries each instruction

The datapath is easiest to understand by adding one instruction at a time.
This is also the order in which it is built in `rtl/mips_single_cycle.sv`.

1. **add.** The PC addresses the instruction memory, and an adder forms
   PC+4, which goes back into the PC. The `rs` and `rt` fields feed the two
   read ports of the register file. The ALU adds the two values. The sum is
   written to register `rd` at the clock edge.
2. **addi.** The destination can now be `rt`, so a 5-bit mux (**Rdst**)
   picks between `rd` and `rt`. A sign-extension unit widens imm16 to 32 bits.
   A mux (**ALUinB**) feeds either `rt`'s value or the extended immediate into
   the ALU's second input.
3. **lw.** The data memory is added, and the ALU result is its address. A mux
   (**Rwd**) writes back either the ALU result or the loaded word.
4. **sw.** `rt`'s value, from the second read port, becomes the data memory's
   write data. **DMwe** enables the write.
5. **beq.** For `beq`, the ALU subtracts (**ALUop** = 1), and its `z` output
   is 1 when the result is zero. A `<<2` unit and a second adder form the
   branch target, PC+4 + (sx(imm) << 2). A mux selects this target when
   **BR** AND `z` is 1.
6. **j.** A second `<<2` unit turns imm26 into {4'b0000, imm26, 2'b00}. One
   more mux (**JP**) selects it as the next PC.

Every mux in the datapath is a `mux2`. The two `<<2` units are `shift_left2`,
which is pure wiring. The register write, the memory write and the PC update
all happen at the same rising edge. Everything between two edges is
combinational.

## Control

There are eight control signals. Input 0 of each mux is the "normal" path.

| insn | BR | JP | ALUinB | ALUop | DMwe | Rwe | Rdst | Rwd |
|---|---|---|---|---|---|---|---|---|
| add  | 0 | 0 | 0 | 0 | 0 | 1 | 0 | 0 |
| addi | 0 | 0 | 1 | 0 | 0 | 1 | 1 | 0 |
| lw   | 0 | 0 | 1 | 0 | 0 | 1 | 1 | 1 |
| sw   | 0 | 0 | 1 | 0 | 1 | 0 | x | x |
| beq  | 1 | 0 | 0 | 1 | 0 | 0 | x | x |
| j    | 0 | 1 | 0 | 0 | 0 | 0 | x | x |

The table is built in two ways:

* **`control_rom`** is a 64-line table indexed by the opcode. Don't-cares are
  stored as 0, and unused lines are all zero. The ROM never looks at the
  function field, so opcode 0 means `add` whatever the function field holds.
* **`control_logic`** uses six instruction detectors and a few gates:
  * Rwe = add | addi | lw
  * ALUinB = addi | lw | sw
  * Rdst = ¬add
  * Rwd = lw
  * DMwe = sw
  * BR = ALUop = beq
  * JP = j

  This version checks the function field for `add`. An R-type instruction
  with any other function is therefore a no-op here.

The random-logic version works because most control signals have only a few
1s, or only a few 0s, across the instruction set.

`mips_single_cycle` builds both versions. The parameter `USE_ROM_CONTROL`
chooses which one drives the datapath; the default is 1, the ROM. An
assertion checks that the two agree on every signal that matters, for each of
the six instructions.

## Register files

The register file has two read ports and one write port. A *port* is a set of
address, data and (for writes) enable wires that reach any word
independently. It is built like this:

* **Storage.** There is one `nbit_reg` per word. Each `nbit_reg` has `out`,
  `in`, `wen`, `rst` and `clk`, and a synchronous active-high reset to 0.
* **Read ports.** Each read port is a mux of all register outputs, selected
  by the read address. `regfile4` uses two `nbit_mux4to1` for this.
* **Write port.** The write data goes to every register. A `decoder` turns
  the write address into a one-hot vector, and each bit is ANDed with the
  write enable. So exactly one register loads.

Reads are combinational. A write shows at the next rising edge, so reading
the register being written returns its old value during that cycle.

There are two register files:

* `regfile4` is four registers of `N` bits, with a default `N` of 1.
* `regfile` is 32 registers of 32 bits. It is the processor's register file
  and uses a 5-to-32 decoder.

## Memories

`memory` is a word array with one shared port: `din`, `addr`, `we` and
`dout`. Reads are combinational, which single-cycle operation needs. Writes
are clocked. Contents are not reset.

The processor has two instances, each 4096 × 32 by default:

* **Instruction memory.** Its port is shared between fetch and a load port
  (`imem_we`, `imem_waddr`, `imem_wdata`), which works only while `rst` is
  high.
* **Data memory.** It is addressed by the ALU result.

Addresses are byte addresses, and a memory uses bits `[log2(WORDS)+1:2]` of
them. Unaligned low bits and bits above the memory size are ignored, so
accesses wrap around.

## Interface and timing of the top level

`single_cycle_top` holds the processor and `regfile4` side by side. They
share `clk` and `rst`. Its parameters are:

| parameter | default | meaning |
|---|---|---|
| `IMEM_WORDS` | 4096 | instruction memory words |
| `DMEM_WORDS` | 4096 | data memory words |
| `USE_ROM_CONTROL` | 1 | 1: ROM control drives the datapath, 0: random logic |
| `RF4_N` | 1 | width of the four-register file |

Reset and loading work like this:

* `rst` is synchronous and active high. It clears the PC and all registers
  and blocks every write.
* To run a program, hold `rst` high and write one instruction word per clock
  through `imem_*`. Then release `rst`. The first instruction, at address 0,
  retires on the first rising edge after the release.

The commit trace describes the instruction that retires at the next rising
edge:

| signal | meaning |
|---|---|
| `trace_valid` | low during reset |
| `trace_pc`, `trace_insn` | the instruction's address and word |
| `trace_rf_we`, `trace_rf_waddr`, `trace_rf_wdata` | its register write (writes to register 0 do not count) |
| `trace_dm_we`, `trace_dm_addr`, `trace_dm_wdata` | its store (byte address) |
| `trace_next_pc` | the PC that follows it |

The `rf4_*` ports are the four-register file's own read and write ports.

## Where this RTL makes its own choices

The datapath structure, the control table, the control equations, the field
positions and the register-file construction are the reference design. These
points are this implementation's own choices:

* **Opcodes.** Standard MIPS opcodes. The reference's control-logic example
  used 0x0F for `addi` and 0x2A for `sw`. In real MIPS those are `lui` and
  `swl`, so the standard values 0x08 and 0x2B are used instead.
* **Rdst for add.** Rdst = 0 for `add`, as in the control table and in the
  logic equation Rdst = ¬add. One control diagram in the reference marks
  Rdst = 1 for `add`, which would write to `rt`.
* **ALUop.** ALUop = 1 means subtract.
* **Unknown instructions.** They act as no-ops.
* **Memories.** Both memories have 4096 words. Reads are combinational and
  addresses are word addresses that wrap.
* **Reset.** Reset is synchronous and active high, and clears registers to 0.
* **Register 0.** It always reads as zero.
* **Tooling.** The load port and the commit trace.

Two related designs are not included:

* A 16-bit example datapath with 2^16 × 16 memories. Its instruction set and
  controller are not specified, so building it would mean inventing them.
* The five-stage pipelined version. It is the subject of later work.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and contains a watchdog.

* **Small blocks.** The combinational blocks are tested exhaustively or with
  random values against independent expressions.
* **Register files and memory.** These are checked cycle by cycle against
  reference arrays. The checks include the old value before a write edge and
  reset.
* **Control units.** `tb_control_rom` checks all 64 opcodes.
  `tb_control_logic` checks all 4096 opcode/function pairs.
* **Processor.** `tb_mips_single_cycle` runs the ROM-controlled and the
  logic-controlled processors side by side. `tb_single_cycle_top` runs the
  whole top level at its default sizes. Both compare every retired
  instruction with an instruction-level model, `tb/mips_ref_pkg.sv`. The
  programs are a loop that sums 10..1 and checks the result after a store and
  a load, plus 40 random programs. Branches and jumps in the random programs
  go forward, and each program ends in a jump to itself.

The processor tests also check the following:

* The number of cycles equals the number of instructions, so the CPI is 1.
* Each instruction kind occurs.
* `beq` is both taken and not taken.
* Writes to register 0 are dropped.
* Negative immediates occur.

The top-level test also exercises the four-register file.

To simulate the top-level test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/mips_pkg.sv tb/mips_ref_pkg.sv tb/tb_single_cycle_top.sv \
  --top-module tb_single_cycle_top -o sim
./obj_dir/sim
```

Any other testbench runs the same way: swap in its file and module name. The
packages are only needed by the testbenches that import them. To lint the RTL
alone:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/mips_pkg.sv rtl/single_cycle_top.sv
```

Two lint warnings are expected:

* Bit 0 of the decoder output in `regfile` is unused, because register 0 is
  constant.
* The top two bits of the widened value in `shift_left2` are unused when its
  output is the same width as its input.

## Files

| file | content |
|---|---|
| `rtl/mips_pkg.sv` | opcodes and the control-word struct |
| `rtl/single_cycle_top.sv` | top level: processor + four-register file |
| `rtl/mips_single_cycle.sv` | the single-cycle datapath with both control units |
| `rtl/control_rom.sv`, `rtl/control_logic.sv` | the two control implementations |
| `rtl/regfile.sv`, `rtl/regfile4.sv` | 32 × 32 and 4 × N register files |
| `rtl/decoder.sv`, `rtl/nbit_reg.sv`, `rtl/nbit_mux4to1.sv` | register-file building blocks |
| `rtl/memory.sv` | instruction and data memory |
| `rtl/alu.sv`, `rtl/adder.sv`, `rtl/sign_extend.sv`, `rtl/shift_left2.sv`, `rtl/mux2.sv` | datapath units |
| `tb/tb_<module>.sv` | one testbench per module |
| `tb/mips_ref_pkg.sv` | instruction-level model and instruction encoders |
