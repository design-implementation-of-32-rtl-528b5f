# MIPS soft core with run-time program loading

This is a small MIPS processor for an FPGA. Its program is not fixed when the
FPGA is built. A host PC assembles MIPS code and sends the machine code over a
UART serial line. The chip writes it into its instruction memory and starts
running it. Loading a new program needs no new bitstream: raise `prog_mode`,
send the words, lower `prog_mode`.

The processor is the textbook single-cycle MIPS datapath. Each instruction
goes through fetch, decode, execute, memory access and write-back in one clock
cycle. Instructions are full 32-bit MIPS words. By default the data path is
only 8 bits wide, so that the register file, instruction memory and data
memory fit in the few 2-kbit embedded RAM blocks of a small FPGA. Setting one
parameter gives the full 32-bit data path. A five-stage pipelined version of
the same datapath can be selected instead of the single-cycle one.

## Instructions

| instruction | format | opcode / funct | operation |
|---|---|---|---|
| `add rd, rs, rt` | R | 00 / 20 | rd = rs + rt, sets `overflow` on signed overflow |
| `sub rd, rs, rt` | R | 00 / 22 | rd = rs - rt, sets `overflow` on signed overflow |
| `and`, `or` | R | 00 / 24, 25 | bitwise |
| `slt rd, rs, rt` | R | 00 / 2A | rd = (rs < rt), signed |
| `sll rd, rt, sh`, `srl rd, rt, sh` | R | 00 / 00, 02 | logical shift of rt by shamt |
| `addi rt, rs, imm` | I | 08 | rt = rs + imm |
| `lw rt, imm(rs)` | I | 23 | rt = mem[rs + imm] |
| `sw rt, imm(rs)` | I | 2B | mem[rs + imm] = rt |
| `beq rs, rt, off` | I | 04 | if rs == rt: PC = PC + 4 + (off << 2) |
| `j target` | J | 02 | PC = {PC+4[31:28], target, 00} |

Overflow is reported on the `overflow` pin only. There is no exception. Any
other opcode changes no state and acts as a no-op. `bne` is not implemented.
Register `r0` always reads 0.

After reset every register `ri` holds the value `i` (`r1 = 1`, `r2 = 2`, ...).
Small test programs can therefore compute without first loading constants.

## The single-cycle datapath

`mips_core` joins four units. Together they form one combinational path from
the PC to the register-file and PC inputs.

* **Fetch (`mips_ifetch`).** Holds the PC, a byte address. It sends the PC to
  the instruction memory and adds 4. Two multiplexers choose the next PC. The
  first picks the branch target when `Branch AND Zero` is true. The second
  picks the jump target when `Jump` is set.
* **Control (`mips_control`).** Decodes bits [31:26] into nine signals:
  RegDst, Jump, Branch, MemRead, MemtoReg, ALUOp (2 bits), MemWrite, ALUSrc
  and RegWrite.

  | | RegDst | ALUSrc | MemtoReg | RegWrite | MemRead | MemWrite | Branch | Jump | ALUOp |
  |---|---|---|---|---|---|---|---|---|---|
  | R-type | 1 | 0 | 0 | 1 | 0 | 0 | 0 | 0 | 10 |
  | lw     | 0 | 1 | 1 | 1 | 1 | 0 | 0 | 0 | 00 |
  | sw     | 0 | 1 | 0 | 0 | 0 | 1 | 0 | 0 | 00 |
  | beq    | 0 | 0 | 0 | 0 | 0 | 0 | 1 | 0 | 01 |
  | addi   | 0 | 1 | 0 | 1 | 0 | 0 | 0 | 0 | 00 |
  | j      | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 1 | 00 |

* **Decode (`mips_idecode`, `mips_regfile`).** Reads rs and rt from a
  32-entry register file. The file has two combinational read ports and one
  write port, written on the clock edge. This unit also forms the immediate
  and holds the write-back multiplexer (ALU result or load data).
* **Execute (`mips_execute`, `mips_alu_control`, `mips_alu`).** The ALUSrc
  multiplexer picks rt or the immediate. ALUOp and the funct field pick the
  ALU operation: 00 add, 01 subtract, 10 decided by funct. A separate adder
  forms the branch target `PC+4 + (imm << 2)`. The RegDst multiplexer picks
  the register to write: rd for R-type, rt otherwise.

The memories are outside the core. Its port names follow the signal names of
the synthesized processor: `instadd` / `ir` for the instruction side;
`dataadd`, `data_out`, `data_in`, `memwr` and `memrd` for the data side. Both
memories answer combinationally in the same cycle. All state (PC, register
file, data memory) changes on the rising edge at the end of that cycle.

## Narrow data path, full-width instructions

With `W = 8` (the default) the design keeps 32-bit instructions and narrows
everything else:

* Registers, ALU, data-memory words and addresses are 8 bits.
* The immediate is instruction bits [7:0], used as an 8-bit two's-complement
  value without sign extension. With `W >= 16`, bits [15:0] are sign extended
  as usual. An assembler for the 8-bit core must keep immediates and offsets
  within -128..127.
* The PC is 8 bits (`PC_W`). It is a byte address, so it reaches 64
  instructions. The instruction memory is word-addressed by `PC[7:2]`.
* The data memory is byte-addressed with 256 entries. With wider words it
  takes aligned word addresses (the low address bits are dropped).
* The jump target is formed at 32 bits and cut to `PC_W` bits. The branch
  target wraps modulo 2^PC_W.

The memories as built: register file 32 x 8 bits, instruction memory
64 x 32 bits, data memory 256 x 8 bits. In 256 x 8 RAM blocks that is six
blocks: one for the registers, four side by side for the instruction word,
and one for the data. `W = 32, PC_W = 32` gives the 32-bit processor;
`tb_mips_top_w32` runs it.

## Loading a program over the serial line

`mips_top` adds the instruction memory (`mips_imem`), the data memory
(`mips_dmem`), a UART receiver (`uart_rx`) and the loader
(`mips_uart_loader`).

* The frame format is 8N1: one start bit, eight data bits LSB first, one stop
  bit. The default is 434 clocks per bit, which is 115200 baud from 50 MHz.
  The receiver synchronizes `uart_rx` with two flip-flops and samples each bit
  in its middle. A frame whose stop bit is low is dropped.
* While `prog_mode` is high, the processor is held in reset. Every four bytes
  make one instruction word, most significant byte first (big-endian). Words
  are written to addresses 0, 1, 2, ... in turn. `words_loaded` counts the
  words of the current session. It is cleared when `prog_mode` rises.
* When `prog_mode` falls, the processor leaves reset with PC = 0 and
  registers set to their numbers. It runs the new program from the next cycle.
* There is no length field, checksum or acknowledgement. Bytes received while
  `prog_mode` is low are ignored. The data memory is not cleared between
  programs.

`rst` resets everything; `prog_mode` resets only the processor. Both are
synchronous and active high.

## Pipelined variant

`mips_pipeline_core` (selected with `PIPELINED = 1` on `mips_top`) places the
same units in five stages: IF, ID, EX, MEM and WB. Four pipeline registers
separate them, and each carries the control signals its instruction still
needs. The pipeline has **no forwarding and no hazard detection**, so software
must follow two rules:

* A register written by one instruction may be read by the fourth instruction
  after it, at the earliest. The register file returns the old value when a
  register is written and read in the same cycle.
* `beq` is resolved in MEM. The three instructions after a `beq` are always
  executed, so fill them with no-ops unless you want them run. `j` is not
  available in this variant; use `beq r0, r0, off`.

A store reaches the data bus three cycles after it is fetched. The overflow
flag of an instruction appears two cycles after its fetch. After reset the
pipeline registers hold the no-op word `0x00000000`. `schedule_for_pipeline`
in `tb/mips_tb_pkg.sv` shows how to insert the no-ops needed.

## Files

| file | content |
|---|---|
| `rtl/mips_pkg.sv` | opcodes, funct codes, ALUOp and ALU operation enums, `ctrl_t` control bundle |
| `rtl/mips_control.sv` | main control unit |
| `rtl/mips_alu_control.sv`, `rtl/mips_alu.sv` | ALU control, ALU with Zero and Overflow |
| `rtl/mips_regfile.sv` | 32-entry register file, reset to register numbers |
| `rtl/mips_ifetch.sv`, `rtl/mips_idecode.sv`, `rtl/mips_execute.sv` | fetch, decode, execute units |
| `rtl/mips_dmem.sv`, `rtl/mips_imem.sv` | data memory; instruction memory with load port |
| `rtl/mips_core.sv` | single-cycle processor |
| `rtl/mips_pipeline_core.sv` | five-stage pipelined processor |
| `rtl/uart_rx.sv`, `rtl/mips_uart_loader.sv` | serial receiver, program loader |
| `rtl/mips_top.sv` | system top |
| `tb/mips_tb_pkg.sv` | assembler functions, test program, pipeline scheduler, instruction-set reference model |
| `tb/tb_*.sv` | one self-checking testbench per module, plus system tests |

Top-level parameters: `DATA_W` (8), `PC_W` (8), `IMEM_DEPTH` (64 words),
`DMEM_DEPTH` (256 words), `CLKS_PER_BIT` (434) and `PIPELINED` (0).

## Simulation

Every testbench checks itself. It ends by printing
`TB_RESULT checks=N failures=M`, and a watchdog stops it if it hangs. With
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/mips_pkg.sv tb/mips_tb_pkg.sv tb/tb_mips_top.sv --top-module tb_mips_top
./obj_dir/Vtb_mips_top
```

Swap in any other testbench name. The `-y` options let Verilator find every
module it needs by file name.

* `tb_mips_top` runs the system at its default parameters. It acts as the
  host and sends a directed program over the serial line at 434 clocks per
  bit. Then it runs the program and compares the PC, every store and the
  overflow flag, cycle by cycle, with the reference model. A second session
  loads and runs a random program. The testbench fails if any of these never
  happens: a reload, a taken branch, a not-taken branch, a jump, a load, a
  store, an overflow, or an unknown opcode.
* `tb_mips_top_w32` does the same with the 32-bit data path and PC.
* `tb_mips_top_pipe` runs the system with the pipelined core.
* `tb_mips_core` and `tb_mips_pipeline_core` test the two processors alone.
  The pipeline test is exact to the cycle: the PC in every cycle, each store
  in its MEM cycle, and the overflow flag in its EX cycle.
* The unit testbenches (`tb_mips_regfile`, `tb_mips_control`, `tb_mips_alu`,
  `tb_mips_ifetch`, `tb_mips_idecode`, `tb_mips_execute`, `tb_mips_dmem`,
  `tb_mips_imem`, `tb_uart_rx`, `tb_mips_uart_loader`) compare random and
  directed stimulus with models written in the testbench.

The reference model in `mips_tb_pkg` is written from the instruction
definitions, not from the RTL. It uses wide signed arithmetic for the overflow
and slt checks.

## What was a design choice

The datapath, control table, register reset, 8-bit narrowing, memory
organization and the idea of loading code over a UART come from the original
description of the design. These details were left open there and were
chosen here:

* the opcode and funct encodings (standard MIPS-I)
* the `addi` and `j` rows of the control table, and the shift operations
* the overflow pin having no exception behind it
* the instruction memory depth of 64 words (what an 8-bit PC reaches)
* the whole loading protocol: framing, byte order, `prog_mode`, start
  address 0, and the baud rate
* synchronous active-high resets
* combinational memory reads, with load data reading 0 when MemRead is low

The instruction memory sits outside the fetch unit and outside the processor.
This follows the processor's pin list (instruction address out, instruction
in) rather than a drawing of the fetch unit with the memory inside it. The
behaviour is the same.

The pipelined variant was built from a datapath drawing alone. Its rules for
dependent instructions and branches follow from that drawing having no hazard
logic.

Not built: `bne` (it would need a tenth control signal), caches, and the host
software that assembles and sends programs. The testbenches include a small
assembler, but no host tool.

## How far to trust it

All of this has been checked only in simulation, with Verilator. It has not
been built for an FPGA, and no timing has been measured. Nothing in the RTL
depends on a clock frequency except the UART bit time, `CLKS_PER_BIT`.

The single-cycle processor is checked against an independent reference model
at both 8 and 32 bits. The pipelined processor is checked only with the
scheduled directed program at 8 bits. Each module's testbench has been run
against a copy of the module with one deliberate bug, and it caught each one.
