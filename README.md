# Intellera: a pipelined RISC-V core with a 5×5 matrix MAC unit

Intellera is a 32-bit RISC-V processor with a built-in matrix accelerator. It
adds matrix instructions to a small integer instruction set. Each of these
instructions acts on a whole 5×5 matrix of 32-bit words at once. One
instruction moves 25 words between data memory and the accelerator's
registers. Another computes a full matrix product, sum or difference in a
single clock cycle. The core is a classic five-stage pipeline. Programs are
loaded into it over a UART.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. Every module
has a self-checking testbench. An end-to-end testbench loads a program over
the serial line at the default parameters, runs it and checks the results.

## The matrix MAC unit

The accelerator (`mac_unit`) holds three banks of 25 registers, each 32 bits
wide:

| bank | contents |
|------|----------|
| A    | first operand matrix, elements A(0,0) … A(4,4) |
| B    | second operand matrix |
| R    | result matrix |

Register `k = 5*i + j` of a bank holds element (i, j), in row-major order.
The unit has 25 input words (from data memory) and 25 output words (R, to
data memory). A 4-bit `MACControl` code selects the operation for the next
clock edge:

| instruction | MACOP (bits 31-30) | funct3 (bits 9-7) | MACControl | MACDM | effect |
|-------------|----|-----|------|----|--------|
| LMAC A Row, Offset | 00 | 000 | 0000 | 01 | A ← 25 words from memory |
| LMAC B Row, Offset | 00 | 001 | 0001 | 10 | B ← 25 words from memory |
| CLR A      | 01 | 000 | 0010 | 00 | A ← 0 |
| CLR B      | 01 | 001 | 0011 | 00 | B ← 0 |
| CLR R      | 01 | 010 | 0100 | 00 | R ← 0 |
| CLR ALL    | 01 | 011 | 0101 | 00 | A, B, R ← 0 |
| MAC M      | 10 | 000 | 0110 | 00 | R ← A × B (matrix product) |
| MAC ADD    | 10 | 001 | 0111 | 00 | R ← A + B |
| MAC SUB    | 10 | 010 | 1000 | 00 | R ← A − B |
| SUB MAC    | 10 | 011 | 1001 | 00 | R ← B − A |
| STR R Row, Offset | 11 | 000 | 1010 | 11 | 25 words of memory ← R |

All matrix instructions use opcode `1110111`. Any other MACOP/funct3
combination is a no-op, encoded internally as `MACControl = 1111`.

Arithmetic is two's-complement integer and wraps to 32 bits. Each element of
A × B is the wrapped sum of five 32-bit products. There is no fixed-point
scaling: the data is treated as integers with no fractional bits. Every
operation finishes in the clock cycle it is issued. The product uses 125
multipliers in parallel, followed by adder trees. `MAC M` overwrites R; it
does not accumulate into it.

### Matrix instruction format

```
 31 30 | 29 ........ 20 | 19 ........ 10 | 9 .. 7 | 6 ..... 0
 MACOP |     Offset     |      Row       | funct3 | 1110111
```

`Row` is the data-memory word address of element (0,0). `Offset` is the
distance in words from the start of one row to the start of the next. The
memory stage reads or writes element (i, j) at word

```
addr(i, j) = (Row + i * Offset + j) mod DMEM_DEPTH
```

An `Offset` of 0 is taken as 5, which means the rows are packed back to back.
So `LMAC A 400,5` and `LMAC B 425,5` load two 5×5 matrices stored one after
the other. An Offset larger than 5 picks a 5×5 window out of a wider
row-major array. Row addresses count words. LW and SW, as in RV32I, use
byte addresses. Word 400 is therefore byte address 1600 to a LW/SW.

The decoder that turns these fields into control signals is `mac_decoder`.
It produces `MACControl` for the MAC unit and the 2-bit `MACDM` request for
data memory: 00 none, 01 load A, 10 load B, 11 store R.

## How a matrix instruction moves through the pipeline

The core (`riscv_pipeline`) has five stages:

| stage | integer instructions | matrix instructions |
|-------|----------------------|---------------------|
| F  fetch | PC → instruction memory | same |
| D  decode | control, register read, immediate | control (MACControl, MACDM); the 20-bit {Offset, Row} field is latched |
| E  execute | ALU, branch/jump resolution | **matrix address calculation**: `mat_addr_gen` turns Row/Offset into 25 word addresses |
| M  memory | LW/SW through the scalar port | **matrix operand access and operation**: the 25-word port of `data_mem` feeds the MAC unit (LMAC) or takes R from it (STR R); MAC M/ADD/SUB and CLR update the banks |
| W  write-back | result → register file | nothing |

The MAC unit sits in the memory stage. There, the 25-word memory port is
wired straight to its inputs and outputs. Three properties follow:

* Matrix instructions reach the memory stage one per cycle, in program order.
  A `MAC M` therefore updates R before a following `STR R` reads it, with no
  interlock. Back-to-back matrix instructions never stall. The testbenches
  check that 18 consecutive matrix instructions take exactly 18 cycles in
  the memory stage.
* Integer stores and matrix loads are also ordered. A SW in the cycle before
  an `LMAC` has already written memory when the LMAC reads it. Likewise, a
  LW after a `STR R` sees the stored result.
* Matrix instructions write no integer register. The integer hazard logic
  needs nothing extra for them.

The matrix addresses are computed a stage early, in execute. They then travel
to the memory stage in the EX/MEM register: 25 addresses of 10 bits each.

## Integer pipeline and hazards

Supported integer instructions:

* ADD, SUB, MUL (low 32 bits), AND, OR, XOR, SLT, SLL, SRL
* ADDI, ANDI, ORI, XORI, SLTI, SLLI, SRLI
* LW, SW
* BEQ, BNE, BLT, BGE
* JAL, JALR, LUI

LI is an assembler alias for ADDI, or LUI + ADDI. The ALU control codes are
5 bits wide (see `intellera_pkg`). Byte and halfword memory accesses, SRA,
the unsigned compares, AUIPC and the system instructions are not
implemented. SRA decodes as SRL. The unsigned branch encodings (BLTU, BGEU) decode as the signed
BLT and BGE, and SLTU as ADD.

`hazard_unit` resolves hazards in three ways:

* **Forwarding.** An operand in execute that an older instruction in memory
  or write-back is about to write is taken from that stage. The younger
  writer wins. A JAL/JALR in the memory stage forwards its return address.
  The register file itself passes a value written in the same cycle through
  to its read ports, so decode and write-back can overlap.
* **Load-use stall.** If a LW is directly followed by an instruction that
  uses its result, fetch and decode are held for one cycle and a bubble
  enters execute.
* **Control.** Branches and jumps are resolved in execute with static
  "not taken" prediction. A taken branch or jump flushes the two younger
  instructions (a 2-cycle penalty). JALR targets are `(rs1 + imm) & ~1`.

Steady-state throughput is one instruction per cycle. An instruction takes 5
cycles from fetch to write-back.

## Program loading over the UART

`intellera_top` connects the host link to the core:

1. While `prog_mode` is high, the core is held in reset.
2. `uart_rx` receives 8N1 frames: 1 start bit, 8 data bits LSB first,
   1 stop bit.
3. `instr_loader` is a four-state machine, one state per byte. It joins every
   four bytes into a 32-bit instruction, least significant byte first. It
   writes the word to the next instruction-memory word, starting at word 0.
   `loaded_words` counts the words written.
4. `uart_tx` echoes every received byte back on `uart_txd`, as an
   acknowledgement. The echo keeps pace only if the host leaves at least one
   idle bit time between frames. The program itself loads correctly at full
   line rate.
5. When `prog_mode` goes low, the core starts at PC 0.

Results are read from data memory through `dbg_addr` / `dbg_rdata`, a
combinational read-only word port.

The bit time is `CLKS_PER_BIT` clock cycles. The default, 2891, is 115200
baud at a 333 MHz clock.

## Module hierarchy

```
intellera_top
├── uart_rx, uart_tx, instr_loader
├── instr_mem                     (256 words, written by the loader)
└── riscv_pipeline
    ├── control_unit
    │   ├── main_decoder          opcode → datapath controls, MAC_OP flag
    │   ├── alu_decoder           → 5-bit ALU control
    │   └── mac_decoder           → MACControl, MACDM
    ├── register_file, imm_extend, alu, hazard_unit
    ├── mat_addr_gen              execute stage
    ├── data_mem                  scalar port + 25-word matrix port + read-out port
    └── mac_unit                  A, B, R banks
```

`intellera_pkg` holds the shared encodings (opcodes, ALU and MAC control
enums, the MACDM enum) and the `ctrl_t` control bundle that the pipeline
registers carry.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| intellera_top | IMEM_DEPTH | 256 | instruction memory words |
| intellera_top, riscv_pipeline, data_mem | DMEM_DEPTH / DEPTH | 1024 | data memory words; covers the 10-bit Row field |
| intellera_top, riscv_pipeline, mac_unit, data_mem | DIM | 5 | matrix dimension (DIM² registers per bank) |
| mac_unit | W | 32 | element width |
| intellera_top, uart_rx, uart_tx | CLKS_PER_BIT | 2891 | UART bit time in clocks |

The 5×5 size and the 32-bit width are the architecture's own values. The
memory sizes and the baud rate are choices of this implementation. DIM is a
parameter, but the matrix instruction format and the `Offset = 0` rule
assume DIM = 5.

All resets are synchronous and active low. They clear the register file, the
data memory, the MAC banks and the pipeline registers, and fill the
instruction memory with NOPs.

## Simulating

Every testbench is in `tb/`, prints `TB_RESULT checks=N failures=M` and ends
by itself. For example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/intellera_pkg.sv tb/rv_asm_pkg.sv tb/intellera_prog_pkg.sv \
  tb/tb_intellera_top.sv --top-module tb_intellera_top -o sim
./obj_dir/sim
```

A unit test builds the same way with its own `tb/tb_<module>.sv` and
`--top-module tb_<module>`.

* `tb/rv_asm_pkg.sv` holds small instruction encoders (`ADDI(rd, rs1, imm)`,
  `LMAC_A(row, offset)`, `MACM()`, …). Use them to write further test
  programs.
* `tb/intellera_prog_pkg.sv` holds the end-to-end program and its expected
  memory image, computed in the testbench. The program does three things:
  * It fills words 400–449 in a loop. The loop contains a load-use stall,
    forwarding and a taken backward branch.
  * It runs all eleven matrix instructions on A = words 400–424 and
    B = 425–449. This includes a strided load (Offset 6) and a strided store
    (Offset 7).
  * It runs the remaining integer instructions and stores the registers from
    word 800.
* `tb_riscv_pipeline` runs that program on the core alone, with the
  instruction memory modelled in the testbench. It takes well under a
  second.
* `tb_intellera_top` runs the whole processor at its default parameters. It
  loads the program over the UART at 2891 clocks per bit, which takes about
  9 million cycles and one to two minutes of simulation. It counts each
  mechanism (bytes received and echoed, words assembled, load-use stalls,
  forwarding from both stages, taken branches, jumps, each matrix operation)
  and fails if one never happened.

## Where this implementation makes its own choices

The architecture above fixes the following: the matrix banks, the
instruction format and codes, the MACDM signalling, the 25-word memory path,
the five-stage pipeline with a hazard unit, and UART program loading with
four bytes per instruction. The points below are this implementation's own
decisions. Change them first if they do not match your system.

* **Matrix addressing.** The formula `Row + i*Offset + j` is this
  implementation's reading of the Row and Offset fields. The rule that
  Offset 0 means 5 is also its own. STR R uses the same fields for its
  destination.
* **Matrix arithmetic.** Integer, wrapping, one cycle per operation. Long
  adder chains limit the clock; a real FPGA build may need to pipeline
  `MAC M`.
* **The 20-bit {Offset, Row} field** travels in the pipeline registers
  beside the register operands. In the original arrangement it passes
  through a dedicated register-file port. Here the register file stores
  nothing for it, and the address generator takes it directly.
* **Position of the MAC unit** in the memory stage. Matrix address
  calculation happens in execute.
* **Branches.** Static not-taken prediction, no dynamic predictor.
* **Added instructions.** JAL, JALR and LUI, so that jumps and large
  constants work.
* **Memory sizes.** 256 instruction words and 1024 data words. Byte
  addresses for LW/SW, word addresses for matrix instructions.
* **UART.** 115200 baud default, LSB-first byte order in each instruction,
  the echo on the transmit line, and `prog_mode` sequencing.
* **Read-out port** on data memory.

The architecture targets 333 MHz on an FPGA. This RTL has not been
timed or placed. With its single-cycle 5×5 product, it will not reach that
clock without pipelining the MAC unit.
