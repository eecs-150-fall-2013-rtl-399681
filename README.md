# MIPS150: a three-stage pipelined MIPS CPU with a serial console

MIPS150 is a small 32-bit MIPS processor for an FPGA board. It runs a
38-instruction subset of MIPS I, uses one cycle per instruction with no
stalls, and talks to the outside world only through a UART on an RS-232
line. Programs are downloaded over that line. Stores to a special address
range write the bytes into instruction memory, and the CPU then jumps to
them. The ISA is chosen so that a three-stage pipeline needs no interlocks:

- Branches, jumps and loads each have one **architected delay slot**.
- Every other data hazard is removed by **forwarding**.

This repository holds synthesizable SystemVerilog for the CPU with its two
block RAMs, the memory-mapped I/O, the UART and the system top level, plus a
self-checking testbench for each of them.

```
           +------------------------------ mips150_cpu -------------------------------+
           |   F                     X                                   W            |
           |  next PC --> IMEM  --> decode, regfile read, forward,  --> load extract --+--> regfile write
           |  (reset/     port B     ALU, branch unit, mem_ctrl       (DMEM or I/O    |
           |  target/     (sync      |        |           |            read data)     |
           |  PC+4)       read)      |        |           +--> DMEM (sync)  ----------+
           |    ^                    |        +--> IMEM port A (stores, 0x2/0x3...)   |
           |    +---- redirect ------+        +--> io_map <----> uart <----> serial_in/out
           +--------------------------------------------------------------------------+
```

## Instruction set

The subset covers these instructions:

- Loads: `LB LH LW LBU LHU`
- Stores: `SB SH SW`
- Immediate arithmetic: `ADDIU SLTI SLTIU ANDI ORI XORI LUI`
- Shifts: `SLL SRL SRA SLLV SRLV SRAV`
- Register arithmetic: `ADDU SUBU AND OR XOR NOR SLT SLTU`
- Jumps and branches: `J JAL JR JALR BEQ BNE BLEZ BGTZ BLTZ BGEZ`

They use the standard MIPS encodings. There is no multiply or divide, no
floating point, no coprocessor 0, and no traps: additions wrap. `JAL` and
`JALR` write PC+8, because the delay slot is skipped on return. A `J`/`JAL`
target takes its upper four bits from the jump's own PC. Encodings outside
the subset execute as no-ops.

Both kinds of delay slot are part of the architecture:

* **Branch delay slot.** The instruction after a branch or jump always
  executes, whether the branch is taken or not.
* **Load delay slot.** The instruction after a load must not use the loaded
  register. In this implementation that instruction sees the *old* value.
  The second instruction after the load is the first to see the new one.

## The pipeline

| stage | work in the stage | state at its end |
|-------|-------------------|------------------|
| F | Pick the next PC: the reset PC, a pending branch target, or PC+4. Drive it onto instruction-memory port B. | The instruction RAM captures the address; the `pc_x` register holds the PC. |
| X | Decode (`control`, `alu_dec`). Read the register file asynchronously and forward from W. Run the ALU and resolve the branch (`branch_unit`). Form the address, byte mask and store data (`mem_ctrl`) and the I/O strobes (`io_map`). | Both RAMs and the I/O read register sample their inputs. The branch decision is registered. The X/W pipeline register is loaded. |
| W | Take the RAM or I/O read data and extract the byte or halfword (`load_extract`). Choose between the load data and the ALU/link result. | The register file is written on the rising edge. |

The block RAMs have synchronous reads, so they are the pipeline registers.
The instruction RAM sits between F and X, and the data RAM between X and
W. There is no separate IF/ID register. Every state element uses the
rising edge, and the register file has no falling-edge write.

### Why the hazards work out

The timing of one instruction `I` that is in X in cycle *t*:

* **Branches.** `I` resolves in cycle *t*. During that same cycle F is
  already fetching PC+4, which is the delay slot. The decision is
  registered, so in cycle *t*+1 F fetches the target. The result is exactly
  one delay slot and no flush logic. A branch in a delay slot is undefined,
  as it is in MIPS.
* **ALU and link results.** `I` writes the register file at the end of
  cycle *t*+1. The instruction right behind it is in X during cycle *t*+1
  and would read the stale value. `forward_unit` detects this case:
  - the W instruction writes a register,
  - that register is not `$0`,
  - the W instruction is not a load,
  - the register equals the X instruction's rs or rt.

  The X stage then takes the W result instead of the register-file output.
  This covers ALU inputs, store data, branch comparisons and `JR`/`JALR`
  targets. Two instructions later, the register file already holds the
  value, because reads are asynchronous and come after the write edge. One
  forwarding path is therefore enough.
* **Loads.** The data RAM returns data in cycle *t*+1, the register is
  written at the end of *t*+1, and the instruction at *t*+2 reads it from
  the register file. The delay-slot instruction at *t*+1 is not given the
  load data. This keeps the path RAM → extract → ALU → RAM address out of
  one cycle, which is what the architected load delay slot is for.

No instruction ever waits. The CPU testbench checks that a program reaches
its end loop in exactly as many cycles as instructions it executed.

## Memory system

Each memory is a 4096 × 32-bit block RAM addressed by word. Byte address
bits [13:2] select the row and bits [1:0] select the byte. The memories are
**big-endian**:

| byte offset | 00 | 01 | 10 | 11 |
|-------------|----|----|----|----|
| bits of the row | 31:24 | 23:16 | 15:8 | 7:0 |
| write-mask bit | 3 | 2 | 1 | 0 |

For a store, `mem_ctrl` copies the byte or halfword into every lane and
enables only the addressed lanes through the 4-bit write mask. For a load,
`load_extract` picks the lane and extends it: sign extension for `LB`/`LH`,
zero extension for `LBU`/`LHU`. Halfword and word accesses ignore the low
address bits they do not use.

Instruction fetch always reads the instruction memory. For loads and stores,
address bits [31:28] choose the targets, one bit per target, so one store
can reach more than one device:

| Address[31:28] | target | access |
|----------------|--------|--------|
| `0xx1` | data memory | read / write |
| `0x1x` | instruction memory | write only |
| `1000` | I/O | read / write |

A store to `0x3xxxxxxx` writes both memories. This is how a loader puts a
program into the instruction memory while the data memory keeps a
consistent copy. A load from `0x2xxxxxxx` (instruction memory only) returns
0.

## Serial I/O

| address | register | access | contents |
|---------|----------|--------|----------|
| `0x80000000` | transmitter status | read | `{31'b0, DataInReady}` |
| `0x80000004` | receiver status | read | `{31'b0, DataOutValid}` |
| `0x80000008` | transmit data | write | `{24'b0, DataIn}` |
| `0x8000000c` | receive data | read | `{24'b0, DataOut}` |

The CPU never looks at ready or valid, so software must poll the status
registers:

* A store to `0x80000008` raises `DataInValid` during its X cycle.
* A load from `0x8000000c` raises `DataOutReady` during its X cycle, which
  consumes the byte.

Read data is registered at the end of X, so I/O loads have the same timing
as RAM loads.

The UART uses 8 data bits, no parity and one stop bit, LSB first, with
`CLOCK_FREQ / BAUD_RATE` clock cycles per bit. The receiver syncs the input
through two flip-flops and samples each bit in its middle. It holds a
received byte until it is consumed. If a newer byte arrives first, the newer
byte replaces it.

A polling echo loop shows the pattern; the `nop`s are the delay slots:

```
        lui  $30, 0x8000
loop:   lw   $1, 4($30)      # receiver status
        nop
        beq  $1, $0, loop
        nop
        lw   $2, 12($30)     # take the byte
        nop
wait:   lw   $3, 0($30)      # transmitter status
        nop
        beq  $3, $0, wait
        nop
        sw   $2, 8($30)      # send it
        j    loop
        nop
```

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `CLOCK_FREQ` | 100 000 000 | `mips150_top`, `uart` | clock frequency in Hz, used only for the bit time |
| `BAUD_RATE` | 115 200 | `mips150_top`, `uart` | serial bit rate |
| `RESET_PC` | `32'h0` | `mips150_top`, `mips150_cpu` | first fetch address after reset |
| `IMEM_INIT_FILE`, `DMEM_INIT_FILE` | `""` | `mips150_top`, `mips150_cpu` | optional hex images preloaded into the two RAMs |
| `DEPTH` | 4096 | `imem_blk_ram`, `dmem_blk_ram` | rows per memory (the CPU fixes 4096) |
| `INIT_FILE` | `""` | `imem_blk_ram`, `dmem_blk_ram` | `$readmemh` file, one 32-bit word per line |

The reset is synchronous and active high. It clears the pipeline control
and the pending branch. It does not clear the register file or the memories,
so software must initialise them.

## Files

| file | contents |
|------|----------|
| `rtl/mips150_pkg.sv` | opcodes, funct codes, ALU operations, control bundle `ctrl_t`, I/O map constants |
| `rtl/mips150_top.sv` | system: CPU + UART, ports `clk rst serial_in serial_out` |
| `rtl/mips150_cpu.sv` | the pipeline, instantiating everything below |
| `rtl/control.sv`, `rtl/alu_dec.sv` | main decoder and ALU controller |
| `rtl/alu.sv`, `rtl/branch_unit.sv`, `rtl/forward_unit.sv`, `rtl/regfile.sv` | execute-stage datapath |
| `rtl/mem_ctrl.sv`, `rtl/load_extract.sv` | address partitioning, byte lanes |
| `rtl/imem_blk_ram.sv`, `rtl/dmem_blk_ram.sv` | instruction (dual-port) and data (single-port) block RAMs |
| `rtl/io_map.sv` | memory-mapped UART registers |
| `rtl/uart.sv`, `rtl/uart_transmitter.sv`, `rtl/uart_receiver.sv` | serial port |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/mips150_asm_pkg.sv` | instruction encoders used to write test programs |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. For example, the full system at its default parameters: a
loader downloads an echo program over the serial line, then the echo is
checked. It takes about a second.

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/mips150_pkg.sv tb/mips150_asm_pkg.sv tb/mips150_top_tb.sv \
    --top-module mips150_top_tb -Mdir obj -o sim
obj/sim
```

Replace the testbench name to run another one. Unit testbenches that do not
use the encoder package can leave out `tb/mips150_asm_pkg.sv`.

A program gets into the instruction memory in one of three ways:

* Name a hex image in `IMEM_INIT_FILE`. This is also how an FPGA build gives
  the RAM its boot program. `tb/echo.hex` is the echo loop above, linked at
  address 0, and `mips150_echo_tb` runs it this way.
* Write the array from a testbench before releasing reset, for example
  `dut.u_cpu.u_imem.mem[k] = word`.
* Download it over the serial line with a loader program, as
  `mips150_top_tb` does.

## Verification

* **`mips150_cpu_tb`** checks the CPU against a reference model. It
  generates 24 random programs of about 460 instructions each. The programs
  use every instruction, with forward branches and jumps, register jumps,
  loads and stores of all widths to the data-only and dual-write ranges,
  and I/O accesses. The testbench runs them on the CPU and on a sequential
  instruction-set model written in the testbench. It then compares:
  - all registers,
  - the memory areas written,
  - the bytes sent to the UART,
  - the number of UART reads,
  - the cycle count.

  It also requires that forwarding, taken branches, register jumps,
  dual-memory stores, sub-word accesses, I/O transfers and writes to `$0`
  each occurred.
* **`mips150_top_tb`** is the end-to-end test at full size. It downloads a
  program byte by byte over the serial line with `SB` to `0x3000_1000`,
  jumps to it with `JR`, and checks the echoed bytes and both memory copies.
* **`mips150_asmtest_tb`** is a directed per-instruction test program. It
  runs 55 compute-compare-branch checks, including sub-word memory lanes,
  both delay slots, link values, address partitions and code written by
  stores and then executed. It reports `P` or the failing test number over
  the serial line.
* **`mips150_echo_tb`** preloads `tb/echo.hex` and checks that bytes come
  back in order and without delay.
* Unit testbenches cover the ALU (random plus corners), decoders
  (every instruction), register file, branch unit, forwarding (exhaustive),
  both RAMs (full-depth random traffic), partition and lane logic
  (exhaustive over nibble, width and offset), load extraction, the I/O
  registers and the UART at 115200 baud, including frame length.

## Design choices and departures

These points are not fixed by the specification the design follows, and
were decided here:

* **Stage split.** Only "three stages" was required. The split above puts
  both synchronous RAMs on stage boundaries.
* **Load data is not forwarded** into the delay slot. The delay slot sees
  the old value.
* **`LB`.** One description of byte loads implied zero extension.
  Sign extension is used, which matches the instruction's definition.
* **Clock and reset.** The 100 MHz clock, reset PC 0, synchronous reset,
  and uninitialised register file are assumptions.
* **UART internals.** The frame format, mid-bit sampling and
  overwrite-on-overrun were chosen here. Only the ready/valid signal names
  and the baud rate were given.
* **Address decoding.** Within the I/O range only address bits [3:2] are
  decoded. Reads of the write-only transmit register return 0.

Not included: the instruction and data caches, memory arbiter, DDR2
controller, line-drawing engine and DVI output of the later system. The
board's RS-232 level shifter is outside the FPGA; connect it to
`serial_in`/`serial_out`.
