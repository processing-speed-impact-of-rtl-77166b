# Two-stage vs. five-stage RV32I pipelines for an FPGA

A deeper pipeline shortens the longest logic path, so the clock can run
faster. It also makes the CPU learn the outcome of a jump later, and it adds
a wait after loads. This repository holds two RV32I CPUs built from the same
functional units that differ only in how they are cut into stages:

* **`cpu_5stage`**: the classic IF / ID / EX / MA / WB pipeline. It
  forwards results, stalls one cycle on a load-use pair and loses three
  cycles on every taken jump.
* **`cpu_2stage`**: IF, ID and EX merged into one stage, MA and WB merged
  into a second. It never stalls and loses one cycle on a taken jump, but
  its paths are longer.

Each CPU sits in an identical small system, `soc`. The system has a common
program/data memory built from four byte-wide block RAMs, a GPIO port, a tick
timer and a UART. The top level, `riscv_pipeline_top`, holds both systems
side by side. Load the same program into both and you can compare cycle
counts directly.

On the FPGA this design was made for (Cyclone 10 LP), the trade-off was
reported as follows:
* At equal clock, the two-stage CPU finished a CoreMark run in about 18 %
  fewer cycles.
* The five-stage CPU closed timing at 67.4 MHz, against 39.7 MHz for the
  two-stage CPU.
* At their own maximum clocks, the five-stage CPU was therefore about 40 %
  faster overall.

This RTL reproduces the cycle behaviour. It makes no claim about the
frequencies, which depend on synthesis and place-and-route.

The extra stages also cost area. In the original FPGA build the five-stage
system used about 1670 registers against 1344 for the two-stage one. A generic
synthesis of this RTL gives 1614 and 1349 flip-flops, not counting the memory
arrays: the register file, the pipeline registers and the peripherals.

## Files

| file | contents |
|---|---|
| `rtl/rv32i_pkg.sv` | opcodes, ALU enum, control word `ctrl_t`, data bus request `dbus_req_t`, address map |
| `rtl/decode_instr.sv`, `rtl/decode_imm.sv` | instruction decoder and immediate generator |
| `rtl/regfile.sv` | 32 x 32 register file, two read ports, one write port, write-through |
| `rtl/alu.sv`, `rtl/comp.sv`, `rtl/sext.sv` | ALU, branch comparator, load-data extension |
| `rtl/cpu_5stage.sv`, `rtl/cpu_2stage.sv` | the two pipelines |
| `rtl/byte_bank.sv`, `rtl/byte_memory.sv` | one byte-wide dual-port RAM; four of them as the byte-addressable memory |
| `rtl/gpio.sv`, `rtl/timer.sv`, `rtl/uart.sv` | peripherals |
| `rtl/soc.sv` | one CPU plus memory plus peripherals, `STAGES` = 2 or 5 |
| `rtl/riscv_pipeline_top.sv` | both systems side by side |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/rv_tb_pkg.sv` | a small assembler, the common test program and an instruction-set reference model with a cycle model |
| `tb/tb_uart_monitor.sv` | serial-line decoder used by the system testbenches |
| `tb/kernels_tb.sv`, `tb/kernels.hex` | a compiled C program of benchmark-style kernels, run on both systems |

## The units both pipelines share

The two CPUs instantiate the same units and differ only in their pipeline
registers and operand multiplexers:

* `decode_instr` turns the instruction word into `ctrl_t`. `ctrl_t` holds:
  - the register addresses, with an unused source forced to x0;
  - `reg_we`, forced to 0 when rd is x0;
  - the ALU operation and the two operand selects;
  - the load, store and jump flags.

  Forcing unused sources and x0 writes to zero spares the hazard logic from
  special-casing x0.
* `decode_imm` produces the I, S, B, U or J immediate.
* `alu` handles the register and immediate operations. It also forms LUI
  (`0 + imm`), AUIPC (`pc + imm`) and the link address of JAL/JALR
  (`pc + 4`).
* `comp` evaluates the six branch conditions.
* A separate adder forms the jump target: `pc + imm`, or `rs1 + imm` with
  bit 0 cleared for JALR.
* Another adder forms the data address, `rs1 + imm`.
* `sext` picks a byte, halfword or word from the read data and extends it.

FENCE, ECALL and EBREAK execute as no-ops. The CPUs implement the
unprivileged rv32i integer set without CSRs, traps or interrupts.

## Fetch

Both CPUs fetch the same way. The block RAM is synchronous, so the
instruction memory is addressed with **`pc_next`**, the output of the PC
multiplexer, rather than with the PC register. The instruction word then
arrives in the same cycle as the PC register holds its address.

The PC multiplexer chooses, in this order of priority:
1. The reset address, in the first cycle after reset.
2. The registered jump target, while a taken jump sits behind the first
   pipeline register.
3. The current PC, during a five-stage load-use stall.
4. `pc + 4`.

## Control hazards: what a taken jump costs

Neither CPU predicts jumps. Both compute `jmp` (taken) and `jmp_addr` in the
execute logic and **register them** before they reach the PC multiplexer.
This cuts the jump path out of the execute cycle.

**Five stages.** The jump is decided in EX and steers the PC multiplexer
one cycle later, while it is in MA. By then three younger instructions have
entered IF, ID and EX, all from the wrong path. In that cycle the flush
clears the valid bits that would carry them on, so nothing younger than the
jump writes a register or memory. The target is fetched in the next cycle.

```
cycle   IF       ID       EX       MA       WB
  1     J        i-1      i-2      .        .
  2     w1       J        i-1      i-2      .
  3     w2       w1       J        i-1      i-2
  4     w3       w2       w1       J        i-1     <- flush: w1..w3 discarded
  5     T        -        -        -        J
  6     T+1      T        -        -        -
  7     T+2      T+1      T        -        -       T reaches EX 4 cycles after J
```

A taken jump or branch therefore costs **three cycles**. A branch that is
not taken costs nothing.

**Two stages.** The jump is decided in stage 1 and steers the PC in the next
cycle. Only the one instruction fetched behind it is discarded, so a taken
jump costs **one cycle**.

The time between two consecutive instructions entering execute is
1 + penalty cycles:

| event | five-stage | two-stage |
|---|---|---|
| ordinary instruction | 1 | 1 |
| taken jump / branch | 4 | 2 |
| load followed by an instruction using its result | 2 | 1 |

The testbenches predict every cycle from this table and check the results
exactly.

## Data hazards: forwarding and the load-use bubble

**Five stages.** An operand in EX can come from one of three places, checked
in this order:
1. The **ALU result of the instruction in MA**.
2. The **write-back value of the instruction in WB**.
3. The value read from the register file in ID.

The MA path carries only ALU results, because a load's data is not ready
until the end of MA. A load in EX whose destination is a source of the
instruction in ID therefore holds the PC and the IF/ID register for one
cycle and sends a bubble into EX. One cycle later the load is in WB, and its
value reaches the dependent instruction through the WB path. The case of a
producer in WB and a consumer in ID is covered by the register file: it is
write-through, so a read returns the value being written in the same cycle.

**Two stages.** The value selected in stage 2 (ALU result or extended load
data) is written to the register file and, in the same cycle, fed back to
the stage-1 operand multiplexers. A dependent instruction right behind a
load therefore runs without waiting. The cost is a long combinational path:
memory output, `sext`, forwarding multiplexer, ALU, then address or
comparator logic. That path is one reason the two-stage CPU clocks lower.

## Memory: four byte banks

The block RAMs are 8 bits wide and know nothing of byte addressing, so the
memory is four of them. Bank *b* holds every byte whose address is *b*
modulo 4. An access at byte address A covers the bytes A to A+3:
* Bank *b* reads row `(A + ((b - A) mod 4)) / 4`.
* The four outputs are rotated by A[1:0], registered at the read, so byte A
  always lands in bits 7:0.
* Writes of 1, 2 or 4 bytes go to the same rotated banks.

As a result, misaligned halfwords and words, including those that straddle a
word boundary, take one cycle like any other access.

The memory has two ports:
* an instruction port, read-only;
* a data port, read/write.

Both have one cycle of read latency. Addresses wrap modulo `MEM_BYTES`. The
default is 32 KiB, which uses 32 of the 66 M9K blocks of a 10CL025.

## The system and its address map

The data request `dbus_req` leaves the CPU in EX (five-stage) or stage 1
(two-stage), and its read data returns one cycle later. Address bit 31
selects memory or peripherals. Peripheral reads are registered so that they
also return one cycle later.

| address | register |
|---|---|
| `0x0000_0000` + n | common program and data memory |
| `0x8000_0000` | GPIO output (read/write) |
| `0x8000_0004` | GPIO input, two-flip-flop synchronised (read) |
| `0x8000_0010` | timer: clock ticks since reset (read; a write loads it) |
| `0x8000_0020` | UART data: a write sends a byte, a read takes the received byte and clears the flag |
| `0x8000_0024` | UART status: bit 0 transmitter busy, bit 1 byte received |

The UART is 8N1, with `CLK_HZ / BAUD` clocks per bit. A write while the
transmitter is busy is ignored, so software polls bit 0 first.

The timer counts clock cycles. A benchmark score in iterations per second is
then `iterations * f_clk / ticks`.

## Parameters

| parameter | where | default | meaning |
|---|---|---|---|
| `STAGES` | `soc` | 5 | 5 = `cpu_5stage`, 2 = `cpu_2stage` |
| `MEM_BYTES` | `soc`, top, `byte_memory` | 32768 | memory size, power of two |
| `CLK_HZ` | `soc`, top, `uart` | 12 000 000 | CPU clock, sets the UART divider |
| `BAUD` | `soc`, top, `uart` | 115 200 | serial bit rate |
| `INIT_FILE` | `soc`, top, `byte_memory` | "" | if set, bank *b* is preloaded with `$readmemh` from `INIT_FILE<b>.hex` (one byte per line) |
| `RESET_PC` | CPUs | 0 | first fetch address |

Reset is asynchronous and active low everywhere. The memory itself has no
reset.

When the design runs from a PLL at another frequency, set `CLK_HZ` to that
frequency.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module riscv_pipeline_top_tb rtl/rv32i_pkg.sv tb/rv_tb_pkg.sv tb/riscv_pipeline_top_tb.sv
./obj_dir/Vriscv_pipeline_top_tb
```

Replace the testbench name to run another one, for example `cpu_5stage_tb`
or `uart_tb`.

Apart from `kernels_tb`, the testbenches need no external files. Programs
are assembled inside the testbench by the small assembler in
`tb/rv_tb_pkg.sv`, and written into the byte banks through hierarchical
references. `kernels_tb` reads its program image from `tb/kernels.hex`
(path relative to the repository root, so run it from there), one
little-endian 32-bit word per line starting at address 0.

### What the tests check

* **Common test program** (`build_test_program`). It covers:
  - every RV32I instruction class, with back-to-back dependences that use
    both forwarding paths;
  - loads and stores of every size, including misaligned ones;
  - every branch condition, taken and not taken;
  - a call and return;
  - a CRC-16 loop of the kind CoreMark contains;
  - reads of the timer and the GPIO input.

  The program then stores a signature of all registers, prints the CRC on
  the UART, echoes a received byte and signals completion on the GPIO port.
* **Reference model** (`rv_iss`). Written directly from the ISA, it executes
  the program and predicts, from the table above, the exact cycle in which
  each instruction executes.
* **`cpu_5stage_tb`, `cpu_2stage_tb`**. Each runs a CPU with memory and a
  minimal peripheral model. It compares results, signature, cycle count,
  number of flushes, and number of stalls (or of forwarded loads) with the
  model.
* **`soc_tb`**. Runs the whole program on a five-stage system with real
  peripherals at a fast serial rate, including the UART output and the
  echo.
* **`riscv_pipeline_top_tb`**. Runs the whole program on both systems at the
  top's default parameters. Every mechanism must occur:
  - jump flushes in both CPUs;
  - load-use stalls;
  - forwarding from MA, from WB and from stage 2, including load data;
  - misaligned accesses, timer reads, GPIO reads, UART transmit and receive.

  On this program (2249 instructions, 412 taken jumps, 20 load-use pairs)
  the five-stage CPU needs 3507 cycles and the two-stage CPU 2661. The gap
  is wider than on CoreMark because the CRC loop branches every few
  instructions.
* **`kernels_tb`**. Runs compiled C code instead of hand-assembled code,
  on both systems at the top's defaults. The program was built with GCC
  for `rv32i`/`ilp32` at `-O1`, freestanding, linked at address 0 with the
  stack at the top of the 32 KiB memory. It brings its own shift-and-add
  multiply, so it needs no library. Its kernels are of the kinds a CPU
  benchmark such as CoreMark contains:
  - a linked list that is built, reversed and sorted;
  - a 6x6 matrix product;
  - a state machine that classifies numbers in a text;
  - a CRC-16.

  The result words, the exact cycle of the completion store and the 72
  characters printed on the UART are compared with the reference model.
  Over 31931 instructions (5064 taken jumps, 534 load-use pairs) the
  five-stage CPU needs 47659 cycles and the two-stage CPU 36995, which is
  22 % fewer. This is close to the roughly 18 % reported for CoreMark.
* **Unit testbenches**. The ALU, comparator, `sext` and immediate decoder
  are compared against independent models. The register file, byte bank,
  memory, timer, GPIO and UART are checked with random traffic and corner
  cases.

## Design choices beyond the original description

The pipeline structure, the stages' duties, the forwarding paths, the
load-use bubble, the three-cycle jump penalty of the five-stage CPU, the
stall-free two-stage CPU and the four-bank byte memory follow the original
design. The following are choices made here:

* **Two-stage jump penalty.** The block diagram shows the jump signals
  passing the stage register, which gives one lost cycle per taken jump. The
  two-stage CPU was also described as executing independently of the
  program code. If that was meant literally (no jump penalty at all), the
  jump would have to steer the PC multiplexer combinationally, lengthening
  the critical path further. This RTL follows the block diagram.
* **Write-through register file.** It covers a producer in WB with a
  consumer in ID, a case the forwarding paths do not reach. In the
  two-stage CPU it duplicates the explicit forwarding path.
* **Operand multiplexer inputs.** The constant 4 for the link address and
  the zero for LUI are additions. The jump adder takes the PC or the
  forwarded rs1.
* **Memory and peripherals.** The memory size, the address map, the
  peripheral register layout, the UART format and rate, the 32-bit timer
  and the reset behaviour are this design's own choices.
* **Misaligned accesses** are supported in hardware, which follows from how
  the byte banks are addressed. The CPUs raise no misalignment exception,
  and a misaligned jump target simply fetches from that address.
* **The PLL is not part of the RTL.** The top's `clk` is the PLL output.

## Not included

* The CoreMark program itself, with its library and timing harness.
  `kernels_tb` runs kernels of the same kinds instead. The
  memory size and peripherals are sized for it: roughly 12 to 20 KB of code
  plus about 2 KB of data and a little stack fit the 32 KiB memory, and the
  largest reported tick count (about 2.5 x 10^8) fits the 32-bit timer. But
  no CoreMark run is part of the testbenches.
* Timing constraints, FPGA project files and the vendor PLL.
* Jump prediction and caches. Both were deliberately left out of the
  original design as well.
