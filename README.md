# sun32: a small 32-bit RISC system on chip

sun32 is a deliberately minimal computer: an original 32-bit RISC
processor, an interrupt controller, a UART and a timer on one AHB-Lite bus,
with 64 KiB of instruction memory and 64 KiB of data memory. It was conceived
as a teaching system: small enough that one person can follow every clock of
the processor, yet complete enough to run a C compiler's output and a
real-time operating system (a two-task FreeRTOS demonstration switched by a
one-second timer interrupt, and Dhrystone). This repository holds a
SystemVerilog implementation of the whole SoC, in its five-step multi-cycle
processor configuration, with a self-checking testbench for every block.

The published description of sun32 fixes the instruction list, the register
conventions, the interrupt scheme, the peripheral structure and the main
sizes. It does not publish a binary encoding, an address map or register
layouts; those are this implementation's own and are marked as such below.
Code written for the original sun32 toolchain will therefore not run
unchanged on this RTL.

## Block overview

```
              int, ack, vector, eoi
   +--------+ <-------------------> +------------------+  irq0 timer
   |  core  |                       |  interrupt_ctr   |  irq1 UART receiver (buffer full)
   +--------+                       +------------------+  irq2 UART sender (buffer empty)
       | AHB-Lite master (only master)        |             irq3..7 ext_irq pins
 ======+======================================+===========+=========+=======+====
       |             |              |              |           |        |
   ahb_sram      ahb_sram     uart_sender   uart_receiver    timer   gpio_led / gpio_sw
   (IMEM)        (DMEM)       FIFO+baud     FIFO+baud
```

| Module | Role |
|---|---|
| `sun32_soc` | top level, wires everything below |
| `core` | processor controller and datapath registers |
| `instruction_fetch_unit`, `inc32` | PC, IR, next-PC selection, PC + 4 |
| `reg32` | 32 x 32-bit registers, r0 = 0 |
| `alu32`, `cla32` | ALU and its carry look-ahead adder |
| `div32` | iterative divider (div, divu, rem, remu) |
| `condcheck` | branch condition from the condition code |
| `memory_access_unit` | byte/halfword lanes and load extension |
| `ahb_lite_master`, `ahb_lite_slave`, `ahb_interconnect` | the bus |
| `ahb_sram` | instruction and data memory, 16384 words each |
| `interrupt_ctr` | IRR, IMR, EN, ISR and priority logic |
| `uart_sender`, `uart_receiver`, `fifo`, `baud_gen` | serial port |
| `timer` | TMCNT / TMCMP interval timer |
| `gpio_led`, `gpio_sw` | LED outputs, switch inputs |
| `sun32_pkg` | encoding, types and address map |

Everything is one clock domain (`clk`, 50 MHz in the reference system)
with an active-low asynchronous reset `rst_n`.

## The processor

### Programmer's model

- 32 general registers r0..r31. r0 always reads zero. `call` writes the
  return address into r31 and `ret` jumps to r31.
- A processor status register (PSR) holding the condition code that `cmp`
  sets: Z (equal) in bit 0, LT (signed less than) in bit 1, ULT (unsigned
  less than) in bit 2. The other bits are reserved and read zero.
- An exception PC (EPC), written by the hardware when an interrupt is
  taken. PSR and EPC are reached with `msr` (general register to PSR/EPC)
  and `mrs` (PSR/EPC to a general register). That is how an interrupt
  handler saves the condition code and how an RTOS swaps the return address
  of a task. EPC as a separate register is this implementation's choice.
- No floating point; no MMU; no privilege levels.

### Instructions and encoding

The instruction list is sun32's. The bit layout is this implementation's,
built around the field widths the sun32 relocations imply: a 25-bit
PC-relative branch offset, an 18-bit upper immediate and a 14-bit lower
immediate.

```
R  op[31:25] rd[24:20] rs1[19:15] rs2[14:10] 0[9:0]
I  op[31:25] rd[24:20] rs1[19:15] 0[14]      imm14[13:0]
U  op[31:25] rd[24:20] 0[19:18]   imm18[17:0]
J  op[31:25] off25[24:0]
```

| Opcode | Instructions | Operation |
|---|---|---|
| 0x00-0x0E | add sub mult multu div divu rem remu sll srl sra and or xor cmp | R form, `rd = rs1 op rs2` |
| 0x10-0x1E | the same with bit 4 set | I form, `rd = rs1 op imm14` |
| 0x20-0x24 | lb lbu lh lhu lw | `rd = mem[rs1 + sext(imm14)]` |
| 0x28-0x2A | sb sh sw | `mem[rs1 + sext(imm14)] = rd` |
| 0x2C | lui | `rd = imm18 << 14` |
| 0x40-0x48 | b beq bne bgt ble bult bule bugt buge | `if cond: pc += sext(off25) * 4` |
| 0x49 | call | `r31 = pc + 4; pc += sext(off25) * 4` |
| 0x4A | ret | `pc = r31` |
| 0x60, 0x61 | msr, mrs | `csr[imm14] = rs1` / `rd = csr[imm14]` (0 = PSR, 1 = EPC) |
| 0x62 | reti | `pc = EPC`, end of interrupt |

Notes:
- Immediates of and, or, xor and the shifts are zero-extended; all others
  are sign-extended. `cmp`/`cmpi` write only the PSR.
- mult and multu both return the low 32 bits of the product.
- Branch offsets count words from the address of the branch itself.
- Division by zero gives an all-ones quotient, and the remainder is the
  dividend. A signed remainder takes the sign of the dividend.
- The sun32 assembler pseudo-instructions map onto this encoding as:
  `ldh` = lui,
  `ldl` = ori rd, rd, imm14, `mov` = or rd, rs, r0, and `nop` = add r0, r0, r0.
  A 32-bit constant therefore takes one lui and one ori.
- Undefined opcodes do nothing. Misaligned accesses are not detected: the
  low address bits select the byte lanes as if the access were aligned.

### Five-step multi-cycle execution

The controller in `core` steps each instruction through fetch (IF),
decode/register read (ID), execute (EX), memory (MEM) and write back (WB),
one state each. There is no overlap between instructions. Fetches, loads
and stores share the core's single AHB-Lite master. A bus transfer takes two
clocks: the address phase, then the data phase. So with the zero-wait-state
memories:

| Instruction | Clocks |
|---|---|
| ALU, compare, branch, call/ret, msr/mrs, lui | 5 (IF 2, ID, EX, WB) |
| load, store | 7 (IF 2, ID, EX, MEM 2, WB) |
| div, divu, rem, remu | 39 (EX waits 34 extra clocks for `div32`) |

MEM is skipped for instructions that do not touch memory. The EX state
registers the ALU result, the branch decision and (for cmp) the new
condition code. WB writes the register file and the PC.

The sun32 history has 3-stage and 5-stage versions, each multi-cycle or
pipelined. The 5-stage multi-cycle version is the one built here. The
pipelined versions are not: their hazard handling is not described.

## Interrupts

This is the part where the core and the interrupt controller must agree
clock by clock.

**Controller (`interrupt_ctr`).** Requests irq0..irq7 are OR-ed into the
Interrupt Request Register (IRR) every clock, so a one-clock pulse is
enough. A request stays in IRR until it is accepted. The Interrupt Mask
Register (IMR, 1 = masked) hides requests. EN (bit 0 of its own register)
is a global enable. The priority logic picks the lowest-numbered pending
unmasked request, so irq0 has the highest priority. `int` is high when EN
is set, nothing is in service (ISR = 0) and some request is pending. The
controller never nests interrupts: while a request is in service, `int`
stays low. Software can raise an interrupt itself by writing IRR.

**Handshake.**

```
clock  core state        signals
  n    IF (1st clock)    int=1 seen before the fetch starts
 n+1   IACK              ack=1   -> controller: ISR <= winner, IRR bit cleared,
                                    vector <= winner number
 n+2   IVEC              core latches vector; EPC <= PC (next instruction)
 n+3.. IVRD              bus read of word at address vector*4 (vector table)
       IF                fetch from the handler address just read
 ...   handler ... reti  WB of reti: pc <= EPC, eoi=1 -> controller: ISR <= 0
```

The core samples `int` only in the first clock of a fetch. An instruction
that has started always completes, and EPC always holds the address of the
next instruction to run. The vector table is eight words at address 0. Each
word holds the address of a handler, so a C function pointer can be stored
there directly. The handler must end with `reti`. The core does not save
PSR itself: a handler that changes the condition code saves it with `mrs`
and restores it with `msr` before `reti`. The core has no interrupt mask of
its own. All masking, priority and nesting control is in the controller.

Controller registers (base 0x8000_0000): 0x0 IRR (r/w; a write replaces it,
requests arriving in the same clock are kept), 0x4 IMR, 0x8 EN, 0xC ISR
(read only), 0x10 current vector (read only). All reset to zero, so
interrupts start disabled.

Interrupt lines in this SoC: irq0 timer, irq1 UART receiver buffer full,
irq2 UART sender buffer empty, irq3..irq7 from the `ext_irq` pins. This
assignment is this implementation's choice.

## Bus and address map

One AHB-Lite bus with the core as its only master. The master issues only
single NONSEQ transfers: no bursts, no locked transfers and no protection
signals. `ahb_interconnect` decodes the address, remembers the selected
slave for the data phase and returns that slave's HRDATA, HREADYOUT and
HRESP. An unmapped address completes at once and reads zero. The memories
read synchronously in the address phase and write in the data phase with
byte enables. The register-mapped peripherals sit behind `ahb_lite_slave`.
That block gives each peripheral a simple port: `reg_re` with `reg_raddr` in
the address phase, whose combinational `reg_rdata` is captured for the data
phase, and `reg_we` with `reg_waddr`/`reg_wdata` in the data phase. No slave
inserts wait states. The master handles them.

| Address | Device |
|---|---|
| 0x0000_0000 - 0x0000_FFFF | instruction memory (vector table 0x00-0x1C, reset entry 0x20) |
| 0x0001_0000 - 0x0001_FFFF | data memory |
| 0x8000_0000 | interrupt controller |
| 0x8000_1000 | UART sender |
| 0x8000_2000 | UART receiver |
| 0x8000_3000 | timer |
| 0x8000_4000 | LED |
| 0x8000_5000 | SW |

Byte order is little-endian: byte n of a word is at address bits
[1:0] = n. The instruction memory can also be read and written as data.
Nothing on chip initialises the memories: a program must be placed in the
instruction memory before reset is released. The testbenches do this by
writing the memory array hierarchically.

## Peripherals

**UART sender** (0x8000_1000). A 256-byte ring buffer (`fifo`) feeds a
transmitter clocked by its own baud rate generator (`baud_gen`). That
generator divides 50 MHz by 2604, which gives 19200 bit/s (0.01 % fast). When
EN is set and the buffer holds data, the transmitter sends 8N1 frames,
least significant bit first. The buffer-empty interrupt is a one-clock pulse
when the buffer drains while EN is set. Registers: 0x0 DATA (write pushes a
byte; dropped if full), 0x4 STATUS (bit 0 empty, bit 1 full, bit 2
sending, bits 16:8 count), 0x8 EN.

**UART receiver** (0x8000_2000). rxd passes a two-flop synchroniser. A
falling edge restarts the baud generator, so that its mid-period pulse falls
in the middle of every bit. The start bit is confirmed at its middle. At the
middle of the stop bit the byte goes into the 256-byte buffer if the stop
bit is high and the buffer has room. Otherwise the framing or overrun flag
is set. The buffer-full interrupt pulses once when the buffer fills while
EN is set. Registers: 0x0 DATA (read returns the head byte in bits 7:0 and
removes it; bit 8 is set if the buffer was empty), 0x4 STATUS (bit 0 empty,
1 full, 2 receiving, 3 overrun, 4 framing error, 16:8 count; any write
clears bits 3 and 4), 0x8 EN.

**Timer** (0x8000_3000). While EN is set, TMCNT advances by one each clock.
The incremented value is compared with TMCMP (TMCNT <= TMCMP). When it would
pass TMCMP, the timer has expired: TMCNT goes back to 0 and the interrupt
pulses. The period is TMCMP + 1 clocks, so TMCMP = 49,999,999 gives the
one-second RTOS tick at 50 MHz. Registers: 0x0 TMCNT (r/w), 0x4 TMCMP,
0x8 EN.

**LED / SW** (0x8000_4000 / 0x8000_5000). One register each, 8 bits by
default: LED is read/write and drives `led`. SW reads the synchronised
`sw` pins.

The buffer sizes, bit rate and clock, and the EN / FIFO / baud generator /
interrupt structure of the UART follow the sun32 description. So do the
EN / TMCNT / +1 / TMCMP comparator structure of the timer. Frame format,
sampling, flags, pulse-form interrupts, register layouts and GPIO widths are
this implementation's choices.

## What the design can hold

- The FreeRTOS two-task demonstration used with sun32 occupies 46,560
  bytes: 41,872 bytes of code and 4,688 bytes of data and bss. It fits the 64 KiB instruction
  memory and the 64 KiB data memory. Its one-second tick fits the 32-bit
  TMCMP.
- Dhrystone 2.1 was also run on sun32 (7129 runs per second were reported
  for the five-step multi-cycle processor). Its binary size was not
  published, so whether it fits the memories here cannot be stated.
- No compiler for this encoding is included, so neither program can be run
  on this RTL as it stands. The testbenches use a small assembler written
  in SystemVerilog instead (`tb/sun32_asm.svh`). `tb_sun32_rtos_demo` uses
  it to run the same kind of load as the FreeRTOS demonstration: two tasks
  that print their names, preempted by the timer interrupt (see
  Simulation).

## Not included

- The `cache` module of the original system: nothing is known about its
  size, placement or policy. The memories here connect directly to the bus,
  as in the reference FPGA build that used block RAM for both.
- The 3-stage and pipelined processor variants.
- Real FPGA block-RAM primitives: `ahb_sram` is a plain array with a
  synchronous read, which synthesis tools map to block RAM.

## Simulation

Each block has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sun32_pkg.sv tb/tb_core.sv --top-module tb_core
./obj_dir/Vtb_core
```

Replace `core` with any module name. Notable testbenches:

- `tb_core` assembles programs that cover every ALU operation (register
  and immediate forms), division, every load/store width, every branch
  condition taken and not taken, call/ret, msr/mrs and one interrupt. It
  checks the results in memory, the ack/vector/eoi handshake and the 5/7
  clock instruction timing.
- `tb_sun32_soc` runs the SoC end to end with a 16-clock UART bit and
  16-entry buffers. The program sends text over the UART, takes timer,
  software, external, receive-full and transmit-empty interrupts, ignores a
  masked one, divides, and reads the switches. The testbench checks all
  results and counts each mechanism (interrupts taken, requests held back
  during service, masked requests, divider stalls).
- `tb_sun32_soc_full` runs the same program with every parameter at its
  default: 19200 bit/s and 256-byte buffers. It takes about 6.7 million
  clocks, a few seconds of simulation.
- `tb_sun32_rtos_demo` runs a two-task preemptive scheduler on the
  default SoC. The tick handler saves all 31 registers, EPC and PSR of the
  running task into a task control block, and loads those of the other
  task. It parks r1 in a word at 0x1F00 of instruction memory, reachable
  as `0x1F00(r0)` before any register is free. Each task prints its name
  inside a critical section made by writing IMR. It also keeps counters in
  the same registers the other task uses and checks them. The testbench
  checks for whole, alternating output lines, intact counters and an exact
  500,000-clock timer period. Software sets a 10 ms tick instead of the
  demonstration's one second, so six ticks take 3 million clocks.

Shared testbench code: `tb/tb_check.svh` (counters and check macro),
`tb/tb_regport.svh` (peripheral register tasks), `tb/sun32_asm.svh`
(assembler) and `tb/soc_test_body.svh` (the SoC program and checks).

## Changing it

- `sun32_soc` parameters: `CLK_HZ`, `BAUD`, `UART_DIV` (clocks per bit,
  default `CLK_HZ / BAUD`), `UART_DEPTH` (power of two), `IMEM_WORDS`,
  `DMEM_WORDS` and `GPIO_W`.
- The encoding, the address map and the reset address are in `sun32_pkg`.
  `ahb_interconnect` decodes from the package's `SLV_BASE` / `SLV_MASK`
  table, so the map is changed in one place.
- Adding a peripheral: give it the `reg_*` port of the existing
  peripherals. Then add a slave number, raise `NUM_SLAVES`, add a base and
  mask to the table, and connect it to an `ahb_lite_slave` in `sun32_soc`.
- Wait states: the master and interconnect already honour HREADYOUT, so a
  slower slave only needs to drive it.
