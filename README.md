# OctaLynx — an 8-bit RISC microcontroller with off-chip memories

OctaLynx is a small 8-bit RISC microcontroller with a 16-bit address space,
32 general purpose registers and a set of classic peripherals (three GPIO
ports, SPI, USART, three timers, two external interrupts). It has no memory on
the chip. Program memory (64k words of 16 bits) and data RAM (64k bytes) sit
outside, and both are reached through one multiplexed set of pins. Those pins
are a 16-bit address bus, a 16-bit bidirectional bus and four control lines.

Inside the chip every unit hangs off one simple **internal main bus**: 8-bit
data, a 6-bit register address, and read and write strobes. That bus is also
brought out through the memory pins, so devices outside the chip can be added
as extra control registers.

The chip can program its own external program memory. Holding the reset line
low stops the core and turns the SPI unit into a slave that a PC drives. A
**clock multiplexer** chooses between an external clock, an on-chip
generator, or a clock from a dynamic power management (DPM) system. The DPM
system can also stop the clock outright.

This repository holds synthesizable SystemVerilog for all of the digital
logic, plus self-checking testbenches for every module.

## Block structure

```
octalynx (top)
├── cmux                  clock source selection and stop, glitch-free
├── core
│   ├── instruction_decoder   16-bit word -> decoded record (fetch stage)
│   ├── program_counter
│   ├── gpru                  32 x 8 registers, X/Y/Z pointer pairs
│   ├── alu                   alu_arith / alu_logic / alu_bit, operand-isolated
│   ├── sreg                  status register (C Z N V ... I)
│   ├── sp_counter            16-bit stack pointer
│   └── interrupt_controller  priority, vector, acknowledge on return
├── memory_driver         pin multiplexer: fetch / RAM / led-out bus / programmer
├── programmer            SPI command frames -> program memory read/write/erase
├── peripheral_unit
│   ├── gpio_port x3      ports A, B, C
│   ├── spi
│   ├── timer_unit        timer_prescaler + timer_counter x3 (16, 8, 8 bit)
│   ├── usart
│   └── ext_interrupt
└── main_bus              read-data return path (one in the top, one in the peripherals)
```

Shared types and constants are in `octalynx_pkg.sv`: the bus struct, the
register map, vector numbers and ALU operations. The decoded-instruction
record is in `octalynx_isa_pkg.sv`.

## The core and its pipeline

The core has two stages.

1. **Fetch/decode stage.** Each cycle, the word at PC is read from program
   memory and decoded by `instruction_decoder`. The decoded record is
   registered.
2. **Execute stage.** The registered record is carried out.

This means one instruction executes while the next one is decoded. The
decoder is about as slow as the ALU, which is why the two are kept in
separate stages.

Because the memory pins are shared, a cycle that touches RAM, the stack or the
led-out bus cannot also fetch. Such instructions therefore cost a cycle. A
small state machine in `core.sv` steps through the sequences that take more
than one cycle.

| Instruction class | Cycles |
|---|---|
| ALU register/immediate ops, MUL, ADW/SBW, IN/OUT to on-chip registers, SEI/CLI, branch not taken | 1 |
| RJMP, IJMP, taken branch (the word fetched behind it is discarded) | 2 |
| LD, ST, PUSH, POP, IN/OUT to the led-out range 0x22–0x3C | 2 |
| RCALL (two pushes), RET and RETI (two pops) | 3 |
| Interrupt entry (two pushes, then a jump to the vector word) | 3 |

Addresses of RJMP, RCALL and branches are relative: target = address of
the next word + offset.

The stack grows downward from 0xFFFF. The byte is written at SP, then SP is
decremented. A call pushes the return address low byte first.

An interrupt is taken instead of executing the instruction in the execute
stage. That instruction's address is pushed, so it runs after RETI.

The ALU has three independent units: arithmetic, logic and bit. Each unit's
operands are forced to zero unless the unit is selected. The unselected units
therefore do not toggle, which saves power.

The arithmetic unit also does 16-bit pointer arithmetic through the GPRU's
16-bit buses. This covers ADW/SBW and the post-increment of LD/ST.
MUL is unsigned 8x8 and writes its 16-bit result to R1:R0.

Flags are AVR-like:

- Add and subtract update V, N, Z and C.
- INC and DEC leave C alone.
- Logic operations update N and Z, clear V and leave C alone. SER and MOV
  change no flags.
- Shifts take C from the bit shifted out.
- SWAP, MIR and the bit set/clear operations change no flags.

## Instruction set

The encoding belongs to this design. Here `d`/`r` are register numbers, `K`
immediate bits, `k` offset bits and `A` a control-register address. `p`
selects a pointer pair: 01 is X = R27:R26, 10 is Y = R29:R28, 11 is
Z = R31:R30, and 00 is R25:R24 (ADW/SBW only).

| Word | Instruction |
|---|---|
| `0x0000` / `0x0001` / `0x0002` | NOP / RET / RETI |
| `0x0003` / `0x0004` / `0x0005` | SEI / CLI / IJMP (to Z) |
| `oooo oord dddd rrrr` | ADD 01, ADC 02, SUB 03, SBC 04, AND 05, OR 06, XOR 07, MOV 10, CP 11, MUL 12 (octal `oooooo`) |
| `0100 010d dddd oooo` | NOT CLR SER LSL LSR ROL ROR ASR SWAP MIR INC DEC PUSH POP (o = 0..D) |
| `0100 011d dddd sbbb` | clear (s=0) / set (s=1) bit b of Rd |
| `0100 100d dddd 0ipp` | LD Rd,(p) — i = post-increment |
| `0100 101r rrrr 0ipp` | ST (p),Rr |
| `0100 110x KKpp KKKK` | ADW (x=0) / SBW (x=1) pair, 6-bit K |
| `cccc KKKK dddd KKKK` | LDI 5, SUBI 6, ANDI 7, ORI 8, CPI 9, ADDI A on R16–R31 |
| `1011 0AAd dddd AAAA` | IN Rd,A |
| `1011 1AAr rrrr AAAA` | OUT A,Rr |
| `1100 k…k` / `1101 k…k` | RJMP / RCALL, 12-bit offset |
| `1111 0ccc kkkk kkkk` | branch if EQ NE CS CC MI PL VS VC (c = 0..7) |

Every other word is a NOP. `tb/olx_asm_pkg.sv` has one function per
instruction, so a testbench can write its program as `e(LDI(16, 8'h5A));`.

## Memory pins

`memory_driver` is combinational. In every cycle it carries out exactly one
access. The control lines are `{RAM select, PM select, WR, RD}`, all active
high.

| Cycle | Address bus | Control | Data bus |
|---|---|---|---|
| program fetch | PC | RD + PM | 16-bit input |
| RAM read | pointer or SP | RD + RAM | bits 7:0 input |
| RAM write | pointer or SP | WR + RAM | bits 7:0 output |
| led-out main bus | 0 | RD or WR alone | `{wr, rd, addr[5:0], data[7:0]}`; the low byte is an input on a read |
| programmer | word address | RD/WR + PM | 16-bit word |

The memories are expected to answer within the same cycle, as an
asynchronous SRAM does. The bidirectional bus is given as `data_o`,
`data_oe_o` (one enable per bit) and `data_i`; the pad cell joins them.

## Control-register space (main bus, 6-bit)

| Address | Registers |
|---|---|
| 0x00–0x08 | PINA DDRA PORTA, PINB DDRB PORTB, PINC DDRC PORTC |
| 0x09–0x0B | SPCR SPSR SPDR |
| 0x0C–0x0F | UCSRA UCSRB UBRR UDR |
| 0x10–0x18 | TCCR0, TCNT0 L/H, OCR0A L/H, OCR0B L/H, ICR0 L/H |
| 0x19–0x1E | TCCR1 TCNT1 OCR1, TCCR2 TCNT2 OCR2 |
| 0x1F–0x21 | TIMSK TIFR EICR |
| 0x22–0x3C | not decoded inside the chip: led-out bus (external devices) |
| 0x3D–0x3F | SPH SPL SREG |

Each peripheral's source file lists the bit fields at its top.

After reset, all peripherals are disabled:

- Timers are stopped.
- SPI and USART are off.
- The GPIO pins are inputs.

Fixed pin uses:

- PA0/PA1: external interrupts INT0/INT1.
- PA2: external count input of the timers.
- PA3: T/C0 capture input.
- PB0–PB2: PWM outputs of T/C0–T/C2 while a timer is in PWM mode.
- PC0: USART clock XCK (an output in synchronous master mode).

## Interrupts

| Vector (word) | Source |
|---|---|
| 0x00 | RESET |
| 0x01, 0x02 | external interrupt 0, 1 |
| 0x03–0x06 | T/C0 capture, compare A, compare B, overflow |
| 0x07, 0x08 | T/C1 compare, overflow |
| 0x09, 0x0A | T/C2 compare, overflow |
| 0x0B | SPI transfer complete |
| 0x0C–0x0E | USART receive complete, buffer empty, transmit complete |
| 0x0F–0x1F | external devices: top-level inputs `xirq_i[0..16]`, acknowledges `xack_o` |

Each vector word normally holds an RJMP to its handler. The handshake goes
like this:

1. A unit raises its request and holds it.
2. If I is set, the interrupt controller offers the lowest-numbered pending
   vector to the core.
3. The core takes it: it pushes the return address, clears I and jumps to the
   vector.
4. While this interrupt is in service, no other one is offered, so there is
   no nesting.
5. When the handler's RETI executes, I is set again. The controller then
   sends a one-cycle acknowledge to the unit that asked.
6. The unit clears its flag, which drops the request.

External devices use the same handshake through `xirq_i`/`xack_o`: a
request is held until its one-cycle acknowledge.

A flag can also be cleared by software, by writing 1 to it. UDRE is the
exception: it drops only when UDR is written.

## Programming mode

Power-on reset (`por_ni`) resets everything. The ordinary reset line
(`rst_ni`) holds the core and the peripherals in reset. While it is low, the
chip is in programming mode:

- The SPI unit becomes a slave whatever its registers say. Its shifter runs
  on power-on reset only.
- The programmer owns the memory pins.

A PC, acting as SPI master (mode 0, SCK no faster than clk/8), sends frames
of five bytes. The chip's answer to byte *n* comes out during byte *n+1*:

| Byte | PC → chip | chip → PC |
|---|---|---|
| 0 | command | 0 |
| 1 | address high | command (echo) |
| 2 | address low | address high (echo) |
| 3 | data high | result high |
| 4 | data low | result low |

| Command | Effect |
|---|---|
| `0x20` | read the program word at the address (the result is the word) |
| `0x40` | write `{data high, data low}` to the address |
| `0x80` | erase: write 0xFFFF to every word, one per clock (65536 cycles) |
| `0x30` | signature byte 0, 1 or 2 (address low) → `0x4F 0x4C 0x58` |
| `0xF0` | status: result bit 0 = erase still running |

Raising the reset line ends programming mode, and the core starts at word 0.

## Clocking

`cmux` selects the processor clock with `clk_sel_i`:

- 0: external pin
- 1: internal generator
- 2: DPM system
- 3: none

`clk_stop_i` gates the clock off. The DPM system uses it to hold the
processor stopped, for example until the chip has cooled. No state is lost.

Each source has an enable flip-flop pair that is clocked by that source. The
pair is the rising-edge flop and then the falling-edge flop. A source is
enabled only after every other source's enable has dropped. The output is the
OR of each clock ANDed with its enable.

An enable changes only while its clock is low, so the output never carries a
shortened pulse. A switch takes about two cycles of the old clock and two of
the new one. All logic runs from this one clock. The generator and the DPM
circuit themselves are outside this RTL and enter as ports.

## Departures and limits

- **Own choices, not from the original description.** The instruction set
  encoding and the cycle counts are this design's. So are all register
  addresses except SREG at the top of the space, all bit fields, the
  memory-pin cycle formats, the programmer's frame format, command codes and
  signature, the interrupt priority rule, the pin assignments other than the
  timers' count input on A2, and the PWM definition (high while count <
  compare, period 2^width).
- **Interrupt count.** The interrupt table has 14 sources after RESET. That
  table is what is implemented.
- **USART.** Both modes are built with the same 8N1 frame (8 data bits, no
  parity, 1 stop bit). Asynchronous bit time = 16·(UBRR+1) clocks. In
  synchronous mode the clock is XCK on PC0: driven by the chip as master
  (period 2·(UBRR+1), UBRR ≥ 2) or followed as slave (at most clk/8). TXD
  changes after a falling XCK edge and RXD is sampled on a rising one.
- **Not in the RTL:**
  - the external memories (there is a behavioural model for the testbenches,
    `tb/ext_memory_model.sv`)
  - the internal clock generator
  - the DPM system and its temperature sensors
  - the pad ring: pins are split into out/enable/in
- **Main bus.** The read data comes back through a multiplexer, not a
  tri-state bus. An assertion checks that at most one unit claims a read.

## Simulation

Every module in `rtl/` has a testbench `tb/tb_<module>.sv`. Each testbench:

- compares the module against values worked out independently;
- checks cycle counts where timing is specified;
- has a watchdog;
- ends by printing `TB_RESULT checks=N failures=M`.

A testbench can be run with plain Verilator, from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl rtl/octalynx_pkg.sv rtl/octalynx_isa_pkg.sv \
  tb/tb_octalynx.sv --top-module tb_octalynx -Mdir obj
obj/Vtb_octalynx
```

`tb_octalynx` is the end-to-end test, and it runs the top at its default
sizes. The bench does the following:

1. It reads the signature and erases the full 64k-word program memory. This
   is checked to take exactly 65536 word writes.
2. It writes a test program over SPI and reads two words back.
3. It releases reset.

The program then drives a GPIO port, multiplies, stores and loads through X
with post-increment, calls a subroutine, and uses the led-out bus. It also
takes a timer-overflow interrupt through RETI and its acknowledge, starts PWM,
sends one USART byte asynchronously and one in synchronous master mode, and loops an SPI master transfer back. Meanwhile the bench
switches the clock to the internal and then the DPM source, stops it, and
switches back.

Finally, two external devices request vectors 15 and 31 at once; both
handlers must run, lowest vector first. Each of 21 mechanisms is counted, and one that never happens is a failure.
The PWM period and duty, the USART bit time, the XCK period and the clock periods are checked
in cycles. The run takes a few seconds.

`tb_octalynx_programs` is the instruction and interrupt test, also at default
sizes. Its program is placed directly in the memory model. First it runs
every ALU, immediate and bit instruction on chosen operands and carries, and
stores the result and SREG of each. The bench checks these against its own
reference functions, and checks that each case takes 10 cycles. Next come the
branches, one per condition, and then the remaining instructions, each checked
by its effect. Finally it enables all 14 on-chip interrupt sources:

- edges on PA0, PA1 and PA3;
- the three timers running;
- an SPI transfer;
- one USART byte looped from TXD to RXD.

Every vector from 1 to 14 must be served by its handler, and the stack must
end balanced.

The other testbenches are smaller:

- `tb_core` runs a hand-assembled program and checks a timed block against
  the cycle table.
- `tb_alu` and `tb_timer_counter` compare against reference models over
  thousands of random or cycle-by-cycle cases.
- `tb_cmux` switches between the three clocks at random moments. It checks
  that no pulse is shorter than the fastest source's half period.

To change the design, edit the module, then rerun its testbench and
`tb_octalynx`. If you change an encoding, update `tb/olx_asm_pkg.sv` to
match.
