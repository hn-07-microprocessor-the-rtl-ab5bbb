# HN-07: an 8-bit pipelined RISC microcontroller core

HN-07 is an 8-bit Harvard microcontroller. Its program memory and data memory sit on separate
buses, so a new 14-bit instruction can be fetched every clock while the previous ones read and
write data. A five-stage pipeline keeps five instructions in flight at once, and an instruction
retires every clock. Around the core sit the usual peripherals of a small controller:
- four 8-bit I/O ports;
- three timers;
- a capture/compare/PWM unit;
- a USART;
- a watchdog on its own clock;
- an interrupt controller with eight sources.

This repository holds synthesizable SystemVerilog for the whole core and its peripherals. It also
holds a self-checking testbench for every block and one end-to-end test that runs a program on
the full chip.

The published description of HN-07 gives its features, pin list, block diagram and pipeline
stages. It gives no instruction encoding, register map or peripheral register layout. Those gaps
are filled with the conventions of the Microchip PIC16 mid-range family, which HN-07 is presented
as equivalent to. Be aware of this when reading the code: the structure follows HN-07, and the
programmer's model largely follows the PIC16C67.

## Block overview

| Block | File | What it is |
|---|---|---|
| Top | `rtl/hn07.sv` | Ties everything to one SFR (special function register) bus, and generates the resets. |
| CPU | `rtl/hn07_cpu.sv` | The 5-stage pipeline: PC, W, STATUS, FSR, PCLATH and an 8-level return stack. |
| Decoder | `rtl/hn07_decoder.sv` | Turns a 14-bit instruction into a control word (`ctrl_t`). |
| ALU | `rtl/hn07_alu.sv` | 8-bit ALU with Z, DC and C flags. |
| Data RAM | `rtl/hn07_dpram.sv` | 512 x 8, with one synchronous read port and one write port. |
| Interrupt controller | `rtl/hn07_intc.sv` | INTCON, PIR1 and PIE1; eight sources. |
| I/O port | `rtl/hn07_ioport.sv` | PORTx/TRISx pair; four instances, ports a–d. |
| Timer0 | `rtl/hn07_timer0.sv` | 8-bit timer/counter, 8-bit prescaler, OPTION register. |
| Timer1 | `rtl/hn07_timer1.sv` | 16-bit timer/counter, 3-bit prescaler. |
| Timer2 | `rtl/hn07_timer2.sv` | 8-bit timer with period register, prescaler and postscaler. |
| CCP1 | `rtl/hn07_ccp.sv` | 16-bit capture, 16-bit compare and 10-bit PWM. |
| USART | `rtl/hn07_usart.sv` | Three modes: asynchronous (full duplex), synchronous master and synchronous slave. |
| Watchdog | `rtl/hn07_wdt.sv` | 8-bit counter with a 7-bit prescaler on the `clkwdt` clock. |
| Package | `rtl/hn07_pkg.sv` | Widths, SFR addresses, the ALU operation enum and the control-word struct. |

Program memory is not part of the core. The core drives `prgaddr[15:0]` and expects the 14-bit
word on `prgdata` in the same cycle, so the memory must be combinational or a fast asynchronous
ROM. The 16-bit address reaches 64K words; the reference configuration is 32K words.

The bidirectional port pins are brought out as three signals per port:
- `port_in[i]` is the pin level;
- `port_out[i]` is the output latch;
- `port_oe[i]` is the output enable.

Ports a–d are indices 0–3. A pad ring joins the three into one bidirectional pin.

## The pipeline

The five stages each take one clock.

| Stage | Work done |
|---|---|
| IF, instruction fetch | `prgaddr` = PC. The word on `prgdata` is registered into AD. |
| AD, address decode | Forms the 10-bit data address from the STATUS bank bits and the instruction's 7-bit field. GOTO, CALL, RETURN, RETLW and RETFIE act here. Interrupts are taken here. |
| RD, ALU decode and RAM/REG read | The decoder produces the control word. The address goes to the RAM read port (synchronous read) and onto the SFR read bus. |
| EX, ALU | Computes the result and flags. Skip conditions are decided here. |
| WB, write back | Writes to RAM or SFR, W and STATUS. Writes to PCL and SLEEP take effect here. |

### Cost of control flow

| Event | Cost |
|---|---|
| Straight-line code | 1 clock per instruction |
| GOTO, CALL, RETURN, RETLW, RETFIE | 2 clocks (the one instruction fetched behind it is dropped) |
| Taken skip (DECFSZ, INCFSZ, BTFSC, BTFSS) | 2 clocks (the skipped instruction becomes a bubble) |
| Write to PCL (computed jump) | 5 clocks (redirect from WB; three younger instructions are dropped) |
| SLEEP | Fetching stops until an interrupt flag wakes the core |
| Interrupt entry | Like a CALL to 0x0004 |

The testbench measures the first two rows: 1 instruction per clock, and 2 clocks for GOTO.

### Hazards and how each is resolved

This is the part of the design most likely to surprise someone writing code for it.

1. **Data dependences through registers: bypassed, no stall.** The operand read in RD can be
   older than a write still in flight. EX replaces it with the result of the instruction in WB
   when the addresses match (`fwd_wb`). It also covers the instruction that retired one cycle
   earlier (`fwd_lr`), because that write landed in the RAM in the same cycle the read was
   made, and the RAM returns the old data on a collision. W and STATUS are forwarded from WB
   the same way. Back-to-back dependent instructions therefore run at full speed.

2. **A jump behind a skip: the jump waits.** A GOTO or CALL in AD must not act if an older skip
   in RD may annul it. It is held in AD (`stall_ad`) for one clock until the skip resolves in EX.
   It is also held while a PCL write or SLEEP is anywhere ahead, because those redirect later and
   would otherwise be overtaken.

3. **RETFIE behind an SFR write: RETFIE waits.** RETFIE sets GIE as it leaves AD. An older write
   to INTCON still in flight, such as a `BCF INTCON,x` at the end of a handler, would store a
   stale GIE on top of it. RETFIE is therefore held until no SFR write is ahead of it.

4. **Interrupt entry waits for a clean pipeline ahead.** An interrupt is not taken while an
   older skip, PCL write, SLEEP or SFR write is in flight. This way, a flag the handler just
   cleared, or GIE cleared by software, is seen before the next decision. The instruction in
   AD is replaced by the call, and its address is pushed as the return address.

5. **Address-forming registers: software rule, not interlocked.** AD reads the bank bits
   STATUS[7:5], FSR and PCLATH straight from the registers, and those are written in WB. A
   program that changes one of them must place three other instructions before the first
   instruction whose address or jump target depends on the new value. Nothing in hardware
   checks this. It follows the HN-07 approach of leaving instruction ordering to its compiler.

A taken skip kills the next valid instruction: the one in RD if RD holds one, otherwise the one
in AD. The killed instruction becomes a bubble and changes nothing.

## Data address map

Direct accesses use `{STATUS[7:5], f[6:0]}`, which is 10 bits and 8 banks of 128. Indirect
accesses through INDF (f = 0) use `{STATUS[7:6], FSR}`.

Within each bank:

| Offset | Contents |
|---|---|
| 0x00–0x3F | Special function registers (only banks 0 and 1 hold any) |
| 0x40–0x7F | General-purpose RAM, 64 bytes per bank |

Eight banks of 64 bytes give exactly the 512 bytes of the data RAM. The RAM index is
`{addr[9:7], addr[5:0]}`.

INDF, PCL, STATUS, FSR, PCLATH and INTCON appear at the same offset in every bank.

| Address | Register | Address | Register |
|---|---|---|---|
| 0x00 | INDF | 0x81 | OPTION |
| 0x01 | TMR0 | 0x85–0x88 | TRISA–TRISD |
| 0x02 | PCL | 0x8C | PIE1 |
| 0x03 | STATUS | 0x92 | PR2 |
| 0x04 | FSR | 0x97 | WDTCON |
| 0x05–0x08 | PORTA–PORTD | 0x98 | TXSTA |
| 0x0A | PCLATH | 0x99 | SPBRG |
| 0x0B | INTCON | | |
| 0x0C | PIR1 | | |
| 0x0E, 0x0F | TMR1L, TMR1H | | |
| 0x10 | T1CON | | |
| 0x11 | TMR2 | | |
| 0x12 | T2CON | | |
| 0x15, 0x16 | CCPR1L, CCPR1H | | |
| 0x17 | CCP1CON | | |
| 0x18 | RCSTA | | |
| 0x19 | TXREG | | |
| 0x1A | RCREG | | |

Bit layouts follow the PIC16C67 wherever that part has the same register. WDTCON is the
exception: bits 2:0 select the watchdog prescale, and the register resets to 7.

PCL reads as the address of the next instruction. Jumps use `{PCLATH[7:3], k[10:0]}`, and
computed jumps use `{PCLATH, W-result}`. Both give 16-bit program addresses.

### SFR bus

- Every peripheral decodes its own addresses and drives 0 elsewhere. The top ORs the read data
  of all of them.
- Reads are combinational from the RD-stage address.
- Writes happen in WB.
- A separate strobe, `sfr_re`, marks a read as it retires. The USART pops RCREG on that strobe,
  so an instruction annulled by a skip does not lose a received byte.

## Instruction set

The 35 instructions of the PIC16 mid-range family, with their 14-bit encodings, are listed below.
The encodings are in `rtl/hn07_decoder.sv`; `tb/hn07_asm_pkg.sv` has an encoder function for each.

| Group | Instructions |
|---|---|
| Byte-oriented | ADDWF, ANDWF, CLRF, CLRW, COMF, DECF, DECFSZ, INCF, INCFSZ, IORWF, MOVF, MOVWF, NOP, RLF, RRF, SUBWF, SWAPF, XORWF |
| Bit-oriented | BCF, BSF, BTFSC, BTFSS |
| Literal and control | ADDLW, ANDLW, CALL, CLRWDT, GOTO, IORLW, MOVLW, RETFIE, RETLW, RETURN, SLEEP, SUBLW, XORLW |

HN-07 is specified with 37 instructions, so two of its instructions are not known and not
implemented. Undefined codes execute as NOP.

## Peripherals

**Interrupt controller.** There are eight flags:

| Flag | Register | Kind |
|---|---|---|
| INTF | INTCON | Sticky |
| RBIF | INTCON | Sticky |
| T0IF | INTCON | Sticky |
| TMR1IF | PIR1 | Sticky |
| TMR2IF | PIR1 | Sticky |
| CCP1IF | PIR1 | Sticky |
| RCIF | PIR1 | Level, follows "receive buffer full" |
| TXIF | PIR1 | Level, follows "transmit buffer empty" |

- `extint` passes a two-flop synchroniser, and OPTION.INTEDG selects its edge.
- The port-change interrupt watches port b pins 7:4 for any change, whatever their direction.
- `irq` is GIE and any enabled pending flag.
- `wake` ignores GIE, so an enabled flag ends SLEEP even with interrupts off.

**Timer0.** An 8-bit counter.
- It counts the system clock, or the edges of `t0cki` chosen by T0SE. `t0cki` passes a
  synchroniser first.
- An 8-bit prescaler divides by 2^(PS+1), or is bypassed by PSA.
- Writing TMR0 clears the prescaler.

**Timer1.** A 16-bit counter.
- It counts the clock or `t1cki`, through a 1:1/2/4/8 prescaler.
- Writing TMR1L, TMR1H or T1CON clears the prescaler.
- CCP1 can clear it (compare mode 1011).

**Timer2.** An 8-bit counter.
- The prescaler divides by 1, 4 or 16.
- The counter restarts after reaching PR2.
- A 1:1..1:16 postscaler drives the interrupt.
- The match pulse starts each PWM period.

**CCP1.**
- Capture of Timer1 on `ccp1i`: every falling edge, every rising edge, or every 4th or 16th
  rising edge.
- Compare against Timer1: set output, clear output, interrupt only, or special event (which
  clears Timer1).
- PWM with a 10-bit duty cycle `{CCPR1L, CCP1CON[5:4]}`. The duty is latched at the start of
  each period. The output is high while `{TMR2, two prescaler bits} < duty`.
- At Timer2 prescale 1:1 the two low bits are 0, so resolution drops to 8 bits.

**USART.** A baud generator gives one tick every SPBRG+1 clocks.
- Asynchronous mode: 8N1 frames, 16 ticks per bit, and the receiver samples at the middle of the
  bit. A bad stop bit sets FERR. The receiver then waits for the line to go idle before it looks
  for a new start bit. A byte arriving while the buffer is full sets OERR.
- Synchronous master: drives `txcko` with a half period of one tick.
- Synchronous slave: takes its clock from `rxcki`.
- In both synchronous modes, data leaves on `txdto` after a falling edge and is sampled from
  `rxdli` on the rising edge. Transmit and receive share the bus one at a time. SREN starts a
  single master receive and clears itself.

**Watchdog.** An 8-bit counter behind a 7-bit prescaler, both on `clkwdt`.
- WDTCON.PS selects the time-out, 256·2^PS `clkwdt` periods.
- The watchdog runs while the `wdte` pin is high.
- CLRWDT and SLEEP clear it. The clear request crosses into the `clkwdt` domain as a toggle
  through two flops, and the time-out comes back the same way.
- A time-out resets the whole core except the watchdog.

**Reset.** `por` and `mclr` assert reset asynchronously. Release is synchronised with two flops.
The watchdog time-out enters the same synchroniser synchronously, and lint tools report this
mixed use of one net.

## Where this design departs from, or adds to, the reference description

- **Instruction set:** PIC16 encoding, 35 of 37 instructions (see above).
- **Register map and peripheral bit layouts:** PIC16C67, with the extensions above. This includes
  WDTCON, the 10-bit banked address and the placement of all 512 RAM bytes.
- **Branch cost:** the reference gives 2 cycles for branches. Here that holds for GOTO, CALL,
  the returns and taken skips. A computed jump through PCL costs 5.
- **Hazards:** the reference leaves hazard handling to its compiler. The bypasses and AD-stage
  holds above are this design's own. So is the three-instruction rule after changing the bank
  bits, FSR or PCLATH.
- **SFR write-then-read bypass:** a read right after a write to the same SFR returns the written
  value. For registers that hardware also changes, such as a running timer, this can differ by
  one count from what the register holds.
- **STATUS reset:** TO and PD reset to 1. SLEEP clears PD, and CLRWDT sets both. A watchdog
  reset resets STATUS too, so TO cannot tell software that the watchdog expired, unlike on the
  PIC.
- **No 9-bit USART mode and no SSP/PSP.**
- **Clock speed:** the reference quotes 100 MHz for its own silicon. No timing analysis has been
  done for this RTL.

## Simulating

Each testbench in `tb/` is self-checking and prints
`TB_RESULT checks=<n> failures=<n>` at the end. Each one also has a watchdog that ends a hung run
with a failure.

With Verilator 5:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hn07_pkg.sv tb/hn07_asm_pkg.sv tb/tb_hn07.sv --top-module tb_hn07 -o sim
./obj_dir/sim
```

Replace `tb_hn07` with any of the other testbenches. `--timescale` is needed because the
packages carry no timescale of their own. `-Wno-fatal` keeps width warnings from stopping the
build; all of these warnings come from the testbenches. The end-to-end run takes 7478 clocks and
retires 3927 instructions.

| Testbench | What it covers |
|---|---|
| `tb_hn07` | Full chip at default parameters, about 7500 clocks (see below). |
| `tb_hn07_cpu` | CPU with RAM and a small SFR model. Covers throughput, GOTO timing, every instruction group, bypasses, skips, banked and indirect addressing, interrupts, SLEEP/wake. |
| `tb_hn07_alu` | Random operands for each operation against a reference model. |
| `tb_hn07_decoder` | Every instruction class. |
| `tb_hn07_dpram` | Random reads and writes, and read-during-write. |
| `tb_hn07_intc` | Each source, the enables, GIE and the INT edge. |
| `tb_hn07_ioport` | Direction and data, random patterns. |
| `tb_hn07_timer0`, `tb_hn07_timer1`, `tb_hn07_timer2` | Rates, prescalers, overflow/match timing. |
| `tb_hn07_ccp` | Capture, compare and PWM duty. |
| `tb_hn07_usart` | Asynchronous loopback, framing and overrun errors, synchronous master and slave. |
| `tb_hn07_wdt` | Time-out period, clear, enable. |

**What `tb_hn07` does.** It runs a hand-assembled program from a behavioural program memory. The
USART output is looped back to its input. The program uses every peripheral:
- it writes the ports;
- it runs Timer0, Timer1 and Timer2 and takes the Timer0 interrupts;
- it generates a PWM, which the testbench measures at 640 high clocks out of 2560;
- it sends a byte and takes the receive interrupt;
- it runs a DECFSZ loop and a RETLW table read through a computed jump;
- it sleeps and is woken by `extint`;
- in a second phase, it captures Timer1 on a `ccp1i` edge;
- it runs a compare whose special event clears Timer1;
- it waits for the port b change flag;
- it switches the USART to synchronous master and sends a byte, which the testbench samples
  on `txcko`.

The testbench checks the results of each step on the ports and in the data RAM.

After that it lets the watchdog expire, and the test checks that the core restarts. At the end,
the testbench prints how often each mechanism occurred:
- both bypass paths, the AD stall, taken skips, jumps and PCL redirects;
- interrupts, sleep and wake-up;
- the Timer0, Timer1 and Timer2 events;
- USART transmit and receive, the switch to synchronous mode, and PWM high time;
- capture, compare and the compare special event;
- the port b change flag;
- the watchdog reset. A mechanism that never occurred counts as a failure.

The testbench programs are written with the encoder functions in `tb/hn07_asm_pkg.sv`, for
example `ADDWF(8'h40, F)` and `GOTO(12'h010)`. This is the quickest way to write new tests.
