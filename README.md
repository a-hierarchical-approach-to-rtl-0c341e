# Serial-mouse embedded system: microcontroller core, firmware and executable specifications

This design is a small embedded system: a serial mouse. The mouse's behaviour is described twice.

- **As firmware** running on an 8-bit microcontroller core in the style of the PIC16C71.
- **As hardware state machines** that follow the flowcharts of the same software routines step by step.

The two descriptions sit side by side on the same encoder pins. The state machines act as an executable specification of the firmware. A program that disagrees with them is wrong, and a known error in the mouse firmware shows up exactly that way.

The approach is hierarchical:

1. The core is checked against its instruction set.
2. Each software routine is checked against its own flowchart machine, innermost routine first (Bit, then Byte, then Main).
3. The routines are then composed.

A tiny example shows the same idea in isolation: a three-state flowchart against a five-instruction program.

Everything is synthesizable SystemVerilog-2017 except the testbenches.

## Hierarchy

```
embedded_system_top
├── pic16c71                  microcontroller core
│   ├── pic_prog_mem          program memory (EPROM), 1024 x 14 bit
│   ├── pic_decoder           instruction decode (35 instructions)
│   ├── pic_pc_stack          13-bit PC and 8-level return stack
│   ├── pic_file_regs         36 general purpose registers
│   └── pic_alu               8-bit ALU with C, DC, Z
├── mouse_bit_spec            Bit routine as a machine (fed from the core's pins)
├── mouse_controller_spec     the whole mouse software as machines
│   ├── mouse_main_spec       Main routine  (13 states)
│   ├── mouse_byte_spec       Byte routine  (11 states)
│   └── mouse_bit_spec        Bit routine   (17 states)
├── example_spec              example flowchart machine (3 states)
└── example_impl              example program machine (5 instructions)
```

Shared types and constants live in `rtl/pic_pkg.sv`:

- the widths;
- the ALU operation and program-flow enums;
- the decoded-control struct;
- the special-register addresses and STATUS bit numbers.

## The microcontroller core (`pic16c71`)

It is a Harvard machine with these main features:

- **Instructions.** 14-bit words, fetched from their own memory. There are 35 instructions in four formats:

  | Format | Fields |
  |---|---|
  | byte-oriented | `f` 7-bit register, `d` destination |
  | bit-oriented | `f`, `b` bit number |
  | literal | `k` 8-bit |
  | control | `k` 11-bit address |

- **Data.** 8-bit data and a single working register W. When `d = 0` a byte-oriented result goes to W; when `d = 1` it goes back to the register.
- **Flow.** A 13-bit program counter and an 8-level hardware return stack.

### One instruction = eight Q cycles

The core is not pipelined. Each instruction cycle is eight clocks, Q1 to Q8:

| Q | event |
|---|---|
| Q1 | PC copied to the fetch address and incremented; `ready` is high |
| Q5 | the program word is latched into the instruction register |
| Q6 | the file-register operand is read (operand read) |
| Q8 | the result is written to W or the register; flags updated; PC changed by GOTO/CALL/returns/skips/PCL writes |

Program-flow changes take two instruction cycles:

- GOTO, CALL, RETURN, RETLW, RETFIE;
- a skip that is taken;
- any write to PCL.

These are followed by a *dummy* cycle, which fetches nothing and executes a NOP. So a routine's run time in clocks is 8 × (instructions + two-cycle instructions). The testbenches check exactly this figure.

`ready` marks Q1 of every cycle that starts a real instruction. At that moment the programmer-visible state is complete: PC, W, STATUS, FSR and the 36 registers. This is the point where the core is compared with an instruction-level model.

### Data memory map

This map is the PIC16C71's. The architecture this design follows gives only the number of registers, not their addresses.

| address (bank 0) | register |
|---|---|
| 0x00 | INDF: indirect access through FSR |
| 0x02 | PCL: low byte of PC; writing it jumps to `{PCLATH, value}` |
| 0x03 | STATUS: C(0) DC(1) Z(2) PD(3) TO(4) RP0(5) IRP(7) |
| 0x04 | FSR |
| 0x05 / 0x06 | PORTA / PORTB (bank 1: TRISA / TRISB) |
| 0x0A | PCLATH |
| 0x0C–0x2F | 36 general purpose registers, mirrored in bank 1 |

Other addresses read as 0 and ignore writes. RP0 selects the bank for direct addressing. Indirect addressing uses the full FSR plus IRP.

On reset:

- STATUS = 0x18;
- both TRIS registers = 0xFF (all pins inputs);
- the stack and the general purpose registers are not cleared.

The ports have `*_in` pins, `*_out` latches and `*_oe` enables (TRIS bit 0 = output).

### What the core leaves out

- **Not modelled:** the PIC16C71's timer, A/D converter, interrupts and watchdog.
- **CLRWDT** executes as a NOP.
- **SLEEP** clears PD and stops the core until reset.
- **RETFIE** pops the stack like RETURN. It is recognised both as 0x0009 and as 0x0069.
- **Unknown instruction words** execute as NOP.
- **Stack overflow.** The stack is circular, as on the real part: a ninth nested CALL overwrites the oldest return address. The `stack_ovf` output pulses when that happens.

## The mouse software as state machines

The mouse firmware has three routines:

- **Main** decides whether a report is due.
- **Byte** sends a byte on the serial "Received Data" line RD.
- **Bit** scans the two quadrature encoders and then waits one bit time.

Main calls Byte five times per loop. Byte calls Bit once per serial bit. Each routine's flowchart is built as its own state machine, one state per clock. Calls are a one-clock `start` pulse and a one-clock `done` pulse. The software's call hierarchy therefore becomes a chain of handshakes: Main → Byte → Bit.

### Bit (`mouse_bit_spec`, 17 states)

Each axis has a clock pin (XC / YC) and a data pin (XD / YD). The stored level of each clock pin (the CSTAT bits) is compared with the present level on every call.

An edge does three things:

1. It increments XCount / YCount.
2. It clears the direction flag.
3. It stores the new level.

The flag (RightFlag / UpFlag) is then set when either condition holds:

- the data pin is 0 on a rising edge;
- the data pin is 1 on a falling edge.

So a count is a number of steps, and the flag is the direction of the last step. After state S17 the machine waits `DELAY_CYCLES` clocks before `done`. At the default 833 clocks and a 1 MHz clock this is the 0.833 ms bit time of a 1200 baud line.

Pins in the top:

- XClock = RA2 and XData = RA3, as in the firmware;
- YClock = RA0 and YData = RA1 (this design's choice).

`clear`, `negx` and `negy` act only between calls. Main uses them to clear and negate the counts.

The module asserts the two RightFlag properties of the routine at the XData test that follows a rising XClock edge:

- with XData = 1, RightFlag is clear and stays clear;
- with XData = 0, RightFlag is set one state later.

The second is the property that the faulty firmware (below) breaks.

### Byte (`mouse_byte_spec`, 11 states)

When the Trigger flag is set, Byte sends:

1. a start bit (0);
2. eight data bits, least significant first.

Each bit is held on RD for one Bit call. When the flag is clear, RD is driven high and nothing is sent, but Bit is still called nine times. The encoders are therefore scanned at the same rate whether or not a report goes out.

Clock count from `start` to `done`:

- 62 + the time spent in the nine Bit calls, with the flag set;
- 37 + that time, with the flag clear.

There is **no stop bit**, because the routine's flowchart has none. RD keeps the last data bit until the next start bit. A receiver that requires a stop bit will not accept these frames.

### Main (`mouse_main_spec`, 13 states)

Main loops forever:

1. It sets the Trigger flag when any of these hold:
   - the buttons changed;
   - XCount ≠ 0;
   - YCount ≠ 0.
2. It negates a count whose direction flag is set (so right and up are sent as negative numbers).
3. It sends five bytes through Byte:
   - a button byte;
   - X, X;
   - Y, Y.
4. It clears the flag.

One loop lasts 45 bit times.

Choices made here where the flowchart says nothing, or says something unusable:

- **Button byte.** It is `1000_0bbb`: bit 7 is a frame marker, and the three button pins (RB0–RB2 in the top) follow.
- **Counts.** They are copied and cleared as a report starts. Motion during a report is therefore counted for the next one.
- **Trigger flag at the end of a loop.** It is *cleared*. The original flowchart's last box sets it, which would make every loop a report.

`mouse_controller_spec` joins the three machines. It brings out:

- `rd`;
- the Trigger flag;
- a `report` pulse;
- `bit_tick`, one pulse per bit time, which a receiver can use to sample RD;
- the counts and flags.

## The firmware error this design reproduces

The Bit section for a rising XClock reads the XData pin with a bit test:

- if XData is 0 the movement is to the right, and RightFlag must be set;
- the correct instruction is BTFSC ("skip if clear") on RA.3;
- the original firmware has BTFSS ("skip if set") there, which sets RightFlag for the wrong direction.

The top-level testbench loads both versions of the firmware into the core. It drives the encoder pins and runs the Bit machine on the same pins:

- the corrected firmware agrees with the machine on every call;
- the original one disagrees on RightFlag.

It disagrees exactly in the case "rising XClock with XData = 0 must set RightFlag". The testbench counts the disagreements and requires at least one.

## The example pair (`example_spec`, `example_impl`)

The routine is:

1. decrement R1 and set bit b2 of R2;
2. repeat step 1 while bit b1 of R1 is 1;
3. then clear bit b2 of R2.

It is built twice:

- **`example_spec`** has three states:
  - S0: decrement and set;
  - S1: test;
  - S2: clear and halt.
- **`example_impl`** is a five-instruction program: DECR, SETB, a bit test, GOTO, RESETB. It has its own pc.

The program needs more clocks than the flowchart. The specification is therefore enabled only while the program's pc is 1, 2 or 4, which synchronises the two. Under that pacing both machines hold the same R1 and R2 whenever the program reaches its bit test, and again when both halt. Two properties follow:

- R2.b2 is 0 once R1.b1 is 0;
- R2.b2 is 1 while R1.b1 is 1.

The same routine also runs as real code on the core: DECF, BSF, BTFSC, GOTO and BCF at addresses 4 to 8. The flowchart machine is then paced by the core's program counter in the same way. This is the two-level idea of the whole design. The core is checked against its instruction set once, and after that a program built from those instructions only has to be checked against its flowchart.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_pic_alu` | every operation with random operands against arithmetic written out in the test |
| `tb_pic_decoder` | all 35 instructions with random operands against the instruction table; operand field positions |
| `tb_pic_pc_stack` | random increment/load/call/return sequences against a queue model; overflow and underflow |
| `tb_pic_prog_mem`, `tb_pic_file_regs` | random writes and reads against an array model; address decode and bank mirroring |
| `tb_pic16c71` | the core against an instruction-level model (`tb/pic_tb_pkg.sv`: assembler functions and a reference interpreter). PC, W, STATUS and all 36 registers are compared at every `ready`, and the clock count between `ready`s must be 8 × cycles. Directed programs cover loops, table lookup with RETLW, indirect writes, port I/O, eight nested calls and SLEEP. There are also two random programs of 3000 instructions and a nine-call overflow test. |
| `tb_mouse_bit_spec` | counts, flags, both RightFlag properties and the exact clock count of each call, against a reference of the edge rule |
| `tb_mouse_byte_spec` | RD bit sequence and clock count, with a stand-in Bit that answers after random delays |
| `tb_mouse_main_spec` | Trigger decisions, the five bytes, negation, `report` pulses and the clearing of counts, with stand-in Byte and Bit registers |
| `tb_mouse_controller_spec` | the three machines from pins to RD. It decodes every report and checks that the steps applied on each axis and direction add up, with the right sign. The bit time is shortened here. |
| `tb_example_spec`, `tb_example_impl` | final R1/R2 and the exact clock count against the loop computed in the test; the effect of `en` |
| `tb_embedded_system_top` | the whole system at its default parameters, described below |
| `tb_example_firmware` | the example program as core instructions (DECF, BSF, BTFSC, GOTO, BCF) on the core in the top. The flowchart machine takes one step each time the program counter reaches a step boundary, and its state and registers must then equal the core's. The pass count and the 40 clocks per pass are checked too. |
| `tb_mouse_firmware` | a complete mouse firmware (Main, Byte and Bit, written in the test) running on the core in the top, next to the state machines on the same pins. RD is RB7; RB6 toggles once per bit time as the sampling clock. Both serial lines are decoded, and for each button change and each run of encoder steps both sides must report the change and the same signed movement. |

`tb_embedded_system_top` runs the whole system at its default parameters. It covers:

- the example pair, compared at every pass;
- the corrected and original mouse firmware against the Bit machine;
- RD decoding of the controller machines, including a button press that must produce a report;
- nine nested calls and SLEEP.

It counts each mechanism and fails if any count is zero:

- skips;
- two-cycle branches;
- stack overflow;
- SLEEP;
- rising and falling encoder edges;
- right and up movements;
- firmware disagreements;
- example passes;
- mouse reports.

### Running a testbench

With Verilator 5 each testbench builds like this. Add `tb/pic_tb_pkg.sv` for the core, top and firmware testbenches.

```
verilator --binary --timing --assert -Irtl -Itb rtl/pic_pkg.sv tb/pic_tb_pkg.sv \
          rtl/*.sv tb/tb_embedded_system_top.sv --top-module tb_embedded_system_top
./obj_dir/Vtb_embedded_system_top
```

All of them finish within a few seconds.

## Parameters

| parameter | default | where |
|---|---|---|
| `PROG_WORDS` | 1024 | `pic16c71` (PIC16C71 program memory size) |
| `GPR_COUNT` | 36 | `pic16c71`, `pic_file_regs` |
| `DEPTH` | 8 | `pic_pc_stack` |
| `DELAY_CYCLES` | 833 | `mouse_bit_spec`, `mouse_controller_spec`: one bit time in clocks |

## Where this design departs from, or adds to, its source description

Adopted from the PIC16C71 family, because the source describes none of them:

- the special-register map and STATUS bit positions;
- PCLATH and the TRIS registers;
- reset values;
- the dummy-cycle form of two-cycle instructions;
- circular stack overflow;
- the 1024-word program size.

The mouse machines:

- the Trigger flag is cleared, not set, at the end of Main;
- Byte drives RD high when no report is due;
- counts are copied and cleared when a report starts;
- the button byte format and the Y-axis and button pins are chosen here;
- the 833-clock bit time assumes a 1 MHz clock and 1200 baud;
- Byte sends eight data bits and no stop bit, following the routine's state diagram.

The firmware used in the top-level test is this design's own. It is written around the documented Bit section, including the BTFSS/BTFSC error. The source gives no program text for the Main and Byte routines. A complete firmware for all three routines is written in `tb_mouse_firmware`, from their flowcharts. It is checked only against the state machines' reports, at the level of button changes and motion totals, not state by state.

Not modelled, because they are not logic or are not described:

- the timer, A/D converter, interrupts and watchdog;
- the RS-232 level driver;
- the power supply;
- the photo-detectors and buttons;
- the host.
