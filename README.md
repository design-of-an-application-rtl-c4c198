# VMEbus I/O module controller

A single-clock controller chip that turns an industrial I/O module (discrete,
analog or special-function) into a VMEbus slave. The module side is an 8-bit
data bus with a few simple devices on it: input buffers, output latches, an
identification PAL and, on analog modules, a microcontroller with its own RAM.
The VMEbus side is 16 bits wide. The chip does three things:

- It **answers VMEbus data cycles** in standard (24-bit) and short (16-bit)
  addressing. Every 16-bit word is moved over the 8-bit module bus as two
  byte transfers, through two latching octal transceivers that the chip
  steers.
- It **brings a module onto the bus at power-up**. It requests an
  interrupt, answers the acknowledge with a fixed vector, and then takes a
  physical and a logical address from the system controller (a PLC).
- It **guards the outputs**. A 524 ms watchdog, a broadcast "disable all
  outputs" command and a per-module reset command control OUTDIS, the
  signal that disables the module's outputs.

Everything runs on the 16 MHz VMEbus SYSCLK.

```
            VMEbus                                            module board
  A23..1 AM5..0 AS* IACK* LWORD* ─┐
                                  ▼
                 ┌──────────┐  VMEACC, ADDRx, ALOW, LA8..1 ──► ID PAL / point enables
  SYSRESET* ───► │ adddec   │─────────────┐
  DS0* DS1* ───► ├──────────┤             ▼
  RD/WR* BUSY* ─►│ extdec   │◄──── state_machine (37 states) ──► READ* WRITE* MODRST*
  BERRFRPAL* ──► │          │──► EN0* EN1* LEAB0* LEAB1* DDIR ──► transceivers
                 ├──────────┤             ▲
  IACKIN* ─────► │tstinidec │──► IACKOUT*  │        ┌──────────┐
                 ├──────────┤             │        │ watchdog │──► WDFL ─► OUTDIS
                 │asic_mem. │◄─── SD7..0 (module data bus) ─────►│          │
                 └──────────┘                      └──────────┘
  DTACK, BERR, IRQ6 ◄── state_machine / extdec
```

## Files

| file | contents |
|---|---|
| `rtl/iomod_pkg.sv` | Constants: address modifiers, vector, broadcast address, watchdog size. The state enum with its codes, and the output struct of the state machine. |
| `rtl/io_module_asic.sv` | Top level: pin-level wiring of the six blocks. |
| `rtl/adddec.sv` | Address latch and decode, physical/logical address compare, the module-reset and output-disable commands, OUTDIS. |
| `rtl/extdec.sv` | Data-strobe synchronisation and decode (SINGDOUB, A0), bus error, transceiver control with the contention interlock, BUSY*/VMERAMEN* arbitration. |
| `rtl/asic_memory.sv` | Interrupt vector (41h), the physical and logical address registers, and their read-back. |
| `rtl/tstinidec.sv` | Interrupt-acknowledge daisy chain (RESPOND, IACKOUT*), the test-mode decoder, and state read-out. |
| `rtl/watchdog.sv` | 24-bit watchdog counter and the WDFL flag, with test-mode load and read. |
| `rtl/state_machine.sv` | 37-state Moore controller. |
| `rtl/sync_ff.sv` | Two-stage synchroniser: the falling edge samples, the rising edge holds. |
| `tb/tb_<block>.sv` | One self-checking bench per block. |
| `tb/tb_io_module_asic.sv` | End-to-end bench at full size, with a board model. |

## Addressing and the memory map

The chip latches A23..A1, AM5..AM0, LWORD* and IACK* on the falling edge of
AS*. There are three address modifiers:

- **Standard cycles** (AM 39h or 3Dh) reach the module when A23..A16 equal
  its 8-bit physical address. A15..A1 are then a word offset into the
  module's memory map. The chip decodes only these offsets itself:

  | offset | byte ZERO (D15..8) | byte ONE (D7..0) |
  |---|---|---|
  | 0000 | physical address (read from the chip) | identification vector (external, `ADDR1`) |
  | 0002 | module type (external, `EPROMEN*`) | status (external buffer, `ADDR3*`); bit 7 = watchdog fail, driven by the chip. A write to 0002 as a word or as byte ONE clears the watchdog and the output disable. |
  | 0004..000A | module description (external, `EPROMEN*`) | |
  | FFFE | physical address | logical address |

  For every other offset in 0000..01FF, the chip gives the board ALOW and
  the latched LA8..LA1. The board's PAL then says through BERRFRPAL*
  whether that offset exists on this module. Point data (discrete inputs
  from 0010, outputs from 0018, analog up to 01A8) lives in board devices,
  not in the chip.

- **Short cycles** (AM 2Dh) carry commands. A15..A1 are compared as a
  whole:
  - `0100h + 2*LA` (LA is the 5-bit logical address): a read returns what
    offset 0000 returns, and a write is the module-reset command.
  - `0122h`, address-only (no data strobe): the broadcast that disables
    the outputs of every module. Because no data strobe comes, the chip
    detects this cycle from AS* alone. A toggle flip-flop on the AS*
    edge is passed through a synchroniser.

- All other AM codes, 32-bit requests (these get BERR), and acknowledge
  cycles at other levels leave the data path alone.

Byte ZERO is the even byte (D15..D8), selected by DS1*. Byte ONE is D7..D0,
selected by DS0*.

## Power-up initialisation

The logical-address register resets to 10000b, so an uninitialised module
answers only short address 0120h. The physical compare is disabled until
initialisation is done. The sequence is:

1. SYSRESET* puts the state machine in state 0. There MODRST* clears the
   chip and the board, and the machine then asserts IRQ6.
2. The system controller runs a level-6 interrupt acknowledge down the
   IACKIN*/IACKOUT* daisy chain:
   - A module with its request pending takes the cycle.
   - Every other module passes it on.

   The pass/take decision uses values latched at the AS* edge, and
   IACKOUT* is a plain gate of IACKIN* and AS*. So IACKOUT* cannot pulse
   while the decision settles, and two modules can never both answer.
3. The module that takes the cycle drives vector **41h** on byte ONE and
   acknowledges.
4. The controller writes the physical address (byte ZERO) and the logical
   address (byte ONE) to short address 0120h. This can be two byte cycles
   or one word cycle. Once both bytes have arrived (WRBD), the state
   machine pulses ADDRLAT:
   - the addresses move into the compare registers;
   - RESPOND clears;
   - the module is live at its assigned addresses.

   The same short address written again after initialisation is the
   module-reset command, which sends the machine back to state 0.

## The controller state machine

`state_machine.sv` has the 37 states of the original design and uses their
6-bit codes unchanged. The codes are close to a Gray sequence, so most
transitions flip one bit. The outputs are registered: each clock loads the
outputs of the state being entered.

| states | what happens |
|---|---|
| 0 | MODRST |
| 1–4 | IRQ6 asserted; wait for a data strobe; in 4, go on if RESPOND, else back to 1 (acknowledge for someone else) |
| 5–9 | Vector on byte ONE (VECEN, A0SM), latch, drive, DTACK until the strobes go away |
| 10–13 | Idle, then the decode delay. SMTRIG in 13 samples the bus-error decision. |
| 14 | BUSREQ: wait for VMERAMEN (module bus granted) |
| 15–18, 19–21 | Read one byte (READ, DATALAT), DTACK, WDTRIG |
| 22–26 | Second byte of a word read (A0SM = 1) |
| 27–29, 30–31 | Write one byte (WRITE), DTACK, WDTRIG; 31 → 0 if a module reset is pending |
| 32–35 | Second byte of a word write |
| 36 | ADDRLAT (end of initialisation), entered from 30 while RESPOND and both address bytes are written |

A state register that holds none of the 37 codes goes to state 0 on the
next clock. ILLEGAL is then set and stays set until reset or a test load.

Measured in the end-to-end bench, the time from data strobe to DTACK is:

| cycle | clocks | time at 16 MHz |
|---|---|---|
| byte read | about 10 | 0.6 µs |
| word read | about 15 | 0.9 µs |
| byte write | about 9 | |
| word write | about 13 | |

These counts include up to 1.5 clocks of synchroniser delay.

## Byte-serial data path and the transceivers

`extdec.sv` makes all the decisions that depend on the data strobes. It
synchronises DS0*/DS1* and derives three signals:

- **SINGDOUB**: 1 for a byte cycle, 0 for a word cycle.
- **A0**: the byte currently on the module bus. In a byte cycle it comes
  from the strobes. In a word cycle it comes from the state machine's
  A0SM: byte ZERO first, then byte ONE.
- **DSENABLE**: any strobe active.

Transceiver control:

- **Reads.** The chip latches (LEAB0*/LEAB1*) and drives (EN0*/EN1*) the
  transceiver of the current byte. For a word read both are enabled, so
  the two bytes can be latched one after the other and presented together.
- **Writes.** Only the transceiver of the byte being written may drive the
  module bus. The two enables are registered, and one may rise only after
  the other has fallen. This break-before-make rule prevents two bytes
  fighting on the 8-bit bus between the halves of a word write.
- **Direction.** DDIR/DDIR* is captured only while both enables are off.
- **Vector.** During the acknowledge the vector travels in the read
  direction on byte ONE, whatever RD/WR* says.

**Bus error.** At SMTRIG, BERR is raised for any of these:

- LWORD* active (a 32-bit request);
- a write to a read-only offset: 0000, 0004..000F, FFFE, or byte ZERO of
  0002 alone;
- BERRFRPAL* active for an offset the chip does not handle itself.

BERR holds until both strobes are released.

**Arbitration.** On analog modules a microcontroller shares the module bus.
In state 14 the chip raises BUSREQ. Once BUSY* (synchronised) is high,
VMERAMEN* falls on a falling clock edge. It stays low until the transfer is
over. During the initialisation acknowledge the chip uses the bus without
this handshake, as the original design does. The system controller must
therefore not start the microcontroller before initialisation is complete.

## Watchdog and output disable

A 24-bit counter runs on SYSCLK and is held at zero by any of:

- a completed transfer (WDTRIG);
- a watchdog-clear write to 0002;
- a module reset;
- no successful access yet since initialisation.

The counter starts one clock after the hold is released. When it reaches
2^23 (8,388,608 clocks, 524 ms at 16 MHz), WDFL is set. WDFL:

- appears as status bit 7;
- forces OUTDIS;
- stays set until a watchdog-clear write or a module reset.

OUTDIS = (broadcast command or WDFL) and not SIMIN. SIMIN is a board input
for simulation setups that must keep outputs live.

## Test mode

With TEST high, AM2..AM0 are decoded into eight test enables, TEN0..TEN7.
Which enable goes to which block follows the original: TEN3 to the state
read-out buffer, TEN7 to the state machine, TEN5 (with AM5..AM3) to the
watchdog, and TEN1, TEN2, TEN4 and TEN6 to the address registers. What each
enable does inside its block is this design's own choice:

| AM2..0 | enable | access |
|---|---|---|
| 011 | TEN3 | drive {ILLEGAL, 0, state code} onto SD7..0 (SD5 = most significant state bit) |
| 111 | TEN7 | load the state variables from SD5..0 |
| 101 | TEN5 | AM5 = 0: load watchdog byte AM4..AM3 from SD7..0; AM5 = 1: read it |
| 001 | TEN1 | load the physical address register from SD7..0 |
| 010 | TEN2 | load the logical address register from SD7..0 |
| 100 | TEN4 | read the physical address register |
| 110 | TEN6 | read the logical address register |

TEN0 is unused.

This lets a tester do three things in a few vectors:

- preset the watchdog near its end and check the timeout;
- put the state machine in any state, including an illegal one;
- check the address registers for reset and latching without running
  VMEbus cycles.

## Where this design departs from or interprets the original

- **No AS* delay line.** The original latched the address on a delayed copy
  of AS* (an inverter chain of 14–39 ns). Here the latch uses the AS* edge
  itself. VMEbus guarantees 35 ns of address set-up before AS*.
- **Daisy-chain decision at the AS* edge.** As a result, the IACKOUT*
  glitch that the original design needed an external delay element to
  avoid cannot occur.
- **Physical-address compare.** It uses A23..A16. The chip has no A24
  pin, and the address is eight bits.
- **ALOW polarity.** ALOW is high for offsets 0000..01FF. The original
  describes it once this way and once as the OR of A15..A9, which is the
  inverse.
- **Byte lanes.** DS1* selects byte ZERO, carried on D15..D8, as in the
  VMEbus standard. The original is not consistent about which data bits
  form byte ZERO; the choice only decides which transceiver is enabled.
- **Choices of this design.** None of these is fixed by the original:
  - the byte layout of the address-assignment write (ZERO = physical,
    ONE = logical);
  - the exact set of read-only offsets;
  - OUTDIS being released by a watchdog-clear write;
  - WDFL also being cleared by a module reset;
  - the watchdog not running before the first access;
  - what each test enable does, and the use of AM5 and AM4..AM3 for the
    watchdog.
- **Drive enables.** The VMEbus open-collector outputs (DTACK, BERR, IRQ6)
  are brought out as active-high drive enables. The bidirectional SD7..0
  pins are split into `sd_in`, `sd_out` and a per-bit `sd_oe`.

## Simulating

Each bench prints `TB_RESULT checks=N failures=M`. Any failure is also
printed with its simulation time. Example with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_io_module_asic -y rtl +libext+.sv \
  rtl/iomod_pkg.sv tb/tb_io_module_asic.sv
./obj_dir/Vtb_io_module_asic
```

The block benches build the same way. Name the bench as top module and put
`rtl/iomod_pkg.sv` first.

**End-to-end bench** (`tb_io_module_asic`): it runs the top at its default
parameters. Its sequence and board model are described in its header. It
counts 19 mechanisms and fails if any never occurs:

- daisy-chain pass and take;
- address assignment;
- byte and word reads and writes;
- bus errors;
- arbitration wait;
- address pipelining;
- read-modify-write;
- ignored cycles;
- broadcast disable;
- the full 2^23-clock watchdog timeout and its clear;
- SIMIN bypass;
- module reset command with re-initialisation;
- test-mode access;
- illegal-state detection.

It also fails on any clock with two drivers on the module bus. The run
simulates about 525 ms of bus time and takes a few seconds.

**Block benches:**

| bench | what it checks |
|---|---|
| `tb_watchdog` | Shortens the timeout to 200 clocks and checks the timeout cycle-exactly. |
| `tb_state_machine` | Checks every state code along every path of the diagram. |
| `tb_extdec` | Checks synchroniser latency, the interlock and the arbitration edges. |
| `tb_adddec`, `tb_asic_memory`, `tb_tstinidec`, `tb_sync_ff` | Cover their decode tables and timing. |

## Not included

- The board devices: transceivers, identification PAL, input/output
  latches, microcontroller and RAM. These exist only as behavioural models
  inside the end-to-end bench.
- Pad cells.
- The AS* delay line.
