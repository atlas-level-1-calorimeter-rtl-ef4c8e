# Backplane tester: bit error rate logic for the L1Calo processor backplane

The ATLAS Level-1 calorimeter trigger crates carry 16 processor modules (JEMs) or
14 (CPMs). Each module sends results over 25 single-ended merger lines on a
common backplane to the two merger module (CMM) slots at the crate ends. These
lines have run at 40 Mb/s. The backplane tester is a board that sits in a merger
slot and checks whether the lines also work at 80, 160 or 320 Mb/s. The
processor modules send known patterns. The tester samples all 400 lines, checks
every bit in real time, and counts bit errors per module. Software reads the
counts over VME and turns them into bit error rates.

This repository holds the board's logic in SystemVerilog:

* the FPGA core, which receives the lines, deskews them and checks them;
* the VME CPLD, which provides basic bus access and the configuration path;
* behavioural models of the two parts that cannot be plain logic: the per-pin
  delay elements and the XOR clock extractor for the TTC signal.

Each module has a self-checking testbench. One testbench runs the whole board
at full size.

```
 backplane ──400 lines──► input_delay ×400 ──► bpt_fpga ─┬─ slot_receiver ×16
                            (taps from VME)              │    line_deserializer
                                                         │    pattern_checker
                                                         │    error_counter
 VME (43 signals) ─┬────────────────────────────────────►└─ fpga_vme_regs
                   └─► vme_cpld ── DTACK*, CPLD registers, FPGA configuration port
 TTC line ─► ttc_clock_recovery ─► (to the FPGA PLL / jitter cleaner, off-model)
```

`backplane_tester` is the board-level top. `bpt_fpga` is the synthesizable
FPGA content. `bpt_pkg` holds the shared constants, types and the register map.

## What a slot sends and how it is checked

A slot has 25 lines, Px_0 to Px_24. Px_1..Px_24 always carry 24 data bits. Px_0
is used in one of two ways, chosen per slot:

* **Global clock mode.** All slots are sampled on the board's global
  line-rate clock (`clk_fast`). Px_0 carries a parity bit. Parity is odd over
  all 25 bits by default (`ODD_PARITY`).
* **Forwarded clock mode.** The sender sends its own clock on Px_0 and the
  slot is sampled on that clock. This is for rates where the global clock's
  phase accuracy is not good enough. There is no parity bit in this mode, so
  parity checking is switched off for the slot.

The clock of each slot is a multiplexer between `clk_fast` and the slot's own
Px_0 (`bpt_fpga`). In an FPGA this is a clock buffer with a select input.
Change a slot's clock source only while the slot is disabled.

Each slot is checked with one of four modes (`chk_mode_e`): off, parity, ramp,
or both.

**Parity.** A sample whose 25 bits have the wrong parity counts as one error.
Parity cannot tell how many bits flipped.

**Ramp.** The data form a 24-bit binary counter that goes up by one every bit
period. Px_1 is the least significant bit. The checker keeps its own copy of
the expected value. Every data bit that differs from that copy counts as one
error, so a single flipped bit costs exactly one error. The checker does not
compare a sample with the one before it, because then one flipped bit would be
counted twice.

To follow a counter it first needs a starting value, which is called locking:

* While unlocked, the checker loads its reference from the newest sample of a
  frame, plus one, and counts nothing for that frame.
* The slot's `LOCK` flag then goes high.
* A resync command unlocks all checkers again. Software uses it after the
  pattern has jumped, or after it has changed a delay. Otherwise a wrong
  reference would make every later sample count errors.

**Both.** The slot's count is the sum of its parity errors and its ramp errors.

## Deserialisation and the counters

A 320 MHz clock is too fast for wide arithmetic. So each slot first collects
`DES` = 8 consecutive samples into a frame (`line_deserializer`). Frames arrive
at 40 MHz at 320 Mb/s, and the checker handles all eight samples of a frame in
one cycle. Frame boundaries run free from reset. The checker does not need them
to line up with anything, because it checks every sample against the counter
whatever its position in the frame. This block stands for the FPGA's
input serdes hardware.

`error_counter` adds the errors of each frame to a 32-bit register. The
register saturates at all ones. It lives in the slot's receive clock domain,
which may be a forwarded clock with any phase. A single frame can add up to 200
errors, so a Gray-coded counter cannot be used to cross the clock boundary.
A toggle handshake is used instead:

1. The VME side asks for a copy.
2. The receive side copies the counter into a holding register and answers.
3. The VME side takes the holding register, which is stable by then, and asks
   again.

The copy seen by VME is therefore always a value the counter really had. It
lags the live count by a few 40 MHz cycles.

Configuration and commands cross the other way (`slot_receiver`):

* The 4-bit slot configuration passes through a two-stage synchroniser, which
  is why it should only change while the slot is idle.
* Clear and resync cross as toggles.
* The receive-side reset follows SYSRESET*.

## Deskew: input delays and the delay scan

The board makes no attempt to route the 400 lines with equal length. Each input
pin instead has a programmable delay, with one VME register per line at
`DELAY + 2*(25*slot + line)`. `input_delay` models that delay:

* It is a transport delay of `tap × 78 ps`, with 64 taps. These are the
  figures of the FPGA family's input delay element; the specification does not
  give them.
* Each edge is delayed on its own, so a one-bit pulse shorter than the delay
  still gets through.

Software finds the right setting for a line with a delay scan:

1. Write a tap value.
2. Resync and clear.
3. Wait, then read the slot's error count.
4. Repeat for the next tap. At the end, set the tap to the middle of the range
   of taps that gave no errors.

The full-board testbench does exactly this. It sends one line 1.8 ns early,
which makes that line sample one bit ahead. The scan finds a clean window from
tap 6 to tap 42, and with the tap at the middle the slot counts no errors.

## VME access

The bus is the reduced A24/D16 set of 43 signals:

* SYSRESET*, A[23:1], D[15:0], DS0*, WRITE*, DTACK*.
* There are no address modifiers and no AS*.
* The data bus appears as `vme.d` (input), `vme_d_out` and `vme_d_oe`.

Both devices run the bus synchronously to a 40 MHz clock. Both use the same
front end (`vme_slave_sync`):

1. DS0* goes through two flip-flops.
2. An access begins when the synchronised DS0* falls and A[23:19] equals the
   5-bit geographic address. Each module therefore owns a 512 KiB window.
3. The address, data and direction are captured at that point.

The CPLD answers **every** access in the window with DTACK*, whether or not
the FPGA is configured. DTACK* goes low on the 6th clock edge after DS0* falls:
two synchroniser stages, one decode cycle, then `ACK_DLY` = 3. It stays low
until DS0* rises.

The FPGA decodes the same bus with the same synchroniser, and its read data
are on the bus one cycle before DTACK*. Until the FPGA reports configuration
done (`cfg_done`), the top holds the FPGA logic in reset and keeps it off the
data bus. A read of an FPGA register then still ends with DTACK*, but nobody
drives the data lines. Reads of offsets that nobody owns
return 0.

| Byte offset | Device | Access | Content |
|---|---|---|---|
| 0x00000 | CPLD | R | identifier 0xB7C1 |
| 0x00002 | CPLD | RW | [0] assert PROG_B, [1] assert CSI_B (SelectMAP chip select) |
| 0x00004 | CPLD | R | [0] INIT_B, [1] DONE |
| 0x00006 | CPLD | W | configuration word: put on `cfg_d`, one CCLK pulse a cycle later |
| 0x00008 | CPLD | R | geographic address |
| 0x01000 | FPGA | R | firmware identifier 0xB7F1 |
| 0x01002 | FPGA | W | [0] clear all error counters, [1] resync all checkers |
| 0x01004 | FPGA | R | lock flag per slot |
| 0x01100 + 2s | FPGA | RW | slot s: [3] enable, [2] forwarded clock, [1:0] mode |
| 0x01200 + 4s | FPGA | R | slot s error count [15:0]; the read latches [31:16] |
| 0x01202 + 4s | FPGA | R | the latched [31:16] |
| 0x02000 + 2l | FPGA | RW | delay tap of line l = 25·slot + Px index |

Always read the low half of a count first. That read latches the high half, so
the two halves come from the same value.

The configuration path lets VME load the FPGA directly over its 16-bit parallel
port, bypassing the flash:

1. Assert PROG, then release it.
2. Assert chip select.
3. Write the bitstream word by word to offset 0x00006.
4. Watch DONE.

## TTC clock extraction

The global clock comes from the TTC signal on the backplane, and only its clock
is used. `ttc_clock_recovery` works in two steps:

1. It XORs the line with a copy delayed by 1 ns. This gives a short pulse at
   every edge of the line.
2. It divides the pulse train by `DIV` = 2.

TTC carries 80 Mb/s in biphase mark code (160 Mbaud), with a line edge at
every 12.5 ns bit cell boundary. So with zero data the divider output is the 40 MHz bunch clock. A
one in the data adds an edge in the middle of a cell, and this divider does
not filter those edges out. The PLL inside the FPGA, the external jitter
cleaner (LMK03000), the clock multiplexer/fan-out and the 160 MHz backup crystal
are analog or commercial parts and are not modelled:

* `ttc_clk_recovered` leaves the model towards them.
* `clk40` and `clk_fast` come back as inputs.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `NS` | 16 | top, `bpt_fpga` | processor slots |
| `N_LINES`, `DATA_BITS` | 25, 24 | `bpt_pkg` | lines per slot, data bits |
| `DES` | 8 | top, receivers | samples per frame |
| `ODD_PARITY` | 1 | top, checker | parity sense on Px_0 |
| `CW` / `CNT_W` | 32 | counters | error counter width |
| `TAP_W`, `TAP_PS` | 6, 78 | delays | tap register width, picoseconds per tap |
| `ACK_DLY` | 3 | `vme_cpld` | cycles from decode to DTACK* |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. All
files are SystemVerilog 2017. The testbenches need `--timing`, and the two
behavioural models also need it. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl +libext+.sv \
    rtl/bpt_pkg.sv tb/tb_backplane_tester.sv --top-module tb_backplane_tester
./obj_dir/Vtb_backplane_tester
```

Replace the testbench name to run any other: `tb_slot_receiver`,
`tb_pattern_checker`, `tb_line_deserializer`, `tb_error_counter`,
`tb_fpga_vme_regs`, `tb_vme_cpld`, `tb_bpt_fpga`, `tb_input_delay`,
`tb_ttc_clock_recovery`. The shared VME master tasks are in
`tb/vme_master.svh`.

`tb_backplane_tester` runs the whole board with every parameter at its default
(16 slots, 400 lines, 320 Mb/s). It takes a few seconds. It covers:

* error injection in all four check modes, including a forwarded-clock slot;
* lock, resync and clear;
* the delay scan and deskew;
* DTACK* for CPLD and FPGA addresses, and no answer for another slot's
  address;
* the configuration path, and an unconfigured FPGA that stays off the bus;
* the TTC clock.

It counts how often each of these happened and fails if any never did.

`tb_crate_rates` runs the board in the configurations it is meant to measure.
It uses four line rates: 40, 80, 160 and 320 Mb/s. At each rate it tries three
crate populations: a full JEP crate of 16 modules, a CP crate of 14, and a test
crate of 13 spare JEMs. Every populated slot gets injected errors, and every
slot's count is compared with them. Unpopulated slots stay disabled and must
count nothing. The rate is set only by the `clk_fast` period: the logic itself
does not depend on the rate.

## How far to trust it, and where it is this design's own

Taken from the specification:

* 16 slots × 25 lines, with 24 data bits plus a parity bit or a forwarded
  clock;
* rates up to 320 Mb/s;
* parity check and counter (ramp) pattern check;
* one error register per slot, read over VME. A "channel" is taken to be one
  processor slot, so there are no per-line counters;
* per-line delays set over VME and found by a software scan;
* A24/D16 VME, synchronous to the bunch clock, with the listed 43 signals;
* a CPLD that decodes the geographic address and terminates every access with
  DTACK*;
* VME-driven configuration over the FPGA's parallel port;
* TTC clock extraction by XOR and division;
* the split between CPLD and FPGA, with the FPGA's interface present only
  after configuration.

This design's own choices:

* the register map and identifiers;
* the 512 KiB window per geographic address;
* the DTACK* latency;
* odd parity on Px_0;
* Px_1 as the counter's least significant bit;
* the lock and resync procedure;
* 32-bit saturating counters;
* 8-sample deserialisation;
* a single-rate forwarded clock, sampled on its rising edge;
* the clock-crossing schemes;
* the 16-bit configuration port with one CCLK per write;
* the 64 × 78 ps delay taps;
* the TTC divider ratio.

Not verified:

* timing closure at 320 MHz in a real FPGA;
* behaviour with real analog line effects. The models are ideal, and an
  error only appears where a testbench puts one.
* clock placement. The RTL gives every slot its own receive clock domain.
  In the intended FPGA only 14 I/O banks are large enough to strobe all 24
  lines of a slot from a regional clock, so at least two forwarded-clock slots
  would have to use global clock buffers instead. The RTL does not change for
  that, but the constraints do.

Not modelled, because they are analog, commercial or outside the design:

* VME bus buffers, PECL receiver, input termination, regulators;
* PLLs, jitter cleaner, clock fan-out, oscillators;
* SPI flash, System ACE and CompactFlash;
* the JTAG chains;
* the 16 high-speed optical links.
