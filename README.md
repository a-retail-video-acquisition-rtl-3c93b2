# Single-field NTSC frame grabber with a parallel-port interface

This is the digital part of a low-cost video capture board. It takes one field
of an NTSC camera signal and stores it as a 256 x 240 picture of 8-bit grey
levels. It then sends the picture to a PC through an ordinary printer port,
one byte per ready/acknowledge handshake. There is no processor and no frame
timing generator. A 5 MHz clock, a small sync-tracking FSM, three counters and
a 13-state controller are enough. All of them fitted in 22V10 PALs on the
original board.

The core idea is that the A/D sample rate and the system clock are the same:
5 MHz, which gives 256 samples in the 51.8 us active part of a 64 us line.
So every clock cycle takes one sample and writes it into SRAM. The storage is
two 32 KB SRAMs that share one address counter and one data bus. Even pixels
go to SRAM A and odd pixels to SRAM B, at the same address. The counter
therefore moves once per pixel pair, and the choice of write or output enable
acts as the sixteenth address bit.

## Signal flow

```
 camera ──► sync separator ──HDRIVE,VSYNC──► videoflag ──SOF,SOD──┐
 camera ──► A/D (MC10319) ──adc_data──► data_bus ◄──┐              ▼
                                           │  ▲     │          control_fsm ◄── cACK, Start, Reset
                                           ▼  │q    │            │  │             ▲
                              field_buffer (SRAM A | SRAM B)     │  │      board_interface ◄─► PC port
                                           ▲ addr               │  │             ▲
                              memory_address_register ◄─────────┘  │     bus, bACK
                   pixel_position_register (EQ256) ◄───────────────┤
                   line_position_register (PAGEEND) ◄──────────────┘
```

The sync separator and the A/D converter are analog parts. They are not part
of the RTL: `hdrive`, `vsync` and `adc_data` are inputs of the top module
`video_capture_board`, and `sampclk` is the clock it provides for the
converter.

| File | Block |
|---|---|
| `rtl/vcb_pkg.sv` | shared sizes, state encodings, the command struct, port bit positions |
| `rtl/clock_gen.sv` | 10 MHz to 5 MHz divider; system clock and inverted sample clock |
| `rtl/videoflag.sv` | sync-tracking FSM: start/end of field (SOF/EOF) and of line data (SOD/EOD) |
| `rtl/control_fsm.sv` | the controller |
| `rtl/memory_address_register.sv` | 15-bit clear/increment address counter (7-bit low part with carry, 8-bit high part) |
| `rtl/pixel_position_register.sv` | pixel-pair counter, flags EQ256 on the last pair of a line |
| `rtl/line_position_register.sv` | line counter, flags PAGEEND after 240 lines |
| `rtl/field_buffer.sv` | the two SRAMs |
| `rtl/data_bus.sv` | the shared 8-bit bus (A/D buffer or SRAM) |
| `rtl/board_interface.sv` | port bit mapping, inversions, synchronisers |
| `rtl/video_capture_board.sv` | top level |

## The controller

Every command output of `control_fsm` is a Mealy output, and it is registered
together with the state. This is the thing to keep in mind when reading
waveforms. The state table names the commands on a transition, and those
commands are active during the cycle *after* the transition. For example, the
SRAM A write enable decided in SODWAIT is active in SRAMAWRITE. The only
exception is PAGECNT, the line-count increment, which is combinational. As a
result, the line counter has already advanced when the controller next tests
PAGEEND.

| State | Leaves when | To | Commands for the next cycle |
|---|---|---|---|
| IDLE | Start Capture | SOFWAIT | clear MAR, pixel and line counters; A/D on bus |
| SOFWAIT | SOF | SODWAIT | same clears; A/D on bus |
| SODWAIT | PAGEEND | TRANSSTART | clears; SRAM A on bus |
| SODWAIT | SOD | SRAMAWRITE | write SRAM A; A/D on bus |
| SRAMAWRITE | always | SRAMBWRITE | write SRAM B; count MAR and pixel pair; A/D on bus |
| SRAMBWRITE | EQ256 | SODWAIT | clear pixel count; PAGECNT now; A/D on bus |
| SRAMBWRITE | otherwise | SRAMAWRITE | write SRAM A; A/D on bus |
| TRANSSTART | always | TRAN1 | bACK; SRAM A on bus |
| TRAN1 | cACK high | TRAN2 | SRAM B on bus (bACK drops) |
| TRAN2 | cACK low | TRAN3 | SRAM B on bus |
| TRAN3 | always | TRAN4 | bACK; SRAM B on bus |
| TRAN4 | cACK high | TRAN5 | none |
| TRAN5 | cACK low | TRAN6 | count MAR and pixel pair |
| TRAN6 | EQ256 | TRAN7 | clear pixel count; PAGECNT now |
| TRAN6 | otherwise | TRANSSTART | SRAM A on bus |
| TRAN7 | PAGEEND | IDLE | none |
| TRAN7 | otherwise | TRANSSTART | SRAM A on bus |

A state that does not leave keeps the commands it was giving: SODWAIT keeps
the A/D on the bus, TRAN1 and TRAN4 keep bACK high, and TRAN2 keeps SRAM B on
the bus. The three unused 4-bit codes (13 to 15) go to IDLE on the next
clock. The host's Reset sends the FSM to IDLE from any state and clears every
command. The state codes 0 to 12 follow the order of the table. They are the
codes the original PAL equations use.

### Capture timing

When HDRIVE falls, the videoflag FSM reports SOD one clock later. The
controller reacts on the clock after that. So pixel 0 of a line is the sample
taken 2 clocks after HDRIVE falls, and pixels 1 to 255 follow one per clock.
The line store ends 258 clocks (51.6 us) after HDRIVE falls, well inside the
320-clock line. HDRIVE is not synchronised to the clock, so the start of a line can
move by one sample from line to line, as on the original board. The first
stored line is the first line after VSYNC ends.
Storing stops after 240 lines: the pixel counter, not the late end-of-line
flag, ends each line, and the line counter, not the late end-of-field flag,
ends the field.

### Handshake timing

Per pixel pair, the board and the host exchange:

```
 board: SRAM A byte on bus ─► bACK↑ ─ host reads, cACK↑ ─► bACK↓ (bus → SRAM B) ─ host cACK↓
 board: bACK↑ (SRAM B byte) ─ host reads, cACK↑ ─► bACK↓ ─ host cACK↓ ─► next pair
```

cACK passes through one synchroniser flop. After the host lowers cACK, bACK
rises again:

* 3 system clocks later for the SRAM B byte of the same pair;
* 4 clocks later for the next pair;
* 5 clocks later at the start of a new line.

Each byte is on the bus one clock before bACK rises. The exception is the
first byte of a field: in that clock the address counter is still being
cleared, so the bus is valid only once bACK is high. The board never times
out: a host that disappears leaves it waiting, and the
Reset line recovers it. With a host that answers within a couple of clocks, a
whole field takes roughly 80 ms to transfer at 5 MHz.

## Host port mapping

The PC port has one 8-bit output register (Dor). The board uses three of its
bits:

* bit 2: cACK;
* bit 6: Start Capture;
* bit 7: Reset.

The picture byte goes back on eight status lines. The port defines four of
those lines as active low, so the board inverts bits 0, 1, 3 and 7
(`PORT_INVERT_MASK = 8'b1000_1011`). Software that XORs the byte it reads
with the same mask gets the pixel back. In terms of the PC's status
registers:

* bits 0 to 3 arrive in bits 0 to 3 of the base+2 register;
* bits 4 to 7 arrive in bits 4 to 7 of the base+1 register.

On a DB-25 connector, the picture byte uses these pins:

| Bit | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| Pin | 1 | 14 | 16 | 17 | 13 | 12 | 10 | 11 |

bACK passes through two inverters, so it keeps its polarity. It is a
separate port (`pc_back`). Which connector pin carries it is left to the
wiring.

## Parameters and sizes

| Parameter (top) | Default | Meaning |
|---|---|---|
| `PIXELS_PER_LINE` | 256 | samples stored per line (even; the pixel counter counts half of this) |
| `LINES_PER_FIELD` | 240 | lines stored per field |
| `ADDR_W` | 15 | SRAM address width; needs `LINES_PER_FIELD * PIXELS_PER_LINE / 2 <= 2**ADDR_W` |

The defaults are the original board's. A field needs 30,720 of the 32,768
addresses in each SRAM. The smaller sizes exist only to make simulations
short. The field buffer synthesises to 2 x 32K x 8 bits of memory. The rest
of the design is 53 flip-flops.

## Modelling choices and departures from the original board

* **Tristates become a multiplexer.** The 74LS244 bus buffer and the SRAM
  output drivers are replaced by `data_bus`. An undriven bus reads as 0.
  Assertions in `control_fsm` and `data_bus` flag two drivers at once.
* **SRAM timing.** On the board, the SRAM chip selects are tied to the clock,
  so reads and writes happen in the second half of each cycle. Here a write
  takes place at the clock edge that ends the cycle, which stores the same
  value. Reads are asynchronous.
* **Power-up.** PAL registers clear at power-up. The RTL models this with
  initial values: videoflag in ACTIVE_DATA, controller in IDLE, counters at
  zero, no commands. This produces a 14-item `PROCASSINIT` lint warning,
  which is expected. The clock divider has no reset and starts in either
  phase.
* **Sync polarity.** HDRIVE and VSYNC are taken as active high, the logical
  sense of the separator's outputs. The original PAL declared its input pins
  inverted to match its wiring.
* **Pixel counter width.** The counter counts pairs: 7 bits, flag at 127. It
  is called EQ256 because it marks the 256th pixel. On the board this signal
  reaches the controller under the name EQ128.
* **Line counter.** It saturates at its maximum instead of wrapping, which
  never matters in operation. PAGEEND is `count >= LINES_PER_FIELD`; at 240
  this is exactly "top four bits set", the original decode.
* **Synchronisers.** Each host signal passes through one flop. On the board,
  cACK was registered inside the line-counter PAL. Start Capture and Reset
  are registered the same way here.
* **Inversion bits.** The inverted port bits are 0, 1, 3 and 7, matching the
  PC port's definition of active-low status lines.

## Simulation

Each block has a self-checking testbench in `tb/`, and each prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/vcb_pkg.sv rtl/control_fsm.sv \
    tb/tb_control_fsm.sv --top-module tb_control_fsm -o sim && obj_dir/sim
```

The end-to-end tests need every file in `rtl/` plus `tb/vcb_harness.sv`.
Run `+verilator+rand+reset+2` to start undriven state at random values.

* `tb/vcb_harness.sv` plays the camera and the host.
  * As the camera, it generates HDRIVE/VSYNC with NTSC-like timing. Its "A/D
    samples" are a known function of field, line and clock cycle, so the
    expected picture can be computed independently.
  * As the host, it starts a capture in the middle of a field, then receives
    every byte with random response delays. It checks each pixel and the
    handshake response times listed above.
  * It counts field waits, stored lines, slow acknowledges, resets and
    received fields, and fails if any never happened.
* `tb/tb_video_capture_board.sv` runs a 16 x 6 picture. It covers a Reset
  during capture, a Reset during transmission and two complete fields.
* `tb/tb_video_capture_board_full.sv` runs the default 256 x 240 board with
  262-line fields. It takes about a second of simulator time.
* The unit testbenches cover:
  * `videoflag`, compared every cycle with its sum-of-products equations
    under random sync;
  * the three counters, across their full ranges;
  * `control_fsm`, walked through every state and transition, with forced
    trap states;
  * the SRAM pair, filled and read back completely;
  * the bus multiplexer;
  * the port mapping and its one-clock synchronisers;
  * the clock divider.

## Not covered

* The analog front end (sync separator, input amplifier, reference
  voltages, flash converter) has no logic function and has no model here.
* The PC software (capture loop, image files, the 3-tap median filter it
  uses against converter noise) runs on the host and is not part of this
  RTL.
