# Sector-Logic/RX: barrel muon trigger sector board

The ATLAS barrel level-1 muon trigger splits the detector into trigger
sectors. Each sector has six to eight trigger towers, and each tower has a
PAD board on the detector. The Sector-Logic/RX board sits off the detector,
one per sector, and does two jobs:

- **Trigger.** Every 25 ns bunch crossing (BC), each PAD sends one 16-bit
  trigger word over an optical link. The board removes muons counted twice
  by neighbouring towers. It picks the two candidates with the highest
  transverse-momentum threshold. Five BCs after the words arrive, it sends
  a 32-bit word to the muon central trigger interface (MUCTPI).
- **Read-out.** After each level-1 accept (LV1A) from the TTC timing
  system, every PAD sends a read-out frame over the same link. The board
  collects one frame per link and checks that the event numbers agree. It
  adds its own trigger word and sends the assembled event through a
  serializer chip to the read-out driver (ROD). It raises Busy when its
  buffers fill.

This RTL covers the logic of the board's two FPGAs:

- the **SL FPGA** (`sl_fpga`), which does the trigger and read-out;
- the **VME FPGA** (`vme_fpga`), which connects the board to the VME
  crate's computer over a small 24-bit bus.

The top module `sl_rx_board` joins the two. Chips outside the FPGAs are
represented by the top's ports:

- optical receivers;
- serializer;
- 8k x 16 external FIFO;
- clock selection;
- the VME64x bus interface itself.

## Block map

```
 links[8] ──► link_rx ×8 ──candidates──► trigger_pipeline ──► mu_word (MUCTPI)
   │              │                            │
   │              └─read-out words─► input FIFO ×8 ─┐        └─► trigger FIFO ─┐
   │                                                ▼                         ▼
 TTC ─► ttc_counters ──LV1A────────────────────► event_builder ◄──────────────┘
                                                    │
                                                output FIFO ─► ser_if ─► ser_data
                                                    └──► ro_vme_port ─► (VME, 0x0C)
 busy_logic ◄── FIFO almost-full flags, PAD Busy-Xoff ──► busy
 VME FPGA ◄══24-bit bus══► sl_vme_slave ─► sl_regs ─► emulation FIFO ─► emu_player
                                              └──◄── MUCTPI spy FIFO
```

| Module | Role |
|---|---|
| `sl_pkg` | Shared types: PAD word, candidate, MUCTPI word, trigger-FIFO entry; frame markers; the "beats" compare |
| `link_rx` | Registers one link word per BC. Splits trigger words from read-out words. Holds the PAD's Busy-Xoff bit |
| `overlap_solver`, `sort_highest`, `sort_second` | The three clocks of the sector trigger |
| `trigger_pipeline` | The three stages plus the output register that forms the MUCTPI word |
| `ttc_counters` | BC counter, L1-ID counter, per-event latch |
| `event_builder` | Builds the SL/RX read-out frame for each LV1A |
| `ser_if` | Output FIFO to the serializer's 40-bit input |
| `ro_vme_port` | Output FIFO to VME, one word at a time, when the frames are read by software |
| `busy_logic` | Busy from FIFO occupancy and PAD Busy-Xoff |
| `sl_vme_slave`, `vme_sl_master` | The two ends of the inter-FPGA bus |
| `sl_regs` | SL register map |
| `emu_player` | Plays VME-written PAD and TTC data into the trigger region |
| `vme_fpga` | The VME FPGA's registers, external FIFO, configuration and JTAG pins |
| `async_fifo`, `gray_sync`, `level_sync`, `rst_sync` | Clock-domain crossing helpers |
| `sl_fpga`, `sl_rx_board` | Integration |

## The PAD trigger word and the sector trigger

The trigger word bit positions are:

| Bits | Field |
|---|---|
| 15 | Busy-Xoff (the PAD's own FIFOs are almost full) |
| 11:9 | BCID, the low three bits of the bunch-crossing number |
| 7 | overlap in eta |
| 6 | overlap in phi |
| 5 | HitOPL |
| 4:2 | threshold |
| 1:0 | region-of-interest (RoI) code |

Bits 14:12 and 8 are not used.

This design treats a candidate as present when its threshold is non-zero. A
larger threshold means a higher momentum.

The pipeline runs on `clk_trig`. Each stage is one clock:

1. **Overlap** (`overlap_solver`). A muon crossing the boundary between
   towers *i* and *i+1* is reported by both. When both carry a candidate
   with the eta-overlap bit set, the lower-threshold copy is removed. On a
   tie, the copy from tower *i+1* is removed. The phi-overlap bit is passed
   on, because phi overlaps between sectors are resolved downstream.
2. **Highest candidate** (`sort_highest`). An 8 x 7 matrix compares every
   candidate with the seven others. A candidate wins if it beats all of
   them: a higher threshold wins, and on a tie the lower PAD number wins.
   The winner is tagged with its 3-bit PAD number. The winner is then
   removed from the list passed on.
3. **Second candidate** (`sort_second`). The same comparison runs over the
   seven that remain (an 8 x 6 matrix). The "more than two" flag is set when
   at least two candidates remain besides the first, i.e. at least three in
   all after overlap removal.

With the link input register before these stages and the output register
after them, the MUCTPI word appears **5 clock edges** after the link words.

The MUCTPI word layout (`muctpi_word_t`) is this design's choice:

| Bits | Field |
|---|---|
| 10:0 | first candidate: {valid, phi-overlap, HitOPL, threshold[2:0], RoI[1:0], PAD[2:0]} |
| 21:11 | second candidate |
| 22 | more than two |
| 25:23 | BCID, the low three bits of the board's BC counter when the words arrived |
| 31:26 | zero |

## Read-out: frames and the event builder

**Input side.** A word arrives with `link_flag = 1` for a read-out word, 0
for a trigger word. Read-out words go into that link's 1024-word input
FIFO. A PAD frame is:

- a header `0101 PADID[3:0] STATUS[7:0]`;
- one to eight chamber-matrix (CM) frames from the PAD, which the board
  copies unchanged;
- a footer `0111 ERRORCODE[11:0]`.

This design reads the header STATUS as {L1-ID[3:0], BC-ID[3:0]} of the event.

**Trigger FIFO.** At each LV1A, the trigger region writes one entry into
the trigger FIFO: the MUCTPI word of that BC, the event's 12-bit L1-ID and
its 12-bit BC-ID.

**Event builder.** It runs on `clk_eb`, which may be twice the link clock.
For each trigger-FIFO entry it:

1. writes the SL/RX header `1001 RXID[3:0] L1ID[7:0]`;
2. writes the trigger word as two 16-bit words, high half first;
3. for each enabled link, in order:
   - waits for a PAD header;
   - checks its L1-ID/BC-ID bits against the event;
   - copies the frame through its footer.
4. writes the footer `1011 ERRORCODE[11:0]`, where bit *i* flags link *i*
   (mismatch or missing frame) and bit 8 flags a timeout.

Error handling:

- A link that shows no header within `TIMEOUT` clocks (default 4096) is
  skipped and flagged.
- Words that arrive outside a frame are dropped and counted as errors.

Pairs of 16-bit words go into the 33-bit output FIFO as {end-of-frame,
high, low}. A frame with an odd word count is padded with 0x0000.

**Serializer.** `ser_if` pops one entry per `clk_ser` cycle while
`ser_en` is set and the frames are not being routed to VME (CTRL bit 14). It drives `ser_data = {6'b0, eof, valid, data[31:0]}`.

**Busy** is a level on `clk_trig`. It is the OR of:

- the almost-full flags of the enabled input FIFOs;
- the PADs' Busy-Xoff bits;
- the trigger FIFO's almost-full flag (threshold 4 below full);
- the output FIFO's almost-full flag.

The input- and output-FIFO threshold is a register, 768 of 1024 after reset.

## Four clock regions

| Region | Clock | Contents |
|---|---|---|
| trigger | `clk_trig` (TTC or local, 40 MHz) | link receivers, trigger pipeline, TTC counters, Busy, emulation player, write side of the input, trigger and spy FIFOs |
| event building | `clk_eb` (TTC, local or 2 x local) | event builder |
| serializer | `clk_ser` (TTC or local) | output FIFO readers (`ser_if`, serializer side of `ro_vme_port`) |
| VME | `clk_local` (40 MHz local) | bus slave, register map, the whole VME FPGA |

Data move between regions through asynchronous FIFOs, apart from the
one-word holding register of `ro_vme_port`. The FIFOs use Gray-coded
pointers and first-word fall-through. There are twelve:

- 8 input FIFOs;
- the trigger FIFO;
- the output FIFO;
- the emulation FIFO;
- the MUCTPI spy FIFO.

Other signals cross as follows:

- Monitoring counters go to the VME region through Gray-code synchronizers
  (`gray_sync`).
- Control bits go through two-flop synchronizers (`level_sync`).
- Each region gets its own synchronized reset release (`rst_sync`).

The clock multiplexers and the DLL that doubles the local clock are
device primitives outside this RTL, so each region has its own clock port.
Software picks the clocks through SL register 0x05. Its bits leave the top
on `clk_sel` to drive those multiplexers.

## The inter-FPGA bus

The two FPGAs share a 24-bit bidirectional bus:

- `[23]` read/write (1 = read);
- `[22:16]` 7-bit address;
- `[15:0]` data.

Three handshake lines go with it: `strb` from the VME FPGA, `ack` from the
SL FPGA, and `vack` from the VME FPGA. All registers are 32 bits, so each
access is **two transfers, low half first**. The SL side toggles a
half-word flag: a write takes effect when the high half arrives, while a
read (and a FIFO pop) happens on the low half.

Each side waits for the other's edge before moving on. Because of this, the
two FPGAs may run on unrelated clocks.

- **Write transfer:**
  1. The master drives command and data and raises `strb`.
  2. The slave latches them and raises `ack`.
  3. The master drops `strb`.
  4. The slave drops `ack`.
- **Read transfer:**
  1. The master drives the command and raises `strb`.
  2. The slave raises `ack`.
  3. The master releases the bus and drops `strb`.
  4. The slave drives the data and drops `ack`.
  5. The master samples the data and raises `vack`.
  6. The slave releases the bus and raises `ack`.
  7. The master drops `vack`.
  8. The slave drops `ack`.

On the board the bus is one set of wires. In `sl_rx_board` it is two
output-enabled drivers and a mux. An assertion checks that the two sides
never drive at the same time.

## Register maps

**VME FPGA.** It takes one decoded access: `vme_req` (a one-clock pulse),
`vme_we`, an 8-bit `vme_addr` and `vme_wdata`. It answers with `vme_ack`
and `vme_rdata`. Address bit 7 = 1 forwards `addr[6:0]` to the SL FPGA.
Otherwise it selects:

| Addr | Register |
|---|---|
| 0 | ID `0x564D4546` |
| 1 | G2Link card configuration pins (32) |
| 2 | serializer configuration pins (8) |
| 3 | external FIFO flags {FF_n, EF_n} |
| 4 | external FIFO data: a write pushes, a read returns Q and pops |
| 5 | external FIFO reset: writing bit 0 pulses RS_n |
| 6 | JTAG {TDO (read), TDI, TMS, TCK}, driven by software |
| 7 | scratch |

**SL FPGA** (42 addresses):

| Addr | Register |
|---|---|
| 0x00 | ID `0x534C5258` |
| 0x01 | CTRL: [7:0] link enable, [11:8] RXID, [12] serializer enable, [13] emulation mode, [14] read-out frames to VME (reset `0x10FF`) |
| 0x02 | almost-full threshold of the input and output FIFOs (reset 768) |
| 0x03 | scratch |
| 0x04 | status: [0] Busy, [1] emulation FIFO full, [2] spy FIFO empty, [3] a timeout has happened |
| 0x05 | clock selection (reset 0, all TTC): [0] trigger region local, [2:1] event building 0 TTC / 1 local / 2 local x2, [3] serializer local |
| 0x0A | write: push one entry into the emulation FIFO |
| 0x0B | read: pop one MUCTPI word from the spy FIFO |
| 0x0C | read: take the read-out word held for VME (0 when none) |
| 0x0D | read-out port status: [0] a word is held, [1] it is the last word of a frame |
| 0x20–0x3F | monitoring, 16 bits each (see below) |

The monitoring registers are:

| Index | Contents |
|---|---|
| 0 | L1-ID |
| 1 | BC-ID |
| 2 | Busy clock count |
| 3 | trigger-FIFO level |
| 4–11 | input-FIFO levels |
| 12–19 | trigger words received per link |
| 20 | spy FIFO level |
| 21 | events built |
| 22 | event-builder errors |
| 23 | serializer words |
| 24 | serializer frames |
| 25 | output FIFO level |
| 26 | emulation FIFO level |
| 27–31 | zero |

## Emulation and spying

With CTRL bit 13 set, the link inputs of the SL FPGA come from `emu_player`
instead of the optical links. The player takes VME-written entries from the
emulation FIFO, one per clock. Emulated TTC pulses are ORed with the real
ones. Entry formats:

- `[31:30]=0`: store trigger word `[15:0]` for link `[26:24]`.
- `[31:30]=1`: send read-out word `[15:0]` on link `[26:24]` now.
- `[31:30]=2`: a BC strobe. All stored trigger words go out in the same
  clock. Bits [0], [1] and [2] pulse LV1A, BC-RST and EV-RST.

The played PAD words (not the TTC pulses) also leave the board on
`link_tx_data`/`link_tx_dv`/`link_tx_flag`. With G2Link transmitter cards
fitted instead of receivers, this lets the board stand in for the PADs of
another Sector-Logic board. `link_tx_dv` stays low outside emulation mode.

Every MUCTPI word that carries a candidate is also written into the spy
FIFO, which VME can read at 0x0B.

With CTRL bit 14 set, the built SL/RX frames go to VME instead of the
serializer. `ro_vme_port` takes one output-FIFO entry at a time into a
holding register in the serializer region. Software polls 0x0D and reads
the word at 0x0C, which releases the register for the next entry. The two
regions exchange one toggle bit each way, and the held word stays still
while the VME side reads it. This keeps the FIFO count at twelve.

## Where this design departs from the source description, and what it assumes

Not built:

- **Parts outside the two FPGAs.** The VME64x slave protocol, the I2C
  master (unused on the board), the clock DLL and clock selection, and the
  optical receiver, serializer, external FIFO and PROM chips are not built.
  Their signals are ports.

Conflicts in the source description, and how they were resolved:

- **Trigger pipeline length.** The source describes the trigger pipeline
  both as "3 bunch crossings (125 ns)" and as 5 BC in total. This design
  uses three pipeline clocks, plus an input register and an output
  register, for 5 BC in all.
- **Serializer source.** The serializer is described both as reading the
  external FIFO and as reading the internal output FIFO. This design reads
  the internal output FIFO. The external FIFO is reached only through VME.

Choices made here, not taken from the source:

- the MUCTPI word layout;
- the content of the frame STATUS and ERRORCODE fields, and the word order
  of the SL/RX frame;
- the tie rules of the overlap and sort stages;
- the bus line names and the handshake;
- all register addresses, the emulation entry format and the VME read-out
  port (the original board has 44 SL registers; this map has 42
  addresses);
- FIFO depths, and the event-builder timeout.

The trigger word stored for an event is the MUCTPI word present in the BC
of the LV1A. No trigger-latency offset is applied.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=N failures=M`. They use `$urandom` and need no other
files. `tb/tb_trig_ref.svh` is a reference model of the sector trigger,
shared by the trigger testbenches. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/sl_pkg.sv tb/tb_sl_rx_board.sv --top-module tb_sl_rx_board
./obj_dir/Vtb_sl_rx_board
```

Change the testbench name to run another one.

`tb_sl_rx_board` runs the whole board at its default size: 8 links,
1024-word FIFOs, trigger at 40 MHz, event building at 80 MHz. It has three
phases:

1. **Random traffic.** Random trigger traffic on seven links. Every MUCTPI
   word is checked against the reference model at a latency of 5 clocks.
   Read-out frames follow every LV1A, including one with a wrong BC-ID and
   one with Busy-Xoff set.
2. **Timeout.** An event with a missing frame causes a timeout.
3. **Emulation.** Emulation mode through VME, with a spy-FIFO read-back. A
   stopped serializer fills the output FIFO and raises Busy. That frame is
   then read word by word through the VME read-out port, which clears
   Busy. The played PAD words are also checked on the transmitter outputs.

Every frame leaving on `ser_data` is rebuilt and compared. The testbench
also counts each mechanism and fails if one never occurred. `tb_sl_fpga`
does the same at the SL-FPGA level with more events.
