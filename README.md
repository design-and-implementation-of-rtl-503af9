# HDLC transceiver with an MT8952B-style host interface

This is a synthesizable SystemVerilog HDLC transceiver. A host writes bytes into a
transmit FIFO, and the transceiver sends them as HDLC frames:

- an opening flag (`7E`)
- the bytes, bit-stuffed
- a 16-bit CRC-CCITT frame check sequence (FCS)
- a closing flag

In the other direction it finds frames on the serial input and removes stuffing
and flags. It can filter frames on their address byte and checks the FCS. The bytes
go into a receive FIFO, each with a status tag (first, middle, last with good FCS,
last with bad FCS).

The register map and pins follow the Zarlink MT8952B. The transceiver has two
timing modes:

- **Normal mode.** One line bit per clock in both directions. The line rate equals
  the clock frequency.
- **Internal control mode.** The transceiver sits on a 2.048 Mbit/s ST-BUS TDM
  stream: 32 channels of 8 bits in a 125 µs frame, marked by the active-low
  frame pulse `f0i_n`. HDLC bits are sent and received only in channel 1. In all
  other channels TxD is high impedance (`txd_oe = 0`). This suits an ISDN
  D-channel.

Only `rst_n` is asynchronous. Everything else runs on the single clock `clk`.

## Data paths

```
host --> register_file --> tx_fifo --> tx_logic --> zero_insertion --> flag_generator --> txd, teop
                                          |  crc_ccitt
host <-- register_file <-- rx_fifo <-- rx_logic <-- address_detection <-- zero_deletion <-- flag_detector <-- rxd
                                          |  crc_ccitt
              cchannel_interface: bit strobes (tx_tick / rx_tick), txd_oe, C-channel byte capture
```

### Transmit

The transmit stages pass single-bit tokens `{b, last, abort}` over a valid/ready
handshake. Only the last stage, `flag_generator`, is paced by the line. It takes one
token per transmit strobe, so a stalled line stalls the whole chain with no loss.

- **tx_logic.** When the transmitter is enabled in data mode it reads a byte from
  the FIFO and shifts it out LSB first, feeding each bit into a `crc_ccitt`
  instance. After the byte tagged EOP, it shifts out the CRC register, complemented,
  bit 15 first. The FCS shift has its feedback turned off, so no second register is
  needed. The 16th FCS bit carries `last`.
- **Aborts.** A byte tagged FA is not sent. An abort token is sent in its place.
  An abort token is also sent when the FIFO runs empty between bytes of a packet.
  That case is an underrun: it also pulses `urun`.
- **zero_insertion.** Counts consecutive 1s and inserts a 0 after five of them.
  Flags and aborts never pass through this stage, so they are never stuffed. If the
  frame's last bit is the fifth 1, the inserted 0 takes over the `last` mark.
- **flag_generator.** Always sends whole octets:
  - the fill pattern chosen by IFTF (all 1s, flags, or `7F` go-ahead)
  - an opening flag, the frame bits, then the closing flag
  - `FE` (a 0 and seven 1s) on an abort
  
  It raises `teop` during the last bit of the closing flag. It pulses `tx_done`
  when the closing flag is complete.

### Receive

The receive stages pass a registered symbol `{valid, b, flag, abort, drop}` on
each receive strobe.

- **flag_detector.** Counts 1s. It keeps the last seven bits in a delay line, so
  the bits of a flag can be taken back out before they reach the data path:
  - a 0 after six 1s is a flag
  - a seventh 1 inside a frame is an abort
  - a 0 after exactly seven 1s is a go-ahead
  - fifteen 1s in a row is idle
- **zero_deletion.** Drops the 0 that follows five 1s.
- **address_detection.** At the eighth bit of a frame, compares the first byte
  with the Receive Address register. It compares bits 7..1 when RA6/7 = 0, or bits
  7..2 when RA6/7 = 1. If address detection (RxAD) is on and the byte does not
  match, it sends `drop` and blocks the rest of the frame.
- **rx_logic.** Assembles bytes and feeds every bit into its own `crc_ccitt`. The
  last two bytes before the closing flag are the FCS, and the receiver cannot tell
  which bytes those are until the flag arrives. So it holds back three bytes and
  writes a byte to the FIFO only when a fourth arrives. When the flag arrives, the
  third held byte is written as the last byte:
  - LAST_GOOD if the CRC register holds the CCITT residue `1D0F` and the frame
    ended on an octet boundary
  - LAST_BAD otherwise
  
  The two FCS bytes are discarded. Frames shorter than three bytes are dropped
  silently. An abort that arrives after bytes were written closes the frame with
  a LAST_BAD byte. `reop` pulses when a last byte is written.

### FIFOs

Each FIFO is a 30-entry first-word-fall-through register array (`sync_fifo`).

- **Transmit FIFO.** Entries are `{data, eop, fa}`. It reports a 2-bit status and
  an event when a read takes it down to 4 bytes.
- **Receive FIFO.** Entries are `{status, data}`. It reports a 2-bit status, an
  event when a write takes it up to 26 bytes, and an overflow event when a byte
  arrives while it is full. The arriving byte is lost.

## Register map

Access: chip select `cs_n`, `rw` (1 = read), `addr[3:0]`, `d_in`/`d_out`/`d_oe`.
A read drives `d_out` while `cs_n` is low. The access takes effect once, in the
cycle after `cs_n` rises, using the last address and data seen while it was low.
Only at that point does a write store, or a read pop a FIFO or clear flags.

| Addr | Register | R/W | Bits 7 .. 0 |
|---|---|---|---|
| 0 | FIFO Status | R | RxByteStatus[1:0], RxFIFOStatus[1:0], TxFIFOStatus[1:0], 0, 0 |
| 1 | Receive Data / Transmit Data | R/W | data byte (a read pops the Rx FIFO; a write pushes the Tx FIFO) |
| 2 | Control | R/W | TxEN, RxEN, RxAD, RA6/7, IFTF[1:0], FA, EOP |
| 3 | Receive Address | R/W | address byte |
| 4 | C Channel Control | R/W | stored byte, also on the `cch_ctrl` output |
| 5 | Timing Control | R/W | RST, IC, 0, BRCK, 0000 |
| 6 | Interrupt Flag | R | GA, EOPD, TxDone, FA, Tx4/30, TxURUN, Rx26/30, RxOFLW |
| 7 | Interrupt Enable | R/W | same layout as Interrupt Flag |
| 8 | General Status | R | RxOFLW, TxURUN, GA, ABRT, IRQ, IDLE, 0, 1 |
| 9 | C Channel Status | R | channel-1 byte of the last ST-BUS frame |

### Status codes

- **Tx FIFO Status:** 00 full, 01 five or more bytes, 10 empty, 11 four or fewer.
- **Rx FIFO Status:** 00 empty, 01 25 or fewer bytes, 10 full, 11 26 or more.
- **Rx Byte Status:** describes the byte at the head of the Rx FIFO. 00 packet
  (middle) byte, 01 first byte, 10 last byte with good FCS, 11 last byte with bad
  FCS.
- **IFTF:** selects what the line carries when no frame is being sent.
  00 idle (all 1s), 01 flags, 10 data (frames from the FIFO, with flags between
  them), 11 continuous `7F` go-ahead.

### Control bits

- **EOP and FA** apply to the next byte written to Transmit Data. That byte becomes
  the last byte of the frame (EOP) or the point where the frame is aborted (FA).
  The bit then clears itself.
- **Interrupt Flag** bits are set by events and cleared when the register is read.
  `irq` is high while any enabled flag is set. In General Status, RxOFLW, TxURUN
  and GA stay set until General Status is read. ABRT, IDLE and IRQ show the current
  state. The interrupt sources are:
  - GA: a go-ahead (`7F`) was received
  - EOPD: the last byte of a received frame entered the Rx FIFO
  - TxDone: a closing flag was sent
  - FA: an abort was received
  - Tx4/30: the Tx FIFO fell to 4 bytes
  - TxURUN: the Tx FIFO ran empty inside a packet
  - Rx26/30: the Rx FIFO reached 26 bytes
  - RxOFLW: a byte was lost because the Rx FIFO was full
- **RST** in Timing Control holds the transceiver in a software reset while it is
  set. This clears the FIFOs, Control, Receive Address, C Channel Control, the
  interrupt registers and the sticky status bits.
- **IC** selects internal control (ST-BUS) mode.
- **BRCK** gives the clock frequency in internal control mode:
  - 1: `clk` is 2.048 MHz, one clock per bit
  - 0: `clk` is 4.096 MHz, two clocks per bit

### Pins and enables

- The transmitter runs only while Control.TxEN = 1 and the `txen_n` pin is low.
  The receiver likewise needs Control.RxEN = 1 and `rxen_n` low.
- With the transmitter disabled, TxD sends all 1s.
- After `rst_n`, all registers are zero. The line is idle, in normal mode, with
  both directions disabled.

## ST-BUS timing (internal control mode)

`cchannel_interface` counts 256 bit periods per frame, with one or two clocks per
period. The count restarts when `f0i_n` is first seen low.

- **tx_tick** fires in the last clock before each channel-1 bit period, so TxD
  changes at the start of the period.
- **rx_tick** fires in the last clock of each channel-1 bit period. RxD is sampled
  there.
- **txd_oe** is high only during channel 1. `teop` is gated with it.
- **C Channel Status** receives the channel-1 byte, most significant bit first,
  once per frame.

This gives 8 HDLC line bits per 125 µs frame. In normal mode all strobes are high
on every clock and `txd_oe` is always 1.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `hdlc_transceiver` | `FIFO_DEPTH` | 30 | depth of both FIFOs |
| `hdlc_transceiver` | `HDLC_CHANNEL` | 1 | ST-BUS channel carrying HDLC |
| `tx_fifo` | `LOW_TH` | 4 | Tx "4 or fewer" threshold |
| `rx_fifo` | `HIGH_TH` | 26 | Rx "26 or more" threshold |

## Differences from the source paper, and choices it leaves open

The design implements the transceiver described in the article "Design and
Implementation of a High Bit Rate HDLC Transceiver Based on a Modified MT8952B
Controller". That article gives the block structure, register map, status
codes and modes, but not the internals of most blocks. The internals here are
this design's own.

- **FIFO depth.** The paper says the FIFOs hold 128 bits. Its own register
  descriptions ("Tx 4/30", "Rx 26/30", "26 bytes or more") only work with
  30-byte FIFOs, so 30 bytes is used.
- **Register bit numbers.** The paper gives the fields left to right without bit
  numbers. They are taken as bit 7 down to bit 0.
- **FCS convention.** The paper names CRC-CCITT but not the preset or whether the
  FCS is complemented. The usual HDLC convention is used: preset FFFF, complemented
  FCS, good-frame residue 1D0F. Data is sent LSB first.
- **Things the paper does not describe**, which are this design's choices:
  - bus timing
  - how interrupt flags clear
  - underrun handling
  - minimum frame length
  - how aborted frames are stored
  - the exact alignment of `f0i_n`
- **C Channel Control.** The paper says data for internal mode is written to
  C Channel Control, and also that only channel 1 is driven. This design keeps
  the HDLC stream in channel 1 and does not transmit the C Channel Control byte.
  The byte is stored, can be read back, and appears on `cch_ctrl`.
- **Added pins.** `irq` and `cch_ctrl` are not MT8952B pins.
- **Power-on reset.** There is no on-chip power-on reset circuit. Drive `rst_n`
  from an external one.

## Files

- `rtl/hdlc_pkg.sv`: types, register addresses, codes, CRC constants
- `rtl/hdlc_transceiver.sv`: top level
- `rtl/tx_fifo.sv`, `rtl/rx_fifo.sv`, `rtl/sync_fifo.sv`: FIFOs
- `rtl/tx_logic.sv`, `rtl/crc_ccitt.sv`, `rtl/zero_insertion.sv`,
  `rtl/flag_generator.sv`: transmit path
- `rtl/flag_detector.sv`, `rtl/zero_deletion.sv`, `rtl/address_detection.sv`,
  `rtl/rx_logic.sv`: receive path
- `rtl/register_file.sv`: host registers and interrupts
- `rtl/cchannel_interface.sv`: bit strobes and ST-BUS timing
- `tb/hdlc_tb_pkg.sv`: reference model. It builds an HDLC line bit stream from
  bytes (reflected CRC, stuffing, flags) and decodes a line back into frames.
- `tb/tb_<module>.sv`: a self-checking testbench for each module.
  `tb/tb_hdlc_transceiver.sv` runs the full design at its default parameters with
  TxD looped back to RxD. It covers both modes, both BRCK settings and every
  interrupt source.

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5 (or any IEEE 1800-2017 simulator), compile the package, the
testbench package and one testbench. `-y rtl` lets Verilator find the other
modules by file name. For example:

```
verilator --binary --timing -Wno-fatal -y rtl -Itb \
  rtl/hdlc_pkg.sv tb/hdlc_tb_pkg.sv tb/tb_hdlc_transceiver.sv \
  --top-module tb_hdlc_transceiver
./obj_dir/Vtb_hdlc_transceiver
```

The full-design testbench finishes in well under a second. Its last lines
count how often each mechanism occurred (frames, stuffed zeros, address drops,
aborts, underrun, overflow, every interrupt, idle and go-ahead detection, both
ST-BUS clock rates), followed by the `TB_RESULT` line.
