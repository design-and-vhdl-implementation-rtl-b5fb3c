# HDLC controller in SystemVerilog

This is a bit-oriented HDLC link controller. A host hands it a data word and
a station address. The transmitter packs them into a frame, computes a
CRC-16 or CRC-32 frame check sequence (FCS) over the frame and appends it.
The frame goes out on a single serial line between `01111110` flags. The
receiver at the other end finds the flags and strips the padding bits. It
divides the frame by the same polynomial and hands data and address to its
host only when the remainder is zero. Frames with errors are dropped and
reported in a status register.

The design is a SystemVerilog rendering of a small VHDL HDLC controller
described for a Spartan-6 FPGA. That source gives the frame layout, the
register and signal names, and worked examples with their CRC values. It
does not give an implementation. The block structure, the timing and
everything listed under [Departures and open points](#departures-and-open-points)
are this design's own.

## Frame on the line

```
 ... flag | data (DATA_W) | address (8/16 of ADDR_W) | FCS (16/32) | flag ...
          |<----------- zero insertion applies to all of this ------->|
```

* **Field order.** Data comes first, then the address. This matches the
  source's worked examples. It is not the address-first order of ISO HDLC.
  Each field is sent most significant bit first. There is no HDLC control
  field in the frame (see below).
* **Address width** is chosen per frame by the control register. In the
  long format the address is the whole ADDR_W-bit register (16 bits by
  default). In the short format it is only the low half (8 bits). The
  register is written as two halves.
* **FCS.** This is the remainder of `{data, address} * x^W` divided by
  the generator polynomial:

  | W  | polynomial                      | hex          |
  |----|---------------------------------|--------------|
  | 16 | x^16 + x^15 + x^2 + 1           | `0x8005`     |
  | 32 | IEEE 802.3 CRC-32 generator     | `0x04C11DB7` |

  The division is plain. The remainder starts at zero, and nothing is
  reflected or inverted. The source does not name its polynomials. These
  two, with these settings, reproduce all three of its worked examples:

  | data       | address            | FCS                                   |
  |------------|--------------------|---------------------------------------|
  | `00001110` | `11110000`         | CRC-16 `1010011000100011` (`A623`)    |
  | `00110011` | `1111000011110000` | CRC-16 `1010000111010011` (`A1D3`)    |
  | `11110000` | `11110000`         | CRC-32 `0x7A80E4E8`                   |

* **Transparency.** After five consecutive ones the transmitter inserts a
  `0`, so a flag can never appear inside a frame. The receiver deletes the
  `0` that follows five ones. Seven ones in a row abort the frame.
* **Idle line.** Between frames the transmitter sends flags back to back.
  The flag after a frame closes it, and the flag before the next frame
  opens that one.

## Registers

The control register is 5 bits wide, `hdlc_pkg::ctrl_t`. The transmitter
and the receiver each have their own.

| bit | name     | meaning                                                         |
|-----|----------|-----------------------------------------------------------------|
| 4   | `crc32`  | 1: CRC-32 FCS, 0: CRC-16                                        |
| 3   | `rsvd`   | unused                                                          |
| 2   | `addr16` | 1: long address (all of ADDR_W), 0: short (low half)            |
| 1   | `proto`  | 1: HDLC mode with FCS, 0: transparent mode, no FCS              |
| 0   | `en`     | transmitter: a write with `en=1` starts a frame; receiver: enable |

Bits 2 and 4 come from the source's control values `00011` (short address,
CRC-16), `00111` (long address, CRC-16) and `10011` (short address, CRC-32).
The source always sets bits 0 and 1 but does not say what they do. The
meanings given here are this design's own.

The receiver status register is `hdlc_pkg::rx_status_t`. Every bit except
`addr_match` is sticky until the host pulses `wrxstatus`:

| bit | name         | set when                                                   |
|-----|--------------|------------------------------------------------------------|
| 4   | `addr_match` | the last good frame's address equals the station address  |
| 3   | `aborted`    | seven ones arrived inside a frame                          |
| 2   | `len_err`    | frame length did not fit the configured format, dropped    |
| 1   | `crc_err`    | the division left a remainder, frame dropped               |
| 0   | `frame_ok`   | a good frame was delivered                                 |

## Transmit path (`hdlc_tx`, `bit_stuffer`, `crc_lfsr`)

The host writes the address halves (`wrtaddrlo`/`wrtaddrhi` with
`txaddressin1`/`txaddressin2`) and then the control register (`wrtctrl`
with `txctrlin`). The address may also be written in the same cycle as the
control register. A control write with `en=1` captures `datain` and starts
the frame. The sequence after the write edge is:

1. MLEN clocks of division. The message `{data, address}` shifts one bit
   per clock into `crc_lfsr`. MLEN is DATA_W plus the address bits.
2. One clock to append the remainder behind the message. `crc1` shows the
   new FCS MLEN + 1 clocks after the write.
3. One clock to hand the frame to `bit_stuffer`. The stuffer finishes the
   flag it is sending, then shifts the frame out at one bit per `tx_bit_en`,
   with zero insertion.

`tx_busy` stays high until the last frame bit is on the line, and
`tx_done` pulses then. Start requests while busy are ignored. In transparent
mode the division is skipped and the frame is just `{data, address}`.

The division runs at clock rate, not at line rate. So a frame reaches the
stuffer long before the current flag ends unless the line runs close to one
bit per clock.

## Receive path (`hdlc_rx`, `bit_destuffer`, `crc_lfsr`)

This is the part that most needs explaining.

**Keeping flags out of the frame.** The line enters an 8-bit window in
`bit_destuffer`. A bit becomes a frame bit only when it leaves a full
window. When the window holds exactly `01111110`, that is a boundary: the
window is emptied, so no flag bit is ever delivered. The bit that left the
window in that same cycle is the closing frame's last bit. Each frame bit
therefore comes out 8 line bits after it arrived. Zero deletion works on the
delivered stream: a `0` after five delivered ones is dropped. If the window
shows seven ones, the frame is aborted. The deframer then hunts and delivers
nothing until the next flag. It also hunts after reset, so an idle line of
all ones is harmless.

**Judging a frame.** Every delivered bit shifts into a frame register and
into a second `crc_lfsr`. The FCS goes through the divider along with the
message. The remainder of `(M·x^W + FCS)·x^W` is zero exactly when the frame
shows no detectable error, so the same divider serves as generator and checker. The
frame is judged one clock after the closing flag, when the divider has taken
the last bit. The next frame's bits cannot arrive for another 8 line bits, so
nothing overlaps. An assertion checks this. The frame register is read at
offsets computed from the receiver's own control register:

* wrong length: `len_err`, the frame is dropped
* nonzero remainder in HDLC mode: `crc_err`, the frame is dropped
* otherwise `rxdataout` and `rxaddressout` are updated, `rx_valid` pulses
  and `frame_ok` is set. `rxaddressout` is right aligned, with the upper
  half zero for a short address.

Dropped frames leave the outputs unchanged. `crc2` shows the remainder of
the last judged frame. With one line bit per clock, `rx_valid` comes 9
clocks after the last frame bit: 8 for the closing flag and 1 to judge.

The receiver has to be configured with the same format as the sender,
because the frame carries no format information.

## Top level (`hdlc_controller`)

The transmitter (`u1`) and the receiver (`u2`) share only clock and reset,
so the controller can send and receive at the same time (full duplex).
`txd` is the line out and `rxd` the line in. When `loopback` is set, the
receiver listens to `txd` and uses `tx_bit_en`. A single controller can then
check its own frames.

The physical layer supplies the bit timing. `tx_bit_en` and `rx_bit_en` are
one-clock enables, one per line bit, at most one per clock. Reset is
asynchronous and active high. The top also brings out `tx_in_frame`,
`tx_stuffed` and `rx_deleted` for observation.

Parameters (on `hdlc_controller`, `hdlc_tx` and `hdlc_rx`):

| parameter | default | meaning                                                |
|-----------|---------|--------------------------------------------------------|
| `DATA_W`  | 8       | data field width                                       |
| `ADDR_W`  | 16      | address register width; the short address is half of it |

The defaults are the source's main configuration: 8-bit data with an 8- or
16-bit address and CRC-16 or CRC-32. The source also lists 16-bit data with
16-bit address, and 32-bit data with 32-bit address. They are the same RTL
with `DATA_W=16, ADDR_W=16` and `DATA_W=32, ADDR_W=32`. Both are simulated.

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. Each has a watchdog. Build and run one
with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hdlc_pkg.sv tb/hdlc_ref_pkg.sv tb/hdlc_controller_tb.sv \
    --top-module hdlc_controller_tb -o sim
./obj_dir/sim
```

| testbench                  | what it does                                                                 |
|----------------------------|------------------------------------------------------------------------------|
| `crc_lfsr_tb`              | worked examples, random messages against a long division, zero check         |
| `bit_stuffer_tb`           | random frames (some all ones): exact stuffed bits, opening and closing flags  |
| `bit_destuffer_tb`         | random stuffed frames, multiple flags, aborts, idle ones before the first flag |
| `hdlc_tx_tb`               | worked examples, all formats, FCS timing, start while busy                    |
| `hdlc_rx_tb`               | worked examples, all formats, flipped bit, wrong length, abort, station address, disabled receiver |
| `hdlc_controller_tb`       | default parameters, end to end: loopback, damaged external line, full duplex; counts every mechanism |
| `hdlc_controller_wide_tb`  | 16/16 and 32/32 builds side by side in loopback                               |

The testbenches compare against `tb/hdlc_ref_pkg.sv`. This independent
model computes the FCS by long division of a wide vector and builds stuffed
bit streams from bit queues. Line bit enables are random in most tests, and
every testbench runs in well under a second.

## Departures and open points

* **No HDLC control field, no frame types, no EA address extension.** The
  source mentions these in passing, but its frames carry only data, address
  and FCS. Address width is chosen by the control register.
* **Transparent mode** is read as "no FCS": no FCS is appended or checked.
  Flags and zero insertion remain, because the receiver needs them to find
  frames.
* **Discarding versus presenting.** The source says both that errored frames
  are discarded and that all received frames are presented to the host.
  This design drops frames that fail the FCS or length check, and presents
  every other frame, whatever its address.
* **Station address.** The receiver has station-address registers only to
  set `addr_match`. It does not filter frames.
* **Abort on seven ones, the status register and `wrxstatus` as a clear
  strobe** are additions in the usual HDLC manner. The source shows these
  signals without describing them.
* **One clock.** The source's waveforms show two clocks. This design uses
  one clock with per-direction bit enables. Clock recovery and line coding
  belong to the physical layer and are not included.
* **Half duplex** needs no logic of its own: it is a link using one
  direction at a time.
* The source gives no timing or rate figures to check against. The cycle
  counts above are properties of this RTL.
