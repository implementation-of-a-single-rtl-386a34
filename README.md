# Single-channel HDLC controller

HDLC (ISO/IEC 13239) carries frames over a plain serial bit stream. It
needs no byte alignment on the line and no length field. A frame starts
and ends with the flag `0x7E`. The line stays transparent because a `0` is
inserted after any five consecutive `1`s inside a frame, so six `1`s in a
row only ever appear in a flag. A frame check sequence (FCS, a CRC-16 or
CRC-32) protects the address, control and information bytes. Seven `1`s
in a row abort a frame. A line held at `1` is idle.

This RTL is a full-duplex controller for one channel. It has a
transmitter that turns bytes from a FIFO into a framed, stuffed bit
stream, and a receiver that turns a bit stream back into bytes plus a
status byte per frame. Both work one line bit per clock. The controller
deals with framing only: address and control fields are ordinary bytes
to it, so their meaning is left to the host.

```
                 +----------------------- hdlc_tx (txclk) ------------------------+
tx_data_in[7:0]->| U2 hdlc_tx_buffer_crc -> U3 hdlc_tx_zero_insert -> U4 flag_gen |--> txdata
tx_end_of_file ->|   Reg_in, Latch_Buffer,      (stop_reading stalls U2)  Idle/Flag/|
tx_load       <--|   CRC, FCS shifter                                    Abort mux |
tx_start/abort ->| U1 hdlc_tx_control (FSM: FLAGGEN, txload, load_data, crc_send) |
                 +-----------------------------------------------------------------+
                 +----------------------- hdlc_rx (rxclk) ------------------------+
rxdata ------->  | U1 hdlc_rx_fa_detect  ->  U2 hdlc_rx_unstuff_crc               |--> rx_data_out[7:0]
                 |   Reg_buffer, flag/       zero removal, R_buffer, CRC check,   |    rx_data_valid
                 |   abort detect, FSM       octet check, SOP/EOP, status byte    |    rx_status_valid, sop, eop
                 +-----------------------------------------------------------------+
```

`hdlc_controller` places the two side by side. They share only `crc_sel`
(0 = CRC-16, 1 = CRC-32). Clocks and resets are separate. The unit
numbers U1 to U4 name the transmitter and receiver sub-units.

## Line format and CRC

Every field goes out least significant bit first. The flag is `0x7E`,
i.e. `0 1 1 1 1 1 1 0` on the line. The abort sequence is `0xFE`, i.e.
`0` followed by seven `1`s. When the line is idle it is held at `1`.

The CRC register runs in reflected (LSB-first) form. It is preset to all
ones and the FCS goes out complemented, low byte first. The receiver
does not look for the FCS bytes. It runs every byte of the frame, FCS
included, through the same CRC and compares the result with the fixed
residue a correct frame leaves: `0xF0B8` for CRC-16 and `0xDEBB20E3` for
CRC-32. These residues are computed at elaboration from the polynomials
(`hdlc_pkg::crc_residue`). The default 16-bit code is CRC-CCITT,
x^16+x^12+x^5+1, which is the usual HDLC FCS-16. The 32-bit code is the
standard x^32+x^26+...+x+1. Both polynomials are parameters (`POLY16`,
`POLY32`, reflected form). Setting `POLY16 = 16'hA001` gives the other
common CRC-16, x^16+x^15+x^2+1. `hdlc_crc_par` absorbs a whole byte in
one clock: it is the 8-step serial LFSR unrolled into an XOR network.

## Transmitter

### Host interface

The host asks for a frame by pulsing `tx_start` for one clock. The frame's
bytes wait in an external show-ahead FIFO. The current byte sits on
`tx_data_in`, and `tx_end_of_file` is high on the frame's last byte. The
transmitter takes the byte at the rising edge where it drives `tx_load`
high, and the FIFO must show the next byte by the following clock. Pulsing
`tx_abort` cancels the frame being sent. `crc_sel` must not change during
a frame.

### The FSM (`hdlc_tx_control`)

| state | line | leaves on |
|---|---|---|
| `TX_READY` (reset) | idle 1s | `tx_start` |
| `TX_SYNCHRO` | flags | last bit of a flag, if a frame is waiting |
| `TX_DATA` | data bytes | loading the byte marked `tx_end_of_file` |
| `TX_SEND_CRC` | last byte, then FCS | FCS fully out |
| `TX_ABORT` | `0xFE` once | end of the abort sequence, to `TX_READY` |

The flag generator (`hdlc_tx_flag_gen`) is a multiplexer selected by
`FLAGGEN`. It picks idle 1s, flags, the abort pattern, or the stuffed data
stream, and it reports the first bit of a flag (`start_flag`), the last
bit of a flag (`flag_last`) and the end of an abort (`end_abort`). The
data bytes follow the opening flag with no gap:

* At `start_flag` the controller pulses `tx_load`, and the first byte
  enters `Reg_in`.
* At `flag_last` it pulses `load_data`. The byte moves into the
  `Latch_Buffer`, and in the same clock it is folded into the CRC.
* Every time a byte's eighth bit leaves, the next `load_data` follows at
  once. One clock later `tx_load` refills `Reg_in`, unless the byte just
  loaded was the last one.
* When the last byte has gone out, `crc_send` loads the complemented CRC
  into the FCS shift register (16 or 32 bits) and presets the CRC for the
  next frame.

After the FCS the FSM goes back to `TX_SYNCHRO`, and that flag closes the
frame. A `tx_start` that arrived while the frame was being sent is
remembered, so the next frame begins straight after this one flag: the
two frames share it. With no frame waiting, the transmitter keeps sending
flags. It only returns to idle 1s after a reset or an abort.

### Zero insertion and stalls

`hdlc_tx_zero_insert` keeps the last five bits sent. When they are all
`1` it sends a forced `0` and raises `stop_reading`. For that clock the
serializer and FCS shifter hold their bit, so nothing is lost. The whole
data path is therefore a bit pipeline that stalls one clock for each
inserted zero.

One corner case needs care: the last five bits of the FCS may all be `1`.
The inserted `0` must then still go out before the closing flag. The
zero inserter warns of this one clock ahead with `stuff_next`, and the
controller waits one extra clock (`tail`) before it switches to flags.

### Timing

* The first bit of the opening flag appears on `txdata` two clocks after
  the edge that samples `tx_start` in `TX_READY`.
* After that the line carries, back to back: 8 flag bits, then 8 bits per
  byte plus one per inserted zero, then 16 or 32 FCS bits (plus inserted
  zeros), then the closing flag.
* `txdata` is registered.

## Receiver

### Flag and abort detection (`hdlc_rx_fa_detect`)

Each line bit shifts into the 8-bit `Reg_buffer`. The register holding
`0x7E` means a flag; its newest seven bits all `1` mean an abort (or an
idle line).

The same register also works as an 8-bit delay line. The bit shifted out
of it is what goes on to the rest of the receiver. When a closing flag
completes in the register, every bit of the frame has already left it
and none of the flag's bits have. So the flag never has to be removed
from the data afterwards.

The FSM:

* **`RX_IDLE`** after reset. A flag moves it to `RX_SYNCHRO`.
* **`RX_SYNCHRO`** waits for eight bits after the last flag:
  * Another flag, at any bit position, restarts the wait. Repeated flags
    and flags sharing a zero are both accepted.
  * Seven `1`s send it back to `RX_IDLE` with no status.
  * Eight bits that are not a flag mean the last flag opened a frame. It
    raises `frame_start` and moves to `RX_RECEIVING`. Those eight bits
    are still in the delay line, so none of the frame is lost.
* **`RX_RECEIVING`** passes each bit that leaves the register on to U2:
  * A flag ends the frame. `frame_end` comes with the frame's last bit,
    and the FSM returns to `RX_SYNCHRO`, so the closing flag can open the
    next frame.
  * Seven `1`s move it to `RX_ABORT` for one clock, and then to
    `RX_IDLE`.

### Bytes, CRC and status (`hdlc_rx_unstuff_crc`)

`hdlc_rx_zero_remove` drops the `0` that follows five `1`s. It uses a
count of `1`s that saturates at 5 and a comparator. The remaining bits
fill the 8-bit `R_buffer`. Each complete byte goes through the
byte-parallel CRC.

The receiver cannot tell that a byte is the frame's last until the
closing flag arrives, and it must mark that byte with `eop`. So each
complete byte is held back:

* It is delivered (`rx_data_valid` for one clock) when the next byte is
  complete.
* Or it is delivered with `eop` when the closing flag is seen.
* If the flag arrives on the very bit that completes a byte, the held
  byte goes out at once and the new byte, with `eop`, goes out one clock
  later.

The first byte of a frame carries `sop`. The FCS bytes are delivered
like any others, so a frame of N bytes gives N+2 (CRC-16) or N+4
(CRC-32) bytes followed by a status byte.

Eight clocks after `eop`, `rx_data_out` carries the status byte, with
`rx_data_valid` and `rx_status_valid` both high:

| bit | meaning |
|---|---|
| 0 | CRC error: the residue does not match |
| 1 | octet error: the frame is not a whole number of bytes (the spare bits are dropped) |
| 2 | abort detected |
| 7..3 | reserved, 0 |

After an abort inside a frame the status `0x04` comes one clock later.
The bytes already delivered stay delivered, the byte held back is
dropped, and no `eop` is given.

Latency: a byte comes out about 8 line bits after its last bit (the hold
until the next byte completes), plus 10 clocks: 8 in `Reg_buffer` and one
register stage in each unit.

## Where this design makes its own choices

The unit split, the signal names (`Txload`, `Load_Data`, `FLAGGEN`,
`Start_FLAG`, `End_Abort`, `stop_reading`, `crc_sel`, `length_packet`,
`RX_status_valid`, SOP/EOP), the FSM states, the status byte layout and
the eight-clock status delay follow the controller as it was specified.
The following are choices made here:

* **16-bit CRC:** the default is CRC-CCITT. x^16+x^15+x^2+1 is one
  parameter away.
* **CRC details:** presetting to all ones, the complemented FCS and the
  residue check are the usual HDLC convention.
* **Encodings:** the `FLAGGEN` encoding, and the flag generator using a
  bit counter rather than a rotating shift register.
* **Added signals:**
  * `flag_last` and `stuff_next`.
  * The controller's pending, refill and tail bookkeeping.
  * The wait for a zero still owed after the FCS.
* **Receiver delay line:** `Reg_buffer` doubles as a delay line, and
  `RX_SYNCHRO` waits eight bits after a flag.
* **Byte hold-back:** it stands in for the start and lock (*verrou*)
  signals that originally placed SOP and EOP.
* **Zero removal:** it sits in U2, together with the CRC.
* **Counter and stops:** the 1s counter saturates at 5 instead of being a
  modulo-5 counter. Seven `1`s while only flags are on the line stop
  reception silently.
* **Interfaces and reset:** one `crc_sel` for both directions; the
  show-ahead FIFO interface; synchronous, active-high resets.

Not included:

* The FIFO and host processor. Their signals are ports.
* Any handling of address or control fields.
* An FPGA mapping. The original implementation reports about 344 logic
  cells for the transmitter and 318 for the receiver on a Cyclone II
  EP2C35, at 41.6 MHz and 199 MHz. None of this was re-measured here.

## Files

`rtl/`:

* `hdlc_pkg.sv`: types, sequences and CRC functions.
* `hdlc_crc_par.sv`: byte-parallel CRC unit.
* Transmitter units `hdlc_tx_*.sv`, and `hdlc_tx.sv` for the whole
  transmitter.
* Receiver units `hdlc_rx_*.sv`, and `hdlc_rx.sv` for the whole receiver.
* `hdlc_controller.sv`: the top level.

`tb/`:

* One self-checking testbench per module (`tb_<module>.sv`).
* `hdlc_tb_pkg.sv`, which holds an independent reference model:
  * a textbook MSB-first CRC on bit-reversed data;
  * a framer with bit stuffing;
  * a deframer.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a
watchdog. What each one covers:

* **CRC unit:** the standard check values of `"123456789"`, then random
  messages against the reference.
* **Transmitter:** the exact line bits of frame `FE 02`. Back-to-back
  frames with both CRC sizes are parsed by the deframer. An abort must put
  seven `1`s on the line and then idle.
* **Receiver:** good frames, a flipped bit, three extra bits and aborts.
  Bytes, `sop`/`eop`, status values and the eight-clock status delay are
  all checked.
* **Controller loopback** (`tb_hdlc_controller`, default parameters): it
  counts each mechanism and fails if any never happened:
  * zero insertion with its stall, and zero removal;
  * shared flags, and flag fill between frames;
  * CRC-16 and CRC-32 frames;
  * CRC error and octet error;
  * abort sent and detected, and abort while only flags are on the line.

Every testbench was also run against a deliberately broken copy of its
module and failed.

Simulate with Verilator 5. For example, the full loopback:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/hdlc_pkg.sv tb/hdlc_tb_pkg.sv rtl/hdlc_crc_par.sv rtl/hdlc_tx_*.sv rtl/hdlc_tx.sv \
  rtl/hdlc_rx_*.sv rtl/hdlc_rx.sv rtl/hdlc_controller.sv tb/tb_hdlc_controller.sv \
  --top-module tb_hdlc_controller -o sim && ./obj_dir/sim
```

The other testbenches are built the same way, with their module and
`--top-module tb_<module>`. The simulation is two-state, and every
register that is read has a reset.
