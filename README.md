# FlexRay communication controller with an EEDC frame trailer

A standard FlexRay frame ends in a 24-bit CRC. The CRC costs 24 bits on every
frame whatever its length, and it can only detect errors: a corrupted frame
is discarded and must be sent again. This controller replaces that trailer
with an **EEDC** (enhanced error detection and correction) code. The number
of check bits `r` grows with the frame length, so a frame carries only as
much redundancy as its size needs. The receiver also uses the check bits to
**correct** any single-bit error, and it **detects** every two-bit error and
every error burst of up to `r` bits.

Apart from the trailer, the design is an ordinary single-channel FlexRay
controller:

* an OPB slave user interface with interrupts;
* a controller host interface with registers, 128 transmit buffers,
  128 filtered receive buffers and a receive FIFO with four mask/data
  acceptance filters;
* a protocol engine with the POC state machine, the cycle/slot timer (MAC),
  the bitstream encoder (frames and symbols) and decoder, and frame and
  symbol processing.

Everything is synthesizable SystemVerilog in `rtl/`. Each module has a
self-checking testbench in `tb/`.

## 1. The EEDC code

### How many check bits

A frame has `D` data bits: the 5 header bytes plus the payload bytes. The
code uses the smallest `r` that satisfies

    D + r + 1 <= 2^r

This is the single-error-correcting (Hamming) bound. With `r` check bits
there are `2^r - 1` non-zero syndromes, and that is enough to name every one
of the `D + r` codeword bits.

### How the check bits are computed

The check bits are not interleaved with the data, as in a classic Hamming
layout. They are formed as in a CRC and placed after the data:

    G(x)    = D(x) * x^r
    r(x)    = G(x) mod p(x)
    codeword = G(x) + r(x)

`p(x)` is a primitive polynomial of degree `r`. Because it is primitive, the
powers `x^0 .. x^(2^r - 2)` modulo `p(x)` are all different. The codeword is
therefore a shortened cyclic Hamming code with minimum distance 3.

| r | p(x) | low-term mask (`eedc_poly`) |
|---|------|------|
| 6 | x^6 + x + 1 | 0x03 |
| 7 | x^7 + x + 1 | 0x03 |
| 8 | x^8 + x^4 + x^3 + x^2 + 1 | 0x1D |
| 9 | x^9 + x^4 + 1 | 0x11 |
| 10 | x^10 + x^3 + 1 | 0x09 |
| 11 | x^11 + x^2 + 1 | 0x05 |
| 12 | x^12 + x^6 + x^4 + x + 1 | 0x053 |

For FlexRay frame sizes, `r` runs from 6 to 12:

| payload bytes | data bits D | r | trailer bytes |
|---|---|---|---|
| 0 | 40 | 6 | 1 |
| 2 .. 24 | 56 .. 232 | 7 .. 8 | 1 |
| 26 .. 120 | 248 .. 1000 | 9 .. 10 | 2 |
| 122 .. 248 | 1016 .. 2024 | 11 | 2 |
| 250 .. 254 | 2040 .. 2072 | 12 | 2 |

The `r` check bits are sent as whole bytes, right-aligned with leading zeros.
This keeps the byte-oriented FlexRay coding. The trailer is therefore 1 or 2
bytes instead of the CRC's 3.

A full 254-byte frame is 2622 bits on the wire with an EEDC trailer, against
2632 bits with the 24-bit CRC. A header-only frame is 72 bits instead of 92.

### Encoder (`eedc_encoder`)

A linear-feedback divider processes one data byte per clock, in 8 bit steps,
MSB first. `start` loads the byte count and clears the remainder. After the
last `in_valid` byte, `done` rises on the next clock. `r_bits` then holds
`r(x)` and `r_len` holds `r`, and both stay valid until the next `start`.

### Checker and corrector (`eedc_decoder`)

1. The same divider runs over the received data bytes.
2. When `chk_valid` presents the received check bits, the syndrome is
   formed: `S = recomputed r(x) XOR received r(x)`.
   * `S = 0`: the codeword is accepted and `done` pulses on the next clock.
   * `S` non-zero: a serial locator starts. It steps `v = x^j mod p(x)` for
     `j = 0, 1, ...`, one position per clock, until `v = S`.
3. Mapping the position `j` back to a bit:
   * `j < r`: the error is in the trailer itself.
   * otherwise: the error is in data byte `nbytes-1-(j-r)/8`, bit `(j-r)%8`.
4. If no position within the shortened length matches, the error is
   reported as uncorrectable.

Latency is at most `D + r + 1` clocks after the check bits arrive. For a
254-byte payload that is 2085 clocks. This is well inside one frame time at
8 clocks per bit.

Two-bit errors always give a non-zero syndrome, so they are always flagged.
Such an error may, however, match one position and be "corrected" wrongly.
This is the usual limit of a distance-3 code.

## 2. Frame format and bit coding

The header is 5 bytes, sent MSB first (`frame_hdr_t` in `flexray_pkg`):

| bits | field |
|---|---|
| 39 | reserved |
| 38 | payload preamble |
| 37 | null frame indicator |
| 36 | sync frame |
| 35 | startup frame |
| 34:24 | frame ID (11 bits) |
| 23:17 | payload length in 16-bit words (7 bits) |
| 16:6 | header CRC (11 bits) |
| 5:0 | cycle count (6 bits) |

After the header come 0..254 payload bytes and then the EEDC trailer. The
first two payload bytes serve as the message ID for receive filtering.

The header CRC is written by the host and sent unchanged; the controller
does not compute or check it. The encoder overwrites the cycle count with
the cycle in which the frame is actually sent.

On the wire (`bse_frame_encoder`, `bsd_bit_decoder`) the coding is:

* TSS: 9 low bits;
* FSS: one high bit;
* every byte: a BSS (high, low) followed by its 8 bits, MSB first;
* FES: low, high.

Each bit lasts 8 clocks (`SAMPLES_PER_BIT`). The receiver:

* takes a 5-sample majority vote;
* re-aligns its bit clock on the falling edge at frame start and in every BSS;
* strobes each bit at sample 4;
* reports channel idle after 11 high bits.

### Symbols

Symbols are plain low phases with no bytes inside them:

| symbol | pattern on the wire |
|---|---|
| CAS (collision avoidance) and MTS (media test) | 30 low bits, then the driver is released |
| WUS (wakeup) | 60 low bits then 180 released (idle) bits, twice |

The decoder measures every low phase that is too long for a TSS (16 bits or
more) and ends in a high bit:

| low phase | reported as |
|---|---|
| 26..40 bits | CAS/MTS |
| 50..70 bits | one WUS phase |
| any other length | decoding error |

## 3. Transmit path

* **`tx_buffers`** holds 128 frames of 259 bytes (header and payload), which
  the host writes byte by byte. A buffer takes part in transmission once the
  host commits it as ready, and stays ready until it is withdrawn. Each
  clock, a lookup finds the lowest-numbered ready buffer whose frame ID
  equals the current slot.
* **`mac_timer`** runs the communication cycle, counting 64 cycles (0..63):
  * the static segment: `N_STATIC` slots of `STATIC_SLOT_MT` macroticks;
  * the dynamic segment: `N_MINISLOTS` minislots of `MINISLOT_MT` macroticks;
  * the symbol window;
  * the network idle time.

  In the dynamic segment a slot lasts one minislot while the bus is quiet.
  While a frame is on the bus, the slot is stretched by whole minislots. The
  timer gives one-clock strobes for the cycle, each segment start and each
  slot boundary.
* **`bse_frame_encoder`** starts at a slot boundary when all of these hold:
  * the POC is normal active;
  * the lookup hits;
  * the encoder is not busy.

  It reads the buffer one byte per clock, feeds the header and payload bytes
  to `eedc_encoder`, serialises them, and then sends the trailer and the FES.
  While sending it drives `tx` with `tx_en` high.
* **`bse_symbol_encoder`** sends a symbol that the host has requested
  through SYM_CMD. The request stays pending until the schedule allows it:
  * an MTS at the start of the symbol window, in normal active;
  * a CAS at once, in the startup state;
  * a WUS in the wake-up state, once the bus is idle.

  Its `tx`/`tx_en` are combined with those of the frame encoder. The two are
  never active together.

## 4. Receive path

* **`bsd_bit_decoder`** turns `rx` into `frame_start`, `byte_valid` and
  `byte_data`, `frame_end` and `dec_error`. It also reports symbols on
  `sym_cas_mts` and `sym_wus`.
* **`fsp_frame_checker`** collects one frame:
  * It stores the header in registers and the payload in a 254-byte memory.
  * It starts the EEDC decoder once the length field is known (after header
    byte 2) and replays bytes 0..2 into it.
  * It latches the slot and cycle at frame start.

  At the end of the frame it produces one status word:
  * **syntax error:** a decoding error, or a byte count that does not match
    the length field;
  * **content error:** the frame ID differs from the slot, or the cycle count
    differs from the current cycle;
  * **boundary violation:** a slot boundary passed while the frame was being
    received;
  * **EEDC corrected:** the decoder located a single-bit error. If it was in
    a header or payload bit, that bit is flipped before the frame is passed
    on.
  * **EEDC uncorrectable:** the decoder found an error it could not locate.
  * **valid frame:** none of the errors above; a corrected frame still
    counts as valid.

  The node ignores its own frames. A frame that starts while the previous
  one is still being checked is dropped and counted in `dropped`.

  Symbols are checked against the schedule:
  * a CAS/MTS is valid inside the symbol window in normal operation, and at
    any time outside normal operation (a startup CAS);
  * a WUS phase is valid only outside normal operation.

  A valid symbol is counted in SYM_STATUS and raises an interrupt event.
  Symbols that arrive while the node transmits, or within 64 clocks after it
  stops, are the node's own and are ignored.
* **`rx_buffers`**: 128 buffers. Each has a filter that can require an exact
  frame ID, cycle count or message ID, in any combination. A valid frame goes
  to the lowest-numbered matching buffer, and that buffer's new-data flag is
  set.
* **`rx_fifo`** takes valid frames that no buffer took, provided one of four
  acceptance pairs passes. A pair passes when
  `((field ^ data) & mask) == 0` for the frame ID, the cycle and the message
  ID. The FIFO holds `DEPTH` (8) whole frames. A frame that arrives when the
  FIFO is full sets the sticky overflow flag.

## 5. Protocol operation control (`poc_fsm`)

Host commands and the external startup and clock-sync results move the
controller between these states:

| from | event | to |
|---|---|---|
| default config | (next clock) | config |
| config | config done | ready |
| ready | config command | config |
| ready | wake-up command | wake-up |
| ready | run command | startup |
| wake-up | ready command | ready |
| startup | integration success | normal active |
| normal active | sync error | normal passive |
| normal passive | sync OK | normal active |
| normal active or passive | ready command | ready |
| normal active or passive | halt command | halt |
| any state | freeze command | halt |

Halt is left only by reset. Frames are sent only in normal active. Frames
are received, and the MAC timer runs, in both normal states.

## 6. Host interface

### OPB slave (`opb_ui`)

The controller is a 64 KiB window at `C_BASEADDR` (default `0x8000_0000`).
Timing of a transfer:

1. `OPB_select` is raised.
2. The address is registered.
3. The read data is captured.
4. `Sl_xferAck` pulses, 4 clocks after select.

`Sl_DBus` is zero except during the acknowledge.

The UI holds the interrupt registers itself:

* ISR at `0x008`: latches event pulses; writing 1 to a bit clears it;
* IER at `0x00C`: enables bits.

The interrupt is `irq = |(ISR & IER)`.

### Register map (`chi_regs`, word offsets)

| offset | name | access | content |
|---|---|---|---|
| 0x000 | POC_CMD | W | [2:0] command: 1 config, 2 ready, 3 wake-up, 4 run, 5 halt, 6 freeze, 7 config done |
| 0x004 | STATUS | R | [3:0] POC state, [9:4] cycle, [20:10] slot, [23:21] segment, [24] channel idle |
| 0x010 | RX_STATUS | R | status of the last frame: [5] valid, [4] syntax error, [3] content error, [2] boundary violation, [1] corrected, [0] uncorrectable; its frame ID in [26:16] |
| 0x014 | DROPPED | R | frames dropped while busy |
| 0x018 | TX_SEL | RW | Tx buffer shown in the Tx window |
| 0x01C | TX_COMMIT | W | [6:0] buffer, [8] ready |
| 0x020 | RXB_SEL | RW | selected Rx buffer |
| 0x024 | RXB_MSG | RW | message ID for the next filter write |
| 0x028 | RXB_FILTER | W | [0] enable, [1] use frame ID, [2] use cycle, [3] use message ID, [14:4] frame ID, [20:15] cycle |
| 0x02C / 0x030 | RXB_HDR / _HI | R | header of the selected Rx buffer |
| 0x034 | RXB_NEW | RW | new-data flag of the selected Rx buffer; write 1 to clear |
| 0x040 | FIFO_STAT | R | [0] empty, [15:8] count, [16] overflow |
| 0x040 | FIFO_STAT | W | [0] pop, [1] clear overflow |
| 0x044 / 0x048 | FIFO_HDR / _HI | R | header of the oldest FIFO frame |
| 0x050 .. 0x058 | ACC_FID / ACC_CYC / ACC_MSG | RW | staged mask and data of an acceptance pair |
| 0x05C | ACC_SET | W | [1:0] pair, [2] enable: loads the staged pair |
| 0x060 | SYM_CMD | W | [0] request a CAS/MTS, [1] request a WUS |
| 0x064 | SYM_STATUS | R | [7:0] valid CAS/MTS received, [15:8] valid WUS phases received (wrapping counters) |
| 0x1000 + 4k | Tx window | W | byte k of the selected Tx buffer (header bytes 0..4, then payload) |
| 0x2000 + 4k | Rx window | R | payload byte k of the selected Rx buffer |
| 0x3000 + 4k | FIFO window | R | payload byte k of the oldest FIFO frame |

Interrupt event bits in ISR:

| bit | event |
|---|---|
| 0 | valid frame |
| 1 | syntax error |
| 2 | content error |
| 3 | boundary violation |
| 4 | EEDC correction |
| 5 | EEDC uncorrectable |
| 6 | frame or symbol sent |
| 7 | FIFO overflow |
| 8 | new data in an Rx buffer |
| 9 | valid symbol received |

### Typical use

1. After reset the POC passes from default config to config by itself.
2. Write the frames through TX_SEL and the Tx window, then commit them.
3. Set up the Rx filters and acceptance pairs.
4. Write POC_CMD = config done (to ready), then run (to startup).
5. Pulse `integration_ok`, normally done by the startup logic; the node is
   then normal active.

## 7. Top level (`flexray_cc_top`)

The top wires the blocks together:

    OPB -> opb_ui -> chi_regs -> tx_buffers / rx_buffers / rx_fifo / poc_fsm
    mac_timer -> bse_frame_encoder (+eedc_encoder) + bse_symbol_encoder -> tx, tx_en
    rx -> bsd_bit_decoder -> fsp_frame_checker (+eedc_decoder) -> rx_buffers, rx_fifo

The parts below are not included. Their connections are ports of the top:

* **Wakeup/startup and clock synchronisation.** Their outcomes enter on
  `integration_ok`, `sync_ok` and `sync_error`.
* **The bus transceiver.** It connects to `tx`, `tx_en` and `rx`.

Parameters and defaults:

| parameter | default |
|---|---|
| `N_TX_BUF` | 128 |
| `N_RX_BUF` | 128 |
| `FIFO_DEPTH` | 8 |
| `SAMPLES_PER_BIT` | 8 |
| `TSS_BITS` | 9 |
| `CLKS_PER_MT` | 80 (1 µs macrotick at 80 MHz) |
| `N_STATIC` | 8 |
| `STATIC_SLOT_MT` | 300 (a full 254-byte frame fits) |
| `N_MINISLOTS` | 50 |
| `MINISLOT_MT` | 8 |
| `SYMBOL_MT` | 20 (200 bits, room for a 30-bit MTS) |
| `NIT_MT` | 20 |

At the defaults, yosys reports about 6.1k generic cells, 13k flip-flop bits
and 545 kbit of memory. Almost all of that memory is the two sets of 128
frame buffers.

## 8. Simulation

Every testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog
that fails it if it hangs. With Verilator 5:

    verilator --binary --timing -j 0 rtl/flexray_pkg.sv rtl/*.sv tb/tb_flexray_cc_top.sv \
              --top-module tb_flexray_cc_top -o sim && ./obj_dir/sim

(`flexray_pkg.sv` must come first; listing it twice is harmless.) For a
single block, list only the package, the block, its sub-modules and its
testbench.

| testbench | what it covers |
|---|---|
| `tb_eedc_encoder`, `tb_eedc_decoder` | reference long division; every kind of single error located; double errors detected; latency bound |
| `tb_eedc_detection` | payloads of 25..250 bytes; single, double and burst errors must all be caught; detected share of random 3..8-bit errors printed per size |
| `tb_bse_frame_encoder`, `tb_bsd_bit_decoder` | bit-exact frame coding and decoding, including noise spikes; symbol lengths |
| `tb_bse_symbol_encoder` | CAS/MTS and WUS patterns sample by sample; requests held until allowed |
| `tb_fsp_frame_checker` | each status outcome, correction of payload, header and trailer bits, own frames ignored |
| `tb_flexray_cc_top` | two controllers on a wired-AND bus at reduced sizes; counts each mechanism (see below) |
| `tb_flexray_cc_full` | all defaults; a 254-byte frame to Rx buffer 127, a short frame to the FIFO, frame length checked |
| other `tb_*` | one per block |

`tb_flexray_cc_top` counts frames with 1- and 2-byte trailers, Rx buffer
storage, FIFO storage, EEDC correction, FIFO overflow, dynamic slot
stretching, the normal-passive state, interrupts, halt, a wakeup symbol
received by the other node, and a media test symbol in the symbol window. A mechanism that
never happens counts as a failure.

## 9. Departures and limits

* **The EEDC polynomials, the byte padding of the trailer and the receiver
  algorithm are this design's own reading of the code.** The sizing rule
  `D + r + 1 <= 2^r` and the form `D(x)*x^r + r(x)` are the defining parts.
  Both are honoured, and the result is a standard shortened Hamming code.
  Detection figures from other implementations depend on their error model
  and are not reproduced here.
* **The checker processes one frame at a time.** The locator can take up to
  2085 clocks after a long frame ends. A frame that starts within that time
  is dropped and counted. At default timing, frames in consecutive static
  slots are far enough apart. Several locator steps per clock would shorten
  this.
* **Some header errors cannot be corrected.** A bit error in the
  payload-length field changes the expected byte count, so it is reported
  as a syntax error instead.
* **Symbols are sent on request only.** The wakeup and startup procedures
  (wakeup listen, coldstart, integration) are external, so the controller
  never decides by itself to send a CAS or WUS. The "TX conflict"
  indication is not produced.
* **Single channel only.** There is also no action-point offset: a frame
  starts at its slot boundary.
* **Fixed timing.** Wakeup, startup and clock synchronisation (rate and
  offset correction) are external, so the macrotick is a fixed number of
  clocks.
* **Halt is final.** It can only be left by reset.
* **Fixed buffer sizes.** Every buffer holds a maximum-length frame; there
  is no payload-size parameter that trades buffer count for size. The FIFO
  depth counts frames, not bytes.
