# An IEEE 802.11 MAC controller in plain logic

This is a complete medium access controller for IEEE 802.11 wireless LAN.
It is built from finite-state machines, counters and CRC logic, and it has
no embedded processor or firmware. Two parts of the protocol must react
within microseconds:

- Carrier sense with random backoff (DCF, the distributed coordination
  function).
- The ACK and CTS replies that must go out exactly one SIFS after a
  received frame.

Doing these in hardware means a small host driver never has to meet those
deadlines. The controller also generates three management frames by itself:
Beacon, ATIM and Probe Response. It keeps the timing synchronisation (TSF)
timer too. The host only has to:

- write outgoing frames into a buffer memory,
- read received frames out of a ring in that memory,
- set a handful of registers.

The controller sits between three things:

- a host on a PCMCIA I/O bus;
- an external 64K × 8 asynchronous SRAM that holds all frame data;
- a baseband processor (PHY) reached through a bit-serial port.

One clock runs the whole design. A programmable prescaler derives a
microsecond tick from it, so the controller works with any system clock
from 11 MHz to 44 MHz.

```
            +-------------+        +-----+        +-----------+
 host  <--> | pcmcia_hiu  | <----> |     | <----> | ext. SRAM |
 I/O bus    | registers,  |        | esi |        | 64K x 8   |
            | SRAM window |        |     |        +-----------+
            +-------------+        +-----+
                 | config            ^   ^
                 v                   |   |
 +-----------+  +--------+  +--------+   +-------+
 | tsf_timer |->| tx_fsm |->|tx_fifo |   |rx_fsm |<-+
 +-----------+  +--------+  +--------+   +-------+  |
   ^   ^        |  ^  ^          |          ^  |    |
   |   |  +-----+  |  +----------|----------+  |  +-------+
   |   |  v        |             v             |  |rx_fifo|<-- bb_rx_bit
   |   | mac_timer backoff_gen  bb_tx_bit      |  +-------+
   |   +--------------- nav_timer <------------+
   +-------- us_tick (clock prescaler)
```

## Blocks

| Module | Role |
|---|---|
| `mac_top` | Wires everything together. It has plain ports for the host, the SRAM and the baseband, and no parameters. |
| `pcmcia_hiu` | Host interface unit. It holds the index/data register ports, an auto-incrementing window into the SRAM, status bits and the interrupt. |
| `esi` | External SRAM interface. It arbitrates three requesters onto one SRAM: receive first, then transmit, then host. |
| `tx_fsm` | Transmit state machine. It covers DCF contention, RTS/CTS, fragment bursts, retries, hardware ACK/CTS replies, Beacon/ATIM/Probe Response and frame assembly with both CRCs. |
| `rx_fsm` | Receive state machine. It checks the PLCP header, filters addresses, checks the FCS and stores good frames in the SRAM ring. It also passes Duration, Beacon timestamps and reply requests on to the other blocks. |
| `tx_fifo` | 32-bit transmit register. Bytes go in and come out serially, LSB first. |
| `rx_fifo` | One-byte receive buffer. It collects serial bits into bytes. |
| `mac_timer` | The one down-counter shared by the IFS waits, the backoff and the ACK/CTS timeouts. |
| `backoff_gen` | Contention window (31 to 1023) and pseudo-random slot count (16-bit LFSR). |
| `nav_timer` | Network allocation vector, which gives virtual carrier sense. |
| `tsf_timer` | 64-bit TSF, target beacon transmission times (TBTT) and the ATIM window. |
| `crc_unit` | Byte-parallel CRC. The same module serves the CRC-32 FCS and the CRC-16 of the PLCP header. |
| `us_tick` | Divides the system clock down to a 1 µs tick. |
| `mac_pkg` | Shared types, frame-type codes, timing constants and the SRAM map. |

## Transmitting: the TxFSM

`tx_fsm` is the largest and least obvious part of the design. At any moment
it works on one *job*. When it is idle, it picks the next job in this order:

1. **Reply.** This is an ACK to a good data or management frame addressed to
   this station that the receive ring had room for, or a CTS to an RTS addressed to it while the NAV is clear.
   The reply goes out one SIFS (10 µs) after the end of the received frame,
   with no contention. A reply may interrupt a contention in progress. The
   backoff slots left are saved and picked up again afterwards.
2. **Beacon.** This fires at each TBTT when the station is an access point,
   or an ad hoc station with beacon generation enabled. The frame is the
   template the host stored at `0C00H`. The current TSF value is written
   into its timestamp field (MPDU bytes 24–31) as the bytes stream out. In
   an ad hoc network, a Beacon received from another station before ours
   goes out cancels ours.
3. **ATIM.** This is started by a host command and sent only inside the
   ATIM window. The 24-byte header is built in hardware and addressed to
   the ATIM destination register.
4. **Probe Response.** This answers a Probe Request. It is the beacon
   template with the subtype and Address 1 replaced.
5. **Data.** This is started by a host command. It sends 1 to 15 fragments
   that the host has placed one after another in the transmit buffer.

### Contention (DCF)

Every job except a reply contends for the medium like this:

1. Wait until the medium is idle. Idle means CCA is clear, the NAV is zero
   and nothing is being received.
2. Wait a DIFS (50 µs).
3. Count down a random backoff of `slots × 20 µs`. The slot count is
   `lfsr & CW`. The count advances only while the medium stays idle. If the
   medium turns busy, the count freezes and the machine goes back to step 1,
   keeping the remaining time.
4. At zero, transmit.

All these waits run on the single `mac_timer` counter. Its mode (IFS,
backoff or reply timeout) decides whether a busy medium restarts it,
freezes it or is ignored.

When the `csma_dis` bit is set (point coordination, PCF), the machine skips
contention and waits only a SIFS. An external point coordinator is then
expected to schedule the traffic.

### RTS/CTS, fragments and retries

1. A unicast fragment whose MPDU + FCS is longer than the RTS threshold
   starts with a 20-byte RTS. The machine then waits for the CTS.
2. The data fragment follows one SIFS after the CTS.
3. Later fragments of the same burst follow one SIFS after the ACK of the
   previous fragment. They use no new contention and no RTS.

Each response timeout lasts: SIFS + the air time of a 14-byte ACK at the
current rate + 10 µs.

A missing CTS or ACK has these effects:

- The contention window doubles, up to 1023.
- The fragment is tried again with full contention.
- After `retry_limit` attempts, the job ends with a `tx_fail` status bit.

Success sets `tx_done` and resets the window to 31.

Every frame goes out byte by byte through `tx_fifo`, in this order:

- 6-byte PLCP header (see below);
- MPDU;
- 4-byte FCS.

The MPDU bytes come from the SRAM through the ESI, except for replies and
the ATIM header, which are generated in hardware. `tx_fifo` is a 32-bit
register. The machine keeps it topped up a byte at a time while the
baseband shifts bits out. If the register ever ran empty, an underrun flag
would be raised.

How the register is kept full:

- The TxFSM issues SRAM reads ahead of the bytes it pushes. It keeps as
  many reads in flight as the register has free bytes, so every returning
  byte has a place.
- The ESI starts one access per cycle and returns read data two cycles
  after the grant. The SRAM path can therefore deliver a byte every clock,
  eight times what the serial port needs.
- `bb_tx_en` rises only once the first byte is in the register. It falls
  in the same clock in which the last bit is taken. A baseband that takes
  a bit on every clock while `bb_tx_en` is high never finds the register
  empty.

## Receiving: the RxFSM and the ring

The baseband holds `bb_rx_active` for the length of a frame and presents one
bit per `bb_rx_bit_valid` pulse. `rx_fifo` assembles bytes, and `rx_fsm`
takes them one at a time:

1. It checks the PLCP CRC-16. On a failure it drops the rest of the frame.
2. It checks the protocol version, then decodes type and subtype. It
   compares Address 1 with the station address and tests it for a group
   address.
3. It writes the MPDU (without the FCS) into the receive ring. The ring
   runs from `1000H` to `FFFFH` and wraps around.
4. It checks the CRC-32 at the end of the frame.

A data or management frame passes when all of these hold:

- it is addressed to this station or to a group;
- its FCS is good;
- it fitted in the ring.

For a frame that passes:

1. A 2-byte length word (low byte first) is written in front of the MPDU.
2. The ring's write pointer moves past the record.
3. The `rx_ok` status bit is set.

Any other frame is simply never committed. Its bytes are overwritten by the
next frame. A CRC error or an aborted frame sets `rx_err`. Control frames
(RTS, CTS, ACK) are handled by the hardware and never stored.

The receiver also informs the other blocks:

- A good frame addressed to another station loads its Duration field into
  the NAV. The NAV only ever grows.
- A good Beacon hands its timestamp to the TSF timer.
- A good frame for this station (data, management or RTS) raises a reply
  request to the TxFSM.

## Timers

- **`us_tick`** divides the clock by `CLK_DIV` (host register 01, reset
  value 44). All protocol timing is counted in these microsecond ticks, so
  it does not depend on the clock frequency.
- **`mac_timer`** is the shared counter. Its modes are IFS, backoff and
  reply timeout.
- **`nav_timer`** counts down in microseconds. It loads a new Duration only
  when that value is larger than what remains. Durations with bit 15 set
  (the special encodings of IEEE 802.11) are ignored.
- **`tsf_timer`** counts the 64-bit TSF in microseconds. It counts TBTTs in
  1024 µs time units (TU) from the moment the controller is enabled. It
  opens the ATIM window for `atim_win` TU after each TBTT in an ad hoc
  network. On a received Beacon:
  - an access point keeps its own time;
  - an ad hoc station adopts the timestamp only if it is later than its own;
  - a station in an infrastructure network always adopts it.

## Host programming model

The host sees three byte-wide I/O ports:

| Port | Use |
|---|---|
| 280H | index: selects an internal register |
| 281H | data: reads or writes the selected register |
| 282H | SRAM window: reads or writes the byte at the window address, which then advances by one |

Bus timing:

- Accesses are one-cycle `io_rd` / `io_wr` strobes, synchronous to `clk`.
- After a window access, `io_wait` stays high until the SRAM cycle is done.
  The next window access must wait for it to drop.
- A window read returns a byte fetched in advance. After setting the window
  address, wait for `io_wait` to drop before the first read.

Internal registers:

| Index | Register | Reset |
|---|---|---|
| 00 | CTRL: [0] enable, [1] access point, [2] ad hoc, [3] CSMA/CA off (PCF), [4] Beacon/Probe Response generation | 00 |
| 01 | CLK_DIV: clocks per microsecond (11–44) | 44 |
| 02–07 | own MAC address, first byte on air first | 0 |
| 08–0D | BSSID | 0 |
| 0E–13 | ATIM destination | 0 |
| 14/15 | RTS threshold in octets of MPDU + FCS | 2347 |
| 16 | SIGNAL (rate code, 0A = 1 Mbit/s, 14 = 2 Mbit/s, …) | 0A |
| 17 | retry limit | 7 |
| 18/19 | beacon interval (TU) | 100 |
| 1A | ATIM window (TU) | 0 |
| 1B | beacon template length (MPDU without FCS) | 0 |
| 1C | number of data fragments | 1 |
| 1D | command (write): [0] send data, [1] send ATIM | – |
| 20 | status, write 1 to clear: [0] frame received, [1] receive error, [2] transmit done, [3] transmit failed | 0 |
| 21 | interrupt mask | 0 |
| 22/23 | receive ring write pointer (read only) | 1000H |
| 24/25 | receive ring read pointer | 1000H |
| 26/27 | window address | 0 |
| 28–2F | TSF, least significant byte first (read only) | 0 |

Sixteen-bit registers take effect when their high byte is written. `irq`
stays high while any unmasked status bit is set.

### SRAM map and buffer formats

| Address | Content |
|---|---|
| 0000H–0BFFH | Transmit buffer. Each fragment is a 2-byte length (low byte first, MPDU octets without FCS) followed by the MPDU, from Frame Control to the end of the body. Fragments are stored back to back. |
| 0C00H–0FFFH | Beacon template: the complete Beacon MPDU without FCS. The timestamp field is filled in on transmission. |
| 1000H–FFFFH | Receive ring. Each record is a 2-byte length word followed by the MPDU without FCS. |

To send data, the host:

1. writes the fragments through the window;
2. sets the fragment count;
3. writes 1 to the command register;
4. waits for `tx_done` or `tx_fail`.

The host builds the whole MAC header itself, including the Duration and
Sequence Control fields.

To receive, the host:

1. reads records from the read pointer up to the write pointer;
2. writes the new read pointer back to free the space.

### Wire format and baseband port

Every frame on the serial port looks like this:

- PLCP header:
  - SIGNAL
  - SERVICE (0)
  - LENGTH (16 bits): the MPDU octets including the FCS
  - CRC-16
- MPDU
- FCS

Bytes go out in order, each LSB first. The CRC-16 is the X.25 / CCITT
polynomial, reflected: preset FFFF, complemented, check residue F0B8. It
covers SIGNAL, SERVICE and LENGTH. The FCS is the usual CRC-32, reflected:
preset FFFFFFFF, complemented, check residue DEBB20E3.

Air times, used for the ACK and CTS timeouts, come from the SIGNAL code:
192 µs of preamble plus 8 × bytes × 10 / SIGNAL µs.

The preamble, scrambling and modulation belong to the baseband. The MAC
sees only the signals below.

| Signal | Direction | Meaning |
|---|---|---|
| `bb_cca` | in | clear channel assessment, 1 = busy |
| `bb_rx_active` | in | high for the length of a received frame; the first bit may come in the same clock it rises |
| `bb_rx_bit_valid`, `bb_rx_bit` | in | one received bit per strobe |
| `bb_tx_en` | out | high from the first to the last bit of a transmission; it rises when the first bit is ready and falls in the clock its last bit is taken |
| `bb_tx_bit_en` | in | the baseband takes one bit per strobe |
| `bb_tx_bit` | out | the bit being transmitted |

## Where this design departs from, or goes beyond, its source

The design follows a published description of a processor-less 802.11 MAC.
That description gives the block structure and the features listed above,
but little of their insides. These parts of this design are its own:

- the register map;
- the SRAM map and the buffer and record formats;
- the signals of the serial baseband port (its strobes and frame-active signal);
- the job priorities;
- the window mechanism of the host port.

Protocol details (frame layouts, interframe spaces, the contention window
range, the CRCs) follow IEEE 802.11 with the 1–2 Mbit/s DSSS timing.

Points to be aware of:

- **Throughput.** The source reports a baseband-side throughput above
  100 Mbit/s. It also specifies a serial baseband interface.
  A serial port in one clock domain moves at most one bit per clock,
  which is 44 Mbit/s at 44 MHz and 11 Mbit/s at 11 MHz. This design
  reaches exactly that in both directions (see `tb_mac_rate` below). The
  byte-wide path behind the port is eight times faster.
- **Retries before the interrupt.** The source has the host interrupted
  when an ACK does not arrive in time. Here the controller first retries by
  itself, and interrupts with `tx_fail` only after `retry_limit` attempts.
  Setting the retry limit to 1 gives an interrupt on the first missing ACK.
- **NAV unit.** The source's text gives the NAV in milliseconds. The NAV
  here counts microseconds, as the Duration field of 802.11 does.
- **SRAM size.** One figure of the source labels the SRAM 32K × 8. Its text
  asks for 64K × 8 so that an access point can buffer more frames, and
  64K × 8 is used.
- **TBTT phase.** TBTTs are counted from enable time. Adopting a later
  timestamp does not move the next TBTT.
- **Frames the ring cannot take.** The document does not say what happens
  when the receive buffer is full. Here such a frame is dropped and is not
  acknowledged, so the sender tries it again later.
- **Deferral.** A reply does not wait on CCA or the NAV, as 802.11 requires.
  A Probe Response is sent after normal contention.
- **No power-save or PCF poll handling.** PS-Poll and the CF control
  frames are dropped like other control frames other than RTS. `csma_dis`
  only removes the contention.
- **No duplicate detection, and no reassembly of received fragments.** These
  are left to the host.

## Verification

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each ends by
printing `TB_RESULT checks=N failures=M`, and each has a watchdog.
`tb/sram_model.sv` is a behavioural model of the asynchronous SRAM.

`tb/tb_mac_top.sv` runs two complete controllers, each with its own SRAM
model, over a simulated channel. It drives both only through the host I/O
ports, at the design's default parameters. The testbench can also inject
frames from a third station, hold CCA busy and flip a bit on the air. It
decodes every transmitted frame and checks both CRCs with its own reference
functions. Its scenarios are:

1. data with ACK;
2. RTS/CTS;
3. a two-fragment burst;
4. a retransmission after a corrupted frame;
5. failure at the retry limit;
6. NAV deferral and backoff freeze;
7. a full receive ring (the frame is not stored and not acknowledged, so the sender fails after its retry limit);
8. a Beacon with TSF adoption;
9. a Probe Request answered by a Probe Response;
10. an ATIM inside the ATIM window;
11. transmission with CSMA/CA disabled.

It counts every mechanism and fails if any never happened. It programs
CLK_DIV = 4 so that a microsecond is only 4 clocks.

`tb/tb_mac_rate.sv` measures the baseband throughput of one station with
CLK_DIV at its reset value of 44. It tests the baseband model at one bit
every 4, 3, 2 and 1 clocks. At each rate, in each direction, it moves a
1500-byte frame through the host ports and checks:

- every byte and both CRCs;
- no TxFIFO underrun and no RxFIFO overflow;
- that transmission takes exactly one bit per strobe, so the baseband
  never waited.

At one bit per clock this is 44 Mbit/s at 44 MHz.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -Irtl -Itb -y rtl -y tb \
    rtl/mac_pkg.sv tb/tb_mac_top.sv --top-module tb_mac_top
./obj_dir/Vtb_mac_top +verilator+rand+reset+2
```

Replace `tb_mac_top` with any other testbench name. The design resets every
register it reads, so it also passes when the initial state is random
(`+verilator+rand+reset+2`).

## Changing the design

- **Clock.** Set CLK_DIV (register 01) to the clock frequency in MHz.
- **Timing constants.** SIFS, slot, DIFS, PLCP time and the ACK timeout
  margin are in `mac_pkg.sv`. Change them there for another PHY.
- **SRAM layout.** The ring bounds are parameters of `rx_fsm` (`RING_LO`,
  `RING_HI`). The buffer bases are constants in `mac_pkg.sv`. `MAX_MPDU`
  limits accepted frame length.
- **CRC.** `crc_unit` takes width, polynomial and residue as parameters.
- **Contention window and random source.** These are in `backoff_gen`.
