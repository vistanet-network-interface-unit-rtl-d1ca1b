# VISTAnet Network Interface Unit (NIU) in SystemVerilog

The NIU links the Pixel-Planes 5 (PXPL5) graphics multicomputer to a
gigabit network. On the PXPL5 side it is a node on the machine's token ring,
with two ring port pairs. On the network side it has two simplex HIPPI
channels (800 Mbit/s each), one in and one out. A SPARC processor on the
board runs all protocol decisions. The hardware in this repository moves the
data and leaves the decisions to that processor:

- It buffers whole packets.
- It computes checksums on the fly.
- It unpacks ring messages that travel encapsulated in HIPPI packets.
- It packs ring messages and software-built headers into HIPPI bursts.

The processor never copies payload. It reads headers straight out of the
packet FIFOs, writes headers into a header FIFO, and starts each transfer by
writing a register.

Everything is synchronous to one 25 MHz clock. That is 40 ns per clock and
one HIPPI word per clock.

```
                       +------------------------------------------------+
 HIPPI in  ----------> | hippi_dst -> rb_ctrl (2 x 4K-word FIFOs)        |
 (REQUEST/CONNECT/     |                |          \                     |
  READY/PACKET/BURST)  |           rb_cksum_q      ringp_tx -----------> | ring data port 1 (tx)
                       |                                                 |
 ring data port 1 (rx) | dp_rx -> nb_buffer (2 banks x 8 windows x 4K)   |
            ---------> |   |             |                               |
                       | cksum      hippi_src <- header FIFO (sync_fifo) | --> HIPPI out
                       |                                                 |
 ring port 0 (rx/tx) <-> cmd_port                                        |
                       |                                                 |
 SPARC bus  <--------> | niu_regs -- irq_ctrl -- proc_support           |
                       +------------------------------------------------+
```

## How ring messages ride in HIPPI packets (RingP)

A PXPL5 ring message starts with a Ring Address Word (RAW), which names the
destination node and port. While a message is on the wire, the ring port
marks its first and last words: `sop` and `eop` in `ring_beat_t`.

Between NIUs, ring messages are packed into HIPPI packets as RingP records:
- A header word whose low 16 bits give the message length in words, RAW
  included, followed by the message itself.
- A header word of zero is a pad and carries no message.

A HIPPI packet starts with the HIPPI-FP and upper-layer headers, which
software reads and removes. Everything after them is a sequence of RingP
records.

The RingP engine (`ringp_tx`) turns the records back into ring messages:
- It offers the RAW as a channel request.
- It waits for the ring to acquire the receiver.
- It sends the remaining words, marking the last.

A RAW corrupted on the network can name a node that does not exist. So if
acquisition takes longer than `RING_TIMEOUT` clocks, the engine drops that
message and moves on. Software can also stop the engine outright with
DATAPORTABORT.

## Ring-bound path (network to PXPL5)

**Connection.** A remote source raises REQUEST with a 32-bit I-field.
`hippi_dst` latches the I-field and checks its byte parity, and the processor
sees CONNECTREQUEST in HIPPICTRL. If the processor accepts, it sets
HIPPICONNECT and the port raises CONNECT.

**Flow control is software-driven.** Writing a nonzero PULSECOUNT loads a
counter. The port then sends that many one-clock READY pulses, one every
other clock, and each pulse lets the source send one 256-word burst. The
intended rhythm is:
1. Grant one burst.
2. Read the HIPPI-FP header from the FIFO as it arrives.
3. Work out the packet length.
4. Grant the remaining bursts.

This keeps a packet that no buffer can take off the link.

**Two alternating packet FIFOs** (`rb_ctrl`, 4096 words each, the largest
HIPPI packet allowed) take whole packets. At each packet start the controller
picks a free FIFO, preferring the one it did not fill last. Each FIFO has
four flags:
- PKTARRIVING: the packet has started.
- PKTARRIVED: PACKET has fallen.
- LONGPKT: the packet overflowed, and the excess was dropped.
- XMITERR: a word had bad parity, or a burst had a bad LLRC. The LLRC is
  the XOR of all words in a burst.

RBFIFOSELECT decides which FIFO the processor reads (RINGBNDFIFO0/1) and
which one feeds the RingP engine. The processor can read the header of a
packet still arriving. It then has three choices:
- Hand the FIFO to RingP and strobe DATAPORTXMIT.
- Discard the packet with RESETFIFOx.
- Leave it for later.

**Checksum.** `rb_cksum_q` sums every word of every arriving packet with
`cksum_unit`. That is two independent 16-bit one's-complement sums, one per
half word, with end-around carry. The results queue two deep, one per FIFO.
CHKSUMSTATE reports one of four states:
- SUMQUED0: the queue is empty.
- SUMQUED1: one sum is waiting.
- SUMQUED2: two sums are waiting.
- SUMERROR: a third packet ended while two sums were unread, and its sum
  was lost.

Each read of RINGBNDCHKSUM pops the oldest sum. The register presents the
two sums crossed over: the sum of the packet's upper half-words reads in its
lower 16 bits, and the sum of the lower half-words in its upper 16 bits.
NETBNDCHKSUM, on the network-bound side, is not crossed. Software can
subtract the header words it does not want covered.

## Network-bound path (PXPL5 to network)

**Data port.** A ring message sent to the NIU's data port (ring port 1,
`dp_rx`) is accepted only after software arms the port with DATAPORTOPEN.
The message is handled in three parts:
- The RAW goes to DATAPORTRAW, so software can start on the headers
  immediately.
- The remaining words go, from address 0, into one 4096-word window of the
  network-bound memory (`nb_buffer`).
- A checksum of those words builds up in NETBNDCHKSUM.

DATAPORTLEN gives the message length with the RAW counted.

**Two banks, eight windows each.** The memory holds 64K words:
2 banks x 8 windows x 4096 words. BANKSELECT picks the bank the data port
fills, and the HIPPI source always reads the other bank. NETBNDWINDOW0/1
pick the window in bank 0 and bank 1 respectively. To send what was just
received, software flips BANKSELECT. While the source drains one bank, the
data port can fill the other; an assertion checks that the two never touch
the same bank.

**Processor test path.** For diagnostics, the processor can read and write
every word of this memory directly at `0xfff00000 + 4 * index`. The index is
built as {bank, window, address}, so bank 1 window 5 word 0 is at
0xfff54000. Two uses follow from this:
- Software can check what the data port wrote.
- Software can build a packet body itself, acting as a data source, and send
  it like any other window.

A processor access borrows the memory's write or read port for its clock.
Use the path only while the data port and the source port are idle.

**Sending.** Software first writes the header words into the header FIFO
through NETBNDHEADER. These are normally:
- HIPPI-FP and upper-layer headers;
- a RingP header;
- the RAW after the network address has been translated.

Software then writes HIPPILEN (window words minus one) and SENDDATA, and
strobes HIPPIXMIT.

`hippi_src` sends the header FIFO contents followed by the window:
- The packet goes out as full 256-word bursts, with any short burst last.
- Each burst waits for a READY credit from the destination.
- Each burst is followed by its LLRC word.
- Every word carries odd byte parity.

**Source connections.** For connection setup, software writes HIPPIIFIELD and
sets MAKEREQUEST. ACCEPTED follows CONNECT. If CONNECT falls while the
request is still up, REJECTED is set and stays set until MAKEREQUEST is
cleared.

## Command port

Ring port 0 (`cmd_port`) carries control messages to and from the processor.
- **Receive:** every word received lands in a FIFO, which the processor
  reads through CMDPORTFIFO.
- **Transmit:**
  1. The first word written to CMDPORTWRITE is a RAW that opens a ring
     channel.
  2. Further words follow on that channel.
  3. CMDPORTCLOSE marks the last word and releases the channel.

Each written word is held back one write, so that the final word can be
tagged when CMDPORTCLOSE arrives.

## Registers

The registers sit in the page at 0xffffff00. Where two names share an
offset, one is read-only and the other write-only.

| offset | read | write |
|---|---|---|
| 00 | NIUSTATUS (CLOCK, ERRORRESET) | - |
| 04 | CMDPORTFIFO (pops) | CMDPORTWRITE |
| 08 | RINGCTRL | RINGCTRL |
| 0c | HIPPICTRL | HIPPICTRL |
| 10 | received I-field | source I-field |
| 14 | RINGBNDCHKSUM (pops) | - |
| 18 | RINGBNDFIFO0 (pops) | NETBNDHEADER |
| 1c | RINGBNDFIFO1 (pops) | - |
| 20 | DATAPORTRAW | - |
| 24 | DATAPORTLEN | HIPPILEN |
| 28 | NETBNDCHKSUM | - |
| 2c | NETBNDCTRL | NETBNDCTRL |
| 30 | RINGBNDCTRL | RINGBNDCTRL |
| 34 | RINGP (last word or words left) | - |

Writes to offsets 40 to 5c are trigger strobes. The written data is
ignored.

| offset | strobe |
|---|---|
| 40 | CMDPORTCLOSE |
| 44 | RESETFIFO0 |
| 48 | RESETFIFO1 |
| 4c | DATAPORTXMIT |
| 50 | HIPPIXMIT |
| 54 | CLEARERROR |
| 58 | DATAPORTABORT |
| 5c | DATAPORTOPEN |

Bit positions are the `HC_`, `NC_`, `RC_`, `GC_` and `NS_` constants in
`rtl/niu_pkg.sv`. A status bit named after an active-low hardware signal
reads low when active. This applies to FIFO empty and full, and to
DATAPORTBUSY.

The bus (`niu_regs`) is a simple single-cycle bus:
- `bus_sel` and `bus_we` select the access.
- Read data is combinational in the same clock.
- Writes, strobes and FIFO pops happen at the closing clock edge.

**Interrupts** (`irq_ctrl`) are presented as a SPARC interrupt level
(`irl`, highest pending wins).

| level | event | cleared by reading |
|---|---|---|
| 7 | packet arriving or arrived | RINGBNDCTRL |
| 6 | data port message started or finished | RINGCTRL |
| 5 | RingP finished | RINGCTRL |
| 4 | HIPPI packet sent | HIPPICTRL |
| 3 | command message in, or command channel acquired | RINGCTRL |
| 2 | tick clock overflow | NIUSTATUS |

Each interrupt source has an enable bit in its control register.

**Processor support** (`proc_support`) provides two things:
- A 16-bit tick clock advancing every 40 ns. Its overflow gives the
  level 2 interrupt, for protocol time-outs.
- An error reset. If the SPARC halts in its ERROR state, the board pulls
  `cpu_reset_n` low for 16 clocks and sets ERRORRESET. CLEARERROR clears
  ERRORRESET.

## Sizes and parameters

All defaults are the full design. The end-to-end testbench runs at these
defaults.

| parameter (niu_top) | default | meaning |
|---|---|---|
| RB_DEPTH | 4096 | words per ring-bound FIFO, one largest packet |
| NB_WINDOWS | 8 | windows per network-bound bank (3-bit window fields) |
| NB_WIN_WORDS | 4096 | words per window |
| HDR_DEPTH | 64 | header FIFO words |
| CP_RX_DEPTH | 512 | command port receive FIFO words |
| RING_TIMEOUT | 65536 | clocks to wait for ring channel acquisition |
| TICK_DIV | 1 | clocks per tick clock step |

Some sizes check out against what the NIU has to carry:
- **Network-bound memory:** about 13 packets can be in flight in both
  directions between sites. The 64K-word memory holds 16 full packets.
- **Ring-bound drain rate:** the RingP engine can offer one word per
  clock, 25 Mword/s. That is more than the ring's 20 Mword/s peak
  (640 Mbit/s). The network delivers at most about 500 Mbit/s.
- **HIPPI burst timing:** the testbench checks that a full burst is
  exactly 256 words on 256 consecutive clocks.

## Where this RTL makes its own choices

- **Buffer and timer sizes:**
  - The header FIFO and command port FIFO depths are this design's own.
  - So are the RingP timeout length and the error-reset pulse length. The
    reset pulse is 16 clocks.
- **RingP timeout:** when acquisition times out, the engine drops that
  message and continues with the next record. It does not stop the packet.
- **SUMERROR:** it stays until the next RINGBNDCHKSUM read, which pops one
  sum and clears the error.
- **Full ring-bound FIFOs:** if both FIFOs are busy when a packet starts,
  the packet is dropped. Software is expected never to grant bursts in
  that case.
- **Polarity:** status bits take the polarity of the hardware signals they
  are named after. That means HEADEREMPTY, HEADERFULL, FIFOEMPTYx,
  FIFOFULLx, CMDFIFOEMPTY, CMDFIFOFULL and DATAPORTBUSY read 0 when
  active.
- **CPTXINTENABLE** is taken as bit 1 of RINGCTRL.
- **INTERCONNECT:** both HIPPI INTERCONNECT lines are driven high
  permanently.
- **Test path addresses:** the address range of the processor's test
  path into the network-bound memory is this design's own. The ring-bound
  FIFOs need no extra path, since the processor can already read them.
- **Processor bus:** the processor bus is a generic single-cycle register
  bus, not the SPARC bus cycle.

## Not included

These are outside this RTL. Their signals are the ports of `niu_top`.
- The SPARC processor, its RAM and boot EPROM, and the services in that
  EPROM.
- The PXPL5 ring board.
- The ECL/TTL converters of the HIPPI cables.
- The network address translation table, which is kept and used by
  software.

## Files

`rtl/`:

| file | contents |
|---|---|
| `niu_pkg.sv` | types, register map, parity and one's-complement helpers |
| `niu_top.sv` | the whole NIU |
| `hippi_dst.sv`, `hippi_src.sv` | HIPPI-PH destination and source ports |
| `rb_ctrl.sv` | ring-bound FIFO pair and its controller |
| `rb_cksum_q.sv`, `cksum_unit.sv` | checksums |
| `ringp_tx.sv` | RingP engine |
| `dp_rx.sv` | data port receive |
| `nb_buffer.sv` | network-bound memory |
| `sync_fifo.sv` | generic first-word-fall-through FIFO, also used as the header FIFO |
| `cmd_port.sv` | command port |
| `niu_regs.sv` | register block |
| `irq_ctrl.sv` | interrupt controller |
| `proc_support.sv` | tick clock and error reset |

`tb/`: each module has a self-checking testbench `tb_<module>.sv`.
- The block testbenches use small parameters to run quickly.
- Besides directed cases, several of them also run random traffic checked
  against a model. These are the FIFO, the checksum unit, the command port,
  the RingP engine, the ring-bound FIFO controller, the data port receiver
  and the network-bound buffer.
  RingP packets arrive while the engine runs.
- `tb_niu_top.sv` runs the whole NIU at full size, looping its HIPPI
  source back into its destination and modelling the ring ports. It covers:
  - the command port;
  - processor error reset;
  - a ring message sent over HIPPI and delivered back to the ring, with
    checksums compared;
  - the largest packet, 4096 words. It is sent from bank 1 window 5 and
    delivered to the ring at one word per clock;
  - multi-burst and short bursts;
  - both ring-bound FIFOs;
  - a pad record;
  - a RingP timeout on a missing node;
  - a corrupted packet (XMITERR);
  - a 4100-word packet (LONGPKT);
  - checksum queue overflow;
  - DATAPORTABORT;
  - connection rejection;
  - the processor test path, reading back data-port words and sending a
    processor-written window;
  - every interrupt level.

  The run counts each of these and fails if one never happens.

Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/niu_pkg.sv tb/tb_niu_top.sv --top-module tb_niu_top
./obj_dir/Vtb_niu_top
```

Replace `niu_top` with any other module name to run its block test. The
full-size end-to-end test takes a few seconds.
