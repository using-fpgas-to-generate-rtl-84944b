# Gigabit Ethernet traffic generator and request-response responder for an FPGA

A data-acquisition (DAQ) network needs a way to measure two things: how a
switch and its hosts cope with streams sent at a known rate, and how long a
host waits between sending a request and getting the data back. A PC cannot
produce either load with cycle-level control. This design moves the work into
an FPGA on a network card, in logic behind the FPGA's hard Ethernet MAC. The
logic can do three things:

* **Generate traffic.** It sends up to 2^32 raw Ethernet frames. Their length,
  spacing (8 ns steps), destinations (up to 16, used in turn) and payload
  pattern are all programmable.
* **Answer requests.** It keeps a 64 KB test memory. A request names an offset
  and a length. The reply carries that memory range, cut into as many frames
  as needed, each with its own checksum. Replies leave at full line rate,
  with no software in the path.
* **Share the link with a small CPU.** An embedded 8-bit CPU (a 68HC11-class
  soft core, not included here) configures everything through registers. It
  also has its own receive and transmit channels: received frames are split
  by Ethernet type, and the CPU's transmit frames are mixed with the state
  machines' frames in a programmable ratio.

Everything runs at the MAC's clock: 125 MHz, one byte per cycle, which is
1 Gbit/s.

## Datapath

```
              +-----------+   +-----------+  SM channel  +------------------------------+
MAC rx  ----> | rx_buffer |-->| rx_filter |------------->| sm_wrapper                   |
(sop,dv,data, | (4 KB +   |   | by Ether- |              |   pkt_gen    (generator)     |
 good/bad)    | desc FIFO)|   |  type     |--+           |   rr_engine  (req/response)  |
              +-----------+   +-----------+  | CPU ch.   |     rr_rx_sm -> cmd_fifo ->  |
                                             v           |     rr_tx_sm, test_mem 64 KB |
                                        cpu_rx_* ports   +--------------+---------------+
                                                                        v
cpu_tx_* ports --> tx_buffer (CPU) --+                          tx_buffer (SM)
                                     +-----> tx_mux <-----------------+
                                               |
                                               v
                                          MAC tx (sop,dv,data,eop / ack)

CPU register bus <-> ctrl_regs  (configuration to all blocks, event counters)
clk_50 -> cpu_clk_div -> clk_cpu (12.5 MHz)
```

The main components, in the order a frame meets them:

* **Receive buffer.** The MAC cannot be stalled, and it says whether a frame
  is good only after the last byte has arrived. `rx_buffer` therefore writes
  each frame into a circular RAM as it arrives. It commits the frame, with its
  length and Ethernet type, only when the MAC reports it good. If the CRC
  fails, or the RAM or the descriptor queue overflows, the write pointer is
  rewound and the frame vanishes. Only complete good frames come out of the
  buffer.
* **Filter.** `rx_filter` routes each frame by its Ethernet type, deciding at
  the first byte:
  * frames whose type matches `SM_ETYPE` go to the state machines;
  * frames whose type matches `CPU_ETYPE` go to the CPU;
  * any other frame is dropped and counted, unless "CPU takes the rest" is
    set, in which case it goes to the CPU.

  Each channel can be switched off.
* **State machines.** `sm_wrapper` holds the two test engines and a mode bit
  that chooses between them. A mode change waits until neither stream is in
  the middle of a frame. In generator mode, frames arriving on the
  state-machine channel are read and discarded.
* **Transmit buffers.** The MAC needs a whole frame without gaps once it has
  started. Each source therefore goes through its own store-and-forward
  `tx_buffer`, which releases a frame only when the whole frame is stored.
* **Mixer.** `tx_mux` chooses the next frame, never interleaving frames.
  While both sources have frames waiting, it sends `TX_RATIO+1` state-machine
  frames for each CPU frame, a range of 1:1 to 1:2^16. A source that is alone
  is sent at once.

### Stream and MAC conventions

* **Internal streams.** Inside the fabric every stream is a `pkt_beat_t`
  (`data[7:0]`, `sop`, `eop`) with valid/ready. Once valid is raised, the
  beat holds until ready.
* **MAC receive.**
  * A frame starts with a `mac_rx_sop` strobe on its first byte.
  * `mac_rx_dv` is high for each byte.
  * A one-cycle `mac_rx_good` or `mac_rx_bad` follows the last byte.
* **MAC transmit.**
  * The first byte is held with `mac_tx_sop` until `mac_tx_ack`.
  * After the ack, the MAC takes one byte per cycle up to `mac_tx_eop`.
* **Frame contents.** Frames carry no preamble and no CRC; the MAC adds and
  strips those. No padding is added, so the MAC is expected to pad frames
  that are too short.

## Request-response engine

This part is the hardest to follow, because a reply can span many frames. It
uses two state machines linked by a command FIFO (`rr_engine` =
`rr_rx_sm` + `cmd_fifo` + `test_mem` + `rr_tx_sm`).

### Frame formats

Fields are big-endian and follow the 14-byte Ethernet header:

```
request : cmd | tag | offset(2) | length(2) | csum(2) | data (write only)
reply   : cmd|0x80 | tag | offset(2) | length(2) | data | csum(2)
```

**Commands**

| Code | Command | What it does |
|---|---|---|
| 0x00 | NOP | Reply carries no data. |
| 0x01 | READ | Reply carries `length` bytes from `offset`. |
| 0x02 | WRITE | The request's data is stored at `offset`. The reply carries no data. |

Addresses wrap around the 64 KB memory. The `tag` byte is returned
unchanged, so a host can match replies to requests.

**Checksums**

* **Request checksum.** It covers the command header only. The one's
  complement sum of the words `{cmd,tag}`, `offset`, `length` and `csum` must
  be 0xFFFF.
* **Reply checksum.** It is the 16-bit one's complement of the one's
  complement sum of every byte after the Ethernet header. Bytes are taken in
  big-endian pairs, and an odd last byte is padded with zero.

A request with an unknown command or a wrong checksum gets no reply. It is
counted as a bad request.

### Receive machine (`rr_rx_sm`)

```
IDLE -> READ_HDR -> READ_CMD -> CHECK_CMD -> DO_CMD -> (WRITE_MEM) -> FILL_FIFO -> EMPTY_PKT -> IDLE
            | wrong type            | bad cmd                                         ^
            +-----------------------+--------------------------------------------------+
```

* **Routing and checking.**
  * A frame of the wrong type goes straight to `EMPTY_PKT`.
  * A bad command also goes to `EMPTY_PKT`.
  * `EMPTY_PKT` drains the rest of the frame.
* **Writes.**
  * A write stores its data during `WRITE_MEM`, one byte per cycle.
  * If the frame is shorter than `length`, only the bytes present are written.
  * The queued length is then reduced to match.
* **Queueing.** Every good command, writes included, is pushed into the
  command FIFO so that it gets a reply. An entry holds the command, tag,
  offset, length and the requester's MAC address.

### Transmit machine (`rr_tx_sm`)

```
IDLE -> SEND_HDR -> CHECK_CMD -> SEND_MEM -> ALL_SENT -> SEND_XSUM -> END_PKT -> IDLE
                         |                                               |
                         +--(no data)--> SEND_XSUM      more data left --+--> UPDATE_CNT -> SEND_HDR
```

**Fragmenting.** `SEND_MEM` stops when the frame holds `RR_MAX_DATA` data
bytes (default 1492) or the request is complete. `ALL_SENT` records whether
data is left. Every fragment is then closed with its checksum and end of
frame. If data was left, `UPDATE_CNT` advances the offset and count, and the
next fragment starts with a fresh header. Each fragment's header carries the
offset and length of the data in that fragment.

**Pipeline.**

* **Issue.** Each cycle the state machine issues a "recipe" for one byte: a
  constant, a memory address or a checksum half.
* **Resolve.** One cycle later the byte is resolved: memory data arrives and
  the checksum is accumulated.
* **Output queue.** The resolved byte enters a 4-entry output queue.
* **Offering a frame.** A frame is offered downstream only once 3 of its
  bytes are queued. From then on it streams at one byte per cycle, even
  though the memory read takes a cycle.

**Timing.** With the downstream always ready, a reply frame of `n` data bytes
takes `14 + 6 + n + 2` cycles. Between fragments, the next header is issued
as soon as the output queue has room, so the gap is a few cycles.

## Packet generator (`pkt_gen`)

**Frame layout.**

```
dest MAC | own MAC | SM_ETYPE | sequence(4) | GEN_LEN(2) | data ...
```

The payload is `GEN_LEN` bytes long, counting the sequence number and the
length field. It is capped to fit the transmit buffer (see *Departures*).
The sequence number and the length let a receiver count lost frames.

**Payload data.** The data is either a static byte or the low byte of a
32-bit Fibonacci LFSR:

* taps 32, 22, 2 and 1;
* seeded from `GEN_SEED` at every start (a zero seed becomes 1);
* shifted once per data byte.

**Destinations.** The first `GEN_NDEST` entries of the 16-entry table are
used in turn, one per frame.

**Spacing.** `GEN_DELAY` is measured from one frame start to the next, in
8 ns cycles. A frame longer than the spacing is followed at once, one cycle
after its last byte. For example, 1500 asks for 12 µs. With a 1500-byte
payload the wire itself needs 12.3 µs per frame, so the MAC then sets the
pace (see *Timing in practice*).

**Start and stop.** The settings are latched at start. Stop ends the run
after the current frame.

## Register map (`ctrl_regs`)

**Bus.** An 8-bit synchronous bus: writes take effect on the clock edge, and
reads are combinational. Multi-byte fields are big-endian.

| Addr | Name | Meaning (reset) |
|---|---|---|
| 0x00 | CTRL | bit0 mode (0 generator, 1 request-response); bit1 start (write 1); bit2 stop (write 1); bit3 LFSR data |
| 0x01 | STATUS | bit0 generator busy |
| 0x02 | GEN_LEN | payload bytes (1500) |
| 0x04 | GEN_COUNT | frames per run, 32 bit (1) |
| 0x08 | GEN_DELAY | frame spacing in 8 ns cycles, 32 bit (1500) |
| 0x0C | GEN_SEED | LFSR seed (0xACE1ACE1) |
| 0x10 | GEN_NDEST | destinations used, 1..16 (1) |
| 0x11 | GEN_STATIC | static data byte (0x55) |
| 0x12 | TX_RATIO | SM:CPU = (N+1):1 (0) |
| 0x14 | SM_ETYPE | type of state-machine frames (0x88B5) |
| 0x16 | CPU_ETYPE | type of CPU frames (0x88B6) |
| 0x18 | RX_FILTER | bit0 SM channel on, bit1 CPU channel on, bit2 CPU takes unmatched frames (0x03) |
| 0x1A | RR_MAX_DATA | data bytes per reply frame, capped to fit the transmit buffer (1492) |
| 0x20 | OWN_MAC | 02:00:00:00:00:01 |
| 0x26 | GEN_SENT | frames sent in this run (read only) |
| 0x30 | counters | 16-bit event counters (see below) |
| 0x40 | DEST[16] | destination MAC table, 6 bytes each |

The event counters are read only. In order from 0x30 they count:

1. good received frames;
2. received frames with a bad CRC;
3. receive overflows;
4. unrouted received frames;
5. bad requests;
6. state-machine frames sent;
7. CPU frames sent.

## Clocks

* **`clk`, 125 MHz.** The whole fabric runs on it.
* **`clk_cpu`, 12.5 MHz.** `cpu_clk_div` makes it from the 50 MHz board
  clock, dividing by 4 with a 50 % duty cycle.

The register bus and the CPU streams are ports in the `clk` domain. A CPU
clocked by `clk_cpu` would need synchronisers or dual-clock FIFOs between
the two domains, and those are not part of this RTL.

## What is outside this RTL

Four parts appear only as top-level ports:

* **The CPU.** An existing 68HC11-compatible core.
* **The MAC.** The FPGA's hard Ethernet MAC.
* **The transceiver.** The serial transceiver with its 8B/10B coding, and the
  SFP optics.
* **The clock synthesis.** The 125 MHz reference clock.

A packet analyser for the state-machine channel was planned in the original
concept but is not included, so in generator mode received state-machine
frames are simply discarded.

## Departures and own choices

The following were decided here, because the source description leaves them
open:

* All byte layouts: the request/reply header, the generator's header and the
  register map.
* All buffer and FIFO depths.
* The MAC handshakes.
* The reset values, including the Ethernet types, which come from the IEEE
  local experimental range.

Four behaviours are worth knowing:

* **Fragment closing.** The transmit state diagram this follows branches
  "more data to send" directly from `ALL_SENT`. Here every fragment is first
  closed with its checksum and end of frame, so that each fragment is a
  valid frame on its own.
* **Request checksum scope.** The request checksum protects only the command
  header, not the write data.
* **Generator spacing limit.** The generator cannot space frames closer than
  their length plus one cycle.
* **Transmit buffer limit.** The generator's length register is 16 bits wide,
  but a store-and-forward buffer can only release a frame that it holds
  whole. The top therefore caps the generator payload at the SM transmit
  buffer size minus 14 bytes, which is 4082 with the default 4 KB buffer. It
  caps the reply data per frame at the buffer size minus 22 bytes, which is
  4074. To generate frames of up to 64 KB, raise `TX_BUF_ADDR_W` to 17. The
  CPU's own frames must also fit its 4 KB buffer.
* **Bad requests get no reply.** The original description says that every
  request gets a reply, possibly carrying only a return code. Its receive
  state diagram, however, discards a bad command without queueing it. This
  design follows the diagram. For good writes and no-ops, the reply's
  command byte (`cmd|0x80`) serves as the return code.

## Timing in practice

`tb_daq_workloads` runs the design through the measurements it was built
for, at the default sizes. Its MAC model charges the real wire overhead of
24 byte-times after each frame: 4 FCS bytes, a 12-byte gap and an 8-byte
preamble.

**Request-response latency.** This is measured from the end of a request
at the MAC to the first reply byte.

* It is 480 ns for an empty reply.
* It grows by 8 ns per data byte, because the transmit buffer stores a
  whole frame before sending it.
* A 1492-byte reply starts after 12.4 µs.
* Larger replies start equally early. They finish later, because the rest
  of the data follows in further frames.

**Streams.** In steady state, the frame spacing at the MAC is exactly the
requested spacing or the wire minimum, whichever is larger.

* A 1500-byte payload asked for at 12 µs goes out every 12.30 µs. That is
  1538 byte-times: a 1514-byte frame plus 24 bytes of overhead.
* At 25 µs it goes out every 25.00 µs, about 500 Mbit/s.

**Queued requests.** 24 back-to-back read requests are all answered, in
order. That is more than the 16-entry command queue holds; the receive
buffer absorbs the rest.

## Simulation

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. For
example, with Verilator 5, run from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/daq_pkg.sv tb/tb_daq_fpga_top.sv \
          --top-module tb_daq_fpga_top -Mdir obj_top -o sim && ./obj_top/sim
```

`tb_daq_fpga_top` runs the whole design at its default parameters and
exercises every mechanism at least once, counting each one and failing if
any never happens:

* a generator run of several frames to several destinations, with the
  spacing checked in cycles;
* mode switches in both directions;
* READ, WRITE and NOP requests, including a read that is cut into several
  fragments;
* a bad-checksum request;
* bad-CRC frames;
* a frame routed to the CPU;
* a frame of unknown type dropped;
* generator length and reply size set above what the transmit buffer holds,
  and capped;
* a receive-buffer overflow while the CPU channel is stalled;
* CPU transmit frames mixed with state-machine traffic.

`tb_daq_workloads` (see above) prints its latency and spacing tables and
checks them cycle-exactly. It takes a few seconds.

In `tb_daq_fpga_top`, replies are checked byte for byte against a model in
the testbench. The event counters are read back over the register bus and
compared with the expected counts. The test finishes in about a second. The block testbenches override sizes (buffer
depth, memory size) to keep their runs short.
