# Four-port router for a wired body-area sensor network

A wearable body-area network built from conductive textile yarn links many
small sensor nodes (SNs) to one base node (BN). Each node carries the same
router chip. The chip has four bidirectional single-wire lines to its
neighbours and an SPI port to the node's microcontroller. It moves packets
towards the BN, and from the BN back out, without the microcontroller's help.
Packets can be forwarded in three ways:

* **packet switching**: store and forward with an RTS/CTS/ACK handshake on
  every link;
* **circuit switching**: the chip joins an input line directly to the line
  towards the BN, so intermediate nodes buffer nothing;
* **hybrid switching**: an intermediate node stops a circuit that has grown
  too long, or whose next hop is busy, takes the packet into its buffer, and
  sends it on later.

The chip also keeps a 32-bit time-stamp counter that one node can align with
its neighbour's. It sleeps whenever it has nothing to do.

This repository holds synthesizable SystemVerilog for the whole digital part
of the chip: `rtl/router_ic.sv` and the blocks below it. It also holds a
self-checking testbench for every block, and an end-to-end testbench that
builds a four-node network.

## Lines, frames and messages

Every line is a single wire that is pulled low when no one drives it. A node
drives a line only while it sends. The external tri-state pads are not part
of the RTL. For line `p` the top level provides:

* `line_o[p]`: the level to drive;
* `line_oe[p]`: the pad enable;
* `line_i[p]`: the level received.

**Coding.** Bits use NRZI: a 1 is a level change and a 0 is no change. One
bit lasts `DIV` system clocks. `DIV` is register 0x01: the default is 4 and
the minimum is 2. So a 70 MHz clock gives up to 35 Mbps, and 16.383 MHz with
`DIV=4` gives 4.096 Mbps.

**Frames.** Every transmission is one frame:

```
8 preamble ones | start '0' | byte0 | byte1 | ... (MSB first) | closing transition if the line ended high
```

**Receiving.** Each line has a clock and data recovery circuit (`cdr`). It
restarts a phase counter at every line transition and samples in the middle
of the bit. This gives the recovered clock `CLKRX` and the data `RXDATA`. A
per-line detector (`rts_detector`) hunts for the preamble, then classifies
the first byte of the frame.

**Messages.** All byte codes are this design's choice:

| Message | First byte | Following bytes | Meaning |
|---------|-----------|-----------------|---------|
| RTSnn   | 0xA5 | – | request to send, packet switching |
| RTSnd   | 0x5A | hop byte `{hop[4:0], CRC3}` | request to send, circuit switching |
| TRQ     | 0xC6 | 0x01 (request) or 0x02 + 4 time bytes (reply) | time sync |
| CTS     | 0x3C | – | clear to send |
| ACK     | 0x96 | – | packet received with a good CRC |
| WAIT    | 0x69 | – | circuit still being built upstream, keep waiting |

CRC3 uses x^3+x+1 over the 5-bit hop count.

**Packets.** A packet frame carries these bytes:

```
type | length | ID-path ... | payload (length bytes) | CRC-8
```

* `type`: 0 broadcast, 1 SN-to-SN, 2 SN-to-BN, 3 BN-to-SN.
* `ID-path`: the sender's ID. A BN-to-SN packet carries a source route
  instead: `R, k, port_0 … port_R-1`.
* `CRC-8`: the 1-Wire CRC, x^8+x^5+x^4+1 processed LSB first, starting
  from 0. It covers every byte before it, so a good frame leaves a residue
  of 0.

`length` counts payload bytes, so one packet carries 1–255 bytes.

## How one packet travels

**Packet switching, one link:**

1. The sender's TX waits until the line is free, then sends RTSnn.
2. At the receiver, the `receiver_sel` ring counter grants RX to exactly one
   requesting line. Requests on the other lines are dropped; those senders
   time out and try again.
3. If RX finds a free buffer segment, it answers CTS after a guard of two bit
   times.
4. The sender sends the packet and its CRC-8.
5. RX loads a down-counter from the length field and stores the bytes until
   the counter reaches zero, then checks the CRC.
6. If the CRC is good, RX answers ACK and marks the segment ROUTE. If it is
   bad, RX frees the segment and sends nothing, so the sender retries.

**Routing.** The router in `router_buffer` then looks at the stored packet:

* SN-to-BN on a sensor node: SEND on the near-node port (the port that leads
  to the BN).
* SN-to-BN on the base node, broadcast and SN-to-SN: HOST, for the
  microcontroller, which gets an interrupt.
* BN-to-SN: if `k < R`, SEND on `port_k`, and `k` is incremented in the
  buffer. If `k = R`, the packet is for this node: HOST.

**TX retries.** TX sends SEND segments. It tries up to 8 times. The back-off
grows with the attempt number and with the low bits of the node ID. After
the last attempt TX marks the segment FAIL and raises an interrupt.

**Circuit switching.** A sensor node sends an SN-to-BN packet this way when
its `MAX_HOP` register is above 1. TX sends RTSnd with hop count 1.

An intermediate node gives the RTSnd to its circuit switch (`csw_module`),
which checks the CRC3 and then decides:

| Condition | Action |
|-----------|--------|
| `hop >= MAX_HOP` | hybrid: hand the line to RX, which answers CTS and stores the packet |
| near-node line busy, `hop >= HOP_THR` | hybrid |
| near-node line busy, `hop < HOP_THR` | release; the sender times out and retries |
| bad CRC3 | release |
| otherwise | extend the circuit |

**Extending a circuit.** The circuit switch:

1. sends RTSnd with `hop+1` to the near-node, and at the same time WAIT back
   to the sender. WAIT resets the sender's response timeout, so long circuits
   do not time out.
2. turns the switch backwards, copying the near-node line onto the sender's
   line. The WAITs and the CTS from further up then reach the sender
   directly.
3. after CTS, turns the switch forwards for the data frame. The packet length
   control decodes the passing header to know where the frame ends.
4. turns backwards once more for the ACK, then releases both lines.

Every copied bit is retimed by one system clock, so each hop adds one clock
of delay. The base node always ends a circuit: it treats RTSnd like RTSnn.
With `MAX_HOP = HOP_THR = 1`, every node works by pure packet switching.

## Ports, owners and releases

Each line's detector belongs to at most one owner at a time: RX, the circuit
switch (CSW) or time sync (TS).

* `signal_detector` holds the four detectors, `receiver_sel` and
  `rst_signal_gen`.
* A grant gives the line to its owner. A claim does the same for a line that
  CSW or TS drives on its own initiative.
* When an owner's busy signal falls, `rst_signal_gen` releases every line it
  held, and the detectors go back to hunting for a preamble.
* While a line is owned, its detector streams the bytes it receives to the
  owner.
* CTS, ACK and WAIT on a line nobody owns go out as response strobes to TX.

`line_status` reports a line free when:

* nothing of this node drives it,
* a short hold time has passed since it last did,
* and no preamble or frame is being received on it.

`tx_line_switch` picks the source for each line. The priority is CSW, then
RX (CTS and ACK), then TS, then TX.

## Buffer and microcontroller interface

The buffer is 2 kB in four 512-byte segments, one packet per segment. Each
segment has a status register:

| Code | Status | Set by |
|------|--------|--------|
| 0 | FREE | freed packet |
| 1 | RXING | RX, while receiving |
| 2 | ROUTE | RX after a good packet, or the microcontroller |
| 3 | SEND | router |
| 4 | TXING | TX, while sending |
| 5 | HOST | router |
| 6 | FAIL | TX, after the last retry |

The status register also holds a 2-bit port: the arrival port, or the output
port for SEND.

RX, TX, the router and the SPI side share one memory port. Requests are held
until granted, with fixed priority RX > TX > router > SPI. Read data arrive
one clock after the grant.

**SPI** works in mode 0. Each transaction begins with a command byte
`{op[1:0], addr[5:0]}`:

* `00` write register: one data byte follows.
* `01` read register: the value comes back during the next byte.
* `10` write buffer: address high, address low, then data bytes, with the
  address auto-incremented.
* `11` read buffer: address high, address low, then each following byte
  returns the next buffer byte.

| Addr | Register |
|------|----------|
| 0x00 | CONFIG `{sleep_en, ts_en, is_bn}` |
| 0x01 | DIV, system clocks per bit (≥ 2, default 4) |
| 0x02 | NEAR_PORT, the port towards the BN |
| 0x03 | MAX_HOP, maximum hop count (default 1) |
| 0x04 | HOP_THR, hop-count threshold (default 1) |
| 0x05 | NODE_ID |
| 0x06 | INT_STATUS, write 1 to clear: `{crc_err, ts_done, near_lost, tx_fail, tx_sent, host_pkt}` |
| 0x07 | INT_MASK |
| 0x08–0x0B | segment status `{st[2:0], port[1:0]}`. Writing ROUTE or SEND hands a packet written over SPI to the router or TX; writing FREE releases a HOST packet. |
| 0x0C | NEAR_TMO: after this many 512-bit periods of silence on the near-node line, `near_lost` is raised (0 turns it off) |
| 0x0D | CMD: bit 0 starts a time-sync request to the near-node |
| 0x10–0x13 | time stamp, big endian, latched when 0x10 is read |

`INT` is the OR of the unmasked status bits. `LEDR` shows a TX failure or a
CRC error. `LEDG` blinks while the chip is awake.

## Time stamps

`time_sync` counts every system clock, even in sleep mode when `ts_en` is
set.

1. Writing CMD bit 0 sends `TRQ 0x01` on the near-node line.
2. The neighbour answers `TRQ 0x02` with its counter value, latched at the
   first preamble bit of the answer.
3. The requester loads:

```
received + 57·DIV − DIV/2 + 5
```

The three terms are:

* `57·DIV`: the answer's length on the line, from its first bit to its last;
* `− DIV/2`: the last bit is sampled in the middle of the bit;
* `+ 5`: five clocks of internal pipeline.

In simulation the two counters then agree to within one clock. This is a
plain one-way exchange. A more precise protocol would need its own design.

## Clocking and sleep

The chip uses one clock domain. The gated clocks of a real chip become clock
enables:

| Enable | Meaning |
|--------|---------|
| `clk_en` | the gated core clock CLK |
| `clk2tx` | one strobe per bit |
| `clkrx512` | one strobe per 512 bits |
| LED tick | LED blink rate |
| time-sync enable | CLK-TS |

`clock_ctrl` synchronises the reset. While CONFIG.sleep_en is set, `clk_en`
is low except when there is work. Work means any of:

* a preamble or frame on any line;
* any block busy;
* a packet waiting in the buffer;
* an SPI transaction (slave select low).

The CDRs and detectors run always, because they have to see a preamble in
order to wake the chip.

## Simulating

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and then stops. Each also has a cycle
watchdog. To run the end-to-end test with verilator 5:

```
verilator --binary --timing -Irtl rtl/router_pkg.sv tb/tb_router_ic.sv --top-module tb_router_ic
./obj_dir/Vtb_router_ic
```

**End-to-end test.** `tb/tb_router_ic.sv` builds a chain: BN – SN1 – SN2 –
SN3. The lines are joined with a wired-OR of the drivers, which stands in for
the pull-down. One SPI master model configures every node. The test then
runs these scenarios:

* packet switching from SN3 to the BN;
* a circuit over two hops;
* a hybrid stop at the hop limit;
* a BN-to-SN source-routed packet;
* a time-sync exchange;
* sleep and wake.

The test counts how often each mechanism happens, and fails if one never
does. The mechanisms are:

* good receptions;
* store-and-forward at each hop;
* circuit extension and completion at each intermediate node;
* WAIT at the sender;
* hybrid stops;
* source-route steps;
* time sync;
* wake-ups from sleep.

It also measures the end-to-end delay of a packet-switched and a
circuit-switched packet. It uses the default
parameters and finishes in well under a second.

**Packet-length test.** `tb/tb_workload_len.sv` uses the same chain at
`DIV=2`, the top rate. It sends packets with payloads of 1, 100, 250 and 255
bytes, first by packet switching and then by circuit switching. It checks
every byte that arrives. It also checks how the delay grows with packet
length:

* packet switching: 16 clocks per byte per hop;
* circuit switching: 16 clocks per byte in total.

Measured delays from the source router to the base node, in clocks:

| Payload | Packet switching (3 hops) | Circuit switching |
|---------|---------------------------|-------------------|
| 1 B     | 728    | 392  |
| 100 B   | 5480   | 1976 |
| 250 B   | 12680  | 4376 |
| 255 B   | 12920  | 4456 |

**Multitasking test.** `tb/tb_workload_multitask.sv` gives one sensor node
three tasks at once, one on each of three ports:

* a 250-byte circuit from a neighbour to the BN runs through it;
* a second neighbour sends it a packet;
* a third neighbour asks it for the time.

The test checks that all three were active in the same clock cycle. It also
checks that both packets reach the BN intact and that the time matches.

**Block tests.** Each block has its own test, `tb/tb_<block>.sv`. The same
verilator command runs it: replace the file name and the `--top-module`.

## Where this design departs from, or adds to, its source description

* **Message codes and frame layout.** All codes, the preamble length, the
  start bit, the bit order, the CRC3 polynomial and the 5-bit hop count are
  chosen here. The 5-bit field limits one circuit to 31 hops. Longer paths
  are split by hybrid stops.
* **Length field.** The packet length field counts payload bytes, not bits.
  A bit count would not allow the 250-byte packets the design is meant to
  carry.
* **Timing choices.** The guard times of two bits before an answer, the
  response timeouts, the retry limit and the back-off are this design's own.
* **Circuit switch.** The switch is registered, not combinational.
* **Clock gating.** Clock gating is modelled as clock enables.
* **Cost set-up.** Setting up the routing costs (the SRMCF cost broadcasts)
  is left to the microcontroller. The chip only forwards by near-node and by
  source route, and flags a silent near-node.
* **Time sync.** Time synchronisation is a simple one-way exchange, not a
  full high-precision protocol.
* **Per-clock disables.** The separate disables of the receive clock,
  transmit clock and core clock, used only to measure power, are not built.
  In sleep the receive side stays on, so that it can wake the chip.
* **Buffer organisation.** The buffer organisation, the register map, the
  SPI command set and the LED meaning are all this design's.

## Limits

* Only four packets can be buffered, one per segment. A BN-to-SN packet with
  both a 255-hop path and a 255-byte payload does not fit one segment.
* The CDR needs `DIV ≥ 2`. It tracks drift only at transitions. NRZI with a
  long run of zeros has none, so the clocks of two nodes must agree to
  within about `1/(2·run length)`.
* Timing closure at 70 MHz has not been checked.
* The pads, the pull-down and the microcontroller are outside the RTL.
