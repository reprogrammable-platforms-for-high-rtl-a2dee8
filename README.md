# Datagram ring for a 64-channel waveform-digitising DAQ back end

This RTL implements the digital back end of a data acquisition (DAQ) system
for a photomultiplier-based detector, such as a neutrino telescope. There are
64 channels of 12-bit ADC samples at 100 MHz. The channels are split over
eight FPGAs, eight channels each. Each FPGA finds pulses in its channels and
turns each pulse into a time-stamped window of eight samples. It then sends
that window as a small datagram packet over a ring network to a controller
FPGA, which links the ring to the CPUs.

The main idea is that every piece of non-local information travels as a
packet on one very simple network. There are only four kinds of network
circuit:

| circuit | what it does |
|---|---|
| transmitter | a shift register that sends a parallel word as a packet |
| receiver | a shift register that keeps packets sent to its address |
| router | splits one stream into a local stream and a through stream, using a static address mask |
| combiner | merges two streams through two FIFOs; it is lossy when overloaded |

None of these circuits ever stalls, and no handshake runs back up a link.
The price is that the combiners drop whole packets when their FIFOs cannot
take them. This drop behaviour is the part of the design that needs the most
care, and the most room below.

## Network words and packets

Each link is 8 bits wide and carries one word per clock: 100 MByte/s at 100 MHz.

```
bit 7      FCF, the flow control flag: 1 = payload word, 0 = control code
bits 6..0  payload, or one of the codes IDLE = 0, PACKET_START = 1, PACKET_STOP = 64
```

A packet is

```
PACKET_START, DestAddr, SrcAddr, IN[6:0], IN[13:7], ..., PACKET_STOP
```

It has `ceil(n/7)` payload words for an `n`-bit message, sent least
significant slice first, with zero padding in the last slice. The address
words carry FCF = 1. Addresses are 7 bits wide (`ADDR_W`), one word each.
Between packets a link carries IDLE. Packets may also follow each other with
no IDLE between them. `daq_pkg` defines the word type `net_word_t` and the
codes.

**Address plan.** This plan is a choice of this design.

- Node *i* owns addresses `8i .. 8i+7`. Its sub-net mask is `7'b111_1000`.
- The receiver of node *i* listens at `8i`.
- The transmitter of channel *k* of node *i* sends from `8i+k`.
- The controller is `7'h7F`.

## The network circuits

**`net_transmitter`**

- On `tx_en` it latches the message and both addresses.
- One clock later it starts sending the packet.
- `tx_rdy` is low while a packet is in progress.
- `tx_rdy` is high again in the clock that puts PACKET_STOP on the link, so a
  new packet can follow at once.
- `tx_en` while busy is ignored. The transmit controller in front of the
  transmitter takes care of that case.

**`net_receiver`**

- It watches a stream.
- A packet whose destination word equals `rec_addr` is shifted in.
- On PACKET_STOP it loads the `out_msg` output register and `src_addr`, and
  pulses `rx_rdy` one clock after the STOP word.
- It accepts a packet only if the packet has exactly `ceil(N_BITS/7)` payload
  words.
- A START in the middle of a packet restarts reception.

**`net_router`**

- It has a fixed 7-clock pipeline. A word entering in cycle *c* leaves in
  cycle *c+7*.
- The route is decided when the destination word enters, one clock after
  START. The route then travels with every word of the packet:
  - `(dest & NET_MASK) == NET_ADDR` sends the packet to `out_local`;
  - any other address sends it to `out_next`.
- A packet whose second word is a control code, not an address, counts as
  wrongly addressed. The router discards it and pulses `drop_pulse`.
- The output that is not chosen shows IDLE.

**`net_combiner`**

- It is built from two `combiner_fifo`s (256 words each), one
  `combiner_input_gate` per input and a `combiner_arbiter`.
- Input 1 takes pass-through packets and input 2 takes local packets.
- The output is the head word of the selected FIFO, taken combinationally. A
  word entering an empty combiner therefore leaves one clock later.

### How the combiner chooses (`combiner_arbiter`)

The arbiter has three states. In each clock it selects one queue, and that
queue's head word is output and removed.

```
PKT_START  q1 > q2                  -> serve queue 1, go to QUEUE1
           q2 > q1                  -> serve queue 2, go to QUEUE2
           q1 == q2 != 0            -> serve the queue served last (TIE_TOGGLE = 0)
                                       or the other one (TIE_TOGGLE = 1)
           q1 == q2 == 0            -> stay, keep the last selection
QUEUEk     head of k is STOP or IDLE -> serve it, back to PKT_START, remember k
           otherwise                 -> keep serving queue k
```

An empty FIFO presents IDLE at its head. A packet therefore leaves the
combiner whole: once its START has been taken, the arbiter stays with that
queue until the STOP, whatever the other queue holds.

This works because every packet enters a FIFO as an unbroken burst at one word
per clock. The output drains at the same rate, so the queue cannot run dry in
the middle of a packet. Every circuit upstream (transmitter, router, another
combiner) keeps packets unbroken, so the property holds along the whole ring.

The tie rule has two readings in the source material:

- The detailed controller description says a tie goes to the queue served last.
- The architecture overview says ties alternate.

The default, `TIE_TOGGLE = 0`, follows the first reading. The worst-case
delay is unbounded: a short packet can wait behind a queue that is refilled at
the full rate.

### How the combiner loses packets (`combiner_input_gate`)

Transmitters do not wait, so an overloaded combiner must throw data away. The
loss policy here is whole-packet admission:

- IDLE words are never stored.
- When PACKET_START arrives and the FIFO has fewer than `MAX_PKT_WORDS` free
  places, the whole packet is refused. `drop1` or `drop2` pulses once, and
  every word up to and including its STOP is discarded.
- An admitted packet no longer than `MAX_PKT_WORDS` always fits, because
  reads only ever free space.
- A longer packet that still meets a full FIFO loses its tail, and the drop is
  flagged. The arbiter then ends that packet on the IDLE of the empty queue.
  Downstream receivers reject such a packet by its length.

With the default 27-word hit packets and 256-word FIFOs, a queue stays at or
below 256 words. The tests watch the queues fill to within one packet of that
limit and no further.

## One FPGA (`fpga_node`)

```
 adc[0..7] -> fe_trigger -> tx_controller -> net_transmitter --+
                                                               |  7 combiners in a chain:
                                                               +-> (ch0+ch1) -> (+ch2) -> ... -> (+ch7) --+
                                                                                                          | in2
 ring_in -> net_router --out_next (pass-through)------------------------------------------> ring combiner -> ring_out
                 |                                                                              in1
                 +--out_local--> net_receiver -> rx_* ports, configuration register
 timestamp_counter -> ts for all eight channels
```

**Configuration.** The receiver takes a 21-bit configuration message:

| bits | meaning |
|---|---|
| `[11:0]` | trigger threshold for all channels |
| `[19:12]` | channel enable mask |
| `[20]` | unused |

After reset the threshold is `THRESH_INIT` (2048) and all channels are
enabled.

**Monitoring.** `status` (`node_status_t`) exports per-clock events for
monitoring:

- hits;
- transmitter starts;
- overwritten messages;
- packets dropped by the local chain and by the ring combiner;
- router drops;
- the ring combiner's queue lengths.

**`fe_trigger`**, one per channel:

- It keeps the last seven samples in a delay line.
- A hit is a rising crossing of the threshold: the sample is at or above the
  threshold and the previous sample is below it.
- For a crossing in cycle *c*, the module waits for five more samples. In
  cycle *c+6* it delivers a 160-bit message:
  - `msg[63:0]` is the time stamp of the crossing sample;
  - `msg[64+12k +: 12]` is sample *k* of the window. *k* = 0 is two samples
    before the crossing and *k* = 7 is five after it.
- Crossings during those six clocks are ignored (dead time).

**`tx_controller`** sits between the trigger and the transmitter. It forwards
a hit at once when the transmitter is ready. Otherwise it holds the hit in a
one-entry register and sends it when the transmitter becomes ready. It always
prefers the newest hit:

- A second hit that arrives while the register is full replaces the held one.
- A new hit that arrives just as the transmitter becomes ready is sent
  instead of the held one.

In both cases the held hit is lost and `overwrite` pulses. As a result, hits
from one channel never leave out of order.

**`timestamp_counter`** produces a 64-bit time stamp:

- `ts[63:32]` counts seconds.
- `ts[31:0]` is the binary fraction of a second. One LSB is 2^-32 s, about
  0.23 ns.
- Each 10 ns clock adds `floor(2^32/CLK_HZ)` to the fraction. A remainder
  accumulator adds one extra LSB whenever the remainders reach a whole LSB.
  After *k* clocks the fraction is therefore exactly `floor(k·2^32/CLK_HZ)`.
- `load_sec` sets the seconds of universal time and clears the fraction.

## The ring (`daq_ring`, top)

`N_FPGA` nodes are chained in a ring. The output of node *i* drives the input
of node *i+1*. The controller FPGA closes the ring but is not part of this
RTL, so the two open ends are ports:

- `ctrl_to_ring` enters node 0;
- `ring_to_ctrl` leaves node `N_FPGA-1`.

Hit packets travel downstream to the controller. A configuration packet
travels until its node's router takes it off the ring.

**Delays on an idle ring.** The tests check these cycle counts.

| path | clocks |
|---|---|
| router | 7 |
| combiner, minimum | 1 |
| per idle node passed through | 8 |
| transmitter start | 1 |
| controller to the receiver of the last node (7-word packet, from START sent to `rx_rdy`) | 7·8 + 7 + 6 + 1 = 70 |

**Capacity.** Every ring link carries at most 100 M words/s. A hit packet is
27 words, so all 64 channels together can deliver at most about 3.7 million
hits per second to the controller. At the expected PMT noise rate of 1 kHz
per channel the last link is about 2 % loaded; `tb_daq_ring_noise` runs this
load and sees ring combiner queues of a few tens of words at most.

A word sent from the controller that no node takes (for example one addressed
to the controller itself) comes back after 8 · 8 = 64 clocks, 640 ns, by the
per-node delay above. The
architecture this follows estimates about 840 ns for its round trip, counting
twelve 70 ns switch passages; the passage through the controller FPGA is not
part of this RTL. If every ring combiner holds a packet for 200 clocks, the
trip grows to 8 · 208 clocks, about 17 µs.

The raw sample stream, 1.2
GByte/s per FPGA, does not fit on the network. It is meant for a local
waveform memory, which is not part of this RTL.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `daq_ring` | `N_FPGA` | 8 | nodes in the ring (at most 15 with this address plan) |
| `daq_ring`, `fpga_node`, `net_combiner`, `combiner_fifo` | `FIFO_DEPTH` / `DEPTH` | 256 | combiner FIFO depth in words |
| `daq_ring`, `fpga_node` | `THRESH_INIT` | 2048 | trigger threshold after reset |
| `daq_ring`, `fpga_node`, `timestamp_counter` | `CLK_HZ` | 100 000 000 | clock rate for the time stamp |
| `fpga_node` | `NODE_ID`, `CTRL_ADDR` | 0, 7'h7F | node number, destination of hit packets |
| `net_router` | `NET_ADDR`, `NET_MASK`, `LATENCY` | 0, 7'b1111000, 7 | sub-net address, mask, pipeline depth |
| `net_transmitter`, `net_receiver`, `tx_controller` | `N_BITS` | 160 | message width |
| `net_combiner` | `MAX_PKT_WORDS`, `TIE_TOGGLE` | 27, 0 | admission limit, tie rule |
| `fe_trigger` | `PRE` | 2 | samples kept before the crossing |

`daq_pkg` fixes the shared constants:

| constant | value |
|---|---|
| `SAMPLE_W` | 12 |
| `CH_PER_FPGA` | 8 |
| `TS_W` | 64 |
| `WINDOW` | 8 |
| `ADDR_W` | 7 |
| `CFG_MSG_W` | 21 |

All logic runs on one clock. Resets are synchronous and active high.

## What follows the reference architecture, and what does not

**Taken from the reference architecture:**

- the word format and codes;
- the packet layout;
- the ports of the transmitter and receiver;
- the one-clock transmitter start delay and the `rx_rdy` timing;
- the 7-clock router with its mask rule;
- the two-FIFO combiner with a 256-word depth and the arbitration states;
- the one-entry transmit controller;
- eight transmitters merged by seven combiners in each FPGA;
- the ring of eight FPGAs with eight channels each;
- the 64-bit time stamp format;
- a window of at least eight samples per hit.

**Choices of this design:**

- the address plan;
- that address words carry FCF = 1;
- whole-packet admission in the combiner;
- what counts as a "wrongly addressed" packet;
- the threshold trigger with a rising-edge condition and two pre-samples;
- the 160-bit hit message;
- the configuration message and its reset values;
- the length check in the receiver;
- the time-stamp remainder accumulator and `load_sec`;
- the way the pass-through stream and the local combiner chain meet in a last
  combiner.

**Not included:**

- the photomultipliers, shaping amplifiers and ADCs (analog), which appear
  here only as sample ports;
- the DDR SRAM waveform memory and its write path;
- the pulse-fit timing extraction;
- the controller FPGA and its CPU and optical link;
- the SerDes/LVDS serial links, which are modelled here as direct 8-bit
  connections at the core clock;
- any packet error flag.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Build one with Verilator 5. The package files
come first, and `-y` lets Verilator find the other modules by name:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_daq_ring -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/daq_pkg.sv tb/tb_net_pkg.sv tb/tb_daq_ring.sv -o sim
./obj_dir/sim
```

`tb_net_pkg` holds the testbenches' reference code:

- a packet encoder and decoder written straight from the packet format;
- pulse-trace generators;
- a reference hit finder that predicts each hit's time stamp and samples.

The testbenches:

| testbench | what it checks |
|---|---|
| `tb_net_transmitter` | every word of random packets, the 1-clock start, back-to-back packets, `tx_en` ignored while busy |
| `tb_net_receiver` | own and other addresses, truncated and interrupted packets, `rx_rdy` one clock after STOP |
| `tb_net_router` | cycle-exact 7-clock routing of a random stream by mask, malformed packets dropped |
| `tb_combiner_fifo` | head word, count and overflow flag against a model queue |
| `tb_combiner_arbiter` | every transition of the arbiter, both tie rules |
| `tb_net_combiner` | whole, ordered packets; delivered + dropped = sent; no loss at light load; 1-clock minimum delay |
| `tb_tx_controller` | hold, release, overwrite and priority cases |
| `tb_fe_trigger` | hit timing, time stamp and window contents against the reference hit finder, dead time, disable |
| `tb_timestamp_counter` | exact fraction at 100 MHz and at a 1 kHz test rate over several seconds, seconds load |
| `tb_fpga_node` | configuration over the ring, hit packets against the reference, pass-through, router drop, overload accounting |
| `tb_daq_ring` | the full default ring, 64 channels (details below) |
| `tb_daq_ring_noise` | the full default ring with all 64 channels firing at random at 1 kHz for 2 ms; every hit delivered bit-exact, nothing lost, ring queues far below 256 words (a few tens of words at most in the runs made) |

`tb_daq_ring` runs the full default ring and checks:

- the configuration of all eight nodes and the 70-clock delay to the last one;
- every light-load hit delivered bit-exact;
- under burst load, every hit either delivered or counted as overwritten or
  dropped;
- that pass-through, overwrite, combiner drops and router drops each happened
  at least once.

It takes about half a minute.
