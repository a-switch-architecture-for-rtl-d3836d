# Rattlesnake: a virtual-channel switching element for real-time multimedia traffic

Continuous media (audio, video) need bounded delay, while ordinary data traffic needs
only throughput. This switch serves both over the same links by splitting every
physical link into 16 *virtual channels*, each with its own one-flit buffer in the
receiving switch. A connection is a chain of virtual channels, one per hop, set up
hop by hop by *claim* flits and torn down by a *release* flit. Once it exists, its
data flits are switched by a table lookup in each element, without any header
decoding, and a blocked connection holds only its own one-flit buffers, never the link.
At the edge of the network a port controller ("Snake Control") injects flits with a
hybrid time-division scheme: real-time traffic gets reserved slots in a frame, and
other traffic fills the rest and any reserved slot left unused.

The RTL contains one switching element (3 links in, 3 links out) and the flit-level
part of the port controller. Together they form the single-node prototype board
(`rattlesnake_board`).

## The physical channel and the flit cycle

A link has 9 wires: an 8-bit forward path and a 1-bit reverse path. One flit is 40
bits and takes five clocks, called a *flit cycle*:

| phase | forward byte                      | reverse bit         |
|-------|-----------------------------------|---------------------|
| 0     | identification `{vc[3:0], type[3:0]}` | –               |
| 1     | data[31:24]                       | status bit 0 (refused) |
| 2     | data[23:16]                       | status bit 1        |
| 3     | data[15:8]                        | status bit 2        |
| 4     | data[7:0]                         | status bit 3        |

The receiver learns the virtual channel in phase 0. It then answers on the reverse
path, in the same flit cycle, with the 4-bit status of *that* channel.
- Bit 0 means "refused": the channel's buffer still held an earlier flit, so this one
  was not stored.
- Bits 3:1 carry a code that the receiver's status buffer held for that channel:
  0 none, 1 route error, 2 no connection.

Flit types: 0 idle (an empty flit cycle), 1 data, 2 claim, 3 release.

Both ends of a link count phases 0..4 from the same clock and reset. There is no
framing on the wire: `phase_counter` must be reset together everywhere. This is the
main thing to arrange differently if the links are ever asynchronous (e.g. over
serial transceivers).

### Refuse and retry

A flit stays in its buffer until the next element accepts it. Suppose a flit goes
out in flit cycle F:
- At the end of F, the sending inlink sees the returned bit 0.
- If the flit was accepted, its buffer is cleared.
- If it was refused, the flit stays and takes part in scheduling again.

While its outcome is unknown, a flit is not scheduled again. Without this, it could
be sent twice. Flow control is therefore per virtual channel. A full buffer on one
connection never blocks the link for the others.

## Inside the switching element

```
            +-------------------------------+
 link 0 ->  | inlink 0 --+       +-> outlink 0 | -> link 0
 link 1 ->  | inlink 1 --+ xbar +-> outlink 1 | -> link 1
 link 2 ->  | inlink 2 --+       +-> outlink 2 | -> link 2
            |        \     claim unit          |
            +-------------------------------+
```

An **inlink** (`inlink`) contains:
- the receiver (`link_rx`)
- 16 one-flit buffers, each with a full flag (`flit_buffers`)
- 16 four-bit status buffers (`status_buffers`)
- the mapping table (`mapping_table`). Its entry *v* is valid or not, and gives the
  outlink and the new channel number that the flit of channel *v* uses on the next hop.
- the request side of the scheduler (`inlink_scheduler`)

An **outlink** (`outlink`) contains:
- a round-robin grant arbiter (`outlink_arbiter`)
- the transmitter (`link_tx`)

The **crossbar** (`crossbar`) moves one whole flit per outlink per flit cycle. The
**claim unit** (`claim_unit`) knows which channels of each outlink are in use.

### Scheduling: four iterations per flit cycle

Phases 0..3 of every flit cycle run four request/grant iterations. These choose the
flits for the *next* flit cycle.

1. Each unmatched inlink requests one outlink. It picks, round robin from its
   priority pointer, a full buffer with a valid mapping, no flit in flight, and an
   outlink that was not granted in an earlier iteration.
2. Each outlink that is still free grants one of its requests, round robin.

A single request per iteration could leave an outlink idle while a buffer for it
waits behind a buffer for a busy outlink. The later iterations let an inlink try each
outlink in turn. Both priority pointers move once per flit cycle, past the winner.

At the end of phase 4:
- each outlink loads the granted flit, with the channel number replaced by the one
  from the mapping table
- each inlink learns whether the flit it sent in the ending cycle was accepted

An uncontended flit needs two flit cycles (ten clocks) from its first byte in to its
first byte out. Each outlink carries at most one flit per flit cycle.

### Connection set-up and tear-down

A route is a string of digits, one per hop. Each digit names the outlink to use,
0..2. The source sends one claim flit per hop on the new channel, followed by the data.
- At each element, the first claim flit on a channel with no mapping goes to the claim
  unit. It is *consumed* there, so the next claim flit becomes the first one for the
  next element.
- The claim unit takes one claim per flit cycle, round robin over the inlinks. It
  reads the digit from data bits 1:0 and takes the lowest free channel of that
  outlink. Then it writes the inlink's mapping entry.
- If the digit is 3, or the outlink has no free channel, the claim unit stores code 1
  (route error) in the channel's status buffer instead.
- A claim flit on a channel that already has a mapping is forwarded like data. It is
  the claim for a later hop.
- A release flit is forwarded like data. When the next element accepts it, the inlink
  invalidates its mapping entry, and the claim unit frees the outlink channel.
- A data flit on a channel with no mapping is dropped, and code 2 (no connection) is
  stored for it.

### How status ripples back

A status code goes back one hop each time the next flit of the same channel arrives.
1. When the element that detected an error receives the next flit of that channel, it
   returns the code on the reverse path.
2. The upstream outlink hands the code to the inlink that sent the flit.
3. That inlink stores the code in its own status buffer for the channel.

Each further flit of the channel carries the code one hop closer to the source. The
port controller reports every status it receives to its station. Status buffers are
cleared when read, so each code travels once.

## The port controller (flit level)

`snake_control` has two transmit queues of four flits each, one real-time and one
non-real-time. It also contains `htdm_scheduler`, a frame of 16 slots of one flit cycle
each, and a configuration port marks each slot real-time or not. In each slot:
- a real-time flit may go only if the slot is real-time
- a non-real-time flit may go in a non-real-time slot, or in a real-time slot when no
  real-time flit is waiting (`seize`)

A refused flit stays at the head of its queue and is sent again in the next suitable
slot. For every flit sent, the controller reports the returned refusal bit and code to
the station. In the other direction, the controller accepts every flit from the
element. It hands each one to the station and returns code 0.

Not built: ATM adaptation, cutting cells into flits, the serial link to the station,
and the cell memory. The station side of this module expects ready-made 40-bit flits.

## The board

`rattlesnake_board` connects:
- the port controller to link 0 of a switching element
- links 1 and 2 to the board's ports (`ext_*`), for neighbouring elements

All elements of a network must share the clock and reset (see above).

## Where this design departs from the original, or fills gaps

The following follow the original description:
- the 3x3 element with 16 virtual channels per link
- one-flit buffers with full flags
- 4-bit status buffers
- the mapping table with new channel and link
- the claim unit
- four round-robin scheduling iterations per flit cycle, with the inlink priority
  changing once per flit cycle
- the 9-wire link with a five-phase flit and a 4-bit reverse status
- route-error reporting
- release flits
- hybrid TDM with seizing of unused real-time slots

The following are this design's own choices:
- the phase timing
- byte and bit order on the link
- the flit type and status code values, and the meaning of status bit 0 as "refused"
- retrying refused flits
- the claim-flit format: one flit per hop, with the digit in data[1:0]
- lowest-free-channel allocation
- one claim per flit cycle
- dropping data flits with no connection, and code 2
- 16 slots per frame
- queue depths

The original network is a Kautz graph with three links per element. Such an element
has no fourth link for its own port controller. How the original attaches the
controller is not specified, so this design gives the controller one of the three
links. The translation from Kautz node names to routing digits (link numbers) belongs
to the source and is not in hardware. No multi-element fabric module is included.
A network can be built from boards, as the network testbench below does.

On the original board, each link's wires can be set to one direction or to both.
Here every link is a fixed pair of one-way channels: an inlink and an outlink.

## Files

- `rtl/rs_pkg.sv`: sizes, flit and status types, and the byte-of-flit function
- `rtl/phase_counter.sv`: the five-phase counter
- `rtl/link_tx.sv` and `rtl/link_rx.sv`: the two ends of a link
- `rtl/flit_buffers.sv`, `rtl/status_buffers.sv` and `rtl/mapping_table.sv`: inlink
  storage
- `rtl/inlink_scheduler.sv`, `rtl/outlink_arbiter.sv` and `rtl/crossbar.sv`: switching
- `rtl/claim_unit.sv`, `rtl/inlink.sv`, `rtl/outlink.sv` and
  `rtl/switching_element.sv`: the element
- `rtl/flit_fifo.sv`, `rtl/htdm_scheduler.sv` and `rtl/snake_control.sv`: the port
  controller
- `rtl/rattlesnake_board.sv`: the top
- `tb/tb_<module>.sv`: a self-checking testbench per module. Each ends with the line
  `TB_RESULT checks=N failures=M`.
- `tb/tb_link_source.sv` and `tb/tb_link_sink.sv`: behavioural link ends, used by the
  element and board tests. `tb/tb_common.svh` holds the clock, check counter and
  watchdog.

`tb_switching_element` checks:
- claims, including exhaustion of all 16 channels of an outlink
- route errors and their ripple
- release
- refusals and retry
- drops
- matches found in later iterations
- the ten-clock latency

`tb_rattlesnake_board` runs the board at its default parameters. Along the path it
exercises:
- connection set-up from the station
- real-time sends in reserved slots
- seizing of free real-time slots
- refusals
- route errors returned to the station
- delivery out of link 1 and back to the station
- release

`tb_kautz_fabric` wires six boards into the Kautz graph K(2,2). Link 0 of each
element serves its station, which leaves two links per element for the network, so
the graph has degree 2. In this graph:
- the nodes are the words *xy* over {0,1,2} with x ≠ y
- there is an arc from *xy* to *yz* for each z ≠ y
- the diameter is 2

The test checks:
- all 30 station pairs connect at once, and each route's tag is one outlink digit per
  hop followed by a 0
- every destination receives its flits complete and in order
- a claim that fails at the second hop is reported back to the source
- after release, no channel of any element is left in use

## Simulating

With Verilator 5, for example for the board test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_rattlesnake_board \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/rs_pkg.sv tb/tb_rattlesnake_board.sv -o sim
./obj_dir/sim
```

Replace the top module name to run any other testbench. The simulator has two states,
and all state that is read is reset. Every test passes with random initial values
(`+verilator+rand+reset+2`). Testbenches stop themselves with a watchdog if something
hangs.
