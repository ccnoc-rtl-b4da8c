# CCNoC — a dual, asymmetric network-on-chip for cache-coherent tiled CMPs

In a cache-coherent many-core chip, the messages of the coherence protocol
fall into two classes of very different shape. **Requests** (block fetches,
clean-eviction notices, upgrades) are almost all short control messages;
**responses** almost all carry a 64-byte cache block. A single network sized
for the long messages wastes power switching wide crossbars for the short
ones, and it also needs virtual channels to keep requests and responses from
deadlocking each other.

This design splits the interconnect along the protocol's own line. Every
tile has a routing node made of **two switches**: a narrow one (48-bit flits)
in a *request* mesh and a wide one (128-bit flits) in a *response* mesh.
Because the two classes never share a channel, neither mesh needs virtual
channels. Each network interface sends a message on the network of its
class, and the receiving interface puts the two streams back into the order
in which each source sent them, so the coherence protocol above sees one
ordered channel per source.

The RTL here is the interconnect: switches, meshes, network interfaces and
the top level that ties 32 endpoints to the two meshes. The cores, caches,
directories and memory controllers that generate the messages are outside
it; they connect at the message ports of `ccnoc_top`.

## Organisation

```
         x=0      x=1      x=2      x=3
 y=0   tile 0   tile 1   tile 2   tile 3        each tile t:
 y=1   tile 4   tile 5   tile 6   tile 7          endpoint 2t   = core NI    (switch port NI1)
 y=2   tile 8   tile 9   tile 10  tile 11         endpoint 2t+1 = L2/dir NI  (switch port NI2)
 y=3   tile 12  tile 13  tile 14  tile 15
```

* `ccnoc_top` — two `mesh_network` instances (request: `REQ_FLIT_W = 48`,
  response: `RESP_FLIT_W = 128`) and 32 `network_interface` instances. Every
  interface is connected to both meshes at its tile.
* `mesh_network` — 4x4 `noc_switch`es; neighbours are joined by one channel in
  each direction. Border ports are unused.
* `noc_switch` — six ports (N, E, S, W, NI1, NI2), each with a two-flit
  `flit_buffer`; `xy_route` per input, `rr_arbiter` per output, a `crossbar`.
* `network_interface` — two `ni_packetizer`s (one per network), two
  `ni_depacketizer`s and one `ni_order`.
* `ccnoc_pkg` — sizes, port names, the message header and message types.

Channel widths across a tile boundary: 48 + 128 = 176 data wires per
direction, plus two head/tail bits and one valid per channel forward, and one
on/off bit backward.

## Messages and flits

A message (`ccnoc_pkg::msg_t`) is a class bit, a 72-bit header and a 512-bit
block:

| header field | bits | meaning |
|---|---|---|
| `dst` | 5 | destination endpoint `{tile, ni}`; in the lowest bits so the first flit always carries it |
| `src` | 5 | source endpoint, filled in by the sending interface |
| `is_long` | 1 | message carries the cache block |
| `seq` | 8 | sequence number per source→destination pair, filled in by the sender |
| `op` | 5 | coherence message type, not interpreted by the network |
| `addr` | 48 | block address, not interpreted by the network |

The packetizer cuts the header into `ceil(72/W)` flits and, for a long
message, the block into `ceil(512/W)` more flits, each part starting on a
flit boundary. That gives:

| flit width | short message | long message |
|---|---|---|
| 48 (request mesh) | 2 flits | 13 flits |
| 128 (response mesh) | 1 flit | 5 flits |
| 176 (for comparison) | 1 flit | 4 flits |

These are the flit counts the design was specified with; any header of 49 to
96 bits gives the same counts.

On a channel a flit is `FLIT_W + 2` bits: `{tail, head, payload}`. A
one-flit packet has both marks set.

## The switch

* **Flow control: wormhole with on/off.** Each input buffer holds two flits
  and drives `on` while it has a free slot. `on` comes from the buffer's
  registered fill level, and a sender may present a flit only while `on` is
  high. Because the sender sees `on` in the same cycle, two slots keep one
  flit per cycle flowing with no bubbles.
* **Routing: static, dimension-order XY.** East/west first, then
  north/south (`y` grows southwards), then to NI1 or NI2 by the low bit of
  `dst`. Routes are deterministic, so each network delivers the packets of one
  source/destination pair in order. The ordering logic in the interfaces
  depends on that.
* **Allocation in one cycle.** A head flit at the front of a buffer requests
  its output; the output's round-robin arbiter picks one input, and the flit
  crosses the crossbar into the next buffer in the same cycle. The output then
  stays reserved for that input until the tail flit has passed. Body flits
  follow without arbitration.
* **Timing.** One cycle per switch when unblocked. From the cycle a message
  is accepted by the sending interface to the cycle it is offered to the
  receiving client: `1 + flits + switches` cycles, where `switches` =
  |dx| + |dy| + 1. Corner to corner (7 switches) that is 10 cycles for a
  short request, 21 for a long request, 9 for a short response and 13 for a
  long response.

## Keeping order across the two networks

This is the subtle part of the design. A source may send a long request
(13 flits on the narrow mesh) and then a short response (1 flit on the wide
mesh) to the same destination; the response will arrive first. The protocol
must not see it first.

* The **sender** keeps an 8-bit counter per destination, shared by both
  classes, and stamps it into `seq` when it accepts a message.
* The **receiver** keeps the next expected number per source. Within one mesh
  the packets of a pair arrive in order, so only the front message of each
  mesh can be the next one due.
* `ni_order` delivers, in this priority, a due message from its parking
  store, the request-mesh message if due, or the response-mesh message if due.
  One message per cycle goes out on `rx_valid/rx_ready`.
* A front message that is **not yet due** is moved into the parking store
  (4 entries), so its mesh keeps draining and the missing earlier message can
  arrive behind it. A parked message leaves as soon as it becomes due. The
  `parked` output pulses each time this happens.
* If the parking store is full, a front message that is not due waits in its
  depacketizer, and the mesh behind it backs up through on/off flow control.

Two limits follow from this scheme:

* Eight sequence bits give a reordering window of 256 messages per pair. This
  is far more than the meshes can hold in flight.
* A finite parking store can, in a contrived pattern, fill up with messages
  that all wait for messages stuck behind non-due fronts. Raise `PARK_DEPTH`
  if the clients' traffic can produce that. With 4 entries, none of the
  random traffic in the testbenches stalled.

## Parameters

| parameter | default | where |
|---|---|---|
| `MESH_X`, `MESH_Y` | 4, 4 | `ccnoc_pkg`, `ccnoc_top`, `mesh_network` |
| `REQ_FLIT_W` | 48 | request mesh flit width |
| `RESP_FLIT_W` | 128 | response mesh flit width |
| `DEPTH` / `BUF_DEPTH` | 2 | input buffer depth in flits |
| `PARK_DEPTH` | 4 | reordering store per interface |
| `SEQ_W` | 8 | sequence number width (`ccnoc_pkg`) |

The header fields are sized in `ccnoc_pkg` for 32 endpoints. A larger mesh
needs a wider `EP_W`, and then a flit-count check (the 48-bit request mesh
stays at 2 header flits up to a 96-bit header).

## What follows the specification and what is this implementation's own

These follow the specification:

* the 4x4 grid;
* two interfaces per tile (core, and L2 slice with directory);
* a request mesh at 48 bits and a response mesh at 128 bits;
* six-port switches with two-flit input buffers;
* wormhole switching with on/off flow control;
* one-cycle arbitration and static routing;
* no virtual channels;
* 64-byte blocks and the flit counts per message;
* receiver-side ordering of request and response messages from the same
  source.

These are choices made here:

* XY routing;
* round-robin arbitration;
* the zero-delay on/off timing;
* head/tail sideband bits;
* the header layout and address width;
* the sequence-number-and-parking implementation of ordering, and its depth;
* the valid/ready message interface;
* a synchronous active-low reset;
* no pipeline registers on links.

The specification says the buffers are SRAM. Here they are register arrays,
and a two-entry buffer synthesises to registers anyway. Power and area are not
modelled.

## Clients and addressing

The network does not interpret the `op` or `addr` fields. A client picks the
destination endpoint itself. For a shared L2, the home of a block is the L2
endpoint (2t+1) of the tile that its block address interleaves to. Responses
go back to the requesting endpoint. The message class decides the network:

* `CLS_REQ` for requests, forwarded requests and eviction notices;
* `CLS_RESP` for data, acknowledgements and notifications.

The design targets a 2 GHz clock. Here, the critical path in one cycle runs
from a buffer's front through route computation, the output arbiter and the
crossbar into the next switch's buffer. That path has not been timed for
any technology.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5, from the top of the tree:

```
verilator --binary --timing --assert -Wno-fatal rtl/ccnoc_pkg.sv rtl/*.sv \
          tb/tb_ccnoc_top.sv --top-module tb_ccnoc_top -Mdir obj -o sim
./obj/sim
```

(For a leaf testbench, list `rtl/ccnoc_pkg.sv` and the module files it uses.)

* `tb_ccnoc_top` runs the full 4x4 design at its default parameters. It
  checks the four zero-load latencies above. It then sends 200 random
  messages per endpoint with the published short/long mix: 93 % of requests
  short, 86 % of responses long. It checks that every message arrives intact
  and in per-source order. It also counts, and requires, each mechanism at
  least once:
  * off-stalls;
  * output contention;
  * heads blocked behind a wormhole reservation;
  * parking;
  * a busy interface;
  * all four message kinds.
* `tb_ccnoc_workload` plays the clients of all 32 endpoints running
  coherence transactions through the full design:
  * reads, with a short request and a long data response;
  * clean-eviction notices;
  * upgrades, answered by a short ack;
  * dirty writebacks, a long request answered by a short ack;
  * three-hop reads. The home directory forwards the request to the owning
    core. That core sends the data to the requester and a notification to
    home.

  Each block's home tile comes from block-address bits (address
  interleaving). The testbench checks that every transaction completes with
  the right data. It reports the mean completion latency.
* `tb_mesh_network` checks the zero-load head and tail latency across the
  mesh, and whole, in-order packets under random receiver back-pressure.
* `tb_noc_switch` checks one-cycle forwarding, no interleaving on an output,
  and routing.
* `tb_network_interface` connects two interfaces back to back. Long requests
  followed by short responses force reordering.
* `tb_ni_packetizer` checks the 2/13, 1/5 and 1/4 flit counts.
* The remaining testbenches check the buffer, arbiter, crossbar, router,
  depacketizer and ordering unit against models.
