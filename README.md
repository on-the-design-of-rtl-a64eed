# A worm-hole network switch for Kautz multi-computers

This is the RTL of a small switch for a message-passing multi-computer. Each
node of the machine has a processor, a Router and one of these switches. The
switches are wired together as a Kautz network. A message is a *worm*. Its
head carries the whole route, one byte per switch. Each switch reads its byte,
throws it away, and connects the worm to the output link that the byte names.
The rest of the worm then streams through at one byte per clock.

The switch has no buffers and applies no back-pressure. If the output a worm
asks for is already taken, the switch refuses the worm: it sends a NACK back
towards the source and discards the worm. The source's Router then tries
another route. Refusing instead of waiting means that no worm ever waits for
another one, so the network cannot deadlock.

There is also no global clock. Each switch makes its own clock with a Muller-C
element from synchronisation wires on its links, so the switches run in
lock-step with their neighbours without a distributed clock.

The RTL has three main pieces:

* `network_switch`: one switch, with three input links and three output links.
  Link 0 is for the node's Router and links 1 and 2 are for the network.
* `ns_router`: the link side of a node's Router. It sends a message from
  local memory as a worm, retries on a second route after a NACK, reports the
  outcome to the processor, and writes incoming messages into local memory.
* `ns_route_gen`: the Route Generator. From a node's word and a destination
  word it gives two node-disjoint routes, the shortest first.
* `kautz_network`: a parameterised Kautz network K(2,K), with one switch,
  one Router and one Route Generator per node. The default K = 3 gives 12
  nodes. This is the top of the design. Each node's processor and memory
  ports are brought out.

## Kautz networks and routes

The nodes of the Kautz graph K(d,k) are the words of length k over the
letters 0..d in which no two neighbouring letters are equal. An arc goes from
word x to word y when y is x shifted left by one letter with a new letter
appended: x = x1 x2 x3 leads to x2 x3 y. Each node has d arcs out and d arcs in,
and the network has N = d^k + d^(k-1) nodes. A switch with two network links
serves d = 2. So K(2,3) has 12 nodes (010, 012, 020, 021, 101, 102, 120, 121,
201, 202, 210, 212) with diameter 3.

A path from s to t is built by appending the letters of t to s.

* **Generic route.** Append all k letters of t. This works only when the last
  letter of s differs from the first letter of t.
* **Shortest route.** Append only the letters of t that do not already overlap
  the end of s.

Example: from 120 to 201, the generic route appends 2, 0, 1 and runs
120 → 202 → 020 → 201. The shortest route appends only 1, because "20" is
already shared, and takes the single arc 120 → 201.

The switch does not see letters. It sees **link numbers**. In
`kautz_network`:

* Output link 1 of a node is the arc that appends the smaller of the two
  allowed letters, and output link 2 appends the larger one.
* An arc arrives at input link 1 or 2 of its target, ordered the same way by
  the letter that drops off.
* Link 0 is the Router link.

A route is therefore a list of bytes, one per switch, with 0 as the last
byte. For example, the generic route above is bytes `2 1 1 0`, and the
shortest one is `1 0`. Nodes are numbered in the ascending order of their
words.

`ns_route_gen`, the Route Generator, does this translation. It gives two
routes that share no node other than their ends, so one failed switch or
busy link cannot block both:

* Route 0 is the shortest route.
* Route 1 is the shortest path that avoids the source, the destination and
  every intermediate node of route 0, and is not route 0 itself. Among
  equally short paths it takes the first in link order (1 before 2).

The generator is purely combinational. It tries every sequence of link
numbers, shortest length first, up to K + 2 hops. So the processor only names
the destination word, and the Router tries the shorter route first. A route
can be up to K + 2 hops long, that is K + 3 bytes with the final 0. For the
example above it gives `1 0` and then `2 1 1 0`.

The exhaustive test covers every pair of nodes in K(2,3) and K(2,4). It finds
a second route for every pair of different nodes, always as short as the
restricted graph allows. The greedy choice of "shortest first, then the
shortest route that avoids it" has not been proven to work for larger K. A
pair with no second route would get only one. A node sending to itself gets
the single route `0`.

## What travels on a link

Each link has 12 wires:

| wires | direction | meaning |
|---|---|---|
| `data[7:0]` | downstream | route byte or data byte |
| `typ` | downstream | marks the start of a worm and its End Of Data |
| `nack` | upstream | the worm was refused somewhere ahead |
| `cl`, `cla` | one each way | clock synchronisation (see below) |

The data and type wires form the word type `flit_t` in `ns_pkg`. One word
crosses each link per clock. Everything depends on the state of the link:

| link state | `typ` = 1 | `typ` = 0 |
|---|---|---|
| idle | start word: `data` is this switch's route byte | idle filler, ignored |
| inside a worm | End Of Data: the worm ends, `data` ignored | a byte of the worm |

A Router sends a message as follows:

* a start word carrying the first route byte;
* the remaining route bytes, ending with 0;
* the data bytes;
* an End Of Data word.

All of these go in consecutive cycles, with no gaps inside a worm.

Each switch drops the start word and sets `typ` on the word that follows it.
That word is the next route byte, so the next switch sees it as its own start
word. At the destination the last route byte (0) is dropped, and the Router
receives the data with its first byte marked as the start.

A route byte greater than 2 names no link, and the worm is refused.

## Inside the switch

```
 in_flit[i] ─► ns_input_port[i] ──req/port──► ns_output_port[o] ─► out_flit[o]
               input register   ◄──grant────  arbiter
               route decode     ──word──────► 3:1 multiplexer
               state: IDLE /                   output register
                 FWD / DROP     ◄──NACK back── last holder
 in_nack[i] ◄─ NACK register                    ◄── out_nack[o]
```

Control is split across the links, with no central controller:

* **`ns_input_port`** holds the input register and a small state machine:
  * `IDLE` → `FWD`: a start word is granted its output.
  * `IDLE` → `DROP`: a start word is refused.
  * `FWD` or `DROP` → `IDLE`: End Of Data.

  In `FWD` it offers each word to the output it holds, and marks the first
  word as the new start word. It registers the NACK for the link.
* **`ns_output_port`** does three things:
  * It grants a free output to one of the inputs whose start word names it.
    When several ask in the same cycle, the choice is round-robin: the input
    after the last winner goes first.
  * Its multiplexer feeds the holder's words into the output register, and
    End Of Data frees the output.
  * It routes a NACK arriving from downstream back to the input that last
    held it.
* **`muller_c`** makes the internal clock (see below). Every register uses
  the rising edge of that clock.

Each clock, the switch can take in three words and send out three words.

### Timing of one worm

The table counts rising edges of the internal clock. Edge t is the edge at
which the start word enters the input register.

| edge | what happens |
|---|---|
| t | start word (route byte) enters the input register |
| t+1 | grant registered; the route byte is dropped; the second word enters the input register |
| t+2 | the second word leaves in the output register, marked as the start |
| t+2+n | word n+2 leaves; one word per edge |

For a worm that crosses h switches:

* The head needs 3 edges per switch. The dropped route byte costs one edge.
* Every later word needs 2 edges per switch: the input register and the
  output register.
* The End Of Data reaches the destination Router 3h + (number of data bytes)
  edges after the source sent the start word.

At a clock of f Hz each link carries 8·f bit/s. At 10 MHz that is 80 Mbit/s.

## Refusal and the NACK path

This is the least obvious part of the design. A worm is refused when:

* its output is held by another worm,
* it loses the round-robin to another start word in the same cycle, or
* its route byte names no link.

The refusing switch does two things:

1. It raises `in_nack` on that input for one cycle, at edge t+1.
2. It discards every word of the worm up to and including its End Of Data.

The switches upstream already hold a connection for this worm. Each of them
sees the NACK on its output link. At the next edge it raises the NACK on the
input link that last held that output. So the pulse travels back along the
worm's path one switch per edge until it reaches the source Router. The
source then sends End Of Data at once. That End Of Data tears the path down
as it passes each upstream switch, and the refusing switch uses it to leave
its `DROP` state.

Example: when a worm is refused at the second switch on its path, its source
sees the NACK 6 edges after sending the start word:

* 3 edges for the head to reach the second switch,
* 1 edge for the refusal,
* 1 edge per switch on the way back, 2 in all.

The output port keeps the number of the last holder after the worm has
passed, because a NACK can arrive after the End Of Data of a short worm. The
holder can only change one edge after the End Of Data leaves. So the NACK
must reach each upstream switch before that switch's output is given to
another worm.

Suppose the worm is refused at switch j of its path. The head needs 3 edges
per switch to get there, and the NACK needs 1 edge per switch to come back.
The worm's tail must still be in the first switch when the NACK reaches it.
That holds when the worm is at least 4(h − 1) words long, where h is the
number of switches on the route and the count includes the route bytes, the
data bytes and the End Of Data. Equivalently, it needs at least 3h − 5 data
bytes:

| switches on route | fewest data bytes |
|---|---|
| 1 or 2 | 1 |
| 3 | 4 |
| 4 | 7 |
| 5 | 10 |
| 6 | 13 |

A shorter worm can have its late NACK delivered to another source. That
source then gives up on a worm that actually arrived, and the sender of the
refused worm reports it as delivered. This design does not enforce the rule:
the processor must keep to it, for example by padding short messages. The
network testbenches' random traffic uses at least 3(K + 3) − 5 data bytes, that
is 13 for K = 3 and 16 for K = 4. The rule
comes from counting edges. The testbench does not measure the exact limit
for each route length.

Each source must also wait long enough before its next worm that a late NACK
cannot be mistaken for one meant for the new worm. The Router does this with
its NACK guard time (next section). The single-switch testbench leaves 8
cycles between worms.

A worm that ends right after its route byte (no data) releases its output
and passes nothing on.

## The Router

`ns_router` is the part of a node's Router that faces the switch and the local
memory. It runs on its switch's internal clock.

To send, the processor (through the Route Generator, in the network) gives it:

* the address and length of the message in local memory;
* one or two routes, each a list of link numbers ending with 0;

and pulses `tx_start`. From the next edge the Router sends the worm on the
first route, one word per clock. It reads the data bytes from local memory
itself, one read ahead, because the memory answers one clock after the
address.

Handling of NACKs:

* A NACK while the worm is still going out ends it at once with End Of Data.
* After End Of Data the Router waits `NACK_WAIT` clocks for a NACK that may
  still be on its way back. `kautz_network` sets this to 4(K+3)+4 clocks
  (28 for K = 3), which is longer than the slowest round trip.
* A NACK makes it send the message again on the next route.
* A worm with no NACK by the end of the wait counts as delivered: `tx_done`
  pulses with `tx_ok` high. The network has no positive acknowledge.
* If every route drew a NACK, `tx_done` pulses with `tx_ok` low. Trying again
  later is up to the processor.

For a worm that is not refused, with h route bytes and n data bytes, taken
at edge e:

* the destination reports it (`rx_done`) at edge e + 2 + 3h + n;
* the source reports it (`tx_done`) at edge e + h + n + `NACK_WAIT` + 2.

An incoming worm is written into local memory from `rx_base` upward. On its
End Of Data the Router pulses `rx_done` with the byte count in `rx_len`. It
never refuses a worm, so it must be able to write one byte per clock.

## The internal clock

`muller_c` takes six inputs: the `cl` wire of each of the six links. It works
like this:

* When all six `cl` inputs are high, it drives the internal clock low.
* When all six are low, it drives the clock high.
* Otherwise it holds the clock.

The clock goes back out as `cla` on every link. The element is a latch by
nature and is written as an `always_latch`. Reset forces the clock high.

The switch expects the following from whatever drives its `cl` inputs:

* After the switch's rising edge, read the switch's outputs, then raise `cl`.
* After the switch's falling edge, set the words for the next edge, then
  lower `cl`.

In other words, a word must be on the wires before the `cl` change that
announces it.

How the C elements of neighbouring switches are joined is **not** built into
`kautz_network`. Suppose each switch's `cl` inputs were simply its
neighbours' clocks, with every switch following the rule above. Then two
neighbours whose clocks fall at different moments would each wait for the
other forever. So `kautz_network` brings out every switch's six `cl` inputs
(`sw_cl`) and its clock (`sw_clk`).

The network testbench joins them into a single rendezvous: it raises every
`cl`, waits for every clock to fall, sets the processor and memory inputs,
lowers every `cl`, and waits for every clock to rise. A designer who wants truly local
synchronisation has to supply a handshake scheme there. A registered switch
whose neighbours' rising edges are not ordered also needs the bundling
constraint described above.

## Numbers

| quantity | value in this RTL |
|---|---|
| links per switch | 3 in, 3 out (one pair to the Router) |
| wires per link | 12: 8 data, 1 type, 1 NACK, 2 synchronisation |
| switch pins | 6 × 12 link wires + reset = 73 |
| bytes handled per clock | 6 (3 input registers, 3 output registers) |
| link rate | 1 byte per clock |
| flip-flops | 87 per switch, plus the clock latch |
| network size | K(2,K): 2^K + 2^(K-1) nodes; 12 for K = 3, 24 for K = 4 |
| Router | 153 flip-flops with 8-bit addresses and lengths |
| Route Generator | combinational, no flip-flops |
| longest route | K + 2 hops, K + 3 route bytes (6 for K = 3) |
| NACK guard time | 4(K + 3) + 4 clocks (28 for K = 3) |

The switch itself does not know the topology. Any network with in- and
out-degree 2 can be built from it, such as a torus, a mesh or a de Bruijn
network, but only the Kautz wiring is provided here. Networks whose nodes
have in- and out-degree 3 or more, such as K(3,6) with 972 nodes or K(4,8)
with 81920, would need a switch with more links. They are not built.

## Design choices

The following follow the original design description: the link wires, the
three-by-three structure with input registers, multiplexers and output
registers, one route byte consumed per switch, worm-hole streaming, NACK on a
busy output, the C-element clock, and the Kautz topology. So do a Router that
moves messages between local memory and the switch, retries on another
node-disjoint route after a NACK and tells the processor when all routes
failed, and a Route Generator that gives d node-disjoint routes, shortest
first.

The following are this design's own choices:

* the word encoding (`typ` meaning start or End Of Data depending on the
  link state, and idle words with `typ` = 0);
* route bytes as link numbers, ending with 0 for the Router;
* round-robin arbitration;
* a one-cycle NACK pulse, with the holder passing it upstream;
* discarding a refused worm up to its End Of Data;
* no flow control: a Router must accept one word per cycle;
* the asynchronous active-low reset;
* the numbering of nodes and links in `kautz_network`;
* leaving the joining of the synchronisation wires outside the network;
* the Router's processor and memory interfaces, its NACK guard time, its
  receive buffer, and the Router sharing its switch's clock;
* how the two routes are searched: shortest first, then the shortest route
  that avoids it, ties broken in link order;
* the minimum message length for late NACKs, left to the processor;
* treating a worm that drew no NACK as delivered.

The following are not in this RTL:

* the processor and its local memory (their ports are brought out);
* the reprogramming of the FPGAs the design was meant for.

The Route Generator's search is only known to find two disjoint routes for
K = 3 and K = 4, where it is checked exhaustively. No proof is given for
larger K.

## Files

| file | contents |
|---|---|
| `rtl/ns_pkg.sv` | word type `flit_t`, idle word, input-port states |
| `rtl/muller_c.sv` | C element: internal clock |
| `rtl/ns_input_port.sv` | input register, route decoding, NACK |
| `rtl/ns_output_port.sv` | arbiter, multiplexer, output register |
| `rtl/network_switch.sv` | one switch |
| `rtl/ns_route_gen.sv` | Route Generator: two node-disjoint routes |
| `rtl/ns_router.sv` | Router: sending, retrying, receiving |
| `rtl/kautz_network.sv` | K(2,K) network of switches and Routers (top) |
| `tb/tb_muller_c.sv` | C element against a reference, handshake rounds and random patterns |
| `tb/tb_ns_input_port.sv` | directed cycles: forward, refuse, drop, bad route, NACK return, empty worm |
| `tb/tb_ns_output_port.sv` | directed cycles: round-robin order, busy refusal, multiplexer, NACK return |
| `tb/tb_network_switch.sv` | one switch, with the testbench running its clock handshake |
| `tb/tb_ns_route_gen.sv` | every source and destination pair of K(2,3) and K(2,4), against breadth-first search on the graph |
| `tb/tb_ns_router.sv` | Router alone: clean send, retry after a NACK, failure of both routes, receiving |
| `tb/tb_kautz_network.sv` | 12-node network, with the testbench playing every processor and memory |
| `tb/tb_kautz_network_k4.sv` | the same test on the 24-node network K(2,4) |

`tb_network_switch` makes each mechanism happen at least once and checks the
exact cycle where that is predictable:

* three worms crossing at once,
* a three-way fight for one output,
* a held output,
* a bad route byte,
* a NACK from downstream,
* Router-to-Router loopback,
* start and End Of Data times.

It then runs random traffic, in which every worm must arrive intact or be
NACKed.

`tb_kautz_network` checks:

* the 120 → 201 example above. It is sent first while another worm holds the
  direct arc, so the Router falls back to the second route, `2 1 1 0`. It is
  then sent again on a quiet network, where it takes the shortest route;
* a node sending to itself while a long worm is being delivered to its own
  Router. Such a message has only one route, so it is refused and its failure
  is reported;
* the arrival time of every delivered message, from the start word its
  Router sent and the length of the route it took, plus report times;
* random traffic between all nodes, with both routes offered. Every message
  reported delivered must arrive intact exactly once, and no message reported
  failed may arrive.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

Verilator 5 with timing support is enough. For example:

```
verilator --binary --timing --assert -Irtl rtl/ns_pkg.sv rtl/*.sv \
    tb/tb_kautz_network.sv --top-module tb_kautz_network -Mdir obj
./obj/Vtb_kautz_network
```

Replace the testbench name to run the others. The testbenches start every
block with a falling edge on `rst_n`, because the switch has no clock edges
during reset and relies on the asynchronous reset. To build a larger network,
set `K` on `kautz_network`. The network testbench is written for any K
through its local parameter `K`, and `tb_kautz_network_k4` runs it at K = 4.
The worked example is only checked at K = 3.
