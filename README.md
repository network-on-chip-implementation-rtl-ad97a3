# Circuit-switched torus network-on-chip for a small multicore

This design connects a set of processor cores to one shared memory over a
circuit-switched network-on-chip. The nodes sit on a 4 x 4 grid whose rows and
columns wrap around (a 2D torus). Every node has a router ("switch") and one
resource behind it. On fifteen nodes the resource is a core, reached through a
Network Interface Controller (NIC). On the sixteenth it is the memory,
reached through a memory NIC that does the reads and writes itself.

Each link is a pair of 16-bit lanes, one per direction, and carries one word
per clock cycle. There are no virtual channels and no packet buffers in the
routers. A package first reserves a complete path from sender to receiver.
The receiver then confirms the path, the data streams through, and the path is
released. The memory traffic is whole cache lines of 8 x 32 bits.

## Files

| file | contents |
|---|---|
| `rtl/noc_pkg.sv` | lane width, package layout, type and size codes, special lane words, address helpers, routing function |
| `rtl/noc_switch.sv` | one router: 5 ports, one connection at a time |
| `rtl/nic_link.sv` | network side of every NIC: send/receive buffers and the handshake state machine |
| `rtl/nic.sv` | core NIC: turns core read/write requests into packages and returned lines into words |
| `rtl/mem_nic.sv` | memory NIC: executes write packages, answers read packages |
| `rtl/line_memory.sv` | the shared memory, 32-bit words, synchronous |
| `rtl/tinuso_noc.sv` | top: the torus of switches, 15 core NICs, the memory NIC and the memory |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_tinuso_noc` runs the full 4 x 4 system |

## Packages and lane words

A package is a sequence of 16-bit lane words, least significant first:

| word | contents |
|---|---|
| 0 | header: receiver address in bits 15:8, sender address in bits 7:0 |
| 1 | type word: bits 3:0 size code, bits 8:4 package type, bits 15:9 zero |
| 2.. | data, 0 to 288 bits |

Size codes 0..6 mean 0, 16, 32, 64, 128, 256 and 288 data bits; 7..15 are
invalid. Three package types are used:

| type | code | data | meaning |
|---|---|---|---|
| read | 1 | 32 bits | word address of a cache line |
| write | 2 | 288 bits | address in bits 31:0, then the eight line words |
| read-return | 3 | 256 bits | the eight line words, sent to the reader |

Three lane values are reserved and never start a package:

* `16'h0000` is **idle**: nothing is on the lane.
* `16'hFFFF` is **busy**. A switch drives it on every output it is not using
  while it carries a connection, so that a waiting sender can see why it waits.
* `16'h02A0` is **line ready**, sent by the receiver back to the sender. Its
  low byte `8'hA0` can never be a sender address, so it cannot be mistaken
  for a header.

A node address is `{x, y+1}` in two nibbles, with x the column and y the row,
both counted from 0 at the lower left. The `+1` keeps address `8'h00` out of
use. In the 4 x 4 grid the nodes are `8'h01` to `8'h34`, and the memory sits
at (3,3) = `8'h34`.

## How a connection is made

1. The sending link puts the header on its lane and repeats it.
2. Each switch on the way that is free takes the header, picks an output
   (see routing), and passes the header on one cycle later. It drives busy on
   its other outputs. A busy switch does not take the header: it waits on the
   lane until the switch is free.
3. The receiving link takes the header if its receive buffer is empty. It then
   sends line ready back. The switches along the path carry the word back,
   one cycle each.
4. The sender sees line ready and starts to send the type word and the data.
   Every switch reads the size code from the type word and counts the data
   words down as they pass.
5. When its count reaches zero, a switch drives idle for a cycle and is free
   again. The receiver, which counts the same way, marks its buffer full.

A switch stays in its first waiting state until it sees the line ready word
and then a new word from the sender. Two things close a connection early: the
sender's lane drops to idle while waiting, or the type word has an invalid
size code. The return lane carries the receiver's words only until the type
word has passed. After that it is idle, so a late line-ready word cannot reach
a sender that has finished. The forward lane is idle once the count is zero,
so a sender's next header cannot slip through a connection that is closing.

## Routing

Routing is dimension-ordered, rows first: a header first moves up or down
until it is in the right row, then left or right, then to the local port.
A node on the outer ring of the grid may use a wrap-around link, but only if
that path is strictly shorter. Inner nodes always take the direct direction.
On a 4 x 4 torus this means a path never needs more than two hops in each
dimension. For example, (0,0) to (3,3) is one hop down over the wrap link to
(0,3), then one hop left over the wrap link to (3,3).

When several headers arrive in the same cycle, the switch takes them in this
order: from above, from below, from the left, from the right, then from its
own NIC.

## The NICs

`nic_link` is shared by both kinds of NIC. It holds one 320-bit send buffer
and one 320-bit receive buffer, so each can hold the largest package. Its
states are:

* `SETUP`: idle. An incoming header is taken first. Otherwise a full send
  buffer moves the link to `SEND_WAIT`.
* `RECV_SIGNAL`: sends line ready until the type word arrives.
* `RECEIVE`: counts the data in.
* `SEND_WAIT`: drives the header until line ready comes back.
* `SEND`: sends the type word and the data.

`nic` (core side) has a request buffer and a response buffer next to the
link. The core interface is:

* `mem_write` for one cycle with `core_addr` (receiver node) and `mem_addr`
  (line address). The eight data words follow on `mem_dat_write` in the next
  eight cycles. They become one write package.
* `mem_read` for one cycle with `core_addr` and `mem_addr`. This becomes a
  read package.
* A returned line comes out on `mem_dat_read`, one word per two cycles:
  `data_ready` is high for one cycle and low for one cycle, eight times.

The core interface has no busy output. A flag raised while the request
buffer is still full, or while a line is being delivered, is ignored.

`mem_nic` (memory side) wraps a link and a memory process. A write package is
written to `A..A+7` in eight cycles. A read package is read in ten cycles:
eight reads, with data one cycle later. The answer is a read-return package
addressed to the sender of the read. While it works on the memory, the
memory process holds the link in `SETUP`, so new headers wait on the lane.

## Timing

With every parameter at its default, the 4 x 4 system takes 75 cycles for a
read from the core at (0,0). This is counted from the `mem_read` cycle to the
last `data_ready`. The path is three switches each way:

| cycles | step |
|---|---|
| 1-3 | request built, loaded, header leaves the NIC |
| 4-6 | header through 3 switches |
| 7-10 | line ready back to the core |
| 11-16 | type and address words sent and received |
| 17-27 | memory read |
| 28-30 | read-return header leaves the memory NIC |
| 31-37 | header out, line ready back |
| 38-57 | type word and 16 data words |
| 58-61 | response buffer, first `data_ready` |
| 61-75 | eight words, one every two cycles |

In general a read takes 63 + 6 x L cycles, where L is the number of links
between the core's node and the memory node. Each extra link adds one
register stage to six steps: the request header, its line-ready word and its
last data word, and the same three for the answer. On the 4 x 4 grid, L
ranges from 1 (the memory's neighbours, 69 cycles) to 4 (node (1,1), 87
cycles). With 32-bit lanes every read is 9 cycles shorter: the request
needs one data word instead of two, and the answer needs 8 instead of 16.

Other measured times:

* A write package between two directly connected links takes 23 cycles.
* The memory NIC answers a read in 39 cycles, counted from the cycle the
  request is loaded at a directly connected link.

## Departures from the original design and open points

* The original system was measured at 95 cycles for the same read. This RTL
  takes 75. The difference comes from register stages that the original does
  not describe.
* The original core process went back to its send state whenever no flag was
  set, so it looked at the flags only every second cycle. Here the core
  process waits in its receive state. A one-cycle flag is therefore never
  missed.
* The address layout is `{x, y+1}`.
* The size of each package type and the order of the data words are this
  design's choices.
* The lane width is a parameter. 16 bits is the default and 32 bits is
  simulated as well. With 32-bit lanes the header and the type word still
  take one lane word each, in the low 16 bits. Widths such as 64 would need a
  rule for padding the 288-bit field, which is not defined, so an
  elaboration check rejects them.
* The grid size and the memory position are parameters; the default is 4 x 4
  with the memory at (3,3). A grid may be up to 16 x 15 nodes.
* The memory is 1024 words, starts at zero and has one cycle of read latency.
* **Deadlock under concurrent reads.** The protocol can deadlock when several
  cores read at the same time, and this RTL does not prevent it. Here is how:
  the memory NIC is about to send a read-return, while another core's read
  header holds a switch on the return path and waits for the memory NIC. The
  memory NIC waits for that switch, and the switch waits for the memory NIC.
  Two concurrent reads that share a switch do complete. Six concurrent reads
  were seen to lock up the system. Fifteen concurrent writes complete, because
  writes need no answer. Possible fixes
  are time-outs, one long-lived connection per core, or a central arbiter.
  None of them is built. The tests use concurrent writes, but at most two
  concurrent reads.
* There is no processor core in this RTL. The core ports of all fifteen NICs
  are ports of the top, and the testbenches act as the cores.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. With
Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/noc_pkg.sv tb/tb_tinuso_noc.sv --top-module tb_tinuso_noc
./obj_dir/Vtb_tinuso_noc
```

The other modules are found by name in `rtl/`. Replace `tb_tinuso_noc` with
any other testbench name to run that test. These are the tests:

| testbench | checks |
|---|---|
| `tb_noc_pkg` | size codes, node addresses over a 16 x 15 grid, and routing on 4 x 4 and 5 x 3 tori against a reference, including that every path arrives |
| `tb_noc_switch` | routing to every node from an edge and an inner switch, busy words, closing on a dropped sender and on an unknown size code, priority, a full connection with its exact cycle timing |
| `tb_nic_link` | a write package in 23 cycles, a full receive buffer holding off the next package, a package without data, `hold` |
| `tb_nic` | write and read packages built from the core interface; a returned line delivered with the first `data_ready` after 24 cycles and two-cycle spacing |
| `tb_mem_nic` | writes land in memory; a read answered in 39 cycles; two reads back to back |
| `tb_line_memory` | write, read-back and read-before-write |
| `tb_tinuso_noc` | the full 4 x 4 system: two writes that collide in one switch, four reads from edge and inner nodes, the 75-cycle read latency, all switches idle at the end, and a count of each mechanism (priority, busy blocking, wrap links, line ready, memory waits) |
| `tb_system_load` | the full system under load: all fifteen cores write at once, each then reads its line back, the latency of every core is checked against 63 + 6 x L, and two cores read at the same time |
| `tb_lane32` | the same as `tb_system_load` with 32-bit lanes, latency 54 + 6 x L |

The system testbenches check internal signals by hierarchical name:
`g_row[y].g_col[x].u_sw` is the switch at (x,y).
