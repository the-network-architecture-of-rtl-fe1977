# CM-5 networks in SystemVerilog

The Connection Machine CM-5 hides its processors behind three separate networks, each built for
one kind of traffic:

* a **data network** for point-to-point messages: a 4-ary fat-tree of identical router chips,
  where a message climbs to the lowest common ancestor of source and destination, picking a free
  parent link at random on the way up, and then follows a fixed path down;
* a **control network** for operations that involve every processor at once: a binary tree that
  broadcasts, reduces, scans (prefix and suffix, plain and segmented), detects global
  termination of data traffic ("router done") and computes global ORs;
* a **diagnostic network** for test access: a binary tree that steers a token down to a chosen
  set of JTAG pods and combines their scan outputs so that one compare tests many pods at once.

A processor sees none of this topology. It sees a **network interface** with memory-mapped
FIFOs: it writes a destination and data words to send a message, a value to contribute to a
reduction, and reads what arrived. This repository is synthesizable RTL for the three networks and
the interface, joined in one top level (`cm5_top`) of 64 processing nodes plus a control
processor, with a self-checking testbench for every block.

## Files

| file | what it is |
|---|---|
| `rtl/cm5_pkg.sv` | shared types: control packet struct, operation and operator codes, the link CRC |
| `rtl/sync_fifo.sv` | the FIFO used everywhere |
| `rtl/dn_router.sv` | data network router chip, 8 nibble-wide links |
| `rtl/dn_fat_tree.sv` | one side of the data network: router chips wired as a fat-tree |
| `rtl/cn_alu.sv` | the control network combiner (OR, XOR, signed max, signed add, unsigned add) |
| `rtl/cn_node.sv` | one control network tree node |
| `rtl/cn_root.sv` | turnaround at the root of the control tree |
| `rtl/cn_tree.sv` | complete binary tree of `cn_node` |
| `rtl/ni_dn_port.sv` | one side (left/right) of the interface toward the data network |
| `rtl/ni.sv` | the network interface of a node |
| `rtl/diag_node.sv`, `rtl/diag_tree.sv` | diagnostic network node and tree |
| `rtl/cm5_top.sv` | the whole machine |
| `tb/*_tb.sv` | one self-checking testbench per block; `cm5_top_tb` runs the whole machine at its default size |

## Data network

### Router chip (`dn_router`)

Each chip has 4 child links and 4 parent links; every link carries one 4-bit nibble per clock
in each direction, with a `ready` wire running back for flow control. Every input has a
16-nibble FIFO, so a blocked message is buffered while the rest of the chip keeps working.

A message is a nibble stream:

```
H0 = {afd, up}      up: number of levels still to climb
H1 = {0, n}         n : number of down digits that follow
d(n-1) .. d0        one nibble per level, the child port (0..3) to take going down
LEN                 1..5 data words
TAG                 4 bits, chosen by software
DATA                LEN words, 8 nibbles each, most significant first
CRC                 8 bits (x^8+x^2+x+1) over everything above, 2 nibbles
```

Routing is decided from the head alone, and each chip strips what it used:

* `up > 0` and the message came from a child: it must climb. The chip offers it to the
  enabled parent links that are free, starting from a pseudorandom position given by an LFSR,
  and rewrites `up` to `up-1`. At most one climbing message is placed per clock. Chips at
  levels 1 and 2 have only two parent links enabled (`parent_en`), higher levels four.
* otherwise it descends: the first digit names the child port; the chip removes it. A message
  never goes from one parent link to another.

Several inputs competing for one child output are served round-robin, so no input starves. An
output is held by one message from head to CRC (wormhole routing: the head may already be
several chips further on when the tail leaves).

**Errors.** Every chip checks the CRC of every message it forwards and computes a fresh CRC for
the rewritten header. If the incoming CRC is wrong, the chip raises `primary_err` and sends the
*complement* of the correct new CRC. A chip that receives exactly the complement of the correct
CRC raises only `secondary_err` and passes the complement on. So one fault produces one primary
report at the chip where it happened and a trail of secondary reports behind it, instead of an
avalanche of primary errors.

**All-fall-down.** For swapping out a timeshared user, the network can be put in all-fall-down
mode (`afd_mode`). A chip in that mode sends every message down, to the child port given by a
fixed per-input permutation `afd_perm`, and sets the `afd` bit in H0; a message with that bit
set keeps falling in every chip it reaches. The messages end up spread over the nodes near where
they were, from where software can save them and later resend them.

Each chip counts the messages leaving on each output (`msg_count`).

Timing: through an idle chip, the first nibble of a message appears on the output at most 6
clocks after it entered.

### Fat-tree (`dn_fat_tree`)

`LEVELS` levels of router chips over `4**LEVELS` leaves. A tree node at level `l` covers
`4**l` leaves and is built from as many chips as there are parent links in the levels below
(1 at level 1, 2 at level 2, 4 at level 3 with two-parent chips below...), which keeps the
bandwidth out of a subtree equal to what its chips can send up. Chip `j` of a node connects its
parent ports to the `j`-th group of chips of the node above. The top level's parent links are
unused.

The network interface computes the routing head: with base-4 digits of the source and
destination addresses, `l` = the highest digit position where they differ; the message climbs
`l` levels and then takes the `l+1` destination digits `l..0` down.

Two full fat-trees are instantiated in the top, the **left** and the **right** side. Every
interface has one link into each, and a message stays on the side it was sent on. Using one
side for requests and the other for replies lets a node always drain replies, which is how the
design avoids fetch deadlock without per-message bookkeeping.

## Control network

This is the least obvious part of the design.

### Packets

Every link carries one packet per clock in each direction (`cn_pkt_t` in `cm5_pkg`):

| field | meaning |
|---|---|
| `ptype` | IDLE (filler), SINGLE (one source: broadcasts, interrupts), MULTI (one from every leaf: reductions, scans, router done, synchronous OR), ABSTAIN (a leaf's "count me out") |
| `op`, `comb` | operation and operator |
| `data` | 32-bit value |
| `seg` | segment start, for segmented scans |
| `ovf` | overflow from the combiner |
| `err`, `async_or[1:0]`, `stop` | "minor" bits: ORed from both children on every clock, whatever the packet |

### Node (`cn_node`)

Going **up**, a node looks at the two packets arriving from its children:

1. A SINGLE packet goes straight up, ahead of everything. There is no buffer for it. Two SINGLE
   packets in the same clock are a collision: the left one goes on and the error bit is set.
2. MULTI and ABSTAIN packets are queued per child, in arrival order. As soon as both queues
   have a packet, and no SINGLE packet needs the up slot, the two heads are combined by
   `cn_alu` and sent up. An ABSTAIN counts as the identity of the operator (0, or the most
   negative number for signed max); two ABSTAINs give an ABSTAIN. Because both queues are
   FIFOs and every leaf issues its combining operations in the same order, operations can be
   pipelined: a second reduction can follow the first a clock later.

Going **down**, SINGLE packets and reduction results are copied to both children.

**Scans.** A forward scan gives leaf `i` the combination of the values of leaves `0..i-1`; a
backward scan that of the leaves after it. Each node, when it combines on the way up, puts
aside in a small FIFO (the *scan buffer*) the summary of its left subtree (forward scan) or
right subtree (backward scan). When the scan value `p` comes down from the parent (the
combination of everything to the left of this subtree), the node gives the left child `p`
and the right child `p op left_summary` (forward; mirrored for backward). The root sends down
the identity. Example, signed add over 8 leaves: inputs `3 2 0 4 2 6 5 8` give
`0 3 5 5 9 11 17 22`.

**Segmented scans.** A leaf can set `seg` to start a new segment; the scan then restarts at
that leaf. Every summary carries a flag "this subtree contains a segment start", and a put-aside
summary that has the flag set replaces the parent's value instead of being combined with it:
right child gets `saved.seg ? saved.data : p op saved.data`. The interface finishes the job at
the leaf: a forward-scan leaf that started a segment gets the identity, and a backward-scan leaf
that starts a segment contributes the identity.

**Latency.** A SINGLE packet takes one clock per level going up, a combined packet two (queue,
then combine), and every packet one clock per level down. In an 8-leaf tree a broadcast is
back at all leaves within `2*3+3` clocks.

### Tree and root (`cn_tree`, `cn_root`)

`cn_tree` is a complete binary tree of `2**HEIGHT` leaves in address order. `cn_root` turns
packets around: it sends down what came up, except that for a scan it sends down the identity.
In the top, one more `cn_node` joins the 64-leaf tree (left) with the control processor's
interface (right) under the root, so the control processor is the last leaf of the partition.

### Flow control

Nodes never stall. The queues stay bounded because each interface keeps at most `CM_MAX`
combining and `BC_MAX` broadcast operations outstanding, and because an interface whose
broadcast receive FIFO is short of space raises the `stop` bit, which reaches every leaf within
a round trip and holds off new broadcasts.

## Network interface (`ni`, `ni_dn_port`)

Word addresses on the processor bus (`bus_sup` marks supervisor accesses; `*` = supervisor
only: a user write is ignored and sets the privilege-error flag):

| addr | name | meaning |
|---|---|---|
| 00 / 04 | L / R_SEND_FIRST | header `{tag[31:28], len[26:24], relative destination}` |
| 01 / 05 | L / R_SEND | data word |
| 02 / 06 | L / R_RECV | pop: header `{afd[31], crc_bad[30], tag[27:24], len[2:0]}`, then the data words |
| 03 / 07 | L / R_STATUS | `{bounds_err, rx_avail, accepted}` |
| 08 / 0C | L / R_SEND_FIRST_PHYS* | header with a physical destination |
| 10 | CN_UBCAST | user broadcast |
| 11 / 12 / 13 | CN_SBCAST* / CN_INTR* / CN_UTIL* | supervisor, interrupt, utility broadcast |
| 14 | CN_COMB_CFG | `{seg[9], abstain[8], comb[6:4], op[3:0]}` |
| 15 | CN_COMB | contribute a value to a reduction or scan |
| 16 | CN_RDONE | enter router done |
| 17 | CN_SYNCOR | synchronous OR, bit 0 |
| 18 | CN_ASYNC | asynchronous OR inputs (bit 1 supervisor) |
| 20..23 | BCAST / COMB / RDONE / SYNCOR_RECV | pop results |
| 24 | CN_STATUS | `{rd_open[11], comb_ovf, priv_err, rx_err, net_err, async_or[6:5], out_full, si, ri, ci, bi}` |
| 25 | BCAST_OP | kind of the broadcast at the head of BCAST_RECV |
| 30..32 | TAG_MASK*, PART_BASE*, PART_SIZE* | |
| 33 | SELF | physical address |
| 34 | IRQ_STATUS | `{async rise, interrupt broadcast, tag R, tag L}`, cleared by reading |
| 35 / 36 | SENT / RECEIVED | message counters |

**Sending a message.** User code names destinations by relative address. The interface checks
it against `PART_SIZE` (refusing the message and setting `bounds_err` if it is outside), adds
`PART_BASE`, and queues the header if the whole message (header and `len` words) fits in the
8-word send FIFO; otherwise it refuses the message and drops the data words that follow, and
`accepted` reads 0. Software then tries again later; it never blocks on the network. The
serializer computes the routing head and CRC on the fly.

**Receiving.** The deserializer holds a whole message until its CRC is checked, then moves a
header word and the data words into the receive FIFO. If bit `tag` of `TAG_MASK` is set, the
processor is interrupted. Reading an empty receive FIFO returns 0 and pops nothing.

**Combining.** A write to `CN_COMB` sends a MULTI packet with the configured operation, or an
ABSTAIN packet while the abstain bit is set. The interface remembers, in order, what it
contributed to each open operation; when the result comes back it drops results of operations
it abstained from and applies the segment rule above.

**Router done.** After a processor has sent all its messages it writes `CN_RDONE`. The
interface then sends `sent - received` (messages accepted into its send FIFOs minus messages
delivered to it) into a signed-add reduction. While the total over all leaves is not zero, every
interface sends its current difference again; when it is zero, every processor gets a word in
`RDONE_RECV`. This is Kirchhoff's current law applied to the data network: if as many messages
have left it as have entered, and every processor has stopped sending, it is empty. No other
combining operation is started while router done is open, so all leaves keep the same order.

**Global ORs.** The synchronous OR is a one-bit OR reduction. The two asynchronous ORs are
minor-stream bits: each leaf's input is ORed up the tree and copied down on every clock,
without waiting for anyone; a rising result interrupts.

## Diagnostic network (`diag_node`, `diag_tree`)

A binary tree with the diagnostic processor at the root and pods (JTAG scan chains) at the
leaves. To select pods, the root sends an address one digit per clock, high-order first, each
digit `0` (left), `1` (right) or `B` (both), ended by `END`. A node takes the first digit it
receives as its own child-enable setting and forwards every later digit to the enabled
children, so a `B` splits the token and an address like `00B10B` selects four pods at once.
An address shorter than the tree height names an internal node. Paths stay set until
overwritten or erased, which allows set union: select a set on the left, then one on the
right, then send `B` to the root, which re-enables both children without touching the paths
below.

The JTAG step strobe goes only down enabled paths; TMS and TDI are broadcast. The scan outputs
come back combined: with AND when the expected bit is 1, with OR when it is 0 (a disabled child
gives the identity). So one compare tells whether *all* selected pods returned the expected bit;
a faulty pod is then found by addressing smaller groups.

## Top level (`cm5_top`)

64 processing-node interfaces (`LEVELS = 3`), a control-processor interface, two data network
sides of 28 router chips each, the 65-leaf control tree, and a 64-pod diagnostic tree. Processor
buses, the diagnostic processor and the pods are ports. Change `LEVELS` for 16 or 256 nodes.
All of it runs on one clock.

## Departures from the original machine

* Control packets move as one parallel word per clock. The original sends a 65-bit packet
  bit-serially as a major and a minor stream, with a CRC and an alignment packet; none of that
  framing is built.
* The control network switch that joins two binary nodes with four children and two parents, to
  map around faults and attach any control processor to any partition, is not built; the tree
  is fixed and holds one partition.
* The control processor sits only on the control network, not at a data-network leaf.
* Relative-to-physical address mapping is base plus offset; the original can map failed
  processors out.
* Context switching of the interface (saving its state, flushing the control network) is not
  built; all-fall-down mode is, as a top-level input.
* Link widths, FIFO depths, CRC polynomial and width, register map and encodings, the END marker
  of diagnostic addresses, and the stop-bit flow control are this design's choices.
* JTAG is carried as a step strobe synchronous to the system clock; the pods' TAPs are outside.
* Processors, memory, I/O, link transceivers and clocking are outside the design.

## Simulating

Any testbench runs with plain Verilator, for example:

```
verilator --binary --timing --assert rtl/cm5_pkg.sv rtl/*.sv tb/cm5_top_tb.sv \
          --top-module cm5_top_tb -Wno-fatal
./obj_dir/Vcm5_top_tb
```

(list `rtl/cm5_pkg.sv` first). Every testbench prints `TB_RESULT checks=N failures=M` and has a
watchdog. `cm5_top_tb` runs the default 64-node machine and counts every mechanism: permutation
traffic on both sides, back-pressure stalls, refused sends, router done waiting for messages in
flight and then closing, a broadcast, a reduction and a forward scan over 65 leaves, the
synchronous and an asynchronous OR, an all-fall-down delivery, diagnostic selection and fault
detection. It fails if any of them never happened.

Block testbenches: `dn_router_tb` (routes, errors, all-fall-down, contention, latency),
`dn_fat_tree_tb` (random traffic between 16 leaves under back-pressure), `cn_alu_tb`,
`cn_node_tb`, `cn_tree_tb` (random reductions and plain, segmented and abstaining scans against
a reference model, including the 8-leaf example above), `ni_tb` (interface against loopback
links and a one-leaf tree), `diag_node_tb`, `diag_tree_tb` (the `00B10B` example, set union,
fault isolation).
