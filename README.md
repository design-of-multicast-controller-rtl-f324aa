# Multicast controller for a packet-circulating router

A high-capacity router with a unicast crossbar can carry multicast traffic without making the
input port copy each packet once per destination. Instead, packets are *circulated*: the input
(the root) sends a packet to at most two ports of the multicast set, each of those sends it on to
at most two more, and so on. The copying load is spread over every port of the session. Each
session has a **circulation tree**, and this RTL builds and repairs that tree. It is the
multicast controller. It also forwards data packets along the tree.

The tree-update algorithm follows M. Blagojević and A. Smiljanić, "Design of multicast
controller for high-capacity Internet router", *Electronics Letters*, 2008. That article gives
the algorithm, the tree memory contents and the block structure. It gives no message format,
no interfaces and no flow control. Everything at that level is this design's own, and each
choice is listed under "Departures and own choices" below.

## The binary tree

The key idea is that **a port's position in the tree depends only on its port ID**. Port IDs
have `log2 N` bits, and bit 0 is the MSB. A port at level *i* has a left child and a right
child:

* the left child has bit *i* of its ID equal to 0;
* the right child has bit *i* of its ID equal to 1.

So a port at level *L* always sits at the position spelled by the first *L* bits of its own
ID. The root (level 0) is the session's input port and can have any ID.

Example with 16 ports (4-bit IDs), root 0000:

```
level 0                 0000
                  0/          \1
level 1        0100            1010
              0/             0/    \1
level 2     0010          1000      1101
                                  0/
level 3                        1100
```

Port 1100 was added last. At the root, bit 0 of 1100 is 1, so it goes right to 1010. At level 1,
bit 1 is 1, so it goes right to 1101. At level 2, bit 2 is 0, and the left slot of 1101 is free,
so 1100 lands there.

Because positions follow IDs, no port ever needs a lookup table from multicast address to SID.
The earlier balanced-tree scheme needed one, in every port, to handle ports that leave.

The deepest level a port can reach is `log2 N`. An example is a chain 0000-1000-1100-1110-1111,
where 1111 sits at level 4 for N = 16. The level field is sized for this.

## Tree memory and SIDs

Every port has a tree memory (`mc_tree_mem`) with one entry per session that passes through it.
The entry's address is the session's **SID at that port**. The same session therefore has a
different SID at each port. An entry (`entry_t` in `mc_pkg`) holds:

| field      | content                                                        |
|------------|----------------------------------------------------------------|
| `vld`      | entry in use                                                   |
| `level`    | the port's level in this tree                                  |
| `parent`   | (valid, port ID, SID at that port)                             |
| `child[0]` | left child, same format                                        |
| `child[1]` | right child, same format                                       |

A data packet always carries the SID it has at the port that receives it. When a port forwards
a copy, it writes the child's SID into it. Only the root needs an address-to-SID lookup, once,
when a packet enters the router. That lookup is outside this RTL: packets enter already carrying
the root SID.

SIDs are allocated by the port that owns the entry, lowest free SID first. The memory keeps a
register of used bits beside the RAM. A priority encoder on that register provides the free SID.

## Messages

All traffic between ports uses one message format, `msg_t`, and travels through the crossbar:

| kind        | sent by / to                       | effect at the receiver                                     |
|-------------|------------------------------------|------------------------------------------------------------|
| `DATA`      | line → root, parent → child        | one copy to each child, with that child's SID              |
| `CREATE`    | line → root port                   | allocate a root entry; report its SID (`created_sid`)      |
| `ADD`       | line → root, then down the tree    | forward by ID bit, or reserve the free slot and send ATTACH |
| `ATTACH`    | placing port → new port            | allocate an entry under the given parent; answer SETCHILD  |
| `SETCHILD`  | child → parent                     | overwrite `child[dir]` (an empty child clears the slot)    |
| `REMOVE`    | line → root, then down the tree    | forward by ID bit; at the leaving port start the repair    |
| `REPLACE`   | port → one of its children         | move one level up (see below)                              |
| `SETPARENT` | moved port → adopted child         | overwrite `parent`                                         |

`a` and `b` are (valid, port, SID) node references. Their meaning depends on the kind; see the
comments in `mc_pkg.sv`.

## Removing a port: the path moves up

This is the least obvious part of the design. Removing a port is done in two steps:

1. Select a path. It runs from the root to the leaving port, then on from the leaving port to a
   leaf. The first part is fixed by the leaving ID. The second part may be any path. This design
   always picks the right child if there is one, else the left child.
2. Move every port below the leaving port on that path up by one level, into its parent's old
   position.

Moving up always keeps the ID rule, because a shorter prefix of a port's ID is still a prefix of
that ID.

In messages, the leaving port L frees its entry:

* If L is a leaf, it sends `SETCHILD(empty)` to its parent, and the work is done.
* Otherwise it sends `REPLACE` to the chosen child P1. The message carries L's parent, L's level
  and L's other child (P1's sibling).

A port P that receives `REPLACE(parent Q, level l, sibling S)`:

* takes level *l* and parent Q;
* puts S into the slot on the side P did *not* come from. That side is bit *l* of P's own ID;
* empties the slot it came from, which the next port up the chain will refill;
* sends `SETCHILD(P)` to Q, into slot bit *l−1* of P's ID;
* sends `SETPARENT(P)` to S, if S exists;
* sends `REPLACE(P, l+1, other old child)` to one of its old children, if it had any. The chain
  ends at a leaf.

Every direction a port needs comes from its own ID and its new level, so the messages carry no
slot bits for this. Example: port 1010 leaves the tree drawn above. The path is 1010 → 1101 →
1100. Port 1101 takes level 1 with children 1000 (adopted) and 1100. Port 1100 takes level 2, as
the right child of 1101.

Requests flow from the root toward the leaves. Only the short `SETCHILD`/`SETPARENT`
notifications go to a parent or a sibling. A port's SID is chosen by that port, so the parent
can only learn it through `SETCHILD`.

**Requests of one session must be issued one at a time.** The issuer must wait until the
previous request has finished. A request that overtakes an unfinished one may see a half-updated
tree; for example, an add can reach a slot that is reserved but whose SID is not yet known.
Requests of different sessions may overlap freely. Data packets sent during a tree update may
miss moved ports or reach them twice.

The root never leaves: a `REMOVE` naming the root is ignored. So is a `REMOVE` naming a port
that is not a member, and an `ADD` naming a port that already is one.

## Router structure

```
            line in p ──►┐
                         MUX ─► multicast control ─► output queue ──► crossbar input p
 crossbar output p ─────►┘         (tree memory)          │ request
        │                                                  ▼
        └──► line out p                           crossbar scheduler (external)
```

`mc_router_top` holds one `mc_module` per port plus `mc_crossbar`. Crossbar output *p* goes to
line output *p* and loops back into module *p*. A delivered packet therefore leaves the router
at port *p*, and port *p* also circulates it further. `line_out_valid[p]` pulses for data
packets only.

The **crossbar scheduler is not included.** Each module presents the head of its output queue as
a request: `sched_req_valid[p]` and `sched_req_dest[p]`. The scheduler returns, for every output
*j*, `sched_sel_valid[j]` and `sched_sel_in[j]`. The crossbar passes a message only if it is
addressed to that output, and only while the receiving module is ready. A scheduler may keep a
grant until the message moves. It must never give one input to two outputs; `mc_crossbar`
asserts this. The testbenches use a simple round-robin model, `tb/xbar_sched_model.sv`.

### Flow control

The multiplexer (`mc_input_mux`) always serves packets from the crossbar first. It takes a new
packet from the line only while the module's output queue is empty. This drains traffic already
inside the router before new load is taken.

Without the admission rule, round-robin service of both sources deadlocks under a burst of data
on four sessions: three ports each wait on a full queue of the next. With the
current rule the burst tests run clean. Even so, every queue is finite. Under sustained overload
a circular wait of full queues between ports therefore remains possible, and nothing in this
design detects or breaks it.

## Timing

* **Multicast control:** a message accepted at clock edge E is processed in the next cycle (tree
  memory read, then write). Its k-th output message (k = 0, 1, 2) is handed to the queue at edge
  E+2+k when the queue has room. A message that produces nothing takes 2 cycles. A `DATA` with
  two children takes 4 cycles, and a `REPLACE` up to 5.
* **Module:** the first output is at the queue head after edge E+2, and the crossbar can take it
  at edge E+3.
* **Crossbar and multiplexer:** combinational.

On an FPGA (Cyclone II), the published implementation reported 40-50 ns processing time per
request for N = 8…128. These cycle counts cannot be compared with that without a clock
frequency.

## Parameters

| parameter               | default | notes                                                            |
|-------------------------|---------|------------------------------------------------------------------|
| `mc_pkg::N_PORTS`       | 16      | router ports. The worked examples use 4-bit IDs; sizes 8 to 128 are meaningful. |
| `mc_pkg::N_SID`         | 256     | tree memory entries (sessions) per port; own choice              |
| `mc_pkg::DATA_W`        | 16      | tag carried by data packets (stands for the packet); own choice  |
| `OUT_DEPTH` (top/module) | 8       | output queue depth, power of two; own choice                     |
| `MY_ID` (module/control) | —      | port ID, set by the top                                          |

Widths derive from these: `PORT_W = log2 N_PORTS`, `SID_W = log2 N_SID`, and `LVL_W` holds
levels 0 to `PORT_W`. To build a 128-port router, change `N_PORTS` in `rtl/mc_pkg.sv`.

All registers use a synchronous, active-low reset `rst_n`. The tree memory arrays are not
cleared: the used bits are, and reads are masked with them.

## Departures and own choices

* The message set, its encoding, SID allocation (lowest free SID), the right-first choice of
  replacement path, the `level` field in each entry, and the rule that the root never leaves.
  All are own choices. The right-first choice reproduces the published removal example.
* The published text gives the maximum number of tree levels as `log2 N − 1`. The forwarding rule
  itself allows a port at level `log2 N` (the chain example above). The RTL follows the rule, and
  the testbench exercises that deepest case.
* The output queue and the flow-control rule are additions.
* Not included: the crossbar scheduler (an earlier, separate design), the root's
  address-to-SID lookup, the partitioning of modules over several FPGAs, and the pin
  multiplexing used in one of the published scalability cases. The balanced-tree scheme is the
  earlier alternative, and is not built.

## Files

| file                    | content                                                       |
|-------------------------|---------------------------------------------------------------|
| `rtl/mc_pkg.sv`         | parameters, `node_t`, `entry_t`, `msg_t`, `evt_t`, ID-bit helper |
| `rtl/mc_tree_mem.sv`    | tree memory with free-SID search                              |
| `rtl/mc_control.sv`     | the algorithm: data circulation, create, add, remove/replace  |
| `rtl/mc_input_mux.sv`   | line/crossbar multiplexer                                     |
| `rtl/mc_fifo.sv`        | output queue                                                  |
| `rtl/mc_module.sv`      | one port: mux + control + memory + queue                      |
| `rtl/mc_crossbar.sv`    | N x N unicast crossbar                                        |
| `rtl/mc_router_top.sv`  | the router: N modules and the crossbar; scheduler ports out   |
| `tb/tb_*.sv`            | self-checking testbenches, one per module (the queue is covered by the module and router tests) |
| `tb/xbar_sched_model.sv`| behavioural round-robin scheduler for simulation              |

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog.

* `tb_mc_router_top` runs the full default size (16 ports, 256 SIDs). A reference model of the
  trees, written separately in the testbench, predicts every port's SIDs. After each request the
  testbench compares every tree memory entry and every used-SID bit. After each data packet it
  checks that every member except the root sent the packet out exactly once, and that no other
  port sent it.

  The test covers:
  * the worked example (adds, then port 1010 leaves);
  * the deepest chain;
  * 400 random add, remove and data steps on four sessions;
  * bursts of data entered at all four roots together;
  * emptying every session.

  It counts each mechanism and fails if one never happened: forwarding, placement, attach, leaf
  leave, inner leave, move-up, parent rewrite, ignored request, line/crossbar collision at the
  multiplexer, and crossbar contention.
* `tb_mc_control` checks hand-written expected messages for every message kind, and their exact
  cycle timing, including under back-pressure.
* `tb_mc_module`, `tb_mc_tree_mem`, `tb_mc_input_mux` and `tb_mc_crossbar` test their blocks
  against independent expectations.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_mc_router_top \
    rtl/mc_pkg.sv tb/tb_mc_router_top.sv -Mdir obj_top -o sim
./obj_top/sim
```

Replace the top-module name to run another testbench. The other sources are found through
`-Irtl -Itb`. The full router test runs in well under a second.
