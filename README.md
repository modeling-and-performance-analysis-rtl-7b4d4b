# Slotted ring interconnect for an image processing unit

This is a ring interconnect that moves reads, writes and read data between the engines and
memories of an image processing unit (IPU). Nodes sit on a closed loop of registers. Each
clock cycle every register passes its contents to the next node, so the ring behaves like a
conveyor belt of *slots*. The number of slots never changes: one per node, plus one per
pipe stage between nodes. A node may drop its packet into a free slot as the slot passes and
takes out the packets addressed to it.

Nothing on the ring is ever stopped, so there is no back-pressure between nodes. The hard
problems are the ones a conveyor belt creates:

* A node that always finds full slots would starve. It can *reserve* slots.
* A target that sends read data back needs a free slot to do it. The read's own slot
  is kept reserved for the answer.
* A node whose input buffer is full cannot stop the ring. It lets the packet go round once
  more (*bouncing*). It can give the packet a ticket so that its place in the queue is kept.

The rest of this file explains these mechanisms, the node types built from them, and the
two-level system in `ri_top`.

## The slot (`ri_pkg.sv`)

Every slot carries one `pkt_t`. Its fields:

| field | meaning |
|---|---|
| `valid` | the slot holds a request |
| `cmd` | 0 write, 1 read, 2 completion (read data), 3 reserved-for-completion, 4 initialization, 5 clear |
| `src`, `dst` | source and destination node IDs (4 bits) |
| `data`, `addr` | 32-bit data word and address |
| `ord_id`, `ord_valid` | reorder ticket of a bounced packet |
| `burst`, `burst_size` | read of 1..MBS (8) words; in a completion, the words still due (1 = last) |
| `cpl_order` | position in the requester's completion buffer |
| `reserved`, `rsv_node` | slot reserved for node `rsv_node` (also when invalid) |
| `booked` | slot booked for the bridge |
| `alert` | 0 none; 1 no such destination; 2 bad address; 3 unrequested completion; 4 completion at a target; 5 request at an initiator |

A slot can be invalid and still carry information: a reservation, a booking, or the
*reserved-for-completion* type (`cmd` = 3, `valid` = 0). This is a free slot that only one
node may fill, and only with read data.

## Anatomy of a node

Every node is built the same way:

```
ring in -> incoming port -> (buffer) -> agent -> outgoing FIFO -> outgoing port -> ring out
                 \________________ slot passes straight through ______________/
```

* The **incoming port** (`ri_in_port`) looks at the arriving slot combinationally.
  * It copies out the packets the node must consume and passes the slot on invalid.
  * It marks packets that cannot be right with an alert: a completion at a target, a
    request at an initiator, or (when the target is given its device size `ADDR_WORDS`) a
    request whose address, or whose burst, runs outside the target's memory.
  * It assigns the node's ID during initialization.
* The **agent** is specific to the node type.
* The **outgoing port** (`ri_out_port`) registers the slot. If the slot is usable, it puts
  the head of the outgoing FIFO into it. So every node adds exactly one cycle, and one slot,
  to the ring.
* **Pipe stages** (`ri_pipe_stage`) can be placed between nodes. They add slots and give
  timing slack.

Total ring capacity is the sum over links of (pipe stages + 1).

## Reservation: how a node avoids starvation (`ri_out_port`)

This is the part that decides fairness and is the least obvious.

**When a slot is usable.** A slot can take the agent's head packet when all of these hold:

* it is invalid;
* it is either unreserved, or reserved for this node;
* if it is unreserved, it is not booked for the bridge (the bridge itself may use booked
  slots);
* if it is a reserved-for-completion slot, the head packet is a completion.

**Stalling and reserving.** If the slot is not usable, the port *stalls* and
`Can_reserve_counter` counts up. Once that counter exceeds the reserve-again threshold
`RAT` and `Reserved_counter` is below the reservation budget `RB`, the port marks the
passing slot reserved for itself. The slot may be full; it does not matter. The port then
increments `Reserved_counter` and clears `Can_reserve_counter`.

When that slot comes round again empty, nobody else may have used it, so the node gets it.
`RB` limits how many slots a node may hold reserved at once; `-1` means no limit. `RAT`
limits how quickly it may reserve again.

**Using or giving back a reservation.**

* When the node puts a request into a slot it reserved, it decrements `Reserved_counter`.
* When a reserved slot of its own comes round empty while the node has nothing to send, the
  port unreserves it. This stops reservations circulating forever.

**Reads keep their slot.** A read leaves the outgoing port reserved for its *destination*.
When the target absorbs the read, its incoming port turns the slot into a
reserved-for-completion slot owned by the target. The target therefore has one slot on
which it can always return read data, however busy the ring is.

**Completions in that slot.**

* A completion that is not the last word keeps the slot reserved for the target. The
  requester's incoming port, on taking the word out, turns the slot back into the
  reserved-for-completion type.
* The last word (`burst_size` = 1) leaves the slot unreserved.
* If the last word went out in some other free slot, the port remembers it owes a release.
  It unreserves the next reserved-for-completion slot of its own that passes.
* A clear request from the supervisor queues a release in the same way.

A port never reserves a slot that carries one of its own completions. Otherwise that slot
could later be mistaken for its reserved-for-completion slot.

With `RB` = -1 and `RAT` = 0 every node reserves at the first stall. This is the fair
setting and the default. A finite `RB` or a larger `RAT` gives a node a smaller share.

## Bouncing and the reorder buffer (`ri_fifo`, `ri_rob`)

An incoming port that cannot take a packet lets it go round the ring again. There are two
disciplines.

* **Initiators** use a plain FIFO (default depth 2). A packet that does not fit simply stays
  on the ring. Order does not matter, because the agent re-orders read data itself using
  `cpl_order`.
* **Targets, the supervisor and the bridge** use a reorder buffer of `SIZE` entries
  (default 5). Every packet the port must consume gets a ticket from a running counter the
  first time it is seen. A packet is stored at (head + ticket − head_ticket) mod `SIZE` when
  that distance is below `SIZE`. Otherwise it is bounced: the ticket is written into
  `ord_id` and `ord_valid` is set.
* When a ticketed packet comes round, it is accepted once its position fits. The agent
  reads the buffer strictly in ticket order. Requests are therefore consumed in the order
  the target first saw them, no matter how often each bounced. A later write can never
  overtake an earlier one to the same address.

Tickets are 6 bits wide and count modulo 64. That is more than the packets that can be
outstanding at one port in the system here.

## Node types

### Initiator (`ri_initiator_node`)

Serves a DMA, accelerator or processor through two valid/ready channels.

* **Writes** are accepted whenever the outgoing FIFO has room, at one per cycle.
* **Reads** of 1..8 words are accepted only when both of these hold:
  * the 16-entry **completion buffer** has that many free entries. They are reserved, and
    the index of the first goes into `cpl_order`;
  * the **good-citizen rule** allows it: after a read of N words to a target, the node sends
    no other read to that target for N cycles. A target cannot return N words faster than
    that anyway. One small timer per destination ID enforces this.
* **Read data** is written at the buffer entry its `cpl_order` names. Entries are handed to
  the device strictly in order. Data from different targets can arrive out of order, but
  the device sees it in request order.
* **Unrequested completions.** A completion for an entry that is not reserved, or is
  already full, is sent back onto the ring with alert 3 for the supervisor.

### Target (`ri_target_node`)

Serves a memory through a request channel and a read-data channel.

* Writes go straight to the memory.
* One read is served at a time. The read context holds the requester, the next
  `cpl_order` and the words still due.
* Each returned word becomes a completion:
  * `cpl_order` counts up from the read's value;
  * `burst_size` counts down to 1.
* A clear request makes the outgoing port release one of the node's reserved-for-completion
  slots.

### Supervisor (`ri_supervisor_node`, always ID 0)

**Initialization.** On `init_req` it sends a packet with data 0. Every node adds one to the
data, keeps the result as its ID and passes it on. When the packet returns, its data is
the highest ID, which is reported as `max_id`.

**Monitoring.** It removes from the ring:

* packets with an alert;
* packets for IDs above `max_id`;
* packets addressed to the supervisor itself.

It reports each one in the order seen, on a valid/ready channel with code, command, source,
destination and address. For a removed read it sends a clear request to the read's
destination. That frees the reserved-for-completion slot the read would have created.

**Own traffic.** The supervisor is also a small initiator. Its device may send writes
(`req_*`) at any time after initialization. It may send one read of 1..8 words at a time.
While that read still has words due, completions addressed to ID 0 go to the device on
`cpl_*` in arrival order. Any other completion for ID 0 is reported as alert 3. It has no
completion buffer and no good-citizen timer: the words of a single read come from one target
in order, and the reorder buffer keeps that order.

### Bridge (`ri_bridge`)

Joins a higher ring and a lower ring.

**Bounds.** The initialization packet arrives on the higher ring:

* the bridge keeps data+1 as its ID and lower bound LB, and sends the packet round the
  lower ring;
* when the packet returns, data+1 becomes the upper bound HB, and the packet continues on
  the higher ring.

The lower-ring nodes hold exactly the IDs strictly between LB and HB.

**Crossing.** A higher-ring packet with LB < dst < HB crosses down. A lower-ring packet
crosses up when its destination is outside that range, or when it carries an alert. The
supervisor lives on the higher ring.

**Buffers and arbitration.** Each direction has two reorder buffers, one for completions
and one for everything else, so read data cannot be blocked behind requests. The outgoing
side picks between them round-robin. The completion buffer wins when the passing slot is
the bridge's own reserved-for-completion slot.

**Reads that cross.**

* A read crossing in either direction leaves behind, on its source ring, a
  reserved-for-completion slot owned by the bridge. The returning data can always get
  back.
* Completions forwarded by the bridge carry the bridge's ID as source. This matches the
  slot's owner.

**Booked slot.** The first packet the bridge sends down (the initialization packet on its
way round the lower ring) marks its slot *booked* for the bridge. Other lower-ring nodes can neither use
nor reserve an unreserved booked slot. So the bridge always has a way into a congested
lower ring, and a full lower ring cannot lock it out.

## The IPU system (`ri_top`)

```
higher ring:  S(0) -> I0(1) -> I1(2) -> bridge(3) -> S
lower ring:   bridge -> I4(4) -> T0(5) -> I3(6) -> T1(7) -> I2(8) -> bridge   (HB = 9)
```

Roles of the nodes:

* I0 and I1 are driven by the DMA.
* I2 is the hardware accelerator.
* I3 and I4 are scalar processors.
* T0 and T1 are the vector memories.

Every link has one pipe stage, so the higher ring has 8 slots and the lower ring 12.

Default parameters:

| parameter | default | meaning |
|---|---|---|
| `ROB_DEPTH` | 5 | bridge reorder buffers |
| `IN_DEPTH` | 5 | target and supervisor reorder buffers (initiator FIFOs are 2) |
| `OUT_DEPTH` | 2 | outgoing FIFOs |
| `RB` | -1 | reservation budget (unlimited) |
| `RAT` | 0 | reserve-again threshold |
| `PIPES` | 1 | pipe stages per link |

This is the single-channel configuration that meets the IPU's task graph with reads in
bursts of 8 words.

The devices are outside `ri_top`. Each initiator has its request and completion channels
(index 0..4 = I0..I4), each target its memory channels, and the supervisor its
initialization, alert, request (`sup_req_*`) and read-data (`sup_cpl_*`) channels.
One-cycle `ev_*` pulses expose inserts, stalls, reservations, bounces, alerts, crossings
and use of the booked slot, for counters.

## Departures from the reference description and open points

* **Completion order ID.** It is used as a completion-buffer index (0..15), not limited to
  0..MBS−1.
* **Completion `burst_size`.** It carries the words still due, so the last word is
  recognisable.
* **Command order ID.** It is a 6-bit ticket modulo 64, not a number below the ring's slot
  count.
* **Bridge ID.** The bridge takes data+1 as its ID and lower bound, like every other node.
  One reading of the description has it keep the unincremented value.
* **Ticket instead of position.** A bounced packet carries a running sequence number, not
  a buffer position. Its distance from the oldest entry gives the position, and several
  laps of the buffer cannot be confused.
* **Supervisor as initiator.** The description calls the supervisor a special initiator
  but does not say how much of an initiator it is. Here it has one outstanding read and
  no completion buffer. In the IPU scenario its device only initializes the ring.
* **Supervisor bouncing.** A completion the supervisor cannot take yet is bounced with an
  order ticket, like every other packet it removes. The reference leaves such a completion
  untouched, but one queue in arrival order keeps reports and read data in a single order.
* **Address range.** Alert 2 needs each target's size. A target is given it as the
  parameter `ADDR_WORDS`. The default 0 turns the check off, and `ri_top` leaves it off.
* **Node order.** The order of nodes on the lower ring is an assumption.
* **Not built.**
  * The two-channel variant (router and arbiter per node). It is an alternative
    configuration.
  * The traffic generator used to evaluate the ring.
  * The memories and engines themselves. `tb/tb_mem_model.sv` is a simple behavioural
    memory.
* **Bounce at an initiator.** An initiator FIFO drains every cycle, so a bounce there is
  rare in the system test. It is exercised in the incoming-port test.

## Verification

Each block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=… failures=…`.

| testbench | what it shows |
|---|---|
| `tb_ri_fifo`, `tb_ri_rob`, `tb_ri_pipe_stage` | random traffic against reference models; the reorder buffer delivers in ticket order under random bouncing |
| `tb_ri_in_port` | ID assignment, absorb/bounce per port kind, alert marking, supervisor removal |
| `tb_ri_out_port` | insert, stall, reserve, reuse, idle release, read reservation, completion-slot keep/release, clear, `RB`/`RAT` limits, booking |
| `tb_ri_initiator_node` | one write per cycle, read fields, good-citizen delay, in-order delivery of out-of-order data, full completion buffer, alert 3 |
| `tb_ri_target_node` | completions with counting `cpl_order` and `burst_size`; use and release of the reserved-for-completion slot on a full ring; reordered bounced writes; alert 4; alert 2 for out-of-range write and read burst; clear |
| `tb_ri_supervisor_node` | initialization, reports, clear request for a removed read, bounced reports kept in order, own write and read, read data in order, extra completion reported as alert 3 |
| `tb_ri_bridge` | bounds, crossings both ways, booked slot, read/completion round trip, bounced writes kept in order |
| `tb_ri_top` | the full system at default parameters, including a supervisor write and burst read to T1 across the bridge |
| `tb_ri_ring_mist` | three initiators sharing one memory on a single ring (`tb_mist_ring`), in four configurations: fair reservation, `RB`=1/`RAT`=2, single-word reads, no pipe stages |

`tb_ri_top` runs all five initiators at once. Each writes 32 words to its memory and reads
them back in bursts of 8, checking every word and its order. The test also sends packets
to a missing ID and to an initiator. It counts how often each mechanism happened and fails
if one never did: bounces at targets and at the bridge, stalls, reservations, crossings,
booked-slot use, read back-pressure, alerts and clears.

`tb_ri_ring_mist` prints cycle counts and the finish time of each initiator for
comparison. Each initiator writes 32 words and reads them back in bursts of 8; this is one
run of that test:

| configuration | cycles | I0 / I1 / I2 done at | reservations | target bounces |
|---|---|---|---|---|
| fair (`RB`=-1, `RAT`=0) | 221 | 221 / 214 / 207 | 68 | 0 |
| `RB`=1, `RAT`=2 | 360 | 201 / 309 / 360 | 20 | 154 |
| fair, single-word reads | 308 | 200 / 246 / 308 | 74 | 1 |
| fair, no pipe stages | 218 | 208 / 218 / 201 | 67 | 0 |

A tight budget slows the initiator that sees the free slots last. Here that is I2, just
before the target: I0 and I1 fill the free slots before they reach it, and it may hold only
one reservation.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ri_pkg.sv tb/tb_ri_top.sv \
          --top-module tb_ri_top -Mdir obj_tb_ri_top -o sim
./obj_tb_ri_top/sim
```

Replace the testbench name to run the others.
