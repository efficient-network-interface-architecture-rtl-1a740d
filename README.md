# AXI network interface with dynamic reorder buffering for a mesh NoC

An AXI master may issue many transactions with the same transaction ID and
expects their responses back in issue order. In a network-on-chip the
requests go to different memories over different paths, so their responses
can come back in any order. The network interface (NI) on the master side has
to put them back in order. It must also never accept more out-of-order
traffic than it can buffer, because a stalled response would block the
network.

This RTL does that with two mechanisms:

- **Per-ID sequence numbers and admittance control.** Every request is
  numbered within its ID. Before a request may enter the network, the worst-case
  space its response could need in the reorder buffer is reserved. A request
  is refused (stalled at the AXI side) until that space is free.
- **A shared, linked-list reorder buffer.** Responses that arrive early are
  parked flit by flit in a pool of slots chained by next pointers. Packets of
  any length share the whole buffer; there is no fixed partition per ID or per
  packet. A parked packet is released as soon as it becomes the one expected
  next for its ID.

The slave side needs no reordering: a memory answers in the order it is asked.
Its NI only has to remember each request's header so the response can be sent
back to the right master with the right ID and sequence number.

The top, `ni_node`, is one mesh node with both NIs side by side. Its
defaults are a 5×5 mesh, 32-bit flits, 4-bit transaction IDs, 3-bit
sequence numbers and a 48-slot reorder buffer.

## Structure

```
              master side (master_ni)                          slave side (slave_ni)
AXI AW/W/AR ─► axi_queue_m ─► packetizer_m ─► m_req ...   s_req ─► packet_queue_s ─► depacketizer_s ─► AXI AW/W/AR
                  ▲   │ adm_req/tid/size       (to router)   (from router)  │ header            
                  │   ▼ adm_grant/seq                                        ▼                   
              ┌─ reorder_unit ──────────────┐                           header_fifo                  
              │ status_table  reorder_buffer│                                │                   
              └──▲───────────────│──────▲──┘                                ▼                   
                 │ lookup    release│   │ store                    adapter ─► packetizer_s ─► s_resp
AXI R/B ◄─ depacketizer_m ◄── packet_queue_m ◄─ m_resp                         ▲                (to router)
             (direct or from reorder buffer)    (from router)       axi_queue_s ◄─ AXI R/B
```

On the master side:

| Module | Job |
|---|---|
| `axi_queue_m` | Buffers AW, W and AR. Alternates between the write and read queues. Asks the reorder unit to admit the request at the head, and hands it on once admitted. |
| `packetizer_m` | Turns an admitted request into a packet. The address is mapped to a node (`addr_mapper`). |
| `packet_queue_m` | Buffers incoming response flits. For each head flit it asks the reorder unit "in order?" and steers the whole packet to the depacketizer or to the reorder buffer. |
| `depacketizer_m` | Turns packets back into R beats or a B response. Takes packets from the direct path or from the reorder buffer (release has priority) and reports each delivery back to the reorder unit. |
| `reorder_unit` | Wraps `status_table` and `reorder_buffer`. |

On the slave side:

| Module | Job |
|---|---|
| `packet_queue_s` | Buffers request flits. |
| `depacketizer_s` | Issues AW/W or AR to the memory. Stores each request header in `header_fifo`. |
| `axi_queue_s` | Buffers B and R from the memory. |
| `packetizer_s` (with its adapter) | Builds the response header from the stored request header: swaps source and destination, sets the response type and resp code. Sends the response packet. |

`noc_pkg` holds the shared types (flit, header, AXI channel structs) and the
size functions. `sync_fifo` is the generic FIFO used throughout.

## Packet format

A flit is 34 bits: `{head, tail, data[31:0]}`. Head and tail travel as
sideband bits. The head flit's 32 data bits carry a 26-bit header (bits
31:26 are zero):

| Field | Bits | Meaning |
|---|---|---|
| dst_x, dst_y | 3 + 3 | destination node in the mesh |
| src_x, src_y | 3 + 3 | sending node |
| type | 2 | read request, write request, read response, write response |
| tid | 4 | AXI transaction ID |
| seq | 3 | sequence number within the ID |
| len | 3 | AXI burst length − 1 |
| resp | 2 | AXI response code (responses only) |

| Packet | Flits |
|---|---|
| read request | head, address |
| write request | head, address, len+1 data |
| read response | head, len+1 data |
| write response | head only |

So packet length follows the burst length, and a read response needs `len+2`
buffer slots. `resp_size()` in `noc_pkg` gives that number; it is what
admittance reserves.

Destination mapping: the top 5 address bits give a node number
n = x + 5·y, so `x = n % MESH_X` and `y = n / MESH_X`. Node numbers of 25 and
above raise `map_err`.

## Sequence numbers: status register and status table

This is the heart of the design (`status_table.sv`).

**Status register.** The status register has one bit per transaction ID. The
bit is set while at least one message of that ID is in flight.

**Status table.** A table row `{v, T-ID, N-T, E-S}` exists only for an ID
with two or more messages in flight:

- N-T is the number in flight.
- E-S is the sequence number of the response to be delivered next.

**Admitting a request of ID t:**

1. **Bit t clear.** The message is alone. It gets sequence number 0, sets
   the bit and is always admitted. Its response can never be out of order,
   so it reserves no buffer space.
2. **Bit t set, no row.** A second message: open a row with N-T = 2 and
   E-S = 0. The message gets sequence number 1.
3. **Row exists.** The message gets sequence number N-T + E-S (mod 8), then
   N-T is incremented.

In cases 2 and 3 the response size is added to `size_aom`, the total space
reserved for responses that might arrive out of order. The message is
admitted only if all of these hold:

- `size_aom + size ≤ RB_DEPTH`;
- a row is free (case 2);
- N-T < 8, so sequence numbers in flight stay unique in 3 bits;
- fewer than `RT_ROWS` reserved messages are in flight, so every possible
  out-of-order packet also finds a reorder-table row.

A refused request simply stays at the head of its AXI queue and asks again.

**A response arrives** with (t, s). The packet queue asks whether s equals
E-S of t. An ID without a row is always in order.

- In order: the packet goes straight to the depacketizer.
- Otherwise: it goes into the reorder buffer.

**A packet is delivered** (its head is accepted by the depacketizer, from
either source). E-S is incremented and N-T decremented. When N-T reaches 0,
both the row and bit t are cleared; an ID without a row just clears its bit.
The delivered packet's reservation is returned to `size_aom` when its tail
has been accepted.

Worked example for ID 2:

| Step | Event | Row (N-T, E-S) | seq given | `size_aom` |
|---|---|---|---|---|
| 1 | first read | none, bit 2 set | 0 | 0 |
| 2 | second read, burst 4 (len 3) | (2, 0) | 1 | 5 |
| 3 | third read | (3, 0) | N-T + E-S = 2 + 0 = 2 | grows by its size |
| 4 | response seq 1 arrives first | unchanged | — | — |
| 5 | response seq 0 arrives and is delivered | (2, 1) | — | — |

At step 4, seq 1 ≠ E-S = 0, so the packet is parked. At step 5, seq 1 is now
the expected one and is released from the buffer.

Only the first message of an ID (the one given sequence number 0 while its
bit was clear) reserved nothing. A per-row flag remembers that, so its
delivery returns no space.

**Timing.** The admittance answer (`adm_grant`, `adm_seq`) is combinational
in the cycle of `adm_req`. Table updates happen at the clock edge.
Admittance is refused in a cycle that also commits a delivery, so the table
sees one update per cycle.

## Reorder table and linked-list buffer

`reorder_buffer.sv` has `RB_DEPTH` slots. Each slot holds one flit and the
index of the next flit of the same packet. The reorder table has `RT_ROWS`
rows `{v, T-ID, S-N, P, complete}`, where P points at the head flit's slot.

- **Storing.** A parked packet is written one flit per cycle into the lowest
  free slot. The head flit opens a row and is stored as well. Each later
  flit is linked from the previous one. The tail marks the row complete.
- **Releasing.** When no release is running, the buffer looks for a complete
  row whose S-N equals the current E-S of its ID. It frees that row and sends
  the packet's flits to the depacketizer one per cycle, following the links.
  Each slot is freed as its flit is accepted.

Because the reservation covers every packet that could be parked, the store
port never has to stall. An assertion checks this (`a_no_overflow`).

## Interfaces and timing

- **Clock and reset.** Single clock `clk`. Synchronous active-low reset
  `rst_n`.
- **Handshake.** Every AXI channel and every flit link is valid/ready. A
  transfer happens on a clock edge where both are high. Each link moves one
  flit per cycle.
- **AXI subset.** ID, address and length on AW/AR; data and last on W;
  ID, data, resp and last on R; ID and resp on B. Bursts of 1..8 beats.
  No size, burst type, strobes, locks or caches.
- **Router links.** `m_req_*` and `s_resp_*` go to the router; `m_resp_*`
  and `s_req_*` come from it. `ni_node` does not merge them into one router
  port; a router with separate request and response networks, or a small
  arbiter, joins them.
- **Observation outputs.** These pulse high for one cycle each:
  - `adm_attempt`, `adm_refused`: admittance asked for, and refused;
  - `pkt_to_rb`: a head flit parked;
  - `pkt_from_rb`: a released packet delivered;
  - `map_err`: an unmappable address.

  `size_aom` and `rb_used` show the reserved and used reorder-buffer slots.
- **Latency.** Through each NI, a flit spends at least one cycle in each
  registered FIFO it passes through. No latency is specified for this
  design; the testbenches check order and content, not cycle counts.

| Parameter (`ni_node`) | Default | Meaning |
|---|---|---|
| `NODE_X`, `NODE_Y` | 0, 0 | this node's position |
| `MESH_X`, `MESH_Y` | 5, 5 | mesh size, for address mapping |
| `RB_DEPTH` | 48 | reorder-buffer slots (flits) |
| `ST_ROWS` | 8 | status-table rows (IDs with two or more in flight) |
| `RT_ROWS` | 16 | reorder-table rows (parked packets) |

Widths fixed in `noc_pkg`:

- flit data: 32 bits;
- transaction ID: 4 bits;
- sequence number: 3 bits;
- burst length: 3 bits.

## What follows the original design, and what is added

Follows the original:

- the block structure of both NIs;
- the status register and status-table row format;
- the sequence-number rule (0, then N-T + E-S);
- the delivery updates (E-S+1, N-T−1, clear at zero);
- admittance by comparing the reserved size against the buffer size;
- the shared linked-list reorder buffer with a table of
  {v, T-ID, S-N, pointer};
- release when a stored packet becomes the expected one;
- the slave-side header FIFO and response adapter;
- the mesh size, flit width and ID/sequence widths;
- the 48-word buffer.

Choices made here, where the original gives no detail:

- **Packet format.** The head-flit layout, a separate address flit, and
  head/tail as sideband bits.
- **Address map.** The top 5 address bits select the node.
- **Flow control.** Valid/ready on every link.
- **Extra admittance conditions.** A free status-table row, N-T < 8, and no
  more reserved messages than reorder-table rows. Without them, sequence
  numbers could repeat or a parked packet could find no table row.
- **Space returned at the tail.** Reserved space is given back when the
  delivered packet's tail is accepted, not its head, so the buffer can never
  be over-committed while a release is in progress.
- **Release order and allocation.** Only complete packets are released, and
  slots are taken lowest-free first.
- **Header flits are buffered too.** Out-of-order response packets keep their
  head flit in the buffer. A burst-8 read response therefore takes 9 slots,
  and at most five such responses can be reserved at once in 48 slots. The
  original describes the 48 words as holding six burst-8 requests. Here the
  first message of an ID reserves nothing, so one ID can still have six
  burst-8 reads in flight (1 unreserved + 5 reserved; `status_table_tb` checks this). Several IDs can have
  more in total, one unreserved each.
- **Slave side.** Requests are served strictly in order; the memory is
  assumed to answer in order too.

Not included: the mesh router, the processors and the memories. The
testbenches model the network and the memories behaviourally.

## Verification

Each block has a self-checking testbench in `tb/<module>_tb.sv`. Each ends by
printing `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `status_table_tb` | A step-by-step replay of the ID-2 example above, then a long random run against a reference model of the table. |
| `reorder_buffer_tb` | Random interleaved store and release. Checks released packet order and contents, and slot accounting. |
| `reorder_unit_tb` | Admittance, steering and release together. Reordered responses of random length. |
| `master_ni_tb` | Whole master NI. A random AXI master, and a network that returns responses in random order. Checks per-ID order, data and resp. |
| `slave_ni_tb` and the slave-side unit tests | Request decoding, header FIFO, response building. |
| `ni_node_tb` | End to end, all parameters at their defaults. One node plus three extra slave NIs with memories; 800 random reads and writes on 4 IDs. Fails unless refusal, parking, release and direct delivery all happen. |
| `noc_uniform_tb` | The two evaluated system configurations of a 5×5 mesh with 25 `ni_node` instances under uniform random traffic, bursts 1..8 (see below). |

`axi_mem_model.sv` is a behavioural in-order memory. It returns read data
`pat(addr) = (addr · 0x9E3779B1) ^ 0x5A5A0F0F` and checks that write data
follows the same pattern, with a random response delay.

System configurations (`noc_uniform_tb`):

- **A:** nodes 0..9 are processors and nodes 10..24 are memories.
- **B:** every node has both a processor and a memory.

The behavioural mesh delivers a packet after `3·hops + flits + 0..7` cycles.
These latencies are a stand-in for a real router, so the latency figures the
test prints compare the two configurations with each other, not with any
published curve.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
          --top-module ni_node_tb rtl/noc_pkg.sv tb/ni_node_tb.sv
./obj_dir/Vni_node_tb
```

Replace `ni_node_tb` with any other testbench name. All testbenches run in
seconds or less.
