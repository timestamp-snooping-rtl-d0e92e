# Timestamp snooping address network for a 16-node torus

A snooping cache-coherence protocol needs every cache and memory controller to
see all coherence requests in one and the same order. A shared bus gives that
for free. A switched point-to-point network does not: a request reaches near
nodes before far ones, and two requests can reach two nodes in opposite orders.

Timestamp snooping keeps the switched network and puts the order back at the
receivers. Each request carries a logical time, its *ordering time* (OT). Every
node processes requests strictly by increasing OT, with a fixed tie-break. A
request may arrive early, but no node processes it before the node knows
nothing with a smaller OT can still arrive. The logical clocks are not
synchronised wires. They advance through *tokens* that flow on the same links
as the requests, so they work on any network with bounded, in-order links.

This RTL builds the ordered address network of a 16-node machine on a 4x4
bidirectional torus. Each node has:

- a switch;
- a network interface, which contains the ordering endpoint;
- the memory-side coherence logic for its share of memory.

The processors, caches, DRAM and the unordered data network that carries cache
blocks are not included. Their connection points are ports of the top module.

## Logical time, tokens and slack

- **Guarantee time (GT).** Every switch and every node keeps one. It is the
  number of tokens that element has passed on. A token sent on a link
  promises that every later request on that link has a logical time greater
  than the sender's GT at that moment.
- **Token counters.** Each switch input counts tokens received but not yet
  consumed. Each link starts with one token (`INIT_TOKENS`), so one link costs
  one unit of logical time.
- **Advancing GT.** A switch advances its GT by one when every input counter
  is non-zero and no buffered request is due. It then sends one token on every
  output and decrements every counter.
- **Carrying OT as slack.** A request does not carry its OT. It carries the
  *slack* `OT - GT(holder)`, a 6-bit number. A source injects a request with
  `OT = GT(source) + DMAX + SLACK_INIT`, where `DMAX = 6` links is the longest
  broadcast path in the torus. It therefore starts with slack `SLACK_INIT`
  (default 2).
- **Keeping slack correct.** The slack changes in three places so that it
  stays equal to OT minus the GT of whoever holds the request:
  - **On entry** to a switch, the input's token count is added to the slack.
    Those tokens are logical time the switch has not yet caught up with.
  - **On each token propagation**, the slack of every buffered request drops
    by one.
  - **On exit** through an output, ΔD (delta-D) of that branch is added. ΔD is
    the difference between the longest remaining path and the path below that
    branch. With it, every node ends up with the same OT, whatever its
    distance from the source.
- **Zero slack blocks the switch.** A request whose slack reaches zero must
  leave before the switch may advance its GT again. It must not fall behind
  the tokens that follow it. The output arbiter always prefers zero-slack
  requests. `stall_slack` reports a switch held up this way; `stall_token`
  reports one waiting for a token.

Within one clock cycle, a link's request is treated as arriving before that
link's token. Both the RTL and the testbench models follow this rule.

## Broadcast trees (`ts_torus_route`)

Every source broadcasts over a fixed minimum-distance spanning tree. Offsets
(rx, ry) are measured from the source, modulo 4:

- First, along the source's row: east to rx = 1 and 2, west to rx = 3.
- Then, from every node of that row, along its column: north to ry = 1 and 2,
  south to ry = 3.

Every node is reached over a shortest path, in at most 4 switch hops.

Each switch holds a table indexed by source ID, with 16 entries of 5 mask bits
and 5 ΔD values. The table is computed at elaboration by a function, from the
subtree depths:

| where | depth below |
|---|---|
| column node, ry = 2 or 3 | 1 |
| column node, ry = 1 | 2 |
| row node, rx = 0 | 5 |
| row node, rx = 1 | 4 |
| row node, rx = 2 or 3 | 3 |

These depths include the final switch-to-node link. The rule is
`ΔD(branch) = depth(here) - 1 - depth(child)`, and the local delivery branch
uses `depth(here) - 1`. For example, the source's own switch sends with ΔD
0 (east), 1 (west), 2 (north), 3 (south) and 4 (local).

The trees are not balanced across sources; links near the source carry more
traffic.

## Switch (`ts_switch`)

- **Ports.** Five ports: local, east, west, north, south. Each input has a
  valid/ready request channel and a one-bit token strobe. Each output has the
  same.
- **Shared buffer.** Arriving requests go into a shared buffer of `NBUF` = 64
  entries. Each entry stores:
  - the slack;
  - the request;
  - the ΔD of every output, from the routing table lookup made on entry;
  - a pending-output mask.
- **Flow control.** An input accepts a request only while at least five
  entries are free, so arrivals on all ports in one cycle always fit.
- **Output arbitration.** Each output independently sends one pending entry
  per cycle. Zero-slack entries go first, then the lowest buffer index. An
  entry is freed when its mask is empty.
- **Token propagation.** The rule from the previous section is combinational.
  A token leaves on all five outputs in the same cycle. The buffered slacks
  drop by one in that cycle.

Assertions check the following:
- slack never goes negative;
- token counters do not overflow;
- slack arithmetic does not overflow.

## Ordering endpoint (`ts_endpoint`)

The endpoint is the node's end of the network. It is a `DEPTH` = 128 entry
priority queue keyed by slack.

- **Buffering early requests.** A request that arrives early waits in the
  queue. On arrival its slack, plus the tokens the endpoint holds, is stored.
- **Processing due requests.** While the endpoint holds a token, the requests
  with slack zero are due. They are emitted on `out_*` one per cycle, in
  tie-break order.
- **Advancing GT.** Once no due request is left, the endpoint spends the token:
  it decrements every slack and sends a token back to its switch. This is the
  node's GT step.
- **Ties.** Requests with equal OT are ordered by source ID. The priority
  rotates with GT: source `GT mod 16` is first. All endpoints apply the same
  rule, so all 16 nodes emit exactly the same sequence, and no source is
  favoured in the long run.
- **Sizing.** 128 entries cover 16 nodes × 8 outstanding requests.

## Network interface (`ts_node_if`)

The interface takes requests (GETS, GETM or PUTM plus a 38-bit block number)
from the node's cache controller and injects them with slack `SLACK_INIT`.
Two source rules keep the design correct:

- **One injection per GT step.** With this rule, (OT, source) is unique, and
  the tie-break yields a total order.
- **At most `MAX_OUT` = 8 outstanding.**
  - A request stops being outstanding only when the node's own GT has moved
    `RETIRE = 2*DMAX + SLACK_INIT + 1` steps past its injection. By then every
    endpoint has processed it.
  - Retiring earlier, when the node's own endpoint processes it, is not safe.
    A lagging endpoint elsewhere can then receive more than 128 queued
    requests.

The node's GT is the endpoint's token count. The interface keeps a 16-bit copy
and a small FIFO of injection GTs.

## Memory side (`ts_mem_ctrl`)

Without a shared bus, there is no wired-OR "owned" line telling memory to stay
quiet when a cache holds a dirty copy. Instead, memory keeps one bit per 64-byte
block, which says that some cache owns the block. The protocol is MSI, with
three requests:

| request | cache owns block | memory owns block | bit after |
|---|---|---|---|
| GETS | memory takes the block as the owner sends it (two data messages) | memory sends the block | memory owns |
| GETM | silent (the owning cache sends) | memory sends the block | cache owns |
| PUTM | memory takes the block | memory takes the block | memory owns |

- **Which requests it handles.** Every node sees every request. Only the home
  node reacts, and the home is the low 4 bits of the block number.
- **Bit storage.** The bits are packed 64 to a word in a single-port array, so
  each request is a read-modify-write:
  - a home request occupies the controller for 3 cycles, plus any wait on
    `send_ready`;
  - other nodes' requests take one cycle.
- **Reset.** After reset, a sweep of `BLOCKS/64` cycles sets memory as the
  owner of everything. `init_done` then rises. Until then the controller does
  not accept from the ordered stream, so that node's stream is held.
- **Default size.** `BLOCKS` = 1,048,576 per node, i.e. 1 GiB in total.

Limitation: a PUTM that loses a race is still applied. This is a writeback
ordered after another node's GETM has already taken ownership. One bit cannot
tell the two cases apart; the cache controller has to cancel such a writeback.

## Top level (`ts_torus_system`)

The top has 16 nodes, with node `n = 4*y + x`. Each node's east output feeds
the west input of `(x+1) mod 4`, and the other directions are wired the same
way, with wrap-around. Every port is an array indexed by node:

- `req_*`: requests from each cache controller.
- `ord_valid`, `ord_txn`, `ord_fire` and `cache_ready`: the ordered stream.
  A node's stream advances only when both its cache controller and its memory
  controller accept.
- `send_*` and `take_*`: memory's actions toward the data network and DRAM.
- `stall_*`, `outstanding`, `queued` and `init_done`: status.

Types and constants shared by all modules are in `ts_pkg`.

| parameter | default | meaning |
|---|---|---|
| `NBUF` | 64 | switch buffer entries |
| `DEPTH` | 128 | endpoint queue entries |
| `SLACK_INIT` | 2 | initial slack of an injected request |
| `MAX_OUT` | 8 | outstanding requests per node |
| `BLOCKS` | 1,048,576 | 64-byte blocks per node |
| `SLACK_W` | 6 | slack width (package) |
| `PADDR_W` | 44 | physical address bits (package); block number 38 bits |

`SLACK_INIT` = 2, the 4-bit token counters and the tie-break rotation are this
design's choices. So are the valid/ready handshakes, the synchronous
active-low reset, the tree shape and the home mapping. The other numbers come
from the published system.

## Deviations and trust

- **Untested: switch buffers filling up.** The switches use ordinary
  backpressure on their shared buffers, with no reservation per input or per
  output. The published scheme argues that endpoint buffering for the worst
  case is sufficient. Under sustained overload, however, full switch buffers
  could block one another in a cycle around a ring. The tests keep load
  moderate and never saw this, but it is not proven impossible.
- **Prefetching is not modelled.** A memory or cache may fetch data as soon
  as a request arrives early, and send it once the request's turn comes. That
  needs the DRAM and cache data paths, which are not here.
- **Only the torus is built.** A butterfly network would need a different
  routing/ΔD table and different wiring. The switch and endpoint do not depend
  on the topology.
- **Synthesis at full size is slow.** At the default size, the owner-bit
  arrays hold 16 Mbit in total (1 Mbit per node). Synthesis would map them to
  SRAM macros; open-source synthesis is slow on them at full size.

## Testbenches

Every testbench is self-checking, uses `$urandom` stimulus, and prints
`TB_RESULT checks=N failures=M`:

- **`tb_ts_torus_route`** follows every source's tree through all 16 tables.
  It checks:
  - each node is reached exactly once;
  - each node is reached over a shortest path;
  - the logical path length to every node is the same 6 units;
  - every forwarding switch has a zero-ΔD branch.
- **`tb_ts_switch`** keeps its own account of every request's OT and of the
  switch's GT, on a 16-entry switch.
  - It checks every departure's slack, the output set, the token propagation
    rule cycle by cycle, and zero-slack precedence.
  - A directed part reproduces the classic example:
    - a slack-1 request passes a token and becomes slack 2;
    - a propagated token passes it, and it is back at slack 1;
    - it leaves with slack 1 on a ΔD = 0 branch and 2 on a ΔD = 1 branch.
- **`tb_ts_endpoint`** checks, each cycle, the exact request or token the
  endpoint must emit, including rotating tie-breaks, on a 32-entry queue.
- **`tb_ts_node_if`** closes the interface on a loopback switch model. It
  checks:
  - injection fields;
  - one injection per GT step;
  - the outstanding count and the `MAX_OUT` limit;
  - that every request is processed exactly at its OT.
- **`tb_ts_mem_ctrl`** runs with 1024 blocks. It checks sends and takes
  against a reference owner model, checks `ord_ready` every cycle, and checks
  the sweep length.
- **`tb_ts_torus_system`** runs the whole 16-node system at its default
  parameters.
  - 24 requests per node on 48 shared blocks, with random stalls of the cache
    controllers and the data network.
  - It checks that all 16 nodes emit the same total order, and that each
    request is processed when the node's GT equals its OT.
  - It checks that each source's requests stay in order, and that memory's
    sends and takes match a reference memory model.
  - It counts how often each mechanism happened, and fails if one never did:
    waits for a token, GT held by a zero-slack request, the `MAX_OUT` limit,
    the one-injection-per-GT rule, equal-OT ties, an ordered stream held by
    the cache side, memory sends, and memory takes.

Simulation with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ts_switch \
    rtl/ts_pkg.sv rtl/ts_torus_route.sv rtl/ts_switch.sv tb/tb_ts_switch.sv
./obj_dir/Vtb_ts_switch
```

For the full system, list every file in `rtl/` (package first) plus
`tb/tb_ts_torus_system.sv`. It compiles in a few minutes and runs in seconds.
