# Multipath mesh NoC with in-order delivery and fault tolerance

Sending the traffic between two cores over several paths spreads the load
over more links. It also lets the network survive a broken link. The cost is
that packets on different paths overtake each other. The usual fix is a
reorder buffer at every receiver, which is large.

This network puts the ordering into the switches instead. Routes are chosen
so that the paths of one source/destination pair (a *commodity*) share no
link or switch between source and destination. The paths therefore meet
again at exactly one switch: the destination's own switch, the
*reconvergent switch*. That switch keeps a small look-up table, with one
entry per reconverging commodity, holding the identifier of the packet it
must pass next. A head flit carrying any other identifier waits in its input
buffer until the missing packet has come in on another path. Packets leave
the reconvergent switch in sending order, so no receiver needs a reorder
buffer.

The same multipath setup carries two fault-tolerance mechanisms:

* **Transient errors.** A critical commodity can be sent n_t times over
  different paths. Every flit carries SECDED check bits. The receiver keeps
  the first copy that arrives without an uncorrectable error.
* **Permanent link failures.** A failure notice tells a sender that one of
  its paths is broken. The sender stops using that path and resends the
  packets that were lost on it.

The RTL is a 3 × 4 mesh with 12 nodes. That is the size of the MPEG-decoder
example the design was evaluated on. Each node has a switch, a sending
network interface (NI) and a receiving NI.

## Files

| File | Contents |
|---|---|
| `rtl/mp_pkg.sv` | widths, flit and head-flit structs, configuration bus, port/direction enums |
| `rtl/flit_fifo.sv` | synchronous valid/ready FIFO (switch input and output buffers) |
| `rtl/rr_arbiter.sv` | round-robin arbiter, one per switch output |
| `rtl/reorder_lut.sv` | reorder look-up table of a switch |
| `rtl/mp_switch.sv` | 5-port wormhole switch with source routing and reorder gating |
| `rtl/secded_enc.sv`, `rtl/secded_dec.sv` | extended Hamming (39,32) encoder and decoder |
| `rtl/ni_initiator.sv` | sending NI: packetizing, path split, replication, failed-path replay |
| `rtl/ni_target.sv` | receiving NI: error correction, copy filtering, delivery to the core |
| `rtl/mp_noc_top.sv` | the mesh, plus link fault-injection inputs |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_ref_pkg.sv` has reference helpers |

## Packets and flits

A packet is 4 flits of 32 bits: one head flit and 3 payload flits. The last
payload flit is the tail. Each flit travels as an `flit_t` of 41 wires:

    flit_t = { ftype[1:0], ecc[6:0], data[31:0] }     ftype: 0 body, 1 head, 2 tail

The head flit's data bits are:

    [31:24] packet id   [23:16] destination   [15:8] source   [7:0] route

* **Route.** The route is up to four 2-bit hop directions: N = 0, E = 1, S = 2
  and W = 3. The lowest two bits are used first, and every switch shifts the
  field right by two as the head leaves it.
* **Ejection.** A switch ejects a packet to its local port when the
  destination equals its own address. The route therefore needs no "local"
  code.
* **Check bits on the head.** The head's check bits are computed with the
  route field set to zero. That is the value the field has on arrival, so the
  check bits stay valid at the receiver even though every switch rewrites
  the route.

Node numbers are `y*3 + x`. North is row y−1 and east is column x+1.

## The switch and its reorder table (`mp_switch`, `reorder_lut`)

The switch has five ports: local, N, E, S and W. Each input has a 2-flit FIFO
and each output a 4-flit FIFO, with a crossbar between them. Switching is
wormhole. A head flit claims an output through that output's round-robin
arbiter, and the output stays locked to that input until the tail has passed.
Links use valid/ready, where ready means "the input FIFO is not full", so
no flit is ever dropped.

**Timing.** A granted flit moves from an input FIFO to an output FIFO in one
cycle. An idle switch therefore adds two cycles per hop.

The reorder gating sits before the arbiters:

1. **Query.** The head at the front of every input FIFO is compared in
   parallel with all table entries (`LUT_ENTRIES` = 8) on source and
   destination.
2. **Hold.** If an entry matches and its expected id differs from the head's
   id, the input does not request any output. This is reported on
   `ooo_stall`. The packet stays where it is and blocks nothing except its
   own input.
3. **Pass through.** A head that matches no entry is not tracked and is
   routed normally.
4. **Advance.** When a tracked head is granted, the entry's expected id is
   incremented (mod 256).

Writing an entry sets its expected id to 1, the value every sender's counter
starts from. The table only works if the paths of a commodity really are
disjoint up to the destination switch. Choosing such paths is the job of
whoever programs the routes: the hardware does not check it.

## Sending NI (`ni_initiator`)

The core offers one packet at a time: a destination plus 96 payload bits.
For each destination the NI holds:

* up to `NPATHS` = 4 routes, each with an 8-bit split weight;
* a copy count n_t;
* a "failed" mask, one bit per path;
* a packet-id counter that starts at 1.

**Path choice.** Each packet draws a path among the valid, non-failed paths,
with probability weight / Σweights. The draw uses a 16-bit LFSR and a
multiply-compare, with no division.

**Replication.** For a destination with n_t > 1, the packet goes out n_t
times. The first copy takes the drawn path and the later copies take the
next alive paths in turn. Every copy is a packet of its own with the next
consecutive id. This lets the reconvergent switch release the copies one
after the other, and lets the receiver group them.

**Failed paths.** A failure notice (`fail_valid`, destination, path index,
id of the first lost packet) does two things:

* It marks the path failed. The path is then never drawn again until the
  destination is reprogrammed.
* It schedules a resend of every packet still in the 8-entry history that
  went out on that path with an id at or after the lost one. The resends keep
  their original ids, take an alive path, go before new packets, and go
  oldest first. `replaying` is high while one is being sent.

How a failure is detected, and how the notice reaches the sender, is not
part of this RTL. The notice is an input.

## Receiving NI (`ni_target`)

Every flit passes a SECDED decoder. A single-bit error is corrected and
reported as `pkt_corrected`. A double-bit error marks the packet bad. Once
the tail is in, the packet is offered on `pkt_valid`/`pkt_ready` together
with its source, id, payload and error flag. No new flit is taken while a
packet waits.

**Copy filtering.** For a source whose copy count is programmed to n_t > 1,
arrivals from that source are counted in groups of n_t. The first error-free
copy of each group is delivered and the rest are dropped, with a pulse on
`pkt_drop`. If every copy of a group is bad, the last one is delivered with
`pkt_err` set.

## SECDED code (`secded_enc`, `secded_dec`)

This is an extended Hamming code with 32 data bits, 6 Hamming bits and 1
overall parity bit.

* **Encoding.** Data bits sit at the code positions that are not powers of
  two. Hamming bit k is the XOR of the data bits whose position has bit k
  set. The overall bit makes the parity of the whole word even.
* **Syndrome.** The decoder's syndrome is the position of a single flipped
  bit.
* **Errors.** Odd overall parity means one error, which is corrected. Even
  parity with a non-zero syndrome means two errors, which are flagged.

The bit masks are computed by constant functions at elaboration time.

## Configuration

A single broadcast write bus, `cfg` (`cfg_t`), programs every table. `node`
selects the target node and `sel` the table:

| `sel` | table | `idx` | `path` | `data[23:0]` |
|---|---|---|---|---|
| 0 `CFG_NI_PATH` | sender route | destination | path index | `{valid[23], weight[15:8], route[7:0]}` |
| 1 `CFG_NI_DEST` | sender copy count n_t (also clears the failed mask) | destination | – | `n_t` in `[1:0]`, 0 treated as 1 |
| 2 `CFG_SW_LUT` | switch reorder entry (resets its id to 1) | entry | – | `{valid[16], src[15:8], dst[7:0]}` |
| 3 `CFG_NI_RXCOPY` | receiver copy count | source | – | `n_t` in `[1:0]` |

Program the tables before traffic starts. Rewriting a reorder entry or a
sender's tables while packets of that commodity are in flight breaks the id
sequence.

## Top level (`mp_noc_top`)

Parameters `MESH_X` = 3 and `MESH_Y` = 4. Its ports:

* Per node, as packed arrays indexed by node:
  * the core send port (`core_*`);
  * the failure-notice input (`fail_*`);
  * the receive port (`pkt_*`, `pkt_drop`).
* Fault injection on every link, indexed `sending node*4 + direction`
  (N = 0, E = 1, S = 2, W = 3):
  * `link_flip` XORs a 32-bit mask into the data of every flit crossing the
    link;
  * `link_kill` makes the link swallow everything sent on it.

  Entries for links that would leave the mesh are unused.
* Observation: `ooo_stall[node][port]` and `replaying[node]`.

## Limitations and departures

* **Deadlock between commodities that share a reconvergent switch.** The
  switch has no virtual channels. Take two commodities that reconverge at the
  same switch and enter it through the same input links. A held,
  out-of-order head of one can sit in front of the in-order packet of the
  other, and each can end up waiting on the other. The end-to-end test hit
  this with the four MPEG commodities to `sdram` and `sram2` running at once.
  It therefore runs those pairs in separate phases. A deployment needs routes
  chosen so this cannot happen, or per-commodity input queues, which this RTL
  does not have.
* **Identifier wrap.** Ids are 8 bits and wrap. A path may not run more than
  255 packets ahead of another path of the same commodity. The switch input
  buffers make this impossible in practice.
* **Replay and ordering.** A resent packet keeps its id, so the reconvergent
  switch puts it back in order. Packets that were already sent on alive
  paths with later ids wait at that switch until the resend arrives. This
  only works if such a waiting packet does not block the path the resend
  uses. Only the last 8 packets can be resent.
* **Copy grouping.** The receiver groups copies by counting. It assumes every
  copy arrives, possibly corrupted, which holds for bit errors but not for a
  lost link. Do not combine replication with a killed link on the same
  commodity without reprogramming the receiver's copy count.
* **Not built:**
  * the offline tools that choose the disjoint paths and the split ratios
    (graph algorithms and a linear program), since they are software;
  * the core-side bus protocol adapter, where the NIs use a plain
    valid/ready port instead;
  * detection of permanent link failures.
* **Route length.** The id, both addresses and the route share one 32-bit
  head flit, so a route has at most 4 hops. That is enough for every route in
  the 3 × 4 mesh example, whose longest is 3 hops. The published scheme
  instead lengthens the packet by about 13% for the added header fields. For
  longer routes, widen the head or add a second header flit.
* **This design's own choices:** SECDED instead of plain single-error
  correction; the route encoding; valid/ready links; round-robin
  arbitration; the LFSR path draw; the notice and history format.

## Simulation

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Build one with Verilator
5, for example the full network at its default size:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/mp_pkg.sv tb/tb_ref_pkg.sv rtl/flit_fifo.sv rtl/rr_arbiter.sv \
      rtl/reorder_lut.sv rtl/mp_switch.sv rtl/secded_enc.sv rtl/secded_dec.sv \
      rtl/ni_initiator.sv rtl/ni_target.sv rtl/mp_noc_top.sv \
      tb/tb_mp_noc_top.sv --top-module tb_mp_noc_top
    ./obj_dir/Vtb_mp_noc_top

For the other testbenches, list `mp_pkg.sv`, `tb_ref_pkg.sv`, the module and
its submodules.

`tb_mp_noc_top` runs the 3 × 4 mesh at default parameters. Cores sit as in
the MPEG decoder mapping: idct 0, vu 1, au 2, upsamp 3, sdram 4, mcpu 5,
sram2 6, rast 7, sram1 8, risc 9, bab 10, adsp 11. It sends four multipath
commodities:

| commodity | paths |
|---|---|
| au→sdram | 2 paths |
| mcpu→sdram | 3 paths |
| upsamp→sram2 | 2 paths |
| risc→sram2 | 2 paths, critical with n_t = 2 |

The reorder tables are at switches 4 and 6, and the receivers apply random
backpressure. The test then:

1. injects a single-bit flip on one link (corrected) and a double-bit flip on
   another (the copy is dropped);
2. kills a link, lets a packet be lost, issues the notice, checks the
   resend, and checks that the failed path is never used again.

Every delivered packet is checked for payload, order and uniqueness. Each
mechanism is counted (reorder stall, correction, copy drop, backpressure,
swallowed packet, replay), and one that never happened counts as a failure.

The block testbenches compare against independent models. For example, the
SECDED tests use a reference encoder in `tb_ref_pkg`, and the FIFO test uses
a queue model. `tb_mp_switch` also checks the two-cycle latency of an idle
switch.
