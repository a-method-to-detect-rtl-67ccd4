# ECCJR: a mesh network-on-chip that detects link Trojans and corrects them at junction routers

A hardware Trojan on a network-on-chip link can silently flip bits of the
packets that cross it. If it flips a destination bit, the packet goes to the
wrong core. If it flips a data bit, the packet arrives corrupted. This design
guards a 6 x 6 mesh against that threat in two steps:

1. **Detect.** Every link carries packets in an error-correcting code. The
   receiving network interface checks each packet, and a network-wide monitor
   counts the faulty ones.
2. **Avoid.** When 20 % of the delivered packets have arrived faulty, the
   monitor switches on correction. Twelve *junction routers* are spread over
   the mesh. From then on, each of them decodes every packet that enters it,
   corrects up to three wrong wires, and re-encodes the packet before sending
   it on. The destination NI corrects the last stretch.

The link code is JTEC (joint crosstalk avoidance and triple error
correction). It is a (38,32) Hamming code that is sent twice, plus one
parity bit: 77 wires per 32-bit flit.

All of this is synthesizable SystemVerilog in `rtl/`, with self-checking
testbenches in `tb/`.

## The JTEC link word

A packet is a single 32-bit flit (`eccjr_pkg::flit_t`):

| bits    | field     | meaning                                         |
|---------|-----------|-------------------------------------------------|
| [31:28] | `app_id`  | application ID, to tell applications' packets apart |
| [27:25] | `src_y`   | source row (filled in by the sending NI)        |
| [24:22] | `src_x`   | source column                                   |
| [21:19] | `dst_y`   | destination row                                 |
| [18:16] | `dst_x`   | destination column                              |
| [15:0]  | `payload` | data                                            |

Encoding (`jtec_encoder`) works in three steps:

* **Hamming (38,32).** Code position *p* (1 to 38) is stored in code bit
  *p*-1. Positions 1, 2, 4, 8, 16 and 32 hold check bits. The other 32
  positions hold the flit bits in ascending order. The check bits are set so
  that the syndrome is zero. The syndrome is the XOR of the positions of all
  set bits.
* **Duplicate, add parity.** The 38-bit code word goes out twice, as copies A
  and B, together with P0, the even parity of one copy.
* **Wire order.** The copies are interleaved: wire 2k carries A[k], wire 2k+1
  carries B[k], and wire 76 carries P0. Each wire's neighbour therefore
  carries the same value. That is the crosstalk-avoidance half of the code.

Decoding (`jtec_decoder`) computes the syndromes SA and SB and the parities
PA and PB of both copies, then picks a copy:

| SA   | P0 vs PA | SB   | use | reason                                   |
|------|----------|------|-----|------------------------------------------|
| = 0  | equal    | any  | A   | A is clean                               |
| = 0  | differ   | = 0  | B   | P0 flipped, or A has 3 errors that hide its syndrome |
| = 0  | differ   | ≠ 0  | A   | P0 itself is the wrong wire              |
| ≠ 0  | equal    | any  | B   | A has an even number (≥ 2) of errors, so B has at most 1 |
| ≠ 0  | differ   | = 0  | B   | B is clean                               |
| ≠ 0  | differ   | ≠ 0  | A   | both copies are hit, so A has exactly one error |

The chosen copy then goes through single-error Hamming correction. Any
pattern of up to three wrong wires among the 77 is corrected. The testbench
checks every single-wire error and 20,000 random patterns of 0 to 3 errors.

The decoder also raises `error_o` when any syndrome or parity check fails.
That flag is what "faulty packet" means throughout the design.

This table is the method's decision flow with one change. The second
syndrome test is made on SB. If it were made on SA instead, SB would never be
used, and some three-wire errors would be miscorrected. `jtec_decoder_tb`
fails on a decoder built that way.

## Junction routers and routing

The mesh is numbered 1 to 36, row by row, starting at the south-west corner.
Router *r* is at x = (r-1) mod 6, y = (r-1) div 6. Junction routers are
marked `J`:

```
y=5   31  J32  33   34  J35  36
y=4  J25   26  27   28   29 J30
y=3   19   20 J21  J22   23  24
y=2   13   14 J15  J16   17  18
y=1    7   J8   9   10  J11  12
y=0   J1    2   3    4    5  J6
```

The map is the parameter `JR_MAP` (default `eccjr_pkg::JR_MAP_6X6`, bit r-1
set for a junction router). Any other placement can be given there.

Routing (`route_compute`) is minimal dimension-order routing with one
change. While both coordinates still differ, the packet takes its Y step if
the neighbour in that direction is a junction router. Otherwise it takes its
X step. Once one coordinate matches, the packet travels along the other one.
With this rule, a packet from router 7 to router 29 takes the path
7, 8, 9, 15, 21, 22, 23, 29, which passes four junction routers.

Two properties of this rule matter:

* **No guaranteed spacing.** The rule does not guarantee a junction router
  every two hops. Over all source and destination pairs, the longest run of
  intermediate routers without a junction router is 4. An error that
  reaches a non-junction router is carried on unchanged to the next
  junction router or to the destination NI. Those routers route on copy A
  without correction, so in the meantime the packet can be steered by a
  corrupted header.
* **No deadlock proof.** The rule mixes XY and YX turns, and there are no
  virtual channels. No proof of deadlock freedom is given. The testbenches
  ran up to 0.10 packets/node/cycle, plus a burst in which every node sends
  to one node, without a deadlock.

## The Trojan model

Every router-to-router link passes through an `ht_link_trojan` site.
Whether a site holds a Trojan is an input (`ht_insert_i` at the top), so a
testbench decides which links are infected.

* **Trigger (`ht_trigger`).** A four-input combinational function of flit
  bits 3, 7, 11 and 15, which are payload bits. The function is a 16-entry
  truth table parameter. The default fires only when all four bits are 1.
* **Payload.** Three wires are inverted: `dst_x[0]` in copy A and in copy B,
  and `payload[0]` in copy A. Without correction, the packet goes to a
  neighbouring column with wrong data. With correction, the next junction
  router repairs it.

## Detection, the 20 % threshold, and link alarms

`threshold_monitor` adds up, every cycle, the packets delivered by all 36 NIs
and the faulty ones among them. Once at least 64 packets have been delivered
and at least 20 % of them were faulty, it raises `jtec_en_o` at the next
clock edge. The signal stays high until reset. The counters cover everything
since reset; there is no sliding window.

While `jtec_en` is low:

* Junction routers check but do not correct.
* Every router routes on copy A.
* NIs deliver copy A uncorrected and flag it faulty.

While `jtec_en` is high:

* Junction routers route on the corrected flit and emit a freshly encoded
  word.
* NIs deliver the corrected flit.

Each junction-router input also has a sticky alarm, `link_alarm_o`. It is set
when a corrupted word leaves that input while correction is on. Every stretch
then starts at an encoder (an NI or a junction router), so the alarm names
the links between the previous encoder and this input as attacked.
Corruption that was already buffered when correction came on can also raise
an alarm.

## Router, NI and timing

`noc_router` has five ports (0 local, 1 north, 2 east, 3 south, 4 west).

* **Buffers.** Each input has an 8-entry `flit_fifo`.
* **Arbitration.** Each output has a round-robin `rr_arbiter`. A buffered
  flit leaves when the downstream buffer is not full.
* **Links.** Links use ready/valid signalling: `in_ready_o` means the input
  buffer is not full.
* **Hop timing.** A flit written into a buffer at one clock edge can be
  written into the next router's buffer at the following edge, so a hop
  costs one cycle.
* **Junction routers.** `IS_JUNCTION = 1` adds a `jtec_decoder` on each
  input and a `jtec_encoder` on each output.

`network_interface` connects a processing element to its router:

* **TX.** It fills in the source coordinates, JTEC-encodes the flit and
  forwards the router's ready signal as `tx_ready_o`.
* **RX.** It always accepts. One cycle later it presents the flit with
  `rx_faulty_o` (the decoder saw an error) and `rx_misrouted_o` (the
  delivered destination field is not this node).

Zero-load latency, from the clock edge that accepts a flit at the source NI
to the edge that presents it at the destination NI, is hops + 1 cycles. The
end-to-end testbench checks this for four node pairs.

## Top level: `eccjr_noc`

| port | width | meaning |
|------|-------|---------|
| `clk`, `rst_n` | 1 | clock; synchronous active-low reset |
| `tx_valid_i`, `tx_ready_o` | 36 | per node: the processing element offers a flit / the flit is accepted |
| `tx_flit_i` | 36 x `flit_t` | flit to send (source fields are ignored) |
| `rx_valid_o`, `rx_flit_o` | 36, 36 x `flit_t` | delivered packet |
| `rx_faulty_o`, `rx_misrouted_o` | 36 | delivered corrupted / destination field not this node |
| `ht_insert_i`, `ht_fired_o` | 144 | Trojan present on / fired on the link leaving node n towards d (bit 4n+d-1, d = 1 N, 2 E, 3 S, 4 W) |
| `link_alarm_o` | 180 | alarm of input p of node n (bit 5n+p) |
| `jtec_en_o` | 1 | correction is on |
| `pkt_total_o`, `pkt_faulty_o` | 24 | monitor counters |

Node n is at x = n mod 6, y = n div 6, which is router n+1 in the map above.

The top's parameters are `MESH_X`, `MESH_Y` (6), `JR_MAP`, `DEPTH` (8),
`THRESHOLD_PCT` (20), `MIN_PACKETS` (64), `CNT_W` (24) and `HT_TRUTH_TABLE`.
The flit has 3-bit coordinates, so a mesh can be at most 8 x 8.

## Simulating

Every module and testbench is a file of its own name. Packages are needed
first on the command line. For example, to run the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/eccjr_pkg.sv tb/eccjr_noc_tb.sv --top-module eccjr_noc_tb -o sim
./obj_dir/sim
```

Each testbench ends with `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|-----------|---------------|
| `jtec_encoder_tb`, `jtec_decoder_tb` | code matches an independent reference; every pattern of ≤ 3 wrong wires is corrected |
| `ht_trigger_tb`, `ht_link_trojan_tb` | trigger truth tables; exact wires inverted only when inserted and triggered |
| `flit_fifo_tb`, `rr_arbiter_tb` | FIFO order and flags; round-robin grant order and fairness |
| `route_compute_tb` | routing rule at all 36 positions; minimal paths for all pairs; the 7 to 29 path |
| `noc_router_tb` | a junction and a plain router under random traffic and back-pressure; words corrected and re-encoded; alarms; one-cycle hop |
| `network_interface_tb` | TX encoding with source fill-in; RX correction, faulty and misrouted flags |
| `threshold_monitor_tb` | the enable rises in exactly the cycle the 20 % rule predicts |
| `eccjr_noc_tb` | full 6 x 6 network at default parameters, in four phases (below) |
| `eccjr_traffic_tb` | uniform, tornado and neighbour traffic at 0.01, 0.05 and 0.10 packets/node/cycle, with Trojans active, once with correction on and once on a copy of the network whose threshold is out of reach |

`eccjr_noc_tb` runs four phases:

1. Zero-load latency.
2. Attack with correction off: packets are corrupted and misdelivered until
   the threshold trips.
3. Correction on: every packet arrives exact at its own node, including
   about a thousand that Trojans corrupted.
4. A hot-spot burst that fills buffers.

It also checks that alarms appear only on infected links. It counts each
mechanism (Trojan firing, faulty delivery, misdelivery, threshold, corrected
packets, alarms, back-pressure) and fails if any of them never happened.

### Traffic results

`eccjr_traffic_tb` infects sixteen links that lead into junction routers.
Half of the packets carry the trigger pattern. Each run offers 2000 cycles
of traffic; the figures below are from one random seed. Latency is counted
from the edge that accepts a packet to the edge that delivers it.

| pattern  | rate | correction on: avg latency | correction on: intact | no correction: intact | no correction: misdelivered |
|----------|------|------|--------|--------|------|
| uniform  | 0.01 | 6.08 | 100 %  | 83.8 % | 111 of 685 |
| uniform  | 0.10 | 6.30 | 100 %  | 81.7 % | 1270 of 6950 |
| tornado  | 0.01 | 7.40 | 100 %  | 79.7 % | 153 of 752 |
| tornado  | 0.10 | 8.35 | 100 %  | 78.8 % | 1521 of 7164 |
| neighbor | 0.01 | 5.40 | 100 %  | 87.5 % | 84 of 673 |
| neighbor | 0.10 | 5.53 | 100 %  | 86.8 % | 945 of 7172 |

Without correction, every packet the Trojans hit lands one column off, with
a wrong payload bit. With correction, all of them arrive intact.

Tornado and neighbour traffic are applied in both dimensions:

* tornado: d = (s + ceil(k/2) - 1) mod k, with k = 6;
* neighbour: d = (s + 1) mod k.

## Where this design departs from the method, and what it leaves out

* **Router microarchitecture.** The method was evaluated in a cycle-level
  simulator: 8 virtual channels of 8 flits, iSLIP allocators, credit delay
  2, allocation delays 1. This router has one 8-flit buffer per input, no
  virtual channels, round-robin arbitration and one-cycle hops. Latency
  numbers therefore do not compare with the method's results.
* **Routing.** The method names modified XY routing that meets a junction
  router every two hops, and also oblivious (ROMM) routing. The rule here is
  a deterministic modified-XY rule that reproduces the method's example path.
  It does not guarantee the two-hop spacing (see above).
* **Design choices not stated by the method.** These are:
  * the flit field widths and layout;
  * the wire order of the link word;
  * the trigger function and the trigger bits;
  * the payload wires;
  * the single network-wide counter, with a 64-packet minimum and no way
    back once enabled;
  * correction in the destination NI;
  * the alarm outputs;
  * synchronous active-low reset.
* **Junction-router count.** The twelve junction-router positions are for
  the 6 x 6 mesh. No formula for other mesh sizes is implemented; `JR_MAP`
  must be given.
* **Processing elements.** They are not modelled. Their NI ports are the
  top's ports.
