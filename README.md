# HyCo: a hybrid control plane for an optical switch network

An optical interconnect between processor and memory cores moves data as light through a network of
2x2 Mach-Zehnder (MZI) switching elements. Each element is either in **Bar** (straight through)
or **Cross** state. Before a core can send, an electronic controller has to do three things:
decide who may use which output, find a path through the elements, and set every element on that
path. The controller's latency adds to every message, so it has to be short.

This RTL implements the HyCo control plane. It combines a small centralised core with one simple
configuration unit per switching element:

* **Centralised part.**
  * A *destination array* holds each input's requested output.
  * A *conflict-resolution unit* (CRU) finds outputs that several inputs want and picks one by
    round robin.
  * A *Bloom filter* remembers sets of requests that could not all be routed.
  * An *access-control unit* (ACU) runs one state machine per input port.
* **Distributed part.** One *distributed-configuration unit* (DCU) sits at each switching
  element. It knows its slice of each path from a small table of pre-calculated routes (the
  LITE-LUT), or from a default routing rule when the table has no entry. It accepts or refuses the
  path and drives its element's Cross/Bar control.

With no obstruction, a request is granted and its path set up **two clock cycles** after the IP
raises it. The default build controls an 8 x 8 Beneš network: 5 stages of 4 elements, so 20 DCUs.

## The network and its numbering

The DCUs need a common way to name paths, and this is the part to understand first
(`rtl/hyco_pkg.sv`).

The N x N Beneš network (N = 2^n) has 2n-1 stages of N/2 elements. Between stages, light travels
on one of N *lines*, numbered 0..N-1. Stage `s` works on one address bit `d(s)`. Taken stage by
stage, `d(s)` runs n-1, n-2, ..., 1, 0, 1, ..., n-1.

* Element `e` of stage `s` joins the two lines that differ only in bit `d(s)`.
* `e` is the line number with bit `d(s)` removed.
* A Cross element flips bit `d(s)` of the light's line; a Bar element keeps it.
* The element's input port is the bit's value on the way in; its output port is the value on
  the way out.

Each path from input `src` to output `dst` is fixed by n-1 **route bits**:

* In the first n-1 stages, a stage sets its bit `d` to `route[d-1]`. This is where the choice of
  path lies.
* The middle stage sets bit 0 to `dst[0]`.
* The last n-1 stages set bits 1..n-1 to those of `dst`.

So there are N/2 possible paths for each pair, and the line a path uses in the middle of the network
is `{route, src[0]}`.

**Default route.** The default is `route = dst >> 1`: the first half of the network already steers
the address bits towards the destination, one bit per stage in a fixed order. This plays the role
of the "XY" dimension-order routing used when no pre-calculated route is stored. With this route,
the complement pattern (i -> N-1-i) goes through without any internal contention. Many other
permutations do not: the Beneš network needs rearrangement to be non-blocking, and the controller
never moves established paths.

**Mapping to the drawn network.** This numbering is a standard form of the Beneš network. A
physical layout drawn with the usual shuffle wiring is the same network with its elements in a
different order. To connect the controller to real hardware, map `mzi_cross[s][e]` to the physical
elements.

## Life of a request

Each input port has a state machine in `hyco_acu`. Its states name the steps of the controller's
algorithm:

| state | meaning while the input waits |
|---|---|
| `ST_IDLE` | no request |
| `ST_REQ_RECEIVED` | destination IP is busy with another connection |
| `ST_TEST_TARGET` | another input won the same output in the CRU |
| `ST_VERIFY_ROUTE` | held back by the Bloom filter |
| `ST_CONFIGURE` | path blocked inside the network by established or higher-priority paths |
| `ST_COMMUNICATION` | granted; path set up |

Cycle by cycle:

* **Cycle 0.** The IP raises `req[i]` with `req_dst[i]`. The ACU writes the destination array.
* **Cycle 1.** All four checks are evaluated together, combinationally, for all inputs at once:
  1. The destination is free.
  2. The input wins its output column.
  3. The Bloom filter does not know the current request set as unroutable.
  4. Every DCU accepts the path.

  If all four pass, the DCUs commit the path at the clock edge.
* **Cycle 2.** `grant[i]` is high. It stays high while the IP holds `req[i]`.
* **Release.** Dropping `req[i]` frees the path's element ports and the destination at the next
  edge. An input that fails a check stays waiting, and its state records which step stopped it.
  It is retried every cycle.

A waiting request has no bound on its latency: it waits as long as its destination or a path it
needs is held. In the end-to-end test, random 8 x 8 traffic averages about 3.2 cycles from request
to grant.

## Conflict resolution (`hyco_cru`)

The request matrix is `R(i,j) = 1` when input i requests output j. It is decoded from the
destination array rows that the ACU marks as taking part: waiting, destination free, not stalled.
A column with more than one 1 is a conflict. Each column has a round-robin pointer. The winner is
the first requesting input at or after the pointer. When a winner is actually granted, the pointer
moves just past it, so inputs competing for one output are served in turn.

## Learning unroutable request sets (`hyco_bloom`, `hyco_acu`)

A fixed routing rule blocks some combinations of requests: one path holds an element port that
another path needs. Waiting for a timeout to discover this again each time is slow. The controller
therefore learns such combinations.

* **Key.** One (valid, destination) field per input. It is valid for inputs that are
  communicating, or waiting and not stalled. This is N*(log2 N + 1) = 32 bits for N = 8.
* **Filter.** M = 1024 bits and K = 3 hash functions. Each hash is an XOR of fixed constants, one
  per set key bit (the H3 family). The constant of hash `h` for bit `b` is a 32-bit integer mix of
  `h*65537 + b + 1`, cut to log2(M) bits. A test is combinational. An insertion takes effect at the
  next edge.
* **Learning.** An input may keep losing a conflict or meeting contention for `timeout_cycles`
  cycles. When it does, the current key is inserted into the filter.
* **Stalling.** When the current key hits and at least two inputs are waiting unstalled, no path
  is tried that cycle. Instead, one waiting input, chosen by round robin, is *stalled*: it is taken
  out of the key and out of the CRU. The smaller set is tested again the next cycle.
* **Un-stalling.** Stalled inputs are released as soon as any connection ends, because the
  network state has then changed.
* **Lone request.** A hit with only one input waiting is ignored, so a lone request can never be
  stalled by a false positive.

Once a set has been learnt, it is broken up as soon as it reappears, without waiting out the
timeout again.
`timeout_cycles = 0` turns learning off. `bloom_clear` empties the filter. `bloom_fill` counts
insertions and saturates; use it to decide when to clear.

## Distributed configuration units (`hyco_dcu`)

There is one DCU per element, with parameters `STAGE` and `ELEM`. In every cycle it works out, for
each candidate input, its own slice of that input's path: whether the path crosses this element,
and on which input and output port.

**Where the slice comes from.**

* **LITE-LUT.** It has `LUT_DEPTH` entries of (source, destination, slice).
* **Writing a route.** A write on the `lut_*` bus carries the source, destination and route bits.
  It goes to every DCU, and each DCU stores only its own slice of the route. All units therefore
  hold the same keys and agree on hits. Use the table for the frequent paths, for example the
  paths of several cores to a shared memory.
* **Default.** Without a hit, the slice is that of the default route.

**Accepting a path.** A DCU reports `ok[i]` when the path does not cross it, or when both ports it
needs are free and no candidate of higher rotating priority wants either of them. The ACU's
pointer `prio_ptr` advances whenever a path is accepted. A path is accepted only when all DCUs
report `ok`. The highest-priority candidate is blocked only by established paths, so the network
always makes progress.

**Bookkeeping.** On acceptance, each DCU on the path records which input owns the port. It then
sets its Cross/Bar register, which keeps its last value when the element is idle. A release frees
exactly the ports owned by the releasing input. Two paths that share an element always need the
same Cross/Bar setting, and an assertion checks this.

## Top-level interface (`hyco_top`)

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `req`, `req_dst` | in | N, N x log2N | request and destination per input, held while communicating |
| `grant` | out | N | path configured, high for the whole connection |
| `mzi_cross` | out | (2log2N-1) x N/2 | Cross (1) / Bar (0) control per element |
| `mzi_in_use` | out | (2log2N-1) x N/2 | element carries a path |
| `timeout_cycles` | in | TW | learning timeout, 0 = off |
| `bloom_clear` | in | 1 | empty the filter |
| `lut_we`, `lut_idx`, `lut_src`, `lut_dst`, `lut_route`, `lut_clear` | in | | program or clear a pre-calculated route in every DCU |
| `state`, `req_matrix`, `bloom_fill` | out | | status |
| `ev_conflict`, `ev_target_busy`, `ev_bloom_stall`, `ev_bloom_insert`, `ev_route_block`, `ev_lut_route`, `ev_default_route` | out | 1 | one-cycle event pulses |

Parameters, with their defaults:

* `N = 8`: ports, a power of two.
* `LUT_DEPTH = 8`.
* `BLOOM_M = 1024`.
* `BLOOM_K = 3`.
* `TW = 8`: width of `timeout_cycles`.

The number of DCUs is (2 log2 N - 1) * N/2: 6 for N = 4, 20 for N = 8, 56 for N = 16. The CRU, the
ACU and each DCU compare all N candidates in parallel, so logic grows roughly as N^2 per DCU. The
default build synthesises to about 25 k word-level cells and 3 k flip-flops.

## Files

| file | content |
|---|---|
| `rtl/hyco_pkg.sv` | state type, Beneš numbering functions, hash constants |
| `rtl/hyco_top.sv` | the controller |
| `rtl/hyco_dest_array.sv`, `rtl/hyco_cru.sv`, `rtl/hyco_bloom.sv`, `rtl/hyco_acu.sv`, `rtl/hyco_dcu.sv` | the blocks |
| `rtl/hyco_rr_pick.sv` | round-robin pick helper |
| `tb/tb_*.sv` | one self-checking testbench per block, the end-to-end test, and `tb_hyco_sizes` for N = 4 and 16 |
| `tb/hyco_size_harness.sv` | traffic generator and checker used by `tb_hyco_sizes` |
| `tb/benes_net_model.sv` | behavioural model of the optical network, for tests only |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog. From the directory
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hyco_pkg.sv tb/tb_hyco_top.sv --top-module tb_hyco_top -o sim
./obj_dir/sim
```

Replace `tb_hyco_top` with `tb_hyco_cru`, `tb_hyco_bloom`, `tb_hyco_acu`, `tb_hyco_dcu` or
`tb_hyco_dest_array` for the unit tests. Each runs in well under a second.

## How far it is verified

`tb_hyco_top` runs the controller at its default size against the behavioural network model. On
every cycle it checks three things: each granted input's light reaches its own destination through
the configured elements, no two granted paths share a waveguide, and no destination is granted
twice. It then runs these phases:

1. An unobstructed request. Its latency must be exactly 2 cycles.
2. Three inputs on one output. They must be served in turn.
3. A request to a busy destination.
4. The complement pattern.
5. A stored LITE-LUT route. The test checks that its middle line is the stored one.
6. All-to-all traffic: every source visits every destination in turn.
7. 40 rounds of contended random permutations with learning on.

It counts each mechanism (conflict, busy destination, route contention, Bloom insertion, Bloom
stall, LUT route, default route) and fails if any never happened.

The unit testbenches compare each block with an independent reference:

* `tb_hyco_cru`: its own matrix and pointers.
* `tb_hyco_bloom`: its own filter, built from the hash formula above.
* `tb_hyco_dcu`: the full array of 20 DCUs against path and line-sharing computations of its own.
* `tb_hyco_dest_array`: a reference copy of the array.
* `tb_hyco_acu`: directed cycle-exact checks.

`tb_hyco_sizes` runs the same per-cycle network checks on controllers with N = 4 (6 DCUs) and
N = 16 (56 DCUs), under 30 rounds of random permutations each. Every request must be granted.

Not verified: sizes above 16 ports, timing closure, and gate-level behaviour.

## Where this design departs from the published HyCo, or fills gaps

* **Topology.** The published controller is meant to work with any topology: butterfly, fat-tree,
  ring, star, PILOSS and others. Only the Beneš family is built here. The DCUs' default route and
  element numbering are Beneš-specific. Another topology needs its own slice function in
  `hyco_dcu`.
* **Single-cycle checks.** The published algorithm lists one step per state. Here the checks of
  the middle steps are evaluated in one cycle, which gives a 2-cycle best case. The published worst
  case of 5 cycles is not a bound here: waiting for a held destination or path is unbounded.
* **What learning buys.** The published design presents the Bloom filter as a way to cut
  controller latency over time, by more than 30 % for most networks. Here every check, including
  the path check in the DCUs, takes a single cycle, so a known-unroutable set has no search to
  skip. Learning therefore does not lower the latency. In the end-to-end random-permutation
  traffic, the mean request-to-grant latency is 3.17 cycles with learning off
  (`timeout_cycles = 0`), 3.29 cycles with a timeout of 3, and 3.32 cycles with a timeout of 6.
  The filter and its stall mechanism are built and verified as described. A design with a
  multi-cycle path search is where they would pay off.
* **Conflict ordering.** The per-input FIFO ordering of conflict resolution is realised as a
  rotating round-robin pointer per output.
* **Bloom filter details.** The filter's size, hash count and hash family, the key layout, the
  stall-release rule and the lone-request exception are this design's choices. So is the
  learning timeout counting only time lost to conflicts or contention.
* **LITE-LUT details.** The table size, entry format and write bus are this design's.
* **Simultaneous paths.** The rule that settles simultaneous paths competing for an element's
  port (rotating priority) is this design's.
* **Interface and reset.** The IP handshake (level `req`/`grant`) and the synchronous active-low
  reset are this design's.
* **What is not here.** The photonic parts are outside this RTL: the MZI elements, the waveguide
  network, lasers, modulators and photodetectors. So are the requesting cores.
