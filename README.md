# Hybrid stateless/stateful in-network inference pipeline

This is SystemVerilog RTL for a SmartNIC-style packet classifier for intrusion
and anomaly detection. Every packet gets a verdict, forward or drop, from a
decision tree at one packet per clock, and no packet ever leaves the fast
path. The key idea is **progressive refinement**:

* A new flow has no state. Its packets are classified on **stateless
  features** only, the fields of the packet's own headers. Each packet is also
  copied (*mirrored*) to a state manager.
* The state manager accumulates flow statistics over the flow's first *n*
  packets. It then computes 18 **stateful features** and installs them in an
  exact-match **flow table**.
* From then on, each packet of the flow finds its features in the flow table
  and is classified on stateless and stateful features together. It is no
  longer mirrored.

A single decision tree handles both phases. Its key is always
`{stateless features, stateful features}`. The stateful half is zero while a
flow has no state, so no second model or second lookup is needed. The tree is
one ternary match table that resolves in one lookup.

## Pipeline

```
             +--------+   +------------+   +---------+   +-------------+
 in_hdr ---->| header |-->| flow_table |-->| dt_tcam |-->|  fwd_table  |--> out_class,
 in_ts       | parser |   | (exact,    |   | (1024 x |   | class->drop |    out_drop
 in_tag      +--------+   |  5-tuple)  |   |  450 b) |   +-------------+
                          +-----^------+   +---------+
                                |  install      |
                                |               | miss: mirror record
                          +-----+----------+  +-v-----------+
                          | flow_state_mgr |<-| mirror_fifo |  (drops when full)
                          +----------------+  +-------------+
```

| cycle | block | work |
|---|---|---|
| 0→1 | `header_parser` | Ethernet/IPv4/TCP/UDP → 5-tuple + 16 stateless features |
| 1→3 | `flow_table` | hash the 5-tuple, read a 4-way set, compare → hit + 312-bit stateful vector |
| 3→4 | `dt_tcam` | ternary match of the 450-bit key; on a flow-table miss, push a mirror record |
| 4→5 | `fwd_table` | class → forward/drop |

`out_valid` follows `in_valid` by exactly **5 cycles**. The pipeline accepts a
packet every cycle and never stalls. At one packet per clock, 100 GbE with
minimum-size (64 B) frames needs a clock of about 149 MHz. The 256 B packet
rate of about 44 Mpps needs 44 MHz.

Frames that are not IPv4 bypass inference: they are forwarded with class 0
and are never mirrored. Only the header descriptor passes through the
pipeline. `in_tag` comes back with the verdict, so the verdict can be applied
to a payload that is buffered elsewhere.

## Features (`rtl/hynic_pkg.sv`)

**Stateless features (16, 138 bits):**
* IPv4: total length, protocol, TTL.
* TCP: source port, destination port, window, data offset, and the six flags
  FIN, SYN, RST, PSH, ACK and URG, each a separate one-bit feature.
* UDP: source port, destination port, length.

Fields of the protocol a packet does not carry are zero.

**Stateful features (18, 312 bits), over the flow's first *n* packets:**
* IP length: max, min, mean, sum and standard deviation.
* Inter-arrival time (IAT): the same five, over the *n*-1 gaps between
  consecutive timestamps, modulo 2^32.
* Six TCP flag counts.
* UDP length max and min.

Means are `floor(sum/k)`. The standard deviation is the integer population
deviation, `floor(sqrt(floor(sumsq/k) - mean^2))`. A feature with no samples
is 0: the IAT statistics when *n* = 1, and the UDP extrema of a flow that has
no UDP packets.

Timestamps (`in_ts`) are 32-bit ticks of whatever clock the integrator
chooses.

## The decision tree as one ternary table (`dt_tcam`)

A tree trained on binarised features tests one key bit at each node. Binarising
a feature of N bits into N one-bit features keeps the bit order. So every
root-to-leaf path is a conjunction of constraints on single key bits. That
conjunction is one `(value, mask)` pair over the whole key: mask 1 constrains
the bit to the value, mask 0 is a wildcard.

Example: a tree over two 2-bit features FA = {f0,f1} and FB = {f2,f3}. The
path "f0 = 1, f1 = 0, f3 = 0" becomes value `1000`, mask `1101`. Split at the
feature boundary, that is FA (10, mask 11) and FB (00, mask 01).

The leaves of a tree partition the key space, so exactly one entry matches.
The table still resolves overlaps, for hand-written or merged rule sets: the
entry with the **most constrained bits** wins, and the lowest index breaks a
tie. The popcount of the mask is computed when the entry is written and
stored next to it. A key that matches nothing returns `out_dt_hit` = 0 and
class 0.

Size: 1024 entries, which holds a tree of 1000 leaves with room to spare. The
key is the full 450-bit `dt_key_t`. Features the model does not use are
simply wildcarded.

To load a model, write one entry per leaf through `dt_wr_*`, with
`dt_wr_valid` = 1. Writing `dt_wr_valid` = 0 removes an entry. The
class-to-action map is loaded through `fwd_wr_*`: 1 = drop. After reset,
every class forwards.

## Flow table and state manager

The hardest part is how the two tables hand over a flow without ever
stalling the fast path.

**`flow_table`** is a hash table: 8192 sets × 4 ways = 32768 flows. The set
index is the low bits of `flow_hash32`: the 5-tuple folded by XOR into 32
bits, multiplied by `0x9E3779B1`, and the two halves of the 64-bit product
XORed together.

* An **install** reads the set, then writes the key, the features and the
  valid bit on one clock edge. A lookup therefore sees either no entry or the
  complete entry, never half of one.
* An install into a set with no free way fails (`stat_install_fail`). The
  flow then stays on the stateless path.

**`flow_state_mgr`** takes mirrored records from `mirror_fifo` one at a time:

1. It reads the flow's set in its own 1024 × 4 state table.
2. It creates or updates the entry: count, length and IAT sums, sums of
   squares, extrema, flag counts and UDP extrema.
3. When the count reaches `cfg_n_threshold`, it marks the entry *done*. Two
   `feature_calc` units then compute the means and deviations: a bit-serial
   divider followed by a bit-serial square root, about 105 cycles for the
   69-bit IAT sum of squares.
4. It offers the finished vector to the flow table's install port and waits
   for the result.

A record costs 2 cycles. An install adds about 110 cycles. The mirror queue
(64 records) absorbs bursts. Records that arrive when the queue is full are
dropped and counted (`stat_mirror_drops`): the fast path is never held up.

**Transition packets.** Between a flow's *n*-th packet and the moment its
install lands, later packets of the flow still miss the flow table. They are
classified stateless and mirrored again. The state manager sees that the
entry is *done*, counts them (`stat_late`) and ignores them.

**Inactivity timeouts.** Both tables run a sweeper that visits one set every
`cfg_age_step` cycles (0 = off).

* An entry that was not used since the sweeper's last visit is removed.
* Otherwise its activity bit is cleared.
* A flow-table entry counts as used when a lookup hits it. A state entry
  counts as used when a record updates it.

An idle flow therefore disappears after one to two full sweeps:
`SETS × cfg_age_step` cycles each, so 8192 × step for the flow table. Done
state entries are freed the same way. A flow whose install failed can start
over after its state entry times out.

## Interface summary (`hynic_top`)

| port | dir | meaning |
|---|---|---|
| `in_valid`, `in_hdr[767:0]`, `in_ts[31:0]`, `in_tag` | in | packet: the first 96 header bytes (byte 0 in the MSBs), arrival time, identifier |
| `out_valid`, `out_tag`, `out_class[3:0]`, `out_drop` | out | verdict, 5 cycles later |
| `out_stateful`, `out_dt_hit`, `out_mirrored`, `out_bypass` | out | per-packet path information |
| `dt_wr_*`, `fwd_wr_*` | in | model and action loading |
| `cfg_n_threshold[4:0]` | in | *n*, 1..20 |
| `cfg_age_step[31:0]` | in | timeout sweep step, 0 = off |
| `stat_*[31:0]` | out | mirror drops, installs, failed installs, late records, state-table-full records, flow and state evictions |

The reset is asynchronous and active low. Reset empties both tables and the
decision tree.

## Sizes and what they hold

| quantity | built | notes |
|---|---|---|
| flow-table entries | 32768 (8192 × 4) | ≥ 32,000 concurrent flows; a flow whose 4-way set is full is not installed |
| decision-tree entries | 1024 × 450-bit key | trees of up to 1000 leaves |
| classes | 16 | the 7-class and 10-class IoT intrusion models fit |
| *n* | run time, 1..20 | the useful range is 2..20 |
| young flows tracked | 4096 (1024 × 4) | this design's choice |
| mirror queue | 64 records | this design's choice |

The flow table stores 416 bits per entry (key and features), about 1.7 MB in
all.

## Where this design makes its own choices

The overall structure follows the hybrid-inference architecture it
implements:
* the parser → flow table → single ternary tree table → class-aware
  forwarding order;
* mirroring of flows that have no state;
* per-flow state over the first *n* packets;
* atomic installs;
* inactivity timeouts;
* the feature lists;
* the entry encoding and the most-constrained-first priority;
* the 1024-entry tree table and the ~32K-flow table.

The following are this design's own:
* **The state manager is hardware.** In the reference architecture that job
  is software on the NIC's embedded cores. `flow_state_mgr` performs the same
  steps so that the whole system can be simulated and synthesised. Its
  throughput (a record every 2 cycles, plus about 110 cycles per install) is
  not a property of the original system.
* Every width, the hash, the set-associative organisation, the queue depth,
  the timeout mechanism and the pipeline latencies.
* The split of "TCP flags" and "TCP flag counts" into six one-bit features
  and six counters. That split is what gives 16 and 18 features.
* Integer floor mean and population standard deviation.
* Non-IPv4 bypass, the class-0 result on a tree miss, and forward-all after
  reset.
* *n* and the timeout are run-time inputs, because the reference gives only a
  range for *n* and no timeout value.
* The model is trained and mapped to table entries offline; this RTL only
  provides the write ports. The 100 GbE MACs and the host PCIe link are
  outside this design.

## Files

| file | content |
|---|---|
| `rtl/hynic_pkg.sv` | feature, key and record types; widths; the flow hash |
| `rtl/header_parser.sv` | header parsing and stateless features |
| `rtl/flow_table.sv` | exact-match flow table, atomic install, ageing |
| `rtl/dt_tcam.sv` | decision-tree ternary table with priority |
| `rtl/fwd_table.sv` | class-aware forwarding |
| `rtl/mirror_fifo.sv` | mirror queue, drop on full |
| `rtl/feature_calc.sv` | serial mean / standard deviation |
| `rtl/flow_state_mgr.sv` | per-flow state, feature computation, install |
| `rtl/hynic_top.sv` | the pipeline |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_dt_full_tree` loads a 1000-leaf tree into the full-size table |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    --top-module tb_hynic_top rtl/hynic_pkg.sv tb/tb_hynic_top.sv -o sim
./obj_dir/sim
```

Replace `tb_hynic_top` with any other `tb_*` module.

`tb_hynic_top` runs the whole design at its default sizes, in about 20,000
cycles:
* It loads a four-entry model: a catch-all, a TTL rule, a SYN-count rule and
  a combined rule.
* It sends twelve interleaved flows, non-IPv4 frames, a 300-packet burst of
  new flows that overruns the mirror queue, and a timeout phase.
* It checks every verdict, its tag and its 5-cycle latency against a
  reference.
* It requires each mechanism to occur at least once: stateless and stateful
  paths, mirroring, installs, late records, mirror drops, drop and forward
  verdicts, bypass, tree miss, and both timeouts.

The unit testbenches use smaller tables (for example a 16 × 2 flow table) so
that set-full and timeout cases happen quickly.
