# DPPC-RE: distributed parallel packet classification with range encoding

A single TCAM clocked at 100 MHz performs 100 million lookups per second.
A five-tuple classification with range-encoded ports takes four lookups:
two to encode the ports, then two for the 128-bit rule search. So one
TCAM manages about 25 million packets per second, a quarter of the
100 Mpps that a 40 Gb/s (OC-768) link needs in the worst case. Copying the
whole rule table into four or five TCAMs would be fast enough, but it
multiplies the TCAM cost.

This design gets the speed from several TCAMs without copying the rule
table into each one:

* **Distributed rule table.** A few bits of the five-tuple form a
  **Key-ID**. By default there are four bits: PROT(5), DIP(1), DIP(21) and
  SIP(4). The rules are grouped by the Key-ID values they can match, and
  each group lives in exactly one TCAM. A packet's rule search (the **RM
  task**, for rule matching) must run in the TCAM that owns its Key-ID
  group.
* **Replicated range tables.** The two port range tables are small, so
  every TCAM holds a copy. A packet's port encoding (the **KE task**, for
  key encoding) can therefore run in *any* TCAM. The controller uses this
  freedom to balance the load.

This repository holds the controller between the network processor (NPU)
and K TCAM chips (K = 5 by default). The TCAMs, their result SRAMs and the
NPU are external parts. The testbench uses a behavioural TCAM model.

```
 NPU --five-tuple--> distributor --+--> RM FIFO[k] ------------+
                        |          |                           v
                        |          +--> KE FIFO[j] --> PU[j] --> TCAM[j] --+
                        |                               |  Tag FIFO[j]     |
                        |           key buffer[k] <-----+-- mapper <-------+
                        |                |                    |
                        |                +--> PU[k] --> TCAM[k] (rule search)
                        |                                     |
 NPU <------------------------------- npu_res[k] <-- mapper <-+
```

## The life of one packet

1. **Distributor.** It reads the Key-ID bits and looks up which TCAM `k`
   owns that Key-ID group. It advances TCAM `k`'s serial number (S/N),
   which counts modulo the RM FIFO depth. It then forms an 8-bit **tag**:
   `{CAMID = k (1-based, 3 bits), S/N (5 bits)}`. Next it picks a TCAM `j`
   for the KE task. In the same cycle it pushes two units:
   * the whole tuple and the tag into RM FIFO `k`;
   * the two ports and the tag into KE FIFO `j`.

   `j` may equal `k`.
2. **KE turn on TCAM `j`.** Processing unit `j` sends two lookups,
   source port then destination port, and pushes the tag into Tag FIFO
   `j`.
3. **Mapper.** It holds the source-port code (phase I) until the
   destination-port code (phase II) arrives on the next cycle. It then
   pops Tag FIFO `j`. The tag's CAMID selects key buffer `k`, and its S/N
   selects the unit there. The mapper writes both 8-bit codes into that
   unit and sets its valid bit.
4. **RM turn on TCAM `k`.** Processing unit `k` waits until two things
   hold: the RM FIFO head's key buffer unit is valid, and the scheduler
   gives an RM turn. It then pops the RM FIFO, clears the key buffer unit
   and advances its pointer. It sends the 128-bit encoded key as two
   64-bit slots: `{SIP, DIP, SPORT, DPORT, PROT, SPK, DPK, 8'h00}`.
5. **Mapper.** It returns the RM result, with the tag from Tag FIFO `k`,
   on `npu_res[k]`.

Each TCAM returns its results in the order its packets arrived. All
packets of one flow share a five-tuple, so they share a Key-ID and a TCAM,
and flows are never reordered. Packets of different TCAMs can overtake
each other. The NPU can match results to packets with the tag, or by
keeping one queue per `npu_res` port.

## Why the key buffer is addressed by S/N

The KE tasks of the packets queued at TCAM `k` run on different TCAMs, so
their results come back in any order. The key buffer has one unit per RM
FIFO unit, and the unit number equals the packet's S/N.

The S/N is given out cyclically, and the RM FIFO is strictly FIFO. So
processing unit `k` only needs a pointer that advances by one with each
rule search. That pointer always names the unit of the packet at the RM
FIFO head.

A packet whose codes arrive early just waits in its unit. A head packet
whose codes are late blocks its TCAM's RM turns. KE turns continue in
the meantime.

There is also a reason the unit is always free when a write arrives. The
distributor only accepts a packet when its RM FIFO has room. The unit for
that S/N was last used by the packet eight positions earlier, and that
packet has already left the RM FIFO, which cleared the unit. An assertion
in `key_buffer` checks that no write lands on a valid unit.

## Balancing the key encodings

`ke_mode` selects the policy:

* **Full adaptation (FA, `KE_FA`).** The KE task goes to the TCAM whose KE
  FIFO holds the fewest units; a tie goes to the lowest number. In theory
  FA can balance the load perfectly as long as no TCAM's share of rule
  searches exceeds 2/K.
* **Stagger round robin (SRR, `KE_SRR`).** The KE tasks of packets whose
  rules sit in TCAM `k` go in turn to the other K-1 TCAMs. Each `k` keeps
  its own round-robin position. SRR needs no occupancy counters, but it
  only narrows the load imbalance; it does not remove it.

If the target RM FIFO or the chosen KE FIFO is full, the packet is
dropped: `in_drop` rises in the same cycle and no state changes. A Key-ID
that maps to TCAM number 0, or to a number above K, is also dropped.

## The processing unit's turns

A **turn** takes two TCAM cycles: one rule search (two slots) or one key
encoding (two range lookups). RM tasks have waited longer, because they
cannot start before their KE task, so RM gets priority. Under strict
priority, though, KE tasks could starve. The scheduler is therefore an
asymmetric round robin: RM has priority for `RRR` turns (3), then KE for
one turn.

The type with priority goes if it is ready; otherwise the other type
uses the turn. Only turns that are issued are counted. With both queues
always ready, the turn order is `R R R K R R R K ...`, back to back.

The first access of a turn is driven combinationally from the FIFO heads.
The second access comes from a register in the next cycle. Each turn
pushes a tag into the Tag FIFO. When the Tag FIFO is full, the next turn
waits. That cannot happen with a two-cycle TCAM and `TAG_DEPTH = 4`.

## Interfaces

Types are in `rtl/dppc_pkg.sv`. The `tcam_cmd_t`/`tcam_res_t` interface is
specific to this design: adapt it to the TCAM part you use.

| port | dir | meaning |
|---|---|---|
| `in_valid`, `in_tuple` (`five_tuple_t`, 104 b) | in | one tuple per cycle: `{sip, dip, sport, dport, prot}` |
| `in_drop` | out | the tuple of this cycle was dropped |
| `npu_res[K]` (`npu_res_t`) | out | `{valid, tag, hit, data}`: results of the packets whose rules sit in TCAM k |
| `ke_mode` | in | `KE_FA` or `KE_SRR`; may change at any time |
| `tbl_we`, `tbl_addr`, `tbl_camid` | in | rewrite one entry of the Key-ID → TCAM map (1-based TCAM number) |
| `tcam_cmd[K]` (`tcam_cmd_t`) | out | `{valid, op, key[63:0]}`, where op is `OP_RM1`, `OP_RM2`, `OP_KE_SP` or `OP_KE_DP` |
| `tcam_res[K]` (`tcam_res_t`) | in | `{rtype, hit, data[15:0]}`, where rtype is `RES_NONE`, `RES_RM`, `RES_KE1` or `RES_KE2` |

The controller expects the following from each TCAM and its SRAM:

* **In-order results.** The TCAM answers lookups in the order they were
  issued, at any fixed latency.
* **Result types.** A rule search produces one `RES_RM` result, for its
  second slot; the first slot produces none. The two range lookups of a
  KE turn produce `RES_KE1` and then `RES_KE2`, on consecutive cycles.
* **Rule entries.** Each rule uses 128 bits, laid out like the encoded
  key. An encoded port field is wildcarded, and the rule's bit is
  required in the SPK or DPK code.
* **Range tables.** A miss in a range table must return code 0.

Reset (`rst_n`) is synchronous and active low. Keep reset asserted until
the TCAMs have flushed any lookups issued before it.

## Parameters (`dppc_re_top`)

| parameter | default | meaning |
|---|---|---|
| `K` | 5 | number of TCAMs (2..7) |
| `P` | 4 | Key-ID bits |
| `ID_POS` | `{100, 51, 71, 3}` | bit index in the 104-bit tuple of Key-ID bits 3..0: SIP(4), DIP(21), DIP(1), PROT(5), with bit 1 as the field's MSB |
| `ID_MAP` | five-TCAM table | reset contents of the Key-ID map, 3 bits per Key-ID with Key-ID 0 in the low bits. TCAM 1: groups 11, 2, 0; TCAM 2: 8, 7, 4; TCAM 3: 15, 10, 14, 12; TCAM 4: 9, 3, 13; TCAM 5: 5, 6, 1 |
| `RM_DEPTH` | 8 | RM FIFO units = key buffer units = S/N modulus (at most 32) |
| `KE_DEPTH` | 4 | KE FIFO units |
| `TAG_DEPTH` | 4 | Tag FIFO units; this design's choice |
| `RRR` | 3 | round-robin ratio: RM-priority turns per KE-priority turn |

The Key-ID bit order follows the convention that the first listed ID bit
is the least significant. Check it against the worked example below:
packet `<166.111.140.1, 202.205.4.3, 15335, 80, 6>` has Key-ID `0010`
(group 2), goes to TCAM 1 and gets tag `001_00001` as the first packet
after reset.

The Key-ID bits, their positions and the map all come from offline
software. That software chooses the ID bits to balance the group sizes
and keep redundancy low. It then packs the groups into TCAMs with a
capacity-first or load-first greedy heuristic. This RTL does not include
it: the map is a parameter and a writable table.

## Timing and measured behaviour

The timings below assume a TCAM whose result appears 2 cycles after the
command. That is the testbench model's latency.

* **Minimum latency: 10 cycles** from `in_valid` to `npu_res.valid`.
  * KE path, 5 cycles: FIFO, two range lookups, TCAM, mapper register and
    key buffer write.
  * RM path, 5 cycles: two slots, TCAM, mapper register.
* **Throughput:** one tuple per cycle is accepted.

Back-to-back traffic (one packet per cycle), random 48-rule set, 4000
packets per run. A drop counts against the throughput ratio. Delays are
in cycles, for the packets that were accepted, given as mean / standard
deviation / maximum:

| TCAMs | Key-ID traffic | FA ratio | FA delay | SRR ratio | SRR delay |
|---|---|---|---|---|---|
| 5 | uniform | 0.999 | 13.5 / 2.8 / 25 | 0.994 | 16.4 / 4.3 / 34 |
| 5 | uneven | 0.997 | 14.2 / 3.2 / 25 | 0.988 | 17.2 / 4.5 / 34 |
| 4 | uniform | 0.989 | 18.0 / 3.9 / 30 | 0.883 | 22.1 / 5.6 / 41 |
| 4 | uneven | 0.988 | 17.7 / 3.7 / 33 | 0.889 | 21.7 / 5.5 / 43 |

In the uneven pattern, each TCAM's share of the traffic is its load in
the five-TCAM table (18.8, 20.0, 29.4, 11.8, 20.0 %), spread evenly over
its groups. The table is not rebuilt when the pattern changes.

The same tests also use random arrivals at 90 % traffic intensity (a
packet in each cycle with probability 0.9):

| TCAMs | FA ratio | FA delay | SRR ratio | SRR delay |
|---|---|---|---|---|
| 5 | 1.000 | 12.9 / 2.5 / 23 | 0.999 | 14.0 / 3.3 / 28 |
| 4 | 0.998 | 14.7 / 3.2 / 26 | 0.970 | 18.8 / 4.8 / 38 |

With five TCAMs there is 25 % spare lookup capacity, and both policies
keep up. With four TCAMs the capacity equals the demand exactly. There
FA still loses only about 1 % of packets, while SRR loses more than 10 %
and its mean delay exceeds 20 cycles. In every case FA's delays are both
lower and more tightly grouped. The four-TCAM test checks that FA's
spread is the smaller one.

## Choices made here

These points are not fixed by the scheme itself:

* **Tag bit order.** The tag is laid out `{CAMID, S/N}`, following the
  worked example. A field diagram that lists S/N first would put it the
  other way round.
* **First S/N.** The S/N counter advances before it is used. The counters
  reset to 0, so the first packet of a TCAM gets S/N 1 and the processing
  unit's pointer resets to 1.
* **Key-ID bit.** The Key-ID uses PROT(5), which separates TCP (6) from
  UDP when UDP is written as protocol 11. One description of the same
  example names PROT(4) instead. Both give the same Key-ID for the example
  packet. Change `ID_POS` to use another bit.
* **FA backlog.** FA measures backlog by KE FIFO occupancy. Counting all
  queued work per TCAM would be an alternative.
* **RM results carry their tag.** An RM result also pops the Tag FIFO, so
  the NPU receives the tag. This keeps the Tag FIFO in step with the
  TCAM's in-order result stream.
* **Overload.** Overload drops packets rather than applying back-pressure.
* **Result ports.** There is one result port per TCAM, because the
  arbitration between TCAMs towards the NPU is not specified.
* **Key buffer write ports.** Key buffers have K write ports, because up
  to K key encodings for the same key buffer can finish in one cycle.
* **Code placement.** The codes go in the first 16 of the 24 free bits of
  the second slot, and range lookups put the port in the low 16 key bits.
* **Code width.** The two codes are 8 bits each. In the testbench every
  range owns one code bit, so up to 8 ranges per port field can be encoded
  that way. Other range encodings fit the same 8-bit fields.

Rule and range table updates while traffic flows are outside this design.

## Files

`rtl/`:
* `dppc_pkg.sv`: types and widths.
* `sync_fifo.sv`: the RM, KE and Tag FIFOs.
* `key_buffer.sv`
* `distributor.sv`
* `processing_unit.sv`
* `mapper.sv`
* `dppc_re_top.sv`: the top level.

`tb/`:
* One self-checking testbench per module: `tb_sync_fifo`,
  `tb_key_buffer`, `tb_distributor`, `tb_processing_unit`, `tb_mapper`.
* `tb_dppc_re_top`: end to end, at the default size.
* `tb_workload_k4`: four TCAMs.
* `tcam_model.sv`: behavioural TCAM plus SRAM.

The end-to-end tests build their own rule set. They split the port ranges
into prefixes for the range tables and place each rule in the TCAMs whose
Key-ID groups it can match. They compare every result with a plain
first-match search over the original rules, using real range comparisons.

Simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dppc_pkg.sv \
  rtl/sync_fifo.sv rtl/key_buffer.sv rtl/distributor.sv rtl/processing_unit.sv \
  rtl/mapper.sv rtl/dppc_re_top.sv tb/tcam_model.sv tb/tb_dppc_re_top.sv \
  --top-module tb_dppc_re_top -o sim && ./obj_dir/sim
```

Each testbench ends with `TB_RESULT checks=N failures=M`. For a block
test, compile only the package, the block and its testbench.
