# Two-Level Address Predictor (2LAP)

A load-address predictor guesses the effective address of a load before the
address is computed, so the cache can be accessed early. The classic
*last-address* predictor keeps, per static load, the last address it
produced; with 4096 entries of 64-bit addresses that table alone is 32 KB,
as large as a first-level cache.

Most of those 64-bit addresses share their high-order bits: loads touch the
stack, a few global areas and a few heap regions. The 2LAP exploits this
spatial locality by storing each address in two pieces:

* the **Low-Address Table (LAT)**, indexed by the PC like the usual
  predictor table, keeps per load only the low `b` address bits plus a
  *link*, a small index into
* the **High-Address Table (HAT)**, a small fully associative table holding
  the remaining `64-b` high-order bits once for every load that shares them.

With the default sizes (4096-entry LAT, 64-entry HAT, `b = 14`) the
predictor stores 126,278 bits, against 290,816 bits for a one-level
last-address table with the same number of entries and tag bits: 57% less.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, in `rtl/`;
self-checking testbenches are in `tb/`.

## Predicting an address

```
  PC ──► [ tag | index ]──► LAT[index] = { link, chunk_id, low(b), conf(2), tag }
                                  │
                                  └─ link ──► HAT[link] = { link counter(3), high(64-b) }

  predicted address = { HAT[link].high , LAT[index].low }
```

A prediction is made only when the stored tag equals the PC's tag and the
two-bit saturating confidence counter is 2 or 3. The two tables are read one
after the other. That costs nothing in practice, because the LAT can be read
as soon as the PC is known, many stages before the load issues.

## Updating the tables: the hard part

Each executed load sends its PC and computed address to the update port. What
happens depends on the LAT entry at the load's index (`conf` is the
confidence counter, 0..3, saturating).

| LAT entry | outcome | new LAT entry | HAT action |
|---|---|---|---|
| other tag | allocate (always) | tag, `conf = 1`, `chunk_id = 0`, low bits | if old `conf > 1`: decrement old link |
| predictable, `conf > 1` | address == `{HAT high, LAT low}` | `conf + 1` | none |
| predictable, 3 → 2 | wrong, still predictable | low bits replaced | if high bits changed: decrement old link, insert new high bits, relink |
| predictable, 2 → 1 | wrong, now unpredictable | `chunk_id` = lowest differing chunk, that chunk stored | decrement old link (link broken) |
| unpredictable, `conf ≤ 1` | chunk `chunk_id` of the address equal to the stored chunk: `conf + 1`, else `conf - 1` | stored chunk refreshed | none |
| unpredictable, 1 → 2 | becomes predictable | `chunk_id = 0`, low bits | insert high bits, link |

Three ideas hide in that table.

**Filtering HAT allocations.** An unpredictable load would only pollute the
small HAT, so a load gets a HAT entry only once it has proved predictable
(its counter rises from 1 to 2). New loads start at `conf = 1` and unlinked.
While a load is unpredictable it is classified from the LAT alone: the `b`
bits stored in the entry stand in for the whole address.

**Dynamic chunk selection.** Comparing only the low `b` bits misclassifies a
load whose stride is a multiple of `2^b`: its low bits never change. So the
address is cut into `ceil(64/b)` non-overlapping `b`-bit chunks (five for
`b = 14`, chunk *k* = bits `[14k +: 14]`, the top one 8 bits wide). When a
predicted load drops to unpredictable, the entry keeps the *lowest chunk in
which the computed and the predicted address differ*, and records its number
in `chunk_id`. Later executions are classified on that chunk. When the load
becomes predictable again the entry returns to chunk 0.

**Link counters and HAT replacement.** Every HAT entry has a 3-bit
saturating counter estimating how many LAT entries link to it. A LAT entry
that stops being linked (it is replaced, becomes unpredictable or moves to
other high bits) decrements it. To insert high bits (`INSERT`), all 64
entries are compared:

1. a match: that entry is linked and its counter incremented;
2. else an *empty* entry, one with counter 0, is overwritten (the lowest
   numbered);
3. else a random entry other than the most recently used one is evicted
   (*no-MRU*). The new entry starts with counter 1 and becomes the MRU entry.

A decrement and an insertion can come from the same update (a 3 → 2
relink). The decrement is applied first, so an entry it empties can be
reused at once.

Evicting a HAT entry does not touch the LAT entries that still link to it.
Those loads will mispredict once, which the processor recovers from like any
misprediction, and their later decrements land on the new owner. The
counters are therefore estimates, and saturation at 7 makes them more so.
This is accepted by design: invalidating the linked LAT entries would cost
far more logic.

## Interfaces and timing (`tlap_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `ready_o` | out | 1 | low while the LAT is cleared after reset (LAT_ENTRIES cycles) |
| `pred_req_i`, `pred_pc_i` | in | 1, 64 | prediction request |
| `pred_valid_o`, `pred_hit_o`, `pred_addr_o` | out | 1, 1, 64 | result; `pred_hit_o` = a prediction is made |
| `upd_req_i`, `upd_pc_i`, `upd_addr_i` | in | 1, 64, 64 | executed load and its computed address |
| `upd_valid_o`, `upd_event_o` | out | 1, 12 | update done and what it did (`upd_event_t`) |

Both ports accept one request per cycle and answer two cycles later:

* prediction: the LAT is read at the first clock edge; the HAT is read and
  the tag/confidence check made in the next cycle; the result is registered
  at the second edge.
* update: the LAT entry is read at the first edge; `tlap_update` computes the
  new entry and the HAT commands in the next cycle; LAT and HAT are written
  at the second edge. When two updates to the same LAT word follow each
  other, the word being written is forwarded to the second one
  (`upd_event_o.bypass`).

The predicted address used inside an update is rebuilt from the tables at
update time, so the update port needs only PC and address. A prediction does
not see an update of the same load that is still in flight. Requests made
while `ready_o` is low are ignored.

The PC index is `pc[PC_LSB +: log2(LAT_ENTRIES)]` with `PC_LSB = 2`
(instructions are 4-byte aligned), and the tag is the `TAG_W` bits above it.

`upd_event_t` (in `tlap_pkg`) reports `lat_miss`, `predicted`, `correct`,
`to_unpred`, `to_pred`, `chunk_moved`, `hat_insert`, `hat_hit`, `hat_empty`,
`hat_random`, `hat_dec` and `bypass`. From these, the two figures of merit
of an address predictor follow: *predictability* is correct predictions per
executed load; *accuracy* is correct predictions per prediction made.

## Parameters and storage

| parameter | default | meaning |
|---|---|---|
| `LAT_ENTRIES` | 4096 | LAT entries (evaluated range 256 to 4096) |
| `HAT_ENTRIES` | 64 | HAT entries, a power of two (16 and 32 were also evaluated) |
| `B` | 14 | low-order bits per LAT entry (10 and 12 were also evaluated) |
| `TAG_W` | 5 | tag bits; index plus tag = 17 bits |
| `CNT_W` | 3 | link-counter width |
| `PC_LSB` | 2 | lowest PC bit used for the index |

For a different LAT size keep `log2(LAT_ENTRIES) + TAG_W = 17`; that is the
point where more tag bits no longer improve accuracy.

Storage at the defaults, which matches the cost formula
`(3 + 64 - b)·HAT + (log2 HAT + ceil(log2(64/b)) + b + 2 + t)·LAT + log2 HAT`:

| table | entries | bits per entry | bits |
|---|---|---|---|
| LAT | 4096 | 6 link + 3 chunk_id + 14 low + 2 conf + 5 tag = 30 | 122,880 |
| HAT | 64 | 3 counter + 50 high = 53 | 3,392 |
| MRU register | 1 | 6 | 6 |

The rest is small: a 16-bit LFSR and the pipeline registers. Synthesis shows
122,880 memory bits and 3,625 flip-flops.

## Modules

| file | role |
|---|---|
| `tlap_pkg.sv` | address width, confidence type and saturating ±1, `upd_event_t` |
| `tlap_top.sv` | the predictor: tables, both pipelines, forwarding |
| `tlap_lat.sv` | LAT array: 2 synchronous read ports, 1 write port, clearing sweep |
| `tlap_hat.sv` | HAT: read ports, associative insert, link counters, MRU |
| `tlap_hat_victim.sv` | empty-entry search and no-MRU random choice |
| `tlap_lfsr.sv` | 16-bit LFSR for the random choice |
| `tlap_chunk_unit.sv` | chunk extraction and lowest-differing-chunk search |
| `tlap_update.sv` | the update table above, combinational |
| `tlap_predict.sv` | tag/confidence check and address concatenation |

## What is this implementation's own choice

The table organisation, entry fields, default sizes and every rule in the
update table come from the published design. The following are not
specified there and were chosen here:

* **Pipelining and ports.** The two-cycle pipelines, the separate read ports
  and the forwarding between back-to-back updates.
* **Reset.** A sweep clears the LAT after reset; cleared entries have
  confidence 0. The HAT is cleared too.
* **HAT lookup.** The HAT is searched fully associatively, with no hash. The
  published design leaves the hash to the HAT size and notes that small HATs
  can be searched associatively.
* **Replacement details.** The lowest-numbered empty entry wins. The random
  choice is `lfsr mod 64`, moved to the next entry when it hits the MRU one,
  so that entry is twice as likely as the others. The LFSR (mask `0xB400`)
  steps only on a random eviction. "MRU" means the entry most recently linked
  by an insertion.
* **Refreshing the stored bits.** The published update procedure writes the
  low bits only on allocation and on the 2 → 1 transition. Its prose,
  though, says the LAT is updated like the one-level predictor, which stores
  the new address every time. The prose is followed here: the low bits, or
  the classifying chunk, are refreshed on every update.
* **Relinking on a 3 → 2 update whose high bits changed.** The prose says
  the old link counter is decremented on "an update due to a change in the
  high-order portion" and that a new link increments or allocates. The
  procedure is silent. Here the new high bits are inserted and linked.
* **Linking on 1 → 2.** The prose says the link is established at this
  transition. The printed procedure only resets `chunk_id`. The prose is
  followed.
* **Rebuilding the predicted address** at update time, rather than carrying
  it from the prediction.
* **Where no information was given:** what the lowest-differing-chunk search
  returns for equal addresses (0), and that a match on a HAT entry whose
  counter is 0 counts as a hit.

## Not included

* The **Looking-Backward Predictor** with two-level storage, which was also
  evaluated. Its allocation filter comes from other work and is not described
  in enough detail to build.
* The one-level base predictor and the LRU HAT replacement. They served only
  as points of comparison. (`tb_tlap_vs_base` contains a behavioural
  one-level predictor as a reference.)

## Verification

Each module has a self-checking testbench in `tb/` that computes expected
values independently and prints `TB_RESULT checks=N failures=M`:

* `tb_tlap_top` runs the whole predictor at its default size against a
  reference model of both tables, with a mirrored LFSR. Its synthetic load
  stream contains constant, slowly striding, random and region-hopping loads,
  strides that are multiples of `2^14`, aliasing loads and back-to-back
  updates. It checks every prediction, every update's event record and both
  two-cycle latencies. It also requires each mechanism to occur at least
  once: correct and wrong predictions, both transitions, chunk selection
  above chunk 0, HAT hit, empty-entry reuse, no-MRU eviction, counter
  decrement and saturation, and forwarding.
* `tb_tlap_configs` runs the same end-to-end check, through the
  parameterised `tlap_e2e_harness`, at the other evaluated sizes: `b = 10`
  with 16 HAT and 256 LAT entries, `b = 12` with 32 and 1024, and `b = 10`
  with 64 and 2048.
* `tb_tlap_lat`, `tb_tlap_hat`, `tb_tlap_hat_victim`, `tb_tlap_chunk_unit`,
  `tb_tlap_update` and `tb_tlap_predict` test the parts in isolation.
* `tb_tlap_vs_base` feeds one stream of 36,000 loads to the 2LAP and to a
  behavioural one-level last-address predictor with the same number of
  entries. When the addresses fall in 48 regions of 16 KB, the two must make
  exactly the same predictions (in a typical run, 23,793 made and 22,293
  correct by each). When every pass of the loop touches 400 regions, the
  64-entry HAT thrashes: in a typical run the 2LAP keeps about 3%
  predictability, against about 68% for the one-level table. The HAT must be
  sized for the number of high-order regions in use at one time.

The original evaluation ran SPEC95 integer traces on an Alpha. Those traces
are not part of this repository, so the predictability and accuracy figures
reported for them are not reproduced here.

Running one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/tlap_pkg.sv rtl/*.sv \
          tb/tb_tlap_top.sv --top-module tb_tlap_top -o sim
./obj_dir/sim
```

Every testbench finishes in well under a second of simulation time on a
workstation.
