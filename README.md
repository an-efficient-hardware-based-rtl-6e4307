# Multi-hash IP lookup engine with one-step Cuckoo insertion

This is synthesizable SystemVerilog for a hash-based longest-prefix-match
(LPM) engine for IPv4 routing. The goal is TCAM-like speed: one lookup per
clock and a fixed latency. Storage is ordinary RAM, so area and power are far
below a TCAM's.

The engine rests on three ideas:

* **Several hash tables read in parallel.** The routing table is split over
  D sub-tables, 3 by default. Each sub-table has 2^R buckets (4096 by
  default) of C entries (32). Every sub-table hashes the same selected
  address bits with a different hash function. A lookup reads one bucket in
  each sub-table in the same cycle. Match units then compare all D×C fetched
  entries with the address, and the longest match wins.
* **All prefix lengths share the same hash bits.** Prefixes are not sorted
  into classes by length. A configurable *Bit-Select* mask picks R+F address
  positions, the same for every prefix. A prefix shorter than some of those
  positions has wildcards there. *Controlled wildcard resolution* (CWR)
  expands the prefix at insertion time on those positions only, so one prefix
  becomes 2^w stored items.
* **Hard work at insertion, none at lookup.** A new item goes to the least
  loaded of its D candidate buckets. If all D are full, one Cuckoo step tries
  to move an occupant of one of those buckets to its own bucket in another
  sub-table. If that also fails (an *unresolved collision*), the item goes
  into a small victim TCAM. The victim TCAM is searched in parallel with the
  sub-tables.

## Block diagram

```
              lk_addr (32)
                 |
           +-----------+   r (R bits), f (F bits)   +------------+  idx_0   +-------------+
           | bit_select|---------------------------->| hash_index |--------->| sub_table 0 |--+
           +-----------+             |               +------------+          +-------------+  |
                 | t (tag)           |  ... one hash_index / sub_table per table ...            |
                 v                   v                                                           v
          (registered)      +-------------+                                 +------------------+
                 +--------->| victim_tcam |------------------------------+  | match_processor i|
                            +-------------+                              |  +------------------+
                                                                         v           |
                                                                   +------------+    |
                                                                   | lpm_select |<---+
                                                                   +------------+
                                                                         |
                                                     res_hit / res_len / res_nh / res_src

  ins_prefix --> cwr_expander --items--> insert_ctrl --port B--> sub_tables, victim_tcam
```

`mht_ip_lookup` (the top) connects these blocks. It also holds the Bit-Select
configuration register.

## How a prefix is stored

The mask has exactly R+F ones. `bit_select` gathers the selected address bits
in address order. The rightmost R of them are the **index bits r**. The
leftmost F are the **folded bits f**. The remaining 32-R-F positions form the
**tag t**. Bit 31 is the first address bit.

`hash_index` computes sub-table i's bucket index as follows:

    idx[k] = r[k] xor rotl(f, i mod F)[k mod F]

The rotation is the skew that makes the D hash functions differ.

A stored entry holds `{valid, f, t, len, tlen, nh}` (`rtl/mht_entry.svh`):

* `len` is the original prefix length. It decides which match is the
  longest.
* `tlen` counts how many tag bits (from the left) lie inside the prefix.
* `nh` is an 8-bit next-hop identifier.
* r is not stored. In its bucket, r follows from the bucket index and f.

A search key matches an entry when all of these hold:

* the entry is valid;
* f is equal;
* the leftmost `tlen` bits of t are equal.

The bucket was chosen by the key's own r and f, so equal f implies equal r.

The fold is its own inverse for a fixed f: `hash_index(idx_i, f) = r`. The
insertion controller uses this to find where an occupant y could go in
another sub-table. It recovers y's r from y's bucket index, then computes
`h_j(y)`.

## Controlled wildcard resolution

`cwr_expander` receives the prefix and its length. It finds the wildcard
positions among the hash bits, `sel_mask & ~prefix_mask(len)` (w of them). It
then emits 2^w items, one per cycle. Item n is the prefix with the bits of n
deposited into those positions. Wildcards outside the hash bits stay
wildcards: the tag compare masks them by `tlen`.

Example: take a /3 prefix with hash bits at address positions 2 to 4. Only
position 4 is a wildcard, so the prefix becomes two items.

How much CWR inflates the table depends on the mask. Selecting low-entropy
leftmost bits gives little expansion but poor hashing. Selecting bits past
/16 multiplies the many /16 to /23 prefixes. The default mask `32'h3FFF_C000`
selects address positions 3 to 18. This is one reasonable choice, not a
tuned one.

## Insertion (`insert_ctrl`)

For each item x:

1. Read the D candidate buckets `T_i[h_i(x)]` at once. This takes one
   memory access and 2 cycles.
2. If any bucket has a free entry, write x into the least loaded bucket. On a
   tie, the leftmost sub-table wins (d-left). Pulse `ev_direct`.
3. Otherwise go through the D×C occupants y, table by table and entry by
   entry. For each y, read `T_j[h_j(y)]` for every j ≠ i at once. At the
   first y with room in some `T_j` (leftmost j), write y there and x into y's
   old slot in the same cycle. y is therefore never missing for a concurrent
   lookup. Pulse `ev_migrate`.
4. If no occupant can move, write x into the next victim TCAM entry and
   pulse `ev_victim`. If the victim TCAM is full, drop x and pulse
   `ev_crisis`.

The worst case is c·d+1 bucket reads per item. Each read costs 2 cycles here,
so an item takes at most `2 + 2·C·D` cycles. A direct placement takes 2.

Insertion uses a second port of each sub-table. Lookups therefore run at full
rate during updates.

Deleting or changing a route is not implemented. Inserting the same prefix
twice stores it twice.

## Lookup timing

| edge | what happens |
|------|--------------|
| 0 | `lk_valid`/`lk_addr` are sampled. Before this edge, bit select and index generation have run as combinational logic. The D buckets are read and the victim TCAM is searched. |
| 1 | The match processors and `lpm_select` evaluate. The result is registered. |
| 2 | `res_valid`, `res_hit`, `res_len`, `res_nh` and `res_src` are valid. `res_src` is 0..D-1 for a sub-table and D for the victim TCAM. |

This gives one lookup per cycle with a latency of two cycles.

## Configuration, reset, clearing

* After reset, `insert_ctrl` sweeps every row of every sub-table, writing
  empty entries. This takes 2^R cycles, with `init_busy` high. The sweep
  exists because RAM has no reset.
* The victim TCAM's valid bits are reset directly.
* `cfg_we` with `cfg_sel_mask` loads a new Bit-Select mask. It is accepted
  only when `cfg_ready` is high. Stored items depend on the mask, so loading
  one also empties all tables.
* The mask must contain exactly R+F ones. An assertion checks this.

## Parameters (`mht_ip_lookup`)

| parameter | default | meaning |
|-----------|---------|---------|
| `R` | 12 | index bits: 2^R buckets per sub-table |
| `F` | 4 | folded bits: R+F = 16 selected bits |
| `D` | 3 | sub-tables |
| `C` | 32 | entries per bucket |
| `NH_W` | 8 | next-hop width |
| `VDEPTH` | 9830 | victim TCAM entries |
| `DEFAULT_SEL_MASK` | `32'h3FFF_C000` | Bit-Select mask after reset |

R=12 with 16 selected bits and D=3 is the baseline configuration of the
scheme. A 12-bit index from 18 selected bits (`F=6`) is reported to hash
better on current tables and only needs a parameter change.

The scheme gives no bucket size. C=32 gives 393,216 entries, which puts a
185K to 217K-prefix core table at a load factor of about 0.5. That is where
the scheme is reported to need a victim space of at most about 5% of the
prefixes, hence `VDEPTH` = 5% of 196,608.

## How far it is verified

* Every block has a self-checking testbench with an independent reference.
* Each testbench was also run against a deliberately broken copy of its block
  and failed.
* The reduced end-to-end test sees every placement path: direct, migration,
  victim and drop. It also covers lookups during insertion and a mask change.
* At full size, random prefixes up to a load factor of 0.84 needed neither a
  Cuckoo move nor a victim entry.
* Not verified: behaviour with real routing tables. This includes how many
  unresolved collisions a given mask produces at full size, which is what
  decides the victim TCAM size.

## Where this RTL departs from, or adds to, the scheme

* Design choices that the scheme leaves open:
  * the gather order and the r/f split of the selected bits;
  * the rotation used as skew;
  * the entry format, including the `tlen` field and the next hop;
  * tie rules;
  * the order in which Cuckoo candidates are tried;
  * the dual-port sub-tables;
  * the victim entry format (value + care mask + length) and priority by
    length;
  * dropping items when the victim TCAM is full;
  * the clear sweep.
* Only parallel table access is built. Accessing the sub-tables one after
  another to save power is mentioned as an option but not built.
* The victim space is a TCAM written as flip-flops and comparators. Its
  priority is a two-level search: groups of 64 entries, then the groups. A
  real design would use a TCAM macro or extra SRAM buckets.
* Sub-tables are behavioural RAM arrays that synthesis maps to memories.
* How a Bit-Select mask is chosen for a given routing table is an offline
  analysis, not hardware.
* Area and power figures are not modelled.

## Files

* `rtl/mht_pkg.sv`: package with the address and length types and
  `prefix_mask()`.
* `rtl/mht_entry.svh`: macro for the entry struct.
* The blocks, one per file: `bit_select`, `hash_index`, `sub_table`,
  `match_processor`, `lpm_select`, `victim_tcam`, `cwr_expander`,
  `insert_ctrl`, `mht_ip_lookup`.
* `tb/tb_<block>.sv`: self-checking testbench for each block.
  * `tb_insert_ctrl` runs a reference model of the placement algorithm and
    compares every table entry with it.
  * `tb_mht_ip_lookup` is the end-to-end test at reduced size. It runs
    insertion with lookups every cycle, reconfiguration and victim overflow,
    and checks each lookup against a brute-force LPM.
  * `tb_mht_full` runs the default-size engine. It covers the full
    4096-cycle clear sweep and then inserts 80,000 random prefixes with a
    core-table length mix. That is about 200,000 items, a load factor of
    about 0.5. It ends with 1000 back-to-back lookups checked against a
    brute-force LPM. It takes under a minute. With random prefixes, every
    item was placed directly, without a Cuckoo move or a victim entry. This
    held even at a load factor of 0.84. Real tables hash less evenly.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/mht_pkg.sv tb/tb_mht_ip_lookup.sv --top-module tb_mht_ip_lookup -o sim
./obj_dir/sim
```

Replace `tb_mht_ip_lookup` with any other testbench name. The block
testbenches run in well under a second. The reduced end-to-end test builds in
about 10 s.
