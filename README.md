# Five-level pipelined IPv4 route lookup

An IPv4 router must find, for every packet, the longest route prefix in its
forwarding table that matches the packet's destination address. This design
does that longest-prefix match in hardware at one lookup per memory cycle. The
forwarding table is stored as a prefix tree with only five fixed levels, for
prefix lengths 8, 16, 19 and 24 (where most backbone routes sit) plus 32. Each
level lives in a memory bank of its own. A lookup therefore needs at most five
memory accesses, each in a different bank, and a five-stage pipeline can start
a new lookup every cycle.

Two engines are built on the same table layout. They follow the two engines of
Yang and Shieh, "Hardware Based Routing Lookup for IPv4":

* the **single-output engine** returns every lookup after exactly five cycles,
  one result per cycle;
* the **multiple-output engine** drops a lookup from the pipeline at the stage
  that decides it. Short prefixes are answered sooner, and results of
  different lookups can leave in the same cycle.

Both engines support **promotion**. A level-3 entry can carry the only route
of the level-4 group below it, so that route is found one memory access
earlier.

The RTL is SystemVerilog (IEEE 1800-2017). It lints with
`verilator --lint-only -Wall`. The only warnings are about unused bits and
about `rst_n` being used both as an asynchronous reset and in the assertions'
`disable iff`. Every block has a self-checking testbench.

## The table: five levels of prefix groups

The 32-bit destination address is cut into five fields:

| level | address bits | field width | prefix length at this level | bank address | entries | entry width | bank size |
|------:|-------------:|------------:|----------------------------:|-------------:|--------:|------------:|----------:|
| 1 | 31..24 | 8 | 8  | field              | 256   | 16 | 512 B  |
| 2 | 23..16 | 8 | 16 | {segment, field}   | 4 M   | 16 | 8 MB   |
| 3 | 15..13 | 3 | 19 | {segment, field}   | 128 K | 32 | 512 KB |
| 4 | 12..8  | 5 | 24 | {segment, field}   | 512 K | 16 | 1 MB   |
| 5 | 7..0   | 8 | 32 | {segment, field}   | 4 M   | 8  | 4 MB   |

The segment is a 14-bit pointer, so every level below the first holds up to
16,384 **groups**. A group is the 2^field-width children of one node of the
level above. All banks together take about 13.5 MB. A real table uses only a
small part of that: about 0.9 MB for a 56,000-route backbone table of 2000.

Each node of the tree is one entry, of one of three kinds:

* **valid**: a route ends here. The pointer is the **next-hop index**, a
  14-bit index into the router's next-hop table.
* **index**: longer routes exist below this node. The pointer is the segment
  of the group at the next level.
* **invalid**: no route covers this node.

Routes whose length falls between two levels are **expanded**. A /21 becomes
eight valid entries at level 4 (/24). A node is never valid and index at once.
Say a route R is also a prefix of longer routes. Then R's node becomes an
index entry. Every entry of the group below it that no longer route claims
takes R's next hop. As a result, the first valid entry a lookup meets is the
longest match.

Entry formats (`rl_pkg`):

```
levels 1, 2, 4   [15] valid  [14] index  [13:0] pointer
level 3          [31] valid  [30] index  [29:16] pointer  [15:5] promoted next hop  [4:0] promoted offset
level 5          [7]  valid  [6:0] next-hop index
```

Level-5 entries have only 7 bits of next hop. Any next hop that ends up in a
level-5 entry must be below 128. That includes a shorter route expanded into a
level-5 group. The table builder must check this.

## Search rule and pipeline

A lookup starts with the level-1 entry at address bits 31..24. At every level
the entry decides what happens next:

| entry | action |
|---|---|
| valid | done: hit, next hop = pointer |
| index | read level k+1 at {pointer, field k+1} |
| neither flag | done: no route |
| both flags, level 3 | promoted entry (see below) |

Level 5 has no index entries: valid or no route.

Each bank is a synchronous RAM with a one-cycle read. Pipeline register k holds
a lookup while bank k returns that lookup's entry. The stage logic
(`lookup_stage`) decodes the entry in the same cycle. It issues the read of
bank k+1 and passes the lookup to register k+1. Once a lookup is decided it
passes through the later stages unchanged, and no later bank is read for it.

```
cycle          0        1        2        3        4        5
request  -->  reg1     reg2     reg3     reg4     reg5     result (single-output)
bank read     L1       L2       L3       L4       L5
```

## Single-output engine

`single_output_engine` is the pipeline above with the result taken after stage
5. Every lookup takes exactly **five cycles** from `in_valid` to `out_valid`.
Results leave in request order, one per cycle. The request port has no
backpressure. At one clock per memory cycle, 50 ns memories give
20 million lookups per second.

## Multiple-output engine

`multi_output_engine` puts an **IP address buffer** (`ip_addr_buffer`, a
16-entry FIFO with valid/ready) in front of the same pipeline. The pipeline
takes one address per cycle from it.

Every pipeline register carries a **dropped bit**: the "done" flag of the slot.
When stage k decides a lookup, three things happen:

* the result is registered on output port k (`res_valid[k-1]`, `res[k-1]`);
* the lookup is removed from the pipeline;
* register k+1 receives an empty slot.

A lookup decided at level k leaves **k+1 cycles** after it was accepted: one
cycle in the buffer and one per level. Lookups decided at different levels can
leave in the same cycle on different ports. Results can therefore come out of
order. Each request carries an 8-bit tag, which comes back with its result.

The buffer fills only if requests come in faster than one per cycle. The
request interface does not allow that, so at full rate `in_ready` stays high.
Averaged over time the engine still completes one lookup per cycle. What it
gains is lower latency for short prefixes and several results in one cycle.

## Promotion

Many level-4 groups hold just one used child, for example a lone /24 route
under a /19 node. Such a group costs a whole memory access to find one route.
The table builder can **promote** the child into its level-3 parent:

```
[31:30] = 11   [29:16] segment of the level-4 group   [15:5] child's next hop (11 bits)   [4:0] child's offset in the group
```

Plain entries never set both flags, so `11` marks a promoted entry. Stage 3
(`promotion_unit`) compares address bits 12..8 with the stored offset:

* **match**: the lookup is decided at level 3 with the promoted next hop. In
  the multiple-output engine it leaves one cycle earlier. In the single-output
  engine it saves the level-4 read, and the result still leaves at cycle 5.
* **mismatch**: the segment field is followed to level 4 like an index entry.
  That group's other entries are invalid, so the result is "no route". This
  is what keeps promotion exact.

A group can be promoted when it has exactly one valid entry, no index entry,
and a next hop below 2048 (the field is 11 bits wide). The hardware only reads
the entry. Choosing which groups to promote is the table builder's job.

## Loading a table

The forwarding table is built in software, normally by the router's network
processor. It is written entry by entry through the download port:

* `tbl_wr_level`: the bank, 1..5;
* `tbl_wr_addr`: the entry address;
* `tbl_wr_data`: the entry, in the low bits for banks narrower than 32 bits.

Writes go through a separate port of each bank, so loading does not stop
lookups. The top's port writes the same entry into both engines. The builder
follows this procedure:

1. For every entry of a group at level k (prefix p of length L_k), check
   whether any route longer than L_k lies under p. If one does, allocate the
   next free group at level k+1, build that group, and write an index entry.
2. Otherwise, write a valid entry with the longest route of length ≤ L_k that
   covers p, or an invalid entry if no route covers it.
3. At level 3, after building the child group, apply the promotion rule
   above.

`tb/rl_tb_pkg.sv` contains this builder (`fib_model::build`). It also has a
longest-prefix match computed straight from the route list, and a walk of the
built tables that mirrors the hardware.

Limits of the layout:

* at most 16,384 groups per level;
* 14-bit next hops at levels 1–4;
* 7-bit next hops at level 5;
* 11-bit promoted next hops.

## Files

| file | contents |
|---|---|
| `rtl/rl_pkg.sv` | constants, field split, entry and pipeline-slot structs |
| `rtl/level_mem.sv` | one bank: synchronous read port, write port |
| `rtl/promotion_unit.sv` | stage-3 promotion test |
| `rtl/lookup_stage.sv` | the decision logic of one level |
| `rtl/ip_addr_buffer.sv` | input FIFO of the multiple-output engine |
| `rtl/single_output_engine.sv` | five banks + five stages, result after stage 5 |
| `rtl/multi_output_engine.sv` | buffer + five banks + five stages, one result port per stage |
| `rtl/ip_lookup_top.sv` | both engines, shared download port |
| `tb/rl_tb_pkg.sv` | reference model: route generator, table builder, LPM, table walk |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_backbone_workload.sv` | backbone-size table (56,442 routes) in both engines |

Top-level ports (`ip_lookup_top`):

* `clk`, `rst_n` (asynchronous, active low);
* `tbl_wr_*`, the download port;
* `so_in_*` / `so_out_*` for the single-output engine;
* `mo_in_*` / `mo_res_*` for the multiple-output engine;
* `*_promo_hit` / `*_promo_miss` pulses;
* `mo_buf_level`, the buffer occupancy.

The parameters are `PROMOTION` (default 1) and `BUF_DEPTH` (default 16). The
widths of the table layout are constants in `rl_pkg`.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the full-size end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/rl_pkg.sv tb/rl_tb_pkg.sv rtl/level_mem.sv rtl/promotion_unit.sv \
  rtl/lookup_stage.sv rtl/ip_addr_buffer.sv rtl/single_output_engine.sv \
  rtl/multi_output_engine.sv rtl/ip_lookup_top.sv tb/tb_ip_lookup_top.sv \
  --top-module tb_ip_lookup_top -o sim
./obj_dir/sim
```

`tb_ip_lookup_top` runs the top at its default, full-size parameters, in
about two seconds. It does the following:

* builds a table of about 500 random routes (about 50,000 download writes);
* sends 6,000 addresses to both engines, one per cycle;
* checks every result against a longest-prefix match computed from the
  route list, including the fixed 5-cycle latency and the level+1-cycle
  latency on the right port;
* requires each mechanism to occur at least once: writes into all five banks,
  decisions at all five levels, no-route results, pass-through of decided
  lookups, promotion hits and misses, several results in one cycle, and
  back-to-back single-engine results.

`tb_backbone_workload` loads a table of backbone size into the full-size top.
It has 56,442 routes, the route count of the MAE-East table of March 2000. The
prefixes are random, with a mix of lengths typical of backbone tables. The
test checks that every level stays within 16,384 groups and prints the bank
space in use. It then checks 20,000 lookups in both engines. Its results:

* groups at levels 2–5: 212, 1,736, 13,508 and 613;
* 657,600 download writes;
* 1.19 MB of the 13.5 MB of banks in use.

The engine testbenches do the same as `tb_ip_lookup_top` for one engine
each. The unit testbenches check:

* `tb_level_mem`: a 64-entry bank, including read hold and read-during-write;
* `tb_ip_addr_buffer`: a 4-entry buffer against a queue model, including full;
* `tb_promotion_unit`: random entries and all 32 offsets;
* `tb_lookup_stage`: levels 2, 3 and 5 against a model of the entry rules.

Concurrent assertions guard some rules:

* the buffer never overflows;
* an output word that is not taken holds still;
* every lookup is decided by stage 5;
* a multiple-output result leaves on the port of its own level.

Run the simulations with `--assert` to check them.

## Departures and choices

What follows the original design: the five levels and the field split, the
16-bit entries with a 14-bit pointer, the 8-bit level-5 entries, the
valid/index/invalid search rule, pass-through of a found next hop in the
single-output engine, the dropped bit and draining in the multiple-output
engine, and the level-3 promotion format and its offset test.

Choices made here, where the original is silent or loose:

* **Memories.** The original uses external commodity DRAM or SRAM chips, one
  per level. Here each bank is an on-chip array with a one-cycle synchronous
  read and a separate write port.
* **Entry bits.** The two flag bits are ordered {valid, index} at the top of
  the entry. Level-5 entries are {valid, 7-bit next hop}. A promoted next hop
  is 11 bits, zero-extended.
* **Promotion mismatch** follows the segment to level 4. The original only
  describes the match case.
* **Both engines decode promoted entries**, so they can share one table. The
  original describes the promotion test in the multiple-output engine.
* **Reads of later banks are skipped** once a lookup is decided.
* **Interfaces:**
  * the 8-bit request tag;
  * one registered result port per stage in the multiple-output engine;
  * buffer depth 16 with valid/ready;
  * the shared download port;
  * an asynchronous reset that empties every pipeline slot.
* **The next-hop table is not built.** The engines output the 14-bit
  next-hop index that would address it. The original gives no format for the
  table.
* **Not built:** the network processor, the switching fabric and the line
  interfaces around the engines.

## How far to trust it

Functional correctness is established by simulation. Results are compared
with an independent longest-prefix match computed from the route list, over
random tables that exercise every level and every entry kind. The tables are
generated, not real backbone tables, and no timing or area figures for a real
memory technology are given here.

Capacity has been checked only for a synthetic table of backbone size (see
`tb_backbone_workload`), not for a specific real table. For a
56,000-route table the limit that matters is the 16,384 groups per level.
At level 4 that means at most 16,384 distinct /19 regions may contain routes
longer than /19. A real table must be checked against this, and against the
7-bit level-5 and 11-bit promoted next-hop fields, when it is built.
