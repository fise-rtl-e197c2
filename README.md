# FISE forwarding table in SystemVerilog

Policy routing decides the next hop from both the destination and the source
address of a packet. The usual way to do this in a router is to concatenate a
destination prefix and a source prefix into one TCAM entry, as an access
control list would. With N destination prefixes and M source prefixes this can
take up to N x M TCAM entries. TCAM is small, expensive and power-hungry, so
such tables quickly outgrow it.

FISE (FIB Structure for Enterprise networks, published by Yang et al.) keeps
only the prefixes in TCAM: one table of destination prefixes and one of source
prefixes, N + M entries in all. The N x M product moves into SRAM as a
two-dimensional array of 8-bit nexthop indexes, the **TD-table**. A lookup
matches the destination and the source address in the two TCAM tables in
parallel. It turns the two matched entries into a row number and a column
number. It then reads the TD-cell at (row, column) and maps the 8-bit index to
the nexthop information through a small **mapping table**. The pipeline takes
one packet per clock, like a conventional forwarding table.

This repository holds synthesizable RTL for that lookup engine. It includes the
refinements of the scalable variant of the design:

- a default nexthop kept in each destination's index record;
- an indicator bit, so that only destinations with source-specific rules use a
  TD-table row;
- an optional deduplicated TD-table, split into a catalog and a dictionary.

It also has self-checking testbenches for every block.

## The matching rule, and what the tables must contain

The forwarding semantics are defined on a list of rules
`(destination prefix, source prefix, nexthop)`:

1. The destination address selects the **longest matching destination
   prefix** among all rules.
2. Among the rules with exactly that destination prefix, the source address
   selects the **longest matching source prefix**.
3. That rule's nexthop is the answer.

The hardware does not evaluate this rule. It does two independent
longest-prefix matches and one table read. For that read to give the right
answer, the control plane has to fill the tables accordingly. This is the part
of the design that is easiest to get wrong, so it is spelled out here.

- **Destination TCAM table.** Holds every destination prefix that appears in a
  rule. Longer prefixes go at lower addresses, because the TCAM reports the
  lowest matching address. The SRAM word at the same address is the
  **destination index** `dst_index_t`: a 32-bit row number, the indicator bit
  and an 8-bit default nexthop index.
- **Source TCAM table.** Holds every source prefix that appears in a rule,
  except the full wildcard. Longer prefixes go first. The SRAM word at the same
  address is the **source index** `src_index_t`, a 32-bit column number.
- **Default nexthop.** For each destination prefix, the nexthop of its rule
  with the wildcard source goes into the destination index as `dflt`. Changing
  a destination's default route is then a single SRAM write. No TD-cell is
  touched.
- **Indicator bit and rows.** Only a destination that has at least one
  source-specific rule gets a TD-table row and has its indicator bit set. The
  others resolve to their default index without reading the TD-table.
- **TD-cells, saturated.** The cell in destination D's row and source prefix
  S's column holds the nexthop of D's rule with the **longest source prefix
  that covers S** (S itself or a shorter prefix of it). The wildcard source is
  excluded. The cell is empty if no such rule exists.

  Saturation matters because the source TCAM table is shared by all
  destinations. A packet can match a source prefix that D has no rule for. For
  example, it can match `111*` when D only has a rule for `11**`. The cell must
  then already hold the answer of the `11**` rule.
- **Empty cells.** The value 0 marks an empty cell, so nexthop index 0 is
  never stored in the TD-table. Usable nexthop indexes are 1 to 255.

A lookup then resolves as follows. `lookup_result_t.kind` reports which case
applied:

| case | nexthop index used | `kind` |
|---|---|---|
| indicator bit clear | destination's default | `RES_NO_ROW` |
| no source prefix matched | destination's default | `RES_NO_SRC_MATCH` |
| TD-cell is 0 | destination's default | `RES_EMPTY_CELL` |
| otherwise | TD-cell value | `RES_CELL` |

If no destination prefix matches, the result carries `dst_hit = 0`. Normally
the destination table holds a default prefix (`*`), so this does not happen.

### Worked example

The testbenches use a 20-rule table with 4-bit addresses:

- 6 destination prefixes: `*`, `011*`, `110*`, `101*`, `11*`, `10*`;
- 5 source prefixes once the wildcard is removed: `111*`, `101*`, `100*`,
  `11*`, `01*`;
- nexthops 1.0.0.0 to 1.0.0.3, stored as indexes 1 to 4.

Destination `011*` has only a wildcard-source rule. It gets no row, and every
packet to it resolves to its default. Take destination `101*` with rules for
sources `*`, `101*`, `11*` and `01*`:

- Its cell for `111*` is filled with the nexthop of its `11*` rule (saturation).
- Its cell for `100*` stays empty, because no source prefix of its rules covers
  `100*`.
- A packet from `1000` therefore gets the destination's default.

## Lookup pipeline

```
 TCAM clock                 |                  SRAM clock
                            |
 dst addr -> [dst TCAM] --+ |   +-> [dst index SRAM] --+
                          +-|-> FIFO                   +-> [TD-table] -> resolve -> [mapping] -> output FIFO
 src addr -> [src TCAM] --+ |   +-> [src index SRAM] --+   (or catalog ->                SRAM
                            |                               dictionary)
```

| stage | clock | module | what happens |
|---|---|---|---|
| T | TCAM | `fise_tcam` x2 | both tables match in parallel; the matched addresses are registered |
| FIFO | TCAM -> SRAM | `fise_async_fifo` | Gray-pointer dual-clock FIFO carries `{tag, dst_hit, dst_addr, src_hit, src_addr}` |
| S1 | SRAM | `fise_dp_sram` x2 | destination index and source index are read |
| S2 | SRAM | `fise_td_table` or `fise_dedup_table` | TD-cell read (two cycles when deduplicated) |
| resolve | SRAM | `fise_lookup_pipeline` | the rule in the table above picks the nexthop index |
| S3 | SRAM | `fise_dp_sram` | mapping table gives the 32-bit nexthop information |
| out | SRAM | `fise_sync_fifo` | results wait, in order, for the switching stage |

A lookup therefore costs one TCAM cycle, the FIFO crossing (two to three SRAM
clocks), and three SRAM cycles (four when deduplicated). With both clocks tied
together, the measured request-to-result latency is 8 cycles, and 256
back-to-back requests give 256 consecutive results.

The FIFO exists because the TCAM and the SRAM run at different clock rates:
SRAM is usually the faster of the two. The two clocks of `fise_top` may be
unrelated, or the same clock.

**Flow control.** The SRAM pipeline never stalls internally. It takes a packet
from the FIFO only when the output FIFO has room for that packet plus every
packet already in the pipeline. When the switching side stops taking results,
the output FIFO fills and the SRAM side stops popping. The FIFO then fills, and
finally `in_ready` drops on the TCAM side.

## Updates

The tables are written through two plain write ports. A control-plane
processor would drive them. The update protocol towards that processor is not
part of this RTL.

- **TCAM writes** (`tcam_upd_*`, TCAM clock) write one entry per cycle: value,
  care mask and valid bit. While a TCAM write is present, `in_ready` is low.
  The lookup pauses for that cycle, as TCAM updates interrupt lookups.
- **SRAM writes** (`sram_upd_valid`, `sram_upd`, SRAM clock) write one word per
  cycle into the table chosen by `sram_upd.target`:

| target | `addr0` | `addr1` | `data` |
|---|---|---|---|
| `UPD_DST_INDEX` | destination TCAM address | - | `dst_index_t` (41 bits) |
| `UPD_SRC_INDEX` | source TCAM address | - | `src_index_t` (32 bits) |
| `UPD_TD_CELL` | TD row (or dictionary sub-row) | column (or offset in the sub-row) | 8-bit index |
| `UPD_CATALOG` | TD row | chunk (column / `BLOCK_W`) | 32-bit sub-row number |
| `UPD_MAPPING` | nexthop index | - | 32-bit nexthop information |

Every SRAM is dual-ported, so SRAM writes never stop lookups. A lookup that
reads a word in the same cycle as it is written gets the new word. The
`sram_collision` output pulses when that happens.

A lookup in flight during a multi-word update may see some words old and some
new. For the plain TD-table, each cell is a single word, so every answer is
either the old or the new one. With the deduplicated table, write new sub-rows
into unused dictionary rows first, then switch the catalog cells. Do not
overwrite a sub-row that catalog cells still point to. The end-to-end
testbench updates this way.

To keep rewrites few when a rule changes, rewrite only the cells whose
saturated value changes. For a change of D's rule for source S, those are the
cells of S and of the longer source prefixes below S that no other rule of D
covers more specifically. That computation is control-plane software and is
not in this RTL.

## Deduplicated TD-table (`DEDUP = 1`)

Many rows of a sparse TD-table repeat the same runs of cells. With `DEDUP = 1`
each row is cut into sub-rows of `BLOCK_W` cells:

- the **dictionary** stores each distinct sub-row once, as 8-bit cells;
- the **catalog** stores, for every (row, chunk), the 32-bit number of the
  matching dictionary sub-row.

Cell (n, m) is read in two dependent SRAM reads:

1. the catalog at (n, m / `BLOCK_W`) gives the sub-row number r;
2. the dictionary at (r, m % `BLOCK_W`) gives the nexthop index.

This costs one extra cycle of latency but no throughput. Finding the
duplicates (fingerprinting, filtering, sorting) is control-plane work. The
hardware only reads the result. `BLOCK_W` defaults to 32. Sparser tables favour
longer blocks; in published measurements the best length lay at about 30 to 60
cells. A power of two keeps the division a bit-select.

## Parameters and sizes

| parameter | default | meaning | origin |
|---|---|---|---|
| `KEY_W` | 128 | address width (IPv6) | own choice |
| `DST_DEPTH`, `SRC_DEPTH` | 1024 | TCAM entries per table | own choice, for fewer than 1,000 prefixes per dimension |
| `TD_ROWS`, `TD_COLS` | 1024 | TD-table size: 8 Mbit of 8-bit cells | own choice |
| `DEDUP` | 0 | use catalog + dictionary | own choice of default |
| `BLOCK_W` | 32 | cells per sub-row | own choice |
| `DICT_ROWS` | 4096 | dictionary sub-rows | own choice |
| `MAP_DEPTH` | 256 | mapping entries = 8-bit nexthop index | design |
| `FIFO_DEPTH`, `OUT_DEPTH` | 16 | FIFO depths | own choice |

The design itself fixes these sizes: the 8-bit TD-cell and nexthop index, the
32-bit row and column numbers, the 1-bit indicator and 8-bit default index in
the destination index, and the 32-bit catalog cell. Only the low
log2(`TD_ROWS`) and log2(`TD_COLS`) bits of the row and column numbers address
the TD-table.

What fits at the defaults:

- **Fits:** tables with fewer than 1,000 destination and 1,000 source prefixes,
  and hence up to about a million two-dimensional rules. Policy tables of
  186,000 to 366,000 rules and load-balancing tables of about 7,400 rules are
  of this kind.
- **Does not fit:** a full policy mesh over about 7,000 prefixes in each
  dimension. That needs 49 M cells, about 8192 per dimension.
- **Throughput:** one lookup per clock, i.e. 100 M lookups/s at an
  assumed 100 MHz clock. Four
  1 GbE ports of 64-byte frames need 5.95 M/s.
- **Update rate:** one SRAM write per clock, i.e. 100 M writes/s at 100 MHz.
  This is well above 50,000 updates/s even when each update rewrites a full
  1,024-cell row.

The TCAM is written here as a synthesizable array of value/mask registers with
a priority encoder. This models the behaviour of the external TCAM devices a
line card would use. Synthesizing a 1024 x 128-bit TCAM into logic is
possible but large.

## Files

| file | content |
|---|---|
| `rtl/fise_pkg.sv` | widths, index records, update command, result record |
| `rtl/fise_top.sv` | the whole lookup engine |
| `rtl/fise_tcam.sv` | ternary CAM (destination and source tables) |
| `rtl/fise_async_fifo.sv` | TCAM-to-SRAM dual-clock FIFO |
| `rtl/fise_dp_sram.sv` | dual-port SRAM with read-during-write bypass |
| `rtl/fise_td_table.sv` | plain TD-table |
| `rtl/fise_dedup_table.sv` | catalog + dictionary TD-table |
| `rtl/fise_lookup_pipeline.sv` | SRAM-side pipeline and resolution |
| `rtl/fise_sync_fifo.sv` | output FIFO |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. A watchdog fails the test if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/fise_pkg.sv tb/tb_fise_top.sv \
          --top-module tb_fise_top -o sim && ./obj_dir/sim
```

Replace `tb_fise_top` with any other testbench name. The `-Irtl` option lets
Verilator find the modules by file name.

- `tb_fise_top` runs two reduced-size copies side by side, a plain and a
  deduplicated one (8-bit keys, 16-entry tables, 16 x 16 TD-table), with
  different TCAM and SRAM clocks. The testbench acts as the control plane. It
  builds all tables from the 20-rule example and looks up every destination x
  source pair. It checks each nexthop against the matching rule evaluated
  directly on the rule list. It then runs traffic while it rewrites TCAM
  entries, TD-cells and mapping entries, and while the output is back-pressured.
  Finally it changes four rules while traffic flows. The test fails unless every
  resolution case, the TCAM-update pause, FIFO back-pressure at both ends, a
  read-during-write collision, an SRAM update with lookups in flight, and
  sub-row merging have each happened at least once.
- `tb_fise_top_full` runs the top at its default sizes with no parameter
  changed. It loads the same example (the 4-bit prefixes in the top bits of
  128-bit addresses), checks all 256 pairs, the 8-cycle latency and one result
  per clock. It finishes in well under a second.
- `tb_fise_workload` runs a synthetic policy workload at the default table
  sizes, on a plain and a deduplicated copy. It has 40 destination and 40
  source networks with about 200 IPv4 prefixes per side, some of them nested.
  Policies cover 3 % and then 10 % of the network pairs. The test sends 8,000
  back-to-back lookups per fill ratio and checks each one against the policy
  list. It then changes policies at 50,000 updates per second (one every 2,000
  cycles at 100 MHz) while lookups continue. Only the TD-cells whose saturated
  value changes are rewritten. It checks that SRAM updates never hold up a
  lookup, and that each update fits its budget; the slowest takes about 240
  cycles. It reports the deduplication ratio with 32-cell sub-rows: about 3.5
  at 3 % fill and 3.0 at 10 %. It runs in about 30 seconds.
- The block testbenches check their module against a software model: every key
  of an 8-bit TCAM, FIFO order and flags under random traffic and crossing
  clocks, SRAM bypass, TD-table addressing, the two-level deduplicated read,
  and the pipeline's resolution cases, latency and throughput.

## Departures and limits

- **Not in this RTL:** the control-plane algorithms. These are: building and
  saturating the TD-table, compressing the TCAM tables, removing duplicate
  rows, the incremental update of only the affected cells, and finding
  duplicate sub-rows. They produce table contents. The testbenches contain
  simple reference versions of building, saturating and deduplicating.
- **Not in this RTL:** the line card's packet interface, switching stage, clock
  source and CPU. The top's request and result ports stand where they would
  connect.
- **Empty-cell code 0.** The value 0 is reserved for empty TD-cells, so stored
  nexthop indexes run from 1 to 255. A table built without empty cells (no
  default isolation) could use 0 as well. This RTL does not support that.
- **Resolution in logic.** The published implementation leaves the checks of
  the indicator bit, the source match and the empty cell to the line-card
  processor. Here they are a multiplexer in the SRAM pipeline. It adds no
  memory access and no cycle.
- **Choices of this implementation:** the update command format, the packet
  tag, the result record, the FIFO depths, the 128-bit key and the reset
  behaviour. Reset is asynchronous. It clears the TCAM valid bits, the FIFO
  pointers and the pipeline valid bits. SRAM contents are not reset.
