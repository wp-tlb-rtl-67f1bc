# WP-TLB: way-predicted L2 reads driven by the TLB

A set-associative L2 normally reads the tags and data of every way of a set in
parallel and then throws all but one away. In an 8-way 512 KB L2 that costs
about six times the energy of reading a single way. This design removes most of
that waste. It records, next to each TLB entry, the L2 way that holds each line
of that page. When an L1 misses, the L2 already knows which way to open and
reads only that one.

The record is kept exact. If it says "way 5", the line is either in way 5 or
nowhere in the L2. So a predicted access never has to fall back to a second,
all-way probe. A wrong prediction is simply an L2 miss, detected after a
single-way read that is also faster (4 cycles instead of 6).

The RTL is a complete two-level cache system:
- an instruction side and a data side, each a WP-TLB plus a blocking 8 KB 2-way
  L1;
- a round-robin arbiter;
- a unified 512 KB 8-way L2 with a line-wide port to main memory.

Page walks and main memory sit outside it, behind ports.

```
            CPU fetch                          CPU load/store
                |                                    |
   +------------v-------------+        +-------------v------------+
   | l1_side (I)              |        | l1_side (D)              |
   |  wp_tlb    | l1_cache    |        |  wp_tlb    | l1_cache    |
   |   tlb  (+TLB buffer)     |        |   tlb  (+TLB buffer)     |
   |   way_buffer -> way_table|        |   way_buffer -> way_table|
   |   wt_field_mux           |        |   wt_field_mux           |
   +------------+-------------+        +-------------+------------+
      page walk | L2 request + {wt_hit, way}         | page walk
                +---------------> l2_arbiter <-------+
                                      |
                         +------------v-------------+
                         | l2_cache                 |
                         |  l2_decoder -> way enables, latency
                         |  l2_way x 8 (tag + data) |
                         +------------+-------------+
                                      | 1024-bit line port
                                 main memory
```

## The way table

There is one way-table entry for each TLB entry. The way table is indexed by
the number `m` of the TLB entry that hit, so it needs no tag of its own.

A 4 KB page holds 32 L2 lines of 128 bytes. An entry therefore has 32
*fields*, one per line of the page. Each field is a valid bit plus a 3-bit way
number, so an entry is 128 bits and the table is 2 KB for 128 entries.

The field is chosen by the *field index*, address bits `[11:7]`. These are the
page-offset bits above the L2 line offset. Because they are page-offset bits,
they are the same in the virtual and the physical address. The field can
therefore be picked while the TLB is still translating.

Three small structures cut the energy of the lookup itself:

- **TLB buffer** (`tlb`): holds the last entry that hit. When the next access
  is to the same page, the CAM is not searched.
- **Way buffer** (`way_buffer`): a one-entry copy of the last way-table entry
  read, tagged with its TLB entry number. When the same TLB entry hits again,
  the way table is not read. The buffer snoops every field write and every
  entry clear, so it can never hand out a stale way.
- **Field multiplexer** (`wt_field_mux`): selects one field out of the 32.

All of this happens in the same cycle as the L1 lookup (`wp_tlb`). The L1 set
index (bits `[11:5]`) also lies inside the page offset, and the L1 tag is the
physical page number. So the TLB, the way table and the L1 are all read
together. An L1 hit is answered at the clock edge that accepts the request.

## Why one way is enough

The single-way probe is only safe if a valid field never points at a way that
holds a *different* line while the real line sits in another way. Four rules
keep that true:

| Event | Way-table action |
|---|---|
| Line brought into the L2 (L2 miss, with or without prediction) | write the way it was placed in |
| Way table miss, L2 hit (normal access found the line) | write the way it was found in |
| Wrong prediction (single-way read missed) | handled as a miss: the line is fetched and its new way written |
| L2 line evicted | nothing |
| TLB entry refilled with another page | clear all 32 valid bits of that entry |

In `l1_side` this becomes a single condition: the field is written after every
L2 access except a correct prediction (`rec_en = !(wt_hit && l2_hit)`). The
L2 reports the way that now holds the line (`rsp_way`) with every response.

The eviction row is the subtle one. When line A is evicted from way 5 to make
room for line B, the field of A still says "way 5". If A is asked for later,
way 5 is read and its tag (B's) does not match. That is exactly the right
answer: A is not in the cache. A is then fetched, placed somewhere, and its
field is rewritten.

A stale field can never make a wrong line look like a hit. The tag is always
compared, and only one line of the whole system maps to each field.

Clearing on TLB refill matters too. While a page is out of the TLB, its lines
can move without any field being updated. Its old record must not come back
with it.

### What the guarantee assumes

Each physical L2 line must have exactly one field. That fails when two virtual
pages map the same physical page (synonyms). It also fails when a page is
present in both the instruction TLB and the data TLB, for example
self-modifying code or shared code/data pages. The design assumes neither
happens. Supporting them would need a way-table update across both TLBs. The
end-to-end testbench keeps instruction and data pages physically disjoint.

## Access sequence and timing

Each side (`l1_side`) is a blocking controller with five states: `IDLE`, `LOOK`,
`WALK`, `L2`, `L2W`.

1. **Accept** (`IDLE`, `req_valid && req_ready`). The WP-TLB and L1 are looked
   up combinationally.
   - **TLB hit, L1 hit:** the load data is registered at this edge, and
     `rsp_valid` is high in the next cycle.
   - **TLB miss:** the side raises `walk_valid` with the VPN and waits in
     `WALK`. The refill replaces the FIFO victim entry and clears its way-table
     entry. Then the lookup is retried in `LOOK`.
   - **L1 miss, or a store:** the side goes to `L2`.
2. **L2 request** (`L2`). The request carries the physical address, the op and
   `{wt_hit, pred_way}`. It waits for the arbiter's `ready`.
3. **L2 access** (`l2_cache`). The `l2_decoder` turns the prediction into way
   enables and a latency:
   - Predicted access: one way enabled, `LAT_WAY` = 4 cycles.
   - Normal access: all 8 ways, `LAT_SET` = 6 cycles.

   The arrays are read in the first cycle. The request then occupies the L2 for
   `lat` cycles, and a hit's response is high in the cycle after. So a hit
   answers at the (lat+1)-th edge after acceptance.
4. **L2 miss.** The victim is the first invalid way of the set, otherwise the
   way under the set's FIFO pointer. A dirty victim is first read and written
   to memory as a full 1024-bit line. Then the line is fetched, filled, and
   returned with `rsp_hit = 0` and the new way.
5. **Response** (`L2W`). A load refills the L1 with the 256-bit quarter-line
   and answers the CPU. A store has already updated the L1 if the L1 hit. The
   way-table field is recorded in the same cycle when the rule above asks for
   it.

Stores are write-through from the data L1. The L1 is updated on a hit and not
allocated on a miss. Every store goes to the L2, using the same prediction as a
load. The L2 is write-back and write-allocate.

## The L2 cache

`l2_cache` holds 512 sets × 8 ways × 128 bytes. Each way is an `l2_way`: a tag
SRAM and a data SRAM with synchronous read and a read enable. Only the enabled
ways are read, and `act_ways` / `act_single` show which ones were opened for the
access that starts in that cycle. Valid bits, dirty bits and FIFO pointers
live in flops.

A read returns the 256-bit quarter-line selected by address bits `[6:5]`,
matching the 256 bits read out per access. A store merges its bytes into the
line by shifting the word and its byte enables to the line offset.

## Top-level interface (`wp_cache_system`)

| Port group | Meaning |
|---|---|
| `i_req_*`, `i_rsp_*` | instruction fetch: valid/ready request with 32-bit VA, one-cycle response with the word |
| `d_req_*`, `d_rsp_*` | load/store: VA, `we`, 32-bit data, 4-bit byte enable; the response carries load data (or just acknowledges a store) |
| `i_walk_*`, `d_walk_*` | page walk: `walk_valid` + VPN out, `walk_rsp_valid` + PPN back |
| `mem_*` | line-wide memory: valid/ready request, `mem_we` for a write-back (no answer), one-cycle `mem_rsp_valid` with the 1024-bit line for a read |
| `i_st[7:0]`, `d_st[7:0]` | one-cycle event pulses: bit 0 lookup, 1 L1 miss, 2 TLB miss, 3 TLB CAM search, 4 way-table read, 5 way-buffer hit, 6 way-table write, 7 wrong prediction |
| `l2_act_ways`, `l2_act_single` | ways activated by the L2 access that starts this cycle; `single` for a predicted one |

The status pulses and activation outputs make it possible to count energy
events outside the design without probing it.

Parameters of the top (defaults in `wp_pkg`):
- `TLB_ENTRIES` = 128 (also the way-table size);
- `L2_WAYS` = 8;
- `L2_SETS` = 512.

The L1 geometry (128 sets, 2 ways, 32-byte lines) and the 4 KB page are fixed in
`wp_pkg`. The latencies `LAT_SET` = 6 and `LAT_WAY` = 4 are parameters of
`l2_cache`.

## Verification

Every module has a self-checking testbench in `tb/` with a reference model.
Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_wp_cache_system` runs the top at its default size. It drives random
instruction fetches and loads/stores over working sets larger than the L1 and
the L2. It answers page walks from a fixed page mapping and models main memory
as a sparse array. It checks:

- every load and fetch against a flat memory model;
- that a predicted access never reads more than one way;
- that a line is never fetched from memory while any way of its set holds
  it, so a wrong prediction is always a true miss;
- the latencies of predicted and normal hits (5 and 7 edges);
- that the number of way-table writes equals L2 accesses minus correct
  predictions.

It also counts each mechanism: TLB misses, buffer hits, predicted and normal
hits and misses, wrong predictions, write-backs and arbitration conflicts.

At the end it estimates the L2 read energy, using per-access energies for this
configuration:

| Event | Energy |
|---|---|
| all-way read | 0.711 nJ |
| single-way read | 0.126 nJ |
| way-table read | 0.004 nJ |
| way-table write | 0.001 nJ |
| buffer access | 0.0008 nJ |

On its synthetic stream it shows about 37 % saving. Real programs with more
locality let the way table hit more often.

`tb_wp_cache_sizes` runs the same kind of traffic (about 8 000 accesses per
configuration) through seven other configurations side by side, each in its own
copy of the `tb/wp_sys_run.sv` harness with the same checks:

- 512 KB 16-way L2 (256 sets);
- 256 KB 8-way L2 (256 sets);
- 256 KB 16-way L2 (128 sets);
- 64-, 256-, 512- and 1024-entry way tables with the 512 KB 8-way L2.

On this traffic, a 64-entry way table predicts only about a fifth of the L2
accesses. From 256 entries up, about two thirds are predicted, because the whole
working set stays mapped. With 1.301 / 0.113 nJ per all-way / single-way read,
the 16-way L2 saves more per predicted access than the 8-way one.

To simulate any testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/wp_pkg.sv rtl/*.sv tb/tb_wp_cache_system.sv \
    --top-module tb_wp_cache_system
./obj_dir/Vtb_wp_cache_system
```

(List `wp_pkg.sv` first; listing it twice is harmless, or leave it out of the
glob.) The full-size system test takes a few seconds. For `tb_wp_cache_sizes`,
add `tb/wp_sys_run.sv` to the file list; it runs in well under a minute.

## Choices made here, and departures

- **L2 latencies.** Both 4 and 6 cycles are used. A 5-cycle figure for an
  all-way access also appears in the original analysis; the 6/4 pair is taken
  because it gives both cases.
- **Replacement.**
  - TLB: FIFO.
  - L1: 1-bit LRU.
  - L2: first invalid way, then FIFO per set.

  The original does not specify any of these.
- **Write policy.** The L1D is write-through and no-write-allocate. The L2 is
  write-back and write-allocate. Stores use the way prediction like loads. The
  original describes only reads.
- **Synonyms and shared I/D pages** are excluded (see above) rather than
  handled.
- **Way buffer coherence by snooping** is this design's way of keeping the
  one-entry buffer correct.
- **Interfaces.** The page-walk and memory interfaces, the valid/ready
  handshakes and the round-robin arbitration are this design's own.
- **Not built:**
  - the processor and page-table walker;
  - main memory;
  - the future-work ideas of pre-waking a drowsy L2 way from the prediction and
    of keeping the write position in a queue for non-blocking L1s.
- **Other evaluated sizes** are reached through the top's parameters and are
  simulated by `tb_wp_cache_sizes`: 256 KB L2, 16-way L2, and way tables of 64
  to 1024 entries. The alternative 16 KB 4-way L1 with 64-byte lines is not
  supported, because the L1 geometry is fixed.
