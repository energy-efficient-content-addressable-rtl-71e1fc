# Low-power ternary CAM for IPv6 longest-prefix lookup (256 x 128)

An IPv6 router looks up a 128-bit destination address in a table of routing
prefixes and has to find the longest prefix that matches. A ternary CAM
(TCAM) does this in one cycle. Every stored bit is 0, 1 or X (don't-care),
every word is compared with the search key in parallel, and a priority
encoder picks the winning word. The cost is power. Every search precharges
and evaluates up to 32,768 compare cells and drives 128 long search-lines.

This RTL models a 256-word x 128-bit TCAM built around three ideas that cut
that switching activity without slowing the search:

1. **AND-type butterfly match-lines (Type III).** Each word is a chain of
   short dynamic segments. A segment only evaluates if the segments before
   it matched, so a miss stops all work further down the chain. The chain is
   split into two sides that gate each other. A miss on one side also stops
   the other side one stage later.
2. **Don't-care based power gating.** A routing prefix puts all its X bits at
   the low-order end of the address. If the top cell of a segment is X, the
   whole segment is X and always matches. Its precharge is switched off and
   its output simply reads "match".
3. **Don't-care based hierarchical search-lines.** The 256 words are grouped
   into 5 blocks. A block's local search-line for a bit column is driven
   only if some word in that block cares about that bit. The enables are
   flip-flops updated when a word is written, so they add nothing to the
   search path.

The RTL is a logic-level model. It does what the array does, cycle for
cycle, and it exposes counters for the switching events the three
techniques save. It does not model transistor-level behaviour: keepers,
charge sharing, noise and delay.

## Word organisation and the butterfly chain

A word has 128 cells. Address bit 127 is the first bit of the IPv6 address.

| side | bits | segments (low to high) |
|------|------|------------------------|
| 0 (left sub-array, where prefix X bits gather) | 63..0 | 4-cell segment, then ten 6-cell segments |
| 1 (right sub-array, start of the prefix) | 127..64 | 4-cell segment, then ten 6-cell segments |

Each side's 11 segments form 6 **stages**. Stage 1 is the 4-cell segment.
Stages 2 to 6 hold two 6-cell segments each (4 + 5 x 12 = 64 bits). A stage
is *ok* when all of its segments output match. The Type III enables are:

```
stage 1 of side s        : word valid
stage 2 of side s        : ok(s,1) & ok(other,1)
stage k of side s, k >= 3: ok(s,k-1) & ok(other,k-2)
word match               : valid & ok(0,6) & ok(1,6)
```

So a miss in stage k of one side stops that side at stage k+1, and stops the
other side at stage k+2. Across both sides the critical path is 6 segment
stages plus the final AND, instead of 11 segments in series.

A segment (`cam_segment`) models a pseudo-footless clock-and-data precharge
dynamic (PF-CDPD) stage:

* `gated = Qd[top cell]`: precharge off.
* `discharged = !gated & en & (all cells match)`: the floating node falls.
  This is the event that costs precharge energy in the next cycle.
* `match = gated | discharged`: the output that enables the next stage.

**Why each chain runs from its low-order end.** A gated segment reports
"match" whatever its enable. If a gated segment came after a missing one,
it would hide the miss. Routing prefixes have their X cells at the low end.
Starting each side's chain at its low end therefore places the all-X, gated
segments first, where they cannot hide anything.

**Limitation that follows:** power gating assumes prefix-shaped entries.
A word whose top cell of a segment is X while a lower cell of that segment
is cared is matched as if the whole segment were X. A routing table written
as prefixes never contains such a word. `tb_tcam_word` checks that for
prefix and fully specified entries the match equals the plain ternary rule.
`tcam_top` asserts this shape on every write (`a_prefix_shape`, using
`tcam_pkg::gating_safe`).

## Cell

`tcam_cell` stores Q and Qd. Qd = 1 means X. The cell conducts (matches)
when `Qd | (Q == SL)`. Write uses the word-line and bit-lines. Search uses
separate search-lines. Reset leaves every cell X and every word invalid.

## Hierarchical search-lines

`dc_hsl` holds one enable flip-flop per block and per bit column: 5 x 128.
The blocks are words 0-63, 64-127, 128-191, 192-223 and 224-255. On a write
to block b, the enables of block b are recomputed from two inputs: the
don't-care bits of the block's other words, and the don't-care bits being
written. This lets an overwrite that removes the last cared cell of a column
switch that column off. The local search-lines are `gsl & enable`, so a
disabled line stays low.

## Table layout and priority

Prefixes are stored sorted by length, with the shortest at address 0. The
small blocks at the end of the array hold the longest prefixes. The priority
encoder therefore lets the **highest** matching address win, which yields
the longest-prefix match. The opposite order (lowest address wins, longest
prefixes stored first) is available with `priority_encoder #(.HIGH_WINS(0))`.
It is not used by the top.

## Top-level interface (`tcam_top`)

One command per clock cycle. Every command is answered at the next rising
edge (`rsp_valid`, `rsp_op`). Searches can be issued every cycle.

| op | inputs | response |
|----|--------|----------|
| `OP_WRITE` | `addr`, `data` (Q), `dc` (1 = X) | the word is valid from the next cycle on, and a search in the next cycle sees it |
| `OP_READ`  | `addr` | `rd_q`, `rd_dc`, `rd_valid` |
| `OP_SEARCH`| `data` = key | `hit`, `multi`, `match_addr`, plus `stat_discharged`, `stat_gated`, `stat_lsl_active` |

The three `stat_*` outputs count, for that search, the segments that
discharged, the segments whose precharge was gated, and the local
search-line columns that were driven. They are meant for activity-based
power estimates. There is no delete command: an entry can be replaced by
another entry, and reset clears the whole table. An assertion checks
that read and write addresses are in range.

## Files

| file | content |
|------|---------|
| `rtl/tcam_pkg.sv` | sizes, segment and block geometry, command enum |
| `rtl/tcam_cell.sv` | ternary cell |
| `rtl/cam_segment.sv` | PF-CDPD segment with power gating |
| `rtl/tcam_word.sv` | 128-bit word, Type III butterfly chain |
| `rtl/dc_hsl.sv` | don't-care based hierarchical search-lines |
| `rtl/addr_decoder.sv` | word-line decoder |
| `rtl/priority_encoder.sv` | match-line priority encoder |
| `rtl/tcam_top.sv` | the 256 x 128 TCAM |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_dc_density` |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog counts a failure if the testbench runs too long. Example with
plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_tcam_top rtl/tcam_pkg.sv tb/tb_tcam_top.sv
./obj_dir/Vtb_tcam_top
```

* `tb_tcam_top` runs the full 256 x 128 array with no parameter changes.
  It builds a routing table of 256 prefixes whose lengths follow a measured
  IPv6 distribution (about 86 % /32, then /48, /35, /24 and /28, all between
  /16 and /48, some nested). It reads every entry back, then runs
  back-to-back searches. Each search is checked against a reference table
  search and against a model of the butterfly chain for the activity counts.
  The test also overwrites entries, searches in the cycle right after a
  write, and replaces the long prefixes of the last block with /16 prefixes. It fails if any mechanism never occurred:
  hit, miss, multiple match, power gating, cross-side stop, disabled
  search-line column, column switched off by a write, or write-then-search.
  Building it takes about 1.5 minutes; the run itself takes under a second.
* `tb_dc_density` fills the array at 0 %, 25 %, 50 % and 75 % don't-care
  cells, using /128, /96, /64 and /32 prefixes. It checks the results and
  the exact gated-segment and search-line counts. It prints the activity per
  density:

  | X cells | gated segments | driven LSL columns | discharged segments / search |
  |---------|----------------|--------------------|------------------------------|
  | 0 %  | 0 / 5632    | 640 / 640 | ~43 |
  | 25 % | 1280 / 5632 | 480 / 640 | ~25 |
  | 50 % | 2816 / 5632 | 320 / 640 | ~22 |
  | 75 % | 4096 / 5632 | 160 / 640 | ~71 |

  The discharge figure depends on the random keys. At 75 % every word's
  first cared segment sits late in the chain, behind gated segments. That
  segment is therefore enabled in every search.

## Where this model departs from the circuit, and choices made here

* **Not modelled:** the XOR-based conditional keeper (a noise and speed
  device with no logic effect), precharge and power-gating transistors
  (modelled only as the `gated` behaviour), sense amplifiers, search-line
  buffer sizing, and all timing and energy figures (0.71 ns search,
  500 MHz, about 0.26 fJ/bit/search at 0.13 µm).
* **The Type III connection** is reconstructed from its stated property.
  That property is: a miss in one stage certainly disables the stage after
  the following one. The stage-2 rule is chosen so that a word survives
  into stage 2 only if the 8 cells of both stage-1 segments match.
* **Chain direction** (low-order end first) is chosen here, for the
  power-gating reason given above.
* **Mapping of the left and right sub-arrays** is a choice made here: left
  is bits 63..0, right is bits 127..64.
* **Choices of this implementation:** the valid flag per word, the
  command/response protocol, the multiple-match flag, the activity counters,
  reset to all-X, and disabled local search-lines held low.
* **Only Type III is built.** The Type I and Type II butterfly variants and
  the conventional pipelined match-lines are alternatives, not part of this
  design.
* **Table size:** the array holds 256 entries. A full measured routing table
  of about 600 routes would need more words or several devices.
