# Omnipredictor: one TAGE and one BTB for branches, loads and indirect jumps

A high-performance front end usually carries three big speculation
structures side by side:
- a conditional branch predictor (TAGE);
- a memory dependence predictor, which says whether a load may run ahead of older stores;
- an indirect target predictor (ITTAGE or similar).

All three are indexed by instruction address and global history, and all
three are mostly idle for any given instruction: a load needs no direction
prediction, and a branch needs no dependence prediction.

This design folds the last two into the first. A TAGE predictor and a
block-organised BTB are read once per 8-instruction fetch block, giving one
prediction and one BTB set per instruction word. Nothing at fetch time knows
which words are branches. After decode, the 3-bit field of the TAGE entry
that matched each word is read according to that word's instruction type:

| instruction | TAGE miss | TAGE hit, field 000..110 | TAGE hit, field 111 |
|---|---|---|---|
| conditional branch | bimodal direction | signed counter: direction | signed counter: direction |
| load | no dependence, issue freely | wait for the (field+1)-th youngest older store | wait for all older stores |
| indirect jump | own BTB word (**A0**) | BTB word of slot `field XOR offset` (**A1**) | second BTB read with a history hash (**A2**) |

No extra tables exist for memory dependences or indirect targets. The price:
- those instructions compete with branches for TAGE entries;
- indirect targets compete with direct targets for BTB words.

## Fetch blocks and banks

A fetch block is 32 bytes: eight 4-byte instructions aligned on 32 bytes.
Slot `s` is `pc[4:2]`.

Every table is split into 8 banks, one per slot. One row index, computed from
the block address (and history, for TAGE), is shared by the banks, so a single
access returns eight entries.
- **TAGE**: each slot still compares a tag computed from its own PC.
- **BTB**: each slot's set is read with the same row, and an entry's tag
  includes the slot offset of its owner. That offset matters for indirect
  jumps, because a jump may own entries in *other* slots' sets.

A fetch may start in the middle of a block (`fetch_pc[4:2]`). Slots before
the start are ignored by the next-address logic.

## Conditional branches: the TAGE core (`tage_predictor`)

TAGE is built from:
- a tagless bimodal table of 2-bit counters (16K entries);
- 12 tagged components of 1280 entries each (15K in total). Each entry holds a
  2-bit useful counter `u`, a 10-bit partial tag and the 3-bit field `ctr`.

Component `t` is indexed with the block address and the youngest
`HIST_LEN[t]` history bits. The lengths form a geometric series from 4 to
640. The history is folded by XOR to 16 bits (row) and to 10 and 9 bits (tag).
- **Provider and alternate.** The longest matching component is the provider,
  and the next one (or the bimodal table) is the alternate.
- **Weak new providers.** When the provider was just allocated (weak counter,
  `u = 0`) and the 4-bit `USE_ALT_ON_NA` counter says so, the alternate
  decides.
- **Update.** The provider counter moves toward the outcome, and `u` moves when
  provider and alternate disagreed. On a misprediction, one entry is allocated
  in a longer component whose `u` is 0.
- **Aging.** Every `U_PERIOD` updates (512K), a sweep clears the MSB of all `u`
  counters; the next sweep clears the LSB. Each sweep handles one row per cycle.

After reset, a sweep of 2048 cycles clears every table, and `ready` is low
until it ends.

The tables (`tage_tagged_table`, `tage_bimodal`) are plain arrays with:
- a whole-row read for prediction;
- a one-entry read and write for update;
- a row clear and a row aging port.

## Loads: dependence by distance (`store_dist_fifo`)

The dependence predictor is trained only by memory-order violations. A load
that ran ahead of an older store to the same address gets a TAGE entry, or
has its existing entry rewritten. The entry's field records where the
producer was:
- `000..110`: the producer was the 1st..7th most recently dispatched store.
  If the field is 011, for example, the load waits for the 4th youngest
  older store.
- `111`: the producer is further away or unknown, so the load waits for all
  older stores.

`store_dist_fifo` turns a distance into a store. It holds the store queue ids
(6 bits, for a 48-entry store queue) of the last 7 dispatched stores, with the
youngest at position 0. A store:
- pushes its id at dispatch;
- clears its own entry when it issues, by searching the FIFO for its id.

A load with distance `d` reads position `d`:
- `ld_dep_valid` says the store has not issued yet;
- `ld_sqid` names it.

A flush empties the FIFO.

Dependences can be transient, so entries must be forgettable faster than
TAGE's 512K-update aging. When a load was predicted dependent but its data
came from the cache, its entry's `u` is cleared with probability 1/256, using
8 bits of a 16-bit LFSR. When a predicted dependence turns out right (data
forwarded), `u` is incremented.

## Indirect jumps: A0, A1 and A2 (`omni_interpret`, `omni_update`)

This is the least obvious part of the design. Each fetch reads eight BTB sets,
one per slot, but an indirect jump in slot `s` needs only one target. The
other seven sets serve as extra target storage for the jump.

**Prediction** (`omni_interpret`):
- **A0**, when TAGE misses: the jump's own entry in set `s` (tag match).
- **A1**, when TAGE hits with field `f != 111`: the entry in set `f XOR s`
  whose tag names this jump. Pointer 000 is A0 itself.
- **A2**, when TAGE hits with field `111`: no target in the block.
  - The top raises `d_a2_wait` and, in the next cycle, reads one more BTB set.
  - That set's index is the jump PC hashed with the 16 youngest history bits.
  - The result is `a2_done/a2_hit/a2_target`.
  - The surrounding front end is expected to refetch from that target.
- **No prediction** otherwise (`d_tgt_valid = 0`, `d_tgt_miss`).

An A1 entry "names" the jump by its tag: the 20-bit BTB tag holds the jump's
slot offset in its low bits. The update logic can therefore tell which of the
eight words already belong to the jump.

**Update** (`omni_update`). The update recomputes the prediction from the
tables as they are now, and checks which entries belong to the jump. The
`u_ind_case` output reports the rule that fired (values 1..7):

| `u_ind_case` | situation | action |
|---|---|---|
| 1 | A0 hit, right | set the entry's hysteresis |
| 2 | A1 hit, right | set hysteresis, increment the provider's `u` |
| 3 | A2 hit, right | set hysteresis, increment the provider's `u` |
| 4 (case 1) | no TAGE hit, no A0 entry | write the target into A0 |
| 5 (case 2) | an owned A1 entry already holds the target, but TAGE missed or points elsewhere | allocate a TAGE entry pointing at it; fix the provider if it hit |
| 6 (case 3) | no owned entry holds the target, field is not 111 | take, in order: A0 if the jump has none; an A1 word of another owner with the same target; an A1 word not owned by the jump (invalid first, then without hysteresis, then any); the A2 set if the jump owns all 14 words. Point the provider at the word and allocate a TAGE entry, unless the word is A0 |
| 7 (cases 4/5) | field 111 and the A2 entry missed or was wrong | take a free A1 word if there is one, else rewrite the A2 entry |

"Free" in case 4/5 means an A1 word not owned by the jump that is invalid or
has no hysteresis.

With 2 ways, a jump reaches up to 14 targets in the fetch block through the
7 pointer values. Beyond that it uses A2. Direct branches then lose BTB words
to the jump, which costs them a direct mis-target. A direct mis-target is far
cheaper than an indirect one.

Direct transfers write their target into their own set with a 1-bit
hysteresis:
- a correct target sets the hysteresis;
- a new owner replaces an invalid or weak way first.

## Next block address and the rest of the front end

`block_addr_select` scans from the start slot for the first transfer that
leaves the block:
- a conditional branch predicted taken;
- a jump or call;
- an indirect jump;
- a return.

The next block is the exit's target (BTB, RAS top or indirect prediction), or
the next 32-byte block if nothing leaves. Other rules:
- Calls push `pc + 4` onto the 32-entry `ras`, a circular stack that
  overwrites its oldest entry when full.
- Returns pop it.
- Conditional outcomes up to the exit are shifted into `global_history`,
  which is 640 bits with the youngest in bit 0.

The caller repairs the history after a misprediction with `hist_restore`.

## Timing of the top (`omnipredictor`)

| cycle | inputs | what happens |
|---|---|---|
| F | `fetch_valid`, `fetch_pc` | TAGE and BTB read with the current history; results registered |
| D (F+1 or later) | `dec_valid`, `dec_itype[8]` | per-slot `d_dir`, `d_mdp_kind/dist`, `d_tgt_valid/d_tgt`, `d_ind_src`; block exit and `d_next_pc`; `d_ghist` = history the block was predicted with. History and RAS move at the edge |
| D+1 | - | if `d_a2_wait`: `a2_done`, `a2_hit`, `a2_target` |
| dispatch | `st_push`, `st_issue`, `ld_dist` | store FIFO; `ld_dep_valid/ld_sqid` combinational |
| any | `upd_valid`, `upd` | one resolved instruction per cycle, with the `d_ghist` of its block |

Each update packet (`upd_t`) carries:
- the instruction type and PC;
- the block history;
- the branch outcome and resolved target;
- for loads, an event: violation with the producer distance, forwarded, or
  from the cache.

The `u_*` outputs report what the update did. They are meant for counters and
testbenches.

The lookup, decode-side logic and update rules are combinational between
registers and arrays. The 12 history folds of 640 bits and the 8 x 12 tag
comparisons make the lookup the long path. A real implementation would
pipeline it over several cycles.

## Sizes

| parameter | default | meaning |
|---|---|---|
| `TAG_ROWS` | 160 | rows per tagged component (x 8 banks x 12 = 15,360 entries) |
| `BIM_ROWS` | 2048 | bimodal rows (x 8 = 16K counters) |
| `BTB_ROWS` | 512 | BTB rows (x 2 ways x 8 banks = 8K entries) |
| `RAS_DEPTH` | 32 | return stack entries |
| `U_PERIOD` | 524288 | updates between `u` aging sweeps |

The smaller configuration (3.75K tagged entries, 2K-entry BTB) is
`TAG_ROWS = 40`, `BTB_ROWS = 128`. The package `omni_pkg` fixes:
- 8 slots, 12 components, history lengths and the 640-bit history;
- 10-bit tags, 3-bit fields, 2-bit `u`;
- 48-bit PCs and 20-bit BTB tags;
- 16 bits of A2 history, 6-bit store queue ids and the 7-entry FIFO.

Storage at the defaults:
- 28.8 KB of tagged entries plus 4 KB of bimodal counters;
- 68 KB of BTB (68-bit entries).

## What is this design's own

The following are choices made here, not taken from the source description:
- the history lengths (geometric 4..640);
- all hash functions;
- the `USE_ALT_ON_NA` rule;
- aging that clears the MSB and then the LSB;
- the one-cycle F/D/A2 timing and the port format;
- the 20-bit BTB tag including the slot offset;
- the 16-bit A2 history;
- victim choice (invalid, then weak, then LFSR);
- the reading of "free" in indirect case 4/5;
- rewriting an existing dependence entry on a new violation;
- incrementing `u` on a correct dependence;
- serialised updates, one per cycle.

Left out on purpose:
- **The fast next-PC predictor.** It is only named, so the top exposes the slow
  predictor's result.
- **The instruction cache and decoder.** Instruction types enter as
  `dec_itype`.
- **Checkpointed RAS or history repair.** The caller restores the history.
- **The number of bubble cycles of an A2 access.** The surrounding pipeline
  decides it.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With plain verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/omni_pkg.sv \
    tb/tb_omnipredictor.sv --top-module tb_omnipredictor -Mdir obj -o sim
./obj/sim
```

`tb_omnipredictor` runs a synthetic program along its correct path:
- a loop with a store and two loads (one reading that store, one sometimes
  reading a store outside the FIFO's reach);
- a history-correlated conditional branch;
- a two-target indirect jump;
- a call/return pair;
- a 16-target indirect jump alone in its block, which overflows A1 into A2.

It checks:
- every prediction the design promises against the program;
- the one-cycle A2 latency;
- accuracy after training.

It also requires each mechanism to happen at least once:
- mispredictions and allocations;
- distance and wait-all verdicts, violations and the 1/256 reset;
- A0, A1 and A2 hits;
- every indirect update case;
- RAS returns, BTB hits and an aging sweep (`U_PERIOD` lowered to 4096).

`tb_omnipredictor_full` runs the same program on the top at its default
sizes. Aging does not occur there within the run. Both finish in seconds.
