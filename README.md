# Longest-match TCAM search engine with priority decision in memory

A TCAM compares a search key with all of its stored ternary words at once. When
several words match, a conventional engine keeps the table sorted by pattern length
and uses a priority encoder to pick the first match, which is taken as the longest.
Sorting makes every insertion expensive, because entries have to be shuffled to make
room. The priority encoder also costs energy on every search.

This design drops both. The length of a pattern is just the set of its care bits,
which the ternary cells already store. The longest match is therefore found inside
the array, in three search phases over the same cells. Entries can sit in any order
and can be rewritten in place.

Each entry has two segments, a short **input segment** and a longer **state
segment**, as suits a pattern-matching state machine: an entry reads "in state S, on
input symbol I, go to state N". The state segment is searched only for rows whose
input segment matched: this is the **sequential input-state (SIS)** scheme. Most
rows therefore never spend energy on the long segment.

The RTL is a cycle-level logic model. It models the resistive cells and the wired
match lines as digital logic, not as analog circuits.

## Block diagram

```
 in_sym ──► tcam_input_segment ──ML──► state_search_driver ──search_en──┐
                                        (register + pre-charge control) │
 cur_state ─────────────────────────────────────────────► pdm_state_array (4T2R+PDM cells)
   ▲                                                        │ ML   │ CMD   │ MML
   │                                                        ▼      ▼       │
   │                                                  pdm_periph (P1R, P2R)│
   │                                                                       ▼
   └──── next_state_memory ◄──addr── match_addr_encoder ◄──────────────────┘
```

`pdm_search_ctrl` sequences the phases. `tcam_search_engine` is the top module.

## The cell and its data-line codes

Each ternary cell (`tcam_cell_4t2r`) stores its value in two resistive devices, RT
and RB. Each device is either low-resistance (LRS) or high-resistance (HRS):

| value | RT  | RB  | `tern_t`       |
|-------|-----|-----|----------------|
| 0     | LRS | HRS | `TERN_0` 2'b10 |
| 1     | HRS | LRS | `TERN_1` 2'b01 |
| X     | HRS | HRS | `TERN_X` 2'b00 |

Each column is driven by a pair of data lines, DL and DLB. The cell's internal node
NX goes high when DL meets an LRS RT, or when DLB meets an LRS RB. A high NX
discharges the row's match line, which is a mismatch. The four data-line codes give:

| DL DLB | name    | mismatches on  |
|--------|---------|----------------|
| 1 0    | search 1 | stored 0      |
| 0 1    | search 0 | stored 1      |
| 0 0    | masked   | nothing       |
| 1 1    | probe    | stored 0 or 1 |

The probe code is useless for searching, because it mismatches every care bit. It is
exactly what reads out a pattern's length, so phases 2 and 3 use it.

## The three PDM phases

Each state-segment cell (`pdm_cell`) adds two small circuits to the 4T2R cell. Both
share the cell's NX node:

- **Evaluation (`pdm_eval`).** Pulls the column line CMD low when the cell is a care
  bit and its row matched in phase 1.
- **Comparison (`pdm_cmp`).** Sets an internal node MX high when the column's
  registered phase-2 value says "care" but the cell is a don't-care. MX then pulls
  the row's mask match line MML low.

All lines are precharged high and pulled low by any attached cell, like a wired-NOR.
For the worked example, take four 8-bit patterns stored in arbitrary order: 1010xxxx,
101001xx, 1011011x and 10100xxx. The key is 10100101.

1. **Phase 1: match.** The key goes on the data lines. Rows 0, 1 and 3 match. The
   `P1R` register records the match lines.
2. **Phase 2: longest length.** Every column gets the probe code. In each column, CMD
   goes low if any matched row has a care bit there. CMD is then the complement of
   the OR of the matched rows' masks: 00000011, meaning the longest length is
   11111100. `P2R` records CMD.
3. **Phase 3: longest match.** The probe code stays on, and P2R drives the comparison
   circuits. MML is precharged only on rows that matched in phase 1. A row keeps MML
   high only if it has a care bit wherever P2R has one. Only row 1 (101001xx) does.

The third step identifies one row only if the OR of the masks is itself the mask of
a matched row. That holds when every state pattern is a **prefix**: care bits from
the most significant end, then don't-cares, as in longest-prefix routing. The RTL
does not check this; writing prefix-shaped patterns is the user's job. If two
matched rows have the same, longest, length, both keep MML high. The encoder then
raises `multi`, and its address is not meaningful.

## Sequential input-state search

`state_search_driver` registers each row's input-segment match line. It enables the
state-segment search of a row only when the pre-charge control is low and the
registered match line is high. Any other combination leaves the row unsearched. An
unsearched row is not precharged, reads as a phase-1 mismatch and takes no further
part. The final result is unchanged, because such a row could not have matched
anyway.

## Timing

All sequential logic is on the rising edge of `clk`. `rst_n` is asynchronous and
active low. A search takes one cycle per step:

| cycle after start | phase | what happens |
|---|---|---|
| 1 | `PH_IN`  | input segment searched with `in_sym`; SSD registers its match lines |
| 2 | `PH_P1`  | pre-charge control low; enabled state rows searched with `cur_state`; P1R loaded |
| 3 | `PH_P2`  | probe on the state segment; CMD sensed; P2R loaded |
| 4 | `PH_P3`  | probe plus P2R; MML; encoder addresses the next-state memory (synchronous read) |
| 5 | `PH_UPD` | `done` = 1; `hit`, `multi`, `match_addr`, `next_state` valid; `cur_state` takes `next_state` at the end of the cycle if `hit` |

`start` is taken only while `busy` is low. A new search can start in the cycle after
`done`, so the throughput is one search per 6 cycles. A segment that is not being
searched has its data lines masked (DL = DLB = 0).

## Top-level interface (`tcam_search_engine`)

| parameter | default | meaning |
|---|---|---|
| `ENTRIES` | 4 | number of entries (transitions) |
| `INPUT_W` | 4 | input-segment width: one hex digit |
| `STATE_W` | 8 | state-segment width, and the width of the current and next state |

The ports fall into four groups:

- **Entry write.** `wr_en`, `wr_idx`, `wr_in` and `wr_state` (ternary, `tern_t`
  arrays), `wr_next` and `wr_valid`. Writing one entry takes one cycle, at any index,
  with no reordering. `wr_valid = 0` removes the entry.
- **State load.** `state_load` and `state_in` set the current state, for example the
  start state of the state machine.
- **Search.** `start`, `in_sym`, then `busy`, `done`, `hit`, `multi`, `match_addr`,
  `next_state` and `cur_state`.
- **Observation.** `phase`, `longest_len` (the phase-2 care mask) and `st_search_en`
  (the state rows searched in phase 1).

Writes and state loads are allowed only while idle, and an assertion checks this.
After a miss, `cur_state` keeps its value. Reset clears the entry valid bits and
`cur_state`. The cells are non-volatile and the next-state memory is a plain array,
so neither is reset.

## Files

| file | contents |
|---|---|
| `rtl/tcam_pkg.sv` | `tern_t`, `dline_t`, data-line codes, phase and drive enums |
| `rtl/tcam_cell_4t2r.sv` | ternary cell |
| `rtl/pdm_eval.sv`, `rtl/pdm_cmp.sv`, `rtl/pdm_cell.sv` | PDM circuits and the combined cell |
| `rtl/tcam_input_segment.sv` | input segment with per-row valid bits |
| `rtl/state_search_driver.sv` | SIS state search driver |
| `rtl/pdm_state_array.sv` | state-segment array, ML/CMD/MML lines |
| `rtl/pdm_periph.sv` | P1R and P2R registers |
| `rtl/match_addr_encoder.sv` | OR encoder with hit and tie flags |
| `rtl/next_state_memory.sv` | next-state memory |
| `rtl/pdm_search_ctrl.sv` | phase sequencer |
| `rtl/tcam_search_engine.sv` | top |
| `tb/tb_<module>.sv` | a self-checking testbench per module |
| `tb/tb_sis_hex_workload.sv` | the SIS scheme on a 16-entry table keyed by hex digit |
| `tb/tb_engine_scaled.sv` | random end-to-end test at 20 entries, 8-bit input, 32-bit state |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. It has a watchdog
that counts a failure if the run hangs. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/tcam_pkg.sv tb/tb_tcam_search_engine.sv --top-module tb_tcam_search_engine
./obj_dir/Vtb_tcam_search_engine
```

`tb_tcam_search_engine` runs the top at its default parameters. It first runs the
worked example above. It then chains 3000 random searches through the state
feedback, with entries rewritten in place at random positions. A reference model in
the testbench checks each search. The testbench counts, and requires at least once
each:

- state rows skipped by SIS;
- searches with several phase-1 matches resolved to one;
- misses;
- equal-length ties;
- state changes through the feedback path;
- in-place rewrites.

It also checks the 5-cycle latency.

`tb_engine_scaled` runs the same kind of random test at a larger size that is not a
power of two: 20 entries, an 8-bit input segment and a 32-bit state segment.

`tb_sis_hex_workload` builds 16 entries, each keyed by a different hex digit in its
input segment. For every search exactly one state row is searched, so 15 of 16
state-row searches (93.75 %) are skipped, and the testbench checks that fraction.

## How far this follows the source design, and where it departs

Taken from the source design:

- the cell encoding and the search table;
- the evaluation and comparison behaviour of the PDM circuits, and their transistor
  and signal names (NX, NM/NFS, CMD, P1R, P2R, PSS/PMC/NMC, MX, NMML, MML);
- the three phases and the probe code;
- MML precharged only on phase-1 matches;
- the SIS rule (search only with pre-charge control low and the input match line high);
- the block structure: input TCAM, state search driver, TCAM+PDM state array, match
  address encoder, next-state memory with state feedback;
- the 4-entry, 8-bit example used for the default sizes.

Choices made here, where the source is silent:

- **Input width.** `INPUT_W = 4`, one hex digit. The source classifies input-segment
  contents by hex digit.
- **Cycle timing.** One cycle per phase, plus the input-search and update cycles, and
  a synchronous memory read. The source gives no timing.
- **Write port.** A synchronous one-cycle write. The cell's write circuit is not
  detailed.
- **Per-row valid bit.** Added, and cleared by reset.
- **Encoder.** The match address encoder is a plain OR encoder with a `multi` flag.
- **Miss.** The current state is kept after a miss, and `state_load` sets the start
  state.
- **Phase registers.** The source draws their clock gated with an AND. Here they are
  enable-loaded registers.
- **Idle line.** MX is taken as low when its pull-up path is off.

Not modelled:

- **Analog behaviour.** This covers precharge voltages, match-line development,
  resistive switching and write voltages.
- **Sense amplifiers and the pre-charge circuit.** Their logic effect is the digital
  match lines and the row enable of `pdm_state_array`.
- **Energy.** The source's motivation is energy: leakage, write energy spent on
  reordering, and search energy of the match lines and the priority encoder. The RTL
  shows only the mechanisms that save it. Those are no reordering on update, no
  priority encoder, and skipped state-row searches, which `st_search_en` makes
  visible. It reports no energy numbers.
