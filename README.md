# Programmable pattern-matching engine for intrusion detection

An intrusion-detection system must find every occurrence of thousands of
strings and regular expressions in network traffic, at line rate, whatever the
traffic looks like. This engine does that with an array of small programmable
state machines (B-FSMs). Each B-FSM consumes exactly one byte per clock cycle,
so the scan rate never depends on the input or on the number of patterns. The
trick that makes a programmable state machine this fast is how it looks up its
transitions. Transitions are stored as *prioritized rules with wildcards*, not
as a full next-state table. A cheap hash of the current state and the input
byte selects a small bucket of rules. The rules in that bucket are compared in
parallel, and the highest-priority match wins. Large pattern sets are split
across many B-FSMs, and each B-FSM holds only a few thousand rules.

The architecture follows the B-FSM pattern-matching engine of van Lunteren and
Engbersen (IBM Zurich, Hot Chips 17, 2005). That work gives the block
structure, the rule-based state machine and the list of features. The widths,
encodings, handshakes and several mechanisms below are choices made for this
RTL. They are marked as such throughout.

```
 streams ──► scanner_control ──► pattern_scanner ─────────────────► result_processor ──► results
  (byte,     sessions, subsets,   input_controller                   FIFOs, arbiter,
  session)   engine allocation    N_MEM × { bfsm_rule_mem (dual port)  location, order/distance,
                                            2 × bfsm_engine           negation, output
                                              (classifier, counters) }
```

## Transition rules and priorities

A pattern set is compiled into a state diagram. The diagram is written as
rules of the form *(state, input) → next state, output*. Either the state or
the input may be a wildcard `*`, and every rule has a priority. For example,
the string `ABC` becomes:

| rule | state | input | next | priority | output |
|------|-------|-------|------|----------|--------|
| R0   | *     | *     | S0   | 0        |        |
| R1   | *     | A     | S1   | 1        |        |
| R2   | S1    | B     | S2   | 2        |        |
| R3   | S2    | C     | S3   | 2        | ABC    |

In each cycle the matching rule with the highest priority is taken. The
wildcard rules replace the many "fall back" transitions that a plain DFA needs.
This is why the rule count is only slightly higher than the number of pattern
characters.

In this RTL a rule is 70 bits (`bfsm_pkg::rule_t`). It has a 24-bit test part
and a 46-bit result part:

| part   | field                                      | bits |
|--------|--------------------------------------------|------|
| test   | valid, state wildcard, current state       | 1+1+8 |
| test   | input wildcard, input-is-class, input value or class number | 1+1+8 |
| test   | counter condition: enable, counter select, "must be zero" | 1+2+1 |
| result | next state                                 | 8 |
| result | output (pattern ID, 0 = none)              | 12 |
| result | counter control: op (NOP, RST, LOAD, INC, DEC), select, load value | 3+2+8 |
| result | hash info of the next state: table base, index mask | 9+4 |

## Rule selection: hashed buckets and the default table

The state register holds the current state and its *hash info*. The hash info
is the base address of the state's table and a 4-bit index mask. The bucket
address is

```
idx  = (state & mask) | (input & ~mask)      // low 4 bits
addr = base + idx
```

The mask therefore chooses, per table, which index bits come from the state
and which come from the input byte. This is the design's own simple version
of the hash. A bucket holds 4 rules, stored highest priority first.
`bfsm_engine` compares all 4 in one cycle, and the first match wins.

Wildcard-state rules (such as R0 and R1 above) would be needed in every
bucket. Instead, they are folded into a 256-entry *default table* per memory,
indexed by the input byte. Each entry holds the best wildcard-state rule for
that byte. It is used when no rule in the bucket matches. This keeps priority
implicit in storage order, but it requires that every specific-state rule
outranks every wildcard-state rule. All the usual string and regex
constructions satisfy this. The compiler must place rules so that a bucket
never needs more than 4 rules. Otherwise it splits the state into more tables
or uses other index bits.

A B-FSM can jump between tables (clusters of states) with each transition,
because every rule carries the next state's base and mask. Several pattern
sets can therefore share one memory as separate tables.

## Character classes and counters

Each engine has a programmable classifier (`bfsm_classifier`): a 256 × 8 table
giving each byte's membership in 8 classes, such as `\d`, `\w` and `\s`. A rule
can test a class instead of a byte value.

Each engine also has 4 saturating 8-bit counters (`bfsm_counter_array`). A rule
may reset, load, increment or decrement one counter. Its condition may require
a counter to be zero or non-zero. Counted repetitions such as `a\d{3}x` thus
need a few rules instead of a chain of states.

## Engine timing and memory sharing

`bfsm_engine` reads its rule memory synchronously. In the cycle a byte is
accepted, the bucket of (next state, byte) is addressed. In the following
cycle the rule is selected and the state is updated. The output appears one
cycle later. A byte is taken every cycle, with a latency of 2 cycles. Each
`bfsm_rule_mem` is dual-ported and serves two engines, one per port. At the
default `N_MEM = 12` there are 24 engines. By default engine *e* scans stream
*e* mod 2, so one copy of the rule tables scans two independent streams, each
at one byte per cycle.

Each memory holds 512 buckets × 4 rules (2048 rules) plus the default table.
12 memories give 24,576 rule slots. The published compiler results place about
1,500 Snort strings (25 K characters) into 12 B-FSMs using 22.0 K rules. That
fits this array at about 90 % bucket filling.

## Sessions, pattern subsets and engine allocation (`scanner_control`)

A stream carries many interleaved sessions, for example TCP flows. Each byte
arrives with its session number, and `s_new` marks the first byte of a new
session. When a stream changes session, `scanner_control` does the following
at the same clock edge that accepts the new session's first byte:

- It saves the context of every engine on that stream (state, base, mask,
  counters) into a session table.
- It saves the stream offset into the same table.
- It loads the contexts of the incoming session. A new session starts from
  the engines' initial contexts and offset 0.

A switch therefore costs no cycles.

Each session also has an engine mask. Engines outside the mask skip that
session's bytes, which selects a subset of the patterns. The host can
reallocate any engine to any stream. The session table is an on-chip array of
`2**SESS_W` = 16 sessions. The original design keeps such state in external
memory.

## Result processing (`result_processor`)

Engines emit raw matches: the pattern ID plus the session and the offset of
the last byte. Every engine has an 8-entry FIFO, and a round-robin arbiter
forwards one event per cycle. When any FIFO is within 4 entries of full,
`stall` deasserts `s_ready` on all streams, so no event is lost. The assertion
`a_no_overflow` checks this.

A condition table, indexed by pattern ID, then decides what is reported:

- **report enable**: patterns used only as prerequisites are not reported.
- **location**: the match must end at an offset in `[min_off, max_off]`.
- **order/distance**: pattern `prev_id` must already have matched in the
  same session, at most `max_dist` bytes earlier.
- **negation**: up to 8 listed patterns are reported (with `r_neg`) when a
  session ends (`eos_req`/`eos_ack`) without them having matched.

A last-seen table (session × pattern ID) holds each pattern's latest offset
and an 8-bit epoch. Ending a session advances its epoch, which forgets all its
entries at once. After reset the table is cleared, one entry per cycle, in
`2**(SESS_W+12)` = 65,536 cycles, with the input stalled. The condition
encoding, the FIFOs and the epoch scheme are this design's own.

End to end, a byte's result appears 4 cycles after the byte is accepted when
the result path is idle.

## Programming the engine

All tables are written through host ports. The pattern compiler itself is host
software and is not included.

- **`cfg`** (`scan_cfg_t`):
  - Rules are written by memory select (or broadcast), bucket address and slot.
  - Default-table entries are written by byte; the data comes from `rule.res`.
  - Classifier rows are written per engine.
- **`alloc_*`, `subset_*`, `init_*`**: engine-to-stream allocation, session
  engine masks, and initial contexts (state, base, mask).
- **`ct_*`, `neg_*`**: condition table and negated-pattern list.

Tables have no reset. The host must write every bucket and default entry an
engine can reach, and the condition entries of every ID it emits.
`tb/bfsm_tb_pkg.sv` contains a small rule placer (`bfsm_image`) and a
reference interpreter (`ref_step`). Both are useful as a starting point.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The end-to-end test runs the top at its
default size (24 engines, 2 streams, 16 sessions). Run it with:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/bfsm_pkg.sv tb/bfsm_tb_pkg.sv tb/tb_pm_engine_top.sv \
  --top-module tb_pm_engine_top
./obj_dir/Vtb_pm_engine_top
```

Verilator finds the remaining modules in `rtl/` by their file names. The other
blocks run the same way with their own `tb_<block>`; add `-Wno-fatal` if a
lint warning stops the build. The full-size end-to-end run takes well under a
second of simulation time after about 20 s of compilation.

`tb_pm_engine_top` loads the example pattern sets into different memories. It
drives two streams with interleaved sessions and bursts of matches, and
compares every result with a reference model of the rules and conditions. It
counts stalls, session starts, context restores, subset skips, location and
order rejections, negated reports and counter rules. It fails if any of them
never happened.

## Where this RTL departs from the original design

- **Rule width.** Rules are 70 bits here. The published memory figures
  (22.0 K rules in 99 KB) imply about 36 bits, so the same pattern set needs
  about twice the memory (12 × 2048 × 70 bits ≈ 215 KB).
- **Hash and bucket size.** The 4-bit mask-select hash, 4 rules per bucket,
  and the default table for wildcard-state rules are this design's own way of
  realizing the prioritized-rule lookup.
- **Clock rate.** The original FPGA version ran at 125 MHz (1 Gb/s per
  channel). This RTL has not been timed on any target.
- **External memories.** The session table and last-seen table are on-chip
  arrays, not external memories. The memory allocator and dynamic update
  scheme of the compiler are not modelled; updates are plain table writes.
- **Epochs.** The epoch scheme has a limit. A last-seen entry not rewritten
  for 255 ends of its session can appear valid again.
- **Stall.** The stall on result congestion is this design's own. The
  original claims a fixed processing rate, which holds here whenever results
  drain as fast as they occur.
