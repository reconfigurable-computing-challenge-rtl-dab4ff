# RapidDetect: a streaming pre-filter for JSON log monitoring

Security rules for system logs (Sigma rules, for example) mostly ask whether
certain strings occur, sometimes inside a particular JSON field, and sometimes
several at once. Almost every log event matches no rule. This pipeline runs
in front of a full software matcher. It reads a raw log stream at one 64-byte
flit per clock and cuts it into events at newlines. It then throws away every
event that cannot match any rule, and passes on the remaining events with the
rules they may match. The filter is conservative: it can let an event through
that a rule does not really match, because hash collisions and fingerprint
aliasing give false positives. It never drops an event that the configured
tables say matches.

At 64 bytes per cycle, 200 Gbit/s needs a clock of about 391 MHz.

The filter has two stages, as in the Pigasus network intrusion detector it
builds on:

* **MSPM** (multi-string pattern matcher). It looks for one short "fast
  pattern" literal per rule, at every byte position, and turns each hit into a
  *candidate rule*.
* **CPM** (conjunct pattern matcher). It checks, only for the candidate
  rules, that all literals of the rule occur somewhere in the event. It does
  this by comparing bloom-filter-like fingerprints.

Two stages are specific to logs. A **field tagger** marks which bytes lie
inside the value of a known JSON field, so that a literal can be restricted to
one field. An **overload expansion** stage turns one fast-pattern hit into
several candidates when several rules share that fast pattern.

```
 raw bytes ─► source_split ═╦═ regular ══► source_merge ─► field_tagger ─┬─► FIFO (64+4 flits) ─► MSPM ──candidates──► FIFO(4) ─┐
                            ╚═ newline ══►                               │                                                    ▼
                                                                         └─► FIFO (4 flits) ───► CPM ─ data ──► sink ◄─ verdict ─ CPM
                                                                                                                │   └──────────────► matches
                                                                                                                ▼
                                                                                                   matched events + event number
```

## The stream format

All streams use valid/ready handshakes. A flit (`rs_pkg::flit_t`) has the
following fields:

* 64 data bytes;
* a keep bit per byte;
* a 3-bit field tag per byte (0 means no field);
* `sop` and `eop`, which mark the first and last flit of an event.

Bytes never move between lanes. Where an event starts or ends in the middle of
a flit, the lanes of the other event are padding with keep=0. A flit therefore
belongs to exactly one event.

## Source: cutting the stream at newlines

In general one input flit yields two output flits: the end of one event and
the start of the next. A single pipelined loop cannot emit two flits per
cycle, so the source is split into two kernels:

* `source_split` writes the part before the newline to a *regular* stream,
  with eop set and a `split` flag. In the same cycle it writes the part after
  the newline to a *newline* stream, with sop set. The newline byte itself
  becomes padding.
* `source_merge` normally reads the regular stream. After a flit with
  `split` set, it reads one flit from the newline stream instead. While it
  does so, the regular stream waits, and that back-pressure throttles the
  splitter. The output is at most one flit per cycle.

A flit that holds several newlines is handled in a way of this design's own.
The splitter keeps the flit, emits one complete event per cycle from it, and
consumes it when at most one newline is left.

## Field tagger

Up to `NFIELDS`=4 keys are configured. Each is up to `KEYMAX`=16 bytes,
right-aligned, with a per-byte compare mask. A key is normally written
together with its colon and the value's opening quote, for example
`"cmdline": "`.

The tagger compares every key at every lane in one cycle. A history of the
previous 15 bytes lets a key straddle two flits. Once a key has matched, every
following byte up to the next `"` is tagged with that key's field number,
1..4. The state carries across the flits of an event.

Escaped quotes and non-string values are not recognised.

## Hash check: literal lookup at every byte

`hash_check` is used twice, once in the MSPM and once in the CPM, each with
its own tables. For every lane *i* and length *L* = 1..8, it hashes the *L*
bytes that end at lane *i*:

```
h = 0;  for each byte b, oldest first:  h = rotl12(h, 5) ^ b      (12-bit h)
```

It then reads table *L*−1 at address *h*. The lane hits when all of the
following hold:

* the entry is valid;
* all *L* bytes are real bytes of the same event;
* the entry's field is 0, or equals the field tag of the last byte.

A 7-byte history lets literals span flit boundaries. Each table has 4096
entries of `{valid, field}`. All tables are cleared by a 4096-cycle sweep
after reset. `init_done` is low during the sweep, and no input is accepted
then.

## MSPM: from hits to ordered candidate lists

The hard part of the MSPM is that hits are sparse and bursty: 8 tables × 64
lanes can produce up to 512 hits in one cycle, but usually produce none. The
design keeps this simple with three rules:

1. **Per-lane tokens with end marks.** Each (table, lane) leaf sends a token
   `{hit, last, hash}` for each hit. On the event's last flit, every leaf sends
   one token with `last=1`, which may also carry a hit. A leaf that still has
   an earlier token waiting makes the hash check stall (`hc_stall`).
2. **Compaction trees keep event order.** Per table, a `compactor` made of 63
   `compact_2to1` stages, each followed by a 2-entry FIFO, merges the 64 lanes
   into one stream. A stage forwards plain hits round-robin. It forwards an
   end mark only when both of its inputs have reached the end of the event.
   When both end tokens carry a hit, it sends one hit and then the other with
   the end mark. So each output has exactly one end mark per event, and it
   comes after all of that event's hits.
3. **The same rule again for the 8 tables.** Each table's stream goes through
   its own `rule_lookup` (4096 entries, described below). Then `downshift`
   merges the eight streams with the same end-mark rule.

A rule entry is `{valid, overload, rule[11:0], count[3:0]}`. With
`overload=0`, a hit becomes candidate `rule`. With `overload=1`, `rule` is a
base address into a 4096-entry *expansion table*, and the rules at addresses
base..base+count−1 all share this fast pattern.

**Overload expansion** has two paths:

* The *fast path*: a 4-deep FIFO for plain candidates, with priority at the
  output.
* The *slow path*: an 8-deep FIFO plus an expander that reads one rule per
  cycle from the expansion table.

Plain candidates can therefore overtake a 15-rule expansion. Candidates may be
reordered within an event, but never across events. An event's end mark is let
into the path only when the slow path holds nothing, and it leaves only after
the slow path's last rule has left.

The MSPM's output is a stream of `{hit, last, rule}` tokens: for each event,
zero or more candidates and then exactly one end mark.

## CPM: conjunctions by fingerprint

The CPM has its own `hash_check`, loaded with *all* literals of all rules.
`fp_accumulate` turns each hit of table *t* with hash *h* into one bit of a
256-bit event fingerprint:

```
bit = h[7:0] ^ h[11:8] ^ (37·t mod 256)
```

It ORs these bits over the event and pushes the result into a 16-entry
fingerprint FIFO at eop.

`fp_lookup` reads, for each candidate, the rule's own fingerprint from a table
of 4096 × 256 bits. That fingerprint is the OR of the bits of the rule's
literals, computed by the host.

`fp_compare` passes a candidate when `(rule_fp & ~event_fp) == 0`, which means
every literal of the rule probably occurs. A passing candidate produces a
match record `{event number, rule}`. An event's end mark produces a verdict
`{event number, matched}`. Events are numbered from 0 after reset.

## Why the flit stream is teed with a deep FIFO

The CPM cannot judge an event's candidates before it has seen the event's last
flit. The MSPM, in turn, can stall in the middle of an event when its
compactors fill up. If both read the same stream in lock-step, the following
cycle can form:

* the CPM waits for eop;
* eop waits behind the stalled MSPM;
* the MSPM's compactors wait for the CPM to accept candidates.

That is a deadlock. The top therefore tees the tagged stream into two FIFOs:

* The MSPM copy goes into a FIFO of `MAX_EVENT_FLITS`+4 = 68 flits, which
  holds a whole event.
* The CPM copy goes into a 4-flit FIFO.

With these, the CPM can always run ahead to the end of the event. Events are
limited to 64 flits (4 KiB); longer events can deadlock the pipeline.

## Sink

The sink holds the event's flits (up to 64) until the verdict arrives. It then
forwards them with `out_pid` (the event number) if the event matched, or drops
them. Match records leave on their own port, `match`, and can be paired with
forwarded events by event number.

## Configuration

All tables are written through one port, `cfg` (`rs_pkg::cfg_t`), with the
fields `{we, target, table_id[2:0], addr[15:0], data[255:0]}`. Write them only
after `init_done` has gone high.

| target | table | addr | data |
|---|---|---|---|
| `CFG_FIELD_KEY` | field key slot (field number = slot+1) | slot | key bytes `[127:0]`, byte *k* in `[8k+7:8k]`, right-aligned so that byte 15 is the key's last character; compare mask `[143:128]`, 1 = compare |
| `CFG_MSPM_HASH` | MSPM hash table `table_id` (length `table_id`+1) | hash | `{valid, field[2:0]}` |
| `CFG_MSPM_RULE` | rule table `table_id` | hash | `{valid, overload, rule[11:0], count[3:0]}` |
| `CFG_MSPM_EXP` | expansion table | index | rule `[11:0]` |
| `CFG_CPM_HASH` | CPM hash table `table_id` | hash | `{valid, field[2:0]}` |
| `CFG_CPM_FP` | rule fingerprint | rule | 256-bit fingerprint |

The hash and fingerprint formulas above are all the host software needs to
build these tables. `tb/tb_util_pkg.sv` contains a reference model that does
exactly this, in `load_rules`.

## Top-level ports (`rapiddetect_top`)

* `in_data[64]`, `in_keep`, `in_valid`/`in_ready`: the raw byte stream.
* `out_flit`, `out_pid`, `out_valid`/`out_ready`: events that passed the
  filter.
* `match`, `match_valid`/`match_ready`: (event, rule) pairs that passed.
* `cfg`: the configuration port; `init_done` shows when the table-clearing
  sweep is finished.
* Five monitor outputs, one per internal mechanism, high in cycles when it is
  active:
  * `multi_nl_evt`: a flit with several newlines is being split;
  * `nl_turn_evt`: the merge takes the newline stream;
  * `hc_stall_evt`: the MSPM hash check is stalled;
  * `expand_evt`: overload expansion is busy;
  * `drop_evt`: the sink drops a flit.

Memory, DMA and the host are outside this RTL. That covers the HBM input
buffer, the PCIe DMA engine, the platform shell and network-on-chip, and the
software matcher. The top's stream ports are where they connect.

## Default sizes

| parameter | value | meaning |
|---|---|---|
| `LANES` | 64 | bytes per flit |
| `NTABLES` | 8 | literal lengths 1..8, one hash table each |
| `HASH_BITS` | 12 | 4096 entries per hash and rule table |
| compactor fan-in | 64 | one leaf per lane |
| `RULE_W` | 12 | 4096 rules |
| `CNT_W` | 4 | up to 15 rules share one fast pattern |
| `FP_BITS` | 256 | fingerprint width |
| `NFIELDS` / `KEYMAX` | 4 / 16 | JSON field keys |
| `MAX_EVENT_FLITS` | 64 | longest event (4 KiB) |

## What follows the published design and what does not

The following follow the published architecture:

* the two-kernel newline source;
* the compactor tree of buffered 2-to-1 stages with a 64-to-1 fan-in;
* the MSPM order: hash check → compactors → rule lookup → downshift →
  overload expansion;
* the CPM order: hash check → fingerprint accumulate, FP lookup → fingerprint
  compare;
* a field tagger that marks value bytes, and field-aware matching;
* a fast/slow path for overloaded fast patterns.

The following are this design's own choices, because the published
description does not give them:

* the hash function and the one-table-per-length organisation;
* the fingerprint bit function and its 256-bit width;
* the table formats and the configuration port;
* the end-mark protocol that keeps events in order;
* the key format of the field tagger;
* the sink's drop-or-forward behaviour;
* the deep MSPM-side FIFO that prevents the deadlock;
* all sizes except the 64-to-1 compactor.

Departures and omissions:

* The shift-or scanner that the Pigasus MSPM uses beside its hash tables is
  not built. Only the hash path produces candidates.
* Throughput is one flit per cycle in the source, the tagger and the hash
  checks. The MSPM falls below this when many literals hit in one flit, and
  the source loses a cycle for each newline, because each newline costs one
  extra flit.
* Events are limited to 4 KiB (see the tee above).
* The field tagger does not handle escaped quotes.

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv` that prints
`TB_RESULT checks=N failures=M`. `tb/tb_util_pkg.sv` holds the reference hash,
the fingerprint function and a rule-table builder. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_rapiddetect_top \
    rtl/rs_pkg.sv tb/tb_util_pkg.sv $(ls rtl/*.sv | grep -v rs_pkg) tb/tb_rapiddetect_top.sv
./obj_dir/Vtb_rapiddetect_top
```

`tb_rapiddetect_top` runs the whole pipeline at its default sizes. It loads a
rule set that includes field-restricted, overloaded and multi-literal rules.
It then streams random JSON events through the pipeline, including flits with
several newlines. It checks every forwarded flit and every match record
against a reference model. It also counts each mechanism listed under the
monitor outputs, and fails if one never happened. It also checks that a stream of long events without hits enters
at one flit per cycle, apart from one extra cycle per event for the newline
split. Running with `+verilator+rand+reset+2` randomises uninitialised state,
which the design must not depend on.
