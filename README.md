# SAM: scalable automaton matching for packet inspection

SAM is a string-matching coprocessor. It finds every occurrence of a large
set of fixed patterns (virus signatures, IDS content strings) in a stream of
bytes, using an Aho-Corasick (AC) automaton stored in memory, so that the
pattern set can be replaced by rewriting tables instead of rebuilding logic.

A memory-based AC matcher is normally slow, because each byte needs a full
lookup of the current state's transitions. SAM starts from two observations:

* **Most of the time the automaton is at its root.** Real text rarely
  continues a pattern, so after a byte or two the failure links lead back to
  the root. From the root SAM does not step byte by byte: it *root-indexes*,
  consuming two bytes with one lookup in a precomputed table.
* **Most steps from a non-root state fail.** Before paying for an exact,
  slow transition lookup, SAM *pre-hashes* the next two bytes against a
  small bit vector stored with the state. If the bit vector says that no
  continuation of a pattern can start with these bytes, the state is
  abandoned at once and the bytes are root-indexed instead.

Only when the pre-hash test cannot rule a continuation out does SAM run the
exact step, a *bitmap AC* lookup: a 256-bit bitmap per state tells which
bytes have a transition, and counting the set bits below the input byte
gives the position of the next state in a packed next-state table.

The three units run in parallel under one finite state machine. This RTL
builds one such engine, two engines sharing one copy of the pattern tables,
and a host interface for loading tables and text and reading back matches.

## Automaton and tables

Software compiles the pattern set into a textbook AC automaton (goto tree,
failure links, output sets) with states numbered 0 (the root) upward, and
then derives five tables. Every stored "next state" is 17 bits:
`{matched, state[15:0]}`, where `matched` is set when at least one pattern
ends at that state (directly or through its failure chain).

| Table | Entries | Entry | Contents |
|---|---|---|---|
| state table | 2^`NSTATE_AW` (8192) | 288 bits | `{base[15:0], fail[15:0], bitmap[255:0]}` |
| next-state table | 2^`NX_AW` (8192) | 17 bits | children of all states, grouped per state in byte order |
| bit vectors | 2^`NSTATE_AW` (8192) | 32 bits | `{V2[15:0], V1[15:0]}` |
| IDX_1, IDX_2 | 256 each | 8 bits | byte ranks |
| root NEXT | 65536 | 17 bits | state after two bytes from the root |

**State table and next-state table.** Bit `c` of state `s`'s bitmap is set
when the goto function has a transition from `s` on byte `c`. The children
of `s` are stored consecutively in the next-state table starting at
`base[s]`, in increasing byte order, so the child for byte `c` is at
`base[s] + popcount(bitmap[s][c-1:0])`. `fail[s]` is the failure state.

**IDX tables.** Let D_j be the set of bytes that appear at depth 1..j of the
goto tree (D_1 = first bytes of patterns, D_2 = first and second bytes).
`IDX_j[c]` is 0 if `c` is not in D_j, otherwise the rank of `c` in D_j
counting from 1 in byte order. For the patterns TEST, THE and HE this gives
IDX_1 = {H:1, T:2} and IDX_2 = {E:1, H:2, T:3}. With 8-bit entries D_2 may
hold at most 255 distinct bytes; a pattern set that uses all 256 byte values
within its first two positions cannot be indexed.

**Root NEXT table.** For the address `NA = {IDX_1[c1], IDX_2[c2]}` the entry
is the full AC state (goto and failure applied) reached from the root
after reading `c1 c2`, with its `matched` flag set if a pattern ends after
`c2`. All byte pairs that map to the same address reach the same state,
because a byte with IDX value 0 cannot be on any pattern path at that depth.
Entries not produced by any pair are don't-care (0).

**Bit vectors.** See the pre-hashing section below.

Pattern restriction: every pattern must be at least two bytes long. A root
lookup consumes two bytes at once and reports only whether a pattern ends
after the second one, so a one-byte pattern completed by the first byte
would be missed.

## Root indexing (`sam_root_index`)

From the root the unit reads `IDX_1[c1]` and `IDX_2[c2]` in parallel (one
cycle), concatenates them with IDX_1 in the upper byte, and reads the root
NEXT table (second cycle). `over` rises two cycles after `start` and holds
the result until the next start. Two bytes are consumed per lookup.

The IDX tables compress 65536 byte pairs into as many addresses as there
are distinct meaningful pairs; with the 8-bit IDX entries used here the
root NEXT table is addressed directly by the 16 concatenated bits.

## Pre-hashing (`sam_prehash`)

Each state owns a 32-bit vector split into two 16-bit halves:

* `V1`, for one byte: hash `H1(c) = c[3:0]`, used as a one-hot bit index.
* `V2`, for two bytes: hash `H2(c1, c2) = {c1[1:0], c2[1:0]}`, one-hot.

The unit reads the vector of the current state (one cycle) and reports a
**hit** when `V1[H1(c1)]` and `V2[H2(c1,c2)]` are both set; otherwise a
**non-hit**. `over` rises one cycle after `start`. With only one byte left
in the text buffer the unit reports a hit, leaving the decision to the
exact unit.

A non-hit makes the engine drop the current state and root-index the two
bytes. That is only correct if the root lookup gives the same result the
real automaton would, and no match is skipped. The vectors are therefore
built as a safe over-approximation. For a state `s`, let F(s) be `s`
together with the non-root states on its failure chain:

* `V1` gets `H1(c)` for every byte `c` with a goto transition from any
  state in F(s);
* `V2` gets `H2(c1, c2)` for every such `c1` leading to a state `v` and
  every byte `c2` with a goto from a state in F(v), and, if `v` is a
  matching state, for every `c2`.

With this rule a non-hit guarantees that within the next two bytes the
automaton reaches no state deeper than the root lookup can express and
passes no matching state. The hash positions (H1_LSB, H2_LSB parameters)
can be moved to other bits of the bytes to reduce false hits for a given
pattern set.

## Bitmap AC step (`sam_bitmap_ac`)

The exact one-byte step, eight cycles long:

| Cycle | Work |
|---|---|
| 0 | `start`: state table read issued for `cur_state` |
| 1 | entry arrives; test `bitmap[c]`, latch the bits below `c`, `base`, `fail` |
| 2-5 | count the set bits, 64 per cycle |
| 6 | next-state address = `base + count` |
| 7 | next-state table read |
| 8 | `over`: `found`, `next` (17 bits) or `fail` |

If `bitmap[c]` is clear the step reports `found = 0` and the failure state;
following the failure chain is the FSM's job. Splitting the 256-bit
population count over four cycles keeps the adder tree small and matches
the eight-cycle step the design is built around.

## Matching flow (`sam_fsm`)

The FSM has seven states: IDLE, FETCH, MATCH, ROOT_MATCH, SET_ROOT (called
SET_ROOT_IDX in the state names of the original design), AC_MATCH and
SET_AC.

```
IDLE --control--> FETCH --buffer fetched--> MATCH
MATCH  (first cycle: start all three units)
   root state, 2 bytes left ............ -> ROOT_MATCH
   root state, 1 byte left ............. -> AC_MATCH
   pre-hash non-hit .................... -> ROOT_MATCH
   pre-hash hit ........................ -> AC_MATCH
ROOT_MATCH --root lookup over--> SET_ROOT        (2 bytes consumed)
AC_MATCH   --step over, transition found--> SET_AC           (1 byte)
           --failed at the root--> SET_AC (state stays root, 1 byte)
           --failure link to root, 2 bytes left--> SET_ROOT (root result, 2 bytes)
           --failure link to another state--> AC_MATCH again from that state (0 bytes)
SET_ROOT / SET_AC --bytes left--> MATCH,  --buffer used up--> IDLE
```

The current state and the text pointer are written on the clock edge that
enters a SET state. Cycle counts per iteration (checked by the
testbenches):

* root lookup from the root, or after a pre-hash non-hit: 4 cycles for
  2 bytes;
* exact step after a pre-hash hit: 10 cycles for 1 byte (MATCH 1,
  AC step 8, SET 1), plus 9 cycles for each extra failure link followed.

With the three units started together, a failure link to the root costs
nothing extra: the root lookup of the same two bytes has already finished
when the AC step reports the failure.

## Host side (`sam_sm_ctrl`)

Each engine has two text buffers of `BUF_BYTES` (2048) bytes. Software
writes a buffer (four bytes per 32-bit word, first byte in bits 7:0), then
its length register, which marks it full. The engine fetches buffers
alternately 0, 1, 0, ... and hands each back when all its bytes are
consumed, so software can refill one buffer while the other is matched.
The automaton state carries across buffers: a stream can be cut at any
byte.

Inside, each buffer is kept as two banks of 32-bit words, even and odd
word addresses, read synchronously (block RAM style). Both banks are read
with the pointer of the next cycle, so the two-byte window is ready
whenever the FSM looks at it, also when its two bytes sit in different
words.

Every consuming step that lands on a state with the `matched` flag pushes
`{position, state}` into a 16-entry match FIFO; position is the index, in
the stream, of the last byte consumed. Software maps the state number to
the list of patterns ending there (its output set).

Engine-local word addresses (`bus_addr[10:9]`: 0 registers, 1 buffer 0,
2 buffer 1):

| Addr | Register | Access | Meaning |
|---|---|---|---|
| 0 | CTRL | R/W | [0] enable, [1] clear: back to root, byte count 0, FIFO empty |
| 1 | STATUS | R | [1:0] buffer full, [2] match pending, [3] FIFO overflow, [4] buffer done, [7:5] FSM state, [8] buffer active, [20:16] FIFO entries |
| 2, 3 | LEN0, LEN1 | W | length of buffer 0/1; marks it full |
| 4 | MATCH_POS | R | position of the oldest match |
| 5 | MATCH_STATE | R | state of the oldest match |
| 6 | MATCH_POP | W | drop the oldest match |
| 7 | CUR_STATE | R | current automaton state |
| 8 | BYTE_COUNT | R | bytes consumed since clear |
| 9 | IRQ_EN | R/W | [0] interrupt on pending match, [1] on buffer done |
| 10 | IRQ_CLR | W | [0] clear overflow, [1] clear buffer done |
| 11-14 | statistics | R | root lookups, AC steps, pre-hash hits, pre-hash non-hits |

Writes take effect on the clock edge where `bus_sel` and `bus_we` are high;
read data appears on `bus_rdata` one cycle after the read.

## Two engines and the table memory (`sam_top`, `sam_table_ram`)

`sam_top` holds `NUM_ENGINES` (2) engines that match independent streams
against one pattern set. Every table is a `sam_table_ram` with one host
write port and one synchronous read port per engine (a dual-port block RAM
for two engines), so the second engine costs no table memory.

Top-level word address, `bus_addr[23:20]` selects the region:

| Region | Target | Address bits | Data |
|---|---|---|---|
| 0 .. N-1 | engine registers and buffers | [10:0] | see above |
| 8 | IDX tables | [8] table (0 = IDX_1), [7:0] byte | [7:0] |
| 9 | root NEXT | [15:0] NA | [16:0] |
| 10 | bit vectors | [12:0] state | {V2, V1} |
| 11 | state table | [16:4] state, [3:0] word | words 0-7: bitmap bits 32w+31..32w; word 8: {base, fail}, commits the entry |
| 12 | next-state table | [12:0] index | [16:0] |

The bitmap words go to a staging register; the write of word 8 stores the
whole 288-bit entry at once, so an engine never reads half an entry. Tables
may be rewritten while the engines run; for an exact result at a given
point of the stream, update while the engine is idle (STATUS[8] and
STATUS[1:0] zero).

At the default sizes the tables take about 3.9 Mbit of memory, most of it
the state table (2.36 Mbit) and the root NEXT table (1.1 Mbit).

## Sizes and what fits

`NSTATE_AW = NX_AW = 13` gives 8192 states. A pattern set of about 1000
virus signatures compiles to roughly 6,500 states and fits. In simulation,
1000 random binary signatures of 2 to 11 bytes gave 5,683 states; on
text-like and executable-like data 96-97% of the bytes went through root
indexing and only one byte in 7 to 13 needed an exact bitmap AC step. State numbers
are 16 bits, so `NSTATE_AW` and `NX_AW` can be raised to 16 (65536 states)
without other changes; larger sets, such as a full anti-virus database of
hundreds of thousands of states, need wider state numbers and external
memory, which this RTL does not have.

## Departures from the original design

* **Throughput.** The original design quotes a best case of two bytes per
  clock at its clock rate. Here a root lookup iteration takes 4 cycles
  for 2 bytes, because the FSM passes through MATCH and SET states and the
  lookup is not pipelined across iterations. The 2-cycle root lookup and
  8-cycle AC step themselves are as specified.
* **Match reporting** is this design's own: a `matched` flag in every
  stored next state and a FIFO of `{position, state}`.
* **FSM additions**: the AC_MATCH self-loop for failure links to non-root
  states, the one-byte tail handled by the AC unit, and FETCH returning to
  IDLE when `control` drops.
* **Two engines** run independent streams. The original double-engine
  build uses a small coordinating FSM between two engine controllers,
  whose workings are not specified; it is not built.
* **Memory.** The state table stores the full 256-bit bitmap and 16-bit
  base and failure pointers (288 bits per state) rather than the more
  compact per-state format of the original, whose exact layout is not
  given. Everything is internal memory; the external-memory variant for
  large pattern sets is not built.
* **Host bus.** A plain select/write/address/data bus with one interrupt
  per engine stands in for the platform bus of the original system.

## Verification

Each module has a self-checking testbench in `tb/`; they share a reference
model (`tb/sam_tb_pkg.sv`) that builds an AC automaton and all tables from
a pattern list and matches text byte by byte.

| Testbench | What it checks |
|---|---|
| `tb_sam_table_ram` | two read ports, read latency, read-during-write |
| `tb_sam_root_index` | IDX numbering of the TEST/THE/HE example, all pair lookups, 2-cycle latency |
| `tb_sam_prehash` | example bit vectors, random hit/non-hit against the hash rule, no missed transition, 1-cycle latency |
| `tb_sam_bitmap_ac` | goto and failure results over all bitmap quarters, 8-cycle latency |
| `tb_sam_fsm` | every transition against the state diagram, the result chosen in each case, 4-cycle root iteration |
| `tb_sam_sm_ctrl` | buffers, window at every pointer of random walks, match FIFO order, overflow, interrupts, clear, statistics |
| `tb_sam_engine` | one engine against the reference matcher on random text with planted patterns |
| `tb_sam_top` | both engines at default size, tables loaded over the bus, exact match lists, every mechanism exercised, live table update |
| `tb_sam_workload` | 1000 random binary signatures (about 5,700 states) at default size; text-like and executable-like data; exact match lists and the share of bytes handled by root indexing |

Every testbench ends by printing `TB_RESULT checks=<n> failures=<m>` and
has a watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/sam_pkg.sv tb/sam_tb_pkg.sv rtl/sam_table_ram.sv rtl/sam_root_index.sv \
  rtl/sam_prehash.sv rtl/sam_bitmap_ac.sv rtl/sam_sm_ctrl.sv rtl/sam_fsm.sv \
  rtl/sam_engine.sv rtl/sam_top.sv tb/tb_sam_top.sv \
  --top-module tb_sam_top -Mdir obj_top -o sim
obj_top/sim
```

Replace `tb_sam_top` by any other testbench name. The full-size top test
loads all 65536 root NEXT entries over the bus and runs in a few seconds. To try another pattern set, change the `m.add(...)` calls in a
testbench; the reference model produces the tables.
