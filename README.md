# Multi-block string matcher for deep packet inspection

This is SystemVerilog RTL for a hardware multi-string matcher. It scans packet payloads for
thousands of fixed strings, such as the content strings of intrusion detection rules, at a
guaranteed rate of one byte per engine cycle. The rate does not depend on the number of strings,
their length or the packet contents. Every engine walks an Aho-Corasick automaton that uses the
*move function*: each state knows its successor for every input byte, so the engine never follows
failure links and never wastes a cycle.

Stored naively, such an automaton needs 256 pointers per state. The key idea is this: most of
those pointers lead to a few states close to the start state. These are replaced by **default
transition pointers** kept once, in a 256-entry lookup table indexed by the input byte. A state
then stores only the few pointers that the defaults would get wrong. With Snort-like rulesets
that is fewer than two per state on average, against about 70–87 for the plain move function.
The whole search structure then fits in on-chip RAM. Many small engines can then run in parallel,
each on its own RAM port.

The default configuration has 6 string matching blocks of 6 engines each. Each block has 3,584
state-machine words. The accelerator takes 96 bits per memory clock, which is 44.2 Gbit/s at a
460 MHz memory clock.

## Structure

```
sm_accel                      top: NBLK blocks, configuration bus, group distribution
 └─ sm_block  (x NBLK)        one automaton, 6 engines, 2 memory ports
     ├─ sm_tdp_ram  x3        state machine 3584x324, lookup table 256x49, match numbers 2048x27
     ├─ sm_engine   x6        engines 0..2 on port A, 3..5 on port B
     │   ├─ sm_state_cmp x15  one pointer comparator per state type
     │   └─ sm_default_sel    default transition comparator
     └─ sm_match_sched x2     one per port: queue + match-number readout
sm_pkg                        shared types, widths, word layouts, fixed-address map
```

## How an engine picks the next state

The engine holds these registers:

- the current state (the 324-bit memory word and the state's *type*, which says where in the word
  the state sits);
- the input byte `x` and its lookup-table word;
- the two previous bytes `p1` (last) and `p2` (the one before), each with a valid flag.

The next state is the first of the following that applies:

1. **Stored pointer.** The comparator for the current state's type looks at the state's pointer
   slots. If a slot has character `x`, the engine goes to that slot's `{address, type}`. If several
   slots match, the lowest slot wins.
2. **Depth-3 default.** The table word of `x` holds one pair `(d3_p2, d3_p1)`. If it equals
   `(p2, p1)`, the engine goes to the depth-3 state `p2 p1 x`.
3. **Depth-2 default.** The table word of `x` holds four preceding bytes. If one equals `p1`, the
   engine goes to the depth-2 state `p1 x`. The lowest entry wins.
4. **Depth-1 default.** If the table word's `d1` bit is set, the engine goes to the depth-1 state
   `x`.
5. **Start state.** Otherwise the engine goes to the start state.

The start state has no pointers and no matches, so it is not stored. Reaching it, or receiving the
first byte of a packet (`start`), loads an all-empty state without a memory read. `start` also
clears both history valid flags. As a result the first byte of a packet can only reach depth 1,
and the second byte can reach at most depth 2.

Default pointers carry no address. Every state a default can reach lives at a **fixed word**
given by `sm_pkg`, and it is stored there as a full-word (type 15) state:

| default        | word address         |
|----------------|----------------------|
| depth 1, byte c  | `c`                  |
| depth 2, byte c, entry k | `256 + 4c + k` |
| depth 3, byte c  | `1280 + c`           |

Words 0–1535 are therefore reserved for default targets. Some of these words can never be
reached: the depth-1 word of a byte that starts no string, and unused depth-2 entries other than
entry 0. Those words may hold ordinary states. All other states go from word 1536 upward.

## Memory formats

A pointer is 24 bits: `{type[3:0], addr[11:0], char[7:0]}`. A type of 0 marks an empty slot.
A state starts with a 12-bit header `{match, match_addr[10:0]}`, followed by its pointers (pointer
i at bit 12 + 24·i). The 15 state types differ in the number of pointer slots they have and in
their fixed position inside the 324-bit word:

| types  | pointers | size  | bit offset in the word |
|--------|----------|-------|------------------------|
| 1–9    | 0–1      | 36 b  | 36·(type−1)            |
| 10–12  | 2–4      | 108 b | 108·(type−10)          |
| 13     | 5–7      | 180 b | 0                      |
| 14     | 8–10     | 252 b | 0                      |
| 15     | 11–13    | 324 b | 0                      |

Types can share a word wherever they do not overlap. For example, a type-13 state can share a word
with a type-12 state and types 6–9. A state can have at most 13 stored pointers.

- **Lookup-table word** (49 bits): `{d3_p2, d3_p1, d2_p1[3], d2_p1[2], d2_p1[1], d2_p1[0], d1}`.
- **Match-number word** (27 bits): `{last, num1[12:0], num0[12:0]}`. String number 0 means "none"
  and is used to fill the second half of an odd-length list. A state's list starts at
  `match_addr` and runs to the first word with `last` set.

### Building the memory images

The hardware is correct only if the images obey the rules below. The testbench package
`tb/sm_tb_pkg.sv` (`ac_compiler`) implements them and is the reference for anyone writing a
compiler.

1. Build the Aho-Corasick trie and the full move function `δ(S, c)`: the longest suffix of
   `label(S)·c` that is a trie node.
2. For each byte c:
   - `d1[c]` is set if the depth-1 node `c` exists;
   - the depth-2 entries are the (up to) four depth-2 nodes ending in c that have the most incoming
     `δ` edges;
   - the depth-3 entry is the most pointed-to depth-3 node ending in c.
3. **Unused entries.** The table word has no valid bits, so unused entries still compare.
   - An unused depth-2 entry k > 0 repeats entry 0's byte. It is then never selected, because
     entry 0 wins.
   - If no depth-2 entry is used, entry 0 gets byte 0. Its fixed word holds a copy of the state that
     the depth-1 default would reach (the state `c`, or an all-zero word for the start state).
   - An unused depth-3 entry gets `(0, entry-0 byte)`. Its fixed word holds a copy of what
     depth-2 entry 0 leads to.

   A spurious hit on an unused entry therefore lands on a state that behaves identically.
4. For every state S and byte c, work out the default that the hardware would take from S's own
   label (`p1`, `p2` = last bytes of the label, where they exist). Store a pointer for c in S if
   that default differs from `δ(S, c)`.
5. Give every state a type by its pointer count, and pack the states into words. The reference
   compiler places large states (types 13–15) first, one per word. It then fills the space they
   leave:
   - a type-13 word has room for a type 12 and a type 6;
   - a type-14 word has room for types 8 and 9.

   Medium states (types 10–12) go three to a word, and small states (types 1–9) nine to a word.
   Unreachable reserved words are used before new words.

## Timing

There is one clock: the memory clock. A mod-3 counter (`phase`) divides it into three slots. On
memory port A, engine j owns slot j: in the cycle where `phase == j`, `in_a` carries engine j's
next byte. On port B the same holds for engine 3+j and `in_b`. Each engine therefore runs at a
third of the memory clock. The three engines of a port are staggered by one memory cycle, and one
address multiplexer on the port is enough.

For each engine, in memory cycles:

| cycle | what happens |
|-------|--------------|
| slot `t` (exec) | The byte arrives and addresses the lookup table. The engine decides the transition for its *previous* byte and reads the next state. |
| `t+1` (capture) | The state word and the new byte's table word are registered. |
| `t+3` (next exec) | The new byte's transition is decided and the state it leads to is read. |
| `t+4` | That state's header is checked. |
| `t+5` | `mreq` (match request) is raised. |
| `t+8` | On an idle scheduler, the first match word appears on `mout`. |

A packet's last byte is processed in the engine's next slot even if no byte follows. A slot with
`valid` low leaves the engine idle without changing its state. Bytes of one packet can therefore
arrive with gaps.

Throughput per block: 6 engines × 8 bits / 3 cycles = 16 bits per memory clock. For the whole
accelerator this is 96 bits per clock.

## Match reporting

When an engine reaches a state whose match bit is set, it hands `{engine, match_addr}` to the
scheduler of its port. The scheduler serves these requests in order from a 16-entry queue. For
each request it reads one match-number word per cycle, issuing the next address before it knows
whether the current word is the last one. For each word it outputs `{engine, num0, num1}`. It
moves on to the next request in the cycle after the last word, so a list of k words takes k
cycles.

Numbers for one engine come out in the order of the match positions. Within one position they come
out in list order. The output does not carry a byte position: the receiver knows which packet each
engine is working on.

The engines cannot be stalled, so a request that arrives while the queue is full is dropped. The
sticky `overflow` flag then stays set until reset. This only happens when many states with long
match lists are hit in close succession.

## Splitting a ruleset over blocks

A small ruleset is loaded whole into every block (`group_size = 1`). Each block then searches its
own packets, giving the full 96 bits per clock.

A ruleset too large for one block is split into `g` groups of strings, one group per block. In
that case:

- set `group_size = g` (1, 2, 3 or 6 with six blocks);
- block b then takes its input streams from block `(b / g)·g`, so only the first block of each
  group needs to be driven;
- every block of the group reports its own share of the string numbers;
- throughput drops by a factor of `g`.

## Loading

The `cfg_*` bus writes one word into the memory that `cfg_sel` selects (0 state machine, 1 lookup
table, 2 match numbers) of block `cfg_blk`. It uses port A. Load only while no packet is being
searched: an assertion in `sm_block` flags a configuration write alongside packet input.

## Where this departs from, or adds to, the published design

- **Clocking.** The published design gives each of a port's three engines its own clock, 120°
  apart, at a third of the memory clock. Here this is one memory clock with a phase counter. The
  behaviour is the same, but the engine logic is timed at the memory clock. On an FPGA it would
  need multicycle constraints to gain the same slack.
- **Fixed addresses.** The published design only says that default targets sit at fixed addresses.
  The map above and the choice of full-word (type 15) storage are this design's own. This costs
  memory:
  - each default target takes a whole word;
  - unused table entries need copy words (up to 512).

  The workload testbench measures this cost on synthetic rulesets of the published sizes (see
  Verification). With the packing above, the sets of 634, 1,603 and 2,588 strings fit the
  published number of blocks. The
  634 and 2,588 sets sometimes need one more group: a few states then need more than 13 stored
  pointers. The 6,275-string set needs up to about 3,800 words per block. That does not fit six
  blocks. This design cannot serve it.
- **Unused table entries** are handled by the image builder (copies), not by extra valid bits. This
  keeps the 49-bit table word.
- **Additions:**
  - history valid flags;
  - the configuration bus;
  - the `group_size` input distribution;
  - the queue depth (16);
  - the drop-on-full overflow policy;
  - string number 0 meaning "none";
  - all bit orders inside the words.
- **Not modelled:** the FPGA block RAM primitives (the memories are inferred arrays) and the
  software rule compiler, apart from the testbench version.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_sm_tdp_ram` | random two-port traffic against a model |
| `tb_sm_state_cmp` | all 15 types against an independent table of positions |
| `tb_sm_default_sel` | priority and history validity, all four outcomes |
| `tb_sm_engine` | match requests against a software walk of the full move function, exact to the cycle (5 cycles); all 15 state types visited |
| `tb_sm_match_sched` | order, engine numbers, latency 3, one word per cycle, overflow and its reset |
| `tb_sm_block` | per-engine string numbers against brute-force search; latency 8; 3 cycles per byte per engine; all transition kinds occur |
| `tb_sm_accel` | default parameters (6 × 3,584 words): group sizes 1, 2, 3 and 6, the 12 bytes/cycle rate, idle slots, overflow |
| `tb_sm_workload` | a synthetic Snort-sized ruleset on the default accelerator: pointer statistics, the smallest group size that fits, every string number against brute-force search |

The block testbenches use synthetic rulesets: random strings over small alphabets, plus `he/she/his/hers`.
They are chosen so that many states share suffixes and every transition kind occurs. The published
Snort rulesets were not available.

`tb_sm_workload` runs rulesets of the published Snort sizes on the default accelerator: 634,
1,603, 2,588 and 6,275 strings, meant for 1, 2, 3 and 6 blocks per packet. The strings are
generated:

- the published number of distinct first characters;
- a mean length of about 19;
- printable text with recurring keyword fragments.

For each set, the testbench does the following:

- It splits the set into the published number of groups. If a group does not fit a block, it
  tries the next group size.
- A group fits if it needs at most 3,584 words and 2,048 match-number words, and no state needs
  more than 13 pointers.
- It reports the pointers per state and the words used.
- It then searches generated packets on all blocks and checks every reported string number.

A set that fits at no group size is reported and skipped. That is a limit of the memory, not a
hardware fault.

Typical figures for the 634-string set:

- about 11,200–12,300 states;
- 70 pointers per state for the plain move function;
- about 1.8 stored pointers per state with the default scheme;
- about 370 default pointers in the table.

## Simulating

With Verilator 5 (`--timing`), from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_sm_accel rtl/sm_pkg.sv tb/sm_tb_pkg.sv tb/tb_sm_accel.sv
./obj_dir/Vtb_sm_accel
```

Replace `tb_sm_accel` with any other testbench name. The full-size run takes under a second. To
change the size, override `NBLK`, `SM_DEPTH`, `MM_DEPTH` or `MBUF_DEPTH` on `sm_accel`. The
word formats, the fixed-address map and the number of engines per block are fixed in `sm_pkg`.
