# Shared-prefix payload matcher for network intrusion detection

A network intrusion detection system spends most of its time searching packet
payloads for the content strings of its rules. This design moves that search
into logic. Every character of every pattern becomes one state of a
non-deterministic automaton (NFA): a flip-flop plus a character comparator. All
states look at the same payload byte in the same clock cycle, so the whole rule
set is searched at one byte per clock. The time is linear in the payload length,
whatever the number of patterns.

The problem is size. A large rule set has tens of thousands of pattern
characters, more than one FPGA holds. The design therefore shrinks the rule set
before it becomes logic. Patterns that begin with the same characters share the
states of those characters, so the pattern list becomes a tree. The groups that
result can then be spread over several devices.

Example: "this" and "that" need eight states if each pattern has its own.
Sharing "th" leaves six: `t h i s` and `a t`.

```
            +- i -- s   ("this")
 t -- h ----+
            +- a -- t   ("that")
```

For a published rule set of about 29,400 pattern characters, this kind of
sharing is reported to leave about 51 % of the states. That rule set is not
included here (see *Limits*).

## The state cell

`state_cell` is the unit that everything else is built from.

```
 enable --D[ff]Q--+
                  AND --> match
 bus --[char]-----+
```

- The flip-flop is set when the previous state matched on the previous byte.
  Its D input is the cell's `enable`.
- `match` is the AND of the flip-flop, the character comparator and `valid`.
  It is combinational from the bus byte.
- One cell's `match` drives the next cell's `enable`. A pattern of L
  characters therefore reports its hit in the same cycle as its last
  character, L-1 valid bytes after its first.
- The comparator (`char_matcher`) splits the byte into two nibbles. Each nibble
  addresses a 16-entry truth table, one 4-input LUT. The character is present
  when both tables give 1. By default each table holds a single 1, which
  recognises exactly one byte value. The tables are parameters and can be
  loaded with other contents. For example, high nibble {4,6} with low nibble 1
  matches both 'A' and 'a'.

A cell that starts a pattern has its enable tied to 1, so a match may begin at
any byte. Its flip-flop resets to 1 (`INIT`), so the first byte of a payload
can also start a match. All other cells reset to 0.

## Alternation and catenation

Patterns are built from two constructs:

- **Catenation** ("a then b") is plain wiring. One cell's `match` feeds the
  next cell's `enable`.
- **Alternation** ("a or b") is the `alternation` module. One incoming state
  `i` enables N cells side by side. Each branch's match comes out separately
  (`branch_match`), because each branch continues its own pattern. Their OR
  (`match`) is also given.

The tree builder gives every state that has successors one alternation, with
those successors as its branches. A state with a single successor gets an
alternation of one branch. The first characters of all patterns form the root
alternation. Its enable is tied to 1 and its cells reset to 1.

There is no repetition (Kleene star) construct. Attack signatures are strings
of fixed length.

## How the tree is built (`prefix_tree_matcher`)

The tree is computed while the design elaborates. Constant functions read the
`PATTERNS`/`LENGTHS` parameters, so no script or table file is involved.

A state is identified as (p, k): character k of pattern p. The rule:

> State (p, k) is built only if no earlier selected pattern q < p has the same
> first k+1 characters. Otherwise pattern p uses the state of the lowest such q,
> called its *owner*.

This one rule covers three reductions:

| Reduction | What is shared |
|---|---|
| Repeated patterns | They add no state at all. |
| Common first character | The first state is shared. |
| Longest common prefix | Every state up to the point where the patterns diverge is shared. |

The generate loops go over the grid `p < NP`, `k < MAX_LEN`. At each built
state that has children they place an `alternation`. Its branches drive
`node_match[child][k+1]`. Every built state is the child of exactly one parent,
so each `node_match` bit has exactly one driver. Unbuilt positions are tied
to 0. Pattern p hits when its owner's state for its last character matches.

Four localparams report the state count after each reduction:

- `NAIVE_STATES`: one state per character of every selected pattern.
- `UNIQUE_STATES`: the same with repeated patterns removed.
- `FIRST_CHAR_STATES`: the same, plus one shared state per first character.
- `NUM_STATES`: longest common prefixes shared. This is what is built.

The testbenches check them against counts worked out by hand. The 16-pattern
test set goes 116 → 102 → 96 → 78.

Suffixes are not shared. Only prefixes are shared.

### Writing a rule set

Each pattern is a vector of `8*MAX_LEN` bits, right-justified: its last
character is in bits [7:0]. Its length is given separately in `LENGTHS`, so a
pattern may contain byte 8'h00. A SystemVerilog string literal has exactly this
layout:

```systemverilog
localparam logic [8*7-1:0] PAT [4] = '{"GET /", "cmd.exe", 32'h90909090, "root"};
localparam int unsigned    LEN [4] = '{5, 7, 4, 4};
nids_match_engine #(.NP(4), .MAX_LEN(7), .PATTERNS(PAT), .LENGTHS(LEN),
                    .NUM_PARTS(2)) u_engine (...);
```

`MAX_LEN` must be at least the longest pattern.

Verilator accepts array parameters most reliably when they are passed as named
localparams, as above, rather than as inline `'{...}` literals.

## Splitting the rule set over devices (`nids_match_engine`)

The top level groups the patterns by first character. A group holds everything
that can share states, so splitting the rule set between groups never
duplicates a state.

- The groups are dealt round-robin, in order of first appearance, to
  `NUM_PARTS` partitions. Each partition stands for one device.
- Each partition is a `prefix_tree_matcher` whose `SELECT` mask keeps only its
  own patterns.
- All partitions share the byte bus.
- `pattern_hit` is the OR of the partitions' outputs. Each pattern lives in
  exactly one partition.
- `part_hit[d]` says that partition d found something on this byte.
- A concurrent assertion checks that no pattern is ever reported by two
  partitions.

The default configuration has `"this"`, `"that"` and `"abc"` on two
partitions:

- Partition 0 holds the 't' group: six states.
- Partition 1 holds "abc": three states.

## Packets and the verdict

| Signal | Meaning |
|---|---|
| `in_valid`, `in_data` | Payload bytes, one per clock when valid. Idle cycles hold every state, so a match can span gaps in the stream. |
| `in_sop` | Marks the first byte of a packet. For that byte every flip-flop is replaced by its reset value. A match can never span two packets, and no bubble is needed between packets. |
| `in_eop` | Marks the last byte of a packet. `sop` and `eop` may both be 1 on a one-byte packet. |
| `pattern_hit[p]` | Combinational. Pattern p ends on the current byte. Overlapping and repeated occurrences are all reported. |
| `pkt_done`, `pkt_malicious`, `pkt_hits` | Registered by `packet_classifier`, valid the clock after the last byte. `pkt_done` is a one-cycle pulse. `pkt_hits` lists every pattern seen in the packet. `pkt_malicious` is their OR. |

The reset `rst_n` is asynchronous and active low.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `nids_match_engine` | `NP`, `MAX_LEN` | 3, 4 | Number of patterns, longest pattern in bytes |
| | `PATTERNS`, `LENGTHS` | "this", "that", "abc" / 4, 4, 3 | Rule-set contents |
| | `NUM_PARTS` | 2 | Partitions (devices) |
| `prefix_tree_matcher` | `SELECT` | all ones | Patterns held by this matcher |
| `alternation` | `N`, `CHARS`, `INIT` | 2, 'a','b', 0 | Branches and their characters |
| `state_cell` | `CHAR`, `INIT` | 'a', 0 | Character, reset value |
| `char_matcher` | `CHAR`, `LUT_HI`, `LUT_LO` | 'a', derived | Nibble truth tables |

## What follows the source description and what is this design's own

**Taken from the description the design is based on:**

- One state per character.
- The state cell as a flip-flop plus a two-LUT character matcher, ANDed.
- Catenation as a chain of cells; alternation as cells sharing an enable.
- The first state fed by a constant 1.
- Reduction by unique patterns, by common first character and by longest
  common prefix.
- Splitting the rule set over several devices.
- Classifying a packet as malicious or benign from its matches.

**Chosen here:**

- The `valid`/`sop`/`eop` byte framing.
- Reset values, including the first states resetting to 1.
- The right-justified pattern encoding with explicit lengths.
- The round-robin assignment of first-character groups to partitions. The
  source gives no assignment rule and no device count.
- The verdict register and its timing.
- The overridable LUT contents.

The source also has figures of the alternation and catenation schematics. In
them the two labels appear swapped relative to the matching automaton diagrams.
This design follows the automata: catenation is a chain, alternation is
parallel.

## Limits

- **No real rule set.** The default rule set is a small example. The published
  rule set of about 29,400 characters (about 15,000 states after sharing) is
  not part of this code. The default configuration holds 9 states.
- **Slow to elaborate at scale.** The tree is built by simple constant
  functions whose cost grows roughly as NP³·MAX_LEN². A few dozen patterns
  elaborate without trouble (the 16-pattern test set is one). Tens of
  thousands would not be practical. A rule set of that size would be better
  pre-sorted and shared by an offline tool. The same structure can then be
  written out directly.
- **No header-based split.** The rule set is split by content only. The
  source also splits rules by header information, which would need the
  header fields of each rule.
- **Not built:**
  - header matching, which would tie a pattern hit to the header fields of
    its rule;
  - the host software that feeds payloads and acts on verdicts;
  - any interconnect between devices. The partitions' `part_hit` outputs are
    where it would attach.
- **Combinational hit path.** A hit is combinational from the bus byte through
  one LUT pair and one AND per cell. If the clock target needs it, register
  `pattern_hit` downstream.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_char_matcher` | All 256 byte values against several characters, including 8'h00, 8'hFF and a loaded two-character table. |
| `tb_state_cell`, `tb_alternation` | Random valid/restart/enable/byte stimulus against a cycle model. |
| `tb_prefix_tree_matcher` | Three rule sets against a model that compares the tail of the current packet with each pattern. It also checks the state counts (6 for this/that, 3 for abc, 10 for a mixed set whose one-state-per-character count is 21) and that "abc" hits exactly on the 'c' byte. |
| `tb_packet_classifier` | Random packets with idle gaps. |
| `tb_nids_match_engine` | The whole engine at its default parameters. Directed and random packets with idle gaps, checked byte by byte and packet by packet. It also counts each mechanism and requires each to occur at least once: both "th" patterns, each partition, a match across idle cycles, overlapping matches, a match cut off by a packet boundary, one-byte packets, and malicious and benign verdicts. |
| `tb_rule_set_workload` | A 16-pattern rule set of attack-like strings on three partitions, with the same checks plus the per-reduction state counts. |

To run one with Verilator (package first):

```sh
verilator --binary --timing --assert -Wno-fatal rtl/nids_pkg.sv \
  rtl/char_matcher.sv rtl/state_cell.sv rtl/alternation.sv \
  rtl/prefix_tree_matcher.sv rtl/packet_classifier.sv rtl/nids_match_engine.sv \
  tb/tb_nids_match_engine.sv --top-module tb_nids_match_engine
./obj_dir/Vtb_nids_match_engine
```
