# SAM-FSM: a self-addressable memory string matcher

Network intrusion detection scans every packet byte for thousands of attack
strings. The usual hardware approach is an Aho-Corasick style automaton (a
deterministic state machine, DFA) stored as a transition table. That table
has one row per state and 256 next-state pointers per row. Most of those
pointers are the same, so the memory is mostly wasted.

SAM-FSM stores **one row per state**. The row does not name the next state.
Instead it carries a *state code* that describes which states can follow it.
A special decoder in front of the memory reads that code together with the
input character and raises the word line of the next state directly. The
memory has no address decoder at all: the current row addresses the next
one. This is why the memory is called "self-addressable".

This repository holds synthesizable SystemVerilog for:

* `sam_fsm_engine`: a single-stream engine with a look-ahead decoder. It
  can consume a whole *super character* (a string of up to 4 characters) in
  one clock.
* `sam_fsm_pipelined`: a four-packet interleaved engine. It takes one
  character per clock through a state loop that holds four registers.
* `sam_fsm_top`: both engines side by side, each with its own ports.

The defaults size each engine for the largest rule set the design was
evaluated on:

* 500 patterns, compiled to 1718 states.
* 151-bit state codes and a 9-bit match tag.
* So 1718 × 160 bits = 34.36 KB of state memory per engine.

## How a state code addresses the next state

Take a pattern automaton with states S0..S(N-1).

* For each state S_k, the **group** G_k is the set of states that have a
  transition into S_k (its fan-in states).
* Each group gets an **address tag**. Every state that is a member of G_k
  carries G_k's tag in its code.
* The decoder has one **group detector** per row k. It fires when the
  current code carries G_k's tag, meaning "S_k is a possible next state".
* The row's **word-line gate** ANDs that detector output with the input
  decoder line of the character that leads into S_k. At most one gate can
  fire, and the row it drives is the next state.

Tags are packed densely. Two groups that share no member never appear in the
same code, so they can share bit positions. Groups are partitioned into such
mutually independent sets, called **clusters**. Each cluster occupies a fixed
bit field of the code, and the groups of a cluster are numbered in binary
from 1 within that field. The value 0 means "this state belongs to no group
of this cluster".

A state code is therefore the concatenation of one field per cluster. The
code width is the sum of the field widths. It is much smaller than one bit
per group, but wider than log2 N.

A small example with a 6-bit code, with clusters C1 = bit 5, C2 = bits 4..2,
C3 = bit 1 and C4 = bit 0:

| group | cluster | tag |
|---|---|---|
| G1 | C1 | 1 |
| G2, G3, G5, G6, G7, G9 | C2 | 001, 010, 011, 100, 101, 110 |
| G4 | C3 | 1 |
| G8 | C4 | 1 |

A state in G1, G3, G4 and G8 has the code `1 010 1 1` = `101011`. A
detector for G3 checks bits 4..2 for `010` and ignores the other bits. In
this RTL each detector is a masked compare, `(code & mask) == (tag & mask)`.
Both `mask` and `tag` are registers. This means:

* A cluster's width can change when patterns are added. A bit freed in one
  cluster can be given to another, because a mask may select any bits.
* A row whose mask is zero never fires, so reset disables every row.

Things the RTL decides for itself:

* **Root.** Row 0 is the start state. It has no detector. When no word line
  fires, the engine returns to the root. The root row's own code still
  carries every group it belongs to, so the first character of a pattern is
  found from the root like any other transition.
* **Matches.** Each memory row also holds a match tag: the pattern id
  reported when the state is entered, or 0 for none. The tag is
  ceil(log2(P+1)) bits wide, so id 0 can mean "no match".
* **No failure pointers.** The automaton must be a complete DFA. Failure
  transitions have to be compiled into real transitions, as in
  Aho-Corasick. Any transition that is not listed goes back to the root.
  The testbenches build such machines with their own compiler.

## Super characters and the look-ahead window

A chain of states with only one way out each can be collapsed into a single
*super state*. Its incoming transition is then labelled by a string of up to
`MAX_SC` = 4 characters, the super character. This saves rows. It also lets
one clock consume several characters.

`sam_fsm_engine` implements this as follows:

* **Input decoders.** There is one input decoder per window position D0..D3.
  D0 holds the oldest unconsumed character.
* **Word-line gates.** A row of length len ANDs its group detector with one
  decoder line from each of positions 0..len-1. The characters are
  programmable registers (`cfg_chars`, first character in bits 7:0). In a
  custom memory they would be fixed wiring.
* **Priority decoder.** Gates of several lengths may fire together. For
  example, "H" leads to one state and "HERS" to a super state. The priority
  decoder keeps the longest length and outputs the stride code P1P0 =
  length-1. Only gates of that length drive word lines.
* **Window.** `lookahead_window` holds eight characters (D7..D4 staging,
  D3..D0 in use). It shifts by the stride every clock, so after a stride of
  four, D4 lands in D0. It refills from `pkt_fifo`, which takes beats of
  1..4 characters.
* **Packet edges.** A step is taken when four characters are present, or
  when the packet's last character is in the window. `avail` stops gates
  from matching past the end of a packet or into the next one, so a super
  character never spans packets. Each packet starts at the root.

Timing:

* One step per clock while the FIFO has data; the testbench checks this rate.
* A step consumes 1..4 characters.
* The results of a step appear one clock later: `step_valid`, `step_len`,
  `match_valid`, `match_id`, and `match_end` (the offset of the last
  character consumed in the packet).
* A beat entering an empty engine produces its first step three clocks later.
* The engine asserts that at most one word line fires, and that a word line
  fires exactly when the priority decoder saw a hit.

A super state reports its match only at its end. Patterns must therefore be
compiled so that no pattern ends inside a super character: only chains
whose inner states report nothing may be collapsed.

## Four packets in one state loop

One state step is a long path: state register, detectors, word-line gates,
memory read, and back. `sam_fsm_pipelined` cuts this loop with three more
registers and fills the resulting four slots with four independent packets
(lanes):

```
 lane mux -> decoder (2 halves) -> reg A -> reg B -> 4 memory sub-arrays
      ^                                                  |
      |                                            output registers
      +------------ state register <---- hit mux <-------+
```

Details:

* In each clock, the state register holds the state of one lane.
  `lane_ready[l]` is high for that lane, and a character is taken if
  `lane_valid[l]` is also high.
* That lane's next state comes back four clocks later, when its turn comes
  round again.
* Each lane advances one character every four clocks. The engine as a whole
  takes one character per clock, at a clock limited by the slowest stage
  rather than by the whole loop.
* `lane_sop` restarts a lane at the root.
* A slot with no character leaves the lane's state unchanged.
* Results (`match_valid`, `match_lane`, `match_id`) come out four clocks
  after the character was taken. The testbench checks this latency.

Memory split:

* The rows are split into four sub-arrays of ceil(N/4) rows each.
* Decoder half 0 drives sub-arrays 0 and 1; half 1 drives sub-arrays 2
  and 3.
* The sub-array that was hit supplies the next code. With no hit, the lane
  goes back to the root.
* This engine has no super characters: one character per lane step.

## Programming

Both engines are loaded through write ports, one row per clock. Writes may
happen while the engine runs, but a row should not be changed while a stream
is using it.

* **Memory row `r`** (`mem_we`, `mem_row`, `mem_code`, `mem_match`): the code
  of state r and its match id.
* **Decoder row `r`** (`cfg_we`, `cfg_row`, `cfg_mask`, `cfg_tag`, ...): the
  detector for group G_r and the string that leads into S_r.
  * Look-ahead engine: `cfg_len` is the string length minus one, and
    `cfg_chars` holds the characters.
  * Pipelined engine: `cfg_char` is the single character.

A host compiler has to do four things:

1. Build the automaton.
2. Optionally collapse single-exit chains into super states.
3. Form the fan-in groups and pack them into clusters. Any partition into
   mutually independent groups works; fewer clusters give shorter codes.
4. Write each state's code and its group's mask and tag.

The testbench package `tb/sam_tb_pkg.sv` contains a small compiler of this
kind (the class `sam_table`). It builds either an Aho-Corasick machine from
a pattern list (single characters) or a random machine whose transitions
carry strings of 1..4 characters. It packs the groups with a greedy
first-fit clustering and steps a reference model.

## Files

| file | contents |
|---|---|
| `rtl/sam_fsm_pkg.sv` | default sizes, stride code type, match-tag width |
| `rtl/input_decoder.sv` | 8-bit character to 256 one-hot lines |
| `rtl/group_detector.sv` | masked tag compare |
| `rtl/priority_decoder.sv` | longest super-character length to stride code |
| `rtl/memory_decoder.sv` | detectors, input decoders, word-line gates, priority decoder |
| `rtl/memory_array.sv` | word-line addressed state memory, with a write port |
| `rtl/onehot_encoder.sv` | word lines to row index inside the array model |
| `rtl/state_register.sv` | current code; root after reset and at packet start |
| `rtl/lookahead_window.sv` | 8-character stride-shifting window |
| `rtl/pkt_fifo.sv` | beat FIFO in front of the window |
| `rtl/sam_fsm_engine.sv` | single-stream look-ahead engine |
| `rtl/sam_fsm_pipelined.sv` | four-lane interleaved engine |
| `rtl/sam_fsm_top.sv` | both engines side by side |

In an FPGA, block RAM has no word-line access. The memory model therefore
encodes the one-hot word lines into a row index and reads an array. In a
custom memory the word lines would drive the rows directly.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=<n> failures=<n>`. For example, with
Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_sam_fsm_engine \
    rtl/sam_fsm_pkg.sv $(ls rtl/*.sv | grep -v sam_fsm_pkg) \
    tb/sam_tb_pkg.sv tb/tb_sam_fsm_engine.sv
./obj_dir/Vtb_sam_fsm_engine
```

The packages must come before the files that import them.

| testbench | what it does |
|---|---|
| `tb_group_detector` | the 9-group example above, plus random masks |
| `tb_memory_decoder` | a small pattern machine with super characters, including the case where a longer and a shorter string both match |
| `tb_sam_fsm_engine` | 32 rows and 64-bit codes with a random machine: 300 random packets with random beat sizes and gaps, then a rate check of one step per clock |
| `tb_sam_fsm_pipelined` | 9 patterns on 4 lanes with random gaps and packet restarts; checks every result and the four-clock latency |
| `tb_sam_fsm_top` | both engines at the **default size** (1718 rows × 151 bits) with no parameter overrides. A 64-state random machine with super characters runs in the look-ahead engine, and a 16-pattern machine runs in the pipelined engine. Both are spread over the whole memory, and 400 packets are sent. It counts steps of each stride, root fallbacks, packet restarts, FIFO back-pressure, matches on each engine and lane, idle lane slots and hits in each sub-array, and fails if any of them never happened |
| `tb_sam_fsm_workload` | rule sets at the default size. It generates random patterns with the pattern and character counts of four of the original evaluation's rule sets, builds their automata without collapsing, and reports states and code width. It loads each set into both engines and checks every match of 40 packets per engine. Results: 5 patterns / 98 characters gives 99 states and 19-bit codes; 20 / 334 gives 328 states and 36 bits; 50 / 663 gives 639 states and 68 bits; 100 / 1291 gives 1220 states and 99 bits |

The full-size builds take about a minute each to compile with Verilator. The
top test then runs in about a second and the workload test in about half a
minute. Larger rule sets (200 patterns and more) have more characters than
the memory has rows unless chains are collapsed into super states, which
the testbench compiler does not do.

## Where this RTL departs from, or adds to, the published design

* **Root state code.** The published worked example lists the start state
  with no group and an all-zero code. Its own group lists, however, put the
  start state in two groups. This RTL follows the group lists: the root row
  carries its tags, otherwise no pattern could begin.
* **Root fallback.** When no gate fires, the engine goes to the root. How a
  word-line memory behaves with no word line raised is not specified, so
  this is a choice made here.
* **Word-line gate taps** are programmable character registers rather than
  wiring.
* **Shorter gates** are suppressed by comparing each gate's length with the
  chosen stride.
* **Match-tag width** is ceil(log2(P+1)) rather than ceil(log2 P). This is
  the same for 500 patterns.
* **Interfaces are added here:** packet framing (start and end flags, no
  super character across packets), the FIFO beat format and depth (16), the
  valid/ready handshakes, the output registers, and the reset behaviour
  (active-low asynchronous; detector masks cleared, memory rows not reset).
* **Pipelined engine.** The split of rows among the two decoder halves and
  four sub-arrays is chosen here. The two output multiplexers are written as
  one hit-select. This engine takes single characters only.
* **Engines are not combined.** The look-ahead engine and the pipelined
  engine are separate. The original presents them as separate techniques
  and never describes one engine with both.
* **Not built:** the state-encoding compiler (grouping, maximum-clique
  clustering, super-character selection). It is offline software. The
  testbenches use their own simpler version.
* **Clock rates are not checked.** The quoted throughput (4 Gb/s at 500 MHz
  with simple pipelining, 10–18 Gb/s in a custom memory) depends on the
  clock rate, which a simulation cannot show. The RTL reaches one character
  per clock in the pipelined engine and up to four per clock in the
  look-ahead engine.
