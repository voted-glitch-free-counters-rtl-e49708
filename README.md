# Voted glitch-free counters

Some counters have to work where a single flip-flop can be upset at any time,
for example by a cosmic-ray strike. They also have to drive edge-triggered
logic straight from decoded count states. Two properties are wanted:

* **Single bit-flip immunity.** One flipped flip-flop must never show at the
  counter's output. The fault must also clear by itself, without stopping,
  resetting or rewinding the counter.
* **Glitch-free decoding.** A gate that decodes one count must not pulse
  while the counter moves between two other counts. This is only guaranteed
  if a single bit changes on every clock edge.

The two properties are independent. Immunity comes from redundancy and
voting or correction. Glitch-free decoding comes from the order in which
the count bits change. This RTL holds five counters that each show one or
both properties. The main one is the **cascaded TMR ring counter**. It gets
the flip-flop economy of a binary counter, and every flip-flop is
triple-modular redundant (TMR).

| Counter | Module | Bit-flip immune | Glitch-free decode | State for N flip-flop positions |
|---|---|---|---|---|
| Hamming-code binary counter | `hamming_counter` | yes (ECC) | no | 2^N states, N + m flip-flops |
| TMR binary counter | `tmr_binary_counter` | yes (vote) | no | 2^N states, 3N flip-flops |
| Johnson ring counter | `johnson_counter` | no | yes | 2N states, N flip-flops |
| TMR Johnson ring counter | `tmr_ring_counter` | yes | yes | 2N states, 3N flip-flops |
| Cascaded TMR ring counter | `cascaded_ring_counter` | yes | per stage | 4^(N/2) = 2^N states, 3N flip-flops |

All five sit side by side in `voted_counters_top`, sharing one clock and one
reset, each with its own outputs. All counters are free running: they
advance by one on every rising clock edge and have no enable. Every module
resets asynchronously through the active-low `rst_n` to count 0, and resets
all redundant copies.

## The TMR bit and the vote

`tmr_register` holds each bit in three D flip-flops (copies a, b, c). All
three load the same data on the same edge. A two-out-of-three majority gate
(`maj3`: three 2-input ANDs into an OR) forms the output. If one copy is
upset, the vote still gives the right value. In every counter here the next
state is computed from the *voted* outputs and loaded into all three
copies. The bad copy is therefore rewritten with the right value at the
next edge, with no separate scrubbing logic. Two copies of the same bit
flipped within one clock period defeat the vote. The design relies on
that being rare enough, given the clock rate.

Synthesis tools merge flip-flops that have the same input and clock.
A real TMR implementation must stop them from merging the three copies,
for example with a keep/dont-touch constraint on `ff_a`, `ff_b` and `ff_c`
in the flow.

## The Hamming-code counter

`hamming_counter` protects a binary count with a single-error-correcting
Hamming code. For `INFO_W` count bits it stores `m` parity bits, where `m`
is the smallest number with 2^m - 1 - m >= `INFO_W`:

| m | total bits | information bits |
|---|---|---|
| 2 | 3 | 1 |
| 3 | 7 | 2-4 |
| 4 | 15 | 5-11 |
| 5 | 31 | 12-26 |
| 6 | 63 | 27-57 |
| 7 | 127 | 58-120 |

Data flow each cycle (C = count register, P = parity register):

1. **Correction** (`hamming_correct`). The syndrome is
   S = parity(C) XOR P. Each count bit i has a code: the set of parity
   bits that cover it, always two or more. When S equals the code of bit i,
   bit i is inverted: Cout = C XOR E. A flipped parity bit gives a syndrome
   with a single 1, which matches no count bit, so Cout is unaffected.
2. **Next count** (`binary_next_count`). NC0 = NOT Cout0 and
   NCi = Couti XOR (Cout(i-1) AND ... AND Cout0). The AND terms form one
   shared chain.
3. **Next parity** (`hamming_parity`) computes the parity bits of NC.
4. C and P load NC and NP on the clock edge.

Cout is the counter output. An upset in C or P is corrected at the output
at once, and the next edge stores a clean code word.

For 4 count bits the parity sets are:

    P0 = C2 ^ C1 ^ C0      codes (S2 S1 S0):  C0 = 101   C1 = 111
    P1 = C3 ^ C2 ^ C1                         C2 = 011   C3 = 110
    P2 = C3 ^ C1 ^ C0

For other widths the code of count bit i is the i-th number, in ascending
order, among the numbers with two or more bits set (3, 5, 6, 7, 9, ...).
`hamming_pkg` computes these sets with constant functions and supports up
to 120 count bits (m = 7).

In a real circuit this counter is less strongly immune than a TMR counter.
A flipped C bit reaches the output XOR directly, and its correction term
goes through the longer syndrome path. So for a moment after the upset
the wrong count is visible. If a clock edge lands in that window, a wrong
next count can be stored. A TMR vote has no such window. This RTL has no
delays, so its simulation cannot show the effect. The trade-off against
TMR: a 4-bit counter needs 7 flip-flops (TMR: 12), and a 16-bit counter
needs 21 (TMR: 48). The Hamming counter also has more logic levels to its
output.

## Why a Johnson counter decodes without glitches

An N-bit Johnson counter (`johnson_counter`) is a shift register whose
first input is the complement of its last output. Written Q0 Q1 Q2 Q3, the
4-bit sequence is

    0000 1000 1100 1110 1111 0111 0011 0001 (then 0000 again)

Exactly one bit changes per clock, so a decode gate never sees an
intermediate state. Each count is picked out by a single 2-input AND of
two neighbouring bits (`johnson_decoder`):

| count | term |
|---|---|
| 0 | Q0* AND Q(N-1)* |
| k, 0 < k < N | Q(k-1) AND Qk* |
| N | Q0 AND Q(N-1) |
| N+k, 0 < k < N | Q(k-1)* AND Qk |

(`*` is the complement output.) The price is state economy: N flip-flops
give only 2N states, against 2^N for a binary counter.

`tmr_ring_counter` is the same counter with every flip-flop replaced by a
TMR bit. For N = 4 that is 12 flip-flops. It is immune and glitch-free,
but still has only 2N states.

## The cascaded TMR ring counter

The key observation is that a **2-bit** Johnson counter has 4 states, as
many as a 2-bit binary counter. `ring_stage` is one such 2-bit stage with
TMR bits. It acts as one base-4 digit:

| digit | Q0 Q1 | Q1 Q0 as the `q` vector |
|---|---|---|
| 0 | 0 0 | `2'b00` |
| 1 | 1 0 | `2'b01` |
| 2 | 1 1 | `2'b11` |
| 3 | 0 1 | `2'b10` |

The value of a digit is {Q1, Q0 XOR Q1}.

`cascaded_ring_counter` chains `STAGES` of these stages. All stages share
one clock:

* Stage 0 has its carry input tied to 1, so it counts every clock.
* Each stage drives `cout = cin AND Q0* AND Q1`. That is 1 in the cycle
  when the stage is at digit 3 and is enabled, so it is about to wrap to 0.
* Stage s+1 takes stage s's `cout` as its `cin`. It steps on the same edge
  on which stage s wraps.
* When `cin` is 0, a stage reloads its own voted value. This holds the
  digit and also rewrites any upset copy.

Eight stages give 4^8 = 65536 states from 16 bit positions, the same
economy as a 16-bit binary counter, with 48 flip-flops.

The decode is glitch-free only within a stage. Each stage has its own
4-line decoder (`stage_dec[s]`), and only one bit of a stage changes per
edge. But when a lower stage wraps, several stages step on the same edge.
For example, going from 0x0FFF to 0x1000 moves seven stages at once. So a
decode that ANDs lines from several stages can glitch, just as with a
binary counter. Stage 0 wraps on one edge in four, so this happens on a
quarter of all edges: the end-to-end test counts 16,400 of them in 65,600
clocks.

## Interface of `voted_counters_top`

| Port | Width | Meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | clock (rising edge), asynchronous active-low reset |
| `casc_q` | 2·CASCADE_STAGES | cascaded counter: stage s in bits [2s+1:2s] |
| `casc_dec` | CASCADE_STAGES × 4 | per-stage one-hot decode; `casc_dec[s][k]` = stage s holds digit k |
| `ring_q`, `ring_dec` | RING_N, 2·RING_N | TMR ring counter bits and one-hot decode |
| `ham_count`, `ham_syndrome` | HAMMING_W, m | corrected Hamming count and syndrome (nonzero while an error is held) |
| `tmr_count` | TMR_BIN_W | voted TMR binary count |
| `john_q`, `john_dec` | JOHNSON_N, 2·JOHNSON_N | plain Johnson counter bits and decode |

The defaults are CASCADE_STAGES = 8, RING_N = 4, HAMMING_W = 4,
TMR_BIN_W = 4 and JOHNSON_N = 4. Outputs change one clock-to-Q delay after
each rising edge. The voter and decoder paths are purely combinational.
So is the Hamming correction.

## Choices made in this implementation

These points are this design's own choices. They are not taken from the
counter description the design follows:

* **Reset.** Every counter has an asynchronous active-low reset to 0. The
  reset clears all TMR copies and both Hamming registers.
* **Cascade timing.** The cascade is synchronous: carries act as count
  enables on one shared clock, not as ripple clocks. A held stage reloads
  its voted value through a 2:1 selector on each bit. The exact carry
  gating (cin AND Q0* AND Q1, two 2-input ANDs) was chosen to match the
  stated count of two carry AND gates per stage. The hold selectors add
  gates that a ripple-clocked stage would not need.
* **Decode terms.** The decoder terms are one valid choice of the
  one-AND-gate decode.
* **Hamming codes for other widths.** The parity coverage for widths other
  than 4 is this design's own, described above.
* **Syndrome port.** `ham_syndrome` is brought out so that corrections can
  be observed.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares
against an independent reference model or a literal table, and ends by
printing `TB_RESULT checks=N failures=M`. Bit flips are injected by
`force`/`release` of single flip-flop copies (TMR) or single code-word bits
(Hamming), right after a clock edge. The tests check that:

* the output is unaffected;
* the next count is right;
* the redundancy is clean again after the following edge.

| Testbench | What it runs |
|---|---|
| `tb_tmr_register` | random loads; single upsets masked; a double upset outvotes; next edge repairs |
| `tb_binary_next_count` | exhaustive at 4 bits, random and corner values at 16 |
| `tb_hamming_parity` | 4-bit case against the parity equations; 16-bit case against a code table |
| `tb_hamming_correct` | every 4-bit word with every single flip; 16-bit random words with every single flip |
| `tb_hamming_counter` | 4- and 16-bit counters, 66000 clocks (full 16-bit wrap), an upset on 3 of every 4 clocks |
| `tb_hamming_sizes` | widths 1, 4, 11, 26, 57, 120 (m = 2..7) with upsets |
| `tb_tmr_binary_counter` | 4- and 16-bit counters, full 16-bit wrap with upsets |
| `tb_johnson_counter`, `tb_johnson_decoder` | the 4-bit sequence above, one-bit-per-clock, decoders at N = 2, 4, 8 |
| `tb_tmr_ring_counter` | sequence, one voted bit per clock, upsets |
| `tb_ring_stage` | random carry-in against a base-4 digit model, carry-out, upsets |
| `tb_cascaded_ring_counter` | 8 stages, 65600 clocks: digits, decodes, at most one bit per stage per edge, every stage carried into, one wrap |
| `tb_voted_counters_top` | whole design at default sizes, 65600 clocks, upsets in every protected counter each cycle; checks that each mechanism (vote masking, Hamming correction, check-bit error, carry into each stage, wraps, multi-stage edges, every decode line) occurs |

To run one, for example the end-to-end test (well under a second):

    verilator --binary --timing --assert -Irtl rtl/hamming_pkg.sv \
        tb/tb_voted_counters_top.sv --top-module tb_voted_counters_top
    ./obj_dir/Vtb_voted_counters_top

Use `+verilator+rand+reset+2` to start un-reset state at random values.
Other testbenches are run the same way, with `hamming_pkg.sv` listed first.

What the tests cannot show:

* The timing window of the Hamming counter (see above), since simulation
  has no delays.
* Glitches themselves. The tests check the one-bit-per-edge property that
  rules them out, not the decoder's analog behaviour.
* Double upsets within one clock period. These are outside what any of
  these counters correct.
