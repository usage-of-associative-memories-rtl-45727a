# Error detection and correction with Hopfield associative memories

This design sends the letters of a small alphabet over a noisy channel as code
words whose pairwise Hamming distance is at least 7. The receiver does not
decode them with syndrome arithmetic. It uses an **associative memory**: a bank
of Hopfield neural networks that have learnt the code words as stable states.
A corrupted word is given to every network at once. Each network relaxes into a
low-energy state, and the result with the lowest energy is taken as the
corrected word. A table then turns that word back into a letter. If the
recalled word is not a code word at all, the error is flagged as detected but
not corrected.

The default build is the 64-letter configuration:

| | |
|---|---|
| alphabet | 64 letters (6 bits) |
| code word | 19 bits, minimum distance 7: a (19,6) code |
| associative memory | 10 Hopfield networks of 19 neurons each |
| weight circuits | 10 × 19·18/2 = 1710 up/down counters |
| learnt words | 32, plus their 32 complements, which are stored automatically |
| decode latency | k + 3 clock cycles, where k ≤ `MAX_ITER` = 16 is the number of network updates |
| size (generic synthesis) | about 34.6k word-level cells and 7.9k flip-flop bits |

The two 32-letter configurations are obtained by parameters alone: 16-bit
words in 6 networks, or 23-bit words in 4 networks (see *Configurations*).

**Read *Measured correction* before relying on this design.** The RTL carries
out the scheme exactly as specified here, and every output matches an
independent model cycle for cycle. But in the 64-letter configuration the
scheme recovers only about one letter in five, even with no channel errors.
The 23-bit, 4-network configuration behaves much better.

## How a letter travels

```
 letter ──► code_encoder ──► enc_word ══ channel ══► dec_word ──► edac_decoder ──► letter / found / error
            table of 32 words                                    assoc_mem (10 × hop_net + hop_select)
            + inverter                                           code_lookup(word), code_lookup(~word)
            + select by LSB                                      letter_select
```

* **Encoder** (`code_encoder`). The table holds one word per *pair* of
  letters. Letter `2m` is sent as word `w_m` and letter `2m+1` as its bitwise
  complement `~w_m`. The letter's upper bits address the table, and its LSB
  drives the selection between the word and the inverter output.
* **Channel.** This is not part of the hardware. The top level has separate
  ports: `enc_word` out and `dec_word` in. The testbenches flip bits between
  the two.
* **Decoder** (`edac_decoder`). The associative memory returns a recalled
  word. The recalled word is compared with the table, and its complement with
  a second copy of the table:
  * a hit in the first copy gives letter `{index, 0}`;
  * a hit in the second gives `{index, 1}`;
  * no hit raises `error`.

  `corrected` tells whether the recalled word differs from the received one.

## The Hopfield network (`hop_net`)

This is the heart of the design and its largest part.

**Bipolar view.** A bit `1` stands for +1 and a bit `0` for −1. The product of
two such values is the "bipolar operator" of two bits: +1 when the bits are
equal, −1 when they differ.

**Weights are circuits.** Every pair of neurons `(i, j)` has one weight circuit
(`hop_weight`), a signed up/down counter. It serves as both `w_ij` and `w_ji`,
and `w_ii = 0`. During learning, each `learn` strobe presents a pattern. Every
counter steps +1 if its two bits agree and −1 if they differ. This is Hebb's
rule, `w_ij = Σ_patterns p_i·p_j`. The rule is unchanged when a pattern is
negated, so **learning a word also stores its complement**. This is why only the
32 words of even letters are learnt. A network of N neurons has N(N−1)/2
counters. The counter width is `weight_width(max words per network)`, 4 bits at
the defaults, so the counters never saturate in practice.

**Neurons** (`hop_neuron`). Neuron `i` adds up its weights, each signed by the
other neuron's state: `h_i = Σ_{j≠i} w_ij·s_j`. It then applies the threshold:
the next state is 1 if `h_i > THETA` and 0 otherwise. A sum exactly at the
threshold therefore gives 0 (−1). This detail matters (see below).
`THETA = 0`.

**Recall.** Recall is a small state machine:

1. `start` loads `x_in` into the state register.
2. On every clock, all N neurons update together from the current state. This
   is a synchronous update: X(t+1) is computed from X(t).
3. Recall stops on the first cycle where the next state equals the current one
   (`converged = 1`), or after `MAX_ITER` updates (`converged = 0`). Synchronous
   Hopfield updates can fall into a two-state oscillation, and the limit catches
   that case.

**Energy.** The network computes `2E = −Σ_i s_i·h_i + THETA·Σ_i s_i`
combinationally from the same `h_i` the neurons produce. This is twice the
usual Hopfield energy, so it stays an integer. It reports two values:

* `e_out`: the energy of the final state;
* `de_out`: the energy fallen during recall, `E(input) − E(final)`.

**Timing.** Take `start` as sampled at clock edge 0, with k updates needed.
`done` is high for the one cycle after edge k+1, and `valid` stays high with
the results until the next `start`. `learn`, `clear` and `start` are ignored
while `busy` is high, and assertions flag attempts to use them then.

## Choosing among the parallel networks (`assoc_mem`, `hop_select`)

A Hopfield network of N neurons reliably stores only about 0.18·N words. With
complements counted, that is about 0.36·N: 6.8 for N = 19. A single network
large enough for 64 words would need about 178 neurons and 178-bit code words.
So the code words are spread instead:

* word k goes to network `k mod NNET`;
* at the defaults, networks 0 and 1 hold 4 words and the others hold 3.

A received word goes to all networks at the same time, and `assoc_mem` waits
for the slowest. `hop_select` then picks a result by these rules:

1. the lowest final energy;
2. among equal energies, the lowest energy difference;
3. among full ties, the lowest network number.

`assoc_mem` pulses `done` after edge max(k)+2. `edac_decoder` registers the
table stage one cycle later, giving a total of k+3 cycles.

## Code words (`hop_pkg::LEXICODE`)

The table is the greedy lexicographic code. Entry k is the smallest even integer
whose distance to every earlier entry, and to the complement of every earlier
entry, is at least 7. It has three convenient properties:

* all 32 entries fit in 19 bits;
* the first 16 entries fit in 16 bits, and they are the 16-bit code of the same
  construction;
* zero-extended, the entries still satisfy the distance rule at 23 bits.

So one table serves all three configurations. The testbenches recompute the
code from this rule instead of copying it. Any other code with the same
distance property could replace it; the table is a single constant in
`hop_pkg`.

## Configurations

| configuration | `N` | `NNET` | `NLETTERS` | weight circuits | tested by |
|---|---|---|---|---|---|
| 64 letters, (19,6) code (default) | 19 | 10 | 64 | 1710 | `tb_hopfield_edac` |
| 32 letters, (16,5) code | 16 | 6 | 32 | 720 | `tb_hopfield_edac_32` |
| 32 letters, (23,5) code | 23 | 4 | 32 | 1012 | `tb_hopfield_edac_32` |

`NLETTERS/2` must not exceed 32, the size of the table. The table is valid for
`N ≥ 16` with up to 16 words, and for `N ≥ 19` with up to 32.

## Measured correction

Each end-to-end test sends random letters through a channel that flips 0 to 4
distinct random bits, then counts how often the right letter comes out. The
figures below are for the seeds used by the testbenches, with 400 trials per
row (64-letter) or 200 (32-letter):

| channel errors | 64 letters, 19×10 | 32 letters, 23×4 | 32 letters, 16×6 |
|---|---|---|---|
| 0 | 20 % (60 % flagged) | 100 % | 25 % |
| 1 | 13 % | 95 % | 23 % |
| 2 | 13 % | 80 % | 29 % |
| 3 | 19 % | 67 % | 27 % |
| 4 | 16 % | 53 % | 26 % |

So the target of correcting three errors and detecting four is **not** reached
by the 64-letter and 16-bit configurations. The 23-bit configuration comes
closest. The cause is the selection rule, not the networks themselves:

* in the 64-letter configuration, every code word and every complement is a
  stable state of the network that learnt it, so the right network returns an error-free word unchanged;
* but other networks settle, from the same input, on their own stored words or
  on spurious states, often with a *lower* energy;
* energies of different networks are not on a common scale, because networks
  hold different numbers of words and the overlaps between those words differ.

The tie rule (a sum equal to the threshold gives −1) and the synchronous update
make this worse. In the single-network test, about 40 % of the recalls of
corrupted and random words end at the `MAX_ITER` limit instead of at a stable
state.

With 16-bit words the networks always settle on some code word, so no error is
ever flagged as detected.

## What follows the scheme and what is this design's own

The following come from the scheme: table encoder with LSB-controlled
inversion, parallel Hopfield networks, Hebbian up/down-counter weights, the
threshold neuron, the energy function, selection by minimum energy and then
minimum energy difference, two decoder tables (direct and inverted) with
"found" outputs, and the three configurations and their weight-circuit counts.

The following are this design's choices:

* the code words (greedy lexicode);
* which network stores which word (round robin);
* `THETA = 0`;
* synchronous update with `MAX_ITER = 16`;
* reading the "energy difference" as the energy fallen during recall;
* using the current state in the threshold term of the energy;
* lowest-index tie break;
* the `error` flag as the way detection is reported;
* the learning sequencer (`learn_ctrl`: one `clear` cycle, then one word per
  cycle after reset, `ready` after `NLETTERS/2 + 1` cycles);
* single clock, active-low asynchronous reset, start/done handshakes;
* all widths.

## Files

All modules are in `rtl/`, one per file:

| module | role |
|---|---|
| `hop_pkg` | code word table, helper functions for sizes |
| `hop_weight` | weight circuit: Hebbian up/down counter |
| `hop_neuron` | weighted sum and threshold |
| `hop_net` | one Hopfield network: weights, neurons, energy, recall FSM |
| `hop_select` | choice among networks |
| `assoc_mem` | NNET networks in parallel plus selection |
| `code_encoder` | letter to code word |
| `code_lookup` | code word to index, with found flag |
| `letter_select` | letter from the two table lookups, or error |
| `edac_decoder` | assoc_mem, two lookups, letter_select |
| `learn_ctrl` | learns the code words after reset |
| `hopfield_edac` | top: encoder, learning sequencer, decoder |

`tb/` has one self-checking testbench per module (`tb_<module>`), and also:

* `tb_hopfield_edac_32` for the 32-letter configurations;
* `hop_ref_pkg`, the reference model: lexicode search, Hebb matrices, integer
  recall loop, selection, letter lookup;
* `edac_e2e_harness`, used by the 32-letter test.

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/hop_pkg.sv tb/hop_ref_pkg.sv tb/tb_hopfield_edac.sv \
    --top-module tb_hopfield_edac -o sim
./obj_dir/sim
```

Replace `tb_hopfield_edac` with any other testbench name. The full-size
end-to-end test (2000 decodes) runs in about a second. To try another
configuration, override `N`, `NNET` and `NLETTERS` on `hopfield_edac`, as
`tb_hopfield_edac_32` does. To change the code, edit `LEXICODE` in `hop_pkg`
and the `lexicode` function in `hop_ref_pkg` together.
