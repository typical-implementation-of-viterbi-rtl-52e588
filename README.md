# Rate-1/2 convolutional code with a look-ahead Viterbi-style decoder

This is a small error-correcting link. A convolutional encoder turns each
message bit into two code bits. A decoder receives the code bits after a
noisy channel and recovers the message, correcting isolated bit errors.

The decoder is not a classic Viterbi decoder. A classic one keeps a path
metric for every trellis state and traces back through a survivor memory.
This one follows a single path and makes one final decision per received
pair. When the received pair does not settle the decision, it looks one pair
ahead along each of the two candidate branches. The look-ahead is done by two
"sub machines" that run at twice the rate of the deciding "main machine", so
their answer is ready when the main machine needs it.

Everything is synthesizable SystemVerilog in `rtl/`. A self-checking
testbench for each module is in `tb/`.

## The code

The encoder is a 3-bit shift register, `Din -> M3 -> M2 -> M1`. On each
enabled clock edge the new bit enters M3. The two code bits come from the
register:

    a0 = M3
    a1 = M3 ^ M2 ^ M1

The two older bits (M2, M1) are the trellis state. In the state code used
throughout, the older bit is the high bit and the newer bit the low bit:
A = 00, B = 01, C = 10, D = 11. An input bit `u` moves state `{s1, s0}` to
`{s0, u}`. The pair emitted on that branch, written `{a1, a0}`, is
`{u ^ s1 ^ s0, u}`:

| state | input 0: pair, next | input 1: pair, next |
|-------|---------------------|---------------------|
| A 00  | 00, A               | 11, B               |
| B 01  | 10, C               | 01, D               |
| C 10  | 10, A               | 01, B               |
| D 11  | 00, C               | 11, D               |

Two things in this table drive the whole decoder design:

* **The two branches that leave a state carry complementary pairs.** A
  received pair is therefore at Hamming distance (0, 2) from the two
  branches if it arrived clean. It is at (1, 1) if one bit was flipped, and
  at (2, 0) if both bits were flipped.
* **States A and D emit only 00/11. States B and C emit only 10/01.** The two
  targets of any state are either {A, B} or {C, D}. So for any received pair,
  exactly one of the two targets has a branch at distance 0, and the other's
  best branch is at distance 1.

Example: the message 1001110, sent from state A, gives the pairs
11 10 10 11 01 11 00 and passes through the states A B C A B D D. Written as
one vector with the first pair in the low bits, that is `00110111101011`.

## How the decoder decides

The main machine holds the decoder's estimate of the encoder state. For the
pair being decoded it computes two metrics. W1 is the distance to the
state's input-0 branch, W2 the distance to its input-1 branch.

* **W1 < W2**: take the input-0 branch and decode 0.
* **W1 > W2**: take the input-1 branch and decode 1.
* **W1 = W2**: this means one bit was flipped. The branch is chosen by the
  path tracer bit PT: PT = 0 takes the input-0 branch, PT = 1 the input-1
  branch.

The decoded bit is always the low bit of the new state.

PT is produced from the **next** received pair:

1. Sub machine 1 places itself in the state the input-0 branch would reach.
   Sub machine 2 places itself in the input-1 target.
2. Each one computes the two branch metrics of the next pair from its state,
   and keeps the smaller one.
3. The minimum path identifier sets PT = 1 only if sub machine 2's minimum is
   strictly smaller.

By the second property above, one sub machine always reaches distance 0 and
the other distance 1, so the look-ahead never ends in a tie. (If it did, PT
would be 0.)

What this corrects:

* A single flipped bit, followed by an error-free pair, is always corrected.
  The first pair gives a tie. The next pair matches exactly one of the two
  continuations.
* More generally, single-bit errors are corrected as long as no two
  consecutive pairs both contain errors.

What it does not correct:

* Two flipped bits in one pair look like a clean pair on the wrong branch.
  They are decoded wrongly and are not flagged.
* An error in both the tied pair and the pair after it can send the
  look-ahead the wrong way.
* Decisions are final: there is no trace-back. After a wrong decision, the
  decoder continues from the wrong state until the received pairs bring it
  back.

`err_detect` is raised with every decoded bit whose pair did not match the
chosen branch exactly, i.e. every pair in which a single-bit error was seen
and corrected.

## Clocking and timing

The decoder runs at two rates. The pair register and the sub machines step
once per channel bit. The main machine steps once per pair. The design uses
**one clock**, the fast bit clock. `clkgen` keeps a phase bit that says which
of the two bit slots of a pair the current valid bit fills. The slower rate
becomes an enable every second bit.

Received bits are qualified by `rx_valid`, so the stream may pause. Channel
order is a0 first, then a1. After pair k+1 has been completed, the decoder
works like this:

    edge closing the pair's 2nd bit : temp1 <= pair k+1, temp2 <= pair k
    next cycle  (sub_load)          : sub machines capture from main state + temp1
    next cycle  (main_step)         : main machine decides pair k from temp2 + PT
    next cycle                      : out_valid = 1, out_bit = decoded bit k

With one bit per clock from the first cycle after reset, decoded bit k
appears in cycle 2k + 6 (counting from 0). Pairs complete at least two cycles
apart, so `sub_load` and `main_step` never overlap with the next pair's.

To decode the last bit of a message, one more pair must follow it on the
channel: send one flush bit.

In `viterbi_codec_top` the encoder takes message bit j at the end of cycle
2j + 1 (`msg_ready` is high in that cycle). Its pair is on the channel in
cycles 2j + 2 and 2j + 3. The decoded bit appears in cycle 2j + 8. The
channel carries bits only from the first loaded message bit on. The
encoder's reset contents are never sent.

## Modules

| file | role |
|------|------|
| `viterbi_pkg.sv` | state enum, pair/metric types, `next_state`, `branch_out`, `hamming` |
| `conv_encoder.sv` | 3-bit shift register encoder with clock enable; present and next state brought out |
| `clkgen.sv` | pair-slot phase; `pair_tick` marks the bit that completes a pair |
| `pair_register.sv` | serial-to-pair register: `temp1` newest pair, `temp2` the one before |
| `path_metric.sv` | Hamming distances of a pair to the two branches of a state |
| `sub_machine.sv` | look-ahead unit; parameter `BRANCH` = 0 or 1 picks which branch it follows |
| `min_path_identifier.sv` | PT from the two sub machine minima |
| `main_machine.sv` | four-state decision machine, decoded bit, tie and error flags |
| `viterbi_decoder.sv` | complete decoder; brings out temp1/temp2, W1/W2, NS metrics r1..r4 and PT for observation |
| `viterbi_codec_top.sv` | encoder, serialiser, channel (`noise` XOR) and decoder end to end |

Metrics are 2 bits wide (`METRIC_W`), the most a pair can differ by. There
are no other size parameters: the code, and so every width, is fixed. All
registers use a synchronous, active-low reset (`rst_n`). The encoder and
decoder reset to state A.

`viterbi_decoder` holds two concurrent assertions:

* on every main step, the sub machines follow the two branches of the
  current main state;
* the main machine only steps on a pair that has been received.

## Where this departs from the design it is based on

* **One clock instead of two.** The original has a main clock and a separate
  double-rate clock from a clock generator. Here both rates come from one
  fast clock and an enable.
* **Channel valid, flags and observation outputs are additions.** The
  `rx_valid` qualifier, the `err_detect` and `tie_used` flags and the
  observation outputs are this design's own. So is the `noise` XOR channel
  model in the top.
* **The metric is Hamming distance, with one pair of look-ahead.** The
  original's timing diagram agrees with this. For state A and pair 11 it
  shows W1/W2 = 2/0. For state B and pair 11 it shows 1/1, a tie, settled
  toward state C, with sub machine 1 metrics 0/2. For state C and pair 10 it
  shows 0/2. The decoder testbench reproduces these values.
* **Sub machine 2 computes its own metrics.** In that timing diagram, sub
  machine 2's metrics show the same values as sub machine 1's. Here each sub
  machine computes its metrics from its own state, as the block structure
  (two separate path-metric units) implies.
* **Constraint length.** The original calls the code "constraint length 2".
  The register it draws has three bits, which is constraint length 3 in the
  usual sense (two memory bits, four states). The three-bit register is
  built.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if it hangs. To build and run one with Verilator:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/viterbi_pkg.sv tb/viterbi_codec_top_tb.sv \
        --top-module viterbi_codec_top_tb -o sim
    ./obj_dir/sim

Replace the testbench name to run another.

* **Unit testbenches.** These are `conv_encoder_tb`, `clkgen_tb`,
  `pair_register_tb`, `path_metric_tb`, `sub_machine_tb`,
  `min_path_identifier_tb` and `main_machine_tb`. Each compares its module
  with the code table written out literally in the testbench. Inputs are
  exhaustive where the input space is small, random otherwise.
* **`viterbi_decoder_tb`.** Reproduces the metric values above. Decodes
  1001110 with no error and with every possible single-bit error. Checks the
  2k + 6 latency. Then decodes 120 random messages, with random gaps in the
  bit stream. Every output bit is compared with a reference model of the
  decision rule written in the testbench.
* **`viterbi_codec_top_tb`.** Runs the whole link without parameter
  overrides. Checks the transmitted bits of the example. Sends three
  2100-bit messages with isolated single errors, which must come back
  exactly. Sends four 2100-bit messages at bit error rates from 3 % to 15 %,
  checked against the reference model. It counts how often each decision
  kind occurs (W1 < W2, W1 > W2, tie with PT = 0, tie with PT = 1, error
  detected) and fails if any of them never occurs.

All testbenches run in well under a second.

## How far to trust it

Every module matches the code table and the decision table it was built
from, in every case those tables list. The decoder's behaviour matches an
independent model of its decision rule on random, noisy streams.

The correction ability is that of the decision rule, and no more: isolated
single-bit errors. Its error rate under heavier noise has not been
characterised against a full Viterbi decoder, and it will be worse than
one's, since this design keeps no survivor paths.
