# Rate-1/2 convolutional codec from reversible gates, with a memoryless parallel Viterbi decoder

This is a convolutional encoder and a matching hard-decision Viterbi decoder.
Every logic function is written as a composition of reversible gates: Feynman
(CNOT), Toffoli, Peres and Fredkin. The code has constraint length 3 and
rate 1/2, with generators 111 and 101 (octal 7 and 5). From the all-zero
state the message `10100` encodes to `11 10 00 10 11`.

The decoder does not use a survivor path memory. The whole trellis of a block
of N symbol pairs is unrolled in space as combinational logic. Each state node
keeps a one-bit decision. A backward chain of one-bit "flags" marks the states
on the best path, and the decoded bits are read straight off those flags.
Nothing is clocked inside the decoder. A block of received pairs goes in, and
after one combinational delay the decoded block comes out.

## Code and trellis conventions

Everything below depends on these conventions.

* **State.** The two most recent message bits, numbered `{older, newer}`. So
  bit 0 of the state index is the last bit that entered the encoder. An input
  bit `u` takes state `s` to `{s[0], u}`.
* **Branch word.** Input `u` in state `s` emits the pair
  `{u ^ s[0] ^ s[1], u ^ s[1]}`. The first bit is the 111 generator and the
  second is the 101 generator. This is `conv_pkg::branch_word`.
* **Predecessors.** State `t` has two predecessors. Predecessor `j` is
  `{0, t[1]}` and predecessor `jn` is `{1, t[1]}`. The bit that separates them
  is the bit that falls out of the encoder's register. So a one-bit decision
  per state is enough to trace a path backwards: the predecessor of `t` with
  decision `d` is state `2d + t[1]`.
* **Stages.** The encoder is in state 0 at stage 0. Symbol pair `rx[j-1]` is
  received on the branches from stage j-1 to stage j. The decoder works on
  stages 1 to N, and decoded bit `j-1` is the newest bit of the survivor state
  at stage j.

## Decoder structure

`viterbi_decoder` has three parts: `path_metric_trellis`, then
`traceback_unit`, then `flag_decoder`.

### The ACS unit is organised per state, not per branch

In a textbook ACS, the branch metric is added first and the comparison comes
after. Here `acs_unit` does it the other way round:

1. It **selects** the smaller of the two candidate metrics that reach its
   state, using `compare_select`. That unit is a 4-bit comparator plus a
   Fredkin-gate 2:1 multiplexer. The result is the state's path metric `pm`
   and its decision `c`.
2. It then **adds** the branch metric of each of the state's two *outgoing*
   branches to `pm`. Each addition has its own `branch_metric_unit` and its
   own 4-bit adder made of Peres-gate full adders. The two sums are the
   candidates sent to the two successor states in the next stage.

The result is the same as the textbook ACS, since min(a+x, b+y) is computed
as min over the candidates that were already formed upstream.

Because of this organisation, the ends of the trellis look different from the
middle:

* **Stage 0 has no ACS.** Two branch metric units compare `rx[0]` with the
  words `00` and `11`. Their outputs are the candidates of states 0 and 1 at
  stage 1.
* **Stage 1 has ACS units only for states 0 and 1**, the only reachable ones.
* **Stage N has compare-and-select units only**, because no branch leaves it.
  A tree of three more compare-and-select units (states 0/1, states 2/3, then
  the two winners) picks the final state with the smallest metric. The block
  is not terminated, so the decoder does not force the path to end in state 0.

### Unreachable predecessors

In stages 1 and 2, some candidate inputs have no real predecessor. These
inputs are tied to `UNREACH`, the all-ones metric (15 at 4 bits), so a real
metric always wins against them. This only works while every real metric
stays below 15. A metric at stage j is at most 2j, so the trellis needs
`2N <= 2^W - 2`. An elaboration-time `$error` enforces this. With the default
`W = 4`, N can be at most 7. For longer blocks, widen `W`: for example
`W = 5` allows N up to 15. There is no metric normalisation and no
saturation, because the blocks are short enough not to need them.

### Trace back with flags

`traceback_unit` works backwards from the last stage:

* **Final stage.** A root flag of 1 is split by the minimum tree's decisions.
  This marks exactly one state at stage N.
* **Earlier stages.** For each stage back, every state passes its flag to the
  predecessor it kept. `traceback_cell` computes `f & ~c` towards `j` and
  `f & c` towards `jn`, using two Feynman gates (buffer and inverter of `c`)
  and two Toffoli gates used as AND gates.
* **Merging.** Each state ORs the two flags it can receive from its two
  successors. The OR is a Fredkin gate with its third input tied to 1.

The flags stay one-hot at every stage, and the flagged states are the survivor
path. `flag_decoder` then reads each stage's decoded bit as
`flag[1] XOR flag[3]` (a Feynman gate). Those are the two states whose newest
bit is 1.

Tie-breaking is fixed in one place. A compare-and-select unit keeps its first
input unless the second is strictly smaller. So among equal metrics, the lower
predecessor and the lower final state win.

## Encoder and top level

`conv_encoder` is a three-cell shift register: the current bit and the two
before it. Two Feynman gates compute the outputs:

* `c1 = m ^ cell2`
* `c2 = c1 ^ cell1`

The pair is sent as `{c2, c1}`. A bit applied with `in_valid` produces its
pair in the next cycle, with `code_valid`. `clr` clears the register at the
same clock edge that shifts in a new bit.

`conv_codec_top` connects the bit-serial encoder to the block-parallel decoder:

* **Blocks.** Message bits are grouped into blocks of N. The encoder is
  cleared with the first bit of each block, so every block starts in state 0.
* **Buffer and error mask.** Each symbol pair is written into an N-entry
  buffer. On the way in it is XORed with an error mask, which stands in for
  the channel. `err_mask` is sampled with the first bit of each block. Bits
  `2i+1:2i` hit pair `i`, and bit `2i+1` hits the pair's first bit.
* **Output timing.** `block_valid` pulses exactly 2 cycles after the last
  `msg_valid` of a block. In that cycle `decoded` holds the block (bit 0 is
  the first message bit) and `decoded_pm` holds the Hamming distance of the
  chosen path.
* **Flow.** Blocks may follow each other with no gap, and `msg_valid` may
  drop in the middle of a block.

The buffer, the framing, the error-mask input and the output register belong
to this implementation. They are here only to make the codec usable end to
end.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `K` | 3 | `conv_pkg` | constraint length (the trellis code assumes 4 states) |
| `N` / `N_STAGES` | 5 | top, decoder, trellis, trace back | symbol pairs per block = trellis stages |
| `W` / `PM_W` | 4 | top, decoder, trellis, ACS, adders, comparator, mux | path metric width |

## Files

* `rtl/conv_pkg.sv`: constants, `symbol_t`, `state_t` and `branch_word`.
* Gates: `feynman_gate`, `toffoli_gate`, `peres_gate`, `fredkin_gate`.
* Arithmetic built from gates: `rev_full_adder` (two Peres gates), `rev_adder`
  (ripple carry), `magnitude_comparator`, `fredkin_mux`, `compare_select`,
  `branch_metric_unit`, `acs_unit`.
* Decoder: `path_metric_trellis`, `traceback_cell`, `traceback_unit`,
  `flag_decoder`, `viterbi_decoder`.
* `conv_encoder` and the top level, `conv_codec_top`.
* `tb/`: one self-checking testbench per module, plus `conv_ref_pkg`. That
  package holds a plain software encoder and a textbook register-exchange
  Viterbi decoder, and the testbenches compare against it.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

* **Gates, adders, comparator and multiplexer.** Checked exhaustively. The
  gate testbenches also check that each gate is one-to-one.
* **Trellis.** Checked on all 1024 possible received blocks for N = 5: every
  reachable state's metric and decision, and the final state.
* **Decoder.** Checked on all 1024 possible received blocks, on every clean
  codeword, and on every single-bit error in the first three pairs. A 12-stage
  instance with 5-bit metrics is also checked on 3000 random blocks.
* **Worked example.** `01 10 10 10 11` (the codeword of `10100` with two bit
  errors) decodes to `10100` with metric 2. The metrics at stages 1 and 2 are
  1, 1 and 2, 2, 1, 3.
* **Top-level testbench.** `conv_codec_top_tb` runs at the default parameters.
  It sends about 400 blocks: clean, with single errors and with random error
  masks. It checks every result and the 2-cycle latency. It also counts
  error-free decodes, corrected blocks, back-to-back blocks, blocks that start
  from a non-zero encoder state, and idle cycles inside a block. A mechanism
  that never occurred counts as a failure.

To run one testbench with Verilator (the packages come first):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/conv_pkg.sv tb/conv_ref_pkg.sv tb/conv_codec_top_tb.sv \
  --top-module conv_codec_top_tb -o sim && ./obj_dir/sim
```

## Limits and departures

* **Gates are logic, not circuits.** The reversible gates are modelled at the
  logic level. Garbage outputs are brought out of each gate and then left
  unused. A synthesis tool will merge the gates into ordinary logic, so no
  reversibility or power claim carries over to a netlist.
* **No transistor-level models.** The transistor-level (gate diffusion input)
  realisation of the adder, comparator, multiplexer and compare-and-select
  unit, and its power and delay figures, are outside this RTL.
* **Missing predecessors use 15, not 16.** The original design marks missing
  predecessors with 16, which does not fit 4-bit metrics. The all-ones value
  15 is used instead (see "Unreachable predecessors").
* **Tie-breaking is a local choice.** The original design does not say which
  way a compare-and-select unit goes on equal metrics. The choice here is
  described above.
* **Encoder gates.** The encoder figure is captioned as using Toffoli gates,
  but both gates it draws have a single control. They are built as Feynman
  (CNOT) gates.
* **Long combinational path.** The decoder is one long combinational path
  through N stages of ACS logic. Its delay grows linearly with N, and nothing
  here pipelines it.
