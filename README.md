# Adaptive Viterbi decoder for a coarse-grained reconfigurable tile

This is a Viterbi decoder for convolutional codes whose code can change at run time:
constraint length K from 3 to 7, rate 1/2, 1/3 or 1/4, any generator polynomials, and a
decision depth that can be changed while it decodes. It is organised the way the algorithm
maps onto a MONTIUM-style coarse-grained tile, with a 16-bit datapath, 512 x 16 local
memories, and ALUs given an add-compare-select operation. The reference case is the DAB
broadcast code: rate 1/4, K = 7, generators 133/171/145/133 octal, decision depth 50. In
that case the decoder produces 10 decided bits every 421 clock cycles, which is
2.4 Mbit/s at 100 MHz. DAB needs 1.8 Mbit/s.

The design follows the published mapping of the Viterbi algorithm onto the MONTIUM tile:
- a branch metric unit whose results are kept in registers next to the ALUs;
- add-compare-select inside the ALU;
- path metrics moved between two memory pairs whose roles swap every stage;
- register exchange with pointers for the survivors;
- a minimum search and a survivor look-up every ten stages.

What is not taken from that mapping is this design's own choice. That covers the cycle
schedule, the state-to-memory mapping, the normalisation, the soft-value format, the
memory layout of the survivor words and the interfaces. These choices are marked below
and in each file's header.

## The trellis and its butterflies

A state holds the last K-1 input bits, with the newest bit in the most significant
position. State `s` therefore moves to `s/2` on a decoded 0 and to `(s+N)/2` on a decoded 1,
where N = 2^(K-1). The two sources `2b` and `2b+1` share their two targets `b` and
`b+N/2`. These four branches form butterfly `b`, and a stage is N/2 butterflies (32 for
K = 7).

**Branch metrics first.** A rate 1/n code has only 2^n different codewords. So as soon as
a symbol arrives, `bmu` computes the metric of every codeword, four per cycle. For rate
1/4 that is 16 metrics in 4 cycles. The metric is the squared Euclidean distance to the
received symbol, summed over the n code bits in use. The metrics go into the 16-entry
register file `bm_regfile`. Received code bits are 3-bit soft values: 0 is a certain 0
and 7 a certain 1. Hard decisions are simply 0 and 7.

Then, for each butterfly:

1. The codeword of each of its four branches is derived from the encoder register
   `{input bit, source state}` and the generator polynomials (`vit_pkg::codeword`). The
   four codewords index the register file's four read ports.
2. Two `acs_alu`s, one per target, add path and branch metrics, keep the smaller sum, and
   report which source survived. Ties keep the path from `2b`.
3. The new path metrics go to `pm_mem`, and `survivor_mem` extends the survivor words of
   the two targets.

**Memory banking.** A butterfly reads two path metrics and writes two in the same cycle.
`pm_mem` therefore has four local memories. One pair is read and the other written, and
the pairs swap roles after every stage, so no in-place addressing is needed. Inside a pair,
state `s` is kept in bank `s[0] ^ s[K-2]` at address `s >> 1`. The two sources `2b` and
`2b+1` differ in bit 0, and the two targets `b` and `b+N/2` differ in bit K-2. So both
reads and both writes of a butterfly always go to different memories. The survivor words
use the same mapping.

**Normalisation.** While a stage is written, the smallest new metric is tracked. In the
next stage it is subtracted from every metric read, so the 16-bit metrics never overflow.
Before the first stage after a restart, state 0 is given metric 0 and every other state
4096. The encoder is therefore assumed to start in state 0.

## Survivors: register exchange with pointers

Plain register exchange would keep, for every state, the whole decided bit sequence back to
the decision depth: 50 bits per state for DAB. Here every state keeps one 16-bit word per
*segment* instead. A segment is `seg_len` consecutive stages:

```
 15          16-(K-1) | 15-(K-1)                     0
 [ pointer: K-1 bits  |  decision bits of this segment ]
```

For K = 7 this is a 6-bit pointer and 10 decision bits, so a segment is 10 stages. The
general limit is `seg_len <= 17-K`.
- In the first stage of a segment, the new word of a target state is
  `{surviving source state, decision bit}`.
- In the later stages the word of the surviving source is copied. Its pointer is kept and
  the new decision bit is shifted in at bit 0.
- The decision bit is 0 for the upper target `b` and 1 for the lower target `b+N/2`.

After the last stage of a segment, the word of state `s` holds the survivor's decisions
within that segment. Its pointer gives the state the same survivor was in at the end of
the previous segment.

The words are kept in two local memories, one per bank. Each is cut into 16 slots of 32
words:

| slots | use |
|---|---|
| 0, 1 | scratch: the stages inside a segment alternate between them (read one, write the other) |
| 2 .. 15 | ring of 14 finished segments: the last stage of a segment writes its slot directly |

Every `seg_len` stages the decoder does three things:

1. **Search.** It scans all path metrics for the smallest one, two per cycle (`min_search`).
2. **Look-up.** It starts at that state in the newest finished segment. It follows the
   pointers back `hops = ceil(dec_depth / seg_len)` segments, one memory read per cycle
   (`re_lookup`). The word it reaches holds the decided bits of that old segment.
3. **Output.** It gives out those `seg_len` bits. Each of them lies at least `dec_depth`
   stages behind the newest stage.

Only the pointer chain is followed. The decision bits of the segments in between are never
touched.

Nothing is output until `hops` segments exist. At the end of a message, feed `hops + 1`
segments of tail symbols (for example the encoding of zeros) to push out the last bits.
With 14 ring slots, `hops` is limited to 13, which is 130 bits for K = 7.

## Sequencing and timing

`vit_ctrl` runs the loop below. One butterfly is issued per cycle. Reads go out in one
cycle and their results are written in the next.

```
repeat forever
  for stage = 0 .. seg_len-1
    wait for a symbol (valid/ready)        1 cycle when a symbol is waiting
    branch metrics of all 2^n codewords    2^n/4 cycles (1, 2 or 4)
    sweep butterflies 0 .. N/2-1           N/2 cycles
    drain last write, swap memory pairs    1 cycle
  search minimum path metric               N/2 + 1 cycles
  look up survivor bits                    hops + 2 cycles
```

Cycle counts for DAB, measured in simulation, set against the budget of the original tile
program:

| step | this design | budget |
|---|---|---|
| one trellis stage | 38 | 42 |
| minimum search (64 states) | 33 | 35 |
| survivor look-up (5 hops) | 7 (+1 to hand over) | 15 |
| 10 decided bits | 421 | 470 |

## Configuration

`cfg_t` (in `vit_pkg`) has four fields:

| field | meaning |
|---|---|
| `k` | constraint length, 3..7 |
| `n` | code bits per symbol (rate 1/n), 2..4 |
| `gen[j]` | generator polynomial of code bit j, K bits, bit K-1 is the tap on the current input |
| `seg_len` | stages per segment, 1..17-K |

After reset the DAB code is active (`CFG_DAB`). A pulse on `cfg_load` loads `cfg_in` at any
time and restarts decoding from state 0. An assertion flags a code the datapath cannot hold.
`dec_depth` is a separate input. It is read at every look-up, so the decision depth can
change during operation without a restart. After a reduction, the segments in between are
skipped.

## Interface (`viterbi_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `cfg_load`, `cfg_in` | in | 1, `cfg_t` | load a code and restart |
| `dec_depth` | in | 8 | decision depth in stages |
| `sym_valid`, `sym_ready` | in/out | 1 | symbol handshake: a symbol is taken when both are high |
| `sym` | in | 4 x 3 | soft code bits of one symbol, `sym[0]` = code bit 0; unused bits ignored |
| `out_valid` | out | 1 | one-cycle pulse: `out_bits` valid |
| `out_bits` | out | 16 | decided bits, the earliest in bit `out_len-1`, the latest in bit 0 |
| `out_len` | out | 4 | number of decided bits (= `seg_len`) |
| `phase` | out | 3 | sequencer phase (`phase_t`), for observation |

## Files

| file | content |
|---|---|
| `rtl/vit_pkg.sv` | sizes, `cfg_t`, `phase_t`, DAB defaults, bank mapping |
| `rtl/viterbi_decoder.sv` | top: datapath wiring, normalisation |
| `rtl/vit_ctrl.sv` | sequencer and configuration register |
| `rtl/agu.sv` | base-plus-stride address generator (two in the sequencer) |
| `rtl/bmu.sv` | branch metric unit |
| `rtl/bm_regfile.sv` | 16 branch metric registers, four read ports |
| `rtl/acs_alu.sv` | add-compare-select ALU |
| `rtl/pm_mem.sv` | four path-metric memories, ping-pong |
| `rtl/survivor_mem.sv` | register-exchange words with pointers |
| `rtl/min_search.sv` | minimum path metric search |
| `rtl/re_lookup.sv` | pointer-following look-up |
| `rtl/local_mem.sv` | 512 x 16 memory, one read and one write port |
| `tb/tb_<module>.sv` | self-checking testbench per module |

## Simulation

Every testbench checks itself and ends by printing `TB_RESULT checks=N failures=M`. To run
one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/vit_pkg.sv tb/tb_viterbi_decoder.sv \
          --top-module tb_viterbi_decoder -o sim && ./obj_dir/sim
```

`tb_viterbi_decoder` runs the top with its default parameters. A behavioural encoder in the
testbench encodes random messages. It adds soft noise and about 1 % hard bit errors. Every
decided segment is compared with the message. There are five runs:
- DAB from reset, with the cycle budget above checked;
- DAB with input stalls and a depth change from 50 to 30 in flight;
- K = 3, rate 1/2, generators 5/7 octal;
- K = 5, rate 1/3, generators 25/33/37 octal;
- DAB again after reconfiguration.

It also counts stages, searches, look-ups, suppressed warm-up outputs, reconfigurations,
depth changes, stalls, normalisations and corrected errors, and fails if any of them never
happens. `tb_dab_workload` decodes 2000 bits of DAB with noise and about 1 % hard bit errors. All
bits are decoded correctly, at 43.2 cycles per bit from the first symbol to the last
decided bit, which is 2.3 Mbit/s at 100 MHz. The unit testbenches compare each block
against reference models written independently in the testbench.

## Where this departs from the original tile mapping, and what is left out

- **Hard-wired program.** The original runs the decoder as a configurable program on a
  general tile: sequencer, instruction decoders, crossbar, ALU input register files and
  five general ALUs. Here the same loop is a fixed sequencer and fixed wiring. The tile's
  general ALU operations, its configurable crossbar, its instruction decoders and its
  communication and configuration unit are not modelled. Changing the code therefore
  means loading `cfg_t`, not partially reconfiguring a tile.
- **Schedule.** There is one butterfly per cycle with two ACS units. With the four
  branch-metric cycles, this is faster than the original 42 cycles per stage.
- **Branch metric registers.** The tile gives each ALU input a private four-entry register
  file. Here the branch metrics of the two ACS units share one 16-entry file.
- **Where the survivor words live.** The survivor words sit in two memories with one read
  and one write port each. The port structure and this layout are assumptions.
- **Puncturing.** Depuncturing is not implemented. Punctured codes can only use the larger
  decision depths available.
- **Soft input and ties.** The soft-value width (3 bits), the tie rules in ACS and search,
  and the start-in-state-0 initialisation are this design's choices.
