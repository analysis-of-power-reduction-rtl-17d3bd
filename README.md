# BEDT link coding: three inversion schemes against coupling power

On a long on-chip bus, much of the dynamic power goes into the coupling
capacitance between neighbouring wires, not into the wire-to-substrate
capacitance. Which neighbour transitions are expensive depends on the pair:
when one wire switches next to a quiet one, one coupling capacitance is
charged. When two neighbours switch in opposite directions, the effective
coupling is doubled. BEDT ("bit encoding for data transitions") coding puts a
small encoder in front of such a link. For every word, the encoder chooses
whether to send the word as it is or with a fixed set of its lines inverted:
the odd lines, the even lines or all lines. It picks the choice that charges
the least coupling capacitance, given the word the link carries now. A decoder
behind the link undoes the inversion with one XOR per line.

The coding is aimed at the wide internal links of an AES-128 datapath (the
AddRoundKey XOR of the 128-bit state and round key), where a word crosses a
bus every cycle. This RTL contains the coders only, not an AES core. It
provides three schemes of increasing strength and a top that runs all three
side by side on a 32-bit data word, with a multiplexer choosing which decoded
word is shown:

| scheme | data lines | choices | control lines |
|---|---|---|---|
| I   | 16 (`datain[15:0]`) | none, odd inversion | 1 (`scheme1_inv`) |
| II  | 32 | none, odd, full inversion | 2 (`scheme2_ctrl` = {FI,HI}) |
| III | 32 | none, odd, full, even inversion | 2 (`scheme3_ctrl` = {FI,HI}) |

## Transition types and their cost

Take two adjacent lines, i and i+1. Look at their values in the word sent last
(`y`) and in the word about to be sent (`x`). There are 16 cases, in four
types:

| type | what happens | share of random data | coupling weight |
|---|---|---|---|
| I   | one line switches, the other holds | 1/2 | 1 |
| II  | both switch in opposite directions (01 to 10, 10 to 01) | 1/8 | 2 |
| III | both switch in the same direction (00 to 11, 11 to 00) | 1/8 | 0 |
| IV  | neither switches | 1/4 | 0 |

The cost of sending a word is the sum of the weights over its W-1 adjacent
pairs. Self-switching, the number of lines that toggle, is left out of every
decision, so the rules below minimise coupling activity only. `bedt_pkg`
holds the type enum (`pair_kind_t`) and the two functions `pair_kind` and
`pair_cost`.

## How the encoders decide

This is the core of the design. Inverting one line of a pair changes that
pair's cost by exactly one unit. In the overlapping pairs (0,1), (1,2), ...
exactly one line of every pair is odd, so odd inversion moves every pair's
cost by plus or minus one. The same holds for even inversion. The pair
detector (`bedt_pair_detector`, one per pair) therefore reports four flags:

* `ty`: odd inversion lowers this pair's cost. This is true for a Type II pair
  and for a Type I pair in which the odd line is the one switching (or in
  which the inversion turns the pair into Type III).
* `te`: the same for even inversion.
* `t2`: the pair is Type II.
* `t4s`: the pair is Type IV and its two lines differ, so full inversion
  would make it Type II. This count is written T4**.

`bedt_transition_counter` adds the flags into Ty, Te, T2 and T4**. Write
N = W-1 for the number of pairs. With these counts, the cost differences
between the candidates are exact:

    cost(none) - cost(odd)  = 2*Ty - N
    cost(none) - cost(even) = 2*Te - N
    cost(none) - cost(full) = 2*(T2 - T4**)

All the voter rules follow from these three lines:

* **Scheme I** (`bedt_encoder_s1`): odd inversion when `Ty > (W-1)/2`, which
  is a majority vote over the pairs. Otherwise no inversion.
* **Scheme II** (`bedt_encoder_s2`): odd inversion when `Ty > (W-1)/2` and
  `2(T2 - T4**) < 2Ty - W + 1`, that is, odd beats both none and full.
  Otherwise full inversion when `T2 > T4**`. Otherwise none.
* **Scheme III** (`bedt_encoder_s3`): even inversion when `Te > (W-1)/2`,
  `Te > Ty` and `2(T2 - T4**) < 2Te - W + 1`, that is, even beats none, odd
  and full. Otherwise the scheme II rule applies.

Every rule compares its own count with a threshold, so each scheme always
sends a candidate of least coupling cost. When two candidates tie, the rule
keeps the one with fewer inverted lines: none before full, full before odd.
The testbenches check this against a reference model that knows nothing about
the counts. It only adds up the cost of each candidate word and picks the
least.

Each encoder registers its output. The registered word is also the `y` that
the next word is compared with. The comparison therefore uses the word as it
was actually sent, after inversion.

## The link and the decoder

A coded link carries the W data lines plus the control lines {FI,HI}. FI
stands for "full invert" and HI for "half invert". `bedt_invert` computes

    q_i = d_i ^ FI          (even i)
    q_i = d_i ^ FI ^ HI     (odd i)

so {FI,HI} = 00 passes the word, 01 inverts the odd lines, 10 inverts all
lines and 11 inverts the even lines. The stage is its own inverse: the
encoders use it as their last stage and the decoders are the same circuit.
Scheme I sends HI alone (FI is always 0).

The control lines are not counted in the pair costs. The decision is made over
the W data lines only. A control line that toggles costs a little, and the
rules do not account for it.

## Top level: `bedt_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous reset, **active low**. Clears the link registers and control lines |
| `mux` | in | 2 | 00 scheme I, 01 scheme II, 10 scheme III, 11 zero |
| `datain` | in | 32 | one data word per clock |
| `encoder_out_scheme1`, `scheme1_inv` | out | 16, 1 | scheme I link |
| `scheme1_decoder_out` | out | 16 | scheme I decoded word |
| `encoder_out_scheme2`, `scheme2_ctrl` | out | 32, 2 | scheme II link |
| `scheme2_decoder_out` | out | 32 | scheme II decoded word |
| `encoder_out_scheme3`, `scheme3_ctrl` | out | 32, 2 | scheme III link |
| `scheme3_decoder_out` | out | 32 | scheme III decoded word |
| `all_schemes_out` | out | 32 | decoded word selected by `mux`. Scheme I is zero-extended |

Timing: a word presented on `datain` before a rising edge appears on the three
links after that edge. The decoders are combinational, so the decoded words
and `all_schemes_out` appear in the same cycle. Latency is one clock and the
throughput is one word per clock. Parameters: `W` = 32 and `W1` = 16. The
encoders and the decoder stage take any `W` of 2 or more.

Hierarchy:

    bedt_top
      bedt_encoder_s1 / _s2 / _s3
        bedt_transition_counter
          bedt_pair_detector  x (W-1)
        bedt_invert            (output inversion)
      bedt_invert              (decoders, one per scheme)
      bedt_scheme_mux

## Example

Take the word 0xABABABAB right after reset, when the link holds all zeros.
Ty = 24 (and also Te = 24), T2 = T4** = 0. Schemes II and III both choose
odd inversion (HI = 1, FI = 0) and send 0x01010101. Even inversion does not
win because Te is not larger than Ty. The word has 24 changes between
neighbouring bits; the coded word has 7. Scheme I sends the low half, 0xABAB,
as 0x0101. While the same word is held, it keeps the same coding, so the link
stops switching.

On 4000 uniformly random words, `tb_bedt_top` measures the following coupling
cost over the data lines, with control lines excluded:

| link | uncoded | coded | reduction |
|---|---|---|---|
| 16-bit, scheme I | 43393 | 36476 | 16 % |
| 32-bit, scheme II | 90896 | 75671 | 17 % |
| 32-bit, scheme III | 90896 | 72302 | 20 % |

These numbers are for random data. Correlated data, such as a word held or
changed in a few places, gains much more, as the example shows.

## Where this RTL departs from the published description

* **Control lines.** The published example packs a single flag, FI xor HI,
  above bit 31. One bit cannot tell the decoder whether odd, full or even
  inversion was used. Here FI and HI travel as two separate lines, which is
  exactly what the published decoder equations need.
* **Word width.** In the published description, a w-bit link holds w-1 data
  bits and one inversion bit. Here the link holds all 32 (or 16) data bits and
  the control lines sit beside them on their own ports. The decoded word is
  then always the full input word.
* **Published example values.** The published waveforms show the scheme II/III
  link word as 0x01010100. The worked example in the same text gives
  0x01010101, and this RTL follows the worked example. A published hardware
  capture shows 0xAA16CBE5 (odd inversion) for the word 0x00BC614E. With the
  decision rules above and a cleared link, that word is sent uncoded by
  schemes II and III, because its mostly-zero upper half gives too few
  helpful pairs. The same capture and the waveforms show scheme I sending its
  input unchanged (0x614E, 0xABAB). The scheme I rule inverts both of these
  words after reset (Ty = 9 and 12, against a threshold of 7.5). This RTL
  follows the stated rules, not these captures.
* **Reported percentages.** The published transition reductions (50 %, 75 %,
  85 %) are counted on one example word. They are not a property of the
  rules, and are not reproduced here. On the example word, schemes II and III
  produce the same output.
* **Reset and timing** (active-low synchronous reset, one-clock latency,
  combinational decoders) and tie-breaking between equally good choices are
  choices of this design.
* **Not included:** the AES-128 core that the links would serve, and the FPGA
  vendor's on-chip logic analyser used to capture the hardware.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints one line
`TB_RESULT checks=N failures=M` and ends. The expected values come from
`tb/bedt_ref_pkg.sv`. That package computes the coupling cost of each
candidate word directly and shares no code with the RTL. With Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/bedt_pkg.sv tb/bedt_ref_pkg.sv tb/tb_bedt_top.sv --top-module tb_bedt_top
    ./obj_dir/Vtb_bedt_top

Replace `tb_bedt_top` with any of `tb_bedt_pair_detector`,
`tb_bedt_transition_counter`, `tb_bedt_invert`, `tb_bedt_scheme_mux`,
`tb_bedt_encoder_s1`, `tb_bedt_encoder_s2` or `tb_bedt_encoder_s3`.

* `tb_bedt_top` runs the whole design at its default parameters. It covers
  the example word, the hardware-capture word with `mux` = 3, a mixed stream
  built to provoke every inversion mode, a reset in the middle of the stream,
  and 4000 random words. It counts how often each scheme used each of its
  modes and how often each `mux` code was applied, and fails if any of them
  never happened.
* The encoder testbenches check the link word and control lines one clock
  after each input, the decoded word, and that the coded word never costs
  more than the plain one.
* `tb_bedt_pair_detector` covers all 16 pair cases for both parities, and
  `tb_bedt_transition_counter` compares the four counts on random word pairs.

To change the width, set `W` (and `W1` for scheme I) on `bedt_top`. All counts
size themselves with `$clog2(W)`.
