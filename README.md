# Coupling-aware inversion coding for NoC links

On a long on-chip link, most of the dynamic power goes into the capacitance
*between* neighbouring wires, not into the capacitance to ground. How much
charge a pair of neighbours moves depends on how the two wires switch
together, so the same number of bit flips can cost very different amounts of
energy. This design encodes the flits of a network-on-chip link so that
neighbouring wires switch together more and against each other less. The
sender inverts chosen sets of wires of a flit before sending it: the odd
wires, the even wires, or all of them. It decides from the flit now on the
wires and the flit about to be sent. The receiver undoes the inversion.

Encoding and decoding sit in the two network interfaces (NIs) at the ends of
a path. The routers and links in between carry the encoded W-bit flits
unchanged and need no modification.

Three schemes are provided. Each uses more inversion choices than the one
before it:

| scheme | inversions used          | control lines | payload per W-bit flit |
|--------|--------------------------|---------------|------------------------|
| I      | odd                      | 1 (`inv`)     | W-1                    |
| II     | odd, full                | 1 (`inv`)     | W-1                    |
| III    | odd, even, full          | 2 (code)      | W-2                    |

The top module `noc_link_encoding_top` puts one link of each scheme side by
side, so all three can be compared on the same traffic.

## The cost model behind every decision

Consider two adjacent wires. Compare their values in the previous flit
(time t-1) with their values in the next flit (time t). The pair's transition
falls into one of four types:

| type | what happens                               | example     | coupling weight |
|------|--------------------------------------------|-------------|-----------------|
| I    | one wire switches, the other stays         | 00 -> 10    | 1               |
| II   | both switch, in opposite directions        | 01 -> 10    | 2               |
| III  | both switch, in the same direction         | 00 -> 11    | 0               |
| IV   | neither switches                           | 01 -> 01    | 0               |

The link's coupling activity is `T1 + 2*T2`. Here T1 and T2 count the wire
pairs (there are W-1 of them) with a Type I or Type II transition. The link
power is then modelled as

    P  ~  T(0->1) * Cs  +  (T1 + 2*T2) * Cc,        with Cc about 4 * Cs

The encoders keep only the coupling term. Dropping the self-switching term
`T(0->1)` costs little accuracy on links wider than 16 bits, and it makes the
decision logic much smaller. Every test below therefore compares coupling
costs only.

### What each inversion does to a pair

Lines are numbered 0..W-1 from the LSB. Odd inversion flips lines 1, 3, 5, …
and even inversion flips lines 0, 2, 4, …. Either one flips exactly one line
of every adjacent pair. Flipping one line of a pair always changes that
pair's cost by exactly one step:

* Type II becomes Type I, which helps.
* Type III and Type IV become Type I, which hurts.
* Type I becomes Type IV if the flipped line was the one that switched,
  which helps.
* Type I where the flipped line was the one that stayed becomes Type III if
  the two lines were equal before, which helps. It becomes Type II if they
  were different, which hurts.

So for each pair there is a single bit: "flipping this pair's odd line
helps". The count of those bits is **Ty**. Odd inversion saves exactly
`2*Ty - (W-1)` units of coupling, so it pays off when `Ty > (W-1)/2`.
**Te** is the same count with the even line as the flipped one.

Full inversion flips both lines of every pair:

* Type II becomes Type IV, saving 2.
* Type I stays Type I.
* A Type IV pair whose two lines differ (01->01 or 10->10, called **T4\*\***)
  becomes Type II, costing 2.

Full inversion therefore saves `2*(T2 - T4**)`.

All the decision logic follows from these three savings:

* odd saves `2Ty - W + 1`
* even saves `2Te - W + 1`
* full saves `2(T2 - T4**)`
* no inversion saves 0

## Datapath of an encoder

For every adjacent line pair, one detector block is instantiated per quantity:

* `ty_block` for Ty. The same block, with its two lines swapped, gives Te.
* `t2_block` for T2.
* `t4ss_block` for T4\*\*.

Each detector compares the two wires of the pair in the current flit `x` with
the same wires in the flit on the link (`prev_link`). `x` is the payload with
the control lines at 0. `ones_counter` ("1s blocks") add up each row of W-1
flags into a `$clog2(W)`-bit count. A decision module compares the counts.
The chosen mask is XORed onto `x`.

* **Scheme I** (`e_block_s1`): one row of Ty blocks and a
  `majority_voter`. The flit is odd-inverted when `Ty > (W-1)/2`.
* **Scheme II** (`e_block_s2`, `scheme2_decision`): Ty, T2 and T4\*\*
  counts.
  * Odd inversion is taken when `2(T2-T4**) < 2Ty-W+1` and `Ty > (W-1)/2`.
  * Full inversion is taken when `2(T2-T4**) > 2Ty-W+1` and `T2 > T4**`.
  * Full inversion is subject to the decodability check described below.
* **Scheme III** (`e_block_s3`, `scheme3_decision`): Ty, Te, T2 and T4\*\*
  counts. The action whose saving is strictly above the other three is taken,
  and its saving must also be positive. The output codes are odd `10`,
  even `01`, full `11` and none `00`. Ties are resolved towards "no
  inversion": for example, if `Te == Ty` and full inversion is not better,
  nothing is inverted.

The control lines are part of the flit that is analysed and inverted. W must
be even, which the RTL checks at elaboration. Then line W-1 is an odd line
and, in Scheme III, line W-2 is an even line. Because they sit at 0 in `x`,
the inversion itself writes the flag or code:

* Schemes I and II: odd and full inversion both set `inv` (line W-1) to 1.
* Scheme III: odd inversion sets line W-1, even inversion sets line W-2, and
  full inversion sets both, which is the `11` code.

This keeps the cost analysis exact across the pair that contains a control
line.

## Decoding, and why Scheme II needs a guard

* **Scheme I** (`d_block_s1`): if `inv` is 1, flip the odd lines back.
* **Scheme III** (`d_block_s3`): read the two code lines and flip the lines
  they name.
* **Scheme II** (`d_block_s2`): one flag line has to cover two different
  inversions. The receiver tells them apart with the same Ty test, run on the
  received flit `z` against the previous received flit. If `inv` = 1 and the
  test fails, the flit was odd-inverted; if the test passes, it was
  fully inverted.

The odd case of this test is always right. Odd inversion turns every pair
that the sender counted into one that is not counted, so
`Ty(z) = W-1 - Ty(x) < (W-1)/2`.

The full case is not always right. Take a previous flit `0101…` and a next
flit `1010…`. Every pair is Type II, so full inversion is the best choice.
The fully inverted flit equals the previous one, and its Ty count is 0, so
the receiver would read an odd inversion and corrupt the data.

`e_block_s2` therefore also runs the receiver's test on `~x`, using a second
row of Ty blocks and a majority voter. It takes full inversion only when that
test passes. Otherwise it takes odd inversion if that saves anything, or no
inversion. This guard is this design's addition; without it Scheme II cannot
be decoded reliably. It costs savings: in the top-level test, about a
quarter of all Scheme II flits wanted full inversion and were refused.

## Interfaces and timing

`ni_encoder #(W, SCHEME)`:

* Inputs are `in_valid` and `in_payload[PW-1:0]`.
* PW is W-1 for Schemes I and II and W-2 for Scheme III. It is derived from
  SCHEME (`noc_enc_pkg::payload_width`).
* The encoded flit is registered onto `link_data[W-1:0]` with `link_valid`,
  one cycle after acceptance.
* The link register is also the "previous flit" input of the encoder.
* In idle cycles the wires hold their value, so the next decision is taken
  against what the wires really carry.
* `link_action` reports the inversion used.
* There is no back-pressure: one flit per cycle.

`ni_decoder #(W, SCHEME)`:

* It takes `link_valid` / `link_data` and registers `out_valid` /
  `out_payload` one cycle later.
* The Scheme II variant also keeps a copy of the previous valid flit.

Both ends reset synchronously (`rst_n` low) to an all-zero previous flit, so
they agree from the first flit on. End to end, a payload accepted at clock
edge n appears at the decoder output after edge n+1.

`noc_link_encoding_top #(W = 32)` brings out, for each channel
`s1_`/`s2_`/`s3_`:

* `_in_valid` and `_in_payload`
* the link wires `_link` and `_link_action`, for measuring switching
* `_out_valid` and `_out_payload`

Files, bottom-up:

| file | role |
|------|------|
| `noc_enc_pkg.sv` | action codes (`inv_action_e`), line masks, payload width |
| `ty_block.sv`, `t2_block.sv`, `t4ss_block.sv` | per-pair transition detectors |
| `ones_counter.sv`, `majority_voter.sv` | 1s counter, strict-majority test |
| `scheme2_decision.sv`, `scheme3_decision.sv` | decision modules |
| `e_block_s1/2/3.sv`, `d_block_s1/2/3.sv` | combinational encoder / decoder logic |
| `ni_encoder.sv`, `ni_decoder.sv` | registered NI ends, scheme chosen by parameter |
| `noc_link_encoding_top.sv` | three links side by side |

## Size

These are coarse word-level cell counts after synthesis at W = 32. An adder
counts as one cell.

| module (W = 32) | cells | flip-flop bits |
|-----------------|-------|----------------|
| `e_block_s1` | about 350 | — |
| `e_block_s2` | about 720 | — |
| `e_block_s3` | about 550 | — |
| `d_block_s1`, `d_block_s3` | a handful of XOR words | — |
| `d_block_s2` | about 350 | — |
| `ni_encoder` (Scheme III) | about 550 | 35: link, valid, action |
| `noc_link_encoding_top` | about 2000 | 232 |

No gate-level power or area figures are given here.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=… failures=…` line and has a cycle watchdog.

The reference model, `tb/tb_ref_pkg.sv`, does not reuse the detector
structure. It computes the whole-flit coupling cost of each candidate
(none, odd, even, full) straight from the cost table, and picks by the rules
above. Against that model:

* The pair detectors are checked exhaustively.
* The decision modules are checked over every combination of counts at
  W = 32 (all 2^20 cases for Scheme III).
* The encoder and decoder logic are checked on 20 000 flits at W = 32 and
  5 000 at W = 10. The stimulus mixes random flits, small changes,
  near-complements and alternating patterns, so that every action occurs.
* The NI ends are checked cycle by cycle, including idle cycles and reset.

`tb_noc_link_encoding_top` runs the top at its default parameters. It sends
40 000 flits through all three links: first uniformly random payloads, then
correlated payloads. It checks:

* every payload arrives unchanged, in order, two cycles later;
* the link carries the reference encoding;
* no flit ever raises the coupling cost compared with sending it plain;
* each mechanism happens at least once: every action of every scheme, a
  refused Scheme II full inversion, idle cycles, and a reset in mid-stream.

It prints the coupling activity of plain and encoded traffic. In one run the
reduction in coupling activity was:

| traffic | Scheme I | Scheme II | Scheme III |
|---------|----------|-----------|------------|
| uniformly random payloads | 11 % | 12 % | 17 % |
| correlated payloads | 42 % | 43 % | 71 % |

Plain payloads already use all W-1 or W-2 lines, so the baseline is the
same payload sent unencoded on the same wires.

These figures are coupling activity only. Self-switching power, encoder and
decoder power, and router traffic are not included, so they are not
full-link or full-NoC power savings.

To run a test with Verilator 5:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/noc_enc_pkg.sv tb/tb_ref_pkg.sv tb/tb_noc_link_encoding_top.sv \
        --top-module tb_noc_link_encoding_top
    ./obj_dir/Vtb_noc_link_encoding_top

Replace the testbench name to run any other test. The top-level test takes
a few seconds.

## Where this design makes its own choices

* **Link width.** W = 32 is a default, not a given; any even W ≥ 4 works.
* **Line numbering.** Lines count from 0 at the LSB, so "odd lines" are
  1, 3, 5, … and the control lines sit at the top. With this numbering, the
  transition tables that define the Ty and Te sets hold as stated for every
  pair.
* **Scheme II guard.** Full inversion is refused unless the receiver's
  majority test will recognise it. See the decoding section above.
* **Scheme III control lines.** The four-way action code is carried on two
  dedicated lines, which costs one payload bit compared with Schemes I and
  II. The code values (odd 10, even 01, full 11, none 00) are those of the
  decision module. A single-flag Scheme III decoder is not attempted.
* **Ties.** The decision inequalities are strict, exactly as derived: a tie
  never triggers an inversion.
* **Self-switching.** Only the coupling approximation is implemented. The
  exact condition that includes the `T(0->1)` terms is not.
* **Which flits are encoded.** Every flit given to the encoder is encoded.
  Deciding which flits of a packet (for example only body flits) go through
  the encoder is left to the NI packetiser, which is not part of this RTL.
  Routers, the mesh and any traffic generator are likewise outside it.
* **Reset.** Synchronous and active low. Both ends start from an all-zero
  previous flit.
* **Implementation.** The 1s counters are plain adder sums. The decision
  modules are signed comparisons rather than an explicit full-adder and
  comparator netlist.
