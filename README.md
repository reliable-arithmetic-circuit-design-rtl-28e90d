# Arithmetic with spiking neurons that survive threshold errors

This is a library of small arithmetic circuits built from one kind of
component: a spiking neuron with a single threshold. It follows a thesis on
spiking neural P systems (SNP systems), a model of computation where numbers
travel as trains of identical spikes and each neuron decides, by counting the
spikes it received, whether to fire one spike or to forget them. The design
has three goals:

* Show that two basic neurons are enough. They are a *low-pass* (LP) and a
  *high-pass* (HP) neuron. Together they can build a neuron with any set of
  firing and forgetting rules, and also an adder, a subtractor and a
  comparator.
* Make those circuits robust against the error such neurons suffer in
  silicon. Process variation can move a neuron's threshold by one spike. Small
  redundant sub-networks called *motifs* mask that error at a lower cost than
  triple modular redundancy.
* Give a CMOS circuit for the neuron itself, built like a DRAM cell. It is
  included here as a behavioural model.

All the digital circuits are synthesizable SystemVerilog. The neuron is a
one-bit register with a little counting logic in front of it. Every neuron
has a `beta` input that injects the threshold error, so the reliability
claims can be checked by simulation. They are, exactly; see
[Reliability](#reliability-what-the-motifs-buy).

## The two neurons and the error model

A neuron is a register clocked once per SNP time step. In cycle *t* it counts
the spikes on its inputs (`in[N_IN-1:0]`). In cycle *t+1* its output is:

| neuron | fires when the count is | otherwise |
|---|---|---|
| LP (`lp_neuron`) | at least 1 and below the threshold | forgets |
| HP (`hp_neuron`) | at or above the threshold | forgets |

The threshold is 2 (`snp_pkg::ALPHA_THRESHOLD`). So a two-input LP neuron is
an XOR and a two-input HP neuron is an AND, each followed by a flip-flop. A
one-input LP neuron is a plain delay unit. The circuits use delay units to
line up paths of different depth.

**Error model.** A faulty neuron (the "beta version", as opposed to the
correct "alpha version") has its threshold raised by one:

* A faulty LP neuron also fires on exactly two spikes.
* A faulty HP neuron needs three spikes.

Driving a neuron's `beta` input high models this. Every composite block
collects the `beta` bits of all its neurons into one vector. Each block's
header comment lists the bit order. Tie `beta` to zero for normal use.

Two consequences drive the whole reliability story:

* A one-input LP neuron never sees two spikes, so it is immune to the error.
* Each of the other neurons fails in exactly one input case.

## Spike trains and timing

A number *n* is a train of *n* spikes on one wire. The neurons pass spikes
from level to level one cycle at a time, so a circuit's latency equals its
number of neuron levels. The two inputs of a circuit must be aligned: both
trains start in the same cycle. Reset (`rst_n`) is asynchronous and
active-low, and it clears every neuron. The package `snp_pkg` holds:

* the neuron counts, which set the `beta` widths;
* the latencies: 2 for an odd/even neuron, 6 for the six-input converter,
  11 for the twelve-input converter, 3 for the ruler, 9 for the complex
  neuron, 2 for the adder, 3 for the motif adder, 1 for the subtractor and
  2 for the LP motif.

## Counting spikes: odd, even and converter networks

To apply rules such as "fire on exactly four spikes", a neuron must know how
many spikes it received. The design counts them in binary with two derived
neuron types:

* **`odd_neuron`** fires when 1 or 3 of its three inputs spike. It is the sum
  of a full adder. It is built from three LP neurons: B = LP(in1, in2),
  C = LP(in3) and A = LP(B, C).
* **`even_neuron`** fires when 2 or 3 inputs spike. It is the carry of a full
  adder. It is built from an HP neuron and a delay unit, which gives it the
  same 2-cycle latency as the odd type.
* **`spike_adder_1bit`** puts an odd and an even neuron on the same three
  inputs. It gives the count 0..3 as two bits: O has weight 1 and E has
  weight 2.
* **`spike_converter`** counts six inputs into three bits in 6 cycles. Two
  1-bit adders take inputs 1–3 and 4–6. A third adds their weight-1 bits. A
  fourth adds the three weight-2 bits. The bits that skip a level pass through
  pairs of delay units. Output `a0` is the most significant bit (weight 4) and
  `a2` the least.
* **`spike_converter12`** counts twelve inputs into four bits, `a0` (weight 8)
  to `a3`, in 11 cycles. It is a five-level tree of eleven 1-bit adders. One
  final LP neuron merges the two weight-8 carries that can arise. At most one
  of them can be set, because the count never exceeds twelve.

Every converter accepts a new set of inputs every cycle.

## A neuron with arbitrary rules: converter, ruler and feedback

`complex_neuron` shows that LP and HP neurons can build a neuron with an
arbitrary rule set. It is the least obvious part of the design. The example
neuron has these rules, where *k* is the number of spikes it holds in a step:

| k | rule | effect |
|---|---|---|
| 1 | a → a | fire |
| 2 | a² (do nothing) | keep both spikes for the next step |
| 3 | a³ → λ | forget |
| 4 | a⁴ → a | fire |
| 5 | a⁵ → λ | forget |
| 6 | a⁶ → a | fire |

It has three parts:

1. **Converter.** A six-input `spike_converter` counts the four external input
   spikes plus two more inputs. Both extra inputs are driven by the feedback
   wire.
2. **Ruler** (`snp_ruler`). It decodes the count (a0 a1 a2) into rules in
   three levels of neurons:
   * Level 1 delays each bit through an LP neuron. It also detects each pair
     of set bits with an HP neuron: a2·a1 means 3 spikes, a2·a0 means 5, and
     a1·a0 means 6.
   * Level 2 turns a single bit into its rule only if no pair containing it
     is present. Each such LP neuron sees the bit plus the detectors that must
     switch it off; two or more spikes make an LP forget. For example, rule 1
     is LP(a2, [a2·a1], [a2·a0]), and rule 4 is LP([a2·a0], a0, [a1·a0]).
     The 3- and 5-spike detectors end in LP neurons with no load. They stand
     for the forgetting rules and exist only to switch other rules off.
   * Level 3 merges the firing rules (1, 4, 6) into `out` and delays the
     do-nothing rule (2) into `feedback`.
3. **Feedback.** The do-nothing spike re-enters the converter on two inputs.
   So the two kept spikes are counted again, together with the inputs of the
   next step.

The feedback returns 9 cycles after the step that caused it. One logical
neuron therefore takes a step every 9 cycles. The pipeline can carry up to
nine independent step sequences, interleaved cycle by cycle; the testbench
drives it that way. With four external inputs plus two kept spikes the count
never exceeds 6, which the converter's three bits cover.

## The arithmetic circuits

### Adder (`snp_adder`)

The adder has four neurons:

* Neuron 1 is LP(in1, in2, carry) and neuron 2 is HP(in1, in2, carry). In
  each step a single spike passes through neuron 1, and two or three spikes
  fire neuron 2.
* Neuron 3 is LP(n1, n2) and produces the `sum` train.
* Neuron 4 is a delay unit on neuron 2. It forms the carry, which re-enters
  neurons 1 and 2 in the next step.

Over the whole computation `sum` carries in1 + in2 spikes. The carry loop is
two cycles long, so spikes of an input train must be applied every second
cycle. The result comes out with a latency of 2, one spike every second
cycle. Example: 1 + 2 with inputs in cycles 2 and 4 gives sum spikes in cycles
4, 6 and 8.

As in the original design, at most one of the two operands may exceed one
spike. A single carry neuron cannot hold more than one pending spike.

### Subtractor (`snp_subtractor`)

The subtractor is one LP neuron. Aligned spikes of the two trains cancel,
since two spikes make an LP forget. The unmatched spikes pass through, so the
output carries |in1 − in2| spikes, one cycle later. Example: 3 against 6 from
cycle 1 gives spikes in cycles 5, 6 and 7.

### Comparator (`snp_comparator`)

The comparator emits exactly one spike when |in1 − in2| ≥ `THRESHOLD`
(default 3). It has three parts:

* **Subtraction.** d1 = LP(in1, in2) is a train of |in1 − in2| spikes.
* **Comparison.** d1 runs through a chain of THRESHOLD − 1 delay units. An HP
  neuron d3 fires only where d1 and its delayed copy overlap. So d3 is
  THRESHOLD − 1 spikes shorter than d1, and empty if the difference is too
  small.
* **Conversion.** d4 delays d3 by one cycle. d5 = HP(d3, d4) marks every spike
  of d3 after the first. out = LP(d4, d5) therefore fires once, on the first
  spike.

For 7 against 2 spikes from cycle 1, the output fires in cycle 9. With
THRESHOLD = 1 the comparison part is left out. Successive comparisons need at
least THRESHOLD idle cycles between their trains.

The three parts, their functions and the chain length come from the original
design. The neuron-level wiring of the comparison and conversion parts is a
reconstruction; see [Departures](#departures-from-the-original-design). It
reproduces the published waveforms of every internal node and has the
published number of critical neurons (four).

## Motifs

### LP motif

A two-input LP neuron fails only when both inputs spike: a faulty one then
fires. The **LP motif** (`lp_motif`) keeps its output LP neuron from ever
seeing exactly two spikes:

* in1 and in2 each pass through a one-input LP neuron, which is immune to the
  error.
* `ORDER` HP neurons (default 1) detect the case where both inputs spike.

With both inputs active, the output neuron receives ORDER + 2 ≥ 3 spikes and
forgets, even if it is faulty. It fails only when the output neuron and every
HP neuron are faulty at once. Latency is 2 cycles for any ORDER.

### Motif adder (`motif_adder`)

The adder's two input neurons see the same three signals, so they share one
motif:

* in1, in2 and the carry each pass a one-input LP neuron.
* `ORDER` HP neurons detect two or more of those signals.
* The sum-bit LP neuron and the carry HP neuron both read all of these.

After that, the sum and carry neurons work as in the plain adder. This adds
one level: latency 3, one input spike every third cycle. For ORDER > 1 the
extra HP neurons are copies of the first.

### Motif comparator (`motif_comparator`)

Each critical neuron of the comparator is replaced by a small redundant
structure:

* **Subtraction** becomes an LP motif, S.
* **Comparison.** S runs through THRESHOLD delay units D1..DT.
  HPa = HP(S, D[T−1]) takes the overlap. HPb = HP(HPa, D1, DT) repeats that
  decision as a two-of-three vote.
* **Conversion.** C1 and C2 delay HPb. HPc = HP(HPb, C1) marks the later
  spikes. Two copies, HPd = HPe = HP(HPc, C1, C2), repeat the mark.
  out = LP(HPd, HPe, C2) fires on the first spike only.

The output fires THRESHOLD + 7 cycles after the shorter train ends (cycle 12
for 7 against 2). The wiring for THRESHOLD = 3 follows the original. Other
thresholds lengthen the chain in the same pattern.

## Reliability: what the motifs buy

`tb_reliability` treats every neuron as faulty with the same probability *e*,
independently. For each circuit it applies all 2ⁿ combinations of faulty
neurons and runs a set of operations that covers every case of the function.
From the number of failing combinations with *k* faults it forms the exact
success probability. The results:

| circuit | neurons | success probability S(e) | S(0.1) | e tolerated at S = 95 % |
|---|---|---|---|---|
| LP motif, order 1 | 4 | 1 − e² | 0.990 | 22.4 % |
| LP motif, order 2 | 5 | 1 − e³ | 0.999 | 36.8 % |
| adder | 4 | 1 − e − e(1−e)² | 0.819 | 2.6 % |
| motif adder, order 1 | 8 | 1 − e² − e²(1−e)² | 0.982 | 17.2 % |
| motif adder, order 2 | 9 | (no closed form given) | 0.998 | 32.5 % |
| comparator | 7 | (1 − e)⁴ | 0.656 | 1.3 % |
| motif comparator | 15 | (1 − e²)²(1 − e⁴ − 3e³(1 − e)) | 0.977 | 14.6 % |

The closed forms of the LP motif (order 1), both adders and both comparators
are the published ones. The simulated networks match them exactly. So do the
published 95 % tolerances: 22.4 %, 2.6 % and 17.2 %. The testbench also
confirms two published orderings:

* The comparator is less reliable than the adder.
* A higher-order motif adder beats the first-order one.

## The CMOS neuron (`dram_neuron`, behavioural)

The proposed transistor circuit stores charge on capacitors, like a DRAM
cell. It runs on four clock phases:

1. **Integration.** Each input pulse opens a pass gate and adds a fixed charge
   to node n1. C1 discharges n1 at the end of the period.
2. **Evaluation.** C2 connects n1 to a smaller capacitor at n2, and charge
   sharing copies the voltage across. The LP variant adds a transistor from n2
   to ground, gated by n1. A two-pulse level on n1 empties n2, so the LP
   neuron forgets.
3. **Fire.** C3 passes n2 to n3. An inverter compares n3 with its switching
   threshold, and a second inverter shapes the output pulse. C4 discharges n3.

Within one period the order is: C3 (fire on the previous count, while new
inputs arrive), then C2 and C4, then C1. `dram_neuron` models this with real
node voltages. `HIGH_PASS` selects the variant.

The voltages are this model's own choice: 0.3 V per pulse, a capacitor ratio
of 10, inverter thresholds of 0.45 V (HP) and 0.15 V (LP), and a pull-down
threshold of 0.45 V. With these values the HP neuron fires on two pulses and
the LP neuron on one.

The model is not synthesizable, and it does not model threshold-voltage
variation, leakage or energy.

## Top level

`snp_top` places every circuit side by side. Each has its own ports, named
with a prefix:

| prefix | circuit |
|---|---|
| `cn_` | complex neuron |
| `cv_` | twelve-input converter, `cv_count = {a0,a1,a2,a3}` |
| `add_` | adder |
| `sub_` | subtractor |
| `cmp_` | comparator |
| `mlp_` | LP motif |
| `madd_` | motif adder |
| `mcmp_` | motif comparator |
| `dn_` | HP and LP DRAM-neuron models, sharing the clock phases `dn_c1..dn_c4` |

The parameters are `CMP_THRESHOLD` (3, shared by both comparators),
`MLP_ORDER` (1) and `MADD_ORDER` (1). All the SNP circuits share `clk` and
`rst_n`.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and stops itself, with a watchdog in case
it hangs. With Verilator 5, for example:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl \
    rtl/snp_pkg.sv tb/tb_snp_top.sv --top-module tb_snp_top
./obj_dir/Vtb_snp_top
```

Replace `tb_snp_top` with any file in `tb/`. Each runs in seconds.

| testbench | what it checks |
|---|---|
| `tb_lp_neuron`, `tb_hp_neuron` | random inputs and errors against the rule |
| `tb_odd_neuron`, `tb_even_neuron`, `tb_spike_adder_1bit`, `tb_spike_converter`, `tb_spike_converter12` | random spike sets against a popcount, including latency |
| `tb_snp_ruler` | every count 0..6 |
| `tb_complex_neuron` | nine interleaved step sequences against a reference neuron with the same rules |
| `tb_snp_adder`, `tb_snp_subtractor`, `tb_snp_comparator` | the published timing examples, random operands, and the effect of an injected error |
| `tb_motif_adder`, `tb_motif_comparator`, `tb_lp_motif` | every single error is masked, and a chosen double error is not; the LP motif's signal tables under all error patterns |
| `tb_dram_neuron` | four-phase operation, HP fires on two pulses, LP on one |
| `tb_snp_top` | all circuits at once at default parameters; also counts that each mechanism happened (fire, forget, do-nothing feedback, carries, comparator firing and staying silent, masked errors, DRAM-model pulses) |
| `tb_reliability` | the exact success probabilities in the table above |

## Departures from the original design

* **Bit naming of the converter.** The original converter drawing names the
  outputs of its last adder so that a0 would have weight 2 and a1 weight 4.
  Its text says a0 is the most significant bit, and the ruler's wiring only
  works that way. This design follows the text: a0 has weight 4.
* **Comparator network.** The drawing of the plain comparator is not
  available. The network here is reconstructed from the published timing
  diagram of its internal nodes and from the motif version of the circuit.
* **Twelve-input converter.** Only its function is specified. The adder tree
  and the final merge neuron are this design's own.
* **Higher orders.** The motif adder for ORDER > 1, and both comparators for
  thresholds other than 3, extend the published networks in the obvious way;
  they are not taken from drawings. The published reliability curve of the
  higher-order adder has no formula to compare against.
* **DRAM neuron.** This is a behavioural model. All voltages are assumed.
* **Error injection.** The `beta` ports are a modelling device of this design
  and do not exist in the original circuits.
* **Not included:**
  * the triple-modular-redundancy LP neuron and the Boolean adder that the
    original compares against;
  * the converters between interval-coded and train-coded numbers, which the
    original takes from other work without giving their rules;
  * the transistor-level results: threshold-voltage Monte Carlo, energy and
    leakage figures.
