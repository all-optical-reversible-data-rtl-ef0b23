# Reversible GLG data distributor

A data distributor (decoder) asserts exactly one of its 2^N output lines, the one
whose index is on its N select inputs. Built from reversible gates, a decoder
normally needs several gates, constant inputs and "garbage" outputs. These are
outputs that exist only to keep the mapping one-to-one. This design
removes most of that overhead with one 4-input, 4-output reversible gate, the
**Garbage Less Gate (GLG)**. It is a complete 2:4 decoder on its own. Larger
decoders add columns of Fredkin gates after it. The GLG can also be built from
Mach-Zehnder interferometer (MZI) optical switches, which gives an all-optical
distributor, and that variant is included too.

All logic is combinational. There are no clocks, registers or handshakes.

## The GLG gate

    P = A'B' ^ D      Q = A'B ^ D      R = AB' ^ D      S = AB ^ C

The four products A'B', A'B, AB', AB are the four minterms of (A, B). With
C = D = 0 the outputs are therefore the 2:4 decoder, one-hot with index {A,B}.
C and D are there to make the gate reversible. Every one of the 16 input
combinations gives a different output word:

| ABCD | PQRS | ABCD | PQRS | ABCD | PQRS | ABCD | PQRS |
|------|------|------|------|------|------|------|------|
| 0000 | 1000 | 0100 | 0100 | 1000 | 0010 | 1100 | 0001 |
| 0001 | 0110 | 0101 | 1010 | 1001 | 1100 | 1101 | 1111 |
| 0010 | 1001 | 0110 | 0101 | 1010 | 0011 | 1110 | 0000 |
| 0011 | 0111 | 0111 | 1011 | 1011 | 1101 | 1111 | 1110 |

With C = D = 1 every output is inverted, which gives an active-low 2:4 decoder.
The 2:4 decoder (`glg_decoder_2to4`) uses one gate and two constant inputs, and
has no garbage output.

## Growing the decoder with Fredkin columns

A Fredkin gate (`fredkin_gate`) is a controlled swap:
P = A, Q = A'B ^ AC, R = A'C ^ AB. Suppose its second input carries a decoded
line x and its third input the constant 0. The gate then sends x to Q when the
control is 0 and to R when it is 1. That splits one line into two, x.E' and x.E.

`fredkin_split_stage` is a column of such gates that all use the same select
bit E. The bit enters the first gate's control input. It then leaves each gate
on the pass-through output P and enters the next gate's control input. Only
the copy leaving the last gate is unused, so each column has one garbage
output. Line x[i] becomes y[2i] (E = 0) and y[2i+1] (E = 1).

`glg_decoder_3to8` is one GLG (select bits A, B) followed by a column of four
Fredkin gates (select bit E). It uses 5 gates and has 1 garbage output.
Output `z[{a,b,e}]` is the selected line. `glg_decoder_n` continues the
construction: every further select bit, from MSB to LSB, adds a column twice
as wide as the last. An N:2^N decoder (N >= 3) therefore has
1 + 4 + 8 + ... + 2^(N-1) = 2^N - 3 gates and N - 2 garbage outputs. Garbage
bit j repeats the select bit of column j.

### Polarity input `s`

The 3:8 and N:2^N decoders have a polarity input `s`. It drives every constant
input of the circuit at once: the GLG's C and D and the third input of every
Fredkin gate.

- `s = 0`: one-hot outputs (the selected line is 1).
- `s = 1`: the GLG gives complemented minterms, and each Fredkin gate fed a 1
  passes the complement on. The outputs are one-cold: the selected line is 0
  and all the others are 1.

For the 3:8 decoder:

| A B E | z (s = 0) | z (s = 1) |
|-------|-----------|-----------|
| 0 0 0 | 00000001  | 11111110  |
| 0 0 1 | 00000010  | 11111101  |
| 0 1 0 | 00000100  | 11111011  |
| 0 1 1 | 00001000  | 11110111  |
| 1 0 0 | 00010000  | 11101111  |
| 1 0 1 | 00100000  | 11011111  |
| 1 1 0 | 01000000  | 10111111  |
| 1 1 1 | 10000000  | 01111111  |

The active-low table is only reached when all constant inputs are 1. If only
the Fredkin constants are 1 and the GLG keeps C = D = 0, the outputs are not
one-cold. That is why a single `s` drives all of them.

## The all-optical GLG

### Switch and combiner models

Light present is 1 and no light is 0. An SOA-based MZI switch (`mzi_switch`)
has an incoming signal and a control signal:

- bar port = in & ctrl: the light goes to the bar port when the control is lit.
- cross port = in & ~ctrl: it goes to the cross port when the control is dark.
- With no incoming light, neither port is lit.

A beam combiner (`beam_combiner`) merges several fibres. Its output is lit when
any input is lit, which is a logical OR.

### Why each output is split into three terms

Two beams that meet in a combiner add their power. Each GLG output is
therefore written as three product terms of which at most one is ever lit:

    P = A'B'D' + AD + A'BD        Q = A'BD' + AD + A'B'D
    R = AB'D'  + A'D + ABD        S = ABC'  + A'C + AB'C

### The switch network

`glg_mzi` builds these terms as chains of switches:

- A continuous light source switched by A gives A'.
- A switched by B gives AB and AB'.
- A' switched by B gives A'B and A'B'.
- D switched by A gives DA and DA'.
- C switched by A gives CA'.
- Six further switches take each minterm and switch it by D, or by C.

In total the network has 11 switches and 4 combiners with 3 inputs each. An
output that feeds two places needs an optical splitter. Switch outputs that no
combiner uses are dumped. In MZI delays, the longest path is three switches
deep (light, then A', then A'B', then A'B'D'), followed by a combiner. The
optical cost is 11 switches.

### Which parts follow the published layout

The published optical layout also uses 11 switches and four 3-input
combiners. It has switches fed by (A, B), (D, A), (C, A) and (light, A), and
those four are kept here. The rest of this network is derived from the
equations above, not copied from that layout.

`glg_decoder_2to4 #(.OPTICAL(1))` uses this network instead of the Boolean
gate, and has the same truth table.

## Module map

    glg_data_distributor        top: the two distributors below, side by side
    ├── glg_decoder_n  (N)      N:2^N distributor, sel -> z, polarity s, garbage
    │   └── glg_decoder_3to8    GLG + 4 Fredkin gates
    │       ├── glg_gate
    │       └── fredkin_split_stage (WIDTH=4) ── fredkin_gate x4
    │   └── fredkin_split_stage (WIDTH=8, 16, ...)   only for N > 3
    └── glg_decoder_2to4 (OPTICAL=1)   optical 2:4 distributor, opt_a/opt_b -> opt_y
        └── glg_mzi ── mzi_switch x11, beam_combiner x4

The top's ports are:

- `sel[N-1:0]` and `s` in, `z[2^N-1:0]` and `garbage[N-3:0]` out, for the
  N:2^N distributor.
- `opt_a` and `opt_b` in, `opt_y[3:0]` out, for the optical one.

`N` defaults to 3 (the 3:8 decoder). The top needs N >= 3. `glg_decoder_n`
itself also accepts N = 2; it then uses the 2:4 decoder, which has no
polarity input.

## Simulating

Every testbench in `tb/` checks itself. It prints
`TB_RESULT checks=<n> failures=<n>` and exits. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl \
        --top-module tb_glg_data_distributor tb/tb_glg_data_distributor.sv
    ./obj_dir/Vtb_glg_data_distributor

Each module has a testbench, `tb/tb_<module>.sv`. The expected values come
from truth tables and from the gates' defining behaviour, such as "a Fredkin
gate swaps B and C when A = 1". They do not reuse the RTL equations.

- `tb_glg_decoder_n` covers N = 2 to 6.
- `tb_glg_data_distributor` runs the top at its default size. It sweeps every
  select value in both polarities together with every optical select value,
  then applies 200 random operations. It fails if any output line was never
  selected in either polarity, or if any optical output was never lit.

## Departures and open points

- **MZI cross port.** This design takes the cross port as in & ~ctrl. That is
  what the switch's operation implies: light leaves the cross port only when
  there is incoming light and no control. A NAND reading would emit light with
  no input at all.
- **Polarity.** One-cold outputs are reached by setting every constant input
  to 1, as described under "Polarity input `s`". The usual configuration holds
  the GLG's C and D at 0; that gives only the one-hot table.
- **Optical wiring.** As described above, the switch-to-switch wiring of
  `glg_mzi` is derived from the equations. Only the part counts and four of
  the switch input pairs follow the published layout.
- **N:2^N construction.** The general decoder is stated in the published work
  without a circuit. The column-doubling construction here is this design's.
- **Cost figures.** Counted from this RTL:
  - The 3:8 decoder has 5 gates, 1 garbage output and 6 constant inputs (GLG
    C and D plus one per Fredkin gate). The published comparison gives 4
    constant inputs, with the same gate and garbage counts.
  - The 2:4 decoder has 1 gate, 2 constant inputs and no garbage output. This
    agrees with the published text. It does not agree with the published
    comparison chart, which gives 2 gates, no constant inputs and 1 garbage
    output.
- **Not modelled:**
  - Optical power, loss, wavelengths and the unit switch delay.
  - The semiconductor optical amplifiers and couplers inside each MZI, and the
    optical sources and receivers. These are analog parts; the RTL captures
    only their logic levels.
