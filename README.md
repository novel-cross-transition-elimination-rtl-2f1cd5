# Spatial switching: a cross-transition-free bus codec

On a long on-chip bus, the costliest thing two neighbouring wires can do is
switch in opposite directions in the same cycle (`01 -> 10` or `10 -> 01`).
Such a *cross-transition* charges the coupling capacitance between the wires
twice over, so it is the slowest and, when one of the wires is falling, one of
the most energy-hungry events on the bus. Spatial switching removes every
cross-transition inside pairs of adjacent wires with a very small codec: each
pair of data wires gets one extra control wire, and whenever a word would
cross the pair, the encoder exchanges the two wires instead and says so on the
control wire. The decoder at the far end exchanges them back.

The codec is kept deliberately tiny (per pair: three XORs, one NAND, four
2:1 multiplexers and two flip-flops), because on buses of realistic length
(a few millimetres) a heavier codec burns more power than it saves on the
wires. For the same reason only the least significant bits are coded: they
toggle the most, while the high bits of typical data (pixels, audio samples)
are correlated and rarely cross.

## How one pair is coded

Call the two data bits of a pair `d[0]` (wire j) and `d[1]` (wire j+1), and
`prev` the two values the encoder drove on those bus wires in the previous
cycle. The encoder computes

    cross = (d[0] ^ d[1]) & (d[0] ^ prev[0]) & (d[1] ^ prev[1])
    Sw    = ~cross                      (a NAND of three XORs)
    bus   = Sw ? d : {d[0], d[1]}       (straight, or the two wires exchanged)

`cross` is 1 exactly when the two new bits differ and both differ from what
is on the wires, i.e. when sending the word straight would make an opposite
transition. In that case `d` is the bitwise inverse of `prev` with unequal
bits, so the exchanged word is *equal to `prev`*: the two data wires simply
do not move, and the only activity is a toggle of the `Sw` wire. A pair on
the coded bus therefore never shows a cross-transition, and the coded pair
keeps no hidden history beyond what is on the wires.

The important detail is that `prev` is the **coded** value (what is really
on the wires), not the previous input word. The two differ as soon as a pair
has been exchanged. Example for one pair, written as `W2 W1` (`W1` = wire j):

| cycle | input W2 W1 | bus W2 W1 | Sw | why |
|-------|-------------|-----------|----|-----|
| t0 | 00 | 00 | 1 | reset state 00, no change |
| t1 | 01 | 01 | 1 | single transition, straight |
| t2 | 10 | 01 | 0 | `01 -> 10` would cross: exchanged, wires hold |
| t3 | 10 | 01 | 0 | input unchanged, but the wires carry 01, so it would still cross: stay exchanged |
| t4 | 01 | 01 | 1 | straight again, wires still hold |

Comparing against the previous *input* instead would send `10` with `Sw = 1`
at t3, a cross-transition on the wires. The decoder needs no state: it
exchanges the pair back whenever the received `Sw` is 0.

`Sw = 1` means straight and `Sw = 0` means exchanged, so an idle bus after
reset shows `Sw = 1` on every pair.

## Bus layout

With `DATA_W` data bits of which the lowest `SS_BITS` are coded, the bus has
`DATA_W + SS_BITS/2` wires:

| bus bits | content |
|----------|---------|
| `3k+2`, `3k+1`, `3k` | pair k: data bit `2k+1`, data bit `2k` (after routing), `Sw_k`; for k = 0 .. SS_BITS/2-1 |
| `3*SS_BITS/2` and up | data bits `SS_BITS` .. `DATA_W-1`, uncoded, in order |

The defaults are `DATA_W = 8` and `SS_BITS = 6`: 8-bit data, three coded
pairs, 11 wires, 6 flip-flops. Six coded bits is the best setting reported for
image data on this bus: coding 2, 4 and 6 LSBs gives increasing savings, while
coding the two MSBs as well costs more in the codec than it saves on those
wires. `SS_BITS = DATA_W` codes the whole bus (`3n/2` wires). `SS_BITS` must
be even and at most `DATA_W`; elaboration fails otherwise.

The uncoded MSBs go straight from `tx_data` to `bus_tx` and from `bus_rx` to
`rx_data`, so a synthesis report shows those output bits as wired to inputs.
That is intended.

## Modules

    ss_codec_top          encoder and decoder of one bus; the wires are outside
    ├── ss_encoder        splits the word into pairs, codes the SS_BITS LSBs
    │   └── ss_pair_encoder   (one per pair) 2 data bits -> 3 bus wires
    │       ├── ss_cross_detect   2 flip-flops (prev), 3 XOR, NAND -> Sw
    │       └── ss_switch         2 multiplexers: straight or exchanged
    └── ss_decoder        one ss_deswitch per pair, MSBs pass through
        └── ss_deswitch   2 multiplexers driven by the received Sw

`ss_pkg` holds the coded-pair struct `ss_pair_t` (`{w[1], w[0], sw}`), the
`Sw` polarity constants and `coded_width()`.

`ss_codec_top` ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `tx_data` | in | `DATA_W` | word to send, one per cycle |
| `bus_tx` | out | `DATA_W+SS_BITS/2` | coded word to drive onto the bus wires |
| `bus_rx` | in | `DATA_W+SS_BITS/2` | coded word as received at the far end |
| `rx_data` | out | `DATA_W` | decoded word |

The bus wires themselves (and any repeaters on them) are analog and not part
of the RTL; connect `bus_tx` to `bus_rx` directly or through your own wire
model. In a real chip the encoder and decoder sit at opposite ends of the bus
and would be instantiated separately (`ss_encoder`, `ss_decoder`).

## Timing and reset

- Zero latency: `tx_data -> bus_tx` and `bus_rx -> rx_data` are
  combinational. The data path through the encoder is XOR, NAND, multiplexer.
- The encoder's two flip-flops per pair capture the coded pair on every rising
  edge, so every clock cycle is one bus word. There is no valid signal: holding
  the input simply re-selects the same routing and the bus stays still.
- Reset clears the stored coded word to 0. The decoder has no state and needs
  no reset.
- `ss_pair_encoder` carries a concurrent assertion that the coded pair never
  makes a cross-transition (disabled during reset).

## Choices not fixed by the technique

The coding rule, the gate structure, the `Sw` polarity and the 2-to-3 wire
pairing follow the published spatial-switching technique. These are this
implementation's own choices:

- the data width of 8 bits (inferred from the evaluation on 8-bit image data,
  where "8 LSBs" is the whole bus);
- the position of `Sw` inside each 3-wire group and of the uncoded bits on the
  bus (physical wire order affects how much coupling remains between groups
  and between `Sw` and its neighbours; it does not affect correctness);
- asynchronous active-low reset to an all-zero coded word;
- the published algorithm table phrases the test against "the data on the
  wire in the previous cycle"; the gate-level description and the worked
  example only work with the previously *coded* value, which is what is built
  (see the example above).

Cross-transitions are removed only inside each coded pair. Opposite
transitions between two neighbouring pairs, between a pair and its `Sw` wire,
or on the uncoded bits are left as they are; the technique does not address
them.

## What the RTL cannot show

The benefit of spatial switching is electrical: the reported savings (up to
about 12 % of bus power for a 5 mm bus, codec included, and codec speeds of a
few GHz) come from transistor-level simulation of wires in 130, 90 and 65 nm
processes. The RTL is the logic of the codec; the testbenches count
cross-transitions and toggles but say nothing about energy or delay.

## Verification

Every testbench in `tb/` is self-checking and prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_ss_switch`, `tb_ss_deswitch` | exhaustive routing, and that deswitching undoes switching |
| `tb_ss_cross_detect` | directed cross-transitions and 2000 random cycles against the XOR/NAND rule; reset value |
| `tb_ss_pair_encoder` | the t0..t4 example above, then 3000 random words against a reference model; round trip; no coded cross-transition |
| `tb_ss_encoder` | default and fully coded 8-bit bus against the reference model; MSB pass-through; reset in mid-stream |
| `tb_ss_decoder` | every possible 11-wire and 12-wire bus word |
| `tb_ss_codec_top` | end to end at the default parameters: a synthetic 64x32 image plus random words, decoded word equals sent word in the same cycle, bus equals the reference coding, no coded cross-transition; counts crossed, held-crossed and returning pairs, MSB activity and a reset during traffic, and fails if any never happened |
| `tb_ss_workloads` | coding 2, 4, 6 and 8 LSBs side by side on a synthetic 128x64 image; reports cross-transitions before and after coding and wire toggles per configuration |

`tb/ss_ref_model.sv` is the independent reference (a class) that the
encoder, decoder and end-to-end testbenches compare against.

On the synthetic image, the default codec removes all of the roughly 3000
in-pair cross-transitions on the six coded bits, at the price of about 4100
toggles on the three `Sw` wires.

Simulating with Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps \
      -y rtl -y tb +libext+.sv -Irtl -Itb rtl/ss_pkg.sv tb/ss_ref_model.sv \
      --top-module tb_ss_codec_top tb/tb_ss_codec_top.sv
    ./obj_dir/Vtb_ss_codec_top

Replace the top module and file for any other testbench (packages are
listed explicitly, modules are found through `-y`). Lint a module with
`verilator --lint-only -Wall -Irtl rtl/ss_pkg.sv rtl/<module>.sv`. The
testbenches initialise or reset everything they read, so they also run on
two-state simulators with random initial values.
