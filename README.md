# Testable programmable clock pulse control elements

Programmable delay lines and pulse shapers (shrinkers, stretchers, choppers,
edge detectors) tune clock edges and pulse widths. They are redundant by
construction. Every tap of a delay line carries the same signal, and a pulse
shaper needs a gate that combines a signal with a delayed copy of itself. So a
static (DC) stuck-at test cannot see most of their faults. A delay line that
selects the wrong tap, or two taps at once, gives the same static output as a
good one. A shaper whose delayed leg is stuck at the non-controlling value
still passes every static pattern.

This RTL builds each element with a few extra level inputs and gates. These
make the logic irredundant, so every single stuck-at fault can be found with
static patterns. In functional operation the extra inputs are held at fixed
values and the elements behave exactly as the plain ones do:

* **Testable programmable delay line**: a parity input, gated by a Mode input,
  turns the select patterns into a distance-two code.
* **Testable programmable shrinker, stretcher and chopper**: the select decoder
  is reduced to a minimized one with no redundant terms. A second minimized
  decoder, driven by Test_Sel inputs, can degate each delay tap on its own.
* **Testable edge detector**: each leg of the XOR passes an AND gate with its
  own test input.

`tclk_top` joins the elements into one clock path. A controllable AND gate sits
at the clock input, then comes the delay line (regional edge tuning). The
delay line's output feeds the four pulse-shaping elements side by side (local
pulse-width shaping).

## How time is modelled

The elements are about delays, so the RTL needs a notion of time that
synthesis accepts. The structure assumes these timings:

* every delay block has a fixed delay D;
* every OR gate of a selectable delay chain also has a delay D;
* all other gates have zero delay.

The RTL keeps exactly this. A sampling clock, `tick`, defines the time step.
`delay_element` is a shift register of `DELAY_TICKS` flip-flops (default 1),
so D is `DELAY_TICKS` tick periods. All other gates are combinational. Every
element therefore has `tick` and `rst` ports. `rst` is synchronous and active
high, and it clears the delay flip-flops to 0.

In this model the outputs are combinational functions of the current inputs
and the delay flip-flops. A testbench that changes `clk_in` once per tick sees
the output at step n as a Boolean function of `clk_in` at steps n, n-1, ...,
n-k. A static test means holding all inputs for more than (number of taps)
ticks, then reading the output.

This is a functional model of the timing. To get a real delay element you would
replace `delay_element` with a library delay cell of the same ports (less
`tick` and `rst`). Pulse widths and edge positions in this README are given in
units of D.

## Testable programmable delay line (`testable_delay_line`)

The clock passes `N_TAPS` delay elements in series (default 4). Tap k carries
the clock delayed by (k+1)·D. The selector is OR-AND. Each tap enters its own
OR gate together with:

* one literal per select bit: `sel[j]` where bit j of k is 0, `~sel[j]` where
  it is 1;
* one parity literal.

All OR outputs meet in one AND. A gate whose literals are all 0 passes its tap.
Any other gate outputs 1, which has no effect on the AND. So `sel = k` selects
a delay of (k+1)·D.

**Why parity.** Without the parity literal, a select bit stuck at the wrong
value simply opens another gate. Every tap carries the same static level, so
no static pattern shows the fault. With the parity literal, a gate also needs
`parity` to equal the XOR of its code bits (even parity over `{sel, parity}`).
A single bad select bit then turns a valid pattern into an odd-parity one that
no gate accepts. The output sticks at 1, which a static test sees with the
clock held at 0.

**Mode gating.** Functional operation must not depend on `parity`. So the two
parity phases are gated:

* `pt = mode & parity` feeds the gates that need parity 0;
* `pc = mode & ~pt` feeds the gates that need parity 1.

With `mode = 0` both are 0, and the parity input has no effect.

| mode | {sel, parity} | output |
|------|---------------|--------|
| 0 | any | clk_in delayed by (sel+1)·D |
| 1 | even parity | clk_in delayed by (sel+1)·D |
| 1 | odd parity | constant 1 (no path selected) |

The select inverters (`sel_n`) and the parity gating (`pt`, `pt_n`, `pc`)
are separate nets, as in the gate diagram. Two assertions state these rules.
In functional mode exactly one selector gate is open. In test mode one gate is
open for even parity and none for odd. The
extra cost is two test inputs, one gate input per selector gate, and three
small gates. One variant computes parity internally with a parity tree, which
saves the parity input. It is not built here.

## Testable programmable pulse shapers (`pulse_shaper` and its wrappers)

### The delay chain

The generic element (`pulse_shaper`) takes `SEL_W` select bits and gives
N = 2^SEL_W selections. The clock enters a chain of N-1 two-input OR gates,
each followed by a delay D:

    chain[0]   = clock into the chain
    chain[i+1] = (chain[i] | X[i]) delayed by D            i = 0 .. N-2
    out        = (direct | Y[0]) & AND over i = 1..N-2 of (chain[i] | Y[i])
                 & chain[N-1]

`direct` is the undelayed clock.

X[i] = 1 forces chain stage i+1, and every stage after it, to 1. This value
has no effect on the final AND. So X[i] cuts the chain after i delays, and the
AND sees the clock delayed by 0, D, ..., i·D.

* One output edge comes from the undelayed clock.
* The other output edge comes from the most delayed tap still in use.

The input pulse must be wider than (N-1)·D.

### The minimized select decoder (`select_decoder`, the X terms)

A full decoder would produce N one-hot lines, and its terms would reconverge
redundantly through the OR chain. But once stage i is forced, every later stage
is forced anyway. So only the first forced stage matters, and the decoder can
be minimized. It becomes the inverse of a highest-priority encoder.

Take Sel_0 as the most significant bit of the code. Then:

* code value v selects i = N-1-v delays;
* X_i is the AND of the Sel bits that are 1 in the code N-1-i;
* code 0 raises no X, which keeps the whole chain.

For three bits:

| Sel0 Sel1 Sel2 | delays | X term |
|---|---|---|
| 111 | 0 | X0 = s0·s1·s2 |
| 110 | D | X1 = s0·s1 |
| 101 | 2D | X2 = s0·s2 |
| 100 | 3D | X3 = s0 |
| 011 | 4D | X4 = s1·s2 |
| 010 | 5D | X5 = s1 |
| 001 | 6D | X6 = s2 |
| 000 | 7D | none |

When code v is applied, every X_j with j < i is 0. This holds because a term's
bits form a subset of v only if the term's code is not larger than v. Later X
terms may be 1, but they have no effect. No Sel bit is ever needed in
complemented form.

Term sizes follow binomial coefficients. Six bits (64 selections) need one AND
of 6 inputs, 6 of 5, 15 of 4, 20 of 3, 15 of 2, and 6 plain wires.
`clkpc_pkg::term_has` holds this term rule. Both decoders use it.

### The test decoder (`test_select_decoder`, the Y terms)

Y_i is the X_i term with AND replaced by OR, over the Test_Sel bits. For three
bits: Y0 = t0+t1+t2, Y1 = t0+t1, ..., Y6 = t2. Each Y_i degates one input of
the final AND through a two-input OR, which makes N-1 extra gates:

* Y_0 degates the undelayed clock;
* Y_i degates tap i;
* only the most delayed tap, chain[N-1], enters the AND directly.

With Test_Sel = 0 every Y is 0, and the element is the plain minimized shaper.

In test, the two decoders together isolate any one line on its way to the
output. Test_Sel forces unwanted AND inputs to 1. Sel forces chain stages to 1,
which also sets the ungated last tap to 1 when needed. Both act with the clock
held at a static level. For example, a delayed tap stuck at the
non-controlling 1 is invisible to an unmodified shaper. Here it is found by
degating the direct leg and every other tap, forcing the stages after it with
Sel, and holding the clock at 0. The good output is then 0 and the faulty
output 1.

The cost is one minimized decoder, N-1 two-input gates, and SEL_W static test
inputs.

### The three shapes

`SHAPE` (`clkpc_pkg::shape_e`) places inverters. The 4-selection wrappers fix
it:

| module | inverters | positive pulse, width W | negative pulse, width W |
|---|---|---|---|
| `testable_shrinker` | none | leading edge i·D late, width W-i·D | width W+i·D |
| `testable_stretcher` | clock input and output | width W+i·D | width W-i·D |
| `testable_chopper` | clock into the chain only | width D at the leading edge | width-D high pulse at its trailing edge |

Here i is the number of delays selected. With two bits, Sel0 Sel1 = 11, 10,
01, 00 select i = 0, 1, 2, 3.

The stretcher is the shrinker with its input and output inverted. Because
(A'·B')' = A+B, it is OR reconvergence.

**Chopper: width depends on the first tap only.** The chopper's AND sees the
clock and *inverted* delayed copies of it. Every inverted tap goes low D, 2D,
... after the leading edge, so the first one (D) ends the output pulse. Every
selection with i ≥ 1 therefore gives a pulse of width D. The selections differ
only in which further taps take part. i = 0 (Sel = 11) removes all taps and
passes the clock unchopped. This is what inverting the delayed leg of the
shrinker gives, and the RTL keeps it.

## Testable edge detector (`testable_edge_detector`)

The output is `(test1 & clk) ^ (test2 & clk delayed by D)`. With
`test1 = test2 = 1`, each input edge makes an output pulse of width D. Holding
one test input at 0 lets a static test put all four input patterns on the XOR.
The element has no programmability.

## The clock path (`tclk_top`)

    clk_in & clk_in_en -> testable_delay_line -> tuned_clk -+-> testable_shrinker      -> shrunk_clk
                                                            +-> testable_stretcher     -> stretched_clk
                                                            +-> testable_chopper       -> chopped_clk
                                                            +-> testable_edge_detector -> edge_clk

Every select and test input of every element is a top-level port.
`clk_in_en` is the controllable level that lets a static test hold the clock
input. The chaining itself is only an illustration of where these elements sit
in a clock system. The oscillator, dividers, power-up gating and distribution
around them are not part of this RTL. `clk_in` stands for the distributed
clock.

Functional settings:

* `clk_in_en = 1` and `dl_mode = 0`;
* all `*_test_sel = 0`;
* `ed_test1 = ed_test2 = 1`.

Parameters: `DL_SEL_W` (2, four taps), `PS_SEL_W` (2, four selections) and
`DELAY_TICKS` (1).

## Files

| file | content |
|---|---|
| `rtl/clkpc_pkg.sv` | `shape_e`, decoder term rule, code-to-delay helper |
| `rtl/delay_element.sv` | delay D as `DELAY_TICKS` flip-flops |
| `rtl/testable_delay_line.sv` | parity-protected programmable delay line |
| `rtl/select_decoder.sv`, `rtl/test_select_decoder.sv` | minimized X and Y decoders |
| `rtl/pulse_shaper.sv` | generic testable shaper |
| `rtl/testable_shrinker.sv`, `rtl/testable_stretcher.sv`, `rtl/testable_chopper.sv` | four-selection wrappers |
| `rtl/testable_edge_detector.sv` | edge detector |
| `rtl/tclk_top.sv` | the clock path |
| `tb/tb_ref_pkg.sv` | reference models: published decode equations, shaper output from input history |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_stuck_at_coverage.sv` | static stuck-at fault simulation of every element |

## Stuck-at coverage

`tb_stuck_at_coverage` runs a fault simulation to check the point of all
this. It forces each named line of each element in turn to 0 and to 1. The
lines are gate outputs, plus the gate inputs that are separate branches, such
as the delay line's per-gate literals. For each fault it applies static
patterns, holds each for ten delays, and compares the output with the
fault-free one.

| element | single stuck-at faults | detected, all inputs | detected, test inputs held at functional values |
|---|---|---|---|
| shrinker | 42 | 42 | 19 |
| stretcher | 42 | 42 | 19 |
| chopper | 42 | 42 | 28 |
| delay line | 62 | 62 | 37 |
| edge detector | 14 | 14 | 9 |
| shrinker, eight selections (`pulse_shaper`, `SEL_W = 3`) | 78 | 78 | 28 |

With the test inputs, static patterns find every fault. Without them, between
a third and two thirds of the faults stay hidden. These are the wrong-selection and "not shaped"
faults that the test logic exists to expose.

## Verification

Each testbench compares outputs, step by step, with a reference computed
independently of the RTL. The references use the decode equations written out
term by term, and the expected output from the input history. The testbenches
also measure pulse edge positions and widths against the rules above. Each
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_delay_element`: random sequences at 1 and 3 ticks per D, and reset.
* `tb_select_decoder`: all codes at 2 and 3 bits, the priority property, and
  the term sizes and priority of a 6-bit (64-selection) instance.
* `tb_test_select_decoder`: all codes at 2 and 3 bits, and Test_Sel = 0
  raises nothing.
* `tb_pulse_shaper`: all 64 Sel/Test_Sel pairs of the 8-selection element in
  all three shapes, and pulse timing for every selection.
* `tb_testable_shrinker`, `tb_testable_stretcher`, `tb_testable_chopper`: all
  Sel/Test_Sel pairs, and positive and negative pulse timing for every
  selection.
* `tb_testable_delay_line`: functional and test mode, every sel/parity pair,
  and bad parity gives a constant 1.
* `tb_testable_edge_detector`: all test settings (all four XOR patterns
  reached), and edge pulse positions.
* `tb_stuck_at_coverage`: see above.
* `tb_tclk_top`: the whole path at default parameters. It runs 400 random
  segments, half functional and half in test configurations. It counts each
  mechanism and fails if one never happened: every delay selection, a
  bad-parity block, input gating, shrink, stretch, chop, an edge detection,
  and a Test_Sel degating a tap.

To simulate, for example, the top:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/clkpc_pkg.sv tb/tb_ref_pkg.sv tb/tb_tclk_top.sv --top-module tb_tclk_top
    ./obj_dir/Vtb_tclk_top

## Limits and choices not fixed by the structure

* The timing model (sampling clock, D as flip-flops, zero-delay gates) and the
  reset are this design's own. Skew added by the test gates cannot show in
  this model. The structure allows a dummy two-input gate on the ungated leg
  (the last tap) of a shaper, to equalize skew; it is not included.
* The delay line's tap order (`sel = k` selects (k+1)·D) and its even parity
  are choices. Odd parity works the same way with the parity literals swapped.
* Faults are injected on named lines only. Faults inside a gate, and
  fanout-branch faults on lines without a name of their own, are not
  enumerated.
* The chopper's output width is D for every selection except "no chop" (see
  above).
* The parity-tree variant of the delay line is not built.
