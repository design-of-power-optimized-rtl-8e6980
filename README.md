# Hybrid self-timed array multiplier

This is a 4 × 4 unsigned array multiplier with no clock. It splits the work
between two logic styles:

- **Partial products** are formed by dual-rail domino AND gates. Each bit
  travels on two wires. A gate's output shows when its result has arrived,
  and every gate takes the same time whatever the data.
- **Partial-product addition** uses plain single-rail full adders. These are
  small: the adder cell this design is based on needs 16 transistors.

Two kinds of glue sit between the two styles:

- **Synchronizers** turn each single-rail operand bit into a dual-rail pair.
- A **precharge/evaluation detector** watches all the dual-rail partial
  products. It tells the outside world, over a four-phase request/acknowledge
  handshake, when a result is ready and when the circuit has reset for the
  next one.

The data path holds no registers.

The RTL gives the logic function of every cell and the exact structure of the
array. The circuit-level figures of the original cells (transistor counts,
area, power, speed) have no meaning in RTL and are not reproduced.

## Dual-rail signalling

A dual-rail bit is the struct `hyb_pkg::dr_t` = `{t, f}`:

| `{t,f}` | meaning |
|---|---|
| `00` | null: the spacer between two data values |
| `10` | valid 1 |
| `01` | valid 0 |
| `11` | illegal |

A domino gate is *precharged* to null and then *evaluates* to a valid value.
The next value may only be computed after it has been precharged again. This
is the four-phase dual-rail protocol. Its advantage is that the data carries
its own timing. Once every bit of a word is valid the word is complete, and no
clock or delay estimate is needed to know it.

## The cells

### `synchronizer`: single rail to dual rail

`out.t = in` and `out.f = ~in`: an input wire plus one inverter. Its output is
always a valid code word, never null. The null spacer comes from the domino
gate the synchronizer feeds, which forces its output to null while it is
precharged. One synchronizer sits on each operand bit, 2N of them in all.

### `sync_and_gate`: the dual-rail domino AND gate

This gate forms one partial product, `a[j] & b[i]`:

- **Precharge (`pre = 1`):** the output is null.
- **Evaluate (`pre = 0`):** the outputs are
  - `out.t = a.t & b.t`
  - `out.f = a.t&b.f | a.f&b.t | a.f&b.f`

Every term has exactly one literal from each input. That has two consequences:

- Each pull-down stack of the domino gate has the same height, so the
  gate's delay does not depend on the data.
- The output stays null until **both** inputs are valid, so a valid output
  also proves that its inputs have arrived.

An ordinary AND gate (`out.f = a.f | b.f`) would settle early when one input
is 0. Its delay would then depend on the data, and completion detection on
its output would be unsound.

A real domino gate keeps its evaluated value until the next precharge, even
if its inputs drop. Under the handshake below the inputs stay valid for the
whole evaluate phase, so the RTL models the gate as combinational.

### `completion_detector`: the precharge/evaluation detector

This block watches a word of `W` dual-rail bits (`W = 16` = N² by default):

- `all_valid` is the AND of the per-bit `t ^ f`.
- `all_null` is the AND of the per-bit `~(t | f)`.
- `done` is a Muller C-element over these two. It rises when the whole word
  is valid, falls when the whole word is null, and otherwise keeps its value.
  This hysteresis matters. A word whose bits are changing, some already new
  and some still old, must not signal completion in either direction.

The C-element is written as an `always_latch`. The one latch bit in the
design is therefore intended. An immediate assertion flags the illegal code
`11` on any input.

### `hybrid_full_adder`: the single-rail adder

This is a full adder built around an XNOR of the operands, in the style of a
hybrid CMOS / transmission-gate cell:

```
x    = a XNOR b
sum  = x XNOR cin          // = a ^ b ^ cin
cout = x ? a : cin         // pass-gate multiplexer
```

This decomposition is a gate-level reading of an XNOR-based 16-transistor
cell. It is not a transistor netlist.

## The array (`hybrid_array_mult`)

```
 a[N-1:0] ──► N synchronizers ──┐
                                ├──► N×N sync_and_gate ──► pp_dr[i*N+j] ──► completion_detector ──► ack
 b[N-1:0] ──► N synchronizers ──┘          ▲                      │ (true rails)
                                   pre = ~req                     ▼
                                                 (N-1)×N hybrid_full_adder array ──► product[2N-1:0]
```

The partial product is `pp[i][j] = a[j] & b[i]`. The adder array is a
row-ripple array multiplier:

- The running sum starts as row 0 of the partial products.
- Row `i` (1 … N−1) is a ripple-carry adder of N full adders, carry-in 0. It
  adds partial-product row `i` to the previous running sum shifted right by
  one bit.
- The least significant sum bit of each row is product bit `i`.
- The last row's N sum bits and its carry-out give product bits N … 2N−1.

For N = 4 this is 16 AND gates and 12 full adders. Adders whose third input
is always 0 act as half adders.

The dual-rail partial products enter the adders as their true rails. These
are 0 during precharge, so `product` reads 0 while the circuit is precharged.

## Handshake and timing

The multiplier is the passive side of a four-phase channel. `req` drives the
domino precharge directly (`pre = ~req`).

| phase | sender | multiplier |
|---|---|---|
| 1. idle | `req = 0`, sets `a`, `b` | gates precharged, partial products null, `ack = 0`, `product = 0` |
| 2. request | raises `req` | gates evaluate |
| 3. acknowledge | waits | once all N² partial products are valid, `ack` rises; `product = a*b` |
| 4. release | drops `req` after reading `product` | gates precharge; once all are null, `ack` falls |

`a` and `b` must stay stable from `req` rising until `ack` falls. Assertions
in the top check the passive-side ordering: `ack` may rise only while `req`
is high, and fall only while `req` is low.

The detector does not cover the adders. The adders are single-rail, so
nothing in their outputs says when they have settled. In silicon this part
follows the bundled-data discipline: a delay matched to the slowest adder
path would be placed between the detector and `ack`. A delay has no logic
function, so it is not in the RTL. In zero-delay simulation `product` is
already correct when `ack` rises. For a physical implementation, insert the
matched delay on `ack`.

The original circuit is described as a wave pipeline: a path without
storage elements, where several data waves could in principle be in flight
at once. That overlap depends entirely on physical delays. This RTL performs
one multiplication per four-phase cycle.

## What follows the source design and what does not

These follow the source design:

- the split into dual-rail domino AND gates and single-rail XNOR-based
  adders;
- the synchronizer structure (input wire plus inverter, outputs `in` and
  `outbar`);
- the equal-height stacks of the AND gate;
- the detectors between the two domains;
- the 4 × 4 size;
- the absence of pipeline registers.

These are this design's own choices, because the source gives no detail:

- the topology of the adder array;
- the sum-of-products form of the AND gate's false rail;
- the precharge polarity, and driving it straight from `req`;
- taking the true rail as the single-rail value of a partial product;
- one detector over all partial products, with a C-element as its output
  stage;
- the `dr_t` field order;
- the absence of a reset. With `req` low the circuit resets itself, and the
  latch settles to 0 as soon as the gates are precharged.

The cell counts differ from the source. The source reports 438 transistors
for the whole 4 × 4 multiplier. 16 AND gates of 20 transistors plus 12
adders of 16 transistors would need 512, so the source's array must be
arranged differently. No attempt was made to match that count.

## Files

| file | contents |
|---|---|
| `rtl/hyb_pkg.sv` | `dr_t`, `DR_NULL`, `dr_encode`, `dr_is_valid`, `dr_is_null` |
| `rtl/synchronizer.sv` | single- to dual-rail encoder |
| `rtl/sync_and_gate.sv` | dual-rail domino AND gate |
| `rtl/completion_detector.sv` | precharge/evaluation detector (parameter `W`) |
| `rtl/hybrid_full_adder.sv` | XNOR-based full adder |
| `rtl/hybrid_array_mult.sv` | the multiplier (parameter `N`, default 4) |
| `tb/tb_*.sv` | one self-checking testbench per module |

The top-level parameter `N` can be changed. The array, the detector width
(N²) and the product width (2N) follow from it. The end-to-end testbench has
also passed exhaustively at N = 2, 3, 5 and 6 (set its `N` and pass `#(.N(N))`
to the instance).

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. It also has a watchdog that fails the run if a handshake hangs.
For example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/hyb_pkg.sv tb/tb_hybrid_array_mult.sv --top-module tb_hybrid_array_mult
./obj_dir/Vtb_hybrid_array_mult
```

`-Irtl` lets verilator find the instantiated modules by file name. The
package must be listed first.

What the testbenches cover:

- **`tb_hybrid_array_mult`**: all 256 operand pairs at the default size, in
  random order, each through a full four-phase cycle. It checks:
  - null partial products, `ack = 0` and `product = 0` in precharge;
  - `ack` rising within a bound after `req`;
  - `product == a*b`;
  - `product` held while `req` stays high for a random time;
  - `ack` falling after `req` drops.

  It counts the precharge phases, evaluate phases, completions and
  returns to null, and fails if any count is zero.
- **`tb_completion_detector`**: 50 random walks from all-null to all-valid
  and back, one bit at a time. `done` must hold its value until the last bit
  changes.
- **`tb_sync_and_gate`**: all nine dual-rail input states in both phases.
- **`tb_hybrid_full_adder`**: all eight input combinations.
- **`tb_synchronizer`**: both input values.
