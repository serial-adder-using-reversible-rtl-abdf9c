# Reversible-logic 1-bit serial adder

A serial adder adds two binary numbers one bit position per clock: a single
full adder handles the current pair of operand bits, and a one-bit store
keeps the carry for the next position. This design builds both parts only
from **reversible gates**. A reversible gate has as many outputs as inputs
and maps inputs to outputs one-to-one, so no information is erased. Erasing
a bit has a minimum energy cost (kT ln 2), so in principle reversible
circuits can run with far lower dissipation. They are the natural circuit
model for quantum and some nanotechnology logic.

Reversibility has three consequences that shape the whole design:

* **No plain fan-out.** A wire may not simply drive two inputs. A copy is
  made with a gate, here a Feynman gate whose second input is 0.
* **Constant inputs.** Some gate inputs are tied to 0 or 1 to get the wanted
  function out of a fixed gate.
* **Garbage outputs.** Outputs that are only there to keep the mapping
  one-to-one. They are not needed for the result.

A design is judged by its number of gates, constant inputs, garbage outputs
and quantum cost. This adder uses 5 gates, 3 constant inputs and 4 garbage
outputs.

```
           +---------------------------+
  a ------>|  rev_full_adder           |-----> sum
  b ------>|  (2 Peres gates)          |
     +---->| cin                  cout |--+--> cout
     |     +---------------------------+  |
     |     +---------------------------+  |
     +-----| q   rev_dff             d |<-+
   qbar <--| (1 Fredkin, 2 Feynman)    |
           |            clk            |
           +---------------------------+
```

## The gates

Each gate is a combinational module. The dot is the control line; ⊕ is xor.

| module         | inputs  | outputs                               | quantum cost | role here                          |
|----------------|---------|---------------------------------------|--------------|------------------------------------|
| `feynman_gate` | a, b    | p = a, q = a ⊕ b                      | 1            | copier (b = 0) and inverter (b = 1) |
| `fredkin_gate` | a, b, c | p = a, q = a'b ⊕ ac, r = a'c ⊕ ab     | 5            | controlled swap, used as a 2:1 selector |
| `peres_gate`   | a, b, c | p = a, q = a ⊕ b, r = ab ⊕ c          | 4            | half adder with c = 0              |

The Fredkin gate swaps b and c when a is 1. Its r output is therefore
`a ? b : c`, and that is the selector the carry store is built on. The Peres
gate is a Toffoli gate (r = ab ⊕ c) followed by a Feynman gate on the first
two lines. It is the cheapest gate that makes an AND term, so it is the
adder's building block. The Toffoli gate (cost 5) and the double Feynman
gate (p = a, q = a ⊕ b, r = a ⊕ c, cost 2) are the usual alternatives. This
design uses neither, so neither is included.

## Full adder: two Peres gates (`rev_full_adder`)

* The first Peres gate gets (a, b, 0). It gives a ⊕ b on q and ab on r.
* The second gate gets (a ⊕ b, cin, ab).
  * Its q output is `a ⊕ b ⊕ cin`, the sum.
  * Its r output is `(a ⊕ b)·cin ⊕ ab`, the carry out. The two terms are
    never 1 together, so this xor is the familiar generate-or-propagate
    carry.
* The one constant input is the 0.
* The two garbage outputs are the p outputs of the gates: a, and a ⊕ b.
  They are brought out on the `garbage[1:0]` port.

## Carry store: Fredkin plus two Feynman gates (`rev_dff`)

This is the part to read carefully. The cell is called a D flip-flop, but
the circuit is **level-sensitive**: it behaves as a D latch that is
transparent while `clk` is 1.

* The Fredkin gate has `clk` on its control input, `d` on b, and the stored
  bit, returned on a feedback wire, on c.
* Its r output is `clk ? d : stored`.
* A Feynman gate with b = 0 copies r onto two wires. One copy is the
  feedback wire back to the Fredkin c input. The other goes on to a second
  Feynman gate with b = 1, which produces `q` and `qbar`.
* While `clk` is 1, `q` follows `d`. When `clk` falls, the loop
  recirculates the last value.
* The two constant inputs are the 0 and the 1 on the Feynman gates.
* The two garbage outputs are the Fredkin p (a copy of `clk`) and q
  (at rest equal to `d`). They are on `garbage[1:0]`.
* There is no reset.

**How the storage is modelled.** In a reversible circuit the stored bit
lives on the feedback wire. Written directly in RTL, that loop is a
zero-delay combinational cycle, and synthesis tools cannot treat it as
storage. The RTL keeps the three gates and their wiring as drawn, and holds
the feedback wire in an `always_latch` enabled by the same `clk`. Lint and
synthesis report one latch bit and a combinational path through it. Both are
intended. The path is only open while `clk` is 1, and then the Fredkin gate
selects `d` and ignores the fed-back bit.

## Serial adder and its clocking (`rev_serial_adder`, the top)

The full adder's `cout` drives the cell's `d`, and the cell's `q` is the full
adder's `cin`. Operands enter least significant bit first, one bit of each
per clock. One sum bit leaves per clock, in the same cycle as its operand
bits. Because the carry store is a transparent latch, the operands must
follow a two-phase rule:

1. Change `a` and `b` while `clk` is 0.
2. Sample `sum` (and `cout`) before `clk` rises. In the low phase `q` still
   holds the previous position's carry, so `sum = a ⊕ b ⊕ q`.
3. Keep `a` and `b` stable while `clk` is 1. The loop full adder → latch →
   full adder is then closed, and it settles without racing:
   * when a = b, the carry is a, whatever the loop holds;
   * when a ≠ b, the carry equals the carry in, so the loop keeps the old
     carry.

   Either way the latch ends up holding majority(a, b, old carry), the
   correct next carry.
4. When `clk` falls, the new carry is held for the next bit.

**Clearing the carry.** There is no reset pin. Apply a = b = 0 for one clock
before a new word: the carry out of 0 + 0 + c is 0. After the last bit of a
word, `q` holds the final carry, the (n+1)-th bit of the sum. Words may be of
any length. No word counter or operand shift registers are included; the
surrounding logic supplies the bit streams.

Ports of the top:

| port           | dir | meaning |
|----------------|-----|---------|
| `clk`          | in  | bit clock; the carry cell is transparent while it is 1 |
| `a`, `b`       | in  | operand bits, LSB first |
| `sum`          | out | sum bit of the current position, valid in the low phase |
| `cout`         | out | full-adder carry out of the current position |
| `q`, `qbar`    | out | stored carry (carry in of the current position) and its complement |
| `garbage[3:0]` | out | [0] a, [1] a ⊕ b, [2] clk, [3] Fredkin q |

`q` and `cout` also feed internal nodes. Treat them as observation taps: a
strictly reversible netlist would need one more Feynman copier for each.

### Cost

| part          | gates | constant inputs | garbage outputs |
|---------------|-------|-----------------|-----------------|
| full adder    | 2     | 1               | 2               |
| carry cell    | 3     | 2               | 2               |
| serial adder  | 5     | 3               | 4               |

After conventional synthesis the whole top is 16 word-level cells and one
latch bit.

## Where this RTL departs from, or adds to, the gate-level description

* The carry cell is level-sensitive, as its gate diagram is, not
  edge-triggered as its name suggests. This RTL does not add edge
  triggering. Instead it defines the two-phase operand rule above.
* The recirculating loop is modelled as a latch (see above).
* The following are this design's own choices: LSB-first order, clearing
  the carry with a zero bit instead of a reset, and bringing the garbage
  lines and `q`, `qbar` and `cout` out as ports.
* Two points of the wiring come from reading the gate diagrams, not from
  equations:
  * In the full adder, the first gate's a ⊕ b goes to the second gate's
    control input and its ab goes to the second gate's third input.
  * In the carry cell, the feedback starts at the first Feynman gate's
    copy output.

  In both cases it is the only wiring that gives the intended function and
  the gate, constant and garbage counts above.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `feynman_gate_tb`, `fredkin_gate_tb`, `peres_gate_tb`: every input
  combination is checked against truth tables written out by hand. They also
  check that the outputs form a permutation (reversibility) and that the
  Fredkin gate keeps the number of ones. They check the uses the design
  relies on: copy and invert, selector, half adder.
* `rev_full_adder_tb`: all eight cases, then 200 random ones, against
  a + b + cin, and the garbage lines.
* `rev_dff_tb`: random `clk`/`d` levels against a latch reference model.
  Then clocked use, with `q` required to hold through every low phase.
* `rev_serial_adder_tb`: end to end. It adds 400 random word pairs of 1 to
  64 bits, including the all-propagate case b = ~a. It checks:
  * every sum bit, the carry in the low phase and the carry in the high
    phase;
  * the whole-word result and the final carry;
  * that one bit is consumed per clock.

  It counts how often the carry is generated, propagated, killed, cleared
  and overflowed, and fails if any of these never happened. The top has no
  parameters, so this run is also the full-size test.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
          --top-module rev_serial_adder_tb tb/rev_serial_adder_tb.sv
./obj_dir/Vrev_serial_adder_tb
```

Verilator reports `UNOPTFLAT` on the carry-cell loop. That is the intended
loop described above, and the simulation settles correctly. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/<module>.sv`.

## Files

* `rtl/feynman_gate.sv`, `rtl/fredkin_gate.sv`, `rtl/peres_gate.sv`: the
  gates.
* `rtl/rev_full_adder.sv`: the two-Peres full adder.
* `rtl/rev_dff.sv`: the carry store.
* `rtl/rev_serial_adder.sv`: the top.
* `tb/<module>_tb.sv`: one testbench per module.
