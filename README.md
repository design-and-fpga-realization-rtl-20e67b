# Low-switching-activity reversible full adder

A one-bit full adder built only from reversible logic gates: New Gate (NG), Toffoli
gate (TG) and Feynman gate (FG). A reversible gate has as many outputs as inputs, and
its input pattern can always be recovered from its output pattern. No information is
erased, which in principle removes the energy cost of erasing it.

Each of the three gates is written here in an inverter-free form. Every XOR and every
complemented literal is made from 2-input NAND, NOR, AND and OR cells, with no NOT cell.
The aim is to cut the summed switching activity, and with it the dynamic power of the
gate on an FPGA or in standard cells. The adder chains the three gates. It is purely
combinational and has no parameters.

## The gates

| Gate | Function | Cells (2-input) | NOT cells |
|------|----------|-----------------|-----------|
| `feynman_gate` | `zi = xi`, `zj = xi ^ xj` | 3 | 0 |
| `toffoli_gate` | `zi = xi`, `zj = xj`, `zk = xi&xj ^ xk` | 4 | 0 |
| `new_gate` | `zi = xi`, `zj = xi&xj ^ xk`, `zk = ~xi&~xk ^ ~xj` | 8 | 0 |

Each gate builds its XOR as `NAND(x,y) & OR(x,y)`. The New Gate's third output needs
`~xi & ~xk`, which is a single `NOR(xi,xk)`. It then needs an XNOR with `xj`, built as
`AND(u,xj) | NOR(u,xj)`. The same gates written in sum-of-products form need 2, 2 and 7
inverters.

The usual switching-activity estimate for an n-input cell is `(2^n - 1) / 2^(2n)`. That
is 1/4 for an inverter and 3/16 for a 2-input cell. On this estimate the Feynman gate
drops from 1.0625 to 0.5625 once its inverters go.

## How the adder is wired

```
          a ──┐            ┌── garbage[0] (= a)
          b ──┤  NG        ├── a&b ───────────────┐
       1'b0 ──┘            └── a^b ──┐            │
                                     ▼            ▼
                          ┌── TG (xi = a^b, xj = cin, xk = a&b) ──► cout
        cin ─────────────►│       zi = a^b, zj = cin
                          └──────────┬──────────┘
                                     ▼
                          FG (xi = a^b, xj = cin) ─► zj = sum, zi = garbage[1] (= a^b)
```

- The New Gate's third input is held at 0. With that, its outputs j and k are the
  generate term `a&b` and the propagate term `a^b`.
- The Toffoli gate computes `cout = (a^b)&cin ^ a&b`. The two terms are never both 1,
  so the XOR does the job of the OR in the usual carry equation.
- The Toffoli gate's two pass-through outputs feed the Feynman gate, which gives
  `sum = a^b^cin`.
- Two outputs carry no result ("garbage"): the New Gate's first output and the Feynman
  gate's first output. Both are brought out on `garbage[1:0]`. This keeps the adder as a
  whole reversible: `a = garbage[0]`, `b = garbage[0]^garbage[1]`,
  `cin = sum^garbage[1]`. If the port is left open, synthesis removes the logic behind it.

Ports of `rev_full_adder`: inputs `a`, `b`, `cin`; outputs `sum`, `cout`,
`garbage[1:0]`. All are single-bit except `garbage`. There is no clock and no reset.

## What follows the published design and what does not

Taken from the published design:
- the gate equations;
- the cell and inverter counts per gate;
- the NG → TG → FG chain with the constant 0;
- which output carries the sum, which carries the carry, and which two are garbage.

Choices made here:
- **Cell arrangement.** Only the cell counts are published, not the netlists. The
  NAND/OR/AND and NOR/AND/NOR/OR arrangements above are the simplest inverter-free ones
  that meet those counts.
- **Toffoli cell fan-in.** The published cell table gives the Toffoli gate four 2-input
  cells. Its switching-activity sum instead prices three of them as 3-input cells. This
  design uses 2-input cells. The function is the same either way.
- **Total cell count.** The published switching-activity sum for the whole adder counts
  14 cells (2 at the 2-input rate, 12 at the 3-input rate). The three gates as built
  here hold 3 + 4 + 8 = 15 cells. The adder is built from the three gates unchanged.
- **Garbage outputs.** Bringing them out as a port is this design's choice.
- **Power and timing.** The power, delay and energy-delay figures published for this
  adder come from a vendor FPGA flow. Nothing here reproduces or checks them.

The reference demonstration uses a Zynq-7000 board (XC7Z020clg400):
- slide switches W13, P15 and G15 drive `a`, `b` and `cin`;
- LED M14 shows `sum` and LED M15 shows `cout`.

That mapping belongs in a constraints file, and none is included here.

## Files

- `rtl/new_gate.sv`, `rtl/toffoli_gate.sv`, `rtl/feynman_gate.sv`: the three gates.
- `rtl/rev_full_adder.sv`: the adder (top).
- `tb/<module>_tb.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and stops itself with a watchdog.
  - The gate testbenches apply every input pattern and compare against a truth table
    written out by hand. They check that all output patterns differ, which shows the gate
    is reversible. For FG and TG they also check that a second copy of the gate restores
    the inputs.
  - `rev_full_adder_tb` first applies the two demonstration vectors, 110 (sum 0, carry 1)
    and 100 (sum 1, carry 0). It then applies all 8 patterns and 2000 random ones, and
    compares each with `a + b + cin`. It checks the garbage outputs and that the inputs can
    be recovered. It counts carry-generate, carry-propagate and carry-kill cases and fails
    if any of them never happens.

## Simulating

```
verilator --binary --timing --assert -Irtl -Itb -y rtl --top-module rev_full_adder_tb \
    tb/rev_full_adder_tb.sv && ./obj_dir/Vrev_full_adder_tb
```

Replace the testbench name to run another block's testbench. A lint pass is
`verilator --lint-only -Wall -y rtl rtl/rev_full_adder.sv`.

## Extending it

Several adders can be chained into a ripple-carry adder by connecting `cout` to the
next stage's `cin`. Each stage adds two garbage bits. No multi-bit adder is included.
