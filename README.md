# Reversible 16-bit adder/subtractor

This is a 16-bit two's-complement adder/subtractor built only from
*reversible* gates. A reversible gate has as many outputs as inputs, and
its input-to-output map is one-to-one: no information is erased. Landauer's
principle ties every erased bit to a minimum heat of kT·ln2, so reversible
circuits are studied as a route to very low power. The cost of reversibility
is bookkeeping. Constant inputs (*ancillas*) feed the gates, and extra outputs
(*garbage*) carry the information a normal adder would throw away.

The circuit uses two gate types:

- 16 **HNG** gates, each one full adder, chained into a ripple-carry adder.
- 8 **Double Feynman gates (F2G)**, each a controlled inverter for two bits
  of operand B. Together they flip all of B when the circuit subtracts.

The logic function is an ordinary adder/subtractor:

| `ctrl` | `cin` | result `s`            | `cout`                         |
|--------|-------|-----------------------|--------------------------------|
| 0      | 0/1   | `a + b + cin`         | carry out                      |
| 1      | 1     | `a + ~b + 1 = a - b`  | 1 = no borrow (`a >= b`, unsigned) |

## The two gates

**Double Feynman gate** (`rtl/f2g.sv`), 3 inputs and 3 outputs:

    W = A        X = A ^ B        Y = A ^ C

With A = 0, the gate passes B and C through. With A = 1, it inverts both.
The gate is its own inverse. Its quantum cost is 2.

**HNG gate** (`rtl/hng.sv`), 4 inputs and 4 outputs:

    W = A        X = B        Y = A ^ B ^ C        Z = ((A ^ B) & C) ^ (A & B) ^ D

With D held at 0, Y is the full-adder sum of A, B and C, and Z is the
majority of A, B and C: the carry out. W and X copy A and B. These copies are
what keeps the gate one-to-one. Its quantum cost is 6.

## How the gates form an adder/subtractor

```
   ctrl ─►[F2G b1 b0]─►[F2G b3 b2]─► ... ─►[F2G b15 b14]─► garbage_ctrl
               │ │          │ │                 │ │
              b0^ctrl ...                        b15^ctrl
               ▼                                  ▼
  cin ─►[HNG 0]─c1─►[HNG 1]─c2─► ... ─c15─►[HNG 15]─► cout
          a0,D=0      a1,D=0                 a15,D=0
           │            │                      │
           s0           s1                     s15
```

- **Controlled inverter row.** F2G *k* takes `ctrl` on pin A, and `b[2k]`
  and `b[2k+1]` on pins B and C. Its W output, a copy of `ctrl`, drives
  pin A of F2G *k+1*. So the control signal itself ripples along the row,
  and the copy leaving the last gate is one garbage output.
- **Ripple-carry adder** (`rtl/hng_ripple_adder.sv`). HNG *i* gets `a[i]`,
  the conditioned `b[i]`, the carry into bit *i* and D = 0. Its Y output is
  `s[i]`. Its Z output is the carry into bit *i+1*.
- **Subtraction.** With `ctrl = 1`, the adder sees `~b`. Driving `cin = 1`
  adds the +1 that completes the two's complement of B.

## Cost in reversible-logic terms

For an N-bit circuit (N even):

| measure          | formula   | N = 16 |
|------------------|-----------|--------|
| reversible gates | N + N/2   | 24     |
| garbage outputs  | 2N + 1    | 33     |
| ancilla inputs   | N         | 16     |
| quantum cost     | 6N + 2·N/2 = 7N | 112 |

`rtl/rev_pkg.sv` holds these formulas. `rev_addsub` exports them as the
local parameters `GATE_COUNT`, `GARBAGE_OUTPUTS`, `ANCILLA_INPUTS` and
`QUANTUM_COST`. The garbage count is explained as follows. Each HNG leaves
W and X (2N bits), and the F2G row leaves its final copy of `ctrl` (1 bit).
All 2N+1 garbage bits are brought out as ports (`garbage_a`, `garbage_b`
and `garbage_ctrl`). That way the outputs of the module carry all of its
inputs:

- `a = garbage_a`
- `ctrl = garbage_ctrl`
- `b = garbage_b ^ {N{ctrl}}`

A synthesis tool is free to drop the garbage ports when they are not used.
On a conventional FPGA or ASIC target, the netlist then reduces to an
ordinary ripple-carry adder/subtractor. Reversibility is a property of the
gate-level structure, not of the silicon it is mapped to.

## Interface and timing

`rev_addsub #(parameter int unsigned N = 16)`

| port           | dir | width | meaning |
|----------------|-----|-------|---------|
| `a`, `b`       | in  | N     | operands |
| `ctrl`         | in  | 1     | 0 = add, 1 = subtract |
| `cin`          | in  | 1     | carry into bit 0; drive 1 to subtract |
| `s`            | out | N     | result |
| `cout`         | out | 1     | carry out of bit N-1 |
| `garbage_a`    | out | N     | HNG W outputs (= `a`) |
| `garbage_b`    | out | N     | HNG X outputs (= `b ^ ctrl`) |
| `garbage_ctrl` | out | 1     | `ctrl` after the last F2G |

The circuit is purely combinational, with no clock and no reset. The
critical path is the `ctrl` ripple through the F2G row feeding the top bits
of B, or the carry ripple through all N HNGs. A synthesis tool normally
shortens the first of these, because it is only a chain of buffers. The
published 16-bit implementation on a Virtex-5 (XC5VLX50T-1) reported a
9.167 ns delay and 51 µW. This RTL does not reproduce those figures: they
depend on the device and the tools.

N must be even, and the module stops elaboration otherwise. The module
computes no overflow flag. For signed operands, derive overflow outside
from the operand and result sign bits.

## Where this RTL makes its own choices

The gate equations, the gate counts, the pairing of two B bits per F2G, the
constant-0 D inputs and the ripple-carry chain follow the published design.
The following points are choices made here:

- **`cin` is an input of its own.** In the published description, the Ctrl
  terminal is also connected to Cin. However, its block diagram labels Cin
  separately, and its board tests run additions with Ctrl = 0 and Cin = 1.
  This RTL follows the tests. To get the tied-off version, drive
  `cin = ctrl`. Subtraction is then automatic, but the add-with-carry mode is
  lost.
- **Ctrl chains in bit order.** The F2G chain runs from bits 1:0 up to bits
  15:14. Any order gives the same logic.
- **Bit *i* of the conditioned B drives HNG *i*.** Which F2G output (X or Y)
  drives which HNG is not specified. Bit order is the natural reading.
- **Garbage outputs are ports**, instead of being left unconnected.
- **Cost figures come from formulas.** They are computed from N and are not
  counted from the netlist.

The published work was tested through a vendor's host program that wrote a
32-bit word into the FPGA (A in the upper half, B in the lower half) and
displayed the result. That board I/O path is not part of this RTL. The
adder/subtractor signals appear directly as top-level ports.

## Files

| file | content |
|------|---------|
| `rtl/rev_pkg.sv` | per-gate quantum costs and the N-bit cost formulas |
| `rtl/f2g.sv` | Double Feynman gate |
| `rtl/hng.sv` | HNG gate |
| `rtl/hng_ripple_adder.sv` | N HNG gates as a ripple-carry adder |
| `rtl/rev_addsub.sv` | top: F2G row plus HNG adder |
| `tb/tb_f2g.sv` | all 8 inputs against a written-out truth table; bijection; self-inverse |
| `tb/tb_hng.sv` | all 16 inputs against integer addition; bijection |
| `tb/tb_hng_ripple_adder.sv` | 16-bit corner cases and 20000 random sums; 4-bit exhaustive |
| `tb/tb_rev_addsub.sv` | top at N = 16 (see below) |
| `tb/tb_rev_addsub_reversible.sv` | 4-bit top: all 1024 inputs give distinct outputs, and the inputs can be recovered from the garbage |

`tb_rev_addsub` runs the top at its default width. It applies the ten
operand sets of the published board tests:

- 0042 + 0016 → 88 / 89
- 127D + 0123 → 5024 / 5025
- 34FF + 12AA → 18345 / 18346
- 0097 − 0077 → 32
- 0A28 − 0200 → 2088
- 0BC9 − 0AB8 → 273
- FFFF − DCBA → 9029

It then applies 20000 random operations, and it checks the cost parameters
(24 / 33 / 16 / 112). It also counts each behaviour: addition with either
carry-in, subtraction with and without borrow, carry out of an addition,
and a carry through all 16 bits. A behaviour that never occurs counts as a
failure. Every testbench prints `TB_RESULT checks=N failures=M` and stops
itself through a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/rev_pkg.sv tb/tb_rev_addsub.sv --top-module tb_rev_addsub
./obj_dir/Vtb_rev_addsub
```

Replace `tb_rev_addsub` with any other testbench name. The package must be
listed first, because `rev_addsub` imports it. To lint a module on its own:

```
verilator --lint-only -Wall -y rtl rtl/rev_pkg.sv rtl/rev_addsub.sv --top-module rev_addsub
```

The only lint warnings are that the four cost parameters are unused. They
exist to be read by a testbench or a parent module.
