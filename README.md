# VOS-GAFA: an approximate GDI full adder and its 8-bit ripple adder

This is the logic of a low-power approximate adder meant for error-tolerant
work such as image processing or neural-network inference on edge devices.
The transistor circuit it models saves power in two ways. It runs at a
scaled supply ("voltage over-scaling", VOS: 0.5 V in a 45 nm process). It is
also built from Gate Diffusion Input (GDI) cells, two-transistor gates. Most
of the saving in logic comes from one decision: **the full adder has no carry
logic at all.** Its carry output is simply its B input. Its sum is an
XOR-based function of A, B and the carry in. Eight of these cells chained
make an 8-bit adder in which no carry travels further than one bit.

The RTL here gives the logic function of that circuit, written as synthesizable
SystemVerilog. It says nothing about supply voltage, power or delay. Those are
properties of the transistor circuit.

## The 1-bit cell (`vos_gafa`)

    SUM  = (A ^ B) & CIN | (~A ^ B) & ~CIN
    COUT = B

When CIN = 1 the sum is A XOR B. When CIN = 0 it is A XNOR B. This is the
published equation, taken literally. It equals `~(A ^ B ^ CIN)`: the
complement of an exact full adder's sum, for all eight input patterns.

| CIN A B | SUM | COUT | exact sum | exact carry |
|---------|-----|------|-----------|-------------|
| 0 0 0   | 1   | 0    | 0         | 0           |
| 0 0 1   | 0   | 1    | 1         | 0           |
| 0 1 0   | 0   | 0    | 1         | 0           |
| 0 1 1   | 1   | 1    | 0         | 1           |
| 1 0 0   | 0   | 0    | 1         | 0           |
| 1 0 1   | 1   | 1    | 0         | 1           |
| 1 1 0   | 1   | 0    | 0         | 1           |
| 1 1 1   | 0   | 1    | 1         | 1           |

COUT is wrong in two rows out of eight: `{CIN,A,B}` = 001 and 110.

The transistor cell has only the pins A, B, CIN and SUM, plus the supplies.
Its "carry out" is just the B wire routed on to the next bit. The RTL gives the
cell a `cout` port that carries B, so that the chain reads like an ordinary
ripple adder.

### GDI cells (`gdi_cell`)

A GDI cell is one PMOS and one NMOS transistor, with their gates joined (G) and
their drains joined (OUT). Unlike in an inverter, the PMOS source (P) and the
NMOS source (N) are inputs. When G is low, OUT follows P. When G is high, OUT
follows N:

    OUT = ~G & P | G & N

Different connections to P and N give the whole GDI family:

| N | P | G | OUT          | name |
|---|---|---|--------------|------|
| 0 | B | A | ~A & B       | F1   |
| B | 1 | A | ~A \| B      | F2   |
| 1 | B | A | A \| B       | OR   |
| B | 0 | A | A & B        | AND  |
| C | B | A | ~A&B \| A&C  | MUX  |
| 0 | 1 | A | ~A           | NOT  |

`gdi_cell` models logic values only. A real GDI cell can lose a threshold
voltage on some input patterns. The transistor design restores full swing
with extra transistor pairs, and none of that changes the logic value.

### How `vos_gafa` is put together

The transistor cell uses 14 transistors. The RTL builds the same function from
four GDI cells:

| instance | GDI function | G        | P         | N        | output         |
|----------|--------------|----------|-----------|----------|----------------|
| `u_nb`   | NOT          | B        | 1         | 0        | ~B             |
| `u_xnor` | MUX          | A        | ~B        | B        | A XNOR B       |
| `u_xor`  | NOT          | A XNOR B | 1         | 0        | A XOR B        |
| `u_sum`  | MUX          | CIN      | A XNOR B  | A XOR B  | SUM            |

This arrangement is this design's own, chosen as the smallest GDI network for
the equation. It is not a gate-by-gate copy of the 14-transistor schematic.
The schematic's extra pairs restore signal levels and improve noise margin,
and a logic model does not need them.

## The 8-bit adder (`vos_rca`, the top)

`vos_rca` chains `WIDTH` cells (8 by default). Stage *i* takes `a[i]`, `b[i]`
and the carry output of stage *i-1*. It drives `s[i]`. Since each carry output
is that stage's B bit, the whole adder reduces to

    s[i] = ~(a[i] ^ b[i] ^ b[i-1])     i >= 1
    s[0] = ~(a[0] ^ b[0] ^ CIN0)

    equivalently  s = ~(a ^ b ^ (b << 1))  (truncated to WIDTH bits)

Changing `a[i]` changes only `s[i]`. Changing `b[i]` changes `s[i]` and
`s[i+1]`. The longest logic path is one cell deep, whatever the width.

Ports: `a`, `b` (inputs, `WIDTH` bits) and `s` (output, `WIDTH` bits). There is
no carry-in and no carry-out pin, as in the transistor-level 8-bit block
(pins A0..A7, B0..B7, S0..S7 and the supplies). The logic is combinational,
with no clock or reset: `s` is valid in the same time step as `a` and `b`.

| parameter | default | meaning |
|-----------|---------|---------|
| `WIDTH`   | 8       | operand width; 8 is the reference design |
| `CIN0`    | 0       | constant carry into bit 0 (this design's choice; the block has no pin for it) |

## How approximate it is

Over all 65,536 pairs of 8-bit operands, `s` never equals `(a + b) mod 256`.
The mean absolute difference is 112.0 and the largest is 255. Most of this comes
from the inverted sum polarity of the cell equation. With `~s` in place of `s`,
that is with the cell's sum taken as `A ^ B ^ CIN`, the result is exact for
8,748 of the 65,536 pairs and the mean difference drops to about 50.1. Either
way, this is an adder for uses where the exact value does not matter, and the
error is deterministic: it does not depend on supply voltage in this model.
The testbench `tb_vos_rca` prints these statistics.

## Where this RTL departs from the transistor design, or fills gaps

- **Sum polarity.** The sum follows the published equation literally, as the
  complement of the exact sum bit. The circuit is also described as having
  "complete adder functionality", which does not fit that equation. If the
  intended function is the exact-polarity sum, swap the P and N connections of
  `u_sum` in `rtl/vos_gafa.sv`. That one edit turns SUM into `A ^ B ^ CIN`.
- **Carry.** COUT = B, following the published equation and the removal of the
  carry logic. One description of the schematic mentions a "carry-out
  generation section", but the cell has no carry-out pin. The RTL follows the
  equation.
- **First carry-in.** Tied to the constant `CIN0` = 0. The source design does
  not say what drives it.
- **Internal structure** of the cell: four GDI cells instead of the
  14-transistor schematic (see above).
- **Not modelled:** supply voltage, delay (about 0.18 ns to 0.53 ns per cell and
  0.79 ns to 0.93 ns for 8 bits across process corners at 0.5 V), power (about
  19 nW to 25 nW per cell and 173 nW to 219 nW for 8 bits), noise margins, and
  timing errors caused by over-scaling. The logic model gives no figure for
  timing errors.
- The input buffers of the transistor-level test setup (two inverters in series
  per input) shape edges only and have no logic function. They are not included.

## Files

| file | contents |
|------|----------|
| `rtl/gdi_cell.sv` | GDI primitive, `out = g ? n : p` |
| `rtl/vos_gafa.sv` | approximate full adder from four GDI cells |
| `rtl/vos_rca.sv`  | WIDTH-bit chain of `vos_gafa`; the top |
| `tb/tb_gdi_cell.sv` | cell equation and all six derived GDI functions, exhaustive |
| `tb/tb_vos_gafa.sv` | all 8 input patterns against the truth table and the equation; counts of rows that differ from an exact adder |
| `tb/tb_vos_rca.sv` | the default 8-bit adder over all 65,536 operand pairs, single-bit-flip checks of the one-stage carry reach, error statistics |
| `tb/tb_vos_rca_params.sv` | 4-bit with CIN0 = 1 (exhaustive), 16-bit (random), 1-bit with CIN0 = 1 |

Each testbench compares against a model written separately from the RTL. Each
ends with a line `TB_RESULT checks=N failures=M` and has a watchdog that ends a
hung run.

## Simulating

With Verilator 5 (any testbench; swap the name):

    verilator --binary --timing -Wall -Wno-fatal --top-module tb_vos_rca \
        -y rtl -y tb +libext+.sv tb/tb_vos_rca.sv
    ./obj_dir/Vtb_vos_rca

Lint a module on its own:

    verilator --lint-only -Wall -y rtl +libext+.sv rtl/vos_rca.sv

Verilator reports one warning on `vos_rca`: the carry out of the last stage
(`carry[WIDTH]`) is unused. This is intended, because the adder has no
carry-out pin.
