# BCD-to-Excess-3 converter in majority logic (QCA style)

Excess-3 codes each decimal digit as the digit plus three, so 0 becomes 0011
and 9 becomes 1100. This converter takes a BCD digit and gives its Excess-3
code. It is built only from three-input majority gates and inverters, which
are the native gates of quantum-dot cellular automata (QCA). Its timing
follows QCA clocking: the code appears one QCA clock cycle after the digit,
once it has crossed four clock zones.

This is a synthesizable SystemVerilog model of a published QCA converter
design. Each QCA gate becomes a small RTL module. The QCA clocking becomes a
chain of registers. The cell layout is not modelled: cell count, area and
polarisation have no RTL counterpart.

## The code and its equations

Inputs are `A B C D` (A has weight 8) and outputs are `W X Y Z` (W has
weight 8):

| digit | ABCD | WXYZ |   | digit | ABCD | WXYZ |
|------:|------|------|---|------:|------|------|
| 0 | 0000 | 0011 | | 5 | 0101 | 1000 |
| 1 | 0001 | 0100 | | 6 | 0110 | 1001 |
| 2 | 0010 | 0101 | | 7 | 0111 | 1010 |
| 3 | 0011 | 0110 | | 8 | 1000 | 1011 |
| 4 | 0100 | 0111 | | 9 | 1001 | 1100 |

Codes 1010 to 1111 are never valid BCD, so they are don't-cares. Using them
that way gives four short equations. Two of them share the term `C+D`:

```
Z = D'
Y = CD + (C+D)'          = C XNOR D
X = B'(C+D) + B(C+D)'    = B XOR (C+D)
W = A + B(C+D)
```

## Majority gates as AND and OR

A three-input majority gate `Maj(a,b,c)` outputs 1 when at least two inputs
are 1. If one input is held at a constant, the gate becomes a two-input
gate:

- `Maj(a,b,0) = a AND b` (`qca_and2`)
- `Maj(a,b,1) = a OR b` (`qca_or2`)

In QCA the constant is a cell fixed at polarisation -1 (logic 0) or +1
(logic 1). Both wrappers instantiate `qca_maj3`, so the netlist really is made
of majority gates.

## The gate network

The converter (`bcd_xs3_core`) uses eight majority gates and three inverters.
Every majority gate has one constant input:

```
cd      = Maj(C, D, 0)            c+d     = Maj(C, D, 1)
(c+d)'  = NOT (c+d)               B'      = NOT B
Y       = Maj(cd, (c+d)', 1)
B(c+d)' = Maj(B, (c+d)', 0)       B'(c+d) = Maj(B', c+d, 0)
X       = Maj(B'(c+d), B(c+d)', 1)
B(c+d)  = Maj(B, c+d, 0)          W       = Maj(A, B(c+d), 1)
Z       = NOT D
```

The terms `c+d` and `(c+d)'` are each computed once and used three times.
That sharing is the point of choosing these equations over the separate
minimum sum-of-products for each output.

### Outputs for non-BCD inputs

Nothing detects or flags the six invalid codes. Their outputs are whatever
the equations give:

| ABCD | 1010 | 1011 | 1100 | 1101 | 1110 | 1111 |
|------|------|------|------|------|------|------|
| WXYZ | 1101 | 1110 | 1111 | 1000 | 1001 | 1010 |

## Clock zones and latency

QCA is clocked by four phase-shifted signals. They raise and lower the
tunnelling barriers of successive groups of cells, called clock zones. A
value moves one zone per phase, so crossing the four zones takes one full
clock cycle. The converter's outputs therefore appear one clock cycle after
its inputs.

This model works as follows:

- `clk` is a zone clock: one rising edge per QCA clock phase, so four edges
  make one QCA clock cycle.
- `qca_zone_pipe` is a chain of `CLOCK_ZONES` registers on that clock. The
  default is 4.
- The whole gate network is evaluated in front of the first register.
- The code of the digit sampled on edge *n* appears on `xs3` just after edge
  *n*+4.
- A new digit can be applied on every edge. The zones act as a pipeline.
- `rst_n` (active low, asynchronous) clears all zones, so `xs3` reads 0000
  until the first digit has crossed them. Real QCA has no reset; this is part
  of the model.

The latency matches the original design, but the place where the logic sits
does not. In the QCA layout the gates are spread over the zones. Here all the
logic sits before the first register. The timing seen at the ports is the
same.

## Modules

| file | what it is |
|------|-----------|
| `rtl/bcd_xs3_pkg.sv` | packed structs `bcd_t {a,b,c,d}` and `xs3_t {w,x,y,z}` |
| `rtl/qca_maj3.sv` | three-input majority gate |
| `rtl/qca_inv.sv` | inverter |
| `rtl/qca_and2.sv`, `rtl/qca_or2.sv` | majority gate with one input fixed at 0 / 1 |
| `rtl/bcd_xs3_core.sv` | combinational converter (the network above) |
| `rtl/qca_zone_pipe.sv` | `CLOCK_ZONES` × `WIDTH` register chain |
| `rtl/bcd_xs3_qca.sv` | top: core followed by the four-zone pipe |

Top-level ports of `bcd_xs3_qca`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | zone clock, 4 edges per QCA clock cycle |
| `rst_n` | in | 1 | asynchronous active-low reset of the zones |
| `bcd` | in | 4 (`bcd_t`) | BCD digit, `a` is the MSB |
| `xs3` | out | 4 (`xs3_t`) | Excess-3 code, `w` is the MSB |

Parameter: `CLOCK_ZONES` (default 4) sets the latency in zone-clock edges.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

- Every gate is tested on its full truth table.
- `tb_bcd_xs3_core` applies all 16 input codes. It checks the ten digits
  against digit + 3 and against the Excess-3 table. It checks all 16 codes
  against the XOR/XNOR form of the equations.
- `tb_qca_zone_pipe` streams random words through the pipe. It checks the
  exact four-edge delay and the asynchronous reset.
- `tb_bcd_xs3_qca` runs the top at its default parameters in three phases:
  1. It applies digits 0 to 9 in counting order, one per QCA clock cycle.
     Each code must not appear before the fourth edge and must appear on it.
  2. It streams 400 random codes, valid and invalid, one per edge.
  3. It resets in mid-stream.

  It counts four events: digits converted, don't-care codes converted,
  one-cycle latencies observed, and resets. It fails if any of the four never
  happened.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bcd_xs3_pkg.sv \
    tb/tb_bcd_xs3_qca.sv --top-module tb_bcd_xs3_qca -Mdir obj
./obj/Vtb_bcd_xs3_qca
```

Replace `tb_bcd_xs3_qca` with another testbench name to run that one.

## How this differs from the original QCA design

- **Inverter count.** The original description says the converter uses two
  inverters. Its block diagram and the equations need three (on D, on C+D and
  on B). This model uses three.
- **Clocking.** The four-phase clock is reduced to one register per phase, and
  all logic is placed before the first zone (see above). The reset is added.
- **Not modelled.** The layout is not modelled: 200 cells, about 0.06 µm²,
  and a coplanar wire crossing. The physics of the cell and the wire are not
  modelled either. A QCA wire is just a net here.
