# Carry propagate free signed-digit adder/subtractor

An ordinary binary adder has to wait for a carry to ripple from the lowest bit
to the highest. That is costly in adiabatic (energy-recovering) logic, where
every gate stage adds half a period of the power-clock supply to the delay.
This design avoids the ripple by working in **redundant binary**, a radix-2
signed-digit code. Every digit is -1, 0 or +1. Because most numbers then have
several spellings, each digit position can pick a carry that the position
above is sure to absorb. The result is ready after the same small, fixed delay
whatever the word length.

The RTL describes the logic of such an adder/subtractor: one-digit cells,
slices made of them, and an N-digit adder/subtractor (default 4 digits). A
clock-level model reproduces the constant delay of its adiabatic dynamic CMOS
logic (ADCL) realisation (default 9 delay units). The transistor-level ADCL
gates are not modelled. Only their timing is represented, in whole delay units.

## Signed digits on two rails

A number is `X = sum x_k * 2^k` with `x_k` in {-1, 0, +1}. The same value has
several spellings. For example, -3 can be written as 00(-1)(-1),
0(-1)01, 0(-1)1(-1), (-1)101 or (-1)11(-1). Each digit travels on two wires,
a plus rail and a minus rail (`sd_pkg::sd_digit_t`, fields `pos` and `neg`):

| digit | pos | neg |
|-------|-----|-----|
| +1    | 1   | 0   |
| 0     | 0   | 0   |
| -1    | 0   | 1   |

The code `pos = neg = 1` is unused. The adder never produces it, and the top
level asserts this on every clock edge. Negating a number means swapping the
two rails of every digit. Subtraction is done that way.

## The two-step addition (the heart of the design)

Adding digits `x_i` and `y_i` is done in two steps per position:

1. **Cell1** (`cpfas_cell1`) splits `x_i + y_i` into an intermediate carry and
   sum: `x_i + y_i = 2*c_i + s_i`, with `c_i, s_i` in {-1, 0, 1}.
2. **Cell2** (`cpfas_cell2`) forms the result digit `z_i = s_i + c_{i-1}`.

Step 2 could overflow if `s_i` and the incoming carry `c_{i-1}` were both +1
or both -1. Cell1 prevents this by looking one position down. It reads only
the minus rails of `x_{i-1}` and `y_{i-1}`, to learn whether both lower
digits are non-negative:

| x_i + y_i | both lower digits >= 0? | c_i | s_i |
|-----------|-------------------------|-----|-----|
| -2        | either                  | -1  | 0   |
| -1        | yes                     | 0   | -1  |
| -1        | no                      | -1  | +1  |
| 0         | either                  | 0   | 0   |
| +1        | yes                     | +1  | -1  |
| +1        | no                      | 0   | +1  |
| +2        | either                  | +1  | 0   |

Why this works:

- If both lower digits are non-negative, the carry out of the lower position
  can only be 0 or +1. A sum digit of -1 then cannot overflow.
- If either lower digit is negative, that carry can only be 0 or -1. A sum
  digit of +1 is then safe.
- So `z_i` always fits in one digit, and no signal travels more than one
  position.

Cell2 on two rails:

```
z.pos = s.pos & !c.neg | c.pos & !s.neg
z.neg = s.neg & !c.pos | c.neg & !s.pos
```

A +1 and a -1 cancel to 0. The two input pairs that Cell1 never produces
(both +1, both -1) would saturate.

## The 1-bit slice and how slices chain

The building block (`cpfas_1bit`) does not line up one Cell1 and one Cell2
on the same digit. It holds:

- a Cell1 for operand digit 0. Its sum `s_0` leaves the slice on pin `z0`.
- a Cell2 for result digit 1. It adds an externally supplied `s1` (the sum of
  the digit above) to Cell1's carry `c_0`, and drives `z1`.

Inputs `xm1_neg` and `ym1_neg` carry the minus rails of the operand digits
below.

`cpfas_nbit` places N slices side by side:

- Slice k gets operand digit k and the minus rails of operand digit k-1.
- Its `z0` pin (`s_k`) goes to the `s1` input of slice k-1, which produces
  final digit `z_k`.
- Slice 0 has no digits below. Its lower-sign inputs are tied to
  "non-negative", and its `z0` is final digit 0.
- The top slice's `s1` is tied to 0, so `z_N = c_{N-1}`.

An N-digit operation gives N+1 result digits. Because slice 0 always turns a
±1 pair sum into a -1 sum digit, `z[0]` is never +1. Its plus rail is
therefore constantly low, and synthesis reports it as a constant output.

Subtraction: when `sub` = 1, `cpfas_nbit` swaps the rails of every `y` digit
before the slices. The lower-sign inputs of the slices therefore see the
negated subtrahend too.

## ADCL timing model

An ADCL gate's output follows its sinusoidal supply V_phi. The output appears
half a supply period after the input. One such half period is the delay unit
`delta_phi = T_phi / 2`. The 4-digit adder/subtractor needs at most 9
`delta_phi`, independent of length. (A 4-digit ripple-carry design in the
same logic needs 21.)

`adcl_latency` models this as a chain of `DELAY` registers. Each register is
stepped by a clock that has one rising edge per `delta_phi`. `cpfas_adcl_top`
puts the combinational `cpfas_nbit` in front of a `PROP_DELAY`-stage chain:

- Operands and `sub` may change on every `clk` edge.
- The matching `z` appears exactly `PROP_DELAY` edges later.
- An active-low asynchronous `rst_n` clears the chain to zero digits.

This is an abstraction: it reproduces the constant delay in whole units.
Analog waveforms, energy recovery and sub-unit timing are not modelled.

## Modules

| file | role |
|------|------|
| `rtl/sd_pkg.sv` | digit type, constants, value/negate helpers |
| `rtl/cpfas_cell1.sv` | Cell1: intermediate carry and sum, table above |
| `rtl/cpfas_cell2.sv` | Cell2: final sum digit |
| `rtl/cpfas_1bit.sv` | 1-bit slice: Cell1 on digit 0, Cell2 on digit 1 |
| `rtl/cpfas_nbit.sv` | N-digit adder/subtractor, parameter `N` (default 4), input `sub` |
| `rtl/adcl_latency.sv` | delay chain, parameters `WIDTH` (10), `DELAY` (9) |
| `rtl/cpfas_adcl_top.sv` | top: `cpfas_nbit` + `adcl_latency`, parameters `N` (4), `PROP_DELAY` (9) |

Top ports: `clk`, `rst_n`, `sub`, `x[N]`, `y[N]` (digit arrays; index k
weighs 2^k) and `z[N+1]`.

Everything except `adcl_latency` is combinational. All of it is synthesizable.

## Simulating

Each testbench in `tb/` is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`. Example with plain Verilator 5, run from
the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sd_pkg.sv tb/tb_cpfas_adcl_top.sv --top-module tb_cpfas_adcl_top
./obj_dir/Vtb_cpfas_adcl_top
```

Substitute another testbench name to run it.

| testbench | what it checks |
|-----------|----------------|
| `tb_cpfas_cell1` | all 36 input cases against a reference table; `2c + s = x + y` |
| `tb_cpfas_cell2` | the 7 legal input pairs |
| `tb_cpfas_1bit` | every legal input: value and the prescribed split. It also runs the "1 + 1" experiment: `x0 = y0` toggling between 0 and +1, so `z1` toggles between 0 and +1 and `z0` stays 0. |
| `tb_cpfas_nbit` | all 81×81 4-digit pairs, add and subtract; 20000 random 8-digit pairs; a locality check that changing operand digit j moves only result digits j..j+2 (no carry propagation) |
| `tb_adcl_latency` | exact 9- and 1-stage delay; the result is never early; reset |
| `tb_cpfas_adcl_top` | the top at default parameters (see below) |

`tb_cpfas_adcl_top` runs the top at its default parameters:

- an exact-latency probe: the result of 1 + 1 must appear on the 9th edge, not
  before;
- every 4-digit operand pair in both modes, in shuffled order, one operation
  per edge, each checked 9 edges later;
- a count of every table row, both branches of the two ambiguous rows, and
  +1/-1 cancellation in Cell2. A failure is counted for any of these that
  never occurs.

## Choices made here and limits

- **Rail code.** The rail names and "minus rail = negative digit" come from
  the cell interfaces. The exact code table and the unused `(1,1)` code are
  this design's choices.
- **Cells from their functions.** Cell1 and Cell2 are written from their
  functions (the addition table and `z = s + c`), not as gate netlists of
  adiabatic NOT/NAND/NOR/ExNOR gates.
- **Subtract control.** The circuit is described as an adder/subtractor but
  has no mode pin in its slice. The `sub` input, and rail swapping as the way
  to negate, are this design's choices.
- **Chain edges.** The tie-offs at the ends of the chain suit a stand-alone
  N-digit adder. Cascading several `cpfas_nbit` instances would need
  `s_0` and the lower-sign inputs brought out. They are not.
- **Delay value.** One statement of the maximum delay says "less than 9" units
  and another says 9. The model uses 9.
- **Delay model.** It assumes a new operation may start on every unit; whether
  the adiabatic circuit can accept that rate is not established.
- **Not represented.** The CMOS input/output interface circuits of the
  fabricated single-slice chip, its on-chip test-vector section and the
  supply have no RTL here. The 4-digit ripple-carry ADCL adder/subtractor
  used for comparison is not part of the design.
