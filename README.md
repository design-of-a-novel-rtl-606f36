# Decimal to excess-3 / BCD / Gray multicode converter (QCA-style)

A single decimal digit comes in on ten one-hot lines, `I0`..`I9`. Three codes for it come out
together, as twelve lines:

| outputs | code | value for digit d |
|---|---|---|
| O1 O2 O3 O4 | excess-3 | d + 3 (0011 … 1100) |
| O5 O6 O7 O8 | BCD | d (0000 … 1001) |
| O9 O10 O11 O12 | Gray | d XOR (d >> 1) |

O1, O5 and O9 are the most significant bits. For example, digit 4 gives excess-3 `0111`,
digit 6 gives BCD `0110` and digit 8 gives Gray `1100`.

The circuit is designed for quantum-dot cellular automata (QCA). In QCA the natural gates are a
three-input majority gate and an inverter, and logic is clocked in zones that pass a value on one
phase at a time. This RTL models that structure in synchronous logic. The logic is built from the
same gate types the QCA circuit uses, and each clock zone is a register stage. As a result the
model keeps the QCA circuit's latency (7 clock phases) and its rate (one digit per four-phase clock
cycle).

## Every output is an OR of input lines

The input is one-hot, so each output bit is simply the OR of the lines whose digit has a 1 in that
bit position:

```
O1  = I5+I6+I7+I8+I9        O5  = I8+I9          O9  = I8+I9
O2  = I1+I2+I3+I4+I9        O6  = I4+I5+I6+I7    O10 = I4+I5+I6+I7+I8+I9
O3  = I0+I3+I4+I7+I8        O7  = I2+I3+I6+I7    O11 = I2+I3+I4+I5
O4  = I0+I2+I4+I6+I8        O8  = I1+I3+I5+I7+I9 O12 = I1+I2+I5+I6+I9
```

Outputs that overlap share hardware (`rtl/multicode_logic.sv`):

* **O9 is O5.** Both are `I8+I9`: the BCD and Gray MSBs are the same bit.
* **O10 = O5 + O6.**
* **O1 = O5 + "O6 shifted by one line".** The block that forms O6 from `I4..I7` is repeated with
  its inputs moved up by one line, `I5..I8`. ORing that copy with O5 gives O1.
* **O3 = I0 + "O7 shifted by one line".** O7 is `I2+I3+I6+I7`. The shifted copy is
  `I3+I4+I7+I8`, and ORing it with `I0` gives O3.
* **O8 = NOT O4.** Exactly one line is active. O4 is then high for the even digits and O8 for
  the odd ones, so one inverter replaces a five-input OR. This relies on the input being
  one-hot. With no line active the converter outputs excess-3 `0000`, BCD `0001` and Gray `0000`.

The logic does not check that the input is one-hot. In simulation, an assertion in the top
level flags a captured digit that is not. Two active lines give the OR of their two codes, with
O8 still the inverse of O4.

## The programmable four-input block

Wide ORs use one gate type, `quad_gate`. It has four data inputs and a select input. Select 0
makes it a four-input AND, and select 1 a four-input OR. An inverted output, `y_n`, gives NAND
and NOR. Inside, it is a seven-input majority vote over
`{a, b, c, d, sel, sel, sel}`. With select 0, four votes need all four data inputs. With select 1,
the select supplies three votes and any one data input adds the fourth. The
converter uses only the OR setting: `sel` is tied to 1 and `y_n` is left open.

Two-input ORs use the three-input majority gate `Maj(a,b,c) = ab + ac + bc` with `c = 1`
(`rtl/majority_gate.sv`). With `c = 0` the same gate would be an AND.

## Clock zones, latency and rate

This is the part that differs most from ordinary RTL. In QCA a value has no static wire to sit
on. Every group of cells belongs to a clock zone, and each zone cycles through four phases:

1. **switch**: the barrier rises and the cells take the value of the zone behind them;
2. **hold**: the cells keep that value and drive the zone ahead;
3. **release**: the barrier falls;
4. **relax**: the cells are unpolarized.

Zone k runs one phase behind zone k-1, so a value moves forward one zone per phase.

In this model one `clk` period is one phase:

* `qca_clock_gen` keeps a two-bit phase counter. It reports each zone's phase as
  `zone_phase[k] = (counter - k) mod 4`, and raises `zone_switch[k]` in zone k's switch phase.
* The **input zone** (zone 0) is the `dec_in` register. It loads at the end of a cycle in which
  `in_ready` (`zone_switch[0]`) is high. That happens once every four cycles. Changes to `dec_in`
  in the other three cycles are ignored.
* `multicode_logic` follows the input zone, and its twelve results go through
  **`clock_zone_pipe`**, six more stages in zones 1, 2, 3, 0, 1, 2. Each stage loads only in
  its own zone's switch phase and holds its value for the other three phases.

Timing at the top:

```
cycle n      in_ready = 1, dec_in/in_valid sampled at the end of the cycle
cycle n+1    stage 1 (zone 1) loads at the end of this cycle
...
cycle n+7    excess3/bcd/gray and out_valid show digit n        <- 7 phases = 1.75 clock cycles
cycle n+10   last cycle digit n is shown; from n+11 the next digit is shown
```

Seven phases are longer than one four-phase cycle, so two digits are in flight at once. The next
digit enters at n+4 and comes out at n+11. A digit sent with `in_valid` low is a bubble: the
outputs show `out_valid = 0` for its four cycles. Reset is synchronous and active low. It clears
all valid bits and puts zone 0 in its switch phase.

## Ports of `multicode_converter`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | one period per clock phase |
| `rst_n` | in | 1 | synchronous reset, active low |
| `dec_in` | in | 10 | one-hot digit, bit k = `Ik` |
| `in_valid` | in | 1 | `dec_in` carries a digit |
| `in_ready` | out | 1 | the input zone samples at the end of this cycle |
| `zone_phase` | out | 4 × `qca_phase_e` | phase of clock zones 0..3 |
| `out_valid` | out | 1 | the codes below are a converted digit |
| `excess3` | out | 4 | {O1,O2,O3,O4} |
| `bcd` | out | 4 | {O5,O6,O7,O8} |
| `gray` | out | 4 | {O9,O10,O11,O12} |

`LATENCY_PHASES` (default 7) sets the delay in phases. The shared types and constants are in
`rtl/qca_pkg.sv`: the phase enum, the `multicode_t` struct of the three codes, and the sizes.

## Where this model departs from the QCA circuit

* **Gate budget.** The QCA layout uses five four-input blocks, eight majority gates and one
  inverter. This netlist does not reproduce that split; no way was found to cover all twelve
  equations with exactly those totals. It has eight four-input blocks,
  seven majority gates and one inverter. The extra three blocks form the four-input parts of O2,
  O4 and O12. A majority gate then ORs in the fifth line of each. The outputs are the same.
* **Inside of the four-input block.** Only its AND/OR/NAND/NOR behaviour and the select input are
  specified. The weighted seven-input majority vote is one way to build it from majority logic.
* **Placement in zones.** Which QCA gates sit in which clock zone is not modelled. All logic sits
  between the input zone and the first stage of `clock_zone_pipe`, and the remaining zones only
  carry results. The total delay (7 phases) and the rate (one digit per 4 phases) match.
* **Handshake and reset.** `in_valid`/`out_valid`, `in_ready` and the reset are additions for
  use in a synchronous system. The QCA circuit has none of them.
* **Physical figures** have no counterpart in RTL: about 380 cells, 0.29 µm², 171 meV of energy,
  and three layers (main, via, top).

## Files

| file | contents |
|---|---|
| `rtl/qca_pkg.sv` | phase enum, code struct, sizes, latency |
| `rtl/majority_gate.sv` | three-input majority gate |
| `rtl/qca_inverter.sv` | NOT gate |
| `rtl/quad_gate.sv` | programmable four-input AND/OR block with NAND/NOR output |
| `rtl/multicode_logic.sv` | combinational converter (equations above) |
| `rtl/qca_clock_gen.sv` | four-phase zone clock sequencer |
| `rtl/clock_zone_pipe.sv` | chain of clock-zone stages |
| `rtl/multicode_converter.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench checks its module against values it works out independently. The codes are
computed arithmetically as d+3, d and d^(d>>1), not from the gate equations. Each testbench ends
by printing `TB_RESULT checks=N failures=M`. For example, the top-level test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/qca_pkg.sv \
    tb/tb_multicode_converter.sv --top-module tb_multicode_converter
./obj_dir/Vtb_multicode_converter
```

For another module, replace `multicode_converter` with its name. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/qca_pkg.sv rtl/<module>.sv`.

`tb_multicode_converter` runs the top at its default parameters for 600 cycles. It first sends
the ten digits in order, then random digits mixed with bubbles, and changes `dec_in` in cycles
where it must be ignored. It checks every output in every cycle, the phase of each zone, the
`in_ready` pattern, and a latency of exactly 7 cycles. It also counts the mechanisms and fails if
any never happens: conversions of each digit, bubbles, ignored input changes, and digits
overlapping in flight. The component testbenches are exhaustive where the input space allows
(majority gate, inverter, four-input block, all ten digits).
