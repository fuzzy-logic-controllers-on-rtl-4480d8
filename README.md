# Fuzzy-logic arithmetic coprocessor for an 8051-class microcontroller

A fuzzy logic controller spends most of its time on a small set of
two-operand operations. Rule evaluation uses the lattice operations: minimum
for AND and maximum to combine rules that share a consequent. Defuzzification
uses multiplication and division. A plain 8051 is slow at all of them. This
design puts the four operations in programmable logic next to the processor,
on the same chip. The processor keeps running the control algorithm in
software and sends the heavy operations to the coprocessor over one 8-bit I/O
port.

The controller algorithm that the unit set is sized for:

1. Fuzzification: `y_ij = A_ij(x_i)`, the grade of each input in each of its
   membership functions. The program does this, typically with a lookup table.
2. Inference: `w_kl = max over rules (min of the grades the rule names)`. This
   runs on the **minimum** and **maximum** units.
3. Defuzzification: `v_kl = B_kl(w_kl)`, then `N_k = sum v_kl`,
   `D_k = sum w_kl` and `f_k = N_k / D_k`. This runs on the **multiplication**
   and **division** units.

Every expression is broken down into two-operand steps, so the hardware knows
nothing about rules, membership functions or the size of the controller.

## Register map and bus protocol

The top module `fl_coproc` has one 8-bit data bus and a 4-bit selector. The
upper two selector bits choose the unit and the lower two choose the register
(`rtl/fl_pkg.sv`, type `sel_e`):

| sel  | access | meaning                         |
|------|--------|---------------------------------|
| 0000 | write  | multiplication, 1st operand     |
| 0001 | write  | multiplication, 2nd operand     |
| 0010 | read   | product, low byte               |
| 0011 | read   | product, high byte              |
| 0100 | write  | division, dividend              |
| 0101 | write  | division, divisor               |
| 0110 | read   | integer quotient                |
| 0111 | read   | remainder                       |
| 1000 | –      | unused                          |
| 1001 | write  | maximum, 1st operand            |
| 1010 | write  | maximum, 2nd operand            |
| 1011 | read   | maximum                         |
| 1100 | –      | unused                          |
| 1101 | write  | minimum, 1st operand            |
| 1110 | write  | minimum, 2nd operand            |
| 1111 | read   | minimum                         |

Ports: `clk`, `rst_n` (synchronous, active low), `sel[3:0]`, `wr`,
`din[7:0]`, `dout[7:0]`.

* **Write:** drive `sel` and `din` and hold `wr` high for one rising edge.
  An assertion (`a_wr_code`) fires if `wr` is high while `sel` is not an
  operand code.
* **Read:** drive `sel`. `dout` shows the selected result combinationally.
  Write codes and unused codes read as zero.

### Timing: nothing says "done"

The coprocessor has no busy or done flag. The program must wait long enough
before it reads a result. This saves port pins and the time a polling loop
would take. The waits are:

| unit               | result valid                                             |
|--------------------|----------------------------------------------------------|
| multiply, divide   | combinational on the stored operands: after the array has settled from the second write |
| maximum, minimum   | the result register loads on every clock: one clock after the later operand write |

If the program reads a max/min result right after the last write, it gets the
previous result. The end-to-end testbench checks this on purpose.

Because every operand is held in a register inside its unit, the processor can
start a max, a min, a multiply and a divide one after another. It can then do
other work and collect the four results later.

## The multiplier: tiles of a*b + c + s

`rc_mult` is a ripple-carry array that computes `p = a*b + c + s`. The inputs
`a`, `b`, `c` and `s` are each N bits wide and the result is 2N bits.

The extra addends make the cells tile. `(2^N-1)^2 + 2(2^N-1) = 2^2N - 1`, so
the result never overflows. A 2N x 2N product can therefore be built from four
N x N cells, with the carry nibbles fed into the `c` and `s` inputs of their
neighbours. `mul_unit` builds its 8 x 8 multiplier from four 4 x 4 cells:

```
aL*bL            -> P[3:0],   carry h00
aH*bL + h00      -> m01,      carry h01
aL*bH + m01      -> P[7:4],   carry h10
aH*bH + h01 + h10 -> P[15:8]
```

This is an 8 x 8 multiplication done as four 4 x 4 operations, laid out side
by side so that the unit stays combinational.

Inside `rc_mult`, row `i` adds the partial product `a & {N{b[i]}}` to the
upper N bits of the running sum. The sum starts as `c`, and `s[i]` is the
row's carry-in. The carry ripples through the row's full adders, and the row
retires result bit `p[i]`.

* `PIPE = 0` (default): the array is purely combinational.
* `PIPE = 1`: a register rank sits after every row (pipeline granularity of
  one row). The latency is N clocks and a new operand set can enter every
  clock.

Sizes of 2, 3 and 4 bits are all legal, and the testbench checks each of them
exhaustively.

## Divider and lattice units

* `div_unit`: a combinational restoring array of 8 rows. Each row shifts in
  one dividend bit, subtracts the divisor, and either keeps the difference
  (quotient bit 1) or restores the old value.
  * All values are unsigned.
  * A zero divisor gives quotient 255 and a remainder equal to the dividend.
    No error is flagged.
* `lattice_unit`: two operand registers, an unsigned comparator and a
  registered output.
  * `IS_MAX = 1` makes it the maximum unit and `IS_MAX = 0` the minimum unit.
  * The top instantiates one of each.

Grades and all other data are unsigned 8-bit numbers. A membership grade in
[0, 1] maps to 0..255.

## What follows the source and what is this design's own

These follow the published design:

* the 8-bit bus from the processor's port
* the 16-code selector table
* the four units, with two stored operands each
* combinational multiply, divide, max and min, with the lattice units' output
  registered
* no completion flag
* multiplier cells that compute `a*b+c+s` at 2 to 4 bits, combinational or
  pipelined one row per stage
* 8 x 8 multiplication from four 4 x 4 operations

These are this design's own choices:

* **Selector width.** The prose describes a 2-bit selector, but the register
  table needs four bits. The 4-bit table is implemented.
* **Bus signals.** Separate `din` and `dout` and a one-cycle `wr` strobe,
  rather than a bidirectional port.
* **Reads of write and unused codes** return zero.
* **Reset.** A synchronous active-low reset clears every register.
* **Unsigned arithmetic** throughout.
* **Divide by zero** returns quotient 255 and the dividend as remainder.
* **Multiplier layout.** The four 4 x 4 operations are laid out in space
  rather than run one after another on a single cell.
* **Row organisation** of the ripple-carry array.
* **Restoring divider structure.**

Not included:

* The microcontroller itself, its memories, the FPGA fabric and its
  configuration memory, the analog blocks and the interrupt extension logic.
  These belong to the host chip.
* The six other multiplier topologies: McCanny–McWhirter, De Mori,
  Hatamian–Cash, carry-save, Guild and De Mori–Guild. They are alternatives
  to the ripple-carry array, and their cell structure comes from outside
  work.
* A second bus scheme: the processor pushes the operands and an opcode onto
  a hardware stack and pops the result. It is mentioned as an option, not
  the version presented.

## Files

| file                  | contents                                                  |
|-----------------------|-----------------------------------------------------------|
| `rtl/fl_pkg.sv`       | bus widths, selector enum, `is_write_code()`              |
| `rtl/rc_mult.sv`      | ripple-carry `a*b+c+s` array, parameters `N`, `PIPE`      |
| `rtl/mul_unit.sv`     | 8 x 8 multiplication unit (four `rc_mult` cells)          |
| `rtl/div_unit.sv`     | 8-bit restoring divider unit                              |
| `rtl/lattice_unit.sv` | max/min unit, parameter `IS_MAX`                          |
| `rtl/fl_coproc.sv`    | top: selector decode, four units, read multiplexer        |
| `tb/tb_*.sv`          | one self-checking testbench per module                    |

## Verification

Every testbench compares results with values computed independently in the
testbench. Each ends by printing `TB_RESULT checks=N failures=M`, and each has
a watchdog.

* `tb_rc_mult`:
  * exhaustive over all a, b, c and s for N = 2, 3 and 4
  * pipelined arrays of N = 2, 3 and 4, each fed a new random operand set
    every clock, with each result checked exactly N clocks later
* `tb_mul_unit`, `tb_div_unit`: all 65,536 operand pairs, each written over
  the operand interface, with the results checked immediately after the
  second write.
* `tb_lattice_unit`: random and corner pairs in both write orders. It checks
  that the result still shows the old pair right after the second write and
  the new one a clock later.
* `tb_fl_coproc`: acts as the processor's program. It runs a two-input
  fuzzy controller on the coprocessor:
  * three triangular membership functions per input and nine rules
  * min and max done in hardware, then singleton defuzzification with the
    multiply and divide units
  * N and D scaled down until N fits in 8 bits
  * 64 controller evaluations, each compared with a software model of the
    same integer algorithm
  * also: random operations on all units, reset values, reads of non-result
    codes, divide by zero and early lattice reads

  It counts each of these mechanisms and fails if one never happened. The top
  has no size parameters, so this run is at full size.

To run one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/fl_pkg.sv \
          tb/tb_fl_coproc.sv --top-module tb_fl_coproc -Mdir obj
./obj/Vtb_fl_coproc
```

Put `rtl/fl_pkg.sv` first on the command line. Verilator finds the other
modules in `rtl/` by name through `-y`.

## Notes for changing it

* Wider data (`W`) in `mul_unit` must be even: the unit splits each operand
  into two halves.
* To trade area for clock rate, instantiate `rc_mult` with `PIPE = 1` inside
  `mul_unit`. The product then arrives N clocks after the second write, and
  the program's wait must grow to match.
* `rc_mult` leaves `clk` and `rst_n` unused when `PIPE = 0`, and lint reports
  them. The ports are kept so that both variants have the same interface.
