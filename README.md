# A quasi-serial inner product machine

This is the RTL of a small chip that computes the inner product of two
vectors of 8-bit two's complement integers:

    P <- P + A(k) * B(k)        for k = 1 .. N,   P starting at 0

The chip does one element pair per multiply/add and builds the 16-bit result
one bit per clock. It has no parallel multiplier and no fast adder. Three
registers, eight gates and eight one-bit full adders do all the work.
The chip also has no sequencer: the user raises LD, then gives 16 clock steps,
and P on the output pins holds the updated partial inner product.

The design is the one from a 1980s NMOS student chip project (8-bit operands,
16-bit result, 38 pads). This RTL re-creates that chip's register-transfer
structure in synthesizable SystemVerilog. Physical details of that chip, such as
two-phase clocking and the pads, are replaced by ordinary synchronous logic, as
described under "Departures" below.

## The arithmetic: summing the product column by column

A shift-and-add multiplier adds one *row* of partial products per step and
needs a wide adder. This machine adds one *column* per step. Column i of the
product matrix holds the bits a(i-j)·b(j) for j = 0..7. It is summed into one
result bit p(i), plus a small carry number that is passed on to column i+1.
After 16 columns all 16 product bits have come out, lowest first. This
column-sequential scheme is called quasi-serial multiplication.

Two's complement operands need two tricks. Both keep every column a plain sum
of bits, with no special cases:

* **Sign extension of A.** With A widened by copies of its sign bit, the low
  16 bits of A'·B equal those of A·B. So a(i) for i >= 8 is read as a(7). For
  i < 0, a(i) is 0.
* **The negative B row.** In two's complement, b(7) has weight -2^7. So the
  row b(7)·A must be *subtracted*. Subtracting x is the same as adding NOT x and
  then 1. The machine therefore complements the b(7) row bit by bit (a NAND
  gate instead of an AND). The extra +1, and the 2^7 terms from the complement,
  reduce to one thing: the whole result is offset by exactly +1. So:

      P = 1 + sum over i = 0..15 of  s(i) · 2^i
      s(i) = sum over j = 0..6 of a(i-j)·b(j)  +  NOT(a(i-7)·b(7))

  The "+1" is supplied by starting the carries of column 0 at 1.

Accumulation comes at almost no cost. To get P + A·B instead of A·B, the
current bit p(i) of P is added as one more row while column i is processed.

## Datapath

```
 pins a[7:0] --LD--> A register (15 cells: a7..a0, 0000000)  -- shifts right, a7 cell keeps its value
                         | taps: tap[j] = a(i-j)
 pins b[7:0] --LD--> B register (8 cells, held)
                         |
                    gate row: 7 x AND, 1 x NAND (b7 row)        -> g[7:0] = column i
                         |
                    column tree: 7 full adders                   <- tree carries (3-bit number)
                         | column sum bit s(i)                   -> new tree carries
                    accumulate adder (1 full adder)              <- p(i) from P register p0
                         |                                       <- / -> 1-bit accumulate carry
                    P register (16 cells, shifts right, new bit enters at p15) -> pins p[15:0]
```

| module | role |
|---|---|
| `ipm_pkg` | shared sizes: `N = 8`, `PW = 16`, `CW = 3` |
| `ipm_a_reg` | operand A shift register with sign hold, and the eight taps |
| `ipm_b_reg` | operand B load-and-hold register |
| `ipm_pp_gates` | the gate row: seven ANDs and one NAND |
| `ipm_full_adder` | full adder, written from the cell's two logic equations (carry first, sum from the carry) |
| `ipm_column_tree` | seven full adders that sum one column plus the incoming carries |
| `ipm_carry_reg` | carry storage between columns (3-bit tree carries, preset 1; 1-bit accumulate carry, preset 0) |
| `ipm_p_reg` | 16-bit accumulator shift register with parallel outputs |
| `ipm_top` | the chip |

### The A register and its taps

On LD the register is loaded with `a7 a6 ... a0 0 0 0 0 0 0 0`: 15 cells,
with the seven zeros at the low end. Tap j reads cell 7-j. Before any step,
tap 0 sees a0 and taps 1..7 see zeros, which is column 0: a0·b0 and nothing
else. Each step shifts the register right by one cell and copies the top cell
into itself. After i steps, tap j holds a(i-j): a zero while i < j, then the
operand bits, then the sign bit repeated. This one register gives all three
cases of the extended operand. B never moves. Bit b(j) is wired to gate j.

### The column tree (the hard part)

Each column has eight gate bits. It also has the carries left by earlier
columns. These can be worth up to 7 in the current column. So a column total
is at most 8 + 7 = 15. The tree outputs the total's low bit and passes
total/2 (0..7) on as a **3-bit binary number**. It does not pass a bundle of
loose carry bits. The carry register is therefore three cells wide. The
number's bits are fed back into the tree at three different weights:

```
 weight 1 : g0..g7, cin[0]      FA1(cin0,g7,g0) FA2(g1,g2,g3) FA3(g4,g5,g6) -> FA4(sums) -> s
 weight 2 : 4 carries, cin[1]   FA5(c1,c2,c3) -> FA6(s5,c4,cin1)            -> cout[0]
 weight 4 : 2 carries, cin[2]   FA7(c5,c6,cin2)                             -> cout[1] (sum), cout[2] (carry)
```

A bit of weight 2w in this column is a bit of weight w in the next one.
That is why the outputs move down one place into `cout`. The longest path is
four adders (FA1 -> FA4 -> FA6 -> FA7), and it sets the clock period.

The accumulate adder is kept separate from the tree. It adds the tree's sum
bit, the bit p0 that leaves the P register, and its own one-bit carry. Its
sum enters P at the top (p15). So the carries are split in two: the tree
carries belong to the product, and the accumulate carry belongs to the
running sum P. The two never mix. At LD the tree carries are preset to 1
(the +1 above). The accumulate carry is preset to 0, so a carry out of bit 15
of the previous sum is dropped.

## Driving the chip

Ports of `ipm_top` (all synchronous to the rising edge of `clk`):

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; one edge per column step |
| `mclr` | in | 1 | master clear: P <- 0 (all registers cleared) |
| `ld` | in | 1 | load A and B, preset the carries, start a multiply/add |
| `shift` | in | 1 | take one column step on this edge |
| `a`, `b` | in | 8 | operands, two's complement; needed only in the LD cycle |
| `p` | out | 16 | partial inner product, two's complement |

Priority is `mclr`, then `ld`, then `shift`. If `ld` and `shift` are both high,
the edge only loads.

One multiply/add, as an external counter would sequence it:

```
cycle   0      1      2     ...    16
ld      1      0      0            0
shift   x      1      1            1        (pauses with shift=0 are allowed)
p       old   ... rotating, partly updated ...   -> new P valid after the edge ending cycle 16
```

That is 17 clock cycles per element pair, or 16 column steps plus the load.
Exactly 16 steps must be given: a 17th step starts rotating P again and
corrupts it. An assertion in `ipm_top` reports such a step in simulation. While no steps are given, P holds its value on the pins. While
the steps are running, the pins show P rotated and partly updated. The
result is modulo 2^16: an inner product outside -32768..32767 wraps silently,
because the design has no overflow bits.

## Departures from the original chip

* **Clocking.** The original chip used two non-overlapping clock phases
  (phi1, phi2) and dynamic register cells of two kinds. Here one rising-edge
  clock stands for one phi1/phi2 pair, and the registers are ordinary
  flip-flops.
* **The `shift` input.** The original chip takes a column step whenever the
  user delivers a clock pulse pair. In this RTL the clock is free-running, and
  `shift` marks the edges that count. It is a clock enable, not a pin of the
  original chip.
* **LD timing.** The original names an LD control pin but gives no timing for
  it. The one-cycle LD before the 16 steps, and LD's priority over `shift`, are
  this design's choices.
* **MCLR.** The original only says that the chip is initialised by setting
  P = 0. Here MCLR also clears A, B and both carry registers, so that no
  register is ever read uninitialised.
* **Tree wiring.** The count of seven tree adders, the three-cell carry
  register feeding back into the tree, and the single accumulate carry are as
  in the original. Which adder output drives which adder input was chosen here
  as the weighted counter above.
* **Register count.** The original chip lists 40 register cells. This RTL
  has 43 flip-flops: A 15, B 8, P 16, carries 3 + 1. Its cell counting is
  not known, so the two figures are not reconciled.
* **Not modelled.** The pads, power, and the transistor-level cells (the
  original full adder was an 18-transistor cell) are not modelled. Neither is
  the off-chip counter; the top-level testbench plays its part.
* The operand width `N` is a parameter of the registers and the gate row. The
  column tree, however, is built for exactly eight column bits and a 3-bit
  carry number. Changing `ipm_pkg::N` alone does not give a working
  machine of another width.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=<n> failures=<m>`.

* `tb_ipm_full_adder`: all 8 input combinations against a + b + ci.
* `tb_ipm_pp_gates`: all 65,536 (tap, b) pairs.
* `tb_ipm_column_tree`: all 2,048 combinations of eight column bits and the
  3-bit carry number against popcount + carry.
* `tb_ipm_a_reg`: every tap in every column for random and extreme operands,
  plus hold, LD-over-shift and MCLR.
* `tb_ipm_b_reg`, `tb_ipm_carry_reg`, `tb_ipm_p_reg`: random control
  sequences against reference registers.
* `tb_ipm_top`: the whole chip at its default sizes. It runs about 4,000
  multiply/adds in 200 random inner products of 1 to 40 elements, plus corner
  products such as (-128)·(-128), (-128)·127 and ±1. Every result is checked
  against a signed reference sum modulo 2^16. It also checks the 17-cycle
  latency and that P holds while idle. It counts, and requires at least one
  of each: MCLR clears (one in mid-product), loads, negative A, negative B,
  (-128)·(-128), wrap-around of P, pauses in the step sequence, and LD while
  shift is high.

To simulate, for example the top level:

```
verilator --binary --timing --assert -y rtl rtl/ipm_pkg.sv \
          tb/tb_ipm_top.sv --top-module tb_ipm_top -Mdir obj_top
./obj_top/Vtb_ipm_top
```

`-y rtl` lets Verilator find each module in `rtl/<module>.sv`. The package is
listed first because modules use it. For another testbench, replace
`tb_ipm_top` with its name. The top-level run takes well under a second.
