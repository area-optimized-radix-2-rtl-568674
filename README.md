# Reversible radix-2 Booth multiplier, 8 x 8

A combinational signed multiplier built only from reversible gates. In a
reversible circuit every gate maps its inputs one-to-one onto its outputs, no
signal may fan out, and no signal may feed back. Booth's radix-2 algorithm is
normally drawn as a loop: inspect two multiplier bits, add, subtract or skip,
shift, repeat. Here that loop is unrolled into a trapezoid of identical
*B cells*, steered by a column of *C cells*. Every line that a later stage
needs is regenerated by the cell that used it, so the circuit has no fan-out
and no feedback. It takes two 8-bit two's-complement numbers and gives their
15-bit two's-complement product, with no clock and no registers.

The reversible structure is kept in the RTL on purpose. Each cell is written
as the gates it is built from: TS-3, Fredkin, MTSG and Peres. Each gate's
garbage outputs are named signals. A synthesis tool will flatten all of this
into an ordinary array multiplier, roughly 560 two-input gates at 8 x 8. The
point of the RTL is that it is a faithful, simulatable model of the
reversible netlist.

## Booth recoding: the C cell

Row *i* of the array adds the Booth digit `x[i-1] - x[i]` times `y * 2^i`,
with an implicit `x[-1] = 0`. The C cell of that row turns the two multiplier
bits into two control lines:

| x[i] x[i-1] | H | D | row operation |
|---|---|---|---|
| 0 0 | 0 | 0 | skip |
| 0 1 | 1 | 0 | add y·2^i |
| 1 0 | 1 | 1 | subtract y·2^i |
| 1 1 | 0 | 0 | skip |

`H = x[i] ^ x[i-1]` comes from a TS-3 gate with its third input at 0. That
gate also hands both bits on. `D = ~x[i-1] & x[i]` comes from a Fredkin gate
with its third input at 0. The encoding used throughout is HD = 0X skip,
10 add, 11 subtract. The pair is carried as the packed struct
`rev_booth_pkg::booth_ctrl_t {h, d}`.

## The B cell: one adder/subtracter with no fan-out

Each B cell gets `a`, the partial-product bit from above, `b`, a multiplicand
bit, and `c`, the carry or borrow from its right. It computes

    Z    = a ^ H·(b ^ c)
    Cout = (a ^ D)·(b ^ c) ^ b·c

With HD = 10 this is a full adder: `{Cout, Z} = a + b + c`. With HD = 11 it
is a full subtracter: `Z = a - b - c`, with Cout as the borrow. With H = 0,
`Z = a` and Cout is a don't-care. Subtraction propagates borrows, so a
subtracting row needs no +1 at its right-hand end. The carry/borrow into
every row is 0.

Three gates build the cell:

    TS-3 (D, a, 0)          -> D (to the left neighbour), a, a^D
    MTSG (b, c, a^D, 0)     -> b (to the next row),  b^c, garbage, Cout
    Peres(H, b^c, a)        -> H (to the left neighbour), garbage, Z

The MTSG gate is a full adder when its fourth input is 0. Its carry output
`(A^B)C ^ AB` with `C = a^D` gives exactly the Cout above. The Peres gate's
`AB ^ C` output gives Z. Each cell passes H, D and b on, so no line ever
drives two inputs. The two garbage outputs are the port `garbage`.

The gate equations used are the standard ones:

| gate | outputs |
|---|---|
| TS-3 | P=A, Q=B, R=A^B^C |
| Fredkin | P=A, Q=A?C:B, R=A?B:C |
| Peres | P=A, Q=A^B, R=AB^C |
| MTSG | P=A, Q=A^B, R=A^B^C, S=(A^B)C^AB^D |

How the gates are wired inside the C and B cells is a reconstruction. It is
chosen so that, without any fan-out, the cells give exactly the H, D, Z and
Cout equations above.

## The trapezoid

Let N = 8 and W = 2N-1 = 15. Column *j* has bit weight 2^j.

* Row *i* (row 0 at the top) holds B cells in columns *i* .. W-1. That is 15
  cells in the top row and one fewer in each row below, down to 8 in the
  bottom row: 92 B cells and 8 C cells in all. The columns right of a row
  are already final and leave the array there.
* The C cell of row *i* sits at the right-hand end of the row. H and D enter
  the rightmost cell and travel left, regenerated by each cell. The carry
  chain runs the same way.
* `a` comes from the Z of the cell directly above (0 in the top row).
* The top row's `b` inputs are y, sign-extended to 15 bits: the left N-1
  cells all see `y[7]`. Each cell passes its `b` down to the row below, one
  column to the left. This is how the multiplicand doubles from row to row
  without shifters or fan-out.
* Product bit *j* is the Z of row *j*'s rightmost cell for *j* < N-1. Bits
  N-1 .. W-1 are the Z outputs of the bottom row.

Row *i* therefore computes `A(i+1) = A(i) + (x[i-1] - x[i])·y·2^i mod 2^15`.
All arithmetic is modulo 2^15, so the carries and b values that leave a
row's left edge are simply dropped.

**Product width.** The product is 2N-1 bits, as in the original array. This
is exact for every operand pair except `x = y = -128`. Their product, +16384,
needs 16 bits and comes out as -16384. Operands are two's complement.
Unsigned operands therefore work only while they are below 2^(N-1), for
example 5 x 8 = 40.

**Timing.** The design has no clock. The longest path runs down the rows and
then along the carry chain of the lower rows, about N + W cell delays. For
comparison, a published Stratix II mapping of the same design reached
22.9 ns, about 44 MHz, using 140 ALUTs and no registers.

## Ports of `booth_multiplier`

| port | dir | width | meaning |
|---|---|---|---|
| `x` | in | N | multiplier (two's complement); drives the C cells |
| `y` | in | N | multiplicand (two's complement); drives the top row |
| `p` | out | 2N-1 | product (two's complement) |
| `h` | out | N | H of each row, bit *i* = row *i* |
| `d` | out | N | D of each row, bit *i* = row *i* |

`h` and `d` are brought out for observation. Waveform viewers often show them
with row 0 as the MSB. For multiplier -67 that displays H = 227, D = 161;
these ports read 199 and 133, which is the same bits reversed. For multiplier
4, the displayed 48 and 32 are these ports' 12 and 4 reversed.

Parameter `N` (default 8) sets the operand width. The array is generic: the
4 x 4 version multiplies -3 by 5 to give 1110001.

## Files

| file | contents |
|---|---|
| `rtl/rev_booth_pkg.sv` | `booth_ctrl_t` (H, D) |
| `rtl/ts3_gate.sv`, `fredkin_gate.sv`, `peres_gate.sv`, `mtsg_gate.sv` | reversible gates |
| `rtl/c_cell.sv` | Booth control cell |
| `rtl/b_cell.sv` | add / subtract / skip cell, with an assertion for the skip rule |
| `rtl/booth_multiplier.sv` | top: the N x N trapezoid |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `booth_multiplier_n4_tb` (4 x 4 build) |

## Verification

Each gate testbench runs the full truth table. It checks every output
against the gate equation and checks that no two input patterns give the
same output, so the gate is reversible. The C cell test runs all four bit
pairs against the Booth rule. The B cell test runs all 32 input combinations
against arithmetic `a + b + c` and `a - b - c`. It also checks that H, D and
b pass through unchanged.

`booth_multiplier_tb` runs at the default N = 8:

* the worked examples -67 x 42 = -2814 (`111010100000010`) and 42 x -67;
* the waveform sequence 4 x 4..8;
* 5 x 2, 4, 6, 8;
* all 65536 operand pairs, each checked against the simulator's signed
  product truncated to 15 bits, with every row's H/D checked against the
  Booth digit.

The test counts how often rows skip, add and subtract, how often each
operand is negative, and how often a pair wraps. It fails if any of these
never happens, or if more than one pair wraps. `booth_multiplier_n4_tb` does
the same exhaustively at N = 4. Every testbench ends with a line
`TB_RESULT checks=<n> failures=<m>`.

Lint reports only unused signals. These are the garbage lines and the lines
leaving the left edge of the array, and they are left unconnected on
purpose.

## Running it

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/rev_booth_pkg.sv tb/booth_multiplier_tb.sv --top-module booth_multiplier_tb
    ./obj_dir/Vbooth_multiplier_tb

Replace the testbench name to run any other test. The full 8 x 8 exhaustive
run takes under a second.

## Where this departs from, or fills in, the original description

* The gate equations and the gate-to-gate wiring inside the two cells are
  reconstructed, as described above. The cell-level equations and the
  function table are followed exactly.
* The subtract encoding is HD = 11, as in the cell's function table. The
  original's row-by-row example listings write "HD = 01" for subtract.
* The multiplicand moves from row to row diagonally, along the regenerated
  b lines. This routing is this design's own reading of how the regenerated
  b is used.
* Sign extension into the left N-1 top-row cells is plain wiring of `y[N-1]`.
  No copying gate is described for it.
* Operands are N bits wide, plus the implicit 0 below the multiplier. An
  operand notation in the original suggests N+1 bits, but its examples all
  use N.
* A register-style trace (accumulator, shift right) that accompanies the
  original 8 x 8 example is treated as an illustration of the algorithm.
  The hardware is purely combinational, which matches its reported 0
  registers.
* The FPGA results (140 ALUTs, 46 pins, 22.9 ns) are not reproduced. This
  RTL has 47 port bits (x, y, p, h, d).
