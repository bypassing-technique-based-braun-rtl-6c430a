# Bypassing Braun array multipliers

A Braun multiplier is an unsigned N x N array multiplier: an AND gate per
partial product a_i*b_j, an (N-1) x (N-1) array of full adders that reduces
the partial products in carry-save form, and a final carry-propagate adder.
Most of its dynamic power is spent in the full adders toggling. Whenever an
operand bit is 0, a whole row or column of the array has nothing to add, so
those full adders can be switched off and their inputs routed past them.
This is *bypassing*. This repository holds three bypassing schemes, each
with a choice of two final adders:

| scheme           | a cell is switched off when            | module               |
|------------------|----------------------------------------|----------------------|
| row bypassing    | its multiplier bit b_j = 0             | `braun_row_bypass`   |
| column bypassing | its multiplicand bit a_i = 0           | `braun_col_bypass`   |
| row and column   | a_i = 0 or b_j = 0 (see below)         | `braun_mixed_bypass` |

The final stage is a ripple carry adder (`rca`) or a Kogge-Stone prefix
adder (`ksa`), chosen by the `ADDER` parameter (`ADDER_RCA` / `ADDER_KSA`
from `braun_pkg`). The published comparison of the six combinations on a
Spartan-6 FPGA found the row-and-column scheme with the Kogge-Stone adder the
best for both power and delay. All products are exact in every scheme: the
bypassing saves switching, never accuracy.

Everything is combinational. There is no clock, reset or handshake: a
product is valid one array delay plus one final-adder delay after the
operands change. Operands are unsigned.

## The array

All three multipliers share the same carry-save array. Row 0 is the
partial products a_i*b_0. For rows j = 1..N-1 and columns i = 0..N-2, cell
(i, j) is a full adder of

* the partial product a_i*b_j,
* the sum of cell (i+1, j-1) (for the leftmost column, the bare partial
  product a_{N-1}*b_{j-1}),
* the carry of cell (i, j-1).

All three inputs have weight i+j. A carry therefore stays in the column of
its multiplicand bit as it moves down, while a sum moves one column to the
right per row. Product bit P_j for j < N is the sum of the rightmost cell of
row j. After the last row, the N-1 sums and N-1 carries, all of weights
N..2N-2, are merged by an (N-1)-bit final adder that yields P_N..P_{2N-1}.

## Column bypassing

If a_i = 0, every partial product in column i is 0. The top cell of the
column then adds a sum and a zero carry, so it makes no carry. By induction,
no cell of the column ever makes one. Each cell in the column would only
pass its sum input on. `fa_cell_col` does exactly that: two input buffers
hold the full adder's sum and carry inputs at 0, and a multiplexer passes
the sum input to the sum output. The carries of the last row pass through
AND gates with a_i before the final adder, so a switched-off cell can never
leak a carry. Per cell: one full adder, one multiplexer, two buffers.

## Row bypassing, and why it needs a correction chain

If b_j = 0, row j has nothing to add, but it still has to hand on the two
vectors from the row above: a sum and a carry at every weight from j to
j+N-2. Its cells are switched off (three input buffers) and two multiplexers
per cell route the inputs past them:

* the sum input goes straight to the sum output, with the same weight;
* the carry input cannot go straight down: the carry output of a cell has
  twice the weight of its carry input. Instead each cell's carry output takes
  the carry that entered its *left-hand* neighbour (`c_in_left`), which has
  exactly that weight. The leftmost cell's carry output is 0.

That leaves one value over: the carry that entered the rightmost cell, of
weight j. No cell to its right can take it. Left alone, this lost carry is
why a naively bypassed row gives a wrong product. An AND gate catches it
(`dropped[j] = ~b_j & carry into the rightmost cell of row j`). A correction
chain on the right edge of the array adds the caught carries back. The chain
is an (N-1)-bit ripple adder of the low product bits P_1..P_{N-1} and
`dropped[1..N-1]`. Its carry out becomes the carry in of the final adder.
The published description gives the need for this extra circuitry and its
place on the right edge. The carry re-routing and the exact form of the
chain are this implementation's own.

## Row and column bypassing together

`fa_cell_mixed` switches a cell off with one AND and one OR gate:

    en = b_j & (a_i | c_in)

A row with b_j = 0 is bypassed exactly as above, with the same correction
chain. A cell with a_i = 0 in an active row is bypassed as in column
bypassing, but only while no carry arrives. The reason is that a bypassed
row higher up moves carries one column to the right. A column whose a_i is
0 can therefore receive a carry, and the pure column argument ("no carry can
arise here") no longer holds. When a carry does arrive, the cell stays on
and adds it; its partial product is 0, so it acts as a half adder. The sum
multiplexer selects on `en`. The carry multiplexer selects on `b_j`,
choosing between the full adder's carry (0 while the cell is off) and
`c_in_left`. Per cell: one full adder, two multiplexers, two buffers.

How exactly the two kinds of bypass are combined is this implementation's
own choice. The published description states only the rule (a cell may be
bypassed when a_i = 0 or b_j = 0) and that each array stage uses an AND and
an OR gate.

## The adders

* `full_adder`: sum = x ^ y ^ z, carry = majority.
* `rca #(W)`: W full adders in a carry chain.
* `ksa #(W)`: preprocessing (g = a & b, p = a ^ b, carry in folded into
  bit 0), a Kogge-Stone carry network of ceil(log2 W) levels combining
  (G, P) pairs at distances 1, 2, 4, ..., and postprocessing
  s_i = p_i ^ G_{i-1}.
* `braun_final_adder #(W, ADDER)` instantiates one of the two.

## Modules and parameters

| module | parameters (default) | role |
|---|---|---|
| `braun_bypass_top` | `N` (16) | all six multipliers on one operand pair; outputs `p_row_rca`, `p_row_ksa`, `p_col_rca`, `p_col_ksa`, `p_mix_rca`, `p_mix_ksa` |
| `braun_row_bypass`, `braun_col_bypass`, `braun_mixed_bypass` | `N` (16), `ADDER` (`ADDER_KSA`) | `a`, `b` (N bits) in, `p` (2N bits) out |
| `fa_cell_row`, `fa_cell_col`, `fa_cell_mixed` | none | one array cell each |
| `braun_final_adder` | `W` (15), `ADDER` | final stage |
| `rca`, `ksa` | `W` (4) | adders |
| `braun_pkg` | none | `final_adder_e` |

N = 4, 8 and 16 are the sizes the design was published at, and the sizes
the testbenches check; the RTL is written for any N >= 3. To use one multiplier on its own, instantiate for example
`braun_mixed_bypass #(.N(16), .ADDER(braun_pkg::ADDER_KSA))`.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=<n> failures=<m>` and stops; a watchdog ends it with a
failure if it hangs. With plain Verilator, for example:

    verilator --binary --timing -Irtl -y rtl rtl/braun_pkg.sv \
        tb/tb_braun_bypass_top.sv --top-module tb_braun_bypass_top
    ./obj_dir/Vtb_braun_bypass_top

What is checked:

* Cells: every input combination, against a full adder or the bypass
  routing. The testbenches also check that a switched-off cell's full adder
  really sees constant inputs, and that the mixed cell is switched off
  exactly when it should be.
* Adders: all 6-bit operand pairs with both carry-ins, and random 15-bit
  additions.
* Each multiplier: every operand pair at N = 4 and N = 8, with both final
  adders. At the default N = 16 there are directed operands (zero, all ones,
  walking ones and zeros, the operand pairs of the published simulation runs)
  and 20 000 random pairs of varying bit density.
* The top, at its default size: all six products against integer
  multiplication for 20 000+ operand pairs. It also counts how often each
  mechanism acts: row bypass, a dropped carry needing correction, column
  bypass, a mixed cell switched off by a_i, and a mixed cell kept on by an
  arriving carry. It fails if any of them never acts.

## Limits and departures

* The buffers that switch a cell off are modelled as AND gates that hold the
  full adder's inputs at 0, not as tri-state buffers. An FPGA has no
  internal tri-states, and a two-state simulation cannot show a floating
  node. Switching power is not modelled; the RTL only shows which cells
  are idle.
* The correction chain of the row and mixed schemes is a plain ripple adder
  along the right edge. The published figures draw that circuitry in their
  own arrangement, which this implementation does not copy.
* The mixed scheme's carry condition (`a_i | c_in`) is added so that the
  product stays exact when row and column bypass meet. A cell in a column
  with a_i = 0 is therefore sometimes active.
* Power and delay on the FPGA (about 28 ns and 0.18 to 0.19 W for the
  16-bit designs) are measurements of a synthesized implementation. They are
  not reproduced here.
* Only unsigned operands are supported, as in the published design.
