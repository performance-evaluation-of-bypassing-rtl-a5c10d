# Carry-save array multipliers without a final adder, with column bypassing

An N x N unsigned carry-save array multiplier usually ends in a carry-propagate
adder: a ripple-carry adder (RCA) that merges the last row's sum and carry
vectors into the upper half of the product. This design removes that adder.
The last row's carries are fed back into full adders that are already in the
array and would otherwise have one input tied to 0. The top cells of the upper
product columns then do the rippling the RCA used to do. For N = 4 this saves
4 of 20 full adders. The result is still an exact N x N -> 2N-bit product.

The same idea is applied to two arrays. Both are provided:

* `prop_array_mult` builds the array from plain cells, each an AND gate plus a
  full adder.
* `pcbm` is a column bypassing multiplier. Its cells can switch themselves off
  when their multiplier bit is 0, to cut switching power.

Both are purely combinational. There is no clock, register or handshake.

## The array

Cell (i, j) sits in row i, the row of multiplicand bit `x[i]`. It handles the
partial product `x[i] & y[j]`, of weight 2^(i+j). Each cell is a full adder
with three inputs:

| input  | comes from | weight |
|--------|------------|--------|
| partial product | `x[i] & y[j]` | i+j |
| `s_in` | sum of cell (i-1, j+1), the cell above in the same product column | i+j |
| `c_in` | carry of cell (i-1, j), the previous cell on the same `y[j]` line | i+j |

Row 0 has `s_in = c_in = 0`. A row-0 cell just passes its partial product on.
The cells that share `y[j]` form a diagonal of the drawn array, and each carry
chain runs down one such diagonal. Product bits `p[0]..p[N-1]` are the sums of
the j = 0 cells of rows 0..N-1.

A conventional array stops here. It sends the bottom row's sums (j = 1..N-1)
and carries (j = 0..N-1) to an N-bit RCA.

## Feeding the last carries back (the part to understand)

Look at cell (k+1, N-1), the leftmost cell of row k+1, for k = 0..N-2. No cell
exists at (k, N), so its `s_in` would be a constant 0. Its weight is
2^(k+N). That is exactly the weight of the carry out of bottom cell (N-1, k).
So:

* the carry of bottom cell (N-1, k) drives `s_in` of cell (k+1, N-1), for k = 0..N-2;
* `p[N-1+j]` is the sum of bottom cell (N-1, j), for j = 1..N-1;
* `p[2N-1]` is the carry of the last cell, (N-1, N-1).

Every full adder keeps the weighted total of its inputs. Moving a carry to an
input of the same weight changes nothing. Every sum and carry that is not fed
back is a product bit. The product is therefore exact, with no correction
step.

There is no combinational loop. Bottom cell (N-1, k) depends only on cells
(i, j) with k <= j <= k + (N-1-i). Among the top cells that take a fed-back
carry, these are only those fed by bottom cells (N-1, k') with k' < k. The
feedback therefore forms a ripple chain: column N's carry goes to column N+1,
and so on up to the MSB.

Worked connections for N = 4 (cells named (row, column)):

| fed-back carry | weight | enters `s_in` of | which is the top cell of column |
|----------------|--------|------------------|---------------------------------|
| c(3,0) | 2^4 | (1,3) | p[4] |
| c(3,1) | 2^5 | (2,3) | p[5] |
| c(3,2) | 2^6 | (3,3) | p[6] |
| c(3,3) | 2^7 | drives `p[7]` directly | |

The price is delay. The feedback chain adds a ripple through the array's
upper columns. That chain replaces the ripple of the removed RCA, so the
critical path is about as long as before.

## Column bypassing (`pcbm`, `fab_cell`)

If `y[j] = 0`, every partial product on diagonal j is 0. A row-0 cell then
produces carry 0, and so does each cell further down. The whole diagonal adds
nothing: each of its cells only passes its `s_in` on. A full adder bypassing
(FAB) cell exploits this:

* `y = 1`: the cell is an ordinary array cell. `x & y = x`, so `x` goes
  straight into the adder.
* `y = 0`: the adder's `s_in` and `x` operands are isolated, and a 2:1
  multiplexer driven by `y` sends `s_in` to `s_out`.

`c_in` is not isolated. On a bypassed diagonal it is always 0, so `c_out` is
0 too.

A carry fed back into a top cell always enters through `s_in`. When that cell
is bypassed, the multiplexer still passes the carry on, so no carry is lost.

### Departures and modelling choices

* **Operand isolation.** In a transistor implementation, transmission gates
  hold the adder's inputs at their last value. Holding a value would need
  latches, so here the isolated operands are forced to 0 (`s_in & y`,
  `x & y`). The adder's inputs stay constant while the diagonal is off, which
  is the purpose of the isolation. Gate-level power therefore differs slightly
  from the transmission-gate circuit: the adder sees one transition when
  bypass starts.
* **Bypass control.** `y[j]`, the multiplier bit on the cell's carry diagonal,
  controls the bypass. Disabling by multiplicand bit instead would not fit the
  diagonal carry chain.
* **Full adder.** A compact static-CMOS cell (14 transistors) is the intended
  implementation. At RTL, `full_adder` is written as XOR/AND/OR gates. Any
  full-adder circuit can replace it.
* **Signedness.** Operands are unsigned. There is no signed (Baugh-Wooley or
  Booth) mode.
* **Not included.** The conventional reference designs, the array with an RCA
  and the bypassing array with an RCA, are not part of this code.

## Cost

| N | array cells | full adders removed (RCA) |
|---|-------------|---------------------------|
| 4 | 16 | 4 |
| 8 | 64 | 8 |
| 16 | 256 | 16 |

With a 14-transistor full adder and a 6-transistor AND, the 4 x 4
`prop_array_mult` takes 16 x (14 + 6) = 320 transistors. The conventional
version takes 320 + 4 x 14 = 376. `pcbm` adds to each cell two isolation
switches and a multiplexer instead of the AND.

## Modules

| file | role |
|------|------|
| `rtl/full_adder.sv` | one-bit full adder |
| `rtl/array_cell.sv` | AND gate + full adder |
| `rtl/fab_cell.sv` | full adder bypassing cell |
| `rtl/prop_array_mult.sv` | N x N array of `array_cell`, carries fed back |
| `rtl/pcbm.sv` | N x N array of `fab_cell`, carries fed back |
| `rtl/bypass_mult_top.sv` | both multipliers side by side, separate ports |

Each multiplier has one parameter, `N` (`int unsigned`, default 4), and ports
`x[N-1:0]`, `y[N-1:0]` in and `p[2N-1:0]` out. The top has the same `N` and
two port sets: `arr_x/arr_y/arr_p` for the array multiplier and
`cbm_x/cbm_y/cbm_p` for the bypassing one.

In both arrays each cell's nets live in its generate scope,
`g_row[i].g_col[j]` (`s_in`, `c_in`, `s_out`, `c_out`, and the cell instance
`u_cell`). Testbenches probe the fed-back carries and the bypass isolation
there. Per-cell nets, rather than one 2-D array, also keep the linter from
seeing a false combinational loop.

## Verification

Every testbench is self-checking. It ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* `full_adder_tb`, `array_cell_tb`, `fab_cell_tb`: exhaustive. The FAB test
  also checks that both isolated operands are 0 and the carry out is 0 in
  bypass.
* `prop_array_mult_tb`, `pcbm_tb`:
  * N = 4 and N = 8 are checked exhaustively.
  * N = 16 is checked on corner cases plus 20,000 random operand pairs.
  * Products are compared with integer multiplication.
  * On the 4 x 4 array the tests count that each fed-back carry and the MSB
    carry occur.
  * `pcbm_tb` checks isolation on every bypassed cell. It also checks that a
    fed-back carry passing through a bypassed top cell occurs.
* `bypass_mult_top_tb`: the top at its default N = 4 with no overrides. All
  256 operand pairs go to each multiplier at once, with different operands on
  the two sides. It counts feedback carries, MSB carries, bypassed diagonals
  and feedback through a bypassed cell.

Run one with plain Verilator, for example:

```
verilator --binary --timing --assert --top-module pcbm_tb tb/pcbm_tb.sv rtl/*.sv
./obj_dir/Vpcbm_tb
```

Each run takes well under a second.

## Changing it

* Other sizes: override `N`. Nothing else depends on it.
* A different full-adder implementation: replace the body of `full_adder`.
* Pipelining: add registers between rows of the generate loop. This is not
  included. The carry feedback reaches from the bottom row back to rows
  1..N-1, so pipeline stages would have to delay the operands to match.
