// fab_cell - Full Adder Bypassing (FAB) cell of the column bypassing multiplier.
//
// When the multiplier bit y is 1 the cell is an ordinary array cell: the
// partial product x & y equals x, so the full adder adds s_in, x and c_in.
// When y is 0 the partial product is zero, the full adder's s_in and x
// operands are isolated, and a 2:1 multiplexer steers s_in straight to s_out,
// so the adder sees no transitions and the sum bypasses the cell.
//
// In silicon the isolation is a pair of transmission gates that hold the
// adder's inputs. Here it is modelled, as this design's own choice, by forcing
// the two isolated operands to 0 (no latches). c_in is not isolated; inside a
// bypassed diagonal every carry is 0 (each cell there has a zero partial
// product), so c_out is 0 whenever y is 0.
//
// Interface: x, y, s_in, c_in in; s_out, c_out out. Combinational.
module fab_cell (
  input  logic x,
  input  logic y,
  input  logic s_in,
  input  logic c_in,
  output logic s_out,
  output logic c_out
);
  logic fa_a, fa_b;   // full-adder operands after isolation
  logic fa_sum;

  always_comb begin
    fa_a = s_in & y;
    fa_b = x & y;
  end

  full_adder u_fa (
    .a    (fa_a),
    .b    (fa_b),
    .cin  (c_in),
    .sum  (fa_sum),
    .cout (c_out)
  );

  // Bypass multiplexer on the sum output, selected by y.
  always_comb s_out = y ? fa_sum : s_in;
endmodule
