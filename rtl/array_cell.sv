// array_cell - carry-save array multiplier cell (the "F" cell).
//
// Forms one partial-product bit x & y with an AND gate and adds it, in a full
// adder, to the sum arriving from the cell above (s_in, same weight) and the
// carry arriving along the y diagonal (c_in). Outputs the new sum and carry,
// which the array passes on unresolved (carry-save). Structure and port names
// follow the usual AND-plus-full-adder array cell.
//
// The cell is the one the published array is drawn with; nothing in it is
// this design's own choice.
//
// Interface: x, y, s_in, c_in in; s_out, c_out out. Combinational.
module array_cell (
  input  logic x,
  input  logic y,
  input  logic s_in,
  input  logic c_in,
  output logic s_out,
  output logic c_out
);
  logic pp;

  assign pp = x & y;

  full_adder u_fa (
    .a    (s_in),
    .b    (pp),
    .cin  (c_in),
    .sum  (s_out),
    .cout (c_out)
  );
endmodule
