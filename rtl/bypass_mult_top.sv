// bypass_mult_top - the two proposed multipliers side by side.
//
// Both multipliers drop the final ripple-carry adder of a carry-save array
// and feed the last row's carries into the top cells of the following product
// columns. prop_array_mult builds this from plain AND + full-adder cells;
// pcbm builds it from full-adder bypassing cells that switch off every cell
// on the diagonal of a zero multiplier bit. They are independent units. Each
// has its own operand and product ports here, so either can be exercised or
// measured alone.
//
// The published work evaluates the two multipliers separately. Giving them
// separate ports in one top is this design's own choice.
//
// Parameter N: operand width of both multipliers, default 4.
// Interface: arr_x, arr_y -> arr_p (array multiplier);
//            cbm_x, cbm_y -> cbm_p (column bypassing multiplier).
// Combinational, no clock.
module bypass_mult_top #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   arr_x,
  input  logic [N-1:0]   arr_y,
  output logic [2*N-1:0] arr_p,
  input  logic [N-1:0]   cbm_x,
  input  logic [N-1:0]   cbm_y,
  output logic [2*N-1:0] cbm_p
);
  prop_array_mult #(.N(N)) u_array (
    .x (arr_x),
    .y (arr_y),
    .p (arr_p)
  );

  pcbm #(.N(N)) u_pcbm (
    .x (cbm_x),
    .y (cbm_y),
    .p (cbm_p)
  );
endmodule
