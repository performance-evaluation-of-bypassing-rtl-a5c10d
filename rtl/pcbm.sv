// pcbm - proposed column bypassing multiplier: an N x N unsigned carry-save
// array multiplier built from FAB (full adder bypassing) cells, with no final
// vector-merging adder.
//
// Cell (i, j) handles the partial product x[i] & y[j] (weight 2^(i+j)). The
// cells that share y[j] lie on one diagonal of the array, and the carry chain
// runs along that diagonal. When y[j] is 0, every partial product on the
// diagonal is 0 and so is every carry on it, so the diagonal adds nothing. Each
// of its fab_cells then isolates its full adder's inputs and passes the
// incoming sum straight through, which saves the switching power of N full
// adders per zero bit of y.
//
// Sums go from cell (i, j) down to cell (i+1, j-1), carries to (i+1, j).
// P[0]..P[N-1] are the j = 0 sums of each row. As in prop_array_mult, the
// ripple-carry adder that normally merges the last row is removed: the carry
// of bottom cell (N-1, k) enters the sum input of cell (k+1, N-1), the top
// cell of the next product column, which has the same weight. The carry of
// cell (N-1, N-1) is P[2N-1]; P[N]..P[2N-2] are the bottom-row sums. A fed-back
// carry enters through s_in, so when its cell is bypassed the multiplexer
// still carries it on.
//
// The choice of y as the bypass control and the zero-forcing model of the
// input isolation are described in fab_cell.
//
// The grid, the FAB cell and the carry feedback follow the published
// proposal. Generalising to any N is this design's own choice.
//
// Parameter N: operand width, default 4. Table-style sizes 8 and 16 are
// reached by overriding N.
// Interface: x (multiplicand), y (multiplier, bypass control), p = x * y.
// Combinational.
module pcbm #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  // Each generate scope g_row[i].g_col[j] holds cell (i, j) and its nets.
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      logic s_in, c_in;    // cell inputs
      logic s_out, c_out;  // cell outputs

      if (i == 0) begin : g_first_row
        assign s_in = 1'b0;
        assign c_in = 1'b0;
      end else begin : g_inner_row
        if (j < N - 1) begin : g_sum_from_above
          assign s_in = g_row[i-1].g_col[j+1].s_out;
        end else begin : g_carry_fed_back
          // Top cell of column N+i-1: takes the carry of the column before.
          assign s_in = g_row[N-1].g_col[i-1].c_out;
        end
        assign c_in = g_row[i-1].g_col[j].c_out;
      end

      fab_cell u_cell (
        .x     (x[i]),
        .y     (y[j]),
        .s_in  (s_in),
        .c_in  (c_in),
        .s_out (s_out),
        .c_out (c_out)
      );
    end
  end

  // Product bits: the right-hand sum of every row, then the bottom-row sums,
  // then the carry of the last cell.
  for (genvar i = 0; i < N; i++) begin : g_p_low
    assign p[i] = g_row[i].g_col[0].s_out;
  end
  for (genvar j = 1; j < N; j++) begin : g_p_high
    assign p[N-1+j] = g_row[N-1].g_col[j].s_out;
  end
  assign p[2*N-1] = g_row[N-1].g_col[N-1].c_out;
endmodule
