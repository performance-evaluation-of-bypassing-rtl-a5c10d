// prop_array_mult - N x N unsigned carry-save array multiplier with no final
// vector-merging adder.
//
// The array has N rows of N array_cells. Cell (i, j) adds the partial product
// x[i] & y[j] (weight 2^(i+j)). Its sum goes down to cell (i+1, j-1), which
// has the same weight; its carry goes to cell (i+1, j), the next cell on the
// same y[j] diagonal. Product bits P[0]..P[N-1] are the sums of the j = 0
// cells of each row.
//
// A conventional carry-save multiplier ends with a ripple-carry adder that
// merges the last row's sum and carry vectors. This one has none. Instead the
// carry of bottom cell (N-1, k) - weight 2^(N+k) - enters the otherwise unused
// sum input of cell (k+1, N-1), the top cell of the next product column, which
// has that same weight. The top cells thereby act as the missing ripple stage:
// the carry of column N-1 goes into column N, column N's carry into column
// N+1, and so on. The carry of the last cell, (N-1, N-1), is P[2N-1]. The
// remaining product bits P[N]..P[2N-2] are the sums of the bottom row. The
// graph is acyclic: cell (N-1, k) only depends on carries fed back from
// cells (N-1, k') with k' < k. This removes N full adders from the
// conventional design.
//
// The cell grid, the AND + full-adder cell and the carry feedback follow the
// published proposal, which draws the 4 x 4 case. Generalising the feedback to
// any N and leaving the array unregistered are this design's own choices.
//
// Parameter N: operand width, default 4 (the 4 x 4 array).
// Interface: x (multiplicand), y (multiplier), p = x * y. Combinational; the
// longest path ripples through the array and then along the fed-back carries.
module prop_array_mult #(
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

      array_cell u_cell (
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
