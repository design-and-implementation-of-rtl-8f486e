// ppg: partial-product generation grid of the reversible array multiplier.
//
// An N x N grid of reversible AND cells forms pp[i*N+j] = x[i] & y[j] (bit
// weight i+j). Reversible gates may not fan out, so each operand bit is
// carried from cell to cell on the pass-through outputs of the gates: y[j]
// enters at the top of column j and moves down, x[i] enters at the right of
// row i (column 0) and moves left towards column N-1.
//   * Interior cells (i < N-1, j < N-1) are Toffoli gates (a = x, b = y,
//     c = 0): p hands x to the next column, q hands y to the next row, r is
//     the product bit. They leave no garbage.
//   * Last-column cells (j = N-1, i < N-1) are Peres gates (a = y, b = x,
//     c = 0): p hands y down, q = x ^ y is garbage, r is the product bit.
//   * Last-row cells (i = N-1, j < N-1) are Peres gates (a = x, b = y,
//     c = 0): p hands x on, q is garbage.
//   * The corner cell (N-1, N-1) is a Peres gate whose p and q are both garbage.
// garbage[k-1] is output G<k>: G1..G(N-1) down the last column, G(N)..G(2N-2)
// along the last row, then the corner's p and q. For N = 4 that is 9 Toffoli
// and 7 Peres cells, 16 constant inputs, 8 garbage outputs, quantum cost 73.
// The cell placement and garbage numbering follow the 4x4 grid of the
// design; generating it for any N is this design's generalisation.
// Purely combinational; no clock.
module ppg #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [N*N-1:0] pp,
  output logic [2*N-1:0] garbage
);

  // xr[i][j]: copy of x[i] entering cell (i, j); yr[i][j]: copy of y[j] entering cell (i, j).
  logic [N-1:0] xr [N];
  logic [N-1:0] yr [N];

  for (genvar i = 0; i < N; i++) begin : g_row
    assign xr[i][0] = x[i];
    for (genvar j = 0; j < N; j++) begin : g_col
      if (i == 0) begin : g_ytop
        assign yr[0][j] = y[j];
      end

      if (i < N - 1 && j < N - 1) begin : g_tg
        toffoli_gate u_tg (
          .a(xr[i][j]), .b(yr[i][j]), .c(1'b0),
          .p(xr[i][j+1]), .q(yr[i+1][j]), .r(pp[i*N+j])
        );
      end else if (i < N - 1) begin : g_pg_col
        // last column: y goes on down, x stops here
        peres_gate u_pg (
          .a(yr[i][j]), .b(xr[i][j]), .c(1'b0),
          .p(yr[i+1][j]), .q(garbage[i]), .r(pp[i*N+j])
        );
      end else if (j < N - 1) begin : g_pg_row
        // last row: x goes on left, y stops here
        peres_gate u_pg (
          .a(xr[i][j]), .b(yr[i][j]), .c(1'b0),
          .p(xr[i][j+1]), .q(garbage[N-1+j]), .r(pp[i*N+j])
        );
      end else begin : g_pg_corner
        peres_gate u_pg (
          .a(xr[i][j]), .b(yr[i][j]), .c(1'b0),
          .p(garbage[2*N-2]), .q(garbage[2*N-1]), .r(pp[i*N+j])
        );
      end
    end
  end

endmodule
