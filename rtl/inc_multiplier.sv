// inc_multiplier: unsigned N x N array multiplier built from (A+1)
// incremental adders.
//
// The array is a Braun multiplier: N*N AND gates form the partial products
// pp[j][i] = a[i] & b[j]; N-1 rows of N-1 carry-save cells add them row by
// row, each row producing one product bit at its right end; a final row of
// N-1 cells ripples the remaining sums and carries into the upper N bits.
// Every adder of that array is replaced by a cell around a 1-bit A+1
// incremental adder:
//   row 1            inc_ha_cell  (two inputs, no carry in)
//   rows 2 .. N-1    inc_fa_cell  (sum from above, partial product, carry)
//   final row        inc_ha_cell at its low end, inc_fa_cell elsewhere
// In each cell the sum arriving from above is the operand that is
// incremented or bypassed; the partial product and the carry only drive
// the cell's multiplexer selects, so a cell whose partial product and
// carry are both 0 just passes its operand on.
//
// Cell (i, j) of carry-save row j (i = 0 .. N-2) takes
//   a  = pp[0][i+1]            for j = 1
//      = pp[j-1][N-1]          for j > 1, i = N-2 (left edge)
//      = sum of cell (i+1, j-1) otherwise
//   b  = pp[j][i],  ci = carry of cell (i, j-1)  (j > 1)
// and p[j] is the sum of cell (0, j). Final-row cell k takes the sum of
// cell (k+1, N-1) (pp[N-1][N-1] for k = N-2), the carry of cell (k, N-1)
// and the ripple carry of cell k-1; it gives p[N+k], and the last ripple
// carry is p[2N-1].
//
// The Braun structure, the replacement of every adder by an A+1 cell and
// N = 4 follow the document; N as a parameter is this design's own
// addition. The multiplier is purely combinational: the document gives a
// path delay and no registers.
//
// The cell input arrays row_* and fin_* are kept as named nets so the
// cases of every cell can be observed; row_ci of row 1 and fin_ci[0] are
// tied to 0 for that purpose only (half-adder cells have no carry input),
// which is why a linter reports them as unused.
//
// Interface: a, b (N bits, unsigned) in; p = a * b (2N bits) out.
module inc_multiplier #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  // Partial products, pp[j][i] = a[i] & b[j].
  logic [N-1:0][N-1:0] pp;

  // Inputs and outputs of the carry-save cells, row j = 1 .. N-1,
  // column i = 0 .. N-2. row_ci of row 1 is unused (half-adder cells).
  logic [N-1:1][N-2:0] row_a, row_b, row_ci, row_s, row_c;

  // Inputs and outputs of the final ripple row, cell k = 0 .. N-2.
  logic [N-2:0] fin_a, fin_b, fin_ci, fin_s, fin_c;

  always_comb begin
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++)
        pp[j][i] = a[i] & b[j];
  end

  // Carry-save rows.
  for (genvar j = 1; j < N; j++) begin : g_row
    for (genvar i = 0; i < N-1; i++) begin : g_col
      if (j == 1) begin : g_in
        assign row_a[j][i]  = pp[0][i+1];
        assign row_ci[j][i] = 1'b0;
      end else if (i == N-2) begin : g_in
        assign row_a[j][i]  = pp[j-1][N-1];
        assign row_ci[j][i] = row_c[j-1][i];
      end else begin : g_in
        assign row_a[j][i]  = row_s[j-1][i+1];
        assign row_ci[j][i] = row_c[j-1][i];
      end
      assign row_b[j][i] = pp[j][i];

      if (j == 1) begin : g_cell
        inc_ha_cell u_cell (
          .a (row_a[j][i]),
          .b (row_b[j][i]),
          .s (row_s[j][i]),
          .c (row_c[j][i])
        );
      end else begin : g_cell
        inc_fa_cell u_cell (
          .a  (row_a[j][i]),
          .b  (row_b[j][i]),
          .ci (row_ci[j][i]),
          .s  (row_s[j][i]),
          .co (row_c[j][i])
        );
      end
    end
    assign p[j] = row_s[j][0];
  end

  assign p[0] = pp[0][0];

  // Final ripple row.
  for (genvar k = 0; k < N-1; k++) begin : g_fin
    if (k == N-2) begin : g_in
      assign fin_a[k] = pp[N-1][N-1];
    end else begin : g_in
      assign fin_a[k] = row_s[N-1][k+1];
    end
    assign fin_b[k] = row_c[N-1][k];

    if (k == 0) begin : g_cell
      assign fin_ci[k] = 1'b0;
      inc_ha_cell u_cell (
        .a (fin_a[k]),
        .b (fin_b[k]),
        .s (fin_s[k]),
        .c (fin_c[k])
      );
    end else begin : g_cell
      assign fin_ci[k] = fin_c[k-1];
      inc_fa_cell u_cell (
        .a  (fin_a[k]),
        .b  (fin_b[k]),
        .ci (fin_ci[k]),
        .s  (fin_s[k]),
        .co (fin_c[k])
      );
    end
    assign p[N+k] = fin_s[k];
  end

  assign p[2*N-1] = fin_c[N-2];

endmodule
