// csa_array: partial product generation and carry-save reduction for an
// M x M unsigned array multiplier.
//
// The array has M rows of M full-adder cells. Cell (i, j) adds the partial
// product a[j] & b[i] (weight 2^(i+j)), the sum coming diagonally from cell
// (i-1, j+1) of the row above, and the carry coming straight down from cell
// (i-1, j). Row 0 receives zeros in place of the previous row, so its cells
// only pass the partial products on (synthesis reduces them to AND gates).
// Carries are saved, never rippled along a row, so the delay through the
// array grows with M rows, not with M*M cells. The rightmost sum of every row
// is a finished product bit: p_low[i] = sum of cell (i, 0). What is left
// after the last row is a pair of vectors, each bit of weight 2^(M+j):
//   sum_vec[j]   = sum of cell (M-1, j+1) for j < M-1, and 0 for j = M-1,
//   carry_vec[j] = carry of cell (M-1, j),
// which a single M-bit merging adder turns into the upper M product bits:
//   a * b = ((sum_vec + carry_vec) << M) + p_low.
//
// Interface: operands a and b (M bits), outputs p_low, sum_vec, carry_vec
// (M bits each). Purely combinational. The M x M cell count and the
// carry-save arrangement follow the design; the cell wiring is the usual
// one for a carry-save array multiplier. sum_vec[M-1] and carry_vec[M-1]
// are always 0 (the leftmost column never receives a carry); they are kept
// so that both vectors have the merging adder's width.
module csa_array #(
  parameter int unsigned M = 6
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] p_low,
  output logic [M-1:0] sum_vec,
  output logic [M-1:0] carry_vec
);

  // Sum and carry of every cell, [row][column].
  logic [M-1:0] s [M];
  logic [M-1:0] c [M];

  for (genvar i = 0; i < M; i++) begin : g_row
    for (genvar j = 0; j < M; j++) begin : g_cell
      logic pp;      // partial product a[j] * b[i]
      logic s_in;    // diagonal sum from the row above
      logic c_in;    // carry from the row above

      assign pp = a[j] & b[i];

      if (i == 0) begin : g_first
        assign s_in = 1'b0;
        assign c_in = 1'b0;
      end else begin : g_next
        if (j == M - 1) begin : g_left
          assign s_in = 1'b0;
        end else begin : g_inner
          assign s_in = s[i-1][j+1];
        end
        assign c_in = c[i-1][j];
      end

      full_adder u_fa (
        .a   (pp),
        .b   (s_in),
        .cin (c_in),
        .sum (s[i][j]),
        .cout(c[i][j])
      );
    end

    assign p_low[i] = s[i][0];
  end

  assign carry_vec = c[M-1];

  for (genvar j = 0; j < M; j++) begin : g_out
    if (j == M - 1) begin : g_top
      assign sum_vec[j] = 1'b0;
    end else begin : g_rest
      assign sum_vec[j] = s[M-1][j+1];
    end
  end

endmodule
