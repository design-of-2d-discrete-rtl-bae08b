// transpose_module: N x N register-array matrix transposer (no addressing,
// no memory access).
//
// cell[i][j] sits in row i (element index) and column j of the array.
// Mode A (mode = 0, en = 1): the row on din enters column 0 (din[i] into
//   cell[i][0]) while every column moves one step right.  After N such loads
//   of rows R0..R(N-1), cell[i][j] holds R(N-1-j)[i].
// Mode B (mode = 1, en = 1): every row moves one step up and zeros enter the
//   bottom row.  dout[j] always shows cell[0][j], so before the first mode-B
//   step dout carries element 0 of every row, i.e. column 0 of the matrix,
//   and after k steps column k: the transposed matrix leaves one row per
//   clock.  Within a column, dout[j] carries row N-1-j (reversed order).
// Each element is loaded once and read once, so every cell is used on every
// clock of a transposition.  The array of two-mode cells, row-parallel
// loading and column-parallel reading follow the published transposer; the
// upward read direction and the zero fill are this design's choices.
module transpose_module #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 17
) (
  input  logic         clk,
  input  logic         en,
  input  logic         mode,
  input  logic [W-1:0] din  [N],
  output logic [W-1:0] dout [N]
);

  logic [W-1:0] q [N][N];

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      logic [W-1:0] h_in, v_in;
      if (j == 0) begin : g_left
        assign h_in = din[i];
      end else begin : g_inner_h
        assign h_in = q[i][j-1];
      end
      if (i == N - 1) begin : g_bottom
        assign v_in = '0;
      end else begin : g_inner_v
        assign v_in = q[i+1][j];
      end
      transpose_cell #(.W(W)) u_cell (
        .clk, .en, .mode, .h_i(h_in), .v_i(v_in), .q(q[i][j])
      );
    end
    assign dout[i] = q[0][i];
  end

endmodule
