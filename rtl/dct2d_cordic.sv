// dct2d_cordic: 8x8 two-dimensional DCT core built from multiplier-free
// angle-recoded CORDIC processors, by row-column decomposition.
//
// A block enters as 8 rows of 8 samples (one row per accepted clock).  Each
// row passes the row 1-D DCT (dct1d_cordic); its 8 coefficients are scaled
// by 1/4 (arithmetic shift right by 2, back to the W-bit input format) and
// shifted into the 8x8 transpose buffer in mode A.  When all 8 rows are in,
// the controller switches the buffer to mode B and draws out one column per
// clock into the column 1-D DCT.  The column DCT's outputs are the 2-D
// coefficients of that column, flagged by cordic_out:
//   data_out[v] = Z(v, out_col) / 4,
//   Z(v,k) = 1/4 c(v) c(k) sum_{r,x} f(r,x) cos((2r+1)v pi/16) cos((2x+1)k pi/16)
// with r the row and x the sample index of the input block (orthonormal 2-D
// DCT-II), in the binary-point position of the input.
//
// Interface: data_in and data_out are two's complement.  Inputs are W bits
// (1Q16 for the default 17 bits: sign bit, 16 fraction bits, |value| < 1).
// Outputs are W+2 bits in the same scaling, so they cannot wrap.  A row is
// taken on a clock with nd & rfd; rfd drops after the 8th row and returns
// once the block has left the transpose buffer.  start_dct marks the first
// row of a block, start and control show the transpose buffer's enable and
// mode, cordic_out marks the 8 result columns (out_col = 0..7 in order).
// Timing: the first result column appears 2*DCT1D_LAT + 1 = 23 clocks after
// the last row is taken; rows on back-to-back clocks give one block every
// 27 clocks (8 rows, 11 clocks of row-DCT latency, 8 column reads).
// rst is asynchronous, active high.
// The three-block structure, the 1/4 scaling between the passes and the
// reversal of the buffer's column order follow the published core; the
// output width and the streaming handshake are this design's choices.
module dct2d_cordic
  import dct_pkg::*;
#(
  parameter int unsigned W = 17
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  nd,
  input  logic signed [W-1:0]   data_in  [N],
  output logic                  rfd,
  output logic                  start_dct,
  output logic                  start,
  output logic                  control,
  output logic                  cordic_out,
  output logic [$clog2(N)-1:0]  out_col,
  output logic signed [W+1:0]   data_out [N]
);

  logic                accept, pop, s1_valid, s2_valid;
  logic signed [W+1:0] row_coef [N];
  logic [W-1:0]        tm_din   [N];
  logic [W-1:0]        tm_dout  [N];
  logic signed [W-1:0] col_in   [N];

  dct_controller u_ctrl (
    .clk, .rst, .nd, .s1_valid, .s2_valid,
    .rfd, .accept, .start_dct, .start, .control, .pop, .cordic_out, .out_col
  );

  dct1d_cordic #(.W_IN(W), .W_OUT(W + 2)) u_row_dct (
    .clk, .rst, .in_valid(accept), .x(data_in), .out_valid(s1_valid), .y(row_coef)
  );

  // Scale the row coefficients by 1/4 back into the W-bit input format.
  for (genvar k = 0; k < N; k++) begin : g_scale
    assign tm_din[k] = W'(row_coef[k] >>> 2);
  end

  transpose_module #(.N(N), .W(W)) u_transpose (
    .clk, .en(start), .mode(control), .din(tm_din), .dout(tm_dout)
  );

  // The buffer delivers a column with its rows in reverse order.
  for (genvar r = 0; r < N; r++) begin : g_unreverse
    assign col_in[r] = tm_dout[N-1-r];
  end

  dct1d_cordic #(.W_IN(W), .W_OUT(W + 2)) u_col_dct (
    .clk, .rst, .in_valid(pop), .x(col_in), .out_valid(s2_valid), .y(data_out)
  );

endmodule
