// dct1d_cordic: fully pipelined 8-point 1-D DCT built from six angle-recoded
// CORDIC processors and no multipliers.
//
// Computes, for u = 0..7,
//   y[u] = 1/2 * c(u) * sum_x x[x] * cos((2x+1) u pi / 16),  c(0) = 1/sqrt2,
// i.e. the orthonormal DCT-II, in the same binary-point position as the input.
//
// Data flow (one register stage per line):
//   1. butterflies   s_k = x_k + x_{7-k},  t_k = x_k - x_{7-k}      (k = 0..3)
//   2. even pre-adds a = s0+s3, b = s1+s2, c = s0-s3, d = s1-s2    (t delayed)
//   3. six CORDIC processors (CORDIC_LAT stages each)
//        C1 (-pi/4 , one micro-rotation): (b, a)   -> 2y0, 2y4
//        C2 (3pi/8)  : (c, d)   -> 2y6, 2y2
//        C3 (7pi/16) : (t0, t3) -> t0 s1 - t3 c1 , t0 c1 + t3 s1
//        C4 (3pi/16) : (t2, t1) -> t2 c3 - t1 s3 , t2 s3 + t1 c3
//        C5 (3pi/16) : (t0, t3) -> t0 c3 - t3 s3 , t0 s3 + t3 c3
//        C6 (7pi/16) : (t2, t1) -> t2 s1 - t1 c1 , t2 c1 + t1 s1
//      (cm = cos(m pi/16), sm = sin(m pi/16))
//   4. output stage: y1 = (C3.y + C4.y)/2, y7 = (C3.x + C4.x)/2,
//                    y3 = (C5.x - C6.y)/2, y5 = (C5.y + C6.x)/2,
//                    even outputs halved.
// The six processors and their angles (one pi/4, one 3pi/8, two 7pi/16 with
// identical structure, two 3pi/16) follow the published flow; the exact
// wiring of the odd part and the final adders are this design's own
// derivation of that flow.  Halving truncates.
//
// Interface: in_valid/x accepted on every clock; out_valid/y appear
// DCT1D_LAT = 11 clocks later.  x is W_IN-bit two's complement, y is
// W_OUT-bit (two more integer bits, since |y| < 2.83 max|x|).  Internal words
// carry four extra integer bits for the butterfly and CORDIC gain.
// rst is asynchronous and active high; it clears only the valid pipeline.
module dct1d_cordic
  import dct_pkg::*;
#(
  parameter int unsigned W_IN  = 17,
  parameter int unsigned W_OUT = W_IN + 2
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [W_IN-1:0]  x [N],
  output logic                    out_valid,
  output logic signed [W_OUT-1:0] y [N]
);

  localparam int unsigned IW = W_IN + 4;   // internal word width

  typedef logic signed [IW-1:0] iword_t;

  // Stage 1: butterflies.
  iword_t s [4];
  iword_t t [4];
  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      s[k] <= iword_t'(x[k]) + iword_t'(x[7-k]);
      t[k] <= iword_t'(x[k]) - iword_t'(x[7-k]);
    end
  end

  // Stage 2: even pre-adds, odd terms delayed.
  iword_t ea, eb, ec, ed;
  iword_t t2 [4];
  always_ff @(posedge clk) begin
    ea <= s[0] + s[3];
    eb <= s[1] + s[2];
    ec <= s[0] - s[3];
    ed <= s[1] - s[2];
    t2 <= t;
  end

  // Stage 3: CORDIC processors.
  iword_t c1x, c1y, c2x, c2y, c3x, c3y, c4x, c4y, c5x, c5y, c6x, c6y;

  ar_cordic #(.ANGLE(ANG_PI_4),   .W(IW)) u_c1 (.clk, .x_i(eb),    .y_i(ea),    .x_o(c1x), .y_o(c1y));
  ar_cordic #(.ANGLE(ANG_3PI_8),  .W(IW)) u_c2 (.clk, .x_i(ec),    .y_i(ed),    .x_o(c2x), .y_o(c2y));
  ar_cordic #(.ANGLE(ANG_7PI_16), .W(IW)) u_c3 (.clk, .x_i(t2[0]), .y_i(t2[3]), .x_o(c3x), .y_o(c3y));
  ar_cordic #(.ANGLE(ANG_3PI_16), .W(IW)) u_c4 (.clk, .x_i(t2[2]), .y_i(t2[1]), .x_o(c4x), .y_o(c4y));
  ar_cordic #(.ANGLE(ANG_3PI_16), .W(IW)) u_c5 (.clk, .x_i(t2[0]), .y_i(t2[3]), .x_o(c5x), .y_o(c5y));
  ar_cordic #(.ANGLE(ANG_7PI_16), .W(IW)) u_c6 (.clk, .x_i(t2[2]), .y_i(t2[1]), .x_o(c6x), .y_o(c6y));

  // Stage 4: odd post-adds and the common factor 1/2.
  function automatic logic signed [W_OUT-1:0] half(input logic signed [IW:0] v);
    return W_OUT'(v >>> 1);
  endfunction

  always_ff @(posedge clk) begin
    y[0] <= half((IW+1)'(c1x));
    y[4] <= half((IW+1)'(c1y));
    y[6] <= half((IW+1)'(c2x));
    y[2] <= half((IW+1)'(c2y));
    y[1] <= half((IW+1)'(c3y) + (IW+1)'(c4y));
    y[7] <= half((IW+1)'(c3x) + (IW+1)'(c4x));
    y[3] <= half((IW+1)'(c5x) - (IW+1)'(c6y));
    y[5] <= half((IW+1)'(c5y) + (IW+1)'(c6x));
  end

  // Valid pipeline, DCT1D_LAT stages.
  logic [DCT1D_LAT-1:0] vpipe;
  always_ff @(posedge clk or posedge rst) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[DCT1D_LAT-2:0], in_valid};
  end
  assign out_valid = vpipe[DCT1D_LAT-1];

endmodule
