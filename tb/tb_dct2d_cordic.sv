// tb_dct2d_cordic: end-to-end self-checking testbench of the 8x8 2-D DCT
// core at its default parameters.
//
// Block 0 is an 8x8 block of 8-bit image samples (a corner of the 512x512
// "Lena" test image), each sample p entered as round(p / 1000 * 2^16) in
// 1Q16, as the core's reference test does.  Its coefficients, converted
// back to sample units (x 4 x 1000 / 2^16), must match the real-valued
// orthonormal 2-D DCT to 0.4 (6.5 output LSB) and three of them are also compared with the
// published reference values (259.5, 4.7683, 7.9473).  Then random blocks
// (|sample| < 0.5) follow with random gaps and back-to-back rows; every
// result column is compared with the real-valued 2-D DCT (tolerance 0.08% of
// the block's norm plus 24 LSB).
// Mechanisms counted, each must occur: stall (nd while rfd is low), input
// gap, mode switch of the transpose buffer (A -> B), back-to-back block
// (a block whose first row is accepted on the first clock rfd is high
// again), and block start (start_dct).  The latency from the last row of a
// block to its first result column is checked against 2*DCT1D_LAT + 1.
module tb_dct2d_cordic;
  import dct_pkg::*;

  localparam int unsigned W       = 17;
  localparam int unsigned NBLOCKS = 40;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                rst, nd;
  logic signed [W-1:0] data_in [N];
  logic                rfd, start_dct, start, control, cordic_out;
  logic [2:0]          out_col;
  logic signed [W+1:0] data_out [N];

  dct2d_cordic dut (.clk, .rst, .nd, .data_in, .rfd, .start_dct, .start, .control,
                    .cordic_out, .out_col, .data_out);

  // A corner of the Lena image (8-bit samples).
  int lena [N][N] = '{
    '{34, 34, 34, 33, 34, 29, 35, 33},
    '{34, 34, 34, 33, 34, 29, 35, 33},
    '{34, 34, 34, 33, 34, 29, 35, 33},
    '{34, 34, 34, 33, 34, 29, 35, 33},
    '{34, 34, 34, 33, 34, 29, 35, 33},
    '{36, 36, 30, 27, 33, 31, 31, 32},
    '{32, 32, 35, 30, 32, 34, 31, 28},
    '{31, 31, 27, 29, 30, 31, 28, 29}};

  int  blk [NBLOCKS][N][N];   // input words of every block
  real ref2d [N][N];

  int checks = 0, failures = 0;
  int n_stall = 0, n_gap = 0, n_switch = 0, n_b2b = 0, n_start = 0;
  int blocks_in = 0, blocks_out = 0, col_seen = 0;
  int t_last_row [NBLOCKS];
  int cycle = 0;
  real maxerr = 0.0;
  real lena_maxerr = 0.0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real basis(int u, int x);
    return ((u == 0) ? $sqrt(0.125) : 0.5) * $cos(real'((2*x+1)*u) * PI / 16.0);
  endfunction

  task automatic make_ref(int b);
    real tmp [N][N];
    for (int r = 0; r < N; r++)
      for (int k = 0; k < N; k++) begin
        tmp[r][k] = 0.0;
        for (int x = 0; x < N; x++) tmp[r][k] += real'(blk[b][r][x]) * basis(k, x);
      end
    for (int v = 0; v < N; v++)
      for (int k = 0; k < N; k++) begin
        ref2d[v][k] = 0.0;
        for (int r = 0; r < N; r++) ref2d[v][k] += tmp[r][k] * basis(v, r);
      end
  endtask

  // Checker: one result column per cordic_out.
  logic ctrl_q = 1'b0;
  logic rfd_q  = 1'b0;
  initial begin
    forever begin
      @(posedge clk);
      #2;
      if (control && !ctrl_q) n_switch++;
      ctrl_q = control;
      if (cordic_out) begin
        int k;
        real norm, tol, got, err;
        k = col_seen;
        if (k == 0) begin
          make_ref(blocks_out);
          checks++;
          if (cycle - t_last_row[blocks_out] != 2 * DCT1D_LAT + 1) begin
            failures++;
            $display("FAIL latency %0d exp %0d", cycle - t_last_row[blocks_out], 2 * DCT1D_LAT + 1);
          end
        end
        checks++;
        if (int'(out_col) != k) begin failures++; $display("FAIL out_col %0d exp %0d", out_col, k); end
        norm = 0.0;
        for (int r = 0; r < N; r++) for (int x = 0; x < N; x++)
          norm += real'(blk[blocks_out][r][x]) * real'(blk[blocks_out][r][x]);
        norm = $sqrt(norm);
        for (int v = 0; v < N; v++) begin
          checks++;
          if (blocks_out == 0) begin
            // Sample units: undo the 1/4 output scaling and the 1Q16 input scaling.
            got = real'(data_out[v]) * 4.0 * 1000.0 / 65536.0;
            err = rabs(got - ref2d[v][k] * 1000.0 / 65536.0);
            tol = 0.4;
            if (err > lena_maxerr) lena_maxerr = err;
            if (v == 0 && k == 0) $display("Lena block DC coefficient %f (exact 259.5)", got);
            if ((v == 0 && k == 0 && rabs(got - 259.5) > 0.25) ||
                (v == 0 && k == 1 && rabs(got - 4.7683) > 0.25) ||
                (v == 1 && k == 0 && rabs(got - 7.9473) > 0.25)) begin
              failures++;
              $display("FAIL published value at (%0d,%0d): %f", v, k, got);
            end
          end else begin
            got = real'(data_out[v]);
            err = rabs(got - ref2d[v][k] / 4.0);
            tol = 0.0008 * norm + 24.0;
            if ((err - 24.0) / norm > maxerr) maxerr = (err - 24.0) / norm;
          end
          if (err > tol) begin
            failures++;
            if (failures < 12) $display("FAIL block %0d coef (%0d,%0d) got %f exp %f", blocks_out, v, k, got,
                                        (blocks_out == 0) ? ref2d[v][k] * 1000.0 / 65536.0 : ref2d[v][k] / 4.0);
          end
        end
        col_seen++;
        if (col_seen == N) begin col_seen = 0; blocks_out++; end
      end
    end
  end

  initial begin
    int row, b;
    bit burst;
    for (int r = 0; r < N; r++)
      for (int x = 0; x < N; x++)
        blk[0][r][x] = int'($floor(real'(lena[r][x]) / 1000.0 * 65536.0 + 0.5));
    for (int bb = 1; bb < NBLOCKS; bb++)
      for (int r = 0; r < N; r++)
        for (int x = 0; x < N; x++)
          blk[bb][r][x] = int'($urandom_range(0, 65535)) - 32768;

    rst = 1'b1; nd = 1'b0;
    for (int i = 0; i < N; i++) data_in[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    row = 0; b = 0;
    while (b < NBLOCKS) begin
      burst = (b < 4) || (b % 3 == 0);
      nd = burst ? 1'b1 : ($urandom_range(0, 3) != 0);
      for (int i = 0; i < N; i++) data_in[i] = W'(blk[b][row][i]);
      #1;
      if (nd && !rfd) n_stall++;
      if (!nd && rfd) n_gap++;
      if (start_dct) begin
        n_start++;
        if (!rfd_q && b > 0) n_b2b++;
      end
      rfd_q = rfd;
      if (nd && rfd) begin
        if (row == N - 1) begin
          t_last_row[b] = cycle;
          row = 0; b++; blocks_in++;
        end else row++;
      end
      @(posedge clk);
      #1;
    end
    nd = 1'b0;
    repeat (4 * DCT1D_LAT + 2 * N) @(posedge clk);
    #3;
    checks++;
    if (blocks_out != NBLOCKS) begin failures++; $display("FAIL %0d blocks out of %0d", blocks_out, NBLOCKS); end
    $display("mechanisms: stalls=%0d gaps=%0d mode_switches=%0d back_to_back=%0d block_starts=%0d",
             n_stall, n_gap, n_switch, n_b2b, n_start);
    $display("Lena block: largest coefficient error %f sample units", lena_maxerr);
    $display("max error beyond 24 LSB relative to block norm: %f", maxerr);
    if (n_stall == 0)  begin failures++; $display("FAIL no stall"); end
    if (n_gap == 0)    begin failures++; $display("FAIL no gap"); end
    if (n_switch != NBLOCKS) begin failures++; $display("FAIL mode switches %0d", n_switch); end
    if (n_b2b == 0)    begin failures++; $display("FAIL no back-to-back block"); end
    if (n_start != NBLOCKS) begin failures++; $display("FAIL block starts %0d", n_start); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
