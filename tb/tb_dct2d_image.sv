// tb_dct2d_image: a whole 512x512 8-bit image (4096 blocks) streamed through
// the 2-D DCT core at its default parameters, as in an image-coding run.
//
// The image is synthetic (no image file is read): smooth sine/cosine shading
// plus a 17-periodic texture, clipped to 0..255,
//   p(r,c) = 128 + 60 sin(r/23) + 50 cos(c/31) + ((7r + 13c) mod 17) - 8.
// Samples enter as round(p / 1000 * 2^16) in 1Q16, rows of each block on
// back-to-back clocks whenever rfd allows, blocks in raster order.  Each
// block's coefficients are converted back to sample units and inverted with
// the real-valued 2-D IDCT; the reconstruction PSNR over the image must be
// at least 50 dB, and every block must come out (4096 x 8 result columns).
// The sustained rate is checked too: one block per 27 clocks.
module tb_dct2d_image;
  import dct_pkg::*;

  localparam int unsigned W    = 17;
  localparam int unsigned SIDE = 512;
  localparam int unsigned NB   = (SIDE / N) * (SIDE / N);
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

  int  checks = 0, failures = 0;
  int  blocks_out = 0, cols = 0;
  real sq_err = 0.0;
  real coef [N][N];
  int  cycle = 0, t_first = 0, t_last = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic int pixel(int r, int c);
    real v;
    v = 128.0 + 60.0 * $sin(real'(r) / 23.0) + 50.0 * $cos(real'(c) / 31.0)
        + real'((7 * r + 13 * c) % 17) - 8.0;
    if (v < 0.0) v = 0.0;
    if (v > 255.0) v = 255.0;
    return int'($floor(v));
  endfunction

  function automatic real basis(int u, int x);
    return ((u == 0) ? $sqrt(0.125) : 0.5) * $cos(real'((2*x+1)*u) * PI / 16.0);
  endfunction

  // Reconstruct block b from coef[][] and accumulate the squared error.
  task automatic reconstruct(int b);
    int  br, bc;
    real tmp [N][N];
    real rec;
    br = (b / (SIDE / N)) * N;
    bc = (b % (SIDE / N)) * N;
    for (int v = 0; v < N; v++)
      for (int x = 0; x < N; x++) begin
        tmp[v][x] = 0.0;
        for (int k = 0; k < N; k++) tmp[v][x] += coef[v][k] * basis(k, x);
      end
    for (int r = 0; r < N; r++)
      for (int x = 0; x < N; x++) begin
        rec = 0.0;
        for (int v = 0; v < N; v++) rec += tmp[v][x] * basis(v, r);
        sq_err += (rec - real'(pixel(br + r, bc + x))) * (rec - real'(pixel(br + r, bc + x)));
      end
  endtask

  // Collect result columns.
  initial begin
    forever begin
      @(posedge clk);
      #2;
      if (cordic_out) begin
        checks++;
        if (int'(out_col) != cols) begin failures++; $display("FAIL out_col %0d exp %0d", out_col, cols); end
        for (int v = 0; v < N; v++) coef[v][out_col] = real'(data_out[v]) * 4.0 * 1000.0 / 65536.0;
        cols++;
        if (cols == N) begin
          reconstruct(blocks_out);
          cols = 0;
          blocks_out++;
        end
      end
    end
  end

  initial begin
    int b, row;
    real mse, psnr;
    rst = 1'b1; nd = 1'b0;
    for (int i = 0; i < N; i++) data_in[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    b = 0; row = 0;
    while (b < NB) begin
      nd = 1'b1;
      for (int i = 0; i < N; i++)
        data_in[i] = W'(int'($floor(real'(pixel((b / (SIDE / N)) * N + row, (b % (SIDE / N)) * N + i))
                                    / 1000.0 * 65536.0 + 0.5)));
      #1;
      if (rfd) begin
        if (b == 0 && row == 0) t_first = cycle;
        if (b == NB - 1 && row == 0) t_last = cycle;
        if (row == N - 1) begin row = 0; b++; end
        else row++;
      end
      @(posedge clk);
      #1;
    end
    nd = 1'b0;
    repeat (4 * DCT1D_LAT + 2 * N) @(posedge clk);
    #3;
    mse  = sq_err / real'(SIDE * SIDE);
    psnr = 10.0 * $log10(255.0 * 255.0 / mse);
    $display("image %0dx%0d: %0d blocks out, MSE %f, PSNR %0.2f dB, %0d clocks per block",
             SIDE, SIDE, blocks_out, mse, psnr, (t_last - t_first) / (NB - 1));
    checks++;
    if (blocks_out != NB) begin failures++; $display("FAIL blocks out %0d", blocks_out); end
    checks++;
    if (psnr < 50.0) begin failures++; $display("FAIL PSNR too low"); end
    checks++;
    if (t_last - t_first != 27 * (NB - 1)) begin failures++; $display("FAIL block rate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (27 * NB + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
