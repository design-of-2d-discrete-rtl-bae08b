// tb_dct2d_wide: the 2-D DCT core with 45-bit data words (1Q44), the wider
// configuration evaluated for better precision.
//
// The Lena corner block is entered as round(p / 1000 * 2^44) and the
// coefficients are converted back to sample units (x 4 x 1000 / 2^44).  With
// truncation noise now negligible, what remains is the angle and gain
// approximation of the CORDIC schedules (the pi/4 processor is 0.044% strong
// per pass, so the DC term comes out near 259.73 instead of 259.5).  Every
// coefficient must be within 0.3% of its real-valued 2-D DCT value plus
// 0.03 sample units; the testbench prints the largest error.
module tb_dct2d_wide;
  import dct_pkg::*;

  localparam int unsigned W = 45;
  localparam real PI    = 3.14159265358979323846;
  localparam real SCALE = 17592186044416.0;   // 2^44

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                rst, nd;
  logic signed [W-1:0] data_in [N];
  logic                rfd, start_dct, start, control, cordic_out;
  logic [2:0]          out_col;
  logic signed [W+1:0] data_out [N];

  dct2d_cordic #(.W(W)) dut (.clk, .rst, .nd, .data_in, .rfd, .start_dct, .start, .control,
                             .cordic_out, .out_col, .data_out);

  int lena [N][N] = '{
    '{34, 34, 34, 33, 34, 29, 35, 33},
    '{34, 34, 34, 33, 34, 29, 35, 33},
    '{34, 34, 34, 33, 34, 29, 35, 33},
    '{34, 34, 34, 33, 34, 29, 35, 33},
    '{34, 34, 34, 33, 34, 29, 35, 33},
    '{36, 36, 30, 27, 33, 31, 31, 32},
    '{32, 32, 35, 30, 32, 34, 31, 28},
    '{31, 31, 27, 29, 30, 31, 28, 29}};

  real ref2d [N][N];
  int  checks = 0, failures = 0, cols = 0;
  real maxerr = 0.0;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real basis(int u, int x);
    return ((u == 0) ? $sqrt(0.125) : 0.5) * $cos(real'((2*x+1)*u) * PI / 16.0);
  endfunction

  initial begin
    real tmp [N][N];
    for (int r = 0; r < N; r++)
      for (int k = 0; k < N; k++) begin
        tmp[r][k] = 0.0;
        for (int x = 0; x < N; x++) tmp[r][k] += real'(lena[r][x]) * basis(k, x);
      end
    for (int v = 0; v < N; v++)
      for (int k = 0; k < N; k++) begin
        ref2d[v][k] = 0.0;
        for (int r = 0; r < N; r++) ref2d[v][k] += tmp[r][k] * basis(v, r);
      end

    rst = 1'b1; nd = 1'b0;
    for (int i = 0; i < N; i++) data_in[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int r = 0; r < N; r++) begin
      nd = 1'b1;
      for (int i = 0; i < N; i++)
        data_in[i] = W'(longint'($floor(real'(lena[r][i]) / 1000.0 * SCALE + 0.5)));
      #1;
      checks++;
      if (!rfd) begin failures++; $display("FAIL rfd low on row %0d", r); end
      @(posedge clk);
      #1;
    end
    nd = 1'b0;
    while (cols < N) begin
      @(posedge clk);
      #1;
      if (cordic_out) begin
        for (int v = 0; v < N; v++) begin
          real got, err;
          got = real'(data_out[v]) * 4.0 * 1000.0 / SCALE;
          err = rabs(got - ref2d[v][out_col]);
          if (err > maxerr) maxerr = err;
          checks++;
          if (err > 0.003 * rabs(ref2d[v][out_col]) + 0.03) begin
            failures++;
            $display("FAIL coef (%0d,%0d) got %f exp %f", v, out_col, got, ref2d[v][out_col]);
          end
        end
        cols++;
      end
    end
    $display("45-bit core: largest coefficient error %f sample units", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
