// tb_dct1d_cordic: self-checking testbench for the 8-point CORDIC 1-D DCT.
//
// Streams random rows (with random idle gaps) and a few fixed rows (all
// equal, alternating, single impulse) through the pipeline.  Every output
// row is compared with the orthonormal DCT-II computed in real arithmetic
// from the row that entered DCT1D_LAT clocks earlier; out_valid must rise
// exactly then and never otherwise.  Tolerance per coefficient: 0.25% of the
// input row's length plus 24 LSB.
module tb_dct1d_cordic;
  import dct_pkg::*;

  localparam int unsigned W    = 17;
  localparam int unsigned NROW = 300;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                rst;
  logic                in_valid;
  logic signed [W-1:0] x [N];
  logic                out_valid;
  logic signed [W+1:0] y [N];

  dct1d_cordic #(.W_IN(W)) dut (.clk, .rst, .in_valid, .x, .out_valid, .y);

  int checks = 0, failures = 0;
  real maxerr = 0.0;

  typedef int row_t [N];
  int    hist_val [$];
  bit    hist_v   [$];

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check_row(row_t r, bit v);
    real e, len, err, tol;
    checks++;
    if (out_valid !== v) begin
      failures++;
      $display("FAIL out_valid=%0b expected %0b", out_valid, v);
    end
    if (!v) return;
    len = 0.0;
    for (int i = 0; i < N; i++) len += real'(r[i]) * real'(r[i]);
    len = $sqrt(len);
    tol = 0.0025 * len + 24.0;
    for (int u = 0; u < N; u++) begin
      e = 0.0;
      for (int i = 0; i < N; i++) e += real'(r[i]) * $cos(real'((2*i+1)*u) * PI / 16.0);
      e = e * ((u == 0) ? $sqrt(0.125) : 0.5);
      err = rabs(real'(y[u]) - e);
      if (err - 24.0 > maxerr * len) maxerr = (err - 24.0) / len;
      checks++;
      if (err > tol) begin
        failures++;
        if (failures < 10) $display("FAIL u=%0d got %0d exp %0.1f", u, y[u], e);
      end
    end
  endtask

  initial begin
    row_t r;
    bit   v;
    rst = 1'b1; in_valid = 1'b0;
    for (int i = 0; i < N; i++) x[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < NROW + DCT1D_LAT; n++) begin
      for (int i = 0; i < N; i++) begin
        case (n)
          0:       r[i] = 30000;
          1:       r[i] = (i % 2 != 0) ? -30000 : 30000;
          2:       r[i] = (i == 3) ? -32768 : 0;
          3:       r[i] = i * 4000 - 14000;
          default: r[i] = int'($urandom_range(0, 65535)) - 32768;
        endcase
      end
      v = (n < NROW) && ((n < 4) || ($urandom_range(0, 3) != 0));
      in_valid = v;
      for (int i = 0; i < N; i++) x[i] = W'(r[i]);
      for (int i = 0; i < N; i++) hist_val.push_back(r[i]); hist_v.push_back(v);
      @(posedge clk);
      #1;
      if (hist_v.size() >= DCT1D_LAT) begin
        row_t q;
        for (int i = 0; i < N; i++) q[i] = hist_val.pop_front();
        check_row(q, hist_v.pop_front());
      end
    end
    $display("max relative error beyond 24 LSB: %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
