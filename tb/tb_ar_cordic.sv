// tb_ar_cordic: self-checking testbench for the four fixed-angle CORDIC
// processors.
//
// One processor per angle (pi/4 with sigma = -1, i.e. a rotation by -pi/4,
// 3pi/8, 7pi/16, 3pi/16) receives a new random vector on every clock.  Each
// output is compared with the exact rotation computed in real arithmetic
// from the vector that entered exactly CORDIC_LAT clocks earlier, which also
// checks the latency and the one-vector-per-clock throughput.  Tolerance:
// 0.3% of the vector length (compensation and angle approximation) plus
// 16 LSB (truncation in up to 8 stages).
module tb_ar_cordic;
  import dct_pkg::*;

  localparam int unsigned W    = 21;
  localparam int unsigned NVEC = 400;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] xi, yi;
  logic signed [W-1:0] xo [4];
  logic signed [W-1:0] yo [4];

  ar_cordic #(.ANGLE(ANG_PI_4),   .W(W)) u0 (.clk, .x_i(xi), .y_i(yi), .x_o(xo[0]), .y_o(yo[0]));
  ar_cordic #(.ANGLE(ANG_3PI_8),  .W(W)) u1 (.clk, .x_i(xi), .y_i(yi), .x_o(xo[1]), .y_o(yo[1]));
  ar_cordic #(.ANGLE(ANG_7PI_16), .W(W)) u2 (.clk, .x_i(xi), .y_i(yi), .x_o(xo[2]), .y_o(yo[2]));
  ar_cordic #(.ANGLE(ANG_3PI_16), .W(W)) u3 (.clk, .x_i(xi), .y_i(yi), .x_o(xo[3]), .y_o(yo[3]));

  real angle [4] = '{-PI/4.0, 3.0*PI/8.0, 7.0*PI/16.0, 3.0*PI/16.0};

  int checks = 0, failures = 0;
  int hx [$];
  int hy [$];

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check_outputs(int x, int y);
    real ex, ey, len, tol;
    for (int p = 0; p < 4; p++) begin
      ex  = real'(x) * $cos(angle[p]) - real'(y) * $sin(angle[p]);
      ey  = real'(x) * $sin(angle[p]) + real'(y) * $cos(angle[p]);
      len = $sqrt(real'(x) * real'(x) + real'(y) * real'(y));
      tol = 0.003 * len + 16.0;
      checks += 2;
      if (rabs(real'(xo[p]) - ex) > tol || rabs(real'(yo[p]) - ey) > tol) begin
        failures++;
        if (failures < 10)
          $display("FAIL angle %0d in (%0d,%0d) got (%0d,%0d) exp (%0.1f,%0.1f)",
                   p, x, y, xo[p], yo[p], ex, ey);
      end
    end
  endtask

  initial begin
    int x, y;
    xi = '0; yi = '0;
    for (int n = 0; n < NVEC + CORDIC_LAT; n++) begin
      if (n < 4)       begin x = (n == 0) ? 30000 : (n == 1) ? -30000 : 0; y = (n == 2) ? 30000 : (n == 3) ? -25000 : 0; end
      else if (n < NVEC) begin
        x = int'($urandom_range(0, 65535)) - 32768;
        y = int'($urandom_range(0, 65535)) - 32768;
      end else begin x = 0; y = 0; end
      xi = W'(x); yi = W'(y);
      hx.push_back(x); hy.push_back(y);
      @(posedge clk);
      #1;
      if (hx.size() >= CORDIC_LAT) begin
        check_outputs(hx.pop_front(), hy.pop_front());
      end
    end
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
