// ar_cordic: angle-recoded CORDIC processor for one fixed rotation angle.
//
// Rotates the vector (x_i, y_i) by the angle ANGLE:
//   x_o = x_i*cos(ANGLE) - y_i*sin(ANGLE)
//   y_o = x_i*sin(ANGLE) + y_i*cos(ANGLE)
// using only shifts and adds.  Because the angle is known at design time the
// sign sequence is precomputed (angle recoding): there is no angle register
// and no arctan table, and only the few micro-rotations listed in dct_pkg are
// built.  The CORDIC gain of those micro-rotations is then removed by the
// listed compensation stages, each a sum of shifted copies of its input.
//
// Architecture: parallel-pipelined (unrolled), one register stage per
// micro-rotation and per compensation stage; stages beyond the angle's own
// schedule are plain delay registers, so every angle has the same latency of
// dct_pkg::CORDIC_LAT cycles and a new vector can enter on every clock.
// Right shifts are arithmetic and truncate (round toward minus infinity).
//
// Interface: two's complement fixed-point words of W bits, any binary point
// (the same on input and output).  The caller must leave headroom for the
// intermediate gain, at most about 1.6 times the vector length.
// The unrolled parallel-pipelined form and the schedules follow the
// published design; the stage padding to a common latency is this design's.
module ar_cordic
  import dct_pkg::*;
#(
  parameter cordic_angle_e ANGLE = ANG_PI_4,
  parameter int unsigned   W     = 21
) (
  input  logic                clk,
  input  logic signed [W-1:0] x_i,
  input  logic signed [W-1:0] y_i,
  output logic signed [W-1:0] x_o,
  output logic signed [W-1:0] y_o
);

  localparam int unsigned NROT  = rot_count(ANGLE);
  localparam int unsigned NCOMP = comp_count(ANGLE);

  // xs[k], ys[k]: vector after stage k (xs[0] is the input).
  logic signed [W-1:0] xs [CORDIC_LAT+1];
  logic signed [W-1:0] ys [CORDIC_LAT+1];

  assign xs[0] = x_i;
  assign ys[0] = y_i;

  // Multiply v by the constant of compensation stage k.
  function automatic logic signed [W-1:0] compensate(input logic signed [W-1:0] v,
                                                     input int unsigned k);
    logic signed [W-1:0] acc;
    comp_term_t          tm;
    acc = '0;
    for (int unsigned t = 0; t < 3; t++) begin
      tm = comp_term(ANGLE, k, t);
      if (tm.g > 0)      acc = acc + (v >>> tm.s);
      else if (tm.g < 0) acc = acc - (v >>> tm.s);
    end
    return acc;
  endfunction

  for (genvar k = 0; k < CORDIC_LAT; k++) begin : g_stage
    if (k < NROT) begin : g_rot
      localparam int unsigned SH  = rot_shift(ANGLE, k);
      localparam bit          NEG = rot_neg(ANGLE, k);
      always_ff @(posedge clk) begin
        if (NEG) begin
          xs[k+1] <= xs[k] + (ys[k] >>> SH);
          ys[k+1] <= ys[k] - (xs[k] >>> SH);
        end else begin
          xs[k+1] <= xs[k] - (ys[k] >>> SH);
          ys[k+1] <= ys[k] + (xs[k] >>> SH);
        end
      end
    end else if (k < NROT + NCOMP) begin : g_comp
      always_ff @(posedge clk) begin
        xs[k+1] <= compensate(xs[k], k - NROT);
        ys[k+1] <= compensate(ys[k], k - NROT);
      end
    end else begin : g_delay
      always_ff @(posedge clk) begin
        xs[k+1] <= xs[k];
        ys[k+1] <= ys[k];
      end
    end
  end

  assign x_o = xs[CORDIC_LAT];
  assign y_o = ys[CORDIC_LAT];

endmodule
