// dct_pkg: constants, types and the angle-recoding tables shared by the
// CORDIC-based 8x8 2-D DCT core.
//
// The DCT needs only four fixed rotation angles (pi/4, 3pi/8, 7pi/16,
// 3pi/16), so every CORDIC processor is hard-wired for one of them.  For each
// angle the tables below give
//   * the micro-rotations [sigma, i]: x' = x - sigma*(y >>> i),
//                                     y' = y + sigma*(x >>> i)
//   * the compensation stages: each stage multiplies both coordinates by a
//     constant written as a signed sum of at most three power-of-two terms,
//     sum_k g_k * 2^-s_k, so scaling needs only shifts and adds.
// The micro-rotation lists and most compensation factors are the published
// angle-recoded schedule for the 8-point DCT.  Two compensation factors are
// this design's reading of the schedule (see the README): for 7pi/16 the
// second factor is (1 + 2^-8), and for 3pi/16 the factors are kept exactly as
// listed, (1 - 2^-3)(1 + 2^-6)(1 + 2^-10)(1 + 2^-12), whose product is 0.23%
// above the exact inverse gain.
//
// Every processor is padded to the same latency, CORDIC_LAT clock cycles, so
// that all six processors of the 1-D DCT deliver their results together.
package dct_pkg;

  // Points of the 1-D transform and side of the 2-D block.
  localparam int unsigned N = 8;

  // Pipeline depth of one CORDIC processor (longest schedule: 4 rotations +
  // 4 compensation stages, for 3pi/16).
  localparam int unsigned CORDIC_LAT = 8;

  // Latency of the 1-D DCT: butterfly stage, even pre-add stage, CORDIC
  // processors, output add/halve stage.
  localparam int unsigned DCT1D_LAT = 2 + CORDIC_LAT + 1;

  // The four rotation angles of the 8-point DCT.
  typedef enum logic [1:0] {
    ANG_PI_4   = 2'd0,   // pi/4   : F(0), F(4)
    ANG_3PI_8  = 2'd1,   // 3pi/8  : F(2), F(6)
    ANG_7PI_16 = 2'd2,   // 7pi/16 : odd outputs, CORDIC(3) and CORDIC(6)
    ANG_3PI_16 = 2'd3    // 3pi/16 : odd outputs, CORDIC(4) and CORDIC(5)
  } cordic_angle_e;

  // One term g * 2^-s of a compensation factor; g = 0 marks an unused term.
  typedef struct packed {
    logic signed [1:0] g;
    logic [4:0]        s;
  } comp_term_t;

  localparam comp_term_t TERM_NONE = '{g: 2'sd0, s: 5'd0};

  function automatic comp_term_t term(input logic signed [1:0] g, input logic [4:0] s);
    term.g = g;
    term.s = s;
  endfunction

  // Number of micro-rotations for an angle.
  function automatic int unsigned rot_count(input cordic_angle_e a);
    case (a)
      ANG_PI_4:   return 1;
      ANG_3PI_8:  return 5;
      ANG_7PI_16: return 4;
      default:    return 4;
    endcase
  endfunction

  // Shift amount i of micro-rotation k.
  function automatic int unsigned rot_shift(input cordic_angle_e a, input int unsigned k);
    case (a)
      ANG_PI_4:   return 0;
      ANG_3PI_8:  case (k) 0: return 0; 1: return 2; 2: return 3; 3: return 6; default: return 7; endcase
      ANG_7PI_16: case (k) 0: return 0; 1: return 1; 2: return 3; default: return 10; endcase
      default:    case (k) 0: return 1; 1: return 3; 2: return 10; default: return 14; endcase
    endcase
  endfunction

  // Direction sigma of micro-rotation k: 1 when sigma = -1.
  function automatic bit rot_neg(input cordic_angle_e a, input int unsigned k);
    return (a == ANG_PI_4) && (k == 0);
  endfunction

  // Number of compensation stages for an angle.
  function automatic int unsigned comp_count(input cordic_angle_e a);
    case (a)
      ANG_PI_4:   return 5;
      ANG_3PI_8:  return 2;
      ANG_7PI_16: return 3;
      default:    return 4;
    endcase
  endfunction

  // Term t (0..2) of compensation stage k.
  function automatic comp_term_t comp_term(input cordic_angle_e a, input int unsigned k,
                                           input int unsigned t);
    comp_term = TERM_NONE;
    case (a)
      ANG_PI_4: begin          // (1-2^-2)(1-2^-4)(1+2^-8)(1+2^-9)(1+2^-12)
        case (k)
          0:       comp_term = (t == 0) ? term(1, 0) : (t == 1) ? term(-1, 2)  : TERM_NONE;
          1:       comp_term = (t == 0) ? term(1, 0) : (t == 1) ? term(-1, 4)  : TERM_NONE;
          2:       comp_term = (t == 0) ? term(1, 0) : (t == 1) ? term(1, 8)   : TERM_NONE;
          3:       comp_term = (t == 0) ? term(1, 0) : (t == 1) ? term(1, 9)   : TERM_NONE;
          default: comp_term = (t == 0) ? term(1, 0) : (t == 1) ? term(1, 12)  : TERM_NONE;
        endcase
      end
      ANG_3PI_8: begin         // (2^-1+2^-3+2^-6)(1+2^-4)
        case (k)
          0:       comp_term = (t == 0) ? term(1, 1) : (t == 1) ? term(1, 3) : term(1, 6);
          default: comp_term = (t == 0) ? term(1, 0) : (t == 1) ? term(1, 4) : TERM_NONE;
        endcase
      end
      ANG_7PI_16: begin        // (2^-1+2^-3)(1+2^-8)(1+2^-12)
        case (k)
          0:       comp_term = (t == 0) ? term(1, 1) : (t == 1) ? term(1, 3)  : TERM_NONE;
          1:       comp_term = (t == 0) ? term(1, 0) : (t == 1) ? term(1, 8)  : TERM_NONE;
          default: comp_term = (t == 0) ? term(1, 0) : (t == 1) ? term(1, 12) : TERM_NONE;
        endcase
      end
      default: begin           // (1-2^-3)(1+2^-6)(1+2^-10)(1+2^-12)
        case (k)
          0:       comp_term = (t == 0) ? term(1, 0) : (t == 1) ? term(-1, 3)  : TERM_NONE;
          1:       comp_term = (t == 0) ? term(1, 0) : (t == 1) ? term(1, 6)   : TERM_NONE;
          2:       comp_term = (t == 0) ? term(1, 0) : (t == 1) ? term(1, 10)  : TERM_NONE;
          default: comp_term = (t == 0) ? term(1, 0) : (t == 1) ? term(1, 12)  : TERM_NONE;
        endcase
      end
    endcase
  endfunction

endpackage
