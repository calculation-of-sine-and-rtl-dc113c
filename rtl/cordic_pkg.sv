// cordic_pkg: word format, start vector and elementary-angle table shared by the
// iterative sine/cosine CORDIC.
//
// Number formats (all two's complement, WIDTH = 8 bits):
//   * x, y, cos, sin: Q1.7, so 1 LSB = 1/128 and +1.0 is not representable
//     (127/128 is the largest value).
//   * z, angles: 1 LSB = 180/256 degree, so 45 degrees = 64 and the 8-bit range
//     is -90 .. +89.3 degrees, which lies inside the convergence range of CORDIC.
// The 8-bit word, the Q1.7 outputs and the 45-degree = 64 angle code follow the
// published simulation; the exact binary point and angle scale are this design's
// reading of those numbers.
//
// The start vector is x0 = 0.607253 (the reciprocal of the CORDIC gain), y0 = 0,
// so the rotation delivers unscaled cos and sin. In Q1.7 that is 78/128.
//
// Elementary angles alpha_i = atan(2^-i) * 256/180, rounded to the nearest code
// for i = 0..6 and truncated for i = 7 (0.64 -> 0). With this table and the sign
// rule d = +1 when z >= 0 the datapath reproduces the published results bit for
// bit, including the final residual z = -1 for a 45-degree input.
package cordic_pkg;

  localparam int unsigned WIDTH    = 8;
  localparam int unsigned MAX_ITER = 8;

  typedef logic signed [WIDTH-1:0] word_t;

  // One CORDIC vector: the coordinates and the residual angle.
  typedef struct packed {
    word_t x;
    word_t y;
    word_t z;
  } vec_t;

  // Datapath organisation of the core: one word-wide micro-rotation per
  // clock cycle, or one bit of one micro-rotation per clock cycle.
  typedef enum logic {
    ARCH_WORD       = 1'b0,
    ARCH_BIT_SERIAL = 1'b1
  } arch_e;

  // 0.607253 * 128 = 77.73, rounded.
  localparam word_t X_INIT = word_t'(78);

  function automatic word_t atan_code(input int unsigned i);
    case (i)
      0:       return word_t'(64);  // 45.000 deg
      1:       return word_t'(38);  // 26.565 deg
      2:       return word_t'(20);  // 14.036 deg
      3:       return word_t'(10);  //  7.125 deg
      4:       return word_t'(5);   //  3.576 deg
      5:       return word_t'(3);   //  1.790 deg
      6:       return word_t'(1);   //  0.895 deg
      default: return word_t'(0);   //  0.448 deg and below
    endcase
  endfunction

endpackage
