// cordic_stage: one CORDIC micro-rotation in rotation mode, the single
// shift-add/sub stage that the iterative core reuses every clock cycle.
//
//   d      = +1 if z >= 0, else -1          (sign bit of the residual angle)
//   x_out  = x - d * (y >>> i)
//   y_out  = y + d * (x >>> i)
//   z_out  = z - d * alpha_i                (alpha_i = atan(2^-i), from the ROM)
//
// Two variable shifters and three adder/subtractors; the direction d only
// chooses add or subtract in each unit. The update equations and the sign
// decision follow the algorithm; taking z = 0 as positive (rather than the
// "z > 0" test of the flow chart) follows the "-1 if z < 0, +1 otherwise" rule,
// which is also what the published results need. Arithmetic wraps at 8 bits.
// Purely combinational; iter and atan_i must belong to the same iteration.
module cordic_stage
  import cordic_pkg::*;
#(
  parameter int unsigned IW = $clog2(MAX_ITER)
) (
  input  vec_t          v_in,
  input  logic [IW-1:0] iter,
  input  word_t         atan_i,
  output vec_t          v_out
);

  logic  z_neg;     // d = -1
  word_t y_shift;
  word_t x_shift;

  assign z_neg = v_in.z[WIDTH-1];

  cordic_shifter #(.SHW(IW)) u_shx (.a(v_in.x), .sh(iter), .y(x_shift));
  cordic_shifter #(.SHW(IW)) u_shy (.a(v_in.y), .sh(iter), .y(y_shift));

  // d = +1: x - y', y + x', z - alpha.  d = -1: x + y', y - x', z + alpha.
  cordic_addsub u_x (.a(v_in.x), .b(y_shift), .sub(!z_neg), .y(v_out.x));
  cordic_addsub u_y (.a(v_in.y), .b(x_shift), .sub(z_neg),  .y(v_out.y));
  cordic_addsub u_z (.a(v_in.z), .b(atan_i),  .sub(!z_neg), .y(v_out.z));

endmodule
