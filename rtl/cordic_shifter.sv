// cordic_shifter: variable arithmetic right shift, the "tap select" of the
// iterative CORDIC datapath. It multiplies a signed word by 2^-sh, rounding
// towards minus infinity (the sign bit is copied into the vacated positions).
// Purely combinational. A plain barrel shifter is this design's choice; the
// shift itself follows from tan(alpha_i) = 2^-i.
module cordic_shifter
  import cordic_pkg::*;
#(
  parameter int unsigned SHW = $clog2(WIDTH)
) (
  input  word_t          a,
  input  logic [SHW-1:0] sh,
  output word_t          y
);

  always_comb y = a >>> sh;

endmodule
