// cordic_atan_rom: the small look-up table of elementary rotation angles
// alpha_i = atan(2^-i), one entry per iteration, in the angle format of z
// (1 LSB = 180/256 degree). The values and their rounding are given in
// cordic_pkg::atan_code. Indices from ITERATIONS upward are never used by the
// controller and read as zero. Purely combinational (an asynchronous ROM).
module cordic_atan_rom
  import cordic_pkg::*;
#(
  parameter int unsigned ITERATIONS = MAX_ITER,
  parameter int unsigned IW         = $clog2(MAX_ITER)
) (
  input  logic [IW-1:0] idx,
  output word_t         angle
);

  word_t table_q [ITERATIONS];

  for (genvar i = 0; i < ITERATIONS; i++) begin : g_rom
    assign table_q[i] = atan_code(i);
  end

  always_comb begin
    angle = '0;
    for (int unsigned i = 0; i < ITERATIONS; i++)
      if (idx == IW'(i)) angle = table_q[i];
  end

endmodule
