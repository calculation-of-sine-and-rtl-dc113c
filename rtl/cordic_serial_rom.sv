// cordic_serial_rom: the elementary-angle table read one bit at a time for the
// bit-serial datapath. It returns bit `bit_idx` of alpha_iter (the same values
// as cordic_atan_rom, see cordic_pkg::atan_code), least significant bit first
// as the bit counter advances, so the z adder receives the angle in step with
// the z shift register. Iterations from ITERATIONS upward read as zero.
// Purely combinational.
module cordic_serial_rom
  import cordic_pkg::*;
#(
  parameter int unsigned ITERATIONS = MAX_ITER,
  parameter int unsigned IW         = $clog2(MAX_ITER),
  parameter int unsigned BW         = $clog2(WIDTH)
) (
  input  logic [IW-1:0] iter,
  input  logic [BW-1:0] bit_idx,
  output logic          bit_out
);

  word_t angle;

  cordic_atan_rom #(.ITERATIONS(ITERATIONS), .IW(IW)) u_rom (.idx(iter), .angle);

  always_comb bit_out = angle[bit_idx];

endmodule
