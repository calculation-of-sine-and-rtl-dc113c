// cordic_addsub: the adder/subtractor of the CORDIC stage. y = a + b when sub is
// 0 and y = a - b when sub is 1, computed as a + (b ^ {sub}) + sub so one adder
// serves both. The result wraps modulo 2^WIDTH exactly like the 8-bit registers
// of the design (no saturation); the one-adder form is this design's choice.
// Purely combinational.
module cordic_addsub
  import cordic_pkg::*;
(
  input  word_t a,
  input  word_t b,
  input  logic  sub,
  output word_t y
);

  word_t b_eff;

  always_comb begin
    b_eff = b ^ {WIDTH{sub}};
    y     = a + b_eff + word_t'(sub);
  end

endmodule
