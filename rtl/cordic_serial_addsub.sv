// cordic_serial_addsub: bit-serial adder/subtractor, the "serial +/-" unit of
// the bit-serial CORDIC datapath. Operand bits arrive least significant first,
// one per clock cycle; the sum bit is combinational and the carry is kept in a
// flip-flop between bit times. On the first bit of a word (first = 1) the carry
// starts at sub, which together with inverting b gives a - b in two's
// complement; the carry out of the top bit is dropped, so words wrap modulo
// 2^WIDTH like the word-level adder. en = 0 freezes the carry. The one-bit
// adder with a carry flip-flop is this design's realisation of the unit drawn
// in the published architecture.
module cordic_serial_addsub (
  input  logic clk,
  input  logic en,
  input  logic first,
  input  logic sub,
  input  logic a,
  input  logic b,
  output logic s
);

  logic carry_q;
  logic cin;
  logic b_eff;

  always_comb begin
    cin   = first ? sub : carry_q;
    b_eff = b ^ sub;
    s     = a ^ b_eff ^ cin;
  end

  always_ff @(posedge clk)
    if (en) carry_q <= (a & b_eff) | (a & cin) | (b_eff & cin);

endmodule
