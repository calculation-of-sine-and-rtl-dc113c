// cordic_vec_reg: the x, y and z registers of the iterative CORDIC with their
// input multiplexers. On a clock edge with en = 1 the registers take the start
// vector init_v when load = 1 (first cycle of a computation: x0, y0 and the
// input angle), otherwise the stage result next_v fed back from the output of
// the adder/subtractors. With en = 0 they hold, so the final vector stays
// visible after a computation. q is the register contents, which the stage
// reads in the following cycle. The multiplexer-register-feedback loop follows
// the published architecture; the enable and the synchronous reset to zero
// (active high, it wins over en) are this design's choices.
module cordic_vec_reg
  import cordic_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic load,
  input  logic en,
  input  vec_t init_v,
  input  vec_t next_v,
  output vec_t q
);

  always_ff @(posedge clk)
    if (rst)     q <= '0;
    else if (en) q <= load ? init_v : next_v;

endmodule
