// sine_computer: iterative CORDIC that returns the cosine and sine of an 8-bit
// angle.
//
// The core rotates the vector (x, y) = (0.607253, 0) by the angle z0 in
// ITERATIONS micro-rotations of atan(2^-i). Because the start value already
// holds the reciprocal of the CORDIC gain, the final x and y are cos(z0) and
// sin(z0) with no multiplier. One shift-add/sub stage is reused every clock
// cycle: its output is fed back through the x/y/z registers, whose input
// multiplexers select the start vector in the first cycle.
//
// Interface (formats in cordic_pkg):
//   z0             signed angle, 1 LSB = 180/256 degree (45 deg = 64), +-90 deg
//   cos_z0, sin_z0 signed Q1.7 results, held until the next result
//   x, y, z        the feedback registers; after a computation they hold the
//                  final vector (x = cos, y = sin, z = residual angle)
//   start          begin a computation on z0 (sampled on the same edge)
//   busy, done     busy while iterating; done pulses for one cycle when
//                  cos_z0/sin_z0 have just been updated
//   rst            synchronous, active high
// Timing: z0 is sampled on the edge where start is accepted; ITERATIONS = 8
// cycles later cos_z0/sin_z0 are valid and done = 1. A new start may be given
// in the last iteration cycle (busy = 1, the cycle before done), which gives
// one result every 8 cycles.
//
// ARCH selects the datapath organisation. ARCH_WORD (default) is the one
// described above: one word-wide micro-rotation per cycle, 8 cycles per
// result. ARCH_BIT_SERIAL instantiates cordic_bit_serial, which processes one
// bit of one micro-rotation per cycle with shift registers and serial
// adders: the same results and interface, 64 cycles per result, and far less
// adder logic.
//
// The ports clk, z0, cos_z0, sin_z0, x, y and z, the 8-bit width, the
// iteration count and the feedback structure follow the published design;
// rst, start, busy and done are this design's additions, since the published
// port list has no handshake. All arithmetic wraps at 8 bits: for an angle
// near 0 the x register passes +1.0 during the iterations and the result can
// wrap (cos(-5 deg) comes out as -126/128); this is kept as published.
module sine_computer
  import cordic_pkg::*;
#(
  parameter int unsigned ITERATIONS = MAX_ITER,
  parameter arch_e       ARCH       = ARCH_WORD
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  word_t z0,
  output word_t cos_z0,
  output word_t sin_z0,
  output word_t x,
  output word_t y,
  output word_t z,
  output logic  busy,
  output logic  done
);

  if (ARCH == ARCH_WORD) begin : g_word
    localparam int unsigned IW = $clog2(MAX_ITER);

    logic          load;
    logic          step;
    logic          last;
    logic [IW-1:0] iter;
    word_t         atan_i;
    vec_t          init_v;
    vec_t          cur_v;
    vec_t          next_v;

    cordic_ctrl #(.ITERATIONS(ITERATIONS), .IW(IW)) u_ctrl (
      .clk, .rst, .start, .load, .step, .iter, .last, .busy, .done
    );

    assign init_v = '{x: X_INIT, y: '0, z: z0};

    cordic_vec_reg u_regs (
      .clk, .rst, .load, .en(step), .init_v, .next_v, .q(cur_v)
    );

    cordic_atan_rom #(.ITERATIONS(ITERATIONS), .IW(IW)) u_rom (
      .idx(iter), .angle(atan_i)
    );

    cordic_stage #(.IW(IW)) u_stage (
      .v_in(cur_v), .iter, .atan_i, .v_out(next_v)
    );

    // Result registers: capture the output of the final iteration.
    always_ff @(posedge clk) begin
      if (rst) begin
        cos_z0 <= '0;
        sin_z0 <= '0;
      end else if (last) begin
        cos_z0 <= next_v.x;
        sin_z0 <= next_v.y;
      end
    end

    assign x = cur_v.x;
    assign y = cur_v.y;
    assign z = cur_v.z;

  end else begin : g_serial

    cordic_bit_serial #(.ITERATIONS(ITERATIONS)) u_serial (
      .clk, .rst, .start, .z0, .cos_z0, .sin_z0, .x, .y, .z, .busy, .done
    );

  end

endmodule
