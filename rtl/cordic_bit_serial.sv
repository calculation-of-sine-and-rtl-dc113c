// cordic_bit_serial: bit-serial form of the iterative sine/cosine CORDIC.
//
// x, y and z live in WIDTH-bit shift registers that shift towards bit 0 once
// per clock cycle. Bit 0 of each register feeds a serial adder/subtractor
// whose sum bit re-enters the register at the top, so after WIDTH cycles the
// register again holds a whole word: the result of one micro-rotation.
// ITERATIONS such words make one computation.
//
// During bit time j of iteration i the cell at position k still holds old bit
// j+k for k <= WIDTH-1-j, and the cell at WIDTH-1-j holds the old sign bit.
// The "tap select" therefore reads the other register at position
// min(i, WIDTH-1-j). That gives bit j of (word >>> i) with the sign
// extension built in. The rotation direction is the sign bit of z, read at
// j = 0 and held for the rest of the word. The elementary angle comes from a
// serial ROM, one bit per cycle, least significant first. The results are bit
// identical to the word-level core, including the 8-bit wrap-around.
//
// Interface: the same as sine_computer (start/busy/done handshake, z0 sampled
// on the accepting edge; results held in cos_z0 / sin_z0; x, y, z show the
// shift registers, which hold the final vector once a computation is over).
// Timing: done rises ITERATIONS * WIDTH = 64 cycles after the accepting edge.
// A new start is accepted when idle or in the very last bit time.
//
// Shift registers, tap select, serial adder/subtractors, serial ROM and the
// feedback from the adder output into the register follow the published
// architecture drawing. Loading the start vector in parallel in one cycle, the
// sign-bit capture and the handshake are this design's choices.
module cordic_bit_serial
  import cordic_pkg::*;
#(
  parameter int unsigned ITERATIONS = MAX_ITER
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

  localparam int unsigned IW = $clog2(MAX_ITER);
  localparam int unsigned BW = $clog2(WIDTH);

  word_t         xs, ys, zs;
  logic [IW-1:0] iter;
  logic [BW-1:0] bit_idx;
  logic [BW-1:0] tap;
  logic          first;
  logic          last;
  logic          accept;
  logic          d_neg_q;
  logic          d_neg;
  logic          alpha_bit;
  logic          sx, sy, sz;

  always_comb begin
    first  = (bit_idx == '0);
    last   = busy && (iter == IW'(ITERATIONS - 1)) && (bit_idx == BW'(WIDTH - 1));
    accept = start && (!busy || last);
    // Tap select: min(i, WIDTH-1-j).
    tap    = (BW'(iter) < BW'(WIDTH - 1) - bit_idx) ? BW'(iter) : BW'(WIDTH - 1) - bit_idx;
    d_neg  = first ? zs[WIDTH-1] : d_neg_q;
  end

  cordic_serial_rom #(.ITERATIONS(ITERATIONS), .IW(IW), .BW(BW)) u_rom (
    .iter, .bit_idx, .bit_out(alpha_bit)
  );

  // d = +1: x - y', y + x', z - alpha.  d = -1: x + y', y - x', z + alpha.
  cordic_serial_addsub u_x (.clk, .en(busy), .first, .sub(!d_neg), .a(xs[0]), .b(ys[tap]),  .s(sx));
  cordic_serial_addsub u_y (.clk, .en(busy), .first, .sub(d_neg),  .a(ys[0]), .b(xs[tap]),  .s(sy));
  cordic_serial_addsub u_z (.clk, .en(busy), .first, .sub(!d_neg), .a(zs[0]), .b(alpha_bit), .s(sz));

  always_ff @(posedge clk) begin
    if (rst) begin
      xs      <= '0;
      ys      <= '0;
      zs      <= '0;
      iter    <= '0;
      bit_idx <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      d_neg_q <= 1'b0;
      cos_z0  <= '0;
      sin_z0  <= '0;
    end else begin
      done <= last;
      if (last) begin
        cos_z0 <= {sx, xs[WIDTH-1:1]};
        sin_z0 <= {sy, ys[WIDTH-1:1]};
      end
      if (busy && first) d_neg_q <= zs[WIDTH-1];
      if (accept) begin
        // Input multiplexers: the start vector instead of the feedback.
        xs      <= X_INIT;
        ys      <= '0;
        zs      <= z0;
        iter    <= '0;
        bit_idx <= '0;
        busy    <= 1'b1;
      end else if (busy) begin
        xs      <= {sx, xs[WIDTH-1:1]};
        ys      <= {sy, ys[WIDTH-1:1]};
        zs      <= {sz, zs[WIDTH-1:1]};
        bit_idx <= bit_idx + 1'b1;
        if (bit_idx == BW'(WIDTH - 1)) begin
          iter <= iter + 1'b1;
          if (last) busy <= 1'b0;
        end
      end
    end
  end

  assign x = xs;
  assign y = ys;
  assign z = zs;

endmodule
