// cordic_ctrl: sequencing of the iterative CORDIC, the "n iterations
// complete?" loop of the algorithm as a counter.
//
// A computation is accepted with start = 1 when the core is idle, or in the
// last iteration cycle of the previous one, so back-to-back computations run
// with no gap. On the accepting edge load = 1 puts the start vector into the
// registers; then the core runs ITERATIONS cycles with iter = 0, 1, ...,
// ITERATIONS-1, writing the stage result back on each edge (step = 1). last
// marks the final iteration cycle, whose result is the answer; done is a
// registered one-cycle pulse in the cycle after it, when the answer is in the
// output registers. A start while busy and not in the last cycle is ignored.
// Latency from the accepting edge to done = 1 is ITERATIONS cycles, one
// micro-rotation per cycle, and the throughput is one result per ITERATIONS
// cycles. The N-cycle iteration follows the published architecture; the
// start/busy/done handshake and the synchronous, active-high reset are this
// design's choices.
module cordic_ctrl
  import cordic_pkg::*;
#(
  parameter int unsigned ITERATIONS = MAX_ITER,
  parameter int unsigned IW         = $clog2(MAX_ITER)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic          load,
  output logic          step,
  output logic [IW-1:0] iter,
  output logic          last,
  output logic          busy,
  output logic          done
);

  logic accept;

  always_comb begin
    last   = busy && (iter == IW'(ITERATIONS - 1));
    accept = start && (!busy || last);
    load   = accept;
    step   = busy || accept;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      iter <= '0;
      done <= 1'b0;
    end else begin
      done <= last;
      if (accept) begin
        busy <= 1'b1;
        iter <= '0;
      end else if (last) begin
        busy <= 1'b0;
        iter <= '0;
      end else if (busy) begin
        iter <= iter + 1'b1;
      end
    end
  end

  initial assert (ITERATIONS >= 1 && ITERATIONS <= MAX_ITER)
    else $error("ITERATIONS must be 1..%0d", MAX_ITER);

endmodule
