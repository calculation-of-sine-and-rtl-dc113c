// tb_cordic_shifter: exhaustive check of the variable arithmetic right shift.
// Every 8-bit signed input and every shift amount 0..7 is applied and the
// output is compared with floor(a / 2^sh) computed with integer division.
module tb_cordic_shifter;
  import cordic_pkg::*;

  word_t      a;
  logic [2:0] sh;
  word_t      y;
  int checks = 0, failures = 0;

  cordic_shifter dut (.a, .sh, .y);

  function automatic int floor_div_pow2(int v, int s);
    int p = 1 << s;
    if (v >= 0) return v / p;
    return -((-v + p - 1) / p);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      for (int s = 0; s < 8; s++) begin
        a  = word_t'(v);
        sh = 3'(s);
        #1;
        checks++;
        if (int'(y) != floor_div_pow2(v, s)) begin
          failures++;
          $display("FAIL a=%0d sh=%0d y=%0d expected %0d", v, s, y, floor_div_pow2(v, s));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
