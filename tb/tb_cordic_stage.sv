// tb_cordic_stage: random micro-rotations. For random x, y, z, iteration index
// and elementary angle, the stage output is compared with the rotation
// equations evaluated in integer arithmetic (x - d*floor(y/2^i),
// y + d*floor(x/2^i), z - d*alpha, d from the sign of z) and wrapped to 8 bits.
// Counts how often each rotation direction was exercised, including z = 0.
module tb_cordic_stage;
  import cordic_pkg::*;

  vec_t       v_in, v_out;
  logic [2:0] iter;
  word_t      atan_i;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_zero = 0;

  cordic_stage dut (.v_in, .iter, .atan_i, .v_out);

  function automatic int wrap8(int v);
    int m = ((v % 256) + 256) % 256;
    return (m >= 128) ? m - 256 : m;
  endfunction

  function automatic int fdiv(int v, int s);
    int p = 1 << s;
    if (v >= 0) return v / p;
    return -((-v + p - 1) / p);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int xi, yi, zi, ii, ai, d, ex, ey, ez;
      xi = int'($urandom_range(255)) - 128;
      yi = int'($urandom_range(255)) - 128;
      zi = (n % 16 == 0) ? 0 : int'($urandom_range(255)) - 128;
      ii = int'($urandom_range(7));
      ai = int'($urandom_range(64));
      v_in   = '{x: word_t'(xi), y: word_t'(yi), z: word_t'(zi)};
      iter   = 3'(ii);
      atan_i = word_t'(ai);
      #1;
      d  = (zi >= 0) ? 1 : -1;
      if (zi > 0) n_pos++; else if (zi < 0) n_neg++; else n_zero++;
      ex = wrap8(xi - d * fdiv(yi, ii));
      ey = wrap8(yi + d * fdiv(xi, ii));
      ez = wrap8(zi - d * ai);
      checks++;
      if (int'(v_out.x) != ex || int'(v_out.y) != ey || int'(v_out.z) != ez) begin
        failures++;
        if (failures < 10)
          $display("FAIL in=(%0d,%0d,%0d) i=%0d a=%0d out=(%0d,%0d,%0d) expected (%0d,%0d,%0d)",
                   xi, yi, zi, ii, ai, v_out.x, v_out.y, v_out.z, ex, ey, ez);
      end
    end
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL a rotation direction was never exercised");
    end
    $display("z>0: %0d  z<0: %0d  z=0: %0d", n_pos, n_neg, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
