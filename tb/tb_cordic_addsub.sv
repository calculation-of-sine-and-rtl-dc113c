// tb_cordic_addsub: exhaustive check of the 8-bit adder/subtractor. All operand
// pairs are applied in both modes and compared with the integer sum or
// difference reduced modulo 256 into the signed range.
module tb_cordic_addsub;
  import cordic_pkg::*;

  word_t a, b, y;
  logic  sub;
  int checks = 0, failures = 0;

  cordic_addsub dut (.a, .b, .sub, .y);

  function automatic int wrap8(int v);
    int m = ((v % 256) + 256) % 256;
    return (m >= 128) ? m - 256 : m;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = -128; va < 128; va++)
      for (int vb = -128; vb < 128; vb++)
        for (int m = 0; m < 2; m++) begin
          int expect_v;
          a = word_t'(va); b = word_t'(vb); sub = m[0];
          #1;
          expect_v = wrap8(m ? va - vb : va + vb);
          checks++;
          if (int'(y) != expect_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%0d b=%0d sub=%0d y=%0d expected %0d", va, vb, m, y, expect_v);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
