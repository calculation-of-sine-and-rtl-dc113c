// tb_cordic_atan_rom: checks the elementary-angle table against atan(2^-i)
// evaluated in floating point and scaled to the angle format (256/pi codes per
// radian). Entries 0..6 must be the nearest code, entry 7 the truncated one,
// every entry within one code of the exact angle; also run with fewer
// iterations, where the unused entries must read zero.
module tb_cordic_atan_rom;
  import cordic_pkg::*;

  logic [2:0] idx;
  word_t      angle8, angle5;
  int checks = 0, failures = 0;

  cordic_atan_rom                    dut8 (.idx, .angle(angle8));
  cordic_atan_rom #(.ITERATIONS(5))  dut5 (.idx, .angle(angle5));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      real exact;
      int  expect_v;
      idx = 3'(i);
      #1;
      exact    = $atan(2.0 ** (-i)) * 256.0 / 3.14159265358979;
      expect_v = (i < 7) ? int'($floor(exact + 0.5)) : int'($floor(exact));
      checks++;
      if (int'(angle8) != expect_v) begin
        failures++;
        $display("FAIL idx=%0d angle=%0d expected %0d (exact %f)", i, angle8, expect_v, exact);
      end
      checks++;
      if (real'(angle8) - exact >= 1.0 || exact - real'(angle8) >= 1.0) begin
        failures++;
        $display("FAIL idx=%0d angle=%0d off by a code or more from %f", i, angle8, exact);
      end
      checks++;
      if (int'(angle5) != ((i < 5) ? expect_v : 0)) begin
        failures++;
        $display("FAIL ITERATIONS=5 idx=%0d angle=%0d", i, angle5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
