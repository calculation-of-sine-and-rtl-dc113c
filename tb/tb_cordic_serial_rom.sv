// tb_cordic_serial_rom: reads every bit of every entry of the serial angle ROM
// and compares the assembled words with atan(2^-i) scaled to 256/pi codes
// (nearest code for i < 7, truncated for i = 7), also with 5 iterations,
// where the unused entries must read zero.
module tb_cordic_serial_rom;
  logic [2:0] iter, bit_idx;
  logic       b8, b5;
  int checks = 0, failures = 0;

  cordic_serial_rom                   dut8 (.iter, .bit_idx, .bit_out(b8));
  cordic_serial_rom #(.ITERATIONS(5)) dut5 (.iter, .bit_idx, .bit_out(b5));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic [7:0] w8, w5;
      real exact;
      int  expect_v;
      for (int j = 0; j < 8; j++) begin
        iter = 3'(i); bit_idx = 3'(j);
        #1;
        w8[j] = b8; w5[j] = b5;
      end
      exact    = $atan(2.0 ** (-i)) * 256.0 / 3.14159265358979;
      expect_v = (i < 7) ? int'($floor(exact + 0.5)) : int'($floor(exact));
      checks += 2;
      if (int'(w8) != expect_v) begin
        failures++;
        $display("FAIL entry %0d = %0d, expected %0d", i, w8, expect_v);
      end
      if (int'(w5) != ((i < 5) ? expect_v : 0)) begin
        failures++;
        $display("FAIL ITERATIONS=5 entry %0d = %0d", i, w5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
