// tb_cordic_serial_addsub: random 8-bit words are fed least significant bit
// first into the bit-serial adder/subtractor, in both modes, with idle cycles
// (en = 0) inserted at random inside words. The eight sum bits collected are
// compared with the integer sum or difference modulo 256.
module tb_cordic_serial_addsub;
  logic clk = 0, en, first, sub, a, b, s;
  int checks = 0, failures = 0, n_stall = 0;

  cordic_serial_addsub dut (.clk, .en, .first, .sub, .a, .b, .s);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; first = 0; sub = 0; a = 0; b = 0;
    for (int n = 0; n < 4000; n++) begin
      logic [7:0] va, vb, got, expect_v;
      va  = 8'($urandom);
      vb  = 8'($urandom);
      if (n % 64 == 0) vb = va;
      sub = $urandom_range(1);
      expect_v = sub ? va - vb : va + vb;
      for (int j = 0; j < 8; j++) begin
        while ($urandom_range(7) == 0) begin
          @(negedge clk);
          en = 0; first = 0; a = $urandom_range(1); b = $urandom_range(1);
          n_stall++;
          @(posedge clk);
        end
        @(negedge clk);
        en = 1; first = (j == 0); a = va[j]; b = vb[j];
        #1 got[j] = s;
        @(posedge clk);
      end
      checks++;
      if (got != expect_v) begin
        failures++;
        if (failures < 10) $display("FAIL %0d %s %0d = %0d, expected %0d", va, sub ? "-" : "+", vb, got, expect_v);
      end
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL no idle cycle inside a word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
