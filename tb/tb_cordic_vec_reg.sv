// tb_cordic_vec_reg: random load / enable / reset sequence on the x, y, z
// registers, compared every cycle with a model kept in the testbench (reset
// clears, load takes the start vector, otherwise the fed-back vector, en = 0
// holds).
module tb_cordic_vec_reg;
  import cordic_pkg::*;

  logic clk = 0, rst, load, en;
  vec_t init_v, next_v, q, model;
  int checks = 0, failures = 0;
  int n_load = 0, n_feed = 0, n_hold = 0, n_rst = 0;

  cordic_vec_reg dut (.clk, .rst, .load, .en, .init_v, .next_v, .q);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; en = 0; init_v = '0; next_v = '0;
    @(posedge clk);
    model = '0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      rst    = ($urandom_range(31) == 0);
      load   = $urandom_range(1);
      en     = ($urandom_range(3) != 0);
      init_v = vec_t'({$urandom, $urandom});
      next_v = vec_t'({$urandom, $urandom});
      @(posedge clk);
      if (rst)       begin model = '0;     n_rst++;  end
      else if (!en)  n_hold++;
      else if (load) begin model = init_v; n_load++; end
      else           begin model = next_v; n_feed++; end
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d q=%h expected %h", n, q, model);
      end
    end
    checks++;
    if (n_load == 0 || n_feed == 0 || n_hold == 0 || n_rst == 0) begin
      failures++;
      $display("FAIL a register mode was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
