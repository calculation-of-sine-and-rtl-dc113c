// tb_cordic_ctrl: drives random start requests (and occasional resets) into two
// controllers, one with the default 8 iterations and one with 3, and checks
// every cycle against a cycle model in the testbench: iteration index, last,
// busy, load, step and done. It also measures the latency from each accepted
// start to done, which must equal ITERATIONS cycles, and counts starts
// accepted when idle, starts accepted back-to-back in the last cycle and
// starts ignored while busy.
module tb_cordic_ctrl;
  import cordic_pkg::*;

  logic clk = 0, rst, start;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One controller plus its model and latency bookkeeping.
  for (genvar k = 0; k < 2; k++) begin : g_dut
    localparam int unsigned N = (k == 0) ? 8 : 3;
    logic       load, step, last, busy, done;
    logic [2:0] iter;
    int  m_busy = 0, m_iter = 0, m_done = 0;
    int  t_accept[$];
    int  n_idle = 0, n_b2b = 0, n_ignored = 0, n_done = 0;

    cordic_ctrl #(.ITERATIONS(N)) dut (
      .clk, .rst, .start, .load, .step, .iter, .last, .busy, .done
    );

    always @(negedge clk) if (!rst) begin
      int m_last, m_accept;
      m_last   = m_busy && (m_iter == N - 1);
      m_accept = start && (!m_busy || m_last);
      checks++;
      if (busy != m_busy[0] || done != m_done[0] || last != m_last[0] ||
          load != m_accept[0] || step != (m_busy || m_accept) ||
          (m_busy && int'(iter) != m_iter)) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=%0d cycle %0d busy=%b done=%b last=%b load=%b iter=%0d model busy=%0d iter=%0d",
                   N, cycle, busy, done, last, load, iter, m_busy, m_iter);
      end
      if (done) begin
        n_done++;
        checks++;
        if (t_accept.size() == 0 || cycle - t_accept[0] != N + 1) begin
          failures++;
          $display("FAIL N=%0d done without a start %0d cycles earlier", N, N);
        end
        if (t_accept.size() != 0) void'(t_accept.pop_front());
      end
    end

    always @(posedge clk) begin
      int m_last, m_accept;
      m_last   = m_busy && (m_iter == N - 1);
      m_accept = start && (!m_busy || m_last);
      if (rst) begin
        m_busy = 0; m_iter = 0; m_done = 0;
        t_accept.delete();
      end else begin
        m_done = m_last;
        if (start && m_busy && !m_last) n_ignored++;
        if (m_accept) begin
          if (m_busy) n_b2b++; else n_idle++;
          t_accept.push_back(cycle);
          m_busy = 1; m_iter = 0;
        end else if (m_last) begin
          m_busy = 0; m_iter = 0;
        end else if (m_busy) m_iter++;
      end
    end
  end

  initial begin
    rst = 1; start = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      start = (n % 200 < 100) ? ($urandom_range(3) == 0) : 1'b1;
      rst   = (n % 997 == 996);
    end
    @(negedge clk) start = 0;
    repeat (12) @(negedge clk);
    for (int k = 0; k < 2; k++) begin
      int a, b, c, d;
      case (k)
        0: begin a = g_dut[0].n_idle; b = g_dut[0].n_b2b; c = g_dut[0].n_ignored; d = g_dut[0].n_done; end
        default: begin a = g_dut[1].n_idle; b = g_dut[1].n_b2b; c = g_dut[1].n_ignored; d = g_dut[1].n_done; end
      endcase
      $display("controller %0d: idle starts %0d, back-to-back %0d, ignored %0d, done %0d", k, a, b, c, d);
      checks++;
      if (a == 0 || b == 0 || c == 0 || d == 0) begin
        failures++;
        $display("FAIL controller %0d: a start case was never exercised", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
