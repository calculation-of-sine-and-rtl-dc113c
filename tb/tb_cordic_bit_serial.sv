// tb_cordic_bit_serial: end-to-end test of the bit-serial CORDIC core at its
// default size (8-bit words, 8 iterations, 64 cycles per result).
//
// It runs the same program and uses the same independent references as the
// word-level top-level test: the published results for six angles and the
// 45-degree trace (x = 88, y = 94, z = -1), a bit-accurate integer model
// with its own $atan table, and $cos/$sin within 6/128. Phases: computations
// from idle with the latency checked (done exactly 64 cycles after start),
// all 256 angle codes back-to-back (one result every 64 cycles), a start
// while busy (ignored) and a reset in mid-computation. Each mechanism must
// occur at least once.
module tb_cordic_bit_serial;
  import cordic_pkg::*;

  localparam int N   = 8;
  localparam int LAT = N * WIDTH;    // cycles from start to done

  logic  clk = 0, rst, start;
  word_t z0, cos_z0, sin_z0, x, y, z;
  logic  busy, done;
  int checks = 0, failures = 0;
  int n_idle = 0, n_b2b = 0, n_ignored = 0, n_rst = 0;
  int n_dpos = 0, n_dneg = 0, n_wrap = 0;
  int atan_tab [N];

  cordic_bit_serial dut (.clk, .rst, .start, .z0, .cos_z0, .sin_z0, .x, .y, .z, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrap8(int v);
    int m = ((v % 256) + 256) % 256;
    return (m >= 128) ? m - 256 : m;
  endfunction

  function automatic int fdiv(int v, int s);
    int p = 1 << s;
    if (v >= 0) return v / p;
    return -((-v + p - 1) / p);
  endfunction

  // Bit-accurate model: returns final x, y, z; counts directions and wraps.
  task automatic model(input int a, output int mx, output int my, output int mz,
                       output bit wrapped);
    int nx, ny, nz, d;
    mx = 78; my = 0; mz = a; wrapped = 0;
    for (int i = 0; i < N; i++) begin
      d  = (mz >= 0) ? 1 : -1;
      if (d > 0) n_dpos++; else n_dneg++;
      nx = mx - d * fdiv(my, i);
      ny = my + d * fdiv(mx, i);
      nz = mz - d * atan_tab[i];
      if (nx != wrap8(nx) || ny != wrap8(ny) || nz != wrap8(nz)) wrapped = 1;
      mx = wrap8(nx); my = wrap8(ny); mz = wrap8(nz);
    end
  endtask

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // One computation from idle; checks latency, results and final registers.
  task automatic run_one(input int a, output int c, output int s, output int rz);
    int cyc = 0;
    @(negedge clk);
    z0 = word_t'(a); start = 1;
    @(negedge clk);
    start = 0; n_idle++;
    z0 = word_t'($urandom);         // z0 only matters on the accepting edge
    while (!done && cyc < 4 * LAT) begin
      cyc++;
      @(negedge clk);
    end
    check($sformatf("latency for angle %0d", a), cyc, LAT);
    c = int'(cos_z0); s = int'(sin_z0); rz = int'(z);
    check("x register holds cos", int'(x), c);
    check("y register holds sin", int'(y), s);
    check("busy low after done", int'(busy), 0);
  endtask

  // Angle code of a whole number of degrees: 256/180 codes per degree.
  function automatic int deg_code(int deg);
    real r = real'(deg) * 256.0 / 180.0;
    return (r >= 0.0) ? int'($floor(r + 0.5)) : -int'($floor(-r + 0.5));
  endfunction

  int table_deg [6] = '{15, 30, 45, 60, -5, -75};
  // Published practical results in units of 1/128 (cos, sin). For -5 degrees
  // the x register wraps past +1.0: the 8-bit result is -126, whose magnitude
  // 126/128 = 0.984 is the published value.
  int table_cos [6] = '{123, 113, 88, 64, -126, 34};
  int table_sin [6] = '{34, 64, 94, 113, -18, -123};

  initial begin
    int c, s, rz, mx, my, mz;
    bit w;
    for (int i = 0; i < N; i++) begin
      real e;
      e = $atan(2.0 ** (-i)) * 256.0 / 3.14159265358979;
      atan_tab[i] = (i < 7) ? int'($floor(e + 0.5)) : int'($floor(e));
    end

    rst = 1; start = 0; z0 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check("cos after reset", int'(cos_z0), 0);
    check("busy after reset", int'(busy), 0);

    // Published table and 45-degree trace.
    for (int k = 0; k < 6; k++) begin
      run_one(deg_code(table_deg[k]), c, s, rz);
      check($sformatf("cos(%0d deg) vs published", table_deg[k]), c, table_cos[k]);
      check($sformatf("sin(%0d deg) vs published", table_deg[k]), s, table_sin[k]);
      if (table_deg[k] == 45) begin
        check("45 deg angle code", deg_code(45), 64);
        check("45 deg residual z", rz, -1);
      end
    end

    // Every angle code, streamed back-to-back with start held high.
    begin
      int q [$];
      int since = 0;
      int next_a = -128;
      int issued = 0, got = 0;
      @(negedge clk);
      start = 1; z0 = word_t'(next_a);
      while (got < 256) begin
        @(posedge clk);
        // Accepted on this edge if idle, or if in the last iteration cycle.
        if (start && (!busy || since == LAT - 1)) begin
          if (busy) n_b2b++; else n_idle++;
          q.push_back(int'(z0));
          issued++; since = 0; next_a++;
        end else if (busy) since++;
        @(negedge clk);
        if (issued < 256) z0 = word_t'(next_a); else start = 0;
        if (done) begin
          int a;
          real ang, ec, es;
          a = q.pop_front();
          got++;
          model(a, mx, my, mz, w);
          check($sformatf("cos code %0d vs model", a), int'(cos_z0), mx);
          check($sformatf("sin code %0d vs model", a), int'(sin_z0), my);
          if (w) n_wrap++;
          else begin
            ang = real'(a) * 3.14159265358979 / 256.0;
            ec = real'(cos_z0) / 128.0 - $cos(ang);
            es = real'(sin_z0) / 128.0 - $sin(ang);
            checks++;
            if (ec * ec > (6.0 / 128) ** 2 || es * es > (6.0 / 128) ** 2) begin
              failures++;
              $display("FAIL accuracy at code %0d: cos %0d sin %0d", a, cos_z0, sin_z0);
            end
          end
        end
      end
      check("back-to-back throughput", n_b2b, 255);
    end
    repeat (LAT + 2) @(negedge clk);

    // Starts given while busy are ignored.
    @(negedge clk);
    z0 = word_t'(deg_code(30)); start = 1;
    @(negedge clk);
    start = 0; n_idle++;
    repeat (3) @(negedge clk);
    z0 = word_t'(deg_code(-60)); start = 1;
    @(negedge clk);
    start = 0; n_ignored++;
    while (!done) @(negedge clk);
    check("ignored start: cos(30)", int'(cos_z0), 113);
    check("ignored start: sin(30)", int'(sin_z0), 64);
    @(negedge clk);
    check("no second result", int'(busy) + int'(done), 0);

    // Reset in the middle of a computation.
    @(negedge clk);
    z0 = word_t'(deg_code(60)); start = 1;
    @(negedge clk);
    start = 0; n_idle++;
    repeat (3) @(negedge clk);
    rst = 1; n_rst++;
    @(negedge clk);
    rst = 0;
    check("busy cleared by reset", int'(busy), 0);
    check("cos cleared by reset", int'(cos_z0), 0);
    repeat (LAT + 2) begin
      @(negedge clk);
      if (done) begin failures++; $display("FAIL done after reset"); end
    end
    checks++;
    run_one(deg_code(-75), c, s, rz);
    check("after reset: cos(-75)", c, 34);
    check("after reset: sin(-75)", s, -123);

    $display("idle starts %0d, back-to-back %0d, ignored %0d, resets %0d", n_idle, n_b2b, n_ignored, n_rst);
    $display("rotations d=+1 %0d, d=-1 %0d, wrapped results %0d", n_dpos, n_dneg, n_wrap);
    checks++;
    if (n_idle == 0 || n_b2b == 0 || n_ignored == 0 || n_rst == 0 ||
        n_dpos == 0 || n_dneg == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
