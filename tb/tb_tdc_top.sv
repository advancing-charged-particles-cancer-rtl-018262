// tb_tdc_top: end-to-end test of the converter at its default size (480-tap
// lines, 400 MHz clock, 16-bit coarse counter), with the non-uniform,
// bubbling delay-line models.
//
// 1. Uncalibrated: random S1 -> S2 intervals measured with the initial linear
//    tables; the error against the true interval is recorded.
// 2. Calibration: each line in turn sees hits at offsets stepped by 1 ps over
//    a whole clock period before a clock edge, while the other line's hit
//    sits mid-period. The result's coarse count tells which edge caught the
//    swept hit, so the true hit-to-edge time of each sample is known; the mean
//    over all samples with the same bin code becomes that code's table entry.
//    Codes never seen are extrapolated at the nominal 6 ps.
// 3. Calibrated: random intervals from 0 to 1 us; every result is compared
//    with the true interval, and the RMS error must be below the uncalibrated
//    one and below 6 ps.
// 4. Special cases: S1 and S2 caught by the same clock edge (N = 0), a stop
//    without a start, a second start during a measurement, and a missing stop
//    that must end in a counter overflow after 2^16-1 periods.
// Each mechanism is counted, and one that never happened is a failure.
module tb_tdc_top;
  import tdc_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TCLK = 2500.0;

  logic              clk = 0, rst_n = 0, s1 = 0, s2 = 0;
  logic              cal_we = 0, cal_line = 0;
  logic [CODE_W-1:0] cal_addr = '0;
  logic [FINE_W-1:0] cal_data = '0;
  logic              result_valid_o, overflow_o, busy_o;
  tof_result_t       result_o;
  logic [1:0]        sat_o, bubble_o;

  tdc_top dut (.*);

  // posedges at 1250 + k*2500 ps
  always #1250 clk = ~clk;

  int checks = 0, failures = 0;
  int n_same_cycle = 0, n_bubbled = 0, n_cal_writes = 0, n_overflow = 0;
  int n_stray_stop = 0, n_extra_start = 0, n_long = 0, n_results = 0;

  initial begin
    #2000us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // result capture
  logic        got = 0;
  tof_result_t res;
  always @(posedge clk) begin
    if (result_valid_o && rst_n) begin
      got <= 1'b1;
      res <= result_o;
      n_results++;
      if (|bubble_o) n_bubbled++;
    end
    if (overflow_o && rst_n) n_overflow++;
  end

  task automatic wait_until(real t);
    if (t > $realtime) #(t - $realtime);
  endtask

  function automatic real next_edge_after(real t);
    // first posedge strictly after time t, plus k periods
    return 1250.0 + TCLK * real'($floor((t - 1250.0) / TCLK) + 1.0);
  endfunction

  // Raise S1 at t1 and S2 at t2 (absolute, t1 <= t2), wait for the result
  // and release both hits. Returns 1 if a result came.
  task automatic measure(real t1, real t2, output logic ok, output tof_result_t r);
    int guard;
    got = 1'b0;
    wait_until(t1);
    s1 = 1'b1;
    wait_until(t2);
    s2 = 1'b1;
    guard = 0;
    while (!got && guard < 40) begin
      @(posedge clk);
      guard++;
    end
    #1;
    ok = got;
    r  = res;
    s1 = 1'b0;
    s2 = 1'b0;
    repeat (3) @(posedge clk);
  endtask

  // random measurements, returns the RMS error and checks each against a bound
  task automatic random_runs(int n, real bound, output real rms);
    real sq = 0.0, t1, t2, truth, err;
    logic ok;
    tof_result_t r;
    for (int k = 0; k < n; k++) begin
      @(posedge clk);
      t1 = $realtime + 100.0 + real'($urandom % 2_500_000) / 1000.0;
      case (k % 4)
        0: truth = real'($urandom % 2_000_000) / 1000.0;          // 0 .. 2 ns
        1: truth = real'($urandom % 20_000_000) / 1000.0;         // 0 .. 20 ns
        2: truth = real'($urandom % 1_000_000_000) / 1000.0;      // 0 .. 1 us
        default: truth = 5000.0 + real'($urandom % 100_000) / 1000.0;
      endcase
      t2 = t1 + truth;
      // first edge that catches the hit at least one tap in
      measure(t1, t2, ok, r);
      err = real'(r.tof_ps) - truth;
      sq += err * err;
      check($sformatf("result for T=%0.3f", truth), ok);
      check($sformatf("T=%0.3f measured %0d err %0.1f", truth, r.tof_ps, err),
            err < bound && err > -bound);
      if (r.coarse == 0) n_same_cycle++;
      if (r.coarse > 100) n_long++;
    end
    rms = $sqrt(sq / real'(n));
  endtask

  // calibration sums, per line and code
  real  cal_sum [2][1 << CODE_W];
  int   cal_cnt [2][1 << CODE_W];

  task automatic sweep(int line);
    real base, t1, t2, x, elapsed;
    logic ok;
    tof_result_t r;
    int code;
    for (int s = 0; s < 2500; s++) begin
      x = real'(s) + 0.25;
      @(posedge clk);
      base = $realtime + 2.0 * TCLK;            // an edge two periods ahead
      if (line == 0) begin
        t1 = base - x;                          // swept
        t2 = base + 3.0 * TCLK - 1250.0;        // caught at base + 3 periods
      end else begin
        t1 = base - 1250.0;                     // caught at base
        t2 = base + 3.0 * TCLK - x;             // swept
      end
      measure(t1, t2, ok, r);
      check("calibration result", ok);
      if (line == 0) begin
        elapsed = x + TCLK * real'(3 - int'(r.coarse));
        code    = int'(r.code1);
      end else begin
        elapsed = x + TCLK * real'(int'(r.coarse) - 3);
        code    = int'(r.code2);
      end
      cal_sum[line][code] += elapsed;
      cal_cnt[line][code]++;
    end
  endtask

  task automatic load_table(int line);
    real v, last;
    int last_c;
    last = 0.0;
    last_c = 0;
    for (int c = 0; c < (1 << CODE_W); c++) begin
      if (cal_cnt[line][c] > 0) begin
        v = cal_sum[line][c] / real'(cal_cnt[line][c]);
        last = v;
        last_c = c;
      end else begin
        v = last + 6.0 * real'(c - last_c);
      end
      @(negedge clk);
      cal_we   = 1'b1;
      cal_line = line[0];
      cal_addr = CODE_W'(c);
      cal_data = FINE_W'(int'(v + 0.5));
      n_cal_writes++;
    end
    @(negedge clk);
    cal_we = 1'b0;
  endtask

  initial begin
    real rms_uncal, rms_cal;
    logic ok;
    tof_result_t r;
    int guard;
    for (int l = 0; l < 2; l++)
      for (int c = 0; c < (1 << CODE_W); c++) begin
        cal_sum[l][c] = 0.0;
        cal_cnt[l][c] = 0;
      end
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // 1. uncalibrated
    random_runs(200, 200.0, rms_uncal);
    $display("uncalibrated RMS error %0.2f ps", rms_uncal);

    // 2. calibration
    sweep(0);
    sweep(1);
    load_table(0);
    load_table(1);

    // 3. calibrated
    random_runs(600, 25.0, rms_cal);
    $display("calibrated RMS error %0.2f ps", rms_cal);
    check("calibration improves RMS", rms_cal < rms_uncal);
    check("calibrated RMS below 6 ps", rms_cal < 6.0);

    // 4a. S1 and S2 just before the same edge
    @(posedge clk);
    measure($realtime + 1000.0, $realtime + 1800.0, ok, r);
    check("same-edge result", ok && r.coarse == 0);
    if (ok && r.coarse == 0) n_same_cycle++;
    check($sformatf("same-edge T=800 got %0d", r.tof_ps), r.tof_ps > 775 && r.tof_ps < 825);

    // 4b. stop without start: no result
    got = 1'b0;
    @(posedge clk);
    s2 = 1'b1;
    repeat (20) @(posedge clk);
    check("stray stop gives no result", !got && !busy_o);
    if (!got) n_stray_stop++;
    s2 = 1'b0;
    repeat (3) @(posedge clk);

    // 4c. second start during a measurement is ignored
    got = 1'b0;
    @(posedge clk);
    begin
      real t0;
      t0 = $realtime + 300.0;
      wait_until(t0);
      s1 = 1'b1;
      repeat (4) @(posedge clk);
      s1 = 1'b0;
      repeat (3) @(posedge clk);
      s1 = 1'b1;                                 // second S1
      repeat (4) @(posedge clk);
      wait_until(t0 + 30000.0);
      s2 = 1'b1;
      guard = 0;
      while (!got && guard < 40) begin @(posedge clk); guard++; end
      check($sformatf("first start kept: T=30000 got %0d", res.tof_ps),
            got && res.tof_ps > 29975 && res.tof_ps < 30025);
      if (got && res.tof_ps > 29975 && res.tof_ps < 30025) n_extra_start++;
      s1 = 1'b0;
      s2 = 1'b0;
      repeat (3) @(posedge clk);
    end

    // 4d. no stop: overflow after 2^16-1 periods
    @(posedge clk);
    #500;
    s1 = 1'b1;
    guard = 0;
    while (n_overflow == 0 && guard < 70000) begin @(posedge clk); guard++; end
    check($sformatf("overflow after %0d cycles", guard), n_overflow == 1 && guard > 65535);
    s1 = 1'b0;
    repeat (5) @(posedge clk);
    check("idle after overflow", !busy_o);

    // every mechanism must have happened
    check($sformatf("same-edge measurements: %0d", n_same_cycle), n_same_cycle > 0);
    check($sformatf("long measurements: %0d", n_long), n_long > 0);
    check($sformatf("results with bubbled words: %0d", n_bubbled), n_bubbled > 0);
    check($sformatf("calibration writes: %0d", n_cal_writes), n_cal_writes == 2 << CODE_W);
    check($sformatf("overflows: %0d", n_overflow), n_overflow == 1);
    check($sformatf("ignored stray stops: %0d", n_stray_stop), n_stray_stop > 0);
    check($sformatf("ignored extra starts: %0d", n_extra_start), n_extra_start > 0);
    $display("mechanisms: same-edge %0d, long %0d, bubbled %0d, cal writes %0d, overflow %0d, stray stop %0d, extra start %0d, results %0d",
             n_same_cycle, n_long, n_bubbled, n_cal_writes, n_overflow, n_stray_stop,
             n_extra_start, n_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
