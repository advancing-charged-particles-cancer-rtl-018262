// tb_delay_sweep: input/output characteristic of the full converter, before
// and after calibration. Fixed S1 -> S2 delays from 300 ps to 2900 ps in
// 100 ps steps (this range also holds the 500-1500 ps sweep) are each
// applied 40 times at random phases against the clock, and the mean and
// standard deviation of the measured time are printed per delay.
//
// Between the two sweeps both lines are calibrated by the hit-offset sweep
// described for tb_tdc_top (1 ps steps over one clock period). Checks: every
// measurement returns a result; after calibration every mean lies within
// 3 ps of the applied delay and every standard deviation is below 6 ps; the
// calibrated spread, averaged over all delays, is below the uncalibrated one.
module tb_delay_sweep;
  import tdc_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TCLK = 2500.0;
  localparam int  REPS = 40;

  logic              clk = 0, rst_n = 0, s1 = 0, s2 = 0;
  logic              cal_we = 0, cal_line = 0;
  logic [CODE_W-1:0] cal_addr = '0;
  logic [FINE_W-1:0] cal_data = '0;
  logic              result_valid_o, overflow_o, busy_o;
  tof_result_t       result_o;
  logic [1:0]        sat_o, bubble_o;

  tdc_top dut (.*);

  always #1250 clk = ~clk;

  int checks = 0, failures = 0;

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

  logic        got = 0;
  tof_result_t res;
  always @(posedge clk) begin
    if (result_valid_o && rst_n) begin
      got <= 1'b1;
      res <= result_o;
    end
  end

  task automatic wait_until(real t);
    if (t > $realtime) #(t - $realtime);
  endtask

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

  // one pass over all delays; returns the mean standard deviation
  task automatic characteristic(string label, logic calibrated, output real avg_sd);
    real sum, sq, mean, sd, t1, v, sd_total;
    logic ok;
    tof_result_t r;
    sd_total = 0.0;
    for (int d = 300; d <= 2900; d += 100) begin
      sum = 0.0;
      sq  = 0.0;
      for (int k = 0; k < REPS; k++) begin
        @(posedge clk);
        t1 = $realtime + 100.0 + real'($urandom % 2_500_000) / 1000.0;
        measure(t1, t1 + real'(d), ok, r);
        check($sformatf("%s result at %0d ps", label, d), ok);
        v = real'(r.tof_ps);
        sum += v;
        sq  += v * v;
      end
      mean = sum / real'(REPS);
      sd   = $sqrt((sq / real'(REPS) - mean * mean) > 0.0 ? (sq / real'(REPS) - mean * mean) : 0.0);
      sd_total += sd;
      $display("%s delay %4d ps: mean %7.1f ps, sd %5.1f ps", label, d, mean, sd);
      if (calibrated) begin
        check($sformatf("calibrated mean at %0d ps: %0.1f", d, mean), mean > real'(d) - 3.0 && mean < real'(d) + 3.0);
        check($sformatf("calibrated sd at %0d ps: %0.1f", d, sd), sd < 6.0);
      end
    end
    avg_sd = sd_total / 27.0;
  endtask

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
      base = $realtime + 2.0 * TCLK;
      if (line == 0) begin
        t1 = base - x;
        t2 = base + 3.0 * TCLK - 1250.0;
      end else begin
        t1 = base - 1250.0;
        t2 = base + 3.0 * TCLK - x;
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
    end
    @(negedge clk);
    cal_we = 1'b0;
  endtask

  initial begin
    real sd_uncal, sd_cal;
    for (int l = 0; l < 2; l++)
      for (int c = 0; c < (1 << CODE_W); c++) begin
        cal_sum[l][c] = 0.0;
        cal_cnt[l][c] = 0;
      end
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    characteristic("uncalibrated", 1'b0, sd_uncal);
    sweep(0);
    sweep(1);
    load_table(0);
    load_table(1);
    characteristic("calibrated", 1'b1, sd_cal);
    $display("mean sd: uncalibrated %0.1f ps, calibrated %0.1f ps", sd_uncal, sd_cal);
    check("calibration narrows the spread", sd_cal < sd_uncal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
