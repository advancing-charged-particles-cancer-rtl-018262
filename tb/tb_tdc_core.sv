// tb_tdc_core: drives the synthesizable core with first-stage words as the
// two delay lines would deliver them (a thermometer of c1 ones on line 1,
// then G clock periods later c2 ones on line 2, each held while the hit is
// high) and checks T = (6*c1-3) + G*2500 - (6*c2-3) with the initial linear
// tables, the reported codes, and the latency of 9 clock edges from the
// edge that delivered line 2's word to result_valid_o.
module tb_tdc_core;
  import tdc_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic              clk = 0, rst_n = 0;
  logic [TAPS-1:0]   taps1 = '0, taps2 = '0;
  logic              cal_we = 0, cal_line = 0;
  logic [CODE_W-1:0] cal_addr = '0;
  logic [FINE_W-1:0] cal_data = '0;
  logic              result_valid_o, overflow_o, busy_o;
  tof_result_t       result_o;
  logic [1:0]        sat_o, bubble_o;
  int checks = 0, failures = 0;

  tdc_core dut (.*);

  always #1250 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
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

  function automatic logic [TAPS-1:0] therm(int c);
    return (TAPS'(1) << c) - 1;
  endfunction

  initial begin
    int c1, c2, g, lat;
    longint expect_t;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int k = 0; k < 200; k++) begin
      c1 = 4 + $urandom % 470;
      c2 = 4 + $urandom % 470;
      g  = (k % 5 == 0) ? 0 : 1 + $urandom % 300;
      expect_t = longint'(6 * c1 - 3) + longint'(g) * 2500 - longint'(6 * c2 - 3);
      @(posedge clk);
      taps1 <= therm(c1);
      if (g == 0) taps2 <= therm(c2);
      @(posedge clk);
      taps1 <= '1;
      if (g == 0) taps2 <= '1;
      if (g > 0) begin
        repeat (g - 1) @(posedge clk);
        taps2 <= therm(c2);
        @(posedge clk);
        taps2 <= '1;
      end
      lat = 1;
      #1;
      while (!result_valid_o && lat < 30) begin
        @(posedge clk);
        #1;
        lat++;
      end
      check($sformatf("latency %0d", lat), lat == 9);
      check($sformatf("T expected %0d got %0d", expect_t, result_o.tof_ps),
            longint'(result_o.tof_ps) == expect_t);
      check("codes and count", result_o.code1 == CODE_W'(c1) && result_o.code2 == CODE_W'(c2) &&
            result_o.coarse == COARSE_W'(g));
      @(posedge clk);
      taps1 <= '0;
      taps2 <= '0;
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
