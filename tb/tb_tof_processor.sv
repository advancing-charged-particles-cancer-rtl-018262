// tb_tof_processor: feeds random fine times T1 and T3 and coarse counts N,
// with gaps between the start and the stop report and with start and stop
// in the same cycle, and checks T = T1 + N*2500 - T3 and the carried-along
// fields, two cycles after done_i.
module tb_tof_processor;
  import tdc_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic                clk = 0, rst_n = 0;
  logic                started_i = 0, done_i = 0;
  logic [FINE_W-1:0]   t1_i = '0, t3_i = '0;
  logic [CODE_W-1:0]   code1_i = '0, code2_i = '0;
  logic [COARSE_W-1:0] n_i = '0;
  logic                valid_o;
  tof_result_t         result_o;
  int checks = 0, failures = 0;

  tof_processor dut (.*);

  always #1250 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic one(int gap);
    int unsigned t1, t3, n, c1, c2;
    longint expect_t;
    t1 = $urandom % 3000; t3 = $urandom % 3000; c1 = $urandom % 481; c2 = $urandom % 481;
    n  = (gap == 0) ? 0 : $urandom % 65536;
    expect_t = longint'(t1) + longint'(n) * 2500 - longint'(t3);
    started_i <= 1; t1_i <= FINE_W'(t1); code1_i <= CODE_W'(c1);
    if (gap == 0) begin
      done_i <= 1; n_i <= COARSE_W'(n); t3_i <= FINE_W'(t3); code2_i <= CODE_W'(c2);
      @(posedge clk);
      started_i <= 0; done_i <= 0;
    end else begin
      @(posedge clk);
      started_i <= 0; t1_i <= FINE_W'($urandom); code1_i <= '0;   // inputs change after capture
      repeat (gap - 1) @(posedge clk);
      done_i <= 1; n_i <= COARSE_W'(n); t3_i <= FINE_W'(t3); code2_i <= CODE_W'(c2);
      @(posedge clk);
      done_i <= 0;
    end
    #1; check("no early valid", valid_o === 1'b0);
    @(posedge clk);
    #1;
    check($sformatf("T expected %0d got %0d", expect_t, result_o.tof_ps),
          valid_o === 1'b1 && longint'(result_o.tof_ps) == expect_t);
    check("fields", result_o.coarse === COARSE_W'(n) && result_o.t1_ps === FINE_W'(t1) &&
          result_o.t3_ps === FINE_W'(t3) && result_o.code1 === CODE_W'(c1) &&
          result_o.code2 === CODE_W'(c2));
    @(posedge clk);
    #1; check("valid is one cycle", valid_o === 1'b0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < 300; k++) one((k % 3 == 0) ? 0 : 1 + ($urandom % 5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
