// tb_coarse_counter: checks the coarse cycle counter with directed and random
// start/stop sequences: the count equals the number of cycles between the
// strobes, start and stop in one cycle give 0, a stop while idle and a second
// start while busy are ignored, and a missing stop ends in an overflow after
// exactly 2^W-1 counted cycles (W = 6 here to keep the run short).
module tb_coarse_counter;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned W = 6;

  logic         clk = 0, rst_n = 0;
  logic         start_i = 0, stop_i = 0;
  logic         started_o, done_o, ovf_o, busy_o;
  logic [W-1:0] count_o;
  int checks = 0, failures = 0;

  coarse_counter #(.W(W)) dut (.*);

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

  // one strobe: set on a rising edge, cleared on the next
  task automatic pulse_start(); start_i <= 1; @(posedge clk); start_i <= 0; endtask
  task automatic pulse_stop();  stop_i  <= 1; @(posedge clk); stop_i  <= 0; endtask

  // start, then stop n cycles later; expect done with count n one cycle later
  task automatic measure(int n);
    if (n == 0) begin
      start_i <= 1; stop_i <= 1; @(posedge clk); start_i <= 0; stop_i <= 0;
      #1; check("started N=0", started_o === 1'b1);
      check("done N=0", done_o === 1'b1 && count_o === '0);
    end else begin
      pulse_start();
      #1; check("started", started_o === 1'b1 && done_o === 1'b0);
      @(negedge clk);
      repeat (n - 1) begin
        check("no early done", done_o === 1'b0 && ovf_o === 1'b0 && busy_o === 1'b1);
        @(posedge clk);
        #1;
      end
      pulse_stop();
      #1; check($sformatf("count %0d got %0d", n, count_o), done_o === 1'b1 && count_o === W'(n));
    end
    @(posedge clk);
    #1; check("idle after", busy_o === 1'b0 && done_o === 1'b0);
  endtask

  initial begin
    int ncount;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // stop while idle is ignored
    pulse_stop();
    #1; check("stray stop ignored", done_o === 1'b0 && busy_o === 1'b0);
    @(posedge clk);
    // directed counts, including the largest representable
    measure(0);
    measure(1);
    measure(2);
    measure(17);
    measure((1 << W) - 1);
    // second start while busy does not restart the count
    pulse_start();
    repeat (4) @(posedge clk);
    pulse_start();
    repeat (4) @(posedge clk);
    pulse_stop();
    #1; check("extra start ignored", done_o === 1'b1 && count_o === W'(10));
    @(posedge clk);
    // overflow: no stop within 2^W-1 cycles
    pulse_start();
    #1;
    ncount = 1;
    while (ovf_o !== 1'b1 && ncount < 200) begin
      @(posedge clk);
      #1;
      ncount++;
    end
    check($sformatf("overflow after %0d cycles", ncount), ovf_o === 1'b1 && ncount == (1 << W));
    check("no done at overflow", done_o === 1'b0);
    @(posedge clk);
    #1; check("idle after overflow", busy_o === 1'b0);
    // random counts
    for (int k = 0; k < 200; k++) measure($urandom % (1 << W));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
