// tb_tdl_delay_line: checks the delay-line model. An ideal line (6 ps taps,
// no spread, skew or metastability) must sample an exact thermometer code of
// floor(x/6) ones when the hit rose x ps before the clock edge, and the
// mirror image when the hit fell. A line with the default non-uniformity
// must give a ones count that grows with x (apart from the odd metastable
// tap), stays within a few bins of x/6, and shows bubbles in some words.
module tb_tdl_delay_line;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned TAPS = 480;

  logic            clk = 0, hit = 0;
  logic [TAPS-1:0] q_ideal, q_real;
  int checks = 0, failures = 0;

  tdl_delay_line #(.TAPS(TAPS), .TAP_PS(6.0), .TAP_SPREAD_PS(0.0), .SKEW_PS(0.0), .META_PS(0.0))
    u_ideal (.clk, .hit, .taps_q(q_ideal));
  tdl_delay_line #(.TAPS(TAPS), .SEED(5)) u_real (.clk, .hit, .taps_q(q_real));

  always #1250 clk = ~clk;

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int ones(logic [TAPS-1:0] w);
    int n = 0;
    for (int i = 0; i < int'(TAPS); i++) n += int'(w[i]);
    return n;
  endfunction

  function automatic logic bubbled(logic [TAPS-1:0] w);
    for (int i = 1; i < int'(TAPS); i++) if (w[i] && !w[i-1]) return 1'b1;
    return 1'b0;
  endfunction

  // set hit to v at x ps before the next-but-one rising edge, return after it
  task automatic edge_before_clock(logic v, real x);
    @(posedge clk);
    #(2500.0 - x);
    hit = v;
    @(posedge clk);
    #1;
  endtask

  initial begin
    int n_ideal, n_real, prev_real, bubbles;
    logic [TAPS-1:0] expect_w;
    prev_real = 0;
    bubbles   = 0;
    repeat (3) @(posedge clk);
    for (int s = 1; s < 2500; s += 3) begin
      real x;
      x = real'(s) + 0.5;
      edge_before_clock(1'b1, x);
      n_ideal  = int'(x) / 6;
      expect_w = (TAPS'(1) << n_ideal) - 1;
      check($sformatf("ideal rise x=%0.1f ones=%0d", x, ones(q_ideal)), q_ideal === expect_w);
      n_real = ones(q_real);
      check($sformatf("real monotonic x=%0.1f %0d after %0d", x, n_real, prev_real),
            n_real >= prev_real - 2);
      check($sformatf("real near nominal x=%0.1f ones=%0d", x, n_real),
            n_real >= n_ideal - 12 && n_real <= n_ideal + 12);
      if (bubbled(q_real)) bubbles++;
      prev_real = n_real;
      // after a full period the ideal line holds only ones up to 2500+x ps
      @(posedge clk);
      #1;
      // falling edge: zeros enter from tap 0
      edge_before_clock(1'b0, x);
      check($sformatf("ideal fall x=%0.1f", x), q_ideal === ~expect_w);
      repeat (2) @(posedge clk);
    end
    check($sformatf("bubbles seen: %0d", bubbles), bubbles > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
