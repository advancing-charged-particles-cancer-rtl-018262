// tb_fine_channel: presents first-stage words of hits (clean and bubbled)
// with idle words in between, after loading part of the calibration table,
// and checks that each hit gives exactly one hit_o pulse six edges after
// the word, with code = number of ones, the calibrated time from the table
// (loaded entries or the initial c*6-3), the bubble and saturation flags, and
// that the outputs hold until the next hit.
module tb_fine_channel;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned TAPS = 480, CW = 9, FW = 16;

  logic            clk = 0, rst_n = 0;
  logic [TAPS-1:0] taps_i = '0;
  logic            hit_o, sat_o, bubble_o;
  logic [FW-1:0]   fine_ps_o;
  logic [CW-1:0]   code_o;
  logic            cal_we = 0;
  logic [CW-1:0]   cal_addr = '0;
  logic [FW-1:0]   cal_data = '0;
  logic [FW-1:0]   table_ref [1 << CW];
  int checks = 0, failures = 0;

  fine_channel #(.TAPS(TAPS)) dut (.*);

  always #1250 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic int ones(logic [TAPS-1:0] w);
    int n = 0;
    for (int i = 0; i < int'(TAPS); i++) n += int'(w[i]);
    return n;
  endfunction

  initial begin
    logic [TAPS-1:0] w;
    int c, lat, n_hits;
    logic bub;
    for (int i = 0; i < (1 << CW); i++) table_ref[i] = (i == 0) ? '0 : FW'(6 * i - 3);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // load a calibration into the even entries
    for (int i = 0; i < (1 << CW); i += 2) begin
      cal_we <= 1; cal_addr <= CW'(i); cal_data <= FW'(7 * i + 1);
      table_ref[i] = FW'(7 * i + 1);
      @(posedge clk);
    end
    cal_we <= 0;
    @(posedge clk);
    for (int k = 0; k < 300; k++) begin
      c = 4 + $urandom % (TAPS - 4);
      w = (c == int'(TAPS)) ? '1 : ((TAPS'(1) << c) - 1);
      bub = 1'b0;
      if (k % 3 == 1 && c > 8 && c < int'(TAPS) - 4) begin
        w[c - 3] = 1'b0;
        w[c + 1] = 1'b1;
        bub = 1'b1;
      end
      if (k == 7) begin w = '1; bub = 1'b0; end
      // the word appears just after a rising edge, as from the line's flip-flops
      @(posedge clk);
      taps_i <= w;
      lat = 0;
      n_hits = 0;
      // the saturated level holds for two cycles, then the hit falls
      for (int j = 0; j < 9; j++) begin
        @(posedge clk);
        lat++;
        if (j == 1) taps_i <= '0;
        #1;
        if (hit_o) begin
          n_hits++;
          check($sformatf("latency %0d", lat), lat == 6);
          check($sformatf("code %0d expected %0d", code_o, ones(w)), code_o === CW'(ones(w)));
          check("fine time", fine_ps_o === table_ref[ones(w)]);
          check("flags", bubble_o === bub && sat_o === (&w));
        end
      end
      check("one hit", n_hits == 1);
      check("held", code_o === CW'(ones(w)) && fine_ps_o === table_ref[ones(w)]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
